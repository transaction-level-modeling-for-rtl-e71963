// tb_noc_soc_full: one complete run of the top at its default size.
//
// The top is used with all its defaults: a 2x2 mesh against a four-core
// bus, 1000 packets per core, random 0..9-cycle gaps. After reset the
// testbench pulses start, waits for both systems to report done and checks
// that all 4000 packets were delivered on both sides to the right cores,
// with identical payload sums, and prints the cycle counts and the average
// number of routers per packet.
module tb_noc_soc_full;
  import noc_pkg::*;
  localparam int NR = 4, NP = 1000;

  logic clk = 0, rst_n = 0, start = 0, irq, noc_done, soc_done;
  logic active [NR];
  logic [15:0] noc_sent [NR], noc_rcvd [NR], noc_rx_err [NR];
  logic [15:0] soc_sent [NR], soc_rcvd [NR], soc_rx_err [NR];
  logic [31:0] noc_tx_sum, noc_rx_sum, noc_hops, noc_cycles;
  logic [31:0] soc_tx_sum, soc_rx_sum, soc_cycles;
  int checks = 0, failures = 0;

  noc_soc_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    int ns, nr, ss, sr, err;
    for (int n = 0; n < NR; n++) active[n] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    wait (noc_done && soc_done);
    @(negedge clk);
    ns = 0; nr = 0; ss = 0; sr = 0; err = 0;
    for (int n = 0; n < NR; n++) begin
      ns += noc_sent[n]; nr += noc_rcvd[n]; ss += soc_sent[n]; sr += soc_rcvd[n];
      err += noc_rx_err[n] + soc_rx_err[n];
      check(noc_sent[n] == 16'(NP) && soc_sent[n] == 16'(NP), $sformatf("core %0d sent %0d packets", n, NP));
    end
    check(nr == NR * NP && sr == NR * NP, "every packet delivered on both");
    check(err == 0, "no packet at the wrong core");
    check(noc_tx_sum == noc_rx_sum && soc_tx_sum == soc_rx_sum && noc_tx_sum == soc_tx_sum,
          "identical payloads on both");
    $display("full size: NoC %0d cycles, %0.2f routers/packet; bus %0d cycles",
             noc_cycles, real'(noc_hops) / nr, soc_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
