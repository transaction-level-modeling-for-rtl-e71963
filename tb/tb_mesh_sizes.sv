// tb_mesh_sizes: the 3x3 and 4x4 configurations, network against bus.
//
// Both larger systems run side by side with random-gap traffic, 200 packets
// per core. For each, every packet must be delivered on both sides with
// matching payloads, and the hop count of every network packet (routers
// crossed plus one, the count used when comparing with the bus's two hops)
// must lie between 3 and 2*(N-1)+2: 3..6 for 3x3 and 3..8 for 4x4, with
// both ends of the range seen. Cycle counts, throughput and the average hop
// count are printed for each size.
module tb_mesh_sizes;
  import noc_pkg::*;
  localparam int NP = 200;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  for (genvar S = 3; S <= 4; S++) begin : g_size
    localparam int NR = S * S;
    logic irq, noc_done, soc_done;
    logic active [NR];
    logic [15:0] noc_sent [NR], noc_rcvd [NR], noc_rx_err [NR];
    logic [15:0] soc_sent [NR], soc_rcvd [NR], soc_rx_err [NR];
    logic [31:0] noc_tx_sum, noc_rx_sum, noc_hops, noc_cycles, soc_tx_sum, soc_rx_sum, soc_cycles;
    int hop_hist [10];

    noc_soc_top #(.ROWS(S), .COLS(S), .NPKT(NP)) dut (.*);

    always_comb for (int n = 0; n < NR; n++) active[n] = 1'b1;

    always @(posedge clk) if (rst_n)
      for (int n = 0; n < NR; n++)
        if (dut.u_noc.inj_valid[n] && dut.u_noc.inj_ready[n]) begin
          int d, h;
          d = int'(coord_to_idx(dut.u_noc.inj_flit[n].coord, S));
          h = ((d / S) > (n / S) ? (d / S) - (n / S) : (n / S) - (d / S))
            + ((d % S) > (n % S) ? (d % S) - (n % S) : (n % S) - (d % S)) + 2;
          hop_hist[h > 9 ? 9 : h]++;
        end

    task automatic report();
      int ns = 0, nr = 0, ss = 0, sr = 0, err = 0, lo = 99, hi = 0;
      for (int n = 0; n < NR; n++) begin
        ns += noc_sent[n]; nr += noc_rcvd[n]; ss += soc_sent[n]; sr += soc_rcvd[n];
        err += noc_rx_err[n] + soc_rx_err[n];
      end
      check(ns == NR * NP && nr == ns && ss == ns && sr == ss, $sformatf("%0dx%0d: all packets delivered", S, S));
      check(err == 0, $sformatf("%0dx%0d: no packet at the wrong core", S, S));
      check(noc_tx_sum == noc_rx_sum && soc_tx_sum == soc_rx_sum && noc_tx_sum == soc_tx_sum,
            $sformatf("%0dx%0d: identical payloads", S, S));
      for (int h = 0; h < 10; h++) if (hop_hist[h] > 0) begin
        if (h < lo) lo = h;
        if (h > hi) hi = h;
      end
      check(lo == 3 && hi == 2 * (S - 1) + 2, $sformatf("%0dx%0d: hops %0d..%0d", S, S, lo, hi));
      check(real'(noc_hops) / nr + 1.0 > 3.0, "average hop count above the minimum");
      $display("%0dx%0d: NoC %0d cycles (%0.3f packets/cycle), average %0.2f hops; bus %0d cycles (%0.3f packets/cycle)",
               S, S, noc_cycles, real'(nr) / noc_cycles, real'(noc_hops) / nr + 1.0,
               soc_cycles, real'(sr) / soc_cycles);
      for (int h = 3; h < 10; h++) if (hop_hist[h] > 0) $display("  %0d hops: %0d packets", h, hop_hist[h]);
    endtask
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    wait (g_size[3].noc_done && g_size[3].soc_done && g_size[4].noc_done && g_size[4].soc_done);
    @(negedge clk);
    g_size[3].report();
    g_size[4].report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
