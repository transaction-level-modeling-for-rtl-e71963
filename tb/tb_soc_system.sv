// tb_soc_system: the four-core shared-bus system from start to the last
// delivery.
//
// Nothing may be requested before irq falls. Every core then sends NPKT
// packets with random gaps. Each packet is followed from the cycle its core
// first offers it to the cycle the destination core's slave port receives
// it: it must arrive at the core owning its address window, with its
// payload. Without competition a packet is received one cycle after it is
// offered (10 ns at 100 MHz); competing packets wait for the bus. The test
// checks the one-cycle minimum, that waiting did occur, that the bus never
// moved more than one packet per cycle, and the counters at the end.
module tb_soc_system;
  import noc_pkg::*;
  localparam int NC = 4, NP = 300;

  logic clk = 0, rst_n = 0, irq = 0, done;
  logic active [NC];
  logic [15:0] sent [NC], rcvd [NC], rx_err [NC];
  logic [31:0] tx_sum_total, rx_sum_total, run_cycles;
  int checks = 0, failures = 0;

  soc_system #(.NCORES(NC), .NPKT(NP)) dut (.*);

  always #5 clk = ~clk;
  longint cycle = 0;
  always @(negedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  typedef struct { logic [15:0] p; longint t; } pkt_t;
  pkt_t fq [NC][NC][$];
  longint offered [NC];
  bit     pending [NC];
  int lat_hist [16], min_lat = 1000, waited = 0, misdelivered = 0, early = 0, multi = 0;
  bit released = 0;

  always @(posedge clk) if (rst_n) begin
    automatic int nrx = 0;
    for (int s = 0; s < NC; s++) begin
      if (dut.req_valid[s] && !released) early++;
      if (dut.req_valid[s] && !pending[s]) begin pending[s] = 1; offered[s] = cycle; end
      if (dut.req_valid[s] && dut.req_ready[s]) begin
        fq[s][dut.tx_dest[s]].push_back('{dut.tx_payload[s], offered[s]});
        pending[s] = 0;
      end
    end
    for (int d = 0; d < NC; d++) if (dut.rx_valid[d]) begin
      automatic bit found = 0;
      nrx++;
      for (int s = 0; s < NC && !found; s++)
        if (fq[s][d].size() > 0 && fq[s][d][0].p == dut.rx_data[d][15:0]
            && dut.rx_addr[d] == idx_to_addr(d)) begin
          int l;
          found = 1;
          l = int'(cycle - fq[s][d][0].t);
          lat_hist[l > 15 ? 15 : l]++;
          if (l < min_lat) min_lat = l;
          if (l > 1) waited++;
          void'(fq[s][d].pop_front());
        end
      if (!found) misdelivered++;
    end
    if (nrx > 1) multi++;
  end

  initial begin
    for (int n = 0; n < NC; n++) begin active[n] = 1; pending[n] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    irq = 1; repeat (5) @(negedge clk);
    irq = 0; released = 1;
    wait (done);
    repeat (3) @(negedge clk);
    begin
      int ts = 0, tr = 0, te = 0;
      for (int n = 0; n < NC; n++) begin ts += sent[n]; tr += rcvd[n]; te += rx_err[n]; end
      check(ts == NC * NP, $sformatf("all packets sent (%0d)", ts));
      check(tr == ts, "all packets received");
      check(te == 0 && misdelivered == 0, "no packet at the wrong core");
      check(early == 0, "nothing requested before irq falls");
      check(tx_sum_total == rx_sum_total, "payload sums match");
      check(min_lat == 1, $sformatf("minimum latency %0d cycles", min_lat));
      check(waited > 0, "bus contention made packets wait");
      check(multi == 0, "at most one packet per cycle on the bus");
      $display("soc 4 cores: %0d packets in %0d cycles, %0d waited for the bus", tr, run_cycles, waited);
      for (int l = 0; l < 16; l++) if (lat_hist[l] > 0)
        $display("  latency %0d cycles (%0d ns): %0d packets", l, l * 10, lat_hist[l]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
