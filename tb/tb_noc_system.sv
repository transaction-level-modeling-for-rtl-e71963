// tb_noc_system: the 2x2 network system from start to the last delivery.
//
// The testbench pulses start and checks the setup: irq high while the four
// routers receive their coordinates (read back from the routers), no packet
// injected before irq falls. Every core then sends NPKT packets with random
// gaps. Packets are followed from the Local input of the source router to
// the Local output of the destination router: each must arrive at the core
// it was addressed to, intact, and the router traversals counted by the
// routers must equal distance + 1 per packet. The latency histogram is
// printed; the shortest latency must be 2 cycles (20 ns at 100 MHz, a packet
// between neighbours through two routers) and diagonal packets need at least
// 3. Counters, payload sums and done are checked at the end.
module tb_noc_system;
  import noc_pkg::*;
  localparam int R = 2, C = 2, NR = R * C, NP = 300;

  logic clk = 0, rst_n = 0, start = 0, irq, done;
  logic active [NR];
  logic [15:0] sent [NR], rcvd [NR], rx_err [NR];
  logic [31:0] tx_sum_total, rx_sum_total, hop_total, run_cycles;
  int checks = 0, failures = 0;

  noc_system #(.ROWS(R), .COLS(C), .NPKT(NP)) dut (.*);

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

  function automatic int mdist(input int a, input int b);
    int ax, ay, bx, by;
    ax = a / R; ay = a % R; bx = b / R; by = b % R;
    return (ax > bx ? ax - bx : bx - ax) + (ay > by ? ay - by : by - ay);
  endfunction

  typedef struct { flit_t f; longint t; } pkt_t;
  pkt_t fq [NR][NR][$];           // [src][dst]
  int   lat_hist [16];
  int   min_lat_diag = 1000, min_lat = 1000, misdelivered = 0, early = 0;
  longint exp_hops = 0;
  bit   irq_seen = 0, released = 0;

  always @(posedge clk) if (rst_n) begin
    if (irq) irq_seen = 1;
    if (irq_seen && !irq) released = 1;
    for (int s = 0; s < NR; s++) if (dut.inj_valid[s] && dut.inj_ready[s]) begin
      int d;
      if (!released) early++;
      d = int'(coord_to_idx(dut.inj_flit[s].coord, R));
      fq[s][d].push_back('{dut.inj_flit[s], cycle});
      exp_hops += mdist(s, d) + 1;
    end
    for (int d = 0; d < NR; d++) if (dut.ej_valid[d]) begin
      automatic bit found = 0;
      for (int s = 0; s < NR && !found; s++)
        if (fq[s][d].size() > 0 && fq[s][d][0].f == dut.ej_flit[d]) begin
          int l;
          found = 1;
          l = int'(cycle - fq[s][d][0].t);
          lat_hist[l > 15 ? 15 : l]++;
          if (l < min_lat) min_lat = l;
          if (mdist(s, d) == 2 && l < min_lat_diag) min_lat_diag = l;
          void'(fq[s][d].pop_front());
        end
      if (!found) misdelivered++;
    end
  end

  initial begin
    for (int n = 0; n < NR; n++) active[n] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    check(irq, "irq raised for setup");
    wait (!irq);
    for (int n = 0; n < NR; n++)
      check(dut.coord[n] == idx_to_coord(n, R), $sformatf("router %0d coordinates", n));
    wait (done);
    repeat (3) @(negedge clk);
    begin
      int ts = 0, tr = 0, te = 0;
      for (int n = 0; n < NR; n++) begin ts += sent[n]; tr += rcvd[n]; te += rx_err[n]; end
      check(ts == NR * NP, $sformatf("all packets sent (%0d)", ts));
      check(tr == ts, "all packets received");
      check(te == 0 && misdelivered == 0, "no packet at the wrong core");
      check(early == 0, "nothing injected before irq falls");
      check(tx_sum_total == rx_sum_total, "payload sums match");
      check(longint'(hop_total) == exp_hops, $sformatf("router traversals %0d, expected %0d", hop_total, exp_hops));
      check(min_lat == 2, $sformatf("minimum latency %0d cycles", min_lat));
      check(min_lat_diag >= 3, "diagonal packets pass three routers");
      $display("noc 2x2: %0d packets in %0d cycles, average %0.2f routers per packet",
               tr, run_cycles, real'(hop_total) / tr);
      for (int l = 0; l < 16; l++) if (lat_hist[l] > 0)
        $display("  latency %0d cycles (%0d ns): %0d packets", l, l * 10, lat_hist[l]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
