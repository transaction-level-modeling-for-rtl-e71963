// tb_noc_soc_top: end-to-end comparison of the network and the bus.
//
// Two copies of the top run: one with constant-bit-rate traffic, one with
// random 0..9-cycle gaps, both with NPKT packets per core on the 2x2 / four
// core configuration. Three experiments are run:
//   1. constant bit rate, all four cores sending: the network must finish the
//      same traffic in fewer cycles than the bus (higher throughput);
//   2. constant bit rate, only core 0 sending: the bus must be at least as
//      fast as the network (no competition, and one bus transfer is shorter
//      than two or three router hops);
//   3. random gaps, all cores sending.
// Every run must deliver every packet to the right core with matching payload
// sums on both sides. Each mechanism of the design is counted and must occur
// at least once: the coordinate set-up, competition for a router output,
// a router output held back by a full neighbour buffer, competition for the
// bus, packets crossing two and three routers, and delivery at every core.
//
// Latency (cycles from a packet being offered to it being received) is
// recorded for the constant-bit-rate runs. The bus transfers are blocking,
// so with constant bit rate nearly every bus packet must see the same
// latency: 1 cycle (10 ns at 100 MHz) with one core sending, and a longer
// one, set by the wait for the arbiter, with four. On the network the
// shortest latency must be 2 cycles (20 ns), two routers crossed.
module tb_noc_soc_top;
  import noc_pkg::*;
  localparam int R = 2, C = 2, NR = R * C, NP = 200;

  logic clk = 0;
  int checks = 0, failures = 0;

  logic rst_n [2], start [2], irq [2], noc_done [2], soc_done [2];
  logic active [2][NR];
  logic [15:0] noc_sent [2][NR], noc_rcvd [2][NR], noc_rx_err [2][NR];
  logic [15:0] soc_sent [2][NR], soc_rcvd [2][NR], soc_rx_err [2][NR];
  logic [31:0] noc_tx_sum [2], noc_rx_sum [2], noc_hops [2], noc_cycles [2];
  logic [31:0] soc_tx_sum [2], soc_rx_sum [2], soc_cycles [2];

  for (genvar g = 0; g < 2; g++) begin : g_top
    noc_soc_top #(.ROWS(R), .COLS(C), .NPKT(NP), .CBR(g == 0)) dut (
      .clk(clk), .rst_n(rst_n[g]), .start(start[g]), .active(active[g]), .irq(irq[g]),
      .noc_sent(noc_sent[g]), .noc_rcvd(noc_rcvd[g]), .noc_rx_err(noc_rx_err[g]),
      .noc_tx_sum(noc_tx_sum[g]), .noc_rx_sum(noc_rx_sum[g]), .noc_hops(noc_hops[g]),
      .noc_cycles(noc_cycles[g]), .noc_done(noc_done[g]),
      .soc_sent(soc_sent[g]), .soc_rcvd(soc_rcvd[g]), .soc_rx_err(soc_rx_err[g]),
      .soc_tx_sum(soc_tx_sum[g]), .soc_rx_sum(soc_rx_sum[g]),
      .soc_cycles(soc_cycles[g]), .soc_done(soc_done[g]));
  end

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

  // mechanism counters (copy 0 and copy 1 together)
  int n_coord_writes = 0, n_out_conflict = 0, n_backpressure = 0, n_bus_conflict = 0;
  int n_two_routers = 0, n_three_routers = 0;
  int n_rx_core [NR];

  for (genvar g = 0; g < 2; g++) begin : g_mon
    always @(posedge clk) if (rst_n[g]) begin
      int nreq;
      for (int n = 0; n < NR; n++) if (g_top[g].dut.u_noc.coord_we[n]) n_coord_writes++;
      nreq = 0;
      for (int n = 0; n < NR; n++) if (g_top[g].dut.u_soc.hbusreq[n]) nreq++;
      if (nreq > 1) n_bus_conflict++;
      for (int n = 0; n < NR; n++) begin
        if (g_top[g].dut.u_noc.ej_valid[n]) n_rx_core[n]++;
        if (g_top[g].dut.u_noc.inj_valid[n] && g_top[g].dut.u_noc.inj_ready[n]) begin
          int d, hd;
          d = int'(coord_to_idx(g_top[g].dut.u_noc.inj_flit[n].coord, R));
          hd = ((d / R) != (n / R)) + ((d % R) != (n % R));
          if (hd == 1) n_two_routers++;
          if (hd == 2) n_three_routers++;
        end
      end
    end
  end

  // latency histograms, copy 0 (constant bit rate); cleared by each run
  int bus_lat [16], noc_lat [16], bus_wait [NR];
  int inj_time [NR * 65536];   // by destination and payload
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n[0]) begin
    for (int n = 0; n < NR; n++) begin
      if (g_top[0].dut.u_soc.req_valid[n]) begin
        if (g_top[0].dut.u_soc.req_ready[n]) begin
          bus_lat[bus_wait[n] + 1 > 15 ? 15 : bus_wait[n] + 1]++;
          bus_wait[n] = 0;
        end else bus_wait[n]++;
      end
      if (g_top[0].dut.u_noc.inj_valid[n] && g_top[0].dut.u_noc.inj_ready[n])
        inj_time[int'(coord_to_idx(g_top[0].dut.u_noc.inj_flit[n].coord, R)) * 65536
                 + int'(g_top[0].dut.u_noc.inj_flit[n].payload)] = cyc;
      if (g_top[0].dut.u_noc.ej_valid[n]) begin
        int l;
        l = cyc - inj_time[n * 65536 + int'(g_top[0].dut.u_noc.ej_flit[n].payload)];
        noc_lat[l > 15 ? 15 : l]++;
      end
    end
  end

  function automatic string hist_str(input int h [16]);
    string s;
    s = "";
    for (int k = 0; k < 16; k++) if (h[k] > 0) s = {s, $sformatf(" %0d ns: %0d", 10 * k, h[k])};
    return s;
  endfunction

  function automatic int hist_mode(input int h [16]);
    int m;
    m = 0;
    for (int k = 1; k < 16; k++) if (h[k] > h[m]) m = k;
    return m;
  endfunction

  // router-level mechanisms, copy 0 (constant bit rate)
  for (genvar n = 0; n < NR; n++) begin : g_rmon
    always @(posedge clk) if (rst_n[0]) begin
      for (int o = 0; o < NPORTS; o++) begin
        if ($countones(g_top[0].dut.u_noc.u_mesh.g_r[n].u_router.req[o]) > 1) n_out_conflict++;
        if (o != int'(PORT_L) && g_top[0].dut.u_noc.u_mesh.o_valid[n][o]
            && !g_top[0].dut.u_noc.u_mesh.o_ready[n][o]) n_backpressure++;
      end
    end
  end

  task automatic run(input int g, input logic [NR-1:0] mask, input string name);
    int ns, nr, ss, sr, err;
    rst_n[g] = 0;
    for (int n = 0; n < NR; n++) active[g][n] = mask[n];
    if (g == 0) begin
      for (int k = 0; k < 16; k++) begin bus_lat[k] = 0; noc_lat[k] = 0; end
      for (int n = 0; n < NR; n++) bus_wait[n] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n[g] = 1;
    repeat (2) @(negedge clk);
    start[g] = 1; @(negedge clk); start[g] = 0;
    wait (noc_done[g] && soc_done[g]);
    @(negedge clk);
    ns = 0; nr = 0; ss = 0; sr = 0; err = 0;
    for (int n = 0; n < NR; n++) begin
      ns += noc_sent[g][n]; nr += noc_rcvd[g][n]; ss += soc_sent[g][n]; sr += soc_rcvd[g][n];
      err += noc_rx_err[g][n] + soc_rx_err[g][n];
    end
    check(ns == $countones(mask) * NP && ss == ns, {name, ": all packets sent on both"});
    check(nr == ns && sr == ss, {name, ": all packets received on both"});
    check(err == 0, {name, ": no packet at the wrong core"});
    check(noc_tx_sum[g] == noc_rx_sum[g] && soc_tx_sum[g] == soc_rx_sum[g]
          && noc_tx_sum[g] == soc_tx_sum[g], {name, ": same payloads sent and received on both"});
    $display("%s: NoC %0d cycles (%0.3f packets/cycle, %0.2f routers/packet), bus %0d cycles (%0.3f packets/cycle)",
             name, noc_cycles[g], real'(nr) / noc_cycles[g], real'(noc_hops[g]) / nr,
             soc_cycles[g], real'(sr) / soc_cycles[g]);
  endtask

  initial begin
    for (int g = 0; g < 2; g++) begin
      rst_n[g] = 0; start[g] = 0;
      for (int n = 0; n < NR; n++) active[g][n] = 1;
    end
    run(0, 4'b1111, "constant bit rate, 4 cores");
    check(noc_cycles[0] < soc_cycles[0], "network faster than bus with 4 cores sending");
    $display("  latency NoC:%s", hist_str(noc_lat));
    $display("  latency bus:%s", hist_str(bus_lat));
    check(noc_lat[0] == 0 && noc_lat[1] == 0 && noc_lat[2] > 0, "network latency at least 20 ns, and 20 ns seen");
    begin
      int m4;
      m4 = hist_mode(bus_lat);
      check(m4 > 1 && bus_lat[m4] >= 9 * NR * NP / 10,
            $sformatf("bus latency nearly constant with 4 cores (%0d ns for %0d of %0d)", 10 * m4, bus_lat[m4], NR * NP));
    end
    run(0, 4'b0001, "constant bit rate, 1 core");
    check(soc_cycles[0] <= noc_cycles[0], "bus at least as fast with 1 core sending");
    $display("  latency NoC:%s", hist_str(noc_lat));
    $display("  latency bus:%s", hist_str(bus_lat));
    check(bus_lat[1] == NP, "bus latency 10 ns for every packet with 1 core");
    run(1, 4'b1111, "random gaps, 4 cores");
    check(n_coord_writes > 0, $sformatf("coordinate set-up happened (%0d writes)", n_coord_writes));
    check(n_out_conflict > 0, $sformatf("router output competition (%0d)", n_out_conflict));
    check(n_backpressure > 0, $sformatf("router back-pressure (%0d)", n_backpressure));
    check(n_bus_conflict > 0, $sformatf("bus competition (%0d)", n_bus_conflict));
    check(n_two_routers > 0 && n_three_routers > 0,
          $sformatf("two-router (%0d) and three-router (%0d) paths", n_two_routers, n_three_routers));
    for (int n = 0; n < NR; n++) check(n_rx_core[n] > 0, $sformatf("core %0d received", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
