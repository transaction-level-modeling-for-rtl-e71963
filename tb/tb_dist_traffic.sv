// tb_dist_traffic: shaped destination patterns, network against bus.
//
// Three copies of the complete design run side by side with random-gap
// traffic, NP packets per core: the 2x2 system with Normal destinations,
// the 2x2 system with Poisson destinations, and the 3x3 system with Normal
// destinations. For each copy every packet must be delivered on both sides
// with matching payloads and none at the wrong core, and each core must
// receive exactly as many packets from the network as from the bus (both
// sides carry the same traffic).
//
// The shape of the load is checked against what the patterns imply for the
// 2x2 system, worked out from the normal and Poisson formulas with each
// core's own share moved to the next core up. With Normal destinations the
// corner cores 0 and 3 own the tails of the address range and receive
// about 1.24 and 1.12 packets per packet sent by one core, against 0.88 and
// 0.76 for cores 1 and 2. With Poisson destinations (mean 1.5) cores 1 and 2
// become the hot spots (about 1.23 and 1.09 against 0.86 and 0.82). Cycle
// counts and throughput of both sides are printed.
module tb_dist_traffic;
  import noc_pkg::*;
  localparam int NP = 500;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // copy g: size SZ[g], pattern PAT[g]
  localparam int    SZ  [3] = '{2, 2, 3};
  localparam dist_e PAT [3] = '{DIST_NORMAL, DIST_POISSON, DIST_NORMAL};

  for (genvar g = 0; g < 3; g++) begin : g_run
    localparam int S  = SZ[g];
    localparam int NR = S * S;
    logic irq, noc_done, soc_done;
    logic active [NR];
    logic [15:0] noc_sent [NR], noc_rcvd [NR], noc_rx_err [NR];
    logic [15:0] soc_sent [NR], soc_rcvd [NR], soc_rx_err [NR];
    logic [31:0] noc_tx_sum, noc_rx_sum, noc_hops, noc_cycles, soc_tx_sum, soc_rx_sum, soc_cycles;

    noc_soc_top #(.ROWS(S), .COLS(S), .NPKT(NP), .DIST(PAT[g]), .SEED(32'h5EED_0000 + g)) dut (.*);

    always_comb for (int n = 0; n < NR; n++) active[n] = 1'b1;

    task automatic report();
      int ns = 0, nr = 0, ss = 0, sr = 0, err = 0, same = 1;
      string name;
      name = $sformatf("%0dx%0d %s", S, S, PAT[g] == DIST_NORMAL ? string'("normal") : string'("poisson"));
      for (int n = 0; n < NR; n++) begin
        ns += noc_sent[n]; nr += noc_rcvd[n]; ss += soc_sent[n]; sr += soc_rcvd[n];
        err += noc_rx_err[n] + soc_rx_err[n];
        if (noc_rcvd[n] != soc_rcvd[n]) same = 0;
      end
      check(ns == NR * NP && nr == ns && ss == ns && sr == ss, {name, ": all packets delivered"});
      check(err == 0, {name, ": no packet at the wrong core"});
      check(same == 1, {name, ": same load per core on both sides"});
      check(noc_tx_sum == noc_rx_sum && soc_tx_sum == soc_rx_sum && noc_tx_sum == soc_tx_sum,
            {name, ": identical payloads"});
      $display("%s: NoC %0d cycles (%0.3f packets/cycle), bus %0d cycles (%0.3f packets/cycle)",
               name, noc_cycles, real'(nr) / noc_cycles, soc_cycles, real'(sr) / soc_cycles);
      for (int n = 0; n < NR; n++) $display("  core %0d received %0d", n, noc_rcvd[n]);
    endtask
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    wait (g_run[0].noc_done && g_run[0].soc_done && g_run[1].noc_done && g_run[1].soc_done
          && g_run[2].noc_done && g_run[2].soc_done);
    @(negedge clk);
    g_run[0].report();
    g_run[1].report();
    g_run[2].report();
    // Normal on 2x2: corners hot
    check(g_run[0].noc_rcvd[0] > g_run[0].noc_rcvd[1] && g_run[0].noc_rcvd[0] > g_run[0].noc_rcvd[2]
          && g_run[0].noc_rcvd[3] > g_run[0].noc_rcvd[1] && g_run[0].noc_rcvd[3] > g_run[0].noc_rcvd[2],
          "normal 2x2: cores 0 and 3 receive most");
    // Poisson on 2x2: CPU01 and CPU02 hot
    check(g_run[1].noc_rcvd[1] > g_run[1].noc_rcvd[0] && g_run[1].noc_rcvd[1] > g_run[1].noc_rcvd[3]
          && g_run[1].noc_rcvd[2] > g_run[1].noc_rcvd[0] && g_run[1].noc_rcvd[2] > g_run[1].noc_rcvd[3],
          "poisson 2x2: cores 1 and 2 are the hot spots");
    // expected share of the hottest core, within 0.1 packets per sent packet
    check(real'(g_run[1].noc_rcvd[1]) / NP > 1.13 && real'(g_run[1].noc_rcvd[1]) / NP < 1.33,
          "poisson 2x2: load at core 1 near 1.23 per core's packets");
    check(real'(g_run[0].noc_rcvd[0]) / NP > 1.14 && real'(g_run[0].noc_rcvd[0]) / NP < 1.34,
          "normal 2x2: load at core 0 near 1.24 per core's packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
