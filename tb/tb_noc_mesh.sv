// tb_noc_mesh: a 3x3 mesh with all nodes injecting random traffic.
//
// The routers are given their coordinates through their Init_Cor ports
// (router n at x = n / 3, y = n % 3) and read back. First, single packets
// are sent through the idle mesh between chosen node pairs, and each must
// arrive exactly (Manhattan distance + 1) cycles after it was accepted, one
// cycle per router on the way. Then every node sends packets to random other
// nodes while the ejection ready toggles at random. The scoreboard keeps one
// queue per (source, destination) pair: XY routing uses a single path per
// pair, so each flow must arrive complete and in order at the right node.
// Finally the routers' hop counters must add up to the number of router
// traversals the reference computes (distance + 1 per packet).
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int R = 3, C = 3, NR = R * C;

  logic clk = 0, rst_n = 0;
  logic coord_we [NR];
  logic [COORD_W-1:0] coord_wdata;
  logic [COORD_W-1:0] coord [NR];
  logic  inj_valid [NR];
  flit_t inj_flit  [NR];
  logic  inj_ready [NR];
  logic  ej_valid  [NR];
  flit_t ej_flit   [NR];
  logic  ej_ready  [NR];
  logic [15:0] hop_cnt [NR][NPORTS];
  int checks = 0, failures = 0;

  flit_t expq [NR][NR][$];     // [src][dst]
  longint exp_hops = 0;
  int    delivered = 0;
  longint t_accept [NR];       // for the latency test
  longint cycle = 0;
  longint arrive_cycle = -1;
  bit    random_ready = 0;

  noc_mesh #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;   // read at posedges without a race

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

  function automatic int mdist(input int a, input int b);
    int ax, ay, bx, by;
    ax = a / R; ay = a % R; bx = b / R; by = b % R;
    return (ax > bx ? ax - bx : bx - ax) + (ay > by ? ay - by : by - ay);
  endfunction

  always @(negedge clk)
    for (int n = 0; n < NR; n++) ej_ready[n] = random_ready ? ($urandom_range(0, 99) < 70) : 1'b1;

  // ejection monitor
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NR; n++) if (ej_valid[n] && ej_ready[n]) begin
      int s;
      s = int'(ej_flit[n].payload[15:12]);
      checks++;
      if (s >= NR || expq[s][n].size() == 0 || expq[s][n][0] != ej_flit[n]) begin
        failures++;
        $display("FAIL flit %h at node %0d at %0t", ej_flit[n], n, $time);
      end else void'(expq[s][n].pop_front());
      delivered++;
      arrive_cycle = cycle;
    end
  end

  task automatic send_one(input int s, input int d, input int seq);
    flit_t f;
    f = '{coord: idx_to_coord(d, R), payload: {4'(s), 12'(seq)}};
    @(negedge clk);
    inj_valid[s] = 1; inj_flit[s] = f;
    while (!inj_ready[s]) @(negedge clk);
    expq[s][d].push_back(f);
    exp_hops += mdist(s, d) + 1;
    @(posedge clk);
    t_accept[s] = cycle;
    #1 inj_valid[s] = 0;
  endtask

  initial begin
    int pairs [4][2] = '{'{0, 1}, '{0, 8}, '{6, 2}, '{4, 3}};
    for (int n = 0; n < NR; n++) begin inj_valid[n] = 0; inj_flit[n] = '0; coord_we[n] = 0; ej_ready[n] = 1; end
    coord_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NR; n++) begin
      @(negedge clk); coord_we[n] = 1; coord_wdata = idx_to_coord(n, R);
      @(negedge clk); coord_we[n] = 0;
    end
    for (int n = 0; n < NR; n++) check(coord[n] == COORD_W'(((n / R) << 2) | (n % R)), "coordinates loaded");

    // zero-load latency
    foreach (pairs[p]) begin
      arrive_cycle = -1;
      send_one(pairs[p][0], pairs[p][1], p);
      repeat (12) @(posedge clk);
      check(arrive_cycle - t_accept[pairs[p][0]] == longint'(mdist(pairs[p][0], pairs[p][1]) + 1),
            $sformatf("zero-load latency %0d->%0d: %0d cycles", pairs[p][0], pairs[p][1],
                      arrive_cycle - t_accept[pairs[p][0]]));
    end

    // random all-to-all traffic
    random_ready = 1;
    for (int n = 0; n < NR; n++) begin
      automatic int s = n;
      fork begin
        for (int k = 0; k < 300; k++) begin
          automatic int d;
          d = $urandom_range(0, NR - 2);
          if (d >= s) d++;
          repeat ($urandom_range(0, 2)) @(negedge clk);
          send_one(s, d, k + 16);
        end
      end join_none
    end
    wait fork;
    random_ready = 0;
    repeat (50) @(posedge clk);
    begin
      int left = 0;
      longint hops = 0;
      for (int s = 0; s < NR; s++) for (int d = 0; d < NR; d++) left += expq[s][d].size();
      check(left == 0, $sformatf("all packets delivered (%0d missing)", left));
      for (int n = 0; n < NR; n++) for (int p = 0; p < NPORTS; p++) hops += hop_cnt[n][p];
      check(hops == exp_hops, $sformatf("router traversals %0d, expected %0d", hops, exp_hops));
      $display("mesh: %0d packets delivered, %0d router traversals", delivered, hops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
