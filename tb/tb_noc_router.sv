// tb_noc_router: one router with random traffic on all five inputs.
//
// The router's coordinates are set to (1,1) through the Init_Cor port and
// read back. Then each input offers packets to random destinations in a
// 4x4 coordinate space while every output's ready toggles at random (back
// pressure). Each packet's payload tags its input and a sequence number.
// A reference model computes the XY output for every packet and keeps one
// queue per (input, output) pair: each packet leaving an output must be the
// oldest outstanding packet of its input for that output, which checks the
// route, the data and the per-flow ordering. At the end every queue must be
// empty and the hop counters must match the counted departures. A single
// packet through an idle router must leave one cycle after it was accepted.
module tb_noc_router;
  import noc_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  coord_we;
  logic [COORD_W-1:0] coord_wdata, coord;
  logic  in_valid [NPORTS];
  flit_t in_flit  [NPORTS];
  logic  in_ready [NPORTS];
  logic  out_valid [NPORTS];
  flit_t out_flit  [NPORTS];
  logic  out_ready [NPORTS];
  logic [15:0] hop_cnt [NPORTS];
  int checks = 0, failures = 0;

  flit_t expq [NPORTS][NPORTS][$];   // [input][output]
  int    departures [NPORTS];
  int    stalls = 0;

  noc_router dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int ref_route(input int cx, cy, dx, dy);
    if (dx > cx) return 1;       // E
    if (dx < cx) return 3;       // W
    if (dy < cy) return 2;       // S
    if (dy > cy) return 0;       // N
    return 4;                    // L
  endfunction

  // output monitor and scoreboard
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && !out_ready[o]) stalls++;
      if (out_valid[o] && out_ready[o]) begin
        int i;
        i = int'(out_flit[o].payload[15:13]);
        checks++;
        if (i >= NPORTS || expq[i][o].size() == 0 || expq[i][o][0] != out_flit[o]) begin
          failures++;
          $display("FAIL unexpected flit %h on output %0d at %0t", out_flit[o], o, $time);
        end else void'(expq[i][o].pop_front());
        departures[o]++;
      end
    end
  end

  int sent [NPORTS];
  bit random_ready = 0;

  always @(negedge clk)
    for (int o = 0; o < NPORTS; o++) out_ready[o] = random_ready ? ($urandom_range(0, 99) < 60) : 1'b1;

  initial begin
    localparam int NPKT = 400;
    for (int p = 0; p < NPORTS; p++) begin in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 1; end
    coord_we = 0; coord_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); coord_we = 1; coord_wdata = 16'h0005;   // x=1, y=1
    @(negedge clk); coord_we = 0;
    check(coord == 16'h0005, "coordinate register loaded");

    // latency: one packet West in -> East out
    in_valid[PORT_W] = 1;
    in_flit[PORT_W]  = '{coord: 16'h000D, payload: {3'(PORT_W), 13'h1FFF}};   // (3,1)
    expq[PORT_W][PORT_E].push_back(in_flit[PORT_W]);
    @(posedge clk);            // accepted here
    @(negedge clk); in_valid[PORT_W] = 0;
    check(out_valid[PORT_E] && out_flit[PORT_E].coord == 16'h000D, "one-cycle router latency");
    @(negedge clk);
    check(!out_valid[PORT_E], "single packet leaves once");

    // random traffic with back pressure
    random_ready = 1;
    begin
      for (int p = 0; p < NPORTS; p++) begin
        automatic int pp = p;
        fork begin
          for (int k = 0; k < NPKT; k++) begin
            automatic flit_t f;
            automatic int dx, dy;
            dx = $urandom_range(0, 3); dy = $urandom_range(0, 3);
            f = '{coord: COORD_W'((dx << 2) | dy), payload: {3'(pp), 13'(k)}};
            @(negedge clk);
            in_valid[pp] = ($urandom_range(0, 99) < 70);
            in_flit[pp]  = f;
            while (!(in_valid[pp] && in_ready[pp])) begin
              @(negedge clk);
              in_valid[pp] = ($urandom_range(0, 99) < 70);
            end
            expq[pp][ref_route(1, 1, dx, dy)].push_back(f);
            @(posedge clk);
            sent[pp]++;
            #1 in_valid[pp] = 0;
          end
        end join_none
      end
      wait fork;
    end
    random_ready = 0;
    repeat (20) @(posedge clk);
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++) check(expq[i][o].size() == 0, "all packets delivered");
    for (int o = 0; o < NPORTS; o++) check(int'(hop_cnt[o]) == departures[o], "hop counter");
    check(stalls > 0, "back pressure exercised");
    $display("router: %0d stalled output cycles", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
