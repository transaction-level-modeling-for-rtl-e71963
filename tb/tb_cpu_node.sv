// tb_cpu_node: traffic generator of one core, in both timing modes.
//
// Two instances (core 2 of 9) run side by side: one with random gaps, one
// with constant bit rate. Nothing may be sent before irq falls. The
// transmit side is throttled at random; the testbench checks that requests
// stay stable until accepted, that no packet goes to the core itself or
// outside 0..8, that the gap before each packet lies in 0..9 cycles (and is
// 0 in constant-bit-rate mode, i.e. one packet per cycle when not
// throttled), that exactly NPKT packets are sent, that the payload sum
// matches, and that all nine destinations other than its own are used.
// The receive side is fed packets for this core and one for another core,
// which must be counted as an error.
//
// Two more instances, in constant-bit-rate mode, check the shaped
// destination patterns over NPD packets each: Normal for core 0 of 9 (bus
// addresses with mean 180 and standard deviation 180, clipped to 0..359,
// 40 bytes per core) and Poisson for core 1 of 4 (mean 1.5). The observed
// share of every destination must lie within 0.025 of the share computed
// here from the normal and Poisson formulas, with a core's own share moved
// to the next core up.
module tb_cpu_node;
  import noc_pkg::*;
  localparam int NC = 9, ID = 2, NP = 400;

  logic clk = 0, rst_n = 0, irq = 0;
  int checks = 0, failures = 0;

  logic tx_valid [2], tx_ready [2], rx_valid [2], done [2];
  logic [IDX_W-1:0] tx_dest [2], rx_dest [2];
  logic [PAYLOAD_W-1:0] tx_payload [2], rx_payload [2];
  logic [15:0] sent [2], rcvd [2], rx_err [2];
  logic [31:0] tx_sum [2], rx_sum [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    cpu_node #(.IDX(ID), .NCORES(NC), .NPKT(NP), .CBR(g == 1), .SEED(32'hCAFE_0001)) dut (
      .clk(clk), .rst_n(rst_n), .irq(irq), .active(1'b1),
      .tx_valid(tx_valid[g]), .tx_dest(tx_dest[g]), .tx_payload(tx_payload[g]), .tx_ready(tx_ready[g]),
      .rx_valid(rx_valid[g]), .rx_dest(rx_dest[g]), .rx_payload(rx_payload[g]),
      .sent(sent[g]), .rcvd(rcvd[g]), .rx_err(rx_err[g]),
      .tx_sum(tx_sum[g]), .rx_sum(rx_sum[g]), .done(done[g]));
  end

  // shaped-destination instances: [0] Normal, 9 cores, core 0; [1] Poisson, 4 cores, core 1
  localparam int NPD = 4000;
  localparam int DNC [2] = '{9, 4};
  localparam int DID [2] = '{0, 1};
  logic d_valid [2], d_done [2];
  logic [IDX_W-1:0] d_dest [2];
  int d_hist [2][16];

  for (genvar g = 0; g < 2; g++) begin : g_dist
    logic [PAYLOAD_W-1:0] pl;
    logic [15:0] s_, r_, e_;
    logic [31:0] ts_, rs_;
    cpu_node #(.IDX(DID[g]), .NCORES(DNC[g]), .NPKT(NPD), .CBR(1'b1), .SEED(32'h0BAD_5EED),
               .DIST(g == 0 ? DIST_NORMAL : DIST_POISSON)) dut (
      .clk(clk), .rst_n(rst_n), .irq(irq), .active(1'b1),
      .tx_valid(d_valid[g]), .tx_dest(d_dest[g]), .tx_payload(pl), .tx_ready(1'b1),
      .rx_valid(1'b0), .rx_dest('0), .rx_payload('0),
      .sent(s_), .rcvd(r_), .rx_err(e_), .tx_sum(ts_), .rx_sum(rs_), .done(d_done[g]));
    always @(posedge clk) if (rst_n && d_valid[g]) d_hist[g][int'(d_dest[g]) & 15]++;
  end

  // standard normal cumulative distribution by Simpson integration
  function automatic real phi(input real z);
    real lo, h, acc;
    int n;
    if (z < -8.0) return 0.0;
    lo = -8.0; n = 4000; h = (z - lo) / n; acc = 0.0;
    for (int i = 0; i <= n; i++) begin
      real x, w;
      x = lo + i * h;
      w = (i == 0 || i == n) ? 1.0 : ((i % 2) ? 4.0 : 2.0);
      acc += w * $exp(-x * x / 2.0);
    end
    return acc * h / 3.0 / $sqrt(2.0 * 3.14159265358979);
  endfunction

  always #5 clk = ~clk;

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

  int gap [2], max_gap [2], npk [2], early [2];
  longint sum [2];
  bit pending [2];
  logic [IDX_W-1:0] held_dest [2];
  logic [PAYLOAD_W-1:0] held_pl [2];
  bit [NC-1:0] used [2];
  bit released = 0;
  int gaps_bad [2];

  always @(posedge clk) if (rst_n) for (int g = 0; g < 2; g++) begin
    if (tx_valid[g] && !released) early[g]++;
    if (pending[g]) begin
      checks++;
      if (!tx_valid[g] || tx_dest[g] != held_dest[g] || tx_payload[g] != held_pl[g]) begin
        failures++; $display("FAIL request changed before acceptance");
      end
    end
    if (tx_valid[g]) begin
      if (tx_dest[g] == IDX_W'(ID) || tx_dest[g] >= IDX_W'(NC)) begin failures++; $display("FAIL bad destination"); end
      used[g][tx_dest[g]] = 1'b1;
    end
    if (tx_valid[g] && tx_ready[g]) begin
      npk[g]++; sum[g] += tx_payload[g]; pending[g] = 0;
      if (gap[g] > 9 || (g == 1 && gap[g] != 0)) gaps_bad[g]++;
      gap[g] = 0;
    end else if (tx_valid[g]) begin
      pending[g] = 1; held_dest[g] = tx_dest[g]; held_pl[g] = tx_payload[g];
    end else if (released && !done[g]) begin
      gap[g]++;
      if (gap[g] > max_gap[g]) max_gap[g] = gap[g];
    end
  end

  initial begin
    for (int g = 0; g < 2; g++) begin tx_ready[g] = 0; rx_valid[g] = 0; rx_dest[g] = '0; rx_payload[g] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    irq = 1;
    repeat (5) @(negedge clk);
    check(!tx_valid[0] && !tx_valid[1], "silent while irq is high");
    irq = 0; released = 1; gap[0] = -1; gap[1] = -1;   // the cycle that detects the falling edge
    fork
      while (!(done[0] && done[1])) begin
        @(negedge clk);
        tx_ready[0] = $urandom_range(0, 99) < 80;
        tx_ready[1] = (npk[1] < NP / 2) ? 1'b1 : ($urandom_range(0, 99) < 80);
      end
      begin   // receive side
        for (int k = 0; k < 20; k++) begin
          @(negedge clk);
          rx_valid[0] = 1; rx_dest[0] = (k == 7) ? IDX_W'(5) : IDX_W'(ID); rx_payload[0] = 16'(k + 1);
        end
        @(negedge clk); rx_valid[0] = 0;
      end
    join
    while (!(d_done[0] && d_done[1])) @(negedge clk);
    for (int g = 0; g < 2; g++) begin : shaped
      real want [16];
      real acc;
      for (int k = 0; k < 16; k++) want[k] = 0.0;
      if (g == 0) begin
        for (int k = 0; k < DNC[0]; k++)
          want[k] = (k == DNC[0] - 1 ? 1.0 : phi((40.0 * (k + 1) - 180.0) / 180.0))
                  - (k == 0 ? 0.0 : phi((40.0 * k - 180.0) / 180.0));
      end else begin
        acc = 0.0;
        for (int k = 0; k < DNC[1]; k++) begin
          real pk;
          pk = $exp(-1.5);
          for (int j = 1; j <= k; j++) pk = pk * 1.5 / j;
          want[k] = (k == DNC[1] - 1) ? 1.0 - acc : pk;
          acc += pk;
        end
      end
      want[(DID[g] + 1) % DNC[g]] += want[DID[g]];
      want[DID[g]] = 0.0;
      for (int k = 0; k < DNC[g]; k++) begin
        real got;
        got = real'(d_hist[g][k]) / NPD;
        $display("%s core %0d -> %0d: share %0.3f, expected %0.3f",
                 g == 0 ? "normal " : "poisson", DID[g], k, got, want[k]);
        check(got - want[k] < 0.025 && want[k] - got < 0.025,
              $sformatf("destination share %0d of pattern %0d", k, g));
      end
    end
    @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      check(early[g] == 0, "nothing before the irq falls");
      check(npk[g] == NP && int'(sent[g]) == NP, $sformatf("core %0d sent %0d packets", g, npk[g]));
      check(tx_sum[g] == 32'(sum[g]), "payload sum");
      check(used[g] == (NC'('1) & ~(NC'(1) << ID)), "every other core used as destination");
      check(gaps_bad[g] == 0, "gap within 0..9 (0 in constant bit rate)");
    end
    check(max_gap[0] >= 5, $sformatf("random gaps occur (longest %0d)", max_gap[0]));
    check(rcvd[0] == 20 && rx_err[0] == 1, "receive count and misrouted packet");
    check(rx_sum[0] == 32'(210), "receive payload sum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
