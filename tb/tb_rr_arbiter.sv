// tb_rr_arbiter: round-robin arbiter against a reference pointer model.
//
// Random request vectors and random advance are applied. The reference
// keeps the index granted last and expects the first requester after it,
// wrapping around. It also checks one-hot grants, that a held grant does not
// move while advance is low, and fairness: with all N requesting and
// advance high, N consecutive grants visit every requester once.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic advance;
  int checks = 0, failures = 0;
  int last = N - 1;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t req=%b grant=%b", msg, $time, req, grant); end
  endtask

  function automatic logic [N-1:0] expect_grant(input logic [N-1:0] r, input int l);
    for (int i = 1; i <= N; i++) if (r[(l + i) % N]) return N'(1) << ((l + i) % N);
    return '0;
  endfunction

  initial begin
    logic [N-1:0] seen;
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = N'($urandom); advance = $urandom_range(0, 3) != 0;
      #1;
      check(grant == expect_grant(req, last), "round-robin order");
      @(posedge clk);
      if (advance && req != 0) for (int k = 0; k < N; k++) if (grant[k]) last = k;
    end
    // fairness
    seen = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); req = '1; advance = 1; #1;
      seen |= grant;
      @(posedge clk);
    end
    check(seen == '1, "all requesters served in N rounds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
