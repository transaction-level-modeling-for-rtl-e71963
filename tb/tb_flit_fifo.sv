// tb_flit_fifo: random pushes and pops against a queue reference model.
//
// Writes are attempted only when full is low and reads only when empty is
// low (the rule the buffer's users follow). Every popped word, the full and
// empty flags and the occupancy implied by them are compared with the
// model each cycle. A final phase fills the buffer and checks that it
// reports full after exactly DEPTH writes.
module tb_flit_fifo;
  localparam int W = 32, D = 2;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      wr_en   = !full && ($urandom_range(0, 99) < 60);
      rd_en   = !empty && ($urandom_range(0, 99) < 50);
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    // drain, then fill
    @(negedge clk); wr_en = 0; rd_en = 0;
    while (q.size() > 0) begin
      @(negedge clk); rd_en = 1; @(posedge clk); void'(q.pop_front());
    end
    @(negedge clk); rd_en = 0;
    for (int i = 0; i < D; i++) begin
      check(!full, "not full before DEPTH writes");
      wr_en = 1; wr_data = i; @(posedge clk); @(negedge clk);
    end
    wr_en = 0;
    check(full, "full after DEPTH writes");
    check(rd_data == 0, "oldest word at head");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
