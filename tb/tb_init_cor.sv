// tb_init_cor: setup controller for a 4x4 mesh.
//
// Checks that irq and the coordinate writes stay quiet before start; that
// after start irq rises, each router's write enable fires exactly once, in
// router order, carrying x = n / 4 in bits [3:2] and y = n % 4 in bits
// [1:0]; that irq then falls together with done; and that the whole setup
// takes NR + 1 cycles of irq. A second start must not repeat the setup.
module tb_init_cor;
  import noc_pkg::*;
  localparam int R = 4, C = 4, NR = R * C;

  logic clk = 0, rst_n = 0, start, irq, done;
  logic coord_we [NR];
  logic [COORD_W-1:0] coord_wdata;
  int checks = 0, failures = 0;
  int writes [NR];
  int order = 0, irq_cycles = 0;

  init_cor #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (irq) irq_cycles++;
    for (int n = 0; n < NR; n++) if (coord_we[n]) begin
      writes[n]++;
      check(irq, "coordinates written while irq is high");
      check(n == order, "routers written in order");
      check(coord_wdata == COORD_W'(((n / R) << 2) | (n % R)), $sformatf("coordinate of R%0d", n));
      order++;
    end
  end

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(!irq && !done, "quiet before start");
    start = 1; @(negedge clk); start = 0;
    check(irq, "irq raised after start");
    wait (done);
    @(negedge clk);
    check(!irq, "irq dropped when done");
    check(irq_cycles == NR + 1, $sformatf("irq high for %0d cycles", irq_cycles));
    for (int n = 0; n < NR; n++) check(writes[n] == 1, "one write per router");
    start = 1; @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    check(!irq && done && order == NR, "second start ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
