// tb_ahb_slave_port: AHB slave side of a core.
//
// Random address phases (selected or not, NONSEQ or IDLE, write or read)
// are followed by data phases with random data; hready (from the bus) is
// low at random, stretching the phases. The reference expects one received
// packet, in the cycle its data phase completes, for each selected NONSEQ write whose address
// phase was taken with hready high, carrying that phase's address and the
// data-phase write data, and nothing otherwise. hreadyout must stay high.
module tb_ahb_slave_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hsel, hwrite, hready, hreadyout, rx_valid;
  logic [ADDR_W-1:0] haddr, rx_addr;
  htrans_e htrans;
  logic [FLIT_W-1:0] hwdata, rx_data;
  int checks = 0, failures = 0, received = 0;
  bit exp_valid = 0;
  logic [ADDR_W-1:0] exp_addr;

  ahb_slave_port dut (.*);

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
    hsel = 0; hwrite = 0; hready = 1; haddr = '0; htrans = HTRANS_IDLE; hwdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      hwdata = $urandom;
      hready = $urandom_range(0, 99) < 75;
      #1;
      check(rx_valid == (exp_valid && hready), "packet presented when the data phase completes");
      if (exp_valid && rx_valid) begin
        check(rx_addr == exp_addr && rx_data == hwdata, "packet address and data");
        received++;
      end
      check(hreadyout, "zero wait states");
      if (hready) begin   // this address phase will be taken: drive a new one
        hsel   = $urandom_range(0, 99) < 60;
        htrans = ($urandom_range(0, 99) < 70) ? HTRANS_NONSEQ : HTRANS_IDLE;
        hwrite = $urandom_range(0, 99) < 85;
        haddr  = $urandom;
      end
      @(posedge clk);
      if (hready) begin
        exp_valid = hsel && hwrite && htrans == HTRANS_NONSEQ;
        exp_addr  = haddr;
      end
    end
    check(received > 300, "enough packets received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
