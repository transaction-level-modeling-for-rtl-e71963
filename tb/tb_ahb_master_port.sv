// tb_ahb_master_port: AHB master side of a core.
//
// The core offers random writes and the bus side grants and stalls at
// random. Each cycle the testbench checks: hbusreq, NONSEQ and hwrite follow
// the offered request; the address is the offered address; the request is
// accepted exactly when offered, granted and ready; and in the cycle after
// an accepted address phase hwdata carries that request's data, held until
// the next acceptance (so a data phase stretched by wait states keeps it).
module tb_ahb_master_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, hbusreq, hwrite, hgrant, hready;
  logic [ADDR_W-1:0] req_addr, haddr;
  logic [FLIT_W-1:0] req_data, hwdata;
  htrans_e htrans;
  int checks = 0, failures = 0, accepted = 0;
  logic [FLIT_W-1:0] last_data = '0;

  ahb_master_port dut (.*);

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
    req_valid = 0; req_addr = '0; req_data = '0; hgrant = 0; hready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(hwdata == last_data, "data phase carries the accepted data");
      if (!(req_valid && !req_ready)) begin   // new request only after acceptance
        req_valid = $urandom_range(0, 99) < 70;
        req_addr  = $urandom;
        req_data  = $urandom;
      end
      hready = $urandom_range(0, 99) < 80;
      hgrant = req_valid && ($urandom_range(0, 99) < 50);
      #1;
      check(hbusreq == req_valid && hwrite == req_valid, "request follows core");
      check(htrans == (req_valid ? HTRANS_NONSEQ : HTRANS_IDLE), "transfer type");
      if (req_valid) check(haddr == req_addr, "address");
      check(req_ready == (req_valid && hgrant && hready), "acceptance");
      @(posedge clk);
      if (req_ready) begin last_data = req_data; accepted++; end
    end
    check(accepted > 500, "enough transfers accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
