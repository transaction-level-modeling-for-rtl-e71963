// tb_ahb_bus: shared bus with four masters and four slaves.
//
// Each master model keeps a queue of single writes to random addresses in
// the four 0x28-byte slave windows (any offset inside the window) and
// behaves like an AHB master: request, address phase when granted, write
// data in the following data phase. The slave side is checked cycle by
// cycle against the reference: for every completed data phase the data on
// the bus must be the data of the transfer whose address phase came before
// it, and exactly the slave owning the address must have been selected.
// Some phases insert random wait states (hreadyout low) to check that the
// bus holds the data phase and grants nothing new while hready is low.
// With all four masters requesting and no wait states, the bus must move one
// transfer per cycle and grant the masters in strict rotation.
//
// A second bus in the priority-based mode (priorities 2, 0, 3, 1 for
// masters 0..3) sees random request patterns with random wait states; each
// cycle its grant must go to the requesting master of highest priority, and
// nothing may be granted while hready is low.
module tb_ahb_bus;
  import noc_pkg::*;
  localparam int NM = 4, NS = 4;

  logic clk = 0, rst_n = 0;
  logic hbusreq [NM], m_hwrite [NM], hgrant [NM], hready;
  logic [ADDR_W-1:0] m_haddr [NM];
  htrans_e m_htrans [NM];
  logic [FLIT_W-1:0] m_hwdata [NM];
  logic [IDX_W-1:0] hmaster;
  logic s_hsel [NS], s_hwrite, s_hreadyout [NS];
  logic [ADDR_W-1:0] s_haddr;
  htrans_e s_htrans;
  logic [FLIT_W-1:0] s_hwdata;
  int checks = 0, failures = 0;

  ahb_bus #(.NM(NM), .NS(NS)) dut (.*);

  // priority-mode bus, driven with its own random requests
  localparam logic [NM-1:0][3:0] PR = {4'd1, 4'd3, 4'd0, 4'd2};
  logic p_req [NM], p_gnt [NM], p_ready, p_sel [NS], p_hwrite, p_rdy [NS];
  logic [ADDR_W-1:0] p_addr [NM], p_saddr;
  htrans_e p_trans [NM], p_strans;
  logic [FLIT_W-1:0] p_wdata [NM], p_swdata;
  logic [IDX_W-1:0] p_master;
  logic p_write [NM];
  int prio_err = 0, prio_grants [NM];
  bit prio_run = 0;

  ahb_bus #(.NM(NM), .NS(NS), .PRIO_ARB(1'b1), .PRIO(PR)) dutp (
    .clk(clk), .rst_n(rst_n), .hbusreq(p_req), .m_haddr(p_addr), .m_htrans(p_trans),
    .m_hwrite(p_write), .m_hwdata(p_wdata), .hgrant(p_gnt), .hready(p_ready), .hmaster(p_master),
    .s_hsel(p_sel), .s_haddr(p_saddr), .s_htrans(p_strans), .s_hwrite(p_hwrite),
    .s_hwdata(p_swdata), .s_hreadyout(p_rdy));

  always @(negedge clk) begin
    for (int m = 0; m < NM; m++) begin
      p_req[m]   = prio_run && ($urandom_range(0, 99) < 50);
      p_addr[m]  = idx_to_addr(m);
      p_trans[m] = p_req[m] ? HTRANS_NONSEQ : HTRANS_IDLE;
      p_write[m] = 1'b1;
      p_wdata[m] = FLIT_W'(m);
    end
    for (int s = 0; s < NS; s++) p_rdy[s] = $urandom_range(0, 99) >= 20;
  end

  always @(posedge clk) if (rst_n && prio_run) begin
    int want;
    want = -1;
    if (p_ready)
      for (int m = 0; m < NM; m++)
        if (p_req[m] && (want < 0 || PR[m] > PR[want])) want = m;
    for (int m = 0; m < NM; m++) begin
      if (p_gnt[m] != (m == want)) prio_err++;
      if (p_gnt[m]) prio_grants[m]++;
    end
  end

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

  typedef struct { logic [ADDR_W-1:0] addr; logic [FLIT_W-1:0] data; } xfer_t;
  xfer_t mq [NM][$];
  logic [FLIT_W-1:0] mdata [NM];
  int wait_pct = 0;
  int completed = 0, grants [NM], last_grant = -1, rotation_err = 0, stall_cycles = 0;
  bit check_rotation = 0;

  // data phase bookkeeping of the reference
  bit ap_valid = 0; int ap_slave; logic [FLIT_W-1:0] ap_data;

  // master models: drive the head of the queue
  always_comb
    for (int m = 0; m < NM; m++) begin
      hbusreq[m]  = mq[m].size() > 0;
      m_haddr[m]  = hbusreq[m] ? mq[m][0].addr : '0;
      m_htrans[m] = hbusreq[m] ? HTRANS_NONSEQ : HTRANS_IDLE;
      m_hwrite[m] = hbusreq[m];
      m_hwdata[m] = mdata[m];
    end

  always @(negedge clk)
    for (int s = 0; s < NS; s++) s_hreadyout[s] = ($urandom_range(0, 99) >= wait_pct);

  always @(posedge clk) if (rst_n) begin
    if (!hready) begin
      stall_cycles++;
      for (int m = 0; m < NM; m++) if (hgrant[m]) begin failures++; $display("FAIL grant during wait state"); end
    end else begin
      // complete the data phase
      if (ap_valid) begin
        checks++; completed++;
        if (s_hwdata != ap_data) begin failures++; $display("FAIL data %h exp %h at %0t", s_hwdata, ap_data, $time); end
      end
      ap_valid = 0;
      for (int m = 0; m < NM; m++) if (hgrant[m]) begin
        int sl, nsel;
        sl = int'(mq[m][0].addr / SLAVE_SIZE);
        nsel = 0;
        for (int s = 0; s < NS; s++) nsel += s_hsel[s];
        checks++;
        if (!s_hsel[sl] || nsel != 1 || s_haddr != mq[m][0].addr || s_htrans != HTRANS_NONSEQ || !s_hwrite) begin
          failures++; $display("FAIL address phase of master %0d at %0t", m, $time);
        end
        if (check_rotation && last_grant >= 0 && m != (last_grant + 1) % NM) rotation_err++;
        last_grant = m;
        grants[m]++;
        ap_valid = 1; ap_slave = sl; ap_data = mq[m][0].data;
        mdata[m] <= mq[m][0].data;
        void'(mq[m].pop_front());
      end
    end
  end

  function automatic xfer_t rnd_xfer();
    xfer_t x;
    x.addr = idx_to_addr($urandom_range(0, NS - 1)) + ADDR_W'($urandom_range(0, 39));
    x.data = $urandom;
    return x;
  endfunction

  initial begin
    int t0, total;
    for (int m = 0; m < NM; m++) mdata[m] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: saturated, no wait states: one transfer per cycle, strict rotation
    @(negedge clk);
    for (int m = 0; m < NM; m++) repeat (50) mq[m].push_back(rnd_xfer());
    check_rotation = 1;
    repeat (10) @(posedge clk);
    @(negedge clk); t0 = completed;
    repeat (100) @(negedge clk);
    check(completed - t0 == 100, $sformatf("one transfer per cycle (%0d in 100)", completed - t0));
    wait (mq[0].size() == 0 && mq[1].size() == 0 && mq[2].size() == 0 && mq[3].size() == 0);
    repeat (3) @(posedge clk);
    check(rotation_err == 0, "round-robin rotation");
    check_rotation = 0;
    // phase 2: random traffic with wait states
    wait_pct = 30;
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      for (int m = 0; m < NM; m++) if ($urandom_range(0, 99) < 20) mq[m].push_back(rnd_xfer());
    end
    wait (mq[0].size() == 0 && mq[1].size() == 0 && mq[2].size() == 0 && mq[3].size() == 0);
    wait_pct = 0;
    repeat (3) @(posedge clk);
    total = 0;
    for (int m = 0; m < NM; m++) total += grants[m];
    check(completed == total, $sformatf("every granted transfer completed (%0d/%0d)", completed, total));
    check(stall_cycles > 0, "wait states exercised");
    // priority-based mode
    prio_run = 1;
    repeat (2000) @(posedge clk);
    prio_run = 0;
    check(prio_err == 0, $sformatf("priority grants (%0d wrong)", prio_err));
    check(prio_grants[2] > prio_grants[0] && prio_grants[0] > prio_grants[3] && prio_grants[3] > prio_grants[1],
          $sformatf("grant share follows priority (%0d %0d %0d %0d)",
                    prio_grants[0], prio_grants[1], prio_grants[2], prio_grants[3]));
    $display("bus: %0d transfers, %0d wait-state cycles", completed, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
