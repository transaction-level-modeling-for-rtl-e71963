// ahb_bus: single-layer AHB-style shared bus connecting NM masters to NS
// slaves.
//
// One master at a time owns the address bus. A round-robin arbiter chooses
// among the masters that raise hbusreq, all with equal priority, and the
// winner's address, transfer type and direction are driven to the slaves in
// that same cycle (address phase); hgrant tells the master its address
// phase has been taken. The decoder selects slave s when the address falls
// in [s*0x28, (s+1)*0x28). In the next cycle (data phase) the bus routes
// the same master's hwdata to the slaves and returns the selected slave's
// ready as hready; the next master's address phase overlaps it, so the bus
// moves one transfer per cycle. While hready is low no new address phase is
// granted.
//
// Arbitration: with PRIO_ARB = 0 (default) a round-robin arbiter gives all
// masters the same priority. With PRIO_ARB = 1 each master m has a fixed
// priority PRIO[m] (larger wins; among equals the lower index wins), which
// is the bus's priority-based mode: low-priority masters then wait longer.
//
// Following the described system: shared AHB bus, priority-based
// arbitration with a priority per master, round-robin as the mode used
// with all cores at the same priority, 0x28-byte slave windows. This
// design's own simplification: the grant is given in the cycle of the
// request (no separate bus-request / grant / address sequence), and only
// single transfers (no bursts, no split/retry responses) are supported.
module ahb_bus
  import noc_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned NS = 4,
  parameter bit                PRIO_ARB = 1'b0,
  parameter logic [NM-1:0][3:0] PRIO    = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // master side
  input  logic              hbusreq  [NM],
  input  logic [ADDR_W-1:0] m_haddr  [NM],
  input  htrans_e           m_htrans [NM],
  input  logic              m_hwrite [NM],
  input  logic [FLIT_W-1:0] m_hwdata [NM],
  output logic              hgrant   [NM],
  output logic              hready,
  output logic [IDX_W-1:0]  hmaster,
  // slave side
  output logic              s_hsel   [NS],
  output logic [ADDR_W-1:0] s_haddr,
  output htrans_e           s_htrans,
  output logic              s_hwrite,
  output logic [FLIT_W-1:0] s_hwdata,
  input  logic              s_hreadyout [NS]
);

  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  logic [NM-1:0] req_vec, gnt_vec, rr_gnt, pr_gnt;
  logic [MW-1:0] amaster;             // address-phase owner
  logic          aactive;             // an address phase is on the bus
  logic          dp_valid;            // a data phase is in progress
  logic [MW-1:0] dp_master;
  logic [SW-1:0] dp_slave;
  logic [SW-1:0] aslave;
  logic          ahit;

  always_comb
    for (int m = 0; m < int'(NM); m++) req_vec[m] = hbusreq[m];

  rr_arbiter #(.N(NM)) u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (req_vec),
    .advance (hready),
    .grant   (rr_gnt)
  );

  // fixed-priority choice: highest PRIO among the requesters
  always_comb begin
    logic [3:0] best;
    logic       found;
    pr_gnt = '0;
    best   = '0;
    found  = 1'b0;
    for (int m = 0; m < int'(NM); m++)
      if (req_vec[m] && (!found || PRIO[m] > best)) begin
        pr_gnt = '0;
        pr_gnt[m] = 1'b1;
        best  = PRIO[m];
        found = 1'b1;
      end
  end

  assign gnt_vec = PRIO_ARB ? pr_gnt : rr_gnt;

  assign hready = dp_valid ? s_hreadyout[dp_slave] : 1'b1;

  always_comb begin
    aactive = 1'b0;
    amaster = '0;
    for (int m = 0; m < int'(NM); m++) begin
      hgrant[m] = gnt_vec[m] && hready;
      if (gnt_vec[m]) begin
        aactive = 1'b1;
        amaster = MW'(m);
      end
    end
  end

  assign hmaster  = IDX_W'(amaster);
  assign s_haddr  = aactive ? m_haddr[amaster]  : '0;
  assign s_htrans = aactive ? m_htrans[amaster] : HTRANS_IDLE;
  assign s_hwrite = aactive ? m_hwrite[amaster] : 1'b0;

  // address decoder
  always_comb begin
    ahit   = 1'b0;
    aslave = '0;
    for (int s = 0; s < int'(NS); s++) begin
      s_hsel[s] = (s_haddr >= idx_to_addr(s)) && (s_haddr < idx_to_addr(s + 1));
      if (s_hsel[s]) begin
        ahit   = 1'b1;
        aslave = SW'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid  <= 1'b0;
      dp_master <= '0;
      dp_slave  <= '0;
    end else if (hready) begin
      dp_valid  <= aactive && (s_htrans == HTRANS_NONSEQ || s_htrans == HTRANS_SEQ) && ahit;
      dp_master <= amaster;
      dp_slave  <= aslave;
    end
  end

  assign s_hwdata = m_hwdata[dp_master];

  // Every granted transfer must address one of the slaves.
  a_decode: assert property (@(posedge clk) disable iff (!rst_n)
    (aactive && s_htrans == HTRANS_NONSEQ) |-> ahit);

endmodule
