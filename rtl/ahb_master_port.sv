// ahb_master_port: AHB master interface of a core on the shared bus.
//
// The core offers a write (req_valid, req_addr, req_data). While it is
// offered, the port raises hbusreq and drives the address with transfer type
// NONSEQ and hwrite high. When the bus grants the address phase (hgrant) the
// request is accepted (req_ready) and its data is stored, to be driven on
// hwdata during the following data phase. The core may offer its next write
// at once, so back-to-back writes overlap address and data phases. Each
// transfer is a single 32-bit write; the packet travels as the write data
// and the destination core is given by the address. This single-write use
// of the bus follows the described system; the port logic is this design's.
module ahb_master_port
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              req_valid,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [FLIT_W-1:0] req_data,
  output logic              req_ready,
  // bus side
  output logic              hbusreq,
  output logic [ADDR_W-1:0] haddr,
  output htrans_e           htrans,
  output logic              hwrite,
  output logic [FLIT_W-1:0] hwdata,
  input  logic              hgrant,
  input  logic              hready
);

  assign hbusreq   = req_valid;
  assign haddr     = req_valid ? req_addr : '0;
  assign htrans    = req_valid ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign hwrite    = req_valid;
  assign req_ready = req_valid && hgrant && hready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         hwdata <= '0;
    else if (req_ready) hwdata <= req_data;
  end

endmodule
