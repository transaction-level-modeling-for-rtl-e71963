// ahb_slave_port: AHB slave interface of a core on the shared bus.
//
// A zero-wait-state write-only slave: it records a selected NONSEQ/SEQ
// write in the address phase and, when the following data phase completes
// (hready high), presents the write as one received packet (rx_valid for one cycle, with the address of
// the address phase and the data on hwdata). hreadyout is always high.
// Reads are not used by the traffic and are answered as zero-wait with no
// effect. This is the receiving side of a core in the described system; the
// logic is this design's own.
module ahb_slave_port
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hsel,
  input  logic [ADDR_W-1:0] haddr,
  input  htrans_e           htrans,
  input  logic              hwrite,
  input  logic [FLIT_W-1:0] hwdata,
  input  logic              hready,
  output logic              hreadyout,
  output logic              rx_valid,
  output logic [ADDR_W-1:0] rx_addr,
  output logic [FLIT_W-1:0] rx_data
);

  logic ap_write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_write <= 1'b0;
      rx_addr  <= '0;
    end else if (hready) begin
      ap_write <= hsel && hwrite && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
      rx_addr  <= haddr;
    end
  end

  assign hreadyout = 1'b1;
  assign rx_valid  = ap_write && hready;   // data phase completes
  assign rx_data   = hwdata;

endmodule
