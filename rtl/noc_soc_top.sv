// noc_soc_top: the network-on-chip system and the shared-bus system side by
// side, fed with the same traffic so that the two interconnects can be
// compared on throughput (run_cycles for the same packets), hop count and
// delivery.
//
// start launches the network's setup controller; when it drops its irq,
// both systems' cores begin sending. Core n of both systems uses the same
// seed, so it sends the same packets to the same destinations with the same
// gaps; only the interconnect differs. DIST picks the destination pattern
// (uniform, Normal or Poisson, see cpu_node). active masks cores off, to run the
// experiments with fewer sending cores. The default is the 2x2 mesh against
// a 4-core bus; ROWS and COLS give the 3x3 and 4x4 configurations (up to 16
// cores, the single-layer bus maximum).
module noc_soc_top
  import noc_pkg::*;
#(
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 2,
  parameter int unsigned NPKT  = 1000,
  parameter bit          CBR   = 1'b0,
  parameter logic [31:0] SEED  = 32'h1234_5678,
  parameter dist_e       DIST  = DIST_UNIFORM,
  localparam int unsigned CORES = ROWS * COLS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        active      [CORES],
  output logic        irq,
  // network-on-chip side
  output logic [15:0] noc_sent    [CORES],
  output logic [15:0] noc_rcvd    [CORES],
  output logic [15:0] noc_rx_err  [CORES],
  output logic [31:0] noc_tx_sum,
  output logic [31:0] noc_rx_sum,
  output logic [31:0] noc_hops,
  output logic [31:0] noc_cycles,
  output logic        noc_done,
  // shared-bus side
  output logic [15:0] soc_sent    [CORES],
  output logic [15:0] soc_rcvd    [CORES],
  output logic [15:0] soc_rx_err  [CORES],
  output logic [31:0] soc_tx_sum,
  output logic [31:0] soc_rx_sum,
  output logic [31:0] soc_cycles,
  output logic        soc_done
);

  noc_system #(.ROWS(ROWS), .COLS(COLS), .NPKT(NPKT), .CBR(CBR), .SEED(SEED), .DIST(DIST)) u_noc (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .active       (active),
    .irq          (irq),
    .sent         (noc_sent),
    .rcvd         (noc_rcvd),
    .rx_err       (noc_rx_err),
    .tx_sum_total (noc_tx_sum),
    .rx_sum_total (noc_rx_sum),
    .hop_total    (noc_hops),
    .run_cycles   (noc_cycles),
    .done         (noc_done)
  );

  soc_system #(.NCORES(CORES), .NPKT(NPKT), .CBR(CBR), .SEED(SEED), .DIST(DIST)) u_soc (
    .clk          (clk),
    .rst_n        (rst_n),
    .irq          (irq),
    .active       (active),
    .sent         (soc_sent),
    .rcvd         (soc_rcvd),
    .rx_err       (soc_rx_err),
    .tx_sum_total (soc_tx_sum),
    .rx_sum_total (soc_rx_sum),
    .run_cycles   (soc_cycles),
    .done         (soc_done)
  );

endmodule
