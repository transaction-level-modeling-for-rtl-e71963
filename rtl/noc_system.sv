// noc_system: the network-on-chip system: a ROWS x COLS mesh of routers,
// one traffic-generating core on each router's Local port, and the setup
// controller that loads the router coordinates.
//
// Operation: start makes init_cor raise irq, write each router's
// coordinates and drop irq; on that falling edge every active core starts
// sending its packets. A core's packet to core d carries d's coordinates
// (x = d / ROWS, y = d % ROWS) in its upper half and the payload in its
// lower half. Delivered packets leave through the destination router's
// Local port and are always accepted.
//
// Statistics: per-core sent/received/error counts, the sums of sent and
// received payloads, hop_total (packets forwarded by all router outputs
// together, i.e. the number of router traversals, Local exit included) and
// run_cycles (cycles from the end of setup until every active core has sent
// everything and every packet has arrived, at which point done rises).
// CBR, SEED and DIST are passed to every core (see cpu_node).
module noc_system
  import noc_pkg::*;
#(
  parameter int unsigned ROWS       = 2,
  parameter int unsigned COLS       = 2,
  parameter int unsigned NPKT       = 1000,
  parameter bit          CBR        = 1'b0,
  parameter logic [31:0] SEED       = 32'h1234_5678,
  parameter dist_e       DIST       = DIST_UNIFORM,
  parameter int unsigned FIFO_DEPTH = 2,
  localparam int unsigned NR        = ROWS * COLS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        active  [NR],
  output logic        irq,
  output logic [15:0] sent    [NR],
  output logic [15:0] rcvd    [NR],
  output logic [15:0] rx_err  [NR],
  output logic [31:0] tx_sum_total,
  output logic [31:0] rx_sum_total,
  output logic [31:0] hop_total,
  output logic [31:0] run_cycles,
  output logic        done
);

  logic               coord_we [NR];
  logic [COORD_W-1:0] coord_wdata;
  logic [COORD_W-1:0] coord    [NR];
  logic               setup_done;
  logic               inj_valid [NR];
  flit_t              inj_flit  [NR];
  logic               inj_ready [NR];
  logic               ej_valid  [NR];
  flit_t              ej_flit   [NR];
  logic               ej_ready  [NR];
  logic [15:0]        hop_cnt   [NR][NPORTS];
  logic [IDX_W-1:0]   tx_dest   [NR];
  logic [PAYLOAD_W-1:0] tx_payload [NR];
  logic [31:0]        tx_sum    [NR];
  logic [31:0]        rx_sum    [NR];
  logic               node_done [NR];

  init_cor #(.ROWS(ROWS), .COLS(COLS)) u_init (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .irq         (irq),
    .coord_we    (coord_we),
    .coord_wdata (coord_wdata),
    .done        (setup_done)
  );

  noc_mesh #(.ROWS(ROWS), .COLS(COLS), .FIFO_DEPTH(FIFO_DEPTH)) u_mesh (
    .clk         (clk),
    .rst_n       (rst_n),
    .coord_we    (coord_we),
    .coord_wdata (coord_wdata),
    .coord       (coord),
    .inj_valid   (inj_valid),
    .inj_flit    (inj_flit),
    .inj_ready   (inj_ready),
    .ej_valid    (ej_valid),
    .ej_flit     (ej_flit),
    .ej_ready    (ej_ready),
    .hop_cnt     (hop_cnt)
  );

  for (genvar n = 0; n < NR; n++) begin : g_core
    cpu_node #(.IDX(n), .NCORES(NR), .NPKT(NPKT), .CBR(CBR), .SEED(SEED), .DIST(DIST)) u_cpu (
      .clk        (clk),
      .rst_n      (rst_n),
      .irq        (irq),
      .active     (active[n]),
      .tx_valid   (inj_valid[n]),
      .tx_dest    (tx_dest[n]),
      .tx_payload (tx_payload[n]),
      .tx_ready   (inj_ready[n]),
      .rx_valid   (ej_valid[n]),
      .rx_dest    (IDX_W'(coord_to_idx(ej_flit[n].coord, ROWS))),
      .rx_payload (ej_flit[n].payload),
      .sent       (sent[n]),
      .rcvd       (rcvd[n]),
      .rx_err     (rx_err[n]),
      .tx_sum     (tx_sum[n]),
      .rx_sum     (rx_sum[n]),
      .done       (node_done[n])
    );
    assign inj_flit[n] = '{coord: idx_to_coord(int'(tx_dest[n]), ROWS), payload: tx_payload[n]};
    assign ej_ready[n] = 1'b1;

    // Once setup is over, every router must hold the coordinates that the
    // cores use to address it.
    a_coord_loaded: assert property (@(posedge clk) disable iff (!rst_n)
      setup_done |-> coord[n] == idx_to_coord(n, ROWS));
  end

  // totals
  logic [31:0] sent_total, rcvd_total;
  logic        all_done;
  always_comb begin
    sent_total   = '0;
    rcvd_total   = '0;
    tx_sum_total = '0;
    rx_sum_total = '0;
    hop_total    = '0;
    all_done     = setup_done;
    for (int n = 0; n < int'(NR); n++) begin
      sent_total   += 32'(sent[n]);
      rcvd_total   += 32'(rcvd[n]);
      tx_sum_total += tx_sum[n];
      rx_sum_total += rx_sum[n];
      all_done     &= node_done[n];
      for (int p = 0; p < NPORTS; p++) hop_total += 32'(hop_cnt[n][p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_cycles <= '0;
      done       <= 1'b0;
    end else if (setup_done && !done) begin
      if (all_done && rcvd_total == sent_total) done <= 1'b1;
      else                                      run_cycles <= run_cycles + 32'd1;
    end
  end

endmodule
