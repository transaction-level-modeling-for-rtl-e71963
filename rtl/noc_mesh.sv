// noc_mesh: ROWS x COLS two-dimensional mesh of noc_router instances.
//
// Router n sits at column x = n / ROWS and row y = n % ROWS (R0 bottom left,
// R1 above it, R2 to its right in the 2x2 case). Each router's East output
// feeds the East neighbour's West input and vice versa; each North output
// feeds the North neighbour's South input and vice versa. Ports on the mesh
// border have no neighbour: their inputs are held idle and their outputs
// always ready (XY routing never sends a packet there, which an assertion
// checks). The Local channels and the Init_Cor ports of all routers are
// brought out, indexed by router number. The mesh shape and numbering follow
// the described 2x2, 3x3 and 4x4 networks; 2x2 is the default.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned ROWS       = 2,
  parameter int unsigned COLS       = 2,
  parameter int unsigned FIFO_DEPTH = 2,
  localparam int unsigned NR        = ROWS * COLS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               coord_we    [NR],
  input  logic [COORD_W-1:0] coord_wdata,
  output logic [COORD_W-1:0] coord       [NR],
  // Local port of each router: core -> network
  input  logic               inj_valid [NR],
  input  flit_t              inj_flit  [NR],
  output logic               inj_ready [NR],
  // Local port of each router: network -> core
  output logic               ej_valid  [NR],
  output flit_t              ej_flit   [NR],
  input  logic               ej_ready  [NR],
  // packets sent through each router output
  output logic [15:0]        hop_cnt   [NR][NPORTS]
);

  logic  i_valid [NR][NPORTS];
  flit_t i_flit  [NR][NPORTS];
  logic  i_ready [NR][NPORTS];
  logic  o_valid [NR][NPORTS];
  flit_t o_flit  [NR][NPORTS];
  logic  o_ready [NR][NPORTS];

  for (genvar n = 0; n < NR; n++) begin : g_r
    localparam int unsigned X = n / ROWS;
    localparam int unsigned Y = n % ROWS;

    noc_router #(.FIFO_DEPTH(FIFO_DEPTH)) u_router (
      .clk         (clk),
      .rst_n       (rst_n),
      .coord_we    (coord_we[n]),
      .coord_wdata (coord_wdata),
      .coord       (coord[n]),
      .in_valid    (i_valid[n]),
      .in_flit     (i_flit[n]),
      .in_ready    (i_ready[n]),
      .out_valid   (o_valid[n]),
      .out_flit    (o_flit[n]),
      .out_ready   (o_ready[n]),
      .hop_cnt     (hop_cnt[n])
    );

    // Local port
    assign i_valid[n][PORT_L] = inj_valid[n];
    assign i_flit[n][PORT_L]  = inj_flit[n];
    assign inj_ready[n]       = i_ready[n][PORT_L];
    assign ej_valid[n]        = o_valid[n][PORT_L];
    assign ej_flit[n]         = o_flit[n][PORT_L];
    assign o_ready[n][PORT_L] = ej_ready[n];

    // North side: neighbour n+1
    if (Y + 1 < ROWS) begin : g_n
      assign i_valid[n][PORT_N] = o_valid[n+1][PORT_S];
      assign i_flit[n][PORT_N]  = o_flit[n+1][PORT_S];
      assign o_ready[n][PORT_N] = i_ready[n+1][PORT_S];
    end else begin : g_n_edge
      assign i_valid[n][PORT_N] = 1'b0;
      assign i_flit[n][PORT_N]  = '0;
      assign o_ready[n][PORT_N] = 1'b1;
      a_no_north: assert property (@(posedge clk) disable iff (!rst_n) !o_valid[n][PORT_N]);
    end

    // South side: neighbour n-1
    if (Y > 0) begin : g_s
      assign i_valid[n][PORT_S] = o_valid[n-1][PORT_N];
      assign i_flit[n][PORT_S]  = o_flit[n-1][PORT_N];
      assign o_ready[n][PORT_S] = i_ready[n-1][PORT_N];
    end else begin : g_s_edge
      assign i_valid[n][PORT_S] = 1'b0;
      assign i_flit[n][PORT_S]  = '0;
      assign o_ready[n][PORT_S] = 1'b1;
      a_no_south: assert property (@(posedge clk) disable iff (!rst_n) !o_valid[n][PORT_S]);
    end

    // East side: neighbour n+ROWS
    if (X + 1 < COLS) begin : g_e
      assign i_valid[n][PORT_E] = o_valid[n+ROWS][PORT_W];
      assign i_flit[n][PORT_E]  = o_flit[n+ROWS][PORT_W];
      assign o_ready[n][PORT_E] = i_ready[n+ROWS][PORT_W];
    end else begin : g_e_edge
      assign i_valid[n][PORT_E] = 1'b0;
      assign i_flit[n][PORT_E]  = '0;
      assign o_ready[n][PORT_E] = 1'b1;
      a_no_east: assert property (@(posedge clk) disable iff (!rst_n) !o_valid[n][PORT_E]);
    end

    // West side: neighbour n-ROWS
    if (X > 0) begin : g_w
      assign i_valid[n][PORT_W] = o_valid[n-ROWS][PORT_E];
      assign i_flit[n][PORT_W]  = o_flit[n-ROWS][PORT_E];
      assign o_ready[n][PORT_W] = i_ready[n-ROWS][PORT_E];
    end else begin : g_w_edge
      assign i_valid[n][PORT_W] = 1'b0;
      assign i_flit[n][PORT_W]  = '0;
      assign o_ready[n][PORT_W] = 1'b1;
      a_no_west: assert property (@(posedge clk) disable iff (!rst_n) !o_valid[n][PORT_W]);
    end
  end

endmodule
