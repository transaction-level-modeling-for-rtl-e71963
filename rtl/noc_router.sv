// noc_router: five-port mesh router with XY routing.
//
// Ports North, East, South, West and Local each have an input and an output
// channel carrying one 32-bit packet (16-bit destination coordinates and
// 16-bit payload) with a valid/ready handshake. A sixth port, Init_Cor,
// loads the 16-bit coordinate register that holds this router's own (x,y);
// it must be written before traffic starts. The ports, the packet format, the
// coordinate register and XY routing follow the described router.
//
// Inside (this design's own choices, the source gives only the router's
// behaviour): every input has a two-flit FIFO; the head flit of each FIFO is
// routed by xy_route; every output has a round-robin arbiter choosing among
// the inputs whose head wants that output; the granted head is driven onto
// the output and popped when the neighbour accepts it. in_ready is the
// FIFO's registered not-full flag, so there is no combinational path from a
// router's output ready to its input ready and meshes have no loops.
//
// Timing: a packet written into an input FIFO at one clock edge can leave at
// the next edge, so each router adds one cycle of latency; all five outputs
// can move a packet in the same cycle. hop_cnt counts packets leaving through
// each output, for statistics.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // Init_Cor port
  input  logic               coord_we,
  input  logic [COORD_W-1:0] coord_wdata,
  output logic [COORD_W-1:0] coord,
  // input channels, indexed by port_e
  input  logic               in_valid [NPORTS],
  input  flit_t              in_flit  [NPORTS],
  output logic               in_ready [NPORTS],
  // output channels, indexed by port_e
  output logic               out_valid [NPORTS],
  output flit_t              out_flit  [NPORTS],
  input  logic               out_ready [NPORTS],
  // number of packets sent through each output
  output logic [15:0]        hop_cnt   [NPORTS]
);

  flit_t             head  [NPORTS];
  logic              empty [NPORTS];
  logic              full  [NPORTS];
  logic              pop   [NPORTS];
  port_e             route [NPORTS];
  logic [NPORTS-1:0] req   [NPORTS];   // req[o][i]: input i wants output o
  logic [NPORTS-1:0] gnt   [NPORTS];   // gnt[o][i]: input i granted output o

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        coord <= '0;
    else if (coord_we) coord <= coord_wdata;
  end

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (in_valid[i] && in_ready[i]),
      .wr_data (in_flit[i]),
      .rd_en   (pop[i]),
      .rd_data (head[i]),
      .full    (full[i]),
      .empty   (empty[i])
    );
    assign in_ready[i] = !full[i];

    xy_route u_route (
      .dest (head[i].coord),
      .here (coord),
      .port (route[i])
    );
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = !empty[i] && (route[i] == port_e'(o));
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (req[o]),
      .advance (out_ready[o]),
      .grant   (gnt[o])
    );

    always_comb begin
      out_valid[o] = |gnt[o];
      out_flit[o]  = '0;
      for (int i = 0; i < NPORTS; i++)
        if (gnt[o][i]) out_flit[o] = head[i];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                           hop_cnt[o] <= '0;
      else if (out_valid[o] && out_ready[o]) hop_cnt[o] <= hop_cnt[o] + 16'd1;
    end
  end

  // Each input heads for exactly one output, so at most one grant pops it.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (gnt[o][i] && out_ready[o]) pop[i] = 1'b1;
    end
  end

  // A packet leaving through Local must be addressed to this router.
  a_local_dest: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid[PORT_L] && out_ready[PORT_L]) |-> (out_flit[PORT_L].coord[3:0] == coord[3:0]));

endmodule
