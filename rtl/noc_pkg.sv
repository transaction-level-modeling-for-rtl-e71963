// noc_pkg: types and constants shared by the mesh network-on-chip and the
// shared-bus system built next to it.
//
// A packet is one 32-bit flit: the upper 16 bits carry the destination
// router coordinates and the lower 16 bits the payload. Inside the 16-bit
// coordinate field, bits [3:2] hold the column (x) and bits [1:0] the row
// (y), so a packet's x sits in bits 19:18 and its y in bits 17:16. Two bits
// per axis cover meshes up to 4x4; the remaining coordinate bits are zero.
// Routers are numbered column by column: router n sits at x = n / ROWS,
// y = n % ROWS, so in a 2x2 mesh R1 is at (0,1) and R2 at (1,0).
//
// On the shared bus, core n owns a 0x28-byte slave window starting at
// n * 0x28 (0x00, 0x28, 0x50, 0x78, ...), and a packet to core n is a write
// to the base of that window.
//
// dist_e names the destination patterns the traffic cores can draw from.
// Packet layout, coordinate encoding and window size follow the described
// system; the enum encodings and the index width are this design's choice.
package noc_pkg;

  localparam int FLIT_W    = 32;
  localparam int PAYLOAD_W = 16;
  localparam int COORD_W   = 16;   // width of the coordinate register and port
  localparam int AXIS_W    = 2;    // bits per axis inside the coordinate field
  localparam int NPORTS    = 5;
  localparam int ADDR_W    = 32;
  localparam int IDX_W     = 8;    // core / router index width
  localparam logic [ADDR_W-1:0] SLAVE_SIZE = 32'h28;

  // Router port numbering, also used as array index.
  typedef enum logic [2:0] {
    PORT_N = 3'd0,
    PORT_E = 3'd1,
    PORT_S = 3'd2,
    PORT_W = 3'd3,
    PORT_L = 3'd4
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0]   coord;    // destination router coordinates
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // AHB transfer type (only IDLE and NONSEQ are used: single writes).
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  function automatic logic [AXIS_W-1:0] coord_x(input logic [COORD_W-1:0] c);
    return c[2*AXIS_W-1:AXIS_W];
  endfunction

  function automatic logic [AXIS_W-1:0] coord_y(input logic [COORD_W-1:0] c);
    return c[AXIS_W-1:0];
  endfunction

  // Spatial distribution of the destinations drawn by a traffic core.
  typedef enum logic [1:0] {
    DIST_UNIFORM = 2'd0,   // every other core equally likely
    DIST_NORMAL  = 2'd1,   // bell curve over the bus address space
    DIST_POISSON = 2'd2    // Poisson over the core index (low indices hot)
  } dist_e;

  // Router/core index -> coordinate field.
  function automatic logic [COORD_W-1:0] idx_to_coord(input int unsigned idx,
                                                      input int unsigned rows);
    logic [COORD_W-1:0] c;
    int unsigned x, y;
    x = idx / rows;
    y = idx % rows;
    c = '0;
    c[2*AXIS_W-1:AXIS_W] = x[AXIS_W-1:0];
    c[AXIS_W-1:0]        = y[AXIS_W-1:0];
    return c;
  endfunction

  // Coordinate field -> router/core index.
  function automatic int unsigned coord_to_idx(input logic [COORD_W-1:0] c,
                                               input int unsigned rows);
    return int'(coord_x(c)) * rows + int'(coord_y(c));
  endfunction

  // Core index -> base of its slave window on the shared bus.
  function automatic logic [ADDR_W-1:0] idx_to_addr(input int unsigned idx);
    return ADDR_W'(idx) * SLAVE_SIZE;
  endfunction

endpackage
