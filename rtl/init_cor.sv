// init_cor: setup controller that gives every router its coordinates and
// then releases the cores.
//
// After start it goes through the four setup phases of the described
// network: (a) raise irq to all cores, (b) write the coordinates of router
// 0, 1, ... NR-1 through their Init_Cor ports, one router per cycle, (c)
// drop irq, (d) run: the cores begin sending on the falling edge of irq.
// Router n receives x = n / ROWS in bits [3:2] and y = n % ROWS in bits
// [1:0]. The controller is not part of the network and carries no traffic.
// Timing: irq is high for NR + 1 cycles; done rises together with the fall
// of irq and stays high. A second start is ignored.
module init_cor
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 2,
  parameter int unsigned COLS = 2,
  localparam int unsigned NR  = ROWS * COLS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               irq,
  output logic               coord_we [NR],
  output logic [COORD_W-1:0] coord_wdata,
  output logic               done
);

  typedef enum logic [1:0] {S_IDLE, S_ASSERT, S_INIT, S_RUN} state_e;

  state_e           state;
  logic [IDX_W-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
    end else begin
      case (state)
        S_IDLE:   if (start) state <= S_ASSERT;
        S_ASSERT: begin
          idx   <= '0;
          state <= S_INIT;
        end
        S_INIT: begin
          if (idx == IDX_W'(NR - 1)) state <= S_RUN;
          else                       idx   <= idx + 1'b1;
        end
        default: state <= S_RUN;
      endcase
    end
  end

  assign irq         = (state == S_ASSERT) || (state == S_INIT);
  assign done        = (state == S_RUN);
  assign coord_wdata = idx_to_coord(int'(idx), ROWS);

  always_comb
    for (int n = 0; n < int'(NR); n++)
      coord_we[n] = (state == S_INIT) && (idx == IDX_W'(n));

endmodule
