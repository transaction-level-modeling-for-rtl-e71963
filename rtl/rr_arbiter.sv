// rr_arbiter: round-robin arbiter over N requesters.
//
// grant is one-hot among the active requests (or zero when none). Priority
// starts just after the requester granted last, so the requester that was
// served drops to the lowest priority in the next round and every requester
// is served within N rounds. The priority pointer moves only when advance is
// high (the grant was actually used), so a stalled grant keeps its place.
// grant is combinational from req; the pointer is a register.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;     // index granted most recently
  logic [IW-1:0] win;
  logic          found;

  always_comb begin
    int unsigned k;
    grant = '0;
    win   = last;
    found = 1'b0;
    for (int unsigned i = 1; i <= N; i++) begin
      k = (int'(last) + i) % N;
      if (!found && req[k]) begin
        found    = 1'b1;
        win      = IW'(k);
        grant[k] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last <= IW'(N-1);   // requester 0 first after reset
    else if (advance && found) last <= win;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
