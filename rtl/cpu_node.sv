// cpu_node: traffic-generating core attached to the network or the bus.
//
// It waits for the falling edge of irq (the end of network setup), then
// sends NPKT packets. For every packet it steps two 32-bit xorshift
// generators seeded per core. The first gives the 16-bit payload and, unless
// CBR is set, an idle gap of 0..9 cycles before the packet; with CBR set,
// packets follow each other back to back (constant bit rate). The
// destination is drawn according to DIST:
//   DIST_UNIFORM  every other core with equal probability (first generator).
//   DIST_NORMAL   a bus address drawn from a bell curve whose mean and
//                 standard deviation both equal half the address span
//                 (NCORES windows of 0x28 bytes), clipped to that span; the
//                 destination is the core owning the address. The curve is
//                 the sum of the four bytes of the second generator (mean
//                 510, standard deviation 147.8), scaled to the span.
//   DIST_POISSON  the core index itself is Poisson distributed with mean
//                 (NCORES-1)/2, cut at NCORES-1; it is drawn by comparing 16
//                 random bits with the cumulative distribution, which is
//                 computed at elaboration in fixed point.
// With the non-uniform draws a core that draws itself sends to the next core
// up instead, so that no core ever sends to itself.
//
// Follows the described traffic setup: packet count, 16-bit random payload,
// the 0..9 gap, no traffic to self, uniform / Normal / Poisson spatial
// patterns, and the Normal curve centred on the address space with a
// standard deviation equal to its mean. This design's own choices: the
// generators, generating the destinations on chip instead of reading them
// from prepared lists, the Poisson mean, and the redirect of self-addressed
// draws.
//
// Transmit side: tx_valid/tx_dest/tx_payload stay stable until tx_ready.
// Receive side: every cycle with rx_valid is one received packet (always
// accepted); tx_sum and rx_sum add up the payloads sent and received so
// that delivery can be checked end to end. A packet whose rx_dest is not
// this core counts as an error. An inactive core (active low) sends nothing
// but still receives.
module cpu_node
  import noc_pkg::*;
#(
  parameter int unsigned IDX    = 0,
  parameter int unsigned NCORES = 4,
  parameter int unsigned NPKT   = 1000,
  parameter bit          CBR    = 1'b0,
  parameter logic [31:0] SEED   = 32'h1234_5678,
  parameter dist_e       DIST   = DIST_UNIFORM
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 irq,
  input  logic                 active,
  output logic                 tx_valid,
  output logic [IDX_W-1:0]     tx_dest,
  output logic [PAYLOAD_W-1:0] tx_payload,
  input  logic                 tx_ready,
  input  logic                 rx_valid,
  input  logic [IDX_W-1:0]     rx_dest,
  input  logic [PAYLOAD_W-1:0] rx_payload,
  output logic [15:0]          sent,
  output logic [15:0]          rcvd,
  output logic [15:0]          rx_err,
  output logic [31:0]          tx_sum,   // sum of payloads sent
  output logic [31:0]          rx_sum,   // sum of payloads received
  output logic                 done
);

  typedef enum logic [1:0] {S_WAIT_IRQ, S_GAP, S_SEND, S_DONE} state_e;

  state_e      state;
  logic        irq_q;
  logic [31:0] rng, rng_next;
  logic [31:0] rng2, rng2_next;
  logic [3:0]  gap;

  // one xorshift32 step
  function automatic logic [31:0] xorshift(input logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 17);
    return t ^ (t << 5);
  endfunction

  localparam logic [31:0] RNG2_INIT =
    {SEED[15:0], SEED[31:16]} ^ (32'h85EB_CA6B * (IDX + 1)) ^ 32'h2545_F491;

  assign rng_next  = xorshift(rng);
  assign rng2_next = xorshift(rng2);

  // Normal draw: bytes sum S in 0..1020 (mean 510, sd 147.8) mapped to
  // address HALF + (S-510)*HALF/147.8, i.e. a scale of KN/1024.
  localparam int WIN  = int'(SLAVE_SIZE);
  localparam int SPAN = int'(NCORES) * WIN;
  localparam int HALF = SPAN / 2;
  localparam int KN   = (HALF * 102400 + 7390) / 14780;

  // Poisson draw: cumulative probabilities P(k <= j), j = 0..NCORES-1, of a
  // Poisson variable with mean (NCORES-1)/2, in units of 2^-16. Built from
  // exp(-1/2) = 0.60653066 in 30-bit fixed point, raised to NCORES-1, and
  // p(k) = p(k-1) * mean / k.
  typedef logic [NCORES-1:0][16:0] cdf_t;
  function automatic cdf_t poisson_cdf();
    cdf_t    c;
    longint  p, acc;
    p = 64'd1 << 30;
    for (int i = 0; i < int'(NCORES) - 1; i++) p = (p * 64'd651257337) >> 30;
    acc = 0;
    for (int k = 0; k < int'(NCORES); k++) begin
      if (k > 0) p = p * (longint'(NCORES) - 64'sd1) / (64'sd2 * longint'(k));
      acc  = acc + p;
      c[k] = (acc >> 14) > 64'd65536 ? 17'd65536 : 17'(acc >> 14);
    end
    return c;
  endfunction
  localparam cdf_t PCDF = poisson_cdf();

  // Draw the destination of the next packet.
  function automatic logic [IDX_W-1:0] pick_dest(input logic [31:0] r,
                                                 input logic [31:0] r2);
    int unsigned d;
    int          a;
    d = 0;
    case (DIST)
      DIST_NORMAL: begin
        a = int'({22'd0, 10'(r2[7:0]) + 10'(r2[15:8]) + 10'(r2[23:16]) + 10'(r2[31:24])}) - 510;
        a = HALF + ((a * KN) >>> 10);
        if (a < 0)     a = 0;
        if (a >= SPAN) a = SPAN - 1;
        for (int k = 1; k < int'(NCORES); k++) if (a >= k * WIN) d = k;
      end
      DIST_POISSON: begin
        for (int k = 0; k < int'(NCORES) - 1; k++)
          if ({1'b0, r2[15:0]} >= PCDF[k]) d = k + 1;
      end
      default: begin
        d = int'(r[31:16]) % (NCORES - 1);
        if (d >= IDX) d = d + 1;
      end
    endcase
    if (d == IDX) d = (IDX + 1) % NCORES;
    return IDX_W'(d);
  endfunction

  function automatic logic [3:0] pick_gap(input logic [31:0] r);
    return CBR ? 4'd0 : 4'(int'({24'd0, r[23:16] ^ r[7:0]}) % 10);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_WAIT_IRQ;
      irq_q      <= 1'b0;
      rng        <= (SEED == 32'd0) ? 32'h1 : SEED ^ (32'h9E37_79B9 * (IDX + 1));
      rng2       <= (RNG2_INIT == 32'd0) ? 32'h1 : RNG2_INIT;
      gap        <= '0;
      tx_dest    <= '0;
      tx_payload <= '0;
      sent       <= '0;
      tx_sum     <= '0;
    end else begin
      irq_q <= irq;
      case (state)
        S_WAIT_IRQ: if (irq_q && !irq) begin
          if (!active || NPKT == 0) state <= S_DONE;
          else begin
            rng        <= rng_next;
            rng2       <= rng2_next;
            tx_dest    <= pick_dest(rng_next, rng2_next);
            tx_payload <= rng_next[15:0];
            gap        <= pick_gap(rng_next);
            state      <= (pick_gap(rng_next) == 4'd0) ? S_SEND : S_GAP;
          end
        end
        S_GAP: begin
          gap <= gap - 1'b1;
          if (gap == 4'd1) state <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          sent   <= sent + 16'd1;
          tx_sum <= tx_sum + 32'(tx_payload);
          if (sent == 16'(NPKT - 1)) state <= S_DONE;
          else begin
            rng        <= rng_next;
            rng2       <= rng2_next;
            tx_dest    <= pick_dest(rng_next, rng2_next);
            tx_payload <= rng_next[15:0];
            gap        <= pick_gap(rng_next);
            state      <= (pick_gap(rng_next) == 4'd0) ? S_SEND : S_GAP;
          end
        end
        default: state <= S_DONE;
      endcase
    end
  end

  assign tx_valid = (state == S_SEND);
  assign done     = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcvd   <= '0;
      rx_err <= '0;
      rx_sum <= '0;
    end else if (rx_valid) begin
      rcvd   <= rcvd + 16'd1;
      rx_sum <= rx_sum + 32'(rx_payload);
      if (rx_dest != IDX_W'(IDX)) rx_err <= rx_err + 16'd1;
    end
  end

  a_no_self: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid |-> (tx_dest != IDX_W'(IDX)) && (tx_dest < IDX_W'(NCORES)));

endmodule
