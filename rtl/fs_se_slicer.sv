// fs_se_slicer: Schnorr-Euchner slicer of the general PED block.
//
// Finds the real constellation value closest to b = (1/R_ii) * b_{i+1},
// clamped to the modulation of the level:
//   s = g(2 * round((b + 1) / 2) - 1),   g(x) = min(max(x, -q), q)
// so s is always an odd integer in [-q, q], q in {1, 3, 7} for 4-, 16- and
// 64-QAM. round() is round-half-up to the nearest integer.
//
// The datapath follows the pipelined slicer of the reference design: input
// register, "+1" adder, a one-bit right shift, a cast to integer, a one-bit
// left shift, the "-1" subtractor, two comparisons against -q and q, and a
// registered select between x, -q and q. The registers sit where that
// pipeline has them (input, adder, subtractor, comparators with a matching
// delay of x, output select), giving a latency of LAT = 5 cycles with a new
// input every cycle. The binary point (FRAC bits) is fs_pkg's.
//
// Interface: b in acc_t with FRAC fractional bits, q the clamp value; s is
// valid LAT cycles after b. There is no handshake: the block is a pipeline.
module fs_se_slicer
  import fs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  acc_t  b,
  input  qmax_t q,
  output sym_t  s
);
  localparam acc_t ONE  = acc_t'(1) <<< FRAC;
  localparam acc_t HALF = acc_t'(1) <<< (FRAC - 1);

  acc_t  b0, x1;
  qmax_t q0, q1, q2, q3;
  acc_t  x2, x3;
  logic  le3, ge3;
  sym_t  s4;

  // integer part after ">> 1" and the rounding cast
  acc_t half_x1, rnd;
  always_comb begin
    half_x1 = x1 >>> 1;
    rnd     = (half_x1 + HALF) >>> FRAC;
  end

  acc_t neg_q2, pos_q2;
  always_comb begin
    pos_q2 = acc_t'(q2);
    neg_q2 = -acc_t'(q2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b0 <= '0; x1 <= '0; x2 <= '0; x3 <= '0;
      q0 <= '0; q1 <= '0; q2 <= '0; q3 <= '0;
      le3 <= 1'b0; ge3 <= 1'b0; s4 <= '0;
    end else begin
      b0  <= b;            q0 <= q;
      x1  <= b0 + ONE;     q1 <= q0;
      x2  <= (rnd <<< 1) - acc_t'(1);
      q2  <= q1;
      le3 <= x2 <= neg_q2;
      ge3 <= x2 >= pos_q2;
      x3  <= x2;           q3 <= q2;
      unique case ({ge3, le3})
        2'b10:   s4 <= sym_t'(q3);
        2'b01:   s4 <= -sym_t'(q3);
        default: s4 <= sym_t'(x3);
      endcase
    end
  end

  assign s = s4;
endmodule
