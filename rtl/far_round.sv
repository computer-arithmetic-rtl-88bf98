// far_round: far-path rounding and one-bit normalization.
//
// The far path handles every effective addition and the effective
// subtractions whose exponent difference is two or more, or one when no
// large cancellation happens. Its significand sum needs at most a one-bit
// normalization: a right shift after a carry-out of an addition, or a left
// shift after a subtraction. The high part of the result comes from the
// compound adder (sum0 = A + Bh or A + ~Bh, sum1, sum2); the low part is the
// guard/round/sticky triple of the aligned operand, two's-complemented for a
// subtraction, which borrows one from the high part unless it is zero.
// The rounding decision is taken on these pre-normalization bits for each of
// the three normalization cases and selects among sum0, sum0+1 and sum0+2,
// so no separate rounding increment follows the addition:
//   no shift    : L = hb[0],  G = low[2], S = low[1]|low[0]; up -> hb+1
//   right shift : L = hb[1],  G = hb[0],  S = |low;          up -> hb+2
//   left shift  : L = low[2], G = low[1], S = low[0];        up -> +1 at G
// A rounding carry-out (significand becoming 2**P) is renormalized by one
// more right shift. The exponent comes out wide so that overflow can be
// detected later. Purely combinational.
// The three normalization cases, the sum / sum+1 / sum+2 selection and
// deciding the rounding on the unnormalized bits follow the two-path adder
// as taught; the borrow treatment of the complemented low bits and the
// signal names are this design's own.
module far_round
  import fp_add_pkg::*;
#(
  parameter int unsigned P     = 53,
  parameter int unsigned EXP_W = 11
) (
  input  logic             eff_sub,
  input  logic             sign,        // sign of the result (larger operand)
  input  round_mode_e      rm,
  input  logic [EXP_W-1:0] exp_l,       // exponent of the larger operand
  input  logic [P+1:0]     sum0,        // compound adder outputs, P+2 bits
  input  logic [P+1:0]     sum1,
  input  logic [P+1:0]     sum2,
  input  logic [2:0]       grs,         // guard, round, sticky of aligned operand
  output logic [P-1:0]     sig,         // rounded significand, hidden bit on top
  output logic [EXP_W+1:0] exp_res,     // exponent of sig, may exceed the range
  output logic             inexact
);

  logic [2:0]   low;
  logic         c0, ovf, lsh, rovf;
  logic         ru_n, ru_r, ru_l;
  logic [P+1:0] hb, hb1;
  logic [P+1:0] v_n, v_r, v_l, v;   // candidate significands per case

  always_comb begin
    // subtraction: A - Bh - 0.grs = (A + ~Bh) + (1 - 0.grs) when grs != 0
    low = eff_sub ? 3'(-grs) : grs;
    c0  = eff_sub & (grs == 3'b000);
    hb  = c0 ? sum1 : sum0;     // exact high part
    hb1 = c0 ? sum2 : sum1;     // high part + 1
    // rounding decisions for the three normalization cases, in parallel;
    // they need only the low bits, which a real adder delivers first
    ru_n = round_up(rm, sign, hb[0],  low[2], |low[1:0]);
    ru_r = round_up(rm, sign, hb[1],  hb[0],  |low);
    ru_l = round_up(rm, sign, low[2], low[1], low[0]);
    v_n  = ru_n ? hb1 : hb;
    v_r  = (ru_r ? sum2 : sum0) >> 1;                  // c0 = 0 for additions
    v_l  = (ru_l & low[2]) ? {hb1[P:0], 1'b0} : {hb[P:0], low[2] | ru_l};
    // the normalization case, known once the sum's top bits are ready
    ovf = ~eff_sub & hb[P];
    lsh = eff_sub & ~hb[P-1];
    if (ovf) begin
      v = v_r; inexact = hb[0] | (low != 3'b000);
    end else if (lsh) begin
      v = v_l; inexact = low[1] | low[0];
    end else begin
      v = v_n; inexact = low != 3'b000;
    end
    rovf    = v[P];
    sig     = rovf ? v[P:1] : v[P-1:0];
    exp_res = (EXP_W+2)'(exp_l) + (EXP_W+2)'(ovf) - (EXP_W+2)'(lsh) + (EXP_W+2)'(rovf);
  end

endmodule
