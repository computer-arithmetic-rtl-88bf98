// fp_add_two_path: combinational two-path IEEE binary floating-point adder.
//
// Computes a + b (or a - b when sub = 1) in the binary format with EXP_W
// exponent bits and MAN_W fraction bits (binary64 by default), in one of
// four rounding modes, with subnormals, infinities and NaNs.
//
// Two paths run side by side and the right one is chosen at the end:
//  * close path, for an effective subtraction with exponent difference 0,
//    or 1 when the difference needs a left shift: exact subtraction with
//    complementation (close_sub), leading one prediction in parallel (lop),
//    priority encoding (penc) and a large left shift (norm_shift). Such a
//    result is always exact, so this path has no rounding logic.
//  * far path, for everything else: swap by exponent, right alignment with
//    guard/round/sticky (align_shift), inversion of the smaller operand for a
//    subtraction, a compound adder giving sum, sum+1 and sum+2, and a
//    rounding decision taken on the unnormalized bits that selects among
//    them (far_round); at most a one-bit normalization is ever needed.
// fp_special handles NaN/infinity operands and fp_result_sel packs the
// result and flags. The path split, the LSB-based exponent prediction, the
// compound adder with sum+2 and the leading one prediction follow the
// classical two-path adder; port names and the flag set are this design's.
module fp_add_two_path
  import fp_add_pkg::*;
#(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  input  round_mode_e          rm,
  output logic [EXP_W+MAN_W:0] result,
  output fp_flags_t            flags,
  output logic                 close_used    // result came from the close path
);

  localparam int unsigned P  = MAN_W + 1;
  localparam int unsigned CW = $clog2(P + 2);

  // ---------------- operand preparation ----------------
  logic             eff_sub, sign_a, sign_b, sign_l;
  logic [EXP_W-1:0] exp_a, exp_b, exp_l, diff;
  logic [P-1:0]     sig_a, sig_b, sig_l, sig_s;

  fp_exp_swap #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_swap (
    .a, .b, .sub, .eff_sub, .sign_a, .sign_b, .exp_a, .exp_b, .sig_a, .sig_b,
    .sign_l, .exp_l, .sig_l, .sig_s, .diff
  );

  logic                 is_special, special_invalid;
  logic [EXP_W+MAN_W:0] special_result;

  fp_special #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_special (
    .a, .b, .sub, .is_special, .special_result, .invalid(special_invalid)
  );

  // ---------------- close path ----------------
  logic             c_sel_b, c_sign;
  logic [P:0]       c_x, c_y, c_mag, c_f, c_norm;
  logic [CW-1:0]    c_lz;
  logic             c_lz_zero;
  logic [EXP_W-1:0] c_exp_l, c_shift;

  close_sub #(.P(P)) u_close (
    .sig_a, .sig_b, .exp_a_lsb(exp_a[1:0]), .exp_b_lsb(exp_b[1:0]),
    .sign_a, .sign_b, .sel_b(c_sel_b), .x(c_x), .y(c_y), .mag(c_mag), .sign(c_sign)
  );

  lop #(.N(P+1)) u_lop (.x(c_x), .y(c_y), .f(c_f));

  penc #(.N(P+1), .CW(CW)) u_penc (.f(c_f), .count(c_lz), .zero(c_lz_zero));

  assign c_exp_l = c_sel_b ? exp_b : exp_a;

  norm_shift #(.N(P+1), .CW(CW), .EXP_W(EXP_W)) u_norm (
    .mag(c_mag), .lz(c_lz), .limit(c_exp_l - 1'b1), .norm(c_norm), .shift(c_shift)
  );

  // ---------------- far path ----------------
  logic [P-1:0] f_hi, f_sig;
  logic [2:0]   f_grs;
  logic [P+1:0] f_s0, f_s1, f_s2;
  logic [EXP_W+1:0] f_exp;
  logic         f_inexact;

  align_shift #(.P(P), .EXP_W(EXP_W)) u_align (.sig(sig_s), .diff, .hi(f_hi), .grs(f_grs));

  compound_adder #(.W(P+2)) u_cadd (
    .a    ({2'b00, sig_l}),
    .b    (eff_sub ? ~{2'b00, f_hi} : {2'b00, f_hi}),
    .sum0 (f_s0),
    .sum1 (f_s1),
    .sum2 (f_s2)
  );

  far_round #(.P(P), .EXP_W(EXP_W)) u_round (
    .eff_sub, .sign(sign_l), .rm, .exp_l, .sum0(f_s0), .sum1(f_s1), .sum2(f_s2),
    .grs(f_grs), .sig(f_sig), .exp_res(f_exp), .inexact(f_inexact)
  );

  // ---------------- selection ----------------
  assign close_used = eff_sub & ((diff == '0) | ((diff == EXP_W'(1)) & ~c_mag[P]));

  fp_result_sel #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sel (
    .rm, .sign_a, .sign_b, .use_close(close_used),
    .close_sign(c_sign), .close_sig(c_norm[P:1]), .close_exp((EXP_W+2)'(c_exp_l - c_shift)),
    .far_sign(sign_l), .far_sig(f_sig), .far_exp(f_exp), .far_inexact(f_inexact),
    .is_special, .special_result, .special_invalid, .result, .flags
  );

endmodule
