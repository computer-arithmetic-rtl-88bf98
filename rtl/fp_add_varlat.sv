// fp_add_varlat: pipelined variable-latency two-path floating-point adder.
//
// The two-path adder of fp_add_two_path cut into three pipeline stages. One
// operation can enter every cycle; its result leaves on the shared result
// bus after 1, 2 or 3 cycles depending on the work it needs:
//   1 cycle : close path, and the difference needs no large left shift
//             (its leading one is in the top two bits, it is zero, or the
//             subnormal limit allows at most one place) - a short 0/1-place
//             normalizer finishes it in stage 1;
//   2 cycles: close path needing the large shift chosen by the leading one
//             predictor and priority encoder (stage 2);
//   3 cycles: far path (alignment, compound add, rounding) and special
//             operands (stage 3).
// Stage 1: unpack/swap, special-case detection, close-path subtraction,
//          leading one prediction, alignment shift, short normalization.
// Stage 2: priority encoder and large left shift; far-path compound adder.
// Stage 3: far-path rounding selection and packing.
// collision_detect gives each operation the first free bus slot at or after
// its natural latency; a result whose slot is taken is carried along the
// pipeline registers until its slot comes, so two results never meet on the
// bus. Results can overtake each other, so each operation carries a tag.
// out_latency and out_delayed report the cycles taken and whether the result
// was held back. Synchronous active-low reset clears the valid bits only.
// The three latency classes follow the variable-latency adder as taught;
// counting a one-place shift as no shift, the stage split, the tags and
// the collision policy are this design's own.
module fp_add_varlat
  import fp_add_pkg::*;
#(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52,
  parameter int unsigned TAG_W = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [TAG_W-1:0]     in_tag,
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  input  round_mode_e          rm,
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output logic [EXP_W+MAN_W:0] out_result,
  output fp_flags_t            out_flags,
  output logic [1:0]           out_latency,
  output logic                 out_delayed
);

  localparam int unsigned P  = MAN_W + 1;
  localparam int unsigned FW = EXP_W + MAN_W + 1;
  localparam int unsigned CW = $clog2(P + 2);

  // fields common to every stage register
  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [1:0]       grant;     // bus slot (cycles after entry)
    logic [1:0]       natural;   // cycles the computation needs
    logic             delayed;
    logic [FW-1:0]    result;    // valid once the stage >= natural
    fp_flags_t        flags;
  } op_t;

  // operand information the later stages still need
  typedef struct packed {
    round_mode_e      rm;
    logic             sign_a;
    logic             sign_b;
    logic             eff_sub;
    logic             sign_l;
    logic [EXP_W-1:0] exp_l;
    logic             is_special;
    logic [FW-1:0]    special_result;
    logic             special_invalid;
  } info_t;

  // =================== stage 1 (combinational on the inputs) ===================
  logic             eff_sub, sign_a, sign_b, sign_l;
  logic [EXP_W-1:0] exp_a, exp_b, exp_l, diff;
  logic [P-1:0]     sig_a, sig_b, sig_l, sig_s;

  fp_exp_swap #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_swap (
    .a, .b, .sub, .eff_sub, .sign_a, .sign_b, .exp_a, .exp_b, .sig_a, .sig_b,
    .sign_l, .exp_l, .sig_l, .sig_s, .diff
  );

  logic          is_special, special_invalid;
  logic [FW-1:0] special_result;

  fp_special #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_special (
    .a, .b, .sub, .is_special, .special_result, .invalid(special_invalid)
  );

  logic             c_sel_b, c_sign;
  logic [P:0]       c_x, c_y, c_mag, c_f, c_short;
  logic [EXP_W-1:0] c_exp_l, c_short_shift;

  close_sub #(.P(P)) u_close (
    .sig_a, .sig_b, .exp_a_lsb(exp_a[1:0]), .exp_b_lsb(exp_b[1:0]),
    .sign_a, .sign_b, .sel_b(c_sel_b), .x(c_x), .y(c_y), .mag(c_mag), .sign(c_sign)
  );

  lop #(.N(P+1)) u_lop (.x(c_x), .y(c_y), .f(c_f));

  assign c_exp_l = c_sel_b ? exp_b : exp_a;

  // short normalizer: the same shifter with a zero predicted shift moves at
  // most one place
  norm_shift #(.N(P+1), .CW(CW), .EXP_W(EXP_W)) u_short (
    .mag(c_mag), .lz('0), .limit(c_exp_l - 1'b1), .norm(c_short), .shift(c_short_shift)
  );

  logic [P-1:0] f_hi;
  logic [2:0]   f_grs;

  align_shift #(.P(P), .EXP_W(EXP_W)) u_align (.sig(sig_s), .diff, .hi(f_hi), .grs(f_grs));

  logic       close_sel, short_ok;
  logic [1:0] natural, grant;
  logic       delayed;

  always_comb begin
    close_sel = eff_sub & ((diff == '0) | ((diff == EXP_W'(1)) & ~c_mag[P]));
    short_ok  = c_mag[P] | c_mag[P-1] | (c_mag == '0) | (c_exp_l <= EXP_W'(2));
    if (is_special || !close_sel) natural = 2'd3;
    else if (short_ok)            natural = 2'd1;
    else                          natural = 2'd2;
  end

  collision_detect #(.MAX_LAT(3), .LW(2)) u_coll (
    .clk, .rst_n, .req_valid(in_valid), .req_lat(natural), .grant_lat(grant), .delayed
  );

  logic [FW-1:0] r1;
  fp_flags_t     fl1;

  fp_result_sel #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sel1 (
    .rm, .sign_a, .sign_b, .use_close(1'b1),
    .close_sign(c_sign), .close_sig(c_short[P:1]),
    .close_exp((EXP_W+2)'(c_exp_l - c_short_shift)),
    .far_sign(1'b0), .far_sig('0), .far_exp('0), .far_inexact(1'b0),
    .is_special(1'b0), .special_result('0), .special_invalid(1'b0),
    .result(r1), .flags(fl1)
  );

  // stage 1 register
  op_t              s1_op;
  info_t            s1_info;
  logic [P:0]       s1_mag, s1_f;
  logic [EXP_W-1:0] s1_c_exp_l;
  logic             s1_c_sign;
  logic [P-1:0]     s1_sig_l, s1_hi;
  logic [2:0]       s1_grs;

  always_ff @(posedge clk) begin
    if (!rst_n) s1_op.valid <= 1'b0;
    else        s1_op.valid <= in_valid;
    s1_op.tag     <= in_tag;
    s1_op.grant   <= grant;
    s1_op.natural <= natural;
    s1_op.delayed <= delayed;
    s1_op.result  <= r1;
    s1_op.flags   <= fl1;
    s1_info       <= '{rm: rm, sign_a: sign_a, sign_b: sign_b, eff_sub: eff_sub,
                       sign_l: sign_l, exp_l: exp_l, is_special: is_special,
                       special_result: special_result, special_invalid: special_invalid};
    s1_mag     <= c_mag;
    s1_f       <= c_f;
    s1_c_exp_l <= c_exp_l;
    s1_c_sign  <= c_sign;
    s1_sig_l   <= sig_l;
    s1_hi      <= f_hi;
    s1_grs     <= f_grs;
  end

  // =================== stage 2 ===================
  logic [CW-1:0]    lz;
  logic             lz_zero;
  logic [P:0]       c_norm;
  logic [EXP_W-1:0] c_shift;

  penc #(.N(P+1), .CW(CW)) u_penc (.f(s1_f), .count(lz), .zero(lz_zero));

  norm_shift #(.N(P+1), .CW(CW), .EXP_W(EXP_W)) u_norm (
    .mag(s1_mag), .lz(lz), .limit(s1_c_exp_l - 1'b1), .norm(c_norm), .shift(c_shift)
  );

  logic [FW-1:0] r2;
  fp_flags_t     fl2;

  fp_result_sel #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sel2 (
    .rm(s1_info.rm), .sign_a(s1_info.sign_a), .sign_b(s1_info.sign_b), .use_close(1'b1),
    .close_sign(s1_c_sign), .close_sig(c_norm[P:1]),
    .close_exp((EXP_W+2)'(s1_c_exp_l - c_shift)),
    .far_sign(1'b0), .far_sig('0), .far_exp('0), .far_inexact(1'b0),
    .is_special(1'b0), .special_result('0), .special_invalid(1'b0),
    .result(r2), .flags(fl2)
  );

  logic [P+1:0] s0, s1, s2;

  compound_adder #(.W(P+2)) u_cadd (
    .a    ({2'b00, s1_sig_l}),
    .b    (s1_info.eff_sub ? ~{2'b00, s1_hi} : {2'b00, s1_hi}),
    .sum0 (s0),
    .sum1 (s1),
    .sum2 (s2)
  );

  op_t          s2_op;
  info_t        s2_info;
  logic [P+1:0] s2_s0, s2_s1, s2_s2;
  logic [2:0]   s2_grs;

  always_ff @(posedge clk) begin
    if (!rst_n) s2_op.valid <= 1'b0;
    else        s2_op.valid <= s1_op.valid && s1_op.grant > 2'd1;
    s2_op.tag     <= s1_op.tag;
    s2_op.grant   <= s1_op.grant;
    s2_op.natural <= s1_op.natural;
    s2_op.delayed <= s1_op.delayed;
    s2_op.result  <= (s1_op.natural == 2'd2) ? r2  : s1_op.result;
    s2_op.flags   <= (s1_op.natural == 2'd2) ? fl2 : s1_op.flags;
    s2_info       <= s1_info;
    s2_s0         <= s0;
    s2_s1         <= s1;
    s2_s2         <= s2;
    s2_grs        <= s1_grs;
  end

  // =================== stage 3 ===================
  logic [P-1:0]     f_sig;
  logic [EXP_W+1:0] f_exp;
  logic             f_inexact;

  far_round #(.P(P), .EXP_W(EXP_W)) u_round (
    .eff_sub(s2_info.eff_sub), .sign(s2_info.sign_l), .rm(s2_info.rm), .exp_l(s2_info.exp_l),
    .sum0(s2_s0), .sum1(s2_s1), .sum2(s2_s2), .grs(s2_grs),
    .sig(f_sig), .exp_res(f_exp), .inexact(f_inexact)
  );

  logic [FW-1:0] r3;
  fp_flags_t     fl3;

  fp_result_sel #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sel3 (
    .rm(s2_info.rm), .sign_a(s2_info.sign_a), .sign_b(s2_info.sign_b), .use_close(1'b0),
    .close_sign(1'b0), .close_sig('0), .close_exp('0),
    .far_sign(s2_info.sign_l), .far_sig(f_sig), .far_exp(f_exp), .far_inexact(f_inexact),
    .is_special(s2_info.is_special), .special_result(s2_info.special_result),
    .special_invalid(s2_info.special_invalid), .result(r3), .flags(fl3)
  );

  op_t s3_op;

  always_ff @(posedge clk) begin
    if (!rst_n) s3_op.valid <= 1'b0;
    else        s3_op.valid <= s2_op.valid && s2_op.grant > 2'd2;
    s3_op.tag     <= s2_op.tag;
    s3_op.grant   <= s2_op.grant;
    s3_op.natural <= s2_op.natural;
    s3_op.delayed <= s2_op.delayed;
    s3_op.result  <= (s2_op.natural == 2'd3) ? r3  : s2_op.result;
    s3_op.flags   <= (s2_op.natural == 2'd3) ? fl3 : s2_op.flags;
  end

  // =================== result bus ===================
  logic take1, take2, take3;

  always_comb begin
    take1 = s1_op.valid && s1_op.grant == 2'd1;
    take2 = s2_op.valid && s2_op.grant == 2'd2;
    take3 = s3_op.valid;
    out_valid   = take1 | take2 | take3;
    out_tag     = take1 ? s1_op.tag    : take2 ? s2_op.tag    : s3_op.tag;
    out_result  = take1 ? s1_op.result : take2 ? s2_op.result : s3_op.result;
    out_flags   = take1 ? s1_op.flags  : take2 ? s2_op.flags  : s3_op.flags;
    out_latency = take1 ? 2'd1 : take2 ? 2'd2 : 2'd3;
    out_delayed = take1 ? s1_op.delayed : take2 ? s2_op.delayed : s3_op.delayed;
  end

  // the collision detector must keep the bus to one result per cycle
  always_ff @(posedge clk) begin
    if (rst_n)
      assert (32'(take1) + 32'(take2) + 32'(take3) <= 1)
        else $error("fp_add_varlat: two results on the bus in one cycle");
  end

endmodule
