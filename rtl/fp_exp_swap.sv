// fp_exp_swap: operand unpacking, effective operation, exponent difference
// and swap for the two-path adder.
//
// Each operand is split into sign, effective exponent (a subnormal or zero
// has exponent field 0 and is treated as exponent 1 with a hidden 0) and
// significand with its hidden bit. The effective operation is a subtraction
// when the signs differ after applying the requested operation (sub = 1
// computes a - b). The operand with the larger exponent is routed to the
// "large" outputs and the exponent difference is its exponent minus the
// other's, never negative; on equal exponents a stays the large operand.
// The unswapped operands are also brought out for the close path, which does
// its own exponent prediction. Purely combinational.
// Exponent difference, swap and effective operation follow the textbook
// algorithm; keeping a first on equal exponents and the 'sub' input are
// this design's choices.
module fp_exp_swap #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  output logic                 eff_sub,
  // unswapped, unpacked operands (sign_b already includes sub)
  output logic                 sign_a,
  output logic                 sign_b,
  output logic [EXP_W-1:0]     exp_a,
  output logic [EXP_W-1:0]     exp_b,
  output logic [MAN_W:0]       sig_a,
  output logic [MAN_W:0]       sig_b,
  // swapped by exponent
  output logic                 sign_l,
  output logic [EXP_W-1:0]     exp_l,
  output logic [MAN_W:0]       sig_l,
  output logic [MAN_W:0]       sig_s,
  output logic [EXP_W-1:0]     diff
);

  logic [EXP_W-1:0] ea_f, eb_f;
  logic             swap;

  always_comb begin
    ea_f   = a[EXP_W+MAN_W-1 -: EXP_W];
    eb_f   = b[EXP_W+MAN_W-1 -: EXP_W];
    sign_a = a[EXP_W+MAN_W];
    sign_b = b[EXP_W+MAN_W] ^ sub;
    exp_a  = (ea_f == '0) ? EXP_W'(1) : ea_f;
    exp_b  = (eb_f == '0) ? EXP_W'(1) : eb_f;
    sig_a  = {ea_f != '0, a[MAN_W-1:0]};
    sig_b  = {eb_f != '0, b[MAN_W-1:0]};
    eff_sub = sign_a ^ sign_b;
    swap   = exp_b > exp_a;
    sign_l = swap ? sign_b : sign_a;
    exp_l  = swap ? exp_b : exp_a;
    sig_l  = swap ? sig_b : sig_a;
    sig_s  = swap ? sig_a : sig_b;
    diff   = swap ? exp_b - exp_a : exp_a - exp_b;
  end

endmodule
