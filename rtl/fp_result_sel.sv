// fp_result_sel: final selection, exponent and sign rules, and flags.
//
// Picks the close-path or far-path result and packs it into the IEEE
// format:
//  * a significand whose hidden bit is zero is subnormal and gets exponent
//    field 0 (the exponent saturates at the lower bound);
//  * an exponent at or above the all-ones field overflows: round to nearest
//    and rounding away from zero in the direction of the sign give infinity,
//    the other directed modes give the largest finite number; overflow and
//    inexact are raised;
//  * an exact zero sum takes the common sign of the operands, or +0 when the
//    signs differ, -0 under rounding toward -infinity;
//  * a special (NaN / infinity) result from fp_special overrides everything.
// Combinational.
// The path choice, the sign rules for zeros and the subnormal exponent
// follow the adder as taught; the flag set and the overflow results per
// rounding mode are the IEEE defaults, with no trap support.
module fp_result_sel
  import fp_add_pkg::*;
#(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  round_mode_e          rm,
  input  logic                 sign_a,       // operand signs, b's effective
  input  logic                 sign_b,
  input  logic                 use_close,
  input  logic                 close_sign,
  input  logic [MAN_W:0]       close_sig,
  input  logic [EXP_W+1:0]     close_exp,
  input  logic                 far_sign,
  input  logic [MAN_W:0]       far_sig,
  input  logic [EXP_W+1:0]     far_exp,
  input  logic                 far_inexact,
  input  logic                 is_special,
  input  logic [EXP_W+MAN_W:0] special_result,
  input  logic                 special_invalid,
  output logic [EXP_W+MAN_W:0] result,
  output fp_flags_t            flags
);

  localparam logic [EXP_W+1:0] EXP_INF = (EXP_W+2)'((1 << EXP_W) - 1);

  logic             sign;
  logic [MAN_W:0]   sig;
  logic [EXP_W+1:0] expw;
  logic             inexact, to_inf;

  always_comb begin
    sign    = use_close ? close_sign : far_sign;
    sig     = use_close ? close_sig  : far_sig;
    expw    = use_close ? close_exp  : far_exp;
    inexact = use_close ? 1'b0       : far_inexact;
    flags   = '0;
    to_inf  = 1'b0;
    if (is_special) begin
      result        = special_result;
      flags.invalid = special_invalid;
    end else if (sig == '0) begin
      result = '0;
      result[EXP_W+MAN_W] = (sign_a == sign_b) ? sign_a : (rm == RM_RDN);
      flags.inexact = inexact;
    end else if (expw >= EXP_INF) begin
      unique case (rm)
        RM_RNE:  to_inf = 1'b1;
        RM_RTZ:  to_inf = 1'b0;
        RM_RUP:  to_inf = ~sign;
        default: to_inf = sign;
      endcase
      result = to_inf ? {sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}}
                      : {sign, {(EXP_W-1){1'b1}}, 1'b0, {MAN_W{1'b1}}};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else begin
      result = {sign, sig[MAN_W] ? expw[EXP_W-1:0] : {EXP_W{1'b0}}, sig[MAN_W-1:0]};
      flags.inexact = inexact;
    end
  end

endmodule
