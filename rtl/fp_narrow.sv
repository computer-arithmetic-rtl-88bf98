// fp_narrow: rounds a wide IEEE binary number (binary64 by default) to the
// narrow format (binary32 by default) in a given rounding mode.
//
// Used by the dual-format adder to deliver a single-precision sum from the
// double-precision unit. The exponent is rebiased; the significand is
// shifted right so that NMAN_W+1 bits remain (further for a result in the
// narrow subnormal range), the bits shifted out give the guard and sticky
// bits, and the same rounding decision as the far path is applied. A
// rounding carry renormalizes; an exponent beyond the narrow range
// overflows to infinity or the largest finite number according to the mode.
// A NaN becomes the default quiet NaN of the narrow format. Because the wide
// significand has more than twice as many bits as the narrow one, rounding
// a sum first to the wide and then to the narrow format gives the same
// result as rounding it once, in every mode. Purely combinational.
module fp_narrow
  import fp_add_pkg::*;
#(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned MAN_W  = 52,
  parameter int unsigned NEXP_W = 8,
  parameter int unsigned NMAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0]   y,
  input  round_mode_e            rm,
  output logic [NEXP_W+NMAN_W:0] x,
  output logic                   overflow,
  output logic                   inexact
);

  localparam int BIAS_W = (1 << (EXP_W - 1)) - 1;
  localparam int BIAS_N = (1 << (NEXP_W - 1)) - 1;
  localparam int EMAX_N = (1 << NEXP_W) - 1;
  localparam int SH_MAX = MAN_W + 2;

  logic                sign, g, s, up, to_inf;
  logic [EXP_W-1:0]    ew;
  logic [MAN_W:0]      sig;
  logic [2*MAN_W+2:0]  w;
  logic [NMAN_W+1:0]   kept;
  int                  en, sh;

  always_comb begin
    sign     = y[EXP_W+MAN_W];
    ew       = y[EXP_W+MAN_W-1 -: EXP_W];
    sig      = {ew != '0, y[MAN_W-1:0]};
    en       = int'(ew) - BIAS_W + BIAS_N;
    sh       = MAN_W - NMAN_W + ((en < 1) ? 1 - en : 0);
    if (sh > SH_MAX) sh = SH_MAX;
    if (en < 1) en = 1;
    w        = {sig, {(MAN_W+2){1'b0}}} >> sh;
    kept     = {1'b0, w[MAN_W+2 +: NMAN_W+1]};
    g        = w[MAN_W+1];
    s        = |w[MAN_W:0];
    up       = round_up(rm, sign, kept[0], g, s);
    kept     = kept + (NMAN_W+2)'(up);
    if (kept[NMAN_W+1]) begin
      kept = kept >> 1;
      en   = en + 1;
    end
    overflow = 1'b0;
    inexact  = g | s;
    to_inf   = 1'b0;
    if (ew == '1) begin
      if (y[MAN_W-1:0] != '0) x = {1'b0, {NEXP_W{1'b1}}, 1'b1, {(NMAN_W-1){1'b0}}};
      else                    x = {sign, {NEXP_W{1'b1}}, {NMAN_W{1'b0}}};
      inexact = 1'b0;
    end else if (en >= EMAX_N) begin
      unique case (rm)
        RM_RNE:  to_inf = 1'b1;
        RM_RTZ:  to_inf = 1'b0;
        RM_RUP:  to_inf = ~sign;
        default: to_inf = sign;
      endcase
      x = to_inf ? {sign, {NEXP_W{1'b1}}, {NMAN_W{1'b0}}}
                 : {sign, {(NEXP_W-1){1'b1}}, 1'b0, {NMAN_W{1'b1}}};
      overflow = 1'b1;
      inexact  = 1'b1;
    end else begin
      x = {sign, kept[NMAN_W] ? NEXP_W'(en) : {NEXP_W{1'b0}}, kept[NMAN_W-1:0]};
    end
  end

endmodule
