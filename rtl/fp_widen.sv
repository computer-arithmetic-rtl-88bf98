// fp_widen: exact conversion of a narrow IEEE binary number (binary32 by
// default) to the wide format of the adder datapath (binary64 by default).
//
// Used by the dual-format adder so that single-precision operands run on the
// double-precision unit. The exponent is rebiased and the fraction is padded
// with zeros; a narrow subnormal becomes a wide normal number (its leading
// one is found by a priority search and shifted into the hidden position).
// Infinities keep their sign; NaNs keep their payload and quiet bit, so a
// signalling NaN stays signalling. Requires the wide format to have at least
// as many fraction bits and a range that covers the narrow subnormals.
// Purely combinational.
module fp_widen #(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned MAN_W  = 52,
  parameter int unsigned NEXP_W = 8,
  parameter int unsigned NMAN_W = 23
) (
  input  logic [NEXP_W+NMAN_W:0] x,
  output logic [EXP_W+MAN_W:0]   y
);

  localparam int BIAS_W = (1 << (EXP_W - 1)) - 1;
  localparam int BIAS_N = (1 << (NEXP_W - 1)) - 1;

  logic [NEXP_W-1:0] e;
  logic [NMAN_W-1:0] f, fn;
  int                lz;

  always_comb begin
    e  = x[NEXP_W+NMAN_W-1 -: NEXP_W];
    f  = x[NMAN_W-1:0];
    lz = 0;
    for (int i = 0; i < NMAN_W; i++) if (f[i]) lz = NMAN_W - 1 - i;
    fn = f << (lz + 1);
    if (e == '1)
      y = {x[NEXP_W+NMAN_W], {EXP_W{1'b1}}, f, {(MAN_W-NMAN_W){1'b0}}};
    else if (e == '0 && f == '0)
      y = {x[NEXP_W+NMAN_W], {(EXP_W+MAN_W){1'b0}}};
    else if (e == '0)
      y = {x[NEXP_W+NMAN_W], EXP_W'(1 - BIAS_N - (lz + 1) + BIAS_W), fn, {(MAN_W-NMAN_W){1'b0}}};
    else
      y = {x[NEXP_W+NMAN_W], EXP_W'(int'(e) - BIAS_N + BIAS_W), f, {(MAN_W-NMAN_W){1'b0}}};
  end

endmodule
