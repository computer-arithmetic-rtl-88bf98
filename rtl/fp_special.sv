// fp_special: exceptional operands of the adder (NaN and infinity).
//
// When either operand is a NaN or an infinity the sum is decided here and
// the datapath result is discarded. A NaN operand gives the default quiet
// NaN (sign 0, exponent all ones, fraction MSB set); a signalling NaN
// operand, or the sum of two infinities of opposite sign, also raises
// invalid. Otherwise an infinite operand passes through with its effective
// sign. NaN payloads are not propagated; that choice, and the default NaN
// pattern, are this design's own. Purely combinational.
module fp_special #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  output logic                 is_special,
  output logic [EXP_W+MAN_W:0] special_result,
  output logic                 invalid
);

  localparam logic [EXP_W+MAN_W:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};

  logic emax_a, emax_b, nan_a, nan_b, inf_a, inf_b, snan, sb;

  always_comb begin
    emax_a = &a[EXP_W+MAN_W-1 -: EXP_W];
    emax_b = &b[EXP_W+MAN_W-1 -: EXP_W];
    nan_a  = emax_a & (a[MAN_W-1:0] != '0);
    nan_b  = emax_b & (b[MAN_W-1:0] != '0);
    inf_a  = emax_a & (a[MAN_W-1:0] == '0);
    inf_b  = emax_b & (b[MAN_W-1:0] == '0);
    snan   = (nan_a & ~a[MAN_W-1]) | (nan_b & ~b[MAN_W-1]);
    sb     = b[EXP_W+MAN_W] ^ sub;
    is_special     = emax_a | emax_b;
    invalid        = snan | (inf_a & inf_b & (a[EXP_W+MAN_W] ^ sb));
    special_result = QNAN;
    if (!(nan_a | nan_b) && !invalid) begin
      if (inf_a) special_result = a;
      else       special_result = {sb, b[EXP_W+MAN_W-1:0]};
    end
  end

endmodule
