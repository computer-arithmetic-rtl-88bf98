// align_shift: far-path alignment shifter with guard, round and sticky.
//
// Shifts the significand of the operand with the smaller exponent right by
// the exponent difference. The bits that stay within the P-bit window of the
// larger operand form 'hi'; the first two bits shifted out are the guard and
// round bits and every bit beyond them is ORed into the sticky bit. A shift
// of P+2 or more leaves only the sticky bit, so the shift is clamped there
// and the barrel shifter needs only P+3 positions. Purely combinational.
// The guard/round/sticky triple follows the classical adder; the clamp and
// the window layout are this design's own.
module align_shift #(
  parameter int unsigned P     = 53,   // significand width with hidden bit
  parameter int unsigned EXP_W = 11
) (
  input  logic [P-1:0]     sig,
  input  logic [EXP_W-1:0] diff,
  output logic [P-1:0]     hi,
  output logic [2:0]       grs   // {guard, round, sticky}
);

  localparam int unsigned SH_MAX = P + 2;

  logic [2*P+3:0] window;
  logic [EXP_W-1:0] sh;

  always_comb begin
    sh     = (int'(diff) > int'(SH_MAX)) ? EXP_W'(SH_MAX) : diff;
    window = {sig, {(P+4){1'b0}}} >> sh;
    hi     = window[2*P+3 -: P];
    grs    = {window[P+3], window[P+2], |window[P+1:0]};
  end

endmodule
