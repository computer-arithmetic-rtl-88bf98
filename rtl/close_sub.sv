// close_sub: close-path (cancellation path) subtraction.
//
// The close path only serves effective subtractions whose exponents differ
// by zero or one, so the two least significant exponent bits are enough to
// tell which operand is larger: (exp_a - exp_b) mod 4 is 0 for equal
// exponents, 1 when a is larger and 3 when b is larger. The larger operand
// X is taken as the minuend and the other, Y, is shifted right by one place
// when the difference is one; one extra low bit keeps the guard bit, so the
// difference is exact. A compound adder forms X + ~Y (= X - Y - 1) and
// X - Y together. With equal exponents the difference can be negative; then
// ~(X + ~Y) = Y - X is taken instead and the sign of the result is flipped.
// x and y are also output for the leading one predictor. Combinational.
// Predicting the larger operand from two exponent bits and complementing a
// negative difference follow the close-path design as taught; obtaining the
// complement from the compound adder's two sums is this design's choice.
module close_sub #(
  parameter int unsigned P = 53
) (
  input  logic [P-1:0] sig_a,
  input  logic [P-1:0] sig_b,
  input  logic [1:0]   exp_a_lsb,
  input  logic [1:0]   exp_b_lsb,
  input  logic         sign_a,
  input  logic         sign_b,      // effective sign of b
  output logic         sel_b,       // b has the larger exponent
  output logic [P:0]   x,           // minuend, one guard bit appended
  output logic [P:0]   y,           // aligned subtrahend
  output logic [P:0]   mag,         // |x - y|
  output logic         sign         // sign of the difference
);

  logic [1:0]   dl;
  logic         shift1;
  logic [P+1:0] s0, s1, s2;
  logic         neg;

  always_comb begin
    dl     = exp_a_lsb - exp_b_lsb;
    sel_b  = (dl == 2'd3);
    shift1 = dl[0];
    x      = sel_b ? {sig_b, 1'b0} : {sig_a, 1'b0};
    y      = sel_b ? {sig_a, 1'b0} : {sig_b, 1'b0};
    if (shift1) y = y >> 1;
  end

  compound_adder #(.W(P+2)) u_add (
    .a    ({1'b0, x}),
    .b    (~{1'b0, y}),
    .sum0 (s0),
    .sum1 (s1),
    .sum2 (s2)
  );

  always_comb begin
    neg  = s1[P+1];
    mag  = neg ? ~s0[P:0] : s1[P:0];
    sign = (sel_b ? sign_b : sign_a) ^ neg;
  end

endmodule
