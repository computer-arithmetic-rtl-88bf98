// lop: leading one predictor for the close-path subtraction x - y.
//
// Works on the operands, in parallel with the subtraction. Each bit position
// holds a signed digit x_i - y_i: +1 (g), -1 (z) or 0 (t). Bit patterns that
// cancel (a +1 followed by a run of -1, or the mirror image for a negative
// difference) are recognised with a three-digit window and the indicator f
// gets a one at the predicted position of the leading one of |x - y|:
//   f_i = t_{i+1} & (g_i & ~z_{i-1} | z_i & ~g_{i-1})
//       | ~t_{i+1} & (z_i & ~z_{i-1} | g_i & ~g_{i-1})
// The first one of f is at the true leading one or one place above it; the
// normalization shifter corrects that by one extra shift. Combinational.
// Predicting the leading one while subtracting, and the need to catch
// every cancelling pattern, follow the close-path design as taught; the
// indicator equation is the classical one from the literature.
module lop #(
  parameter int unsigned N = 54
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] f
);

  logic [N+1:0] t, g, z;   // padded with a zero digit above and below

  always_comb begin
    t = {1'b1, ~(x ^ y), 1'b1};
    g = {1'b0, x & ~y, 1'b0};
    z = {1'b0, ~x & y, 1'b0};
    for (int i = 1; i <= N; i++)
      f[i-1] = ( t[i+1] & ((g[i] & ~z[i-1]) | (z[i] & ~g[i-1])))
             | (~t[i+1] & ((z[i] & ~z[i-1]) | (g[i] & ~g[i-1])));
  end

endmodule
