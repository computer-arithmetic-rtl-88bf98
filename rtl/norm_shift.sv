// norm_shift: close-path left normalization shifter.
//
// Shifts the difference left by the predicted leading-zero count, limited so
// the exponent does not fall below the smallest normal exponent (the result
// then stays subnormal). The prediction can be one place short, so if the
// top bit is still zero after the first shift and the limit allows it, one
// more single-place shift follows. With lz = 0 the block is the short
// (0 or 1 place) normalizer. Returns the shifted value and the total shift.
// Combinational.
// Left normalization and the subnormal floor (exponent fixed at its lower
// bound) follow the adder as taught; the one-place correction after the
// predicted shift is this design's own.
module norm_shift #(
  parameter int unsigned N     = 54,
  parameter int unsigned CW    = $clog2(N + 1),
  parameter int unsigned EXP_W = 11
) (
  input  logic [N-1:0]     mag,
  input  logic [CW-1:0]    lz,       // predicted shift
  input  logic [EXP_W-1:0] limit,    // largest shift allowed (exponent - 1)
  output logic [N-1:0]     norm,
  output logic [EXP_W-1:0] shift
);

  logic [EXP_W-1:0] sh1;
  logic [N-1:0]     m1;

  always_comb begin
    sh1 = (int'(lz) < int'(limit)) ? EXP_W'(lz) : limit;
    m1  = mag << sh1;
    if (!m1[N-1] && sh1 < limit) begin
      norm  = m1 << 1;
      shift = sh1 + 1'b1;
    end else begin
      norm  = m1;
      shift = sh1;
    end
  end

endmodule
