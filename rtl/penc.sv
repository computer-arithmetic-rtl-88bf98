// penc: priority encoder for the leading one predictor string.
//
// Returns the number of positions above the most significant one of 'f'
// (the predicted normalization shift) and flags an all-zero input, in which
// case the count is N. Combinational.
// The priority encoder is named in the close-path design; its form here is
// the plainest one.
module penc #(
  parameter int unsigned N  = 54,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  f,
  output logic [CW-1:0] count,
  output logic          zero
);

  always_comb begin
    count = CW'(N);
    for (int i = 0; i < N; i++)
      if (f[i]) count = CW'(N - 1 - i);
    zero = (f == '0);
  end

endmodule
