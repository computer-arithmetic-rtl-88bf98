// compound_adder: one adder that delivers a+b, a+b+1 and a+b+2 together.
//
// The rounding logic of the far path picks one of the three sums instead of
// adding a rounding digit after the addition. sum and sum+1 share one carry
// computation: the carries with carry-in 1 are the carries with carry-in 0
// ORed with the prefix AND of the bit propagates. sum+2 comes from a row of
// half adders that rewrites a+b+1 as two new operands (x + y with the free
// LSB of the carry vector set), followed by the same sum / sum+1 structure.
// Purely combinational. All three results are modulo 2**W.
// Providing sum+1 and sum+2 from one adder, and the extra half-adder row for
// sum+2, follow the two-path adder as taught; leaving the carry network to
// the synthesis tool is this design's choice.
module compound_adder #(
  parameter int unsigned W = 55
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum0,   // a + b
  output logic [W-1:0] sum1,   // a + b + 1
  output logic [W-1:0] sum2    // a + b + 2
);

  // sum and sum+1 of two operands from one carry chain
  function automatic logic [2*W-1:0] sum_pair(logic [W-1:0] u, logic [W-1:0] v);
    logic [W-1:0] p, s, c0, c1, pp;
    p  = u ^ v;
    s  = u + v;
    c0 = s ^ p;                 // carry into each bit, carry-in 0
    pp[0] = 1'b1;
    for (int i = 1; i < W; i++) pp[i] = pp[i-1] & p[i-1];
    c1 = c0 | pp;               // carry into each bit, carry-in 1
    return {p ^ c1, s};
  endfunction

  logic [W-1:0]   hx, hy;
  logic [2*W-1:0] pair2;

  always_comb begin
    {sum1, sum0} = sum_pair(a, b);
    // half-adder row: a + b = hx + hy with hy[0] = 0, so hy | 1 adds one
    hx = a ^ b;
    hy = {a[W-2:0] & b[W-2:0], 1'b1};
    pair2 = sum_pair(hx, hy);
    sum2  = pair2[2*W-1:W];
  end

endmodule
