// fp_add_dual: single- and double-precision addition on one two-path unit.
//
// fmt = 0: a, b and result are binary64 (the wide format) and the sum comes
//          straight from fp_add_two_path.
// fmt = 1: the operands are binary32 (the narrow format) in the low 32 bits
//          of a and b. fp_widen converts them exactly to binary64, the same
//          two-path unit adds them, and fp_narrow rounds the sum to binary32
//          in the same rounding mode; the upper result bits are zero.
// Double rounding is harmless here: the wide significand (53 bits) holds
// more than twice the narrow one (24 bits) plus two, so round-to-nearest
// twice equals once, and a directed mode applied twice equals itself once.
// Flags combine both steps: invalid from the unit, overflow from the
// narrowing, inexact from either. Sharing one unit between the two
// precisions is how production adders usually work; doing it by widening
// and a final narrowing rounder is this design's simplest choice, and it
// costs a rounding step after the unit in single precision.
// Purely combinational.
module fp_add_dual
  import fp_add_pkg::*;
#(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned MAN_W  = 52,
  parameter int unsigned NEXP_W = 8,
  parameter int unsigned NMAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 fmt,         // 0: wide format, 1: narrow format
  input  logic                 sub,
  input  round_mode_e          rm,
  output logic [EXP_W+MAN_W:0] result,
  output fp_flags_t            flags,
  output logic                 close_used
);

  localparam int unsigned WN = NEXP_W + NMAN_W + 1;

  logic [EXP_W+MAN_W:0] a_w, b_w, ua, ub, ur;
  logic [WN-1:0]        rn;
  fp_flags_t            uf;
  logic                 n_ovf, n_inexact;

  fp_widen #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NEXP_W(NEXP_W), .NMAN_W(NMAN_W)) u_wa (.x(a[WN-1:0]), .y(a_w));
  fp_widen #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NEXP_W(NEXP_W), .NMAN_W(NMAN_W)) u_wb (.x(b[WN-1:0]), .y(b_w));

  assign ua = fmt ? a_w : a;
  assign ub = fmt ? b_w : b;

  fp_add_two_path #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_unit (
    .a(ua), .b(ub), .sub, .rm, .result(ur), .flags(uf), .close_used
  );

  fp_narrow #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NEXP_W(NEXP_W), .NMAN_W(NMAN_W)) u_narrow (
    .y(ur), .rm, .x(rn), .overflow(n_ovf), .inexact(n_inexact)
  );

  always_comb begin
    if (fmt) begin
      result         = {{(EXP_W+MAN_W+1-WN){1'b0}}, rn};
      flags.invalid  = uf.invalid;
      flags.overflow = n_ovf;
      flags.inexact  = uf.inexact | n_inexact;
    end else begin
      result = ur;
      flags  = uf;
    end
  end

endmodule
