// fp_adder_top: the two floating-point adders side by side.
//
// comb_*: the combinational two-path adder, in its dual-format form
//         (fp_add_dual): comb_fmt = 0 adds binary64 numbers, comb_fmt = 1
//         binary32 numbers held in the low 32 bits, both on the same unit.
//         A result in the same cycle, for a datapath that wraps its own
//         registers.
// vl_*:   the three-stage variable-latency pipelined adder (fp_add_varlat):
//         one operation per cycle in, tagged results out after 1, 2 or 3
//         cycles, never two in the same cycle.
// Both use the binary64 format by default and the same building blocks
// (swap, alignment shifter, compound adder, far-path rounding, close-path
// subtraction, leading one predictor, priority encoder, normalization
// shifter, special-case handling and result selection).
// The two adders are independent; ports are prefixed by the adder they
// belong to and all sizes are binary64 by default (this design's choice).
module fp_adder_top
  import fp_add_pkg::*;
#(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52,
  parameter int unsigned TAG_W = 4,
  parameter int unsigned NEXP_W = 8,    // narrow format of the combinational adder
  parameter int unsigned NMAN_W = 23
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // combinational adder
  input  logic [EXP_W+MAN_W:0] comb_a,
  input  logic [EXP_W+MAN_W:0] comb_b,
  input  logic                 comb_fmt,
  input  logic                 comb_sub,
  input  round_mode_e          comb_rm,
  output logic [EXP_W+MAN_W:0] comb_result,
  output fp_flags_t            comb_flags,
  output logic                 comb_close_used,
  // variable-latency pipelined adder
  input  logic                 vl_in_valid,
  input  logic [TAG_W-1:0]     vl_in_tag,
  input  logic [EXP_W+MAN_W:0] vl_a,
  input  logic [EXP_W+MAN_W:0] vl_b,
  input  logic                 vl_sub,
  input  round_mode_e          vl_rm,
  output logic                 vl_out_valid,
  output logic [TAG_W-1:0]     vl_out_tag,
  output logic [EXP_W+MAN_W:0] vl_out_result,
  output fp_flags_t            vl_out_flags,
  output logic [1:0]           vl_out_latency,
  output logic                 vl_out_delayed
);

  fp_add_dual #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NEXP_W(NEXP_W), .NMAN_W(NMAN_W)) u_comb (
    .a(comb_a), .b(comb_b), .fmt(comb_fmt), .sub(comb_sub), .rm(comb_rm),
    .result(comb_result), .flags(comb_flags), .close_used(comb_close_used)
  );

  fp_add_varlat #(.EXP_W(EXP_W), .MAN_W(MAN_W), .TAG_W(TAG_W)) u_varlat (
    .clk, .rst_n, .in_valid(vl_in_valid), .in_tag(vl_in_tag), .a(vl_a), .b(vl_b),
    .sub(vl_sub), .rm(vl_rm), .out_valid(vl_out_valid), .out_tag(vl_out_tag),
    .out_result(vl_out_result), .out_flags(vl_out_flags),
    .out_latency(vl_out_latency), .out_delayed(vl_out_delayed)
  );

endmodule
