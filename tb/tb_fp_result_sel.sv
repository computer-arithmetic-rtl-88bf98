// tb_fp_result_sel: directed checks of the final selection: path choice,
// subnormal packing, overflow in the four rounding modes, the sign of an
// exact zero, and the special-value override.
module tb_fp_result_sel;
  import fp_add_pkg::*;

  round_mode_e rm;
  logic        sign_a, sign_b, use_close, close_sign, far_sign, far_inexact;
  logic        is_special, special_invalid;
  logic [52:0] close_sig, far_sig;
  logic [12:0] close_exp, far_exp;
  logic [63:0] special_result, result;
  fp_flags_t   flags;
  int checks = 0, failures = 0;

  fp_result_sel dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_r(logic [63:0] r, logic [2:0] f, string what);
    #1;
    checks++;
    if (result !== r || flags !== f) begin
      failures++;
      $display("%s: got %h/%b exp %h/%b", what, result, flags, r, f);
    end
  endtask

  initial begin
    rm = RM_RNE; sign_a = 0; sign_b = 0; use_close = 0; close_sign = 1; far_sign = 0;
    far_inexact = 1; is_special = 0; special_invalid = 0; special_result = 64'h7ff8000000000000;
    close_sig = {1'b1, 52'h0000000000abc}; close_exp = 13'd1000;
    far_sig   = {1'b1, 52'h123456789abcd}; far_exp   = 13'd1023;
    expect_r(64'h3ff123456789abcd, 3'b001, "far normal");
    use_close = 1;
    expect_r({1'b1, 11'd1000, 52'h0000000000abc}, 3'b000, "close normal");
    close_sig = {1'b0, 52'h8000000000001}; close_exp = 13'd1;
    expect_r({1'b1, 11'd0, 52'h8000000000001}, 3'b000, "subnormal");
    close_sig = '0; sign_a = 0; sign_b = 1;
    for (int m = 0; m < 4; m++) begin
      rm = round_mode_e'(m);
      expect_r((m == 3) ? 64'h8000000000000000 : 64'h0, 3'b000, "x - x");
    end
    sign_a = 1; sign_b = 1; rm = RM_RUP;
    expect_r(64'h8000000000000000, 3'b000, "-0 + -0");
    use_close = 0; far_exp = 13'd2047;
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < 4; m++) begin
        far_sign = 1'(s); rm = round_mode_e'(m);
        expect_r((m == 0 || (m == 2 && s == 0) || (m == 3 && s == 1))
                   ? {1'(s), 11'h7ff, 52'h0} : {1'(s), 11'h7fe, {52{1'b1}}}, 3'b011, "overflow");
      end
    far_exp = 13'd2046; rm = RM_RNE; far_sign = 0;
    expect_r({1'b0, 11'h7fe, 52'h123456789abcd}, 3'b001, "largest exponent");
    is_special = 1; special_invalid = 1;
    expect_r(64'h7ff8000000000000, 3'b100, "special");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
