// tb_fp_widen: checks binary32 -> binary64 widening. The expected value is
// built from the decoded single-precision value with real arithmetic (exact
// for every binary32 number); NaN and infinity bit patterns are checked
// directly.
module tb_fp_widen;
  logic [31:0] x;
  logic [63:0] y;
  int checks = 0, failures = 0;

  fp_widen dut (.x, .y);

  function automatic real pow2(int k);
    real r = 1.0;
    if (k >= 0) repeat (k) r = r * 2.0;
    else repeat (-k) r = r * 0.5;
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          e;
    logic [63:0] ey;
    real         v;
    for (int i = 0; i < 20000; i++) begin
      x = $urandom;
      if (i % 4 == 0) x[30:23] = '0;                      // subnormals and zeros
      if (i % 8 == 1) x[22:0] = 23'($urandom) >> $urandom_range(0, 22);
      if (i % 16 == 2) x[30:23] = '1;                     // inf / NaN
      #1;
      e = int'(x[30:23]);
      if (e == 255) ey = {x[31], 11'h7ff, x[22:0], 29'd0};
      else begin
        v = (e == 0) ? real'(x[22:0]) * pow2(-149) : real'({1'b1, x[22:0]}) * pow2(e - 150);
        if (x[31]) v = -v;
        ey = $realtobits(v);
        if (x[30:0] == 0) ey = {x[31], 63'd0};               // keep the sign of zero
      end
      checks++;
      if (y !== ey) begin
        failures++;
        if (failures < 10) $display("x=%h got %h exp %h", x, y, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
