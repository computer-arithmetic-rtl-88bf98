// tb_fp_narrow: checks binary64 -> binary32 rounding in all four modes. The
// expected value is found with real arithmetic: the input is divided by the
// binary32 unit in the last place for its binade (never finer than the
// subnormal spacing), split into integer and fraction parts, and rounded by
// the mode; the device output is decoded to a real and compared, together
// with the overflow and inexact flags.
module tb_fp_narrow;
  import fp_add_pkg::*;
  logic [63:0] y;
  round_mode_e rm;
  logic [31:0] x;
  logic        overflow, inexact;
  int checks = 0, failures = 0, n_ovf = 0, n_sub = 0;

  fp_narrow dut (.y, .rm, .x, .overflow, .inexact);

  function automatic real pow2(int k);
    real r = 1.0;
    if (k >= 0) repeat (k) r = r * 2.0;
    else repeat (-k) r = r * 0.5;
    return r;
  endfunction

  function automatic real dec32(logic [31:0] w);
    int  e = int'(w[30:23]);
    real v;
    if (e == 255) return w[31] ? -pow2(200) : pow2(200);   // stands for infinity
    v = (e == 0) ? real'(w[22:0]) * pow2(-149) : real'({1'b1, w[22:0]}) * pow2(e - 150);
    return w[31] ? -v : v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  k, m;
    real v, ulp, q, dn, rem, ev;
    bit  up, sgn, e_ovf;
    for (int i = 0; i < 40000; i++) begin
      y = {$urandom, $urandom};
      y[62:52] = 11'(1023 + $urandom_range(0, 300) - 150);  // around the binary32 range
      if (i % 5 == 0) y[28:0] = (i % 10 == 0) ? 29'h10000000 : 29'd0;  // ties, exact values
      if (i % 7 == 0) y[62:52] = 11'(1023 + 127 + $urandom_range(0, 1));
      m  = $urandom_range(0, 3);
      rm = round_mode_e'(m);
      #1;
      sgn = y[63];
      v   = $bitstoreal({1'b0, y[62:0]});
      k   = int'(y[62:52]) - 1023;
      if (k < -126) k = -126;
      ulp = pow2(k - 23);
      q   = v / ulp;
      dn  = $floor(q);
      rem = q - dn;
      case (m)
        0: up = (rem > 0.5) || (rem == 0.5 && $floor(dn / 2.0) * 2.0 != dn);
        1: up = 1'b0;
        2: up = !sgn && rem != 0.0;
        default: up = sgn && rem != 0.0;
      endcase
      ev = (dn + (up ? 1.0 : 0.0)) * ulp;
      e_ovf = (ev >= pow2(128));
      if (e_ovf) begin
        n_ovf++;
        ev = (m == 0 || (m == 2 && !sgn) || (m == 3 && sgn)) ? pow2(200) : (pow2(24) - 1.0) * pow2(104);
      end
      if (k == -126 && v < pow2(-126)) n_sub++;
      if (sgn) ev = -ev;
      checks++;
      if (dec32(x) != ev || overflow !== e_ovf || inexact !== (e_ovf || rem != 0.0)) begin
        failures++;
        if (failures < 10) $display("y=%h rm=%0d got %h %b%b exp %e", y, m, x, overflow, inexact, ev);
      end
    end
    checks++;
    if (n_ovf == 0 || n_sub == 0) begin failures++; $display("overflow/subnormal cases missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
