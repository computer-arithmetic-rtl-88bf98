// tb_fp_exp_swap: checks unpacking, effective operation, exponent difference
// and swap against field extraction done in the testbench.
module tb_fp_exp_swap;
  logic [63:0] a, b;
  logic        sub, eff_sub, sign_a, sign_b, sign_l;
  logic [10:0] exp_a, exp_b, exp_l, diff;
  logic [52:0] sig_a, sig_b, sig_l, sig_s;
  int checks = 0, failures = 0;

  fp_exp_swap dut (.a, .b, .sub, .eff_sub, .sign_a, .sign_b, .exp_a, .exp_b, .sig_a, .sig_b,
                   .sign_l, .exp_l, .sig_l, .sig_s, .diff);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    logic [52:0] ma, mb;
    bit sa, sb;
    for (int i = 0; i < 10000; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (i % 4 == 0) a[62:52] = '0;
      if (i % 5 == 0) b[62:52] = a[62:52] + 11'($urandom_range(0, 2));
      sub = 1'($urandom);
      #1;
      ea = (a[62:52] == 0) ? 1 : int'(a[62:52]);
      eb = (b[62:52] == 0) ? 1 : int'(b[62:52]);
      ma = {a[62:52] != 0, a[51:0]};
      mb = {b[62:52] != 0, b[51:0]};
      sa = a[63]; sb = b[63] ^ sub;
      checks++;
      if (eff_sub !== (sa ^ sb) || int'(exp_a) != ea || int'(exp_b) != eb || sig_a !== ma ||
          sig_b !== mb || sign_a !== sa || sign_b !== sb ||
          int'(diff) != ((ea >= eb) ? ea - eb : eb - ea) ||
          int'(exp_l) != ((ea >= eb) ? ea : eb) ||
          sig_l !== ((ea >= eb) ? ma : mb) || sig_s !== ((ea >= eb) ? mb : ma) ||
          sign_l !== ((ea >= eb) ? sa : sb)) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h sub=%0d", a, b, sub);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
