// tb_penc: checks the priority encoder's leading-zero count and zero flag on
// random and single-bit inputs of 54 bits.
module tb_penc;
  logic [53:0] f;
  logic [5:0]  count;
  logic        zero;
  int checks = 0, failures = 0;

  penc #(.N(54)) dut (.f, .count, .zero);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cnt;
    for (int i = 0; i < 5000; i++) begin
      f = {$urandom, $urandom};
      if (i < 55) f = (i == 54) ? '0 : (54'd1 << i);
      else f = f >> $urandom_range(0, 53);
      #1;
      exp_cnt = 54;
      for (int k = 53; k >= 0; k--) if (f[k]) begin exp_cnt = 53 - k; break; end
      checks++;
      if (int'(count) != exp_cnt || zero !== (exp_cnt == 54)) begin
        failures++;
        if (failures < 10) $display("f=%b count=%0d exp %0d", f, count, exp_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
