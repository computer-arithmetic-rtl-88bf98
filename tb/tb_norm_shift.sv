// tb_norm_shift: checks the normalization shifter. Given a prediction that
// is exact or one short, the output must be the input shifted left by its
// leading-zero count, limited to the allowed shift.
module tb_norm_shift;
  logic [53:0] mag, norm;
  logic [5:0]  lz;
  logic [10:0] limit, shift;
  int checks = 0, failures = 0;

  norm_shift #(.N(54), .EXP_W(11)) dut (.mag, .lz, .limit, .norm, .shift);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tz, es;
    for (int i = 0; i < 20000; i++) begin
      mag = 54'({$urandom, $urandom}) >> $urandom_range(0, 53);
      if (mag == 0) mag = 54'd1;
      tz = 0;
      for (int k = 53; k >= 0; k--) if (mag[k]) begin tz = 53 - k; break; end
      lz = 6'((tz > 0 && $urandom_range(0, 1) == 1) ? tz - 1 : tz);
      limit = ($urandom_range(0, 3) == 0) ? 11'($urandom_range(0, 60)) : 11'($urandom_range(0, 2046));
      #1;
      es = (tz < int'(limit)) ? tz : int'(limit);
      checks++;
      if (int'(shift) != es || norm !== (mag << es)) begin
        failures++;
        if (failures < 10) $display("mag=%h lz=%0d limit=%0d got %0d exp %0d", mag, lz, limit, shift, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
