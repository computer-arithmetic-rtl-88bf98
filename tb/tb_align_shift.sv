// tb_align_shift: checks the alignment shifter against an exact wide shift:
// the kept bits, guard and round bits and the OR of everything below.
module tb_align_shift;
  logic [52:0] sig, hi;
  logic [10:0] diff;
  logic [2:0]  grs;
  int checks = 0, failures = 0;

  align_shift #(.P(53), .EXP_W(11)) dut (.sig, .diff, .hi, .grs);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2100:0] w;
    logic [52:0]   e_hi;
    logic [2:0]    e_grs;
    for (int i = 0; i < 10000; i++) begin
      sig  = {$urandom, $urandom};
      if (i % 3 == 0) sig = 53'(1) << $urandom_range(0, 52);
      diff = (i % 2 == 0) ? 11'($urandom_range(0, 60)) : 11'($urandom_range(0, 2046));
      #1;
      w = {sig, 2048'd0} >> diff;
      e_hi  = w[2100:2048];
      e_grs = {w[2047], w[2046], |w[2045:0]};
      checks++;
      if (hi !== e_hi || grs !== e_grs) begin
        failures++;
        if (failures < 10) $display("sig=%h diff=%0d got %h %b exp %h %b", sig, diff, hi, grs, e_hi, e_grs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
