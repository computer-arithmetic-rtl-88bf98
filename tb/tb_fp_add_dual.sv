// tb_fp_add_dual: checks the dual-format adder in both formats against the
// reference model: binary64 sums with fmt = 0 and binary32 sums (operands
// in the low 32 bits) with fmt = 1, in all four rounding modes.
module tb_fp_add_dual;
  import fp_add_pkg::*;
  import fp_ref_pkg::*;

  logic [63:0] a, b, result;
  logic        fmt, sub, close_used;
  round_mode_e rm;
  fp_flags_t   flags;
  int checks = 0, failures = 0, n_single = 0;

  fp_add_dual dut (.a, .b, .fmt, .sub, .rm, .result, .flags, .close_used);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, y, r;
    logic [2:0]  fl;
    int          m;
    for (int i = 0; i < 60000; i++) begin
      fmt = (i % 3 != 0);
      sub = 1'($urandom);
      m   = $urandom_range(0, 3);
      rm  = round_mode_e'(m);
      if (fmt) begin
        x = rand_operand(8, 23, {$urandom, $urandom} & 64'h7fffffff);
        y = rand_operand(8, 23, x);
        a = {32'($urandom), x[31:0]};      // upper half must be ignored
        b = {32'($urandom), y[31:0]};
        r = ref_add(x, y, sub, m, 8, 23, fl);
        n_single++;
      end else begin
        x = rand_operand(11, 52, {$urandom, $urandom} & 64'h7fffffffffffffff);
        y = rand_operand(11, 52, x);
        a = x; b = y;
        r = ref_add(x, y, sub, m, 11, 52, fl);
      end
      #1;
      checks++;
      if (result !== r || flags !== fl) begin
        failures++;
        if (failures < 10) $display("fmt=%0d a=%h b=%h sub=%0d rm=%0d got %h/%b exp %h/%b",
                                    fmt, a, b, sub, m, result, flags, r, fl);
      end
    end
    $display("single-precision checks: %0d", n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
