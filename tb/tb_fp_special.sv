// tb_fp_special: checks NaN / infinity handling against the reference model
// on operand pairs where at least one is a NaN or an infinity, and that
// ordinary operands are not flagged.
module tb_fp_special;
  import fp_ref_pkg::*;
  logic [63:0] a, b, special_result;
  logic        sub, is_special, invalid;
  int checks = 0, failures = 0;

  fp_special dut (.a, .b, .sub, .is_special, .special_result, .invalid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] pick(int k);
    logic [63:0] s = 64'($urandom_range(0, 1)) << 63;
    logic [63:0] f = {12'd0, 20'($urandom), 32'($urandom)};
    case (k)
      0: return s | 64'h7ff0000000000000;                   // infinity
      1: return s | 64'h7ff8000000000000 | f;               // quiet NaN
      2: return s | 64'h7ff0000000000000 | (f >> 1) | 64'd1; // signalling NaN
      default: return s | (64'($urandom_range(0, 2046)) << 52) | f;
    endcase
  endfunction

  initial begin
    logic [63:0] r;
    logic [2:0]  fl;
    bit          spec;
    for (int i = 0; i < 10000; i++) begin
      a = pick($urandom_range(0, 4));
      b = pick($urandom_range(0, 4));
      sub = 1'($urandom);
      #1;
      spec = (a[62:52] == 11'h7ff) || (b[62:52] == 11'h7ff);
      r = ref_add(a, b, sub, 0, 11, 52, fl);
      checks++;
      if (is_special !== spec || (spec && (special_result !== r || invalid !== fl[2]))) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h sub=%0d got %b %h %b exp %h %b", a, b, sub,
                                    is_special, special_result, invalid, r, fl[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
