// tb_fp_add_two_path: self-checking test of the combinational two-path adder
// in binary64 (the default) and in a small binary16 configuration.
//
// Random operand pairs, biased toward cancellation, subnormals, overflow and
// special values, are added and subtracted in all four rounding modes and
// compared with fp_ref_pkg::ref_add. In binary64 with round-to-nearest the
// reference itself is cross-checked against the simulator's own double
// arithmetic. Directed cases include the two classic decimal sums
// 1.324e5 + 1.576e3 and 9.853e7 + 1.466e6 carried out in binary64, and a
// binary16 sum whose rounding carries into a new leading bit. The test also
// counts how often the close path was chosen.
module tb_fp_add_two_path;
  import fp_add_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_RAND = 40000;

  logic [63:0] a64, b64, r64;
  logic [15:0] a16, b16, r16;
  logic        sub64, sub16, close64, close16;
  round_mode_e rm64, rm16;
  fp_flags_t   fl64, fl16;

  fp_add_two_path dut64 (.a(a64), .b(b64), .sub(sub64), .rm(rm64),
                         .result(r64), .flags(fl64), .close_used(close64));
  fp_add_two_path #(.EXP_W(5), .MAN_W(10)) dut16 (.a(a16), .b(b16), .sub(sub16), .rm(rm16),
                         .result(r16), .flags(fl16), .close_used(close16));

  int checks = 0, failures = 0, n_close = 0, n_real = 0;

  task automatic check64(input logic [63:0] a, input logic [63:0] b, input bit s, input int m);
    logic [63:0] exp_r;
    logic [2:0]  exp_f;
    real         rr;
    a64 = a; b64 = b; sub64 = s; rm64 = round_mode_e'(m);
    #1;
    exp_r = ref_add(a, b, s, m, 11, 52, exp_f);
    checks++;
    if (close64) n_close++;
    if (r64 !== exp_r || fl64 !== exp_f) begin
      failures++;
      if (failures < 10)
        $display("FAIL64 a=%h b=%h sub=%0d rm=%0d got %h/%b exp %h/%b", a, b, s, m, r64, fl64, exp_r, exp_f);
    end
    // reference sanity against native double arithmetic (non-NaN results)
    if (m == 0 && exp_r[62:52] != 11'h7ff) begin
      rr = s ? $bitstoreal(a) - $bitstoreal(b) : $bitstoreal(a) + $bitstoreal(b);
      checks++;
      n_real++;
      if ($realtobits(rr) !== exp_r) begin
        failures++;
        if (failures < 10) $display("REFERR a=%h b=%h ref %h real %h", a, b, exp_r, $realtobits(rr));
      end
    end
  endtask

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input bit s, input int m);
    logic [63:0] exp_r;
    logic [2:0]  exp_f;
    a16 = a; b16 = b; sub16 = s; rm16 = round_mode_e'(m);
    #1;
    exp_r = ref_add(64'(a), 64'(b), s, m, 5, 10, exp_f);
    checks++;
    if (r16 !== exp_r[15:0] || fl16 !== exp_f) begin
      failures++;
      if (failures < 10)
        $display("FAIL16 a=%h b=%h sub=%0d rm=%0d got %h/%b exp %h/%b", a, b, s, m, r16, fl16, exp_r[15:0], exp_f);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, y;
    // directed binary64 cases
    check64(64'h3ff0000000000000, 64'h3ff0000000000000, 0, 0);   // 1 + 1
    check64(64'h3ff0000000000000, 64'h3ff0000000000000, 1, 0);   // 1 - 1 = +0
    check64(64'h3ff0000000000000, 64'h3ff0000000000000, 1, 3);   // 1 - 1 = -0 (RM)
    check64(64'h8000000000000000, 64'h8000000000000000, 0, 2);   // -0 + -0 = -0
    check64(64'h7fefffffffffffff, 64'h7fefffffffffffff, 0, 0);   // overflow
    check64(64'h7fefffffffffffff, 64'h7fefffffffffffff, 0, 1);   // overflow, RZ
    check64(64'h7ff0000000000000, 64'h7ff0000000000000, 1, 0);   // inf - inf
    check64(64'h3ff0000000000001, 64'h3fefffffffffffff, 1, 0);   // deep cancellation
    check64(64'h0000000000000003, 64'h0000000000000001, 1, 0);   // subnormals
    check64(64'h0010000000000000, 64'h000fffffffffffff, 1, 0);   // normal - subnormal
    // the two textbook decimal sums, as binary64 operands; both sums are
    // integers and therefore exact: alignment with no normalization, and an
    // addition that gains a digit
    for (int m = 0; m < 4; m++) begin
      check64($realtobits(1.324e5), $realtobits(1.576e3), 0, m);
      checks++;
      if (r64 !== $realtobits(1.33976e5)) begin
        failures++;
        $display("1.324e5 + 1.576e3 gave %h", r64);
      end
      check64($realtobits(9.853e7), $realtobits(1.466e6), 0, m);
      checks++;
      if (r64 !== $realtobits(9.9996e7)) begin
        failures++;
        $display("9.853e7 + 1.466e6 gave %h", r64);
      end
    end
    // binary analogue of a rounding carry into a new digit (binary16):
    // 1.1111111111b x 2^-1 + 2^-12 is a tie that rounds to even, giving 1.0
    check16(16'h3bff, 16'h0c00, 0, 0);
    checks++;
    if (r16 !== 16'h3c00) begin
      failures++;
      $display("rounding carry case gave %h", r16);
    end
    for (int i = 0; i < N_RAND; i++) begin
      x = rand_operand(11, 52, 64'h3ff0000000000000 ^ {$urandom, $urandom} & 64'h7fffffffffffffff);
      y = rand_operand(11, 52, x);
      if ($urandom_range(0, 1) == 1) check64(x, y, $urandom_range(0, 1), $urandom_range(0, 3));
      else check64(y, x, $urandom_range(0, 1), $urandom_range(0, 3));
    end
    n_close = 0;
    for (int i = 0; i < N_RAND; i++) begin
      x = rand_operand(5, 10, {$urandom, $urandom} & 64'h7fff);
      y = rand_operand(5, 10, x);
      check16(x[15:0], y[15:0], $urandom_range(0, 1), $urandom_range(0, 3));
      if (close16) n_close++;
    end
    checks++;
    if (n_close < N_RAND / 20) begin
      failures++;
      $display("close path rarely used: %0d", n_close);
    end
    $display("close path results: %0d, native-double cross-checks: %0d", n_close, n_real);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
