// tb_compound_adder: checks sum, sum+1 and sum+2 of the compound adder at
// the far-path width (55 bits) and exhaustively at 6 bits, against the
// simulator's own addition.
module tb_compound_adder;
  logic [54:0] a, b, s0, s1, s2;
  logic [5:0]  c, d, t0, t1, t2;
  int checks = 0, failures = 0;

  compound_adder #(.W(55)) dut  (.a(a), .b(b), .sum0(s0), .sum1(s1), .sum2(s2));
  compound_adder #(.W(6))  dut6 (.a(c), .b(d), .sum0(t0), .sum1(t1), .sum2(t2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (i % 4 == 1) b = ~a;                       // long carry chains
      if (i % 4 == 2) b = ~a - 55'($urandom_range(0, 2));
      #1;
      checks++;
      if (s0 !== a + b || s1 !== a + b + 55'd1 || s2 !== a + b + 55'd2) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h got %h %h %h", a, b, s0, s1, s2);
      end
    end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        c = 6'(i); d = 6'(j);
        #1;
        checks++;
        if (t0 !== 6'(i + j) || t1 !== 6'(i + j + 1) || t2 !== 6'(i + j + 2)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
