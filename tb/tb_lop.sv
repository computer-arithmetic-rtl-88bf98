// tb_lop: checks the leading one predictor. For every pair x, y of 10-bit
// operands (exhaustive) and for random 54-bit pairs, the first one of the
// predictor string must sit at the leading one of |x - y| or one place
// above it.
module tb_lop;
  logic [9:0]  x, y, f;
  logic [53:0] u, v, g;
  int checks = 0, failures = 0;

  lop #(.N(10)) dut  (.x(x), .y(y), .f(f));
  lop #(.N(54)) dut2 (.x(u), .y(v), .f(g));

  function automatic int msb(logic [63:0] w);
    for (int k = 63; k >= 0; k--) if (w[k]) return k;
    return -1;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, q;
    logic [63:0] d;
    for (int i = 0; i < 1024; i++)
      for (int j = 0; j < 1024; j++) begin
        if (i == j) continue;
        x = 10'(i); y = 10'(j);
        #1;
        p = msb(64'((i > j) ? i - j : j - i));
        q = msb(64'(f));
        checks++;
        if (!(q == p || q == p + 1)) begin
          failures++;
          if (failures < 10) $display("x=%b y=%b f=%b true %0d", x, y, f, p);
        end
      end
    for (int i = 0; i < 20000; i++) begin
      u = {$urandom, $urandom};
      v = u ^ (54'({$urandom, $urandom}) >> $urandom_range(0, 53));
      if (u == v) continue;
      #1;
      d = (u > v) ? 64'(u - v) : 64'(v - u);
      p = msb(d);
      q = msb(64'(g));
      checks++;
      if (!(q == p || q == p + 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
