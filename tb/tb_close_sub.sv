// tb_close_sub: checks the close-path subtraction. Exponents are chosen to
// differ by 0 or 1 (only their two low bits reach the block); the
// magnitude, sign and choice of the larger operand are compared with the
// exact difference of the operands placed by their full exponents.
module tb_close_sub;
  logic [52:0] sig_a, sig_b;
  logic [1:0]  ea, eb;
  logic        sign_a, sign_b, sel_b, sign;
  logic [53:0] x, y, mag;
  int checks = 0, failures = 0;

  close_sub #(.P(53)) dut (.sig_a, .sig_b, .exp_a_lsb(ea), .exp_b_lsb(eb), .sign_a, .sign_b,
                           .sel_b, .x, .y, .mag, .sign);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          fa, fb;
    logic [55:0] va, vb, vd;
    logic        e_sign;
    for (int i = 0; i < 20000; i++) begin
      fa = $urandom_range(1, 2000);
      fb = fa + $urandom_range(0, 2) - 1;
      sig_a = {1'b1, 20'($urandom), 32'($urandom)};
      sig_b = (i % 2 == 0) ? {1'b1, 20'($urandom), 32'($urandom)}
                           : sig_a ^ (53'($urandom) >> $urandom_range(0, 31));
      sign_a = 1'($urandom); sign_b = ~sign_a;
      ea = 2'(fa); eb = 2'(fb);
      #1;
      // both values in units of half an LSB of the larger exponent
      va = (fa >= fb) ? {2'b0, sig_a, 1'b0} : {3'b0, sig_a};
      vb = (fb >= fa) ? {2'b0, sig_b, 1'b0} : {3'b0, sig_b};
      vd = (va >= vb) ? va - vb : vb - va;
      e_sign = (va >= vb) ? sign_a : sign_b;
      checks++;
      if (mag !== vd[53:0] || (vd != 0 && sign !== e_sign) || sel_b !== (fb > fa)) begin
        failures++;
        if (failures < 10) $display("fa=%0d fb=%0d a=%h b=%h got %h %b exp %h %b", fa, fb,
                                    sig_a, sig_b, mag, sign, vd, e_sign);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
