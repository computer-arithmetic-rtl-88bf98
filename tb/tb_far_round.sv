// tb_far_round: checks far-path rounding. Operands with exponent difference
// 0..60 (additions) or 1..60 (subtractions) are aligned in the testbench;
// the compound-adder inputs are formed with ordinary additions. The rounded
// significand, exponent and inexact bit are compared with an exact wide
// computation that normalizes first and then rounds, in all four modes.
module tb_far_round;
  import fp_add_pkg::*;

  logic        eff_sub, sign, inexact;
  round_mode_e rm;
  logic [10:0] exp_l;
  logic [54:0] s0, s1, s2;
  logic [2:0]  grs;
  logic [52:0] sig;
  logic [12:0] exp_res;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_lsh = 0;

  far_round #(.P(53), .EXP_W(11)) dut (.eff_sub, .sign, .rm, .exp_l, .sum0(s0), .sum1(s1),
                                       .sum2(s2), .grs, .sig, .exp_res, .inexact);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [52:0]  sl, ss, hi;
    logic [255:0] wl, ws, r, lowbits;
    logic [54:0]  opb;
    int           d, lead, t, e_exp;
    logic [63:0]  e_sig;
    logic         g, st, up;
    for (int i = 0; i < 40000; i++) begin
      eff_sub = 1'($urandom);
      d  = eff_sub ? $urandom_range(1, 60) : $urandom_range(0, 60);
      if (i % 4 == 0) d = eff_sub ? $urandom_range(1, 3) : $urandom_range(0, 2);
      sl = {1'b1, 20'($urandom), 32'($urandom)};
      ss = {1'($urandom_range(0, 3) != 0), 20'($urandom), 32'($urandom)};
      if (i % 5 == 0) sl[51:0] = '1;                  // provoke rounding carries
      if (i % 7 == 0) ss[30:0] = '0;
      if (d == 0) ss[52] = 1'b1;
      sign  = 1'($urandom);
      rm    = round_mode_e'($urandom_range(0, 3));
      exp_l = 11'($urandom_range(70, 2000));
      // alignment and operand preparation
      wl = 256'(sl) << 100;
      ws = (256'(ss) << 100) >> d;
      hi = 53'(ws >> 100);
      lowbits = ws & ((256'd1 << 100) - 1);
      grs = {lowbits[99], lowbits[98], |lowbits[97:0]};
      opb = eff_sub ? ~{2'b00, hi} : {2'b00, hi};
      s0 = {2'b00, sl} + opb;
      s1 = s0 + 55'd1;
      s2 = s0 + 55'd2;
      // exact reference
      r = eff_sub ? wl - ws : wl + ws;
      lead = 0;
      for (int k = 0; k < 256; k++) if (r[k]) lead = k;
      if (lead < 151) continue;   // large cancellation: close-path case
      t = lead - 52;
      e_sig = 64'(r >> t);
      g  = r[t-1];
      st = (r & ((256'd1 << (t - 1)) - 1)) != 0;
      case (rm)
        RM_RNE: up = g & (e_sig[0] | st);
        RM_RTZ: up = 1'b0;
        RM_RUP: up = ~sign & (g | st);
        default: up = sign & (g | st);
      endcase
      e_sig = e_sig + 64'(up);
      e_exp = int'(exp_l) + lead - 152;
      if (e_sig[53]) begin e_sig = e_sig >> 1; e_exp++; end
      #1;
      checks++;
      if (lead > 152) n_ovf++;
      if (lead < 152) n_lsh++;
      if (sig !== e_sig[52:0] || int'(exp_res) != e_exp || inexact !== (g | st)) begin
        failures++;
        if (failures < 10) $display("sub=%0d d=%0d rm=%0d sl=%h ss=%h got %h %0d %b exp %h %0d %b",
                                    eff_sub, d, rm, sl, ss, sig, exp_res, inexact, e_sig, e_exp, g | st);
      end
    end
    checks++;
    if (n_ovf == 0 || n_lsh == 0) begin failures++; $display("normalization cases missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
