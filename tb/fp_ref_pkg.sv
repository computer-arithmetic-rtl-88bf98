// fp_ref_pkg: reference model and stimulus for the floating-point adder
// testbenches.
//
// ref_add computes an IEEE binary sum the textbook way, independently of the
// two-path structure of the design: both significands are placed in a wide
// integer with 66 extra low bits (the smaller one shifted with a sticky bit),
// added or subtracted as signed numbers, normalized by searching for the
// leading one, rounded once from the discarded bits and packed. Widths are
// run-time arguments (ew exponent bits, mw fraction bits, ew + mw <= 63).
// Rounding mode encoding: 0 nearest-even, 1 toward zero, 2 toward +inf,
// 3 toward -inf. Flags are {invalid, overflow, inexact}.
package fp_ref_pkg;

  typedef logic [191:0] wide_t;

  function automatic logic [63:0] ref_add(input logic [63:0] a, input logic [63:0] b,
                                          input bit sub, input int rm,
                                          input int ew, input int mw,
                                          output logic [2:0] flags);
    int          emax = (1 << ew) - 1;
    logic [63:0] fmask = (64'd1 << mw) - 1;
    logic [63:0] qnan = (64'(emax) << mw) | (64'd1 << (mw - 1));
    bit          sa, sb, sl, ss, sr, nan_a, nan_b, inf_a, inf_b, up, g, st;
    int          ea, eb, el, es, d, lead, e, t;
    logic [63:0] fa, fb, siga, sigb, sigl, sigs, sig;
    wide_t       x, y, r, lost;

    flags = 3'b000;
    sa = a[ew + mw];
    sb = b[ew + mw] ^ sub;
    ea = int'((a >> mw) & 64'(emax));
    eb = int'((b >> mw) & 64'(emax));
    fa = a & fmask;
    fb = b & fmask;
    nan_a = (ea == emax) && (fa != 0);
    nan_b = (eb == emax) && (fb != 0);
    inf_a = (ea == emax) && (fa == 0);
    inf_b = (eb == emax) && (fb == 0);
    if (nan_a || nan_b) begin
      if ((nan_a && !fa[mw-1]) || (nan_b && !fb[mw-1])) flags[2] = 1'b1;
      return qnan;
    end
    if (inf_a && inf_b && (sa != sb)) begin
      flags[2] = 1'b1;
      return qnan;
    end
    if (inf_a) return (64'(sa) << (ew + mw)) | (64'(emax) << mw);
    if (inf_b) return (64'(sb) << (ew + mw)) | (64'(emax) << mw);

    siga = (ea == 0) ? fa : (fa | (64'd1 << mw));
    sigb = (eb == 0) ? fb : (fb | (64'd1 << mw));
    if (ea == 0) ea = 1;
    if (eb == 0) eb = 1;
    if (ea >= eb) begin
      el = ea; es = eb; sigl = siga; sigs = sigb; sl = sa; ss = sb;
    end else begin
      el = eb; es = ea; sigl = sigb; sigs = siga; sl = sb; ss = sa;
    end
    d = el - es;
    x = wide_t'(sigl) << 66;
    if (d >= 120) begin
      y = wide_t'(sigs != 0);
    end else begin
      y = (wide_t'(sigs) << 66) >> d;
      lost = (wide_t'(sigs) << 66) & ((wide_t'(1) << d) - 1);
      if (lost != 0) y[0] = 1'b1;
    end
    sr = sl;
    if (sl == ss) r = x + y;
    else if (x >= y) r = x - y;
    else begin
      r = y - x;
      sr = ss;
    end
    if (r == 0) begin
      sr = (sa == sb) ? sa : (rm == 3);
      return 64'(sr) << (ew + mw);
    end
    lead = 0;
    for (int i = 0; i < 192; i++) if (r[i]) lead = i;
    // exponent of the value once its leading one sits at the hidden bit
    e = el + lead - (mw + 66);
    if (e < 1) e = 1;
    t = 66 + (e - el);           // right shift that leaves mw+1 bits
    if (t > 0) begin
      sig  = 64'(r >> t);
      g    = r[t-1];
      st   = (t > 1) ? ((r & ((wide_t'(1) << (t - 1)) - 1)) != 0) : 1'b0;
    end else begin
      sig  = 64'(r << (-t));
      g    = 1'b0;
      st   = 1'b0;
    end
    case (rm)
      0: up = g & (sig[0] | st);
      1: up = 1'b0;
      2: up = !sr && (g || st);
      default: up = sr && (g || st);
    endcase
    if (g || st) flags[0] = 1'b1;
    sig = sig + 64'(up);
    if (sig == (64'd2 << mw)) begin
      sig = sig >> 1;
      e = e + 1;
    end
    if (e >= emax) begin
      flags[1] = 1'b1;
      flags[0] = 1'b1;
      if (rm == 0 || (rm == 2 && !sr) || (rm == 3 && sr))
        return (64'(sr) << (ew + mw)) | (64'(emax) << mw);
      return (64'(sr) << (ew + mw)) | (64'(emax - 1) << mw) | fmask;
    end
    if (sig[mw] == 1'b0) e = 0;
    return (64'(sr) << (ew + mw)) | (64'(e) << mw) | (sig & fmask);
  endfunction

  // Random operand with a bias toward the interesting cases: zeros,
  // subnormals, infinities, NaNs, extreme exponents and an exponent close to
  // a given one (so that close-path cases and cancellations occur).
  function automatic logic [63:0] rand_operand(input int ew, input int mw,
                                               input logic [63:0] near);
    int          emax = (1 << ew) - 1;
    logic [63:0] fmask = (64'd1 << mw) - 1;
    logic [63:0] f = {$urandom, $urandom} & fmask;
    logic [63:0] s = 64'($urandom_range(0, 1)) << (ew + mw);
    int          ne = int'((near >> mw) & 64'(emax));
    int          k = $urandom_range(0, 19);
    int          e;
    case (k)
      0: return s;                                            // zero
      1: return s | f;                                        // subnormal
      2: return s | (64'(emax) << mw);                        // infinity
      3: return s | (64'(emax) << mw) | f | 64'd1;            // NaN
      4: return s | (64'(emax - 1) << mw) | f;                // huge
      5: return s | (64'(1) << mw) | f;                       // smallest normals
      6, 7, 8, 9, 10: begin                                   // close to 'near'
        e = ne + $urandom_range(0, 2) - 1;
        if (e < 0) e = 0;
        if (e >= emax) e = emax - 1;
        // share the upper fraction bits to provoke deep cancellation
        if ($urandom_range(0, 1) == 1)
          f = (near & fmask & ~((64'd1 << $urandom_range(0, mw)) - 1)) | (f & ((64'd1 << $urandom_range(0, mw)) - 1));
        return s | (64'(e) << mw) | f;
      end
      11, 12: begin                                           // few fraction bits set
        e = $urandom_range(1, emax - 1);
        return s | (64'(e) << mw) | (f & (fmask << (mw - 3)));
      end
      13: return s | (64'(ne) << mw) | (near & fmask);        // same magnitude
      default: begin
        e = $urandom_range(0, emax - 1);
        return s | (64'(e) << mw) | f;
      end
    endcase
  endfunction

endpackage
