// tb_fp_add_varlat: self-checking test of the variable-latency pipelined
// adder, in the binary16 configuration so that close-path cases and
// collisions are frequent.
//
// A random stream (one operation per cycle with random idle cycles) enters
// the pipeline with a running tag. Every result is matched by tag with the
// reference sum, and the cycle count is checked: the result must appear
// exactly out_latency cycles after entry, at most 3, never earlier than the
// work requires, and when it was not held back by the collision detector
// exactly at its natural latency:
//   1 cycle  - close path (effective subtraction, exponents within one,
//              exact result below the larger exponent or equal exponents)
//              whose normalization shift is 0 or 1 place, or a zero result;
//   2 cycles - close path needing a larger shift;
//   3 cycles - far path and special operands.
// Each operation must come out exactly once.
module tb_fp_add_varlat;
  import fp_add_pkg::*;
  import fp_ref_pkg::*;

  localparam int EW = 5, MW = 10, TW = 4;
  localparam int N_OPS = 30000;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            in_valid = 1'b0, sub = 1'b0;
  logic [TW-1:0]   in_tag = '0;
  logic [15:0]     a = '0, b = '0;
  round_mode_e     rm = RM_RNE;
  logic            out_valid, out_delayed;
  logic [TW-1:0]   out_tag;
  logic [15:0]     out_result;
  fp_flags_t       out_flags;
  logic [1:0]      out_latency;

  fp_add_varlat #(.EXP_W(EW), .MAN_W(MW), .TAG_W(TW)) dut (
    .clk, .rst_n, .in_valid, .in_tag, .a, .b, .sub, .rm,
    .out_valid, .out_tag, .out_result, .out_flags, .out_latency, .out_delayed
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_lat[4] = '{0, 0, 0, 0};
  int n_delayed = 0, issued = 0, retired = 0;

  // scoreboard indexed by tag
  logic [15:0] exp_res[1 << TW];
  logic [2:0]  exp_fl[1 << TW];
  int          issue_cyc[1 << TW], nat_lat[1 << TW];
  bit          pending[1 << TW];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int natural_latency(logic [15:0] x, logic [15:0] y, bit s, logic [15:0] r);
    int ex = int'(x[14:10]), ey = int'(y[14:10]), er = int'(r[14:10]), el, d;
    bit eff_sub = x[15] ^ y[15] ^ s;
    if (ex == 31 || ey == 31) return 3;
    if (ex == 0) ex = 1;
    if (ey == 0) ey = 1;
    el = (ex > ey) ? ex : ey;
    d  = (ex > ey) ? ex - ey : ey - ex;
    if (er == 0) er = 1;
    if (!eff_sub || d > 1) return 3;
    if (d == 1 && er >= el) return 3;          // no cancellation: far path
    if (r[14:0] == 0 || el - er <= 1) return 1;
    return 2;
  endfunction

  // output side
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int lat;
      retired++;
      checks++;
      lat = cycle - issue_cyc[out_tag];
      if (!pending[out_tag]) begin
        failures++;
        $display("unexpected result for tag %0d", out_tag);
      end else begin
        pending[out_tag] = 1'b0;
        if (out_result !== exp_res[out_tag] || out_flags !== exp_fl[out_tag]) begin
          failures++;
          if (failures < 10) $display("tag %0d got %h/%b exp %h/%b", out_tag, out_result,
                                      out_flags, exp_res[out_tag], exp_fl[out_tag]);
        end
        checks++;
        if (lat != int'(out_latency) || lat < 1 || lat > 3 || lat < nat_lat[out_tag] ||
            (!out_delayed && lat != nat_lat[out_tag]) || (out_delayed && lat == nat_lat[out_tag])) begin
          failures++;
          if (failures < 10) $display("tag %0d latency %0d reported %0d natural %0d delayed %0d",
                                      out_tag, lat, out_latency, nat_lat[out_tag], out_delayed);
        end
        n_lat[lat]++;
        if (out_delayed) n_delayed++;
      end
    end
  end

  initial begin
    #(10 * (N_OPS * 3 + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, y, r;
    logic [2:0]  fl;
    bit          s;
    int          m;
    for (int t = 0; t < (1 << TW); t++) pending[t] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < N_OPS; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        continue;
      end
      x = rand_operand(EW, MW, {$urandom, $urandom} & 64'h7fff);
      y = rand_operand(EW, MW, x);
      s = 1'($urandom_range(0, 1));
      m = $urandom_range(0, 3);
      r = ref_add(x, y, s, m, EW, MW, fl);
      if (pending[in_tag]) begin
        failures++;
        $display("tag %0d still pending at reuse", in_tag);
      end
      exp_res[in_tag]   = r[15:0];
      exp_fl[in_tag]    = fl;
      issue_cyc[in_tag] = cycle;
      nat_lat[in_tag]   = natural_latency(x[15:0], y[15:0], s, r[15:0]);
      pending[in_tag]   = 1'b1;
      in_valid = 1'b1;
      a = x[15:0]; b = y[15:0]; sub = s; rm = round_mode_e'(m);
      @(posedge clk);
      issued++;
      #1 in_tag = in_tag + 1'b1;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (issued != retired) begin
      failures++;
      $display("issued %0d retired %0d", issued, retired);
    end
    // every latency and the collision avoidance must have been exercised
    for (int l = 1; l <= 3; l++) begin
      checks++;
      if (n_lat[l] == 0) begin failures++; $display("latency %0d never seen", l); end
    end
    checks++;
    if (n_delayed == 0) begin failures++; $display("no collision was avoided"); end
    $display("latency 1/2/3: %0d/%0d/%0d, held back: %0d", n_lat[1], n_lat[2], n_lat[3], n_delayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
