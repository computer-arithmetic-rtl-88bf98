// tb_fp_adder_top: end-to-end test of fp_adder_top at its default size
// (binary64, 4-bit tags).
//
// The same random operation stream drives the combinational adder and the
// variable-latency pipeline; one operation in five runs the combinational
// adder in single precision (binary32 operands in the low halves). Combinational results are checked in the cycle
// they are produced, pipelined ones by tag when they come out, both against
// fp_ref_pkg::ref_add, and the pipeline's reported latency against the
// cycles actually taken. The test counts every mechanism of the design and
// fails if one never happened: close and far path, complementation of a
// negative close-path difference, far-path right and left normalization,
// rounding, overflow, subnormal and zero results, special operands, single
// precision, the
// three latencies and a result held back by the collision detector. It
// also reports the mean pipeline latency, which must be below 3 cycles.
module tb_fp_adder_top;
  import fp_add_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_OPS = 20000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [63:0] a = '0, b = '0;
  logic        sub = 1'b0, in_valid = 1'b0, fmt = 1'b0;
  round_mode_e rm = RM_RNE;
  logic [3:0]  in_tag = '0;
  logic [63:0] comb_result, vl_out_result;
  fp_flags_t   comb_flags, vl_out_flags;
  logic        comb_close_used, vl_out_valid, vl_out_delayed;
  logic [3:0]  vl_out_tag;
  logic [1:0]  vl_out_latency;

  fp_adder_top dut (
    .clk, .rst_n,
    .comb_a(a), .comb_b(b), .comb_fmt(fmt), .comb_sub(sub), .comb_rm(rm),
    .comb_result, .comb_flags, .comb_close_used,
    .vl_in_valid(in_valid), .vl_in_tag(in_tag), .vl_a(a), .vl_b(b), .vl_sub(sub), .vl_rm(rm),
    .vl_out_valid, .vl_out_tag, .vl_out_result, .vl_out_flags, .vl_out_latency, .vl_out_delayed
  );

  always #5 clk = ~clk;

  typedef enum int {
    EV_CLOSE, EV_FAR, EV_COMPLEMENT, EV_RSHIFT, EV_LSHIFT, EV_ROUND, EV_OVERFLOW,
    EV_SUBNORMAL, EV_ZERO, EV_SPECIAL, EV_SINGLE, EV_LAT1, EV_LAT2, EV_LAT3, EV_HELD, EV_COUNT
  } event_e;
  string ev_name[EV_COUNT] = '{"close path", "far path", "complementation", "right normalization",
                               "left normalization", "rounding", "overflow", "subnormal result",
                               "zero result", "special operand", "single precision", "latency 1", "latency 2",
                               "latency 3", "held back"};
  int ev[EV_COUNT];

  int checks = 0, failures = 0, cycle = 0, issued = 0, retired = 0;
  logic [63:0] exp_res[16];
  logic [2:0]  exp_fl[16];
  int          issue_cyc[16];
  bit          pending[16];

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && vl_out_valid) begin
      retired++;
      checks++;
      if (!pending[vl_out_tag] || vl_out_result !== exp_res[vl_out_tag] ||
          vl_out_flags !== exp_fl[vl_out_tag] ||
          cycle - issue_cyc[vl_out_tag] != int'(vl_out_latency)) begin
        failures++;
        if (failures < 10) $display("pipeline tag %0d got %h/%b exp %h/%b", vl_out_tag,
                                    vl_out_result, vl_out_flags, exp_res[vl_out_tag], exp_fl[vl_out_tag]);
      end
      pending[vl_out_tag] = 1'b0;
      ev[EV_LAT1 + int'(vl_out_latency) - 1]++;
      if (vl_out_delayed) ev[EV_HELD]++;
    end
  end

  // classify an operation by what the algorithm has to do with it
  task automatic classify(logic [63:0] x, logic [63:0] y, bit s, logic [63:0] r, logic [2:0] fl);
    int  ex = int'(x[62:52]), ey = int'(y[62:52]), er = int'(r[62:52]), el;
    bit  eff_sub = x[63] ^ y[63] ^ s;
    if (ex == 2047 || ey == 2047) begin ev[EV_SPECIAL]++; return; end
    if (ex == 0) ex = 1;
    if (ey == 0) ey = 1;
    el = (ex > ey) ? ex : ey;
    if (comb_close_used) ev[EV_CLOSE]++; else ev[EV_FAR]++;
    if (comb_close_used && ex == ey && (y[62:0] > x[62:0])) ev[EV_COMPLEMENT]++;
    if (!comb_close_used && !eff_sub && er > el && !fl[1]) ev[EV_RSHIFT]++;
    if (!comb_close_used && eff_sub && er < el) ev[EV_LSHIFT]++;
    if (fl[0]) ev[EV_ROUND]++;
    if (fl[1]) ev[EV_OVERFLOW]++;
    if (r[62:52] == 0 && r[51:0] != 0) ev[EV_SUBNORMAL]++;
    if (r[62:0] == 0) ev[EV_ZERO]++;
  endtask

  initial begin
    #(10 * (N_OPS * 2 + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, y, r, cr;
    logic [2:0]  fl, cfl;
    bit          s;
    int          m;
    for (int t = 0; t < 16; t++) pending[t] = 1'b0;
    for (int e = 0; e < EV_COUNT; e++) ev[e] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < N_OPS; i++) begin
      @(negedge clk);
      x = rand_operand(11, 52, {$urandom, $urandom} & 64'h7fffffffffffffff);
      y = rand_operand(11, 52, x);
      s = 1'($urandom_range(0, 1));
      m = $urandom_range(0, 3);
      fmt = ($urandom_range(0, 4) == 0);
      if (fmt) begin
        // binary32 operands in the low halves for the combinational adder
        x[31:0] = 32'(rand_operand(8, 23, {$urandom, $urandom} & 64'h7fffffff));
        y[31:0] = 32'(rand_operand(8, 23, 64'(x[31:0])));
        cr = ref_add(64'(x[31:0]), 64'(y[31:0]), s, m, 8, 23, cfl);
      end
      r = ref_add(x, y, s, m, 11, 52, fl);
      if (!fmt) begin cr = r; cfl = fl; end
      a = x; b = y; sub = s; rm = round_mode_e'(m);
      in_valid = ($urandom_range(0, 9) != 0);
      #1;
      checks++;
      if (comb_result !== cr || comb_flags !== cfl) begin
        failures++;
        if (failures < 10) $display("comb fmt=%0d a=%h b=%h sub=%0d rm=%0d got %h/%b exp %h/%b",
                                    fmt, x, y, s, m, comb_result, comb_flags, cr, cfl);
      end
      if (fmt) ev[EV_SINGLE]++;
      else classify(x, y, s, r, fl);
      if (in_valid) begin
        if (pending[in_tag]) begin failures++; $display("tag reuse while pending"); end
        exp_res[in_tag] = r; exp_fl[in_tag] = fl; issue_cyc[in_tag] = cycle;
        pending[in_tag] = 1'b1;
        issued++;
        @(posedge clk);
        #1 in_tag = in_tag + 1'b1;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (issued != retired) begin failures++; $display("issued %0d retired %0d", issued, retired); end
    for (int e = 0; e < EV_COUNT; e++) begin
      $display("%-20s %0d", ev_name[e], ev[e]);
      checks++;
      if (ev[e] == 0) begin failures++; $display("mechanism never exercised: %s", ev_name[e]); end
    end
    // the point of variable latency: a lower mean delay than a fixed 3 cycles
    checks++;
    if (ev[EV_LAT1] + 2 * ev[EV_LAT2] + 3 * ev[EV_LAT3] >= 3 * retired) begin
      failures++;
      $display("mean latency not below 3 cycles");
    end
    $display("mean pipeline latency: %0.3f cycles",
             real'(ev[EV_LAT1] + 2 * ev[EV_LAT2] + 3 * ev[EV_LAT3]) / real'(retired));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
