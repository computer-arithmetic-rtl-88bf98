// tb_collision_detect: drives random requests (natural latency 1..3, random
// idle cycles) and keeps its own calendar of bus cycles already promised.
// Each grant must be the first free cycle at or after the natural latency,
// 'delayed' must say whether it differs, and no cycle may be promised twice.
module tb_collision_detect;
  logic       clk = 1'b0, rst_n = 1'b0, req_valid = 1'b0, delayed;
  logic [1:0] req_lat = 2'd1, grant_lat;
  int checks = 0, failures = 0, cycle = 0, n_delayed = 0;
  bit taken[int];

  collision_detect dut (.clk, .rst_n, .req_valid, .req_lat, .grant_lat, .delayed);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      cycle++;
      req_valid = ($urandom_range(0, 5) != 0);
      req_lat   = 2'($urandom_range(1, 3));
      #1;
      if (req_valid) begin
        e = int'(req_lat);
        while (taken.exists(cycle + e)) e++;
        checks++;
        if (int'(grant_lat) != e || delayed !== (e != int'(req_lat)) || e > 3) begin
          failures++;
          if (failures < 10) $display("cycle %0d req %0d grant %0d exp %0d", cycle, req_lat, grant_lat, e);
        end
        taken[cycle + int'(grant_lat)] = 1'b1;
        if (delayed) n_delayed++;
      end
    end
    checks++;
    if (n_delayed == 0) failures++;
    $display("delayed %0d", n_delayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
