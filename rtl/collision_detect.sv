// collision_detect: output-bus slot reservation for the variable-latency
// adder.
//
// Every operation that enters the pipeline wants the shared result bus
// req_lat cycles later (1, 2 or 3). busy[k] records that the bus is already
// promised to an earlier operation k cycles from now. The new operation is
// granted the first free slot at or after its natural latency, so a result
// that would collide with an earlier one is held back in the pipeline
// instead; the slot MAX_LAT cycles ahead is always free, so the pipeline
// never stalls and every result leaves within MAX_LAT cycles. The grant is
// combinational; the reservation register updates on the clock edge.
// Synchronous active-low reset clears all reservations.
// A collision detector is part of the variable-latency adder as taught;
// holding the later result instead of stalling the input is this design's
// own policy.
module collision_detect #(
  parameter int unsigned MAX_LAT = 3,
  parameter int unsigned LW      = $clog2(MAX_LAT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  logic [LW-1:0] req_lat,     // natural latency, 1..MAX_LAT
  output logic [LW-1:0] grant_lat,   // latency actually given
  output logic          delayed      // grant_lat > req_lat: a collision was avoided
);

  logic [MAX_LAT:1] busy, busy_next;

  always_comb begin
    grant_lat = LW'(MAX_LAT);
    for (int k = MAX_LAT; k >= 1; k--)
      if (k >= int'(req_lat) && !busy[k]) grant_lat = LW'(k);
    delayed = req_valid && (grant_lat != req_lat);
    busy_next = '0;
    for (int k = 1; k < MAX_LAT; k++)
      busy_next[k] = busy[k+1] | (req_valid && int'(grant_lat) == k + 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) busy <= '0;
    else        busy <= busy_next;
  end

  // the farthest slot is never reserved in advance, so a grant always exists
  always_ff @(posedge clk) begin
    if (rst_n && req_valid) begin
      assert (!busy[grant_lat] && grant_lat >= req_lat)
        else $error("collision_detect: granted slot %0d is not free", grant_lat);
    end
  end

endmodule
