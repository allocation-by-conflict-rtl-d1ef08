// lru_age: true least-recently-used state for a set-associative store.
//
// Both stores of the ABC cache replace by LRU. Each way of each set keeps an
// age from 0 (most recent) to WAYS-1 (least recent); the ages of a set are
// always a permutation of 0..WAYS-1. A touch of a way makes its age 0 and
// ages by one every way that was younger than it. After reset way 0 is the
// most and way WAYS-1 the least recently used. The age-counter encoding is
// this implementation's choice; only "LRU" is given for the design.
//
// Interface: set_i selects the set; lru_way_o (combinational) is the way
// with the greatest age in that set. touch_i with touch_way_i updates the
// set at the next rising clock edge. Reset is asynchronous, active low.
module lru_age #(
  parameter int unsigned SETS = 4,
  parameter int unsigned WAYS = 32,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SET_W-1:0] set_i,
  input  logic             touch_i,
  input  logic [WAY_W-1:0] touch_way_i,
  output logic [WAY_W-1:0] lru_way_o
);

  logic [WAY_W-1:0] age_q [SETS][WAYS];

  // Oldest way of the selected set.
  always_comb begin
    lru_way_o = '0;
    for (int w = 0; w < WAYS; w++)
      if (age_q[set_i][w] == WAY_W'(WAYS - 1)) lru_way_o = WAY_W'(w);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          age_q[s][w] <= WAY_W'(w);
    end else if (touch_i) begin
      for (int w = 0; w < WAYS; w++) begin
        if (WAY_W'(w) == touch_way_i)
          age_q[set_i][w] <= '0;
        else if (age_q[set_i][w] < age_q[set_i][touch_way_i])
          age_q[set_i][w] <= age_q[set_i][w] + 1'b1;
      end
    end
  end

endmodule
