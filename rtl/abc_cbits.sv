// abc_cbits: the C bits of the A store and the ABC allocation decision.
//
// Every block of A has one C bit. C=1 means a CNR (Conflict with No
// Replacement: a miss block of this A-set was put into B) has happened since
// the block was last referenced. The rules follow the ABC scheme:
//   * a block starting a tour in A, or being referenced, gets C=0;
//   * a CNR sets C=1 for every block of the A-set;
//   * an empty or invalid block counts as C=1.
// The decision: a miss block goes to A when the conflict block (the block A
// would replace) has C=1 or is invalid, and to B otherwise. Resetting every
// bit to 1 is this implementation's choice; it agrees with "invalid blocks
// have C=1" because all blocks are invalid after reset.
//
// Interface: set_i selects the A-set. conflict_way_i / conflict_valid_i
// describe the conflict block; alloc_to_a_o (combinational) is the decision
// and c_o the C bits of the set. At a rising edge clear_i clears the C bit of
// clear_way_i, and cnr_i sets all C bits of the set; when both are given the
// CNR is applied first and clear_way_i is then cleared.
module abc_cbits #(
  parameter int unsigned SETS = 1024,
  parameter int unsigned WAYS = 1,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SET_W-1:0] set_i,
  input  logic [WAY_W-1:0] conflict_way_i,
  input  logic             conflict_valid_i,
  output logic             alloc_to_a_o,
  output logic [WAYS-1:0]  c_o,
  input  logic             clear_i,
  input  logic [WAY_W-1:0] clear_way_i,
  input  logic             cnr_i
);

  logic [WAYS-1:0] c_q [SETS];

  assign c_o          = c_q[set_i];
  assign alloc_to_a_o = !conflict_valid_i || c_q[set_i][conflict_way_i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) c_q[s] <= '1;
    end else begin
      for (int w = 0; w < WAYS; w++) begin
        if (clear_i && WAY_W'(w) == clear_way_i) c_q[set_i][w] <= 1'b0;
        else if (cnr_i)                          c_q[set_i][w] <= 1'b1;
      end
    end
  end

endmodule
