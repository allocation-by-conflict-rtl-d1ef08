// abc_b_cache: the B (buffer) store of the ABC multilateral data cache.
//
// A small, highly associative store (4 KB, 32-way, so 4 sets of 32-byte
// lines, by default) with tag, valid and dirty bits and true-LRU replacement
// (lru_age). It receives every miss block that the ABC rule keeps out of A,
// i.e. the tours that begin while A's conflict block is still in use. It has
// no path to or from A. The victim of a new line is the lowest-numbered
// invalid way of the B-set, or else its LRU way; the B-set index is the low
// bits of the line address, like the A-set index.
//
// Interface: set_i / tag_i address the B-set; all outputs are combinational.
// At a rising edge op_i applies one operation to way op_way_i of that set:
//   ST_HIT  - reference: LRU update, and with wr_i the word wsel_i is
//             written under be_i and the line marked dirty;
//   ST_FILL - tag_i, fill_line_i and fill_dirty_i installed, valid set, LRU
//             update.
// Valid, dirty and LRU state reset asynchronously (active low).
module abc_b_cache
  import abc_pkg::*;
#(
  parameter int unsigned SETS = 4,
  parameter int unsigned WAYS = 32,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W = LADDR_W - $clog2(SETS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [SET_W-1:0]  set_i,
  input  logic [TAG_W-1:0]  tag_i,
  output logic              hit_o,
  output logic [WAY_W-1:0]  hit_way_o,
  output line_t             hit_line_o,
  // victim block
  output logic [WAY_W-1:0]  victim_way_o,
  output logic              victim_valid_o,
  output logic              victim_dirty_o,
  output laddr_t            victim_laddr_o,
  output line_t             victim_line_o,
  // update
  input  st_op_e            op_i,
  input  logic [WAY_W-1:0]  op_way_i,
  input  logic              wr_i,
  input  logic [WSEL_W-1:0] wsel_i,
  input  word_t             wdata_i,
  input  be_t               be_i,
  input  line_t             fill_line_i,
  input  logic              fill_dirty_i
);

  logic [TAG_W-1:0] tag_q   [SETS][WAYS];
  line_t            data_q  [SETS][WAYS];
  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAYS-1:0]  dirty_q [SETS];

  logic [WAY_W-1:0] lru_way;
  logic             have_inv;
  logic [WAY_W-1:0] inv_way;
  logic [WAYS-1:0]  hit_vec;

  // Fully parallel tag compare over the ways of the B-set.
  always_comb begin
    hit_vec   = '0;
    hit_way_o = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[set_i][w] && tag_q[set_i][w] == tag_i) begin
        hit_vec[w] = 1'b1;
        hit_way_o  = WAY_W'(w);
      end
  end
  assign hit_o      = |hit_vec;
  assign hit_line_o = data_q[set_i][hit_way_o];

  // Victim: first invalid way, else the LRU way.
  always_comb begin
    have_inv = 1'b0;
    inv_way  = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid_q[set_i][w]) begin
        have_inv = 1'b1;
        inv_way  = WAY_W'(w);
      end
  end
  assign victim_way_o   = have_inv ? inv_way : lru_way;
  assign victim_valid_o = valid_q[set_i][victim_way_o];
  assign victim_dirty_o = dirty_q[set_i][victim_way_o];
  assign victim_line_o  = data_q[set_i][victim_way_o];
  if (SETS > 1) begin : g_laddr
    assign victim_laddr_o = {tag_q[set_i][victim_way_o], set_i};
  end else begin : g_laddr1
    assign victim_laddr_o = tag_q[set_i][victim_way_o];
  end

  lru_age #(.SETS(SETS), .WAYS(WAYS)) u_lru (
    .clk        (clk),
    .rst_n      (rst_n),
    .set_i      (set_i),
    .touch_i    (op_i != ST_NONE),
    .touch_way_i(op_way_i),
    .lru_way_o  (lru_way)
  );

  // Valid and dirty bits.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
      end
    end else if (op_i == ST_FILL) begin
      valid_q[set_i][op_way_i] <= 1'b1;
      dirty_q[set_i][op_way_i] <= fill_dirty_i;
    end else if (op_i == ST_HIT && wr_i) begin
      dirty_q[set_i][op_way_i] <= 1'b1;
    end
  end

  // Tags and data.
  always_ff @(posedge clk) begin
    if (op_i == ST_FILL) begin
      tag_q[set_i][op_way_i]  <= tag_i;
      data_q[set_i][op_way_i] <= fill_line_i;
    end else if (op_i == ST_HIT && wr_i) begin
      data_q[set_i][op_way_i] <= merge_word(data_q[set_i][op_way_i], wsel_i, wdata_i, be_i);
    end
  end

  b_hit_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_vec))
    else $error("abc_b_cache: line present in more than one way");

endmodule
