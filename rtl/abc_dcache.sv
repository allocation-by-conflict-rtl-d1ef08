// abc_dcache: non-blocking L1 data cache managed by Allocation By Conflict.
//
// Two stores sit side by side between the processor and the next memory
// level: A (main, 32 KB, direct-mapped by default) and B (buffer, 4 KB,
// 32-way). They are looked up in parallel, hold disjoint lines and never
// exchange data: there is no swap or save path between them. When a missing
// line arrives, ABC looks at the conflict block in A (the block the line
// would replace there). If that block is invalid, or has not been referenced
// since the last CNR to its A-set (its C bit is 1), the line replaces it in
// A. Otherwise the conflict block is kept, the line goes to B, where it
// replaces the B-set's LRU block, and that is a CNR: every block of the A-set
// gets C=1. A hit in A clears the C bit of the block hit. A victim leaves for
// the next level directly from whichever store it was in.
//
// The stores are write-back and write-allocate with 32-byte lines and LRU
// replacement, and the cache is non-blocking, as the design prescribes.
// How the non-blocking part works is this implementation's choice:
//   * one lookup stage: each accepted request is looked up in A and B in the
//     next cycle; a hit is answered there (1-cycle hit latency);
//   * a miss takes one of N_MSHR miss registers (MSHRs) and leaves the
//     lookup stage, so later requests hit under it or miss under it; an MSHR
//     remembers the one access that missed;
//   * an access to a line that is being fetched (a delayed hit) waits in the
//     lookup stage until the line is installed, then hits; so does an access
//     to a line still waiting in the write-back buffer, and a miss when
//     every MSHR is busy;
//   * the ABC decision is taken when the line arrives, on the state of the
//     cache at that moment; the line is installed in that cycle, the access
//     that missed is answered (with store data merged into the line) and a
//     dirty victim is put in a WB_DEPTH-entry write-back buffer. The arriving
//     line has priority over the lookup stage, which waits that cycle;
//   * requests to memory, write-backs first, leave through one channel; a
//     request that is not accepted at once is held unchanged.
// The design's 8 memory ports are not built: there is one processor port.
//
// Processor side: a request is accepted on cpu_req_valid && cpu_req_ready;
// an answer is one cpu_resp_valid pulse with the request's id and the
// addressed word (for a store, the value before the store). Answers may
// return out of order. With a next level that takes L cycles from accepting
// a read to returning it, an isolated miss is answered L+2 cycles after
// acceptance. Memory side: line-wide requests held until mem_req_ready;
// write-backs (we=1) get no answer; a read (id = MSHR number) is answered by
// mem_resp_valid with the same id, accepted when mem_resp_ready.
// events pulses one bit per thing the cache did, for counting.
module abc_dcache
  import abc_pkg::*;
#(
  parameter int unsigned A_BYTES  = 32768,
  parameter int unsigned A_WAYS   = 1,
  parameter int unsigned B_BYTES  = 4096,
  parameter int unsigned B_WAYS   = 32,
  parameter int unsigned N_MSHR   = 8,
  parameter int unsigned WB_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor
  input  logic        cpu_req_valid,
  output logic        cpu_req_ready,
  input  cpu_req_t    cpu_req,
  output logic        cpu_resp_valid,
  output id_t         cpu_resp_id,
  output word_t       cpu_resp_rdata,
  // secondary cache / main memory
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_req_t    mem_req,
  input  logic        mem_resp_valid,
  output logic        mem_resp_ready,
  input  mid_t        mem_resp_id,
  input  line_t       mem_resp_rdata,
  // activity
  output abc_events_t events
);

  localparam int unsigned A_SETS  = A_BYTES / (LINE_BYTES * A_WAYS);
  localparam int unsigned B_SETS  = B_BYTES / (LINE_BYTES * B_WAYS);
  localparam int unsigned A_SB    = $clog2(A_SETS);
  localparam int unsigned B_SB    = $clog2(B_SETS);
  localparam int unsigned A_WAY_W = (A_WAYS > 1) ? $clog2(A_WAYS) : 1;
  localparam int unsigned B_WAY_W = (B_WAYS > 1) ? $clog2(B_WAYS) : 1;
  localparam int unsigned WBP_W   = (WB_DEPTH > 1) ? $clog2(WB_DEPTH) : 1;
  localparam int unsigned MS_W    = (N_MSHR > 1) ? $clog2(N_MSHR) : 1;

  typedef struct packed {
    laddr_t laddr;
    line_t  line;
  } wb_entry_t;

  // Lookup stage.
  logic     l_valid_q;
  cpu_req_t l_req_q;
  // Miss registers.
  logic     [N_MSHR-1:0] ms_valid_q, ms_issued_q;
  cpu_req_t ms_req_q [N_MSHR];
  // Write-back buffer (FIFO).
  wb_entry_t          wb_q [WB_DEPTH];
  logic [WBP_W-1:0]   wb_rd_q, wb_wr_q;
  logic [WBP_W:0]     wb_cnt_q;
  // Memory request held while not accepted.
  logic     slot_valid_q;
  mem_req_t slot_q;

  // ---------------------------------------------------------------------
  // The request using the stores this cycle: the arriving line's access,
  // else the lookup stage.
  logic     fill;
  cpu_req_t st_req;
  laddr_t   laddr, l_laddr;
  logic [WSEL_W-1:0] wsel;

  assign mem_resp_ready = (wb_cnt_q < (WBP_W+1)'(WB_DEPTH));
  assign fill    = mem_resp_valid && mem_resp_ready;
  assign st_req  = fill ? ms_req_q[MS_W'(mem_resp_id)] : l_req_q;
  assign laddr   = st_req.addr[ADDR_W-1:OFF_W];
  assign wsel    = st_req.addr[OFF_W-1:2];
  assign l_laddr = l_req_q.addr[ADDR_W-1:OFF_W];

  // A store.
  logic               a_hit, a_cvalid, a_cdirty, a_to_a, a_cnr, a_wr;
  logic [A_WAY_W-1:0] a_hit_way, a_cway, a_op_way;
  line_t              a_hit_line, a_cline, fill_line;
  laddr_t             a_claddr;
  st_op_e             a_op;

  abc_a_cache #(.SETS(A_SETS), .WAYS(A_WAYS)) u_a (
    .clk             (clk),
    .rst_n           (rst_n),
    .set_i           (laddr[A_SB-1:0]),
    .tag_i           (laddr[LADDR_W-1:A_SB]),
    .hit_o           (a_hit),
    .hit_way_o       (a_hit_way),
    .hit_line_o      (a_hit_line),
    .conflict_way_o  (a_cway),
    .conflict_valid_o(a_cvalid),
    .conflict_dirty_o(a_cdirty),
    .conflict_laddr_o(a_claddr),
    .conflict_line_o (a_cline),
    .alloc_to_a_o    (a_to_a),
    .c_o             (),
    .op_i            (a_op),
    .op_way_i        (a_op_way),
    .wr_i            (a_wr),
    .wsel_i          (wsel),
    .wdata_i         (st_req.wdata),
    .be_i            (st_req.be),
    .fill_line_i     (fill_line),
    .fill_dirty_i    (st_req.we),
    .cnr_i           (a_cnr)
  );

  // B store.
  logic               b_hit, b_vvalid, b_vdirty, b_wr;
  logic [B_WAY_W-1:0] b_hit_way, b_vway, b_op_way;
  line_t              b_hit_line, b_vline;
  laddr_t             b_vladdr;
  st_op_e             b_op;

  abc_b_cache #(.SETS(B_SETS), .WAYS(B_WAYS)) u_b (
    .clk           (clk),
    .rst_n         (rst_n),
    .set_i         (laddr[B_SB-1:0]),
    .tag_i         (laddr[LADDR_W-1:B_SB]),
    .hit_o         (b_hit),
    .hit_way_o     (b_hit_way),
    .hit_line_o    (b_hit_line),
    .victim_way_o  (b_vway),
    .victim_valid_o(b_vvalid),
    .victim_dirty_o(b_vdirty),
    .victim_laddr_o(b_vladdr),
    .victim_line_o (b_vline),
    .op_i          (b_op),
    .op_way_i      (b_op_way),
    .wr_i          (b_wr),
    .wsel_i        (wsel),
    .wdata_i       (st_req.wdata),
    .be_i          (st_req.be),
    .fill_line_i   (fill_line),
    .fill_dirty_i  (st_req.we)
  );

  assign fill_line = st_req.we ? merge_word(mem_resp_rdata, wsel, st_req.wdata, st_req.be)
                               : mem_resp_rdata;

  // ---------------------------------------------------------------------
  // Lookup-stage hazards.
  logic            pend_match, wb_match, ms_free_any;
  logic [MS_W-1:0] ms_free;
  always_comb begin
    pend_match  = 1'b0;
    ms_free_any = 1'b0;
    ms_free     = '0;
    for (int m = N_MSHR - 1; m >= 0; m--) begin
      if (ms_valid_q[m] && ms_req_q[m].addr[ADDR_W-1:OFF_W] == l_laddr) pend_match = 1'b1;
      if (!ms_valid_q[m]) begin
        ms_free_any = 1'b1;
        ms_free     = MS_W'(m);
      end
    end
    wb_match = slot_valid_q && slot_q.we && slot_q.laddr == l_laddr;
    for (int e = 0; e < WB_DEPTH; e++)
      if ((WBP_W+1)'(e) < wb_cnt_q && wb_q[WBP_W'((int'(wb_rd_q) + e) % WB_DEPTH)].laddr == l_laddr)
        wb_match = 1'b1;
  end

  logic l_try, l_hit, l_miss, l_done, wb_push;
  assign l_try  = l_valid_q && !fill && !pend_match && !wb_match;
  assign l_hit  = l_try && (a_hit || b_hit);
  assign l_miss = l_try && !(a_hit || b_hit) && ms_free_any;
  assign l_done = l_hit || l_miss;
  assign cpu_req_ready = !l_valid_q || l_done;

  // Victim of the arriving line.
  logic   v_dirty;
  laddr_t v_laddr;
  line_t  v_line;
  assign v_dirty = a_to_a ? (a_cvalid && a_cdirty) : (b_vvalid && b_vdirty);
  assign v_laddr = a_to_a ? a_claddr : b_vladdr;
  assign v_line  = a_to_a ? a_cline  : b_vline;
  assign wb_push = fill && v_dirty;

  // Next memory request: a write-back first, else an MSHR not yet sent.
  logic            cand_valid, cand_wb;
  logic [MS_W-1:0] cand_ms;
  mem_req_t        cand;
  always_comb begin
    cand_wb    = wb_cnt_q != '0;
    cand_valid = cand_wb || |(ms_valid_q & ~ms_issued_q);
    cand_ms    = '0;
    for (int m = N_MSHR - 1; m >= 0; m--)
      if (ms_valid_q[m] && !ms_issued_q[m]) cand_ms = MS_W'(m);
    if (cand_wb)
      cand = '{id: '0, we: 1'b1, laddr: wb_q[wb_rd_q].laddr, wdata: wb_q[wb_rd_q].line};
    else
      cand = '{id: mid_t'(cand_ms), we: 1'b0,
               laddr: ms_req_q[cand_ms].addr[ADDR_W-1:OFF_W], wdata: '0};
  end
  logic cand_take;
  assign cand_take     = !slot_valid_q && cand_valid;
  assign mem_req_valid = slot_valid_q || cand_valid;
  assign mem_req       = slot_valid_q ? slot_q : cand;

  // ---------------------------------------------------------------------
  // Store operations, answers and events.
  always_comb begin
    cpu_resp_valid = 1'b0;
    cpu_resp_id    = st_req.id;
    cpu_resp_rdata = '0;
    a_op     = ST_NONE;
    a_op_way = a_hit_way;
    a_wr     = 1'b0;
    a_cnr    = 1'b0;
    b_op     = ST_NONE;
    b_op_way = b_hit_way;
    b_wr     = 1'b0;
    events   = '0;
    if (fill) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_rdata = mem_resp_rdata[wsel*WORD_W +: WORD_W];
      events.wb      = v_dirty;
      if (a_to_a) begin
        a_op           = ST_FILL;
        a_op_way       = a_cway;
        events.alloc_a = 1'b1;
      end else begin
        b_op           = ST_FILL;
        b_op_way       = b_vway;
        a_cnr          = 1'b1;
        events.alloc_b = 1'b1;
      end
    end else if (l_hit) begin
      cpu_resp_valid = 1'b1;
      if (a_hit) begin
        cpu_resp_rdata = a_hit_line[wsel*WORD_W +: WORD_W];
        a_op           = ST_HIT;
        a_wr           = l_req_q.we;
        events.hit_a   = 1'b1;
      end else begin
        cpu_resp_rdata = b_hit_line[wsel*WORD_W +: WORD_W];
        b_op           = ST_HIT;
        b_wr           = l_req_q.we;
        events.hit_b   = 1'b1;
      end
    end else if (l_miss) begin
      events.miss = 1'b1;
    end
    events.delayed   = l_valid_q && !fill && pend_match;
    events.mshr_full = l_valid_q && !fill && !pend_match && !wb_match &&
                       !(a_hit || b_hit) && !ms_free_any;
  end

  // ---------------------------------------------------------------------
  // State.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_valid_q    <= 1'b0;
      l_req_q      <= '0;
      ms_valid_q   <= '0;
      ms_issued_q  <= '0;
      wb_rd_q      <= '0;
      wb_wr_q      <= '0;
      wb_cnt_q     <= '0;
      slot_valid_q <= 1'b0;
      slot_q       <= '0;
    end else begin
      // lookup stage
      if (cpu_req_ready) begin
        l_valid_q <= cpu_req_valid;
        if (cpu_req_valid) l_req_q <= cpu_req;
      end
      // miss registers
      if (l_miss) begin
        ms_valid_q[ms_free]  <= 1'b1;
        ms_issued_q[ms_free] <= 1'b0;
      end
      if (fill) ms_valid_q[MS_W'(mem_resp_id)] <= 1'b0;
      if (cand_take && !cand_wb) ms_issued_q[cand_ms] <= 1'b1;
      // memory request slot
      if (slot_valid_q && mem_req_ready) slot_valid_q <= 1'b0;
      if (cand_take && !mem_req_ready) begin
        slot_valid_q <= 1'b1;
        slot_q       <= cand;
      end
      // write-back buffer
      if (wb_push) wb_wr_q <= (wb_wr_q == WBP_W'(WB_DEPTH - 1)) ? '0 : wb_wr_q + 1'b1;
      if (cand_take && cand_wb)
        wb_rd_q <= (wb_rd_q == WBP_W'(WB_DEPTH - 1)) ? '0 : wb_rd_q + 1'b1;
      wb_cnt_q <= wb_cnt_q + (WBP_W+1)'(wb_push) - (WBP_W+1)'(cand_take && cand_wb);
    end
  end

  always_ff @(posedge clk) begin
    if (l_miss)  ms_req_q[ms_free] <= l_req_q;
    if (wb_push) wb_q[wb_wr_q]     <= '{laddr: v_laddr, line: v_line};
  end

  // Handshake rules.
  mem_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req))
    else $error("abc_dcache: memory request changed before it was accepted");
  mem_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
      mem_resp_valid |-> ms_valid_q[MS_W'(mem_resp_id)] && ms_issued_q[MS_W'(mem_resp_id)])
    else $error("abc_dcache: memory answer for no outstanding read");
  stores_disjoint: assert property (@(posedge clk) disable iff (!rst_n)
      !(a_hit && b_hit))
    else $error("abc_dcache: line present in both A and B");
  fill_not_resident: assert property (@(posedge clk) disable iff (!rst_n)
      fill |-> !(a_hit || b_hit))
    else $error("abc_dcache: fetched line already resident");

endmodule
