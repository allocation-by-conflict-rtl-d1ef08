// abc_dcache_env: end-to-end test environment for the non-blocking abc_dcache.
//
// Drives random loads and stores from a small pool of line addresses chosen
// to make A-sets and B-sets collide, into abc_dcache connected to the
// behavioural memory abc_mem_model. An independent reference model of the
// ABC scheme follows the cache in the order the cache does things (lookups
// in request order, line arrivals as the memory returns them). It keeps A
// and B tags, valid, dirty and C bits, LRU as MRU-ordered lists, the lines
// being fetched, the lines waiting to be written back and a shadow copy of
// memory, and it checks:
//   * every lookup: hit in A, hit in B or miss, with answer id and data;
//   * every line arrival: placed in A or in B (the ABC decision), dirty
//     victim or not, answer id and data;
//   * every cycle the lookup stage waits: that there is a reason (a line
//     arriving, the line being fetched, the line waiting for write-back, or
//     a miss with every MSHR busy), so hits under misses are never held;
//   * in the first phase (one access at a time, no memory stalls) the exact
//     latency: 1 cycle for a hit and LAT+2 for a miss.
// In the second phase requests stream in with up to 16 ids in flight, and
// memory randomly stalls (STALL_PCT per cycle, plus occasional long bursts). It
// counts how often each mechanism happened and fails for any that never
// did. FULL=1 instantiates abc_dcache with no parameter list (its defaults);
// the A_/B_/N_MSHR parameters must then equal those defaults.
// Ports: done goes high when finished, with the check and failure counts.
module abc_dcache_env
  import abc_pkg::*;
#(
  parameter int unsigned A_BYTES   = 32768,
  parameter int unsigned A_WAYS    = 1,
  parameter int unsigned B_BYTES   = 4096,
  parameter int unsigned B_WAYS    = 32,
  parameter int unsigned N_MSHR    = 8,
  parameter int unsigned WB_DEPTH  = 4,
  parameter bit          FULL      = 1'b0,
  parameter int unsigned N_OPS     = 4000,
  parameter int unsigned POOL_SETS = 8,
  parameter int unsigned POOL_TAGS = 4,
  parameter int unsigned LAT       = 18,
  parameter int unsigned STALL_PCT = 30,
  parameter string       NAME      = "env"
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned A_SETS = A_BYTES / (LINE_BYTES * A_WAYS);
  localparam int unsigned B_SETS = B_BYTES / (LINE_BYTES * B_WAYS);
  localparam int unsigned N_ID   = 1 << ID_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        cpu_req_valid, cpu_req_ready, cpu_resp_valid;
  cpu_req_t    cpu_req;
  id_t         cpu_resp_id;
  word_t       cpu_resp_rdata;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  mem_req_t    mem_req;
  mid_t        mem_resp_id;
  laddr_t      mem_resp_laddr;
  line_t       mem_resp_rdata;
  abc_events_t events;
  logic        stall_en;
  int          n_reads, n_writes, n_stalls, n_resp_held;

  if (FULL) begin : g_full
    abc_dcache dut (.*);
  end else begin : g_small
    abc_dcache #(.A_BYTES(A_BYTES), .A_WAYS(A_WAYS), .B_BYTES(B_BYTES), .B_WAYS(B_WAYS),
                 .N_MSHR(N_MSHR), .WB_DEPTH(WB_DEPTH))
      dut (.*);
  end

  abc_mem_model #(.LAT(LAT), .STALL_PCT(STALL_PCT)) u_mem (
    .clk(clk), .rst_n(rst_n), .stall_en(stall_en),
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_ready(mem_resp_ready), .resp_id(mem_resp_id),
    .resp_laddr(mem_resp_laddr), .resp_rdata(mem_resp_rdata),
    .n_reads(n_reads), .n_writes(n_writes), .n_stalls(n_stalls), .n_resp_held(n_resp_held));

  // ---------------- reference model ----------------
  bit     ra_v [A_SETS][A_WAYS];
  bit     ra_d [A_SETS][A_WAYS];
  bit     ra_c [A_SETS][A_WAYS];
  bit     ra_h [A_SETS][A_WAYS];   // a CNR happened during this tour
  laddr_t ra_t [A_SETS][A_WAYS];
  int     ra_lru [A_SETS][$];      // front = most recently used way
  bit     rb_v [B_SETS][B_WAYS];
  bit     rb_d [B_SETS][B_WAYS];
  laddr_t rb_t [B_SETS][B_WAYS];
  int     rb_lru [B_SETS][$];
  word_t  shadow [logic [ADDR_W-3:0]];
  cpu_req_t pend [laddr_t];        // lines being fetched, with the access that missed
  int       wbset [laddr_t];       // lines waiting to be written back

  typedef struct { cpu_req_t r; int pcyc; } acc_t;
  acc_t fifo [$];                  // accepted, not yet looked up
  int   acc_cyc [N_ID];
  int   held [N_ID];               // cycles a request waited in the lookup stage
  bit   id_busy [N_ID];
  int   outstanding;

  typedef enum int { M_HA, M_HB, M_MA_INV, M_MA_REPL, M_MB, M_WB_A, M_WB_B,
                     M_B_EVICT, M_STORE_HIT, M_STORE_MISS, M_CNR_SET, M_KEPT_BY_REF,
                     M_HIT_UNDER_MISS, M_MISS_UNDER_MISS, M_DELAYED, M_MSHR_FULL,
                     M_WB_HAZARD, M_FILL_COLLIDE, M_MEM_STALL, M_RESP_HELD,
                     M_N } mech_e;
  int m_cnt [M_N];
  string m_name [M_N] = '{"hit in A", "hit in B", "miss to A (empty way)",
                         "miss to A (conflict block replaced, C=1)",
                         "miss to B (CNR, conflict block kept)",
                         "write-back from A", "write-back from B",
                         "B victim replaced", "store hit", "store miss",
                         "CNR set C of a referenced block",
                         "block kept in A by a reference after a CNR",
                         "hit under miss", "miss under miss",
                         "delayed hit (line being fetched)", "all MSHRs busy",
                         "access held for a pending write-back",
                         "lookup held by an arriving line", "memory request stall",
                         "memory answer held (write-back buffer full)"};

  function automatic void touch(ref int q[$], input int w);
    foreach (q[i]) if (q[i] == w) begin q.delete(i); break; end
    q.push_front(w);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("%s FAIL @%0d: %s", NAME, cyc, what);
    end
  endtask

  // Reference load value and shadow update for one access.
  function automatic word_t do_data(input cpu_req_t r);
    logic [ADDR_W-3:0] wa = r.addr[ADDR_W-1:2];
    word_t old = shadow.exists(wa) ? shadow[wa] : abc_tb_pkg::init_word(wa);
    if (r.we) begin
      word_t n = old;
      for (int b = 0; b < BE_W; b++) if (r.be[b]) n[b*8 +: 8] = r.wdata[b*8 +: 8];
      shadow[wa] = n;
    end
    return old;
  endfunction

  // 0 hit A (way in w), 1 hit B, 2 miss.
  function automatic int ref_lookup(input laddr_t la, output int w);
    int as = int'(32'(la) % A_SETS);
    int bs = int'(32'(la) % B_SETS);
    w = -1;
    for (int i = 0; i < A_WAYS; i++) if (ra_v[as][i] && ra_t[as][i] == la) w = i;
    if (w >= 0) return 0;
    for (int i = 0; i < B_WAYS; i++) if (rb_v[bs][i] && rb_t[bs][i] == la) w = i;
    if (w >= 0) return 1;
    return 2;
  endfunction


  // A line arrives: ABC decision. Returns 1 for A; wb / victim line address out.
  function automatic bit ref_fill(input laddr_t la, input bit dirty, output bit wb,
                                  output laddr_t vla);
    int as = int'(32'(la) % A_SETS);
    int bs = int'(32'(la) % B_SETS);
    int cw = -1;
    for (int w = A_WAYS - 1; w >= 0; w--) if (!ra_v[as][w]) cw = w;
    if (cw < 0) cw = ra_lru[as][$];
    if (!ra_v[as][cw] || ra_c[as][cw]) begin
      if (!ra_v[as][cw]) m_cnt[M_MA_INV]++; else m_cnt[M_MA_REPL]++;
      wb = ra_v[as][cw] && ra_d[as][cw];
      vla = ra_t[as][cw];
      if (wb) m_cnt[M_WB_A]++;
      ra_v[as][cw] = 1; ra_d[as][cw] = dirty; ra_c[as][cw] = 0; ra_h[as][cw] = 0;
      ra_t[as][cw] = la;
      touch(ra_lru[as], cw);
      return 1'b1;
    end
    m_cnt[M_MB]++;
    if (ra_h[as][cw]) m_cnt[M_KEPT_BY_REF]++;
    cw = -1;
    for (int w = B_WAYS - 1; w >= 0; w--) if (!rb_v[bs][w]) cw = w;
    if (cw < 0) cw = rb_lru[bs][$];
    if (rb_v[bs][cw]) m_cnt[M_B_EVICT]++;
    wb = rb_v[bs][cw] && rb_d[bs][cw];
    vla = rb_t[bs][cw];
    if (wb) m_cnt[M_WB_B]++;
    rb_v[bs][cw] = 1; rb_d[bs][cw] = dirty; rb_t[bs][cw] = la;
    touch(rb_lru[bs], cw);
    for (int w = 0; w < A_WAYS; w++) begin
      if (ra_v[as][w] && !ra_c[as][w]) m_cnt[M_CNR_SET]++;
      ra_c[as][w] = 1; ra_h[as][w] = 1;
    end
    return 1'b0;
  endfunction

  // Recently used lines, for reuse.
  laddr_t recent [8];

  function automatic cpu_req_t gen_op(input id_t id);
    cpu_req_t r;
    laddr_t la;
    if (($urandom % 100) < 45) la = recent[$urandom % 8];
    else begin
      la = laddr_t'(($urandom % POOL_TAGS) * A_SETS + ($urandom % POOL_SETS));
      recent[$urandom % 8] = la;
    end
    r.id    = id;
    r.we    = (($urandom % 100) < 30);
    r.addr  = {la, WSEL_W'($urandom), 2'b00};
    r.wdata = $urandom;
    r.be    = r.we ? be_t'($urandom | 1) : '0;
    return r;
  endfunction

  // One negedge: check what the cache does in the current cycle.
  task automatic monitor(input bit exact);
    bit fill = mem_resp_valid && mem_resp_ready;
    bit look = events.hit_a || events.hit_b || events.miss;
    bit head_in_l = (fifo.size() > 0) && (cyc > fifo[0].pcyc);
    if (mem_req_valid && !mem_req_ready) m_cnt[M_MEM_STALL]++;
    if (mem_resp_valid && !mem_resp_ready) m_cnt[M_RESP_HELD]++;
    if (fill) begin
      laddr_t la = mem_resp_laddr;
      cpu_req_t r;
      bit to_a, wb;
      laddr_t vla;
      word_t exp;
      check(pend.exists(la), $sformatf("line %h arrived but was not requested", la));
      check(!look, "lookup completed in a cycle with an arriving line");
      r = pend[la];
      pend.delete(la);
      if (head_in_l) m_cnt[M_FILL_COLLIDE]++;
      to_a = ref_fill(la, r.we, wb, vla);
      if (wb) wbset[vla]++;
      check(events.alloc_a == to_a && events.alloc_b == !to_a,
            $sformatf("line %h placed in %s, expected %s", la, events.alloc_a ? "A" : "B", to_a ? "A" : "B"));
      check(events.wb == wb, $sformatf("line %h: write-back %0d expected %0d", la, events.wb, wb));
      exp = do_data(r);
      check(cpu_resp_valid && cpu_resp_id == r.id, $sformatf("miss answer id %0d expected %0d", cpu_resp_id, r.id));
      if (!r.we) check(cpu_resp_rdata == exp, $sformatf("miss load %h: %h expected %h", r.addr, cpu_resp_rdata, exp));
      else m_cnt[M_STORE_MISS]++;
      if (exact) check(cyc - acc_cyc[r.id] == int'(LAT) + 2 + held[r.id],
                       $sformatf("miss latency %0d expected %0d", cyc - acc_cyc[r.id], int'(LAT) + 2 + held[r.id]));
      id_busy[r.id] = 0; outstanding--;
    end else if (look) begin
      acc_t a;
      int w, o;
      laddr_t la;
      word_t exp;
      check(head_in_l, "lookup with no request waiting");
      a = fifo.pop_front();
      la = a.r.addr[ADDR_W-1:OFF_W];
      check(!pend.exists(la), $sformatf("lookup of %h while it is being fetched", la));
      check(!wbset.exists(la), $sformatf("lookup of %h while it waits for write-back", la));
      o = ref_lookup(la, w);
      check(events.hit_a == (o == 0) && events.hit_b == (o == 1) && events.miss == (o == 2),
            $sformatf("lookup %h: got A%0d B%0d M%0d expected outcome %0d", la,
                      events.hit_a, events.hit_b, events.miss, o));
      if (o < 2) begin
        if (pend.size() > 0) m_cnt[M_HIT_UNDER_MISS]++;
        exp = do_data(a.r);
        check(cpu_resp_valid && cpu_resp_id == a.r.id, "hit answer id");
        if (!a.r.we) check(cpu_resp_rdata == exp, $sformatf("hit load %h: %h expected %h", a.r.addr, cpu_resp_rdata, exp));
        else m_cnt[M_STORE_HIT]++;
        if (o == 0) begin
          int as = int'(32'(la) % A_SETS);
          m_cnt[M_HA]++;
          touch(ra_lru[as], w); ra_c[as][w] = 0;
          if (a.r.we) ra_d[as][w] = 1;
        end else begin
          int bs = int'(32'(la) % B_SETS);
          m_cnt[M_HB]++;
          touch(rb_lru[bs], w);
          if (a.r.we) rb_d[bs][w] = 1;
        end
        if (exact) check(cyc - acc_cyc[a.r.id] == 1 + held[a.r.id], $sformatf("hit latency %0d", cyc - acc_cyc[a.r.id]));
        id_busy[a.r.id] = 0; outstanding--;
      end else begin
        check(pend.size() < N_MSHR, "miss accepted with every MSHR busy");
        check(!cpu_resp_valid, "answer on a miss lookup");
        if (pend.size() > 0) m_cnt[M_MISS_UNDER_MISS]++;
        pend[la] = a.r;
      end
    end else begin
      check(!cpu_resp_valid, "answer with nothing to answer");
      if (head_in_l) begin
        laddr_t la = fifo[0].r.addr[ADDR_W-1:OFF_W];
        int w;
        bit miss = ref_lookup(la, w) == 2;
        held[fifo[0].r.id]++;
        if (pend.exists(la)) begin
          m_cnt[M_DELAYED]++;
          check(events.delayed, "held for a line being fetched but not flagged");
        end else if (wbset.exists(la)) m_cnt[M_WB_HAZARD]++;
        else if (miss && pend.size() == N_MSHR) begin
          m_cnt[M_MSHR_FULL]++;
          check(events.mshr_full, $sformatf("held with all MSHRs busy but not flagged (line %h)", la));
        end else check(0, $sformatf("lookup of %h held for no reason", la));
      end
    end
    // a write-back leaves for memory at the end of this cycle
    if (mem_req_valid && mem_req_ready && mem_req.we) begin
      check(wbset.exists(mem_req.laddr), $sformatf("write-back of %h not expected", mem_req.laddr));
      if (wbset.exists(mem_req.laddr)) begin
        wbset[mem_req.laddr]--;
        if (wbset[mem_req.laddr] == 0) wbset.delete(mem_req.laddr);
      end
    end
  endtask

  initial begin
    bit holding;
    int issued, phase1;
    cpu_req_t r;
    done = 0; checks = 0; failures = 0;
    cpu_req_valid = 0; cpu_req = '0; stall_en = 0;
    outstanding = 0;
    foreach (m_cnt[i]) m_cnt[i] = 0;
    foreach (id_busy[i]) begin id_busy[i] = 0; acc_cyc[i] = 0; end
    for (int s = 0; s < A_SETS; s++) for (int w = 0; w < A_WAYS; w++) begin
      ra_v[s][w] = 0; ra_d[s][w] = 0; ra_c[s][w] = 1; ra_h[s][w] = 0; ra_lru[s].push_back(w);
    end
    for (int s = 0; s < B_SETS; s++) for (int w = 0; w < B_WAYS; w++) begin
      rb_v[s][w] = 0; rb_d[s][w] = 0; rb_lru[s].push_back(w);
    end
    foreach (recent[i]) recent[i] = laddr_t'(i);
    repeat (3) @(negedge clk);
    rst_n = 1;
    holding = 0; issued = 0;
    phase1 = N_OPS / 4;     // one access at a time, exact latencies
    while (issued < N_OPS || outstanding > 0 || holding) begin
      @(negedge clk);
      stall_en = (issued >= phase1);
      monitor(issued <= phase1 && !stall_en && n_stalls == 0);
      if (!holding) cpu_req_valid = 0;
      if (!holding && issued < N_OPS) begin
        bit go;
        automatic id_t id = '0;
        automatic bit free = 0;
        for (int i = 0; i < N_ID; i++) if (!id_busy[i]) begin id = id_t'(i); free = 1; break; end
        if (issued < phase1) go = (outstanding == 0) && (($urandom % 4) == 0);
        else go = free && (($urandom % 100) < 85);
        if (go && free) begin
          r = gen_op(id);
          cpu_req_valid = 1; cpu_req = r; holding = 1;
        end else cpu_req_valid = 0;
      end
      if (holding && cpu_req_ready) begin
        fifo.push_back('{r: r, pcyc: cyc});
        acc_cyc[r.id] = cyc; held[r.id] = 0; id_busy[r.id] = 1; outstanding++;
        issued++; holding = 0;
      end
    end
    cpu_req_valid = 0;
    stall_en = 0;
    repeat (WB_DEPTH * 4 + 8) begin
      @(negedge clk);
      monitor(1'b0);
    end
    check(fifo.size() == 0 && pend.size() == 0 && wbset.size() == 0, $sformatf("work left at the end (%0d %0d %0d)", fifo.size(), pend.size(), wbset.size()));
    check(n_reads == m_cnt[M_MA_INV] + m_cnt[M_MA_REPL] + m_cnt[M_MB], "memory reads vs misses");
    check(n_writes == m_cnt[M_WB_A] + m_cnt[M_WB_B], "memory writes vs write-backs");
    for (int m = 0; m < M_N; m++) begin
      $display("%s mechanism %-45s : %0d", NAME, m_name[m], m_cnt[m]);
      check(m_cnt[m] > 0, $sformatf("mechanism '%s' never happened", m_name[m]));
    end
    done = 1;
  end
endmodule
