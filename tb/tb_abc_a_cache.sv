// tb_abc_a_cache: self-checking test of the A store.
//
// A reference model keeps tags, valid, dirty, data, an MRU-ordered way list
// and the C bit of every block of an 8-set, 2-way A store. Each cycle a
// random set and a tag from a small pool are looked up and every output is
// compared with the reference: hit, hit way and line, the conflict block
// (lowest invalid way, else LRU) with its valid, dirty, line address and
// data, the C bits and the ABC decision. Then a reference (with or without a
// store) is applied on a hit, a fill of the conflict way on a miss, and
// random CNRs, each mirrored in the reference.
module tb_abc_a_cache;
  import abc_pkg::*;
  localparam int SETS = 8, WAYS = 2;
  localparam int TAG_W = LADDR_W - 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]       set;
  logic [TAG_W-1:0] tag;
  logic             hit, cvalid, cdirty, to_a, wr, fdirty, cnr;
  logic [0:0]       hway, cway, opway;
  line_t            hline, cline, fline;
  laddr_t           claddr;
  logic [WAYS-1:0]  c;
  st_op_e           op;
  logic [WSEL_W-1:0] wsel;
  word_t            wdata;
  be_t              be;

  abc_a_cache #(.SETS(SETS), .WAYS(WAYS)) dut (
    .clk, .rst_n, .set_i(set), .tag_i(tag), .hit_o(hit), .hit_way_o(hway), .hit_line_o(hline),
    .conflict_way_o(cway), .conflict_valid_o(cvalid), .conflict_dirty_o(cdirty),
    .conflict_laddr_o(claddr), .conflict_line_o(cline), .alloc_to_a_o(to_a), .c_o(c),
    .op_i(op), .op_way_i(opway), .wr_i(wr), .wsel_i(wsel), .wdata_i(wdata), .be_i(be),
    .fill_line_i(fline), .fill_dirty_i(fdirty), .cnr_i(cnr));

  bit               rv [SETS][WAYS], rd [SETS][WAYS], rc [SETS][WAYS];
  logic [TAG_W-1:0] rt [SETS][WAYS];
  line_t            rdat [SETS][WAYS];
  int               rl [SETS][$];
  int n_hit = 0, n_fill = 0, n_repl_dirty = 0, n_to_b = 0;

  function automatic void touch(ref int q[$], input int w);
    foreach (q[i]) if (q[i] == w) begin q.delete(i); break; end
    q.push_front(w);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    int hw, cw, s;
    for (s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      rv[s][w] = 0; rd[s][w] = 0; rc[s][w] = 1; rl[s].push_back(w);
    end
    set = 0; tag = 0; op = ST_NONE; opway = 0; wr = 0; wsel = 0; wdata = 0; be = 0;
    fline = '0; fdirty = 0; cnr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      op = ST_NONE; cnr = 0; wr = 0;
      set = 3'($urandom % 4);
      tag = TAG_W'(($urandom % 5) + 24'h00A000);
      s = int'(set);
      #1;
      hw = -1;
      for (int w = 0; w < WAYS; w++) if (rv[s][w] && rt[s][w] == tag) hw = w;
      cw = -1;
      for (int w = WAYS - 1; w >= 0; w--) if (!rv[s][w]) cw = w;
      if (cw < 0) cw = rl[s][$];
      check(hit == (hw >= 0), $sformatf("hit set %0d tag %h", s, tag));
      if (hw >= 0) begin
        check(int'(hway) == hw, "hit way");
        check(hline == rdat[s][hw], "hit line");
      end
      check(int'(cway) == cw, $sformatf("conflict way %0d exp %0d", cway, cw));
      check(cvalid == rv[s][cw], "conflict valid");
      if (rv[s][cw]) begin
        check(cdirty == rd[s][cw], "conflict dirty");
        check(claddr == {rt[s][cw], set}, "conflict line address");
        check(cline == rdat[s][cw], "conflict line");
      end
      for (int w = 0; w < WAYS; w++) check(c[w] == rc[s][w], $sformatf("C bit set %0d way %0d", s, w));
      check(to_a == (!rv[s][cw] || rc[s][cw]), "ABC decision");
      // apply an operation
      if (hw >= 0) begin
        n_hit++;
        op = ST_HIT; opway = 1'(hw); wr = 1'($urandom % 2);
        wsel = WSEL_W'($urandom); wdata = $urandom; be = be_t'($urandom);
        touch(rl[s], hw); rc[s][hw] = 0;
        if (wr) begin
          rd[s][hw] = 1;
          rdat[s][hw] = merge_word(rdat[s][hw], wsel, wdata, be);
        end
        cnr = ($urandom % 4) == 0;
      end else if (to_a) begin
        n_fill++;
        if (rv[s][cw] && rd[s][cw]) n_repl_dirty++;
        op = ST_FILL; opway = 1'(cw); fline = rnd_line(); fdirty = 1'($urandom % 2);
        rv[s][cw] = 1; rd[s][cw] = fdirty; rt[s][cw] = tag; rdat[s][cw] = fline;
        touch(rl[s], cw); rc[s][cw] = 0;
      end else begin
        n_to_b++;
        cnr = 1;       // miss block went to B
      end
      if (cnr) for (int w = 0; w < WAYS; w++)
        if (!(op != ST_NONE && w == int'(opway))) rc[s][w] = 1;
    end
    @(negedge clk);
    check(n_hit > 100 && n_fill > 100 && n_repl_dirty > 10 && n_to_b > 100, "coverage");
    $display("hits %0d fills %0d dirty replacements %0d CNRs %0d", n_hit, n_fill, n_repl_dirty, n_to_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
