// tb_lru_age: self-checking test of the true-LRU tracker.
//
// A reference keeps, per set, the ways ordered from most to least recently
// used (initially 0..WAYS-1). Random touches are applied to random sets and
// after every cycle the tracker's LRU way must equal the last way of the
// reference order. An 8-way and a 2-way instance are tested.
module tb_lru_age;
  localparam int SETS = 4;
  localparam int W8 = 8, W2 = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] set8, set2;
  logic       t8, t2;
  logic [2:0] tw8, lru8;
  logic [0:0] tw2, lru2;

  lru_age #(.SETS(SETS), .WAYS(W8)) u8 (.clk, .rst_n, .set_i(set8), .touch_i(t8),
                                         .touch_way_i(tw8), .lru_way_o(lru8));
  lru_age #(.SETS(SETS), .WAYS(W2)) u2 (.clk, .rst_n, .set_i(set2), .touch_i(t2),
                                         .touch_way_i(tw2), .lru_way_o(lru2));

  int q8 [SETS][$];
  int q2 [SETS][$];

  function automatic void touch(ref int q[$], input int w);
    foreach (q[i]) if (q[i] == w) begin q.delete(i); break; end
    q.push_front(w);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) begin
      for (int w = 0; w < W8; w++) q8[s].push_back(w);
      for (int w = 0; w < W2; w++) q2[s].push_back(w);
    end
    t8 = 0; t2 = 0; set8 = 0; set2 = 0; tw8 = 0; tw2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check state for a random set, then schedule a random touch to it
      set8 = 2'($urandom); set2 = 2'($urandom);
      #1;
      check(int'(lru8) == q8[set8][$], $sformatf("8-way set %0d lru %0d exp %0d", set8, lru8, q8[set8][$]));
      check(int'(lru2) == q2[set2][$], $sformatf("2-way set %0d lru %0d exp %0d", set2, lru2, q2[set2][$]));
      t8 = ($urandom % 4) != 0; tw8 = 3'($urandom);
      t2 = ($urandom % 4) != 0; tw2 = 1'($urandom);
      // bias touches towards the current LRU way sometimes
      if (($urandom % 5) == 0) tw8 = lru8;
      if (t8) touch(q8[set8], int'(tw8));
      if (t2) touch(q2[set2], int'(tw2));
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
