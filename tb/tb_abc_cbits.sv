// tb_abc_cbits: self-checking test of the C bits and the ABC decision.
//
// A reference array of C bits follows the rules (reset to 1, cleared on a
// reference or a new tour, whole set to 1 on a CNR, clear wins over the CNR
// for the way cleared in the same cycle). Each cycle a random set, conflict
// way and conflict validity are presented; c_o and alloc_to_a_o are compared
// with the reference (to A when the conflict block is invalid or has C=1),
// then random clear/CNR updates are applied.
module tb_abc_cbits;
  localparam int SETS = 8, WAYS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] set;
  logic [1:0] cway, clr_way;
  logic       cvalid, to_a, clr, cnr;
  logic [WAYS-1:0] c;

  abc_cbits #(.SETS(SETS), .WAYS(WAYS)) dut (
    .clk, .rst_n, .set_i(set), .conflict_way_i(cway), .conflict_valid_i(cvalid),
    .alloc_to_a_o(to_a), .c_o(c), .clear_i(clr), .clear_way_i(clr_way), .cnr_i(cnr));

  bit ref_c [SETS][WAYS];
  int n_to_a = 0, n_to_b = 0, n_cnr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (ref_c[s, w]) ref_c[s][w] = 1;
    set = 0; cway = 0; cvalid = 0; clr = 0; clr_way = 0; cnr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      set = 3'($urandom % 3);          // few sets: more interaction
      cway = 2'($urandom); cvalid = ($urandom % 8) != 0;
      clr = 0; cnr = 0;
      #1;
      for (int w = 0; w < WAYS; w++)
        check(c[w] == ref_c[set][w], $sformatf("set %0d way %0d C=%0d exp %0d", set, w, c[w], ref_c[set][w]));
      check(to_a == (!cvalid || ref_c[set][cway]), $sformatf("decision set %0d way %0d", set, cway));
      if (to_a) n_to_a++; else n_to_b++;
      clr = 1'($urandom % 2); clr_way = 2'($urandom);
      cnr = ($urandom % 5) == 0;
      if (cnr) begin n_cnr++; for (int w = 0; w < WAYS; w++) ref_c[set][w] = 1; end
      if (clr) ref_c[set][clr_way] = 0;
    end
    @(negedge clk);
    check(n_to_a > 100 && n_to_b > 100 && n_cnr > 100, "decision coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
