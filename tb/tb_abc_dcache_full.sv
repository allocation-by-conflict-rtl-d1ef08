// tb_abc_dcache_full: end-to-end test of the ABC data cache at its full
// default size (32 KB direct-mapped A, 4 KB 32-way B, 32-byte lines) with
// the 18-cycle memory. The address pool covers 16 A-sets with 16 lines each,
// so that every B-set sees more lines than its 32 ways hold. Checking is
// done by the reference model in abc_dcache_env.
module tb_abc_dcache_full;
  logic d;
  int   c, f;

  abc_dcache_env #(.FULL(1'b1), .N_OPS(8000), .POOL_SETS(16), .POOL_TAGS(16),
                   .STALL_PCT(40), .NAME("full"))
    u_env (.done(d), .checks(c), .failures(f));

  initial begin
    #1 wait (d);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  // watchdog
  initial begin
    #50_000_000;
    $display("tb_abc_dcache_full: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end
endmodule
