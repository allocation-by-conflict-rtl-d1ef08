// tb_abc_dcache: end-to-end test of the ABC data cache at reduced sizes.
//
// Two configurations run side by side, each against its own reference
// model (see abc_dcache_env): a direct-mapped A of 8 sets with a 2-set,
// 4-way B, 4 MSHRs and a 1-entry write-back buffer; a 2-way A of 8 sets
// with a 2-set, 2-way B, 3 MSHRs and a 1-entry write-back buffer; and a
// 4-way A of 4 sets with a 2-set, 2-way B. The small sizes make conflicts,
// CNRs, B evictions and resource stalls frequent. Two more run the 2-way and
// 4-way A at the full 32 KB A and 4 KB 32-way B, with 8 MSHRs and a 4-entry
// write-back buffer. Latencies are checked with the modelled 18-cycle memory.
module tb_abc_dcache;
  logic d0, d1, d2, d3, d4;
  int   c0, f0, c1, f1, c2, f2, c3, f3, c4, f4;

  abc_dcache_env #(.A_BYTES(256), .A_WAYS(1), .B_BYTES(256), .B_WAYS(4),
                   .N_MSHR(4), .WB_DEPTH(1),
                   .N_OPS(4000), .POOL_SETS(8), .POOL_TAGS(4), .NAME("dm"))
    u_dm (.done(d0), .checks(c0), .failures(f0));

  abc_dcache_env #(.A_BYTES(512), .A_WAYS(2), .B_BYTES(128), .B_WAYS(2),
                   .N_MSHR(3), .WB_DEPTH(1),
                   .N_OPS(4000), .POOL_SETS(8), .POOL_TAGS(5), .NAME("2w"))
    u_2w (.done(d1), .checks(c1), .failures(f1));

  abc_dcache_env #(.A_BYTES(512), .A_WAYS(4), .B_BYTES(128), .B_WAYS(2),
                   .N_MSHR(4), .WB_DEPTH(1),
                   .N_OPS(4000), .POOL_SETS(4), .POOL_TAGS(8), .NAME("4w"))
    u_4w (.done(d2), .checks(c2), .failures(f2));

  abc_dcache_env #(.A_BYTES(32768), .A_WAYS(2), .B_BYTES(4096), .B_WAYS(32),
                   .N_MSHR(8), .WB_DEPTH(4),
                   .N_OPS(8000), .POOL_SETS(16), .POOL_TAGS(32), .STALL_PCT(50),
                   .NAME("2w_32k"))
    u_2w_32k (.done(d3), .checks(c3), .failures(f3));

  abc_dcache_env #(.A_BYTES(32768), .A_WAYS(4), .B_BYTES(4096), .B_WAYS(32),
                   .N_MSHR(8), .WB_DEPTH(4),
                   .N_OPS(8000), .POOL_SETS(16), .POOL_TAGS(40), .STALL_PCT(50),
                   .NAME("4w_32k"))
    u_4w_32k (.done(d4), .checks(c4), .failures(f4));

  initial begin
    #1 wait (d0 && d1 && d2 && d3 && d4);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4, f0 + f1 + f2 + f3 + f4);
    $finish;
  end

  // watchdog
  initial begin
    #20_000_000;
    $display("tb_abc_dcache: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4, f0 + f1 + f2 + f3 + f4 + 1);
    $finish;
  end
endmodule
