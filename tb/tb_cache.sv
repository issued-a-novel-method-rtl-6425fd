// tb_cache: runs the cache checks at the L1 configuration (16 KiB, 2-way,
// 32-byte lines, 1-cycle hits) and the L2 configuration (256 KiB, 4-way,
// 64-byte lines, 10-cycle hits).
module tb_cache;
  logic clk = 0, rst_n = 0;
  bit   d1, d2;
  int   c1, c2, f1, f2, checks, failures;

  always #5 clk = ~clk;

  cache_check #(.SIZE(16 * 1024),  .WAYS(2), .LINE(32), .LAT(1))  u_l1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  cache_check #(.SIZE(256 * 1024), .WAYS(4), .LINE(64), .LAT(10)) u_l2 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));

  initial begin
    #22 rst_n = 1;
    fork
      wait (d1 && d2);
      begin repeat (300000) @(posedge clk); $display("watchdog expired"); end
    join_any
    checks   = c1 + c2;
    failures = f1 + f2 + ((d1 && d2) ? 0 : 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
