// tb_wi_cache_configs: the WI cache in configurations other than the
// default, each checked by tb_wi_cache_run with random loads and stores:
//   - instruction-cache timing: 16 KB, 4 ways, 32-byte lines, 1-cycle hits;
//   - 32 KB, 8 ways, 64-byte lines (8-byte words, one per data way);
//   - 32 KB, 8 ways, 32-byte lines (the smallest line an 8-way WI cache allows);
//   - 32 KB, 2 ways, 8-byte lines (4-byte words, the smallest word);
//   - 8 KB, 2 ways, 32-byte lines (16-byte words).
// Ends when all runs are done and prints the summed result.
module tb_wi_cache_configs;
  bit done [5];
  int c [5], f [5];

  tb_wi_cache_run #(.CACHE_BYTES(16384), .WAYS(4), .LINE_BYTES(32), .HIT_LAT(1)) r_icache
    (.done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_wi_cache_run #(.CACHE_BYTES(32768), .WAYS(8), .LINE_BYTES(64), .HIT_LAT(2)) r_8w64
    (.done(done[1]), .checks(c[1]), .failures(f[1]));
  tb_wi_cache_run #(.CACHE_BYTES(32768), .WAYS(8), .LINE_BYTES(32), .HIT_LAT(2)) r_8w32
    (.done(done[2]), .checks(c[2]), .failures(f[2]));
  tb_wi_cache_run #(.CACHE_BYTES(32768), .WAYS(2), .LINE_BYTES(8), .HIT_LAT(2)) r_2w8
    (.done(done[3]), .checks(c[3]), .failures(f[3]));
  tb_wi_cache_run #(.CACHE_BYTES(8192), .WAYS(2), .LINE_BYTES(32), .HIT_LAT(2)) r_2w32
    (.done(done[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    int checks, failures;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    $display("FAIL watchdog");
    begin
      int checks, failures;
      checks = 0; failures = 1;
      for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
