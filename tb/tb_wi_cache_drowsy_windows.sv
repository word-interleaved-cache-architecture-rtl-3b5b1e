// tb_wi_cache_drowsy_windows: drowsy update-window study on the default
// 16 KB 4-way WI data cache.
//
// Six copies of the cache run the same fixed request stream
// (tb_wi_cache_drowsy_run): one with drowsy mode off, as the reference, and
// one each with update windows of 500, 2000, 4000, 8000 and 32000 cycles.
// Besides the data checks inside each run, it checks the trend that the
// periodic policy must show:
//   - a longer window leaves a smaller share of rows drowsy on average;
//   - a longer window causes no more wakes and takes no more cycles;
//   - each run is slower than the reference by at most one cycle per wake.
// It prints, per window, the average share of drowsy rows and the slowdown.
module tb_wi_cache_drowsy_windows;
  localparam int N = 5;
  localparam int WIN [N] = '{500, 2000, 4000, 8000, 32000};

  bit     done [N+1];
  int     c [N+1], f [N+1];
  longint cyc [N+1], wk [N+1], dsum [N+1];

  tb_wi_cache_drowsy_run #(.WINDOW(2000), .DROWSY_ON(1'b0)) r_base
    (.done(done[N]), .checks(c[N]), .failures(f[N]), .cycles(cyc[N]), .wakes(wk[N]),
     .drowsy_sum(dsum[N]));

  for (genvar i = 0; i < N; i++) begin : g_win
    tb_wi_cache_drowsy_run #(.WINDOW(WIN[i])) u_run
      (.done(done[i]), .checks(c[i]), .failures(f[i]), .cycles(cyc[i]), .wakes(wk[i]),
       .drowsy_sum(dsum[i]));
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    real frac [N];
    bit all_done;
    do begin
      #1000;
      all_done = 1;
      for (int i = 0; i <= N; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i <= N; i++) begin
      checks += c[i]; failures += f[i];
    end
    check(wk[N] == 0 && dsum[N] == 0, "reference run has drowsy rows or wakes");
    for (int i = 0; i < N; i++) begin
      frac[i] = real'(dsum[i]) / (real'(cyc[i]) * 512.0);
      $display("window %5d: %5.1f%% rows drowsy, %0d wakes, %0d cycles (+%0.2f%% over no drowsy mode)",
               WIN[i], 100.0 * frac[i], wk[i], cyc[i],
               100.0 * real'(cyc[i] - cyc[N]) / real'(cyc[N]));
      check(wk[i] > 0, $sformatf("window %0d: no wakes", WIN[i]));
      check(cyc[i] >= cyc[N] && cyc[i] - cyc[N] <= wk[i],
            $sformatf("window %0d: slowdown %0d cycles with %0d wakes", WIN[i],
                      cyc[i] - cyc[N], wk[i]));
      if (i > 0) begin
        check(frac[i] < frac[i-1], $sformatf("window %0d: drowsy share not below window %0d",
                                              WIN[i], WIN[i-1]));
        check(wk[i] <= wk[i-1], $sformatf("window %0d: more wakes than window %0d",
                                           WIN[i], WIN[i-1]));
        check(cyc[i] <= cyc[i-1], $sformatf("window %0d: slower than window %0d",
                                             WIN[i], WIN[i-1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
