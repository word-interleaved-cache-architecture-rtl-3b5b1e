// tb_wi_wordline_driver: random check of the per-way wordline gating.
// A wordline of way w, set s must be high exactly when set line s and way
// select w are both high (one way for a word access, all for a line access).
module tb_wi_wordline_driver;
  int checks = 0, failures = 0;

  logic [127:0]          set_sel;
  logic [3:0]            way_sel;
  logic [3:0][127:0]     wl;

  wi_wordline_driver dut (.set_sel(set_sel), .way_sel(way_sel), .wl(wl));

  initial begin
    for (int t = 0; t < 400; t++) begin
      int s;
      s = int'($urandom_range(0, 127));
      set_sel = '0;
      set_sel[s] = 1'b1;
      way_sel = (t % 5 == 0) ? 4'hF : 4'(1 << (t % 4));
      if (t % 7 == 0) way_sel = '0;
      #1;
      for (int w = 0; w < 4; w++)
        for (int r = 0; r < 128; r++) begin
          logic exp;
          exp = (r == s) && way_sel[w];
          checks++;
          if (wl[w][r] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d way=%0d row=%0d", t, w, r);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
