// tb_wi_lru: LRU replacement against an independent recency-list model.
// Each set's model is an ordered list of ways, most recent first; a touch
// moves the way to the front. With all ways valid the victim must be the last
// way of the list; with an invalid way it must be the lowest invalid one.
module tb_wi_lru;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [6:0] victim_set, upd_set;
  logic [3:0] victim_valid;
  logic [1:0] victim_way, upd_way;
  logic       upd_en;

  int order [128][4];

  wi_lru dut (.clk(clk), .rst_n(rst_n), .victim_set(victim_set),
              .victim_valid(victim_valid), .victim_way(victim_way),
              .upd_en(upd_en), .upd_set(upd_set), .upd_way(upd_way));

  always #5 clk = ~clk;

  task automatic touch(int s, int w);
    int pos;
    upd_en = 1; upd_set = 7'(s); upd_way = 2'(w);
    @(posedge clk); #1;
    upd_en = 0;
    pos = 0;
    for (int i = 0; i < 4; i++) if (order[s][i] == w) pos = i;
    for (int i = pos; i > 0; i--) order[s][i] = order[s][i-1];
    order[s][0] = w;
  endtask

  task automatic check(int s, logic [3:0] valid);
    int exp;
    victim_set = 7'(s); victim_valid = valid; #1;
    exp = -1;
    for (int w = 3; w >= 0; w--) if (!valid[w]) exp = w;
    if (exp < 0) exp = order[s][3];
    checks++;
    if (int'(victim_way) != exp) begin
      failures++; $display("FAIL set %0d valid %b got %0d exp %0d", s, valid, victim_way, exp);
    end
  endtask

  initial begin
    upd_en = 0; upd_set = 0; upd_way = 0; victim_set = 0; victim_valid = '1;
    // after reset way w has age w: way 0 most recent, way 3 least
    for (int s = 0; s < 128; s++) for (int i = 0; i < 4; i++) order[s][i] = i;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 128; s++) check(s, 4'hF);
    for (int t = 0; t < 3000; t++) begin
      int s;
      s = int'($urandom_range(0, 7));
      if ($urandom_range(0, 2) != 0) touch(s, int'($urandom_range(0, 3)));
      else check(s, ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
