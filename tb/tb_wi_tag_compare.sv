// tb_wi_tag_compare: random tags per way with at most one matching valid way;
// hit, hit vector and hit way are compared with a direct computation.
// Also covers a matching tag in an invalid way (must miss).
module tb_wi_tag_compare;
  int checks = 0, failures = 0;

  logic [3:0][19:0] way_tag;
  logic [3:0]       way_valid, hit_vec;
  logic [19:0]      req_tag;
  logic             hit;
  logic [1:0]       hit_way;

  wi_tag_compare dut (.way_tag(way_tag), .way_valid(way_valid), .req_tag(req_tag),
                      .hit_vec(hit_vec), .hit(hit), .hit_way(hit_way));

  initial begin
    for (int t = 0; t < 500; t++) begin
      int m;
      logic [3:0] exp_vec;
      req_tag = 20'($urandom);
      for (int w = 0; w < 4; w++) way_tag[w] = req_tag ^ 20'(($urandom % 20'hFFFFF) + 1);
      way_valid = 4'($urandom);
      m = int'($urandom_range(0, 4));  // 4: no way carries the tag
      if (m < 4) way_tag[m] = req_tag;
      #1;
      exp_vec = '0;
      if (m < 4 && way_valid[m]) exp_vec[m] = 1'b1;
      checks += 2;
      if (hit_vec !== exp_vec || hit !== (exp_vec != 0)) begin
        failures++; $display("FAIL t=%0d vec=%b exp=%b", t, hit_vec, exp_vec);
      end
      if (exp_vec != 0 && hit_way !== 2'(m)) begin
        failures++; $display("FAIL t=%0d way=%0d exp=%0d", t, hit_way, m);
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
