// tb_wi_way_mux: the small per-way mux must pass the selected 8-byte word of
// a 32-byte row when enabled, and zeros when disabled.
module tb_wi_way_mux;
  int checks = 0, failures = 0;

  logic         en;
  logic [1:0]   sel;
  logic [255:0] row;
  logic [63:0]  word;

  wi_way_mux dut (.en(en), .sel(sel), .row(row), .word(word));

  initial begin
    for (int t = 0; t < 50; t++) begin
      logic [63:0] w [4];
      for (int i = 0; i < 4; i++) w[i] = {$urandom, $urandom};
      row = {w[3], w[2], w[1], w[0]};
      for (int e = 0; e < 2; e++)
        for (int s = 0; s < 4; s++) begin
          en = 1'(e); sel = 2'(s); #1;
          checks++;
          if (word !== (e ? w[s] : 64'd0)) begin
            failures++; $display("FAIL en=%0d sel=%0d", e, s);
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
