// tb_wi_set_decoder: exhaustive check of the 128-set index decoder.
// For each index with enable high exactly that set line must be high;
// with enable low none.
module tb_wi_set_decoder;
  int checks = 0, failures = 0;

  logic         en;
  logic [6:0]   idx;
  logic [127:0] set_sel;

  wi_set_decoder dut (.en(en), .idx(idx), .set_sel(set_sel));

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 128; i++) begin
        logic [127:0] exp;
        en = 1'(e); idx = 7'(i); #1;
        exp = '0;
        if (e) exp[i] = 1'b1;
        checks++;
        if (set_sel !== exp) begin
          failures++; $display("FAIL en=%0d idx=%0d", e, i);
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
