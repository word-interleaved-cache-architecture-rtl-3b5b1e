// tb_wi_offset_decoder: exhaustive check of the offset decoder.
// Every select value with enable high must give exactly the one-hot way of
// that number; with enable low no way may be selected. Checked for the
// default 4-way and for an 8-way instance.
module tb_wi_offset_decoder;
  int checks = 0, failures = 0;

  logic       en4, en8;
  logic [1:0] sel4;
  logic [2:0] sel8;
  logic [3:0] way4;
  logic [7:0] way8;

  wi_offset_decoder              dut4 (.en(en4), .sel(sel4), .way_en(way4));
  wi_offset_decoder #(.WAYS(8))  dut8 (.en(en8), .sel(sel8), .way_en(way8));

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int s = 0; s < 4; s++) begin
        en4 = 1'(e); sel4 = 2'(s); #1;
        checks++;
        if (way4 !== (e ? 4'(1 << s) : 4'b0)) begin
          failures++; $display("FAIL 4-way en=%0d sel=%0d got %b", e, s, way4);
        end
      end
      for (int s = 0; s < 8; s++) begin
        en8 = 1'(e); sel8 = 3'(s); #1;
        checks++;
        if (way8 !== (e ? 8'(1 << s) : 8'b0)) begin
          failures++; $display("FAIL 8-way en=%0d sel=%0d got %b", e, s, way8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
