// tb_wi_byte_select: extraction of the 4-byte processor word from an 8-byte
// cache word, and placement of store data and byte enables, for every offset.
module tb_wi_byte_select;
  int checks = 0, failures = 0;

  logic [2:0]  off;
  logic [63:0] word_rd, word_wdata;
  logic [31:0] cpu_rdata, cpu_wdata;
  logic [3:0]  cpu_be;
  logic [7:0]  word_be;

  wi_byte_select dut (.byte_off(off), .word_rd(word_rd), .cpu_rdata(cpu_rdata),
                      .cpu_wdata(cpu_wdata), .cpu_be(cpu_be),
                      .word_wdata(word_wdata), .word_be(word_be));

  initial begin
    for (int t = 0; t < 40; t++) begin
      word_rd   = {$urandom, $urandom};
      cpu_wdata = $urandom;
      cpu_be    = 4'($urandom);
      for (int o = 0; o < 8; o++) begin
        logic [31:0] exp_rd;
        logic [7:0]  exp_be;
        off = 3'(o); #1;
        exp_rd = (o >= 4) ? word_rd[63:32] : word_rd[31:0];
        exp_be = (o >= 4) ? {cpu_be, 4'b0} : {4'b0, cpu_be};
        checks += 3;
        if (cpu_rdata !== exp_rd) begin failures++; $display("FAIL rd off=%0d", o); end
        if (word_be !== exp_be) begin failures++; $display("FAIL be off=%0d", o); end
        if (word_wdata !== {cpu_wdata, cpu_wdata}) begin failures++; $display("FAIL wd"); end
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
