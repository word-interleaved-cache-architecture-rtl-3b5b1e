// tb_wi_fast_hit_buffer: load, hit on any byte address of the same 8-byte
// word, miss on a neighbouring word, invalidate on a matching store address
// only, flush and reset; checked against a one-entry model.
module tb_wi_fast_hit_buffer;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [31:0] lookup_addr, load_addr, inval_addr;
  logic        hit, load_en, inval_en, flush;
  logic [63:0] rdata, load_data;

  logic        m_valid;
  logic [28:0] m_waddr;
  logic [63:0] m_data;

  wi_fast_hit_buffer dut (.clk(clk), .rst_n(rst_n), .lookup_addr(lookup_addr), .hit(hit),
                          .rdata(rdata), .load_en(load_en), .load_addr(load_addr),
                          .load_data(load_data), .inval_en(inval_en),
                          .inval_addr(inval_addr), .flush(flush));

  always #5 clk = ~clk;

  task automatic probe(logic [31:0] a);
    logic exp;
    lookup_addr = a; #1;
    exp = m_valid && (m_waddr == a[31:3]);
    checks++;
    if (hit !== exp || (exp && rdata !== m_data)) begin
      failures++; $display("FAIL probe %h hit=%b exp=%b", a, hit, exp);
    end
  endtask

  initial begin
    load_en = 0; inval_en = 0; flush = 0; lookup_addr = 0; load_addr = 0;
    inval_addr = 0; load_data = 0; m_valid = 0; m_waddr = 0; m_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    probe(32'h0);
    for (int t = 0; t < 1000; t++) begin
      int op;
      logic [31:0] a;
      op = int'($urandom_range(0, 9));
      a  = (m_valid && $urandom_range(0, 1) == 1) ? {m_waddr, 3'($urandom)} : $urandom & 32'h0000_3FFF;
      if (op < 3) begin
        load_en = 1; load_addr = a; load_data = {$urandom, $urandom};
        @(posedge clk); #1;
        load_en = 0; m_valid = 1; m_waddr = a[31:3]; m_data = load_data;
      end else if (op < 5) begin
        inval_en = 1; inval_addr = a;
        @(posedge clk); #1;
        inval_en = 0;
        if (m_waddr == a[31:3]) m_valid = 0;
      end else if (op == 5) begin
        flush = 1;
        @(posedge clk); #1;
        flush = 0; m_valid = 0;
      end else begin
        probe(a);
        probe(a ^ 32'h8);  // neighbouring word
      end
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
