// tb_wi_tag_array: reset clears every valid and dirty bit; random writes of
// (tag, valid, dirty) into one way of one set and parallel reads of all ways
// of a set are checked against a model, reads one clock after rd_en.
module tb_wi_tag_array;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en, wr_valid, wr_dirty;
  logic [6:0] rd_set, wr_set;
  logic [1:0] wr_way;
  logic [19:0] wr_tag;
  logic [3:0][19:0] rd_tag;
  logic [3:0] rd_valid, rd_dirty;

  logic [19:0] m_tag [128][4];
  logic        m_val [128][4];
  logic        m_dir [128][4];

  wi_tag_array dut (.clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_set(rd_set),
                    .rd_tag(rd_tag), .rd_valid(rd_valid), .rd_dirty(rd_dirty),
                    .wr_en(wr_en), .wr_set(wr_set), .wr_way(wr_way), .wr_tag(wr_tag),
                    .wr_valid(wr_valid), .wr_dirty(wr_dirty));

  always #5 clk = ~clk;

  task automatic check_set(int s);
    rd_en = 1'b1; rd_set = 7'(s);
    @(posedge clk); #1;
    rd_en = 1'b0;
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (rd_valid[w] !== m_val[s][w] || rd_dirty[w] !== m_dir[s][w] ||
          (m_val[s][w] && rd_tag[w] !== m_tag[s][w])) begin
        failures++; $display("FAIL set %0d way %0d", s, w);
      end
    end
  endtask

  initial begin
    rd_en = 0; wr_en = 0; rd_set = 0; wr_set = 0; wr_way = 0; wr_tag = 0;
    wr_valid = 0; wr_dirty = 0;
    for (int s = 0; s < 128; s++)
      for (int w = 0; w < 4; w++) begin
        m_val[s][w] = 0; m_dir[s][w] = 0; m_tag[s][w] = 0;
      end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 128; s++) check_set(s);
    for (int t = 0; t < 800; t++) begin
      if ($urandom_range(0, 2) != 0) begin
        int s, w;
        s = int'($urandom_range(0, 127)); w = int'($urandom_range(0, 3));
        wr_en = 1; wr_set = 7'(s); wr_way = 2'(w); wr_tag = 20'($urandom);
        wr_valid = 1'($urandom); wr_dirty = 1'($urandom);
        @(posedge clk); #1;
        m_tag[s][w] = wr_tag; m_val[s][w] = wr_valid; m_dir[s][w] = wr_dirty;
        wr_en = 0;
      end else begin
        check_set(int'($urandom_range(0, 127)));
      end
    end
    for (int s = 0; s < 128; s++) check_set(s);
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
