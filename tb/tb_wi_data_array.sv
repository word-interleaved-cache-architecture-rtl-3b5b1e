// tb_wi_data_array: one data way at its default size (128 rows x 32 bytes).
// Random byte-masked writes and row reads through one-hot wordlines are
// checked against a model array; a read appears one clock after the
// wordline, rdata holds while the way is idle, and a write with no wordline
// changes nothing.
module tb_wi_data_array;
  int checks = 0, failures = 0;

  logic         clk = 0;
  logic [127:0] wl;
  logic         we;
  logic [31:0]  wbe;
  logic [255:0] wdata, rdata;

  logic [255:0] model [128];

  wi_data_array dut (.clk(clk), .wl(wl), .we(we), .wbe(wbe), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic write_row(int r, logic [31:0] be, logic [255:0] d);
    wl = '0; wl[r] = 1'b1; we = 1'b1; wbe = be; wdata = d;
    @(posedge clk); #1;
    for (int b = 0; b < 32; b++) if (be[b]) model[r][b*8 +: 8] = d[b*8 +: 8];
    wl = '0; we = 1'b0;
  endtask

  task automatic read_row(int r);
    wl = '0; wl[r] = 1'b1; we = 1'b0;
    @(posedge clk); #1;
    wl = '0;
    checks++;
    if (rdata !== model[r]) begin
      failures++; $display("FAIL read row %0d", r);
    end
  endtask

  initial begin
    wl = '0; we = 0; wbe = '0; wdata = '0;
    // initialise every row completely
    for (int r = 0; r < 128; r++)
      write_row(r, '1, {8{$urandom}});
    for (int r = 0; r < 128; r++) read_row(r);
    // random partial writes and reads
    for (int t = 0; t < 600; t++) begin
      int r;
      r = int'($urandom_range(0, 127));
      if ($urandom_range(0, 1) == 1)
        write_row(r, $urandom, {8{$urandom}});
      else
        read_row(r);
    end
    // rdata holds while idle; a write without wordline does nothing
    read_row(5);
    we = 1'b1; wbe = '1; wdata = '0; wl = '0;
    repeat (3) @(posedge clk);
    #1 we = 1'b0;
    checks++;
    if (rdata !== model[5]) begin failures++; $display("FAIL hold"); end
    for (int r = 0; r < 128; r++) read_row(r);
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
