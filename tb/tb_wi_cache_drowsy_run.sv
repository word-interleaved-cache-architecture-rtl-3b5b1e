// tb_wi_cache_drowsy_run: one run of the default WI data cache under a fixed
// request stream, for the drowsy update-window comparison in
// tb_wi_cache_drowsy_windows.
//
// The stream comes from an xorshift generator with a fixed seed, and the
// lower-level memory is always ready with a 12-cycle read latency, so every
// instance sees exactly the same requests in the same order; only the drowsy
// settings differ. The stream has locality: half of the requests take the
// next word of the previous line, most of the others pick one of 256 hot
// lines (8 KB), and one in 16 picks a line from a 1 MB region, which causes
// misses and dirty victims. A quarter of the requests are stores; between
// requests the processor idles 0 to 3 cycles.
//
// Checked here: every load against a reference memory image, every
// written-back line against it, and the number of periodic sleeps against
// the run length (one per WINDOW cycles, +-1). Reported for the comparison:
// cycles taken, wakes, and the sum over all cycles of the number of drowsy
// rows (divide by cycles x rows for the average drowsy fraction).
module tb_wi_cache_drowsy_run #(
  parameter int WINDOW    = 2000,
  parameter bit DROWSY_ON = 1'b1,
  parameter int N_REQ     = 40000
) (
  output bit      done,
  output int      checks,
  output int      failures,
  output longint  cycles,
  output longint  wakes,
  output longint  drowsy_sum
);
  localparam int SETS = 128, WAYS = 4, LINE_BITS = 256, MEM_LAT = 12;

  logic clk = 0, rst_n = 0;
  logic cfg_fast_hit_en = 0, cfg_drowsy_en = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
  logic [31:0] cpu_req_addr = 0, cpu_req_wdata = 0;
  logic [3:0]  cpu_req_be = 0;
  logic cpu_resp_valid;
  logic [31:0] cpu_resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_write;
  logic [31:0] mem_req_addr;
  logic [LINE_BITS-1:0] mem_req_wdata, mem_resp_rdata;
  logic mem_resp_valid;
  logic [WAYS-1:0] data_way_en;
  logic [SETS*WAYS-1:0] drowsy_rows;
  logic ev_read_hit, ev_write_hit, ev_read_miss, ev_write_miss, ev_dirty_victim;
  logic ev_fast_hit, ev_wake, ev_sleep;

  wi_cache #(.DROWSY_WINDOW(WINDOW)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] refmem [int];
  logic [LINE_BITS-1:0] lmem [int];

  function automatic logic [31:0] init_word(logic [31:0] waddr);
    return (waddr * 32'h9E37_79B1) ^ 32'h3C3C_A5A5;
  endfunction

  function automatic logic [31:0] ref_rd(logic [31:0] addr);
    int key = int'(addr >> 2);
    return refmem.exists(key) ? refmem[key] : init_word(addr >> 2);
  endfunction

  function automatic logic [LINE_BITS-1:0] ref_line(logic [31:0] a);
    logic [LINE_BITS-1:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = ref_rd({a[31:5], 5'b0} + 32'(4*i));
    return l;
  endfunction

  function automatic logic [LINE_BITS-1:0] mem_line(logic [31:0] a);
    logic [LINE_BITS-1:0] l;
    int key = int'(a >> 5);
    if (lmem.exists(key)) return lmem[key];
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = init_word(32'({a[31:5], 3'(i)}));
    return l;
  endfunction

  // Lower-level memory: always ready, line reads answered after MEM_LAT cycles.
  int          rd_cnt = 0;
  logic [31:0] rd_addr;
  longint      n_sleep = 0;
  bit          counting = 0;

  assign mem_req_ready = 1'b1;

  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (rst_n) begin
      if (rd_cnt > 0) begin
        rd_cnt--;
        if (rd_cnt == 0) begin
          mem_resp_valid <= 1'b1;
          mem_resp_rdata <= mem_line(rd_addr);
        end
      end
      if (mem_req_valid) begin
        if (mem_req_write) begin
          checks++;
          if (mem_req_wdata !== ref_line(mem_req_addr)) begin
            failures++; $display("FAIL [window %0d] write-back %h", WINDOW, mem_req_addr);
          end
          lmem[int'(mem_req_addr >> 5)] = mem_req_wdata;
        end else begin
          rd_addr = mem_req_addr;
          rd_cnt  = MEM_LAT;
        end
      end
    end
    if (counting) begin
      cycles++;
      drowsy_sum += longint'($countones(drowsy_rows));
      if (ev_wake)  wakes++;
      if (ev_sleep) n_sleep++;
    end
  end

  // Fixed-seed xorshift request stream.
  logic [31:0] rng = 32'h1234_5678;
  function automatic logic [31:0] next_rand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  task automatic access(bit write, logic [31:0] addr, logic [31:0] wdata, logic [3:0] be);
    logic [31:0] exp_rd = ref_rd(addr);
    int n = 0;
    cpu_req_valid = 1; cpu_req_write = write; cpu_req_addr = addr;
    cpu_req_wdata = wdata; cpu_req_be = be;
    @(posedge clk);
    while (!cpu_req_ready) @(posedge clk);
    #1 cpu_req_valid = 0;
    while (!cpu_resp_valid && n < 200) begin
      @(posedge clk); #1;
      n++;
    end
    if (write) begin
      logic [31:0] nv = exp_rd;
      for (int b = 0; b < 4; b++) if (be[b]) nv[b*8 +: 8] = wdata[b*8 +: 8];
      refmem[int'(addr >> 2)] = nv;
    end
    checks++;
    if (n >= 200) begin
      failures++; $display("FAIL [window %0d] no response to %h", WINDOW, addr);
    end else if (!write && cpu_resp_rdata !== exp_rd) begin
      failures++;
      $display("FAIL [window %0d] load %h got %h exp %h", WINDOW, addr, cpu_resp_rdata, exp_rd);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] line, rv;
    logic [2:0]  word;
    line = 0; word = 0;
    checks = 0; failures = 0; done = 0;
    cycles = 0; wakes = 0; drowsy_sum = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cfg_drowsy_en = DROWSY_ON;
    counting = 1;
    for (int i = 0; i < N_REQ; i++) begin
      bit wr;
      rv = next_rand();
      if (rv[0]) begin
        word = word + 3'd1;
      end else begin
        word = 3'(rv[3:1]);
        line = (rv[7:4] == 0) ? 32'h0010_0000 + 32'(rv[20:8])  // 1 MB region
                             : 32'h0000_0800 + 32'(rv[15:8]); // 256 hot lines
      end
      rv = next_rand();
      wr = (rv[1:0] == 0);
      access(wr, {line[26:0], word, 2'b00}, next_rand(), wr ? 4'hF : 4'h0);
      repeat (int'(rv[3:2])) @(posedge clk);
    end
    counting = 0;
    if (DROWSY_ON) begin
      longint exp_sleep;
      exp_sleep = cycles / longint'(WINDOW);
      checks++;
      if (n_sleep < exp_sleep - 1 || n_sleep > exp_sleep + 1) begin
        failures++;
        $display("FAIL [window %0d] %0d sleeps in %0d cycles", WINDOW, n_sleep, cycles);
      end
    end
    done = 1;
  end
endmodule
