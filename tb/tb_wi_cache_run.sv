// tb_wi_cache_run: parameterized random-traffic checker for one wi_cache
// configuration, used by tb_wi_cache_configs.
//
// It instantiates wi_cache with the given geometry and hit latency and drives
// random loads and stores on a footprint of 4 sets x (2*WAYS) tags, so that
// lines are replaced and dirty victims written back. Independent models: a
// reference memory image (every load and every written-back line is checked
// against it), a cache-state model with LRU order per set (predicts hit/miss
// and so the exact hit latency), a fast-hit buffer model holding one data-way word, and a
// lower-level memory with a 12-cycle read latency. Phases: plain, fast-hit
// buffer on, drowsy mode on (hit latency may then be one more), both on.
// Reports its check and failure counts and raises done at the end; it never
// calls $finish itself.
module tb_wi_cache_run #(
  parameter int CACHE_BYTES = 16384,
  parameter int WAYS        = 4,
  parameter int LINE_BYTES  = 32,
  parameter int HIT_LAT     = 2,
  parameter int WINDOW      = 200,
  parameter int N_REQ       = 1200
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int SETS      = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int OFF_W     = $clog2(LINE_BYTES);
  localparam int IDX_W     = $clog2(SETS);
  localparam int TAG_W     = 32 - OFF_W - IDX_W;
  localparam int WORD_B    = LINE_BYTES / WAYS;
  localparam int LINE_BITS = LINE_BYTES * 8;
  localparam int CPU_WORDS = LINE_BYTES / 4;
  localparam int MEM_LAT   = 12;
  localparam int WB_W      = $clog2(WORD_B);

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

  wi_cache #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES),
             .HIT_LATENCY(HIT_LAT), .DROWSY_WINDOW(WINDOW)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] refmem [int];
  logic [LINE_BITS-1:0] lmem [int];

  function automatic logic [31:0] init_word(logic [31:0] waddr);
    return (waddr * 32'h9E37_79B1) ^ 32'h0F0F_5A5A;
  endfunction

  function automatic logic [31:0] ref_rd(logic [31:0] addr);
    logic [31:0] wa = addr >> 2;
    return refmem.exists(int'(wa)) ? refmem[int'(wa)] : init_word(wa);
  endfunction

  function automatic logic [LINE_BITS-1:0] ref_line(logic [31:0] laddr);
    logic [LINE_BITS-1:0] l;
    for (int i = 0; i < CPU_WORDS; i++) l[i*32 +: 32] = ref_rd((laddr >> OFF_W << OFF_W) + 32'(4*i));
    return l;
  endfunction

  function automatic logic [LINE_BITS-1:0] mem_line(logic [31:0] laddr);
    logic [LINE_BITS-1:0] l;
    int key = int'(laddr >> OFF_W);
    if (lmem.exists(key)) return lmem[key];
    for (int i = 0; i < CPU_WORDS; i++) l[i*32 +: 32] = init_word((laddr >> 2) + 32'(i));
    return l;
  endfunction

  int rd_cnt = 0;
  logic [31:0] rd_addr;

  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (!rst_n) begin
      mem_req_ready <= 1'b0;
      rd_cnt = 0;
    end else begin
      if (rd_cnt > 0) begin
        rd_cnt--;
        if (rd_cnt == 0) begin
          mem_resp_valid <= 1'b1;
          mem_resp_rdata <= mem_line(rd_addr);
        end
      end
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_write) begin
          checks++;
          if (mem_req_wdata !== ref_line(mem_req_addr)) begin
            failures++; $display("FAIL [%0d-way %0dB] write-back %h", WAYS, LINE_BYTES, mem_req_addr);
          end
          lmem[int'(mem_req_addr >> OFF_W)] = mem_req_wdata;
        end else begin
          rd_addr = mem_req_addr;
          rd_cnt  = MEM_LAT;
        end
      end
      mem_req_ready <= ($urandom_range(0, 1) == 0);
    end
  end

  logic             m_valid [SETS][WAYS];
  logic [TAG_W-1:0] m_tag   [SETS][WAYS];
  logic             m_dirty [SETS][WAYS];
  int               m_order [SETS][WAYS];
  logic             fb_valid = 0;
  logic [31:0]      fb_waddr = 0;
  int               n_hit = 0, n_miss = 0, n_dirty = 0, n_fast = 0;

  function automatic void m_touch(int s, int w);
    int pos = 0;
    for (int i = 0; i < WAYS; i++) if (m_order[s][i] == w) pos = i;
    for (int i = pos; i > 0; i--) m_order[s][i] = m_order[s][i-1];
    m_order[s][0] = w;
  endfunction

  task automatic access(bit write, logic [31:0] addr, logic [31:0] wdata, logic [3:0] be);
    int s, hw, lat, exp_lat;
    logic [TAG_W-1:0] tag;
    bit hit, fast;
    logic [31:0] exp_rd;
    addr = {addr[31:2], 2'b00};
    s   = int'((addr >> OFF_W) & 32'(SETS - 1));
    tag = addr[31 -: TAG_W];
    hw  = -1;
    for (int w = 0; w < WAYS; w++) if (m_valid[s][w] && m_tag[s][w] == tag) hw = w;
    hit  = (hw >= 0);
    fast = cfg_fast_hit_en && !write && fb_valid && fb_waddr == (addr >> WB_W);
    exp_rd = ref_rd(addr);
    while (!cpu_req_ready) @(posedge clk);
    cpu_req_valid = 1; cpu_req_write = write; cpu_req_addr = addr;
    cpu_req_wdata = wdata; cpu_req_be = be;
    @(posedge clk);
    #1 cpu_req_valid = 0;
    lat = 1;
    while (!cpu_resp_valid && lat <= 500) begin
      @(posedge clk); #1;
      lat++;
    end
    if (write) begin
      logic [31:0] nv = exp_rd;
      for (int b = 0; b < 4; b++) if (be[b]) nv[b*8 +: 8] = wdata[b*8 +: 8];
      refmem[int'(addr >> 2)] = nv;
      if (fb_valid && fb_waddr == (addr >> WB_W)) fb_valid = 0;
    end else if (cfg_fast_hit_en && !fast) begin
      fb_valid = 1; fb_waddr = addr >> WB_W;
    end
    if (fast) begin
      exp_lat = 1; n_fast++;
    end else if (hit) begin
      m_touch(s, hw);
      if (write) m_dirty[s][hw] = 1;
      exp_lat = HIT_LAT + (cfg_fast_hit_en ? 1 : 0);
      n_hit++;
    end else begin
      int v = -1;
      for (int w = WAYS-1; w >= 0; w--) if (!m_valid[s][w]) v = w;
      if (v < 0) v = m_order[s][WAYS-1];
      if (m_valid[s][v] && m_dirty[s][v]) n_dirty++;
      m_valid[s][v] = 1; m_tag[s][v] = tag; m_dirty[s][v] = write;
      m_touch(s, v);
      exp_lat = -1;
      n_miss++;
    end
    checks++;
    if (lat > 500) begin
      failures++; $display("FAIL [%0d-way %0dB] no response", WAYS, LINE_BYTES);
    end else if (exp_lat > 0 && !(lat == exp_lat || (cfg_drowsy_en && lat == exp_lat + 1))) begin
      failures++;
      $display("FAIL [%0d-way %0dB] latency %0d expected %0d", WAYS, LINE_BYTES, lat, exp_lat);
    end
    if (!write) begin
      checks++;
      if (cpu_resp_rdata !== exp_rd) begin
        failures++;
        $display("FAIL [%0d-way %0dB] load %h got %h exp %h", WAYS, LINE_BYTES, addr,
                 cpu_resp_rdata, exp_rd);
      end
    end
    @(posedge clk); #1;
  endtask

  function automatic logic [31:0] rand_addr();
    logic [31:0] a;
    int t = int'($urandom_range(0, 2*WAYS - 1));
    int s = int'($urandom_range(0, 3)) * 5 % SETS;
    a = (32'(t) * 32'h0001_3579) << (OFF_W + IDX_W);
    a = a | (32'(s) << OFF_W) | (32'($urandom_range(0, CPU_WORDS - 1)) << 2);
    return a;
  endfunction

  task automatic traffic(int n);
    for (int i = 0; i < n; i++) begin
      bit wr = ($urandom_range(0, 3) == 0);
      logic [31:0] a;
      a = ($urandom_range(0, 3) == 0 && fb_valid) ? (fb_waddr << WB_W) : rand_addr();
      access(wr, a, $urandom, wr ? 4'($urandom_range(1, 15)) : 4'h0);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        m_valid[s][w] = 0; m_dirty[s][w] = 0; m_tag[s][w] = '0; m_order[s][w] = w;
      end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    traffic(N_REQ);
    cfg_fast_hit_en = 1;
    traffic(N_REQ);
    cfg_fast_hit_en = 0; fb_valid = 0;
    cfg_drowsy_en = 1;
    traffic(N_REQ);
    cfg_fast_hit_en = 1;
    traffic(N_REQ);
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_dirty == 0 || n_fast == 0) begin
      failures++;
      $display("FAIL [%0d-way %0dB] hits %0d misses %0d dirty %0d fast %0d", WAYS, LINE_BYTES,
               n_hit, n_miss, n_dirty, n_fast);
    end
    $display("config %0dB %0d-way %0dB-line hit=%0d: hits %0d misses %0d dirty %0d fast %0d",
             CACHE_BYTES, WAYS, LINE_BYTES, HIT_LAT, n_hit, n_miss, n_dirty, n_fast);
    done = 1;
  end
endmodule
