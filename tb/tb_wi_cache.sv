// tb_wi_cache: end-to-end test of the word-interleaved cache at its default
// size (16 KB, 4 ways, 32-byte lines, 2-cycle hits, 2000-cycle drowsy window).
//
// The testbench keeps its own models, written independently of the RTL:
//  - refmem: the architectural memory image, one 32-bit word per address,
//    updated by every store the test issues; loads must return it.
//  - a cache-state model (per set: valid, tag, dirty per line slot and an
//    LRU recency list) that predicts hit, miss and dirty victim of every
//    request, and so the exact latency of every hit.
//  - a one-entry fast-hit buffer model.
//  - a lower-level memory (fixed 12-cycle read latency, random request
//    acceptance); every written-back line is compared with refmem.
// Phases: (A) plain WI cache, random loads and stores on a small footprint
// that forces conflicts and dirty evictions; (B) fast-hit buffer on;
// (C) drowsy mode on, with directed wake-up cases (a drowsy row costs one
// cycle; in the WI cache a second word of the same line sits in another data
// way and costs its own wake-up) and random traffic; (D) everything on.
// Checked on the side: a hit activates exactly one data way, only line
// transfers (write-back read, refill write) activate all of them, and the
// one-way activations are exactly one read per load that reaches the array
// plus one write per store hit (a store reads no data while its tag is
// checked).
// Every mechanism is counted and must have happened at least once.
module tb_wi_cache;
  import wi_pkg::*;

  localparam int SETS = 128, WAYS = 4, HIT_LAT = 2, MEM_LAT = 12;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic cfg_fast_hit_en = 0, cfg_drowsy_en = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
  logic [31:0] cpu_req_addr = 0, cpu_req_wdata = 0;
  logic [3:0]  cpu_req_be = 0;
  logic cpu_resp_valid;
  logic [31:0] cpu_resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_write;
  logic [31:0] mem_req_addr;
  logic [255:0] mem_req_wdata;
  logic mem_resp_valid;
  logic [255:0] mem_resp_rdata;
  logic [3:0] data_way_en;
  logic [SETS*WAYS-1:0] drowsy_rows;
  logic ev_read_hit, ev_write_hit, ev_read_miss, ev_write_miss, ev_dirty_victim;
  logic ev_fast_hit, ev_wake, ev_sleep;

  wi_cache dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ memories
  logic [31:0] refmem [int];
  logic [255:0] lmem [int];

  function automatic logic [31:0] init_word(logic [31:0] waddr);
    return (waddr * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] ref_rd(logic [31:0] addr);
    logic [31:0] wa = addr >> 2;
    return refmem.exists(int'(wa)) ? refmem[int'(wa)] : init_word(wa);
  endfunction

  function automatic logic [255:0] ref_line(logic [31:0] laddr);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = ref_rd({laddr[31:5], 5'b0} + 32'(4*i));
    return l;
  endfunction

  function automatic logic [255:0] mem_line(logic [31:0] laddr);
    logic [255:0] l;
    int key = int'(laddr >> 5);
    if (lmem.exists(key)) return lmem[key];
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = init_word((laddr >> 2) + 32'(i));
    return l;
  endfunction

  // Lower-level memory: random acceptance, fixed read latency.
  int   rd_pending_cnt = 0;
  logic [31:0] rd_pending_addr;
  int   n_wb = 0, n_fill = 0;

  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (!rst_n) begin
      mem_req_ready  <= 1'b0;
      rd_pending_cnt = 0;
    end else begin
      if (rd_pending_cnt > 0) begin
        rd_pending_cnt--;
        if (rd_pending_cnt == 0) begin
          mem_resp_valid <= 1'b1;
          mem_resp_rdata <= mem_line(rd_pending_addr);
        end
      end
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_write) begin
          n_wb++;
          checks++;
          if (mem_req_wdata !== ref_line(mem_req_addr)) begin
            failures++;
            $display("FAIL write-back data of line %h", mem_req_addr);
          end
          lmem[int'(mem_req_addr >> 5)] = mem_req_wdata;
        end else begin
          n_fill++;
          rd_pending_addr = mem_req_addr;
          rd_pending_cnt  = MEM_LAT;
        end
      end
      mem_req_ready <= ($urandom_range(0, 2) == 0);
    end
  end

  // ------------------------------------------------------ cache-state model
  logic        m_valid [SETS][WAYS];
  logic [19:0] m_tag   [SETS][WAYS];
  logic        m_dirty [SETS][WAYS];
  int          m_order [SETS][WAYS];   // recency, [0] most recent
  logic        fb_valid;
  logic [28:0] fb_waddr;

  function automatic void m_touch(int s, int w);
    int pos = 0;
    for (int i = 0; i < WAYS; i++) if (m_order[s][i] == w) pos = i;
    for (int i = pos; i > 0; i--) m_order[s][i] = m_order[s][i-1];
    m_order[s][0] = w;
  endfunction

  // Mechanism counters.
  int n_rd_hit = 0, n_wr_hit = 0, n_rd_miss = 0, n_wr_miss = 0, n_dirty = 0;
  int n_fast = 0, n_fh_penalty = 0, n_wake_lat = 0, n_sleep = 0, n_wake_ev = 0;
  int n_all_way_cycles = 0, n_one_way_cycles = 0, n_bad_way_cycles = 0;
  int exp_wb = 0, exp_fill = 0, exp_one = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev_sleep) n_sleep++;
    if (ev_wake) n_wake_ev++;
    case ($countones(data_way_en))
      0: ;
      1: n_one_way_cycles++;
      4: n_all_way_cycles++;
      default: n_bad_way_cycles++;
    endcase
  end

  // One request; returns its latency in cycles after acceptance.
  // allow_wake: the latency may be one larger because of a drowsy row.
  task automatic access(bit write, logic [31:0] addr, logic [31:0] wdata, logic [3:0] be,
                        bit allow_wake, output int lat);
    int s, hw;
    logic [19:0] tag;
    bit hit, fast;
    logic [31:0] exp_rd;
    int exp_lat;

    addr = {addr[31:2], 2'b00};
    s   = int'(addr[11:5]);
    tag = addr[31:12];
    hw  = -1;
    for (int w = 0; w < WAYS; w++) if (m_valid[s][w] && m_tag[s][w] == tag) hw = w;
    hit  = (hw >= 0);
    fast = cfg_fast_hit_en && !write && fb_valid && fb_waddr == addr[31:3];
    exp_rd = ref_rd(addr);

    // drive
    while (!cpu_req_ready) @(posedge clk);
    cpu_req_valid = 1; cpu_req_write = write; cpu_req_addr = addr;
    cpu_req_wdata = wdata; cpu_req_be = be;
    @(posedge clk);
    #1 cpu_req_valid = 0;
    lat = 1;
    while (!cpu_resp_valid) begin
      @(posedge clk); #1;
      lat++;
      if (lat > 500) break;
    end

    // update models
    if (write) begin
      logic [31:0] nv = exp_rd;
      for (int b = 0; b < 4; b++) if (be[b]) nv[b*8 +: 8] = wdata[b*8 +: 8];
      refmem[int'(addr >> 2)] = nv;
      if (fb_valid && fb_waddr == addr[31:3]) fb_valid = 0;
    end else if (cfg_fast_hit_en && !fast) begin
      fb_valid = 1; fb_waddr = addr[31:3];
    end

    if (!fast && !write) exp_one++;
    if (hit && write) exp_one++;
    if (fast) begin
      n_fast++;
      exp_lat = 1;
    end else if (hit) begin
      m_touch(s, hw);
      if (write) begin m_dirty[s][hw] = 1; n_wr_hit++; end
      else n_rd_hit++;
      exp_lat = HIT_LAT + (cfg_fast_hit_en ? 1 : 0);
      if (cfg_fast_hit_en) n_fh_penalty++;
    end else begin
      int v = -1;
      for (int w = WAYS-1; w >= 0; w--) if (!m_valid[s][w]) v = w;
      if (v < 0) v = m_order[s][WAYS-1];
      if (m_valid[s][v] && m_dirty[s][v]) begin n_dirty++; exp_wb++; end
      exp_fill++;
      m_valid[s][v] = 1; m_tag[s][v] = tag; m_dirty[s][v] = write;
      m_touch(s, v);
      if (write) n_wr_miss++; else n_rd_miss++;
      exp_lat = -1;
    end

    checks++;
    if (lat > 500) begin
      failures++; $display("FAIL no response to %s %h", write ? "store" : "load", addr);
    end else if (exp_lat > 0 && !(lat == exp_lat || (allow_wake && lat == exp_lat + 1))) begin
      failures++;
      $display("FAIL latency %0d, expected %0d (%s %h hit=%0d fast=%0d)", lat, exp_lat,
               write ? "store" : "load", addr, hit, fast);
    end else if (exp_lat < 0 && lat < HIT_LAT + MEM_LAT) begin
      failures++; $display("FAIL miss answered in %0d cycles", lat);
    end
    if (exp_lat > 0 && allow_wake && lat == exp_lat + 1) n_wake_lat++;
    if (!write) begin
      checks++;
      if (cpu_resp_rdata !== exp_rd) begin
        failures++;
        $display("FAIL load %h got %h expected %h", addr, cpu_resp_rdata, exp_rd);
      end
    end
    @(posedge clk); #1;
  endtask

  // Random address on a footprint of 4 sets x 8 tags: forces replacements.
  function automatic logic [31:0] rand_addr();
    logic [31:0] a;
    a = '0;
    a[31:12] = 20'($urandom_range(0, 7)) * 20'h00135;
    a[11:5]  = 7'($urandom_range(0, 3)) * 7'd37;
    a[4:2]   = 3'($urandom_range(0, 7));
    return a;
  endfunction

  task automatic random_traffic(int n, bit allow_wake);
    int lat;
    for (int i = 0; i < n; i++) begin
      bit wr = ($urandom_range(0, 3) == 0);
      logic [31:0] a;
      // revisit the same word now and then so fast hits happen
      a = ($urandom_range(0, 3) == 0 && fb_valid) ? {fb_waddr, 1'b0, 2'b00} : rand_addr();
      access(wr, a, $urandom, wr ? 4'($urandom_range(1, 15)) : 4'h0, allow_wake, lat);
    end
  endtask

  int lat;
  int sleeps_before;

  initial begin
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        m_valid[s][w] = 0; m_dirty[s][w] = 0; m_tag[s][w] = 0; m_order[s][w] = w;
      end
    fb_valid = 0; fb_waddr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // (A) plain WI cache
    random_traffic(1500, 0);

    // (B) fast-hit buffer
    cfg_fast_hit_en = 1;
    random_traffic(1500, 0);
    cfg_fast_hit_en = 0; fb_valid = 0;
    @(posedge clk); #1;

    // (C) drowsy mode: directed wake-up cases
    cfg_drowsy_en = 1;
    access(0, 32'h0000_1040, 0, 0, 0, lat);          // bring the line in (awake after fill)
    repeat (2100) @(posedge clk);                      // a sleep has happened since
    #1;
    access(0, 32'h0000_1040, 0, 0, 1, lat);            // same word: must wake its row
    checks++;
    if (lat != HIT_LAT + 1) begin failures++; $display("FAIL drowsy hit latency %0d", lat); end
    else n_wake_lat++;
    sleeps_before = n_sleep;
    access(0, 32'h0000_1048, 0, 0, 1, lat);            // next word: another data way
    checks++;
    if (n_sleep == sleeps_before && lat != HIT_LAT + 1) begin
      failures++; $display("FAIL second word of line did not need its own wake-up (%0d)", lat);
    end
    sleeps_before = n_sleep;
    access(0, 32'h0000_1048, 0, 0, 1, lat);            // again: row awake now
    checks++;
    if (n_sleep == sleeps_before && lat != HIT_LAT) begin
      failures++; $display("FAIL awake row still paid a wake-up (%0d)", lat);
    end
    random_traffic(1500, 1);

    // (D) everything on
    cfg_fast_hit_en = 1;
    random_traffic(1500, 1);

    // side checks
    checks += 3;
    if (n_bad_way_cycles != 0) begin
      failures++; $display("FAIL %0d cycles with 2 or 3 data ways active", n_bad_way_cycles);
    end
    if (n_all_way_cycles != exp_wb + exp_fill) begin
      failures++;
      $display("FAIL all-way activations %0d, expected %0d", n_all_way_cycles, exp_wb + exp_fill);
    end
    checks++;
    if (n_one_way_cycles != exp_one) begin
      failures++;
      $display("FAIL one-way activations %0d, expected %0d", n_one_way_cycles, exp_one);
    end
    if (n_wb != exp_wb || n_fill != exp_fill) begin
      failures++; $display("FAIL write-backs %0d/%0d fills %0d/%0d", n_wb, exp_wb, n_fill, exp_fill);
    end

    $display("mechanisms: read_hit=%0d write_hit=%0d read_miss=%0d write_miss=%0d dirty_victim=%0d",
             n_rd_hit, n_wr_hit, n_rd_miss, n_wr_miss, n_dirty);
    $display("            fast_hit=%0d buffer_miss_penalty=%0d wake_latency=%0d wake=%0d sleep=%0d",
             n_fast, n_fh_penalty, n_wake_lat, n_wake_ev, n_sleep);
    $display("            one_way_cycles=%0d all_way_cycles=%0d", n_one_way_cycles, n_all_way_cycles);
    begin
      int m [11];
      m = '{n_rd_hit, n_wr_hit, n_rd_miss, n_wr_miss, n_dirty, n_fast, n_fh_penalty,
            n_wake_lat, n_wake_ev, n_sleep, n_one_way_cycles};
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
