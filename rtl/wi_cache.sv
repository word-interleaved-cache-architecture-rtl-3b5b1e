// wi_cache: word-interleaved (WI) set-associative L1 cache.
//
// Idea. A conventional n-way cache keeps each line in one way and, to keep
// the hit time short, reads the set's line from every way in parallel, then
// throws all but one away. The WI cache keeps the same tags, the same hit
// rate and the same SRAMs, but spreads each line over the ways: word i
// (LINE_BYTES/WAYS bytes) of every line of a set is stored in data way i, in
// the column ("line slot") that the tag array assigns to the line. The data
// way an access needs is then known from the address offset alone, before
// the tags are compared, so a load or a word store activates one data way
// instead of all of them. Whole-line transfers (write-back of a dirty victim,
// refill) touch all data ways, which is rare. A load reads its data way
// while the tags are compared; a store reads no data and writes its word
// into the hit slot once the hit is known (on a miss, into the refill).
//
// Structure. wi_offset_decoder picks the data way from the offset MSBs,
// wi_set_decoder the row, wi_wordline_driver ANDs the two into per-way
// wordlines for the WAYS wi_data_array instances. The tag side (wi_tag_array,
// wi_tag_compare, wi_lru) is that of a conventional cache. Each data way has
// its own small wi_way_mux which picks the hit line's word out of the row;
// wi_byte_select extracts the 4-byte processor word. Two optional mechanisms,
// switched at run time: a one-word fast-hit buffer (wi_fast_hit_buffer) and
// periodic drowsy mode of data-way rows (wi_drowsy_ctrl).
//
// Processor port: valid/ready request (ready only when idle), one response
// pulse per request (cpu_resp_valid; stores are acknowledged with zero data).
// Accesses are 4-byte aligned; byte enables select the bytes of a store.
// Lower-level port: one request at a time, whole lines; mem_req_* is held
// until mem_req_ready; a read is answered by one mem_resp_valid pulse, a
// write needs no answer. Write-back, write-allocate, LRU replacement.
//
// Timing, counted from the cycle a request is accepted (cycle 0):
//   read or write hit                     HIT_LATENCY (1 or 2)
//   fast hit (buffer on, read)            1
//   buffer on but no fast hit             HIT_LATENCY + 1
//   needed data-way row drowsy            HIT_LATENCY + 1 (wake-up cycle)
//   miss                                  line transfers + a few cycles
// When the buffer is on and the row is drowsy as well, the wake-up overlaps
// the buffer-miss cycle. Fast hits do not update the LRU state.
//
// Taken from the design description: the data placement, offset decoding,
// one-way reads and word writes, all-way line writes, write-back with dirty
// bits, write allocate, LRU, 16 KB / 4 ways / 32-byte lines, the 2-cycle data
// cache hit latency (1 cycle for an instruction cache), the fast-hit buffer
// holding one word with its address, the drowsy policy (all rows drowsy every
// 2000 cycles, one-cycle wake-up, only the needed row woken). Own choices:
// 32-bit addresses, the handshakes, the state sequence, 4-byte processor
// accesses, synchronous active-low reset, and the stated overlaps above.
//
// Event outputs (one-cycle pulses) let a user count the accesses that the
// energy model distinguishes; data_way_en shows which data ways were
// activated in a cycle.
module wi_cache
  import wi_pkg::*;
#(
  parameter int unsigned CACHE_BYTES   = 16384,
  parameter int unsigned WAYS          = 4,
  parameter int unsigned LINE_BYTES    = 32,
  parameter int unsigned ADDR_W        = 32,
  parameter int unsigned HIT_LATENCY   = 2,
  parameter int unsigned DROWSY_WINDOW = 2000,
  localparam int unsigned WORD_BYTES = LINE_BYTES / WAYS,
  localparam int unsigned SETS       = CACHE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8,
  localparam int unsigned CPU_BITS   = CPU_BYTES * 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_fast_hit_en,
  input  logic                  cfg_drowsy_en,
  // processor side
  input  logic                  cpu_req_valid,
  output logic                  cpu_req_ready,
  input  logic                  cpu_req_write,
  input  logic [ADDR_W-1:0]     cpu_req_addr,
  input  logic [CPU_BITS-1:0]   cpu_req_wdata,
  input  logic [CPU_BYTES-1:0]  cpu_req_be,
  output logic                  cpu_resp_valid,
  output logic [CPU_BITS-1:0]   cpu_resp_rdata,
  // lower level
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_write,
  output logic [ADDR_W-1:0]     mem_req_addr,
  output logic [LINE_BITS-1:0]  mem_req_wdata,
  input  logic                  mem_resp_valid,
  input  logic [LINE_BITS-1:0]  mem_resp_rdata,
  // activity
  output logic [WAYS-1:0]       data_way_en,
  output logic [SETS*WAYS-1:0]  drowsy_rows,
  output logic                  ev_read_hit,
  output logic                  ev_write_hit,
  output logic                  ev_read_miss,
  output logic                  ev_write_miss,
  output logic                  ev_dirty_victim,
  output logic                  ev_fast_hit,
  output logic                  ev_wake,
  output logic                  ev_sleep
);

  localparam int unsigned WORD_BITS = WORD_BYTES * 8;
  localparam int unsigned ROW_BYTES = WAYS * WORD_BYTES;
  localparam int unsigned ROW_BITS  = ROW_BYTES * 8;
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES);
  localparam int unsigned WB_W      = $clog2(WORD_BYTES);
  localparam int unsigned WAY_W     = $clog2(WAYS);
  localparam int unsigned IDX_W     = $clog2(SETS);
  localparam int unsigned TAG_W     = ADDR_W - IDX_W - OFF_W;

  // The WI placement needs at least one processor word per way and line.
  if (WAYS < 2 || WORD_BYTES < CPU_BYTES || LINE_BYTES % WAYS != 0) begin : g_bad_geometry
    $error("wi_cache: LINE_BYTES must be at least CPU_BYTES*WAYS, WAYS >= 2");
  end
  if (HIT_LATENCY < 1 || HIT_LATENCY > 2) begin : g_bad_latency
    $error("wi_cache: HIT_LATENCY must be 1 or 2");
  end

  // ---------------------------------------------------------------- request
  wi_state_e state_q, state_d;

  logic                 req_write_q;
  logic [ADDR_W-1:0]    req_addr_q;
  logic [CPU_BITS-1:0]  req_wdata_q;
  logic [CPU_BYTES-1:0] req_be_q;
  logic [WAY_W-1:0]     victim_q;
  logic [TAG_W-1:0]     victim_tag_q;
  logic                 resp_valid_q;
  logic [CPU_BITS-1:0]  resp_rdata_q;

  logic accept;
  assign cpu_req_ready = (state_q == S_IDLE);
  assign accept        = cpu_req_valid && cpu_req_ready;

  // Address that drives the arrays this cycle: the incoming request while
  // idle, the stored one afterwards.
  logic [ADDR_W-1:0] cur_addr;
  logic [TAG_W-1:0]  req_tag;
  logic [IDX_W-1:0]  cur_idx, req_idx;
  logic [WAY_W-1:0]  cur_wsel, req_wsel;

  always_comb begin
    cur_addr = (state_q == S_IDLE) ? cpu_req_addr : req_addr_q;
    cur_idx  = cur_addr[OFF_W +: IDX_W];
    cur_wsel = cur_addr[WB_W +: WAY_W];
    req_tag  = req_addr_q[ADDR_W-1 -: TAG_W];
    req_idx  = req_addr_q[OFF_W +: IDX_W];
    req_wsel = req_addr_q[WB_W +: WAY_W];
  end

  // ------------------------------------------------------- fast-hit buffer
  logic                 fh_hit;
  logic [WORD_BITS-1:0] fh_word;
  logic                 fh_load;
  logic [WORD_BITS-1:0] fh_load_data;
  logic                 fast_hit;

  wi_fast_hit_buffer #(.ADDR_W(ADDR_W), .WORD_BYTES(WORD_BYTES)) u_fhb (
    .clk        (clk),
    .rst_n      (rst_n),
    .lookup_addr(cpu_req_addr),
    .hit        (fh_hit),
    .rdata      (fh_word),
    .load_en    (fh_load),
    .load_addr  (req_addr_q),
    .load_data  (fh_load_data),
    .inval_en   (accept && cpu_req_write),
    .inval_addr (cpu_req_addr),
    .flush      (!cfg_fast_hit_en)
  );

  assign fast_hit = accept && cfg_fast_hit_en && !cpu_req_write && fh_hit;

  // ---------------------------------------------------------- drowsy rows
  logic            wake_en;
  logic            wake_real;    // wake_en on a row that is actually drowsy
  logic [WAYS-1:0] wake_ways;
  logic            row_drowsy;   // the row a one-way access needs
  logic            set_drowsy;   // any row of the set (line transfers)
  logic            sleep_pulse;

  wi_drowsy_ctrl #(.SETS(SETS), .WAYS(WAYS), .WINDOW(DROWSY_WINDOW)) u_drowsy (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (cfg_drowsy_en),
    .hold       (state_q != S_IDLE),
    .wake_en    (wake_en),
    .wake_set   (cur_idx),
    .wake_ways  (wake_ways),
    .drowsy     (drowsy_rows),
    .sleep_pulse(sleep_pulse)
  );

  always_comb begin
    row_drowsy = drowsy_rows[int'(cur_idx)*WAYS + int'(cur_wsel)];
    set_drowsy = |drowsy_rows[cur_idx*WAYS +: WAYS];
  end

  // ------------------------------------------------------------ tag side
  logic [WAYS-1:0][TAG_W-1:0] tag_rd;
  logic [WAYS-1:0]            valid_rd, dirty_rd, hit_vec;
  logic                       hit;
  logic [WAY_W-1:0]           hit_way, lru_victim;
  logic                       tag_rd_en;
  logic                       tag_wr_en, tag_wr_dirty;
  logic [WAY_W-1:0]           tag_wr_way;
  logic                       lru_upd;
  logic [WAY_W-1:0]           lru_upd_way;

  wi_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_en   (tag_rd_en),
    .rd_set  (cur_idx),
    .rd_tag  (tag_rd),
    .rd_valid(valid_rd),
    .rd_dirty(dirty_rd),
    .wr_en   (tag_wr_en),
    .wr_set  (req_idx),
    .wr_way  (tag_wr_way),
    .wr_tag  (req_tag),
    .wr_valid(1'b1),
    .wr_dirty(tag_wr_dirty)
  );

  wi_tag_compare #(.WAYS(WAYS), .TAG_W(TAG_W)) u_cmp (
    .way_tag  (tag_rd),
    .way_valid(valid_rd),
    .req_tag  (req_tag),
    .hit_vec  (hit_vec),
    .hit      (hit),
    .hit_way  (hit_way)
  );

  wi_lru #(.SETS(SETS), .WAYS(WAYS)) u_lru (
    .clk         (clk),
    .rst_n       (rst_n),
    .victim_set  (req_idx),
    .victim_valid(valid_rd),
    .victim_way  (lru_victim),
    .upd_en      (lru_upd),
    .upd_set     (req_idx),
    .upd_way     (lru_upd_way)
  );

  // ----------------------------------------------------------- data side
  logic                              one_way_acc;  // read or word write
  logic                              all_way_acc;  // line read or line write
  logic                              data_we;
  logic [WAYS-1:0]                   off_way_en, way_sel;
  logic [SETS-1:0]                   set_sel;
  logic [WAYS-1:0][SETS-1:0]         wl;
  logic [WAYS-1:0][ROW_BYTES-1:0]    way_wbe;
  logic [WAYS-1:0][ROW_BITS-1:0]     way_wdata;
  logic [WAYS-1:0][ROW_BITS-1:0]     way_rdata;
  logic [WAYS-1:0][WORD_BITS-1:0]    way_word;
  logic [WAYS-1:0]                   mux_en;
  logic [WAY_W-1:0]                  mux_sel;
  logic [WORD_BITS-1:0]              rd_word;

  wi_offset_decoder #(.WAYS(WAYS)) u_offdec (
    .en    (one_way_acc),
    .sel   (cur_wsel),
    .way_en(off_way_en)
  );

  assign way_sel     = all_way_acc ? '1 : off_way_en;
  assign data_way_en = way_sel;

  wi_set_decoder #(.SETS(SETS)) u_setdec (
    .en     (one_way_acc || all_way_acc),
    .idx    (cur_idx),
    .set_sel(set_sel)
  );

  wi_wordline_driver #(.SETS(SETS), .WAYS(WAYS)) u_wld (
    .set_sel(set_sel),
    .way_sel(way_sel),
    .wl     (wl)
  );

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    wi_data_array #(.SETS(SETS), .WAYS(WAYS), .WORD_BYTES(WORD_BYTES)) u_data (
      .clk  (clk),
      .wl   (wl[w]),
      .we   (data_we),
      .wbe  (way_wbe[w]),
      .wdata(way_wdata[w]),
      .rdata(way_rdata[w])
    );
    wi_way_mux #(.WAYS(WAYS), .WORD_BITS(WORD_BITS)) u_mux (
      .en  (mux_en[w]),
      .sel (mux_sel),
      .row (way_rdata[w]),
      .word(way_word[w])
    );
  end

  // The small muxes share one output bus; only enabled ones drive it.
  always_comb begin
    rd_word = '0;
    for (int unsigned w = 0; w < WAYS; w++) rd_word = rd_word | way_word[w];
  end

  // Processor word inside a cache word, both directions.
  logic [CPU_BITS-1:0]   rd_cpu, fh_cpu, fill_cpu;
  logic [WORD_BITS-1:0]  st_word;
  logic [WORD_BYTES-1:0] st_be;
  logic [WORD_BITS-1:0]  fill_word;
  logic [LINE_BITS-1:0]  fill_line;

  wi_byte_select #(.WORD_BYTES(WORD_BYTES), .CPU_BYTES(CPU_BYTES)) u_bsel_rd (
    .byte_off  (req_addr_q[WB_W-1:0]),
    .word_rd   (rd_word),
    .cpu_rdata (rd_cpu),
    .cpu_wdata (req_wdata_q),
    .cpu_be    (req_be_q),
    .word_wdata(st_word),
    .word_be   (st_be)
  );

  wi_byte_select #(.WORD_BYTES(WORD_BYTES), .CPU_BYTES(CPU_BYTES)) u_bsel_fh (
    .byte_off  (cpu_req_addr[WB_W-1:0]),
    .word_rd   (fh_word),
    .cpu_rdata (fh_cpu),
    .cpu_wdata ('0),
    .cpu_be    ('0),
    .word_wdata(),
    .word_be   ()
  );

  // Refill line with a write-allocated store merged in.
  always_comb begin
    fill_line = mem_resp_rdata;
    if (req_write_q)
      for (int unsigned b = 0; b < WORD_BYTES; b++)
        if (st_be[b])
          fill_line[(req_wsel*WORD_BYTES + b)*8 +: 8] = st_word[b*8 +: 8];
    fill_word = fill_line[req_wsel*WORD_BITS +: WORD_BITS];
    fill_cpu  = fill_word[int'(req_addr_q[WB_W-1:0]) / CPU_BYTES * CPU_BITS +: CPU_BITS];
  end

  // Victim line for write-back: word j of the victim comes from data way j.
  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++)
      mem_req_wdata[w*WORD_BITS +: WORD_BITS] = way_word[w];
  end

  // ---------------------------------------------------------- controller
  logic lookup_hit, lookup_miss;
  assign lookup_hit  = (state_q == S_LOOKUP) && hit;
  assign lookup_miss = (state_q == S_LOOKUP) && !hit;

  always_comb begin
    state_d      = state_q;
    one_way_acc  = 1'b0;
    all_way_acc  = 1'b0;
    data_we      = 1'b0;
    tag_rd_en    = 1'b0;
    tag_wr_en    = 1'b0;
    tag_wr_way   = hit_way;
    tag_wr_dirty = 1'b1;
    lru_upd      = 1'b0;
    lru_upd_way  = hit_way;
    wake_en      = 1'b0;
    wake_real    = 1'b0;
    wake_ways    = '0;
    mux_en       = '0;
    mux_sel      = hit_way;
    fh_load      = 1'b0;
    fh_load_data = rd_word;
    mem_req_valid = 1'b0;
    mem_req_write = 1'b0;
    mem_req_addr  = {req_tag, req_idx, {OFF_W{1'b0}}};
    for (int unsigned w = 0; w < WAYS; w++) begin
      way_wbe[w]   = '0;
      way_wdata[w] = {WAYS{st_word}};
    end

    unique case (state_q)
      S_IDLE: begin
        if (accept && !fast_hit) begin
          // The row the access needs is woken, or kept awake: a wake request
          // wins over a periodic sleep in this very cycle, so the row cannot
          // fall asleep between here and the end of the access.
          wake_en   = cfg_drowsy_en;
          wake_real = cfg_drowsy_en && row_drowsy;
          wake_ways = way_onehot(cur_wsel);
          if ((cfg_drowsy_en && row_drowsy) || cfg_fast_hit_en) begin
            state_d = S_ISSUE;      // one cycle late: wake-up or buffer miss
          end else begin
            one_way_acc = !cpu_req_write;  // issue at once; stores read no data
            tag_rd_en   = 1'b1;
            state_d     = S_LOOKUP;
          end
        end else if (accept) begin
          state_d = S_RESP;         // fast hit, served from the buffer
        end
      end

      S_ISSUE: begin
        one_way_acc = !req_write_q;
        tag_rd_en   = 1'b1;
        state_d     = S_LOOKUP;
      end

      S_LOOKUP: begin
        mux_en[req_wsel] = !req_write_q;
        if (hit) begin
          lru_upd = 1'b1;
          if (req_write_q) begin
            one_way_acc = 1'b1;
            data_we     = 1'b1;
            way_wbe[req_wsel][hit_way*WORD_BYTES +: WORD_BYTES] = st_be;
            tag_wr_en   = 1'b1;       // mark the line dirty
          end else begin
            fh_load = cfg_fast_hit_en;
          end
          state_d = (HIT_LATENCY == 1) ? S_IDLE : S_RESP;
        end else if (valid_rd[lru_victim] && dirty_rd[lru_victim]) begin
          state_d = S_WB_READ;
        end else begin
          state_d = S_FILL_REQ;
        end
      end

      S_WB_READ: begin
        if (cfg_drowsy_en && set_drowsy) begin
          wake_en   = 1'b1;
          wake_real = 1'b1;
          wake_ways = '1;
        end else begin
          all_way_acc = 1'b1;
          state_d     = S_WB_SEND;
        end
      end

      S_WB_SEND: begin
        mux_en        = '1;
        mux_sel       = victim_q;
        mem_req_valid = 1'b1;
        mem_req_write = 1'b1;
        mem_req_addr  = {victim_tag_q, req_idx, {OFF_W{1'b0}}};
        if (mem_req_ready) state_d = S_FILL_REQ;
      end

      S_FILL_REQ: begin
        // Wake the whole set now; the refill writes every data way.
        if (cfg_drowsy_en && set_drowsy) begin
          wake_en   = 1'b1;
          wake_real = 1'b1;
          wake_ways = '1;
        end
        mem_req_valid = 1'b1;
        if (mem_req_ready) state_d = S_FILL_WAIT;
      end

      S_FILL_WAIT: begin
        if (mem_resp_valid) begin
          all_way_acc  = 1'b1;
          data_we      = 1'b1;
          for (int unsigned w = 0; w < WAYS; w++) begin
            way_wbe[w][victim_q*WORD_BYTES +: WORD_BYTES] = '1;
            way_wdata[w] = {WAYS{fill_line[w*WORD_BITS +: WORD_BITS]}};
          end
          tag_wr_en    = 1'b1;
          tag_wr_way   = victim_q;
          tag_wr_dirty = req_write_q;
          lru_upd      = 1'b1;
          lru_upd_way  = victim_q;
          fh_load      = cfg_fast_hit_en && !req_write_q;
          fh_load_data = fill_word;
          state_d      = S_RESP;
        end
      end

      S_RESP: state_d = S_IDLE;

      default: state_d = S_IDLE;
    endcase
  end

  // One-hot of a way number (wake-up of the single row a one-way access needs).
  function automatic logic [WAYS-1:0] way_onehot(input logic [WAY_W-1:0] w);
    way_onehot    = '0;
    way_onehot[w] = 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      resp_valid_q <= 1'b0;
    end else begin
      state_q      <= state_d;
      resp_valid_q <= (state_d == S_RESP);
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      req_write_q <= cpu_req_write;
      req_addr_q  <= cpu_req_addr;
      req_wdata_q <= cpu_req_wdata;
      req_be_q    <= cpu_req_be;
    end
    if (lookup_miss) begin
      victim_q     <= lru_victim;
      victim_tag_q <= tag_rd[lru_victim];
    end
    if (fast_hit)
      resp_rdata_q <= fh_cpu;
    else if (lookup_hit)
      resp_rdata_q <= req_write_q ? '0 : rd_cpu;
    else if (state_q == S_FILL_WAIT && mem_resp_valid)
      resp_rdata_q <= req_write_q ? '0 : fill_cpu;
  end

  always_comb begin
    if (HIT_LATENCY == 1 && lookup_hit) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_rdata = req_write_q ? '0 : rd_cpu;
    end else begin
      cpu_resp_valid = resp_valid_q;
      cpu_resp_rdata = resp_rdata_q;
    end
  end

  // ------------------------------------------------------------- events
  assign ev_read_hit     = lookup_hit && !req_write_q;
  assign ev_write_hit    = lookup_hit && req_write_q;
  assign ev_read_miss    = lookup_miss && !req_write_q;
  assign ev_write_miss   = lookup_miss && req_write_q;
  assign ev_dirty_victim = lookup_miss && valid_rd[lru_victim] && dirty_rd[lru_victim];
  assign ev_fast_hit     = fast_hit;
  assign ev_wake         = wake_real;
  assign ev_sleep        = sleep_pulse;

  // ---------------------------------------------------------- assertions
  // A drowsy row must never be read or written (its contents would be lost).
  for (genvar w = 0; w < WAYS; w++) begin : g_chk
    a_no_drowsy_access: assert property (@(posedge clk) disable iff (!rst_n)
      (cfg_drowsy_en && way_sel[w] && (one_way_acc || all_way_acc))
        |-> !drowsy_rows[cur_idx*WAYS + w]);
  end
  // Lower-level request held stable until taken.
  a_mem_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req_valid && !mem_req_ready) |=> (mem_req_valid && $stable(mem_req_addr)
                                           && $stable(mem_req_write)));
  // A read or word write activates exactly one data way.
  a_one_way: assert property (@(posedge clk) disable iff (!rst_n)
    (one_way_acc && !all_way_acc) |-> $onehot(data_way_en));

endmodule
