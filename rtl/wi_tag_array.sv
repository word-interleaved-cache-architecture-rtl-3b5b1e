// wi_tag_array: tags, valid and dirty bits of all ways of the cache.
//
// The tag side of the WI cache is that of a conventional set-associative
// cache: on every lookup the entries of all WAYS ways of the set are read in
// parallel (registered, ready the cycle after rd_en). One way of one set can
// be written per cycle (tag, valid, dirty together). Valid and dirty bits are
// flip-flops cleared by the synchronous active-low reset; tags are a memory
// and are not reset. A write and a read in the same cycle are independent;
// the read returns the old entry.
module wi_tag_array #(
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rd_en,
  input  logic [$clog2(SETS)-1:0] rd_set,
  output logic [WAYS-1:0][TAG_W-1:0] rd_tag,
  output logic [WAYS-1:0]         rd_valid,
  output logic [WAYS-1:0]         rd_dirty,
  input  logic                    wr_en,
  input  logic [$clog2(SETS)-1:0] wr_set,
  input  logic [$clog2(WAYS)-1:0] wr_way,
  input  logic [TAG_W-1:0]        wr_tag,
  input  logic                    wr_valid,
  input  logic                    wr_dirty
);

  logic [TAG_W-1:0] tags  [WAYS][SETS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAYS-1:0]  dirty [SETS];

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_way][wr_set] <= wr_tag;
    if (rd_en)
      for (int unsigned w = 0; w < WAYS; w++) rd_tag[w] <= tags[w][rd_set];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
      end
      rd_valid <= '0;
      rd_dirty <= '0;
    end else begin
      if (rd_en) begin
        rd_valid <= valid[rd_set];
        rd_dirty <= dirty[rd_set];
      end
      if (wr_en) begin
        valid[wr_set][wr_way] <= wr_valid;
        dirty[wr_set][wr_way] <= wr_dirty;
      end
    end
  end

endmodule
