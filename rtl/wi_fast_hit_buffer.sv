// wi_fast_hit_buffer: one-word buffer in front of the WI cache ("fast hits").
//
// Holds the word most recently read from the cache together with its address
// (tag, index and offset down to the word, i.e. addr[ADDR_W-1:WB_W]). A read
// whose word address matches is a fast hit and is served from the buffer
// without touching the cache arrays. In the WI cache the buffer holds one
// WORD_BYTES word, not a whole line. hit and rdata are combinational in the
// lookup address. load_en replaces the entry; inval_en drops it when its word
// address matches (used on stores, so the buffer never holds stale data);
// flush drops it unconditionally. Synchronous active-low reset empties it.
module wi_fast_hit_buffer #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned WORD_BYTES = 8,
  localparam int unsigned WB_W = $clog2(WORD_BYTES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ADDR_W-1:0]       lookup_addr,
  output logic                    hit,
  output logic [WORD_BYTES*8-1:0] rdata,
  input  logic                    load_en,
  input  logic [ADDR_W-1:0]       load_addr,
  input  logic [WORD_BYTES*8-1:0] load_data,
  input  logic                    inval_en,
  input  logic [ADDR_W-1:0]       inval_addr,
  input  logic                    flush
);

  logic                     valid_q;
  logic [ADDR_W-WB_W-1:0]   waddr_q;
  logic [WORD_BYTES*8-1:0]  data_q;

  assign hit   = valid_q && (waddr_q == lookup_addr[ADDR_W-1:WB_W]);
  assign rdata = data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
    end else if (flush) begin
      valid_q <= 1'b0;
    end else if (load_en) begin
      valid_q <= 1'b1;
    end else if (inval_en && waddr_q == inval_addr[ADDR_W-1:WB_W]) begin
      valid_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load_en) begin
      waddr_q <= load_addr[ADDR_W-1:WB_W];
      data_q  <= load_data;
    end
  end

endmodule
