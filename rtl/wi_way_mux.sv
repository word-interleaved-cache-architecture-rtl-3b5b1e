// wi_way_mux: the small data-select multiplexer of one WI data way.
//
// A data way reads out a whole row: one word of each of the WAYS lines of the
// set. The tag compare says which line slot holds the wanted line, and this
// mux passes that single word on (for 4 ways and 8-byte words: 256 inputs,
// 64 outputs). Each way has its own small mux in place of the one wide mux of
// a conventional cache; only the mux of the active way is enabled, and a
// disabled mux drives zeros so the outputs of all ways can be ORed onto one
// bus. Purely combinational.
module wi_way_mux #(
  parameter int unsigned WAYS      = 4,
  parameter int unsigned WORD_BITS = 64
) (
  input  logic                      en,
  input  logic [$clog2(WAYS)-1:0]   sel,    // line slot (hit or victim way)
  input  logic [WAYS*WORD_BITS-1:0] row,
  output logic [WORD_BITS-1:0]      word
);

  always_comb begin
    word = '0;
    if (en) word = row[sel*WORD_BITS +: WORD_BITS];
  end

endmodule
