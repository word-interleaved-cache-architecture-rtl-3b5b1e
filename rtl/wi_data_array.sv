// wi_data_array: one data way of the word-interleaved cache.
//
// Row s of data way i holds word i of every line of set s: column c is the
// WORD_BYTES-byte word i of the line that the tag array keeps in "line slot" c.
// So a row is WAYS words wide, as wide as a conventional way's row, and the
// SRAM itself is unchanged; only what is stored where differs.
//
// Interface: a one-hot (or all-zero) wordline vector selects the row. With a
// wordline high and we low the whole row is read into rdata at the clock edge
// (the sense amplifiers of the way fire); rdata holds its value while the way
// is idle. With we high the bytes flagged in wbe are written. No wordline, no
// activity. The wordline vector is turned back into a row number inside so
// that tools can map the array onto a memory. Contents are not reset.
module wi_data_array #(
  parameter int unsigned SETS       = 128,
  parameter int unsigned WAYS       = 4,   // words (line slots) per row
  parameter int unsigned WORD_BYTES = 8,
  localparam int unsigned ROW_BYTES = WAYS * WORD_BYTES,
  localparam int unsigned ROW_BITS  = ROW_BYTES * 8
) (
  input  logic                 clk,
  input  logic [SETS-1:0]      wl,      // wordlines of this way
  input  logic                 we,      // write (else read)
  input  logic [ROW_BYTES-1:0] wbe,     // byte write enables across the row
  input  logic [ROW_BITS-1:0]  wdata,
  output logic [ROW_BITS-1:0]  rdata    // registered row read
);

  logic [ROW_BITS-1:0]     mem [SETS];
  logic                    active;
  logic [$clog2(SETS)-1:0] row;

  always_comb begin
    active = |wl;
    row    = '0;
    for (int unsigned s = 0; s < SETS; s++)
      if (wl[s]) row = row | s[$clog2(SETS)-1:0];
  end

  always_ff @(posedge clk) begin
    if (active) begin
      if (we) begin
        for (int unsigned b = 0; b < ROW_BYTES; b++)
          if (wbe[b]) mem[row][b*8 +: 8] <= wdata[b*8 +: 8];
      end else begin
        rdata <= mem[row];
      end
    end
  end

endmodule
