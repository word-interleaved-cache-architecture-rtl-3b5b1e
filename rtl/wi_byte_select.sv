// wi_byte_select: places the processor word inside a cache word.
//
// A WI data way delivers one WORD_BYTES-byte word; the processor reads and
// writes CPU_BYTES at a time. The low offset bits pick the CPU_BYTES-aligned
// slice: on a read the slice is extracted (the bytes below CPU_BYTES are
// ignored, accesses being aligned); on a write the store data is copied into
// every slice and the byte enables are steered to the addressed slice only.
// Purely combinational.
module wi_byte_select #(
  parameter int unsigned WORD_BYTES = 8,
  parameter int unsigned CPU_BYTES  = 4,
  localparam int unsigned WB_W = $clog2(WORD_BYTES)
) (
  input  logic [WB_W-1:0]             byte_off,   // offset bits inside the word
  input  logic [WORD_BYTES*8-1:0]     word_rd,    // word from the data way
  output logic [CPU_BYTES*8-1:0]      cpu_rdata,
  input  logic [CPU_BYTES*8-1:0]      cpu_wdata,
  input  logic [CPU_BYTES-1:0]        cpu_be,
  output logic [WORD_BYTES*8-1:0]     word_wdata,
  output logic [WORD_BYTES-1:0]       word_be
);

  localparam int unsigned SLICES = WORD_BYTES / CPU_BYTES;

  logic [WB_W-1:0] slice;

  always_comb begin
    slice      = WB_W'(int'(byte_off) / int'(CPU_BYTES));
    cpu_rdata  = word_rd[slice*CPU_BYTES*8 +: CPU_BYTES*8];
    word_wdata = {SLICES{cpu_wdata}};
    word_be    = '0;
    word_be[slice*CPU_BYTES +: CPU_BYTES] = cpu_be;
  end

endmodule
