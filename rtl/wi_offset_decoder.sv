// wi_offset_decoder: the offset decoder of the word-interleaved cache.
//
// In the WI cache word w_i of every line of a set lives in data way i, so the
// data way an access needs follows from the address alone: the most
// significant log2(WAYS) bits of the line offset select it. This block is that
// decoder (a 2x4 decoder for the 4-way, 32-byte-line configuration). Its
// one-hot output enables the precharge, sense amplifiers and, through the
// wordline driver, the wordline of that way only. Purely combinational; with
// en low every output is low.
module wi_offset_decoder #(
  parameter int unsigned WAYS = 4
) (
  input  logic                    en,      // an access to one data way
  input  logic [$clog2(WAYS)-1:0] sel,     // offset MSBs (word index in line)
  output logic [WAYS-1:0]         way_en   // one-hot way select
);

  always_comb begin
    way_en = '0;
    for (int unsigned i = 0; i < WAYS; i++)
      way_en[i] = en && (sel == i[$clog2(WAYS)-1:0]);
  end

endmodule
