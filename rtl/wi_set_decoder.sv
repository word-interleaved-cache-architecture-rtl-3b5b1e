// wi_set_decoder: index (set) decoder of the data arrays.
//
// Turns the binary set index of an address into one-hot set select lines,
// one per row of the data arrays. It runs in parallel with the offset
// decoder; wi_wordline_driver combines the two. Purely combinational; with en
// low every line is low.
module wi_set_decoder #(
  parameter int unsigned SETS = 128
) (
  input  logic                    en,
  input  logic [$clog2(SETS)-1:0] idx,
  output logic [SETS-1:0]         set_sel
);

  always_comb begin
    set_sel = '0;
    for (int unsigned s = 0; s < SETS; s++)
      set_sel[s] = en && (idx == s[$clog2(SETS)-1:0]);
  end

endmodule
