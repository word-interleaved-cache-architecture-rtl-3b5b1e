// wi_wordline_driver: per-way wordline gating of the WI cache.
//
// The decoded set lines and the decoded way selects are ANDed, so a wordline
// rises only in the data way(s) the access needs: one way for a read or a
// word write, all ways for a whole-line write-back or refill. In silicon this
// AND costs nothing in delay because the first inverter of the usual
// two-inverter wordline driver becomes a NAND gate; here it is plain logic.
// Purely combinational.
module wi_wordline_driver #(
  parameter int unsigned SETS = 128,
  parameter int unsigned WAYS = 4
) (
  input  logic [SETS-1:0]            set_sel,  // from wi_set_decoder
  input  logic [WAYS-1:0]            way_sel,  // from wi_offset_decoder (or all)
  output logic [WAYS-1:0][SETS-1:0]  wl        // wordlines, per data way
);

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++)
      wl[w] = set_sel & {SETS{way_sel[w]}};
  end

endmodule
