// wi_lru: least-recently-used replacement for every set.
//
// Each set keeps one age per way, 0 for the most recently used way and
// WAYS-1 for the least recently used; the ages of a set are always a
// permutation of 0..WAYS-1. Touching a way (hit or refill) makes its age 0 and
// ages by one every way that was younger than it. The victim for a set is its
// lowest-numbered invalid way if there is one, otherwise its oldest way; it is
// read combinationally from victim_set. Reset gives way w the age w.
module wi_lru #(
  parameter int unsigned SETS = 128,
  parameter int unsigned WAYS = 4,
  localparam int unsigned WAY_W = $clog2(WAYS),
  localparam int unsigned IDX_W = $clog2(SETS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] victim_set,
  input  logic [WAYS-1:0]  victim_valid,  // valid bits of that set
  output logic [WAY_W-1:0] victim_way,
  input  logic             upd_en,
  input  logic [IDX_W-1:0] upd_set,
  input  logic [WAY_W-1:0] upd_way
);

  logic [WAYS-1:0][WAY_W-1:0] age [SETS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned w = 0; w < WAYS; w++) age[s][w] <= w[WAY_W-1:0];
    end else if (upd_en) begin
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (w[WAY_W-1:0] == upd_way)
          age[upd_set][w] <= '0;
        else if (age[upd_set][w] < age[upd_set][upd_way])
          age[upd_set][w] <= age[upd_set][w] + 1'b1;
      end
    end
  end

  always_comb begin
    logic found;
    found      = 1'b0;
    victim_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (!found && !victim_valid[w]) begin
        victim_way = w[WAY_W-1:0];
        found      = 1'b1;
      end
    if (!found)
      for (int unsigned w = 0; w < WAYS; w++)
        if (age[victim_set][w] == WAY_W'(WAYS - 1)) victim_way = w[WAY_W-1:0];
  end

endmodule
