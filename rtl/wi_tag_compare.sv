// wi_tag_compare: the tag comparators, one per way.
//
// Compares the tag of the request with the tags read from every way of the
// set; a way hits when its entry is valid and its tag is equal. Gives the hit
// vector, a hit flag and the binary number of the hit way (zero on a miss).
// At most one way can hold a given tag, so the encoding is a plain OR.
// Purely combinational.
module wi_tag_compare #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 20
) (
  input  logic [WAYS-1:0][TAG_W-1:0] way_tag,
  input  logic [WAYS-1:0]            way_valid,
  input  logic [TAG_W-1:0]           req_tag,
  output logic [WAYS-1:0]            hit_vec,
  output logic                       hit,
  output logic [$clog2(WAYS)-1:0]    hit_way
);

  always_comb begin
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      hit_vec[w] = way_valid[w] && (way_tag[w] == req_tag);
      if (hit_vec[w]) hit_way = hit_way | w[$clog2(WAYS)-1:0];
    end
    hit = |hit_vec;
  end

endmodule
