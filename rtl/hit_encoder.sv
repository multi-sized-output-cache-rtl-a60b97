// hit_encoder: turns the per-way hit lines of the cache into the cache hit and
// the number of the way that hit.
//
// hit is the OR of all way hits. hit_way is the binary code of the hitting
// way, built as an OR encoder: bit b of hit_way is the OR of the hits of all
// ways whose number has bit b set. Tags in one set are distinct, so at most
// one way hits and the code is exact; with no hit hit_way is 0. Purely
// combinational. hit_way drives both the cache's data multiplexor and its way
// select multiplexor, as in the design description; the OR-encoder structure
// is this implementation's choice.
module hit_encoder #(
  parameter int unsigned WAYS = cache_pkg::WAYS
) (
  input  logic [WAYS-1:0]         way_hit,
  output logic                    hit,
  output logic [$clog2(WAYS)-1:0] hit_way
);
  always_comb begin
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (way_hit[w]) hit_way = hit_way | w[$clog2(WAYS)-1:0];
    end
  end

  assign hit = |way_hit;
endmodule
