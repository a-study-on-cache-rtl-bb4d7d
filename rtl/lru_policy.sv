// lru_policy: least-recently-used replacement decision for one cache set,
// used by the L1 caches.
//
// Each line carries its rank in a recency stack (0 = MRU ... WAYS-1 = LRU).
// A hit moves the line to the MRU position; a miss replaces the line at the
// LRU position and inserts the new line at the MRU position, the other lines
// ageing by one. An invalid line, if the set has one, is filled before any
// valid line is evicted (lowest way index first), which is this design's own
// choice for cold sets.
//
// Purely combinational: the caller presents the set's stored ranks and the
// lookup result and writes back age_o when the access completes. victim_o is
// only meaningful when hit_i = 0.
module lru_policy #(
  parameter int unsigned WAYS = 2,
  localparam int unsigned AW  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0][AW-1:0] age_i,     // recency rank per way, a permutation
  input  logic [WAYS-1:0]         valid_i,   // line valid bits
  input  logic                    hit_i,     // access hit in this set
  input  logic [AW-1:0]           hit_way_i, // way that hit
  output logic [AW-1:0]           victim_o,  // way to replace on a miss
  output logic [WAYS-1:0][AW-1:0] age_o      // recency ranks after the access
);

  logic [AW-1:0] victim, target;
  logic          found_inv;

  always_comb begin
    found_inv = 1'b0;
    victim    = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_i[w]) begin
        found_inv = 1'b1;
        victim    = AW'(w);
      end
    end
    if (!found_inv) begin
      for (int w = 0; w < WAYS; w++)
        if (age_i[w] == AW'(WAYS - 1)) victim = AW'(w);
    end
  end

  assign victim_o = victim;

  always_comb begin
    target = hit_i ? hit_way_i : victim;
    age_o  = age_i;
    for (int w = 0; w < WAYS; w++) begin
      if (AW'(w) == target)               age_o[w] = '0;
      else if (age_i[w] < age_i[target]) age_o[w] = age_i[w] + 1'b1;
    end
  end

endmodule
