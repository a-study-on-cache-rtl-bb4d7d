// bsip_policy: Bit Set Insertion Policy (BSIP) replacement decision for one
// cache set.
//
// Each line of the set carries a recency rank (0 = MRU ... WAYS-1 = LRU, a
// true LRU stack) and one extra bit k that marks a line that has been re-used.
//   hit  : k of the hit line is set and the line moves to the MRU position.
//   miss : counting from the MRU end, the first line with k = 0 is replaced
//          and the new line takes the MRU position.  If every line of the set
//          has k = 1, k is cleared on the older half of the stack (the WAYS/2
//          lines nearest the LRU end, the victim among them) and the LRU line
//          is replaced in place: the new line stays at the LRU position.
// Lines that have been re-used thus survive a thrashing access stream, while
// lines brought in and never touched again are the first to go.
//
// Purely combinational. The caller presents the set's state read from its
// state array together with the lookup result and writes back age_o and k_o
// when the access completes. victim_o is only meaningful when hit_i = 0.
// all_set_o flags a miss that found every k set (the half-clear case).
//
// What follows the source description: the k bit, set on a hit, the search
// for the first k = 0 line from the MRU end, the clearing of half of the k
// bits and replacement at the LRU position when all are set.  This design's
// own choices: an invalid line is always filled first (lowest way index) so
// that a cold set fills completely; the half that is cleared is the LRU half
// of the recency stack; whether a freshly filled line gets k = 1 or k = 0 is
// the parameter SET_K_ON_FILL (default 0, the line has not been re-used yet).
module bsip_policy #(
  parameter int unsigned WAYS          = 4,
  parameter bit          SET_K_ON_FILL = 1'b0,
  localparam int unsigned AW           = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0][AW-1:0] age_i,     // recency rank per way, a permutation
  input  logic [WAYS-1:0]         k_i,       // BSIP re-use bits
  input  logic [WAYS-1:0]         valid_i,   // line valid bits
  input  logic                    hit_i,     // access hit in this set
  input  logic [AW-1:0]           hit_way_i, // way that hit
  output logic [AW-1:0]           victim_o,  // way to replace on a miss
  output logic [WAYS-1:0][AW-1:0] age_o,     // recency ranks after the access
  output logic [WAYS-1:0]         k_o,       // k bits after the access
  output logic                    all_set_o  // miss with every k bit set
);

  logic [AW-1:0] victim;
  logic          found_inv, found_k0, promote;
  logic [AW-1:0] best_age;

  always_comb begin
    // Victim search.
    found_inv = 1'b0;
    found_k0  = 1'b0;
    victim    = '0;
    best_age  = '1;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_i[w]) begin
        found_inv = 1'b1;
        victim    = AW'(w);
      end
    end
    if (!found_inv) begin
      // first k = 0 line counted from the MRU end = smallest rank with k = 0
      for (int w = 0; w < WAYS; w++) begin
        if (!k_i[w] && (!found_k0 || age_i[w] < best_age)) begin
          found_k0 = 1'b1;
          best_age = age_i[w];
          victim   = AW'(w);
        end
      end
      if (!found_k0) begin
        for (int w = 0; w < WAYS; w++)
          if (age_i[w] == AW'(WAYS - 1)) victim = AW'(w);
      end
    end
  end

  assign victim_o  = victim;
  assign all_set_o = !hit_i && !found_inv && !found_k0;

  // State update.
  logic [AW-1:0] target;
  always_comb begin
    target  = hit_i ? hit_way_i : victim;
    promote = hit_i || !all_set_o;
    k_o     = k_i;
    age_o   = age_i;
    if (hit_i) begin
      k_o[hit_way_i] = 1'b1;
    end else if (all_set_o) begin
      for (int w = 0; w < WAYS; w++)
        if (age_i[w] >= AW'(WAYS / 2)) k_o[w] = 1'b0;
      k_o[victim] = 1'b0;
    end else begin
      k_o[victim] = SET_K_ON_FILL;
    end
    if (promote) begin
      for (int w = 0; w < WAYS; w++) begin
        if (AW'(w) == target)               age_o[w] = '0;
        else if (age_i[w] < age_i[target]) age_o[w] = age_i[w] + 1'b1;
      end
    end
  end

endmodule
