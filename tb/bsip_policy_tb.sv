// bsip_policy_tb: self-checking testbench of the BSIP replacement decision.
//
// The set's state is kept in the testbench (ranks and k bits fed back from
// the module) and, independently, in a reference model that stores the
// recency stack as an ordered list of ways. Every access compares victim,
// ranks and k bits. Two hand-worked cases are checked as well:
//   * cyclic thrashing stream A B C D E over a 4-way set, 10 rounds:
//     after the first round A, B and C stay and hit each round -> 27 hits;
//   * hits on all four lines, then a miss: every k set, the LRU line is
//     replaced in place and k is cleared on the LRU half of the stack;
//   * a second instance with SET_K_ON_FILL = 1 gives a filled line k = 1.
module bsip_policy_tb;
  localparam int WAYS = 4;
  localparam int AW   = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WAYS-1:0][AW-1:0] age, age_o;
  logic [WAYS-1:0]         k, k_o, valid;
  logic                    hit, all_set;
  logic [AW-1:0]           hit_way, victim;
  int                      tags [WAYS];

  bsip_policy #(.WAYS(WAYS)) dut (
    .age_i(age), .k_i(k), .valid_i(valid), .hit_i(hit), .hit_way_i(hit_way),
    .victim_o(victim), .age_o(age_o), .k_o(k_o), .all_set_o(all_set)
  );

  // second instance: the reading in which a filled line gets k = 1
  logic [WAYS-1:0][AW-1:0] age1_o;
  logic [WAYS-1:0]         k1_i, k1_o;
  logic [AW-1:0]           victim1;
  logic                    all_set1;
  bsip_policy #(.WAYS(WAYS), .SET_K_ON_FILL(1'b1)) dut_k1 (
    .age_i(age), .k_i(k1_i), .valid_i(valid), .hit_i(hit), .hit_way_i(hit_way),
    .victim_o(victim1), .age_o(age1_o), .k_o(k1_o), .all_set_o(all_set1)
  );

  int checks = 0, failures = 0;

  // reference model
  int  r_order [WAYS];   // way indices, MRU first
  bit  r_k [WAYS];
  bit  r_valid [WAYS];
  int  r_victim;
  bit  r_all_set;

  function automatic void ref_reset();
    for (int i = 0; i < WAYS; i++) begin
      r_order[i] = i; r_k[i] = 0; r_valid[i] = 0;
    end
  endfunction

  function automatic void ref_to_front(int w);
    int pos = 0;
    for (int i = 0; i < WAYS; i++) if (r_order[i] == w) pos = i;
    for (int i = pos; i > 0; i--) r_order[i] = r_order[i-1];
    r_order[0] = w;
  endfunction

  function automatic void ref_access(bit h, int hw);
    r_all_set = 0;
    if (h) begin
      r_k[hw] = 1; ref_to_front(hw);
    end else begin
      r_victim = -1;
      for (int w = WAYS - 1; w >= 0; w--) if (!r_valid[w]) r_victim = w;
      if (r_victim < 0)
        for (int i = WAYS - 1; i >= 0; i--) if (!r_k[r_order[i]]) r_victim = r_order[i];
      if (r_victim < 0) begin
        r_all_set = 1;
        r_victim  = r_order[WAYS-1];
        for (int i = WAYS / 2; i < WAYS; i++) r_k[r_order[i]] = 0;
      end else begin
        r_k[r_victim] = 0;
        ref_to_front(r_victim);
      end
      r_valid[r_victim] = 1;
    end
  endfunction

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  int  hits;
  bit  h;
  int  hw;

  // Present an access of tag t to the module (no time passes).
  function automatic void present(int t);
    h = 0; hw = 0;
    for (int w = 0; w < WAYS; w++) if (valid[w] && tags[w] == t) begin h = 1; hw = w; end
    hit     = h;
    hit_way = AW'(hw);
  endfunction

  // Compare the settled outputs with the reference and commit the access.
  function automatic void compare_commit(int t);
    ref_access(h, hw);
    if (!h) check(int'(victim) == r_victim, $sformatf("victim %0d expected %0d", victim, r_victim));
    check(all_set == r_all_set, "all_set flag");
    for (int i = 0; i < WAYS; i++)
      check(int'(age_o[r_order[i]]) == i, $sformatf("rank of way %0d", r_order[i]));
    for (int w = 0; w < WAYS; w++)
      check(k_o[w] == r_k[w], $sformatf("k of way %0d", w));
    if (h) hits++;
    else begin
      tags[victim]  = t;
      valid[victim] = 1'b1;
    end
    age = age_o;
    k   = k_o;
  endfunction

  function automatic void reset_set();
    ref_reset();
    for (int w = 0; w < WAYS; w++) begin age[w] = AW'(w); tags[w] = -1; end
    k = '0; valid = '0; hits = 0;
  endfunction

  // one access per clock cycle
  `define ACCESS(T) begin present(T); #1; compare_commit(T); @(posedge clk); end

  initial begin
    hit = 0; hit_way = '0;
    // 1. thrashing cycle
    reset_set();
    for (int r = 0; r < 10; r++) begin
      for (int t = 0; t < 5; t++) `ACCESS(t)
    end
    @(negedge clk);
    check(hits == 27, $sformatf("thrashing stream hits %0d expected 27", hits));
    // 2. all k set
    reset_set();
    for (int t = 0; t < 4; t++) `ACCESS(t)
    for (int t = 0; t < 4; t++) `ACCESS(t)
    check(k == 4'b1111, "all k set after hits on every line");
    hit = 1'b0; #1;
    check(all_set && victim == 2'd0, "all set: LRU way 0 is the victim");
    check(age_o == age, "all set: new line stays at the LRU position");
    check(k_o == 4'b1100, "all set: k cleared on the LRU half (ways 0 and 1)");
    `ACCESS(4)
    hit = 1'b0; #1;
    check(!all_set && victim == 2'd1, "next miss takes first k=0 from MRU (way 1)");
    // 3. SET_K_ON_FILL = 1: the filled line is protected at once
    for (int w = 0; w < WAYS; w++) age[w] = AW'(w);
    valid = '1; hit = 1'b0; k1_i = 4'b0101; #1;
    check(victim1 == 2'd1 && k1_o == 4'b0111 && !all_set1, "k=1 on fill: first k=0 from MRU filled and protected");
    check(age1_o[1] == 2'd0 && age1_o[0] == 2'd1, "k=1 on fill: new line at MRU");
    k1_i = 4'b1111; #1;
    check(all_set1 && victim1 == 2'd3 && k1_o == 4'b0011, "k=1 on fill: all set clears the LRU half");
    @(posedge clk);
    // 4. random streams against the reference model
    reset_set();
    for (int n = 0; n < 3000; n++) `ACCESS(int'($urandom_range(0, 6)))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
