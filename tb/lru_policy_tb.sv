// lru_policy_tb: self-checking testbench of the LRU replacement decision.
//
// Two instances are exercised: the 2-way one used by the L1 caches and a
// 4-way one. The set state (ranks) is fed back from the module; a reference
// model keeps the recency stack as an ordered list of ways and is compared
// with victim and ranks on every access. Hand-worked cases:
//   * 4 ways, cyclic stream A B C D E for 10 rounds: LRU never hits (0 hits);
//   * 4 ways, cyclic stream A B C for 10 rounds: 27 hits;
//   * 2 ways, stream A B A C: C evicts B (the least recently used line).
module lru_policy_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // 2-way instance
  logic [1:0][0:0] age2, age2_o;
  logic [1:0]      valid2;
  logic [0:0]      hw2, victim2;
  // 4-way instance
  logic [3:0][1:0] age4, age4_o;
  logic [3:0]      valid4;
  logic [1:0]      hw4, victim4;
  logic            hit;

  lru_policy #(.WAYS(2)) dut2 (.age_i(age2), .valid_i(valid2), .hit_i(hit),
                               .hit_way_i(hw2), .victim_o(victim2), .age_o(age2_o));
  lru_policy #(.WAYS(4)) dut4 (.age_i(age4), .valid_i(valid4), .hit_i(hit),
                               .hit_way_i(hw4), .victim_o(victim4), .age_o(age4_o));

  int checks = 0, failures = 0;
  int nways;              // which instance is under test (2 or 4)
  int r_order [4];        // reference: ways, MRU first
  bit r_valid [4];
  int tags [4];
  int r_victim;
  bit h;
  int hw, hits;

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic void reset_set(int n);
    nways = n; hits = 0;
    for (int i = 0; i < 4; i++) begin r_order[i] = i; r_valid[i] = 0; tags[i] = -1; end
    for (int w = 0; w < 2; w++) age2[w] = 1'(w);
    for (int w = 0; w < 4; w++) age4[w] = 2'(w);
    valid2 = '0; valid4 = '0;
  endfunction

  function automatic void to_front(int w);
    int pos = 0;
    for (int i = 0; i < nways; i++) if (r_order[i] == w) pos = i;
    for (int i = pos; i > 0; i--) r_order[i] = r_order[i-1];
    r_order[0] = w;
  endfunction

  function automatic void present(int t);
    h = 0; hw = 0;
    for (int w = 0; w < nways; w++) if (r_valid[w] && tags[w] == t) begin h = 1; hw = w; end
    hit = h;
    hw2 = 1'(hw);
    hw4 = 2'(hw);
  endfunction

  function automatic void compare_commit(int t);
    int dv, rank;
    if (h) begin
      to_front(hw); hits++;
    end else begin
      r_victim = -1;
      for (int w = nways - 1; w >= 0; w--) if (!r_valid[w]) r_victim = w;
      if (r_victim < 0) r_victim = r_order[nways-1];
      dv = (nways == 2) ? int'(victim2) : int'(victim4);
      check(dv == r_victim, $sformatf("%0d-way victim %0d expected %0d", nways, dv, r_victim));
      to_front(r_victim);
      r_valid[r_victim] = 1;
      tags[r_victim] = t;
    end
    for (int i = 0; i < nways; i++) begin
      rank = (nways == 2) ? int'(age2_o[r_order[i]]) : int'(age4_o[r_order[i]]);
      check(rank == i, $sformatf("%0d-way rank of way %0d", nways, r_order[i]));
    end
    for (int w = 0; w < 4; w++) if (w < nways) begin
      if (nways == 2) valid2[w] = r_valid[w]; else valid4[w] = r_valid[w];
    end
    age2 = age2_o;
    age4 = age4_o;
  endfunction

  `define ACCESS(T) begin present(T); #1; compare_commit(T); @(posedge clk); end

  initial begin
    hit = 0; hw2 = '0; hw4 = '0;
    // 4-way thrashing: no hits at all
    reset_set(4);
    for (int r = 0; r < 10; r++) begin
      for (int t = 0; t < 5; t++) `ACCESS(t)
    end
    @(negedge clk);
    check(hits == 0, $sformatf("LRU thrashing hits %0d expected 0", hits));
    // 4-way, working set fits: all but the first round hit
    reset_set(4);
    for (int r = 0; r < 10; r++) begin
      for (int t = 0; t < 3; t++) `ACCESS(t)
    end
    @(negedge clk);
    check(hits == 27, $sformatf("LRU fitting stream hits %0d expected 27", hits));
    // 2-way: A B A C -> C replaces B
    reset_set(2);
    `ACCESS(10) `ACCESS(11) `ACCESS(10)
    present(12); #1;
    check(victim2 == 1'b1, "2-way: LRU line B (way 1) replaced");
    compare_commit(12); @(posedge clk);
    // random streams on both instances
    reset_set(2);
    for (int n = 0; n < 2000; n++) `ACCESS(int'($urandom_range(0, 3)))
    reset_set(4);
    for (int n = 0; n < 2000; n++) `ACCESS(int'($urandom_range(0, 6)))
    @(negedge clk);
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
