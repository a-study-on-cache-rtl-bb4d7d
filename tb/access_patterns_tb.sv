// access_patterns_tb: the four classes of access pattern, run through the
// full-size dual-core hierarchy from core 0's load port, with the number of
// L2 hits and misses each must produce under BSIP.
//
// Every pattern uses its own L2 set; its lines are 32 KB apart, so they also
// share one 2-way L1 set, and with three or more lines in a cycle the L1
// misses every time: each load reaches the L2.
//   cache friendly  n = 4 lines (fits the 4 ways), 10 rounds: 4 misses, 36 hits
//   thrashing       n = 5 lines, 10 rounds: 23 misses, 27 hits (LRU: 0 hits)
//   streaming       40 lines, each once: 40 misses, 0 hits
//   mixed           5 rounds of (A B C)(A B C) then 8 new lines used once:
//                   43 misses, 27 hits; the re-used lines A B C survive each
//                   scan (LRU would lose them every round: 15 hits)
module access_patterns_tb;
  import cache_pkg::*;
  localparam int NC = 2;
  localparam int L2_SET_STRIDE = 128 * LINE_BYTES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0] if_req_valid = '0, if_req_ready, if_resp_valid;
  addr_t         if_req_addr [NC];
  word_t         if_resp_rdata [NC];
  logic [NC-1:0] d_req_valid = '0, d_req_ready, d_req_write = '0, d_resp_valid;
  addr_t         d_req_addr [NC];
  word_t         d_req_wdata [NC], d_resp_rdata [NC];
  logic          mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t      mem_req;
  line_t         mem_resp_data;
  logic [2*NC-1:0] l1_hit, l1_miss;
  logic          l2_hit, l2_miss, l2_writeback, l2_all_set, l2_contention;

  multicore_cache_system dut (
    .clk, .rst_n,
    .if_req_valid, .if_req_ready, .if_req_addr, .if_resp_valid, .if_resp_rdata,
    .d_req_valid, .d_req_ready, .d_req_write, .d_req_addr, .d_req_wdata,
    .d_resp_valid, .d_resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data,
    .l1_hit, .l1_miss, .l2_hit, .l2_miss, .l2_writeback, .l2_all_set, .l2_contention
  );

  function automatic word_t init_word(addr_t a);
    return (a >> 2) * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction

  // read-only memory model, 12-cycle reads
  logic  mbusy = 0;
  int    mdelay;
  addr_t maddr;
  assign mem_req_ready = !mbusy;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mbusy) begin
      mdelay--;
      if (mdelay == 0) begin
        line_t l;
        for (int i = 0; i < WORDS_PER_LINE; i++) l[i*32 +: 32] = init_word(maddr + addr_t'(i*4));
        mbusy = 0;
        mem_resp_data  <= l;
        mem_resp_valid <= 1'b1;
      end
    end else if (mem_req_valid && !mem_req.write) begin
      mbusy = 1; maddr = mem_req.addr; mdelay = 12;
    end
  end

  int n_l2_hit = 0, n_l2_miss = 0, n_wb = 0;
  always @(posedge clk) if (rst_n) begin
    n_l2_hit  += int'(l2_hit);
    n_l2_miss += int'(l2_miss);
    n_wb      += int'(l2_writeback);
  end

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  task automatic load(addr_t a);
    @(negedge clk);
    d_req_valid[0] = 1; d_req_addr[0] = a;
    while (!d_req_ready[0]) @(negedge clk);
    @(posedge clk);
    #1 d_req_valid[0] = 0;
    do @(negedge clk); while (!d_resp_valid[0]);
    check(d_resp_rdata[0] == init_word(a), $sformatf("load %h", a));
  endtask

  // line t of the pattern that uses L2 set s
  function automatic addr_t line_addr(int s, int t);
    return addr_t'(32'h0500_0000 + s * LINE_BYTES + t * L2_SET_STRIDE);
  endfunction

  int h0, m0;
  task automatic begin_pattern();
    @(negedge clk);
    h0 = n_l2_hit; m0 = n_l2_miss;
  endtask
  task automatic end_pattern(string name, int exp_hits, int exp_misses);
    @(negedge clk);
    check(n_l2_hit - h0 == exp_hits && n_l2_miss - m0 == exp_misses,
          $sformatf("%s: %0d hits %0d misses, expected %0d and %0d",
                    name, n_l2_hit - h0, n_l2_miss - m0, exp_hits, exp_misses));
    $display("%-15s L2 hits %0d misses %0d", name, n_l2_hit - h0, n_l2_miss - m0);
  endtask

  initial begin
    d_req_addr[0] = '0; d_req_addr[1] = '0; d_req_wdata[0] = '0; d_req_wdata[1] = '0;
    if_req_addr[0] = '0; if_req_addr[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    begin_pattern();
    for (int r = 0; r < 10; r++) for (int t = 0; t < 4; t++) load(line_addr(10, t) + addr_t'(4 * r));
    end_pattern("cache friendly", 36, 4);
    begin_pattern();
    for (int r = 0; r < 10; r++) for (int t = 0; t < 5; t++) load(line_addr(20, t) + addr_t'(4 * r));
    end_pattern("thrashing", 27, 23);
    begin_pattern();
    for (int t = 0; t < 40; t++) load(line_addr(30, t));
    end_pattern("streaming", 0, 40);
    begin_pattern();
    for (int r = 0; r < 5; r++) begin
      for (int p = 0; p < 2; p++) for (int t = 0; t < 3; t++) load(line_addr(40, t) + addr_t'(8 * r + 4 * p));
      for (int t = 0; t < 8; t++) load(line_addr(40, 3 + 8 * r + t));
    end
    end_pattern("mixed", 27, 43);
    check(n_wb == 0, "no write-backs without stores");
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
