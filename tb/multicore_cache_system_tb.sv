// multicore_cache_system_tb: end-to-end test of the dual-core hierarchy at
// its default sizes (2 cores, 16 KB 2-way L1 I and D caches, 128 KB 4-way
// BSIP L2, 256-byte lines).
//
// A main-memory model answers line reads after 20 cycles and takes posted
// line writes. Each core drives its instruction-fetch and load/store ports
// from its own processes. A word-level reference memory gives every
// expected load value.
//   Phase 1, concurrent: each core fetches instructions and loads from a
//     shared read-only region and loads/stores in a private region that
//     has six lines per L2 set (L2 evictions, dirty write-backs, all-set).
//   Phase 2, hand-off: core 1 caches a line, core 0 stores to it, core 1
//     must read the new value (its copy was invalidated).
//   Phase 3, thrashing: core 0 cycles over five lines of one L2 set (and one
//     L1 set): with BSIP three of the five hit in the L2 every round.
// Latencies checked: L1 hit 2 cycles; L1 miss that hits in the L2 13 cycles
// (2 + 10 + 1). Every mechanism (L1 hit/miss, L2 hit/miss, write-back,
// all-set, contention, invalidation) must occur at least once.
module multicore_cache_system_tb;
  import cache_pkg::*;
  localparam int NC = 2;
  localparam int L2_SET_STRIDE = 128 * LINE_BYTES;   // 32 KB

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

  // ---------------- memory model and reference ----------------
  function automatic word_t init_word(addr_t a);
    return (a >> 2) * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction
  line_t mem [addr_t];
  word_t ref_mem [addr_t];
  function automatic word_t ref_rd(addr_t a);
    addr_t wa = {a[31:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : init_word(wa);
  endfunction
  function automatic line_t init_line(addr_t la);
    line_t l;
    for (int i = 0; i < WORDS_PER_LINE; i++) l[i*32 +: 32] = init_word(la + addr_t'(i*4));
    return l;
  endfunction

  logic  mbusy = 0;
  int    mdelay;
  addr_t maddr;
  assign mem_req_ready = !mbusy;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mbusy) begin
      mdelay--;
      if (mdelay == 0) begin
        mbusy = 0;
        mem_resp_data  <= mem.exists(maddr) ? mem[maddr] : init_line(maddr);
        mem_resp_valid <= 1'b1;
      end
    end else if (mem_req_valid) begin
      if (mem_req.write) mem[mem_req.addr] = mem_req.wdata;
      else begin
        mbusy = 1; maddr = mem_req.addr; mdelay = 20;
      end
    end
  end

  // ---------------- event counters ----------------
  int n_l1_hit = 0, n_l1_miss = 0, n_l2_hit = 0, n_l2_miss = 0, n_wb = 0,
      n_all_set = 0, n_cont = 0, n_inv = 0;
  always @(posedge clk) if (rst_n) begin
    n_l1_hit  += $countones(l1_hit);
    n_l1_miss += $countones(l1_miss);
    n_l2_hit  += int'(l2_hit);
    n_l2_miss += int'(l2_miss);
    n_wb      += int'(l2_writeback);
    n_all_set += int'(l2_all_set);
    n_cont    += int'(l2_contention);
    n_inv     += int'(|dut.a_inv_valid);
  end

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // ---------------- core-side drivers ----------------
  // load/store on core c; returns the data and the latency in cycles
  task automatic d_access(int c, bit wr, addr_t a, word_t wd, output word_t rd, output int lat);
    @(negedge clk);
    d_req_valid[c] = 1; d_req_write[c] = wr; d_req_addr[c] = a; d_req_wdata[c] = wd;
    while (!d_req_ready[c]) @(negedge clk);
    @(posedge clk);
    #1 d_req_valid[c] = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!d_resp_valid[c]);
    rd = d_resp_rdata[c];
    if (wr) ref_mem[{a[31:2], 2'b00}] = wd;
  endtask

  task automatic d_load(int c, addr_t a, output int lat);
    word_t rd;
    d_access(c, 0, a, '0, rd, lat);
    check(rd == ref_rd(a), $sformatf("core %0d load %h got %h expected %h", c, a, rd, ref_rd(a)));
  endtask

  task automatic d_store(int c, addr_t a, word_t d);
    word_t rd; int lat;
    d_access(c, 1, a, d, rd, lat);
  endtask

  task automatic i_fetch(int c, addr_t a);
    @(negedge clk);
    if_req_valid[c] = 1; if_req_addr[c] = a;
    while (!if_req_ready[c]) @(negedge clk);
    @(posedge clk);
    #1 if_req_valid[c] = 0;
    do @(negedge clk); while (!if_resp_valid[c]);
    check(if_resp_rdata[c] == ref_rd(a), $sformatf("core %0d fetch %h", c, a));
  endtask

  localparam addr_t SHARED_RO = 32'h0040_0000;   // code and read-only data, L2 sets 0-69
  localparam int    THRASH_SET = 100;             // an L2 set no other phase uses
  function automatic addr_t private_addr(int c, int t, int w);
    // six tags on each of two L2 sets per core
    return addr_t'(32'h0100_0000 + (c * 2 + (w % 2)) * LINE_BYTES + t * L2_SET_STRIDE + (w / 2) * 4);
  endfunction

  int done_cnt = 0;
  int ops = 300;

  for (genvar c = 0; c < NC; c++) begin : g_core
    // instruction stream: sequential fetch with occasional jumps
    initial begin
      addr_t pc;
      if_req_addr[c] = '0;
      @(posedge rst_n);
      pc = SHARED_RO + addr_t'(c * 4096);
      for (int n = 0; n < ops; n++) begin
        i_fetch(c, pc);
        pc = ($urandom_range(0, 9) == 0) ? SHARED_RO + addr_t'($urandom_range(0, 4095) * 4) : pc + 4;
      end
      done_cnt++;
    end
    // data stream
    initial begin
      addr_t a; int lat;
      d_req_addr[c] = '0; d_req_wdata[c] = '0;
      @(posedge rst_n);
      for (int n = 0; n < ops; n++) begin
        case ($urandom_range(0, 3))
          0: d_store(c, private_addr(c, $urandom_range(0, 5), $urandom_range(0, 31)), $urandom);
          1: d_load(c, SHARED_RO + addr_t'($urandom_range(0, 1023) * 4), lat);
          default: d_load(c, private_addr(c, $urandom_range(0, 5), $urandom_range(0, 31)), lat);
        endcase
      end
      done_cnt++;
    end
  end

  int lat, h0, inv0;
  addr_t X;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == 2 * NC);
    @(negedge clk);
    // phase 2: hand-off through invalidation, and the latencies
    for (int k = 0; k < 4; k++) begin
      X = 32'h0200_0000 + addr_t'(k * LINE_BYTES);
      d_load(0, X, lat);                         // miss everywhere
      d_load(0, X + 4, lat);
      check(lat == 2, $sformatf("L1 hit latency %0d expected 2", lat));
      d_load(1, X + 8, lat);                     // L1 miss, L2 hit
      check(lat == 13, $sformatf("L1 miss / L2 hit latency %0d expected 13", lat));
      inv0 = n_inv;
      d_store(0, X + 8, 32'h5A5A_0000 + k);      // invalidates core 1's copy
      @(negedge clk);
      check(n_inv == inv0 + 1, "store invalidated the other copies");
      d_load(1, X + 8, lat);                     // must see the new value
      d_load(0, X + 8, lat);                     // writer's own copy was updated
      check(lat == 2, "writer's copy updated in place");
    end
    // phase 3: thrashing stream on one L2 set
    h0 = n_l2_hit;
    for (int r = 0; r < 10; r++)
      for (int t = 0; t < 5; t++)
        d_load(0, addr_t'(32'h0300_0000 + THRASH_SET * LINE_BYTES + t * L2_SET_STRIDE + r * 4), lat);
    @(negedge clk);
    check(n_l2_hit - h0 == 27, $sformatf("BSIP thrashing: %0d L2 hits expected 27", n_l2_hit - h0));
    // every mechanism must have happened
    check(n_l1_hit > 0,  $sformatf("L1 hits %0d", n_l1_hit));
    check(n_l1_miss > 0, $sformatf("L1 misses %0d", n_l1_miss));
    check(n_l2_hit > 0,  $sformatf("L2 hits %0d", n_l2_hit));
    check(n_l2_miss > 0, $sformatf("L2 misses %0d", n_l2_miss));
    check(n_wb > 0,      $sformatf("L2 write-backs %0d", n_wb));
    check(n_all_set > 0, $sformatf("BSIP all-set events %0d", n_all_set));
    check(n_cont > 0,    $sformatf("arbiter contention %0d", n_cont));
    check(n_inv > 0,     $sformatf("invalidations %0d", n_inv));
    $display("events: l1_hit=%0d l1_miss=%0d l2_hit=%0d l2_miss=%0d writeback=%0d all_set=%0d contention=%0d invalidate=%0d",
             n_l1_hit, n_l1_miss, n_l2_hit, n_l2_miss, n_wb, n_all_set, n_cont, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
