// l2_cache_tb: self-checking testbench of the shared L2 cache with BSIP
// replacement (default 128 KB, 4-way, 256-byte lines, 10-cycle hit).
//
// A main-memory model accepts posted line writes and answers line reads
// after 5-14 cycles. A word-level reference memory holds what every read
// must return. Checked: line data of every read, merged data of writes, the
// 10-cycle hit latency, write-back of dirty victims with the right address
// and data, and the BSIP decisions seen from outside the cache:
//   * thrashing stream A B C D E on one set for 10 rounds: 27 hits
//     (an LRU cache would have none);
//   * hits on four lines of a set, then a miss: the all-set event fires,
//     the LRU line is evicted, and the next miss takes the newest line
//     of the cleared half.
module l2_cache_tb;
  import cache_pkg::*;

  localparam int LAT  = 10;
  localparam int SETS = 128;                     // 128 KB / (256 B * 4 ways)
  localparam int SET_STRIDE = SETS * LINE_BYTES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     req_valid = 0, req_ready, resp_valid;
  l2_req_t  req = '0;
  line_t    resp_data;
  logic     mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  line_t    mem_resp_data;
  logic     hit_o, miss_o, writeback_o, all_set_o;

  l2_cache dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp_data,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data,
    .hit_o, .miss_o, .writeback_o, .all_set_o
  );

  // ---------------- reference and memory model ----------------
  function automatic word_t init_word(addr_t a);
    return (a >> 2) * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction
  function automatic line_t init_line(addr_t la);
    line_t l;
    for (int i = 0; i < WORDS_PER_LINE; i++) l[i*32 +: 32] = init_word(la + addr_t'(i*4));
    return l;
  endfunction

  word_t ref_mem [addr_t];               // what reads must return
  line_t mem [addr_t];                   // contents of main memory, per line
  function automatic line_t ref_line(addr_t la);
    line_t l = init_line(la);
    for (int i = 0; i < WORDS_PER_LINE; i++)
      if (ref_mem.exists(la + addr_t'(i*4))) l[i*32 +: 32] = ref_mem[la + addr_t'(i*4)];
    return l;
  endfunction

  int       mem_reads = 0, mem_writes = 0;
  addr_t    last_wb_addr;
  line_t    last_wb_data;
  logic     mbusy = 0;
  int       mdelay;
  addr_t    maddr;
  assign mem_req_ready = !mbusy;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mbusy) begin
      mdelay--;
      if (mdelay == 0) begin
        mbusy = 0;
        mem_resp_data  <= mem.exists(maddr) ? mem[maddr] : init_line(maddr);
        mem_resp_valid <= 1'b1;
        mem_reads++;
      end
    end else if (mem_req_valid) begin
      if (mem_req.write) begin
        mem[mem_req.addr] = mem_req.wdata;
        last_wb_addr = mem_req.addr;
        last_wb_data = mem_req.wdata;
        mem_writes++;
      end else begin
        mbusy  = 1;
        maddr  = mem_req.addr;
        mdelay = 5 + int'($urandom_range(0, 9));
      end
    end
  end

  int hits = 0, misses = 0, all_sets = 0, wbs = 0;
  always @(posedge clk) if (rst_n) begin
    if (hit_o) hits++;
    if (miss_o) misses++;
    if (all_set_o) all_sets++;
    if (writeback_o) wbs++;
  end

  // ---------------- checks ----------------
  int checks = 0, failures = 0;
  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  line_t rline;
  int    lat;

  task automatic access(bit wr, addr_t a, word_t wd);
    @(negedge clk);
    req_valid = 1; req.write = wr; req.addr = a; req.wdata = wd;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!resp_valid);
    rline = resp_data;
    if (wr) ref_mem[{a[31:2], 2'b00}] = wd;
    check(rline == ref_line(line_base(a)), $sformatf("line data of %s %h", wr ? "write" : "read", a));
  endtask

  function automatic addr_t line_base(addr_t a);
    return {a[31:8], 8'h00};
  endfunction

  int h0, m0;
  task automatic expect_hit(addr_t a, string what);
    h0 = hits;
    access(0, a, '0);
    @(negedge clk);
    check(hits == h0 + 1 && lat == LAT, $sformatf("%s: hit expected, latency %0d", what, lat));
  endtask
  task automatic expect_miss(addr_t a, string what);
    m0 = misses;
    access(0, a, '0);
    @(negedge clk);
    check(misses == m0 + 1 && lat > LAT, $sformatf("%s: miss expected, latency %0d", what, lat));
  endtask

  function automatic addr_t line_in_set(int set, int t);
    return addr_t'(32'h0010_0000 + t * SET_STRIDE + set * LINE_BYTES);
  endfunction

  int base_hits, base_wbs, wb0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. thrashing stream on set 5: A B C D E x 10
    base_hits = hits;
    for (int r = 0; r < 10; r++)
      for (int t = 0; t < 5; t++) access(0, line_in_set(5, t) + addr_t'(4 * r), '0);
    @(negedge clk);
    check(hits - base_hits == 27, $sformatf("BSIP thrashing hits %0d expected 27", hits - base_hits));
    // 2. all k set on set 9
    for (int t = 0; t < 4; t++) expect_miss(line_in_set(9, t), "fill set 9");
    for (int t = 0; t < 4; t++) expect_hit(line_in_set(9, t), "re-use set 9");
    check(all_sets == 0, "no all-set event yet");
    expect_miss(line_in_set(9, 4), "E with all k set");
    check(all_sets == 1, "all-set event fired");
    expect_miss(line_in_set(9, 0), "A (the LRU line) was evicted");
    // the k bits of B (rank 2) and A' (LRU) were cleared: A replaced B
    expect_hit(line_in_set(9, 2), "C kept");
    expect_hit(line_in_set(9, 3), "D kept");
    expect_miss(line_in_set(9, 1), "B was the first k=0 line from MRU");
    // 3. write hit, dirty eviction and write-back: A is written and re-used,
    //    B C D are filled and re-used, so E finds every k set and evicts A
    access(1, line_in_set(20, 0) + 8, 32'hDEAD_BEEF);     // write miss: allocate
    access(1, line_in_set(20, 0) + 12, 32'h0BAD_F00D);    // write hit
    check(lat == LAT, $sformatf("write hit latency %0d", lat));
    for (int t = 1; t <= 3; t++) access(0, line_in_set(20, t), '0);
    for (int t = 1; t <= 3; t++) access(0, line_in_set(20, t), '0);
    wb0 = wbs;
    access(0, line_in_set(20, 4), '0);
    @(negedge clk);
    check(wbs == wb0 + 1, "dirty line written back once");
    check(last_wb_addr == line_in_set(20, 0), $sformatf("write-back address %h", last_wb_addr));
    check(last_wb_data == ref_line(line_in_set(20, 0)), "write-back data");
    access(0, line_in_set(20, 0) + 8, '0);                 // refetch from memory
    // 4. random traffic: 3 sets, 7 tags each
    for (int n = 0; n < 2500; n++) begin
      addr_t a;
      a = line_in_set(int'($urandom_range(30, 32)), int'($urandom_range(0, 6)))
               + addr_t'($urandom_range(0, 63)) * 4;
      access($urandom_range(0, 2) == 0, a, $urandom);
    end
    @(negedge clk);
    check(wbs > 10, $sformatf("random traffic caused write-backs (%0d)", wbs));
    check(all_sets > 5, $sformatf("random traffic caused all-set events (%0d)", all_sets));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
