// l1_cache_tb: self-checking testbench of the L1 cache (default 16 KB,
// 2-way, 256-byte lines, 2-cycle hit).
//
// A small model of the L2 answers line reads and one-word writes after 3-7
// cycles; memory contents are a fixed function of the address unless
// written. Checked: read data, the 2-cycle hit latency, that hits do not
// reach the L2, write-through of every store (address and data), update of
// the local copy on a write hit, no allocation on a write miss, LRU victim
// choice, invalidation, and a random mix of loads and stores.
module l1_cache_tb;
  import cache_pkg::*;

  localparam int LAT  = 2;
  localparam int SETS = 32;            // 16 KB / (256 B * 2 ways)
  localparam int SET_STRIDE = SETS * LINE_BYTES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    req_valid = 0, req_ready, req_write = 0, resp_valid;
  addr_t   req_addr = '0;
  word_t   req_wdata = '0, resp_rdata;
  logic    l2_req_valid, l2_req_ready, l2_resp_valid;
  l2_req_t l2_req;
  line_t   l2_resp_data;
  logic    inv_valid = 0;
  addr_t   inv_addr = '0;
  logic    hit_o, miss_o;

  l1_cache dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata,
    .resp_valid, .resp_rdata, .l2_req_valid, .l2_req_ready, .l2_req,
    .l2_resp_valid, .l2_resp_data, .inv_valid, .inv_addr, .hit_o, .miss_o
  );

  // ---------------- memory behind the L1 (word granular) ----------------
  word_t wmem [addr_t];
  function automatic word_t init_word(addr_t a);
    return (a >> 2) * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction
  function automatic word_t mem_rd(addr_t a);
    addr_t wa = {a[31:2], 2'b00};
    return wmem.exists(wa) ? wmem[wa] : init_word(wa);
  endfunction

  // ---------------- L2 model ----------------
  int      l2_reads = 0, l2_writes = 0;
  addr_t   last_wr_addr;
  word_t   last_wr_data;
  logic    busy = 0;
  int      delay;
  l2_req_t cur;
  assign l2_req_ready = !busy;
  always @(posedge clk) begin
    l2_resp_valid <= 1'b0;
    if (busy) begin
      delay--;
      if (delay == 0) begin
        line_t l;
        busy = 0;
        if (cur.write) begin
          wmem[{cur.addr[31:2], 2'b00}] = cur.wdata;
          l2_writes++;
          last_wr_addr = cur.addr;
          last_wr_data = cur.wdata;
        end else l2_reads++;
        for (int i = 0; i < WORDS_PER_LINE; i++)
          l[i*32 +: 32] = mem_rd({cur.addr[31:8], 8'(i*4)});
        l2_resp_data  <= l;
        l2_resp_valid <= 1'b1;
      end
    end else if (l2_req_valid) begin
      busy  = 1;
      cur   = l2_req;
      delay = 3 + int'($urandom_range(0, 4));
    end
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

  word_t rdata;
  int    lat, reads_before;

  task automatic access(bit wr, addr_t a, word_t wd);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_wdata = wd;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!resp_valid);
    rdata = resp_rdata;
  endtask

  task automatic load(addr_t a, string what);
    access(0, a, '0);
    check(rdata == mem_rd(a), $sformatf("%s: load %h got %h expected %h", what, a, rdata, mem_rd(a)));
  endtask

  // expect a load to hit: 2-cycle latency and no L2 read
  task automatic load_hit(addr_t a, string what);
    reads_before = l2_reads;
    load(a, what);
    check(lat == LAT, $sformatf("%s: hit latency %0d expected %0d", what, lat, LAT));
    check(l2_reads == reads_before, $sformatf("%s: hit went to the L2", what));
  endtask

  task automatic load_miss(addr_t a, string what);
    reads_before = l2_reads;
    load(a, what);
    check(l2_reads == reads_before + 1, $sformatf("%s: expected a miss", what));
    check(lat > LAT, $sformatf("%s: miss latency %0d", what, lat));
  endtask

  task automatic store(addr_t a, word_t d, string what);
    int writes_before = l2_writes;
    access(1, a, d);
    check(l2_writes == writes_before + 1 && last_wr_addr == a && last_wr_data == d,
          $sformatf("%s: store %h not written through", what, a));
  endtask

  addr_t A, B, C;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    A = 32'h0001_0040;                 // set 0
    B = A + SET_STRIDE;                // same set, other tag
    C = A + 2 * SET_STRIDE;
    load_miss(A, "cold A");
    load_hit(A + 4, "A again, other word");
    load_miss(B, "cold B");
    load_hit(A, "touch A");            // B is now the LRU line
    load_miss(C, "C replaces B");
    load_hit(A + 8, "A kept");
    load_miss(B, "B was evicted");     // A was touched last: B replaces C
    load_hit(A + 16, "A kept again");
    load_miss(C, "C was evicted");     // B is LRU now: C replaces B
    load_hit(B - SET_STRIDE, "A still kept");
    // store hit: written through and local copy updated
    store(A + 12, 32'hCAFE_0001, "store hit");
    load_hit(A + 12, "load after store hit");
    // store miss: written through, not allocated
    store(32'h0002_0000, 32'hBEEF_0002, "store miss");
    load_miss(32'h0002_0000, "no write allocate");
    // invalidation
    load_hit(A, "A present");
    @(negedge clk); inv_valid = 1; inv_addr = A + 100; @(negedge clk); inv_valid = 0;
    load_miss(A, "A invalidated");
    // random traffic over 8 lines mapping to 2 sets
    for (int n = 0; n < 1500; n++) begin
      addr_t a;
      a = 32'h0004_0000 + addr_t'($urandom_range(0, 3)) * SET_STRIDE
               + addr_t'($urandom_range(0, 1)) * LINE_BYTES + addr_t'($urandom_range(0, 63)) * 4;
      if ($urandom_range(0, 3) == 0) store(a, $urandom, "random store");
      else load(a, "random load");
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
