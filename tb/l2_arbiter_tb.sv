// l2_arbiter_tb: self-checking testbench of the L2 request arbiter (4
// requesters).
//
// Each requester issues random line reads and word writes at random times
// and holds each request until it is accepted. An L2 model takes one
// request at a time and answers after 1-6 cycles. Checked against a
// round-robin reference: which requester is granted, that the forwarded
// request is that requester's, that the answer reaches only the owner, that
// a write raises inv_valid for every other requester with the written
// address, and that contention was seen and counted.
module l2_arbiter_tb;
  import cache_pkg::*;
  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req_valid = '0, req_ready, resp_valid, inv_valid;
  l2_req_t      req [N];
  line_t        resp_data;
  addr_t        inv_addr;
  logic         l2_req_valid, l2_req_ready, l2_resp_valid = 0, contention;
  l2_req_t      l2_req;
  line_t        l2_resp_data = '0;

  l2_arbiter #(.N(N)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp_data,
    .inv_valid, .inv_addr, .l2_req_valid, .l2_req_ready, .l2_req,
    .l2_resp_valid, .l2_resp_data, .contention_o(contention)
  );

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // L2 model
  logic busy = 0;
  int   delay, owner, ptr = 0, served [N], contentions = 0, invs = 0;
  assign l2_req_ready = !busy;

  always @(posedge clk) if (rst_n) begin
    l2_resp_valid <= 1'b0;
    // response routing
    if (l2_resp_valid) begin
      check(resp_valid == N'(1 << owner), $sformatf("response to %b, owner %0d", resp_valid, owner));
      check(resp_data == l2_resp_data, "response data broadcast");
    end else check(resp_valid == '0, "no response without the L2's");
    if (busy) begin
      check(!l2_req_valid, "nothing forwarded while a request is outstanding");
      delay--;
      if (delay == 0) begin
        busy = 0;
        l2_resp_data  <= {64{32'(owner) + 32'hA000_0000}};
        l2_resp_valid <= 1'b1;
      end
    end else if (l2_req_valid) begin
      int exp = -1;
      for (int i = N - 1; i >= 0; i--) if (req_valid[(ptr + i) % N]) exp = (ptr + i) % N;
      check(exp >= 0 && req_ready == N'(1 << exp), $sformatf("grant %b expected %0d", req_ready, exp));
      check(l2_req == req[exp], "forwarded request is the granted one");
      if (req[exp].write) begin
        invs++;
        check(inv_valid == ~N'(1 << exp) && inv_addr == req[exp].addr, "invalidation of the other caches");
      end else check(inv_valid == '0, "no invalidation for a read");
      if ($countones(req_valid) > 1) begin
        contentions++;
        check(contention, "contention flagged");
      end else check(!contention, "no contention flagged");
      owner = exp;
      ptr   = (exp + 1) % N;
      served[exp]++;
      busy  = 1;
      delay = 1 + int'($urandom_range(0, 5));
    end else check(req_ready == '0, "no grant without a request");
  end

  // requesters
  for (genvar i = 0; i < N; i++) begin : g_req
    initial begin
      req[i] = '0;
      @(posedge rst_n);
      for (int n = 0; n < 200; n++) begin
        repeat ($urandom_range(0, 6)) @(negedge clk);
        @(negedge clk);
        req[i].write = ($urandom_range(0, 2) == 0);
        req[i].addr  = {$urandom, 2'b00} >> 2;
        req[i].wdata = $urandom;
        req_valid[i] = 1'b1;
        do @(posedge clk); while (!req_ready[i]);
        #1 req_valid[i] = 1'b0;
        do @(posedge clk); while (!resp_valid[i]);
      end
      served[i] += 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (served[0] == 200 && served[1] == 200 && served[2] == 200 && served[3] == 200);
    repeat (10) @(negedge clk);
    check(contentions > 50, $sformatf("contention happened %0d times", contentions));
    check(invs > 50, $sformatf("invalidations happened %0d times", invs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
