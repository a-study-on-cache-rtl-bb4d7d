// l2_arbiter: shares the single request port of the L2 cache among the L1
// caches of all cores.
//
// Requesters are served one at a time in round-robin order: when the L2 is
// free, the first valid requester after the one granted last is forwarded
// (valid, ready and the request pass straight through). The grant is held
// until the L2 answers; the L2's response is then steered to that requester
// only (resp_valid[i]), with the line data broadcast on resp_data (a plain
// wire from the L2's data output: only resp_valid tells the owner apart).
//
// When a write is forwarded, inv_valid pulses for every other requester with
// inv_addr = the written address, so that the other L1 caches drop their
// copy of the line. contention_o pulses when a request is forwarded while at
// least one other requester is also waiting.
//
// Sharing of the L2 among cores follows the source description; round-robin
// order, the single outstanding request and write-invalidation are this
// design's own choices.
module l2_arbiter
  import cache_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // requesters (L1 caches)
  input  logic [N-1:0]   req_valid,
  output logic [N-1:0]   req_ready,
  input  l2_req_t        req [N],
  output logic [N-1:0]   resp_valid,
  output line_t          resp_data,
  output logic [N-1:0]   inv_valid,
  output addr_t          inv_addr,
  // shared L2
  output logic           l2_req_valid,
  input  logic           l2_req_ready,
  output l2_req_t        l2_req,
  input  logic           l2_resp_valid,
  input  line_t          l2_resp_data,
  // events
  output logic           contention_o
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          busy_q;
  logic [IW-1:0] owner_q, ptr_q;   // ptr_q: requester with first priority
  logic [IW-1:0] sel;
  logic          any;

  // round-robin pick starting at ptr_q
  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int i = 0; i < N; i++) begin
      logic [IW-1:0] j;
      j = IW'((int'(ptr_q) + i) % N);
      if (!any && req_valid[j]) begin
        any = 1'b1;
        sel = j;
      end
    end
  end

  logic fire;
  assign l2_req_valid = !busy_q && any;
  assign l2_req       = req[sel];
  assign fire         = l2_req_valid && l2_req_ready;

  always_comb begin
    req_ready = '0;
    if (!busy_q && any) req_ready[sel] = l2_req_ready;
  end

  always_comb begin
    resp_valid = '0;
    if (busy_q) resp_valid[owner_q] = l2_resp_valid;
  end
  assign resp_data = l2_resp_data;

  always_comb begin
    inv_valid = '0;
    if (fire && req[sel].write) begin
      inv_valid      = '1;
      inv_valid[sel] = 1'b0;
    end
  end
  assign inv_addr     = req[sel].addr;
  assign contention_o = fire && ($countones(req_valid) > 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      ptr_q   <= '0;
    end else if (!busy_q) begin
      if (fire) begin
        busy_q  <= 1'b1;
        owner_q <= sel;
        ptr_q   <= IW'((int'(sel) + 1) % N);
      end
    end else if (l2_resp_valid) begin
      busy_q <= 1'b0;
    end
  end

  // Only one request is outstanding: the L2 answers only while a grant is held.
  assert property (@(posedge clk) disable iff (!rst_n) l2_resp_valid |-> busy_q);
  // At most one requester is granted per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ready));

endmodule
