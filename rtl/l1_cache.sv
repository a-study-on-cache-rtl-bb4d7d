// l1_cache: private level-1 cache of one core (used for both the instruction
// and the data cache), set-associative with LRU replacement.
//
// Default geometry: 16 KB, 2-way, 256-byte lines (32 sets), hit latency 2
// cycles, LRU replacement, as in the dual-core configuration of the design.
//
// Operation (one request at a time, blocking):
//   * The core presents a word request (req_valid/req_ready handshake).
//     LATENCY cycles after the handshake a read hit returns the word
//     (resp_valid for one cycle) and the set's LRU stack is updated.
//   * A read miss fetches the whole line from the L2 (l2_req_*/l2_resp_*),
//     places it in the LRU way (an invalid way first), and returns the word
//     in the cycle after the line arrives.
//   * A write is written through to the L2 as a one-word write; on a hit the
//     local copy is updated as well (no allocation on a write miss). The
//     store completes (resp_valid) when the L2 acknowledges it.
//   * inv_valid/inv_addr drops the matching line, if present: the hierarchy
//     uses it to remove stale copies when another core writes the line.
// Events: hit_o / miss_o pulse once per request at the lookup decision.
//
// Size, associativity, line size, latency and LRU follow the source
// description. Write-through with no-write-allocate and the invalidation input
// are this design's own way of keeping private copies consistent.
module l1_cache
  import cache_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16 * 1024,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LATENCY    = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  // core side
  input  logic    req_valid,
  output logic    req_ready,
  input  logic    req_write,
  input  addr_t   req_addr,
  input  word_t   req_wdata,
  output logic    resp_valid,
  output word_t   resp_rdata,
  // L2 side
  output logic    l2_req_valid,
  input  logic    l2_req_ready,
  output l2_req_t l2_req,
  input  logic    l2_resp_valid,
  input  line_t   l2_resp_data,
  // invalidation of another core's write
  input  logic    inv_valid,
  input  addr_t   inv_addr,
  // events
  output logic    hit_o,
  output logic    miss_o
);

  localparam int unsigned SETS    = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned INDEX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W   = ADDR_W - OFFSET_W - INDEX_W;
  localparam int unsigned AW      = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [INDEX_W-1:0] index_t;
  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MISS_REQ, S_MISS_WAIT,
                            S_WR_REQ, S_WR_WAIT} state_e;

  // storage
  tag_t                     tag_q   [SETS][WAYS];
  logic [WAYS-1:0]          valid_q [SETS];
  logic [WAYS-1:0][AW-1:0]  age_q   [SETS];
  line_t                    data_q  [SETS*WAYS];

  state_e state_q;
  logic [7:0] cnt_q;
  logic  write_q;
  addr_t addr_q;
  word_t wdata_q;

  index_t idx, inv_idx;
  tag_t   tag, inv_tag;
  assign idx     = addr_q[OFFSET_W +: INDEX_W];
  assign tag     = addr_q[ADDR_W-1 -: TAG_W];
  assign inv_idx = inv_addr[OFFSET_W +: INDEX_W];
  assign inv_tag = inv_addr[ADDR_W-1 -: TAG_W];

  // tag compare on the latched request
  logic          hit;
  logic [AW-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[idx][w] && tag_q[idx][w] == tag) begin
        hit     = 1'b1;
        hit_way = AW'(w);
      end
    end
  end

  logic [AW-1:0]          victim;
  logic [WAYS-1:0][AW-1:0] age_next;
  lru_policy #(.WAYS(WAYS)) u_lru (
    .age_i     (age_q[idx]),
    .valid_i   (valid_q[idx]),
    .hit_i     (hit),
    .hit_way_i (hit_way),
    .victim_o  (victim),
    .age_o     (age_next)
  );

  line_t hit_line;
  assign hit_line = data_q[{idx, hit_way}];

  logic decide;
  assign decide = (state_q == S_LOOKUP) && (cnt_q == 8'd1);

  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    l2_req_valid = (state_q == S_MISS_REQ) || (state_q == S_WR_REQ);
    l2_req.write = (state_q == S_WR_REQ);
    l2_req.addr  = addr_q;
    l2_req.wdata = wdata_q;
  end

  // data array (no reset, kept apart so it maps to a memory)
  always_ff @(posedge clk) begin
    if (decide && hit && write_q)
      data_q[{idx, hit_way}] <= line_put_word(hit_line, addr_q[OFFSET_W-1:2], wdata_q);
    else if (state_q == S_MISS_WAIT && l2_resp_valid)
      data_q[{idx, victim}] <= l2_resp_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      cnt_q      <= '0;
      write_q    <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      hit_o      <= 1'b0;
      miss_o     <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          age_q[s][w] <= AW'(w);
          tag_q[s][w] <= '0;
        end
      end
    end else begin
      resp_valid <= 1'b0;
      hit_o      <= 1'b0;
      miss_o     <= 1'b0;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          write_q <= req_write;
          addr_q  <= req_addr;
          wdata_q <= req_wdata;
          cnt_q   <= 8'(LATENCY - 1);
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (decide) begin
            hit_o  <= hit;
            miss_o <= !hit;
            if (hit) age_q[idx] <= age_next;
            if (write_q) begin
              state_q <= S_WR_REQ;
            end else if (hit) begin
              resp_valid <= 1'b1;
              resp_rdata <= line_word(hit_line, addr_q[OFFSET_W-1:2]);
              state_q    <= S_IDLE;
            end else begin
              state_q <= S_MISS_REQ;
            end
          end else begin
            cnt_q <= cnt_q - 8'd1;
          end
        end
        S_MISS_REQ: if (l2_req_ready) state_q <= S_MISS_WAIT;
        S_MISS_WAIT: if (l2_resp_valid) begin
          tag_q[idx][victim]   <= tag;
          valid_q[idx][victim] <= 1'b1;
          age_q[idx]           <= age_next;
          resp_valid           <= 1'b1;
          resp_rdata           <= line_word(l2_resp_data, addr_q[OFFSET_W-1:2]);
          state_q              <= S_IDLE;
        end
        S_WR_REQ: if (l2_req_ready) state_q <= S_WR_WAIT;
        S_WR_WAIT: if (l2_resp_valid) begin
          resp_valid <= 1'b1;
          state_q    <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
      // invalidation of a copy another core has written (applied last)
      if (inv_valid) begin
        for (int w = 0; w < WAYS; w++)
          if (tag_q[inv_idx][w] == inv_tag) valid_q[inv_idx][w] <= 1'b0;
      end
    end
  end

  // the latency counter must be able to count the hit latency
  initial assert (LATENCY >= 2 && LATENCY < 256)
    else $error("l1_cache: LATENCY must be in 2..255");

endmodule
