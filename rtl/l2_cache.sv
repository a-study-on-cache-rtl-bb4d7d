// l2_cache: shared, unified level-2 cache with Bit Set Insertion Policy
// (BSIP) replacement and write-back to main memory.
//
// Default geometry: 128 KB, 4-way, 256-byte lines (128 sets), hit latency 10
// cycles, as in the dual-core configuration in which BSIP is evaluated.
// Each line holds a tag, a valid bit, a dirty bit, a recency rank and the
// BSIP re-use bit k; bsip_policy decides the victim and the state update.
//
// Operation (one request at a time, blocking; the arbiter in front of it
// serialises the requests of all L1 caches):
//   * A request is a line read or a one-word write (req_valid/req_ready).
//     LATENCY cycles after the handshake a hit answers: resp_valid pulses for
//     one cycle with the whole line (the updated line for a write). A write
//     hit stores the word and marks the line dirty.
//   * On a miss the BSIP victim is chosen. A dirty victim is first written
//     back with a posted line write to memory; then the line is read from
//     memory (mem_req_* with mem_resp_valid/mem_resp_data returning it),
//     the request's word is merged for a write (write-allocate), the line is
//     installed and the response is given in the cycle after the line arrives.
// Events (one-cycle pulses): hit_o, miss_o, writeback_o, and all_set_o when a
// miss found every k bit of the set set and cleared half of them.
//
// Size, associativity, line size, latency, sharing and BSIP follow the source
// description, as does write-back. The request/response handshakes, posted
// write-backs and write-allocate are this design's own choices.
module l2_cache
  import cache_pkg::*;
#(
  parameter int unsigned SIZE_BYTES    = 128 * 1024,
  parameter int unsigned WAYS          = 4,
  parameter int unsigned LATENCY       = 10,
  parameter bit          SET_K_ON_FILL = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  // request side (from the arbiter)
  input  logic     req_valid,
  output logic     req_ready,
  input  l2_req_t  req,
  output logic     resp_valid,
  output line_t    resp_data,
  // main-memory side
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  input  logic     mem_resp_valid,
  input  line_t    mem_resp_data,
  // events
  output logic     hit_o,
  output logic     miss_o,
  output logic     writeback_o,
  output logic     all_set_o
);

  localparam int unsigned SETS    = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned INDEX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W   = ADDR_W - OFFSET_W - INDEX_W;
  localparam int unsigned AW      = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [INDEX_W-1:0] index_t;
  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WB_REQ, S_FILL_REQ,
                            S_FILL_WAIT} state_e;

  // storage
  tag_t                    tag_q   [SETS][WAYS];
  logic [WAYS-1:0]         valid_q [SETS];
  logic [WAYS-1:0]         dirty_q [SETS];
  logic [WAYS-1:0]         k_q     [SETS];
  logic [WAYS-1:0][AW-1:0] age_q   [SETS];
  line_t                   data_q  [SETS*WAYS];

  state_e        state_q;
  logic [7:0]    cnt_q;
  l2_req_t       req_q;
  logic [AW-1:0] victim_q;

  index_t idx;
  tag_t   tag;
  assign idx = req_q.addr[OFFSET_W +: INDEX_W];
  assign tag = req_q.addr[ADDR_W-1 -: TAG_W];

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

  logic [AW-1:0]           victim;
  logic [WAYS-1:0][AW-1:0] age_next;
  logic [WAYS-1:0]         k_next;
  logic                    all_set;
  bsip_policy #(.WAYS(WAYS), .SET_K_ON_FILL(SET_K_ON_FILL)) u_bsip (
    .age_i     (age_q[idx]),
    .k_i       (k_q[idx]),
    .valid_i   (valid_q[idx]),
    .hit_i     (hit),
    .hit_way_i (hit_way),
    .victim_o  (victim),
    .age_o     (age_next),
    .k_o       (k_next),
    .all_set_o (all_set)
  );

  line_t hit_line, victim_line, hit_line_new, fill_line;
  assign hit_line     = data_q[{idx, hit_way}];
  assign victim_line  = data_q[{idx, victim_q}];
  assign hit_line_new = req_q.write
                      ? line_put_word(hit_line, req_q.addr[OFFSET_W-1:2], req_q.wdata)
                      : hit_line;
  assign fill_line    = req_q.write
                      ? line_put_word(mem_resp_data, req_q.addr[OFFSET_W-1:2], req_q.wdata)
                      : mem_resp_data;

  logic decide, fill_done;
  assign decide    = (state_q == S_LOOKUP) && (cnt_q == 8'd1);
  assign fill_done = (state_q == S_FILL_WAIT) && mem_resp_valid;

  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    mem_req_valid = (state_q == S_WB_REQ) || (state_q == S_FILL_REQ);
    mem_req.write = (state_q == S_WB_REQ);
    mem_req.addr  = (state_q == S_WB_REQ)
                  ? {tag_q[idx][victim_q], idx, {OFFSET_W{1'b0}}}
                  : {tag, idx, {OFFSET_W{1'b0}}};
    mem_req.wdata = victim_line;
  end

  // data array (no reset, kept apart so it maps to a memory)
  always_ff @(posedge clk) begin
    if (decide && hit && req_q.write)
      data_q[{idx, hit_way}] <= hit_line_new;
    else if (fill_done)
      data_q[{idx, victim_q}] <= fill_line;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      cnt_q       <= '0;
      req_q       <= '0;
      victim_q    <= '0;
      resp_valid  <= 1'b0;
      resp_data   <= '0;
      hit_o       <= 1'b0;
      miss_o      <= 1'b0;
      writeback_o <= 1'b0;
      all_set_o   <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
        k_q[s]     <= '0;
        for (int w = 0; w < WAYS; w++) begin
          age_q[s][w] <= AW'(w);
          tag_q[s][w] <= '0;
        end
      end
    end else begin
      resp_valid  <= 1'b0;
      hit_o       <= 1'b0;
      miss_o      <= 1'b0;
      writeback_o <= 1'b0;
      all_set_o   <= 1'b0;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          req_q   <= req;
          cnt_q   <= 8'(LATENCY - 1);
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (decide) begin
            if (hit) begin
              hit_o       <= 1'b1;
              age_q[idx]  <= age_next;
              k_q[idx]    <= k_next;
              if (req_q.write) dirty_q[idx][hit_way] <= 1'b1;
              resp_valid  <= 1'b1;
              resp_data   <= hit_line_new;
              state_q     <= S_IDLE;
            end else begin
              miss_o   <= 1'b1;
              victim_q <= victim;
              state_q  <= (valid_q[idx][victim] && dirty_q[idx][victim])
                        ? S_WB_REQ : S_FILL_REQ;
            end
          end else begin
            cnt_q <= cnt_q - 8'd1;
          end
        end
        S_WB_REQ: if (mem_req_ready) begin
          writeback_o <= 1'b1;
          state_q     <= S_FILL_REQ;
        end
        S_FILL_REQ: if (mem_req_ready) state_q <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_resp_valid) begin
          // the set has not changed since the lookup, so the policy still
          // names victim_q and gives the miss update for it
          all_set_o                <= all_set;
          tag_q[idx][victim_q]     <= tag;
          valid_q[idx][victim_q]   <= 1'b1;
          dirty_q[idx][victim_q]   <= req_q.write;
          age_q[idx]               <= age_next;
          k_q[idx]                 <= k_next;
          resp_valid               <= 1'b1;
          resp_data                <= fill_line;
          state_q                  <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Rules of the interfaces.
  // A fill updates exactly the way chosen at the lookup.
  assert property (@(posedge clk) disable iff (!rst_n) fill_done |-> victim == victim_q);
  // A memory request is held until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req.addr));

  initial assert (LATENCY >= 2 && LATENCY < 256)
    else $error("l2_cache: LATENCY must be in 2..255");

endmodule
