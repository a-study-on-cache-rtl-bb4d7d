// multicore_cache_system: cache hierarchy of a chip multiprocessor whose
// cores share one level-2 cache managed by the Bit Set Insertion Policy.
//
// Each of the NUM_CORES cores has a private L1 instruction cache and a
// private L1 data cache (l1_cache, 16 KB, 2-way, LRU, 2-cycle hit). Their
// misses and the data caches' write-through stores go through a round-robin
// arbiter (l2_arbiter) to the shared, unified L2 (l2_cache, 128 KB, 4-way,
// BSIP, 10-cycle hit), which writes back to main memory through a line-wide
// port. A store by one core invalidates the copies the other L1 caches hold.
//
// Interface: the cores are outside this module; each core c has an
// instruction-fetch port (if_*[c], read only) and a load/store port (d_*[c])
// with a valid/ready request and a one-cycle resp_valid answer. Main memory
// is outside too: mem_req_* (posted line writes, line reads answered by
// mem_resp_valid with the line). Event pulses of every cache are brought out
// so that hit and miss rates can be counted.
//
// Requester numbering at the arbiter: 2c = L1 I-cache of core c,
// 2c+1 = L1 D-cache of core c.
//
// The defaults are the dual-core configuration in which BSIP is evaluated.
// The quad-core configurations (for instance 4 cores, 8 KB L1, 1 MB L2) are
// reached by the parameters.
module multicore_cache_system
  import cache_pkg::*;
#(
  parameter int unsigned NUM_CORES        = 2,
  parameter int unsigned L1_SIZE_BYTES    = 16 * 1024,
  parameter int unsigned L1_WAYS          = 2,
  parameter int unsigned L1_LATENCY       = 2,
  parameter int unsigned L2_SIZE_BYTES    = 128 * 1024,
  parameter int unsigned L2_WAYS          = 4,
  parameter int unsigned L2_LATENCY       = 10,
  parameter bit          L2_SET_K_ON_FILL = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction fetch, per core
  input  logic  [NUM_CORES-1:0] if_req_valid,
  output logic  [NUM_CORES-1:0] if_req_ready,
  input  addr_t                 if_req_addr   [NUM_CORES],
  output logic  [NUM_CORES-1:0] if_resp_valid,
  output word_t                 if_resp_rdata [NUM_CORES],
  // loads and stores, per core
  input  logic  [NUM_CORES-1:0] d_req_valid,
  output logic  [NUM_CORES-1:0] d_req_ready,
  input  logic  [NUM_CORES-1:0] d_req_write,
  input  addr_t                 d_req_addr    [NUM_CORES],
  input  word_t                 d_req_wdata   [NUM_CORES],
  output logic  [NUM_CORES-1:0] d_resp_valid,
  output word_t                 d_resp_rdata  [NUM_CORES],
  // main memory
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output mem_req_t              mem_req,
  input  logic                  mem_resp_valid,
  input  line_t                 mem_resp_data,
  // events
  output logic  [2*NUM_CORES-1:0] l1_hit,
  output logic  [2*NUM_CORES-1:0] l1_miss,
  output logic                  l2_hit,
  output logic                  l2_miss,
  output logic                  l2_writeback,
  output logic                  l2_all_set,
  output logic                  l2_contention
);

  localparam int unsigned NREQ = 2 * NUM_CORES;

  logic    [NREQ-1:0] a_req_valid, a_req_ready, a_resp_valid, a_inv_valid;
  l2_req_t            a_req [NREQ];
  line_t              a_resp_data;
  addr_t              a_inv_addr;

  logic    l2_req_valid, l2_req_ready, l2_resp_valid;
  l2_req_t l2_req;
  line_t   l2_resp_data;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    word_t unused_if_wdata;
    assign unused_if_wdata = '0;

    l1_cache #(
      .SIZE_BYTES (L1_SIZE_BYTES),
      .WAYS       (L1_WAYS),
      .LATENCY    (L1_LATENCY)
    ) u_l1i (
      .clk           (clk),
      .rst_n         (rst_n),
      .req_valid     (if_req_valid[c]),
      .req_ready     (if_req_ready[c]),
      .req_write     (1'b0),
      .req_addr      (if_req_addr[c]),
      .req_wdata     (unused_if_wdata),
      .resp_valid    (if_resp_valid[c]),
      .resp_rdata    (if_resp_rdata[c]),
      .l2_req_valid  (a_req_valid[2*c]),
      .l2_req_ready  (a_req_ready[2*c]),
      .l2_req        (a_req[2*c]),
      .l2_resp_valid (a_resp_valid[2*c]),
      .l2_resp_data  (a_resp_data),
      .inv_valid     (a_inv_valid[2*c]),
      .inv_addr      (a_inv_addr),
      .hit_o         (l1_hit[2*c]),
      .miss_o        (l1_miss[2*c])
    );

    l1_cache #(
      .SIZE_BYTES (L1_SIZE_BYTES),
      .WAYS       (L1_WAYS),
      .LATENCY    (L1_LATENCY)
    ) u_l1d (
      .clk           (clk),
      .rst_n         (rst_n),
      .req_valid     (d_req_valid[c]),
      .req_ready     (d_req_ready[c]),
      .req_write     (d_req_write[c]),
      .req_addr      (d_req_addr[c]),
      .req_wdata     (d_req_wdata[c]),
      .resp_valid    (d_resp_valid[c]),
      .resp_rdata    (d_resp_rdata[c]),
      .l2_req_valid  (a_req_valid[2*c+1]),
      .l2_req_ready  (a_req_ready[2*c+1]),
      .l2_req        (a_req[2*c+1]),
      .l2_resp_valid (a_resp_valid[2*c+1]),
      .l2_resp_data  (a_resp_data),
      .inv_valid     (a_inv_valid[2*c+1]),
      .inv_addr      (a_inv_addr),
      .hit_o         (l1_hit[2*c+1]),
      .miss_o        (l1_miss[2*c+1])
    );
  end

  l2_arbiter #(.N(NREQ)) u_arb (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (a_req_valid),
    .req_ready     (a_req_ready),
    .req           (a_req),
    .resp_valid    (a_resp_valid),
    .resp_data     (a_resp_data),
    .inv_valid     (a_inv_valid),
    .inv_addr      (a_inv_addr),
    .l2_req_valid  (l2_req_valid),
    .l2_req_ready  (l2_req_ready),
    .l2_req        (l2_req),
    .l2_resp_valid (l2_resp_valid),
    .l2_resp_data  (l2_resp_data),
    .contention_o  (l2_contention)
  );

  l2_cache #(
    .SIZE_BYTES    (L2_SIZE_BYTES),
    .WAYS          (L2_WAYS),
    .LATENCY       (L2_LATENCY),
    .SET_K_ON_FILL (L2_SET_K_ON_FILL)
  ) u_l2 (
    .clk            (clk),
    .rst_n          (rst_n),
    .req_valid      (l2_req_valid),
    .req_ready      (l2_req_ready),
    .req            (l2_req),
    .resp_valid     (l2_resp_valid),
    .resp_data      (l2_resp_data),
    .mem_req_valid  (mem_req_valid),
    .mem_req_ready  (mem_req_ready),
    .mem_req        (mem_req),
    .mem_resp_valid (mem_resp_valid),
    .mem_resp_data  (mem_resp_data),
    .hit_o          (l2_hit),
    .miss_o         (l2_miss),
    .writeback_o    (l2_writeback),
    .all_set_o      (l2_all_set)
  );

endmodule
