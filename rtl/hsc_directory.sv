// hsc_directory: system-level coherence point of a CPU-GPU unified-memory SoC.
//
// CorePair L2 caches (MOESI), GPU TCCs (VIPER, valid/invalid) and a DMA engine
// share one directory that tracks, per line, whether no cache, only clean
// sharers, or one owner (plus dirty sharers) holds it, with a full-map sharer
// vector. Reads of untracked or shared lines are served from the LLC without
// any probe; probes go only to the owner (downgrade) or to the recorded owner
// and sharers (invalidate), never broadcast. Behind the directory sits a
// write-back victim LLC: L2 victims and GPU/DMA writes stop there, and memory
// is written only when a dirty LLC line is replaced.
//
// Blocks: req_arbiter (round-robin over NUM_SRC channels) -> dir_ctrl (state
// table, probes via probe_collector, merges via atomic_alu) with dir_cache
// (256 KB / 32-way), llc_cache (16 MB / 16-way) and mem_req_queue (ordered
// path to memory). Request channel i is source i: L2s 0..3, TCC 4, DMA 5.
// Responses, probes and memory requests/responses use the formats of hsc_pkg;
// probes and responses are single-cycle pulses that must be taken, memory
// requests use valid/ready and memory returns read data in request order.
// init_done rises once both caches have cleared their tag state after reset
// (one set per cycle); requests wait until then.
module hsc_directory
  import hsc_pkg::*;
#(
  parameter int unsigned DIR_SIZE_BYTES  = 262144,
  parameter int unsigned DIR_BLOCK_BYTES = 1,
  parameter int unsigned DIR_WAYS        = 32,
  parameter int unsigned DIR_LATENCY     = 20,
  parameter int unsigned LLC_SIZE_BYTES  = 16777216,
  parameter int unsigned LLC_WAYS        = 16,
  parameter int unsigned LLC_LATENCY     = 20,
  parameter int unsigned MQ_DEPTH        = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               init_done,
  // request channels
  input  logic [NUM_SRC-1:0] req_valid,
  output logic [NUM_SRC-1:0] req_ready,
  input  req_t               req [NUM_SRC],
  // responses
  output logic               rsp_valid,
  output rsp_t               rsp,
  // unblocks from L2s
  input  logic               unblk_valid,
  input  src_t               unblk_src,
  // probes and acknowledgments
  output cmask_t             prb_valid,
  output probe_e             prb_type,
  output laddr_t             prb_addr,
  input  cmask_t             pack_valid,
  input  cmask_t             pack_dirty,
  input  line_t              pack_data [NUM_CLIENTS],
  // main memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output mem_req_t           mem_req,
  input  logic               mem_rsp_valid,
  input  line_t              mem_rsp_data,
  // events
  output logic               ev_early_rsp,
  output logic               ev_dir_evict,
  output logic               ev_llc_wb,
  output logic               ev_illegal
);

  localparam int unsigned DWAY_W = $clog2(DIR_WAYS);

  logic dc_init, llc_init;
  assign init_done = dc_init && llc_init;

  // arbiter -> controller
  logic a_valid, a_ready;
  req_t a_req;

  req_arbiter #(.N(NUM_SRC)) u_arb (
    .clk, .rst_n,
    .in_valid(req_valid), .in_ready(req_ready), .in_req(req),
    .out_valid(a_valid), .out_ready(a_ready), .out_req(a_req)
  );

  // directory cache
  logic              lk_valid, lk_ready, lk_done, lk_hit, vic_valid;
  laddr_t            lk_addr, vic_addr, upd_addr;
  logic [DWAY_W-1:0] lk_way, vic_way, upd_way;
  dir_entry_t        lk_entry, vic_entry, upd_entry;
  logic              upd_valid, upd_keep;

  dir_cache #(
    .SIZE_BYTES(DIR_SIZE_BYTES), .BLOCK_BYTES(DIR_BLOCK_BYTES),
    .WAYS(DIR_WAYS), .LATENCY(DIR_LATENCY)
  ) u_dir (
    .clk, .rst_n, .init_done(dc_init),
    .lk_valid, .lk_ready, .lk_addr, .lk_done, .lk_hit, .lk_way, .lk_entry,
    .lk_vic_valid(vic_valid), .lk_vic_way(vic_way), .lk_vic_addr(vic_addr),
    .lk_vic_entry(vic_entry),
    .upd_valid, .upd_addr, .upd_way, .upd_keep, .upd_entry
  );

  // LLC
  logic   l_req_valid, l_req_ready, l_req_we, l_req_dirty;
  logic   l_resp_valid, l_resp_hit, l_wb_valid;
  laddr_t l_req_addr, l_wb_addr;
  line_t  l_req_data, l_resp_data, l_wb_data;

  llc_cache #(.SIZE_BYTES(LLC_SIZE_BYTES), .WAYS(LLC_WAYS), .LATENCY(LLC_LATENCY)) u_llc (
    .clk, .rst_n, .init_done(llc_init),
    .req_valid(l_req_valid), .req_ready(l_req_ready), .req_we(l_req_we),
    .req_addr(l_req_addr), .req_data(l_req_data), .req_dirty(l_req_dirty),
    .resp_valid(l_resp_valid), .resp_hit(l_resp_hit), .resp_data(l_resp_data),
    .wb_valid(l_wb_valid), .wb_addr(l_wb_addr), .wb_data(l_wb_data)
  );

  // memory queue
  logic     q_valid, q_ready, q_empty;
  mem_req_t q_req;

  mem_req_queue #(.DEPTH(MQ_DEPTH)) u_mq (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready), .in_req(q_req),
    .out_valid(mem_req_valid), .out_ready(mem_req_ready), .out_req(mem_req),
    .empty(q_empty)
  );

  dir_ctrl #(.DIR_WAYS(DIR_WAYS)) u_ctrl (
    .clk, .rst_n,
    .req_valid(a_valid && init_done), .req_ready(a_ready), .req(a_req),
    .rsp_valid, .rsp,
    .unblk_valid, .unblk_src,
    .prb_valid, .prb_type, .prb_addr, .pack_valid, .pack_dirty, .pack_data,
    .dc_lk_valid(lk_valid), .dc_lk_ready(lk_ready), .dc_lk_addr(lk_addr),
    .dc_lk_done(lk_done), .dc_lk_hit(lk_hit), .dc_lk_way(lk_way), .dc_lk_entry(lk_entry),
    .dc_vic_valid(vic_valid), .dc_vic_way(vic_way), .dc_vic_addr(vic_addr),
    .dc_vic_entry(vic_entry),
    .dc_upd_valid(upd_valid), .dc_upd_addr(upd_addr), .dc_upd_way(upd_way),
    .dc_upd_keep(upd_keep), .dc_upd_entry(upd_entry),
    .llc_req_valid(l_req_valid), .llc_req_ready(l_req_ready), .llc_req_we(l_req_we),
    .llc_req_addr(l_req_addr), .llc_req_data(l_req_data), .llc_req_dirty(l_req_dirty),
    .llc_resp_valid(l_resp_valid), .llc_resp_hit(l_resp_hit), .llc_resp_data(l_resp_data),
    .llc_wb_valid(l_wb_valid), .llc_wb_addr(l_wb_addr), .llc_wb_data(l_wb_data),
    .mq_valid(q_valid), .mq_ready(q_ready), .mq_req(q_req), .mq_empty(q_empty),
    .mem_rsp_valid, .mem_rsp_data,
    .ev_early_rsp, .ev_dir_evict, .ev_llc_wb, .ev_illegal
  );

endmodule
