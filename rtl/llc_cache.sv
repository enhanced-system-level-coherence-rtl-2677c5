// llc_cache: shared last-level cache used as a write-back victim cache.
//
// Lines enter the LLC only through writes: L2 victims, probe data recovered on
// directory evictions, and merged GPU write-through / atomic / DMA-write data.
// Reads never allocate (a miss is refilled from memory straight to the
// requester). Each line keeps a dirty bit, set by the first dirty write and
// never cleared while the line stays. Replacing a dirty line hands it out on
// wb_* for write-back to memory; a clean line is dropped silently.
// Default geometry: 16 MB, 64-byte lines, 16-way, tree-PLRU, 20-cycle access.
//
// Interface: one request at a time (req_valid/req_ready). Exactly LATENCY
// cycles after acceptance resp_valid pulses; for a read resp_hit/resp_data give
// the result, for a write wb_valid tells whether a dirty line was displaced.
// After reset a sweep clears one set per cycle before init_done rises.
// Handshake, sweep and the "first invalid way, else PLRU" fill rule are this
// design's choices.
module llc_cache
  import hsc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16777216,
  parameter int unsigned WAYS       = 16,
  parameter int unsigned LATENCY    = 20,
  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES,
  localparam int unsigned SETS  = LINES / WAYS,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned TAG_W = LADDR_W - IDX_W,
  localparam int unsigned WAY_W = $clog2(WAYS)
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   init_done,
  input  logic   req_valid,
  output logic   req_ready,
  input  logic   req_we,
  input  laddr_t req_addr,
  input  line_t  req_data,
  input  logic   req_dirty,
  output logic   resp_valid,
  output logic   resp_hit,
  output line_t  resp_data,
  output logic   wb_valid,
  output laddr_t wb_addr,
  output line_t  wb_data
);

  logic [TAG_W-1:0] tag_q   [LINES];
  line_t            data_q  [LINES];
  logic [WAYS-1:0]  vld_q   [SETS];
  logic [WAYS-1:0]  dirty_q [SETS];
  logic [WAYS-2:0]  plru_q  [SETS];

  logic [IDX_W-1:0] init_idx_q;
  logic             busy_q, we_q, dirty_in_q;
  laddr_t           addr_q;
  line_t            wdata_q;
  logic [$clog2(LATENCY+1)-1:0] cnt_q;

  assign req_ready = init_done && !busy_q;

  logic [IDX_W-1:0] set;
  logic [TAG_W-1:0] tag;
  logic             hit, any_free, fire;
  logic [WAY_W-1:0] hit_way, free_way, plru_vic, sel_way, dummy_vic;
  logic [WAYS-2:0]  plru_next;

  assign set  = addr_q[IDX_W-1:0];
  assign tag  = addr_q[LADDR_W-1:IDX_W];
  assign fire = busy_q && cnt_q == 0;

  always_comb begin
    hit      = 1'b0;
    hit_way  = '0;
    any_free = 1'b0;
    free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (vld_q[set][w] && tag_q[{set, WAY_W'(w)}] == tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (!vld_q[set][w]) begin
        any_free = 1'b1;
        free_way = WAY_W'(w);
      end
    end
  end

  tree_plru #(.WAYS(WAYS)) u_vic (
    .state_i(plru_q[set]), .touch_way_i(hit_way), .state_o(), .victim_o(plru_vic)
  );
  assign sel_way = hit ? hit_way : (any_free ? free_way : plru_vic);
  tree_plru #(.WAYS(WAYS)) u_touch (
    .state_i(plru_q[set]), .touch_way_i(sel_way), .state_o(plru_next), .victim_o(dummy_vic)
  );

  assign resp_valid = fire;
  assign resp_hit   = hit;
  assign resp_data  = data_q[{set, hit_way}];
  // a write miss that displaces a valid dirty line
  assign wb_valid   = fire && we_q && !hit && !any_free && dirty_q[set][plru_vic];
  assign wb_addr    = {tag_q[{set, plru_vic}], set};
  assign wb_data    = data_q[{set, plru_vic}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done  <= 1'b0;
      init_idx_q <= '0;
      busy_q     <= 1'b0;
      cnt_q      <= '0;
      we_q       <= 1'b0;
      dirty_in_q <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
    end else begin
      if (!init_done) begin
        init_idx_q <= init_idx_q + 1'b1;
        if (init_idx_q == IDX_W'(SETS - 1)) init_done <= 1'b1;
      end
      if (req_valid && req_ready) begin
        busy_q     <= 1'b1;
        we_q       <= req_we;
        dirty_in_q <= req_dirty;
        addr_q     <= req_addr;
        wdata_q    <= req_data;
        cnt_q      <= ($clog2(LATENCY+1))'(LATENCY - 1);
      end else if (busy_q) begin
        if (cnt_q == 0) busy_q <= 1'b0;
        else            cnt_q  <= cnt_q - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done) begin
      vld_q[init_idx_q]   <= '0;
      dirty_q[init_idx_q] <= '0;
      plru_q[init_idx_q]  <= '0;
    end else if (fire) begin
      if (we_q) begin
        vld_q[set][sel_way]   <= 1'b1;
        dirty_q[set][sel_way] <= (hit && dirty_q[set][sel_way]) || dirty_in_q;
        tag_q[{set, sel_way}]  <= tag;
        data_q[{set, sel_way}] <= wdata_q;
        plru_q[set]            <= plru_next;
      end else if (hit) begin
        plru_q[set] <= plru_next;
      end
    end
  end

endmodule
