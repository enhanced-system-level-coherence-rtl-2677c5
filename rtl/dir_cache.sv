// dir_cache: set-associative storage of the state-tracking system-level directory.
//
// Each entry holds a line's stable state (S or O; lines in I have no entry), the
// owner id and a full-map sharer vector with one bit per L2/TCC. The default
// geometry is 256 KB of 1-byte blocks (262144 entries), 32-way, tree-PLRU,
// 20-cycle access, as configured for the evaluated system.
//
// Lookup: lk_valid/lk_ready handshake; exactly LATENCY cycles after acceptance
// lk_done pulses with the hit result and, for allocation, the way to use: the
// first invalid way, else the tree-PLRU victim (lk_vic_valid tells whether that
// way holds a live entry, which the controller must then evict).
// Update: upd_valid writes (upd_keep=1) or frees (upd_keep=0) one way in one
// cycle; a write also makes the way most recently used.
// After reset a sweep clears one set per cycle; init_done rises when it ends.
// The handshake, the sweep and the allocation rule are this design's choices.
module dir_cache
  import hsc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = 262144,
  parameter int unsigned BLOCK_BYTES = 1,
  parameter int unsigned WAYS        = 32,
  parameter int unsigned LATENCY     = 20,
  localparam int unsigned ENTRIES = SIZE_BYTES / BLOCK_BYTES,
  localparam int unsigned SETS    = ENTRIES / WAYS,
  localparam int unsigned IDX_W   = $clog2(SETS),
  localparam int unsigned TAG_W   = LADDR_W - IDX_W,
  localparam int unsigned WAY_W   = $clog2(WAYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_done,
  // lookup
  input  logic             lk_valid,
  output logic             lk_ready,
  input  laddr_t           lk_addr,
  output logic             lk_done,
  output logic             lk_hit,
  output logic [WAY_W-1:0] lk_way,
  output dir_entry_t       lk_entry,
  output logic             lk_vic_valid,
  output logic [WAY_W-1:0] lk_vic_way,
  output laddr_t           lk_vic_addr,
  output dir_entry_t       lk_vic_entry,
  // update
  input  logic             upd_valid,
  input  laddr_t           upd_addr,
  input  logic [WAY_W-1:0] upd_way,
  input  logic             upd_keep,
  input  dir_entry_t       upd_entry
);

  logic [TAG_W-1:0] tag_q  [ENTRIES];
  dir_entry_t       ent_q  [ENTRIES];
  logic [WAYS-1:0]  vld_q  [SETS];
  logic [WAYS-2:0]  plru_q [SETS];

  logic [IDX_W-1:0] init_idx_q;
  logic             busy_q;
  laddr_t           addr_q;
  logic [$clog2(LATENCY+1)-1:0] cnt_q;

  assign lk_ready = init_done && !busy_q;

  // ---- lookup result, formed from the stored set on the completing cycle ----
  logic [IDX_W-1:0] set;
  logic [TAG_W-1:0] tag;
  logic [WAYS-1:0]  set_vld;
  logic [WAY_W-1:0] plru_vic, free_way, upd_tree_dummy;
  logic             any_free;
  logic [WAYS-2:0]  plru_next;

  assign set     = addr_q[IDX_W-1:0];
  assign tag     = addr_q[LADDR_W-1:IDX_W];
  assign set_vld = vld_q[set];

  tree_plru #(.WAYS(WAYS)) u_plru_vic (
    .state_i(plru_q[set]), .touch_way_i('0), .state_o(), .victim_o(plru_vic)
  );

  always_comb begin
    lk_hit   = 1'b0;
    lk_way   = '0;
    any_free = 1'b0;
    free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (set_vld[w] && tag_q[{set, WAY_W'(w)}] == tag) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
      if (!set_vld[w]) begin
        any_free = 1'b1;
        free_way = WAY_W'(w);
      end
    end
  end

  assign lk_entry     = ent_q[{set, lk_way}];
  assign lk_vic_way   = any_free ? free_way : plru_vic;
  assign lk_vic_valid = !any_free;
  assign lk_vic_addr  = {tag_q[{set, lk_vic_way}], set};
  assign lk_vic_entry = ent_q[{set, lk_vic_way}];
  assign lk_done      = busy_q && cnt_q == 0;

  // ---- update path ----
  logic [IDX_W-1:0] uset;
  assign uset = upd_addr[IDX_W-1:0];
  tree_plru #(.WAYS(WAYS)) u_plru_upd (
    .state_i(plru_q[uset]), .touch_way_i(upd_way), .state_o(plru_next), .victim_o(upd_tree_dummy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done  <= 1'b0;
      init_idx_q <= '0;
      busy_q     <= 1'b0;
      cnt_q      <= '0;
      addr_q     <= '0;
    end else begin
      if (!init_done) begin
        init_idx_q <= init_idx_q + 1'b1;
        if (init_idx_q == IDX_W'(SETS - 1)) init_done <= 1'b1;
      end
      if (lk_valid && lk_ready) begin
        busy_q <= 1'b1;
        addr_q <= lk_addr;
        cnt_q  <= ($clog2(LATENCY+1))'(LATENCY - 1);
      end else if (busy_q) begin
        if (cnt_q == 0) busy_q <= 1'b0;
        else            cnt_q  <= cnt_q - 1'b1;
      end
    end
  end

  // storage (no reset: validity is held in vld_q)
  always_ff @(posedge clk) begin
    if (!init_done) begin
      vld_q[init_idx_q]  <= '0;
      plru_q[init_idx_q] <= '0;
    end else if (upd_valid) begin
      vld_q[uset][upd_way] <= upd_keep;
      if (upd_keep) begin
        tag_q[{uset, upd_way}] <= upd_addr[LADDR_W-1:IDX_W];
        ent_q[{uset, upd_way}] <= upd_entry;
        plru_q[uset]           <= plru_next;
      end
    end
  end

endmodule
