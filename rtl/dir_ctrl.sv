// dir_ctrl: controller of the state-tracking system-level directory.
//
// It serves one coherence transaction at a time for the CorePair L2s, the GPU
// TCC(s) and the DMA engine. For each request it looks the line up in the
// directory cache, evicts a live directory entry first if the set is full
// (invalidating its owner and sharers and saving any dirty data in the LLC),
// then applies the state table below, reading the LLC (and memory on an LLC
// miss) in parallel with any probes, and finally writes the new directory entry.
//
// State table (I: no cache holds the line; S: clean copies only; O: one owner
// holds it E, M or O, possibly with dirty sharers). "R" = read LLC/memory,
// "W" = write the LLC. Probe data that comes back dirty overrides the LLC data.
//   I  RdBlkS          -> S, sharer added                  R
//   I  RdBlk           -> O, owner = requester, grant E     R
//   I  RdBlkM/WT/Atomic-> O, owner = requester              R
//   I  DMARd/DMAWr     -> unchanged, no entry               R
//   S  RdBlkS/RdBlk    -> S, sharer added, grant S          R (no probes)
//   S  RdBlkM/WT/Atomic-> O, owner = requester, invalidate sharers     R
//   S  DMAWr           -> I, invalidate sharers             R
//   S  DMARd           -> unchanged                         R
//   S  VicClean        -> sharer removed, I when none left  W
//   O  RdBlkS/RdBlk    -> downgrade probe to the owner only; clean answer ->
//                         S with owner and requester as sharers, dirty answer
//                         -> stays O, requester added; grant S. A requester
//                         that is the owner itself (E line, I-cache miss) goes
//                         to S without a probe.                       R
//   O  RdBlkM/WT/Atomic-> owner = requester, invalidate owner+sharers  R
//   O  DMARd           -> downgrade owner; clean -> S (owner a sharer) R
//   O  DMAWr           -> I, invalidate owner+sharers       R
//   O  VicClean        -> from owner: I; from a sharer: sharer removed W
//   O  VicDirty        -> owner removed; I if no sharers, else S      W
// WT, Atomic and DMAWr then merge their data into the line (atomic_alu) and
// write it to the LLC as dirty; victims are written to the LLC only (dirty bit
// for VicDirty), never to memory. A dirty probe answer to a read is forwarded
// to the requester at once (early response), without waiting for the LLC.
// L2 read/write-permission requests end with an unblock from the requester
// (accepted even if it arrives before the controller has finished, as it can
// after an early response);
// TCC and DMA transactions end on their own. Flush is answered once all
// earlier memory writes have left the memory queue.
//
// Timing at the default latencies: a request that needs no eviction and hits
// in the LLC is answered DIR_LAT + LLC_LAT + 5 cycles after it is accepted.
//
// Following the document: the table above, probe multicast to the tracked
// sharers, early dirty response, victim-only write-back LLC. This design's
// choices: one transaction at a time (the whole directory is the blocked
// state), S-state DMAWr going to I, the handling of table cells the document
// marks illegal (they are served and flagged on ev_illegal), and the message
// formats.
module dir_ctrl
  import hsc_pkg::*;
#(
  parameter int unsigned DIR_WAYS = 32,
  localparam int unsigned DWAY_W = $clog2(DIR_WAYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // requests (already arbitrated; src names the channel)
  input  logic              req_valid,
  output logic              req_ready,
  input  req_t              req,
  // responses (always accepted)
  output logic              rsp_valid,
  output rsp_t              rsp,
  // unblock from an L2 requester
  input  logic              unblk_valid,
  input  src_t              unblk_src,
  // probes to the caching agents and their acknowledgments
  output cmask_t            prb_valid,
  output probe_e            prb_type,
  output laddr_t            prb_addr,
  input  cmask_t            pack_valid,
  input  cmask_t            pack_dirty,
  input  line_t             pack_data [NUM_CLIENTS],
  // directory cache
  output logic              dc_lk_valid,
  input  logic              dc_lk_ready,
  output laddr_t            dc_lk_addr,
  input  logic              dc_lk_done,
  input  logic              dc_lk_hit,
  input  logic [DWAY_W-1:0] dc_lk_way,
  input  dir_entry_t        dc_lk_entry,
  input  logic              dc_vic_valid,
  input  logic [DWAY_W-1:0] dc_vic_way,
  input  laddr_t            dc_vic_addr,
  input  dir_entry_t        dc_vic_entry,
  output logic              dc_upd_valid,
  output laddr_t            dc_upd_addr,
  output logic [DWAY_W-1:0] dc_upd_way,
  output logic              dc_upd_keep,
  output dir_entry_t        dc_upd_entry,
  // LLC
  output logic              llc_req_valid,
  input  logic              llc_req_ready,
  output logic              llc_req_we,
  output laddr_t            llc_req_addr,
  output line_t             llc_req_data,
  output logic              llc_req_dirty,
  input  logic              llc_resp_valid,
  input  logic              llc_resp_hit,
  input  line_t             llc_resp_data,
  input  logic              llc_wb_valid,
  input  laddr_t            llc_wb_addr,
  input  line_t             llc_wb_data,
  // memory queue
  output logic              mq_valid,
  input  logic              mq_ready,
  output mem_req_t          mq_req,
  input  logic              mq_empty,
  input  logic              mem_rsp_valid,
  input  line_t             mem_rsp_data,
  // event pulses
  output logic              ev_early_rsp,
  output logic              ev_dir_evict,
  output logic              ev_llc_wb,
  output logic              ev_illegal
);

  typedef enum logic [3:0] {
    S_IDLE, S_LKREQ, S_LKWAIT, S_EVICT, S_EVICT_WAIT, S_EVICT_DONE, S_PLAN,
    S_ISSUE, S_WAIT, S_COMPLETE, S_UPDATE, S_UNBLOCK, S_FLUSH,
    S_LLCW_REQ, S_LLCW_WAIT, S_MEMWB
  } st_e;

  st_e st_q, ret_q;

  req_t              r_q;
  logic              hit_q;
  logic [DWAY_W-1:0] way_q, vic_way_q;
  dir_entry_t        ent_q, vic_ent_q;
  laddr_t            vic_addr_q;

  // plan of the transaction
  cmask_t     pmask_q;
  probe_e     ptype_q;
  logic       read_q, merge_q, resolve_q, upd_q, illegal_q;
  grant_e     grant_q;
  dir_entry_t nxt_q, nxt_clean_q;

  // progress
  logic  llc_pend_q, memrd_need_q, memrd_pend_q, responded_q, unblocked_q;
  line_t data_q;

  // LLC write sub-sequence
  laddr_t w_addr_q, wb_addr_q;
  line_t  w_data_q, wb_data_q;
  logic   w_dirty_q;

  // ---------------- probe collector ----------------
  logic   pc_start, pc_all_acked, pc_first_dirty, pc_dirty_seen;
  cmask_t pc_dest;
  probe_e pc_type;
  laddr_t pc_addr;
  line_t  pc_dirty_data;

  probe_collector u_pc (
    .clk, .rst_n,
    .start(pc_start), .dest(pc_dest), .ptype(pc_type), .paddr(pc_addr),
    .prb_valid, .prb_type, .prb_addr,
    .ack_valid(pack_valid), .ack_dirty(pack_dirty), .ack_data(pack_data),
    .all_acked(pc_all_acked), .first_dirty(pc_first_dirty),
    .dirty_seen(pc_dirty_seen), .dirty_data(pc_dirty_data)
  );

  // ---------------- merge / atomic ----------------
  line_t merged;
  atomic_alu u_alu (
    .typ(r_q.typ), .old_line(data_q), .wdata(r_q.data), .mask(r_q.mask),
    .aop(r_q.aop), .word(r_q.word), .operand(r_q.operand), .compare(r_q.compare),
    .new_line(merged)
  );

  // ---------------- request classes ----------------
  function automatic logic allocates(input req_type_e t);
    return t inside {REQ_RDBLK, REQ_RDBLKS, REQ_RDBLKM, REQ_WT, REQ_ATOMIC};
  endfunction

  function automatic logic is_read(input req_type_e t);
    return t inside {REQ_RDBLK, REQ_RDBLKS, REQ_DMARD};
  endfunction

  // ---------------- state table ----------------
  dir_entry_t cur, p_next, p_clean;
  cmask_t     rb, own_b, p_mask;
  logic       is_owner, p_read, p_merge, p_vic, p_resolve, p_illegal;
  probe_e     p_type;
  grant_e     p_grant;
  cmask_t     sh_rm;

  always_comb begin
    cur      = hit_q ? ent_q : dir_entry_t'{state: DIR_I, owner: '0, sharers: '0};
    rb       = client_bit(r_q.src);
    own_b    = (cur.state == DIR_O) ? (cmask_t'(1) << cur.owner) : '0;
    is_owner = (cur.state == DIR_O) && (r_q.src == src_t'(cur.owner));
    sh_rm    = cur.sharers & ~rb;

    p_mask    = '0;
    p_type    = PRB_DOWNGRADE;
    p_read    = 1'b0;
    p_merge   = 1'b0;
    p_vic     = 1'b0;
    p_resolve = 1'b0;
    p_illegal = 1'b0;
    p_grant   = GRANT_NONE;
    p_next    = cur;
    p_clean   = cur;

    unique case (cur.state)
      DIR_S: begin
        unique case (r_q.typ)
          REQ_RDBLKS, REQ_RDBLK: begin
            p_read  = 1'b1;
            p_grant = GRANT_S;
            p_next  = '{state: DIR_S, owner: '0, sharers: cur.sharers | rb};
          end
          REQ_RDBLKM, REQ_WT, REQ_ATOMIC: begin
            p_read  = 1'b1;
            p_mask  = sh_rm;
            p_type  = PRB_INV;
            p_merge = r_q.typ != REQ_RDBLKM;
            p_grant = (r_q.typ == REQ_RDBLKM) ? GRANT_M : GRANT_NONE;
            p_next  = '{state: DIR_O, owner: own_t'(r_q.src), sharers: '0};
          end
          REQ_DMAWR: begin
            p_read  = 1'b1;
            p_mask  = cur.sharers;
            p_type  = PRB_INV;
            p_merge = 1'b1;
            p_next  = '{state: DIR_I, owner: '0, sharers: '0};
          end
          REQ_DMARD: p_read = 1'b1;
          REQ_VICCLEAN, REQ_VICDIRTY: begin
            p_vic     = 1'b1;
            p_illegal = r_q.typ == REQ_VICDIRTY;
            p_next    = '{state: (sh_rm == '0) ? DIR_I : DIR_S, owner: '0, sharers: sh_rm};
          end
          default: ;
        endcase
      end
      DIR_O: begin
        unique case (r_q.typ)
          REQ_RDBLKS, REQ_RDBLK: begin
            p_read  = 1'b1;
            p_grant = GRANT_S;
            if (is_owner) begin
              p_next = '{state: DIR_S, owner: '0, sharers: cur.sharers | rb};
            end else begin
              p_mask    = own_b;
              p_type    = PRB_DOWNGRADE;
              p_resolve = 1'b1;
              p_next    = '{state: DIR_O, owner: cur.owner, sharers: cur.sharers | rb};
              p_clean   = '{state: DIR_S, owner: '0, sharers: cur.sharers | rb | own_b};
            end
          end
          REQ_RDBLKM, REQ_WT, REQ_ATOMIC: begin
            p_read  = 1'b1;
            p_mask  = (cur.sharers | own_b) & ~rb;
            p_type  = PRB_INV;
            p_merge = r_q.typ != REQ_RDBLKM;
            p_grant = (r_q.typ == REQ_RDBLKM) ? GRANT_M : GRANT_NONE;
            p_next  = '{state: DIR_O, owner: own_t'(r_q.src), sharers: '0};
          end
          REQ_DMARD: begin
            p_read    = 1'b1;
            p_mask    = own_b;
            p_type    = PRB_DOWNGRADE;
            p_resolve = 1'b1;
            p_clean   = '{state: DIR_S, owner: '0, sharers: cur.sharers | own_b};
          end
          REQ_DMAWR: begin
            p_read  = 1'b1;
            p_mask  = cur.sharers | own_b;
            p_type  = PRB_INV;
            p_merge = 1'b1;
            p_next  = '{state: DIR_I, owner: '0, sharers: '0};
          end
          REQ_VICCLEAN: begin
            p_vic = 1'b1;
            if (is_owner) p_next = '{state: DIR_I, owner: '0, sharers: '0};
            else          p_next = '{state: DIR_O, owner: cur.owner, sharers: sh_rm};
          end
          REQ_VICDIRTY: begin
            p_vic = 1'b1;
            if (is_owner)
              p_next = '{state: (sh_rm == '0) ? DIR_I : DIR_S, owner: '0, sharers: sh_rm};
            else begin
              p_illegal = 1'b1;
              p_next    = '{state: DIR_O, owner: cur.owner, sharers: sh_rm};
            end
          end
          default: ;
        endcase
      end
      default: begin // DIR_I
        unique case (r_q.typ)
          REQ_RDBLKS: begin
            p_read  = 1'b1;
            p_grant = GRANT_S;
            p_next  = '{state: DIR_S, owner: '0, sharers: rb};
          end
          REQ_RDBLK, REQ_RDBLKM, REQ_WT, REQ_ATOMIC: begin
            p_read  = 1'b1;
            p_merge = r_q.typ inside {REQ_WT, REQ_ATOMIC};
            p_grant = (r_q.typ == REQ_RDBLK)  ? GRANT_E :
                      (r_q.typ == REQ_RDBLKM) ? GRANT_M : GRANT_NONE;
            p_next  = '{state: DIR_O, owner: own_t'(r_q.src), sharers: '0};
          end
          REQ_DMARD: p_read = 1'b1;
          REQ_DMAWR: begin
            p_read  = 1'b1;
            p_merge = 1'b1;
          end
          REQ_VICCLEAN, REQ_VICDIRTY: p_vic = 1'b1;
          default: ;
        endcase
      end
    endcase
  end

  // ---------------- outputs ----------------
  logic early;
  assign early = (st_q == S_WAIT) && pc_first_dirty && is_read(r_q.typ) && !responded_q;

  dir_entry_t fin_entry;
  assign fin_entry = (resolve_q && !pc_dirty_seen) ? nxt_clean_q : nxt_q;

  always_comb begin
    req_ready     = st_q == S_IDLE;

    dc_lk_valid   = st_q == S_LKREQ;
    dc_lk_addr    = r_q.addr;

    pc_start = 1'b0;
    pc_dest  = pmask_q;
    pc_type  = ptype_q;
    pc_addr  = r_q.addr;
    if (st_q == S_EVICT) begin
      pc_start = 1'b1;
      pc_dest  = vic_ent_q.sharers |
                 ((vic_ent_q.state == DIR_O) ? (cmask_t'(1) << vic_ent_q.owner) : '0);
      pc_type  = PRB_INV;
      pc_addr  = vic_addr_q;
    end else if (st_q == S_ISSUE && (!read_q || llc_req_ready)) begin
      pc_start = 1'b1;
    end

    llc_req_valid = (st_q == S_ISSUE && read_q) || st_q == S_LLCW_REQ;
    llc_req_we    = st_q == S_LLCW_REQ;
    llc_req_addr  = (st_q == S_LLCW_REQ) ? w_addr_q : r_q.addr;
    llc_req_data  = w_data_q;
    llc_req_dirty = w_dirty_q;

    mq_valid = (st_q == S_WAIT && memrd_need_q) || st_q == S_MEMWB;
    mq_req   = (st_q == S_MEMWB) ? mem_req_t'{we: 1'b1, addr: wb_addr_q, data: wb_data_q}
                                 : mem_req_t'{we: 1'b0, addr: r_q.addr, data: '0};

    dc_upd_valid = 1'b0;
    dc_upd_addr  = r_q.addr;
    dc_upd_way   = hit_q ? way_q : vic_way_q;
    dc_upd_keep  = fin_entry.state != DIR_I;
    dc_upd_entry = fin_entry;
    if (st_q == S_EVICT_DONE) begin
      dc_upd_valid = 1'b1;
      dc_upd_addr  = vic_addr_q;
      dc_upd_way   = vic_way_q;
      dc_upd_keep  = 1'b0;
    end else if (st_q == S_UPDATE) begin
      dc_upd_valid = upd_q;
    end

    rsp_valid = 1'b0;
    rsp.dst   = r_q.src;
    rsp.grant = grant_q;
    rsp.data  = data_q;
    if (early) begin
      rsp_valid = 1'b1;
      rsp.data  = pc_dirty_data;
    end else if (st_q == S_COMPLETE && !responded_q) begin
      rsp_valid = 1'b1;
    end else if (st_q == S_FLUSH && mq_empty) begin
      rsp_valid = 1'b1;
      rsp.grant = GRANT_NONE;
    end

    ev_early_rsp = early;
    ev_dir_evict = st_q == S_EVICT_DONE;
    ev_llc_wb    = st_q == S_MEMWB && mq_ready;
    ev_illegal   = st_q == S_UPDATE && illegal_q;
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= S_IDLE;
      ret_q        <= S_IDLE;
      r_q          <= '0;
      hit_q        <= 1'b0;
      way_q        <= '0;
      ent_q        <= '0;
      vic_way_q    <= '0;
      vic_addr_q   <= '0;
      vic_ent_q    <= '0;
      pmask_q      <= '0;
      ptype_q      <= PRB_DOWNGRADE;
      read_q       <= 1'b0;
      merge_q      <= 1'b0;
      resolve_q    <= 1'b0;
      upd_q        <= 1'b0;
      illegal_q    <= 1'b0;
      grant_q      <= GRANT_NONE;
      nxt_q        <= '0;
      nxt_clean_q  <= '0;
      llc_pend_q   <= 1'b0;
      memrd_need_q <= 1'b0;
      memrd_pend_q <= 1'b0;
      responded_q  <= 1'b0;
      unblocked_q  <= 1'b0;
      data_q       <= '0;
      w_addr_q     <= '0;
      w_data_q     <= '0;
      w_dirty_q    <= 1'b0;
      wb_addr_q    <= '0;
      wb_data_q    <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (req_valid) begin
          r_q          <= req;
          responded_q  <= 1'b0;
          unblocked_q  <= 1'b0;
          llc_pend_q   <= 1'b0;
          memrd_need_q <= 1'b0;
          memrd_pend_q <= 1'b0;
          data_q       <= '0;
          st_q         <= (req.typ == REQ_FLUSH) ? S_FLUSH : S_LKREQ;
        end
        S_LKREQ: if (dc_lk_ready) st_q <= S_LKWAIT;
        S_LKWAIT: if (dc_lk_done) begin
          hit_q       <= dc_lk_hit;
          way_q       <= dc_lk_way;
          ent_q       <= dc_lk_entry;
          vic_way_q   <= dc_vic_way;
          vic_addr_q  <= dc_vic_addr;
          vic_ent_q   <= dc_vic_entry;
          st_q <= (!dc_lk_hit && allocates(r_q.typ) && dc_vic_valid) ? S_EVICT : S_PLAN;
        end
        S_EVICT: st_q <= S_EVICT_WAIT;
        S_EVICT_WAIT: if (pc_all_acked) begin
          if (pc_dirty_seen) begin
            w_addr_q  <= vic_addr_q;
            w_data_q  <= pc_dirty_data;
            w_dirty_q <= 1'b1;
            ret_q     <= S_EVICT_DONE;
            st_q      <= S_LLCW_REQ;
          end else begin
            st_q <= S_EVICT_DONE;
          end
        end
        S_EVICT_DONE: st_q <= S_PLAN;
        S_PLAN: begin
          pmask_q     <= p_mask;
          ptype_q     <= p_type;
          read_q      <= p_read;
          merge_q     <= p_merge;
          resolve_q   <= p_resolve;
          illegal_q   <= p_illegal;
          grant_q     <= p_grant;
          nxt_q       <= p_next;
          nxt_clean_q <= p_clean;
          upd_q       <= hit_q || allocates(r_q.typ);
          if (p_vic) begin
            w_addr_q  <= r_q.addr;
            w_data_q  <= r_q.data;
            w_dirty_q <= r_q.typ == REQ_VICDIRTY;
            ret_q     <= S_COMPLETE;
            st_q      <= S_LLCW_REQ;
          end else begin
            st_q <= S_ISSUE;
          end
        end
        S_ISSUE: if (!read_q || llc_req_ready) begin
          llc_pend_q <= read_q;
          st_q       <= S_WAIT;
        end
        S_WAIT: begin
          if (llc_pend_q && llc_resp_valid) begin
            llc_pend_q <= 1'b0;
            if (llc_resp_hit) begin
              if (!pc_dirty_seen) data_q <= llc_resp_data;
            end else if (!pc_dirty_seen) begin
              memrd_need_q <= 1'b1;
            end
          end
          if (memrd_need_q && mq_ready) begin
            memrd_need_q <= 1'b0;
            memrd_pend_q <= 1'b1;
          end
          if (memrd_pend_q && mem_rsp_valid) begin
            memrd_pend_q <= 1'b0;
            if (!pc_dirty_seen) data_q <= mem_rsp_data;
          end
          if (pc_first_dirty) data_q <= pc_dirty_data;
          if (early) responded_q <= 1'b1;
          if (pc_all_acked && !llc_pend_q && !memrd_need_q && !memrd_pend_q)
            st_q <= S_COMPLETE;
        end
        S_COMPLETE: begin
          responded_q <= 1'b1;
          if (merge_q) begin
            w_addr_q  <= r_q.addr;
            w_data_q  <= merged;
            w_dirty_q <= 1'b1;
            ret_q     <= S_UPDATE;
            st_q      <= S_LLCW_REQ;
          end else begin
            st_q <= S_UPDATE;
          end
        end
        S_UPDATE: st_q <= (is_l2(r_q.src) && r_q.typ inside {REQ_RDBLK, REQ_RDBLKS, REQ_RDBLKM})
                          ? S_UNBLOCK : S_IDLE;
        S_UNBLOCK: if (unblocked_q || (unblk_valid && unblk_src == r_q.src)) st_q <= S_IDLE;
        S_FLUSH: if (mq_empty) st_q <= S_IDLE;
        S_LLCW_REQ: if (llc_req_ready) st_q <= S_LLCW_WAIT;
        S_LLCW_WAIT: if (llc_resp_valid) begin
          if (llc_wb_valid) begin
            wb_addr_q <= llc_wb_addr;
            wb_data_q <= llc_wb_data;
            st_q      <= S_MEMWB;
          end else begin
            st_q <= ret_q;
          end
        end
        S_MEMWB: if (mq_ready) st_q <= ret_q;
        default: st_q <= S_IDLE;
      endcase
      // after an early response the unblock may come before the transaction
      // has finished its LLC/memory work: remember it
      if (st_q != S_IDLE && st_q != S_UNBLOCK && responded_q && unblk_valid && unblk_src == r_q.src)
        unblocked_q <= 1'b1;
    end
  end

  // a memory response is only expected for an outstanding read
  a_mem_rsp: assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> memrd_pend_q);
  // an LLC response is only expected while one is outstanding
  a_llc_rsp: assert property (@(posedge clk) disable iff (!rst_n)
    llc_resp_valid |-> (st_q == S_LLCW_WAIT || llc_pend_q));

endmodule
