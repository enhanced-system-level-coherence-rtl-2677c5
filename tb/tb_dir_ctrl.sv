// tb_dir_ctrl: directed walk through the directory state table.
// dir_ctrl runs with a small directory cache (8 entries, 2-way), a small LLC
// (512 B, 2-way), the memory queue and the behavioural memory. The testbench
// plays the caches: it answers probes with configured clean/dirty data after a
// configured delay and sends unblocks. Each step checks the probe kind and
// destination set (which reflects the tracked state), the grant, the data, the
// early dirty response (answer in the same cycle as the dirty acknowledgment),
// the no-probe LLC-hit latency DIR_LAT + LLC_LAT + 5, directory evictions with
// back-invalidation, an LLC dirty replacement reaching memory, an illegal
// table cell being flagged, and a flush.
module tb_dir_ctrl;
  import hsc_pkg::*;
  localparam int DLAT = 2, LLAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- environment ----
  logic req_valid, req_ready, rsp_valid, unblk_valid;
  req_t req; rsp_t rsp; src_t unblk_src;
  cmask_t prb_valid, pack_valid, pack_dirty; probe_e prb_type; laddr_t prb_addr;
  line_t pack_data [NUM_CLIENTS];
  logic lk_valid, lk_ready, lk_done, lk_hit, vic_valid, upd_valid, upd_keep, dinit, linit;
  laddr_t lk_addr, vic_addr, upd_addr; logic lk_way, vic_way, upd_way;
  dir_entry_t lk_entry, vic_entry, upd_entry;
  logic l_valid, l_ready, l_we, l_dirty, l_rvalid, l_hit, l_wbv;
  laddr_t l_addr, l_wba; line_t l_data, l_rdata, l_wbd;
  logic q_valid, q_ready, q_empty, m_valid, m_ready, m_rvalid;
  mem_req_t q_req, m_req; line_t m_rdata;
  logic ev_early, ev_evict, ev_wb, ev_illegal;

  dir_ctrl #(.DIR_WAYS(2)) u_dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp, .unblk_valid, .unblk_src,
    .prb_valid, .prb_type, .prb_addr, .pack_valid, .pack_dirty, .pack_data,
    .dc_lk_valid(lk_valid), .dc_lk_ready(lk_ready), .dc_lk_addr(lk_addr), .dc_lk_done(lk_done),
    .dc_lk_hit(lk_hit), .dc_lk_way(lk_way), .dc_lk_entry(lk_entry), .dc_vic_valid(vic_valid),
    .dc_vic_way(vic_way), .dc_vic_addr(vic_addr), .dc_vic_entry(vic_entry),
    .dc_upd_valid(upd_valid), .dc_upd_addr(upd_addr), .dc_upd_way(upd_way),
    .dc_upd_keep(upd_keep), .dc_upd_entry(upd_entry),
    .llc_req_valid(l_valid), .llc_req_ready(l_ready), .llc_req_we(l_we), .llc_req_addr(l_addr),
    .llc_req_data(l_data), .llc_req_dirty(l_dirty), .llc_resp_valid(l_rvalid),
    .llc_resp_hit(l_hit), .llc_resp_data(l_rdata), .llc_wb_valid(l_wbv), .llc_wb_addr(l_wba),
    .llc_wb_data(l_wbd),
    .mq_valid(q_valid), .mq_ready(q_ready), .mq_req(q_req), .mq_empty(q_empty),
    .mem_rsp_valid(m_rvalid), .mem_rsp_data(m_rdata),
    .ev_early_rsp(ev_early), .ev_dir_evict(ev_evict), .ev_llc_wb(ev_wb), .ev_illegal(ev_illegal));

  dir_cache #(.SIZE_BYTES(8), .BLOCK_BYTES(1), .WAYS(2), .LATENCY(DLAT)) u_dir (
    .clk, .rst_n, .init_done(dinit), .lk_valid, .lk_ready, .lk_addr, .lk_done, .lk_hit, .lk_way,
    .lk_entry, .lk_vic_valid(vic_valid), .lk_vic_way(vic_way), .lk_vic_addr(vic_addr),
    .lk_vic_entry(vic_entry), .upd_valid, .upd_addr, .upd_way, .upd_keep, .upd_entry);

  llc_cache #(.SIZE_BYTES(512), .WAYS(2), .LATENCY(LLAT)) u_llc (
    .clk, .rst_n, .init_done(linit), .req_valid(l_valid), .req_ready(l_ready), .req_we(l_we),
    .req_addr(l_addr), .req_data(l_data), .req_dirty(l_dirty), .resp_valid(l_rvalid),
    .resp_hit(l_hit), .resp_data(l_rdata), .wb_valid(l_wbv), .wb_addr(l_wba), .wb_data(l_wbd));

  mem_req_queue #(.DEPTH(4)) u_mq (
    .clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_req(q_req),
    .out_valid(m_valid), .out_ready(m_ready), .out_req(m_req), .empty(q_empty));

  hsc_mem_model #(.LATENCY(10)) u_mem (
    .clk, .rst_n, .req_valid(m_valid), .req_ready(m_ready), .req(m_req),
    .rsp_valid(m_rvalid), .rsp_data(m_rdata));

  // ---- cache-side probe responder ----
  logic   ack_dirty_cfg [NUM_CLIENTS];
  line_t  ack_data_cfg  [NUM_CLIENTS];
  int     ack_delay_cfg [NUM_CLIENTS];
  int     ack_timer     [NUM_CLIENTS];
  cmask_t seen_mask; probe_e seen_type; laddr_t seen_addr;
  int     dirty_ack_cyc, n_early, n_evict, n_wb, n_illegal;

  always @(negedge clk) begin
    pack_valid = '0;
    pack_dirty = '0;
    for (int c = 0; c < NUM_CLIENTS; c++) begin
      if (ack_timer[c] > 0) begin
        ack_timer[c]--;
        if (ack_timer[c] == 0) begin
          pack_valid[c] = 1'b1;
          pack_dirty[c] = ack_dirty_cfg[c];
          pack_data[c]  = ack_data_cfg[c];
          if (ack_dirty_cfg[c]) dirty_ack_cyc = cyc;
        end
      end
      if (prb_valid[c]) ack_timer[c] = ack_delay_cfg[c];
    end
    if (prb_valid != '0) begin
      seen_mask = prb_valid; seen_type = prb_type; seen_addr = prb_addr;
    end
  end

  always @(posedge clk) begin
    if (ev_early) n_early++;
    if (ev_evict) n_evict++;
    if (ev_wb) n_wb++;
    if (ev_illegal) n_illegal++;
  end

  // ---- helpers ----
  int checks = 0, failures = 0;
  rsp_t got; int got_cyc, acc_cyc, n_rsp = 0;

  // responses are single-cycle pulses: capture them on the clock edge
  always @(posedge clk) begin
    if (rsp_valid) begin
      got <= rsp; got_cyc <= cyc; n_rsp <= n_rsp + 1;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic cfg_ack(input int c, input logic dirty, input line_t d, input int delay);
    ack_dirty_cfg[c] = dirty; ack_data_cfg[c] = d; ack_delay_cfg[c] = delay;
  endtask

  task automatic txn(input int src, input req_type_e typ, input laddr_t a,
                     input line_t d = '0, input bmask_t m = '0, input atomic_op_e aop = ATOM_ADD,
                     input int word = 0, input int opd = 0);
    int guard = 0, n0;
    seen_mask = '0;
    n0 = n_rsp;
    @(negedge clk);
    req = '0;
    req.typ = typ; req.src = src_t'(src); req.addr = a; req.data = d; req.mask = m;
    req.aop = aop; req.word = 4'(word); req.operand = 32'(opd);
    req_valid = 1;
    while (!req_ready) @(negedge clk);
    acc_cyc = cyc;
    @(negedge clk);
    req_valid = 0;
    while (n_rsp == n0 && guard < 500) begin @(negedge clk); guard++; end
    chk(n_rsp == n0 + 1 && int'(got.dst) == src, "one response, to the requester");
    if (src < NUM_COREPAIRS && typ inside {REQ_RDBLK, REQ_RDBLKS, REQ_RDBLKM}) begin
      repeat (2) @(negedge clk);
      unblk_valid = 1; unblk_src = src_t'(src);
      @(negedge clk);
      unblk_valid = 0;
    end
    guard = 0;
    while (!req_ready && guard < 500) begin @(negedge clk); guard++; end
    chk(req_ready, "controller idle again");
  endtask

  function automatic line_t L(input int k);
    return {16{32'hD000_0000 + 32'(k)}};
  endfunction

  localparam laddr_t X = 'h100, Z = 'h200, Y1 = 'h300, Y2 = 'h400, Y3 = 'h500, V6 = 'h600;
  line_t m0, l10, l12, l13;

  initial begin
    req_valid = 0; req = '0; unblk_valid = 0; unblk_src = '0;
    pack_valid = '0; pack_dirty = '0;
    n_early = 0; n_evict = 0; n_wb = 0; n_illegal = 0; dirty_ack_cyc = -1;
    for (int c = 0; c < NUM_CLIENTS; c++) begin
      pack_data[c] = '0; ack_timer[c] = 0; cfg_ack(c, 0, '0, 1 + c);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (dinit && linit);
    m0 = u_mem.init_line(X);

    // I, RdBlkS -> S{0}
    txn(0, REQ_RDBLKS, X);
    chk(seen_mask == '0 && got.grant == GRANT_S && got.data == m0, "I RdBlkS");
    // S, RdBlk -> S{0,1}, no probe, shared grant
    txn(1, REQ_RDBLK, X);
    chk(seen_mask == '0 && got.grant == GRANT_S && got.data == m0, "S RdBlk");
    // S, RdBlkM -> O(2), invalidate sharers 0,1
    txn(2, REQ_RDBLKM, X);
    chk(seen_mask == 5'b00011 && seen_type == PRB_INV, "S RdBlkM multicast");
    chk(got.grant == GRANT_M && got.data == m0, "S RdBlkM grant/data");
    // O, RdBlk from 3 -> unicast downgrade to owner 2, dirty -> early response
    cfg_ack(2, 1, L(1), 2);
    txn(3, REQ_RDBLK, X);
    chk(seen_mask == 5'b00100 && seen_type == PRB_DOWNGRADE, "O RdBlk unicast downgrade");
    chk(got.grant == GRANT_S && got.data == L(1), "O RdBlk dirty data, shared grant");
    chk(got_cyc == dirty_ack_cyc && n_early == 1, "early response on dirty ack");
    chk(got_cyc - acc_cyc < DLAT + LLAT + 5, "early response beats LLC path");
    // O(2) sharers {3}, RdBlkM from 0 -> invalidate 2,3; dirty data from 2
    cfg_ack(3, 0, '0, 3);
    txn(0, REQ_RDBLKM, X);
    chk(seen_mask == 5'b01100 && seen_type == PRB_INV, "O RdBlkM multicast to owner+sharers");
    chk(got.grant == GRANT_M && got.data == L(1) && n_early == 1, "O RdBlkM dirty override, no early");
    // O(0), DMARd -> downgrade owner, dirty -> stays O
    cfg_ack(0, 1, L(2), 1);
    txn(DMA_ID, REQ_DMARD, X);
    chk(seen_mask == 5'b00001 && seen_type == PRB_DOWNGRADE && got.data == L(2), "O DMARd");
    chk(n_early == 2, "DMARd early response");
    // O(0), VicDirty from owner -> I, LLC holds it dirty
    txn(0, REQ_VICDIRTY, X, L(3));
    chk(seen_mask == '0 && got.grant == GRANT_NONE, "O VicDirty ack");
    // I, RdBlk -> O(1) exclusive, served by LLC hit without probes; latency
    txn(1, REQ_RDBLK, X);
    chk(seen_mask == '0 && got.grant == GRANT_E && got.data == L(3), "I RdBlk exclusive from LLC");
    chk(got_cyc - acc_cyc == DLAT + LLAT + 5, $sformatf("LLC-hit latency %0d", got_cyc - acc_cyc));
    // O(1), VicClean from owner -> I
    txn(1, REQ_VICCLEAN, X, L(3));
    // I, WT from TCC on bytes 0..3 -> O(4)
    txn(4, REQ_WT, X, L(9), 64'h0000_0000_0000_000F);
    chk(seen_mask == '0 && got.grant == GRANT_NONE, "I WT no probe");
    l10 = L(3); l10[31:0] = L(9)[31:0];
    // O(4), RdBlkS from 2 -> downgrade TCC, clean -> S{2,4}
    cfg_ack(4, 0, '0, 2);
    txn(2, REQ_RDBLKS, X);
    chk(seen_mask == 5'b10000 && seen_type == PRB_DOWNGRADE, "O RdBlkS downgrade to TCC owner");
    chk(got.grant == GRANT_S && got.data == l10, "clean probe: data from LLC incl. WT merge");
    cfg_ack(2, 0, '0, 2);
    // S{2,4}, Atomic add from TCC -> invalidate 2 only, old line returned
    txn(4, REQ_ATOMIC, X, '0, '0, ATOM_ADD, 1, 5);
    chk(seen_mask == 5'b00100 && seen_type == PRB_INV, "S Atomic invalidates other sharers");
    chk(got.data == l10, "atomic returns old line");
    l12 = l10; l12[63:32] = l10[63:32] + 32'd5;
    // O(4), DMAWr bytes 8..11 -> invalidate TCC, -> I
    txn(DMA_ID, REQ_DMAWR, X, L(7), 64'h0000_0000_0000_0F00);
    chk(seen_mask == 5'b10000 && seen_type == PRB_INV, "O DMAWr invalidates owner");
    l13 = l12; l13[95:64] = L(7)[95:64];
    // I, DMARd -> no probe, data carries every merge
    txn(DMA_ID, REQ_DMARD, X);
    chk(seen_mask == '0 && got.data == l13, "I DMARd merged line");
    // S{0,1} on Z, VicDirty from 0 is an illegal cell: served and flagged
    txn(0, REQ_RDBLKS, Z);
    txn(1, REQ_RDBLKS, Z);
    txn(0, REQ_VICDIRTY, Z, u_mem.init_line(Z));
    chk(n_illegal == 1, "illegal S VicDirty flagged");
    // directory set 0 holds Z; Y1 fills it, Y2 evicts Z (sharer 1 invalidated)
    txn(3, REQ_RDBLKM, Y1);
    chk(n_evict == 0, "no eviction while a way is free");
    cfg_ack(1, 0, '0, 1);
    txn(0, REQ_RDBLK, Y2);
    chk(n_evict == 1 && seen_mask == 5'b00010 && seen_type == PRB_INV && seen_addr == Z,
        "directory eviction back-invalidates sharer");
    chk(got.grant == GRANT_E, "request after eviction served as I");
    // Y3 evicts Y1 (owner 3, dirty) -> data saved in LLC
    cfg_ack(3, 1, L(5), 2);
    txn(2, REQ_RDBLK, Y3);
    chk(n_evict == 2 && seen_mask == 5'b01000 && seen_addr == Y1, "eviction invalidates owner");
    txn(DMA_ID, REQ_DMARD, Y1);
    chk(seen_mask == '0 && got.data == L(5), "evicted dirty data kept in LLC");
    // LLC set 0 (2-way) held X and Z, both dirty: saving Y1 displaced X to
    // memory, and a victim for V6 now displaces Z
    txn(0, REQ_VICDIRTY, V6, L(6));
    chk(n_wb == 2, "dirty LLC replacements written back");
    txn(4, REQ_FLUSH, '0);
    chk(got.grant == GRANT_NONE, "flush acknowledged");
    chk(u_mem.peek(X) == l13, "memory holds replaced LLC line");
    txn(DMA_ID, REQ_DMARD, X);
    chk(got.data == l13, "read after LLC replacement comes from memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
