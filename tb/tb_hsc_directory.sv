// tb_hsc_directory: end-to-end test of the directory at its full default size.
//
// Behavioural caches surround hsc_directory: four CorePair L2s with MOESI line
// states, one TCC with valid/invalid lines and write-through stores, and a DMA
// engine, plus the behavioural memory. Each agent issues random loads, stores,
// victims, write-throughs, atomics, flushes and DMA reads/writes on a pool of
// lines, at most one request per agent and per line in flight. A reference
// image of memory is updated when a write takes effect; every line a cache
// reads or holds is compared with it, and at the end every line is read back
// through DMA. Most pool lines alias in one directory set and one LLC set so
// that directory evictions and dirty LLC replacements occur. The test counts
// each mechanism of the design (early response, multicast invalidation,
// unicast downgrade, directory eviction, LLC write-back, LLC hit and miss,
// flush, atomics, arbitration conflicts ...) and fails if one never happens.
// It also checks the no-probe LLC-hit latency of 45 cycles at the defaults,
// that every memory write is a dirty LLC replacement (victims and GPU/DMA
// writes stop at the LLC), and that fewer than half as many probe messages are
// sent as a broadcasting directory would send (4 downgrades per read, 5
// invalidations per write).
module tb_hsc_directory;
  import hsc_pkg::*;
  localparam int N_REQ   = 20000;
  localparam int N_ALIAS = 40;   // lines in one directory set and one LLC set
  localparam int N_OTHER = 8;
  localparam int N_LINES = N_ALIAS + N_OTHER;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic init_done;
  logic [NUM_SRC-1:0] req_valid, req_ready;
  req_t req [NUM_SRC];
  logic rsp_valid; rsp_t rsp;
  logic unblk_valid; src_t unblk_src;
  cmask_t prb_valid, pack_valid, pack_dirty; probe_e prb_type; laddr_t prb_addr;
  line_t pack_data [NUM_CLIENTS];
  logic mem_req_valid, mem_req_ready, mem_rsp_valid; mem_req_t mem_req; line_t mem_rsp_data;
  logic ev_early_rsp, ev_dir_evict, ev_llc_wb, ev_illegal;

  hsc_directory u_dut (
    .clk, .rst_n, .init_done, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
    .unblk_valid, .unblk_src, .prb_valid, .prb_type, .prb_addr, .pack_valid, .pack_dirty,
    .pack_data, .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .ev_early_rsp, .ev_dir_evict, .ev_llc_wb, .ev_illegal);

  hsc_mem_model #(.LATENCY(30)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  // ---------------- reference and cache models ----------------
  typedef enum int {CI, CS, CE, CO, CM} cst_e;   // L2 MOESI; TCC uses CI/CS as I/V
  cst_e  cst  [NUM_CLIENTS][N_LINES];
  line_t cdat [NUM_CLIENTS][N_LINES];
  line_t gold [N_LINES];
  bit    busy [N_LINES];
  laddr_t addr_of [N_LINES];

  // outstanding request per agent
  bit    pend [NUM_SRC];
  req_t  preq [NUM_SRC];
  int    pidx [NUM_SRC];
  int    pacc_cyc [NUM_SRC];

  // probe acknowledgements
  int    ack_t [NUM_CLIENTS];
  logic  ack_d [NUM_CLIENTS];
  line_t ack_x [NUM_CLIENTS];

  // captured pulses
  rsp_t rsp_q [$];
  int   rsp_cyc_q [$];
  cmask_t pm_q [$]; probe_e pt_q [$]; laddr_t pa_q [$];
  bit   acc [NUM_SRC];

  int checks = 0, failures = 0, issued = 0, done_rsp = 0, unblk_at = -1, unblk_who = 0;
  int n_early = 0, n_evict = 0, n_llcwb = 0, n_multi = 0, n_down = 0, n_inv = 0, n_conflict = 0;
  int n_grantE = 0, n_grantS = 0, n_atomic = 0, n_wt = 0, n_flush = 0, n_dmard = 0, n_dmawr = 0;
  int n_vicc = 0, n_vicd = 0, n_localhit = 0, n_upgrade = 0, n_illegal = 0, n_lat = 0;
  // probe messages sent, and what a stateless directory would have broadcast:
  // downgrades to the 4 L2s for reads, invalidations to all 5 caches for writes
  int n_prb_msgs = 0, n_prb_bcast = 0;
  bit phase_final = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic int idx_of(input laddr_t a);
    for (int i = 0; i < N_LINES; i++) if (addr_of[i] == a) return i;
    return -1;
  endfunction

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < WORDS; i++) l[32*i +: 32] = $urandom;
    return l;
  endfunction

  function automatic line_t merge(input line_t old, input line_t d, input bmask_t m);
    line_t r = old;
    for (int b = 0; b < LINE_BYTES; b++) if (m[b]) r[8*b +: 8] = d[8*b +: 8];
    return r;
  endfunction

  // ---------------- sample DUT outputs on the clock edge ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      if (rsp_valid) begin rsp_q.push_back(rsp); rsp_cyc_q.push_back(cyc); end
      if (prb_valid != '0) begin pm_q.push_back(prb_valid); pt_q.push_back(prb_type); pa_q.push_back(prb_addr); end
      for (int s = 0; s < NUM_SRC; s++) if (req_valid[s] && req_ready[s]) begin acc[s] = 1; pacc_cyc[s] = cyc; end
      if ($countones(req_valid) > 1) n_conflict++;
      if (ev_early_rsp) n_early++;
      if (ev_dir_evict) n_evict++;
      if (ev_llc_wb) n_llcwb++;
      if (ev_illegal) n_illegal++;
    end
  end

  // ---------------- request generation ----------------
  task automatic issue(input int s, input req_type_e t, input int i, input line_t d = '0,
                       input bmask_t m = '0, input int word = 0, input int opd = 0);
    req[s] = '0;
    req[s].typ = t; req[s].addr = addr_of[i]; req[s].data = d; req[s].mask = m;
    req[s].aop = ATOM_ADD; req[s].word = 4'(word); req[s].operand = 32'(opd);
    req_valid[s] = 1'b1;
    pend[s] = 1; preq[s] = req[s]; pidx[s] = i;
    if (t != REQ_FLUSH) busy[i] = 1;
    if (t inside {REQ_RDBLK, REQ_RDBLKS, REQ_DMARD}) n_prb_bcast += NUM_COREPAIRS;
    if (t inside {REQ_RDBLKM, REQ_WT, REQ_ATOMIC, REQ_DMAWR}) n_prb_bcast += NUM_CLIENTS;
    issued++;
  endtask

  task automatic new_request(input int s);
    int i, r, w;
    line_t d;
    i = $urandom % N_LINES;
    if (busy[i]) return;
    r = $urandom % 100;
    if (s < NUM_COREPAIRS) begin
      if (r < 40) begin                       // load
        if (cst[s][i] != CI) begin
          chk(cdat[s][i] == gold[i], $sformatf("L2 %0d local copy of line %0d", s, i));
          n_localhit++;
        end else issue(s, ($urandom % 4 == 0) ? REQ_RDBLKS : REQ_RDBLK, i);
      end else if (r < 70) begin              // store
        if (cst[s][i] inside {CE, CM}) begin
          w = $urandom % WORDS;
          cdat[s][i][32*w +: 32] = $urandom;
          gold[i] = cdat[s][i];
          cst[s][i] = CM;
        end else begin
          if (cst[s][i] != CI) n_upgrade++;
          issue(s, REQ_RDBLKM, i);
        end
      end else begin                          // evict
        if (cst[s][i] inside {CS, CE}) begin
          issue(s, REQ_VICCLEAN, i, cdat[s][i]); n_vicc++;
          cst[s][i] = CI;
        end else if (cst[s][i] inside {CO, CM}) begin
          issue(s, REQ_VICDIRTY, i, cdat[s][i]); n_vicd++;
          cst[s][i] = CI;
        end
      end
    end else if (s < NUM_CLIENTS) begin      // TCC
      if (r < 35) begin
        if (cst[s][i] != CI) begin
          chk(cdat[s][i] == gold[i], $sformatf("TCC copy of line %0d", i));
          n_localhit++;
        end else issue(s, REQ_RDBLK, i);
      end else if (r < 65) begin
        w = $urandom % WORDS;
        d = rnd_line();
        issue(s, REQ_WT, i, d, bmask_t'(64'hF) << (4 * w)); n_wt++;
      end else if (r < 85) begin
        cst[s][i] = CI;
        issue(s, REQ_ATOMIC, i, '0, '0, $urandom % WORDS, $urandom % 1000); n_atomic++;
      end else if (r < 93) begin
        cst[s][i] = CI;                       // silent eviction
      end else begin
        issue(s, REQ_FLUSH, i); n_flush++;
      end
    end else begin                            // DMA
      if (r < 50) begin issue(s, REQ_DMARD, i); n_dmard++; end
      else begin issue(s, REQ_DMAWR, i, rnd_line(), {$urandom, $urandom}); n_dmawr++; end
    end
  endtask

  // ---------------- response handling ----------------
  task automatic take_response(input rsp_t r, input int rc);
    int s = int'(r.dst), i;
    req_t q;
    line_t nl;
    if (!pend[s]) begin chk(0, $sformatf("unexpected response to %0d", s)); return; end
    q = preq[s]; i = pidx[s];
    done_rsp++;
    unique case (q.typ)
      REQ_RDBLK, REQ_RDBLKS: begin
        chk(r.data == gold[i], $sformatf("read data src %0d line %0d", s, i));
        if (s < NUM_COREPAIRS) begin
          chk(r.grant == GRANT_S || (r.grant == GRANT_E && q.typ == REQ_RDBLK), "read grant");
          cst[s][i] = (r.grant == GRANT_E) ? CE : CS;
          if (r.grant == GRANT_E) n_grantE++; else n_grantS++;
          unblk_at = cyc + 1; unblk_who = s;
        end else cst[s][i] = CS;
        cdat[s][i] = r.data;
      end
      REQ_RDBLKM: begin
        // an owner upgrading from O is not probed and keeps its own (newest) copy
        if (cst[s][i] == CO) begin
          chk(r.grant == GRANT_M && cdat[s][i] == gold[i], "owner upgrade keeps its copy");
        end else begin
          chk(r.grant == GRANT_M && r.data == gold[i], $sformatf("write permission src %0d line %0d", s, i));
          cdat[s][i] = r.data;
        end
        cdat[s][i][32 * ($urandom % WORDS) +: 32] = $urandom;
        gold[i] = cdat[s][i];
        cst[s][i] = CM;
        unblk_at = cyc + 1; unblk_who = s;
      end
      REQ_WT: begin
        gold[i] = merge(gold[i], q.data, q.mask);
        if (cst[s][i] != CI) cdat[s][i] = gold[i];
      end
      REQ_ATOMIC: begin
        chk(r.data == gold[i], "atomic old line");
        nl = gold[i];
        nl[32*q.word +: 32] = nl[32*q.word +: 32] + q.operand;
        gold[i] = nl;
      end
      REQ_DMARD: begin
        chk(r.data == gold[i], $sformatf("DMA read line %0d", i));
        n_lat = rc - pacc_cyc[s];
      end
      REQ_DMAWR: gold[i] = merge(gold[i], q.data, q.mask);
      REQ_FLUSH: chk(r.grant == GRANT_NONE, "flush ack");
      default: chk(r.grant == GRANT_NONE, "victim ack");
    endcase
    pend[s] = 0;
    if (q.typ != REQ_FLUSH) busy[i] = 0;
  endtask

  // ---------------- probe handling ----------------
  task automatic take_probe(input cmask_t m, input probe_e t, input laddr_t a);
    int i = idx_of(a);
    if ($countones(m) > 1 && t == PRB_INV) n_multi++;
    if (t == PRB_DOWNGRADE) n_down++; else n_inv++;
    n_prb_msgs += $countones(m);
    for (int c = 0; c < NUM_CLIENTS; c++) if (m[c]) begin
      chk(ack_t[c] == 0, "one probe at a time per cache");
      ack_t[c] = 1 + $urandom % 3;
      ack_d[c] = 0;
      ack_x[c] = '0;
      if (i >= 0) begin
        if (c >= NUM_COREPAIRS) cst[c][i] = CI;        // TCC: invalidates, never forwards
        else if (t == PRB_INV) begin
          ack_d[c] = cst[c][i] inside {CM, CO};
          ack_x[c] = cdat[c][i];
          cst[c][i] = CI;
        end else begin
          ack_d[c] = cst[c][i] inside {CM, CO};
          ack_x[c] = cdat[c][i];
          if (cst[c][i] == CM) cst[c][i] = CO;
          else if (cst[c][i] == CE) cst[c][i] = CS;
        end
      end
    end
  endtask

  // ---------------- driver ----------------
  always @(negedge clk) begin
    if (rst_n && init_done) begin
      for (int s = 0; s < NUM_SRC; s++) if (acc[s]) begin acc[s] = 0; req_valid[s] = 1'b0; end
      while (pm_q.size() > 0) take_probe(pm_q.pop_front(), pt_q.pop_front(), pa_q.pop_front());
      while (rsp_q.size() > 0) take_response(rsp_q.pop_front(), rsp_cyc_q.pop_front());
      pack_valid = '0; pack_dirty = '0;
      for (int c = 0; c < NUM_CLIENTS; c++) if (ack_t[c] > 0) begin
        ack_t[c]--;
        if (ack_t[c] == 0) begin pack_valid[c] = 1'b1; pack_dirty[c] = ack_d[c]; pack_data[c] = ack_x[c]; end
      end
      unblk_valid = (cyc >= unblk_at && unblk_at >= 0);
      unblk_src = src_t'(unblk_who);
      if (unblk_valid) unblk_at = -1;
      if (!phase_final && issued < N_REQ)
        for (int s = 0; s < NUM_SRC; s++) if (!pend[s] && $urandom % 3 == 0) new_request(s);
    end
  end

  initial begin
    req_valid = '0; unblk_valid = 0; unblk_src = '0; pack_valid = '0; pack_dirty = '0;
    for (int s = 0; s < NUM_SRC; s++) begin req[s] = '0; pend[s] = 0; acc[s] = 0; end
    for (int i = 0; i < N_LINES; i++) begin
      addr_of[i] = (i < N_ALIAS) ? laddr_t'(i * 16384 + 5) : laddr_t'(1000 + i);
      gold[i] = u_mem.init_line(addr_of[i]);
      busy[i] = 0;
      for (int c = 0; c < NUM_CLIENTS; c++) begin cst[c][i] = CI; cdat[c][i] = '0; end
    end
    for (int c = 0; c < NUM_CLIENTS; c++) begin ack_t[c] = 0; pack_data[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    wait (issued >= N_REQ);
    while (pend.sum() with (int'(item)) != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    // final sweep: read every line back through DMA
    phase_final = 1;
    for (int i = 0; i < N_LINES; i++) begin
      @(negedge clk);
      issue(DMA_ID, REQ_DMARD, i);
      while (pend[DMA_ID]) @(posedge clk);
    end
    // a line nobody caches and that sits in the LLC: DMA write then DMA read
    @(negedge clk);
    issue(DMA_ID, REQ_DMAWR, N_ALIAS, rnd_line(), '1);
    while (pend[DMA_ID]) @(posedge clk);
    @(negedge clk);
    issue(DMA_ID, REQ_DMARD, N_ALIAS);
    while (pend[DMA_ID]) @(posedge clk);
    @(negedge clk);

    $display("requests=%0d early=%0d dir_evict=%0d llc_wb=%0d multicast_inv=%0d downgrade=%0d inv=%0d",
             done_rsp, n_early, n_evict, n_llcwb, n_multi, n_down, n_inv);
    $display("grantE=%0d grantS=%0d upgrade=%0d wt=%0d atomic=%0d flush=%0d dmard=%0d dmawr=%0d vicclean=%0d vicdirty=%0d localhit=%0d conflicts=%0d mem_rd=%0d mem_wr=%0d",
             n_grantE, n_grantS, n_upgrade, n_wt, n_atomic, n_flush, n_dmard, n_dmawr, n_vicc, n_vicd,
             n_localhit, n_conflict, u_mem.reads, u_mem.writes);
    chk(n_early > 0, "early response happened");
    chk(n_evict > 0, "directory eviction happened");
    chk(n_llcwb > 0, "LLC dirty write-back happened");
    chk(n_multi > 0, "multicast invalidation happened");
    chk(n_down > 0, "unicast downgrade happened");
    chk(n_grantE > 0 && n_grantS > 0, "exclusive and shared grants happened");
    chk(n_upgrade > 0, "upgrade happened");
    chk(n_wt > 0 && n_atomic > 0 && n_flush > 0, "GPU write-through, atomic, flush happened");
    chk(n_dmard > 0 && n_dmawr > 0, "DMA reads and writes happened");
    chk(n_vicc > 0 && n_vicd > 0, "clean and dirty victims happened");
    chk(n_conflict > 0, "arbitration conflict happened");
    chk(u_mem.reads > 0 && u_mem.writes > 0, "memory reads and writes happened");
    chk(n_lat == 45, $sformatf("LLC-hit read answered in %0d cycles, expected 45", n_lat));
    chk(n_illegal == 0, "no illegal transition");
    $display("probe messages=%0d, a broadcasting directory would send %0d", n_prb_msgs, n_prb_bcast);
    chk(n_prb_msgs < n_prb_bcast / 2, "state tracking sends far fewer probes than broadcasting");
    // write-back LLC: victims, write-throughs, atomics and DMA writes never go
    // to memory themselves; memory is written only by dirty LLC replacements
    chk(u_mem.writes == n_llcwb, $sformatf("memory writes %0d equal LLC write-backs %0d",
                                           u_mem.writes, n_llcwb));
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdogs: the reset sweep takes 16384 cycles, the whole run about 1.2M
  initial begin
    repeat (50000) @(posedge clk);
    if (!init_done) begin
      failures++;
      $display("watchdog: init_done never rose");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: issued=%0d responses=%0d", issued, done_rsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
