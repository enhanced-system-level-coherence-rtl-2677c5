// tb_dir_cache: a 64-entry, 4-way directory cache with a 3-cycle access.
// Checks the reset sweep, that lk_done comes exactly LATENCY cycles after a
// lookup is accepted, misses and hits with the stored state/owner/sharers,
// allocation into free ways first, the live-victim report with its address
// and entry once a set is full (the PLRU way), and freeing an entry.
module tb_dir_cache;
  import hsc_pkg::*;
  localparam int WAYS = 4, LAT = 3, ENT = 64, SETS = ENT / WAYS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init_done, lk_valid, lk_ready, lk_done, lk_hit, lk_vic_valid, upd_valid, upd_keep;
  laddr_t lk_addr, lk_vic_addr, upd_addr;
  logic [1:0] lk_way, lk_vic_way, upd_way;
  dir_entry_t lk_entry, lk_vic_entry, upd_entry;
  int checks = 0, failures = 0;

  dir_cache #(.SIZE_BYTES(ENT), .BLOCK_BYTES(1), .WAYS(WAYS), .LATENCY(LAT)) u_dut (
    .clk, .rst_n, .init_done, .lk_valid, .lk_ready, .lk_addr, .lk_done, .lk_hit, .lk_way,
    .lk_entry, .lk_vic_valid, .lk_vic_way, .lk_vic_addr, .lk_vic_entry,
    .upd_valid, .upd_addr, .upd_way, .upd_keep, .upd_entry);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // lookup; returns after lk_done, checking the latency
  task automatic lookup(input laddr_t a);
    int n = 0;
    @(negedge clk);
    lk_valid = 1; lk_addr = a;
    chk(lk_ready, "ready for lookup");
    @(negedge clk);
    lk_valid = 0;
    while (!lk_done) begin @(negedge clk); n++; end
    chk(n == LAT - 1, $sformatf("latency %0d", n + 1));
  endtask

  task automatic write(input laddr_t a, input logic [1:0] w, input logic keep, input dir_entry_t e);
    @(negedge clk);
    upd_valid = 1; upd_addr = a; upd_way = w; upd_keep = keep; upd_entry = e;
    @(negedge clk);
    upd_valid = 0;
  endtask

  function automatic laddr_t A(input int tag, input int set);
    return laddr_t'(tag * SETS + set);
  endfunction

  function automatic dir_entry_t E(input int k);
    return '{state: (k % 2) ? DIR_O : DIR_S, owner: own_t'(k % 5), sharers: cmask_t'(k * 7)};
  endfunction

  initial begin
    lk_valid = 0; upd_valid = 0; lk_addr = '0; upd_addr = '0; upd_way = '0; upd_keep = 0; upd_entry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (SETS + 2) @(posedge clk);
    chk(init_done, "sweep done");
    lookup(A(9, 5));
    chk(!lk_hit && !lk_vic_valid, "cold miss, free way");
    // fill set 5 through the ways the cache proposes
    for (int k = 0; k < WAYS; k++) begin
      lookup(A(10 + k, 5));
      chk(!lk_hit && !lk_vic_valid && lk_vic_way == 2'(k), $sformatf("free way %0d", k));
      write(A(10 + k, 5), lk_vic_way, 1, E(k));
    end
    for (int k = 0; k < WAYS; k++) begin
      lookup(A(10 + k, 5));
      chk(lk_hit && lk_way == 2'(k) && lk_entry == E(k), $sformatf("hit %0d", k));
    end
    lookup(A(3, 7));
    chk(!lk_hit, "other set misses");
    // set full: tree PLRU after writes 0,1,2,3 names way 0
    lookup(A(20, 5));
    chk(!lk_hit && lk_vic_valid && lk_vic_way == 2'd0, "victim way");
    chk(lk_vic_addr == A(10, 5) && lk_vic_entry == E(0), "victim address/entry");
    // re-write way 0 (touch) -> victim moves to way 2
    write(A(10, 5), 2'd0, 1, E(0));
    lookup(A(20, 5));
    chk(lk_vic_way == 2'd2, "PLRU after touch");
    // free way 1
    write(A(11, 5), 2'd1, 0, '0);
    lookup(A(11, 5));
    chk(!lk_hit, "freed entry misses");
    lookup(A(20, 5));
    chk(!lk_vic_valid && lk_vic_way == 2'd1, "freed way reused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
