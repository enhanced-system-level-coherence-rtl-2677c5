// tb_llc_cache: a 4 KB, 4-way LLC (16 sets) with a 5-cycle access.
// Checks the response latency, that reads never allocate, that a clean write
// then read hits with the data, that the dirty bit is kept when a clean write
// lands on a dirty line, that filling a full set replaces the PLRU line and
// hands a dirty victim out for write-back while a clean victim is dropped.
module tb_llc_cache;
  import hsc_pkg::*;
  localparam int WAYS = 4, LAT = 5, SETS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init_done, req_valid, req_ready, req_we, req_dirty, resp_valid, resp_hit, wb_valid;
  laddr_t req_addr, wb_addr;
  line_t req_data, resp_data, wb_data;
  int checks = 0, failures = 0;
  logic got_hit, got_wb; line_t got_data, got_wbd; laddr_t got_wba;

  llc_cache #(.SIZE_BYTES(SETS * WAYS * LINE_BYTES), .WAYS(WAYS), .LATENCY(LAT)) u_dut (
    .clk, .rst_n, .init_done, .req_valid, .req_ready, .req_we, .req_addr, .req_data, .req_dirty,
    .resp_valid, .resp_hit, .resp_data, .wb_valid, .wb_addr, .wb_data);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic we, input laddr_t a, input line_t d, input logic dirty);
    int n = 0;
    @(negedge clk);
    chk(req_ready, "ready");
    req_valid = 1; req_we = we; req_addr = a; req_data = d; req_dirty = dirty;
    @(negedge clk);
    req_valid = 0;
    n = 1;
    while (!resp_valid) begin @(negedge clk); n++; end
    chk(n == LAT, $sformatf("latency %0d", n));
    got_hit = resp_hit; got_data = resp_data; got_wb = wb_valid; got_wbd = wb_data; got_wba = wb_addr;
  endtask

  function automatic laddr_t A(input int tag, input int set);
    return laddr_t'(tag * SETS + set);
  endfunction
  function automatic line_t D(input int k);
    return {16{32'(k * 1000 + 7)}};
  endfunction

  initial begin
    req_valid = 0; req_we = 0; req_addr = '0; req_data = '0; req_dirty = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    access(0, A(1, 3), '0, 0);
    chk(!got_hit, "cold read misses");
    access(0, A(1, 3), '0, 0);
    chk(!got_hit, "read did not allocate");
    access(1, A(1, 3), D(1), 0);           // clean victim install, way 0
    chk(!got_wb, "no wb into free way");
    access(0, A(1, 3), '0, 0);
    chk(got_hit && got_data == D(1), "read after write");
    access(1, A(2, 3), D(2), 1);           // dirty, way 1
    access(1, A(2, 3), D(22), 0);          // clean write on dirty line keeps dirty
    access(1, A(3, 3), D(3), 0);           // way 2
    access(1, A(4, 3), D(4), 0);           // way 3, set full
    // PLRU order of use: 0(rd), 1, 1, 2, 3 -> victim way 0 (tag 1, clean)
    access(1, A(5, 3), D(5), 1);
    chk(!got_wb, "clean victim dropped");
    access(0, A(1, 3), '0, 0);
    chk(!got_hit, "replaced line gone");
    // uses 0,1,1,2,3,0 -> victim way 2 (tag 3, clean)
    access(1, A(6, 3), D(6), 0);
    chk(!got_wb, "second clean victim dropped");
    // then way 1 (tag 2, dirty, data D(22))
    access(1, A(7, 3), D(7), 0);
    chk(got_wb && got_wba == A(2, 3) && got_wbd == D(22), "dirty victim written back");
    access(0, A(5, 3), '0, 0);
    chk(got_hit && got_data == D(5), "new line readable");
    access(0, A(6, 3), '0, 0);
    chk(got_hit && got_data == D(6), "second new line readable");
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
