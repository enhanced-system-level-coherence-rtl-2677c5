// tb_probe_collector: random probe rounds. Checks that the probe pulse appears
// one cycle after start with the requested destinations, type and address,
// that all_acked falls until every destination has answered (acks arrive in
// random order and at random delays), that the first dirty answer is flagged
// in its own cycle with its data, and that later dirty answers do not replace it.
module tb_probe_collector;
  import hsc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, all_acked, first_dirty, dirty_seen;
  cmask_t dest, prb_valid, ack_valid, ack_dirty, left;
  probe_e ptype, prb_type;
  laddr_t paddr, prb_addr;
  line_t ack_data [NUM_CLIENTS];
  line_t dirty_data, exp_data;
  logic exp_dirty;
  int checks = 0, failures = 0, nfirst;

  probe_collector u_dut (.clk, .rst_n, .start, .dest, .ptype, .paddr, .prb_valid, .prb_type,
    .prb_addr, .ack_valid, .ack_dirty, .ack_data, .all_acked, .first_dirty, .dirty_seen, .dirty_data);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    start = 0; dest = '0; ptype = PRB_INV; paddr = '0; ack_valid = '0; ack_dirty = '0;
    for (int c = 0; c < NUM_CLIENTS; c++) ack_data[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      start = 1; dest = NUM_CLIENTS'($urandom); ptype = probe_e'(r % 2); paddr = {$urandom, $urandom};
      @(negedge clk);
      start = 0;
      chk(prb_valid == dest && prb_type == ptype && prb_addr == paddr, "probe pulse");
      chk(all_acked == (dest == '0), "pending after start");
      left = dest; exp_dirty = 0; nfirst = 0;
      while (left != '0) begin
        ack_valid = NUM_CLIENTS'($urandom) & left;
        ack_dirty = NUM_CLIENTS'($urandom);
        for (int c = 0; c < NUM_CLIENTS; c++) ack_data[c] = {16{$urandom}};
        #1;
        if (!exp_dirty && (ack_valid & ack_dirty) != '0) begin
          for (int c = NUM_CLIENTS - 1; c >= 0; c--)
            if (ack_valid[c] && ack_dirty[c]) exp_data = ack_data[c];
          exp_dirty = 1;
          chk(first_dirty && dirty_data == exp_data, "first dirty flagged with data");
          nfirst++;
        end else begin
          chk(!first_dirty, "no repeated first_dirty");
        end
        left &= ~ack_valid;
        @(negedge clk);
        ack_valid = '0;
        #1 chk(all_acked == (left == '0), "all_acked");
      end
      chk(dirty_seen == exp_dirty, "dirty_seen held");
      if (exp_dirty) chk(dirty_data == exp_data, "dirty data held");
      chk(prb_valid == '0, "pulse is one cycle");
    end
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
