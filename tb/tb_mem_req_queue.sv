// tb_mem_req_queue: pushes 300 random memory requests with random stalls on
// both sides and checks they leave in order and unchanged, that the queue
// refuses a push exactly when it holds DEPTH entries, and the empty flag.
module tb_mem_req_queue;
  import hsc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, empty;
  mem_req_t in_req, out_req;
  mem_req_t exp_q[$];
  int checks = 0, failures = 0, sent = 0, got = 0, cyc = 0;

  mem_req_queue u_dut (.clk, .rst_n, .in_valid, .in_ready, .in_req,
                       .out_valid, .out_ready, .out_req, .empty);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  function automatic mem_req_t rnd();
    mem_req_t r;
    r.we = 1'($urandom); r.addr = {$urandom, $urandom};
    for (int i = 0; i < 16; i++) r.data[32*i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    in_valid = 0; out_ready = 0; in_req = rnd();
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (got < 300) begin
      @(negedge clk);
      cyc++;
      chk(in_ready == (exp_q.size() < 16), "in_ready vs occupancy");
      chk(empty == (exp_q.size() == 0), "empty flag");
      in_valid  = (sent < 300) && ($urandom % 4 != 0);
      out_ready = (cyc < 200) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        chk(exp_q.size() > 0 && out_req == exp_q[0], "order/data");
        void'(exp_q.pop_front());
        got++;
      end
      if (in_valid && in_ready) begin
        exp_q.push_back(in_req);
        sent++;
        #1 in_req = rnd();
      end
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
