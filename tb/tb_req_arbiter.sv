// tb_req_arbiter: offers random sets of requests on the six channels and checks
// against a round-robin reference that the arbiter picks the first requesting
// channel after the last one served, stamps the channel into src, and raises
// only that channel's ready when the output is accepted.
module tb_req_arbiter;
  import hsc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_SRC-1:0] in_valid, in_ready;
  req_t in_req [NUM_SRC];
  logic out_valid, out_ready;
  req_t out_req;
  int checks = 0, failures = 0, last = NUM_SRC - 1, expv;

  req_arbiter u_dut (.clk, .rst_n, .in_valid, .in_ready, .in_req, .out_valid, .out_ready, .out_req);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in_valid = '0; out_ready = 0;
    for (int i = 0; i < NUM_SRC; i++) begin in_req[i] = '0; in_req[i].addr = laddr_t'(100 + i); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid  = (t < 50) ? '1 : NUM_SRC'($urandom);
      out_ready = ($urandom % 3 != 0);
      #1;
      expv = -1;
      for (int k = 1; k <= NUM_SRC; k++)
        if (expv < 0 && in_valid[(last + k) % NUM_SRC]) expv = (last + k) % NUM_SRC;
      chk(out_valid == (expv >= 0), "out_valid");
      if (expv >= 0) begin
        chk(int'(out_req.src) == expv, $sformatf("grant %0d exp %0d", out_req.src, expv));
        chk(out_req.addr == laddr_t'(100 + expv), "payload");
        chk(in_ready == (out_ready ? (NUM_SRC'(1) << expv) : '0), "ready");
        if (out_ready) last = expv;
      end
    end
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
