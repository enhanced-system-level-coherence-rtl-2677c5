// hsc_mem_model: behavioural main memory for the directory testbenches
// (not synthesizable). Accepts requests with valid/ready (ready drops at
// random), applies writes on acceptance and returns read data in request
// order LATENCY cycles after acceptance. Unwritten lines read as init_line(a),
// a fixed function of the address that testbenches use as their reference.
// Counts the reads and writes it serves.
module hsc_mem_model
  import hsc_pkg::*;
#(
  parameter int unsigned LATENCY = 30
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output line_t    rsp_data
);

  line_t mem [laddr_t];
  line_t rq_data [$];
  longint rq_time [$];
  longint now = 0;
  int reads = 0, writes = 0;

  function automatic line_t init_line(input laddr_t a);
    line_t l;
    for (int i = 0; i < WORDS; i++) l[32*i +: 32] = a[31:0] * 32'h9E37_79B1 + 32'(i);
    return l;
  endfunction

  function automatic line_t peek(input laddr_t a);
    return mem.exists(a) ? mem[a] : init_line(a);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      now = now + 1;
      if (req_valid && req_ready) begin
        if (req.we) begin
          mem[req.addr] = req.data;
          writes++;
        end else begin
          rq_data.push_back(peek(req.addr));
          rq_time.push_back(now + longint'(LATENCY));
          reads++;
        end
      end
      req_ready <= ($urandom % 4) != 0;
      rsp_valid <= 1'b0;
      if (rq_time.size() > 0 && rq_time[0] <= now) begin
        rsp_valid <= 1'b1;
        rsp_data  <= rq_data.pop_front();
        void'(rq_time.pop_front());
      end
    end
  end

endmodule
