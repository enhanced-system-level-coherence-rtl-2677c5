// req_arbiter: round-robin selection among the request channels of the
// directory (CorePair L2s, TCCs, DMA engine), one request per cycle.
//
// Each channel offers a request with in_valid; the arbiter presents the chosen
// one on out_* with its channel number written into the src field, and raises
// that channel's in_ready when out_ready accepts it. The search starts one past
// the last channel served, so no channel waits behind more than N-1 others.
// Combinational path from in_valid to out_valid; the pointer is registered.
// The arbitration scheme is this design's choice.
module req_arbiter
  import hsc_pkg::*;
#(
  parameter int unsigned N = NUM_SRC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       in_valid,
  output logic [N-1:0]       in_ready,
  input  req_t               in_req [N],
  output logic               out_valid,
  input  logic               out_ready,
  output req_t               out_req
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q, sel;

  always_comb begin
    int unsigned idx;
    out_valid = 1'b0;
    sel       = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last_q) + k) % N;
      if (!out_valid && in_valid[idx]) begin
        out_valid = 1'b1;
        sel       = IW'(idx);
      end
    end
    out_req     = in_req[sel];
    out_req.src = src_t'(sel);
    in_ready    = '0;
    in_ready[sel] = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= IW'(N - 1);
    else if (out_valid && out_ready) last_q <= sel;
  end

endmodule
