// mem_req_queue: the ordered queue between the directory/LLC and main memory.
//
// Reads (LLC misses) and writes (dirty LLC replacements) enter in program
// order and leave in the same order, so a read can never pass an earlier
// write-back of the same line. Writes are posted: the directory moves on as
// soon as one is queued and only stalls when the queue is full. A plain
// DEPTH-entry circular FIFO with valid/ready on both sides; empty tells the
// flush logic that all earlier writes have been handed to memory.
// The ordered, non-blocking memory path follows the document; the depth
// (default 16) is this design's choice.
module mem_req_queue
  import hsc_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  mem_req_t in_req,
  output logic     out_valid,
  input  logic     out_ready,
  output mem_req_t out_req,
  output logic     empty
);

  mem_req_t         buf_q [DEPTH];
  logic [PTR_W-1:0] rd_q, wr_q;
  logic [PTR_W:0]   cnt_q;
  logic             push, pop;

  assign in_ready  = cnt_q != (PTR_W+1)'(DEPTH);
  assign out_valid = cnt_q != '0;
  assign empty     = cnt_q == '0;
  assign out_req   = buf_q[rd_q];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= (wr_q == PTR_W'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      if (pop)  rd_q <= (rd_q == PTR_W'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) buf_q[wr_q] <= in_req;
  end

endmodule
