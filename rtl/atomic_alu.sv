// atomic_alu: the update the directory applies to a line for GPU write-throughs,
// DMA writes and system-level atomics, which are executed at the directory.
//
// For REQ_WT and REQ_DMAWR every byte whose enable is set in mask takes the
// request's data. For REQ_ATOMIC the 32-bit word selected by word is replaced
// by the result of aop (add, swap, compare-and-swap, unsigned max) on the old
// word and operand. Any other request passes the line unchanged.
// Combinational. The set of atomic operations is this design's choice; the
// requester receives the old line and extracts the old word itself.
module atomic_alu
  import hsc_pkg::*;
(
  input  req_type_e   typ,
  input  line_t       old_line,
  input  line_t       wdata,
  input  bmask_t      mask,
  input  atomic_op_e  aop,
  input  logic [3:0]  word,
  input  logic [31:0] operand,
  input  logic [31:0] compare,
  output line_t       new_line
);

  logic [31:0] old_word, new_word;

  assign old_word = old_line[32*word +: 32];

  always_comb begin
    unique case (aop)
      ATOM_ADD:  new_word = old_word + operand;
      ATOM_SWAP: new_word = operand;
      ATOM_CAS:  new_word = (old_word == compare) ? operand : old_word;
      ATOM_MAX:  new_word = (operand > old_word) ? operand : old_word;
      default:   new_word = old_word;
    endcase
  end

  always_comb begin
    new_line = old_line;
    if (typ == REQ_WT || typ == REQ_DMAWR) begin
      for (int b = 0; b < LINE_BYTES; b++) begin
        if (mask[b]) new_line[8*b +: 8] = wdata[8*b +: 8];
      end
    end else if (typ == REQ_ATOMIC) begin
      new_line[32*word +: 32] = new_word;
    end
  end

endmodule
