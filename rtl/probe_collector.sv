// probe_collector: sends one round of probes and gathers their acknowledgments.
//
// A start pulse names the destination caches (a multicast set, a single owner,
// or none) and the probe kind (downgrade or invalidate). One cycle later
// prb_valid carries the destination vector for a single cycle. Each probed cache
// answers once on ack_valid; ack_dirty with ack_data returns modified data.
// The first dirty acknowledgment raises first_dirty in the cycle it arrives,
// with its data on dirty_data, so the controller can answer a read early
// instead of waiting for the remaining acknowledgments and the LLC. dirty_seen
// and dirty_data then hold until the next start. all_acked is high when no
// acknowledgment is outstanding. A start with an empty set only clears state.
// Caches are assumed to accept probes unconditionally (this design's choice).
module probe_collector
  import hsc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  cmask_t dest,
  input  probe_e ptype,
  input  laddr_t paddr,
  output cmask_t prb_valid,
  output probe_e prb_type,
  output laddr_t prb_addr,
  input  cmask_t ack_valid,
  input  cmask_t ack_dirty,
  input  line_t  ack_data [NUM_CLIENTS],
  output logic   all_acked,
  output logic   first_dirty,
  output logic   dirty_seen,
  output line_t  dirty_data
);

  cmask_t pending_q;
  logic   dirty_q;
  line_t  data_q;
  line_t  new_data;
  logic   new_dirty;

  always_comb begin
    new_dirty = 1'b0;
    new_data  = '0;
    for (int c = NUM_CLIENTS - 1; c >= 0; c--) begin
      if (ack_valid[c] && ack_dirty[c] && pending_q[c]) begin
        new_dirty = 1'b1;
        new_data  = ack_data[c];
      end
    end
  end

  assign all_acked   = pending_q == '0;
  assign first_dirty = new_dirty && !dirty_q;
  assign dirty_seen  = dirty_q || new_dirty;
  assign dirty_data  = dirty_q ? data_q : new_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= '0;
      dirty_q   <= 1'b0;
      data_q    <= '0;
      prb_valid <= '0;
      prb_type  <= PRB_DOWNGRADE;
      prb_addr  <= '0;
    end else begin
      prb_valid <= '0;
      if (start) begin
        pending_q <= dest;
        dirty_q   <= 1'b0;
        prb_valid <= dest;
        prb_type  <= ptype;
        prb_addr  <= paddr;
      end else begin
        pending_q <= pending_q & ~ack_valid;
        if (first_dirty) begin
          dirty_q <= 1'b1;
          data_q  <= new_data;
        end
      end
    end
  end

  // an acknowledgment must answer an outstanding probe
  a_ack_pending: assert property (@(posedge clk) disable iff (!rst_n)
    (ack_valid & ~pending_q) == '0);

endmodule
