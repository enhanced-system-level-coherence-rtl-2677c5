// tree_plru: tree pseudo-LRU replacement state for one set of a WAYS-way cache.
//
// The WAYS-1 state bits form a binary tree stored in heap order (node n has
// children 2n+1 and 2n+2). A bit of 0 sends the victim search to the left
// subtree, 1 to the right. Touching a way sets every bit on its path to point
// away from it. Purely combinational: victim_o is the way the current state
// names, state_o the state after touch_way_i is used. Tree PLRU is the policy
// both the directory cache and the LLC use; the bit encoding is this design's.
module tree_plru #(
  parameter int unsigned WAYS  = 16,
  localparam int unsigned WAY_W = $clog2(WAYS)
) (
  input  logic [WAYS-2:0]  state_i,
  input  logic [WAY_W-1:0] touch_way_i,
  output logic [WAYS-2:0]  state_o,
  output logic [WAY_W-1:0] victim_o
);

  always_comb begin
    int unsigned node;
    node = 0;
    for (int l = 0; l < WAY_W; l++) begin
      node = 2 * node + 1 + int'(state_i[node]);
    end
    victim_o = WAY_W'(node - (WAYS - 1));
  end

  always_comb begin
    int unsigned node;
    logic b;
    state_o = state_i;
    node = 0;
    for (int l = WAY_W - 1; l >= 0; l--) begin
      b = touch_way_i[l];
      state_o[node] = ~b;
      node = 2 * node + 1 + int'(b);
    end
  end

endmodule
