// tb_tree_plru: checks tree_plru against an independent per-level model.
// For random states and ways it compares the victim and the updated state with
// the node-index formula node(l) = 2^l - 1 + (way >> (levels - l)), checks that
// a touched way is never the next victim, and that touching all ways in order
// leaves way 0 as the victim. Runs the default 16-way tree and a 4-way one.
module tb_tree_plru;
  localparam int W = 16, LW = 4;
  logic [W-2:0] st_i, st_o;
  logic [LW-1:0] tw, vic;
  logic [2:0] s4_i, s4_o;
  logic [1:0] tw4, vic4;
  int checks = 0, failures = 0;

  tree_plru u_dut (.state_i(st_i), .touch_way_i(tw), .state_o(st_o), .victim_o(vic));
  tree_plru #(.WAYS(4)) u_dut4 (.state_i(s4_i), .touch_way_i(tw4), .state_o(s4_o), .victim_o(vic4));

  function automatic int ref_victim(input logic [W-2:0] s);
    int idx = 0;
    for (int l = 0; l < LW; l++) idx = idx * 2 + int'(s[(1 << l) - 1 + idx]);
    return idx;
  endfunction

  function automatic logic [W-2:0] ref_touch(input logic [W-2:0] s, input int w);
    logic [W-2:0] r = s;
    for (int l = 0; l < LW; l++) r[(1 << l) - 1 + (w >> (LW - l))] = ~w[LW-1-l];
    return r;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      st_i = (W-1)'($urandom);
      tw   = LW'($urandom);
      #1;
      chk(int'(vic) == ref_victim(st_i), "victim");
      chk(st_o == ref_touch(st_i, int'(tw)), "touch state");
      st_i = st_o; #1;
      chk(vic != tw, "touched way not victim");
    end
    st_i = (W-1)'($urandom);
    for (int w = 0; w < W; w++) begin tw = LW'(w); #1; st_i = st_o; end
    #1 chk(vic == 0, "in-order sweep leaves way 0 LRU");
    // 4-way hand-worked case: touch 2 then 0 -> all three bits point right, victim 3
    s4_i = 3'b000; tw4 = 2; #1; s4_i = s4_o; tw4 = 0; #1; s4_i = s4_o; #1;
    chk(vic4 == 2'd3, "4-way victim after 2,0");
    chk(s4_i == 3'b111, "4-way state after 2,0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
