// tb_atomic_alu: drives random lines through atomic_alu and compares with a
// byte/word-level reference: masked merge for WT and DMA writes, add, swap,
// compare-and-swap (hit and miss) and unsigned max on the chosen word, and an
// unchanged line for other request types.
module tb_atomic_alu;
  import hsc_pkg::*;
  req_type_e typ; line_t old_l, wd, nl, exp_l; bmask_t m; atomic_op_e aop;
  logic [3:0] word; logic [31:0] opd, cmp, ow, ew;
  int checks = 0, failures = 0;

  atomic_alu u_dut (.typ, .old_line(old_l), .wdata(wd), .mask(m), .aop, .word,
                    .operand(opd), .compare(cmp), .new_line(nl));

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_W / 32; i++) l[32*i +: 32] = $urandom;
    return l;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      old_l = rnd_line(); wd = rnd_line();
      m = {$urandom, $urandom};
      word = 4'($urandom); opd = $urandom; cmp = $urandom;
      aop = atomic_op_e'(i % 4);
      unique case (i % 6)
        0: typ = REQ_WT;
        1: typ = REQ_DMAWR;
        2, 3, 4: typ = REQ_ATOMIC;
        default: typ = REQ_RDBLK;
      endcase
      ow = old_l[32*word +: 32];
      if (typ == REQ_ATOMIC && aop == ATOM_CAS && i % 8 < 4) cmp = ow;
      #1;
      exp_l = old_l;
      if (typ == REQ_WT || typ == REQ_DMAWR) begin
        for (int b = 0; b < LINE_BYTES; b++) if (m[b]) exp_l[8*b +: 8] = wd[8*b +: 8];
      end else if (typ == REQ_ATOMIC) begin
        case (aop)
          ATOM_ADD:  ew = ow + opd;
          ATOM_SWAP: ew = opd;
          ATOM_CAS:  ew = (ow == cmp) ? opd : ow;
          default:   ew = (opd > ow) ? opd : ow;
        endcase
        exp_l[32*word +: 32] = ew;
      end
      chk(nl == exp_l, $sformatf("case %0d typ %0d aop %0d", i, typ, aop));
    end
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
