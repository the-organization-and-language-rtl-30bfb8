// tb_pcu_ctl_decoder: self-checking test of the control-word decoder.
// For every micro-operation, checks the stack action, the flag, register and memory write
// enables, the mask-stack action and the privileged bit against a table written from the
// instruction descriptions (what each instruction must change), not from the decoder.
module tb_pcu_ctl_decoder;
  import pasm_pkg::*;
  pcu_op_e op;
  pcu_ctl_t ctl;
  int checks = 0, failures = 0;

  pcu_ctl_decoder dut (.op, .ctl);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s for %s", what, op.name()); end
  endtask

  initial begin
    for (int i = 0; i <= int'(PO_SHN); i++) begin
      stk_op_e es;
      logic ef, er, em, ep;
      cms_op_e ec;
      op = pcu_op_e'(i);
      #1;
      es = SK_NONE; ef = 0; er = 0; em = 0; ep = 0; ec = CMS_NONE;
      case (op)
        PO_ADD, PO_SUB, PO_ADDC, PO_SUBC, PO_AND, PO_OR, PO_XOR: begin es = SK_BIN; ef = 1; end
        PO_NEG, PO_INC, PO_DEC, PO_NOT, PO_ASL, PO_ASR, PO_ROL, PO_ROR, PO_ROLC, PO_RORC:
          begin es = SK_REPL; ef = 1; end
        PO_SWB, PO_TRANS: es = SK_REPL;
        PO_MUL: begin es = SK_BIN; ef = 1; end
        PO_SHN: begin es = SK_REPL; ef = 1; end
        PO_PSHC, PO_PSHA, PO_PSHR, PO_PSHRG, PO_DUP, PO_PSHSW: es = SK_PUSH;
        PO_PSHRI: begin es = SK_PUSH; er = 1; end
        PO_POPA, PO_POPR: begin es = SK_POP; em = 1; end
        PO_POPRD: begin es = SK_POP; em = 1; er = 1; end
        PO_POPRG: begin es = SK_POP; er = 1; end
        PO_DEL, PO_POPSW, PO_POPTC: es = SK_POP;
        PO_CLR, PO_LDRC, PO_LDRA: er = 1;
        PO_LDSP: es = SK_LDSP;
        PO_STSP, PO_STRA: em = 1;
        PO_CMPS, PO_CMPSC, PO_CMPR, PO_CMPRC, PO_CMPRR: ef = 1;
        PO_INCR, PO_DECR, PO_ADDRC, PO_SUBRC: begin er = 1; ef = 1; end
        PO_MOVRIC: begin em = 1; er = 1; end
        PO_SETC: ec = CMS_SETC;
        PO_LDA: ec = CMS_LDA;  PO_LDC: ec = CMS_LDC;  PO_NOTC: ec = CMS_NOTC;
        PO_ANDA: ec = CMS_ANDA; PO_ORA: ec = CMS_ORA;
        PO_WPSH: begin ec = CMS_WPSH; ep = 1; end
        PO_WEPSH: begin ec = CMS_WEPSH; ep = 1; end
        PO_CMPOP: begin ec = CMS_POP; ep = 1; end
        PO_ICMS: begin ec = CMS_INIT; ep = 1; end
        default: ;
      endcase
      check("stack action", ctl.stk_op == es);
      check("flags write", ctl.flags_we == ef);
      check("register write", ctl.rn_we == er);
      check("memory write", ctl.mem_we == em);
      check("mask op", ctl.cms_op == ec);
      check("privileged", ctl.privileged == ep);
      if (op inside {PO_SUB, PO_CMPS, PO_CMPSC, PO_CMPR, PO_CMPRC, PO_CMPRR, PO_SUBRC})
        check("subtract", ctl.alu_op == ALU_SUB);
      if (op == PO_PSHA || op == PO_PSHR || op == PO_PSHRI) check("push from memory", ctl.wd_sel == W_MEM);
      if (op == PO_PSHRI || op == PO_MOVRIC) check("post-increment", ctl.rn_sel == RN_INC2);
      if (op == PO_MUL) check("multiply", ctl.alu_op == ALU_MUL);
      if (op == PO_SHN) check("shift by n", ctl.alu_op == ALU_SHN && ctl.a_sel == A_SHN);
      if (op == PO_POPRD) check("pre-decrement address", ctl.ma_sel == MA_RNM2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
