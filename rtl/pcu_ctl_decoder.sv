// pcu_ctl_decoder: the logic array at each PCU processor that expands the encoded control
// signals received from the Micro Controller into the processor's control lines.
//
// The paper chooses encoded control words over full control words (fewer board-to-board
// lines, a much smaller microstore, and a small blocking switch for MIMD mode) and places a
// decoding logic array at every processor. Here the encoded word carries a 6-bit
// micro-operation (pasm_pkg::pcu_op_e); the table below, one row per operation, is this
// design's own. Purely combinational.
module pcu_ctl_decoder
  import pasm_pkg::*;
(
  input  pcu_op_e  op,
  output pcu_ctl_t ctl
);
  always_comb begin
    ctl = '{alu_op: ALU_PASSB, a_sel: A_NOS, b_sel: B_TOS, stk_op: SK_NONE, wd_sel: W_ALU,
            flags_we: 1'b0, rn_we: 1'b0, rn_sel: RN_ALU, mem_we: 1'b0, ma_sel: MA_IMM,
            md_sel: MD_TOS, cms_op: CMS_NONE, privileged: 1'b0, sw_we: 1'b0, tc_we: 1'b0,
            xfer_we: 1'b0};
    case (op)
      // binary stack arithmetic: nos op tos -> new top
      PO_ADD:  begin ctl.alu_op = ALU_ADD; ctl.stk_op = SK_BIN; ctl.flags_we = 1'b1; end
      PO_SUB:  begin ctl.alu_op = ALU_SUB; ctl.stk_op = SK_BIN; ctl.flags_we = 1'b1; end
      PO_ADDC: begin ctl.alu_op = ALU_ADC; ctl.stk_op = SK_BIN; ctl.flags_we = 1'b1; end
      PO_SUBC: begin ctl.alu_op = ALU_SBC; ctl.stk_op = SK_BIN; ctl.flags_we = 1'b1; end
      PO_AND:  begin ctl.alu_op = ALU_AND; ctl.stk_op = SK_BIN; ctl.flags_we = 1'b1; end
      PO_OR:   begin ctl.alu_op = ALU_OR;  ctl.stk_op = SK_BIN; ctl.flags_we = 1'b1; end
      PO_XOR:  begin ctl.alu_op = ALU_XOR; ctl.stk_op = SK_BIN; ctl.flags_we = 1'b1; end
      // unary on the top
      PO_NEG:  begin ctl.alu_op = ALU_NEG;  ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_INC:  begin ctl.alu_op = ALU_INC;  ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_DEC:  begin ctl.alu_op = ALU_DEC;  ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_NOT:  begin ctl.alu_op = ALU_NOT;  ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_ASL:  begin ctl.alu_op = ALU_ASL;  ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_ASR:  begin ctl.alu_op = ALU_ASR;  ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_ROL:  begin ctl.alu_op = ALU_ROL;  ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_ROR:  begin ctl.alu_op = ALU_ROR;  ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_MUL:  begin ctl.alu_op = ALU_MUL;  ctl.stk_op = SK_BIN;  ctl.flags_we = 1'b1; end
      PO_SHN:  begin ctl.alu_op = ALU_SHN;  ctl.a_sel = A_SHN;   ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_ROLC: begin ctl.alu_op = ALU_ROLC; ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_RORC: begin ctl.alu_op = ALU_RORC; ctl.stk_op = SK_REPL; ctl.flags_we = 1'b1; end
      PO_SWB:  begin ctl.alu_op = ALU_SWB;  ctl.stk_op = SK_REPL; end
      // pushes and pops
      PO_PSHC:  begin ctl.stk_op = SK_PUSH; ctl.wd_sel = W_IMM; end
      PO_PSHA:  begin ctl.stk_op = SK_PUSH; ctl.wd_sel = W_MEM; ctl.ma_sel = MA_IMM; end
      PO_PSHR:  begin ctl.stk_op = SK_PUSH; ctl.wd_sel = W_MEM; ctl.ma_sel = MA_RN; end
      PO_PSHRI: begin ctl.stk_op = SK_PUSH; ctl.wd_sel = W_MEM; ctl.ma_sel = MA_RN;
                      ctl.rn_we = 1'b1; ctl.rn_sel = RN_INC2; end
      PO_POPA:  begin ctl.stk_op = SK_POP; ctl.mem_we = 1'b1; ctl.ma_sel = MA_IMM; ctl.md_sel = MD_TOS; end
      PO_POPR:  begin ctl.stk_op = SK_POP; ctl.mem_we = 1'b1; ctl.ma_sel = MA_RN;  ctl.md_sel = MD_TOS; end
      PO_POPRD: begin ctl.stk_op = SK_POP; ctl.mem_we = 1'b1; ctl.ma_sel = MA_RNM2; ctl.md_sel = MD_TOS;
                      ctl.rn_we = 1'b1; ctl.rn_sel = RN_DEC2; end
      PO_PSHRG: begin ctl.stk_op = SK_PUSH; ctl.wd_sel = W_RN; end
      PO_POPRG: begin ctl.stk_op = SK_POP; ctl.rn_we = 1'b1; ctl.rn_sel = RN_TOS; end
      PO_CLR:   begin ctl.rn_we = 1'b1; ctl.rn_sel = RN_ZERO; end
      PO_DUP:   begin ctl.stk_op = SK_PUSH; ctl.wd_sel = W_ALU; ctl.alu_op = ALU_PASSB; end
      PO_DEL:   begin ctl.stk_op = SK_POP; end
      PO_LDSP:  begin ctl.stk_op = SK_LDSP; end
      PO_STSP:  begin ctl.mem_we = 1'b1; ctl.ma_sel = MA_IMM; ctl.md_sel = MD_SP; end
      PO_PSHSW: begin ctl.stk_op = SK_PUSH; ctl.wd_sel = W_SW; end
      PO_POPSW: begin ctl.stk_op = SK_POP; ctl.sw_we = 1'b1; end
      PO_POPTC: begin ctl.stk_op = SK_POP; ctl.tc_we = 1'b1; end
      PO_TRANS: begin ctl.stk_op = SK_REPL; ctl.wd_sel = W_XFER; ctl.xfer_we = 1'b1; end
      // compares: flags only
      PO_CMPS:  begin ctl.alu_op = ALU_SUB; ctl.a_sel = A_NOS; ctl.b_sel = B_TOS; ctl.flags_we = 1'b1; end
      PO_CMPSC: begin ctl.alu_op = ALU_SUB; ctl.a_sel = A_TOS; ctl.b_sel = B_IMM; ctl.flags_we = 1'b1; end
      PO_CMPR:  begin ctl.alu_op = ALU_SUB; ctl.a_sel = A_RN;  ctl.b_sel = B_TOS; ctl.flags_we = 1'b1; end
      PO_CMPRC: begin ctl.alu_op = ALU_SUB; ctl.a_sel = A_RN;  ctl.b_sel = B_IMM; ctl.flags_we = 1'b1; end
      PO_CMPRR: begin ctl.alu_op = ALU_SUB; ctl.a_sel = A_RN;  ctl.b_sel = B_RM;  ctl.flags_we = 1'b1; end
      // register instructions
      PO_LDRC:  begin ctl.rn_we = 1'b1; ctl.rn_sel = RN_IMM; end
      PO_LDRA:  begin ctl.rn_we = 1'b1; ctl.rn_sel = RN_MEM; ctl.ma_sel = MA_IMM; end
      PO_STRA:  begin ctl.mem_we = 1'b1; ctl.ma_sel = MA_IMM; ctl.md_sel = MD_RN; end
      PO_INCR:  begin ctl.alu_op = ALU_INC; ctl.b_sel = B_RN; ctl.rn_we = 1'b1; ctl.rn_sel = RN_ALU; ctl.flags_we = 1'b1; end
      PO_DECR:  begin ctl.alu_op = ALU_DEC; ctl.b_sel = B_RN; ctl.rn_we = 1'b1; ctl.rn_sel = RN_ALU; ctl.flags_we = 1'b1; end
      PO_ADDRC: begin ctl.alu_op = ALU_ADD; ctl.a_sel = A_RN; ctl.b_sel = B_IMM; ctl.rn_we = 1'b1; ctl.rn_sel = RN_ALU; ctl.flags_we = 1'b1; end
      PO_SUBRC: begin ctl.alu_op = ALU_SUB; ctl.a_sel = A_RN; ctl.b_sel = B_IMM; ctl.rn_we = 1'b1; ctl.rn_sel = RN_ALU; ctl.flags_we = 1'b1; end
      PO_MOVRIC: begin ctl.mem_we = 1'b1; ctl.ma_sel = MA_RN; ctl.md_sel = MD_IMM; ctl.rn_we = 1'b1; ctl.rn_sel = RN_INC2; end
      // mask instructions
      PO_SETC:  ctl.cms_op = CMS_SETC;
      PO_LDA:   ctl.cms_op = CMS_LDA;
      PO_LDC:   ctl.cms_op = CMS_LDC;
      PO_NOTC:  ctl.cms_op = CMS_NOTC;
      PO_ANDA:  ctl.cms_op = CMS_ANDA;
      PO_ORA:   ctl.cms_op = CMS_ORA;
      PO_WPSH:  begin ctl.cms_op = CMS_WPSH;  ctl.privileged = 1'b1; end
      PO_WEPSH: begin ctl.cms_op = CMS_WEPSH; ctl.privileged = 1'b1; end
      PO_CMPOP: begin ctl.cms_op = CMS_POP;   ctl.privileged = 1'b1; end
      PO_ICMS:  begin ctl.cms_op = CMS_INIT;  ctl.privileged = 1'b1; end
      default: ;
    endcase
  end
endmodule
