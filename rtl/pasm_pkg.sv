// pasm_pkg: types and constants shared by the PASM Micro Controller and PCU processors.
//
// The machine is nibble oriented: an opcode is two nibbles, a register number one nibble,
// an address or 2-byte constant four nibbles, a branch offset two nibbles. Opcodes hex F0-FF
// are the null (padding) instruction: only its first nibble is consumed, so the opcode is
// re-formed from the following nibbles. These rules, the operand sizes and the instruction
// repertoire follow the paper; the numeric opcode values, the micro-operation codes of the
// encoded control word and the 16-bit single-precision-only data path are this design's own.
// Of the arithmetic the paper lists, divide, floating point and double precision are not
// built; multiply is 16 x 16 signed with a 16-bit result, and the shift/rotate-by-n forms
// (ASLN, ASRN, ROLN, RORN, one count nibble) share one micro-operation.
package pasm_pkg;

  localparam int WORD_W = 16;          // single precision integer, 2 bytes
  localparam int NIB_W  = 4;
  localparam int RF_WORDS = 16;        // AM2901 style register file

  // ------------------------------------------------------------------ opcodes
  // Format of the operand nibbles that follow the 8-bit opcode.
  typedef enum logic [2:0] {
    F_NONE = 3'd0,   // no operand
    F_R    = 3'd1,   // Rn                 (1 nibble)
    F_RR   = 3'd2,   // Rn,Rm              (2 nibbles)
    F_N    = 3'd3,   // 1-nibble constant  (1 nibble)
    F_B    = 3'd4,   // 8-bit branch offset (2 nibbles)
    F_W    = 3'd5,   // 16-bit address or constant (4 nibbles)
    F_RB   = 3'd6,   // Rn, 8-bit offset   (3 nibbles)
    F_RW   = 3'd7    // Rn, 16-bit word    (5 nibbles); also the 5-nibble PE mask
  } fmt_e;

  // PCU instructions (broadcast in SIMD mode)
  localparam logic [7:0] OP_ADD   = 8'h10, OP_SUB   = 8'h11, OP_ADDC  = 8'h12, OP_SUBC = 8'h13,
                         OP_NEG   = 8'h14, OP_INC   = 8'h15, OP_DEC   = 8'h16, OP_MUL  = 8'h17,
                         OP_AND   = 8'h18, OP_OR    = 8'h19, OP_XOR   = 8'h1A, OP_NOT  = 8'h1B,
                         OP_ASL   = 8'h20, OP_ASR   = 8'h21, OP_ROL   = 8'h22, OP_ROR  = 8'h23,
                         OP_ROLC  = 8'h24, OP_RORC  = 8'h25,
                         OP_ASLN  = 8'h26, OP_ASRN  = 8'h27, OP_ROLN  = 8'h28, OP_RORN = 8'h29,
                         OP_PSHC  = 8'h30, OP_PSHA  = 8'h31, OP_PSHR  = 8'h32, OP_PSHRI = 8'h33,
                         OP_POPA  = 8'h34, OP_POPR  = 8'h35, OP_POPRD = 8'h36,
                         OP_PSHRG = 8'h38, OP_POPRG = 8'h39, OP_CLR   = 8'h3A, OP_DUP  = 8'h3B,
                         OP_DEL   = 8'h3C, OP_LDSP  = 8'h3D, OP_PSHSW = 8'h3E, OP_POPSW = 8'h3F,
                         OP_POPTC = 8'h40, OP_TRANS = 8'h41, OP_SWB   = 8'h42, OP_STSP = 8'h43,
                         OP_CMPS  = 8'h48, OP_CMPSC = 8'h49,
                         OP_LDRC  = 8'h50, OP_INCR  = 8'h51, OP_DECR  = 8'h52, OP_ADDRC = 8'h53,
                         OP_SUBRC = 8'h54, OP_CMPR  = 8'h55, OP_CMPRC = 8'h56, OP_CMPRR = 8'h57,
                         OP_LDRA  = 8'h58, OP_STRA  = 8'h59, OP_MOVRIC = 8'h5C,
                         OP_SCCC  = 8'h60, OP_SCCS  = 8'h61, OP_SCVC  = 8'h62, OP_SCVS = 8'h63,
                         OP_SCGT  = 8'h64, OP_SCGE  = 8'h65, OP_SCEQ  = 8'h66, OP_SCNE = 8'h67,
                         OP_SCLT  = 8'h68, OP_SCLE  = 8'h69, OP_LDA   = 8'h6A, OP_LDC  = 8'h6B,
                         OP_NOTC  = 8'h6C, OP_ANDA  = 8'h6D, OP_ORA   = 8'h6E,
                         OP_WPSH  = 8'h70, OP_WEPSH = 8'h71, OP_CMPOP = 8'h72, OP_ICMS = 8'h73;
  // Micro Controller instructions
  localparam logic [7:0] OP_PMSK  = 8'h78, OP_NMSK  = 8'h79, OP_SMSK  = 8'h7A, OP_LMSK = 8'h7B,
                         OP_ANDM  = 8'h7C, OP_ORM   = 8'h7D, OP_NOTM  = 8'h7E,
                         OP_NOP   = 8'h80, OP_HLT   = 8'h81, OP_DBNZ  = 8'h82, OP_IBNZ = 8'h83,
                         OP_BRA   = 8'h84, OP_JMP   = 8'h85, OP_JMPR  = 8'h86, OP_BRS  = 8'h87,
                         OP_JSR   = 8'h88, OP_JSRR  = 8'h89, OP_RET   = 8'h8A,
                         OP_IFANY = 8'h8B, OP_IFALL = 8'h8C,
                         OP_CCLR  = 8'h90, OP_CLDC  = 8'h91, OP_CLDA  = 8'h92, OP_CST  = 8'h93,
                         OP_CMOV  = 8'h94;

  // ------------------------------------------------- encoded PCU control word
  // The Micro Controller does not broadcast instructions but an encoded control word; each
  // PCU processor expands it in its own decoder (pcu_ctl_decoder).
  typedef enum logic [5:0] {
    PO_NOP   = 6'd0,
    PO_ADD, PO_SUB, PO_ADDC, PO_SUBC, PO_NEG, PO_INC, PO_DEC,
    PO_AND, PO_OR, PO_XOR, PO_NOT,
    PO_ASL, PO_ASR, PO_ROL, PO_ROR, PO_ROLC, PO_RORC,
    PO_PSHC, PO_PSHA, PO_PSHR, PO_PSHRI, PO_POPA, PO_POPR, PO_POPRD,
    PO_PSHRG, PO_POPRG, PO_CLR, PO_DUP, PO_DEL, PO_LDSP, PO_PSHSW, PO_POPSW,
    PO_POPTC, PO_TRANS, PO_SWB, PO_STSP,
    PO_CMPS, PO_CMPSC,
    PO_LDRC, PO_INCR, PO_DECR, PO_ADDRC, PO_SUBRC, PO_CMPR, PO_CMPRC, PO_CMPRR,
    PO_LDRA, PO_STRA, PO_MOVRIC,
    PO_SETC, PO_LDA, PO_LDC, PO_NOTC, PO_ANDA, PO_ORA,
    PO_WPSH, PO_WEPSH, PO_CMPOP, PO_ICMS,
    PO_MUL,                 // integer multiply, low 16 bits
    PO_SHN                  // shift/rotate by imm[3:0] places; rm[1:0] = ASL, ASR, ROL, ROR
  } pcu_op_e;

  typedef struct packed {
    pcu_op_e          op;
    logic [3:0]       rn;     // register number, or condition code for PO_SETC
    logic [3:0]       rm;
    logic [15:0]      imm;    // constant or address
  } pcu_cw_t;

  localparam int CW_W = $bits(pcu_cw_t);   // 30

  // --------------------------------------------------------- PCU datapath
  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_ADC, ALU_SBC, ALU_NEG, ALU_INC, ALU_DEC,
    ALU_AND, ALU_OR, ALU_XOR, ALU_NOT,
    ALU_ASL, ALU_ASR, ALU_ROL, ALU_ROR, ALU_ROLC, ALU_RORC,
    ALU_PASSA, ALU_PASSB, ALU_SWB, ALU_MUL, ALU_SHN
  } alu_op_e;

  typedef enum logic [2:0] {SK_NONE, SK_PUSH, SK_POP, SK_REPL, SK_BIN, SK_LDSP} stk_op_e;
  typedef enum logic [1:0] {A_NOS, A_TOS, A_RN, A_SHN} a_sel_e;
  typedef enum logic [1:0] {B_TOS, B_IMM, B_RM, B_RN} b_sel_e;
  typedef enum logic [2:0] {W_ALU, W_MEM, W_IMM, W_RN, W_SW, W_XFER, W_NOS} wd_sel_e;
  typedef enum logic [2:0] {RN_ALU, RN_IMM, RN_MEM, RN_TOS, RN_INC2, RN_DEC2, RN_ZERO} rn_sel_e;
  typedef enum logic [1:0] {MA_IMM, MA_RN, MA_RNM2} ma_sel_e;
  typedef enum logic [1:0] {MD_TOS, MD_IMM, MD_RN, MD_SP} md_sel_e;
  typedef enum logic [3:0] {
    CMS_NONE, CMS_SETC, CMS_LDA, CMS_LDC, CMS_NOTC, CMS_ANDA, CMS_ORA,
    CMS_WPSH, CMS_WEPSH, CMS_POP, CMS_INIT
  } cms_op_e;

  // Condition codes of the SCxx instructions (carried in the rn field)
  typedef enum logic [3:0] {
    CC_CC, CC_CS, CC_VC, CC_VS, CC_GT, CC_GE, CC_EQ, CC_NE, CC_LT, CC_LE
  } cond_e;

  // Expanded control lines of one PCU processor
  typedef struct packed {
    alu_op_e  alu_op;
    a_sel_e   a_sel;
    b_sel_e   b_sel;
    stk_op_e  stk_op;
    wd_sel_e  wd_sel;
    logic     flags_we;
    logic     rn_we;
    rn_sel_e  rn_sel;
    logic     mem_we;
    ma_sel_e  ma_sel;
    md_sel_e  md_sel;
    cms_op_e  cms_op;
    logic     privileged;
    logic     sw_we;
    logic     tc_we;
    logic     xfer_we;
  } pcu_ctl_t;

  typedef struct packed {
    logic c;
    logic v;
    logic n;
    logic z;
  } flags_t;

  // ------------------------------------------------------------ helpers
  function automatic fmt_e op_format(input logic [7:0] op);
    case (op)
      OP_PSHR, OP_PSHRI, OP_POPR, OP_POPRD, OP_PSHRG, OP_POPRG, OP_CLR,
      OP_INCR, OP_DECR, OP_CMPR, OP_JMPR, OP_JSRR, OP_CCLR,
      OP_SMSK, OP_LMSK, OP_ANDM, OP_ORM, OP_NOTM:                      return F_R;
      OP_CMPRR, OP_CMOV:                                               return F_RR;
      OP_LDSP, OP_DUP, OP_DEL, OP_ASLN, OP_ASRN, OP_ROLN, OP_RORN:     return F_N;
      OP_BRA, OP_BRS, OP_IFANY, OP_IFALL:                              return F_B;
      OP_PSHC, OP_PSHA, OP_POPA, OP_STSP, OP_CMPSC, OP_JMP, OP_JSR:    return F_W;
      OP_DBNZ, OP_IBNZ:                                                return F_RB;
      OP_LDRC, OP_ADDRC, OP_SUBRC, OP_CMPRC, OP_LDRA, OP_STRA, OP_MOVRIC,
      OP_CLDC, OP_CLDA, OP_CST, OP_PMSK, OP_NMSK:                      return F_RW;
      default:                                                         return F_NONE;
    endcase
  endfunction

  function automatic int unsigned fmt_nibbles(input fmt_e f);
    case (f)
      F_R, F_N:    return 1;
      F_RR, F_B:   return 2;
      F_RB:        return 3;
      F_W:         return 4;
      F_RW:        return 5;
      default:     return 0;
    endcase
  endfunction

  // Maps a PCU instruction opcode to its micro-operation; PO_NOP for non-PCU opcodes.
  function automatic pcu_op_e pcu_op_of(input logic [7:0] op);
    case (op)
      OP_ADD: return PO_ADD;     OP_SUB: return PO_SUB;     OP_ADDC: return PO_ADDC;
      OP_SUBC: return PO_SUBC;   OP_NEG: return PO_NEG;     OP_INC: return PO_INC;
      OP_DEC: return PO_DEC;     OP_AND: return PO_AND;     OP_OR: return PO_OR;
      OP_XOR: return PO_XOR;     OP_NOT: return PO_NOT;     OP_ASL: return PO_ASL;
      OP_ASR: return PO_ASR;     OP_ROL: return PO_ROL;     OP_ROR: return PO_ROR;
      OP_ROLC: return PO_ROLC;   OP_RORC: return PO_RORC;   OP_MUL: return PO_MUL;
      OP_ASLN, OP_ASRN, OP_ROLN, OP_RORN: return PO_SHN;
      OP_PSHC: return PO_PSHC;   OP_PSHA: return PO_PSHA;   OP_PSHR: return PO_PSHR;
      OP_PSHRI: return PO_PSHRI; OP_POPA: return PO_POPA;   OP_POPR: return PO_POPR;
      OP_POPRD: return PO_POPRD; OP_PSHRG: return PO_PSHRG; OP_POPRG: return PO_POPRG;
      OP_CLR: return PO_CLR;     OP_DUP: return PO_DUP;     OP_DEL: return PO_DEL;
      OP_LDSP: return PO_LDSP;   OP_PSHSW: return PO_PSHSW; OP_POPSW: return PO_POPSW;
      OP_POPTC: return PO_POPTC; OP_TRANS: return PO_TRANS; OP_SWB: return PO_SWB;
      OP_STSP: return PO_STSP;
      OP_CMPS: return PO_CMPS;   OP_CMPSC: return PO_CMPSC;
      OP_LDRC: return PO_LDRC;   OP_INCR: return PO_INCR;   OP_DECR: return PO_DECR;
      OP_ADDRC: return PO_ADDRC; OP_SUBRC: return PO_SUBRC; OP_CMPR: return PO_CMPR;
      OP_CMPRC: return PO_CMPRC; OP_CMPRR: return PO_CMPRR; OP_LDRA: return PO_LDRA;
      OP_STRA: return PO_STRA;   OP_MOVRIC: return PO_MOVRIC;
      OP_SCCC, OP_SCCS, OP_SCVC, OP_SCVS, OP_SCGT,
      OP_SCGE, OP_SCEQ, OP_SCNE, OP_SCLT, OP_SCLE: return PO_SETC;
      OP_LDA: return PO_LDA;     OP_LDC: return PO_LDC;     OP_NOTC: return PO_NOTC;
      OP_ANDA: return PO_ANDA;   OP_ORA: return PO_ORA;     OP_WPSH: return PO_WPSH;
      OP_WEPSH: return PO_WEPSH; OP_CMPOP: return PO_CMPOP; OP_ICMS: return PO_ICMS;
      default: return PO_NOP;
    endcase
  endfunction

  function automatic logic is_pcu_op(input logic [7:0] op);
    return (op >= 8'h10) && (op <= 8'h73) && (pcu_op_of(op) != PO_NOP);
  endfunction

endpackage
