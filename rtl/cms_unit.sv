// cms_unit: Conditional Mask Stack (CMS) with the Condition (CFF) and Accumulator (AFF)
// flip-flops of a PCU processor: the hardware behind WHERE ... DO ... ELSEWHERE.
//
// The top of the CMS is the processor's enable: 1 executes broadcast instructions, 0 ignores
// them. From the paper: SCxx sets CFF from a condition of the status flags; LDA, LDC, NOTC,
// ANDA, ORA combine CFF and AFF; WPSH pushes CFF; WEPSH pushes the complement of CFF and then
// CFF; CMPOP pops one element and clears CFF; ICMS initialises the stack; WPSH, WEPSH, CMPOP
// and ICMS are privileged (executed by active and inactive processors), the rest only by
// active ones. This design's own choices: a processor is active when the CMS top and its
// Mask Vector Register bit (pe_enable) are both 1; values pushed are ANDed with the current
// top so that an inactive processor pushes only zeros (the paper requires that an inner WHERE
// cannot re-activate a disabled processor; without the AND, WEPSH would push a 1 under it);
// the stack holds DEPTH saved elements below the top; ICMS and reset give an empty stack with
// top = 1 and CFF = AFF = 0; pushing a full stack or popping an empty one sets cms_err and
// leaves the stack unchanged. All updates on the clock edge.
module cms_unit
  import pasm_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cms_op_e op,
  input  cond_e   cond,
  input  flags_t  flags,
  input  logic    pe_enable,
  output logic    active,
  output logic    top,
  output logic    cff,
  output logic    aff,
  output logic [$clog2(DEPTH+1)-1:0] level,   // saved elements below the top
  output logic    cms_err
);
  localparam int LW = $clog2(DEPTH+1);
  logic [DEPTH-1:0] saved;           // saved[0] is the oldest
  logic             cond_true;
  logic             priv;

  always_comb begin
    case (cond)
      CC_CC: cond_true = !flags.c;
      CC_CS: cond_true =  flags.c;
      CC_VC: cond_true = !flags.v;
      CC_VS: cond_true =  flags.v;
      CC_GT: cond_true = !(flags.n ^ flags.v) && !flags.z;
      CC_GE: cond_true = !(flags.n ^ flags.v);
      CC_EQ: cond_true =  flags.z;
      CC_NE: cond_true = !flags.z;
      CC_LT: cond_true =  (flags.n ^ flags.v);
      CC_LE: cond_true =  (flags.n ^ flags.v) || flags.z;
      default: cond_true = 1'b0;
    endcase
    active  = top && pe_enable;
    priv    = (op == CMS_WPSH) || (op == CMS_WEPSH) || (op == CMS_POP) || (op == CMS_INIT);
    cms_err = ((op == CMS_WPSH)  && (int'(level) >= DEPTH)) ||
              ((op == CMS_WEPSH) && (int'(level) >= DEPTH - 1)) ||
              ((op == CMS_POP)   && (level == '0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      saved <= '0;
      level <= '0;
      top   <= 1'b1;
      cff   <= 1'b0;
      aff   <= 1'b0;
    end else if (priv) begin
      if (!cms_err) begin
        case (op)
          CMS_WPSH: begin
            saved[level] <= top;
            level        <= level + LW'(1);
            top          <= cff & top;
          end
          CMS_WEPSH: begin
            saved[level]          <= top;
            saved[level + LW'(1)] <= ~cff & top;
            level                 <= level + LW'(2);
            top                   <= cff & top;
          end
          CMS_POP: begin
            top   <= saved[level - LW'(1)];
            level <= level - LW'(1);
            cff   <= 1'b0;
          end
          CMS_INIT: begin
            saved <= '0;
            level <= '0;
            top   <= 1'b1;
            cff   <= 1'b0;
            aff   <= 1'b0;
          end
          default: ;
        endcase
      end
    end else if (active) begin
      case (op)
        CMS_SETC: cff <= cond_true;
        CMS_LDA:  aff <= cff;
        CMS_LDC:  cff <= aff;
        CMS_NOTC: cff <= ~cff;
        CMS_ANDA: aff <= aff & cff;
        CMS_ORA:  aff <= aff | cff;
        default: ;
      endcase
    end
  end
endmodule
