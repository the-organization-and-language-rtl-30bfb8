// reg_stack: the PCU processor's 16-word register file used as an arithmetic stack.
//
// As in the paper, a 4-bit up/down counter outside the register file serves as stack pointer
// (sp); the operands of stack instructions are the words at sp (top, tos) and sp-1 (next, nos),
// and every word can also be read and written directly by number (index registers, loop
// counters). A push that overflows or a pop that underflows raises stk_irq instead of changing
// anything. This design's own choices: sp points at the top element; LDSP loads both sp and a
// base register, and the stack is empty when sp == base, so the word at base and everything
// below it stay free for direct use (reset: sp = base = 0, keeping R0 for the subroutine
// linkage stack pointer); a push with sp == 15 overflows. Stack operations: PUSH writes wdata
// at sp+1; POP drops the top; REPL overwrites the top; BIN drops the top and overwrites the new
// top (binary operator). The direct port writes in the same clock; the stack write wins on a
// clash. Reads are combinational, writes take effect on the clock edge.
module reg_stack
  import pasm_pkg::*;
#(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  stk_op_e      stk_op,
  input  logic [W-1:0] wdata,      // value pushed / written to the top
  input  logic [3:0]   sp_din,     // LDSP value
  input  logic [3:0]   ra,         // direct read port A (Rn)
  input  logic [3:0]   rb,         // direct read port B (Rm)
  input  logic         dwe,        // direct write
  input  logic [3:0]   dwaddr,
  input  logic [W-1:0] dwdata,
  output logic [W-1:0] tos,
  output logic [W-1:0] nos,
  output logic [W-1:0] rda,
  output logic [W-1:0] rdb,
  output logic [3:0]   sp,
  output logic         stk_irq,    // overflow or underflow this cycle
  output logic         overflow,
  output logic         underflow
);
  logic [W-1:0] rf [16];
  logic [3:0]   base;
  logic [3:0]   depth;

  assign depth = sp - base;
  assign tos   = rf[sp];
  assign nos   = rf[sp - 4'd1];
  assign rda   = rf[ra];
  assign rdb   = rf[rb];

  always_comb begin
    overflow  = (stk_op == SK_PUSH) && (sp == 4'hF);
    underflow = ((stk_op == SK_POP || stk_op == SK_REPL) && depth == 4'd0) ||
                ((stk_op == SK_BIN) && depth < 4'd2);
    stk_irq   = overflow || underflow;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp   <= '0;
      base <= '0;
    end else if (!stk_irq) begin
      case (stk_op)
        SK_PUSH: sp <= sp + 4'd1;
        SK_POP, SK_BIN: sp <= sp - 4'd1;
        SK_LDSP: begin sp <= sp_din; base <= sp_din; end
        default: ;
      endcase
    end
  end

  // register file: plain array, no reset (as a register-file macro)
  always_ff @(posedge clk) begin
    if (dwe) rf[dwaddr] <= dwdata;
    if (!stk_irq) begin
      case (stk_op)
        SK_PUSH: rf[sp + 4'd1] <= wdata;
        SK_REPL: rf[sp]        <= wdata;
        SK_BIN:  rf[sp - 4'd1] <= wdata;
        default: ;
      endcase
    end
  end
endmodule
