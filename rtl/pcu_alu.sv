// pcu_alu: the arithmetic/logic unit of a PCU processor (single precision integer, 16 bits).
//
// Performs the operations of the paper's arithmetic, boolean and one-bit shift instructions
// and produces carry, overflow, negative and zero flags; compare instructions use ALU_SUB and
// keep only the flags. The paper gives the operations, not the circuit (it builds the data
// path from AM2901 bit slices); this is the plain combinational equivalent. Own conventions:
// subtraction is a - b and the carry flag is the borrow out, so SCCS after a compare means
// a < b unsigned; SUBC subtracts the carry as well. Logic operations keep the carry.
// Shifts put the bit shifted out in c; ROLC/RORC rotate through the carry. MUL is the 16 x 16
// signed product truncated to 16 bits, with c and v set when it does not fit. SHN shifts or
// rotates b by a[3:0] places (a[5:4]: 0 ASL, 1 ASR, 2 ROL, 3 ROR); c is the last bit shifted
// out (unchanged for 0 places) and v is 0. Purely combinational.
module pcu_alu
  import pasm_pkg::*;
#(
  parameter int W = 16
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] y,
  output flags_t       f
);
  logic [W:0] r;
  logic       c, v;
  logic [2*W-1:0] prod, sh;

  always_comb begin
    r = '0;
    prod = '0;
    sh = '0;
    c = cin;
    v = 1'b0;
    case (op)
      ALU_ADD:  begin r = {1'b0, a} + {1'b0, b};                 c = r[W]; v = (a[W-1] == b[W-1]) && (r[W-1] != a[W-1]); end
      ALU_ADC:  begin r = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin}; c = r[W]; v = (a[W-1] == b[W-1]) && (r[W-1] != a[W-1]); end
      ALU_SUB:  begin r = {1'b0, a} - {1'b0, b};                 c = r[W]; v = (a[W-1] != b[W-1]) && (r[W-1] != a[W-1]); end
      ALU_SBC:  begin r = {1'b0, a} - {1'b0, b} - {{W{1'b0}}, cin}; c = r[W]; v = (a[W-1] != b[W-1]) && (r[W-1] != a[W-1]); end
      ALU_NEG:  begin r = {1'b0, {W{1'b0}}} - {1'b0, b};         c = r[W]; v = (b == {1'b1, {(W-1){1'b0}}}); end
      ALU_INC:  begin r = {1'b0, b} + 1'b1;                      c = r[W]; v = (b == {1'b0, {(W-1){1'b1}}}); end
      ALU_DEC:  begin r = {1'b0, b} - 1'b1;                      c = r[W]; v = (b == {1'b1, {(W-1){1'b0}}}); end
      ALU_AND:  r = {cin, a & b};
      ALU_OR:   r = {cin, a | b};
      ALU_XOR:  r = {cin, a ^ b};
      ALU_NOT:  r = {cin, ~b};
      ALU_ASL:  begin r = {b, 1'b0};                 c = b[W-1]; v = b[W-1] ^ b[W-2]; end
      ALU_ASR:  begin r = {b[0], b[W-1], b[W-1:1]};  c = b[0]; end
      ALU_ROL:  begin r = {b[W-1], b[W-2:0], b[W-1]}; c = b[W-1]; end
      ALU_ROR:  begin r = {b[0], b[0], b[W-1:1]};    c = b[0]; end
      ALU_ROLC: begin r = {b[W-1], b[W-2:0], cin};   c = b[W-1]; end
      ALU_RORC: begin r = {b[0], cin, b[W-1:1]};     c = b[0]; end
      ALU_PASSA: r = {cin, a};
      ALU_PASSB: r = {cin, b};
      ALU_SWB:  r = {cin, b[7:0], b[W-1:8]};
      ALU_MUL:  begin
        prod = $signed({{W{a[W-1]}}, a}) * $signed({{W{b[W-1]}}, b});
        r    = {1'b0, prod[W-1:0]};
        c    = (prod[2*W-1:W] != {W{prod[W-1]}});      // signed result does not fit in W bits
        v    = c;
      end
      ALU_SHN:  begin                                   // a[3:0] places, a[5:4] = ASL, ASR, ROL, ROR
        sh = {b, b} << a[3:0];
        case (a[5:4])
          2'd0:    begin r[W-1:0] = b << a[3:0];             c = (a[3:0] == 0) ? cin : b[W - int'(a[3:0])]; end
          2'd1:    begin r[W-1:0] = W'($signed(b) >>> a[3:0]); c = (a[3:0] == 0) ? cin : b[int'(a[3:0]) - 1]; end
          2'd2:    begin r[W-1:0] = sh[2*W-1:W];             c = (a[3:0] == 0) ? cin : r[0]; end
          default: begin r[W-1:0] = W'({b, b} >> a[3:0]);     c = (a[3:0] == 0) ? cin : r[W-1]; end
        endcase
      end
      default:  r = {cin, b};
    endcase
    y   = r[W-1:0];
    f.c = c;
    f.v = v;
    f.n = r[W-1];
    f.z = (r[W-1:0] == '0);
  end
endmodule
