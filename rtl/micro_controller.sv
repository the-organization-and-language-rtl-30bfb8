// micro_controller: one PASM Micro Controller in SIMD mode.
//
// It fetches its instruction stream from its memory module through an Instruction Stream
// Handler (ish), executes control flow and controller instructions itself, and broadcasts every
// PCU instruction to its N/Q PCU processors as an encoded, SEC-DED protected control word.
// Instructions are nibble strings: an 8-bit opcode then 0-5 operand nibbles (pasm_pkg). A first
// nibble of F is the null instruction: it is shifted out alone (SHFT1), which re-aligns the
// stream, e.g. bytes F5 AB are the opcode 5A. Subroutine calls use a subroutine linkage stack
// (SLS) in the controller's memory with R0 as its pointer: JSR stores the return address at
// R0 and then adds 2, RET subtracts 2 and then reads it. IFANY/IFALL branch on the Condition
// flip-flops of the processors. PMSK/NMSK/SMSK/LMSK/ANDM/ORM/NOTM operate on the Mask Vector
// Register (MVR), one enable bit per processor, held in Rn..Rn+3 by SMSK/LMSK (bits 15:0 in Rn).
// All of that follows the paper. This design's own choices: opcode values; a multi-cycle state
// machine (decode 1 clock, operands 1 clock per 1-2 nibbles, execute 1 clock, memory operands
// 2 clocks, jumps then refill the queue); branches are relative to the byte after the branch
// instruction; a return address is the first byte none of whose nibbles has been consumed, so
// the code after a call must start on a byte boundary (an odd nibble is padding); 16-bit
// items are stored high byte first; while CLD/CST use the memory for an operand the controller
// shifts out a null nibble waiting in the queue with load inhibit active (the overlap the
// paper describes), and refills the queue afterwards if it fell below three nibbles; IFANY and
// IFALL look only at processors whose MVR bit is set; unknown opcodes act as NOP.
// Timing: a broadcast word is presented on bc_code for exactly one clock and a processor
// executes it at the end of that clock; bc_code carries a NOP word otherwise.
module micro_controller
  import pasm_pkg::*;
#(
  parameter int N = 1024,
  parameter int Q = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,        // begin execution at start_addr
  input  logic [15:0]             start_addr,
  input  logic [$clog2(Q)-1:0]    mc_id,
  // memory module
  output logic [15:0]             mem_addr,
  output logic                    mem_we,
  output logic [7:0]              mem_wdata,
  input  logic [7:0]              mem_rdata,
  // PCU side
  output logic [CW_W+6:0]         bc_code,
  output logic [N/Q-1:0]          mvr,
  input  logic [N/Q-1:0]          pcu_cff,
  // status
  output logic                    halted,
  output logic                    ev_null,      // a null nibble was skipped this clock
  output logic                    ev_overlap,   // a shift with load inhibit this clock
  output logic                    ev_autoload   // a shift triggered a load this clock
);
  localparam int PES   = N / Q;
  localparam int MVR_W = (PES + 15) / 16;       // registers used by SMSK/LMSK

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_DEC, S_OPND, S_EXEC, S_MEM, S_HALT} state_e;
  typedef enum logic [1:0] {M_PUSH_RET, M_POP_RET, M_LOAD, M_STORE} mem_kind_e;

  state_e      state;
  mem_kind_e   mkind;
  logic        mstep;
  logic [15:0] R [16];
  logic [7:0]  opcode;
  logic [19:0] operand;
  logic [2:0]  nib_left;
  logic [15:0] ret_addr, target;
  logic [7:0]  tmp_hi;
  pcu_cw_t     bc_q;

  // ISH
  logic        shft1, shft2, ld, ish_reset, inhibit;
  logic [15:0] ish_reset_addr;
  logic [7:0]  dout;
  logic [2:0]  count;
  logic [15:0] fetch_addr;
  logic        loading;

  ish #(.CAP(6), .ADDR_W(16)) u_ish (
    .clk(clk), .rst_n(rst_n), .din(mem_rdata), .shft1(shft1), .shft2(shft2), .load(ld),
    .reset(ish_reset), .reset_addr(ish_reset_addr), .load_inhibit(inhibit), .dout(dout),
    .count(count), .fetch_addr(fetch_addr), .loading(loading)
  );

  // operand fields
  fmt_e        fmt;
  logic [3:0]  f_rn, f_rm;
  logic [15:0] f_imm;
  logic [15:0] next_pc, br_target;
  logic        any_cff, all_cff;
  logic [15:0] rn_val, rn_dec, rn_inc;
  logic [N/Q-1:0] mask_mvr;

  always_comb begin
    fmt   = op_format(opcode);
    f_rn  = '0;
    f_rm  = '0;
    f_imm = '0;
    case (fmt)
      F_R:  f_rn = operand[3:0];
      F_RR: begin f_rn = operand[7:4]; f_rm = operand[3:0]; end
      F_N:  f_imm = {12'h000, operand[3:0]};
      F_B:  f_imm = {{8{operand[7]}}, operand[7:0]};
      F_W:  f_imm = operand[15:0];
      F_RB: begin f_rn = operand[11:8]; f_imm = {{8{operand[7]}}, operand[7:0]}; end
      F_RW: begin f_rn = operand[19:16]; f_imm = operand[15:0]; end
      default: ;
    endcase
    next_pc   = fetch_addr - 16'(count >> 1);
    br_target = next_pc + f_imm;
    any_cff   = |(pcu_cff & mvr);
    all_cff   = &(pcu_cff | ~mvr);
    rn_val    = R[f_rn];
    rn_dec    = rn_val - 16'd1;
    rn_inc    = rn_val + 16'd1;
  end

  pe_mask_decoder #(.N(N), .Q(Q)) u_mask (
    .mask(operand[2*$clog2(N)-1:0]), .negative(opcode == OP_NMSK), .mc_id(mc_id), .mvr(mask_mvr)
  );

  // memory address, ISH control
  logic null_wait;
  assign null_wait = (dout[7:4] == 4'hF) && (count != 3'd0);

  always_comb begin
    shft1 = 1'b0; shft2 = 1'b0; ld = 1'b0; ish_reset = 1'b0; inhibit = 1'b0;
    ish_reset_addr = start_addr;
    mem_addr  = fetch_addr;
    mem_we    = 1'b0;
    mem_wdata = '0;
    case (state)
      S_IDLE, S_HALT: begin
        ish_reset = start;
      end
      S_FILL: ld = (count < 3'd3);
      S_DEC: begin
        if (dout[7:4] == 4'hF) shft1 = 1'b1;
        else                   shft2 = 1'b1;
      end
      S_OPND: begin
        if (nib_left >= 3'd2) shft2 = 1'b1;
        else                  shft1 = 1'b1;
      end
      S_EXEC: begin
        ish_reset_addr = target;   // overwritten below when a jump is taken
        case (opcode)
          OP_BRA:            begin ish_reset = 1'b1; ish_reset_addr = br_target; end
          OP_JMP:            begin ish_reset = 1'b1; ish_reset_addr = f_imm; end
          OP_JMPR:           begin ish_reset = 1'b1; ish_reset_addr = rn_val; end
          OP_DBNZ:           begin ish_reset = (rn_dec != 16'd0); ish_reset_addr = br_target; end
          OP_IBNZ:           begin ish_reset = (rn_inc != 16'd0); ish_reset_addr = br_target; end
          OP_IFANY:          begin ish_reset = any_cff; ish_reset_addr = br_target; end
          OP_IFALL:          begin ish_reset = all_cff; ish_reset_addr = br_target; end
          default: ;
        endcase
      end
      S_MEM: begin
        inhibit = 1'b1;
        case (mkind)
          M_PUSH_RET: begin
            mem_addr  = mstep ? R[0] + 16'd1 : R[0];
            mem_we    = 1'b1;
            mem_wdata = mstep ? ret_addr[7:0] : ret_addr[15:8];
            if (mstep) begin ish_reset = 1'b1; ish_reset_addr = target; end
          end
          M_POP_RET: begin
            mem_addr = mstep ? R[0] - 16'd1 : R[0] - 16'd2;
            if (mstep) begin ish_reset = 1'b1; ish_reset_addr = {tmp_hi, mem_rdata}; end
          end
          M_LOAD: begin
            mem_addr = mstep ? f_imm + 16'd1 : f_imm;
            shft1    = null_wait;
          end
          M_STORE: begin
            mem_addr  = mstep ? f_imm + 16'd1 : f_imm;
            mem_we    = 1'b1;
            mem_wdata = mstep ? rn_val[7:0] : rn_val[15:8];
            shft1     = null_wait;
          end
          default: ;
        endcase
      end
      default: ;
    endcase
    ev_null     = (state == S_DEC && dout[7:4] == 4'hF) || (state == S_MEM && shft1);
    ev_overlap  = inhibit && (shft1 || shft2);
    ev_autoload = loading && (shft1 || shft2);
  end

  assign halted = (state == S_HALT);

  // state machine and controller registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mkind    <= M_PUSH_RET;
      mstep    <= 1'b0;
      opcode   <= OP_NOP;
      operand  <= '0;
      nib_left <= '0;
      ret_addr <= '0;
      target   <= '0;
      tmp_hi   <= '0;
      bc_q     <= '0;
      mvr      <= '1;
      for (int i = 0; i < 16; i++) R[i] <= '0;
    end else begin
      bc_q <= '0;                                   // NOP unless broadcasting
      case (state)
        S_IDLE, S_HALT: if (start) state <= S_FILL;
        S_FILL: if (count >= 3'd3) state <= S_DEC;
        S_DEC: begin
          if (dout[7:4] != 4'hF) begin
            opcode   <= dout;
            operand  <= '0;
            nib_left <= 3'(fmt_nibbles(op_format(dout)));
            state    <= (fmt_nibbles(op_format(dout)) == 0) ? S_EXEC : S_OPND;
          end
        end
        S_OPND: begin
          if (nib_left >= 3'd2) begin
            operand  <= {operand[11:0], dout};
            nib_left <= nib_left - 3'd2;
            if (nib_left == 3'd2) state <= S_EXEC;
          end else begin
            operand  <= {operand[15:0], dout[7:4]};
            nib_left <= nib_left - 3'd1;
            state    <= S_EXEC;
          end
        end
        S_EXEC: begin
          state <= ish_reset ? S_FILL : S_DEC;
          if (is_pcu_op(opcode)) begin
            bc_q.op  <= pcu_op_of(opcode);
            bc_q.rn  <= (pcu_op_of(opcode) == PO_SETC) ? opcode[3:0] : f_rn;
            bc_q.rm  <= (pcu_op_of(opcode) == PO_SHN) ? 4'(opcode - OP_ASLN) : f_rm;
            bc_q.imm <= f_imm;
          end else begin
            case (opcode)
              OP_HLT:  state <= S_HALT;
              OP_DBNZ: R[f_rn] <= rn_dec;
              OP_IBNZ: R[f_rn] <= rn_inc;
              OP_BRS, OP_JSR, OP_JSRR: begin
                ret_addr <= next_pc;
                target   <= (opcode == OP_BRS) ? br_target : (opcode == OP_JSR) ? f_imm : rn_val;
                mkind    <= M_PUSH_RET;
                mstep    <= 1'b0;
                state    <= S_MEM;
              end
              OP_RET:  begin mkind <= M_POP_RET; mstep <= 1'b0; state <= S_MEM; end
              OP_CLDA: begin mkind <= M_LOAD;    mstep <= 1'b0; state <= S_MEM; end
              OP_CST:  begin mkind <= M_STORE;   mstep <= 1'b0; state <= S_MEM; end
              OP_CCLR: R[f_rn] <= '0;
              OP_CLDC: R[f_rn] <= f_imm;
              OP_CMOV: R[f_rn] <= R[f_rm];
              OP_PMSK, OP_NMSK: mvr <= mask_mvr;
              OP_SMSK, OP_LMSK, OP_ANDM, OP_ORM, OP_NOTM: begin
                for (int k = 0; k < MVR_W; k++) begin
                  logic [3:0]  rk;
                  logic [15:0] chunk;
                  rk    = f_rn + 4'(k);
                  chunk = 16'(mvr >> (16 * k));
                  case (opcode)
                    OP_SMSK: R[rk] <= chunk;
                    OP_ANDM: R[rk] <= R[rk] & chunk;
                    OP_ORM:  R[rk] <= R[rk] | chunk;
                    OP_NOTM: R[rk] <= ~R[rk];
                    default: ;
                  endcase
                end
                if (opcode == OP_LMSK) begin
                  logic [16*MVR_W-1:0] lm;
                  for (int k = 0; k < MVR_W; k++) lm[16*k +: 16] = R[f_rn + 4'(k)];
                  mvr <= lm[PES-1:0];
                end
              end
              default: ;
            endcase
          end
        end
        S_MEM: begin
          mstep <= ~mstep;
          if (!mstep) begin
            if (mkind == M_POP_RET || mkind == M_LOAD) tmp_hi <= mem_rdata;
          end else begin
            case (mkind)
              M_PUSH_RET: begin R[0] <= R[0] + 16'd2; state <= S_FILL; end
              M_POP_RET:  begin R[0] <= R[0] - 16'd2; state <= S_FILL; end
              M_LOAD:     begin R[f_rn] <= {tmp_hi, mem_rdata};
                                state <= ((count - 3'(shft1)) < 3'd3) ? S_FILL : S_DEC; end
              default:    state <= ((count - 3'(shft1)) < 3'd3) ? S_FILL : S_DEC;
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  secded_enc #(.K(CW_W)) u_ecc (.data(bc_q), .code(bc_code));
endmodule
