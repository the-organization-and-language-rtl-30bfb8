// pcu_processor: one processor of the Parallel Computation Unit, as used in SIMD mode.
//
// Each clock it takes the SEC-DED protected control word broadcast by its Micro Controller,
// corrects it (secded_dec), expands it (pcu_ctl_decoder) and executes it on its own register
// stack (reg_stack), ALU (pcu_alu), status flags, Conditional Mask Stack (cms_unit) and its
// own memory module, so the same instruction works on different data in every processor.
// From the paper: the semi-stack organisation (16-word register file used as a stack through
// a 4-bit pointer, each word also directly addressable), the stack overflow/underflow
// interrupt, masking by the CMS top, privileged mask instructions that inactive processors
// execute too, and a switch that blocks the controller's signals while the processor runs in
// MIMD mode. This design's own choices: one control word executes in one clock (memory reads
// are combinational); a processor is active when its CMS top and its Mask Vector Register bit
// (pe_enable) are 1; an operation that would overflow or underflow the stack is not executed
// and sets stk_fault (a CMS push past its depth or a pop of an empty CMS sets cms_fault);
// a word with an uncorrectable link error executes as a no-op and sets link_fault. MUL
// multiplies the top two words (signed, low 16 bits kept); shifts and rotates by n places
// take the count from the immediate field and the kind from rm. TRANS places the top on xfer_out for the interconnection network and replaces it
// with xfer_in; POPTC loads the transfer control register tcr. MIMD instruction fetch and
// sequencing are not part of this module: with mimd high it only ignores the controller.
module pcu_processor
  import pasm_pkg::*;
#(
  parameter int CMS_DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mimd,          // 1: block the Micro Controller's signals
  input  logic                    pe_enable,     // this processor's Mask Vector Register bit
  input  logic [CW_W+6:0]         cw_code,       // SEC-DED coded control word (37 bits)
  // memory module
  output logic [15:0]             mem_addr,
  output logic                    mem_we,
  output logic [15:0]             mem_wdata,
  input  logic [15:0]             mem_rdata,
  // interconnection network side
  input  logic [15:0]             xfer_in,
  output logic [15:0]             xfer_out,
  output logic [15:0]             tcr,
  // status
  output logic                    active,
  output logic                    cff,
  output flags_t                  flags,
  output logic [3:0]              sp,
  output logic                    stk_fault,
  output logic                    cms_fault,
  output logic                    link_fault,
  output logic                    link_corrected
);
  pcu_cw_t  cw;
  pcu_ctl_t ctl;
  logic     uncorrectable, corrected;
  logic     valid, exec, commit;
  stk_op_e  stk_op_g;
  cms_op_e  cms_op_g;
  logic [15:0] tos, nos, rda, rdb, a, b, y, swd, dwd;
  flags_t   alu_f;
  logic     stk_irq, ovf, unf, top, aff;
  logic [$clog2(CMS_DEPTH+1)-1:0] cms_level;
  logic     cms_err;

  secded_dec #(.K(CW_W)) u_ecc (
    .code(cw_code), .data(cw), .corrected(corrected), .uncorrectable(uncorrectable)
  );

  pcu_ctl_decoder u_dec (.op(cw.op), .ctl(ctl));

  // the MIMD switch and the link check gate the whole word
  assign valid    = !mimd && !uncorrectable;
  assign exec     = valid && (ctl.privileged || active);
  assign stk_op_g = exec ? ctl.stk_op : SK_NONE;
  assign commit   = exec && !stk_irq;
  assign cms_op_g = valid ? ctl.cms_op : CMS_NONE;

  reg_stack #(.W(16)) u_rs (
    .clk(clk), .rst_n(rst_n), .stk_op(stk_op_g), .wdata(swd), .sp_din(cw.imm[3:0]),
    .ra(cw.rn), .rb(cw.rm), .dwe(commit && ctl.rn_we), .dwaddr(cw.rn), .dwdata(dwd),
    .tos(tos), .nos(nos), .rda(rda), .rdb(rdb), .sp(sp),
    .stk_irq(stk_irq), .overflow(ovf), .underflow(unf)
  );

  always_comb begin
    case (ctl.a_sel)
      A_TOS:   a = tos;
      A_RN:    a = rda;
      A_SHN:   a = {10'b0, cw.rm[1:0], cw.imm[3:0]};   // shift type and count
      default: a = nos;
    endcase
    case (ctl.b_sel)
      B_IMM:   b = cw.imm;
      B_RM:    b = rdb;
      B_RN:    b = rda;
      default: b = tos;
    endcase
  end

  pcu_alu #(.W(16)) u_alu (.op(ctl.alu_op), .a(a), .b(b), .cin(flags.c), .y(y), .f(alu_f));

  always_comb begin
    case (ctl.ma_sel)
      MA_RN:   mem_addr = rda;
      MA_RNM2: mem_addr = rda - 16'd2;
      default: mem_addr = cw.imm;
    endcase
    case (ctl.md_sel)
      MD_IMM:  mem_wdata = cw.imm;
      MD_RN:   mem_wdata = rda;
      MD_SP:   mem_wdata = {12'h000, sp};
      default: mem_wdata = tos;
    endcase
    mem_we = commit && ctl.mem_we;
    case (ctl.wd_sel)
      W_MEM:   swd = mem_rdata;
      W_IMM:   swd = cw.imm;
      W_RN:    swd = rda;
      W_SW:    swd = {12'h000, flags};
      W_XFER:  swd = xfer_in;
      W_NOS:   swd = nos;
      default: swd = y;
    endcase
    case (ctl.rn_sel)
      RN_IMM:  dwd = cw.imm;
      RN_MEM:  dwd = mem_rdata;
      RN_TOS:  dwd = tos;
      RN_INC2: dwd = rda + 16'd2;
      RN_DEC2: dwd = rda - 16'd2;
      RN_ZERO: dwd = '0;
      default: dwd = y;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags          <= '0;
      tcr            <= '0;
      xfer_out       <= '0;
      stk_fault      <= 1'b0;
      cms_fault      <= 1'b0;
      link_fault     <= 1'b0;
      link_corrected <= 1'b0;
    end else begin
      if (commit && ctl.flags_we) flags <= alu_f;
      if (commit && ctl.sw_we)    flags <= tos[3:0];
      if (commit && ctl.tc_we)    tcr <= tos;
      if (commit && ctl.xfer_we)  xfer_out <= tos;
      if (exec && stk_irq)        stk_fault <= 1'b1;
      if (cms_err)                cms_fault <= 1'b1;
      if (!mimd && uncorrectable) link_fault <= 1'b1;
      if (!mimd && corrected && !uncorrectable) link_corrected <= 1'b1;
    end
  end

  cms_unit #(.DEPTH(CMS_DEPTH)) u_cms (
    .clk(clk), .rst_n(rst_n), .op(cms_op_g), .cond(cond_e'(cw.rn)), .flags(flags),
    .pe_enable(pe_enable), .active(active), .top(top), .cff(cff), .aff(aff),
    .level(cms_level), .cms_err(cms_err)
  );
endmodule
