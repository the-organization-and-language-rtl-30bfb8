// tb_pcu_processor: self-checking test of one PCU processor executing broadcast control words.
// Sends SEC-DED coded control words as a Micro Controller would, with a byte-array model of
// the memory module, and checks results through memory, the stack pointer and flags:
// stack arithmetic, memory push/pop with post-increment and pre-decrement, register
// instructions, compares and SCxx, WHERE masking (inactive processors skip ordinary words but
// execute privileged ones), the Mask Vector Register enable, stack overflow/underflow, the
// MIMD block, corrected single-bit and rejected double-bit link errors.
module tb_pcu_processor;
  import pasm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mimd, pe_enable;
  pcu_cw_t cw;
  logic [36:0] code, code_rx, flip;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, xfer_in, xfer_out, tcr;
  logic mem_we, active, cff, stk_fault, cms_fault, link_fault, link_corrected;
  flags_t flags;
  logic [3:0] sp;
  logic [7:0] mem [1024];
  int checks = 0, failures = 0;

  secded_enc #(.K(CW_W)) enc (.data(cw), .code(code));
  assign code_rx = code ^ flip;

  pcu_processor dut (.clk, .rst_n, .mimd, .pe_enable, .cw_code(code_rx), .mem_addr, .mem_we,
                     .mem_wdata, .mem_rdata, .xfer_in, .xfer_out, .tcr, .active, .cff, .flags,
                     .sp, .stk_fault, .cms_fault, .link_fault, .link_corrected);

  assign mem_rdata = {mem[mem_addr[9:0]], mem[10'(mem_addr + 1)]};
  always_ff @(posedge clk) if (mem_we) begin
    mem[mem_addr[9:0]] <= mem_wdata[15:8];
    mem[10'(mem_addr + 1)] <= mem_wdata[7:0];
  end
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sp=%0d flags=%b active=%b cff=%b", what, sp, flags, active, cff); end
  endtask

  task automatic issue(pcu_op_e op, logic [3:0] rn = 0, logic [15:0] imm = 0, logic [3:0] rm = 0);
    @(negedge clk);
    cw = '{op: op, rn: rn, rm: rm, imm: imm};
    @(negedge clk);
    cw = '0;
  endtask

  function automatic logic [15:0] rd16(int a);
    return {mem[a], mem[a+1]};
  endfunction

  initial begin
    logic [15:0] x, y;
    cw = '0; flip = '0; mimd = 0; pe_enable = 1; xfer_in = 16'hBEEF;
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // stack arithmetic: (x + y) stored at 0x100, (x - y) at 0x102
    x = 16'($urandom); y = 16'($urandom);
    issue(PO_LDSP, 0, 16'd2);            // R0..R2 free, stack from R3
    check("ldsp", sp == 2);
    issue(PO_PSHC, 0, x); issue(PO_PSHC, 0, y); check("two pushes", sp == 4);
    issue(PO_ADD); check("add pops one", sp == 3);
    issue(PO_POPA, 0, 16'h100); check("pop to memory", sp == 2);
    @(negedge clk); check("x+y", rd16('h100) == 16'(x + y));
    issue(PO_PSHC, 0, x); issue(PO_PSHC, 0, y); issue(PO_SUB); issue(PO_POPA, 0, 16'h102);
    @(negedge clk); check("x-y", rd16('h102) == 16'(x - y));
    check("borrow flag", flags.c == (x < y));
    // shifts and unary
    issue(PO_PSHC, 0, 16'h8001); issue(PO_ROL); issue(PO_POPA, 0, 16'h104);
    @(negedge clk); check("rol", rd16('h104) == 16'h0003);
    issue(PO_PSHC, 0, 16'hFFFD); issue(PO_PSHC, 0, 16'h0007); issue(PO_MUL); issue(PO_POPA, 0, 16'h104);
    @(negedge clk); check("mul", rd16('h104) == 16'hFFEB);
    issue(PO_PSHC, 0, 16'h8421); issue(PO_SHN, 0, 16'h0005, 4'd3); issue(PO_POPA, 0, 16'h104);
    @(negedge clk); check("ror by 5", rd16('h104) == 16'h0C21);
    issue(PO_PSHC, 0, 16'h8421); issue(PO_SHN, 0, 16'h0004, 4'd1); issue(PO_POPA, 0, 16'h104);
    @(negedge clk); check("asr by 4", rd16('h104) == 16'hF842);
    issue(PO_PSHC, 0, 16'h0005); issue(PO_NEG); issue(PO_POPA, 0, 16'h106);
    @(negedge clk); check("neg", rd16('h106) == 16'hFFFB);
    // registers: MOV (R1++),#c twice, then PSH (R1--) style reads
    issue(PO_LDRC, 1, 16'h200);
    issue(PO_MOVRIC, 1, 16'h1234); issue(PO_MOVRIC, 1, 16'h5678);
    @(negedge clk); check("mov (Rn++)", rd16('h200) == 16'h1234 && rd16('h202) == 16'h5678);
    issue(PO_STRA, 1, 16'h110); @(negedge clk); check("R1 advanced by 4", rd16('h110) == 16'h204);
    issue(PO_POPRD, 1); // underflow: stack empty
    check("underflow fault", stk_fault);
    check("no change on underflow", sp == 2);
    issue(PO_LDRC, 2, 16'h200); issue(PO_PSHRI, 2); issue(PO_PSHRI, 2); issue(PO_ADD);
    issue(PO_POPA, 0, 16'h112); @(negedge clk); check("push (Rn++)", rd16('h112) == 16'(16'h1234 + 16'h5678));
    issue(PO_INCR, 2); issue(PO_STRA, 2, 16'h114); @(negedge clk); check("inc Rn", rd16('h114) == 16'h205);
    issue(PO_PSHRG, 2); issue(PO_POPTC); check("poptc", tcr == 16'h205);
    // compare and condition
    issue(PO_CMPRC, 2, 16'h205); issue(PO_SETC, CC_EQ); check("SCEQ after equal compare", cff);
    issue(PO_CMPRC, 2, 16'h300); issue(PO_SETC, CC_LT); check("SCLT", cff);
    issue(PO_SETC, CC_GE); check("SCGE false", !cff);
    // WHERE: CFF=0 -> inactive; ordinary words skipped, privileged executed
    issue(PO_WPSH); check("inactive after WPSH of 0", !active);
    issue(PO_PSHC, 0, 16'h7777); check("inactive: no push", sp == 2);
    issue(PO_WPSH); issue(PO_CMPOP); check("privileged while inactive", !active);
    issue(PO_CMPOP); check("active again", active);
    issue(PO_PSHC, 0, 16'h7777); check("active: push", sp == 3);
    issue(PO_TRANS); issue(PO_POPA, 0, 16'h116);
    @(negedge clk); check("trans", xfer_out == 16'h7777 && rd16('h116) == 16'hBEEF);
    // MVR disable
    pe_enable = 0; issue(PO_PSHC, 0, 16'h1); check("mvr off: no push", sp == 2); pe_enable = 1;
    // MIMD mode blocks the controller
    mimd = 1; issue(PO_PSHC, 0, 16'h1); check("mimd: blocked", sp == 2); mimd = 0;
    // link errors
    flip = 37'd1 << 9; issue(PO_PSHC, 0, 16'h4242); flip = 0;
    check("single error corrected", sp == 3 && link_corrected && !link_fault);
    issue(PO_POPA, 0, 16'h118); @(negedge clk); check("corrected data", rd16('h118) == 16'h4242);
    flip = (37'd1 << 3) | (37'd1 << 20); issue(PO_PSHC, 0, 16'h1); flip = 0;
    check("double error rejected", sp == 2 && link_fault);
    // overflow: fill to R15
    issue(PO_LDSP, 0, 16'd10);
    for (int i = 0; i < 5; i++) issue(PO_PSHC, 0, 16'(i));
    check("full", sp == 15);
    issue(PO_PSHC, 0, 16'h9); check("overflow blocked", sp == 15);
    issue(PO_POPA, 0, 16'h11A); @(negedge clk); check("top kept", rd16('h11A) == 16'h4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
