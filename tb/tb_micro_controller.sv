// tb_micro_controller: self-checking test of one Micro Controller (N=1024, Q=16 defaults).
// A small assembler in the testbench writes a nibble program into a byte-array model of the
// controller memory; the program uses null-nibble padding, a DBNZ loop that broadcasts, CST
// and CLD with a null nibble waiting (shifted out under load inhibit), JSR/RET through the
// subroutine linkage stack at R0, IFANY/IFALL against processor CFF values driven here,
// PMSK/NMSK/SMSK and HLT. Checks the broadcast words (decoded with the SEC-DED decoder), the
// bytes written to memory, the MVR, that the mechanisms happened, and the cycle count of a
// broadcast instruction.
module tb_micro_controller;
  import pasm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] mem_addr;
  logic mem_we;
  logic [7:0] mem_wdata, mem_rdata;
  logic [36:0] bc_code;
  logic [63:0] mvr, pcu_cff;
  logic halted, ev_null, ev_overlap, ev_autoload;
  logic [7:0] mem [65536];
  pcu_cw_t bc;
  logic corr, unc;
  int checks = 0, failures = 0, cycles = 0;
  int n_null = 0, n_overlap = 0, n_auto = 0;
  pcu_cw_t seen [$];

  micro_controller #(.N(1024), .Q(16)) dut (
    .clk, .rst_n, .start, .start_addr(16'h0000), .mc_id(4'd0), .mem_addr, .mem_we, .mem_wdata,
    .mem_rdata, .bc_code, .mvr, .pcu_cff, .halted, .ev_null, .ev_overlap, .ev_autoload);
  secded_dec #(.K(CW_W)) dec (.code(bc_code), .data(bc), .corrected(corr), .uncorrectable(unc));

  assign mem_rdata = mem[mem_addr];
  always_ff @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (bc.op != PO_NOP) seen.push_back(bc);
    n_null += int'(ev_null);
    n_overlap += int'(ev_overlap);
    n_auto += int'(ev_autoload);
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ assembler
  int npos = 0;                                    // nibble position
  task automatic nib(logic [3:0] v);
    if (npos % 2 == 0) mem[npos / 2][7:4] = v; else mem[npos / 2][3:0] = v;
    npos++;
  endtask
  task automatic op8(logic [7:0] v); nib(v[7:4]); nib(v[3:0]); endtask
  task automatic w16(logic [15:0] v); op8(v[15:8]); op8(v[7:0]); endtask
  task automatic align(); if (npos % 2) nib(4'hF); endtask
  function automatic int here(); return npos / 2; endfunction
  // an 8-bit offset field to be patched later; returns its nibble position
  function automatic int hole(); int p; p = npos; npos += 2; return p; endfunction
  task automatic patch8(int p, logic [7:0] v);
    int save; save = npos; npos = p; op8(v); npos = save;
  endtask
  task automatic patch16(int p, logic [15:0] v);
    int save; save = npos; npos = p; w16(v); npos = save;
  endtask

  initial begin
    int l_loop, h_loop, h_sub, h_any, h_all, l_sub, l_any, l_bad, ret_pt, t0, t1;
    start = 0; pcu_cff = 64'h5;
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    // program
    op8(OP_CLDC); nib(0); w16(16'h0800);
    op8(OP_CLDC); nib(1); w16(16'd3);
    align(); l_loop = here();
    op8(OP_PSHC); w16(16'h0005);
    op8(OP_DBNZ); nib(1); h_loop = hole(); align(); patch8(h_loop, 8'(l_loop - here()));
    op8(OP_CLDC); nib(2); w16(16'hABCD);
    op8(OP_CST); nib(2); w16(16'h0900); nib(4'hF);
    op8(OP_CLDA); nib(3); w16(16'h0900); nib(4'hF);
    op8(OP_CST); nib(3); w16(16'h0902);
    op8(OP_JSR); h_sub = npos; w16(16'h0000); align(); ret_pt = here();
    op8(OP_SCEQ);
    op8(OP_IFANY); h_any = hole(); align(); t0 = here();
    op8(OP_HLT);
    align(); l_any = here(); patch8(h_any, 8'(l_any - t0));
    op8(OP_IFALL); h_all = hole(); align(); t1 = here();
    op8(OP_NMSK); nib(4'h0); w16(16'h0000);               // not processor 0
    op8(OP_SMSK); nib(4);
    op8(OP_CST); nib(4); w16(16'h0910);
    op8(OP_CST); nib(7); w16(16'h0916);
    op8(OP_CMOV); nib(8); nib(0);
    op8(OP_CST); nib(8); w16(16'h0906);
    op8(OP_HLT);
    align(); l_bad = here(); patch8(h_all, 8'(l_bad - t1));
    op8(OP_CLDC); nib(9); w16(16'h0BAD); op8(OP_CST); nib(9); w16(16'h0920); op8(OP_HLT);
    align(); l_sub = here(); patch16(h_sub, 16'(l_sub));
    op8(OP_PSHC); w16(16'h1111);
    op8(OP_CST); nib(0); w16(16'h0904);
    op8(OP_RET);

    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!halted && cycles < 2000) @(negedge clk);
    check("halted", halted);
    check("broadcast count", seen.size() == 5);
    for (int i = 0; i < 3 && i < seen.size(); i++)
      check("loop broadcast PSH #5", seen[i].op == PO_PSHC && seen[i].imm == 16'h0005);
    if (seen.size() >= 5) begin
      check("subroutine broadcast", seen[3].op == PO_PSHC && seen[3].imm == 16'h1111);
      check("SCEQ broadcast with condition", seen[4].op == PO_SETC && seen[4].rn == 4'(CC_EQ));
    end
    check("CST", {mem['h900], mem['h901]} == 16'hABCD);
    check("CLD then CST", {mem['h902], mem['h903]} == 16'hABCD);
    check("SLS pointer inside subroutine", {mem['h904], mem['h905]} == 16'h0802);
    check("return address on SLS", {mem['h800], mem['h801]} == 16'(ret_pt));
    check("SLS pointer after RET", {mem['h906], mem['h907]} == 16'h0800);
    check("IFALL not taken", {mem['h920], mem['h921]} == 16'h0000);
    check("NMSK", mvr == ~64'd1);
    check("SMSK Rn", {mem['h910], mem['h911]} == 16'hFFFE);
    check("SMSK Rn+3", {mem['h916], mem['h917]} == 16'hFFFF);
    check("no link errors", !unc);
    check("null nibbles skipped", n_null >= 3);
    check("shift under load inhibit", n_overlap >= 2);
    check("overlapped loads", n_auto > 20);
    // timing of a broadcast instruction: PSH #c = decode + 2 operand clocks + execute
    begin
      int c0, c1;
      rst_n = 0;
      for (int i = 0; i < 16; i++) mem[i] = 8'h00;
      npos = 0; op8(OP_PSHC); w16(16'h00AA); op8(OP_PSHC); w16(16'h00BB); op8(OP_HLT);
      @(negedge clk); rst_n = 1; seen.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      c0 = cycles;
      while (seen.size() < 1) @(negedge clk);
      c0 = cycles;
      while (seen.size() < 2) @(negedge clk);
      c1 = cycles;
      check("4 clocks per PSH #c", c1 - c0 == 4);
    end
    $display("mc: %0d broadcasts, %0d null skips, %0d inhibited shifts, %0d overlapped loads",
             seen.size(), n_null, n_overlap, n_auto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
