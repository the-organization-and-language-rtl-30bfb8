// tb_pasm_run: end-to-end test body of the whole machine, instantiated by tb_pasm_top at a
// reduced size (N=64 processors, Q=4 controllers, 1 KiB memories). FULL=1 instantiates the top
// with no parameter list at all, i.e. at its default size.
// The testbench plays System Control Unit and Memory Management System: it assembles two
// programs, loads program P into memory A of all controllers at once through the memory
// switch (one SIMD machine), then program P2 into memory B of the partition of controllers
// whose low two address bits are 11, and gives every processor a pixel value. Those
// controllers then run from memory B, the others from memory A, so two SIMD machines run
// different programs side by side. P thresholds each pixel with WHERE/ELSEWHERE, doubles it in
// a subroutine (JSR/RET on the linkage stack, rotate by n), branches with IFANY, stores a
// controller register over a waiting null nibble, and writes a product (MUL) only on
// processors a PE address mask selects. Processor 5 is in MIMD mode and must ignore
// everything. While the controllers run, memory B of controller 0 is reloaded (loading
// overlapped with computation). Every processor's results are read back and compared with
// values computed here; each mechanism is counted and must have occurred.
module tb_pasm_run #(
  parameter bit FULL = 1'b0,         // 1: the top at its default size, no parameter override
  parameter int N = 1024,
  parameter int Q = 16,
  parameter int MEM_DEPTH = 65536
);
  import pasm_pkg::*;
  localparam int NB = $clog2(N), QB = $clog2(Q);
  localparam logic [15:0] THRESH = 16'd100;

  logic clk = 0, rst_n = 0;
  logic [Q-1:0] mc_start, mc_run_bank, mc_halted;
  logic mcl_we, mcl_bank, pl_we, pl_all;
  logic [QB-1:0] mcl_part_addr;
  logic [QB:0] mcl_part_m;
  logic [15:0] mcl_addr, pl_addr;
  logic [7:0] mcl_data, pl_data, pl_rdata;
  logic [NB-1:0] pl_sel;
  logic [N-1:0] mimd, pcu_active, pcu_cff, pcu_fault;
  logic [N-1:0][15:0] xfer_in, xfer_out, tcr;
  int checks = 0, failures = 0, cycles = 0;
  int n_bcast = 0, n_null = 0, n_overlap = 0, n_auto = 0, n_masked = 0, n_loadrun = 0;

  if (FULL) begin : g_sz
    pasm_top dut (
      .clk, .rst_n, .mc_start, .mc_start_addr(16'h0000), .mc_run_bank, .mc_halted,
      .mcl_we, .mcl_part_addr, .mcl_part_m, .mcl_bank, .mcl_addr, .mcl_data,
      .pl_we, .pl_all, .pl_sel, .pl_addr, .pl_data, .pl_rdata,
      .mimd, .xfer_in, .xfer_out, .tcr, .pcu_active, .pcu_cff, .pcu_fault);
  end else begin : g_sz
    pasm_top #(.N(N), .Q(Q), .PCU_MEM_DEPTH(MEM_DEPTH), .MC_MEM_DEPTH(MEM_DEPTH)) dut (
      .clk, .rst_n, .mc_start, .mc_start_addr(16'h0000), .mc_run_bank, .mc_halted,
      .mcl_we, .mcl_part_addr, .mcl_part_m, .mcl_bank, .mcl_addr, .mcl_data,
      .pl_we, .pl_all, .pl_sel, .pl_addr, .pl_data, .pl_rdata,
      .mimd, .xfer_in, .xfer_out, .tcr, .pcu_active, .pcu_cff, .pcu_fault);
  end

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    n_bcast   += int'(g_sz.dut.g_mc[0].u_mc.bc_q.op != PO_NOP);
    n_null    += int'(g_sz.dut.g_mc[0].ev_null);
    n_overlap += int'(g_sz.dut.g_mc[0].ev_overlap);
    n_auto    += int'(g_sz.dut.g_mc[0].ev_autoload);
    n_masked  += int'(pcu_active != '1);
    n_loadrun += int'(mcl_we && (mc_halted != '1));
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ assembler
  logic [7:0] prog [512];
  int npos;
  task automatic nib(logic [3:0] v);
    if (npos % 2 == 0) prog[npos / 2][7:4] = v; else prog[npos / 2][3:0] = v;
    npos++;
  endtask
  task automatic op8(logic [7:0] v); nib(v[7:4]); nib(v[3:0]); endtask
  task automatic w16(logic [15:0] v); op8(v[15:8]); op8(v[7:0]); endtask
  task automatic align(); if (npos % 2) nib(4'hF); endtask
  function automatic int here(); return npos / 2; endfunction
  task automatic patch8(int p, logic [7:0] v); int s; s = npos; npos = p; op8(v); npos = s; endtask
  task automatic patch16(int p, logic [15:0] v); int s; s = npos; npos = p; w16(v); npos = s; endtask

  task automatic load_prog(logic [QB-1:0] part, logic [QB:0] m, logic bank);
    for (int i = 0; i < (npos + 1) / 2; i++) begin
      @(negedge clk);
      mcl_we = 1; mcl_part_addr = part; mcl_part_m = m; mcl_bank = bank;
      mcl_addr = 16'(i); mcl_data = prog[i];
    end
    @(negedge clk); mcl_we = 0;
  endtask

  function automatic logic [15:0] pixel(int p);
    return 16'((p * 37 + 11) % 211);
  endfunction

  task automatic rd16(int p, int a, output logic [15:0] v);
    pl_sel = NB'(p); pl_addr = 16'(a); #1; v[15:8] = pl_rdata;
    pl_addr = 16'(a + 1); #1; v[7:0] = pl_rdata;
  endtask

  initial begin
    int h_sub, h_any, t_any, l_any, l_sub;
    logic [19:0] mask_bit4;
    int t_start;
    mask_bit4 = 20'hAAAAA;
    mask_bit4[9:8] = 2'b01;
    {mc_start, mc_run_bank, mcl_we, mcl_bank, pl_we, pl_all} = '0;
    mcl_part_addr = 0; mcl_part_m = 0; mcl_addr = 0; mcl_data = 0;
    pl_sel = 0; pl_addr = 0; pl_data = 0;
    mimd = '0; mimd[5] = 1'b1;
    for (int p = 0; p < N; p++) xfer_in[p] = 16'(p);
    repeat (2) @(posedge clk); rst_n = 1;

    // program P (memory A of every controller)
    npos = 0;
    for (int i = 0; i < 512; i++) prog[i] = 8'hFF;
    op8(OP_CLDC); nib(0); w16(16'h0400);                     // controller SLS pointer
    op8(OP_CST); nib(0); w16(16'h03F0); nib(4'hF);           // store, null nibble waits
    op8(OP_LDRC); nib(0); w16(16'h0300);                     // processors' SLS pointer
    op8(OP_PSHA); w16(16'h0100);
    op8(OP_CMPSC); w16(THRESH);
    op8(OP_SCGE);
    op8(OP_WEPSH);                                           // WHERE pixel >= T
    op8(OP_PSHC); w16(16'h00FF); op8(OP_POPA); w16(16'h0102);
    op8(OP_CMPOP);                                           // ELSEWHERE
    op8(OP_PSHC); w16(16'h0000); op8(OP_POPA); w16(16'h0102);
    op8(OP_CMPOP);
    op8(OP_DEL); nib(1);
    op8(OP_MOVRIC); nib(0); w16(16'h0001);                   // a parameter on each SLS
    op8(OP_JSR); h_sub = npos; w16(0); align();
    op8(OP_PSHA); w16(16'h0100); op8(OP_CMPSC); w16(THRESH); op8(OP_SCGE);
    op8(OP_IFANY); h_any = npos; npos += 2; align(); t_any = here();
    op8(OP_HLT);
    align(); l_any = here(); patch8(h_any, 8'(l_any - t_any));
    op8(OP_DEL); nib(1);
    op8(OP_PMSK); nib(mask_bit4[19:16]); w16(mask_bit4[15:0]); // address bit 4 = 1, rest X
    op8(OP_PSHC); w16(16'h0011); op8(OP_PSHC); w16(16'h0007); op8(OP_MUL); // 0x77
    op8(OP_POPA); w16(16'h0106);
    op8(OP_PMSK); nib(4'hA); w16(16'hAAAA);                  // all processors
    op8(OP_STRA); nib(0); w16(16'h0108);
    op8(OP_HLT);
    align(); l_sub = here(); patch16(h_sub, 16'(l_sub));
    op8(OP_PSHA); w16(16'h0100); op8(OP_ROLN); nib(1); op8(OP_POPA); w16(16'h0104);
    op8(OP_RET);
    load_prog('0, (QB+1)'(QB), 1'b0);                        // all controllers

    // program P2 (memory B of controllers 3, 7, 11, 15)
    npos = 0;
    op8(OP_PSHC); w16(16'hAAAA); op8(OP_POPA); w16(16'h0102); op8(OP_HLT);
    load_prog(QB'(3), (QB+1)'(QB - 2), 1'b1);

    // processor data: pixel at 0x100, result bytes cleared
    for (int p = 0; p < N; p++) begin
      @(negedge clk); pl_we = 1; pl_all = 0; pl_sel = NB'(p); pl_addr = 16'h0100; pl_data = pixel(p)[15:8];
      @(negedge clk); pl_addr = 16'h0101; pl_data = pixel(p)[7:0];
    end
    for (int a = 'h102; a < 'h10A; a++) begin
      @(negedge clk); pl_we = 1; pl_all = 1; pl_addr = 16'(a); pl_data = 0;
    end
    @(negedge clk); pl_we = 0; pl_all = 0;

    // run
    for (int c = 0; c < Q; c++) mc_run_bank[c] = (c % 4) == 3;
    @(negedge clk); mc_start = '1; t_start = cycles; @(negedge clk); mc_start = '0;
    // overlap: reload memory B of controller 0 while everything runs
    npos = 0; op8(OP_HLT); load_prog('0, '0, 1'b1);
    while (mc_halted != '1 && cycles < 20000) @(negedge clk);
    $display("program run: %0d cycles from start to the last halt", cycles - t_start);
    check("all controllers halted", mc_halted == '1);

    for (int p = 0; p < N; p++) begin
      logic [15:0] r102, r104, r106, r108;
      logic p2;
      p2 = (p % 4) == 3;
      rd16(p, 'h102, r102); rd16(p, 'h104, r104); rd16(p, 'h106, r106); rd16(p, 'h108, r108);
      if (p == 5) begin
        check("MIMD processor untouched", r102 == 0 && r104 == 0 && r106 == 0 && r108 == 0);
      end else if (p2) begin
        check("partition B program", r102 == 16'hAAAA && r104 == 0 && r106 == 0);
      end else begin
        check("threshold WHERE/ELSEWHERE", r102 == ((pixel(p) >= THRESH) ? 16'h00FF : 16'h0000));
        check("subroutine result", r104 == 16'(pixel(p) << 1));
        check("PE address mask", r106 == ((p & 16) != 0 ? 16'h0077 : 16'h0000));
        check("processor SLS pointer", r108 == 16'h0302);
      end
      check("no faults", !pcu_fault[p]);
    end
    check("mechanism: broadcast", n_bcast > 10);
    check("mechanism: null nibble", n_null > 0);
    check("mechanism: shift under load inhibit", n_overlap > 0);
    check("mechanism: overlapped load", n_auto > 0);
    check("mechanism: masking (inactive processors)", n_masked > 0);
    check("mechanism: loading during computation", n_loadrun > 0);
    check("mechanism: IFANY taken (P reached its end)", g_sz.dut.g_mc[0].u_mc.R[0] == 16'h0400);
    $display("top: %0d cycles, %0d broadcasts, %0d null skips, %0d inhibited shifts, %0d overlapped loads, %0d masked cycles, %0d load-while-run cycles",
             cycles, n_bcast, n_null, n_overlap, n_auto, n_masked, n_loadrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
