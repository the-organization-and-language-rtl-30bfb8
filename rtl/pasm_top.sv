// pasm_top: PASM, a partitionable SIMD/MIMD machine: Q Micro Controllers driving N PCU
// processors.
//
// Each Micro Controller (micro_controller) runs from one memory of its A/B memory pair
// (mc_memory) while the System Control Unit may load the other through the Micro Controller
// Memory System Switch (mc_mem_switch), which writes all controllers of a partition at once.
// Processor i is wired to controller i mod Q (the processors of a controller share their
// low-order q address bits with it) and receives that controller's SEC-DED protected control
// word and bit i/Q of its Mask Vector Register; the controller sees every processor's
// Condition flip-flop for IFANY/IFALL. Each processor has its own memory module
// (pcu_memory), which the Memory Management System can load through the pl_* port. Running
// the same program on M controllers whose numbers agree in their low q-m bits forms an SIMD
// machine of M*N/Q processors. From the paper: the component set, N = 1024, Q = 16, the
// processor-to-controller wiring and the partition rule. Not built here and brought out as
// ports instead: the System Control Unit (mc_*, mcl_* inputs), the Memory Management System
// (pl_*), and the interconnection network (xfer_in/xfer_out/tcr of every processor). The
// mimd inputs only block the controllers' signals: MIMD instruction fetch is not built.
module pasm_top
  import pasm_pkg::*;
#(
  parameter int N            = 1024,
  parameter int Q            = 16,
  parameter int PCU_MEM_DEPTH = 65536,
  parameter int MC_MEM_DEPTH  = 65536
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // System Control Unit: controller control
  input  logic [Q-1:0]           mc_start,
  input  logic [15:0]            mc_start_addr,
  input  logic [Q-1:0]           mc_run_bank,
  output logic [Q-1:0]           mc_halted,
  // System Control Unit: controller memory loading through the switch
  input  logic                   mcl_we,
  input  logic [$clog2(Q)-1:0]   mcl_part_addr,
  input  logic [$clog2(Q):0]     mcl_part_m,
  input  logic                   mcl_bank,
  input  logic [15:0]            mcl_addr,
  input  logic [7:0]             mcl_data,
  // Memory Management System: PCU memory loading
  input  logic                   pl_we,
  input  logic                   pl_all,         // write every processor's memory
  input  logic [$clog2(N)-1:0]   pl_sel,
  input  logic [15:0]            pl_addr,
  input  logic [7:0]             pl_data,
  output logic [7:0]             pl_rdata,       // byte of processor pl_sel
  // PCU processors
  input  logic [N-1:0]           mimd,
  input  logic [N-1:0][15:0]     xfer_in,
  output logic [N-1:0][15:0]     xfer_out,
  output logic [N-1:0][15:0]     tcr,
  output logic [N-1:0]           pcu_active,
  output logic [N-1:0]           pcu_cff,
  output logic [N-1:0]           pcu_fault
);
  localparam int PES = N / Q;
  localparam int CODE_W = CW_W + 7;

  logic [Q-1:0][CODE_W-1:0] bc_code;
  logic [Q-1:0][PES-1:0]    mvr;
  logic [Q-1:0][PES-1:0]    cff_by_mc;
  logic [Q-1:0]             mcl_mem_we, mcl_selected;
  logic [N-1:0][7:0]        pl_rd;

  mc_mem_switch #(.Q(Q)) u_switch (
    .ld_we(mcl_we), .part_addr(mcl_part_addr), .part_m(mcl_part_m),
    .mem_we(mcl_mem_we), .selected(mcl_selected)
  );

  for (genvar c = 0; c < Q; c++) begin : g_mc
    logic [15:0] m_addr;
    logic        m_we;
    logic [7:0]  m_wdata, m_rdata;
    logic        ev_null, ev_overlap, ev_autoload;

    mc_memory #(.DEPTH(MC_MEM_DEPTH)) u_mem (
      .clk(clk), .run_bank(mc_run_bank[c]), .addr(m_addr), .we(m_we), .wdata(m_wdata),
      .rdata(m_rdata), .ld_bank(mcl_bank), .ld_we(mcl_mem_we[c]), .ld_addr(mcl_addr),
      .ld_wdata(mcl_data)
    );

    micro_controller #(.N(N), .Q(Q)) u_mc (
      .clk(clk), .rst_n(rst_n), .start(mc_start[c]), .start_addr(mc_start_addr),
      .mc_id($clog2(Q)'(c)), .mem_addr(m_addr), .mem_we(m_we), .mem_wdata(m_wdata),
      .mem_rdata(m_rdata), .bc_code(bc_code[c]), .mvr(mvr[c]), .pcu_cff(cff_by_mc[c]),
      .halted(mc_halted[c]), .ev_null(ev_null), .ev_overlap(ev_overlap),
      .ev_autoload(ev_autoload)
    );
  end

  for (genvar p = 0; p < N; p++) begin : g_pcu
    localparam int C = p % Q;       // controller
    localparam int K = p / Q;       // position in that controller's MVR
    logic [15:0] m_addr, m_wdata, m_rdata;
    logic        m_we;
    logic        stk_fault, cms_fault, link_fault, link_corrected;
    flags_t      flags;
    logic [3:0]  sp;

    pcu_memory #(.DEPTH(PCU_MEM_DEPTH)) u_mem (
      .clk(clk), .addr(m_addr), .we(m_we), .wdata(m_wdata), .rdata(m_rdata),
      .ld_we(pl_we && (pl_all || (pl_sel == $clog2(N)'(p)))), .ld_addr(pl_addr),
      .ld_wdata(pl_data), .ld_rdata(pl_rd[p])
    );

    pcu_processor u_pcu (
      .clk(clk), .rst_n(rst_n), .mimd(mimd[p]), .pe_enable(mvr[C][K]), .cw_code(bc_code[C]),
      .mem_addr(m_addr), .mem_we(m_we), .mem_wdata(m_wdata), .mem_rdata(m_rdata),
      .xfer_in(xfer_in[p]), .xfer_out(xfer_out[p]), .tcr(tcr[p]),
      .active(pcu_active[p]), .cff(pcu_cff[p]), .flags(flags), .sp(sp),
      .stk_fault(stk_fault), .cms_fault(cms_fault), .link_fault(link_fault),
      .link_corrected(link_corrected)
    );

    assign cff_by_mc[C][K] = pcu_cff[p];
    assign pcu_fault[p]    = stk_fault || cms_fault || link_fault;
  end

  assign pl_rdata = pl_rd[pl_sel];
endmodule
