// mc_memory: the memory module of one Micro Controller, a pair of memories A and B.
//
// As in the paper, the pair lets the system load one memory while the controller runs from
// the other. run_bank selects the memory the controller reads and writes (instruction
// stream, subroutine linkage stack, CLD/CST operands); the loader writes the memory ld_bank
// selects. Both 2^16 bytes, 8 bits wide (the paper's byte-wide memory and 16-bit addresses).
// Reads are combinational, writes on the clock edge; a controller write wins a clash.
module mc_memory #(
  parameter int DEPTH = 65536
) (
  input  logic        clk,
  input  logic        run_bank,
  input  logic [15:0] addr,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  input  logic        ld_bank,
  input  logic        ld_we,
  input  logic [15:0] ld_addr,
  input  logic [7:0]  ld_wdata
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0] mem_a [DEPTH];
  logic [7:0] mem_b [DEPTH];

  assign rdata = run_bank ? mem_b[AW'(addr)] : mem_a[AW'(addr)];

  always_ff @(posedge clk) begin
    if (ld_we && !ld_bank) mem_a[AW'(ld_addr)] <= ld_wdata;
    if (ld_we &&  ld_bank) mem_b[AW'(ld_addr)] <= ld_wdata;
    if (we && !run_bank)   mem_a[AW'(addr)] <= wdata;
    if (we &&  run_bank)   mem_b[AW'(addr)] <= wdata;
  end
endmodule
