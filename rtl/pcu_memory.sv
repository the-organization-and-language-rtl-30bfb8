// pcu_memory: one PCU memory module, the private data store of one PCU processor.
//
// Byte addressed with 16-bit addresses as in the paper; the processor reads and writes
// 2-byte words (high byte at the lower address, this design's choice), reading
// combinationally and writing on the clock edge. A second port lets the Memory Management
// System load and read back bytes (in the paper it loads the modules from the memory disk);
// a processor write wins if both write the same byte in one clock. DEPTH defaults to the full
// 64 KiB the 16-bit address reaches.
module pcu_memory #(
  parameter int DEPTH = 65536
) (
  input  logic        clk,
  // processor port
  input  logic [15:0] addr,
  input  logic        we,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  // memory management system port
  input  logic        ld_we,
  input  logic [15:0] ld_addr,
  input  logic [7:0]  ld_wdata,
  output logic [7:0]  ld_rdata
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0] mem [DEPTH];
  logic [AW-1:0] a0, a1, al;

  assign a0 = AW'(addr);
  assign a1 = AW'(addr + 16'd1);
  assign al = AW'(ld_addr);
  assign rdata    = {mem[a0], mem[a1]};
  assign ld_rdata = mem[al];

  always_ff @(posedge clk) begin
    if (ld_we) mem[al] <= ld_wdata;
    if (we) begin
      mem[a0] <= wdata[15:8];
      mem[a1] <= wdata[7:0];
    end
  end
endmodule
