// ish: Instruction Stream Handler of a Micro Controller.
//
// Shapes the byte stream of an 8-bit memory into a queue of 4-bit nibbles. Each LOAD appends
// the two nibbles of the byte at fetch_addr (high nibble first) and advances fetch_addr; SHFT1
// removes one nibble, SHFT2 two; RESET empties the queue (and, with the jump address, restarts
// the stream). dout shows the first queued nibble in bits 7:4 and the second in bits 3:0.
// A counter tracks the occupancy. To overlap instruction fetch with execution, a shift that
// would leave fewer than three nibbles performs a load in the same clock, unless load_inhibit
// is high (the memory address lines then carry an operand address, not the stream address).
// All of this is as the paper describes it. This design's own choices: the queue holds
// CAP=6 nibbles, the byte address counter lives here, memory is read combinationally, and an
// explicit LOAD is not subject to load_inhibit. Shifts and loads take effect on the clock edge.
module ish #(
  parameter int CAP    = 6,     // nibble capacity
  parameter int ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        din,          // memory data at fetch_addr
  input  logic              shft1,
  input  logic              shft2,
  input  logic              load,
  input  logic              reset,        // empty the queue
  input  logic [ADDR_W-1:0] reset_addr,   // next stream byte after a reset
  input  logic              load_inhibit,
  output logic [7:0]        dout,
  output logic [2:0]        count,
  output logic [ADDR_W-1:0] fetch_addr,   // address of the next stream byte
  output logic              loading       // a byte is taken this cycle
);
  logic [3:0] q [CAP];
  logic [2:0] shamt;
  logic       auto_load;
  logic [2:0] after_shift;

  always_comb begin
    shamt       = shft2 ? 3'd2 : (shft1 ? 3'd1 : 3'd0);
    after_shift = count - shamt;
    auto_load   = (shamt != 0) && (after_shift < 3'd3) && !load_inhibit;
    loading     = !reset && (load || auto_load);
  end

  assign dout = {q[0], q[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      fetch_addr <= '0;
      for (int i = 0; i < CAP; i++) q[i] <= '0;
    end else if (reset) begin
      count      <= '0;
      fetch_addr <= reset_addr;
      for (int i = 0; i < CAP; i++) q[i] <= '0;
    end else begin
      for (int i = 0; i < CAP; i++) begin
        int src;
        src = i + int'(shamt);
        q[i] <= (src < CAP) ? q[src] : 4'h0;
        if (loading && (i == int'(after_shift)))     q[i] <= din[7:4];
        if (loading && (i == int'(after_shift) + 1)) q[i] <= din[3:0];
      end
      count <= after_shift + (loading ? 3'd2 : 3'd0);
      if (loading) fetch_addr <= fetch_addr + 1'b1;
    end
  end

  // Handshake rules of the queue
  assert property (@(posedge clk) disable iff (!rst_n) !(shft1 && shft2));
  assert property (@(posedge clk) disable iff (!rst_n || reset) int'(shamt) <= int'(count));
  assert property (@(posedge clk) disable iff (!rst_n || reset)
                   !loading || (int'(after_shift) + 2 <= CAP));
endmodule
