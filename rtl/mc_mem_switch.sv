// mc_mem_switch: the Micro Controller Memory System Switch.
//
// Connects the System Control Unit's load bus to the Q controller memory modules. To make an
// SIMD machine of M = 2^m controllers, the same program is loaded into M controllers whose
// numbers agree in their low-order q-m bits; the switch writes all M memories in parallel.
// The load request names the partition by one member (part_addr) and its size (part_m, in
// log2 controllers): controller i is written when i and part_addr agree in bits q-m-1..0.
// That selection rule follows the paper; the bus format is this design's own. Combinational.
module mc_mem_switch #(
  parameter int Q = 16
) (
  input  logic                  ld_we,
  input  logic [$clog2(Q)-1:0]  part_addr,
  input  logic [$clog2(Q):0]    part_m,
  output logic [Q-1:0]          mem_we,
  output logic [Q-1:0]          selected
);
  localparam int QB = $clog2(Q);

  always_comb begin
    for (int i = 0; i < Q; i++) begin
      logic [QB-1:0] diff;
      logic          hit;
      diff = QB'(i) ^ part_addr;
      hit  = 1'b1;
      for (int j = 0; j < QB; j++)
        if ((j < QB - int'(part_m)) && diff[j]) hit = 1'b0;
      selected[i] = hit;
      mem_we[i]   = hit && ld_we;
    end
  end
endmodule
