// pe_mask_decoder: turns a PE address mask into the Mask Vector Register (MVR) contents of
// one Micro Controller.
//
// A PE address mask has one position per bit of the n-bit physical processor address; each
// position is 0, 1 or X (don't care), and selects every processor whose address matches. The
// PMSK/NMSK instructions carry it as five nibbles (20 bits: two bits per address bit for
// N = 1024) and decode it into the MVR; NMSK selects the complement ("negative" mask). The MVR
// has one bit per processor of this controller: bit i belongs to physical processor
// i*Q + mc_id, since the N/Q processors of a controller share their low-order q address bits
// with the controller's number. From the paper: the instructions, the five-nibble size and
// the processor numbering. This design's own: the 2-bit code of a position (00 = 0, 01 = 1,
// 1x = X), address bit j in mask bits 2j+1:2j (first nibble = most significant).
// Combinational.
module pe_mask_decoder #(
  parameter int N = 1024,                 // PCU processors
  parameter int Q = 16                    // Micro Controllers
) (
  input  logic [2*$clog2(N)-1:0] mask,
  input  logic                   negative,
  input  logic [$clog2(Q)-1:0]   mc_id,
  output logic [N/Q-1:0]         mvr
);
  localparam int NB = $clog2(N);

  always_comb begin
    for (int i = 0; i < N/Q; i++) begin
      logic [NB-1:0] pa;
      logic          hit;
      pa  = NB'(i * Q) | NB'(mc_id);
      hit = 1'b1;
      for (int j = 0; j < NB; j++) begin
        if (!mask[2*j+1] && (mask[2*j] != pa[j])) hit = 1'b0;
      end
      mvr[i] = hit ^ negative;
    end
  end
endmodule
