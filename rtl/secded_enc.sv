// secded_enc: single-error-correcting, double-error-detecting encoder for the control word a
// Micro Controller broadcasts to its PCU processors.
//
// The paper asks for error correcting signals on the controller-to-processor link and
// suggests single error correction with double error detection; the code itself is this
// design's choice: an extended Hamming code. Codeword bit p (1 <= p < N) is a Hamming
// position: powers of two hold check bits, the other positions the data bits in ascending
// order; bit 0 is the overall parity of all other bits. K=30 data bits give R=6 check bits,
// N=37. The code is systematic: the 30 data positions are wired straight from the input and
// only the 7 check bits are computed. Purely combinational.
module secded_enc #(
  parameter int K = 30
) (
  input  logic [K-1:0]            data,
  output logic [K+secded_r(K):0]  code
);
  function automatic int secded_r(input int k);
    int r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  localparam int R = secded_r(K);
  localparam int N = K + R + 1;

  always_comb begin
    int d;
    logic [R-1:0] syn;
    code = '0;
    d = 0;
    for (int p = 1; p < N; p++) begin
      if ((p & (p - 1)) != 0) begin
        code[p] = data[d];
        d++;
      end
    end
    syn = '0;
    for (int p = 1; p < N; p++)
      if (code[p]) syn ^= R'(p);
    for (int j = 0; j < R; j++) code[1 << j] = syn[j];
    code[0] = ^code[N-1:1];
  end
endmodule
