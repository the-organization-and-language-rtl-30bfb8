// secded_dec: decoder of the extended Hamming code of secded_enc, at each PCU processor.
//
// Recomputes the Hamming syndrome and the overall parity of the received codeword. A non-zero
// syndrome with odd overall parity is a single error at the position the syndrome names: it
// is corrected (an error in bit 0 shows as zero syndrome and odd parity). A non-zero syndrome
// with even parity is a double error: uncorrectable is raised and the data should be ignored.
// The code layout is described in secded_enc; the code choice is this design's. Combinational.
module secded_dec #(
  parameter int K = 30
) (
  input  logic [K+secded_r(K):0]  code,
  output logic [K-1:0]            data,
  output logic                    corrected,
  output logic                    uncorrectable
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
    logic         par;
    logic [N-1:0] fixed;
    syn = '0;
    for (int p = 1; p < N; p++)
      if (code[p]) syn ^= R'(p);
    par   = ^code;
    fixed = code;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (par) begin
      corrected = 1'b1;
      if (int'(syn) < N) fixed[syn] = ~fixed[syn];
      else uncorrectable = 1'b1;        // syndrome outside the codeword: multiple error
    end else if (syn != '0) begin
      uncorrectable = 1'b1;
    end
    data = '0;
    d = 0;
    for (int p = 1; p < N; p++) begin
      if ((p & (p - 1)) != 0) begin
        data[d] = fixed[p];
        d++;
      end
    end
  end
endmodule
