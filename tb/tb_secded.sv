// tb_secded: self-checking test of the SEC-DED encoder and decoder pair.
// Random 30-bit words: clean codewords decode unchanged with no flags; every single-bit
// error (all 37 positions) is corrected; random double-bit errors are flagged uncorrectable.
// Also checks that each data bit lands in a non-power-of-two position of the codeword.
module tb_secded;
  logic [29:0] data, dout;
  logic [36:0] code, rx;
  logic corr, unc;
  int checks = 0, failures = 0;

  secded_enc #(.K(30)) enc (.data(data), .code(code));
  secded_dec #(.K(30)) dec (.code(rx), .data(dout), .corrected(corr), .uncorrectable(unc));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s data=%h code=%h rx=%h out=%h c=%b u=%b", what, data, code, rx, dout, corr, unc); end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      int d;
      data = 30'($urandom);
      rx = 0;
      #1;
      // independent check of the layout and of the parity equations
      d = 0;
      for (int p = 1; p < 37; p++)
        if ((p & (p - 1)) != 0) begin check("layout", code[p] == data[d]); d++; end
      for (int j = 0; j < 6; j++) begin
        logic par;
        par = 0;
        for (int p = 1; p < 37; p++) if ((p >> j) & 1) par ^= code[p];
        check("hamming parity", par == 0);
      end
      check("overall parity", ^code == 0);
      rx = code; #1;
      check("clean", dout == data && !corr && !unc);
      for (int b = 0; b < 37; b++) begin
        rx = code; rx[b] = ~rx[b]; #1;
        check("single corrected", dout == data && corr && !unc);
      end
      for (int k = 0; k < 10; k++) begin
        int b1, b2;
        b1 = $urandom_range(0, 36);
        b2 = (b1 + $urandom_range(1, 36)) % 37;
        rx = code; rx[b1] = ~rx[b1]; rx[b2] = ~rx[b2]; #1;
        check("double detected", unc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
