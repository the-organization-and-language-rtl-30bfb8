// tb_pe_mask_decoder: self-checking test of the PE address mask decoder (N=1024, Q=16).
// Random 0/1/X masks, positive and negative, for random controllers: every MVR bit is
// compared with a match computed from the processor's physical address i*Q + mc_id. Also
// checks the all-X mask (every processor) and a fully specified mask (exactly one processor).
module tb_pe_mask_decoder;
  logic [19:0] mask;
  logic neg;
  logic [3:0] mc_id;
  logic [63:0] mvr;
  int checks = 0, failures = 0;

  pe_mask_decoder #(.N(1024), .Q(16)) dut (.mask, .negative(neg), .mc_id, .mvr);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s mask=%h neg=%b mc=%0d mvr=%h", what, mask, neg, mc_id, mvr); end
  endtask

  // builds a mask from a 10-character pattern string, MSB first: '0', '1' or 'X'
  function automatic logic [19:0] pat(string s);
    logic [19:0] m;
    m = 0;
    for (int k = 0; k < 10; k++) begin
      int j;
      j = 9 - k;
      case (s[k])
        "0": m[2*j +: 2] = 2'b00;
        "1": m[2*j +: 2] = 2'b01;
        default: m[2*j +: 2] = 2'b10;
      endcase
    end
    return m;
  endfunction

  initial begin
    neg = 0; mc_id = 3; mask = pat("XXXXXXXXXX"); #1;
    check("all X", mvr == '1);
    neg = 1; #1; check("negative all X", mvr == '0);
    // processor 5*16+3 = 83 = 00010 10011
    neg = 0; mask = pat("0001010011"); #1;
    check("single processor", mvr == (64'd1 << 5));
    mc_id = 4; #1; check("other controller: none", mvr == '0);
    mc_id = 3; mask = pat("XXXXX10011"); #1; check("address bit 4 set: odd MVR bits", mvr == {32{2'b10}});
    for (int it = 0; it < 3000; it++) begin
      logic [9:0] care, val;
      mc_id = 4'($urandom); neg = 1'($urandom);
      care = 10'($urandom) & 10'($urandom); val = 10'($urandom);
      for (int j = 0; j < 10; j++) mask[2*j +: 2] = care[j] ? {1'b0, val[j]} : {1'b1, 1'($urandom)};
      #1;
      for (int i = 0; i < 64; i++) begin
        int pa;
        logic hit;
        pa = i * 16 + int'(mc_id);
        hit = ((10'(pa) ^ val) & care) == 0;
        check("bit", mvr[i] == (hit ^ neg));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
