// tb_mc_mem_switch: self-checking test of the Micro Controller Memory System Switch (Q=16).
// For every partition size m = 0..4 and every member address, checks that exactly the 2^m
// controllers agreeing with it in the low q-m bits are written, and none when ld_we is low.
module tb_mc_mem_switch;
  logic we;
  logic [3:0] pa;
  logic [4:0] pm;
  logic [15:0] mwe, sel;
  int checks = 0, failures = 0;

  mc_mem_switch #(.Q(16)) dut (.ld_we(we), .part_addr(pa), .part_m(pm), .mem_we(mwe), .selected(sel));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pa=%0d m=%0d we=%b sel=%b", what, pa, pm, we, mwe); end
  endtask

  initial begin
    for (int m = 0; m <= 4; m++)
      for (int a = 0; a < 16; a++)
        for (int w = 0; w < 2; w++) begin
          pm = 5'(m); pa = 4'(a); we = 1'(w);
          #1;
          check("count", $countones(sel) == (1 << m));
          for (int i = 0; i < 16; i++) begin
            int lowmask;
            lowmask = (1 << (4 - m)) - 1;
            check("member", mwe[i] == (w == 1 && ((i & lowmask) == (a & lowmask))));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
