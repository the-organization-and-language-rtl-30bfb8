// tb_reg_stack: self-checking test of the register stack.
// Random pushes, pops, replace, binary-replace, LDSP and direct writes against a reference
// array; checks top/next/direct reads, the stack pointer, and that overflow (push at sp 15)
// and underflow (pop of an empty stack, binary op on one element) raise the interrupt and
// change nothing.
module tb_reg_stack;
  import pasm_pkg::*;
  logic clk = 0, rst_n = 0;
  stk_op_e op;
  logic [15:0] wdata, dwdata, tos, nos, rda, rdb;
  logic [3:0] sp_din, ra, rb, dwaddr, sp;
  logic dwe, irq, ovf, unf;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;

  reg_stack #(.W(16)) dut (.clk, .rst_n, .stk_op(op), .wdata, .sp_din, .ra, .rb, .dwe, .dwaddr,
                           .dwdata, .tos, .nos, .rda, .rdb, .sp, .stk_irq(irq), .overflow(ovf),
                           .underflow(unf));
  always #5 clk = ~clk;

  logic [15:0] m [16];
  logic [3:0] rsp, rbase;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sp=%0d/%0d", what, sp, rsp); end
  endtask

  initial begin
    op = SK_NONE; dwe = 0; wdata = 0; dwdata = 0; sp_din = 0; ra = 0; rb = 0; dwaddr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise the file through the direct port
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); dwe = 1; dwaddr = 4'(i); dwdata = 16'($urandom); m[i] = dwdata;
    end
    @(negedge clk); dwe = 0;
    rsp = 0; rbase = 0;
    for (int it = 0; it < 5000; it++) begin
      int r;
      logic [3:0] depth;
      logic exp_ovf, exp_unf;
      @(negedge clk);
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      check("sp", sp == rsp);
      check("tos", tos == m[rsp]);
      check("nos", nos == m[rsp - 4'd1]);
      check("rda", rda == m[ra]);
      check("rdb", rdb == m[rb]);
      r = $urandom_range(0, 99);
      op = r < 35 ? SK_PUSH : r < 60 ? SK_POP : r < 70 ? SK_REPL : r < 85 ? SK_BIN :
           r < 88 ? SK_LDSP : SK_NONE;
      wdata = 16'($urandom); sp_din = 4'($urandom_range(0, 6));
      dwe = ($urandom_range(0, 3) == 0); dwaddr = 4'($urandom); dwdata = 16'($urandom);
      #1;
      depth   = rsp - rbase;
      exp_ovf = (op == SK_PUSH) && rsp == 4'hF;
      exp_unf = ((op == SK_POP || op == SK_REPL) && depth == 0) || (op == SK_BIN && depth < 2);
      check("overflow", ovf == exp_ovf);
      check("underflow", unf == exp_unf);
      check("irq", irq == (exp_ovf || exp_unf));
      if (exp_ovf) n_ovf++;
      if (exp_unf) n_unf++;
      if (dwe) m[dwaddr] = dwdata;
      if (!(exp_ovf || exp_unf)) begin
        case (op)
          SK_PUSH: begin rsp = rsp + 1; m[rsp] = wdata; end
          SK_POP:  rsp = rsp - 1;
          SK_REPL: m[rsp] = wdata;
          SK_BIN:  begin rsp = rsp - 1; m[rsp] = wdata; end
          SK_LDSP: begin rsp = sp_din; rbase = sp_din; end
          default: ;
        endcase
      end
    end
    @(negedge clk); op = SK_NONE; dwe = 0;
    check("overflows seen", n_ovf > 0);
    check("underflows seen", n_unf > 0);
    $display("reg_stack: %0d overflows, %0d underflows", n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
