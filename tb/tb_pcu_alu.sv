// tb_pcu_alu: self-checking test of the PCU ALU.
// Random operands through every operation; results and flags are recomputed here in 32-bit
// integer arithmetic, independently of the ALU's own expressions.
module tb_pcu_alu;
  import pasm_pkg::*;
  alu_op_e op;
  logic [15:0] a, b, y;
  logic cin;
  flags_t f;
  int checks = 0, failures = 0;

  pcu_alu #(.W(16)) dut (.op, .a, .b, .cin, .y, .f);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%s a=%h b=%h cin=%b y=%h f=%b", what, op.name(), a, b, cin, y, f); end
  endtask

  initial begin
    for (int it = 0; it < 20000; it++) begin
      int ia, ib, ic, full, sa, sb, sr;
      logic [15:0] ey;
      logic ec, ev, chk_c, chk_v;
      op  = alu_op_e'($urandom_range(0, 21));
      a   = (it % 7 == 0) ? 16'h8000 : (it % 11 == 0) ? 16'h7FFF : 16'($urandom);
      b   = (it % 5 == 0) ? 16'hFFFF : (it % 13 == 0) ? 16'h8000 : 16'($urandom);
      cin = 1'($urandom);
      #1;
      ia = int'(a); ib = int'(b); ic = int'(cin);
      sa = int'($signed(a)); sb = int'($signed(b));
      chk_c = 1; chk_v = 1; ec = cin; ev = 0; ey = 0;
      case (op)
        ALU_ADD: begin full = ia + ib; ey = 16'(full); ec = full > 65535; sr = sa + sb; ev = sr > 32767 || sr < -32768; end
        ALU_ADC: begin full = ia + ib + ic; ey = 16'(full); ec = full > 65535; sr = sa + sb + ic; ev = sr > 32767 || sr < -32768; end
        ALU_SUB: begin full = ia - ib; ey = 16'(full); ec = full < 0; sr = sa - sb; ev = sr > 32767 || sr < -32768; end
        ALU_SBC: begin full = ia - ib - ic; ey = 16'(full); ec = full < 0; sr = sa - sb - ic; ev = sr > 32767 || sr < -32768; end
        ALU_NEG: begin ey = 16'(-ib); ec = ib != 0; ev = (-sb) > 32767; end
        ALU_INC: begin ey = 16'(ib + 1); ec = ib == 65535; ev = sb == 32767; end
        ALU_DEC: begin ey = 16'(ib - 1); ec = ib == 0; ev = sb == -32768; end
        ALU_AND: ey = a & b;
        ALU_OR:  ey = a | b;
        ALU_XOR: ey = a ^ b;
        ALU_NOT: ey = ~b;
        ALU_ASL: begin ey = 16'(ib * 2); ec = b[15]; ev = (sb * 2 > 32767) || (sb * 2 < -32768); end
        ALU_ASR: begin ey = 16'(sb >>> 1); ec = b[0]; chk_v = 0; end
        ALU_ROL: begin ey = 16'((ib * 2) | (ib / 32768)); ec = b[15]; chk_v = 0; end
        ALU_ROR: begin ey = 16'((ib / 2) | ((ib % 2) * 32768)); ec = b[0]; chk_v = 0; end
        ALU_ROLC: begin ey = 16'((ib * 2) | ic); ec = b[15]; chk_v = 0; end
        ALU_RORC: begin ey = 16'((ib / 2) | (ic * 32768)); ec = b[0]; chk_v = 0; end
        ALU_PASSA: ey = a;
        ALU_PASSB: ey = b;
        ALU_SWB: ey = 16'((ib % 256) * 256 + ib / 256);
        ALU_MUL: begin sr = sa * sb; ey = 16'(sr); ec = sr > 32767 || sr < -32768; ev = ec; end
        ALU_SHN: begin
          int n;
          n = int'(a[3:0]);
          case (a[5:4])
            2'd0: begin ey = 16'(ib << n); ec = (n == 0) ? cin : b[16 - n]; end
            2'd1: begin ey = 16'(sb >>> n); ec = (n == 0) ? cin : b[n - 1]; end
            2'd2: begin ey = 16'((ib << n) | (ib >> (16 - n))); ec = (n == 0) ? cin : ey[0]; end
            default: begin ey = 16'((ib >> n) | (ib << (16 - n))); ec = (n == 0) ? cin : ey[15]; end
          endcase
        end
        default: ;
      endcase
      check("y", y == ey);
      check("z", f.z == (ey == 0));
      check("n", f.n == ey[15]);
      if (chk_c) check("c", f.c == ec);
      if (chk_v) check("v", f.v == ev);
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
