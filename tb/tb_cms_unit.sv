// tb_cms_unit: self-checking test of the Conditional Mask Stack with CFF and AFF.
// Directed WHERE / WHERE-ELSEWHERE sequences, nested, on two processors (A true on one, false
// on the other), then random operation streams against a reference model that keeps the mask
// stack as a queue. Checks the active state, CFF, AFF, the ten SCxx conditions, that inactive
// processors ignore non-privileged operations but execute privileged ones, and that an inner
// WHERE cannot re-activate a disabled processor.
module tb_cms_unit;
  import pasm_pkg::*;
  logic clk = 0, rst_n = 0;
  cms_op_e op;
  cond_e cond;
  flags_t flags;
  logic pe_enable, active, top, cff, aff, err;
  logic [4:0] level;
  int checks = 0, failures = 0;

  cms_unit #(.DEPTH(16)) dut (.clk, .rst_n, .op, .cond, .flags, .pe_enable, .active, .top, .cff,
                              .aff, .level, .cms_err(err));
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: top=%b cff=%b aff=%b level=%0d", what, top, cff, aff, level); end
  endtask

  task automatic do_op(cms_op_e o, cond_e c = CC_EQ);
    @(negedge clk); op = o; cond = c;
    @(negedge clk); op = CMS_NONE;
  endtask

  // reference
  logic rtop, rcff, raff;
  logic rq [$];

  function automatic logic cond_ref(cond_e c, flags_t fl);
    int s;
    s = fl.n ^ fl.v;
    case (c)
      CC_CC: return !fl.c;  CC_CS: return fl.c;  CC_VC: return !fl.v;  CC_VS: return fl.v;
      CC_GT: return !s && !fl.z;  CC_GE: return !s;  CC_EQ: return fl.z;  CC_NE: return !fl.z;
      CC_LT: return s;  CC_LE: return s || fl.z;
      default: return 0;
    endcase
  endfunction

  initial begin
    op = CMS_NONE; cond = CC_EQ; flags = '0; pe_enable = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check("reset active", active && !cff && !aff && level == 0);
    // WHERE A DO B ELSEWHERE C with A true
    flags = '{c:0, v:0, n:0, z:1};
    do_op(CMS_SETC, CC_EQ);   check("SCEQ true", cff);
    do_op(CMS_WEPSH);         check("A true: active in B", active && level == 2);
    do_op(CMS_POP);           check("A true: inactive in C", !active && !cff);
    // nested WHERE inside C (processor inactive): SCxx ignored, inner pushes keep it off
    do_op(CMS_SETC, CC_NE); check("inactive ignores SCNE", !cff);
    do_op(CMS_NOTC);        check("inactive ignores NOTC", !cff);
    do_op(CMS_WEPSH);       check("inner WEPSH keeps off", !active);
    do_op(CMS_POP);         check("inner elsewhere keeps off", !active);
    do_op(CMS_POP);         check("inner end", !active && level == 1);
    do_op(CMS_POP);         check("outer end", active && level == 0);
    // WHERE A with A false
    do_op(CMS_SETC, CC_NE); check("SCNE false", !cff);
    do_op(CMS_WPSH);        check("A false: inactive", !active);
    do_op(CMS_POP);         check("restored", active);
    // AFF logic
    do_op(CMS_SETC, CC_EQ); do_op(CMS_LDA);  check("LDA", aff);
    do_op(CMS_NOTC);        check("NOTC", !cff);
    do_op(CMS_ORA);         check("ORA", aff);
    do_op(CMS_ANDA);        check("ANDA", !aff);
    do_op(CMS_NOTC); do_op(CMS_LDA); do_op(CMS_NOTC); do_op(CMS_LDC); check("LDC", cff);
    // MVR bit off: inactive
    pe_enable = 0; #1; check("pe_enable gates", !active);
    do_op(CMS_NOTC); check("disabled ignores NOTC", cff);
    pe_enable = 1;
    // underflow
    do_op(CMS_INIT);
    @(negedge clk); op = CMS_POP; #1; check("pop empty is error", err);
    @(negedge clk); op = CMS_NONE; check("pop empty no change", active && level == 0);

    // random streams against the reference
    rtop = 1; rcff = 0; raff = 0; rq.delete();
    do_op(CMS_INIT);
    for (int it = 0; it < 4000; it++) begin
      cms_op_e o;
      logic ract;
      int r;
      @(negedge clk);
      r = $urandom_range(0, 99);
      o = r < 35 ? CMS_SETC : r < 40 ? CMS_LDA : r < 45 ? CMS_LDC : r < 50 ? CMS_NOTC :
          r < 55 ? CMS_ANDA : r < 60 ? CMS_ORA : r < 72 ? CMS_WPSH : r < 80 ? CMS_WEPSH :
          r < 99 ? CMS_POP : CMS_INIT;
      if (o == CMS_WEPSH && rq.size() > 14) o = CMS_POP;
      if (o == CMS_WPSH && rq.size() > 15) o = CMS_POP;
      if (o == CMS_POP && rq.size() == 0) o = CMS_WPSH;
      op = o; cond = cond_e'($urandom_range(0, 9)); flags = 4'($urandom);
      pe_enable = ($urandom_range(0, 9) != 0);
      #1;
      ract = rtop && pe_enable;
      check("active", active == ract);
      check("level", int'(level) == rq.size());
      check("cff", cff == rcff);
      check("aff", aff == raff);
      case (o)
        CMS_SETC: if (ract) rcff = cond_ref(cond, flags);
        CMS_LDA:  if (ract) raff = rcff;
        CMS_LDC:  if (ract) rcff = raff;
        CMS_NOTC: if (ract) rcff = !rcff;
        CMS_ANDA: if (ract) raff = raff & rcff;
        CMS_ORA:  if (ract) raff = raff | rcff;
        CMS_WPSH: begin rq.push_back(rtop); rtop = rcff & rtop; end
        CMS_WEPSH: begin rq.push_back(rtop); rq.push_back(!rcff & rtop); rtop = rcff & rtop; end
        CMS_POP:  begin rtop = rq.pop_back(); rcff = 0; end
        CMS_INIT: begin rq.delete(); rtop = 1; rcff = 0; raff = 0; end
        default: ;
      endcase
    end
    @(negedge clk); op = CMS_NONE;
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
