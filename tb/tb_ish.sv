// tb_ish: self-checking test of the Instruction Stream Handler.
// Drives random SHFT1/SHFT2/LOAD/RESET/load-inhibit sequences against a byte memory and
// compares dout, count and the stream address with a nibble-queue reference model. Also checks
// the overlap rule directly: a shift leaving fewer than three nibbles loads in the same clock
// (counted), and a shift with load inhibit does not (counted).
module tb_ish;
  logic clk = 0, rst_n = 0;
  logic [7:0] mem [256];
  logic shft1, shft2, load, reset, inh;
  logic [15:0] reset_addr;
  logic [7:0] dout;
  logic [2:0] count;
  logic [15:0] fetch_addr;
  logic loading;
  int checks = 0, failures = 0, cycles = 0;
  int n_auto = 0, n_inhibited = 0, n_reset = 0;

  ish #(.CAP(6), .ADDR_W(16)) dut (
    .clk, .rst_n, .din(mem[fetch_addr[7:0]]), .shft1, .shft2, .load, .reset, .reset_addr,
    .load_inhibit(inh), .dout, .count, .fetch_addr, .loading
  );

  always #5 clk = ~clk;

  // reference
  logic [3:0] rq [$];
  int unsigned raddr;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d/%0d dout=%h addr=%h/%h", what, count, rq.size(), dout,
               fetch_addr, raddr);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 8'($urandom);
    {shft1, shft2, load, reset, inh} = '0;
    reset_addr = 0;
    raddr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int r, sh;
      @(negedge clk);
      check("count", int'(count) == rq.size());
      check("addr", fetch_addr == 16'(raddr));
      if (rq.size() >= 1) check("dout hi", dout[7:4] == rq[0]);
      if (rq.size() >= 2) check("dout lo", dout[3:0] == rq[1]);
      {shft1, shft2, load, reset, inh} = '0;
      r = $urandom_range(0, 99);
      if (r < 3) begin
        reset = 1; reset_addr = 16'($urandom_range(0, 255));
      end else if (rq.size() < 3 && r < 60) begin
        load = 1;
      end else begin
        sh = $urandom_range(1, 2);
        if (sh > rq.size()) sh = rq.size();
        shft1 = (sh == 1);
        shft2 = (sh == 2);
        inh = ($urandom_range(0, 9) == 0);
      end
      #1;
      // reference step
      if (reset) begin
        rq.delete(); raddr = reset_addr; n_reset++;
      end else begin
        int after;
        logic do_load;
        sh = shft2 ? 2 : (shft1 ? 1 : 0);
        for (int k = 0; k < sh; k++) void'(rq.pop_front());
        after = rq.size();
        do_load = load || (sh != 0 && after < 3 && !inh);
        if (sh != 0 && after < 3) begin
          if (inh) n_inhibited++; else n_auto++;
        end
        if (do_load) begin
          rq.push_back(mem[raddr[7:0]][7:4]);
          rq.push_back(mem[raddr[7:0]][3:0]);
          raddr++;
        end
        if (sh != 0) check("loading", loading == do_load);
      end
      cycles++;
    end
    // directed: three nibbles, SHFT1 -> four (paper's example)
    @(negedge clk); {shft1, shft2, load, reset, inh} = '0; reset = 1; reset_addr = 16'h10;
    @(negedge clk); reset = 0; load = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; shft1 = 1;                  // 4 -> 3, no load
    @(negedge clk); check("4-1=3", count == 3); shft1 = 1; // 3 -> 2, load -> 4
    @(negedge clk); check("3-1+2=4", count == 4); shft1 = 0; shft2 = 1; // 4 -> 2 -> 4
    @(negedge clk); check("4-2+2=4", count == 4);
    check("stream order", dout == mem[8'h12]);
    shft2 = 0;
    check("auto loads seen", n_auto > 10);
    check("inhibited shifts seen", n_inhibited > 0);
    $display("ish: %0d automatic loads, %0d inhibited, %0d resets", n_auto, n_inhibited, n_reset);
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
