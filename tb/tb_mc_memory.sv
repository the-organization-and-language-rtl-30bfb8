// tb_mc_memory: self-checking test of a Micro Controller memory pair.
// Loads memory A while the controller side runs from B (and the reverse), checks that each
// side sees only its own memory, that a controller write goes to the running memory, and
// that loading overlaps controller writes in the same clocks.
module tb_mc_memory;
  logic clk = 0;
  logic run_bank, we, ld_bank, ld_we;
  logic [15:0] addr, ld_addr;
  logic [7:0] wdata, rdata, ld_wdata;
  int checks = 0, failures = 0;
  logic [7:0] ra [256], rb [256];

  mc_memory #(.DEPTH(65536)) dut (.clk, .run_bank, .addr, .we, .wdata, .rdata, .ld_bank, .ld_we,
                                  .ld_addr, .ld_wdata);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h rdata=%h", what, addr, rdata); end
  endtask

  initial begin
    we = 0; ld_we = 0; run_bank = 1; ld_bank = 0; addr = 0; ld_addr = 0; wdata = 0; ld_wdata = 0;
    // load A and write B at the same time
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ld_we = 1; ld_bank = 0; ld_addr = 16'(i); ld_wdata = 8'($urandom); ra[i] = ld_wdata;
      we = 1; addr = 16'(i); wdata = 8'($urandom); rb[i] = wdata;
    end
    @(negedge clk); ld_we = 0; we = 0;
    for (int i = 0; i < 256; i++) begin addr = 16'(i); #1; check("B seen when running B", rdata == rb[i]); end
    run_bank = 0;
    for (int i = 0; i < 256; i++) begin addr = 16'(i); #1; check("A seen when running A", rdata == ra[i]); end
    // load B while running A
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); ld_we = 1; ld_bank = 1; ld_addr = 16'(i); ld_wdata = 8'(i * 3); rb[i] = ld_wdata;
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 16; i++) begin addr = 16'(i); #1; check("A untouched", rdata == ra[i]); end
    run_bank = 1;
    for (int i = 0; i < 16; i++) begin addr = 16'(i); #1; check("B loaded", rdata == rb[i]); end
    addr = 16'hFFFF; @(negedge clk); we = 1; wdata = 8'h5A; @(negedge clk); we = 0; #1;
    check("top address", rdata == 8'h5A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
