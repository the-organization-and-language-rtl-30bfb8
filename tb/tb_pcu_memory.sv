// tb_pcu_memory: self-checking test of a PCU memory module.
// Loads bytes through the management port, reads them back as high-byte-first 16-bit words on
// the processor port (including odd addresses), writes words from the processor side and
// reads their bytes through the management port.
module tb_pcu_memory;
  logic clk = 0;
  logic [15:0] addr, wdata, rdata, ld_addr;
  logic we, ld_we;
  logic [7:0] ld_wdata, ld_rdata;
  logic [7:0] ref_m [512];
  int checks = 0, failures = 0;

  pcu_memory #(.DEPTH(65536)) dut (.clk, .addr, .we, .wdata, .rdata, .ld_we, .ld_addr, .ld_wdata, .ld_rdata);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h rdata=%h", what, addr, rdata); end
  endtask

  initial begin
    we = 0; ld_we = 0; addr = 0; wdata = 0; ld_addr = 0; ld_wdata = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 16'(i); ld_wdata = 8'($urandom); ref_m[i] = ld_wdata;
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 511; i++) begin
      addr = 16'(i); #1; check("word read", rdata == {ref_m[i], ref_m[i+1]});
    end
    for (int i = 0; i < 100; i++) begin
      int a;
      a = $urandom_range(0, 509);
      @(negedge clk); we = 1; addr = 16'(a); wdata = 16'($urandom);
      ref_m[a] = wdata[15:8]; ref_m[a+1] = wdata[7:0];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 511; i++) begin
      ld_addr = 16'(i); #1; check("byte read", ld_rdata == ref_m[i]);
    end
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
