// tb_pasm_top: end-to-end test of the whole machine at a reduced size (N=64 processors,
// Q=4 controllers, 1 KiB memories); the test itself is in tb_pasm_run.
module tb_pasm_top;
  tb_pasm_run #(.FULL(1'b0), .N(64), .Q(4), .MEM_DEPTH(1024)) u_run ();
endmodule
