// End-to-end testbench of qkd_sync_top with a 28-bit time base: the two
// crossover waits are 2^22 clocks each (2^29 at the default 35 bits, too
// long to simulate here); all other sizes are the defaults. Same procedure
// and checks as tb_qkd_sync_top, see qkd_sync_tb_body.svh.
module tb_qkd_sync_long;
  localparam int CW = 28;
  localparam bit SYNC_ONLY = 1'b0;
  localparam int MAX_CYCLES = 20000000;
`define QKD_TOP_INST qkd_sync_top #(.COUNT_W(CW)) dut (.a_clk(clk), .b_clk(clk), .*);
`include "qkd_sync_tb_body.svh"
`undef QKD_TOP_INST

  task automatic end_sim();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
