// End-to-end testbench of qkd_sync_top with a 16-bit time base (wrap every
// 1024 clocks instead of 2^29) so that the two crossover waits are short;
// everything else is at its default size. See qkd_sync_tb_body.svh.
module tb_qkd_sync_top;
  localparam int CW = 16;
  localparam bit SYNC_ONLY = 1'b0;
  localparam int MAX_CYCLES = 400000;
`define QKD_TOP_INST qkd_sync_top #(.COUNT_W(CW)) dut (.a_clk(clk), .b_clk(clk), .*);
`include "qkd_sync_tb_body.svh"
`undef QKD_TOP_INST

  task automatic end_sim();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
