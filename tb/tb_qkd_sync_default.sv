// End-to-end testbench of qkd_sync_top at its default sizes (64 lanes,
// 35-bit time base, 256-bit patterns, no parameter list on the top). It runs
// phase matching, symbol boundary alignment and frame synchronization, raises
// sync_achieved and checks that both ends hold ARMED without a false pilot
// detection. The crossover itself needs the time base to wrap twice (2^30
// clocks at this size) and is covered at 16 and 28 bits by tb_qkd_sync_top
// and tb_qkd_sync_long. See qkd_sync_tb_body.svh for the procedure.
module tb_qkd_sync_default;
  localparam int CW = 35;
  localparam bit SYNC_ONLY = 1'b1;
  localparam int MAX_CYCLES = 400000;
`define QKD_TOP_INST qkd_sync_top dut (.a_clk(clk), .b_clk(clk), .*);
`include "qkd_sync_tb_body.svh"
`undef QKD_TOP_INST

  task automatic end_sim();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
