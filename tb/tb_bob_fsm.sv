// Testbench for bob_fsm with a 12-bit time base (64 clocks per wrap): SYNC
// ignores pilot_detected, ARMED waits for it, XOVR ends on the word with
// count 0, Q holds until sync_request. Checks the pattern of each state.
module tb_bob_fsm;
  import qkd_pkg::*;
  localparam int CW = 12;
  logic clk = 0, rst, sync_achieved, sync_request, pilot_detected;
  logic [CW-1:0] count;
  bob_state_e state;
  pat_sel_e pat_sel;
  int checks = 0, failures = 0;

  bob_fsm #(.COUNT_W(CW)) dut (.clk, .rst, .sync_achieved, .sync_request,
                               .pilot_detected, .count, .state, .pat_sel);

  always #5 clk = ~clk;
  always_ff @(posedge clk) count <= rst ? '0 : count + CW'(64);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @count %0d state %s: %s", count, state.name(), what); end
  endtask

  initial begin
    rst = 1; sync_achieved = 0; sync_request = 0; pilot_detected = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int round = 0; round < 4; round++) begin
      pilot_detected = 1;
      repeat (5) begin @(posedge clk); #1; check(state == B_SYNC && pat_sel == PAT_SYNC, "SYNC ignores pilot"); end
      pilot_detected = 0;
      sync_achieved = 1; @(posedge clk); #1; sync_achieved = 0;
      repeat ($urandom_range(1, 100)) begin
        check(state == B_ARMED && pat_sel == PAT_ZERO, "ARMED waits");
        @(posedge clk); #1;
      end
      pilot_detected = 1; @(posedge clk); #1; pilot_detected = 0;
      check(state == B_XOVR || count == 0, "XOVR after pilot");
      while (count != 0) begin
        check(state == B_XOVR && pat_sel == PAT_ZERO, "XOVR until wrap");
        @(posedge clk); #1;
      end
      check(state == B_Q && pat_sel == PAT_QUBIT, "Q on the word with count 0");
      repeat (70) begin @(posedge clk); #1; check(state == B_Q, "Q holds"); end
      sync_request = 1; @(posedge clk); #1; sync_request = 0;
      check(state == B_SYNC, "back to SYNC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
