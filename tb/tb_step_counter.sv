// Testbench for step_counter: checks the step of 64 per clock, the hold on
// en = 0, synchronous reset, and the wrap of a 10-bit instance (16 clocks).
module tb_step_counter;
  logic clk = 0, rst, en;
  logic [9:0]  count_s;
  logic [34:0] count_d;
  int checks = 0, failures = 0;

  step_counter #(.COUNT_W(10), .STEP(64)) dut_s (.clk, .rst, .en, .count(count_s));
  step_counter dut_d (.clk, .rst, .en, .count(count_d));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint unsigned exp_d;
    int unsigned exp_s;
    rst = 1; en = 0;
    @(posedge clk); @(posedge clk); #1;
    check(count_s == 0 && count_d == 0, "reset to zero");
    rst = 0; en = 1;
    exp_d = 0; exp_s = 0;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk); #1;
      exp_d = (exp_d + 64) % (64'd1 << 35);
      exp_s = (exp_s + 64) % 1024;
      check(count_d == 35'(exp_d), $sformatf("35-bit count %0d vs %0d", count_d, exp_d));
      check(count_s == 10'(exp_s), $sformatf("10-bit count %0d vs %0d", count_s, exp_s));
      if (k == 15) check(count_s == 0, "10-bit counter wraps after 16 clocks");
    end
    en = 0;
    repeat (5) @(posedge clk); #1;
    check(count_d == 35'(exp_d), "holds with en low");
    rst = 1; @(posedge clk); #1;
    check(count_d == 0 && count_s == 0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
