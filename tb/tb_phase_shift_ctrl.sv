// Testbench for phase_shift_ctrl against a behavioural clock-manager model
// (psdone 12 clocks after psen, so 14 clocks from request to step_done): random step requests, including requests
// while busy, which must be ignored. Checks the psen/psdone handshake, the
// step latency, and that phase_steps equals the model's net phase and the
// model-independent count of accepted requests.
module tb_phase_shift_ctrl;
  logic clk = 0, rst, step_req, step_inc, busy, step_done, psen, psincdec, psdone;
  logic signed [15:0] phase_steps;
  int phase, perr;
  int checks = 0, failures = 0;

  phase_shift_ctrl dut (.clk, .rst, .step_req, .step_inc, .busy, .step_done,
                        .phase_steps, .psen, .psincdec, .psdone);
  mmcm_ps_model #(.LATENCY(12)) u_mmcm (.clk, .rst, .psen, .psincdec, .psdone,
                                        .phase, .protocol_errors(perr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    int expected, accepted, psens, dones, t_req;
    rst = 1; step_req = 0; step_inc = 0;
    @(posedge clk); @(posedge clk); #1; rst = 0;
    expected = 0; accepted = 0; psens = 0; dones = 0; t_req = 0;
    for (int k = 0; k < 8000; k++) begin
      logic was_busy;
      was_busy = busy;
      step_req = ($urandom_range(0, 3) == 0);
      step_inc = ($urandom_range(0, 3) != 0);
      if (step_req && !was_busy) begin
        accepted++;
        expected += step_inc ? 1 : -1;
        t_req = k;
      end
      @(posedge clk); #1;
      if (psen) psens++;
      if (step_done) begin
        dones++;
        check(k - t_req == 14, $sformatf("step took %0d clocks", k - t_req));
      end
      if (step_req && !was_busy) check(psen && busy, "request starts a step");
      if (step_req && was_busy && !step_done) check(!psen, "request while busy ignored");
    end
    step_req = 0;
    repeat (20) begin @(posedge clk); #1; if (step_done) dones++; end
    check(phase_steps == 16'(expected), $sformatf("phase_steps %0d expected %0d", phase_steps, expected));
    check(int'(phase_steps) == phase, "matches the clock manager's phase");
    check(psens == accepted && dones == accepted, $sformatf("%0d accepted, %0d psen, %0d done", accepted, psens, dones));
    check(perr == 0, "no overlapping psen");
    check(accepted > 100, "enough steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
