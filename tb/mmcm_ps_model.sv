// Behavioural model of a clock manager's dynamic phase-shift port, for
// testbenches. Each one-clock psen pulse moves the output phase one step
// (psincdec = 1: later, 0: earlier) and is answered with a one-clock psdone
// LATENCY clocks later. phase holds the net number of steps taken. rst
// drops a step in flight (the model ignores psen while rst is high).
module mmcm_ps_model #(
  parameter int LATENCY = 12
) (
  input  logic clk,
  input  logic rst,
  input  logic psen,
  input  logic psincdec,
  output logic psdone,
  output int   phase,
  output int   protocol_errors
);
  int countdown = 0;
  logic dir = 1'b0;

  initial begin
    psdone = 1'b0;
    phase = 0;
    protocol_errors = 0;
  end

  always @(posedge clk) begin
    psdone <= 1'b0;
    if (rst) begin
      countdown <= 0;
    end else if (psen) begin
      if (countdown != 0) protocol_errors <= protocol_errors + 1;
      countdown <= LATENCY;
      dir <= psincdec;
    end else if (countdown == 1) begin
      countdown <= 0;
      psdone <= 1'b1;
      phase <= dir ? phase + 1 : phase - 1;
    end else if (countdown > 1) begin
      countdown <= countdown - 1;
    end
  end
endmodule
