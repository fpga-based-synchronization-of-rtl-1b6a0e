// Dynamic phase-shift controller: steps the phase of the clock sent to the
// transmitter, one clock-manager resolution step (12.6 ps on the target
// device) per request, and keeps track of the net phase.
//
// A request (step_req, with step_inc = 1 to delay or 0 to advance) starts a
// step: psen is pulsed for one clock with psincdec = step_inc, and the
// controller is busy until the clock manager answers with psdone. It then
// pulses step_done and adds or subtracts one from phase_steps. Requests made
// while busy are ignored. The clock manager's handshake (one-clock psen, one
// psdone per step) is the standard one for dynamic phase shift; everything
// else here is this design's choice.
//
// Interface: clk, rst, step_req, step_inc, busy, step_done, phase_steps
// (signed, PH_W bits), and psen/psincdec/psdone to the clock manager.
// Timing: psen follows step_req by one clock; step_done follows psdone by one.
module phase_shift_ctrl #(
  parameter int unsigned PH_W = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   step_req,
  input  logic                   step_inc,
  output logic                   busy,
  output logic                   step_done,
  output logic signed [PH_W-1:0] phase_steps,
  output logic                   psen,
  output logic                   psincdec,
  input  logic                   psdone
);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      step_done   <= 1'b0;
      phase_steps <= '0;
      psen        <= 1'b0;
      psincdec    <= 1'b0;
    end else begin
      psen      <= 1'b0;
      step_done <= 1'b0;
      if (!busy) begin
        if (step_req) begin
          busy     <= 1'b1;
          psen     <= 1'b1;
          psincdec <= step_inc;
        end
      end else if (psdone && !psen) begin
        busy        <= 1'b0;
        step_done   <= 1'b1;
        phase_steps <= psincdec ? phase_steps + 1'b1 : phase_steps - 1'b1;
      end
    end
  end

  // The clock manager answers only a step that is outstanding, and a new
  // step is issued only once the previous one has been answered.
  a_psdone_expected: assert property (@(posedge clk) disable iff (rst)
    psdone |-> busy);
  a_psen_idle: assert property (@(posedge clk) disable iff (rst)
    psen |-> $past(!busy));

endmodule
