// Transmitter (Alice) FPGA logic: the waveform generator driven by the
// transmitter state machine.
//
// The node runs on the clock recovered from the synchronization channel, so
// its time base is frequency-locked to the receiver's. The state machine
// picks the pattern (sync, pilot, zeroes, qubits) and the generator turns it
// into the 64-bit GTX word of a BPSK-modulated square-wave carrier. The
// transmitter's own ShiftVal is an input (normally zero: the receiver does
// all the shifting).
//
// Interface: clk, rst, the classical-channel commands sync_achieved and
// sync_request, generator controls (shift_val, log_fd, log_bps,
// carrier_en), the qubit, pilot and sync patterns; outputs gtx_data, count
// and state. Timing: as waveform_modulator and alice_fsm; the word reflects
// the state in the same clock.
module alice_node
  import qkd_pkg::*;
#(
  parameter int unsigned LANES   = DEF_LANES,
  parameter int unsigned COUNT_W = DEF_COUNT_W,
  parameter int unsigned PAT_LEN = DEF_PAT_LEN,
  parameter int unsigned LOG_W   = DEF_LOG_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sync_achieved,
  input  logic               sync_request,
  input  logic [COUNT_W-1:0] shift_val,
  input  logic [LOG_W-1:0]   log_fd,
  input  logic [LOG_W-1:0]   log_bps,
  input  logic               carrier_en,
  input  logic [PAT_LEN-1:0] qubit_pattern,
  input  logic [PAT_LEN-1:0] pilot_pattern,
  input  logic [PAT_LEN-1:0] sync_pattern,
  output logic [LANES-1:0]   gtx_data,
  output logic [COUNT_W-1:0] count,
  output alice_state_e       state
);

  pat_sel_e pat_sel;

  alice_fsm #(
    .COUNT_W(COUNT_W), .STEP(LANES), .PAT_LEN(PAT_LEN), .LOG_W(LOG_W)
  ) u_fsm (
    .clk          (clk),
    .rst          (rst),
    .sync_achieved(sync_achieved),
    .sync_request (sync_request),
    .count        (count),
    .log_bps      (log_bps),
    .state        (state),
    .pat_sel      (pat_sel)
  );

  waveform_modulator #(
    .LANES(LANES), .COUNT_W(COUNT_W), .PAT_LEN(PAT_LEN), .LOG_W(LOG_W)
  ) u_mod (
    .clk          (clk),
    .rst          (rst),
    .shift_val    (shift_val),
    .log_fd       (log_fd),
    .log_bps      (log_bps),
    .pat_sel      (pat_sel),
    .carrier_en   (carrier_en),
    .zero_pattern ('0),
    .qubit_pattern(qubit_pattern),
    .pilot_pattern(pilot_pattern),
    .sync_pattern (sync_pattern),
    .count        (count),
    .gtx_data     (gtx_data)
  );

endmodule
