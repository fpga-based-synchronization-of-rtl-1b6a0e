// Synchronization logic of a frequency-coded QKD link: the transmitter
// (Alice) and receiver (Bob) FPGA designs side by side.
//
// Each end generates a square-wave RF carrier, BPSK-modulated by a 256-bit
// pattern, as the 64-bit parallel word of a 10 Gb/s GTX serialiser. The two
// phase modulators in the optical path make the sideband interfere, bright
// when the two ends' symbols agree and dark when they differ. The receiver
// aligns the two waveforms in three steps: clock phase (12.6 ps steps of its
// clock manager, through psen/psincdec/psdone), whole RF cycles and then
// whole symbols (the ShiftVal register). It then reports sync over the
// classical channel; the transmitter sends a pilot on its next time-base
// wrap, the receiver detects it, and both cross over to quantum operation
// on the following wrap.
//
// Everything outside the FPGA fabric is a port here: the two word clocks
// (the transmitter's is the one the receiver sends on the synchronization
// channel), the GTX words, the photodetector output cin, the clock
// manager's phase-shift port, and the host's commands and registers. The
// classical-channel messages sync_achieved / sync_request go to both ends.
//
// Interface: see the port list; each end has its own clock and synchronous
// reset. Timing: as alice_node and bob_node.
module qkd_sync_top
  import qkd_pkg::*;
#(
  parameter int unsigned LANES   = DEF_LANES,
  parameter int unsigned COUNT_W = DEF_COUNT_W,
  parameter int unsigned PAT_LEN = DEF_PAT_LEN,
  parameter int unsigned LOG_W   = DEF_LOG_W,
  parameter int unsigned SIG_W   = DEF_SIG_W,
  parameter int unsigned PH_W    = 16
) (
  // Transmitter
  input  logic                   a_clk,
  input  logic                   a_rst,
  input  logic [COUNT_W-1:0]     a_shift_val,
  input  logic [PAT_LEN-1:0]     a_qubit_pattern,
  input  logic [PAT_LEN-1:0]     a_pilot_pattern,
  output logic [LANES-1:0]       a_gtx_data,
  output logic [COUNT_W-1:0]     a_count,
  output alice_state_e           a_state,
  // Receiver
  input  logic                   b_clk,
  input  logic                   b_rst,
  input  logic                   b_shift_load,
  input  logic [COUNT_W-1:0]     b_shift_load_val,
  input  logic                   b_shift_inc,
  input  logic [COUNT_W-1:0]     b_shift_step,
  input  logic                   b_ps_step_req,
  input  logic                   b_ps_step_inc,
  input  logic [PAT_LEN-1:0]     b_qubit_pattern,
  input  logic [SIG_W-1:0]       b_pilot_signature,
  input  logic                   b_cin,
  input  logic                   b_psdone,
  output logic                   b_psen,
  output logic                   b_psincdec,
  output logic                   b_ps_busy,
  output logic                   b_ps_step_done,
  output logic signed [PH_W-1:0] b_phase_steps,
  output logic [LANES-1:0]       b_gtx_data,
  output logic [COUNT_W-1:0]     b_count,
  output logic [COUNT_W-1:0]     b_shift_val,
  output logic                   b_pilot_detected,
  output bob_state_e             b_state,
  output logic                   b_cin_mon,
  // Shared configuration (set by the initialisation exchange) and
  // classical-channel messages
  input  logic [LOG_W-1:0]       log_fd,
  input  logic [LOG_W-1:0]       log_bps,
  input  logic                   carrier_en,
  input  logic [PAT_LEN-1:0]     sync_pattern,
  input  logic                   sync_achieved,
  input  logic                   sync_request
);

  alice_node #(
    .LANES(LANES), .COUNT_W(COUNT_W), .PAT_LEN(PAT_LEN), .LOG_W(LOG_W)
  ) u_alice (
    .clk          (a_clk),
    .rst          (a_rst),
    .sync_achieved(sync_achieved),
    .sync_request (sync_request),
    .shift_val    (a_shift_val),
    .log_fd       (log_fd),
    .log_bps      (log_bps),
    .carrier_en   (carrier_en),
    .qubit_pattern(a_qubit_pattern),
    .pilot_pattern(a_pilot_pattern),
    .sync_pattern (sync_pattern),
    .gtx_data     (a_gtx_data),
    .count        (a_count),
    .state        (a_state)
  );

  bob_node #(
    .LANES(LANES), .COUNT_W(COUNT_W), .PAT_LEN(PAT_LEN), .LOG_W(LOG_W),
    .SIG_W(SIG_W), .PH_W(PH_W)
  ) u_bob (
    .clk            (b_clk),
    .rst            (b_rst),
    .sync_achieved  (sync_achieved),
    .sync_request   (sync_request),
    .shift_load     (b_shift_load),
    .shift_load_val (b_shift_load_val),
    .shift_inc      (b_shift_inc),
    .shift_step     (b_shift_step),
    .ps_step_req    (b_ps_step_req),
    .ps_step_inc    (b_ps_step_inc),
    .log_fd         (log_fd),
    .log_bps        (log_bps),
    .carrier_en     (carrier_en),
    .qubit_pattern  (b_qubit_pattern),
    .sync_pattern   (sync_pattern),
    .pilot_signature(b_pilot_signature),
    .cin            (b_cin),
    .psdone         (b_psdone),
    .psen           (b_psen),
    .psincdec       (b_psincdec),
    .ps_busy        (b_ps_busy),
    .ps_step_done   (b_ps_step_done),
    .phase_steps    (b_phase_steps),
    .gtx_data       (b_gtx_data),
    .count          (b_count),
    .shift_val      (b_shift_val),
    .pilot_detected (b_pilot_detected),
    .state          (b_state),
    .cin_mon        (b_cin_mon)
  );

endmodule
