// Receiver (Bob) FPGA logic: waveform generator, ShiftVal register, phase-step
// controller, pilot detector and receiver state machine.
//
// The receiver owns the seed clock. Its clock manager derives the GTX clock
// and the clock sent to the transmitter; this node only issues phase steps
// to it (phase_shift_ctrl). The host moves the receiver's waveform through
// the ShiftVal register (shift_val_reg). In SYNC the generator sends the
// shared sync pattern with every second bit complemented, so that when both
// ends are aligned the interferometer output alternates symbol by symbol.
// The detected interferometer output (cin) feeds the pilot detector, once
// per received symbol, and is also registered out (cin_mon) for monitoring.
//
// Sample strobe (this design's choice): sample_en pulses when the symbol
// index of lane 0, (count + shift_val) >> log_bps, differs from the previous
// clock's, i.e. once per symbol for symbols of 64 slots or more and every
// clock for shorter ones. The complemented bits are the 2nd, 4th, ... bits
// sent (mask ALT_MASK), matching the printed pair 0xB38E... / 0xE6DB....
//
// Interface: clk, rst, host commands (sync_achieved, sync_request, shift
// load/increment, phase step request), generator controls, patterns, pilot
// signature, cin from the photodetector, psen/psincdec/psdone to the clock
// manager; outputs gtx_data, count, shift_val, ps_busy, ps_step_done, phase_steps, pilot_detected,
// state, cin_mon.
module bob_node
  import qkd_pkg::*;
#(
  parameter int unsigned LANES   = DEF_LANES,
  parameter int unsigned COUNT_W = DEF_COUNT_W,
  parameter int unsigned PAT_LEN = DEF_PAT_LEN,
  parameter int unsigned LOG_W   = DEF_LOG_W,
  parameter int unsigned SIG_W   = DEF_SIG_W,
  parameter int unsigned PH_W    = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   sync_achieved,
  input  logic                   sync_request,
  input  logic                   shift_load,
  input  logic [COUNT_W-1:0]     shift_load_val,
  input  logic                   shift_inc,
  input  logic [COUNT_W-1:0]     shift_step,
  input  logic                   ps_step_req,
  input  logic                   ps_step_inc,
  input  logic [LOG_W-1:0]       log_fd,
  input  logic [LOG_W-1:0]       log_bps,
  input  logic                   carrier_en,
  input  logic [PAT_LEN-1:0]     qubit_pattern,
  input  logic [PAT_LEN-1:0]     sync_pattern,
  input  logic [SIG_W-1:0]       pilot_signature,
  input  logic                   cin,
  input  logic                   psdone,
  output logic                   psen,
  output logic                   psincdec,
  output logic                   ps_busy,
  output logic                   ps_step_done,
  output logic signed [PH_W-1:0] phase_steps,
  output logic [LANES-1:0]       gtx_data,
  output logic [COUNT_W-1:0]     count,
  output logic [COUNT_W-1:0]     shift_val,
  output logic                   pilot_detected,
  output bob_state_e             state,
  output logic                   cin_mon
);

  localparam logic [PAT_LEN-1:0] ALT_MASK = {(PAT_LEN/2){2'b01}};

  pat_sel_e           pat_sel;
  logic               sample_en;
  logic [COUNT_W-1:0] lane0;
  logic [COUNT_W-1:0] sym_idx;
  logic [COUNT_W-1:0] sym_idx_q;

  shift_val_reg #(.COUNT_W(COUNT_W)) u_shift (
    .clk      (clk),
    .rst      (rst),
    .load     (shift_load),
    .load_val (shift_load_val),
    .inc      (shift_inc),
    .step     (shift_step),
    .shift_val(shift_val)
  );

  phase_shift_ctrl #(.PH_W(PH_W)) u_ps (
    .clk        (clk),
    .rst        (rst),
    .step_req   (ps_step_req),
    .step_inc   (ps_step_inc),
    .busy       (ps_busy),
    .step_done  (ps_step_done),
    .phase_steps(phase_steps),
    .psen       (psen),
    .psincdec   (psincdec),
    .psdone     (psdone)
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
    .pilot_pattern('0),
    .sync_pattern (sync_pattern ^ ALT_MASK),
    .count        (count),
    .gtx_data     (gtx_data)
  );

  // One pilot-detector sample per received symbol.
  assign lane0   = count + shift_val;
  assign sym_idx = lane0 >> log_bps;

  always_ff @(posedge clk) begin
    if (rst) begin
      sym_idx_q <= '0;
      cin_mon   <= 1'b0;
    end else begin
      sym_idx_q <= sym_idx;
      cin_mon   <= cin;
    end
  end

  assign sample_en = (sym_idx != sym_idx_q);

  pilot_detector #(.SIG_W(SIG_W)) u_pilot (
    .clk           (clk),
    .rst           (rst),
    .sample_en     (sample_en),
    .cin           (cin),
    .signature     (pilot_signature),
    .pilot_detected(pilot_detected)
  );

  bob_fsm #(.COUNT_W(COUNT_W), .STEP(LANES)) u_fsm (
    .clk           (clk),
    .rst           (rst),
    .sync_achieved (sync_achieved),
    .sync_request  (sync_request),
    .pilot_detected(pilot_detected),
    .count         (count),
    .state         (state),
    .pat_sel       (pat_sel)
  );

endmodule
