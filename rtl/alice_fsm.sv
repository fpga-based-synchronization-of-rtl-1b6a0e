// Transmitter (Alice) state machine: moves from synchronization to quantum
// transmission at instants both ends can agree on.
//
// States and transitions, as described for the transmitter:
//   SYNC  --sync_achieved-->          ARMED   (receiver reported sync)
//   ARMED --count = 0-->              PILOT   (wait for time-base wrap)
//   PILOT --count = length(pilot)-->  XOVR    (one full pilot pattern sent)
//   XOVR  --count = 0-->              Q       (next wrap: about 3.4 s later)
//   Q     --sync_request-->           SYNC
// The pattern sent in each state is this design's choice: the sync pattern
// in SYNC and ARMED, the pilot in PILOT, all zeroes in XOVR and the qubits
// in Q.
//
// Timing (this design's choice): the count conditions are tested on the
// count the time base will hold after this clock (count + STEP), so the
// state changes on exactly the word whose count meets the condition. With
// the pilot sent from count 0, length(pilot) = PAT_LEN << log_bps slots.
// A synchronous active-high reset enters SYNC.
//
// Interface: clk, rst, sync_achieved, sync_request, count (the unshifted time
// base), log_bps; outputs state and pat_sel (to the modulator).
module alice_fsm
  import qkd_pkg::*;
#(
  parameter int unsigned COUNT_W = DEF_COUNT_W,
  parameter int unsigned STEP    = 64,
  parameter int unsigned PAT_LEN = DEF_PAT_LEN,
  parameter int unsigned LOG_W   = DEF_LOG_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sync_achieved,
  input  logic               sync_request,
  input  logic [COUNT_W-1:0] count,
  input  logic [LOG_W-1:0]   log_bps,
  output alice_state_e       state,
  output pat_sel_e           pat_sel
);

  logic [COUNT_W-1:0] count_nxt;
  logic [COUNT_W-1:0] pilot_len;
  alice_state_e       state_nxt;

  assign count_nxt = count + COUNT_W'(STEP);
  assign pilot_len = COUNT_W'(PAT_LEN) << log_bps;

  always_comb begin
    state_nxt = state;
    unique case (state)
      A_SYNC:  if (sync_achieved)          state_nxt = A_ARMED;
      A_ARMED: if (count_nxt == '0)        state_nxt = A_PILOT;
      A_PILOT: if (count_nxt == pilot_len) state_nxt = A_XOVR;
      A_XOVR:  if (count_nxt == '0)        state_nxt = A_Q;
      A_Q:     if (sync_request)           state_nxt = A_SYNC;
      default:                             state_nxt = A_SYNC;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= A_SYNC;
    else     state <= state_nxt;
  end

  always_comb begin
    unique case (state)
      A_SYNC, A_ARMED: pat_sel = PAT_SYNC;
      A_PILOT:         pat_sel = PAT_PILOT;
      A_Q:             pat_sel = PAT_QUBIT;
      default:         pat_sel = PAT_ZERO;
    endcase
  end

endmodule
