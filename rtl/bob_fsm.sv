// Receiver (Bob) state machine: waits for the pilot and then crosses over to
// quantum measurement on the next wrap of the time base.
//
// States and transitions, as described for the receiver:
//   SYNC  --sync_achieved-->   ARMED  (the synchronization search succeeded)
//   ARMED --pilot_detected-->  XOVR
//   XOVR  --count = 0-->       Q      (next wrap of the time base)
//   Q     --sync_request-->    SYNC
// The pattern sent in each state is this design's choice: the receiver's
// sync pattern in SYNC, all zeroes in ARMED (so that the interferometer
// output follows the pilot alone) and in XOVR, the basis (qubit) pattern in
// Q.
//
// Timing (this design's choice): the count condition is tested on count +
// STEP, the value after this clock, so Q starts on the word with count 0.
// Synchronous active-high reset enters SYNC.
//
// Interface: clk, rst, sync_achieved, sync_request, pilot_detected, count;
// outputs state and pat_sel.
module bob_fsm
  import qkd_pkg::*;
#(
  parameter int unsigned COUNT_W = DEF_COUNT_W,
  parameter int unsigned STEP    = 64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sync_achieved,
  input  logic               sync_request,
  input  logic               pilot_detected,
  input  logic [COUNT_W-1:0] count,
  output bob_state_e         state,
  output pat_sel_e           pat_sel
);

  logic [COUNT_W-1:0] count_nxt;
  bob_state_e         state_nxt;

  assign count_nxt = count + COUNT_W'(STEP);

  always_comb begin
    state_nxt = state;
    unique case (state)
      B_SYNC:  if (sync_achieved)   state_nxt = B_ARMED;
      B_ARMED: if (pilot_detected)  state_nxt = B_XOVR;
      B_XOVR:  if (count_nxt == '0) state_nxt = B_Q;
      B_Q:     if (sync_request)    state_nxt = B_SYNC;
      default:                      state_nxt = B_SYNC;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= B_SYNC;
    else     state <= state_nxt;
  end

  always_comb begin
    unique case (state)
      B_SYNC:  pat_sel = PAT_SYNC;
      B_Q:     pat_sel = PAT_QUBIT;
      default: pat_sel = PAT_ZERO;
    endcase
  end

endmodule
