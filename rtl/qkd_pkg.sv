// Shared types and constants of the frequency-coded QKD synchronization logic.
//
// The numbers here are the ones the design is built around: a 10 Gb/s serial
// line carried as 64-bit words on a 156.25 MHz clock, a 35-bit time base that
// counts 100 ps bit slots, 256-bit modulation patterns and a 16-bit pilot
// signature. The state encodings of the two state machines and of the
// modulator's pattern selector are this design's own choice. The DEF_*
// constants serve only as parameter defaults, so a lint run on a module that
// uses a few of them reports the rest as unused parameters; that is expected.
package qkd_pkg;

  localparam int unsigned DEF_LANES     = 64;   // bits per GTX word
  localparam int unsigned DEF_COUNT_W   = 35;   // time-base counter width
  localparam int unsigned DEF_PAT_LEN   = 256;  // modulation pattern length
  localparam int unsigned DEF_PAT_AW    = 8;    // log2(PAT_LEN)
  localparam int unsigned DEF_SIG_W     = 16;   // pilot signature width
  localparam int unsigned DEF_LOG_W   = 6;    // width of logFD / logBPS fields

  // Which 256-bit pattern the modulator sends (the four inputs of the
  // pattern selector).
  typedef enum logic [1:0] {
    PAT_ZERO  = 2'd0,
    PAT_QUBIT = 2'd1,
    PAT_PILOT = 2'd2,
    PAT_SYNC  = 2'd3
  } pat_sel_e;

  // Transmitter (Alice) states.
  typedef enum logic [2:0] {
    A_SYNC  = 3'd0,
    A_ARMED = 3'd1,
    A_PILOT = 3'd2,
    A_XOVR  = 3'd3,
    A_Q     = 3'd4
  } alice_state_e;

  // Receiver (Bob) states.
  typedef enum logic [1:0] {
    B_SYNC  = 2'd0,
    B_ARMED = 2'd1,
    B_XOVR  = 2'd2,
    B_Q     = 2'd3
  } bob_state_e;

endpackage
