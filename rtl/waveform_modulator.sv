// Modulated waveform generator: produces the LANES-bit parallel word that the
// GTX serialiser turns into a square-wave RF carrier, BPSK-modulated by a
// 256-bit pattern.
//
// How it works. A time base (step_counter) counts 100 ps bit slots and
// advances by LANES each clock. The user offset shift_val is added to it,
// and lane i of the word takes the value base+i, one per bit slot. From each
// lane value:
//   * the carrier is bit log_fd of the value. A bit that toggles every 2^N
//     slots gives a square wave of 5 GHz / 2^N at 10 Gb/s, so log_fd = 1
//     gives 2.5 GHz;
//   * the pattern address is the 8 bits starting at bit log_bps, so each
//     pattern bit lasts 2^log_bps slots (log_bps = 5: 312.5 Msymbol/s,
//     log_bps = 12: 2.441 Msymbol/s);
//   * the lane's copy of the 256 x 1 pattern memory is read at that address,
//     and the bit is XORed with the carrier, which inverts the carrier for a
//     1 (BPSK).
// pat_sel chooses among the all-zero, qubit, pilot and sync patterns, and
// carrier_en replaces the carrier with zeroes.
// Changing shift_val by 1 moves the whole waveform by one bit slot (100 ps).
//
// All of this follows the described generator. These points are this
// design's choice: lane 0 is the first bit on the line; the lane value is
// computed as base+i rather than by a chain of +1 adders (same result);
// log_bps must be at most COUNT_W-PAT_AW (address bits beyond the counter
// read as zero); the output word is combinational from the counter register
// and the control inputs, with no output register.
//
// Interface: clk, rst, control inputs (shift_val, log_fd, log_bps, pat_sel,
// carrier_en), the four patterns, and outputs count (the unshifted time
// base, for the state machines) and gtx_data.
// Timing: gtx_data is the word for the current count; a control change takes
// effect in the same clock.
module waveform_modulator
  import qkd_pkg::*;
#(
  parameter int unsigned LANES   = DEF_LANES,
  parameter int unsigned COUNT_W = DEF_COUNT_W,
  parameter int unsigned PAT_LEN = DEF_PAT_LEN,
  parameter int unsigned LOG_W   = DEF_LOG_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [COUNT_W-1:0] shift_val,
  input  logic [LOG_W-1:0]   log_fd,
  input  logic [LOG_W-1:0]   log_bps,
  input  pat_sel_e           pat_sel,
  input  logic               carrier_en,
  input  logic [PAT_LEN-1:0] zero_pattern,
  input  logic [PAT_LEN-1:0] qubit_pattern,
  input  logic [PAT_LEN-1:0] pilot_pattern,
  input  logic [PAT_LEN-1:0] sync_pattern,
  output logic [COUNT_W-1:0] count,
  output logic [LANES-1:0]   gtx_data
);

  localparam int unsigned AW = $clog2(PAT_LEN);

  step_counter #(.COUNT_W(COUNT_W), .STEP(LANES)) u_counter (
    .clk  (clk),
    .rst  (rst),
    .en   (1'b1),
    .count(count)
  );

  // Pattern selector.
  logic [PAT_LEN-1:0] pattern;
  always_comb begin
    unique case (pat_sel)
      PAT_ZERO:  pattern = zero_pattern;
      PAT_QUBIT: pattern = qubit_pattern;
      PAT_PILOT: pattern = pilot_pattern;
      PAT_SYNC:  pattern = sync_pattern;
      default:   pattern = zero_pattern;
    endcase
  end

  logic [COUNT_W-1:0] base;
  assign base = count + shift_val;

  logic [LANES-1:0] carrier;
  logic [LANES-1:0] data;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic [COUNT_W-1:0] value;
    logic [AW-1:0]      addr;

    always_comb begin
      value      = base + COUNT_W'(i);
      carrier[i] = value[log_fd];
      addr       = AW'(value >> log_bps);
    end

    pattern_ram #(.DEPTH(PAT_LEN), .AW(AW)) u_ram (
      .contents(pattern),
      .addr    (addr),
      .data    (data[i])
    );
  end

  assign gtx_data = data ^ (carrier & {LANES{carrier_en}});

endmodule
