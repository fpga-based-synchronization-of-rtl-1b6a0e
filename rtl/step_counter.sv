// Time-base counter of the waveform generator: a free-running COUNT_W-bit
// count of 100 ps serial bit slots.
//
// The GTX consumes one LANES-bit word per clock, so every rising edge of the
// word clock advances the count by LANES slots. With the defaults (35 bits,
// steps of 64, 156.25 MHz) the count covers 2^35 slots of 100 ps and wraps to
// zero every 2^29 clocks, about 3.4 s. Width and step follow the described
// "35-bit 64-step counter"; the synchronous active-high reset to zero is this
// design's choice.
//
// Interface: clk, rst (synchronous), en (count enable), count (registered).
// Timing: count changes one clock after each enabled edge.
module step_counter #(
  parameter int unsigned COUNT_W = 35,
  parameter int unsigned STEP    = 64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  output logic [COUNT_W-1:0] count
);

  localparam logic [COUNT_W-1:0] STEP_C = COUNT_W'(STEP);

  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (en) count <= count + STEP_C;
  end

endmodule
