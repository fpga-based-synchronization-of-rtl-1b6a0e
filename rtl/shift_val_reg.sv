// ShiftVal register: the offset, in 100 ps bit slots, that the waveform
// generator adds to its time base.
//
// The synchronization search moves the receiver's waveform in fixed steps:
// one RF cycle (4 slots at 2.5 GHz) to align symbol boundaries, then one
// symbol (32 slots at 312.5 Msymbol/s) to find the frame. A host command
// therefore either loads a value or adds a step to the register; the sum
// wraps modulo 2^COUNT_W like the time base. Load has priority over inc.
// The load/increment command interface and reset to zero are this design's
// choice.
//
// Interface: clk, rst, load, load_val, inc, step, shift_val.
// Timing: shift_val updates one clock after a command.
module shift_val_reg #(
  parameter int unsigned COUNT_W = 35
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               load,
  input  logic [COUNT_W-1:0] load_val,
  input  logic               inc,
  input  logic [COUNT_W-1:0] step,
  output logic [COUNT_W-1:0] shift_val
);

  always_ff @(posedge clk) begin
    if (rst)       shift_val <= '0;
    else if (load) shift_val <= load_val;
    else if (inc)  shift_val <= shift_val + step;
  end

endmodule
