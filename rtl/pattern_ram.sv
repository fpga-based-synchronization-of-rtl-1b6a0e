// One 256 x 1 pattern memory of the waveform generator.
//
// The waveform generator keeps one copy of the active 256-bit pattern per
// output lane, so that all 64 lanes can read their symbol in the same clock.
// The contents are the pattern chosen by the pattern selector and follow it
// without a load cycle, so a state change switches the pattern on the very
// next word; the read is asynchronous. This maps onto look-up tables as a
// 256:1 multiplexer per lane, which keeps the modulator nearly free of
// flip-flops.
//
// Bit order (this design's choice): patterns are written most significant bit
// first, so address 0 reads contents[DEPTH-1] and address DEPTH-1 reads
// contents[0]. A pattern printed as 0xB38E... therefore sends 1,0,1,1,...
//
// Interface: contents (DEPTH bits), addr (AW bits), data (1 bit).
// Timing: combinational.
module pattern_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic [DEPTH-1:0] contents,
  input  logic [AW-1:0]    addr,
  output logic             data
);

  logic [AW-1:0] idx;

  always_comb begin
    idx  = AW'(DEPTH - 1) - addr;
    data = contents[idx];
  end

endmodule
