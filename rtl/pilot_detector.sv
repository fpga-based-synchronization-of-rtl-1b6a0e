// Pilot detector of the receiver: watches the interferometer output for the
// 16-bit pilot signature.
//
// The detected interferometer output cin enters a SIG_W-bit shift register.
// All SIG_W bits are compared with the signature at once, and
// pilot_detected is high while every bit matches. The signature is held in
// a register loaded from the signature input, so the block holds 2*SIG_W
// flip-flops and one wide comparator, as described.
//
// This design's choices: the register shifts only on sample_en, one sample
// per received symbol, so the same logic serves any symbol rate (tie it high
// to shift every clock); the newest sample is bit 0, so the signature reads
// in time order from its most significant bit; the shift register resets to
// zero.
//
// Interface: clk, rst (synchronous), sample_en, cin, signature,
// pilot_detected. Timing: pilot_detected rises in the clock after the sample
// that completes the signature (shift register and signature registered,
// compare combinational).
module pilot_detector #(
  parameter int unsigned SIG_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sample_en,
  input  logic             cin,
  input  logic [SIG_W-1:0] signature,
  output logic             pilot_detected
);

  logic [SIG_W-1:0] shreg;
  logic [SIG_W-1:0] sig_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      sig_q <= '0;
    end else begin
      sig_q <= signature;
      if (sample_en) shreg <= {shreg[SIG_W-2:0], cin};
    end
  end

  assign pilot_detected = ~|(shreg ^ sig_q);

endmodule
