// Behavioural model of the optical path between the two GTX outputs and the
// receiver's photodetector, for testbenches. It is not hardware of the FPGA.
//
// The transmitter's serial stream reaches the receiver's phase modulator
// DELAY bit slots late. The filtered sideband is bright when the two phase
// modulations cancel, so each slot of the detected output is the XNOR of
// the delayed transmitter bit and the receiver bit (carrier and data
// included: the carriers cancel only when they are aligned). A residual
// clock-phase error (PHASE0 plus the clock manager's net phase steps, in
// units of its 12.6 ps step) washes the interference out: the output is
// then scrambled and the amplitude lower. cin is the detected output of
// lane 0, the sample the receiver's pilot detector takes.
module interferometer_model #(
  parameter int DELAY  = 148,
  parameter int PHASE0 = -7,
  parameter int HIST   = 8
) (
  input  logic        clk,
  input  logic [63:0] a_word,
  input  logic [63:0] b_word,
  input  int          phase,
  output logic [63:0] intf,
  output logic        cin,
  output int          amplitude
);
  logic [64*HIST-1:0]     hist = '0;
  logic [64*(HIST+1)-1:0] stream;
  logic [63:0]            a_del;
  logic [63:0]            noise;
  int                     err;

  always @(posedge clk) begin
    hist  <= {a_word, hist[64*HIST-1:64]};
    noise <= (err == 0) ? 64'h0 : {$urandom, $urandom};
  end

  always_comb begin
    stream = {a_word, hist};
    a_del     = stream[64*HIST - DELAY +: 64];
    err       = PHASE0 + phase;
    amplitude = 1000 - 10 * (err < 0 ? -err : err);
    intf      = ~(a_del ^ b_word) ^ ((err == 0) ? 64'h0 : noise);
    cin       = intf[0];
  end
endmodule
