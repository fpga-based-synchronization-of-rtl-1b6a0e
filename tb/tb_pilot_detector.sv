// Testbench for pilot_detector: random samples with a random sample enable,
// signatures planted in the stream, and the detector output compared every
// clock with a model shift register (newest sample in bit 0); then each
// single-bit corruption of the signature, which must not be detected.
module tb_pilot_detector;
  logic        clk = 0, rst, sample_en, cin;
  logic [15:0] signature;
  logic        pilot_detected;
  int checks = 0, failures = 0, hits = 0;

  pilot_detector dut (.clk, .rst, .sample_en, .cin, .signature, .pilot_detected);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model;
    int plant;
    rst = 1; sample_en = 0; cin = 0; signature = 16'hB38E;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    model = '0;
    @(posedge clk); #1;
    plant = -1;
    for (int k = 0; k < 20000; k++) begin
      sample_en = 1'($urandom_range(0, 3) != 0);
      if (plant < 0 && $urandom_range(0, 200) == 0) plant = 15;
      if (plant >= 0) cin = signature[plant];
      else            cin = 1'($urandom);
      if (sample_en && plant >= 0) plant--;
      if (k == 10000) signature = 16'h0F5A;
      @(posedge clk); #1;
      if (sample_en) model = {model[14:0], cin};
      if (k > 10000 && k < 10002) continue;  // signature register reloading
      checks++;
      if (pilot_detected !== (model == signature)) begin
        failures++;
        $display("FAIL k=%0d: detected %b model %h sig %h", k, pilot_detected, model, signature);
      end
      if (pilot_detected) hits++;
    end
    // Directed: a single wrong bit anywhere must not be taken for the pilot.
    sample_en = 1;
    for (int b = -1; b < 16; b++) begin
      logic [15:0] v;
      v = (b < 0) ? signature : signature ^ (16'h1 << b);
      for (int k = 15; k >= 0; k--) begin
        cin = v[k];
        @(posedge clk); #1;
      end
      checks++;
      if (pilot_detected !== (b < 0)) begin
        failures++;
        $display("FAIL: flipped bit %0d, detected %b", b, pilot_detected);
      end
    end
    checks++;
    if (hits < 10) begin failures++; $display("FAIL: only %0d detections", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
