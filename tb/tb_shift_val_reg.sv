// Testbench for shift_val_reg: reset, load, increments by the RF-cycle and
// symbol steps (4 and 32), load priority over increment, and wrap modulo
// 2^35, against a model.
module tb_shift_val_reg;
  logic clk = 0, rst, load, inc;
  logic [34:0] load_val, step, shift_val;
  int checks = 0, failures = 0;

  shift_val_reg dut (.clk, .rst, .load, .load_val, .inc, .step, .shift_val);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned m;
    rst = 1; load = 0; inc = 0; load_val = '0; step = 35'd4;
    @(posedge clk); #1; rst = 0;
    m = 0;
    checks++; if (shift_val != 0) failures++;
    for (int k = 0; k < 2000; k++) begin
      load     = ($urandom_range(0, 20) == 0);
      inc      = 1'($urandom);
      load_val = 35'({$urandom, $urandom});
      step     = ($urandom_range(0, 9) == 0) ? 35'({$urandom, $urandom})
               : (1'($urandom) ? 35'd4 : 35'd32);
      @(posedge clk); #1;
      if (load)     m = longint'(load_val);
      else if (inc) m = (m + longint'(step)) % (64'd1 << 35);
      checks++;
      if (shift_val !== 35'(m)) begin
        failures++;
        $display("FAIL k=%0d: %0d vs %0d", k, shift_val, m);
      end
    end
    load = 0; inc = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
