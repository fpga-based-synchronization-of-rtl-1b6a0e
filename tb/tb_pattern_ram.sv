// Testbench for pattern_ram: random 256-bit contents, every address read and
// compared with the most-significant-bit-first order, plus the printed pattern
// start 0xB38E read bit by bit.
module tb_pattern_ram;
  logic [255:0] contents;
  logic [7:0]   addr;
  logic         data;
  int checks = 0, failures = 0;

  pattern_ram dut (.contents, .addr, .data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] head;
    for (int r = 0; r < 4; r++) begin
      for (int w = 0; w < 8; w++) contents[w*32 +: 32] = $urandom;
      for (int a = 0; a < 256; a++) begin
        addr = 8'(a); #1;
        checks++;
        if (data !== contents[255 - a]) begin
          failures++;
          $display("FAIL: addr %0d read %0b", a, data);
        end
      end
    end
    contents = {16'hB38E, 240'h0};
    head = '0;
    for (int a = 0; a < 16; a++) begin
      addr = 8'(a); #1;
      head = {head[14:0], data};
    end
    checks++;
    if (head != 16'hB38E) begin failures++; $display("FAIL: head %h", head); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
