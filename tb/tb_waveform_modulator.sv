// Testbench for waveform_modulator at its default size (64 lanes, 35-bit
// time base, 256-bit patterns).
//
// Two kinds of checks. Known words: the unmodulated 2.5 GHz carrier from
// count 0 is 0xCCCCCCCCCCCCCCCC (two slots low, two high, lane 0 first), and
// the sync pattern 0xB38E... at 312.5 Msymbol/s inverts the first 32 slots
// only. Reference model: every lane of every word against a bit-level
// computation of carrier, symbol address and pattern bit, over random
// log_fd, log_bps, shift_val, pattern selections and carrier enables.
// Finally one whole pattern period at 2.441 Msymbol/s.
module tb_waveform_modulator;
  import qkd_pkg::*;
  localparam longint unsigned MOD = 64'd1 << 35;

  logic               clk = 0, rst;
  logic [34:0]        shift_val;
  logic [5:0]         log_fd, log_bps;
  pat_sel_e           pat_sel;
  logic               carrier_en;
  logic [255:0]       pats [4];
  logic [34:0]        count;
  logic [63:0]        gtx_data;
  int checks = 0, failures = 0;

  waveform_modulator dut (
    .clk, .rst, .shift_val, .log_fd, .log_bps, .pat_sel, .carrier_en,
    .zero_pattern(pats[0]), .qubit_pattern(pats[1]), .pilot_pattern(pats[2]),
    .sync_pattern(pats[3]), .count, .gtx_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned tb_count;

  function automatic logic [63:0] ref_word(longint unsigned c);
    logic [63:0] w;
    logic [255:0] p;
    p = pats[int'(pat_sel)];
    for (int i = 0; i < 64; i++) begin
      longint unsigned v;
      logic car;
      int sym;
      v   = (c + longint'(shift_val) + i) % MOD;
      car = v[log_fd];
      sym = int'((v >> log_bps) & 255);
      w[i] = p[255 - sym] ^ (car & carrier_en);
    end
    return w;
  endfunction

  task automatic check_word(input string what);
    logic [63:0] e;
    e = ref_word(tb_count);
    checks++;
    if (gtx_data !== e || count !== 35'(tb_count)) begin
      failures++;
      $display("FAIL %s: count %0d (exp %0d) word %h exp %h", what, count, tb_count, gtx_data, e);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
    tb_count = (tb_count + 64) % MOD;
  endtask

  initial begin
    pats[0] = '0;
    for (int k = 1; k < 4; k++)
      for (int w = 0; w < 8; w++) pats[k][w*32 +: 32] = $urandom;
    pats[3][255 -: 16] = 16'hB38E;
    rst = 1; shift_val = '0; log_fd = 6'd1; log_bps = 6'd5;
    pat_sel = PAT_ZERO; carrier_en = 1'b1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    tb_count = 0;
    // Pure 2.5 GHz carrier.
    checks++;
    if (gtx_data !== 64'hCCCC_CCCC_CCCC_CCCC) begin
      failures++; $display("FAIL: carrier word %h", gtx_data);
    end
    // Sync pattern starting 1,0 at 32 slots per symbol: first half inverted.
    pat_sel = PAT_SYNC; #1;
    checks++;
    if (gtx_data !== 64'hCCCC_CCCC_3333_3333) begin
      failures++; $display("FAIL: first BPSK word %h", gtx_data);
    end
    // Shift by one slot moves the carrier by one lane.
    pat_sel = PAT_ZERO; shift_val = 35'd1; #1;
    checks++;
    if (gtx_data !== 64'h6666_6666_6666_6666) begin
      failures++; $display("FAIL: shifted carrier %h", gtx_data);
    end
    // Random configurations, each held for a few words.
    for (int r = 0; r < 400; r++) begin
      log_fd     = 6'($urandom_range(0, 34));
      log_bps    = 6'($urandom_range(0, 27));
      shift_val  = 35'({$urandom, $urandom});
      pat_sel    = pat_sel_e'($urandom_range(0, 3));
      carrier_en = 1'($urandom);
      #1;
      for (int t = 0; t < 8; t++) begin
        check_word($sformatf("run %0d fd %0d bps %0d", r, log_fd, log_bps));
        tick();
      end
    end
    // Time base wrap: long symbols spanning the top address bits.
    log_bps = 6'd27; log_fd = 6'd34; pat_sel = PAT_QUBIT; shift_val = 35'h7_FFFF_FFC0;
    #1;
    for (int t = 0; t < 4; t++) begin check_word("top bits"); tick(); end
    // 2.441 Msymbol/s at 2.5 GHz from a fresh reset: each symbol fills
    // exactly 64 words, and the 256-symbol pattern repeats after 16384 words
    // (104.86 us at 156.25 MHz).
    rst = 1; log_fd = 6'd1; log_bps = 6'd12; shift_val = '0; pat_sel = PAT_SYNC;
    carrier_en = 1'b1;
    @(posedge clk); #1;
    rst = 0; tb_count = 0;
    for (int w = 0; w <= 16384; w++) begin
      logic bit_w;
      bit_w = pats[3][255 - ((w / 64) % 256)];
      checks++;
      if (gtx_data !== (64'hCCCC_CCCC_CCCC_CCCC ^ {64{bit_w}})) begin
        failures++;
        $display("FAIL: 2.441 Msymbol/s word %0d = %h", w, gtx_data);
      end
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
