// Body of the end-to-end testbenches of qkd_sync_top. The including module
// sets CW (time-base width), MAX_CYCLES (watchdog) and SYNC_ONLY, instantiates the
// top through the macro QKD_TOP_INST, with or without a parameter list, and
// provides end_sim(), which prints the result line and ends the simulation.
//
// The testbench plays the two host PCs and the classical channel, and uses
// behavioural models of the clock manager's phase-shift port and of the
// optical interferometer (DELAY slots of fiber, a clock-phase error). It
// runs the whole procedure at 2.5 GHz carrier and 312.5 Msymbol/s:
//   1. phase matching: step the clock phase while the interference
//      amplitude rises, step back once when it falls;
//   2. symbol boundary alignment: add 4 to ShiftVal (one RF cycle) until no
//      receiver symbol holds a pulse shorter than a symbol;
//   3. frame synchronization: add 32 (one symbol) until the output
//      alternates symbol by symbol over a whole 256-symbol period;
//   4. sync_achieved: the transmitter sends the pilot on its next wrap, the
//      receiver detects it, both cross over on the following wrap;
//   5. quantum phase: the detected output must be the XNOR of the two
//      qubit registers symbol by symbol (0x8461.. and 0x2E9E.. give 0x5500..);
//   6. sync_request returns both ends to SYNC.
// Every mechanism is counted and one that never happened is a failure.
// With SYNC_ONLY set the run ends after step 3: both ends must then hold
// ARMED for ARMED_HOLD clocks (no wrap yet, so no pilot and no crossover),
// which lets the three alignment stages run at the default 35-bit size.

  import qkd_pkg::*;

  localparam int DELAY = 148;
  localparam int ARMED_HOLD = 20000;

  logic                clk = 0;
  logic                a_rst, b_rst;
  logic [CW-1:0]       a_shift_val;
  logic [255:0]        a_qubit_pattern, a_pilot_pattern, b_qubit_pattern, sync_pattern;
  logic [63:0]         a_gtx_data, b_gtx_data;
  logic [CW-1:0]       a_count, b_count, b_shift_val, b_shift_load_val, b_shift_step;
  alice_state_e        a_state;
  bob_state_e          b_state;
  logic                b_shift_load, b_shift_inc, b_ps_step_req, b_ps_step_inc;
  logic [15:0]         b_pilot_signature;
  logic                b_cin, b_psdone, b_psen, b_psincdec, b_ps_busy, b_ps_step_done;
  logic signed [15:0]  b_phase_steps;
  logic                b_pilot_detected, b_cin_mon;
  logic [5:0]          log_fd, log_bps;
  logic                carrier_en, sync_achieved, sync_request;

  int                  mmcm_phase, mmcm_perr, amplitude;
  logic [63:0]         intf;

  int checks = 0, failures = 0;
  int n_phase_inc = 0, n_phase_dec = 0, n_cycle_shift = 0, n_symbol_shift = 0;
  int n_glitch = 0, n_signature = 0, n_pilot = 0, n_xovr_a = 0, n_xovr_b = 0;
  int n_q_words = 0, n_resync = 0, n_wrap = 0;

  `QKD_TOP_INST

  mmcm_ps_model #(.LATENCY(12)) u_mmcm (
    .clk, .rst(b_rst), .psen(b_psen), .psincdec(b_psincdec), .psdone(b_psdone),
    .phase(mmcm_phase), .protocol_errors(mmcm_perr)
  );

  interferometer_model #(.DELAY(DELAY), .PHASE0(-7)) u_optics (
    .clk, .a_word(a_gtx_data), .b_word(b_gtx_data), .phase(mmcm_phase),
    .intf, .cin(b_cin), .amplitude
  );

  always #5 clk = ~clk;

  initial begin
    #(longint'(MAX_CYCLES) * 10);  // MAX_CYCLES clock periods
    failures++;
    $display("watchdog expired");
    end_sim();
  end

  always @(posedge clk) if (!b_rst && b_count == 0) n_wrap++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  // Receiver symbol index of lane i in the current word.
  function automatic longint unsigned sym_of(int i);
    longint unsigned v;
    v = (longint'(b_count) + longint'(b_shift_val) + i) % (64'd1 << CW);
    return v >> log_bps;
  endfunction

  // True when some receiver symbol in the next nwords words holds a pulse
  // shorter than the symbol (its bits are not all equal).
  task automatic glitchy(input int nwords, output logic g);
    logic prev_bit;
    longint unsigned prev_sym;
    g = 0;
    prev_sym = '1;
    prev_bit = 0;
    for (int w = 0; w < nwords; w++) begin
      for (int i = 0; i < 64; i++) begin
        longint unsigned s;
        s = sym_of(i);
        if (s == prev_sym && intf[i] != prev_bit) g = 1;
        prev_sym = s;
        prev_bit = intf[i];
      end
      step();
    end
  endtask

  // True when the output alternates from symbol to symbol over nwords words.
  task automatic alternating(input int nwords, output logic alt);
    logic prev_bit;
    longint unsigned prev_sym;
    alt = 1;
    prev_sym = '1;
    prev_bit = 0;
    for (int w = 0; w < nwords; w++) begin
      for (int i = 0; i < 64; i++) begin
        longint unsigned s;
        s = sym_of(i);
        if (s != prev_sym) begin
          if ((w > 0 || i > 0) && intf[i] == prev_bit) alt = 0;
          prev_bit = intf[i];
          prev_sym = s;
        end
      end
      step();
    end
  endtask

  task automatic ps_step(input logic inc);
    b_ps_step_req = 1; b_ps_step_inc = inc;
    step();
    b_ps_step_req = 0;
    while (b_ps_busy) step();
    step();
    if (inc) n_phase_inc++; else n_phase_dec++;
  endtask

  task automatic shift_by(input int n);
    b_shift_step = CW'(n); b_shift_inc = 1;
    step();
    b_shift_inc = 0;
    step(); step();
  endtask

  // Sample stream the receiver sees while it sends zeroes and the
  // transmitter a pattern with symbol pairs (2j, 2j+1) equal: ~q[j].
  function automatic logic [15:0] window(logic [255:0] p, int first_sym);
    logic [15:0] w;
    for (int k = 0; k < 16; k++) w[15 - k] = ~p[255 - ((first_sym + 2 * k) % 256)];
    return w;
  endfunction

  initial begin
    logic g, alt, ok;
    logic [127:0] q;
    int a_pilot_seen, first_detect_a_state;
    logic [15:0] first16;

    // Configuration: 2.5 GHz carrier, 312.5 Msymbol/s.
    log_fd = 6'd1; log_bps = 6'd5; carrier_en = 1;
    for (int w = 0; w < 8; w++) begin
      sync_pattern[w*32 +: 32]    = $urandom;
      a_qubit_pattern[w*32 +: 32] = $urandom;
      b_qubit_pattern[w*32 +: 32] = $urandom;
    end
    sync_pattern[255 -: 16]    = 16'hB38E;
    a_qubit_pattern[255 -: 16] = 16'h8461;
    b_qubit_pattern[255 -: 16] = 16'h2E9E;
    // Pilot: 128 random bits, each sent for two symbols; the signature is its
    // first 16 bits as the receiver samples them. Redraw until the signature
    // cannot appear in the sync-pattern samples or the all-ones idle output.
    do begin
      for (int w = 0; w < 4; w++) q[w*32 +: 32] = $urandom;
      for (int n = 0; n < 256; n++) a_pilot_pattern[255 - n] = q[127 - n / 2];
      b_pilot_signature = window(a_pilot_pattern, 0);
      ok = (b_pilot_signature != 16'hFFFF);
      for (int s = 0; s < 256; s++) if (window(sync_pattern, s) == b_pilot_signature) ok = 0;
    end while (!ok);

    a_shift_val = '0; b_shift_load = 0; b_shift_load_val = '0; b_shift_inc = 0;
    b_shift_step = '0; b_ps_step_req = 0; b_ps_step_inc = 0;
    sync_achieved = 0; sync_request = 0;
    a_rst = 1; b_rst = 1;
    repeat (3) step();
    a_rst = 0; b_rst = 0;
    repeat (16) step();
    check(a_state == A_SYNC && b_state == B_SYNC, "both start in SYNC");

    // 1. Phase matching.
    begin
      int best;
      best = amplitude;
      forever begin
        ps_step(1);
        if (amplitude < best) begin ps_step(0); break; end
        best = amplitude;
      end
    end
    check(amplitude == 1000, $sformatf("phase matched (amplitude %0d)", amplitude));
    check(int'(b_phase_steps) == mmcm_phase && mmcm_perr == 0, "phase-step bookkeeping");
    $display("phase matched after %0d up / %0d down steps", n_phase_inc, n_phase_dec);

    // 2. Symbol boundary alignment, one RF cycle at a time.
    for (int k = 0; k < 8; k++) begin
      glitchy(16, g);
      if (!g) break;
      n_glitch++;
      shift_by(4);
      n_cycle_shift++;
    end
    glitchy(64, g);
    check(!g, "symbol boundaries aligned");
    check(((longint'(b_shift_val) + DELAY) % 32) == 0, $sformatf("ShiftVal %0d aligns symbols", b_shift_val));

    // 3. Frame synchronization, one symbol at a time.
    for (int k = 0; k < 300; k++) begin
      alternating(130, alt);
      if (alt) break;
      shift_by(32);
      n_symbol_shift++;
    end
    alternating(260, alt);
    if (alt) n_signature++;
    check(alt, "synchronization signature (alternating output) obtained");
    check(((longint'(b_shift_val) + DELAY) % 8192) == 0, $sformatf("ShiftVal %0d frames the pattern", b_shift_val));
    $display("frame synchronized: ShiftVal %0d after %0d cycle and %0d symbol shifts",
             b_shift_val, n_cycle_shift, n_symbol_shift);

    // 4. Pilot and crossover.
    sync_achieved = 1; step(); sync_achieved = 0;
    check(a_state == A_ARMED && b_state == B_ARMED, "both armed");
    if (SYNC_ONLY) begin
      int n_armed;
      n_armed = 0;
      repeat (ARMED_HOLD) begin
        step();
        if (a_state == A_ARMED && b_state == B_ARMED && !b_pilot_detected) n_armed++;
      end
      check(n_armed == ARMED_HOLD, $sformatf("both held ARMED, no false pilot (%0d of %0d clocks)",
            n_armed, ARMED_HOLD));
      $display("mechanisms: phase+ %0d phase- %0d glitch %0d rf-cycle shifts %0d symbol shifts %0d signature %0d armed-clocks %0d",
               n_phase_inc, n_phase_dec, n_glitch, n_cycle_shift, n_symbol_shift, n_signature, n_armed);
      check(n_phase_inc > 0, "phase increment happened");
      check(n_phase_dec > 0, "phase decrement happened");
      check(n_glitch > 0, "misaligned symbol boundaries were seen");
      check(n_cycle_shift > 0, "RF-cycle shift happened");
      check(n_symbol_shift > 0, "symbol shift happened");
      check(n_signature > 0, "signature seen");
      end_sim();
    end
    // Event-driven waits: the two crossover waits are whole time-base wraps.
    a_pilot_seen = 0;
    while (a_state != A_PILOT) @(a_state);
    a_pilot_seen = 1;
    while (b_state != B_XOVR) @(b_state);
    first_detect_a_state = int'(a_state);
    n_pilot++;
    n_xovr_b++;
    while (a_state != A_XOVR) @(a_state);
    n_xovr_a++;
    while (b_state != B_Q) @(b_state);
    #1;
    check(a_pilot_seen == 1, "transmitter sent the pilot");
    check(first_detect_a_state == int'(A_PILOT) || first_detect_a_state == int'(A_XOVR),
          $sformatf("pilot detected while or just after it was sent (tx state %0d)", first_detect_a_state));
    check(a_state == A_Q, "both cross over to Q on the same word");
    check(b_count == 0 && a_count == 0, "crossover on count 0");

    // 5. Quantum phase: detected output is the XNOR of the qubit registers.
    repeat (8) step();
    first16 = '0;
    for (int w = 0; w < 256; w++) begin
      logic [63:0] e;
      for (int i = 0; i < 64; i++) begin
        int s;
        s = int'(sym_of(i) % 256);
        e[i] = ~(a_qubit_pattern[255 - s] ^ b_qubit_pattern[255 - s]);
        if (s < 16 && (sym_of(i) << log_bps) + 16 ==
            ((longint'(b_count) + longint'(b_shift_val) + i) % (64'd1 << CW)))
          first16[15 - s] = intf[i];
      end
      check(intf == e, $sformatf("qubit interference word %0d", w));
      n_q_words++;
      step();
    end
    check(first16 == 16'h5500, $sformatf("first 16 detected qubit slots %h", first16));

    // 6. Back to SYNC on request.
    sync_request = 1; step(); sync_request = 0;
    check(a_state == A_SYNC && b_state == B_SYNC, "sync_request returns both to SYNC");
    n_resync++;

    $display("mechanisms: phase+ %0d phase- %0d glitch %0d rf-cycle shifts %0d symbol shifts %0d signature %0d pilot %0d xovrA %0d xovrB %0d q-words %0d resync %0d wraps %0d",
             n_phase_inc, n_phase_dec, n_glitch, n_cycle_shift, n_symbol_shift, n_signature,
             n_pilot, n_xovr_a, n_xovr_b, n_q_words, n_resync, n_wrap);
    check(n_phase_inc > 0, "phase increment happened");
    check(n_phase_dec > 0, "phase decrement happened");
    check(n_glitch > 0, "misaligned symbol boundaries were seen");
    check(n_cycle_shift > 0, "RF-cycle shift happened");
    check(n_symbol_shift > 0, "symbol shift happened");
    check(n_signature > 0, "signature seen");
    check(n_pilot > 0, "pilot detected");
    check(n_xovr_a > 0 && n_xovr_b > 0, "both crossover states visited");
    check(n_q_words > 0, "quantum words checked");
    check(n_resync > 0, "resynchronization request");
    check(n_wrap > 0, "time base wrapped");
    end_sim();
  end
