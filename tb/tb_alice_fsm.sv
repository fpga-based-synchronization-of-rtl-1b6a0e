// Testbench for alice_fsm with a 12-bit time base (64 clocks per wrap) and
// log_bps = 2, so the pilot lasts 256 << 2 = 1024 slots = 16 words.
// Checks the state against the count on every clock: ARMED holds until the
// word with count 0, PILOT covers exactly counts 0 .. 1024-64, XOVR runs
// from 1024 to the wrap, Q starts on count 0 and holds until sync_request.
// Also checks the pattern chosen in each state.
module tb_alice_fsm;
  import qkd_pkg::*;
  localparam int CW = 12;
  logic clk = 0, rst, sync_achieved, sync_request;
  logic [CW-1:0] count;
  logic [5:0] log_bps;
  alice_state_e state;
  pat_sel_e pat_sel;
  int checks = 0, failures = 0;
  int seen [5];

  alice_fsm #(.COUNT_W(CW)) dut (.clk, .rst, .sync_achieved, .sync_request,
                                 .count, .log_bps, .state, .pat_sel);

  always #5 clk = ~clk;
  always_ff @(posedge clk) count <= rst ? '0 : count + CW'(64);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @count %0d state %s: %s", count, state.name(), what); end
  endtask

  function automatic pat_sel_e exp_pat(alice_state_e s);
    case (s)
      A_SYNC, A_ARMED: return PAT_SYNC;
      A_PILOT:         return PAT_PILOT;
      A_Q:             return PAT_QUBIT;
      default:         return PAT_ZERO;
    endcase
  endfunction

  initial begin
    alice_state_e exp;
    rst = 1; sync_achieved = 0; sync_request = 0; log_bps = 6'd2;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int round = 0; round < 3; round++) begin
      exp = A_SYNC;
      // Stay in SYNC a random time, then report sync mid-wrap.
      repeat ($urandom_range(3, 90)) begin
        @(posedge clk); #1;
        check(state == A_SYNC, "stays in SYNC");
      end
      sync_achieved = 1; @(posedge clk); #1; sync_achieved = 0;
      exp = A_ARMED;
      for (int k = 0; k < 200; k++) begin
        check(state == exp, $sformatf("expected %s", exp.name()));
        check(pat_sel == exp_pat(state), "pattern select");
        seen[int'(state)]++;
        @(posedge clk); #1;
        case (exp)
          A_ARMED: if (count == 0)    exp = A_PILOT;
          A_PILOT: if (count == 1024) exp = A_XOVR;
          A_XOVR:  if (count == 0)    exp = A_Q;
          default: ;
        endcase
      end
      check(state == A_Q, "reached Q");
      sync_request = 1; @(posedge clk); #1; sync_request = 0;
      check(state == A_SYNC, "back to SYNC");
    end
    for (int s = 1; s < 5; s++) check(seen[s] > 0, $sformatf("state %0d visited", s));
    check(seen[int'(A_PILOT)] == 3 * 16, $sformatf("PILOT lasted %0d words over 3 rounds", seen[int'(A_PILOT)]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
