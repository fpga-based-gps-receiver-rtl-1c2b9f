// gps_tracker_tb: closed-loop test of one tracking channel at full size
// (4000 samples per ms). A noisy 1-bit signal of PRN 7 (amplitude 0.5 against
// unit noise) at +1590 Hz with code start 1234 samples after the epoch and
// random NAV bits is tracked from a hand-over that is 90 Hz (nearly half a
// search bin) and one sample off. Checks: busy/state flow, lock
// within 100 ms of tracking, code phase and Doppler converge, the NAV symbols
// follow the transmitted bits (up to the Costas sign ambiguity).
`timescale 1ns/1ps
module gps_tracker_tb;
  import gps_pkg::*;
  import gps_tb_pkg::*;

  localparam int SPMS = 4000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic sample_valid = 0, sync = 0, i_neg = 0, q_neg = 0, new_sat = 0;
  sat_info_t info;
  logic busy, locked, nav_valid, nav_sym;
  sat_id_t sat_id;
  code_phase_t cur_phase;
  doppler_t cur_doppler;
  logic signed [13:0] i_arm, q_arm;

  gps_tracker dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  sat_sig sv;
  longint n = 0;
  int ms_tracked = 0, lock_ms = -1, sym_ok = 0, sym_bad = 0, pol = -1;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sv = new(7, 1234, 1590.0, 0.5);
    for (int k = 0; k < 64; k++) sv.bits.push_back(1'($urandom_range(0, 1)));
    info = '{sat_id: 5'd6, phase: 12'd1233, doppler: 16'sd1500};
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(!busy, "idle after reset");
    new_sat <= 1;
    @(posedge clk);
    new_sat <= 0;
    @(posedge clk);
    check(busy && sat_id == 5'd6, "busy with the handed-over satellite");
    // stream 400 ms of samples, one per clock
    for (int s = 0; s < 400 * SPMS; s++) begin
      real re, im, a, ph;
      re = gnoise(); im = gnoise();
      a  = sv.amp_at(n, SPMS);
      ph = sv.phase_at(n, 4.0e6);
      re += a * $cos(ph);
      im += a * $sin(ph);
      sample_valid <= 1;
      i_neg <= (re < 0.0);
      q_neg <= (im < 0.0);
      sync  <= (n % SPMS == 0);
      n++;
      @(posedge clk);
      if (nav_valid) begin
        ms_tracked++;
        if (locked && lock_ms < 0) lock_ms = ms_tracked;
        if (ms_tracked % 20 == 0) $display("ms %0d I %0d Q %0d dop %0d ph %0d lk %0d", ms_tracked, i_arm, q_arm, cur_doppler, cur_phase, locked);
        if (ms_tracked > 200) begin
          longint rel;
          int bi, nb;
          logic tx;
          // the symbol dumped now covers the code period that just ended
          rel = n - 4 - 1234 + 1000 * longint'(SPMS);
          nb  = sv.bits.size();
          bi  = int'(((rel / SPMS) / 20) % nb);
          tx  = sv.bits[bi];
          if (pol < 0) pol = int'(nav_sym ^ tx);
          if ((nav_sym ^ tx) == pol[0]) sym_ok++; else sym_bad++;
        end
      end
    end
    $display("lock after %0d ms, phase %0d, doppler %0d, symbols ok %0d bad %0d",
             lock_ms, cur_phase, cur_doppler, sym_ok, sym_bad);
    check(lock_ms > 0 && lock_ms <= 100, "locks within 100 ms");
    check(locked, "still locked at the end");
    check(cur_phase >= 1233 && cur_phase <= 1235, "code phase converged");
    check(cur_doppler >= 1575 && cur_doppler <= 1605, "Doppler converged");
    check(sym_ok > 150 && sym_bad <= 2, "NAV symbols follow the data");
    check(busy, "channel still busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
