// gps_receiver_harness: stimulus and checks for an end-to-end run of
// gps_receiver_top; the testbench that instantiates it also instantiates the
// receiver and joins the two.
//
// It plays a noisy 1-bit recording of two satellites (amplitude AMP against
// unit noise) through the ADC pins, one sample per four system clocks:
// PRN 5 with code start 300*SPMS/1023 samples and PRN 20 with 777*SPMS/1023
// samples after the epoch, Doppler +1060 Hz and +940 Hz, code delay growing
// by one sample per second of signal (so the DLL has to move), and a NAV
// stream carrying subframe 1 with TOW count 53233 and week 699. The search
// covers the +1 kHz bin. It then checks that both satellites are acquired,
// handed to trackers 0 and 1 and locked, and that the decoded time reaches
// the display: day 3 (Wednesday) 16:43, January 2013, week 1723 in the second
// 1024-week era. Every mechanism is counted and must occur at least once:
// search pass, ping-pong capture (a second pass), hand-over, discard of an
// already tracked satellite, lock, DLL code step, frame sync, time-of-week
// and week decode, display conversion.
`timescale 1ns/1ps
module gps_receiver_harness #(
  parameter int  SPMS      = 4000,
  parameter real FS_R      = 4.0e6,
  parameter int  JUNK_BITS = 115,
  parameter real AMP       = 0.5,   // carrier amplitude of each satellite, noise sigma = 1
  parameter longint MAX_SAMPLES = 64'd30_000_000
) (
  output logic        clk,
  output logic        rst,
  output logic        adc_i,
  output logic        adc_q,
  output logic        adc_clk,
  output logic [3:0]  search_range,
  output logic signed [3:0] search_offset,
  output logic [1:0]  disp_mode,
  output logic [2:0]  disp_sel,
  input  logic [6:0]  seg,
  input  logic [7:0]  an,
  input  logic [31:0] detected,
  input  logic        search_pass_done,
  input  logic        dispatch_new,
  input  logic        dispatch_drop,
  input  logic [7:0]  trk_busy,
  input  logic [7:0]  trk_locked,
  input  logic [7:0][4:0]  trk_sat,
  input  logic [7:0][11:0] trk_phase,
  input  logic [7:0][15:0] trk_doppler,
  input  logic [7:0]  frame_found,
  input  logic        time_valid,
  input  logic [20:0] tow_seconds,
  input  logic [10:0] week_number,
  input  logic [2:0]  day,
  input  logic [4:0]  hour,
  input  logic [5:0]  minute,
  input  logic [10:0] year,
  input  logic [3:0]  month
);
  import gps_tb_pkg::*;

  initial clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_pass = 0, n_new = 0, n_drop = 0, n_lock = 0, n_step = 0, n_frame = 0;
  int n_timev = 0, n_pingpong = 0;
  logic [7:0] lk_q = 0, ff_q = 0, bu_q = 0;
  logic [11:0] ph_q [2];
  logic [31:0] det_q = 0;
  bit done_run = 0;
  int first_pass_cyc = -1;
  longint cyc = 0;

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (search_pass_done) begin
      n_pass++;
      $display("search pass %0d done at clock %0d", n_pass, cyc);
      if (first_pass_cyc < 0) first_pass_cyc = int'(cyc);
    end
    if (dispatch_new)  n_new++;
    if (dispatch_drop) n_drop++;
    for (int t = 0; t < 8; t++) begin
      if (trk_locked[t] && !lk_q[t]) n_lock++;
      if (frame_found[t] && !ff_q[t]) n_frame++;
    end
    for (int t = 0; t < 2; t++) begin
      if (trk_locked[t] && lk_q[t] && trk_phase[t] != ph_q[t]) n_step++;
      ph_q[t] = trk_phase[t];
    end
    if (time_valid) n_timev++;
    if (trk_busy != bu_q || trk_locked != lk_q)
      $display("clock %0d: busy %b locked %b", cyc, trk_busy, trk_locked);
    bu_q <= trk_busy;
    lk_q <= trk_locked;
    ff_q <= frame_found;
  end

  initial begin
    #(MAX_SAMPLES * 40 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sat_sig sa, sb;
  longint n = 0;
  int pa, pb;

  initial begin
    pa = 300 * SPMS / 1023;
    pb = 777 * SPMS / 1023;
    sa = new(5, pa, 1060.0, AMP);
    sb = new(20, pb, 940.0, AMP);
    sa.drift = 1.0 / FS_R;
    sb.drift = 1.0 / FS_R;
    for (int k = 0; k < 50 + JUNK_BITS; k++) sa.bits.push_back(1'($urandom_range(0, 1)));
    push_subframe1(sa.bits, 17'd53233, 10'd699);
    for (int k = 0; k < 50 + JUNK_BITS + 5; k++) sb.bits.push_back(1'($urandom_range(0, 1)));
    push_subframe1(sb.bits, 17'd53233, 10'd699);
    rst = 1; adc_i = 0; adc_q = 0; adc_clk = 0;
    search_range = 4'd0; search_offset = 4'sd1; disp_mode = 2'd0; disp_sel = 3'd0;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    while (!done_run && n < MAX_SAMPLES) begin
      real re, im;
      re = gnoise(); im = gnoise();
      re += sa.amp_at(n, SPMS) * $cos(sa.phase_at(n, FS_R)) + sb.amp_at(n, SPMS) * $cos(sb.phase_at(n, FS_R));
      im += sa.amp_at(n, SPMS) * $sin(sa.phase_at(n, FS_R)) + sb.amp_at(n, SPMS) * $sin(sb.phase_at(n, FS_R));
      adc_i <= (re < 0.0); adc_q <= (im < 0.0);
      @(posedge clk); @(posedge clk);
      adc_clk <= 1;
      @(posedge clk); @(posedge clk);
      adc_clk <= 0;
      n++;
      if (n % (SPMS * 250) == 0)
        $display("%0d ms: passes %0d busy %b locked %b frame %b tow %0d week %0d",
                 n / SPMS, n_pass, trk_busy, trk_locked, frame_found, tow_seconds, week_number);
      if (week_number != 0 && n_timev >= 2) done_run = 1;
    end
    repeat (200) @(posedge clk);
    $display("samples %0d, first pass at clock %0d", n, first_pass_cyc);
    $display("tracker 0: sat %0d phase %0d dop %0d; tracker 1: sat %0d phase %0d dop %0d",
             trk_sat[0], trk_phase[0], $signed(trk_doppler[0]), trk_sat[1], trk_phase[1], $signed(trk_doppler[1]));
    for (int t = 0; t < 8; t++)
      if (trk_busy[t]) $display("tracker %0d: PRN %0d phase %0d Doppler %0d locked %b",
                                t, trk_sat[t] + 1, trk_phase[t], $signed(trk_doppler[t]), trk_locked[t]);
    check(trk_busy[1:0] == 2'b11 && trk_sat[0] == 5'd4 && trk_sat[1] == 5'd19, "PRN 5 on tracker 0, PRN 20 on tracker 1");
    check(trk_busy[7:2] == 0, "no other tracker in use");
    check(trk_locked[1:0] == 2'b11, "both trackers locked");
    check($signed(trk_doppler[0]) >= 1045 && $signed(trk_doppler[0]) <= 1075, "tracker 0 Doppler");
    check($signed(trk_doppler[1]) >= 925 && $signed(trk_doppler[1]) <= 955, "tracker 1 Doppler");
    check(int'(trk_phase[0]) >= pa + int'(real'(n) / FS_R) - 1 && int'(trk_phase[0]) <= pa + int'(real'(n) / FS_R) + 2, "tracker 0 code phase follows the drift");
    check(tow_seconds == 21'(53233 * 6), "time of week decoded");
    check(week_number == 11'd1723, "week number decoded");
    check(day == 3'd3 && hour == 5'd16 && minute == 6'd43, $sformatf("display time %0d %0d:%0d", day, hour, minute));
    check(year == 11'd2013 && month == 4'd1, $sformatf("display date %0d/%0d", year, month));
    $display("mechanisms: pass %0d new %0d drop %0d lock %0d dll-step %0d frame %0d timeconv %0d",
             n_pass, n_new, n_drop, n_lock, n_step, n_frame, n_timev);
    check(n_pass >= 2, "ping-pong: a second search pass on the other bank");
    check(n_new >= 2, "hand-over");
    check(n_drop >= 1, "already tracked satellite discarded");
    check(n_lock >= 2, "lock");
    check(n_step >= 1, "DLL code step");
    check(n_frame >= 1, "frame sync");
    check(n_timev >= 2, "display conversions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
