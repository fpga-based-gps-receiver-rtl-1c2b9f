// gps_receiver_top_tb: end-to-end run of the receiver at a reduced size:
// 1023 samples per millisecond (fs = 1.023 MHz, one sample per chip) and
// 2046-sample search correlations, so one search pass takes about 2.1 M
// clocks. With one sample per chip the 1 ms correlations gain 6 dB less than
// at 4 Msps, so the satellites are made 6 dB stronger. The stimulus and checks are in gps_receiver_harness.
`timescale 1ns/1ps
module gps_receiver_top_tb;
  import gps_pkg::*;
  logic clk, rst, adc_i, adc_q, adc_clk;
  logic [3:0] search_range;
  logic signed [3:0] search_offset;
  logic [1:0] disp_mode;
  logic [2:0] disp_sel;
  logic [6:0] seg;
  logic [7:0] an;
  logic [31:0] detected;
  logic search_pass_done, dispatch_new, dispatch_drop, time_valid;
  logic [7:0] trk_busy, trk_locked, frame_found;
  sat_id_t [7:0] trk_sat;
  code_phase_t [7:0] trk_phase;
  doppler_t [7:0] trk_doppler;
  logic [20:0] tow_seconds;
  logic [10:0] week_number, year;
  logic [2:0] day;
  logic [4:0] hour;
  logic [5:0] minute;
  logic [3:0] month;

  gps_receiver_top #(
    .SAMPLES_PER_MS(1023), .FS(1_023_000), .N_CORR(2046), .THRESHOLD(2046 * 32), .SCAN_BITS(4)
  ) dut (.*);

  gps_receiver_harness #(.SPMS(1023), .FS_R(1.023e6), .JUNK_BITS(45), .AMP(1.0), .MAX_SAMPLES(64'd6_000_000)) harness (.*);
endmodule
