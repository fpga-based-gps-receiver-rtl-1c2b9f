// gps_receiver_full_tb: end-to-end run of the receiver with every parameter
// at its default: 4 Msps, 4000 samples per millisecond, 8000-sample search
// correlations over 4000 code phases and 100 Doppler bins (one pass is about
// 32 M clocks), eight trackers. The stimulus and checks are in
// gps_receiver_harness: two satellites are acquired, tracked and locked, and
// the time of week and week number are decoded and shown.
`timescale 1ns/1ps
module gps_receiver_full_tb;
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

  gps_receiver_top dut (.*);

  gps_receiver_harness #(.SPMS(4000), .FS_R(4.0e6), .JUNK_BITS(115), .AMP(0.5), .MAX_SAMPLES(64'd30_000_000)) harness (.*);
endmodule
