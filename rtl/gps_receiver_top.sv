// gps_receiver_top: FPGA GPS receiver, from 1-bit I/Q samples to GPS time.
//
// Data flow: adc_interface brings the external 1-bit I/Q samples (about
// 4 Msps) into the clock domain and marks millisecond epochs. td_search
// captures 3 ms of samples and searches all 32 satellites in parallel over
// code phase and Doppler. handoff_controller hands each newly detected,
// untracked satellite to a free one of NUM_TRACKERS gps_tracker channels.
// Each tracker locks its code (early-late DLL) and carrier (Costas loop) and
// streams 1 ms NAV symbols to its own nav_decoder. The first decoder to
// produce time of week / week number drives time_display, whose day, hour,
// minute, year and month are shown by seven_seg together with the status of
// the tracker selected by disp_sel.
//
// Clock: one system clock (100 MHz on the board); adc_clk is asynchronous and
// must be slower than a quarter of it. Reset is synchronous, active high.
module gps_receiver_top
  import gps_pkg::*;
#(
  parameter int unsigned NUM_TRACKERS   = 8,
  parameter int unsigned SAMPLES_PER_MS = 4000,
  parameter int unsigned FS             = 4_000_000,
  parameter int unsigned N_CORR         = 8000,
  parameter int unsigned N_BINS         = 100,
  parameter int unsigned BIN_HZ         = 200,
  parameter int unsigned THRESHOLD      = 256000,
  parameter int unsigned STABLE_MS      = 40,
  parameter int unsigned WEEK_ERA       = 1,
  parameter int unsigned SCAN_BITS      = 17
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              adc_i,
  input  logic                              adc_q,
  input  logic                              adc_clk,
  input  logic [3:0]                        search_range,
  input  logic signed [3:0]                 search_offset,
  input  logic [1:0]                        disp_mode,
  input  logic [2:0]                        disp_sel,
  output logic [6:0]                        seg,
  output logic [7:0]                        an,
  output logic [NUM_SATS-1:0]               detected,
  output logic                              search_pass_done,
  output logic                              dispatch_new,
  output logic                              dispatch_drop,
  output logic [NUM_TRACKERS-1:0]           trk_busy,
  output logic [NUM_TRACKERS-1:0]           trk_locked,
  output sat_id_t [NUM_TRACKERS-1:0]        trk_sat,
  output code_phase_t [NUM_TRACKERS-1:0]    trk_phase,
  output doppler_t [NUM_TRACKERS-1:0]       trk_doppler,
  output logic [NUM_TRACKERS-1:0]           frame_found,
  output logic                              time_valid,
  output logic [20:0]                       tow_seconds,
  output logic [10:0]                       week_number,
  output logic [2:0]                        day,
  output logic [4:0]                        hour,
  output logic [5:0]                        minute,
  output logic [10:0]                       year,
  output logic [3:0]                        month
);

  // ---------------- sample input ----------------
  logic sample_valid, i_neg, q_neg, sync;
  logic [$clog2(SAMPLES_PER_MS)-1:0] sample_count;

  adc_interface #(.SAMPLES_PER_MS(SAMPLES_PER_MS)) u_adc (
    .clk(clk), .rst(rst), .adc_i(adc_i), .adc_q(adc_q), .adc_clk(adc_clk),
    .sample_valid(sample_valid), .i_neg(i_neg), .q_neg(q_neg), .sync(sync),
    .sample_count(sample_count)
  );

  // ---------------- acquisition ----------------
  sat_id_t     rd_sat, consume_sat;
  code_phase_t rd_phase;
  doppler_t    rd_doppler;
  logic        consume, searching;

  td_search #(
    .N_CORR(N_CORR), .N_PHASE(SAMPLES_PER_MS), .N_BINS(N_BINS), .BIN_HZ(BIN_HZ),
    .FS(FS), .THRESHOLD(THRESHOLD)
  ) u_search (
    .clk(clk), .rst(rst), .sample_valid(sample_valid), .sync(sync),
    .i_neg(i_neg), .q_neg(q_neg),
    .search_range(search_range), .search_offset(search_offset),
    .detected(detected), .rd_sat(rd_sat), .rd_phase(rd_phase), .rd_doppler(rd_doppler),
    .consume(consume), .consume_sat(consume_sat),
    .searching(searching), .pass_done(search_pass_done)
  );

  // ---------------- dispatch ----------------
  logic [NUM_TRACKERS-1:0] new_sat;
  sat_info_t               info;
  logic                    dropped;

  assign dispatch_new  = |new_sat;
  assign dispatch_drop = dropped;

  handoff_controller #(.NUM_TRACKERS(NUM_TRACKERS)) u_dispatch (
    .clk(clk), .rst(rst), .detected(detected),
    .rd_sat(rd_sat), .rd_phase(rd_phase), .rd_doppler(rd_doppler),
    .consume(consume), .consume_sat(consume_sat),
    .trk_busy(trk_busy), .trk_sat(trk_sat),
    .new_sat(new_sat), .info(info), .dropped(dropped)
  );

  // ---------------- tracking and NAV decoding ----------------
  logic [NUM_TRACKERS-1:0] nav_valid, nav_sym;
  logic [NUM_TRACKERS-1:0] tow_v, week_v;
  logic [20:0]             tow_s [NUM_TRACKERS];
  logic [10:0]             week_s [NUM_TRACKERS];

  for (genvar t = 0; t < int'(NUM_TRACKERS); t++) begin : g_ch
    logic signed [13:0] i_arm, q_arm;
    logic               bit_valid, nav_bit, bit_synced;

    gps_tracker #(.SAMPLES_PER_MS(SAMPLES_PER_MS), .FS(FS)) u_trk (
      .clk(clk), .rst(rst), .sample_valid(sample_valid), .sync(sync),
      .i_neg(i_neg), .q_neg(q_neg), .new_sat(new_sat[t]), .info(info),
      .busy(trk_busy[t]), .sat_id(trk_sat[t]), .cur_phase(trk_phase[t]),
      .cur_doppler(trk_doppler[t]), .locked(trk_locked[t]),
      .nav_valid(nav_valid[t]), .nav_sym(nav_sym[t]), .i_arm(i_arm), .q_arm(q_arm)
    );

    nav_decoder #(.STABLE_MS(STABLE_MS), .WEEK_ERA(WEEK_ERA)) u_nav (
      .clk(clk), .rst(rst), .enable(trk_locked[t]),
      .nav_valid(nav_valid[t]), .nav_sym(nav_sym[t]),
      .bit_valid(bit_valid), .nav_bit(nav_bit), .bit_synced(bit_synced),
      .frame_found(frame_found[t]),
      .tow_valid(tow_v[t]), .seconds(tow_s[t]), .week_valid(week_v[t]), .week(week_s[t])
    );
  end

  // first channel with news drives the clock display
  logic        tow_any, week_any;
  logic [20:0] tow_pick;
  logic [10:0] week_pick;
  always_comb begin
    tow_any = 1'b0; week_any = 1'b0; tow_pick = '0; week_pick = '0;
    for (int t = NUM_TRACKERS - 1; t >= 0; t--) begin
      if (tow_v[t])  begin tow_any  = 1'b1; tow_pick  = tow_s[t];  end
      if (week_v[t]) begin week_any = 1'b1; week_pick = week_s[t]; end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tow_seconds <= '0;
      week_number <= '0;
    end else begin
      if (tow_any)  tow_seconds <= tow_pick;
      if (week_any) week_number <= week_pick;
    end
  end

  time_display u_time (
    .clk(clk), .rst(rst), .tow_valid(tow_any), .seconds(tow_pick),
    .week_valid(week_any), .week(week_pick),
    .day(day), .hour(hour), .minute(minute), .year(year), .month(month), .valid(time_valid)
  );

  // ---------------- display ----------------
  logic [2:0] sel;
  assign sel = (int'(disp_sel) < int'(NUM_TRACKERS)) ? disp_sel : 3'd0;

  seven_seg #(.SCAN_BITS(SCAN_BITS)) u_seg (
    .clk(clk), .rst(rst), .mode(disp_mode),
    .day(day), .hour(hour), .minute(minute), .year(year), .month(month),
    .sat_id(trk_sat[sel]), .lock(trk_locked[sel]),
    .doppler(trk_doppler[sel]), .phase(trk_phase[sel]),
    .seg(seg), .an(an)
  );

endmodule
