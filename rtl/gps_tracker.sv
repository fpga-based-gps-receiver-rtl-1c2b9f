// gps_tracker: one tracking channel (the design has eight).
//
// Control (the track controller): WAITING_INFO until the dispatcher hands over
// a satellite (new_sat with PRN, code phase and Doppler), then WAITING_SYNC
// until the next millisecond epoch, where the local code counter starts at
// the handed-over phase so that the code is properly referenced, then
// TRACKING. A channel that stays unlocked for LOSS_MS milliseconds returns to
// WAITING_INFO and becomes free again (this release rule is this design's).
//
// Datapath per sample: carrier wipe-off with a 1-bit NCO, then three
// integrate-and-dump correlators fed with the early, prompt and late code
// (code index + HALF, +0, -HALF samples, HALF = half a chip = 2 samples at
// 4 Msps), read from a 32-bit-wide C/A ROM (one bit per PRN, bit selected by
// the satellite id). Each integration covers one local code period (1 ms).
//
// Once per millisecond, from the dumped sums:
//  * DLL (early-late gate): err = |late|^2 - |early|^2. If err exceeds
//    |prompt|^2 >> DLL_SHIFT the local code is delayed by one sample (code
//    counter held once), if it is below minus that it is advanced by one
//    sample. Late > early means the incoming code lags, so the reported phase
//    grows.
//  * Costas loop: the prompt I*Q product (28 bits) is normalised by the
//    square of a power of two near |I|+|Q| (a simple AGC of this design),
//    low-pass filtered (first order, LPF_SHIFT) and fed back both to the NCO
//    frequency (shift KF_SH) and, as the document describes, directly to the
//    NCO phase (shift KP_SHIFT). The gains are this design's.
//  * Lock: an up/down counter counts milliseconds with |I| > 2|Q| and
//    |I| >= LOCK_MIN; locked while it is at least LOCK_N.
//  * NAV output: the sign of the prompt I sum (nav_sym, 1 = negative) with a
//    one-cycle nav_valid strobe.
// cur_phase (the sample offset of code chip 0 after the epoch) is refreshed at
// every epoch; cur_doppler = fcw * FS / 2^32 in Hz.
//
// Timing: one sample per sample_valid (at most one per clock); the loop
// updates take effect three clocks after the last sample of a millisecond.
module gps_tracker
  import gps_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_MS = 4000,
  parameter int unsigned FS             = 4_000_000,
  parameter int unsigned DLL_SHIFT      = 3,
  parameter int unsigned LPF_SHIFT      = 1,
  parameter int unsigned KP_SHIFT       = 17,
  parameter int unsigned LOCK_N         = 8,
  parameter int unsigned LOCK_MIN       = SAMPLES_PER_MS / 32,
  parameter int unsigned LOSS_MS        = 1000
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_valid,
  input  logic               sync,
  input  logic               i_neg,
  input  logic               q_neg,
  input  logic               new_sat,
  input  sat_info_t          info,
  output logic               busy,
  output sat_id_t            sat_id,
  output code_phase_t        cur_phase,
  output doppler_t           cur_doppler,
  output logic               locked,
  output logic               nav_valid,
  output logic               nav_sym,
  output logic signed [13:0] i_arm,
  output logic signed [13:0] q_arm
);

  localparam int unsigned NS     = SAMPLES_PER_MS;  // samples per code period
  localparam int unsigned CW     = $clog2(NS);
  localparam int unsigned HALF   = ((NS + CA_CHIPS) / (2 * CA_CHIPS) > 0) ? (NS + CA_CHIPS) / (2 * CA_CHIPS) : 1;
  localparam int          KF_SH  = int'($clog2(NS)) - 11;
  localparam longint      HZ2FCW = ((longint'(1) << 48) + longint'(FS) / 2) / longint'(FS);

  typedef enum logic [1:0] {WAITING_INFO, WAITING_SYNC, TRACKING} state_e;
  state_e state;

  // ---------------- stage 0: sample, code index, carrier ----------------
  logic [CW-1:0] idx, idx_e, idx_l;
  logic          proc, last0, first0, start_int;
  logic          slip_hold, slip_adv;
  logic [31:0]   fcw;
  logic          adj_en;
  logic [31:0]   adj;
  logic          cos_neg, sin_neg;
  logic [31:0]   nco_phase;

  assign proc  = sample_valid && (state == TRACKING || (state == WAITING_SYNC && sync));
  assign last0 = (idx == CW'(NS - 1));
  assign first0 = start_int;
  assign idx_e = (idx + CW'(HALF) >= CW'(NS)) ? idx + CW'(HALF) - CW'(NS) : idx + CW'(HALF);
  assign idx_l = (idx < CW'(HALF)) ? idx + CW'(NS) - CW'(HALF) : idx - CW'(HALF);

  carrier_nco u_nco (
    .clk(clk), .rst(rst), .clear(new_sat && state == WAITING_INFO), .en(proc), .fcw(fcw),
    .adj_en(adj_en), .adj(adj), .phase(nco_phase), .cos_neg(cos_neg), .sin_neg(sin_neg)
  );

  logic [2:0][NUM_SATS-1:0] rom_q;
  ca_code_rom #(.DEPTH(NS), .SAMPLES_PER_MS(NS), .N_RD(3)) u_rom (
    .clk(clk), .addr({idx_l, idx, idx_e}), .data(rom_q)
  );

  logic signed [1:0] w_re, w_im;
  cmplx_mult u_mult (
    .i_neg(i_neg), .q_neg(q_neg), .cos_neg(cos_neg), .sin_neg(sin_neg), .re(w_re), .im(w_im)
  );

  // ---------------- stage 1: correlate ----------------
  logic              proc_d, first_d, last_d;
  logic signed [1:0] re_d, im_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      proc_d <= 1'b0; first_d <= 1'b0; last_d <= 1'b0; re_d <= '0; im_d <= '0;
    end else begin
      proc_d  <= proc;
      first_d <= first0;
      last_d  <= last0;
      re_d    <= w_re;
      im_d    <= w_im;
    end
  end

  logic signed [13:0] s_re [3];
  logic signed [13:0] s_im [3];
  logic [27:0]        s_sq [3];
  logic [2:0]         s_done;
  for (genvar k = 0; k < 3; k++) begin : g_corr   // 0 early, 1 prompt, 2 late
    corr_accumulator #(.ACC_W(14)) u_acc (
      .clk(clk), .rst(rst), .en(proc_d), .first(first_d), .last(last_d),
      .code_neg(rom_q[k][sat_id]), .re(re_d), .im(im_d),
      .sum_re(s_re[k]), .sum_im(s_im[k]), .abs_sq(s_sq[k]), .done(s_done[k])
    );
  end

  // ---------------- stage 2: loop filters, once per millisecond ----------------
  logic signed [13:0] pi, pq;
  logic [14:0]        mag;
  logic signed [27:0] iq;
  logic signed [47:0] e_norm;
  logic signed [31:0] lpf, lpf_next, e;
  logic signed [28:0] dll_err;
  logic signed [28:0] dll_thr;
  logic               good;
  int                 msb;

  always_comb begin
    pi  = s_re[1];
    pq  = s_im[1];
    mag = 15'(pi < 0 ? -pi : pi) + 15'(pq < 0 ? -pq : pq);
    iq  = 28'(pi) * 28'(pq);
    msb = 0;
    for (int b = 0; b < 15; b++) if (mag[b]) msb = b;
    if (2 * msb > 13) e_norm = 48'(iq) >>> (2 * msb - 13);
    else              e_norm = 48'(iq) <<< (13 - 2 * msb);
    e        = e_norm[31:0];
    lpf_next = lpf + ((e - lpf) >>> LPF_SHIFT);
    dll_err  = signed'({1'b0, s_sq[2]}) - signed'({1'b0, s_sq[0]});
    dll_thr  = signed'({1'b0, s_sq[1] >> DLL_SHIFT});
    good     = (15'(pi < 0 ? -pi : pi) > 2 * 15'(pq < 0 ? -pq : pq)) &&
               (15'(pi < 0 ? -pi : pi) >= 15'(LOCK_MIN));
  end

  function automatic logic [31:0] kf_scale(input logic signed [31:0] v);
    if (KF_SH >= 0) return v >>> KF_SH;
    else            return v <<< (-KF_SH);
  endfunction

  logic [3:0]  lock_cnt;
  logic        settled;
  logic [$clog2(LOSS_MS+1)-1:0] loss_cnt;
  logic signed [DOP_W+48-1:0]  fcw_init;
  logic signed [63:0]          dop_wide;

  assign fcw_init = (DOP_W+48)'(info.doppler) * (DOP_W+48)'(HZ2FCW);
  assign dop_wide = (64'(signed'(fcw)) * 64'(FS)) >>> 32;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= WAITING_INFO;
      idx <= '0; start_int <= 1'b0; slip_hold <= 1'b0; slip_adv <= 1'b0;
      fcw <= '0; adj_en <= 1'b0; adj <= '0; lpf <= '0;
      sat_id <= '0; cur_phase <= '0; cur_doppler <= '0;
      lock_cnt <= '0; locked <= 1'b0; settled <= 1'b0; loss_cnt <= '0;
      nav_valid <= 1'b0; nav_sym <= 1'b0; i_arm <= '0; q_arm <= '0;
    end else begin
      adj_en    <= 1'b0;
      nav_valid <= 1'b0;
      cur_doppler <= dop_wide[DOP_W-1:0];

      case (state)
        WAITING_INFO: if (new_sat) begin
          sat_id    <= info.sat_id;
          cur_phase <= info.phase;
          idx       <= (info.phase == '0) ? '0 : CW'(NS) - CW'(info.phase);
          fcw       <= fcw_init[16 +: 32];
          lpf       <= '0;
          lock_cnt  <= '0;
          locked    <= 1'b0;
          settled   <= 1'b0;
          loss_cnt  <= '0;
          slip_hold <= 1'b0;
          slip_adv  <= 1'b0;
          start_int <= 1'b1;
          state     <= WAITING_SYNC;
        end
        WAITING_SYNC: if (proc) state <= TRACKING;
        default: ;
      endcase

      // code counter
      if (proc) begin
        if (sync) cur_phase <= (idx == '0) ? '0 : PHASE_W'(CW'(NS) - idx);
        start_int <= last0;
        if (slip_hold && idx < CW'(NS - 2)) begin
          slip_hold <= 1'b0;
        end else if (slip_adv && idx < CW'(NS - 3)) begin
          slip_adv <= 1'b0;
          idx      <= idx + CW'(2);
        end else begin
          idx <= last0 ? '0 : idx + 1'b1;
        end
      end

      // millisecond update
      if (s_done[1] && state == TRACKING) begin
        i_arm     <= pi;
        q_arm     <= pq;
        settled   <= 1'b1;
        if (settled) begin
          nav_valid <= 1'b1;
          nav_sym   <= pi[13];
          // Costas loop
          lpf    <= lpf_next;
          fcw    <= fcw + kf_scale(lpf_next);
          adj    <= lpf_next <<< KP_SHIFT;
          adj_en <= 1'b1;
          // early-late gate
          if (dll_err > dll_thr)       slip_hold <= 1'b1;
          else if (dll_err < -dll_thr) slip_adv  <= 1'b1;
          // lock detector
          if (good && lock_cnt != 4'hF) lock_cnt <= lock_cnt + 1'b1;
          else if (!good && lock_cnt != 4'h0) lock_cnt <= lock_cnt - 1'b1;
          locked <= good ? (5'(lock_cnt) + 5'd1 >= 5'(LOCK_N)) : (5'(lock_cnt) > 5'(LOCK_N));
          // loss of lock releases the channel
          if (locked) loss_cnt <= '0;
          else if (loss_cnt == ($clog2(LOSS_MS+1))'(LOSS_MS - 1)) begin
            state  <= WAITING_INFO;
            locked <= 1'b0;
          end else loss_cnt <= loss_cnt + 1'b1;
        end
      end
    end
  end

  assign busy = (state != WAITING_INFO);

endmodule
