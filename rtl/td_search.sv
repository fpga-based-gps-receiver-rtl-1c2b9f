// td_search: time-domain acquisition of all 32 GPS satellites in parallel.
//
// Capture: on a millisecond epoch (sync) the search starts writing
// N_CORR + N_PHASE consecutive samples (12000 = 3 ms at 4 Msps) into one of two
// sample_buffer banks. The other bank can be searched meanwhile (ping-pong);
// a bank is refilled once its search pass has finished. Because every capture
// starts on an epoch, a code phase found in a capture is also the phase
// relative to the live millisecond epoch.
//
// Search pass: conv_controller walks Doppler bins x code phases x N_CORR
// samples, one index per clock. Per clock one stored sample is wiped off with
// the 1-bit carrier NCO (cmplx_mult) and fed to 32 corr_accumulators, one per
// PRN, whose code bit comes from a 32-bit-wide ca_code_rom. After every
// correlation each satellite's peak_detector keeps the largest |sum|^2; at the
// end of the pass param_memory stores phase and Doppler of every satellite
// whose peak exceeds THRESHOLD and flags it "recent".
//
// Doppler window: bins are 200 Hz wide, centred on 0 Hz; the pass covers
// search_offset +- search_range kHz (both in kHz, offset signed), clipped to
// +-10 kHz. With range >= 10 and offset 0 the whole +-10 kHz is searched. How
// these two 4-bit inputs are interpreted is this design's choice.
//
// Pipeline: index (clock t) -> buffer/ROM read and carrier sign registered
// (t+1) -> accumulate, dump strobe (t+2) -> peak update (t+3).
module td_search
  import gps_pkg::*;
#(
  parameter int unsigned N_CORR    = 8000,
  parameter int unsigned N_PHASE   = 4000,
  parameter int unsigned N_BINS    = 100,
  parameter int unsigned BIN_HZ    = 200,
  parameter int unsigned FS        = 4_000_000,
  parameter int unsigned THRESHOLD = 256000
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sample_valid,
  input  logic                sync,
  input  logic                i_neg,
  input  logic                q_neg,
  input  logic [3:0]          search_range,
  input  logic signed [3:0]   search_offset,
  output logic [NUM_SATS-1:0] detected,
  input  sat_id_t             rd_sat,
  output code_phase_t         rd_phase,
  output doppler_t            rd_doppler,
  input  logic                consume,
  input  sat_id_t             consume_sat,
  output logic                searching,
  output logic                pass_done
);

  localparam int unsigned DEPTH   = N_CORR + N_PHASE;
  localparam int unsigned BUF_AW  = $clog2(DEPTH);
  localparam int unsigned CA_AW   = $clog2(N_CORR);
  localparam int          CENTER  = int'(N_BINS / 2);
  localparam int          PER_KHZ = int'(1000 / BIN_HZ);

  typedef enum logic [1:0] {B_EMPTY, B_FILLING, B_FULL, B_SEARCH} bank_state_e;

  bank_state_e       bstate [2];
  logic [BUF_AW-1:0] wcount;
  logic              wsel, rsel;

  // ---------------- capture ----------------
  logic              we   [2];
  logic [1:0]        rdat [2];
  logic [BUF_AW-1:0] raddr;

  logic filling;
  assign filling = (bstate[0] == B_FILLING) || (bstate[1] == B_FILLING);

  // ---------------- sequencing ----------------
  logic              ctl_start, ctl_busy, ctl_active, ctl_first, ctl_last, ctl_done;
  logic [CA_AW-1:0]  ca_idx;
  code_phase_t       ctl_phase;
  doppler_t          ctl_dop;
  logic [7:0]        ctl_bin, bin_lo, bin_hi;
  logic [31:0]       ctl_fcw;

  always_comb begin
    int lo, hi;
    lo = CENTER + PER_KHZ * (int'(search_offset) - int'(search_range));
    hi = CENTER + PER_KHZ * (int'(search_offset) + int'(search_range));
    if (lo < 0) lo = 0;
    if (lo > int'(N_BINS) - 1) lo = int'(N_BINS) - 1;
    if (hi < 0) hi = 0;
    if (hi > int'(N_BINS) - 1) hi = int'(N_BINS) - 1;
    bin_lo = 8'(lo);
    bin_hi = 8'(hi);
  end

  logic [3:0] done_pipe;
  logic       store;
  assign store     = done_pipe[3];
  assign ctl_start = !ctl_busy && !searching && (bstate[0] == B_FULL || bstate[1] == B_FULL);

  always_ff @(posedge clk) begin
    if (rst) begin
      bstate[0] <= B_EMPTY;
      bstate[1] <= B_EMPTY;
      wcount    <= '0;
      wsel      <= 1'b0;
      rsel      <= 1'b0;
      searching <= 1'b0;
    end else begin
      // fill
      if (!filling && sample_valid && sync) begin
        if (bstate[0] == B_EMPTY) begin
          bstate[0] <= B_FILLING; wsel <= 1'b0; wcount <= BUF_AW'(1);
        end else if (bstate[1] == B_EMPTY) begin
          bstate[1] <= B_FILLING; wsel <= 1'b1; wcount <= BUF_AW'(1);
        end
      end else if (filling && sample_valid) begin
        wcount <= wcount + 1'b1;
        if (wcount == BUF_AW'(DEPTH - 1)) bstate[wsel] <= B_FULL;
      end
      // search
      if (ctl_start) begin
        searching <= 1'b1;
        if (bstate[0] == B_FULL) begin
          rsel <= 1'b0; bstate[0] <= B_SEARCH;
        end else begin
          rsel <= 1'b1; bstate[1] <= B_SEARCH;
        end
      end else if (store) begin
        searching     <= 1'b0;
        bstate[rsel]  <= B_EMPTY;
      end
    end
  end

  // write-enable and address of the capture: the first sample (at sync) goes
  // to address 0 of the bank being opened
  logic              open0, open1;
  logic [BUF_AW-1:0] waddr;
  assign open0 = !filling && sample_valid && sync && bstate[0] == B_EMPTY;
  assign open1 = !filling && sample_valid && sync && bstate[0] != B_EMPTY && bstate[1] == B_EMPTY;
  assign waddr = filling ? wcount : '0;
  assign we[0] = open0 || (filling && sample_valid && !wsel);
  assign we[1] = open1 || (filling && sample_valid &&  wsel);

  for (genvar k = 0; k < 2; k++) begin : g_bank
    sample_buffer #(.DEPTH(DEPTH)) u_buf (
      .clk  (clk),
      .we   (we[k]),
      .waddr(waddr),
      .wdata({i_neg, q_neg}),
      .raddr(raddr),
      .rdata(rdat[k])
    );
  end

  conv_controller #(
    .N_CORR(N_CORR), .N_PHASE(N_PHASE), .N_BINS(N_BINS), .BIN_HZ(BIN_HZ), .FS(FS)
  ) u_ctl (
    .clk(clk), .rst(rst), .start(ctl_start), .bin_lo(bin_lo), .bin_hi(bin_hi),
    .busy(ctl_busy), .active(ctl_active), .first(ctl_first), .last(ctl_last),
    .buf_idx(raddr), .ca_idx(ca_idx), .phase(ctl_phase), .bin(ctl_bin),
    .doppler(ctl_dop), .fcw(ctl_fcw), .done(ctl_done)
  );

  // ---------------- carrier ----------------
  logic cos_neg, sin_neg;
  logic [31:0] nco_phase;
  carrier_nco u_nco (
    .clk(clk), .rst(rst), .clear(!ctl_active || ctl_last), .en(ctl_active), .fcw(ctl_fcw),
    .adj_en(1'b0), .adj('0), .phase(nco_phase), .cos_neg(cos_neg), .sin_neg(sin_neg)
  );

  logic [NUM_SATS-1:0] code;
  ca_code_rom #(.DEPTH(N_CORR), .SAMPLES_PER_MS(N_PHASE), .N_RD(1)) u_rom (
    .clk(clk), .addr(ca_idx), .data(code)
  );

  // stage t+1
  logic        act_d, first_d, last_d, cos_d, sin_d;
  code_phase_t phase_d, phase_dd;
  doppler_t    dop_d, dop_dd;
  always_ff @(posedge clk) begin
    if (rst) begin
      act_d <= 1'b0; first_d <= 1'b0; last_d <= 1'b0; cos_d <= 1'b0; sin_d <= 1'b0;
      phase_d <= '0; phase_dd <= '0; dop_d <= '0; dop_dd <= '0; done_pipe <= '0;
    end else begin
      act_d    <= ctl_active;
      first_d  <= ctl_first;
      last_d   <= ctl_last;
      cos_d    <= cos_neg;
      sin_d    <= sin_neg;
      phase_d  <= ctl_phase;
      phase_dd <= phase_d;
      dop_d    <= ctl_dop;
      dop_dd   <= dop_d;
      done_pipe <= {done_pipe[2:0], ctl_done};
    end
  end

  logic [1:0]        smp;
  logic signed [1:0] w_re, w_im;
  assign smp = rsel ? rdat[1] : rdat[0];

  cmplx_mult u_mult (
    .i_neg(smp[1]), .q_neg(smp[0]), .cos_neg(cos_d), .sin_neg(sin_d), .re(w_re), .im(w_im)
  );

  logic [NUM_SATS-1:0] acc_done, found;
  logic [27:0]         abs_sq [NUM_SATS];
  code_phase_t [NUM_SATS-1:0] pk_phase;
  doppler_t    [NUM_SATS-1:0] pk_dop;
  logic        pass_clear;
  assign pass_clear = ctl_start;

  for (genvar s = 0; s < int'(NUM_SATS); s++) begin : g_sat
    logic signed [13:0] s_re, s_im;
    logic [27:0]        s_peak;
    corr_accumulator #(.ACC_W(14)) u_acc (
      .clk(clk), .rst(rst), .en(act_d), .first(first_d), .last(last_d),
      .code_neg(code[s]), .re(w_re), .im(w_im),
      .sum_re(s_re), .sum_im(s_im), .abs_sq(abs_sq[s]), .done(acc_done[s])
    );
    peak_detector #(.SQ_W(28), .THRESHOLD(THRESHOLD)) u_pk (
      .clk(clk), .rst(rst), .clear(pass_clear), .valid(acc_done[s]),
      .abs_sq(abs_sq[s]), .phase(phase_dd), .doppler(dop_dd),
      .peak(s_peak), .peak_phase(pk_phase[s]), .peak_doppler(pk_dop[s]), .found(found[s])
    );
  end

  param_memory u_param (
    .clk(clk), .rst(rst), .store(store), .found(found),
    .new_phase(pk_phase), .new_doppler(pk_dop),
    .consume(consume), .consume_sat(consume_sat),
    .rd_sat(rd_sat), .rd_phase(rd_phase), .rd_doppler(rd_doppler), .recent(detected)
  );

  assign pass_done = store;

endmodule
