// handoff_controller: the dispatcher between the search and the trackers.
//
// It scans the 32-bit "detected" vector of the search and takes the lowest
// numbered satellite set in it. It reads that satellite's code phase and
// Doppler from the search's result table and compares the satellite against
// the mask of satellites the busy trackers already follow. If the satellite is
// new and a tracker is free, the lowest free tracker gets a one-cycle new_sat
// strobe with the satellite's data; otherwise the detection is discarded. In
// both cases the detection is consumed (its flag cleared in the search).
//
// Timing: one decision per two clocks. DECIDE reads and dispatches; WAIT
// gives the chosen tracker a clock to raise its busy flag before the next
// decision. The two-state schedule is this design's choice.
module handoff_controller
  import gps_pkg::*;
#(
  parameter int unsigned NUM_TRACKERS = 8
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [NUM_SATS-1:0]                 detected,
  output sat_id_t                             rd_sat,
  input  code_phase_t                         rd_phase,
  input  doppler_t                            rd_doppler,
  output logic                                consume,
  output sat_id_t                             consume_sat,
  input  logic [NUM_TRACKERS-1:0]             trk_busy,
  input  sat_id_t [NUM_TRACKERS-1:0]          trk_sat,
  output logic [NUM_TRACKERS-1:0]             new_sat,
  output sat_info_t                           info,
  output logic                                dropped
);

  typedef enum logic {S_DECIDE, S_WAIT} state_e;
  state_e state;

  logic                    any_det, any_free, already;
  sat_id_t                 pick;
  logic [NUM_SATS-1:0]     tracked_mask;
  localparam int unsigned TW = (NUM_TRACKERS > 1) ? $clog2(NUM_TRACKERS) : 1;
  logic [TW-1:0]           free_idx;

  always_comb begin
    any_det = 1'b0;
    pick    = '0;
    for (int s = NUM_SATS - 1; s >= 0; s--) begin
      if (detected[s]) begin
        any_det = 1'b1;
        pick    = SAT_W'(s);
      end
    end
    tracked_mask = '0;
    for (int t = 0; t < int'(NUM_TRACKERS); t++)
      if (trk_busy[t]) tracked_mask[trk_sat[t]] = 1'b1;
    already  = tracked_mask[pick];
    any_free = 1'b0;
    free_idx = '0;
    for (int t = NUM_TRACKERS - 1; t >= 0; t--) begin
      if (!trk_busy[t]) begin
        any_free = 1'b1;
        free_idx = TW'(t);
      end
    end
  end

  assign rd_sat = pick;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_DECIDE;
      consume <= 1'b0; consume_sat <= '0;
      new_sat <= '0; info <= '0; dropped <= 1'b0;
    end else begin
      consume <= 1'b0;
      new_sat <= '0;
      dropped <= 1'b0;
      case (state)
        S_DECIDE: if (any_det) begin
          consume     <= 1'b1;
          consume_sat <= pick;
          state       <= S_WAIT;
          if (!already && any_free) begin
            new_sat[free_idx] <= 1'b1;
            info <= '{sat_id: pick, phase: rd_phase, doppler: rd_doppler};
          end else begin
            dropped <= 1'b1;
          end
        end
        S_WAIT: state <= S_DECIDE;
      endcase
    end
  end

endmodule
