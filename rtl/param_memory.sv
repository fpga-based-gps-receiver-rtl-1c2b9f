// param_memory: result table of the search, one entry per satellite.
//
// At the end of a search pass (store) every satellite whose peak detector
// reports a detection gets its code phase and Doppler written and its
// "recent" flag set; satellites not detected in that pass get the flag
// cleared. The dispatcher reads entries combinationally by satellite index
// and clears a satellite's flag with consume once it has handled it.
// recent is the 32-bit "detected" vector the dispatcher scans.
module param_memory
  import gps_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         store,
  input  logic [NUM_SATS-1:0]          found,
  input  code_phase_t [NUM_SATS-1:0]   new_phase,
  input  doppler_t    [NUM_SATS-1:0]   new_doppler,
  input  logic                         consume,
  input  sat_id_t                      consume_sat,
  input  sat_id_t                      rd_sat,
  output code_phase_t                  rd_phase,
  output doppler_t                     rd_doppler,
  output logic [NUM_SATS-1:0]          recent
);

  code_phase_t phase_q   [NUM_SATS];
  doppler_t    doppler_q [NUM_SATS];

  always_ff @(posedge clk) begin
    if (rst) begin
      recent <= '0;
      for (int s = 0; s < int'(NUM_SATS); s++) begin
        phase_q[s]   <= '0;
        doppler_q[s] <= '0;
      end
    end else begin
      if (consume) recent[consume_sat] <= 1'b0;
      if (store) begin
        for (int s = 0; s < int'(NUM_SATS); s++) begin
          recent[s] <= found[s];
          if (found[s]) begin
            phase_q[s]   <= new_phase[s];
            doppler_q[s] <= new_doppler[s];
          end
        end
      end
    end
  end

  assign rd_phase   = phase_q[rd_sat];
  assign rd_doppler = doppler_q[rd_sat];

endmodule
