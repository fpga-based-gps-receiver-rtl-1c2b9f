// gps_pkg: constants, types and the C/A code generator shared by the GPS
// receiver modules.
//
// Sample convention used throughout: a 1-bit sample, carrier or code value is
// a sign bit, 1 meaning -1 and 0 meaning +1 (the MSB of the ADC word). The
// receiver works at 4 Msps complex baseband, so one millisecond (one C/A code
// period of 1023 chips) is 4000 samples; code phases are sample offsets inside
// that millisecond and Doppler values are signed hertz.
//
// The Gold code generator follows the GPS interface specification: G1 is
// 1+x^3+x^10, G2 is 1+x^2+x^3+x^6+x^8+x^9+x^10, both start at all ones, and a
// satellite's code is G1 xor the sum of two G2 stages picked per PRN.
package gps_pkg;

  localparam int unsigned NUM_SATS   = 32;
  localparam int unsigned CA_CHIPS   = 1023;
  localparam int unsigned FS_HZ      = 4_000_000;   // ADC sample rate
  localparam int unsigned SPM        = 4000;        // samples per ms / code period
  localparam int unsigned SAT_W      = 5;
  localparam int unsigned PHASE_W    = 12;          // code phase, 0..SPM-1
  localparam int unsigned DOP_W      = 16;          // Doppler, signed Hz

  typedef logic [SAT_W-1:0]           sat_id_t;
  typedef logic [PHASE_W-1:0]         code_phase_t;
  typedef logic signed [DOP_W-1:0]    doppler_t;

  // What the search hands to a tracker.
  typedef struct packed {
    sat_id_t     sat_id;
    code_phase_t phase;
    doppler_t    doppler;
  } sat_info_t;

  // G2 output taps (1-based stage numbers) for PRN 1..32.
  function automatic logic [7:0] g2_taps(input int prn);
    case (prn)
      1: return {4'd2, 4'd6};   2: return {4'd3, 4'd7};   3: return {4'd4, 4'd8};
      4: return {4'd5, 4'd9};   5: return {4'd1, 4'd9};   6: return {4'd2, 4'd10};
      7: return {4'd1, 4'd8};   8: return {4'd2, 4'd9};   9: return {4'd3, 4'd10};
     10: return {4'd2, 4'd3};  11: return {4'd3, 4'd4};  12: return {4'd5, 4'd6};
     13: return {4'd6, 4'd7};  14: return {4'd7, 4'd8};  15: return {4'd8, 4'd9};
     16: return {4'd9, 4'd10}; 17: return {4'd1, 4'd4};  18: return {4'd2, 4'd5};
     19: return {4'd3, 4'd6};  20: return {4'd4, 4'd7};  21: return {4'd5, 4'd8};
     22: return {4'd6, 4'd9};  23: return {4'd1, 4'd3};  24: return {4'd4, 4'd6};
     25: return {4'd5, 4'd7};  26: return {4'd6, 4'd8};  27: return {4'd7, 4'd9};
     28: return {4'd8, 4'd10}; 29: return {4'd1, 4'd6};  30: return {4'd2, 4'd7};
     31: return {4'd3, 4'd8};  default: return {4'd4, 4'd9};
    endcase
  endfunction

  // Full 1023-chip code of one PRN; bit k is chip k (1 = -1).
  function automatic logic [CA_CHIPS-1:0] ca_code(input int prn);
    logic [10:1] g1, g2;
    logic [7:0]  t;
    logic [CA_CHIPS-1:0] c;
    g1 = '1;
    g2 = '1;
    t  = g2_taps(prn);
    for (int k = 0; k < int'(CA_CHIPS); k++) begin
      c[k] = g1[10] ^ g2[t[7:4]] ^ g2[t[3:0]];
      g1 = {g1[9:1], g1[3] ^ g1[10]};
      g2 = {g2[9:1], g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10]};
    end
    return c;
  endfunction

endpackage
