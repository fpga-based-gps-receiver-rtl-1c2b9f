// gps_tb_pkg: reference models shared by the testbenches.
//
// The C/A codes here are built the other way round from the RTL: from the G2
// delay (in chips) that each PRN applies to the G2 sequence, instead of the
// two G2 taps. The NAV word encoder implements the GPS parity equations
// independently of the decoder. sample_at() synthesises 1-bit complex
// baseband samples of a set of satellites plus Gaussian-like noise.
package gps_tb_pkg;

  localparam int G2_DELAY [32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255,
                                   256, 257, 258, 469, 470, 471, 472, 473, 474, 509, 512,
                                   513, 514, 515, 516, 859, 860, 861, 862};

  function automatic logic [1022:0] ref_ca(input int prn);
    logic [1022:0] g1s, g2s, c;
    logic [10:1] g1, g2;
    g1 = '1; g2 = '1;
    for (int k = 0; k < 1023; k++) begin
      g1s[k] = g1[10];
      g2s[k] = g2[10];
      g1 = {g1[9:1], g1[3] ^ g1[10]};
      g2 = {g2[9:1], g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10]};
    end
    for (int k = 0; k < 1023; k++) c[k] = g1s[k] ^ g2s[(k + 1023 - G2_DELAY[prn-1]) % 1023];
    return c;
  endfunction

  // parity of one 30-bit word: data d[24:1] given MSB first as d24[23]=d1,
  // previous word's D29*, D30*; returns the transmitted 30 bits (D1 first in bit 29).
  function automatic logic [29:0] encode_word(input logic [23:0] d, input logic p29, input logic p30);
    logic [24:1] b;
    logic [6:1]  par;
    for (int i = 1; i <= 24; i++) b[i] = d[24 - i];
    par[1] = p30 ^ b[1]^b[2]^b[3]^b[5]^b[6]^b[10]^b[11]^b[12]^b[13]^b[14]^b[17]^b[18]^b[20]^b[23];
    par[2] = p29 ^ b[2]^b[3]^b[4]^b[6]^b[7]^b[11]^b[12]^b[13]^b[14]^b[15]^b[18]^b[19]^b[21]^b[24];
    par[3] = p30 ^ b[1]^b[3]^b[4]^b[5]^b[7]^b[8]^b[12]^b[13]^b[14]^b[15]^b[16]^b[19]^b[20]^b[22];
    par[4] = p29 ^ b[2]^b[4]^b[5]^b[6]^b[8]^b[9]^b[13]^b[14]^b[15]^b[16]^b[17]^b[20]^b[21]^b[23];
    par[5] = p30 ^ b[1]^b[3]^b[5]^b[6]^b[7]^b[9]^b[10]^b[14]^b[15]^b[16]^b[17]^b[18]^b[21]^b[22]^b[24];
    par[6] = p29 ^ b[3]^b[5]^b[6]^b[8]^b[9]^b[10]^b[11]^b[13]^b[15]^b[19]^b[22]^b[23]^b[24];
    return {d ^ {24{p30}}, par[1], par[2], par[3], par[4], par[5], par[6]};
  endfunction

  // Appends word 10 of a previous subframe (D29 = D30 = 0), then subframe 1:
  // TLM (preamble 10001011), HOW (TOW count, subframe id 1), word 3 (week
  // number in bits 1-10) and three more words.
  function automatic void push_subframe1(ref logic q [$], input logic [16:0] tow, input logic [9:0] wn);
    logic [29:0] w;
    logic [23:0] d;
    d = 24'($urandom());
    for (int k = 0; k < 4; k++) begin
      w = encode_word({d[23:2], 2'(k)}, 1'b1, 1'b0);
      if (w[1:0] == 2'b00) break;
    end
    for (int b = 29; b >= 0; b--) q.push_back(w[b]);
    w = encode_word({8'b1000_1011, 14'h2a5, 2'b00}, 1'b0, 1'b0);
    for (int b = 29; b >= 0; b--) q.push_back(w[b]);
    w = encode_word({tow, 1'b0, 1'b0, 3'd1, 2'b00}, w[1], w[0]);
    for (int b = 29; b >= 0; b--) q.push_back(w[b]);
    w = encode_word({wn, 14'h1abc}, w[1], w[0]);
    for (int b = 29; b >= 0; b--) q.push_back(w[b]);
    for (int k = 0; k < 3; k++) begin
      w = encode_word(24'($urandom()), w[1], w[0]);
      for (int b = 29; b >= 0; b--) q.push_back(w[b]);
    end
  endfunction

  // Gaussian-like noise, unit variance (sum of 12 uniforms)
  function automatic real gnoise();
    real s;
    s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  // One simulated satellite: code start offset (samples after the ms epoch),
  // Doppler, carrier phase, amplitude and the NAV bits (20 ms each, bit 1 = -1).
  class sat_sig;
    int       prn;
    int       phase;
    real      dop_hz;
    real      theta;
    real      amp;
    real      drift;    // code delay growth, samples per sample
    logic     bits [$];
    logic [1022:0] code;
    function new(int prn_i, int phase_i, real dop_i, real amp_i);
      prn = prn_i; phase = phase_i; dop_hz = dop_i; amp = amp_i; theta = 0.3; drift = 0.0;
      code = ref_ca(prn_i);
    endfunction
    // signed amplitude (code x data) at absolute sample n
    function real amp_at(input longint n, input int spm);
      longint rel, ms;
      int chip, nb, bi;
      real a;
      rel  = n - phase - longint'($floor(real'(n) * drift)) + 1000 * longint'(spm);
      ms   = rel / spm;
      chip = int'(((rel % spm) * 1023) / spm);
      a    = amp * (code[chip] ? -1.0 : 1.0);
      nb   = bits.size();
      if (nb > 0) begin
        bi = int'((ms / 20) % nb);
        if (bits[bi]) a = -a;
      end
      return a;
    endfunction
    // carrier phase at absolute sample n
    function real phase_at(input longint n, input real fs);
      return 2.0 * 3.14159265358979 * dop_hz * real'(n) / fs + theta;
    endfunction
  endclass

endpackage
