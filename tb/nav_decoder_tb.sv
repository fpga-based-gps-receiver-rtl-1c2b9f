// nav_decoder_tb: feeds 1 ms NAV symbols of a GPS subframe 1 (word 10 of the
// previous subframe, TLM with preamble, HOW, word 3 with the week number,
// further words), 20 symbols per bit, starting mid-bit. Runs three cases:
// normal polarity, inverted polarity (Costas sign ambiguity) and a corrupted
// HOW bit. Checks TOW seconds and week (era 1), that the corrupted frame is
// rejected, the bit count (one bit per 20 symbols) and a few flipped symbols
// being voted away.
`timescale 1ns/1ps
module nav_decoder_tb;
  import gps_tb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic enable = 0, nav_valid = 0, nav_sym = 0;
  logic bit_valid, nav_bit, bit_synced, frame_found, tow_valid, week_valid;
  logic [20:0] seconds;
  logic [10:0] week;

  nav_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_tow, n_week, n_bits;
  logic [20:0] got_sec;
  logic [10:0] got_week;
  always @(posedge clk) begin
    if (tow_valid)  begin n_tow++;  got_sec  = seconds; end
    if (week_valid) begin n_week++; got_week = week; end
    if (bit_valid)  n_bits++;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic stream [$];

  task automatic push_word(input logic [29:0] w);
    for (int b = 29; b >= 0; b--) stream.push_back(w[b]);
  endtask

  // builds: 40 junk bits, word 10 (D29 = D30 = 0), TLM, HOW, word 3, 3 words
  task automatic build(input logic [16:0] tow, input logic [9:0] wn, input bit corrupt);
    logic [29:0] w;
    logic [23:0] d;
    stream.delete();
    for (int k = 0; k < 40; k++) stream.push_back(1'($urandom_range(0, 1)));
    d = 24'($urandom());
    for (int k = 0; k < 4; k++) begin
      w = encode_word({d[23:2], 2'(k)}, 1'b1, 1'b0);
      if (w[1:0] == 2'b00) break;
    end
    push_word(w);
    w = encode_word({8'b1000_1011, 14'h2a5, 2'b00}, 1'b0, 1'b0);  push_word(w);
    w = encode_word({tow, 1'b0, 1'b0, 3'd1, 2'b00}, w[1], w[0]);  push_word(w);
    w = encode_word({wn, 14'h1abc}, w[1], w[0]);                   push_word(w);
    for (int k = 0; k < 3; k++) begin
      w = encode_word(24'($urandom()), w[1], w[0]);
      push_word(w);
    end
    if (corrupt) stream[40 + 60 + 5] = ~stream[40 + 60 + 5];
  endtask

  task automatic play(input bit invert, input int skip, input bit flips);
    int nsym;
    nsym = 0;
    for (int b = 0; b < stream.size(); b++) begin
      for (int m = 0; m < 20; m++) begin
        logic s;
        if (b == 0 && m < skip) continue;
        s = stream[b] ^ invert;
        if (flips && b > 60 && (m == 3 || m == 11 || m == 17) && b % 5 == 0) s = ~s;
        nav_sym   <= s;
        nav_valid <= 1;
        @(posedge clk);
        nav_valid <= 0;
        @(posedge clk);
        @(posedge clk);
        nsym++;
      end
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // case 1: normal polarity, TOW 0x0D2F1 count, week 699 (+1024)
    build(17'd53233, 10'd699, 0);
    n_tow = 0; n_week = 0; n_bits = 0;
    enable <= 1;
    play(0, 7, 1);
    check(n_tow == 1 && got_sec == 21'(53233 * 6), "TOW seconds, normal polarity");
    check(n_week == 1 && got_week == 11'd1723, "week number, normal polarity");
    check(frame_found, "frame found");
    // bit count: bits after the first edge (after 40 stable symbols)
    check(n_bits >= stream.size() - 6 && n_bits <= stream.size(), "one bit per 20 symbols");
    // case 2: inverted
    enable <= 0; @(posedge clk); enable <= 1;
    build(17'd100, 10'd1023, 0);
    n_tow = 0; n_week = 0;
    play(1, 13, 0);
    check(n_tow == 1 && got_sec == 21'd600, "TOW seconds, inverted polarity");
    check(n_week == 1 && got_week == 11'd2047, "week number, inverted polarity");
    // case 3: corrupted HOW bit
    enable <= 0; @(posedge clk); enable <= 1;
    build(17'd777, 10'd5, 1);
    n_tow = 0; n_week = 0;
    play(0, 3, 0);
    check(n_tow == 0 && n_week == 0, "parity error rejects the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
