// seven_seg_tb: with SCAN_BITS = 2 (4 clocks per digit) it watches a full
// scan in every mode, decodes the active-low segment patterns back to digits
// and compares them with the expected layout; checks one anode at a time and
// the scan period.
`timescale 1ns/1ps
module seven_seg_tb;
  logic clk = 0, rst = 1;
  logic [1:0] mode = 0;
  logic [2:0] day = 3'd5;
  logic [4:0] hour = 5'd23;
  logic [5:0] minute = 6'd7;
  logic [10:0] year = 11'd2013;
  logic [3:0] month = 4'd4;
  logic [4:0] sat_id = 5'd22;      // PRN 23 = 0x17
  logic lock = 1;
  logic [15:0] doppler = 16'hF9C4;
  logic [11:0] phase = 12'hABC;
  logic [6:0] seg;
  logic [7:0] an;
  always #5 clk = ~clk;
  seven_seg #(.SCAN_BITS(2)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int decode(input logic [6:0] s);
    logic [6:0] p [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    for (int k = 0; k < 16; k++) if (~s == p[k]) return k;
    return (~s == 7'h00) ? -1 : -2;   // -1 blank, -2 garbage
  endfunction
  initial begin
    int expect_d [4][8] = '{
      '{ 7, 0, -1, 3, 2, -1, -1, 5},          // index 0 = rightmost digit: "5  23 07"
      '{ 4, 0, -1, -1, 3, 1, 0, 2},           // 2013  04
      '{ 4, 'hC, 9, 'hF, -1, 1, 7, 1},        // 17 1 F9C4
      '{ 'hC, 'hB, 'hA, -1, -1, 1, 7, 1}};    // 17 1 ABC
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int m = 0; m < 4; m++) begin
      int seen [8];
      int bad;
      mode <= 2'(m);
      repeat (40) @(posedge clk);
      for (int k = 0; k < 8; k++) seen[k] = -3;
      bad = 0;
      for (int c = 0; c < 32; c++) begin
        @(posedge clk); #1;
        if ($countones(~an) != 1) bad++;
        for (int k = 0; k < 8; k++) if (!an[k]) seen[k] = decode(seg);
      end
      for (int k = 0; k < 8; k++) if (seen[k] != expect_d[m][k]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL mode %0d: %0d %0d %0d %0d %0d %0d %0d %0d", m,
                 seen[7], seen[6], seen[5], seen[4], seen[3], seen[2], seen[1], seen[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
