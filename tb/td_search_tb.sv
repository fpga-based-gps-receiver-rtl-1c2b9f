// td_search_tb: acquisition of two satellites at a reduced size: 1023 samples
// per ms (1 sample per chip, fs = 1.023 MHz), 2046-sample correlations, one
// Doppler bin (+1 kHz: search_offset 1, search_range 0). The noisy 1-bit input
// holds PRN 5 (code start 300 samples after the epoch, +1050 Hz) and PRN 20
// (777 samples, +950 Hz). Checks: only those two are detected, with their code
// phases and the bin's Doppler, the pass takes N_CORR*N_PHASE clocks, the
// second buffer bank is filled while the first is searched, consume works.
`timescale 1ns/1ps
module td_search_tb;
  import gps_pkg::*;
  import gps_tb_pkg::*;
  localparam int SPMS = 1023, NC = 2046;
  localparam real FSR = 1.023e6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sample_valid = 0, sync = 0, i_neg = 0, q_neg = 0, consume = 0;
  logic [3:0] search_range = 4'd0;
  logic signed [3:0] search_offset = 4'sd1;
  logic [31:0] detected;
  sat_id_t rd_sat = 0, consume_sat = 0;
  code_phase_t rd_phase;
  doppler_t rd_doppler;
  logic searching, pass_done;

  td_search #(.N_CORR(NC), .N_PHASE(SPMS), .FS(1_023_000), .THRESHOLD(NC * 32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #40_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  sat_sig s1, s2;
  longint n = 0;
  longint t_start = -1, t_done = -1, cyc = 0;
  bit stop = 0;

  // sample stream, one sample per clock
  initial begin
    s1 = new(5, 300, 1050.0, 1.0);
    s2 = new(20, 777, 950.0, 1.0);
    repeat (3) @(posedge clk);
    rst <= 0;
    while (!stop) begin
      real re, im;
      re = gnoise(); im = gnoise();
      re += s1.amp_at(n, SPMS) * $cos(s1.phase_at(n, FSR)) + s2.amp_at(n, SPMS) * $cos(s2.phase_at(n, FSR));
      im += s1.amp_at(n, SPMS) * $sin(s1.phase_at(n, FSR)) + s2.amp_at(n, SPMS) * $sin(s2.phase_at(n, FSR));
      sample_valid <= 1; i_neg <= (re < 0.0); q_neg <= (im < 0.0); sync <= (n % SPMS == 0);
      n++;
      @(posedge clk);
    end
    sample_valid <= 0;
  end

  always @(posedge clk) begin
    cyc++;
    if (searching && t_start < 0) t_start = cyc;
    if (pass_done && t_done < 0) t_done = cyc;
  end

  initial begin
    wait (pass_done);
    @(posedge clk); #1;
    stop = 1;
    $display("pass %0d clocks, detected %h", t_done - t_start, detected);
    check(detected == 32'h0008_0010, "PRN 5 and PRN 20 detected, nothing else");
    rd_sat = 5'd4; #1;
    check(rd_phase == 12'd300 && rd_doppler == 16'sd1000, $sformatf("PRN 5 phase %0d Doppler %0d", rd_phase, rd_doppler));
    rd_sat = 5'd19; #1;
    check(rd_phase == 12'd777 && rd_doppler == 16'sd1000, $sformatf("PRN 20 phase %0d Doppler %0d", rd_phase, rd_doppler));
    check(t_done - t_start >= NC * SPMS && t_done - t_start <= NC * SPMS + 8, "pass length N_CORR x N_PHASE clocks");
    check(dut.bstate[1] == 2'd2, "second bank filled during the search (ping-pong)");
    consume <= 1; consume_sat <= 5'd4; @(posedge clk); consume <= 0; #1;
    check(detected == 32'h0008_0000, "consume clears the flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
