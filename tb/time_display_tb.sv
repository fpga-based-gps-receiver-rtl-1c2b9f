// time_display_tb: converts random times of week and a set of week numbers
// and compares with integer arithmetic (day = s/86400 ...) and with a
// day-by-day calendar walk from 6 January 1980; checks known dates
// (week 1723 = January 2013, week 2047 = April 2019) and the conversion time.
`timescale 1ns/1ps
module time_display_tb;
  logic clk = 0, rst = 1, tow_valid = 0, week_valid = 0, valid;
  logic [20:0] seconds = 0;
  logic [10:0] week = 0, year;
  logic [2:0] day;
  logic [4:0] hour;
  logic [5:0] minute;
  logic [3:0] month;
  always #5 clk = ~clk;
  time_display dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic void ref_date(input int days, output int y, output int m);
    int ml [12] = '{31, 28, 31, 30, 31, 30, 31, 31, 30, 31, 30, 31};
    int d;
    y = 1980; m = 1; d = 6;   // 6 Jan 1980
    for (int k = 0; k < days; k++) begin
      int len;
      len = ml[m - 1] + ((m == 2 && y % 4 == 0) ? 1 : 0);
      d++;
      if (d > len) begin d = 1; m++; if (m > 12) begin m = 1; y++; end end
    end
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 20; k++) begin
      int s, cyc;
      s = (k == 0) ? 604799 : $urandom_range(0, 604799);
      seconds <= 21'(s); tow_valid <= 1; @(posedge clk); tow_valid <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!valid);
      #1;
      check(day == 3'(s / 86400) && hour == 5'((s % 86400) / 3600) && minute == 6'((s % 3600) / 60),
            $sformatf("time of week %0d -> %0d %0d:%0d", s, day, hour, minute));
      check(cyc <= 100, "time conversion within 100 clocks (1 us at 100 MHz)");
    end
    for (int k = 0; k < 6; k++) begin
      int w, y, m;
      w = (k == 0) ? 1723 : (k == 1) ? 2047 : (k == 2) ? 0 : $urandom_range(0, 2047);
      seconds <= 21'd0; tow_valid <= 1; @(posedge clk); tow_valid <= 0;
      do @(posedge clk); while (!valid);
      week <= 11'(w); week_valid <= 1; @(posedge clk); week_valid <= 0;
      do @(posedge clk); while (!valid);
      #1;
      ref_date(w * 7, y, m);
      check(int'(year) == y && int'(month) == m, $sformatf("week %0d -> %0d/%0d, expect %0d/%0d", w, year, month, y, m));
      if (w == 1723) check(year == 11'd2013 && month == 4'd1, "week 1723 is January 2013");
      if (w == 2047) check(year == 11'd2019 && month == 4'd3 || year == 11'd2019 && month == 4'd4, "week 2047 is spring 2019");
    end
    // every week number, Sunday 00:00
    begin
      int bad, y, m;
      bad = 0;
      for (int w = 0; w < 2048; w++) begin
        week <= 11'(w); week_valid <= 1; @(posedge clk); week_valid <= 0;
        do @(posedge clk); while (!valid);
        #1;
        ref_date(w * 7, y, m);
        if (int'(year) != y || int'(month) != m) bad++;
      end
      check(bad == 0, $sformatf("%0d of 2048 week numbers give a wrong year/month", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
