// time_display: converts GPS time of week and week number into the calendar
// values shown on the seven-segment display.
//
// On tow_valid the seconds since Sunday 00:00 are split, by repeated
// subtraction with counters, into day of week (0 = Sunday), hour and minute:
// first whole days (86400 s), then hours (3600 s), then minutes (60 s); at most
// 6 + 23 + 59 steps. On week_valid the number of days since 6 January 1980
// (week * 7 + day of week, plus 5 for 1-6 January 1980) is reduced year by
// year (365 or 366 days) and then month by month to give year and month.
// Leap years are taken as every fourth year, right from 1901 to 2099.
// One subtraction per clock, so a conversion takes well under 10 us at
// 100 MHz; valid pulses when both conversions are idle after an update.
// The counter method follows the document; the exact step order is this
// design's.
module time_display (
  input  logic        clk,
  input  logic        rst,
  input  logic        tow_valid,
  input  logic [20:0] seconds,
  input  logic        week_valid,
  input  logic [10:0] week,
  output logic [2:0]  day,
  output logic [4:0]  hour,
  output logic [5:0]  minute,
  output logic [10:0] year,
  output logic [3:0]  month,
  output logic        valid
);

  typedef enum logic [2:0] {T_IDLE, T_DAY, T_HOUR, T_MIN, T_YEAR, T_MONTH} state_e;
  state_e state;

  logic [20:0] rem;
  logic [16:0] days;
  logic        week_pending;
  logic [10:0] week_q;

  function automatic logic is_leap(input logic [10:0] y);
    return y[1:0] == 2'b00;
  endfunction

  function automatic logic [8:0] year_len(input logic [10:0] y);
    return is_leap(y) ? 9'd366 : 9'd365;
  endfunction

  function automatic logic [4:0] month_len(input logic [3:0] m, input logic leap);
    case (m)
      4'd2:                      return leap ? 5'd29 : 5'd28;
      4'd4, 4'd6, 4'd9, 4'd11:   return 5'd30;
      default:                   return 5'd31;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= T_IDLE;
      rem <= '0; days <= '0; week_pending <= 1'b0; week_q <= '0;
      day <= '0; hour <= '0; minute <= '0; year <= 11'd1980; month <= 4'd1; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (week_valid) begin
        week_pending <= 1'b1;
        week_q       <= week;
      end
      case (state)
        T_IDLE: begin
          if (tow_valid) begin
            rem <= seconds; day <= '0; hour <= '0; minute <= '0;
            state <= T_DAY;
          end else if (week_pending || week_valid) begin
            week_pending <= 1'b0;
            days  <= 17'(week_valid ? week : week_q) * 17'd7 + 17'(day) + 17'd5;
            year  <= 11'd1980;
            month <= 4'd1;
            state <= T_YEAR;
          end
        end
        T_DAY:
          if (rem >= 21'd86400) begin rem <= rem - 21'd86400; day <= day + 1'b1; end
          else state <= T_HOUR;
        T_HOUR:
          if (rem >= 21'd3600) begin rem <= rem - 21'd3600; hour <= hour + 1'b1; end
          else state <= T_MIN;
        T_MIN:
          if (rem >= 21'd60) begin rem <= rem - 21'd60; minute <= minute + 1'b1; end
          else begin state <= T_IDLE; valid <= 1'b1; end
        T_YEAR:
          if (days >= 17'(year_len(year))) begin days <= days - 17'(year_len(year)); year <= year + 1'b1; end
          else state <= T_MONTH;
        T_MONTH:
          if (days >= 17'(month_len(month, is_leap(year)))) begin
            days  <= days - 17'(month_len(month, is_leap(year)));
            month <= month + 1'b1;
          end else begin state <= T_IDLE; valid <= 1'b1; end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
