// time_unit: real-time clock of the wakeup call system.
//
// Divides the system clock (CLK_HZ cycles per second, 27 MHz on the board)
// down to a one-second tick. Every 60 seconds the minute advances and
// new_minute pulses for one cycle; every 60 minutes the hour advances and the
// minute returns to 0; after hour 23 the hour returns to 0 and the date
// (day of month, month, day of week) advances. The date fields are kept for
// later extensions and are not used elsewhere. Month lengths ignore leap
// years (this design's choice).
//
// The clock is set at startup: a one-cycle set_time pulse loads
// set_value/set_day/set_month/set_dow and clears the seconds and the
// divider. Reset gives 00:00:00, January 1st, day of week 0.
module time_unit
  import wakeup_pkg::*;
#(
  parameter int CLK_HZ = 27_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       set_time,
  input  tod_t       set_value,
  input  logic [4:0] set_day,     // 1..31
  input  logic [3:0] set_month,   // 1..12
  input  logic [2:0] set_dow,     // 0..6
  output tod_t       systime,
  output logic [5:0] second,
  output logic [4:0] day,
  output logic [3:0] month,
  output logic [2:0] dow,
  output logic       new_minute
);
  localparam int DW = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;
  logic [DW-1:0] div;
  logic          tick;
  logic [4:0]    days_in_month;

  assign tick = (div == DW'(CLK_HZ - 1));

  always_comb begin
    unique case (month)
      4'd2:                      days_in_month = 5'd28;
      4'd4, 4'd6, 4'd9, 4'd11:   days_in_month = 5'd30;
      default:                   days_in_month = 5'd31;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      div        <= '0;
      second     <= '0;
      systime    <= '0;
      day        <= 5'd1;
      month      <= 4'd1;
      dow        <= '0;
      new_minute <= 1'b0;
    end else if (set_time) begin
      div        <= '0;
      second     <= '0;
      systime    <= set_value;
      day        <= set_day;
      month      <= set_month;
      dow        <= set_dow;
      new_minute <= 1'b0;
    end else begin
      new_minute <= 1'b0;
      div        <= tick ? '0 : div + 1'b1;
      if (tick) begin
        if (second == 6'd59) begin
          second     <= '0;
          new_minute <= 1'b1;
          if (systime.minute == 6'd59) begin
            systime.minute <= '0;
            if (systime.hour == 5'd23) begin
              systime.hour <= '0;
              dow          <= (dow == 3'd6) ? 3'd0 : dow + 3'd1;
              if (day == days_in_month) begin
                day   <= 5'd1;
                month <= (month == 4'd12) ? 4'd1 : month + 4'd1;
              end else begin
                day <= day + 5'd1;
              end
            end else begin
              systime.hour <= systime.hour + 5'd1;
            end
          end else begin
            systime.minute <= systime.minute + 6'd1;
          end
        end else begin
          second <= second + 6'd1;
        end
      end
    end
  end
endmodule
