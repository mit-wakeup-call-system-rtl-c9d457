// tb_time_unit: runs the clock with a 4-cycle second against a reference
// time/date counter written here; checks the divider period, new_minute,
// hour and day roll-over, month ends and setting the time.
module tb_time_unit;
  import wakeup_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, set_time = 0;
  tod_t set_value, systime;
  logic [4:0] set_day, day;
  logic [3:0] set_month, month;
  logic [2:0] set_dow, dow;
  logic [5:0] second;
  logic new_minute;
  localparam int HZ = 4;
  always #5 clk = ~clk;
  time_unit #(.CLK_HZ(HZ)) dut (.clk, .rst, .set_time, .set_value, .set_day, .set_month,
    .set_dow, .systime, .second, .day, .month, .dow, .new_minute);

  int r_s, r_m, r_h, r_d, r_mo, r_w, minutes_seen = 0, days_seen = 0;
  int mdays [13] = '{0, 31, 28, 31, 30, 31, 30, 31, 31, 30, 31, 30, 31};

  task automatic compare(input string where);
    checks++;
    if (second != r_s || systime.minute != r_m || systime.hour != r_h || day != r_d ||
        month != r_mo || dow != r_w) begin
      failures++;
      $display("FAIL %s: got %0d:%0d:%0d %0d/%0d w%0d exp %0d:%0d:%0d %0d/%0d w%0d", where,
        systime.hour, systime.minute, second, day, month, dow, r_h, r_m, r_s, r_d, r_mo, r_w);
    end
  endtask

  task automatic set_to(int h, int m, int d, int mo, int w);
    @(negedge clk);
    set_time = 1; set_value.hour = 5'(h); set_value.minute = 6'(m);
    set_day = 5'(d); set_month = 4'(mo); set_dow = 3'(w);
    @(negedge clk); set_time = 0;
    r_s = 0; r_m = m; r_h = h; r_d = d; r_mo = mo; r_w = w;
  endtask

  task automatic run_seconds(int n);
    for (int i = 0; i < n; i++) begin
      repeat (HZ) @(posedge clk);
      #1;
      // reference advance
      r_s++;
      if (r_s == 60) begin
        r_s = 0; r_m++; minutes_seen++;
        if (r_m == 60) begin
          r_m = 0; r_h++;
          if (r_h == 24) begin
            r_h = 0; r_w = (r_w + 1) % 7; r_d++; days_seen++;
            if (r_d > mdays[r_mo]) begin r_d = 1; r_mo = (r_mo == 12) ? 1 : r_mo + 1; end
          end
        end
      end
      compare("tick");
    end
  endtask

  int nm_total = 0;
  always @(posedge clk) if (!rst && new_minute) nm_total++;

  initial begin
    repeat (2) @(posedge clk);
    #1; r_s = 0; r_m = 0; r_h = 0; r_d = 1; r_mo = 1; r_w = 0;
    compare("reset");
    @(negedge clk); rst = 0;
    set_to(23, 58, 31, 12, 6);
    run_seconds(3 * 60 + 5);                 // across midnight and new year
    checks++; if (!(r_mo == 1 && r_d == 1 && dow == 0)) failures++;
    set_to(23, 59, 28, 2, 2);
    run_seconds(61);                         // end of February
    checks++; if (month != 3 || day != 1) begin failures++; $display("FAIL Feb end"); end
    set_to(10, 59, 30, 4, 3);
    run_seconds(60 * 61);                    // an hour and a bit
    repeat (2) @(posedge clk);
    checks++;
    if (nm_total != minutes_seen) begin failures++; $display("FAIL new_minute %0d vs %0d", nm_total, minutes_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
