// tb_time_compare: exhaustive-by-sampling check of the time comparator
// against an independent minutes-since-midnight comparison.
module tb_time_compare;
  import wakeup_pkg::*;
  int checks = 0, failures = 0;
  tod_t t1, t2;
  cmp_t r;
  time_compare dut (.time1(t1), .time2(t2), .cmp_result(r));

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int m1, m2;
      cmp_t exp;
      t1.hour = 5'($urandom_range(0, 23)); t1.minute = 6'($urandom_range(0, 59));
      if (i % 4 == 0) t2 = t1;
      else if (i % 4 == 1) begin t2.hour = t1.hour; t2.minute = 6'($urandom_range(0, 59)); end
      else begin t2.hour = 5'($urandom_range(0, 23)); t2.minute = 6'($urandom_range(0, 59)); end
      #1;
      m1 = t1.hour * 60 + t1.minute;
      m2 = t2.hour * 60 + t2.minute;
      exp = (m1 < m2) ? CMP_BEFORE : (m1 == m2) ? CMP_EQUAL : CMP_AFTER;
      checks++;
      if (r !== exp) begin
        failures++;
        $display("FAIL %0d:%0d vs %0d:%0d got %0d exp %0d", t1.hour, t1.minute, t2.hour, t2.minute, r, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
