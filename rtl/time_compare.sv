// time_compare: compares two times of day.
//
// Returns CMP_BEFORE (0) when time1 is earlier than time2, CMP_EQUAL (1) when
// they are the same and CMP_AFTER (2) when time1 is later, as the request
// memory's compare states require. Purely combinational. Hours are compared
// first, then minutes; the comparison is kept in its own block so that date
// fields could be added without touching the memory controller.
module time_compare
  import wakeup_pkg::*;
(
  input  tod_t time1,
  input  tod_t time2,
  output cmp_t cmp_result
);
  always_comb begin
    if (time1 == time2)     cmp_result = CMP_EQUAL;
    else if (time1 < time2) cmp_result = CMP_BEFORE;   // {hour,minute} order
    else                    cmp_result = CMP_AFTER;
  end
endmodule
