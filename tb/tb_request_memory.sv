// tb_request_memory: the request memory against a sorted reference list.
// Starts with the insertion example of a 08:00 request into a table of seven
// requests, then random stores, cancels (of stored and unknown numbers) and
// minute ticks; after every operation the RAM rows 1..tail must equal the
// reference, and every due request must be handed out, in time order, with
// request_pending held until request_reset. Also covers a store and a cancel
// served while a request is pending, and a store into a full RAM.
module tb_request_memory;
  import wakeup_pkg::*;
  int checks = 0, failures = 0;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1;
  logic store_ctrl = 0, cancel_ctrl = 0, request_reset = 0, new_minute = 0;
  request_t store_data = '0;
  logic [19:0] cancel_phone = 0, pending_phone;
  logic store_done, cancel_done, request_pending;
  tod_t systime = '0;
  logic [3:0] num_requests;
  always #5 clk = ~clk;

  request_memory #(.DEPTH(DEPTH)) dut (.clk, .rst, .store_ctrl, .store_data, .store_done,
    .cancel_ctrl, .cancel_phone, .cancel_done, .request_pending, .pending_phone,
    .request_reset, .systime, .new_minute, .num_requests);

  request_t refq [$];
  int n_pending = 0, n_store_while_pending = 0, n_full_drops = 0, n_cancel_miss = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic compare_ram();
    chk(num_requests == refq.size(), $sformatf("tail %0d exp %0d", num_requests, refq.size()));
    for (int i = 0; i < refq.size() && i < DEPTH - 1; i++)
      chk(dut.u_ram.mem[i + 1] == refq[i], $sformatf("row %0d = %h exp %h", i + 1, dut.u_ram.mem[i + 1], refq[i]));
  endtask

  function automatic int tmin(tod_t t); return t.hour * 60 + t.minute; endfunction

  task automatic ref_insert(request_t r);
    int pos = refq.size();
    for (int i = 0; i < refq.size(); i++)
      if (tmin(r.t) < tmin(refq[i].t)) begin pos = i; break; end
    refq.insert(pos, r);
  endtask

  task automatic wait_pulse(ref logic sig, input string what);
    int t = 0;
    while (!sig && t < 2000) begin @(posedge clk); #1; t++; end
    chk(sig, what);
  endtask

  task automatic do_store(int h, int m, logic [19:0] ph);
    request_t r;
    r.t.hour = 5'(h); r.t.minute = 6'(m); r.phonenum = ph;
    @(negedge clk); store_ctrl = 1; store_data = r;
    @(negedge clk); store_ctrl = 0;
    wait_pulse(store_done, "store_done");
    if (refq.size() < DEPTH - 1) ref_insert(r);
    else n_full_drops++;
  endtask

  task automatic do_cancel(logic [19:0] ph);
    int idx = -1;
    @(negedge clk); cancel_ctrl = 1; cancel_phone = ph;
    @(negedge clk); cancel_ctrl = 0;
    wait_pulse(cancel_done, "cancel_done");
    foreach (refq[i]) if (refq[i].phonenum == ph) begin idx = i; break; end
    if (idx >= 0) refq.delete(idx); else n_cancel_miss++;
  endtask

  // one minute tick at time h:m; serves all due requests
  task automatic tick(int h, int m);
    @(negedge clk);
    systime.hour = 5'(h); systime.minute = 6'(m); new_minute = 1;
    @(negedge clk); new_minute = 0;
    while (refq.size() > 0 && tmin(refq[0].t) <= h * 60 + m) begin
      wait_pulse(request_pending, "request_pending");
      chk(pending_phone == refq[0].phonenum, $sformatf("pending phone %h exp %h", pending_phone, refq[0].phonenum));
      refq.pop_front();
      n_pending++;
      repeat (5) @(negedge clk);
      chk(request_pending, "pending held until reset");
      @(negedge clk); request_reset = 1;
      @(negedge clk); request_reset = 0;
      #1; chk(!request_pending, "pending cleared");
    end
    repeat (40) @(negedge clk);
    chk(!request_pending, "no further request due");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    // example table
    do_store(9, 45, 20'h58732); do_store(7, 30, 20'h56407); do_store(10, 12, 20'h58102);
    do_store(8, 45, 20'h52897); do_store(7, 50, 20'h59872); do_store(10, 0, 20'h5109A);
    do_store(8, 30, 20'h59873);
    compare_ram();
    do_store(8, 0, 20'h0000A);
    compare_ram();
    chk(dut.u_ram.mem[3].t.hour == 8 && dut.u_ram.mem[3].t.minute == 0, "08:00 inserted in row 3");
    // requests due at 07:30 and 07:50
    tick(7, 29); compare_ram();
    tick(7, 30); compare_ram();
    tick(7, 51); compare_ram();
    // cancel: existing and unknown
    do_cancel(20'h52897); compare_ram();
    do_cancel(20'h11111); compare_ram();
    // store and cancel while a request is pending
    @(negedge clk); systime.hour = 8; systime.minute = 0; new_minute = 1;
    @(negedge clk); new_minute = 0;
    wait_pulse(request_pending, "pending for store-while-pending");
    chk(pending_phone == refq[0].phonenum, "pending 08:00");
    refq.pop_front(); n_pending++;
    do_store(6, 15, 20'h33333); n_store_while_pending++;
    do_cancel(20'h58102);
    chk(request_pending, "still pending after store/cancel");
    compare_ram();
    @(negedge clk); request_reset = 1;
    @(negedge clk); request_reset = 0;
    // 06:15 is now before 08:00 so it is due at once
    wait_pulse(request_pending, "overdue request served");
    chk(pending_phone == 20'h33333, "overdue phone");
    refq.pop_front(); n_pending++;
    @(negedge clk); request_reset = 1;
    @(negedge clk); request_reset = 0;
    repeat (40) @(negedge clk);
    compare_ram();
    // fill the RAM past its capacity, then drain it
    for (int i = 0; i < DEPTH + 2; i++) do_store(22, 50 - i, 20'(i + 100));
    compare_ram();
    tick(22, 59);
    compare_ram();
    // random phase
    for (int k = 0; k < 300; k++) begin
      int op, h, m;
      op = $urandom_range(0, 9);
      if (op < 4) do_store($urandom_range(0, 23), $urandom_range(0, 59), 20'($urandom_range(1, 12)));
      else if (op < 7) do_cancel(20'($urandom_range(1, 14)));
      else begin
        h = $urandom_range(0, 23); m = $urandom_range(0, 59);
        tick(h, m);
      end
      compare_ram();
    end
    tick(23, 59);
    compare_ram();
    chk(n_full_drops > 0, "full RAM case reached");
    chk(n_cancel_miss > 0, "cancel without match reached");
    chk(n_pending > 10, "requests served");
    $display("served %0d, full drops %0d, cancel misses %0d", n_pending, n_full_drops, n_cancel_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
