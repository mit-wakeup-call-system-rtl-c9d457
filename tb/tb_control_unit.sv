// tb_control_unit: the control unit with behavioural stand-ins for the audio
// unit, MT8889 controller, request memory and the phone line, and the real
// PIN table. Runs incoming calls (valid PIN with a morning, noon, midnight
// and evening request; a wrong PIN; a wrong menu key followed by a cancel)
// and an outgoing wakeup call. Checks the message order, the keys asked for,
// the stored time in 24-hour form, the line control (LC) and the hand-shakes.
module tb_control_unit;
  import wakeup_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic lc, rv = 0, lcd = 0, lr = 0;
  logic msg_req, msg_done = 0;
  logic [4:0] msg_no;
  logic receive_digits, dial, rx_done = 0, tx_done = 0, mt_ready = 0;
  logic [3:0] max_rx, max_tx;
  logic [3:0] digit [5];
  logic pin_lookup_req, pin_valid, pin_match;
  logic [15:0] pin;
  logic [19:0] pin_phone, cancel_phone;
  logic store, done_store = 0, cancel, done_cancel = 0, req_pending = 0, done_req;
  request_t store_data;
  always #5 clk = ~clk;

  control_unit dut (.clk, .rst, .lc, .rv_sync(rv), .lcd_sync(lcd), .lr_sync(lr),
    .msg_req, .msg_no, .msg_done, .receive_digits, .max_number_rx(max_rx), .dial,
    .max_number_tx(max_tx), .digit, .rx_done, .tx_done, .mt_ready,
    .pin_lookup(pin_lookup_req), .pin, .pin_valid, .pin_match, .pin_phone,
    .store, .store_data, .done_store, .cancel, .cancel_phone, .done_cancel,
    .req_pending, .done_req);
  pin_lookup u_pin (.clk, .rst, .lookup(pin_lookup_req), .pin, .valid(pin_valid),
    .match(pin_match), .phone(pin_phone));

  // ---- stand-ins ----
  logic [4:0] played [$];
  logic [3:0] keys [$];
  int asked [$];
  request_t stored [$];
  logic [19:0] cancelled [$];
  int n_dial = 0, n_done_req = 0;

  always @(posedge clk) begin
    msg_done <= 0; rx_done <= 0; tx_done <= 0; done_store <= 0; done_cancel <= 0;
    lcd <= lc;
    if (!rst && msg_req) begin
      played.push_back(msg_no);
      fork begin repeat (20) @(posedge clk); msg_done <= 1; end join_none
    end
    if (!rst && receive_digits) begin
      automatic int n = max_rx;
      asked.push_back(n);
      fork begin
        repeat (15) @(posedge clk);
        for (int i = 0; i < n; i++) digit[i] <= keys.pop_front();
        @(posedge clk); rx_done <= 1;
      end join_none
    end
    if (!rst && dial) begin
      n_dial++;
      fork begin repeat (30) @(posedge clk); tx_done <= 1; end join_none
    end
    if (!rst && store) begin
      stored.push_back(store_data);
      fork begin repeat (10) @(posedge clk); done_store <= 1; end join_none
    end
    if (!rst && cancel) begin
      cancelled.push_back(cancel_phone);
      fork begin repeat (10) @(posedge clk); done_cancel <= 1; end join_none
    end
    if (!rst && done_req) begin n_done_req++; req_pending <= 0; end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wait_idle(int limit);
    int t = 0;
    repeat (5) @(posedge clk);
    while (dut.state != dut.IDLE && t < limit) begin @(posedge clk); t++; end
    chk(dut.state == dut.IDLE, "back in IDLE");
    repeat (3) @(posedge clk);
    chk(!lc, "hung up");
  endtask

  task automatic ring();
    @(negedge clk); rv = 1;
    repeat (5) @(negedge clk); rv = 0;
  endtask

  task automatic push_keys(input logic [3:0] k [], input int n);
    for (int i = 0; i < n; i++) keys.push_back(k[i]);
  endtask

  task automatic check_msgs(input logic [4:0] exp [], input string what);
    chk(played.size() == exp.size(), $sformatf("%s: %0d messages, exp %0d", what, played.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < played.size(); i++)
      chk(played[i] == exp[i], $sformatf("%s: message %0d = %0d exp %0d", what, i, played[i], exp[i]));
    played.delete();
  endtask

  // caller 56407 with PIN 1234 requests a call at the given time
  task automatic request_call(input logic [3:0] ampm, input logic [3:0] h1, h2, m1, m2,
                              input int exp_h, input int exp_m);
    logic [3:0] k [];
    k = '{4'h5, 4'h6, 4'h4, 4'hA, 4'h7, 4'h1, 4'h2, 4'h3, 4'h4, 4'h1, ampm, h1, h2, m1, m2};
    push_keys(k, 15);
    ring();
    wait_idle(5000);
    check_msgs('{MSG_WELCOME, MSG_ENTER_PHONE, MSG_ENTER_PIN, MSG_MENU, MSG_ENTER_AMPM,
                 MSG_ENTER_HOUR, MSG_ENTER_MINUTE, MSG_ACK_REQUEST}, "request");
    chk(asked.size() == 6 && asked[0] == 5 && asked[1] == 4 && asked[2] == 1 && asked[3] == 1
        && asked[4] == 2 && asked[5] == 2, "keys asked: 5, 4, 1, 1, 2, 2");
    asked.delete();
    chk(stored.size() == 1, $sformatf("one store, got %0d", stored.size()));
    if (stored.size() == 1) begin
      chk(stored[0].phonenum == 20'h564A7, "stored phone");
      chk(stored[0].t.hour == exp_h && stored[0].t.minute == exp_m,
          $sformatf("stored time %0d:%0d exp %0d:%0d", stored[0].t.hour, stored[0].t.minute, exp_h, exp_m));
    end
    stored.delete();
  endtask

  int lc_cycles = 0;
  always @(posedge clk) if (lc) lc_cycles++;

  initial begin
    logic [3:0] k [];
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (10) @(posedge clk);
    chk(dut.state == dut.INITIALIZE, "waits for MT8889 init");
    ring();
    chk(!lc, "no pick-up before the MT8889 is ready");
    @(negedge clk); mt_ready = 1;
    repeat (5) @(posedge clk);

    request_call(4'h1, 4'hA, 4'h7, 4'h3, 4'hA, 7, 30);     // 07:30 AM (key 0 = code A)
    request_call(4'h2, 4'h1, 4'h2, 4'hA, 4'h5, 12, 5);     // 12:05 PM
    request_call(4'h1, 4'h1, 4'h2, 4'h1, 4'hA, 0, 10);     // 12:10 AM
    request_call(4'h2, 4'h1, 4'h1, 4'h5, 4'h9, 23, 59);    // 11:59 PM

    // wrong PIN
    k = '{4'h5, 4'h6, 4'h4, 4'hA, 4'h7, 4'h9, 4'h9, 4'h9, 4'h9};
    push_keys(k, 9);
    ring();
    wait_idle(5000);
    check_msgs('{MSG_WELCOME, MSG_ENTER_PHONE, MSG_ENTER_PIN, MSG_PIN_INVALID}, "invalid PIN");
    asked.delete();
    chk(stored.size() == 0 && cancelled.size() == 0, "nothing stored for a wrong PIN");

    // PIN of another user
    k = '{4'h5, 4'h6, 4'h4, 4'hA, 4'h7, 4'h5, 4'h5, 4'h5, 4'h5};
    push_keys(k, 9);
    ring();
    wait_idle(5000);
    check_msgs('{MSG_WELCOME, MSG_ENTER_PHONE, MSG_ENTER_PIN, MSG_PIN_INVALID}, "PIN of another number");
    asked.delete();

    // wrong menu key, then cancel
    k = '{4'h5, 4'h9, 4'h8, 4'h7, 4'h2, 4'h9, 4'hA, 4'h7, 4'hA, 4'h3, 4'h2};
    push_keys(k, 11);
    ring();
    wait_idle(5000);
    check_msgs('{MSG_WELCOME, MSG_ENTER_PHONE, MSG_ENTER_PIN, MSG_MENU, MSG_MENU, MSG_ACK_CANCEL}, "cancel");
    asked.delete();
    chk(cancelled.size() == 1 && cancelled[0] == 20'h59872, "cancel for 59872");

    // outgoing wakeup call
    @(negedge clk); req_pending = 1;
    repeat (100) @(posedge clk);
    chk(lc, "line picked up for the wakeup call");
    chk(n_dial == 1, "dialed once");
    chk(dut.state == dut.WAIT_PICKUP, "waiting for the answer");
    chk(played.size() == 0, "no message before the answer");
    @(negedge clk); lr = 1;
    wait_idle(5000);
    lr = 0;
    check_msgs('{MSG_WAKEUP, MSG_MUSIC}, "wakeup");
    chk(n_done_req == 1, "done_req pulsed once");
    chk(keys.size() == 0, "all keys consumed");
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
