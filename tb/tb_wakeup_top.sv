// tb_wakeup_top: end-to-end run of the wakeup call system with short timings
// (a "second" of SEC_CYC clock cycles, short messages, short DTMF delays).
// A phone line model answers LC with LCD, rings with RV and answers outgoing
// calls with line reversal; the MT8889 bus model takes key presses from a
// queue whenever the controller waits for a tone and records dialed digits.
//
// Story: the clock is set to 07:28:30. Caller 59872 books 08:00, caller
// 59873 books 07:30 (inserted ahead of it), caller 564A7 books 07:30 PM and
// then, in a second call after pressing an invalid menu key, cancels it; a
// caller with a wrong PIN is turned away. At 07:30 the system calls 59873
// back (dial, answer, wakeup message, music). The clock is then set to
// 07:59:50 and 59872 is called at 08:00.
//
// Checked: MT8889 initialisation, stored rows and their order, cancel, the
// numbers dialed, every message played and its duration (MSG_LEN samples
// at one sample per DIV cycles), samples on the AC'97 link, and that each
// mechanism happened at least once.
module tb_wakeup_top;
  import wakeup_pkg::*;
  localparam int SEC_CYC = 1000;
  localparam int DIV     = 20;
  localparam int LEN     = 12;
  localparam int MSG_LEN [NUM_MSGS] = '{LEN, LEN, LEN, LEN, LEN, LEN, LEN, LEN, LEN, LEN, LEN, 2 * LEN};

  // state codes of the FSMs observed below (position in their enum lists)
  localparam int CU_INITIALIZE = 0, CU_IDLE = 1, CU_PICKUP_PHONE_IN = 2, CU_GET_MENU_OPT_W = 8;
  localparam int CU_WAIT_PICKUP = 16, CU_PLAY_WAKEUP = 17, CU_G_INVALID = 13;
  localparam int MJ_RX_WAIT_TONE = 7;
  localparam int MC_ST_SHIFT = 5, MC_CA_SHIFT = 13, MC_RT_CMP2 = 17, MC_RT_SEND = 20;

  int checks = 0, failures = 0;
  logic clk = 0, bclk = 0, rst = 1;
  logic lc, rv = 0, lcd = 0, lr = 0;
  logic ds, cs_bar, r_wbar, rs0, data_oe, est;
  logic [3:0] mt_dout, mt_din;
  logic sync, sdout, audio_reset_b;
  logic set_time = 0;
  tod_t set_value = '0, systime;
  logic [5:0] second;
  logic [7:0] num_requests;
  always #5 clk = ~clk;
  always #41 bclk = ~bclk;

  wakeup_top #(.CLK_HZ(SEC_CYC), .DIV(DIV), .MSG_LEN(MSG_LEN), .TONE_DELAY(40), .POLL_GAP(10)) dut (
    .clk, .rst, .lc, .rv, .lcd, .line_reversal(lr),
    .mt_ds(ds), .mt_cs_bar(cs_bar), .mt_r_wbar(r_wbar), .mt_rs0(rs0),
    .mt_data_out(mt_dout), .mt_data_oe(data_oe), .mt_data_in(mt_din), .mt_est(est),
    .ac97_bit_clk(bclk), .ac97_sdata_in(1'b1), .ac97_sync(sync), .ac97_sdata_out(sdout),
    .audio_reset_b, .set_time, .set_value, .set_day(5'd3), .set_month(4'd10), .set_dow(3'd5),
    .systime, .second, .num_requests);

  mt8889_model #(.BURST_CYC(150), .EST_CYC(60), .RX_VALID_CYC(20)) chip (
    .clk, .ds, .cs_bar, .r_wbar, .rs0, .data_in(mt_dout), .data_out(mt_din), .est);
  ac97_decoder dec (.bit_clk(bclk), .sync, .sdata(sdout));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- far-end user: keys ----------------
  logic [3:0] keys [$];
  initial forever begin
    @(posedge clk);
    if (keys.size() > 0 && dut.u_mt8889.u_major.state == MJ_RX_WAIT_TONE
        && !est) begin
      repeat (10) @(posedge clk);
      chip.press(keys.pop_front());
    end
  end

  // ---------------- phone line ----------------
  int answer_delay = 200;
  always @(posedge clk) begin
    lcd <= lc;
    if (!lc) lr <= 0;
  end
  initial forever begin
    @(posedge clk);
    if (dut.u_control.state == CU_WAIT_PICKUP && !lr) begin
      repeat (answer_delay) @(posedge clk);
      lr <= 1;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_incoming = 0, n_invalid = 0, n_menu_replay = 0, n_store = 0, n_insert_shift = 0;
  int n_cancel = 0, n_cancel_shift = 0, n_timer = 0, n_dial = 0, n_answer = 0;
  int n_wakeup = 0, n_music = 0, n_msgs = 0, n_link_samples = 0, n_rt_checks = 0;
  int msg_start = -1, cyc = 0;
  logic lr_q = 0;
  logic [4:0] played [$];
  always @(posedge clk) begin
    cyc++;
    lr_q <= lr;
    if (!rst) begin
      if (dut.u_control.state == CU_PICKUP_PHONE_IN && dut.u_control.lcd_sync) n_incoming++;
      if (dut.u_control.gstate == CU_G_INVALID) n_invalid++;
      if (dut.u_control.state == CU_GET_MENU_OPT_W && dut.rx_done &&
          dut.digit[0] != 4'd1 && dut.digit[0] != 4'd2) n_menu_replay++;
      if (dut.store) n_store++;
      if (dut.u_reqmem.u_ctrl.state == MC_ST_SHIFT && dut.u_reqmem.shift_a <= dut.u_reqmem.shift_b) n_insert_shift++;
      if (dut.cancel) n_cancel++;
      if (dut.u_reqmem.u_ctrl.state == MC_CA_SHIFT && dut.u_reqmem.shift_a <= dut.u_reqmem.shift_b) n_cancel_shift++;
      if (dut.u_reqmem.u_ctrl.state == MC_RT_CMP2) n_rt_checks++;
      if (dut.u_reqmem.u_ctrl.state == MC_RT_SEND) n_timer++;
      if (dut.dial) n_dial++;
      if (lr && !lr_q) n_answer++;
      if (dut.msg_req) begin
        played.push_back(dut.msg_no);
        msg_start = cyc;
        if (dut.msg_no == MSG_WAKEUP) n_wakeup++;
        if (dut.msg_no == MSG_MUSIC) n_music++;
      end
      if (dut.msg_done) begin
        automatic int len = MSG_LEN[dut.u_audio.msg_sel[3:0]];
        automatic int d = cyc - msg_start;
        n_msgs++;
        // first sample waits up to DIV cycles, then one sample per DIV cycles
        if (d < (len - 1) * DIV || d > len * DIV + 10) begin
          failures++; $display("FAIL: message %0d took %0d cycles", dut.u_audio.msg_sel, d);
        end
        checks++;
      end
    end
  end
  always @(negedge bclk) if (dec.frames > 2 && dec.slot[3] != 0 && dec.slot[3] == dut.u_audio.audio) n_link_samples++;

  // ---------------- helpers ----------------
  task automatic wait_idle(input string what);
    int t = 0;
    repeat (20) @(posedge clk);
    while (dut.u_control.state != CU_IDLE && t < 200000) begin @(posedge clk); t++; end
    chk(dut.u_control.state == CU_IDLE, {what, ": call finished"});
    chk(keys.size() == 0, {what, ": all keys taken"});
    repeat (5) @(posedge clk);
    chk(!lc, {what, ": hung up"});
  endtask

  // k holds n key codes, first key in the most significant nibble used
  task automatic call_in(input logic [63:0] k, input int n, input string what);
    for (int i = n - 1; i >= 0; i--) keys.push_back(k[i*4 +: 4]);
    @(negedge clk); rv = 1;
    repeat (30) @(negedge clk); rv = 0;
    wait_idle(what);
  endtask

  task automatic set_clock(int h, int m);
    @(negedge clk); set_time = 1; set_value.hour = 5'(h); set_value.minute = 6'(m);
    @(negedge clk); set_time = 0;
  endtask

  task automatic check_row(int row, int h, int m, logic [19:0] ph);
    request_t r;
    r = dut.u_reqmem.u_ram.mem[row];
    chk(r.t.hour == h && r.t.minute == m && r.phonenum == ph,
        $sformatf("row %0d = %0d:%0d %h exp %0d:%0d %h", row, r.t.hour, r.t.minute, r.phonenum, h, m, ph));
  endtask

  task automatic wait_wakeup(logic [19:0] ph, input string what);
    int t = 0, d0;
    d0 = chip.dialed.size();
    while (dut.u_control.state != CU_PLAY_WAKEUP && t < 200000) begin @(posedge clk); t++; end
    chk(dut.u_control.state == CU_PLAY_WAKEUP, {what, ": wakeup call placed"});
    chk(chip.dialed.size() == d0 + 5, {what, ": five digits dialed"});
    if (chip.dialed.size() == d0 + 5)
      chk({chip.dialed[d0], chip.dialed[d0 + 1], chip.dialed[d0 + 2], chip.dialed[d0 + 3], chip.dialed[d0 + 4]} == ph,
          $sformatf("%s: dialed number", what));
    wait_idle(what);
  endtask

  initial begin
    int t;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    t = 0;
    while (dut.u_control.state == CU_INITIALIZE && t < 10000) begin @(posedge clk); t++; end
    chk(chip.cra == MT_CRA_INIT && chip.crb == MT_CRB_INIT, "MT8889 initialised");
    set_clock(7, 28);
    // 59872 (PIN 9A7A) books 08:00 AM
    call_in(64'h598729A7A11A8AA, 15, "book 08:00");
    // 59873 (PIN 5555) books 07:30 AM: inserted ahead
    call_in(64'h59873555511A73A, 15, "book 07:30");
    // 564A7 (PIN 1234) books 07:30 PM
    call_in(64'h564A7123412A73A, 15, "book 19:30");
    chk(num_requests == 3, "three requests stored");
    check_row(1, 7, 30, 20'h59873);
    check_row(2, 8, 0, 20'h59872);
    check_row(3, 19, 30, 20'h564A7);
    // wrong PIN
    call_in(64'h564A74321, 9, "wrong PIN");
    chk(num_requests == 3, "nothing stored for a wrong PIN");
    // 59873 presses 9 (not in the menu), then cancels its 07:30 call
    call_in(64'h59873555592, 11, "cancel");
    chk(num_requests == 2, "one request cancelled");
    check_row(1, 8, 0, 20'h59872);
    check_row(2, 19, 30, 20'h564A7);
    // book 07:30 again for 59873, then wait for the call
    call_in(64'h59873555511A73A, 15, "rebook 07:30");
    chk(num_requests == 3, "three requests again");
    chk(systime.hour == 7 && systime.minute < 30, "calls done before 07:30");
    wait_wakeup(20'h59873, "07:30 wakeup");
    chk(systime.hour == 7 && systime.minute == 30, "called at 07:30");
    chk(num_requests == 2, "served request removed");
    // jump to just before 08:00
    set_clock(7, 59);
    wait_wakeup(20'h59872, "08:00 wakeup");
    chk(systime.hour == 8 && systime.minute == 0, "called at 08:00");
    chk(num_requests == 1, "19:30 request still stored");
    check_row(1, 19, 30, 20'h564A7);

    $display("incoming %0d invalid %0d menu_replay %0d store %0d insert_shift %0d cancel %0d cancel_shift %0d",
             n_incoming, n_invalid, n_menu_replay, n_store, n_insert_shift, n_cancel, n_cancel_shift);
    $display("timer_checks %0d timer_fired %0d dial %0d answer %0d wakeup %0d music %0d msgs %0d link %0d",
             n_rt_checks, n_timer, n_dial, n_answer, n_wakeup, n_music, n_msgs, n_link_samples);
    chk(n_incoming == 6, "incoming calls");
    chk(n_invalid == 1, "invalid PIN");
    chk(n_menu_replay == 1, "menu replay");
    chk(n_store == 4, "stores");
    chk(n_insert_shift >= 1, "insertion with shift down");
    chk(n_cancel == 1, "cancel");
    chk(n_cancel_shift >= 1, "cancel with shift up");
    chk(n_rt_checks > n_timer, "timer found nothing due at some minutes");
    chk(n_timer == 2, "request timer fired");
    chk(n_dial == 2, "dialed");
    chk(n_answer == 2, "answered");
    chk(n_wakeup == 2 && n_music == 2, "wakeup message and music");
    chk(n_link_samples > 0, "samples on the AC'97 link");
    chk(n_msgs == played.size(), "every message finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
