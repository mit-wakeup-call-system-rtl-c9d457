// tb_wakeup_full: the top level at its real size (27 MHz clock, 32768-sample
// messages, 65536-sample music, 3375-cycle sample divider, 50 ms tone delay,
// 256-row request memory) with no parameter overrides.
//
// A full booking call at this size lasts about 900 million cycles, so this
// bench only covers the wakeup side: MT8889 start-up, two requests put on the
// store port of the request memory (the control unit is idle and does not
// drive it), and one minute tick instead of waiting a simulated minute. The
// system must then dial the due number, wait for line reversal, play the
// wakeup message and the music at full length, and drop the served request.
module tb_wakeup_full;
  import wakeup_pkg::*;
  localparam int CU_INITIALIZE = 0, CU_IDLE = 1, CU_WAIT_PICKUP = 16, CU_PLAY_WAKEUP = 17;
  localparam int DIV = 3375;

  int checks = 0, failures = 0;
  logic clk = 0, bclk = 0, rst = 1;
  logic lc, lcd = 0, lr = 0;
  logic ds, cs_bar, r_wbar, rs0, data_oe, est;
  logic [3:0] mt_dout, mt_din;
  logic sync, sdout, audio_reset_b;
  logic set_time = 0;
  tod_t set_value = '0, systime;
  logic [5:0] second;
  logic [7:0] num_requests;
  // 27 MHz system clock and an AC'97 bit clock near 12.288 MHz
  always #37 clk = ~clk;
  always #81 bclk = ~bclk;

  wakeup_top dut (
    .clk, .rst, .lc, .rv(1'b0), .lcd, .line_reversal(lr),
    .mt_ds(ds), .mt_cs_bar(cs_bar), .mt_r_wbar(r_wbar), .mt_rs0(rs0),
    .mt_data_out(mt_dout), .mt_data_oe(data_oe), .mt_data_in(mt_din), .mt_est(est),
    .ac97_bit_clk(bclk), .ac97_sdata_in(1'b1), .ac97_sync(sync), .ac97_sdata_out(sdout),
    .audio_reset_b, .set_time, .set_value, .set_day(5'd3), .set_month(4'd10), .set_dow(3'd5),
    .systime, .second, .num_requests);

  mt8889_model chip (.clk, .ds, .cs_bar, .r_wbar, .rs0, .data_in(mt_dout), .data_out(mt_din), .est);
  ac97_decoder dec (.bit_clk(bclk), .sync, .sdata(sdout));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    lcd <= lc;
    if (!lc) lr <= 0;
  end

  int cyc = 0, msg_start = 0, n_link = 0;
  logic [4:0] played [$];
  int took [$];
  always @(posedge clk) begin
    cyc++;
    if (!rst && dut.msg_req) begin played.push_back(dut.msg_no); msg_start = cyc; end
    if (!rst && dut.msg_done) took.push_back(cyc - msg_start);
  end
  always @(negedge bclk) if (dec.frames > 2 && dec.slot[3] != 0 && dec.slot[3] == dut.u_audio.audio) n_link++;

  task automatic put_request(int h, int m, logic [19:0] ph);
    request_t r;
    r.t.hour = 5'(h); r.t.minute = 6'(m); r.phonenum = ph;
    @(negedge clk);
    force dut.store = 1'b1;
    force dut.store_data = r;
    @(negedge clk);
    release dut.store;
    release dut.store_data;
    while (!dut.done_store) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int t, d0;
    request_t r;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    t = 0;
    while (dut.u_control.state == CU_INITIALIZE && t < 2_000_000) begin @(posedge clk); t++; end
    chk(dut.u_control.state == CU_IDLE, "left INITIALIZE");
    chk(chip.cra == MT_CRA_INIT && chip.crb == MT_CRB_INIT, "MT8889 control registers written");
    $display("init done after %0d cycles", t);

    @(negedge clk); set_time = 1; set_value.hour = 5'd7; set_value.minute = 6'd30;
    @(negedge clk); set_time = 0;
    put_request(8, 0, 20'h59872);
    put_request(7, 30, 20'h59873);
    chk(num_requests == 2, "two requests stored");
    r = dut.u_reqmem.u_ram.mem[1];
    chk(r.t.hour == 7 && r.t.minute == 30 && r.phonenum == 20'h59873, "07:30 request first");
    r = dut.u_reqmem.u_ram.mem[2];
    chk(r.t.hour == 8 && r.t.minute == 0 && r.phonenum == 20'h59872, "08:00 request second");
    chk(!lc, "line idle before the minute tick");

    // one minute tick at 07:30
    d0 = chip.dialed.size();
    @(negedge clk); force dut.new_minute = 1'b1;
    @(negedge clk); release dut.new_minute;
    t = 0;
    while (dut.u_control.state != CU_WAIT_PICKUP && t < 20_000_000) begin @(posedge clk); t++; end
    chk(dut.u_control.state == CU_WAIT_PICKUP, "dialed and waiting for pickup");
    chk(lc, "line taken for the outgoing call");
    chk(chip.dialed.size() == d0 + 5, "five digits dialed");
    if (chip.dialed.size() == d0 + 5)
      chk({chip.dialed[d0], chip.dialed[d0 + 1], chip.dialed[d0 + 2], chip.dialed[d0 + 3], chip.dialed[d0 + 4]} == 20'h59873,
          "dialed 59873");
    $display("dialing took %0d cycles", t);
    repeat (100_000) @(posedge clk);
    chk(dut.u_control.state == CU_WAIT_PICKUP, "still waiting while nobody answers");
    lr <= 1;
    t = 0;
    while (dut.u_control.state != CU_PLAY_WAKEUP && t < 1000) begin @(posedge clk); t++; end
    chk(dut.u_control.state == CU_PLAY_WAKEUP, "answer starts the wakeup message");
    t = 0;
    while (dut.u_control.state != CU_IDLE && t < 400_000_000) begin @(posedge clk); t++; end
    chk(dut.u_control.state == CU_IDLE, "wakeup call finished");
    repeat (5) @(posedge clk);
    chk(!lc, "hung up");
    chk(num_requests == 1, "served request removed");
    r = dut.u_reqmem.u_ram.mem[1];
    chk(r.t.hour == 8 && r.t.minute == 0 && r.phonenum == 20'h59872, "08:00 request kept");
    chk(played.size() == 2 && played[0] == MSG_WAKEUP && played[1] == MSG_MUSIC, "wakeup then music");
    chk(took.size() == 2, "both messages finished");
    if (took.size() == 2) begin
      $display("wakeup %0d cycles, music %0d cycles", took[0], took[1]);
      chk(took[0] >= 32767 * DIV && took[0] <= 32768 * DIV + 20, "wakeup message length");
      chk(took[1] >= 65535 * DIV && took[1] <= 65536 * DIV + 20, "music length");
    end
    chk(n_link > 1000, "samples carried on the AC'97 link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (420_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
