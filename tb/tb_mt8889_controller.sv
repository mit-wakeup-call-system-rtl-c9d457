// tb_mt8889_controller: the controller against the MT8889 bus model.
// Checks the power-up control-register sequence, reception of 5, 4 and 1
// digits into digit1..5, dialing of a phone number digit by digit with
// status polling, and the bus timing (DS width) of every access.
module tb_mt8889_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic receive_digits = 0, dial = 0;
  logic [3:0] max_rx = 0, max_tx = 5;
  logic [19:0] phone_no = 0;
  logic [3:0] digit [5];
  logic rx_done, tx_done, ready;
  logic ds, cs_bar, r_wbar, rs0, data_oe, est;
  logic [3:0] data_out, data_in;
  always #5 clk = ~clk;

  localparam int DS_CYC = 8;
  mt8889_controller #(.TONE_DELAY(40), .POLL_GAP(10), .DS_CYC(DS_CYC)) dut (
    .clk, .rst, .receive_digits, .max_number_rx(max_rx), .dial, .max_number_tx(max_tx),
    .phone_no, .digit, .rx_done, .tx_done, .ready,
    .ds, .cs_bar, .r_wbar, .rs0, .data_out, .data_oe, .data_in, .est_sync(est)
  );
  mt8889_model #(.BURST_CYC(300), .EST_CYC(60), .RX_VALID_CYC(20)) chip (
    .clk, .ds, .cs_bar, .r_wbar, .rs0, .data_in(data_out), .data_out(data_in), .est
  );

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // DS pulse width and bus-driver rule checked on every access
  int ds_len = 0, ds_pulses = 0;
  always @(posedge clk) if (!rst) begin
    if (ds) ds_len++;
    else if (ds_len != 0) begin
      ds_pulses++;
      if (ds_len != DS_CYC) begin failures++; $display("FAIL: DS width %0d", ds_len); end
      ds_len = 0;
    end
    if (ds && cs_bar) begin failures++; $display("FAIL: DS without chip select"); end
    if (ds && !r_wbar && !data_oe) begin failures++; $display("FAIL: write without bus drive"); end
  end

  task automatic receive(input int n, input logic [3:0] keys [5]);
    int t;
    @(negedge clk); max_rx = 4'(n); receive_digits = 1;
    @(negedge clk); receive_digits = 0;
    for (int i = 0; i < n; i++) begin
      repeat (30) @(posedge clk);
      chip.press(keys[i]);
    end
    t = 0;
    while (!rx_done && t < 5000) begin @(posedge clk); t++; end
    chk(rx_done, "rx_done");
    @(posedge clk);
    for (int i = 0; i < n; i++) chk(digit[i] == keys[i], $sformatf("digit%0d=%h exp %h", i + 1, digit[i], keys[i]));
  endtask

  initial begin
    logic [3:0] k5 [5];
    int t, polls0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    t = 0;
    while (!ready && t < 5000) begin @(posedge clk); t++; end
    chk(ready, "ready after init");
    chk(chip.ctrl_log.size() == 6, "six control writes");
    if (chip.ctrl_log.size() == 6) begin
      chk(chip.ctrl_log[2] == 4'b1000, "CRA 1000");
      chk(chip.ctrl_log[4] == 4'b1101, "CRA 1101 (tone out, DTMF, IRQ, RSEL)");
      chk(chip.ctrl_log[5] == 4'b0000, "CRB 0000 (burst mode)");
    end
    chk(chip.cra == 4'b1101 && chip.crb == 4'b0000, "final CRA/CRB");
    chk(chip.status_reads == 2, "two status reads during init");

    k5 = '{4'h5, 4'h6, 4'h4, 4'hA, 4'h7};
    receive(5, k5);
    k5 = '{4'h9, 4'hA, 4'h7, 4'hA, 4'h7};
    receive(4, k5);
    chk(digit[4] == 4'h7, "digit5 kept from earlier reception");
    k5 = '{4'h2, 4'h0, 4'h0, 4'h0, 4'h0};
    receive(1, k5);

    // dial
    polls0 = chip.status_reads;
    @(negedge clk); phone_no = 20'h5987A; dial = 1;
    @(negedge clk); dial = 0;
    t = 0;
    while (!tx_done && t < 20000) begin @(posedge clk); t++; end
    chk(tx_done, "tx_done");
    chk(chip.dialed.size() == 5, $sformatf("dialed %0d digits", chip.dialed.size()));
    if (chip.dialed.size() == 5) begin
      chk(chip.dialed[0] == 4'h5 && chip.dialed[1] == 4'h9 && chip.dialed[2] == 4'h8 &&
          chip.dialed[3] == 4'h7 && chip.dialed[4] == 4'hA, "dialed digits in order");
    end
    // burst of 300 cycles and polling every ~10+ cycles: many polls per digit
    chk(chip.status_reads - polls0 >= 5 * 5, "status polled while each burst is sent");
    // dialing 5 digits cannot be faster than five bursts
    chk(t >= 5 * 300, "dial takes at least five burst times");
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
