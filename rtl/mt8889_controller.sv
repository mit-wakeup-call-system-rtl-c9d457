// mt8889_controller: FPGA-side controller of the MT8889 DTMF transceiver.
//
// Emulates a Motorola-style processor bus (DS, cs_bar, r_wbar, rs0 and a
// 4-bit data bus) with the chip in DTMF burst mode and its interrupt output
// enabled. Built from a major FSM (initialisation, receive and dial
// sequences), a minor FSM (one bus read or write, including the DS strobe),
// digit_rx (counts received digits and loads digit1..5), digit_tx (counts
// dialed digits and picks the digit or control value to write) and an edge
// detector that turns the synchronised EST pin into new_tone.
//
// Control unit interface: pulse receive_digits with max_number_rx to collect
// that many key presses into digit[0..4] (rx_done pulses when complete);
// pulse dial with max_number_tx and phone_no to dial it (tx_done pulses when
// the last tone burst has been sent). ready is high when idle after the
// power-up initialisation. The data bus is split into data_out/data_oe
// (drive enable, the tristate buffer sits at the pin) and data_in.
module mt8889_controller #(
  parameter int TONE_DELAY = 1_350_000,
  parameter int POLL_GAP   = 27_000,
  parameter int SETUP_CYC  = 2,
  parameter int DS_CYC     = 8,
  parameter int HOLD_CYC   = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        receive_digits,
  input  logic [3:0]  max_number_rx,
  input  logic        dial,
  input  logic [3:0]  max_number_tx,
  input  logic [19:0] phone_no,
  output logic [3:0]  digit [5],
  output logic        rx_done,
  output logic        tx_done,
  output logic        ready,
  // MT8889 pins
  output logic        ds,
  output logic        cs_bar,
  output logic        r_wbar,
  output logic        rs0,
  output logic [3:0]  data_out,
  output logic        data_oe,
  input  logic [3:0]  data_in,
  input  logic        est_sync
);
  logic       new_tone, read, write, rs0_input, minor_done, rd_valid;
  logic [3:0] rd_data, received_digit;
  logic       initializing, reading_status, enable_load;
  logic       start_rx, start_tx, next_digit_rx, next_digit_tx;
  logic       done_receiving, done_dialing;
  logic [2:0] control_reg_sel;

  est_to_newtone u_est (.clk, .rst, .est(est_sync), .new_tone);

  mt8889_minor_fsm #(.SETUP_CYC(SETUP_CYC), .DS_CYC(DS_CYC), .HOLD_CYC(HOLD_CYC)) u_minor (
    .clk, .rst, .read, .write, .rs0_input, .data_in,
    .ds, .cs_bar, .r_wbar, .rs0, .rd_data, .rd_valid, .done(minor_done)
  );

  // received_digit: the value read from the chip, registered while valid
  always_ff @(posedge clk) begin
    if (rst)           received_digit <= '0;
    else if (rd_valid) received_digit <= rd_data;
  end

  mt8889_major_fsm #(.TONE_DELAY(TONE_DELAY), .POLL_GAP(POLL_GAP)) u_major (
    .clk, .rst, .receive_digits, .dial, .new_tone, .minor_done,
    .rd_data(received_digit), .done_receiving, .done_dialing,
    .read, .write, .rs0_input, .enable_tx(data_oe), .initializing, .control_reg_sel,
    .reading_status, .start_rx, .start_tx, .enable_load, .next_digit_rx, .next_digit_tx,
    .rx_done, .tx_done, .ready
  );

  digit_rx u_rx (
    .clk, .rst, .start(start_rx), .max_number(max_number_rx), .enable_load,
    .next_digit(next_digit_rx), .reading_status, .received_digit,
    .digit, .done(done_receiving)
  );

  digit_tx u_tx (
    .clk, .rst, .start(start_tx), .max_number(max_number_tx), .phone_no,
    .next_digit(next_digit_tx), .initializing, .control_reg_sel,
    .digit_out(data_out), .done(done_dialing)
  );
endmodule
