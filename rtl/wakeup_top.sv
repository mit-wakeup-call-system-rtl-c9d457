// wakeup_top: the wakeup call system.
//
// Users call in over a phone line, identify themselves with their phone
// number and a PIN typed on the keypad, and either book a wakeup call for a
// time of day or cancel their next one; at the booked time the system calls
// them back and plays a wakeup message followed by music.
//
// Blocks: the control unit (major FSM plus greet, take-request and cancel
// FSMs) drives the MH88437 line interface directly (LC out; RV, LCD and LR in
// through synchronizers); the MT8889 controller receives and dials DTMF
// digits (EST in through a synchronizer); the audio unit plays the message
// ROMs through the AC'97 codec; the PIN look-up table checks callers; the
// request memory keeps the booked calls sorted by time and raises
// req_pending when one is due; the time unit keeps the time of day and is set
// at startup through set_time.
//
// The dial number of the MT8889 controller is the pending request's phone
// number straight from the request memory. The MT8889 data bus is split into
// data_out/data_oe/data_in; the tristate driver belongs at the pad. All logic
// except the AC'97 serial link runs on clk (27 MHz); rst is synchronous.
module wakeup_top
  import wakeup_pkg::*;
#(
  parameter int CLK_HZ            = 27_000_000,
  parameter int DIV               = 3375,
  parameter int MSG_LEN [NUM_MSGS] = '{32768, 32768, 32768, 32768, 32768, 32768,
                                       32768, 32768, 32768, 32768, 32768, 65536},
  parameter int TONE_DELAY        = 1_350_000,
  parameter int POLL_GAP          = 27_000,
  parameter int REQ_DEPTH         = 256,
  parameter int PIN_ENTRIES       = 16
) (
  input  logic        clk,
  input  logic        rst,
  // MH88437 data access arrangement
  output logic        lc,
  input  logic        rv,
  input  logic        lcd,
  input  logic        line_reversal,
  // MT8889 DTMF transceiver
  output logic        mt_ds,
  output logic        mt_cs_bar,
  output logic        mt_r_wbar,
  output logic        mt_rs0,
  output logic [3:0]  mt_data_out,
  output logic        mt_data_oe,
  input  logic [3:0]  mt_data_in,
  input  logic        mt_est,
  // LM4550 codec, AC'97 link
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  output logic        audio_reset_b,
  // time of day setting and display
  input  logic        set_time,
  input  tod_t        set_value,
  input  logic [4:0]  set_day,
  input  logic [3:0]  set_month,
  input  logic [2:0]  set_dow,
  output tod_t        systime,
  output logic [5:0]  second,
  output logic [$clog2(REQ_DEPTH)-1:0] num_requests
);
  localparam int RAW = $clog2(REQ_DEPTH);

  logic        rv_sync, lcd_sync, lr_sync, est_sync;
  logic        msg_req, msg_done, msg_busy;
  logic [4:0]  msg_no;
  logic [19:0] audio;
  logic        codec_ready;
  logic        receive_digits, dial, rx_done, tx_done, mt_ready;
  logic [3:0]  max_number_rx, max_number_tx;
  logic [3:0]  digit [5];
  logic        pin_lookup_req, pin_valid, pin_match;
  logic [15:0] pin;
  logic [19:0] pin_phone;
  logic        store, done_store, cancel, done_cancel, req_pending, done_req;
  request_t    store_data;
  logic [19:0] cancel_phone, pending_phone;
  logic        new_minute;
  logic [4:0]  day;
  logic [3:0]  month;
  logic [2:0]  dow;

  synchronizer #(.WIDTH(4)) u_sync (
    .clk, .rst,
    .d({rv, lcd, line_reversal, mt_est}),
    .q({rv_sync, lcd_sync, lr_sync, est_sync})
  );

  control_unit u_control (
    .clk, .rst,
    .lc, .rv_sync, .lcd_sync, .lr_sync,
    .msg_req, .msg_no, .msg_done,
    .receive_digits, .max_number_rx, .dial, .max_number_tx,
    .digit, .rx_done, .tx_done, .mt_ready,
    .pin_lookup(pin_lookup_req), .pin, .pin_valid, .pin_match, .pin_phone,
    .store, .store_data, .done_store,
    .cancel, .cancel_phone, .done_cancel,
    .req_pending, .done_req
  );

  mt8889_controller #(.TONE_DELAY(TONE_DELAY), .POLL_GAP(POLL_GAP)) u_mt8889 (
    .clk, .rst,
    .receive_digits, .max_number_rx, .dial, .max_number_tx,
    .phone_no(pending_phone),
    .digit, .rx_done, .tx_done, .ready(mt_ready),
    .ds(mt_ds), .cs_bar(mt_cs_bar), .r_wbar(mt_r_wbar), .rs0(mt_rs0),
    .data_out(mt_data_out), .data_oe(mt_data_oe), .data_in(mt_data_in),
    .est_sync
  );

  audio_unit #(.DIV(DIV), .MSG_LEN(MSG_LEN)) u_audio (
    .clk, .rst, .msg_req, .msg_no, .msg_done, .msg_busy, .audio,
    .ac97_bit_clk, .ac97_sdata_in, .ac97_sync, .ac97_sdata_out,
    .audio_reset_b, .codec_ready
  );

  pin_lookup #(.ENTRIES(PIN_ENTRIES)) u_pin (
    .clk, .rst, .lookup(pin_lookup_req), .pin,
    .valid(pin_valid), .match(pin_match), .phone(pin_phone)
  );

  request_memory #(.DEPTH(REQ_DEPTH), .AW(RAW)) u_reqmem (
    .clk, .rst,
    .store_ctrl(store), .store_data, .store_done(done_store),
    .cancel_ctrl(cancel), .cancel_phone, .cancel_done(done_cancel),
    .request_pending(req_pending), .pending_phone, .request_reset(done_req),
    .systime, .new_minute, .num_requests
  );

  time_unit #(.CLK_HZ(CLK_HZ)) u_time (
    .clk, .rst, .set_time, .set_value, .set_day, .set_month, .set_dow,
    .systime, .second, .day, .month, .dow, .new_minute
  );
endmodule
