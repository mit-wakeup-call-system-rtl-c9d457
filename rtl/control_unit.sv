// control_unit: coordinates the wakeup call system.
//
// Major FSM (two scenarios):
//  * Incoming call: IDLE sees a ring (RV) -> PICKUP_PHONE_IN raises LC and
//    waits for LCD (line off hook) -> START/WAIT_GREET runs the greet FSM ->
//    on an invalid PIN back to IDLE, else PLAY_MENU -> GET_MENU_OPT reads one
//    key: 1 = take a request (START/WAIT_TAKE_REQ), 2 = cancel the next
//    request (START/WAIT_CANCEL), any other key replays the menu. After the
//    request or cancel the FSM returns to IDLE.
//  * Outgoing wakeup call: IDLE sees req_pending -> PICKUP_PHONE (LC, wait
//    LCD) -> START/WAIT_DIAL dials the five digits of the pending phone
//    number -> WAIT_PICKUP waits for line reversal (LR, the called party
//    answered) -> PLAY_WAKEUP plays the wakeup message and then the music ->
//    DONE_REQ pulses done_req (request_reset of the request memory) and
//    waits until the request memory has dropped req_pending, so the request
//    just served is not taken for a new one -> IDLE.
//  LC is high in every state except INITIALIZE and IDLE, so returning to IDLE
//  hangs up. INITIALIZE waits for the MT8889 controller to finish its
//  power-up sequence. A pending wakeup call has priority over a ring.
//
// Minor FSMs:
//  * greet: welcome, "enter phone number", 5 digits, "enter PIN", 4 digits,
//    PIN/phone table look-up; the PIN is valid when the table holds it and its
//    phone number equals the number entered, otherwise "PIN invalid" plays.
//  * take request: "AM/PM" (key 1 = AM, 2 = PM), "hour" (2 digits, 1..12),
//    "minute" (2 digits); the time is converted to 24-hour form, stored with
//    the caller's number, and the acknowledgement plays.
//  * cancel: asks the request memory to delete the caller's next request,
//    then the cancel acknowledgement plays.
//
// Every message is a msg_req pulse with msg_no and a wait for msg_done;
// every key entry is a receive_digits pulse with max_number_rx and a wait for
// rx_done. Each minor FSM is started by a one-cycle start and reports a
// one-cycle done to the major FSM. Message numbers, key assignments and the
// time format are this design's choices. pin is the four received key codes
// wired straight from the digit registers, and max_number_tx is always 5.
module control_unit
  import wakeup_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // MH88437 (synchronised)
  output logic        lc,
  input  logic        rv_sync,
  input  logic        lcd_sync,
  input  logic        lr_sync,
  // audio unit
  output logic        msg_req,
  output logic [4:0]  msg_no,
  input  logic        msg_done,
  // MT8889 controller
  output logic        receive_digits,
  output logic [3:0]  max_number_rx,
  output logic        dial,
  output logic [3:0]  max_number_tx,
  input  logic [3:0]  digit [5],
  input  logic        rx_done,
  input  logic        tx_done,
  input  logic        mt_ready,
  // PIN / phone look-up table
  output logic        pin_lookup,
  output logic [15:0] pin,
  input  logic        pin_valid,
  input  logic        pin_match,
  input  logic [19:0] pin_phone,
  // request memory
  output logic        store,
  output request_t    store_data,
  input  logic        done_store,
  output logic        cancel,
  output logic [19:0] cancel_phone,
  input  logic        done_cancel,
  input  logic        req_pending,
  output logic        done_req
);
  typedef enum logic [4:0] {
    INITIALIZE, IDLE,
    PICKUP_PHONE_IN, START_GREET, WAIT_GREET, PLAY_MENU, PLAY_MENU_W,
    GET_MENU_OPT, GET_MENU_OPT_W, START_TAKE_REQ, WAIT_TAKE_REQ,
    START_CANCEL, WAIT_CANCEL,
    PICKUP_PHONE, START_DIAL, WAIT_DIAL, WAIT_PICKUP,
    PLAY_WAKEUP, PLAY_WAKEUP_W, PLAY_MUSIC, PLAY_MUSIC_W, DONE_REQ, DONE_REQ_W
  } major_t;

  typedef enum logic [3:0] {
    G_IDLE, G_WELCOME, G_WELCOME_W, G_ASK_PHONE, G_ASK_PHONE_W, G_GET_PHONE,
    G_GET_PHONE_W, G_ASK_PIN, G_ASK_PIN_W, G_GET_PIN, G_GET_PIN_W, G_LOOKUP,
    G_LOOKUP_W, G_INVALID, G_INVALID_W
  } greet_t;

  typedef enum logic [4:0] {
    R_IDLE, R_ASK_AMPM, R_ASK_AMPM_W, R_GET_AMPM, R_GET_AMPM_W, R_ASK_HOUR,
    R_ASK_HOUR_W, R_GET_HOUR, R_GET_HOUR_W, R_ASK_MIN, R_ASK_MIN_W,
    R_GET_MIN, R_GET_MIN_W, R_STORE, R_STORE_W, R_ACK, R_ACK_W
  } takereq_t;

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_ACK, C_ACK_W} cancel_t;

  major_t   state;
  greet_t   gstate;
  takereq_t rstate;
  cancel_t  cstate;

  logic        greet_start, greet_done, greet_ok;
  logic        req_start, req_done, can_start, can_done;
  logic [19:0] caller_phone;
  logic        pm;
  logic [4:0]  hour12, hour24;
  logic [5:0]  minute;

  // 12-hour to 24-hour conversion of the entered time
  always_comb begin
    if (pm) hour24 = (hour12 == 5'd12) ? 5'd12 : hour12 + 5'd12;
    else    hour24 = (hour12 == 5'd12) ? 5'd0  : hour12;
  end

  assign pin = {digit[0], digit[1], digit[2], digit[3]};
  assign lc  = (state != INITIALIZE) && (state != IDLE);
  assign max_number_tx = 4'd5;
  assign cancel_phone  = caller_phone;

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= INITIALIZE;
      gstate         <= G_IDLE;
      rstate         <= R_IDLE;
      cstate         <= C_IDLE;
      msg_req        <= 1'b0;
      msg_no         <= '0;
      receive_digits <= 1'b0;
      max_number_rx  <= '0;
      dial           <= 1'b0;
      pin_lookup     <= 1'b0;
      store          <= 1'b0;
      store_data     <= '0;
      cancel         <= 1'b0;
      done_req       <= 1'b0;
      greet_start    <= 1'b0;
      greet_done     <= 1'b0;
      greet_ok       <= 1'b0;
      req_start      <= 1'b0;
      req_done       <= 1'b0;
      can_start      <= 1'b0;
      can_done       <= 1'b0;
      caller_phone   <= '0;
      pm             <= 1'b0;
      hour12         <= '0;
      minute         <= '0;
    end else begin
      // one-cycle pulses
      msg_req        <= 1'b0;
      receive_digits <= 1'b0;
      dial           <= 1'b0;
      pin_lookup     <= 1'b0;
      store          <= 1'b0;
      cancel         <= 1'b0;
      done_req       <= 1'b0;
      greet_start    <= 1'b0;
      greet_done     <= 1'b0;
      req_start      <= 1'b0;
      req_done       <= 1'b0;
      can_start      <= 1'b0;
      can_done       <= 1'b0;

      // ================= major FSM =================
      unique case (state)
        INITIALIZE: if (mt_ready) state <= IDLE;
        IDLE: begin
          if (req_pending)  state <= PICKUP_PHONE;
          else if (rv_sync) state <= PICKUP_PHONE_IN;
        end
        // ---- incoming call ----
        PICKUP_PHONE_IN: if (lcd_sync) state <= START_GREET;
        START_GREET: begin
          greet_start <= 1'b1;
          state       <= WAIT_GREET;
        end
        WAIT_GREET: if (greet_done) state <= greet_ok ? PLAY_MENU : IDLE;
        PLAY_MENU: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_MENU;
          state   <= PLAY_MENU_W;
        end
        PLAY_MENU_W: if (msg_done) state <= GET_MENU_OPT;
        GET_MENU_OPT: begin
          receive_digits <= 1'b1;
          max_number_rx  <= 4'd1;
          state          <= GET_MENU_OPT_W;
        end
        GET_MENU_OPT_W: if (rx_done) begin
          if (digit[0] == 4'd1)      state <= START_TAKE_REQ;
          else if (digit[0] == 4'd2) state <= START_CANCEL;
          else                       state <= PLAY_MENU;
        end
        START_TAKE_REQ: begin
          req_start <= 1'b1;
          state     <= WAIT_TAKE_REQ;
        end
        WAIT_TAKE_REQ: if (req_done) state <= IDLE;
        START_CANCEL: begin
          can_start <= 1'b1;
          state     <= WAIT_CANCEL;
        end
        WAIT_CANCEL: if (can_done) state <= IDLE;
        // ---- outgoing wakeup call ----
        PICKUP_PHONE: if (lcd_sync) state <= START_DIAL;
        START_DIAL: begin
          dial  <= 1'b1;
          state <= WAIT_DIAL;
        end
        WAIT_DIAL:   if (tx_done) state <= WAIT_PICKUP;
        WAIT_PICKUP: if (lr_sync) state <= PLAY_WAKEUP;
        PLAY_WAKEUP: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_WAKEUP;
          state   <= PLAY_WAKEUP_W;
        end
        PLAY_WAKEUP_W: if (msg_done) state <= PLAY_MUSIC;
        PLAY_MUSIC: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_MUSIC;
          state   <= PLAY_MUSIC_W;
        end
        PLAY_MUSIC_W: if (msg_done) state <= DONE_REQ;
        DONE_REQ: begin
          done_req <= 1'b1;
          state    <= DONE_REQ_W;
        end
        DONE_REQ_W: if (!req_pending) state <= IDLE;  // served request withdrawn
        default: state <= IDLE;
      endcase

      // ================= greet FSM =================
      unique case (gstate)
        G_IDLE: if (greet_start) gstate <= G_WELCOME;
        G_WELCOME: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_WELCOME;
          gstate  <= G_WELCOME_W;
        end
        G_WELCOME_W: if (msg_done) gstate <= G_ASK_PHONE;
        G_ASK_PHONE: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_ENTER_PHONE;
          gstate  <= G_ASK_PHONE_W;
        end
        G_ASK_PHONE_W: if (msg_done) gstate <= G_GET_PHONE;
        G_GET_PHONE: begin
          receive_digits <= 1'b1;
          max_number_rx  <= 4'd5;
          gstate         <= G_GET_PHONE_W;
        end
        G_GET_PHONE_W: if (rx_done) begin
          caller_phone <= {digit[0], digit[1], digit[2], digit[3], digit[4]};
          gstate       <= G_ASK_PIN;
        end
        G_ASK_PIN: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_ENTER_PIN;
          gstate  <= G_ASK_PIN_W;
        end
        G_ASK_PIN_W: if (msg_done) gstate <= G_GET_PIN;
        G_GET_PIN: begin
          receive_digits <= 1'b1;
          max_number_rx  <= 4'd4;
          gstate         <= G_GET_PIN_W;
        end
        G_GET_PIN_W: if (rx_done) gstate <= G_LOOKUP;
        G_LOOKUP: begin
          pin_lookup <= 1'b1;
          gstate     <= G_LOOKUP_W;
        end
        G_LOOKUP_W: if (pin_valid) begin
          if (pin_match && pin_phone == caller_phone) begin
            greet_ok   <= 1'b1;
            greet_done <= 1'b1;
            gstate     <= G_IDLE;
          end else gstate <= G_INVALID;
        end
        G_INVALID: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_PIN_INVALID;
          gstate  <= G_INVALID_W;
        end
        G_INVALID_W: if (msg_done) begin
          greet_ok   <= 1'b0;
          greet_done <= 1'b1;
          gstate     <= G_IDLE;
        end
        default: gstate <= G_IDLE;
      endcase

      // ================= take-request FSM =================
      unique case (rstate)
        R_IDLE: if (req_start) rstate <= R_ASK_AMPM;
        R_ASK_AMPM: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_ENTER_AMPM;
          rstate  <= R_ASK_AMPM_W;
        end
        R_ASK_AMPM_W: if (msg_done) rstate <= R_GET_AMPM;
        R_GET_AMPM: begin
          receive_digits <= 1'b1;
          max_number_rx  <= 4'd1;
          rstate         <= R_GET_AMPM_W;
        end
        R_GET_AMPM_W: if (rx_done) begin
          pm     <= (digit[0] == 4'd2);
          rstate <= R_ASK_HOUR;
        end
        R_ASK_HOUR: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_ENTER_HOUR;
          rstate  <= R_ASK_HOUR_W;
        end
        R_ASK_HOUR_W: if (msg_done) rstate <= R_GET_HOUR;
        R_GET_HOUR: begin
          receive_digits <= 1'b1;
          max_number_rx  <= 4'd2;
          rstate         <= R_GET_HOUR_W;
        end
        R_GET_HOUR_W: if (rx_done) begin
          hour12 <= 5'(dtmf_value(digit[0]) * 10 + dtmf_value(digit[1]));
          rstate <= R_ASK_MIN;
        end
        R_ASK_MIN: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_ENTER_MINUTE;
          rstate  <= R_ASK_MIN_W;
        end
        R_ASK_MIN_W: if (msg_done) rstate <= R_GET_MIN;
        R_GET_MIN: begin
          receive_digits <= 1'b1;
          max_number_rx  <= 4'd2;
          rstate         <= R_GET_MIN_W;
        end
        R_GET_MIN_W: if (rx_done) begin
          minute <= 6'(dtmf_value(digit[0]) * 10 + dtmf_value(digit[1]));
          rstate <= R_STORE;
        end
        R_STORE: begin
          store      <= 1'b1;
          store_data <= '{t: '{hour: hour24, minute: minute}, phonenum: caller_phone};
          rstate     <= R_STORE_W;
        end
        R_STORE_W: if (done_store) rstate <= R_ACK;
        R_ACK: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_ACK_REQUEST;
          rstate  <= R_ACK_W;
        end
        R_ACK_W: if (msg_done) begin
          req_done <= 1'b1;
          rstate   <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase

      // ================= cancel FSM =================
      unique case (cstate)
        C_IDLE: if (can_start) begin
          cancel <= 1'b1;
          cstate <= C_WAIT;
        end
        C_WAIT: if (done_cancel) cstate <= C_ACK;
        C_ACK: begin
          msg_req <= 1'b1;
          msg_no  <= MSG_ACK_CANCEL;
          cstate  <= C_ACK_W;
        end
        C_ACK_W: if (msg_done) begin
          can_done <= 1'b1;
          cstate   <= C_IDLE;
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end
endmodule
