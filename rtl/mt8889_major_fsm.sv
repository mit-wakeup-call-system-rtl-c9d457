// mt8889_major_fsm: sequences the MT8889 DTMF transceiver.
//
// After reset it initialises the chip: read the status register, write the
// six control-register values chosen by digit_tx (control_reg_sel 0..5, with
// initializing high), read the status register again, then raise ready.
//
// Receive (receive_digits pulse): wait for new_tone, wait TONE_DELAY cycles
// for the receiver to finish converting the tone, read the receive register
// (rs0 = 0) through the minor FSM, pulse enable_load so digit_rx stores the
// received digit, pulse next_digit_rx, and repeat until digit_rx reports
// done; then pulse rx_done.
//
// Dial (dial pulse): write the digit selected by digit_tx to the transmit
// register (rs0 = 0, enable_tx drives the bus), then poll the status
// register (rs0 = 1, reading_status high) every POLL_GAP cycles until the
// transmit-register-empty bit shows the burst is sent, pulse next_digit_tx,
// and repeat until digit_tx reports done; then pulse tx_done.
//
// A receive or dial request that arrives while busy is ignored; the control
// unit issues one at a time.
module mt8889_major_fsm
  import wakeup_pkg::*;
#(
  parameter int TONE_DELAY = 1_350_000,   // 50 ms at 27 MHz
  parameter int POLL_GAP   = 27_000       // 1 ms at 27 MHz
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       receive_digits,
  input  logic       dial,
  input  logic       new_tone,
  input  logic       minor_done,
  input  logic [3:0] rd_data,
  input  logic       done_receiving,
  input  logic       done_dialing,
  output logic       read,
  output logic       write,
  output logic       rs0_input,
  output logic       enable_tx,
  output logic       initializing,
  output logic [2:0] control_reg_sel,
  output logic       reading_status,
  output logic       start_rx,
  output logic       start_tx,
  output logic       enable_load,
  output logic       next_digit_rx,
  output logic       next_digit_tx,
  output logic       rx_done,
  output logic       tx_done,
  output logic       ready
);
  typedef enum logic [4:0] {
    I_READ1, I_READ1_W, I_WRITE, I_WRITE_W, I_READ2, I_READ2_W,
    IDLE,
    RX_WAIT_TONE, RX_DELAY, RX_READ, RX_READ_W, RX_LOAD, RX_NEXT, RX_CHECK,
    TX_WRITE, TX_WRITE_W, TX_GAP, TX_POLL, TX_POLL_W, TX_CHECK, TX_NEXT, TX_DONE_CHECK
  } major_state_t;

  localparam int CW = $clog2((TONE_DELAY > POLL_GAP ? TONE_DELAY : POLL_GAP) + 1);

  major_state_t  state;
  logic [CW-1:0] cnt;

  always_comb begin
    read           = (state == I_READ1) || (state == I_READ2) ||
                     (state == RX_READ) || (state == TX_POLL);
    write          = (state == I_WRITE) || (state == TX_WRITE);
    rs0_input      = !(state == RX_READ || state == TX_WRITE);
    enable_tx      = (state == I_WRITE) || (state == I_WRITE_W) ||
                     (state == TX_WRITE) || (state == TX_WRITE_W);
    initializing   = (state == I_WRITE) || (state == I_WRITE_W);
    reading_status = (state == TX_POLL) || (state == TX_POLL_W) || (state == TX_CHECK) ||
                     (state == I_READ1) || (state == I_READ1_W) ||
                     (state == I_READ2) || (state == I_READ2_W);
    enable_load    = (state == RX_LOAD);
    next_digit_rx  = (state == RX_NEXT);
    next_digit_tx  = (state == TX_NEXT);
    ready          = (state == IDLE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= I_READ1;
      cnt             <= '0;
      control_reg_sel <= '0;
      start_rx        <= 1'b0;
      start_tx        <= 1'b0;
      rx_done         <= 1'b0;
      tx_done         <= 1'b0;
    end else begin
      start_rx <= 1'b0;
      start_tx <= 1'b0;
      rx_done  <= 1'b0;
      tx_done  <= 1'b0;
      unique case (state)
        // ---- power-up initialisation ----
        I_READ1:   state <= I_READ1_W;
        I_READ1_W: if (minor_done) begin
          control_reg_sel <= '0;
          state           <= I_WRITE;
        end
        I_WRITE:   state <= I_WRITE_W;
        I_WRITE_W: if (minor_done) begin
          if (control_reg_sel == 3'd5) state <= I_READ2;
          else begin
            control_reg_sel <= control_reg_sel + 3'd1;
            state           <= I_WRITE;
          end
        end
        I_READ2:   state <= I_READ2_W;
        I_READ2_W: if (minor_done) state <= IDLE;

        IDLE: begin
          if (receive_digits) begin
            start_rx <= 1'b1;
            state    <= RX_WAIT_TONE;
          end else if (dial) begin
            start_tx <= 1'b1;
            state    <= TX_WRITE;
          end
        end

        // ---- receive ----
        RX_WAIT_TONE: if (new_tone) begin
          cnt   <= CW'(TONE_DELAY);
          state <= RX_DELAY;
        end
        RX_DELAY:  if (cnt == 0) state <= RX_READ; else cnt <= cnt - 1'b1;
        RX_READ:   state <= RX_READ_W;
        RX_READ_W: if (minor_done) state <= RX_LOAD;
        RX_LOAD:   state <= RX_NEXT;
        RX_NEXT:   state <= RX_CHECK;
        RX_CHECK: begin
          if (done_receiving) begin
            rx_done <= 1'b1;
            state   <= IDLE;
          end else state <= RX_WAIT_TONE;
        end

        // ---- dial ----
        TX_WRITE:   state <= TX_WRITE_W;
        TX_WRITE_W: if (minor_done) begin
          cnt   <= CW'(POLL_GAP);
          state <= TX_GAP;
        end
        TX_GAP:    if (cnt == 0) state <= TX_POLL; else cnt <= cnt - 1'b1;
        TX_POLL:   state <= TX_POLL_W;
        TX_POLL_W: if (minor_done) state <= TX_CHECK;
        TX_CHECK: begin
          if (rd_data[MT_ST_TXE]) state <= TX_NEXT;
          else begin
            cnt   <= CW'(POLL_GAP);
            state <= TX_GAP;
          end
        end
        TX_NEXT: state <= TX_DONE_CHECK;
        TX_DONE_CHECK: begin
          if (done_dialing) begin
            tx_done <= 1'b1;
            state   <= IDLE;
          end else state <= TX_WRITE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
