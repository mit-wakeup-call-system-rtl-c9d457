// audio_fsm: plays one message ROM from its first to its last sample.
//
// States: IDLE (address, msg_done and LE_audioreg cleared) -> WAIT_REQ (wait
// for msg_req, latch msg_no) -> WAIT_SEND_ADDR (wait for the 8 kHz
// send_pulse) -> UPDATE_ADDR (LE_audioreg was raised for one cycle on the
// way in, loading the current sample into the AC97 register) ->
// UPDATE_ADDR_DELAY (if the address is the message's last one go to
// SEND_MSG_DONE, else advance the address and wait for the next pulse) ->
// SEND_MSG_DONE (msg_done high for one cycle) -> DELAY1 -> IDLE.
//
// One address counter is shared by all ROMs (each takes its low bits);
// msg_len[msg_sel] is the length of the selected message. A message of N
// samples thus loads N samples, one per send_pulse, and msg_done follows the
// last load by two cycles. msg_sel drives the ROM output multiplexer.
// A msg_req pulse that arrives while a message is still finishing (in
// SEND_MSG_DONE, DELAY1 or IDLE) is remembered with its msg_no and served
// from WAIT_REQ, so the control unit can ask for the next message as soon as
// msg_done arrives.
module audio_fsm #(
  parameter int NUM_MSGS = 12,
  parameter int AW       = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          msg_req,
  input  logic [4:0]    msg_no,
  input  logic          send_pulse,
  input  logic [AW:0]   msg_len [NUM_MSGS],
  output logic [AW-1:0] addr,
  output logic [4:0]    msg_sel,
  output logic          le_audioreg,
  output logic          msg_done,
  output logic          busy
);
  typedef enum logic [2:0] {
    IDLE, WAIT_REQ, WAIT_SEND_ADDR, UPDATE_ADDR, UPDATE_ADDR_DELAY,
    SEND_MSG_DONE, DELAY1
  } audio_state_t;
  audio_state_t state;
  logic [AW:0]  last_addr;
  logic         req_q;
  logic [4:0]   no_q;

  always_comb begin
    last_addr = '0;
    if (int'(msg_sel) < NUM_MSGS) last_addr = msg_len[msg_sel[3:0]] - 1'b1;
  end

  assign busy = (state != WAIT_REQ) && (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      addr        <= '0;
      msg_sel     <= '0;
      le_audioreg <= 1'b0;
      msg_done    <= 1'b0;
      req_q       <= 1'b0;
      no_q        <= '0;
    end else begin
      if (msg_req) begin
        req_q <= 1'b1;
        no_q  <= msg_no;
      end
      unique case (state)
        IDLE: begin
          addr        <= '0;
          le_audioreg <= 1'b0;
          msg_done    <= 1'b0;
          state       <= WAIT_REQ;
        end
        WAIT_REQ: if (msg_req || req_q) begin
          msg_sel <= msg_req ? msg_no : no_q;
          req_q   <= 1'b0;
          state   <= WAIT_SEND_ADDR;
        end
        WAIT_SEND_ADDR: if (send_pulse) begin
          le_audioreg <= 1'b1;
          state       <= UPDATE_ADDR;
        end
        UPDATE_ADDR: begin
          le_audioreg <= 1'b0;
          state       <= UPDATE_ADDR_DELAY;
        end
        UPDATE_ADDR_DELAY: begin
          if ({1'b0, addr} >= last_addr) begin
            msg_done <= 1'b1;
            state    <= SEND_MSG_DONE;
          end else begin
            addr  <= addr + 1'b1;
            state <= WAIT_SEND_ADDR;
          end
        end
        SEND_MSG_DONE: begin
          msg_done <= 1'b0;
          state    <= DELAY1;
        end
        DELAY1:  state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
