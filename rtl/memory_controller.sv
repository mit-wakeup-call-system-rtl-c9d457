// memory_controller: major FSM of the request memory.
//
// Keeps the wakeup requests in request RAM rows 1..tail, sorted by time with
// the earliest in row 1 (tail = 0 means no requests). Three operations:
//
//  * Store (store_ctrl pulse, store_data): scan rows 1..tail for the first row
//    whose time is later than the new request, shift that row and all below it
//    down by one, write the new request into the freed row and increment tail.
//    Requests for the same time stay in arrival order. A store into a full
//    RAM is dropped; store_done still pulses.
//  * Cancel (cancel_ctrl pulse, cancel_phone): scan rows 1..tail for the first
//    row with that phone number, shift the rows after it up by one and
//    decrement tail. With no matching row nothing is deleted.
//  * Request timer (new_minute pulse): while row 1 holds a time at or before
//    the system time, copy its phone number to pending_phone, shift rows
//    2..tail up, decrement tail, raise request_pending and hold it until a
//    request_reset pulse, then look at the new row 1.
//
// The RAM has one cycle of read latency, so every compare state is preceded
// by a state that presents the address (the INC states step the address
// and go back through CMP). Time comparisons go through the
// external time_compare block (time1/time2 out, cmp_result in). Multi-row
// moves are delegated to the shifting unit (shift_down/shift_up, a, b, done).
// store_ctrl, cancel_ctrl and new_minute are latched, so a pulse arriving
// while another operation runs is served afterwards. A store or cancel is
// also served while a pending request waits for request_reset.
module memory_controller
  import wakeup_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  // control unit side
  input  logic          store_ctrl,
  input  request_t      store_data,
  output logic          store_done,
  input  logic          cancel_ctrl,
  input  logic [19:0]   cancel_phone,
  output logic          cancel_done,
  output logic          request_pending,
  output logic [19:0]   pending_phone,
  input  logic          request_reset,
  // time
  input  tod_t          systime,
  input  logic          new_minute,
  output tod_t          time1,
  output tod_t          time2,
  input  cmp_t          cmp_result,
  // shifting unit
  output logic          shift_down,
  output logic          shift_up,
  output logic [AW-1:0] shift_a,
  output logic [AW-1:0] shift_b,
  input  logic          shift_done,
  // RAM port (used when the shifting unit is idle)
  output logic [AW-1:0] ram_addr,
  output request_t      ram_din,
  output logic          ram_we,
  input  request_t      ram_dout,
  output logic [AW-1:0] tail
);
  typedef enum logic [4:0] {
    IDLE,
    ST_GET, ST_CMP, ST_CMP2, ST_INC, ST_SHIFT, ST_SHIFT_WAIT, ST_COPY, ST_INC_TAIL,
    CA_GET, CA_CMP, CA_CMP2, CA_INC, CA_SHIFT, CA_SHIFT_WAIT, CA_DEC_TAIL,
    RT_CMP, RT_CMP2, RT_SHIFT, RT_SHIFT_WAIT, RT_SEND, RT_WAIT
  } mc_state_t;

  mc_state_t     state;
  logic          store_req, cancel_req, minute_req;
  request_t      store_q;
  logic [19:0]   cancel_q;
  logic [AW-1:0] addr;

  // Outputs to the time compare unit
  always_comb begin
    time1 = store_q.t;
    time2 = ram_dout.t;
    if (state == RT_CMP2) begin
      time1 = ram_dout.t;
      time2 = systime;
    end
  end

  always_comb begin
    ram_addr   = addr;
    ram_din    = store_q;
    ram_we     = (state == ST_COPY);
    shift_down = (state == ST_SHIFT);
    shift_up   = (state == CA_SHIFT) || (state == RT_SHIFT);
    shift_a    = addr;
    shift_b    = tail;
    if (state == CA_SHIFT || state == RT_SHIFT) shift_a = addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= IDLE;
      store_req       <= 1'b0;
      cancel_req      <= 1'b0;
      minute_req      <= 1'b0;
      store_q         <= '0;
      cancel_q        <= '0;
      addr            <= '0;
      tail            <= '0;
      store_done      <= 1'b0;
      cancel_done     <= 1'b0;
      request_pending <= 1'b0;
      pending_phone   <= '0;
    end else begin
      store_done  <= 1'b0;
      cancel_done <= 1'b0;
      if (store_ctrl) begin
        store_req <= 1'b1;
        store_q   <= store_data;
      end
      if (cancel_ctrl) begin
        cancel_req <= 1'b1;
        cancel_q   <= cancel_phone;
      end
      if (new_minute) minute_req <= 1'b1;

      unique case (state)
        IDLE, RT_WAIT: begin
          if (state == RT_WAIT && request_reset) begin
            request_pending <= 1'b0;
            state           <= RT_CMP;
            addr            <= AW'(1);
          end else if (store_req) begin
            state <= ST_GET;
          end else if (cancel_req) begin
            state <= CA_GET;
          end else if (state == IDLE && minute_req) begin
            minute_req <= 1'b0;
            addr       <= AW'(1);
            state      <= RT_CMP;
          end
        end

        // ---------------- store ----------------
        ST_GET: begin
          store_req <= 1'b0;
          addr      <= AW'(1);
          if (tail == AW'(DEPTH - 1)) begin
            store_done <= 1'b1;                       // full: drop
            state      <= request_pending ? RT_WAIT : IDLE;
          end else if (tail == '0) begin
            state <= ST_COPY;                          // empty: row 1
          end else begin
            state <= ST_CMP;
          end
        end
        ST_CMP:  state <= ST_CMP2;                     // RAM read of row addr
        ST_CMP2: begin
          if (cmp_result == CMP_BEFORE) state <= ST_SHIFT;   // insert here
          else if (addr == tail) begin
            addr  <= addr + 1'b1;                      // append after tail
            state <= ST_COPY;
          end else state <= ST_INC;
        end
        ST_INC: begin
          addr  <= addr + 1'b1;
          state <= ST_CMP;
        end
        ST_SHIFT:      state <= ST_SHIFT_WAIT;
        ST_SHIFT_WAIT: if (shift_done) state <= ST_COPY;
        ST_COPY:       state <= ST_INC_TAIL;
        ST_INC_TAIL: begin
          tail       <= tail + 1'b1;
          store_done <= 1'b1;
          state      <= request_pending ? RT_WAIT : IDLE;
        end

        // ---------------- cancel ----------------
        CA_GET: begin
          cancel_req <= 1'b0;
          addr       <= AW'(1);
          if (tail == '0) begin
            cancel_done <= 1'b1;
            state       <= request_pending ? RT_WAIT : IDLE;
          end else state <= CA_CMP;
        end
        CA_CMP:  state <= CA_CMP2;
        CA_CMP2: begin
          if (ram_dout.phonenum == cancel_q) state <= CA_SHIFT;
          else if (addr == tail) begin
            cancel_done <= 1'b1;                       // no match
            state       <= request_pending ? RT_WAIT : IDLE;
          end else state <= CA_INC;
        end
        CA_INC: begin
          addr  <= addr + 1'b1;
          state <= CA_CMP;
        end
        CA_SHIFT:      state <= CA_SHIFT_WAIT;
        CA_SHIFT_WAIT: if (shift_done) state <= CA_DEC_TAIL;
        CA_DEC_TAIL: begin
          tail        <= tail - 1'b1;
          cancel_done <= 1'b1;
          state       <= request_pending ? RT_WAIT : IDLE;
        end

        // ---------------- request timer ----------------
        RT_CMP: state <= (tail == '0) ? IDLE : RT_CMP2;
        RT_CMP2: begin
          if (cmp_result != CMP_AFTER) begin           // ram[1] <= systime
            pending_phone <= ram_dout.phonenum;
            state         <= RT_SHIFT;
          end else state <= IDLE;
        end
        RT_SHIFT:      state <= RT_SHIFT_WAIT;
        RT_SHIFT_WAIT: if (shift_done) state <= RT_SEND;
        RT_SEND: begin
          tail            <= tail - 1'b1;
          request_pending <= 1'b1;
          state           <= RT_WAIT;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
