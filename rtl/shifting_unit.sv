// shifting_unit: moves a range of request RAM rows by one address.
//
// shift_down moves rows a..b to a+1..b+1 (working from b downwards so no row
// is overwritten before it is copied); shift_up moves rows a..b to a-1..b-1
// (working from a upwards). Each row takes two cycles: one to present the
// read address to the one-cycle-latency RAM, one to write the returned row to
// its new address. done pulses for one cycle when the range is finished; an
// empty range (a > b) finishes at once. The unit does not touch the memory
// controller's tail pointer. While busy is high the RAM port belongs to this
// unit (the request memory multiplexes it).
//
// Start with a one-cycle pulse on shift_down or shift_up while idle; a and b
// are sampled with it. ram_din is ram_dout wired straight back: a shift only
// ever rewrites a row it has just read.
module shifting_unit
  import wakeup_pkg::*;
#(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          shift_down,
  input  logic          shift_up,
  input  logic [AW-1:0] a,
  input  logic [AW-1:0] b,
  output logic          busy,
  output logic          done,
  // RAM port
  output logic [AW-1:0] ram_addr,
  output request_t      ram_din,
  output logic          ram_we,
  input  request_t      ram_dout
);
  typedef enum logic [1:0] {SH_IDLE, SH_READ, SH_WRITE} sh_state_t;
  sh_state_t     state;
  logic          dir_down;
  logic [AW-1:0] idx, lo, hi;

  assign busy = (state != SH_IDLE);

  always_comb begin
    ram_addr = idx;
    ram_din  = ram_dout;
    ram_we   = 1'b0;
    if (state == SH_WRITE) begin
      ram_addr = dir_down ? idx + 1'b1 : idx - 1'b1;
      ram_we   = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= SH_IDLE;
      done     <= 1'b0;
      dir_down <= 1'b0;
      idx      <= '0;
      lo       <= '0;
      hi       <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        SH_IDLE: if (shift_down || shift_up) begin
          dir_down <= shift_down;
          lo       <= a;
          hi       <= b;
          idx      <= shift_down ? b : a;
          if (a > b) done  <= 1'b1;
          else       state <= SH_READ;
        end
        SH_READ:  state <= SH_WRITE;
        SH_WRITE: begin
          if ((dir_down && idx == lo) || (!dir_down && idx == hi)) begin
            state <= SH_IDLE;
            done  <= 1'b1;
          end else begin
            idx   <= dir_down ? idx - 1'b1 : idx + 1'b1;
            state <= SH_READ;
          end
        end
        default: state <= SH_IDLE;
      endcase
    end
  end
endmodule
