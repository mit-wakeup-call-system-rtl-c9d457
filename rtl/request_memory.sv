// request_memory: stores, times and hands back wakeup call requests.
//
// Wires the memory controller, the shifting unit, the time compare unit and
// the DEPTH x 31 request RAM together. The RAM's single port is driven by the
// shifting unit while it is busy and by the memory controller otherwise.
// The system time and the start-of-minute pulse come from the time unit.
//
// Interface (all pulses one cycle wide, synchronous to clk):
//  store_ctrl + store_data   -> store_done when the request is in the RAM
//  cancel_ctrl + cancel_phone-> cancel_done when that number's next request
//                               has been removed (or none was found)
//  request_pending/pending_phone stay valid until request_reset.
module request_memory
  import wakeup_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          store_ctrl,
  input  request_t      store_data,
  output logic          store_done,
  input  logic          cancel_ctrl,
  input  logic [19:0]   cancel_phone,
  output logic          cancel_done,
  output logic          request_pending,
  output logic [19:0]   pending_phone,
  input  logic          request_reset,
  input  tod_t          systime,
  input  logic          new_minute,
  output logic [AW-1:0] num_requests
);
  tod_t          time1, time2;
  cmp_t          cmp_result;
  logic          shift_down, shift_up, shift_done, shift_busy;
  logic [AW-1:0] shift_a, shift_b;
  logic [AW-1:0] mc_addr, sh_addr, ram_addr;
  request_t      mc_din, sh_din, ram_din, ram_dout;
  logic          mc_we, sh_we, ram_we;

  memory_controller #(.DEPTH(DEPTH), .AW(AW)) u_ctrl (
    .clk, .rst,
    .store_ctrl, .store_data, .store_done,
    .cancel_ctrl, .cancel_phone, .cancel_done,
    .request_pending, .pending_phone, .request_reset,
    .systime, .new_minute, .time1, .time2, .cmp_result,
    .shift_down, .shift_up, .shift_a, .shift_b, .shift_done,
    .ram_addr(mc_addr), .ram_din(mc_din), .ram_we(mc_we), .ram_dout,
    .tail(num_requests)
  );

  shifting_unit #(.AW(AW)) u_shift (
    .clk, .rst,
    .shift_down, .shift_up, .a(shift_a), .b(shift_b),
    .busy(shift_busy), .done(shift_done),
    .ram_addr(sh_addr), .ram_din(sh_din), .ram_we(sh_we), .ram_dout
  );

  time_compare u_cmp (.time1, .time2, .cmp_result);

  always_comb begin
    if (shift_busy) begin
      ram_addr = sh_addr;
      ram_din  = sh_din;
      ram_we   = sh_we;
    end else begin
      ram_addr = mc_addr;
      ram_din  = mc_din;
      ram_we   = mc_we;
    end
  end

  request_ram #(.DEPTH(DEPTH), .AW(AW)) u_ram (
    .clk, .addr(ram_addr), .data_in(ram_din), .we(ram_we), .data_out(ram_dout)
  );
endmodule
