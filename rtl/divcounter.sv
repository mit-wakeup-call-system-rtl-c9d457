// divcounter: sample-rate pulse generator of the audio unit.
//
// Counts system clock cycles and pulses send_pulse high for one cycle every
// DIV cycles. With the 27 MHz board clock and DIV = 3375 this is the 8 kHz
// rate at which message samples are sent to the codec. The first pulse comes
// DIV cycles after reset.
module divcounter #(
  parameter int DIV = 3375
) (
  input  logic clk,
  input  logic rst,
  output logic send_pulse
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count      <= '0;
      send_pulse <= 1'b0;
    end else if (count == CW'(DIV - 1)) begin
      count      <= '0;
      send_pulse <= 1'b1;
    end else begin
      count      <= count + 1'b1;
      send_pulse <= 1'b0;
    end
  end
endmodule
