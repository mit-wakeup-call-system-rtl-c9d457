// ac97_reg: glitch-free sample register between the message ROMs and the
// AC'97 controller.
//
// On a clock edge with le (LE_audioreg) high it captures the 8-bit
// two's-complement sample and presents it as a 20-bit codec sample with the
// eight bits at the top and twelve zeros appended below. Otherwise it holds.
// Resets to silence (0).
module ac97_reg (
  input  logic        clk,
  input  logic        rst,
  input  logic        le,
  input  logic [7:0]  audio_int,
  output logic [19:0] audio
);
  always_ff @(posedge clk) begin
    if (rst)     audio <= '0;
    else if (le) audio <= {audio_int, 12'h000};
  end
endmodule
