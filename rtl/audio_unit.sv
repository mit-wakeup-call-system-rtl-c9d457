// audio_unit: plays prerecorded messages to the phone line through the codec.
//
// On a msg_req pulse with msg_no (0..11) the audio FSM steps through the
// selected message ROM at the 8 kHz rate set by the divcounter (DIV system
// clock cycles per sample). A 12:1 multiplexer picks the selected ROM's
// 8-bit sample, the AC97 register captures it on LE_audioreg and widens it
// to 20 bits, and the AC'97 controller sends it to the LM4550 codec. msg_done
// pulses once the last sample has been loaded.
//
// ROMs 0..10 hold the eleven spoken messages and ROM 11 the music. The
// address widths (15 bits, 16 for the music ROM) follow the original ROMs;
// each message's length is MSG_LEN[i] samples, by default the whole ROM.
module audio_unit
  import wakeup_pkg::*;
#(
  parameter int DIV               = 3375,
  parameter int ROM_AW  [NUM_MSGS] = '{15, 15, 15, 15, 15, 15, 15, 15, 15, 15, 15, 16},
  parameter int MSG_LEN [NUM_MSGS] = '{32768, 32768, 32768, 32768, 32768, 32768,
                                       32768, 32768, 32768, 32768, 32768, 65536},
  parameter int RESET_CYCLES      = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        msg_req,
  input  logic [4:0]  msg_no,
  output logic        msg_done,
  output logic        msg_busy,
  output logic [19:0] audio,
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  output logic        audio_reset_b,
  output logic        codec_ready
);
  localparam int AW = 16;

  logic          send_pulse, le_audioreg;
  logic [AW-1:0] addr;
  logic [4:0]    msg_sel;
  logic [AW:0]   msg_len [NUM_MSGS];
  logic [7:0]    audio_rom [NUM_MSGS];
  logic [7:0]    audio_int;

  for (genvar i = 0; i < NUM_MSGS; i++) begin : g_rom
    assign msg_len[i] = (AW + 1)'(MSG_LEN[i]);
    message_rom #(.AW(ROM_AW[i]), .DEPTH(MSG_LEN[i]), .MSG_ID(i)) u_rom (
      .clk, .addr(addr[ROM_AW[i]-1:0]), .audio_int(audio_rom[i])
    );
  end

  divcounter #(.DIV(DIV)) u_div (.clk, .rst, .send_pulse);

  audio_fsm #(.NUM_MSGS(NUM_MSGS), .AW(AW)) u_fsm (
    .clk, .rst, .msg_req, .msg_no, .send_pulse, .msg_len,
    .addr, .msg_sel, .le_audioreg, .msg_done, .busy(msg_busy)
  );

  // 12:1 multiplexer
  always_comb begin
    audio_int = '0;
    if (int'(msg_sel) < NUM_MSGS) audio_int = audio_rom[msg_sel[3:0]];
  end

  ac97_reg u_reg (.clk, .rst, .le(le_audioreg), .audio_int, .audio);

  ac97_controller #(.RESET_CYCLES(RESET_CYCLES)) u_ac97 (
    .clk, .rst, .audio, .ac97_bit_clk, .ac97_sdata_in,
    .ac97_sync, .ac97_sdata_out, .audio_reset_b, .codec_ready
  );
endmodule
