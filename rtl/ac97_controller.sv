// ac97_controller: AC'97 link master driving the LM4550 codec.
//
// Two clock domains. In the system clock domain it holds the codec reset
// (audio_reset_b) low for RESET_CYCLES cycles after rst. The serial link runs
// on the codec's ac97_bit_clk (12.288 MHz) and is held in reset,
// asynchronously, while audio_reset_b is low, so ac97_sync and ac97_sdata_out
// stay low during the codec reset.
//
// A frame is 256 bits: a 16-bit tag followed by twelve 20-bit slots, with
// ac97_sync high during the tag's 16 bit times (48 kHz frame rate). Bits are
// sent MSB first and change on the rising edge of ac97_bit_clk. Each frame
// carries:
//   tag   : frame valid, slot 1/2 valid (command), slot 3/4 valid (PCM)
//   slot 1: register write command (bit 19 = 0, register index in 18:12)
//   slot 2: register data in bits 19:4
//   slot 3, 4: the current 20-bit sample on the left and right DAC.
// The commands cycle through master volume (02h), headphone volume (04h),
// PCM out gain (18h) and DAC sample rate (2Ch, 48000 Hz), so the codec is
// (re)configured continuously. The register values are this design's
// choice: 0 dB, unmuted.
//
// The 20-bit sample comes from the system clock domain and changes at
// 8 kHz; it passes two bit-clock registers and is taken at the start of a
// frame only when both agree, so a sample is never torn. Each 8 kHz sample
// is therefore repeated in six 48 kHz frames.
module ac97_controller #(
  parameter int RESET_CYCLES = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [19:0] audio,
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  output logic        audio_reset_b,
  output logic        codec_ready
);
  // ---------------- codec reset (system clock) ----------------
  localparam int RW = (RESET_CYCLES > 1) ? $clog2(RESET_CYCLES + 1) : 1;
  logic [RW-1:0] rst_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      rst_cnt       <= '0;
      audio_reset_b <= 1'b0;
    end else if (rst_cnt != RW'(RESET_CYCLES)) begin
      rst_cnt       <= rst_cnt + 1'b1;
      audio_reset_b <= 1'b0;
    end else begin
      audio_reset_b <= 1'b1;
    end
  end

  // ---------------- link (bit clock) ----------------
  logic [7:0]   bit_cnt;          // position in the frame, 0..255
  logic [1:0]   cmd_sel;
  logic [19:0]  audio_meta, audio_sync, sample;
  logic [255:0] frame;
  logic [6:0]   cmd_reg;
  logic [15:0]  cmd_data;

  always_comb begin
    unique case (cmd_sel)
      2'd0: begin cmd_reg = 7'h02; cmd_data = 16'h0000; end  // master volume
      2'd1: begin cmd_reg = 7'h04; cmd_data = 16'h0000; end  // headphone volume
      2'd2: begin cmd_reg = 7'h18; cmd_data = 16'h0808; end  // PCM out gain
      default: begin cmd_reg = 7'h2C; cmd_data = 16'hBB80; end // DAC rate 48 kHz
    endcase
    frame = '0;
    frame[255 -: 16]  = 16'b1111_1000_0000_0000;             // tag
    frame[239 -: 20]  = {1'b0, cmd_reg, 12'h000};             // slot 1
    frame[219 -: 20]  = {cmd_data, 4'h0};                     // slot 2
    frame[199 -: 20]  = sample;                               // slot 3 left
    frame[179 -: 20]  = sample;                               // slot 4 right
  end

  always_ff @(posedge ac97_bit_clk or negedge audio_reset_b) begin
    if (!audio_reset_b) begin
      bit_cnt        <= '0;
      cmd_sel        <= '0;
      audio_meta     <= '0;
      audio_sync     <= '0;
      sample         <= '0;
      ac97_sync      <= 1'b0;
      ac97_sdata_out <= 1'b0;
      codec_ready    <= 1'b0;
    end else begin
      audio_meta     <= audio;
      audio_sync     <= audio_meta;
      ac97_sync      <= (bit_cnt < 8'd16);
      ac97_sdata_out <= frame[8'd255 - bit_cnt];
      bit_cnt        <= bit_cnt + 1'b1;
      if (bit_cnt == 8'd1) codec_ready <= ac97_sdata_in; // tag bit 15 from codec
      if (bit_cnt == 8'd255) begin
        cmd_sel <= cmd_sel + 1'b1;
        if (audio_meta == audio_sync) sample <= audio_sync;
      end
    end
  end
endmodule
