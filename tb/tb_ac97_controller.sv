// tb_ac97_controller: decodes the serial link. Checks that sync and sdata
// stay low while the codec is in reset, the 256-bit frame with a 16-bit-long
// sync, the tag, the cycling register writes (02h, 04h, 18h, 2Ch = 48000),
// the sample in slots 3 and 4, and that a new sample from the system clock
// domain reaches the link within two frames.
module tb_ac97_controller;
  int checks = 0, failures = 0;
  logic clk = 0, bclk = 0, rst = 1, sdin = 1;
  logic [19:0] audio = 20'hABC00;
  logic sync, sdout, audio_reset_b, codec_ready;
  always #5 clk = ~clk;
  always #41 bclk = ~bclk;             // about 12 MHz against 100 MHz
  ac97_controller #(.RESET_CYCLES(20)) dut (.clk, .rst, .audio, .ac97_bit_clk(bclk),
    .ac97_sdata_in(sdin), .ac97_sync(sync), .ac97_sdata_out(sdout), .audio_reset_b, .codec_ready);
  ac97_decoder dec (.bit_clk(bclk), .sync, .sdata(sdout));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(negedge bclk) if (!audio_reset_b && !rst) begin
    checks++; if (sync || sdout) begin failures++; $display("FAIL: link active in reset"); end
  end

  initial begin
    int seen [4] = '{0, 0, 0, 0};
    int f0, wait_frames;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (10) @(posedge clk);
    chk(!audio_reset_b, "codec held in reset");
    repeat (20) @(posedge clk);
    chk(audio_reset_b, "codec reset released");
    // collect 12 frames
    f0 = dec.frames;
    while (dec.frames < f0 + 12) begin
      int f = dec.frames;
      @(negedge bclk);
      if (dec.frames != f && dec.frames > 1) begin
        chk(dec.last_len == 256, $sformatf("frame length %0d", dec.last_len));
        chk(dec.last_sync_len == 16, $sformatf("sync width %0d", dec.last_sync_len));
        chk(dec.tag == 16'hF800, $sformatf("tag %h", dec.tag));
        chk(dec.slot[1][19] == 1'b0, "slot 1 is a write");
        chk(dec.slot[3] == audio && dec.slot[4] == audio, "sample in slots 3 and 4");
        case (dec.slot[1][18:12])
          7'h02: begin seen[0]++; chk(dec.slot[2] == 20'h00000, "master volume 0 dB"); end
          7'h04: begin seen[1]++; chk(dec.slot[2] == 20'h00000, "headphone volume 0 dB"); end
          7'h18: begin seen[2]++; chk(dec.slot[2] == 20'h08080, "PCM gain 0 dB"); end
          7'h2C: begin seen[3]++; chk(dec.slot[2] == {16'd48000, 4'h0}, "DAC rate 48 kHz"); end
          default: chk(0, "unexpected register");
        endcase
      end
    end
    chk(seen[0] > 0 && seen[1] > 0 && seen[2] > 0 && seen[3] > 0, "all four registers written");
    chk(codec_ready, "codec ready bit seen");
    // new sample
    @(negedge clk); audio = 20'h12300;
    f0 = dec.frames; wait_frames = 0;
    while (dec.slot[3] != 20'h12300 && wait_frames < 5) begin
      @(negedge bclk);
      if (dec.frames != f0) begin f0 = dec.frames; wait_frames++; end
    end
    chk(dec.slot[3] == 20'h12300, "new sample sent");
    chk(wait_frames <= 2, $sformatf("new sample after %0d frames", wait_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
