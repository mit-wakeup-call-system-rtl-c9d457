// tb_audio_unit: plays three messages through the whole audio path. Every
// sample reaching the AC97 register must be the selected ROM's next sample
// (the stand-in test tone, computed independently here) with twelve zeros
// appended, samples must change exactly every DIV cycles, msg_done must
// follow the last sample, and the samples must appear in slot 3 of the
// AC'97 link.
module tb_audio_unit;
  import wakeup_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, bclk = 0, rst = 1, msg_req = 0;
  logic [4:0] msg_no = 0;
  logic msg_done, msg_busy, sync, sdout, audio_reset_b, codec_ready;
  logic [19:0] audio;
  localparam int DIV = 600;
  localparam int LEN [12] = '{30, 31, 32, 33, 34, 35, 36, 37, 38, 39, 40, 45};
  always #5 clk = ~clk;
  always #41 bclk = ~bclk;
  audio_unit #(.DIV(DIV), .MSG_LEN(LEN), .RESET_CYCLES(8)) dut (.clk, .rst, .msg_req, .msg_no,
    .msg_done, .msg_busy, .audio, .ac97_bit_clk(bclk), .ac97_sdata_in(1'b0), .ac97_sync(sync),
    .ac97_sdata_out(sdout), .audio_reset_b, .codec_ready);
  ac97_decoder dec (.bit_clk(bclk), .sync, .sdata(sdout));

  function automatic logic [7:0] tone(int id, int n);
    int p = 16 + 4 * id, ph, v;
    ph = n % p;
    v = 4 * ((ph > p / 2) ? ph - p / 2 : p / 2 - ph) - p;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return 8'(v);
  endfunction

  int slot_hits = 0;
  logic [19:0] cur;
  always @(negedge bclk) if (dec.frames > 2 && dec.slot[3] == cur && cur != 0) slot_hits++;

  task automatic play(input int m);
    int loads = 0, cyc = 0, last = -1, done_at = -1;
    @(negedge clk); msg_no = 5'(m); msg_req = 1;
    @(negedge clk); msg_req = 0;
    while (cyc < DIV * (LEN[m] + 3) && done_at < 0) begin
      @(posedge clk); #1; cyc++;
      if (dut.le_audioreg) begin
        @(posedge clk); #1; cyc++;
        checks++;
        if (audio !== {tone(m, loads), 12'h000}) begin
          failures++; $display("FAIL msg %0d sample %0d = %h exp %h", m, loads, audio, {tone(m, loads), 12'h000});
        end
        cur = audio;
        if (last >= 0) begin checks++; if (cyc - last != DIV) begin failures++; $display("FAIL period %0d", cyc - last); end end
        last = cyc; loads++;
      end
      if (msg_done) done_at = cyc;
    end
    checks++; if (loads != LEN[m]) begin failures++; $display("FAIL msg %0d loads %0d", m, loads); end
    checks++; if (done_at < 0 || done_at - last > 3) begin failures++; $display("FAIL msg_done %0d %0d %0d", m, done_at, last); end
  endtask

  initial begin
    cur = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (50) @(posedge clk);
    play(MSG_WELCOME);
    play(MSG_MENU);
    play(MSG_MUSIC);
    checks++; if (slot_hits == 0) begin failures++; $display("FAIL no sample on the AC'97 link"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
