// message_rom: one recorded message of the audio unit.
//
// DEPTH samples of 8-bit two's-complement audio at 8 kHz, addressed by an
// AW-bit address. The address is registered (the ROM is input-registered so
// that a changing address cannot glitch the output), so audio_int shows the
// sample of the address presented one clock earlier.
//
// The recordings themselves are not part of this design. If INIT_FILE names a
// hex file with one sample per line it is loaded; otherwise the ROM is filled
// with a stand-in triangle test tone whose period (16 + 4*MSG_ID samples)
// differs per message: sample(n) = 4*|(n mod P) - P/2| - P, limited to
// -128..127.
module message_rom #(
  parameter int    AW        = 15,
  parameter int    DEPTH     = 2 ** AW,
  parameter int    MSG_ID    = 0,
  parameter string INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [7:0]    audio_int
);
  logic [7:0] rom [DEPTH];

  function automatic logic [7:0] tone_sample(input int n);
    int p, ph, v;
    p  = 16 + 4 * MSG_ID;
    ph = n % p;
    v  = 4 * ((ph > p / 2) ? ph - p / 2 : p / 2 - ph) - p;
    if (v > 127)  v = 127;
    if (v < -128) v = -128;
    return 8'(v);
  endfunction

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
    else for (int i = 0; i < DEPTH; i++) rom[i] = tone_sample(i);
  end

  always_ff @(posedge clk) audio_int <= rom[addr];
endmodule
