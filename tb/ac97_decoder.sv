// ac97_decoder: testbench helper that deserialises the AC'97 output link.
// Samples sync and sdata on the falling edge of the bit clock, finds frame
// starts by the rising edge of sync, and after each complete 256-bit frame
// publishes the tag, slot 1-4 contents, the sync width and the frame length.
module ac97_decoder (
  input logic bit_clk,
  input logic sync,
  input logic sdata
);
  logic [255:0] shreg;
  int           nbits = -1, sync_len = 0, frames = 0;
  logic         sync_q = 0;
  logic [15:0]  tag;
  logic [19:0]  slot [1:4];
  int           last_sync_len = 0, last_len = 0;

  always @(negedge bit_clk) begin
    if (sync && !sync_q) begin
      if (nbits >= 0) begin
        last_len = nbits;
        if (nbits == 256) begin
          tag     = shreg[255 -: 16];
          slot[1] = shreg[239 -: 20];
          slot[2] = shreg[219 -: 20];
          slot[3] = shreg[199 -: 20];
          slot[4] = shreg[179 -: 20];
          frames++;
        end
      end
      nbits = 0;
      last_sync_len = sync_len;
      sync_len = 0;
    end
    if (sync) sync_len++;
    if (nbits >= 0) begin
      shreg = {shreg[254:0], sdata};
      nbits++;
    end
    sync_q = sync;
  end
endmodule
