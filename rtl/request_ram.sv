// request_ram: storage for wakeup call requests.
//
// A single-port synchronous RAM of DEPTH rows by 31 bits ({hour[4:0],
// minute[5:0], phonenum[19:0]}), 256 x 31 as in the original block memory.
// Reads have one clock cycle of latency: data_out shows the row addressed in
// the previous cycle. A write (we high) stores data_in at addr on the clock
// edge; the read port then shows the old contents (read-first). Row 0 is
// never used by the memory controller, so a tail pointer of 0 means "empty".
// The contents are not reset, as for a block RAM.
module request_ram
  import wakeup_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  request_t      data_in,
  input  logic          we,
  output request_t      data_out
);
  request_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= data_in;
    data_out <= mem[addr];
  end
endmodule
