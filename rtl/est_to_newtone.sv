// est_to_newtone: turns the MT8889 early-steering output into a tone event.
//
// est is the synchronised EST pin, high while the receiver detects a DTMF
// tone. new_tone pulses high for one clock cycle on each rising edge of est,
// i.e. once per key press.
module est_to_newtone (
  input  logic clk,
  input  logic rst,
  input  logic est,
  output logic new_tone
);
  logic est_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      est_q    <= 1'b0;
      new_tone <= 1'b0;
    end else begin
      est_q    <= est;
      new_tone <= est && !est_q;
    end
  end
endmodule
