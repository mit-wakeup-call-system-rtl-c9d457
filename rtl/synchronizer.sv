// synchronizer: brings an asynchronous level into the clock domain.
//
// Two flip-flops in series; the output follows the input two clock edges
// later. Used on the MH88437 outputs RV, LCD, the line-reversal comparator
// output and the MT8889 EST pin. Resets to 0.
module synchronizer #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
