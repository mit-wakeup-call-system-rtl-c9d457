// digit_rx: stores the digits received from the MT8889.
//
// start clears the digit count. Each enable_load (ignored while the major
// FSM is reading the status register) copies received_digit into the digit
// register selected by the count (digit[0] is the first digit, "digit1");
// next_digit then advances the count. done is high while the count equals
// max_number, the number of digits the control unit asked for. Up to five
// digits are kept; the registers hold their value until overwritten.
module digit_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [3:0] max_number,
  input  logic       enable_load,
  input  logic       next_digit,
  input  logic       reading_status,
  input  logic [3:0] received_digit,
  output logic [3:0] digit [5],
  output logic       done
);
  logic [3:0] count;

  assign done = (count == max_number);

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      for (int i = 0; i < 5; i++) digit[i] <= '0;
    end else begin
      if (start) count <= '0;
      else if (next_digit) count <= count + 1'b1;
      if (enable_load && !reading_status && count < 4'd5)
        digit[count[2:0]] <= received_digit;   // LE_digit1 .. LE_digit5
    end
  end
endmodule
