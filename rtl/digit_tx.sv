// digit_tx: selects what the controller writes to the MT8889.
//
// While initializing is high, digit_out is the control-register value
// selected by control_reg_sel (the MT8889 power-up sequence
// CRA 0000, CRA 0000, CRA 1000, CRB 0000, then the operating mode:
// CRA 1101 = tone out, DTMF, IRQ enabled, next write to CRB; CRB 0000 =
// burst mode). Otherwise it is digit number count of phone_no (digit 1 in
// bits 19:16). start clears the count, next_digit advances it, and done is
// high while the count equals max_number.
module digit_tx
  import wakeup_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [3:0]  max_number,
  input  logic [19:0] phone_no,
  input  logic        next_digit,
  input  logic        initializing,
  input  logic [2:0]  control_reg_sel,
  output logic [3:0]  digit_out,
  output logic        done
);
  logic [3:0] count;

  assign done = (count == max_number);

  always_comb begin
    if (initializing) begin
      unique case (control_reg_sel)
        3'd2:    digit_out = 4'b1000;
        3'd4:    digit_out = MT_CRA_INIT;
        3'd5:    digit_out = MT_CRB_INIT;
        default: digit_out = 4'b0000;
      endcase
    end else begin
      unique case (count)
        4'd0:    digit_out = phone_no[19:16];
        4'd1:    digit_out = phone_no[15:12];
        4'd2:    digit_out = phone_no[11:8];
        4'd3:    digit_out = phone_no[7:4];
        default: digit_out = phone_no[3:0];
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst)             count <= '0;
    else if (start)      count <= '0;
    else if (next_digit) count <= count + 1'b1;
  end
endmodule
