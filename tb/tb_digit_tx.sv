// tb_digit_tx: the MT8889 initialisation values by control_reg_sel, then the
// phone number digits in order (digit 1 from bits 19:16) and done after the
// requested number of digits.
module tb_digit_tx;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, next_digit = 0, initializing = 0;
  logic [3:0] max_number = 5, digit_out;
  logic [19:0] phone_no = 0;
  logic [2:0] sel = 0;
  logic done;
  logic [3:0] init_vals [6] = '{4'h0, 4'h0, 4'h8, 4'h0, 4'hD, 4'h0};
  always #5 clk = ~clk;
  digit_tx dut (.clk, .rst, .start, .max_number, .phone_no, .next_digit, .initializing,
    .control_reg_sel(sel), .digit_out, .done);

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    initializing = 1;
    for (int i = 0; i < 6; i++) begin
      sel = 3'(i); #1;
      checks++; if (digit_out !== init_vals[i]) begin failures++; $display("FAIL init %0d = %h", i, digit_out); end
    end
    @(negedge clk); initializing = 0;
    for (int r = 0; r < 50; r++) begin
      @(negedge clk); phone_no = 20'($urandom); max_number = 5; start = 1;
      @(negedge clk); start = 0;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (digit_out !== phone_no[19 - 4 * i -: 4]) begin failures++; $display("FAIL digit %0d", i); end
        checks++; if (done) failures++;
        @(negedge clk); next_digit = 1;
        @(negedge clk); next_digit = 0;
      end
      checks++; if (!done) begin failures++; $display("FAIL not done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
