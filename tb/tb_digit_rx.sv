// tb_digit_rx: digit registers load in count order, loads are ignored while
// the status register is being read, done follows the requested count.
module tb_digit_rx;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, enable_load = 0, next_digit = 0, reading_status = 0;
  logic [3:0] max_number = 0, received_digit = 0;
  logic [3:0] digit [5];
  logic done;
  logic [3:0] refd [5];
  always #5 clk = ~clk;
  digit_rx dut (.clk, .rst, .start, .max_number, .enable_load, .next_digit, .reading_status,
    .received_digit, .digit, .done);

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 5; i++) refd[i] = 0;
    for (int r = 0; r < 40; r++) begin
      int n;
      n = $urandom_range(1, 5);
      @(negedge clk); max_number = 4'(n); start = 1;
      @(negedge clk); start = 0;
      checks++; if (done) begin failures++; $display("FAIL done at start"); end
      for (int i = 0; i < n; i++) begin
        // a load attempt during a status read must be ignored
        @(negedge clk); received_digit = 4'hF; enable_load = 1; reading_status = 1;
        @(negedge clk); enable_load = 0; reading_status = 0;
        @(negedge clk); received_digit = 4'($urandom); enable_load = 1;
        refd[i] = received_digit;
        @(negedge clk); enable_load = 0; next_digit = 1;
        @(negedge clk); next_digit = 0;
        checks++; if (done !== (i == n - 1)) begin failures++; $display("FAIL done %0d/%0d", i, n); end
      end
      for (int i = 0; i < 5; i++) begin
        checks++; if (digit[i] !== refd[i]) begin failures++; $display("FAIL digit%0d %h exp %h", i + 1, digit[i], refd[i]); end
      end
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
