// tb_divcounter: send_pulse must be one cycle wide and come exactly every
// DIV cycles; checked at the real 8 kHz divider (3375) and a small one.
module tb_divcounter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic p_full, p_small;
  always #5 clk = ~clk;
  divcounter dut_full (.clk, .rst, .send_pulse(p_full));
  divcounter #(.DIV(7)) dut_small (.clk, .rst, .send_pulse(p_small));
  int last_full = -1, last_small = -1, n_full = 0, n_small = 0, cyc = 0;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (20000) begin
      @(posedge clk); #1; cyc++;
      if (p_full) begin
        if (last_full >= 0) begin checks++; if (cyc - last_full != 3375) begin failures++; $display("FAIL full period %0d", cyc - last_full); end end
        last_full = cyc; n_full++;
      end
      if (p_small) begin
        if (last_small >= 0) begin checks++; if (cyc - last_small != 7) failures++; end
        last_small = cyc; n_small++;
      end
    end
    checks++; if (n_full < 5) failures++;
    // first pulse DIV cycles after reset
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
