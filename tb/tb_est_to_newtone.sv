// tb_est_to_newtone: one pulse per rising edge of EST, however long EST
// stays high; compared against a reference edge detector.
module tb_est_to_newtone;
  int checks = 0, failures = 0, pulses = 0, edges = 0;
  logic clk = 0, rst = 1, est = 0, new_tone;
  logic prev = 0;
  always #5 clk = ~clk;
  est_to_newtone dut (.clk, .rst, .est, .new_tone);
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (($urandom % 8) == 0) est = ~est;
      @(posedge clk); #1;
      checks++;
      if (new_tone !== (est && !prev)) begin failures++; $display("FAIL at %0d", i); end
      if (est && !prev) edges++;
      if (new_tone) pulses++;
      prev = est;
    end
    checks++; if (pulses != edges || edges == 0) failures++;
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
