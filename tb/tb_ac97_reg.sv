// tb_ac97_reg: loads only on LE, appends twelve zeros, holds otherwise.
module tb_ac97_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, le = 0;
  logic [7:0] smp;
  logic [19:0] audio, expv;
  always #5 clk = ~clk;
  ac97_reg dut (.clk, .rst, .le, .audio_int(smp), .audio);
  initial begin
    smp = 0;
    repeat (2) @(posedge clk); #1;
    checks++; if (audio !== 0) failures++;
    @(negedge clk); rst = 0; expv = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      smp = 8'($urandom); le = ($urandom % 3) == 0;
      @(posedge clk); #1;
      if (le) expv = {smp, 12'h000};
      checks++;
      if (audio !== expv) begin failures++; $display("FAIL got %h exp %h", audio, expv); end
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
