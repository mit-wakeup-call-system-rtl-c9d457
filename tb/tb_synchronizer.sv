// tb_synchronizer: the output must equal the input of two clock edges
// earlier, and be 0 after reset.
module tb_synchronizer;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [3:0] d, q;
  logic [3:0] hist [3];
  always #5 clk = ~clk;
  synchronizer #(.WIDTH(4)) dut (.clk, .rst, .d, .q);
  initial begin
    d = 0;
    repeat (3) @(posedge clk);
    #1; checks++; if (q !== 0) failures++;
    @(negedge clk); rst = 0;
    hist[0] = 0; hist[1] = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = 4'($urandom);
      @(posedge clk); #1;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      if (i >= 2) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("FAIL q=%h exp %h", q, hist[1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
