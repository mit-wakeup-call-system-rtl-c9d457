// tb_message_rom: the registered read returns, one cycle later, the
// stand-in test tone sample computed independently here (triangle wave of
// period 16 + 4*MSG_ID, 4*|phase - P/2| - P).
module tb_message_rom;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [14:0] addr;
  logic [7:0] q;
  always #5 clk = ~clk;
  message_rom #(.AW(15), .MSG_ID(3)) dut (.clk, .addr, .audio_int(q));

  function automatic int expect_s(int n);
    int p = 28, ph, v;
    ph = n % p;
    v = 4 * ((ph > p / 2) ? ph - p / 2 : p / 2 - ph) - p;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = (i < 1000) ? i : int'($urandom_range(0, 32767));
      @(negedge clk); addr = 15'(a);
      @(posedge clk); #1;
      checks++;
      if ($signed(q) !== 8'(expect_s(a))) begin failures++; $display("FAIL a=%0d q=%0d exp %0d", a, $signed(q), expect_s(a)); end
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
