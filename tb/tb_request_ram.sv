// tb_request_ram: random writes and reads against a reference array; checks
// the one-cycle read latency and read-first behaviour on a write.
module tb_request_ram;
  import wakeup_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] addr;
  request_t din, dout;
  logic we;
  request_t ref_mem [256];
  logic ref_valid [256];
  always #5 clk = ~clk;
  request_ram dut (.clk, .addr, .data_in(din), .we, .data_out(dout));

  initial begin
    for (int i = 0; i < 256; i++) ref_valid[i] = 0;
    we = 0; addr = 0; din = '0;
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] a;
      request_t expected;
      logic exp_valid;
      a = 8'($urandom);
      @(negedge clk);
      addr = a; we = ($urandom % 2) == 0; din = 31'($urandom);
      expected = ref_mem[a]; exp_valid = ref_valid[a];
      @(posedge clk); #1;
      if (we) begin ref_mem[a] = din; ref_valid[a] = 1; end
      if (exp_valid) begin
        checks++;
        if (dout !== expected) begin
          failures++; $display("FAIL addr %0d got %h exp %h", a, dout, expected);
        end
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
