// tb_pin_lookup: looks up every registered PIN, unknown PINs and the empty
// PIN 0000; checks the three-cycle latency (two CAM cycles, one ROM cycle)
// and the returned phone numbers against the table entries listed here.
module tb_pin_lookup;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, lookup = 0;
  logic [15:0] pin = 0;
  logic valid, match;
  logic [19:0] phone;
  always #5 clk = ~clk;
  pin_lookup dut (.clk, .rst, .lookup, .pin, .valid, .match, .phone);

  task automatic look(input logic [15:0] p, input bit exp_match, input logic [19:0] exp_phone);
    int lat = 0;
    @(negedge clk); lookup = 1; pin = p;
    @(negedge clk); lookup = 0; pin = 16'hFFFF;
    lat = 1;
    while (!valid && lat < 10) begin @(negedge clk); lat++; end
    checks++; if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    checks++; if (match !== exp_match) begin failures++; $display("FAIL match %h", p); end
    if (exp_match) begin
      checks++; if (phone !== exp_phone) begin failures++; $display("FAIL phone %h for %h", phone, p); end
    end
    @(negedge clk);
    checks++; if (valid) begin failures++; $display("FAIL valid longer than a cycle"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    look(16'h1234, 1, 20'h564A7);
    look(16'h9A7A, 1, 20'h59872);
    look(16'h5555, 1, 20'h59873);
    look(16'h2468, 1, 20'h52897);
    look(16'h1235, 0, 0);
    look(16'h0000, 0, 0);
    for (int i = 0; i < 50; i++) begin
      logic [15:0] p;
      p = 16'($urandom);
      if (p != 16'h1234 && p != 16'h9A7A && p != 16'h5555 && p != 16'h2468) look(p, 0, 0);
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
