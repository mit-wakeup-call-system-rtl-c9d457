// tb_shifting_unit: random shift-up and shift-down ranges on a request RAM
// filled with known rows, compared with a reference array; also checks the
// two-cycles-per-row rate, empty ranges and that rows outside a..b (and the
// destination row) are the only ones changed.
module tb_shifting_unit;
  import wakeup_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic shift_down = 0, shift_up = 0;
  logic [7:0] a = 0, b = 0, ram_addr;
  logic busy, done, ram_we;
  request_t ram_din, ram_dout;
  request_t refm [256];
  always #5 clk = ~clk;

  shifting_unit #(.AW(8)) dut (.clk, .rst, .shift_down, .shift_up, .a, .b, .busy, .done,
    .ram_addr, .ram_din, .ram_we, .ram_dout);
  request_ram ram (.clk, .addr(ram_addr), .data_in(ram_din), .we(ram_we), .data_out(ram_dout));

  task automatic run(input bit down, input int lo, input int hi);
    int cyc = 0;
    @(negedge clk);
    a = 8'(lo); b = 8'(hi); shift_down = down; shift_up = !down;
    @(negedge clk); shift_down = 0; shift_up = 0;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    checks++;
    if (!done) begin failures++; $display("FAIL no done"); end
    if (lo <= hi) begin
      checks++;
      if (cyc != 2 * (hi - lo + 1)) begin failures++; $display("FAIL cycles %0d for %0d rows", cyc, hi - lo + 1); end
    end
    // reference
    if (down) for (int i = hi; i >= lo; i--) refm[i + 1] = refm[i];
    else      for (int i = lo; i <= hi; i++) refm[i - 1] = refm[i];
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (ram.mem[i] !== refm[i]) begin failures++; $display("FAIL row %0d %h exp %h", i, ram.mem[i], refm[i]); end
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin refm[i] = 31'($urandom); ram.mem[i] = refm[i]; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    run(1, 3, 9);
    run(0, 4, 10);
    run(1, 1, 1);
    run(0, 2, 2);
    run(0, 5, 4);       // empty range
    for (int k = 0; k < 30; k++) begin
      int lo, hi;
      lo = $urandom_range(1, 200);
      hi = $urandom_range(lo, 254);
      run(k % 2, lo, hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
