// tb_mt8889_minor_fsm: bus timing of single reads and writes: chip select,
// R/W and RS0 set up before DS rises and held after it falls, DS width,
// read data captured while DS is high, done after the hold time.
module tb_mt8889_minor_fsm;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, read = 0, write = 0, rs0_input = 0;
  logic [3:0] data_in = 0, rd_data;
  logic ds, cs_bar, r_wbar, rs0, rd_valid, done;
  always #5 clk = ~clk;
  localparam int S = 3, D = 5, H = 2;
  mt8889_minor_fsm #(.SETUP_CYC(S), .DS_CYC(D), .HOLD_CYC(H)) dut (.clk, .rst, .read, .write,
    .rs0_input, .data_in, .ds, .cs_bar, .r_wbar, .rs0, .rd_data, .rd_valid, .done);

  // chip data bus: valid only while DS is high
  always_comb data_in = ds ? 4'h6 ^ {3'b0, rs0} : 4'hF;

  task automatic access(input bit rd, input bit sel);
    int cyc = 0, ds_cyc = 0, first_ds = -1, last_ds = -1;
    @(negedge clk); read = rd; write = !rd; rs0_input = sel;
    @(negedge clk); read = 0; write = 0; rs0_input = !sel;
    while (!done && cyc < 100) begin
      cyc++;
      if (ds) begin
        ds_cyc++; if (first_ds < 0) first_ds = cyc; last_ds = cyc;
      end
      if (!cs_bar) begin
        checks++; if (rs0 !== sel || r_wbar !== rd) begin failures++; $display("FAIL rs0/rw"); end
      end
      if (ds) begin checks++; if (cs_bar) begin failures++; $display("FAIL DS without CS"); end end
      @(negedge clk);
    end
    checks++; if (!done) failures++;
    checks++; if (ds_cyc != D) begin failures++; $display("FAIL DS %0d cycles", ds_cyc); end
    checks++; if (first_ds != S + 1) begin failures++; $display("FAIL setup %0d", first_ds); end
    checks++; if (cyc - last_ds != H) begin failures++; $display("FAIL hold %0d", cyc - last_ds); end
    checks++; if (rd_valid !== rd) begin failures++; $display("FAIL rd_valid"); end
    if (rd) begin checks++; if (rd_data !== (4'h6 ^ {3'b0, sel})) begin failures++; $display("FAIL rd_data %h", rd_data); end end
    @(negedge clk);
    checks++; if (!cs_bar || ds) begin failures++; $display("FAIL bus not released"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    checks++; if (ds || !cs_bar) failures++;
    access(1, 0); access(1, 1); access(0, 0); access(0, 1);
    for (int i = 0; i < 20; i++) access(i % 3 == 0, i % 2 == 0);
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
