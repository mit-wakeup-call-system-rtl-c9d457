// tb_audio_fsm: plays messages of different lengths; each send_pulse must
// load exactly one sample (addresses 0..len-1 in order, LE one cycle wide),
// msg_done must pulse once, two cycles after the last load, and the FSM
// must ignore send_pulse while waiting for a request.
module tb_audio_fsm;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, msg_req = 0, send_pulse = 0;
  logic [4:0] msg_no = 0, msg_sel;
  logic [16:0] msg_len [12];
  logic [15:0] addr;
  logic le, msg_done, busy;
  localparam int PER = 9;
  always #5 clk = ~clk;
  audio_fsm #(.NUM_MSGS(12), .AW(16)) dut (.clk, .rst, .msg_req, .msg_no, .send_pulse, .msg_len,
    .addr, .msg_sel, .le_audioreg(le), .msg_done, .busy);

  int pc = 0;
  always @(posedge clk) begin
    pc <= (pc == PER - 1) ? 0 : pc + 1;
    send_pulse <= (pc == PER - 1);
  end

  task automatic play(input int m);
    int loads = 0, dones = 0, cyc = 0, last_load = -1;
    @(negedge clk); msg_no = 5'(m); msg_req = 1;
    @(negedge clk); msg_req = 0; msg_no = 5'd31;   // msg_no only needed with msg_req
    while (cyc < PER * (msg_len[m] + 4)) begin
      @(posedge clk); #1; cyc++;
      if (le) begin
        checks++;
        if (addr != 16'(loads)) begin failures++; $display("FAIL addr %0d at load %0d", addr, loads); end
        loads++; last_load = cyc;
      end
      if (msg_done) begin
        dones++;
        checks++; if (cyc - last_load != 2) begin failures++; $display("FAIL done %0d after load", cyc - last_load); end
        checks++; if (msg_sel != 5'(m)) failures++;
      end
    end
    checks++; if (loads != msg_len[m]) begin failures++; $display("FAIL msg %0d loads %0d exp %0d", m, loads, msg_len[m]); end
    checks++; if (dones != 1) begin failures++; $display("FAIL dones %0d", dones); end
    checks++; if (busy) failures++;
  endtask

  initial begin
    for (int i = 0; i < 12; i++) msg_len[i] = 17'(5 + 3 * i);
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    // idle: no loads without a request
    repeat (5 * PER) begin @(posedge clk); #1; checks++; if (le || msg_done) failures++; end
    play(0); play(4); play(11); play(1);
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
