// mt8889_model: behavioural model of the MT8889 DTMF transceiver's
// processor interface, for testbenches only (not synthesizable intent).
//
// Motorola-mode bus: an access is cs_bar low with DS high; a write is latched
// on the falling edge of DS, a read drives data_out while DS is high.
// rs0 = 0 selects the transmit (write) / receive (read) data register,
// rs0 = 1 control registers A/B (write, CRA bit 3 routes the next control
// write to CRB) / status register (read: bit 0 IRQ, bit 1 transmit register
// empty, bit 2 receive register full).
// A write to the transmit register appends the digit to dialed[] and keeps
// the transmit-empty bit clear for BURST_CYC cycles (tone burst plus pause).
// press(key) models a key press at the far end: EST high for EST_CYC
// cycles, the digit is available in the receive register RX_VALID_CYC
// cycles after EST rises. Counts every bus access and checks that a data
// register access happens only after initialisation.
module mt8889_model #(
  parameter int BURST_CYC    = 200,
  parameter int EST_CYC      = 100,
  parameter int RX_VALID_CYC = 20
) (
  input  logic       clk,
  input  logic       ds,
  input  logic       cs_bar,
  input  logic       r_wbar,
  input  logic       rs0,
  input  logic [3:0] data_in,
  output logic [3:0] data_out,
  output logic       est
);
  logic [3:0] cra = 0, crb = 0, rx_reg = 0;
  logic       rsel = 0, txe = 1, rxf = 0, irq = 0;
  logic       ds_q = 0;
  int         burst_cnt = 0;
  int         init_writes = 0, reads = 0, writes = 0, status_reads = 0;
  logic [3:0] dialed [$];
  logic [3:0] writes_log [$];
  logic [3:0] ctrl_log [$];

  initial est = 0;

  always_comb begin
    data_out = 4'h0;
    if (!cs_bar && r_wbar && ds) data_out = rs0 ? {1'b0, rxf, txe, irq} : rx_reg;
  end

  always @(posedge clk) begin
    ds_q <= ds;
    if (burst_cnt > 0) begin
      burst_cnt <= burst_cnt - 1;
      if (burst_cnt == 1) begin txe <= 1; irq <= 1; end
    end
    // falling edge of DS ends an access
    if (ds_q && !ds && !cs_bar) begin
      if (!r_wbar) begin
        writes++;
        if (rs0) begin
          ctrl_log.push_back(data_in);
          if (rsel) begin crb <= data_in; rsel <= 0; end
          else begin cra <= data_in; rsel <= data_in[3]; end
          init_writes++;
        end else begin
          dialed.push_back(data_in);
          txe <= 0;
          burst_cnt <= BURST_CYC;
        end
      end else begin
        reads++;
        if (rs0) begin status_reads++; irq <= 0; end
        else rxf <= 0;
      end
    end
  end

  task automatic press(input logic [3:0] key);
    @(posedge clk);
    est <= 1;
    repeat (RX_VALID_CYC) @(posedge clk);
    rx_reg <= key;
    rxf    <= 1;
    irq    <= 1;
    repeat (EST_CYC - RX_VALID_CYC) @(posedge clk);
    est <= 0;
  endtask
endmodule
