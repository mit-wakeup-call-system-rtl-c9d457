// mt8889_minor_fsm: one bus cycle to the MT8889 in Motorola mode.
//
// A one-cycle read or write pulse (with rs0_input: 0 = data registers,
// 1 = control/status registers) starts one access:
//   SETUP : cs_bar low, r_wbar and rs0 set, DS low      (SETUP_CYC cycles)
//   STROBE: DS high (the DS CLK part of the controller) (DS_CYC cycles);
//           on a read the data bus is captured into rd_data on the last cycle
//   HOLD  : DS low, cs_bar, r_wbar and rs0 still held   (HOLD_CYC cycles)
// then done pulses for one cycle (rd_valid as well for a read). The MT8889
// latches written data on the falling edge of DS, so the controller must
// drive the bus from SETUP to the end of HOLD. Cycle counts are this
// design's choice, sized for a 27 MHz clock (DS high about 300 ns).
module mt8889_minor_fsm #(
  parameter int SETUP_CYC = 2,
  parameter int DS_CYC    = 8,
  parameter int HOLD_CYC  = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       read,
  input  logic       write,
  input  logic       rs0_input,
  input  logic [3:0] data_in,
  output logic       ds,
  output logic       cs_bar,
  output logic       r_wbar,
  output logic       rs0,
  output logic [3:0] rd_data,
  output logic       rd_valid,
  output logic       done
);
  typedef enum logic [1:0] {M_IDLE, M_SETUP, M_STROBE, M_HOLD} minor_state_t;
  minor_state_t state;
  logic [7:0]   cnt;
  logic         is_read;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_IDLE;
      cnt      <= '0;
      is_read  <= 1'b0;
      ds       <= 1'b0;
      cs_bar   <= 1'b1;
      r_wbar   <= 1'b1;
      rs0      <= 1'b0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      rd_valid <= 1'b0;
      unique case (state)
        M_IDLE: if (read || write) begin
          is_read <= read;
          cs_bar  <= 1'b0;
          r_wbar  <= read;
          rs0     <= rs0_input;
          cnt     <= 8'(SETUP_CYC - 1);
          state   <= M_SETUP;
        end
        M_SETUP: begin
          if (cnt == 0) begin
            ds    <= 1'b1;
            cnt   <= 8'(DS_CYC - 1);
            state <= M_STROBE;
          end else cnt <= cnt - 1'b1;
        end
        M_STROBE: begin
          if (cnt == 0) begin
            ds <= 1'b0;
            if (is_read) rd_data <= data_in;
            cnt   <= 8'(HOLD_CYC - 1);
            state <= M_HOLD;
          end else cnt <= cnt - 1'b1;
        end
        M_HOLD: begin
          if (cnt == 0) begin
            cs_bar   <= 1'b1;
            r_wbar   <= 1'b1;
            done     <= 1'b1;
            rd_valid <= is_read;
            state    <= M_IDLE;
          end else cnt <= cnt - 1'b1;
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
