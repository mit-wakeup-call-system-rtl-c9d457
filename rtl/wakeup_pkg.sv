// wakeup_pkg: types and constants shared by the wakeup call system.
//
// Time of day is kept as hour[4:0] (0..23) and minute[5:0] (0..59), as the
// system time and every stored request use. A request row of the request RAM
// is {hour, minute, phonenum[19:0]} = 31 bits. A phone number is five 4-bit
// DTMF digit codes, digit1 in bits [19:16]. The time comparison result uses
// the encoding 0 = before, 1 = equal, 2 = after.
//
// The message numbering (which ROM holds which prompt) and the MT8889
// control-register values are this design's own choices.
package wakeup_pkg;

  typedef struct packed {
    logic [4:0] hour;
    logic [5:0] minute;
  } tod_t;

  typedef struct packed {
    tod_t        t;
    logic [19:0] phonenum;
  } request_t;

  typedef enum logic [1:0] {
    CMP_BEFORE = 2'd0,
    CMP_EQUAL  = 2'd1,
    CMP_AFTER  = 2'd2
  } cmp_t;

  // Message ROM numbering (msg_no). Eleven spoken messages and one music piece.
  localparam logic [4:0] MSG_WELCOME      = 5'd0;
  localparam logic [4:0] MSG_ENTER_PHONE  = 5'd1;
  localparam logic [4:0] MSG_ENTER_PIN    = 5'd2;
  localparam logic [4:0] MSG_PIN_INVALID  = 5'd3;
  localparam logic [4:0] MSG_MENU         = 5'd4;
  localparam logic [4:0] MSG_ENTER_AMPM   = 5'd5;
  localparam logic [4:0] MSG_ENTER_HOUR   = 5'd6;
  localparam logic [4:0] MSG_ENTER_MINUTE = 5'd7;
  localparam logic [4:0] MSG_ACK_REQUEST  = 5'd8;
  localparam logic [4:0] MSG_ACK_CANCEL   = 5'd9;
  localparam logic [4:0] MSG_WAKEUP       = 5'd10;
  localparam logic [4:0] MSG_MUSIC        = 5'd11;
  localparam int         NUM_MSGS         = 12;

  // MT8889 DTMF digit codes (the chip's 4-bit code for key '0' is 1010).
  localparam logic [3:0] DTMF_ZERO = 4'hA;

  // MT8889 control register values written at power up:
  // CRA = {RSEL=1, IRQ=1, CP/DTMF=0 (DTMF), TOUT=1} -> next write goes to CRB
  // CRB = {C/R=0, S/D=0, TEST=0, BURST=0 (burst mode on)}
  localparam logic [3:0] MT_CRA_INIT = 4'b1101;
  localparam logic [3:0] MT_CRB_INIT = 4'b0000;

  // Status register bits
  localparam int MT_ST_IRQ   = 0;
  localparam int MT_ST_TXE   = 1;   // transmit data register empty
  localparam int MT_ST_RXF   = 2;   // receive data register full

  // Convert a DTMF digit code to its decimal value (code 'A' is key 0).
  function automatic logic [3:0] dtmf_value(input logic [3:0] code);
    return (code == DTMF_ZERO) ? 4'd0 : code;
  endfunction

endpackage
