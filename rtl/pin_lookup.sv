// pin_lookup: PIN / phone number look-up table.
//
// A content-addressable memory of ENTRIES 16-bit PINs and a ROM of the
// matching 20-bit phone numbers, filled from PIN_FILE and PHONE_FILE (one hex
// word per line, the same order in both; a PIN of 0000 marks an empty slot).
// The table is set up by the operator when users register.
//
// Timing: pulse lookup with the PIN on pin. Two clock cycles later the CAM
// has the address of the matching entry (cam_match says whether there was
// one; the lowest address wins if a PIN occurs twice). One cycle after that
// the ROM output holds the phone number and valid pulses for one cycle with
// match and phone.
module pin_lookup #(
  parameter int    ENTRIES    = 16,
  parameter int    AW         = $clog2(ENTRIES),
  parameter string PIN_FILE   = "rtl/pin_table.hex",
  parameter string PHONE_FILE = "rtl/phone_table.hex"
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lookup,
  input  logic [15:0] pin,
  output logic        valid,
  output logic        match,
  output logic [19:0] phone
);
  logic [15:0]   cam [ENTRIES];
  logic [19:0]   rom [ENTRIES];
  logic [15:0]   pin_q;
  logic [1:0]    stage;              // lookup in flight: CAM stages 1, 2
  logic [AW-1:0] cam_addr, hit_addr;
  logic          cam_match, hit;

  initial begin
    $readmemh(PIN_FILE, cam);
    $readmemh(PHONE_FILE, rom);
  end

  // CAM compare: lowest matching address
  always_comb begin
    hit      = 1'b0;
    hit_addr = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (pin_q != 16'h0000 && cam[i] == pin_q) begin
        hit      = 1'b1;
        hit_addr = AW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      stage     <= '0;
      pin_q     <= '0;
      cam_addr  <= '0;
      cam_match <= 1'b0;
      valid     <= 1'b0;
      match     <= 1'b0;
      phone     <= '0;
    end else begin
      stage <= {stage[0], lookup};
      if (lookup) pin_q <= pin;                  // CAM cycle 1: register key
      if (stage[0]) begin                        // CAM cycle 2: address out
        cam_addr  <= hit_addr;
        cam_match <= hit;
      end
      valid <= stage[1];                         // ROM cycle
      if (stage[1]) begin
        match <= cam_match;
        phone <= rom[cam_addr];
      end
    end
  end
endmodule
