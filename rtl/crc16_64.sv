// crc16_64: 16-bit CRC over 64-bit words, one word per clock.
//
// Polynomial x^16 + x^15 + x^2 + 1 (the USB CRC-16), processed least
// significant bit first as in USB. CLR loads INIT (zero by default, this
// design's choice) and EN folds one word into the CRC. Used for the CRC field
// of the DDU trailer. CLR has priority over EN. Timing: CRC is valid one clock
// after the last word.
module crc16_64
  import ddu_pkg::*;
#(
  parameter logic [15:0] INIT = 16'h0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en,
  input  logic [63:0] d,
  output logic [15:0] crc
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)      crc <= INIT;
    else if (clr) crc <= INIT;
    else if (en)  crc <= crc16_next(crc, d);
  end
endmodule
