// crc22_64: 22-bit CRC over 64-bit words, one word per clock.
//
// Used to check the CRC of the trigger (ALCT/TMB) data. The register is
// cleared by CLR (the "load zero on trigger trailer" control) and folds the
// 64-bit word D into the CRC on every clock where EN is high. The update is
// the parallel form of a serial LFSR that takes bit 0 of the word first and
// shifts right, feeding back into bits 21 and 20; its equations for CRC0 to
// CRC3 are exactly those of the original XOR network. CLR has priority over
// EN. Timing: CRC is valid one clock after the last word.
module crc22_64
  import ddu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en,
  input  logic [63:0] d,
  output logic [21:0] crc
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)      crc <= '0;
    else if (clr) crc <= '0;
    else if (en)  crc <= crc22_next(crc, d);
  end
endmodule
