// special_word_check: voting and consistency of the DMB "special word" bits.
//
// A 64-bit DMB word is four 16-bit words. Bits 12..15 of each of the four
// carry the same control code, so every such bit arrives in four copies
// (for bit k: DAT[k], DAT[k+16], DAT[k+32], DAT[k+48]). For each k the block
// forms
//   * a vote: the bit is taken as set when 2 or more of the 4 copies are set;
//   * an error: the ANY/ALL/NOTALL test says the copies disagree.
// On a clock where GOLDDAT (good data on the bus) and LATCH are high the
// four votes are latched into SP_VOTE (control bits 2..5 of the read-out
// controller). SP_ERR is registered on every GOLDDAT clock and is thus in step
// with the data word; it holds its last value otherwise. Timing: one clock.
// The 2-of-4 vote and the NOTALL error follow the design notes; the use of
// LATCH as a separate strobe and the reset values are this design's choices.
module special_word_check (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] dat,
  input  logic        golddat,
  input  logic        latch,
  output logic [3:0]  sp_vote,
  output logic [3:0]  sp_err
);
  logic [3:0] vote_c, err_c;

  for (genvar k = 0; k < 4; k++) begin : g_bit
    logic [3:0] cp;
    logic       any_k, all_k;
    assign cp = {dat[48+12+k], dat[32+12+k], dat[16+12+k], dat[12+k]};
    anyorall u_aoa (.b(cp), .any(any_k), .all(all_k), .notall(err_c[k]));
    // 2 or more of 4: some pair is set
    assign vote_c[k] = (cp[0] & cp[1]) | (cp[0] & cp[2]) | (cp[0] & cp[3]) |
                       (cp[1] & cp[2]) | (cp[1] & cp[3]) | (cp[2] & cp[3]);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sp_vote <= '0;
      sp_err  <= '0;
    end else if (golddat) begin
      sp_err <= err_c;
      if (latch) sp_vote <= vote_c;
    end
  end
endmodule
