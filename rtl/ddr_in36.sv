// ddr_in36: 36-bit double-data-rate input register.
//
// The input FPGAs send 72 bits per clock over 36 pins, half on each clock
// edge. The half present at the falling edge is captured into Q[35:0] and the
// half present at the next rising edge into Q[71:36]; the falling-edge half is
// then retimed to the rising edge so that all 72 bits of Q change together.
// CLR clears everything asynchronously. Timing: Q is valid one rising edge
// after the second half arrives. The bit split follows the original macro;
// the retiming flip-flop stage is this design's way of presenting one word.
module ddr_in36 (
  input  logic        clk,
  input  logic        clr,
  input  logic [35:0] din,
  output logic [71:0] q
);
  logic [35:0] q_fall;

  always_ff @(negedge clk or posedge clr) begin
    if (clr) q_fall <= '0;
    else     q_fall <= din;
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= {din, q_fall};
  end
endmodule
