// vote3: bitwise 2-out-of-3 majority voter.
//
// Each output bit is high when at least two of the three copies A, B, C are
// high and ANDCOM is high, or when ORCOM forces it. Tying ANDCOM high and
// ORCOM low gives a plain majority voter, which is how the status-register
// copies are voted. The three AND3 terms into an OR4 follow the original
// macro; the bus width parameter is this design's generalisation.
// Purely combinational.
module vote3 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         andcom,
  input  logic         orcom,
  output logic [W-1:0] vote
);
  always_comb begin
    vote = ({W{andcom}} & ((a & b) | (a & c) | (b & c))) | {W{orcom}};
  end
endmodule
