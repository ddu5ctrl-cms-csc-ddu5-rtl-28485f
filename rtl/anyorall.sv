// anyorall: any / all / not-all of four bits.
//
// Used wherever four copies of one bit must agree, for example the four
// "special word" bits that each 16-bit quarter of a 64-bit DMB word carries.
// ANY is the OR of the four inputs, ALL their AND, and NOTALL is ANY xor ALL,
// true when the copies disagree. The gate structure (OR4, AND4, XOR2) is the
// one of the original macro. Purely combinational.
module anyorall (
  input  logic [3:0] b,
  output logic       any,
  output logic       all,
  output logic       notall
);
  always_comb begin
    any    = |b;
    all    = &b;
    notall = any ^ all;
  end
endmodule
