// sticky_flags: error flags that set and hold until reset.
//
// Each bit of Q goes high on a clock edge where CE is high and the matching
// SET bit is high, and then stays high until the asynchronous reset. This is
// the behaviour of the stuck-data and FIFO-error latches (a flip-flop whose
// enable is its own inverted output) and of the lost-in-data register (a
// register that reloads its own value ORed with new errors). Timing: one
// clock from SET to Q.
module sticky_flags #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [W-1:0] set,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (ce) q <= q | set;
  end
endmodule
