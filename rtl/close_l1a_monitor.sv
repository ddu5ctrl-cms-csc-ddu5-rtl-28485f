// close_l1a_monitor: L1A proximity tracker.
//
// Every L1A is sent through a DELAY-stage pipeline (40 crossings = 1000 ns).
// When it leaves the pipeline, the block
//   * flags it as a "close L1A" if the pipeline holds another L1A, i.e. a
//     second L1A came within DELAY-1 crossings after it (such closely spaced
//     L1As are hard for the DMBs);
//   * rebuilds the crossing number at which it arrived by subtracting DELAY
//     from the current BXN; if BXN < DELAY the subtraction wraps into the
//     previous orbit, so the orbit length BX_LIM+1 is added back instead of
//     4096 (the "3564-4096 difference").
// Outputs: L1A_OUT pulses for one clock, DELAY clocks after L1A, and
// SBXN = {close, bxn} is valid while it is high and held until the next one.
// The 1000 ns pipe, the BX-40 correction and bit 12 as the close flag follow
// the design notes.
module close_l1a_monitor #(
  parameter int unsigned DELAY = 40
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1a,
  input  logic [11:0] bxn,
  input  logic [11:0] bx_lim,
  output logic        l1a_out,
  output logic [12:0] sbxn
);
  logic [DELAY-1:0] pipe;      // pipe[DELAY-1] is the oldest L1A
  logic             leaving;
  logic [11:0]      bx_corr;

  assign leaving = pipe[DELAY-1];

  always_comb begin
    if (bxn >= 12'(DELAY)) bx_corr = bxn - 12'(DELAY);
    else                   bx_corr = bxn + bx_lim + 12'd1 - 12'(DELAY);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pipe    <= '0;
      l1a_out <= 1'b0;
      sbxn    <= '0;
    end else begin
      pipe    <= {pipe[DELAY-2:0], l1a};
      l1a_out <= leaving;
      if (leaving) sbxn <= {(|pipe[DELAY-2:0]), bx_corr};
    end
  end
endmodule
