// kill_ctrl: kill register and latched fiber status.
//
// The 20-bit kill register enables the read-out paths; a ZERO kills a path
// and ones are alive:
//   [14:0] DMB input fibers, [15] enables the "check disable" bits below,
//   [16] ALCT, [17] TMB, [18] CFEB, [19] DMB (track-finder) checks.
// It is loaded with KILL_IN on LOAD (JTAG "load KILL register") and is all
// ones after reset. At the end of the reset sequence (END_RST) the current
// fiber status FIBEROK is latched into LFOK; LIVE = LFOK and the fiber enable
// bits. A later change of FIBEROK with respect to LFOK raises FIBER_CHANGE,
// a condition that needs a reset. The bit meanings and the latch of FIBEROK
// on the end of reset follow the design notes; the reset value of the kill
// register and FIBER_CHANGE being registered are this design's choices.
module kill_ctrl #(
  parameter int unsigned NFIB = 15
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load,
  input  logic [19:0]     kill_in,
  input  logic            end_rst,
  input  logic [NFIB-1:0] fiberok,
  output logic [19:0]     kill,
  output logic [NFIB-1:0] lfok,
  output logic [NFIB-1:0] live,
  output logic            fiber_change
);
  logic latched;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       kill <= '1;
    else if (load) kill <= kill_in;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lfok         <= '0;
      latched      <= 1'b0;
      fiber_change <= 1'b0;
    end else begin
      if (end_rst) begin
        lfok    <= fiberok;
        latched <= 1'b1;
      end
      fiber_change <= latched && !end_rst && (fiberok != lfok);
    end
  end

  assign live = lfok & kill[NFIB-1:0];
endmodule
