// fiber_led: status and data LEDs of the input fibers.
//
// Each fiber has two LEDs. The FOK LED is lit when the link is present and
// ready, blinks slowly when it is present but not ready, and is off when no
// link is present. The DAV LED is lit while the fiber transmits data: every
// DAV pulse restarts a hold timer of 2**HOLD_BITS clocks so that single data
// words remain visible. The blink rate is the top bit of a free-running
// BLINK_BITS-bit counter (about 4.8 Hz at 40 MHz with the default). The LED
// meanings follow the design notes; the blink and hold rates are this design's
// choices. Outputs are active high and registered.
module fiber_led #(
  parameter int unsigned NFIB       = 15,
  parameter int unsigned BLINK_BITS = 23,
  parameter int unsigned HOLD_BITS  = 20
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NFIB-1:0] present,
  input  logic [NFIB-1:0] ready,
  input  logic [NFIB-1:0] dav,
  output logic [NFIB-1:0] fok_led,
  output logic [NFIB-1:0] dav_led
);
  logic [BLINK_BITS-1:0] blink_cnt;
  logic [HOLD_BITS-1:0]  hold [NFIB];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) blink_cnt <= '0;
    else     blink_cnt <= blink_cnt + 1'b1;
  end

  for (genvar i = 0; i < NFIB; i++) begin : g_fib
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        fok_led[i] <= 1'b0;
        dav_led[i] <= 1'b0;
        hold[i]    <= '0;
      end else begin
        fok_led[i] <= present[i] & (ready[i] | blink_cnt[BLINK_BITS-1]);
        if (dav[i]) begin
          hold[i]    <= '1;
          dav_led[i] <= 1'b1;
        end else if (hold[i] != '0) begin
          hold[i]    <= hold[i] - 1'b1;
          dav_led[i] <= 1'b1;
        end else begin
          dav_led[i] <= 1'b0;
        end
      end
    end
  end
endmodule
