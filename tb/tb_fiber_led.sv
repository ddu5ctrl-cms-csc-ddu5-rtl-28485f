// tb_fiber_led: with a short blink counter, checks that a ready link is lit,
// a present but not ready link blinks, an absent link is off, and that a
// single DAV pulse keeps the DAV LED lit for the hold time.
module tb_fiber_led;
  localparam int NF = 3;
  logic clk = 0, rst = 1;
  logic [NF-1:0] present = 3'b011, ready = 3'b001, dav = 0, fok_led, dav_led;
  int checks = 0, failures = 0;
  int on1 = 0, off1 = 0, on0 = 0, on2 = 0, hold = 0;

  fiber_led #(.NFIB(NF), .BLINK_BITS(4), .HOLD_BITS(3)) dut (
    .clk(clk), .rst(rst), .present(present), .ready(ready), .dav(dav),
    .fok_led(fok_led), .dav_led(dav_led));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (64) begin
      @(negedge clk);
      if (fok_led[0]) on0++;
      if (fok_led[1]) on1++; else off1++;
      if (fok_led[2]) on2++;
    end
    checks++;
    if (on0 != 64) begin failures++; $display("FAIL ready link not lit %0d", on0); end
    checks++;
    if (on1 < 28 || on1 > 36 || off1 < 28) begin failures++; $display("FAIL blink on=%0d off=%0d", on1, off1); end
    checks++;
    if (on2 != 0) begin failures++; $display("FAIL absent link lit"); end
    @(negedge clk) dav = 3'b100;
    @(negedge clk) dav = 0;
    while (dav_led[2] && hold < 100) begin @(negedge clk); hold++; end
    checks++;
    if (hold < 7 || hold > 9) begin failures++; $display("FAIL dav hold %0d", hold); end
    checks++;
    if (dav_led[1:0] != 0) begin failures++; $display("FAIL other dav leds"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
