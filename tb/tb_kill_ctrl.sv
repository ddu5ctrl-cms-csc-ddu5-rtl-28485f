// tb_kill_ctrl: kill register reset value and load, fiber status latched on
// END_RST, live mask = latched status AND enable bits, and the fiber-change
// flag when the status moves after the latch.
module tb_kill_ctrl;
  logic clk = 0, rst = 1, load = 0, end_rst = 0;
  logic [19:0] kill_in = 0, kill;
  logic [14:0] fiberok = 0, lfok, live;
  logic fiber_change;
  int checks = 0, failures = 0;

  kill_ctrl dut (.clk(clk), .rst(rst), .load(load), .kill_in(kill_in), .end_rst(end_rst),
                 .fiberok(fiberok), .kill(kill), .lfok(lfok), .live(live), .fiber_change(fiber_change));
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(kill == 20'hFFFFF, "kill all ones after reset");
    fiberok = 15'h1234;
    @(negedge clk) end_rst = 1;
    @(negedge clk) end_rst = 0;
    chk(lfok == 15'h1234 && live == 15'h1234, "latched status");
    fiberok = 15'h7FFF;
    @(negedge clk);
    chk(lfok == 15'h1234, "status held after latch");
    chk(fiber_change, "fiber change flagged");
    fiberok = 15'h1234;
    @(negedge clk);
    chk(!fiber_change, "no change");
    @(negedge clk) begin load = 1; kill_in = 20'hA_0F0F; end
    @(negedge clk) load = 0;
    chk(kill == 20'hA_0F0F, "kill loaded");
    chk(live == (15'h1234 & 15'h0F0F), "live masked by kill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
