// tb_fmm_ctrl: FMM word through start-up, busy on full, warning with
// hysteresis, lost sync until resync and error until hard reset.
module tb_fmm_ctrl;
  logic clk = 0, rst = 1, sync_rst = 0, system_rdy = 0, full = 0, afull = 0;
  logic sync_err = 0, hard_err = 0;
  logic [3:0] fmm;
  int checks = 0, failures = 0;

  fmm_ctrl #(.HYST(16)) dut (.clk(clk), .rst(rst), .sync_rst(sync_rst), .system_rdy(system_rdy),
                             .full(full), .afull(afull), .sync_err(sync_err), .hard_err(hard_err),
                             .fmm(fmm));
  always #5 clk = ~clk;

  task automatic chk(input logic [3:0] exp, input string what);
    checks++;
    if (fmm !== exp) begin failures++; $display("FAIL %s fmm=%b exp=%b", what, fmm, exp); end
  endtask

  task automatic pulse_sync_err;  @(negedge clk) sync_err = 1; @(negedge clk) sync_err = 0; endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    sync_err = 1; hard_err = 1;
    repeat (3) @(negedge clk);
    chk(4'b0001, "busy and nothing else before system ready");
    sync_err = 0; hard_err = 0;
    system_rdy = 1;
    repeat (2) @(negedge clk);
    chk(4'b0000, "ready");
    full = 1; repeat (2) @(negedge clk); chk(4'b0001, "busy on full");
    full = 0; afull = 1; repeat (2) @(negedge clk); chk(4'b0010, "warning");
    afull = 0; repeat (10) @(negedge clk); chk(4'b0010, "warning held by hysteresis");
    repeat (12) @(negedge clk); chk(4'b0000, "warning released");
    pulse_sync_err(); @(negedge clk); chk(4'b0100, "lost sync");
    repeat (5) @(negedge clk); chk(4'b0100, "lost sync held");
    @(negedge clk) sync_rst = 1; @(negedge clk) sync_rst = 0; @(negedge clk);
    chk(4'b0000, "resync clears lost sync");
    @(negedge clk) hard_err = 1; @(negedge clk) hard_err = 0; @(negedge clk);
    chk(4'b1000, "error");
    @(negedge clk) sync_rst = 1; @(negedge clk) sync_rst = 0; @(negedge clk);
    chk(4'b1000, "resync does not clear error");
    rst = 1; #1 rst = 0;
    repeat (2) @(negedge clk);
    chk(4'b0000, "hard reset clears error");
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
