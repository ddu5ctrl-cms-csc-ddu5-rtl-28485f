// tb_fifo_ready: event-start readiness and timeouts at the default limits.
// Cases: all live inputs ready (DATA_READY one clock later, no timeout);
// one input missing (NOT_READY, then the start timeout after 128 clocks marks
// the missing input and forces DATA_READY); the same in calibration mode
// (288 clocks); a read that lasts too long (end timeout after 38914 clocks).
module tb_fifo_ready;
  logic clk = 0, rst = 1;
  logic wait_start = 0, cal = 0, reading = 0, done = 0;
  logic [3:0] active = 4'b1011, rdy = 0;
  logic one_rdy, all_rdy, data_ready, not_ready, end_timeout;
  logic [3:0] start_timeout;
  int checks = 0, failures = 0;

  fifo_ready dut (.clk(clk), .rst(rst), .wait_start(wait_start), .cal(cal), .active(active),
                  .rdy(rdy), .reading(reading), .done(done), .one_rdy(one_rdy), .all_rdy(all_rdy),
                  .data_ready(data_ready), .not_ready(not_ready),
                  .start_timeout(start_timeout), .end_timeout(end_timeout));
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic finish_evt;
    @(negedge clk) begin wait_start = 0; done = 1; reading = 0; rdy = 0; end
    @(negedge clk) done = 0;
  endtask

  task automatic start_to_case(input logic calm, input int lim);
    int n;
    cal = calm;
    @(negedge clk) begin wait_start = 1; rdy = 4'b0011; end   // input 3 missing
    n = 0;
    @(negedge clk);
    chk(not_ready && !data_ready, "not ready with a missing input");
    while (!data_ready && n < 1000) begin @(negedge clk); n++; end
    chk(n >= lim - 2 && n <= lim + 1, $sformatf("start timeout after %0d clocks, limit %0d", n, lim));
    chk(start_timeout == 4'b1000, "missing input flagged");
    finish_evt();
    chk(!data_ready && start_timeout == 0, "cleared by done");
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // all ready
    @(negedge clk) begin wait_start = 1; rdy = 4'b1011; end
    @(negedge clk);
    chk(data_ready && one_rdy && all_rdy && !not_ready, "all ready");
    repeat (200) @(negedge clk);
    chk(start_timeout == 0, "no timeout when all ready");
    finish_evt();
    start_to_case(1'b0, 128);
    start_to_case(1'b1, 288);
    // no input ready at all: the start timeout still ends the wait
    cal = 0;
    @(negedge clk) begin wait_start = 1; rdy = 4'b0000; end
    n = 0;
    while (!data_ready && n < 1000) begin @(negedge clk); n++; end
    chk(n >= 126 && n <= 129, $sformatf("start timeout with no input after %0d clocks", n));
    chk(start_timeout == 4'b1011, "all live inputs flagged");
    finish_evt();
    // no live input: the event is read out at once, with no timeout
    @(negedge clk) begin active = 4'b0000; wait_start = 1; rdy = 4'b1111; end
    n = 0;
    while (!data_ready && n < 1000) begin @(negedge clk); n++; end
    chk(n <= 1 && start_timeout == 0, $sformatf("no live input: ready after %0d clocks", n));
    finish_evt();
    active = 4'b1011;
    // end timeout
    @(negedge clk) reading = 1;
    n = 0;
    while (!end_timeout && n < 50000) begin @(negedge clk); n++; end
    chk(n >= 38912 && n <= 38915, $sformatf("end timeout after %0d clocks", n));
    finish_evt();
    chk(!end_timeout, "end timeout cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
