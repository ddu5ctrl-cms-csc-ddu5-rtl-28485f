// tb_occupancy_monitor: zeroing after reset, random board-occupancy updates
// against a model array, the 2-clocks-per-board update time, and the looping
// read-out over all 60 counters.
module tb_occupancy_monitor;
  logic clk = 0, rst = 1, upd = 0, rd_next = 0;
  logic [3:0] fiber = 0, boards = 0;
  logic busy;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  int model [60];

  occupancy_monitor dut (.clk(clk), .rst(rst), .upd(upd), .fiber(fiber), .boards(boards),
                         .busy(busy), .rd_next(rd_next), .rd_data(rd_data));
  always #5 clk = ~clk;

  initial begin
    int t;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    t = 0;
    while (busy) begin @(negedge clk); t++; end
    checks++;
    if (t < 58 || t > 62) begin failures++; $display("FAIL zeroing took %0d clocks", t); end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      upd = 1; fiber = 4'($urandom % 15); boards = 4'($urandom);
      for (int b = 0; b < 4; b++) if (boards[b]) model[fiber * 4 + b]++;
      @(negedge clk); upd = 0;
      t = 1;
      while (busy) begin @(negedge clk); t++; end
      checks++;
      if (t != 9) begin failures++; $display("FAIL update took %0d clocks", t); end
    end
    // read out twice around the loop
    for (int n = 0; n < 120; n++) begin
      checks++;
      if (rd_data !== 32'(model[n % 60])) begin
        failures++;
        $display("FAIL counter %0d = %0d, model %0d", n % 60, rd_data, model[n % 60]);
      end
      rd_next = 1; @(negedge clk); rd_next = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
