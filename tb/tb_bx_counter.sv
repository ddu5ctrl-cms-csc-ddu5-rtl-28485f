// tb_bx_counter: runs the counter over full LHC orbits (limit 3563 after
// reset), checks the wrap to 0 one clock after the limit, a BC0 in mid-orbit
// and a newly loaded SPS limit of 923.
module tb_bx_counter;
  logic clk = 0, rst = 1, bc0 = 0, lim_load = 0;
  logic [11:0] lim_in = 0, bx_lim, bxn;
  int checks = 0, failures = 0;
  int model, lim, wraps;

  bx_counter dut (.clk(clk), .rst(rst), .bc0(bc0), .lim_load(lim_load), .lim_in(lim_in),
                  .bx_lim(bx_lim), .bxn(bxn));
  always #5 clk = ~clk;

  task automatic step;
    @(posedge clk);
    if (bc0 || model >= lim) begin
      if (model >= lim) wraps++;
      model = 0;
    end else model++;
    if (lim_load) lim = int'(lim_in);
    #1;
    checks++;
    if (bxn !== 12'(model) || bx_lim !== 12'(lim)) begin
      failures++;
      $display("FAIL bxn=%0d model=%0d lim=%0d/%0d", bxn, model, bx_lim, lim);
    end
  endtask

  initial begin
    model = 0; lim = 3563; wraps = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (bx_lim !== 12'd3563) begin failures++; $display("FAIL default limit %0d", bx_lim); end
    rst = 0;
    repeat (2 * 3564 + 10) step();
    checks++;
    if (wraps != 2) begin failures++; $display("FAIL wraps=%0d", wraps); end
    @(negedge clk) bc0 = 1;
    step();
    @(negedge clk) bc0 = 0;
    repeat (50) step();
    @(negedge clk) begin lim_load = 1; lim_in = 12'd923; end
    step();
    @(negedge clk) lim_load = 0;
    repeat (2000) step();
    checks++;
    if (wraps != 4) begin failures++; $display("FAIL wraps=%0d after SPS limit", wraps); end
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
