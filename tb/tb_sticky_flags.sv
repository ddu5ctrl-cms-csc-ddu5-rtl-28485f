// tb_sticky_flags: random set pulses with and without enable; flags must
// accumulate and only reset clears them.
module tb_sticky_flags;
  logic clk = 0, rst = 1, ce = 0;
  logic [3:0] set = 0, q, model;
  int checks = 0, failures = 0;

  sticky_flags #(.W(4)) dut (.clk(clk), .rst(rst), .ce(ce), .set(set), .q(q));

  always #5 clk = ~clk;

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n == 150) begin
        rst = 1; #1; rst = 0; model = 0;
      end
      set = ($urandom % 5 == 0) ? 4'(1 << ($urandom % 4)) : 4'h0;
      ce  = ($urandom % 3) != 0;
      @(posedge clk);
      if (ce) model = model | set;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d q=%b model=%b", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
