// tb_ddr_in36: drives a new 36-bit value before each falling and each rising
// edge and checks that the 72-bit word shows the falling-edge half in [35:0]
// and the rising-edge half in [71:36]; also checks the asynchronous clear.
module tb_ddr_in36;
  logic clk = 0, clr = 1;
  logic [35:0] din = 0, lo, hi;
  logic [71:0] q;
  int checks = 0, failures = 0;

  ddr_in36 dut (.clk(clk), .clr(clr), .din(din), .q(q));
  always #5 clk = ~clk;

  initial begin
    #12 clr = 0;
    for (int n = 0; n < 100; n++) begin
      @(posedge clk); #2;
      lo = 36'({$urandom, $urandom}); din = lo;   // sampled at the falling edge
      @(negedge clk); #2;
      hi = 36'({$urandom, $urandom}); din = hi;   // sampled at the rising edge
      @(posedge clk); #1;
      checks++;
      if (q !== {hi, lo}) begin
        failures++;
        $display("FAIL q=%h exp=%h", q, {hi, lo});
      end
    end
    clr = 1; #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
