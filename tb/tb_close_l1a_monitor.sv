// tb_close_l1a_monitor: random L1As against a BXN that the testbench counts
// itself (orbit 0..3563). For every L1A the testbench expects, 40 clocks
// later, a one-clock L1A_OUT with SBXN = {close, BXN at the L1A}, where close
// means another L1A followed within 39 clocks. L1As just after the start of
// an orbit exercise the BX<40 wrap correction.
module tb_close_l1a_monitor;
  logic clk = 0, rst = 1, l1a = 0;
  logic [11:0] bxn = 0;
  logic [11:0] bx_lim = 12'd3563;
  logic l1a_out;
  logic [12:0] sbxn;
  int checks = 0, failures = 0;
  int cyc = 0;
  int l1a_cyc[$];
  int l1a_bx[$];
  int n_close = 0, n_wrap = 0, n_out = 0;

  close_l1a_monitor #(.DELAY(40)) dut (.clk(clk), .rst(rst), .l1a(l1a), .bxn(bxn), .bx_lim(bx_lim),
                                       .l1a_out(l1a_out), .sbxn(sbxn));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      bxn <= (bxn == bx_lim) ? 12'd0 : bxn + 12'd1;
    end
  end

  // expectation: L1A_OUT at cycle l1a_cyc+41 (registered output), checked after the edge
  always @(posedge clk) begin
    #1;
    if (!rst && l1a_cyc.size() > 0 && cyc == l1a_cyc[0] + 41) begin
      int c0, b0;
      logic cl;
      c0 = l1a_cyc.pop_front();
      b0 = l1a_bx.pop_front();
      cl = (l1a_cyc.size() > 0) && (l1a_cyc[0] - c0 <= 39);
      checks++;
      n_out++;
      if (cl) n_close++;
      if (b0 < 40) n_wrap++;
      if (l1a_out !== 1'b1 || sbxn !== {cl, 12'(b0)}) begin
        failures++;
        $display("FAIL cyc=%0d l1a_out=%b sbxn=%h exp=%b/%0d", cyc, l1a_out, sbxn, cl, b0);
      end
    end else if (!rst) begin
      checks++;
      if (l1a_out !== 1'b0) begin failures++; $display("FAIL spurious l1a_out cyc=%0d", cyc); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 12000; n++) begin
      @(negedge clk);
      l1a = ($urandom % 60 == 0) || (bxn < 12'd40 && $urandom % 8 == 0);
      if (l1a) begin
        l1a_cyc.push_back(cyc);
        l1a_bx.push_back(int'(bxn));
      end
    end
    @(negedge clk) l1a = 0;
    repeat (50) @(posedge clk);
    if (n_close == 0 || n_wrap == 0 || n_out < 100) begin
      failures++;
      $display("FAIL coverage close=%0d wrap=%0d out=%0d", n_close, n_wrap, n_out);
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
