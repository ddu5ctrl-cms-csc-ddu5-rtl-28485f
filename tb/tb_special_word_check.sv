// tb_special_word_check: random 64-bit words whose four copies of bits 12..15
// mostly agree; checks the 2-of-4 vote latched on LATCH and the registered
// disagreement flags, both only on GOLDDAT clocks.
module tb_special_word_check;
  logic clk = 0, rst = 1, golddat = 0, latch = 0;
  logic [63:0] dat = 0;
  logic [3:0] sp_vote, sp_err, m_vote, m_err;
  int checks = 0, failures = 0, n_err = 0;

  special_word_check dut (.clk(clk), .rst(rst), .dat(dat), .golddat(golddat), .latch(latch),
                          .sp_vote(sp_vote), .sp_err(sp_err));
  always #5 clk = ~clk;

  initial begin
    logic [3:0] code;
    m_vote = 0; m_err = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 500; n++) begin
      code = 4'($urandom);
      dat = {$urandom, $urandom};
      for (int q = 0; q < 4; q++) dat[16*q+12 +: 4] = code;
      if ($urandom % 3 == 0) dat[16*($urandom % 4) + 12 + ($urandom % 4)] ^= 1'b1;  // one bad copy
      if ($urandom % 8 == 0) dat[16*($urandom % 4) + 12 + ($urandom % 4)] ^= 1'b1;
      golddat = ($urandom % 4) != 0;
      latch   = ($urandom % 3) == 0;
      @(posedge clk);
      if (golddat) begin
        for (int k = 0; k < 4; k++) begin
          int c;
          c = int'(dat[12+k]) + int'(dat[28+k]) + int'(dat[44+k]) + int'(dat[60+k]);
          m_err[k] = (c != 0 && c != 4);
          if (latch) m_vote[k] = (c >= 2);
        end
        if (m_err != 0) n_err++;
      end
      #1;
      checks++;
      if (sp_vote !== m_vote || sp_err !== m_err) begin
        failures++;
        $display("FAIL n=%0d vote=%b/%b err=%b/%b", n, sp_vote, m_vote, sp_err, m_err);
      end
      @(negedge clk);
    end
    if (n_err == 0) begin failures++; $display("FAIL no error case seen"); end
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
