// tb_crc16_64: the 16-bit CRC against published CRC-16 (x^16+x^15+x^2+1,
// reflected, initial value 0) results of ASCII strings, bytes packed into the
// 64-bit word with the first byte in bits [7:0]; also checks clear and hold.
module tb_crc16_64;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [63:0] d = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16_64 dut (.clk(clk), .rst(rst), .clr(clr), .en(en), .d(d), .crc(crc));
  always #5 clk = ~clk;

  function automatic logic [63:0] pack(input string s);
    logic [63:0] w = '0;
    for (int i = 0; i < 8; i++) w[8*i +: 8] = s[i];
    return w;
  endfunction

  task automatic chk(input logic [15:0] exp, input string what);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL %s crc=%h exp=%h", what, crc, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk); en = 1; d = pack("12345678");
    @(negedge clk); en = 0;
    chk(16'h3C9D, "12345678");
    @(negedge clk); chk(16'h3C9D, "hold");
    clr = 1; @(negedge clk); clr = 0;
    chk(16'h0000, "clear");
    en = 1; d = pack("12345678");
    @(negedge clk); d = pack("ABCDEFGH");
    @(negedge clk); en = 0;
    chk(16'hEDAA, "12345678ABCDEFGH");
    clr = 1; en = 1; @(negedge clk); clr = 0; en = 0;
    chk(16'h0000, "clear priority");
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
