// tb_crc22_64: checks the 22-bit CRC two ways: bits 0..3 against the XOR
// equations of the original parallel network (CRC0..CRC3 in terms of the old
// CRC C and data D), and all 22 bits against a bit-serial LFSR written in the
// testbench (one data bit per step, bit 0 first, feedback polynomial mask
// 22'h300000 applied after a right shift).
module tb_crc22_64;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [63:0] d = 0;
  logic [21:0] crc, model, c;
  int checks = 0, failures = 0;

  crc22_64 dut (.clk(clk), .rst(rst), .clr(clr), .en(en), .d(d), .crc(crc));
  always #5 clk = ~clk;

  function automatic logic [21:0] serial(input logic [21:0] s, input logic [63:0] x);
    for (int i = 0; i < 64; i++) begin
      logic f;
      f = s[0] ^ x[i];
      s = s >> 1;
      if (f) s = s ^ 22'h300000;
    end
    return s;
  endfunction

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      c  = crc;
      d  = {$urandom, $urandom};
      en = (n % 9) != 4;
      clr = (n == 120);
      @(posedge clk);
      #1;
      if (clr) model = 0;
      else if (en) begin
        model = serial(model, d);
        checks++;
        if (crc[0] !== (c[0]^c[1]^c[20]^d[0]^d[1]^d[20]^d[22]^d[42]^d[43]) ||
            crc[1] !== (c[0]^c[1]^c[2]^c[21]^d[0]^d[1]^d[2]^d[21]^d[23]^d[43]^d[44]) ||
            crc[2] !== (c[0]^c[1]^c[2]^c[3]^d[0]^d[1]^d[2]^d[3]^d[22]^d[24]^d[44]^d[45]) ||
            crc[3] !== (c[1]^c[2]^c[3]^c[4]^d[1]^d[2]^d[3]^d[4]^d[23]^d[25]^d[45]^d[46])) begin
          failures++;
          $display("FAIL network equations n=%0d", n);
        end
      end
      checks++;
      if (crc !== model) begin
        failures++;
        $display("FAIL n=%0d crc=%h model=%h", n, crc, model);
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
