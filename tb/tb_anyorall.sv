// tb_anyorall: exhaustive check of the any/all/not-all gate over all 16 inputs.
module tb_anyorall;
  logic [3:0] b;
  logic any, all, notall;
  int checks = 0, failures = 0;

  anyorall dut (.b(b), .any(any), .all(all), .notall(notall));

  initial begin
    for (int v = 0; v < 16; v++) begin
      b = 4'(v);
      #1;
      checks++;
      if (any !== (v != 0) || all !== (v == 15) || notall !== (v != 0 && v != 15)) begin
        failures++;
        $display("FAIL b=%b any=%b all=%b notall=%b", b, any, all, notall);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
