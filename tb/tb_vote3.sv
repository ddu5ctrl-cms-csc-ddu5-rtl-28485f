// tb_vote3: random check of the 2-of-3 voter, including the AND and OR commons.
module tb_vote3;
  logic [15:0] a, b, c, vote, exp;
  logic andcom, orcom;
  int checks = 0, failures = 0;

  vote3 #(.W(16)) dut (.a(a), .b(b), .c(c), .andcom(andcom), .orcom(orcom), .vote(vote));

  initial begin
    for (int n = 0; n < 400; n++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      andcom = (n % 7) != 3;
      orcom  = (n % 11) == 5;
      #1;
      for (int i = 0; i < 16; i++) begin
        int cnt;
        cnt = int'(a[i]) + int'(b[i]) + int'(c[i]);
        exp[i] = orcom | (andcom & (cnt >= 2));
      end
      checks++;
      if (vote !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h vote=%h exp=%h", a, b, c, vote, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
