// tmr_voter_tb: checks the 2-of-3 voter on random words against a bit-by-bit
// count of ones, and checks that one corrupted input is always outvoted.
module tmr_voter_tb;
  localparam int W = 16;
  logic [W-1:0] a, b, c, y;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a, .b, .c, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      if (n % 2 == 1) begin        // one faulty copy of a good word
        b = a;
        c = a ^ W'($urandom);
      end
      #1;
      for (int i = 0; i < W; i++) exp[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      checks++;
      if (y !== exp || (n % 2 == 1 && y !== a)) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h y=%h exp=%h", a, b, c, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
