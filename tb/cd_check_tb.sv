// cd_check_tb: checks the complement-duplicate check: a word and its exact
// complement pass; any single upset in either word, and any set of upsets
// that all flip the same way, is flagged.
module cd_check_tb;
  logic [15:0] orig, cd, data;
  logic        err;
  int checks = 0, failures = 0;

  cd_check dut (.orig, .cd, .data, .err);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s orig=%h cd=%h err=%b", what, orig, cd, err); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [15:0] w, m;
      w = 16'($urandom);
      orig = w; cd = ~w; #1;
      check("clean", !err && data == w);
      for (int b = 0; b < 16; b++) begin
        orig = w ^ (16'd1 << b); cd = ~w; #1;
        check("single in original", err && data == orig);
        orig = w; cd = ~w ^ (16'd1 << b); #1;
        check("single in CD", err);
      end
      // unidirectional multi-bit upset: some ones of the original drop to zero
      m = w & 16'($urandom);
      if (m != 0) begin
        orig = w & ~m; cd = ~w; #1;
        check("unidirectional", err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
