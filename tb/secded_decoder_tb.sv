// secded_decoder_tb: checks the (22,16) SEC/DED decoder with codewords built
// by an encoder written here position by position: clean words pass with no
// flag, every single-bit upset (all 22 positions) is corrected with sec, and
// random double-bit upsets are flagged ded.
module secded_decoder_tb;
  logic [21:0] cw;
  logic [15:0] data;
  logic        sec, ded;
  int checks = 0, failures = 0;

  secded_decoder dut (.cw, .data, .sec, .ded);

  function automatic logic [21:0] ref_encode(logic [15:0] d);
    logic [21:0] c;
    int n;
    c = '0; n = 0;
    for (int p = 1; p <= 21; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin c[p] = d[n]; n++; end
    for (int k = 0; k < 5; k++)
      for (int p = 1; p <= 21; p++)
        if (p[k] && p != (1 << k)) c[1 << k] ^= c[p];
    for (int p = 1; p <= 21; p++) c[0] ^= c[p];
    return c;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cw=%h data=%h sec=%b ded=%b", what, cw, data, sec, ded); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [15:0] d;
      logic [21:0] good;
      int b1, b2;
      d = 16'($urandom);
      good = ref_encode(d);
      cw = good; #1;
      check("clean", data == d && !sec && !ded);
      for (int b = 0; b < 22; b++) begin
        cw = good ^ (22'd1 << b); #1;
        check("single corrected", data == d && sec && !ded);
      end
      b1 = $urandom_range(0, 21);
      b2 = (b1 + $urandom_range(1, 21)) % 22;
      cw = good ^ (22'd1 << b1) ^ (22'd1 << b2); #1;
      check("double detected", ded && !sec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
