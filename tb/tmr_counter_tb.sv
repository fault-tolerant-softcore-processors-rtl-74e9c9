// tmr_counter_tb: checks the triplicated counter: it counts only while the
// enables are high, wraps at 2**W, and a copy upset out of step is pulled back
// to the majority value on the next clock. Also checks that a single copy's
// enable cannot move the other copies.
module tmr_counter_tb;
  localparam int W = 8;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic [2:0] en;
  logic [2:0][W-1:0] q;
  int checks = 0, failures = 0;

  tmr_counter #(.W(W)) dut (.clk, .rst, .en, .q);

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    rst = 1; en = 0;
    @(negedge clk); @(negedge clk);
    rst = 0; model = 0;
    for (int c = 0; c < 3; c++) check("reset", q[c], 0);
    // count every second clock through a wrap
    for (int n = 0; n < 600; n++) begin
      en = (n % 2 == 1) ? 3'b111 : 3'b000;
      @(negedge clk);
      if (en[0]) model = (model + 1) % (1 << W);
      for (int c = 0; c < 3; c++) check("count", q[c], W'(model));
    end
    // upset copy 1, hold enables low: copy 1 is restored after one clock
    en = 0;
    @(posedge clk); #1 dut.q[1] = W'(model + 77);
    @(negedge clk);
    check("upset copy before vote", q[1], W'(model + 77));
    @(negedge clk);
    for (int c = 0; c < 3; c++) check("resync", q[c], W'(model));
    // only copy 2 enabled: copy 2 goes ahead by one, then is voted back
    en = 3'b100;
    @(negedge clk);
    en = 0;
    check("lone enable copy 2", q[2], W'(model + 1));
    check("lone enable copy 0", q[0], W'(model));
    @(negedge clk);
    check("lone enable voted back", q[2], W'(model));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
