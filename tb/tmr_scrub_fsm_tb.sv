// tmr_scrub_fsm_tb: checks the TMR scrub controller's two-clock rhythm
// (counter enable every second clock), that it writes only when its copy
// differs from the vote, and that a write to the address being fetched is
// skipped without losing the two-clock rhythm.
module tmr_scrub_fsm_tb;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic [15:0] own_do, voted;
  logic [7:0]  scrub_addr, fetch_addr;
  logic        we, en;
  int checks = 0, failures = 0;

  tmr_scrub_fsm dut (.clk, .rst, .own_do, .voted, .scrub_addr, .fetch_addr, .we, .en);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ens, wes;
    rst = 1; own_do = 0; voted = 0; scrub_addr = 0; fetch_addr = 8'd200;
    @(negedge clk); rst = 0;
    // matching words: enable on every second clock, never a write
    ens = 0; wes = 0;
    for (int n = 0; n < 100; n++) begin
      #1;
      check("enable phase", en, n % 2 == 1);
      check("no write when equal", we, 1'b0);
      ens += int'(en); wes += int'(we);
      @(negedge clk);
      if (en) scrub_addr++;
    end
    checks++;
    if (ens != 50) begin failures++; $display("FAIL enable rate %0d/100", ens); end
    // mismatch: write in the enable clock only
    own_do = 16'h1234; voted = 16'h1235;
    for (int n = 0; n < 20; n++) begin
      #1;
      check("write on mismatch", we, n % 2 == 1);
      check("enable with write", en, n % 2 == 1);
      @(negedge clk);
      if (en) scrub_addr++;
    end
    // conflict: fetch address equals scrub address during a needed write:
    // the write is skipped, the counter still advances on time
    fetch_addr = scrub_addr;
    #1 check("read phase", en, 1'b0);
    @(negedge clk);
    #1 check("skipped write", we, 1'b0);
    check("enable kept on conflict", en, 1'b1);
    @(negedge clk);
    scrub_addr++;
    #1 check("read phase after skip", en, 1'b0);
    @(negedge clk);
    #1 check("write resumes after conflict", we, 1'b1);
    check("enable with resumed write", en, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
