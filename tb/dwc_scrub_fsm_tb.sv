// dwc_scrub_fsm_tb: checks the DWC scrub controller: idle until triggered;
// a triggered copy writes every one of the 2**AW addresses exactly once, one
// write every two clocks, 2 * 2**AW clocks in all; triggers during a copy are
// ignored; a write to the address being fetched is held back.
module dwc_scrub_fsm_tb;
  localparam int AW = 8;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic          trig, we, en, busy;
  logic [AW-1:0] scrub_addr, fetch_addr;
  int checks = 0, failures = 0;
  int written [1 << AW];

  dwc_scrub_fsm #(.AW(AW)) dut (.clk, .rst, .trig, .scrub_addr, .fetch_addr, .we, .en, .busy);

  // counter model: advances on en, as the triplicated counter does
  always_ff @(posedge clk)
    if (rst) scrub_addr <= '0;
    else if (en) scrub_addr <= scrub_addr + 1'b1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, stall_at, stalled, held;
    rst = 1; trig = 0; fetch_addr = '1;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      check("idle without trigger", !busy && !we && !en);
    end
    // copy with no conflicts
    foreach (written[i]) written[i] = 0;
    fetch_addr = 8'd0;   // address 0 is past before the first write
    trig = 1;
    @(negedge clk) trig = 0;
    fetch_addr = 8'd250;
    cycles = 0; held = 0;
    while (busy && cycles < 5000) begin
      trig = (cycles % 7 == 0) && cycles < 400;   // re-triggers while busy
      // the fetch sits on address 250 for two held clocks, then moves away
      #1 if (scrub_addr == 250 && int'(dut.state) == 2) begin
        held++;
        if (held > 2) fetch_addr = 8'd0;
      end
      #1 if (we) written[scrub_addr]++;
      @(negedge clk);
      cycles++;
    end
    trig = 0;
    check("busy for the whole copy", cycles == 2 * (1 << AW) + 2);   // two held clocks at 250
    foreach (written[i]) check("every address written once", written[i] == 1);
    check("counter back at 0", scrub_addr == 0);
    @(negedge clk) check("idle after copy", !busy);
    // conflict: hold fetch address at 5 for 6 clocks
    fetch_addr = 8'd5;
    trig = 1; @(negedge clk); trig = 0;
    stall_at = 0;
    while (scrub_addr != 5 && stall_at < 5000) begin @(negedge clk); stall_at++; end
    stalled = 0;
    for (int n = 0; n < 8; n++) begin
      #1 check("held write", !we && !en && scrub_addr == 5 && busy);
      stalled++;
      @(negedge clk);
    end
    check("stall happened", stalled == 8);
    fetch_addr = 8'd200;
    #1 check("released", we && scrub_addr == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
