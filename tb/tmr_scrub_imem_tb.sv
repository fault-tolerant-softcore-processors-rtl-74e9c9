// tmr_scrub_imem_tb: end-to-end check of the TMR instruction memory with
// scrubbing. Three program counters step through the 35-word program as a
// PicoBlaze would, and every clock each lane's instruction is compared with
// the program word fetched one clock earlier. Upsets are injected by writing
// the block RAM arrays directly:
//   - single-bit upsets in one copy: outvoted, then repaired by the scrubber
//     within two scrub passes (2 * 256 clocks each; a word that is being
//     fetched when the scrubber reaches it waits for the next pass);
//   - a whole copy wiped to zero, as an upset write enable does: outvoted,
//     and the copy is fully restored within two passes;
//   - the same word upset in two copies one after the other, with a pass in
//     between: still outvoted, because the first was repaired;
//   - a bad word at the address the processors sit on: the scrub write is
//     skipped while it is being fetched, and done on a pass after the fetch
//     moves on; the scrub pass stays exactly 2 * 256 clocks;
//   - the write enable of one copy stuck high for over a pass: that copy is
//     written with the voted word at every scrub address, so it stays
//     intact (the data input comes from the vote, not from a tied-off bus);
//   - an upset of one program counter or one scrub counter copy: outvoted.
// Each mechanism is counted and must happen at least once.
module tmr_scrub_imem_tb;
  import ftim_pkg::*;
  localparam int DEPTH = 256;
  localparam int LEN   = 35;
  localparam int PASS  = 2 * DEPTH;

  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic [2:0][7:0]  pc, pc_q, glitch, pc_bus;
  logic [2:0][15:0] instr;
  logic [2:0]       scrub_we;
  logic [15:0] prog [DEPTH];
  logic        run, hold_pc, check_on;
  int checks = 0, failures = 0;
  int n_stuck_we = 0;
  int n_masked = 0, n_repairs = 0, n_wipe = 0, n_overlap = 0, n_stall = 0, n_pc_upset = 0;

  // address bus of each processor, with an optional one-clock upset
  assign pc_bus = pc ^ glitch;

  tmr_scrub_imem dut (.clk, .rst, .pc(pc_bus), .instr, .scrub_we);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [15:0] rd(int k, int a);
    case (k)
      0: return dut.g_lane[0].u_bram.mem[a];
      1: return dut.g_lane[1].u_bram.mem[a];
      default: return dut.g_lane[2].u_bram.mem[a];
    endcase
  endfunction

  task automatic wr(int k, int a, logic [15:0] v);
    case (k)
      0: dut.g_lane[0].u_bram.mem[a] = v;
      1: dut.g_lane[1].u_bram.mem[a] = v;
      default: dut.g_lane[2].u_bram.mem[a] = v;
    endcase
  endtask

  function automatic logic copy_ok(int k);
    for (int a = 0; a < DEPTH; a++) if (rd(k, a) != prog[a]) return 1'b0;
    return 1'b1;
  endfunction

  // processors: step through the program; compare each lane every clock
  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else if (run && !hold_pc)
      for (int i = 0; i < 3; i++) pc[i] <= (pc[i] == 8'(LEN - 1)) ? 8'd0 : pc[i] + 8'd1;
    pc_q <= pc;
  end

  always @(negedge clk) if (check_on) begin
    for (int i = 0; i < 3; i++) check("instruction", instr[i] == prog[pc_q[i]]);
  end

  // scrub writes, sampled at the clock edge that performs them
  always @(posedge clk) if (check_on) n_repairs <= n_repairs + $countones(scrub_we);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, k, t;
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    $readmemh("rtl/program.hex", prog, 0, LEN - 1);
    rst = 1; run = 0; hold_pc = 0; check_on = 0; glitch = '0;
    repeat (3) @(negedge clk);
    rst = 0; run = 1;
    @(negedge clk); check_on = 1;
    repeat (PASS + 10) @(negedge clk);
    for (k = 0; k < 3; k++) check("no repairs needed", copy_ok(k));
    check("no writes on clean memory", n_repairs == 0);
    // scrub rate: one address every two clocks
    while (dut.scrub_addr[0] != 0) @(negedge clk);
    while (dut.scrub_addr[0] == 0) @(negedge clk);
    t = 0;
    while (dut.scrub_addr[0] != 0) begin @(negedge clk); t++; end
    check("scrub pass takes 2 * 256 clocks", t == PASS - 2);   // addresses 1..255

    // single upsets in random copies, some of them in the running program
    for (int n = 0; n < 6; n++) begin
      k = n % 3; a = (n < 3) ? $urandom_range(0, LEN - 1) : $urandom_range(0, DEPTH - 1);
      wr(k, a, rd(k, a) ^ (16'd1 << $urandom_range(0, 15)));
      n_masked++;
      repeat (2 * PASS + 4) @(negedge clk);
      check("single upset repaired within two passes", copy_ok(k));
    end
    check("scrub writes seen", n_repairs >= 6);

    // critical failure: copy 1 wiped
    for (a = 0; a < DEPTH; a++) wr(1, a, 16'h0000);
    t = 0;
    while (!copy_ok(1) && t < 3 * PASS) begin @(negedge clk); t++; end
    check("wiped copy restored within two passes", t <= 2 * PASS + 4);
    if (copy_ok(1)) n_wipe++;

    // overlapping upsets at one address, one pass apart
    a = 12;
    wr(0, a, ~prog[a]);
    repeat (2 * PASS + 4) @(negedge clk);
    wr(2, a, ~prog[a]);
    repeat (2 * PASS + 4) @(negedge clk);
    check("overlapping upsets survived", copy_ok(0) && copy_ok(2));
    n_overlap++;

    // conflict: processors sit on one address that holds a bad word in copy 2
    @(negedge clk) hold_pc = 1;
    @(negedge clk);
    a = int'(pc[0]);
    wr(2, a, prog[a] ^ 16'h0100);
    t = 0;
    while (t < PASS + 8) begin
      @(negedge clk); t++;
      if (dut.scrub_addr[2] == 8'(a) && dut.cnt_en[2] && !scrub_we[2]) n_stall++;
    end
    check("write skipped while fetched", rd(2, a) != prog[a] && n_stall > 0);
    hold_pc = 0;
    repeat (2 * PASS + 4) @(negedge clk);
    check("held word repaired after fetch moved", copy_ok(2));

    // write enable of copy 0 stuck high for more than one pass
    force dut.g_lane[0].u_bram.we_b = 1'b1;
    repeat (PASS + 20) @(negedge clk);
    check("copy with stuck write enable intact", copy_ok(0) && copy_ok(1) && copy_ok(2));
    release dut.g_lane[0].u_bram.we_b;
    n_stuck_we++;

    // upset one program counter for one clock
    @(negedge clk) glitch[1] = 8'h10;
    @(negedge clk) glitch[1] = 8'h00;
    n_pc_upset++;
    repeat (4) @(negedge clk);
    // upset one scrub counter copy, then a word: still repaired
    @(posedge clk); #1 dut.u_cnt.q[0] = dut.u_cnt.q[0] + 8'd99;
    wr(0, 3, ~prog[3]);
    repeat (2 * PASS + 6) @(negedge clk);
    check("repair after counter upset", copy_ok(0));

    check("mechanism: single upset outvoted and repaired", n_masked > 0 && n_repairs > 0);
    check("mechanism: wiped copy restored", n_wipe > 0);
    check("mechanism: overlapping upsets", n_overlap > 0);
    check("mechanism: read/write conflict skipped", n_stall > 0);
    check("mechanism: address upset outvoted", n_pc_upset > 0);
    check("mechanism: stuck write enable", n_stuck_we > 0);
    $display("masked=%0d scrub_writes=%0d wipes=%0d overlap=%0d conflict_skips=%0d pc_upsets=%0d",
             n_masked, n_repairs, n_wipe, n_overlap, n_stall, n_pc_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
