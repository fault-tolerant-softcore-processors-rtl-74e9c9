// ft_imem_top_tb: end-to-end run of the three scrubbed instruction memories
// at their default sizes (256 x 16-bit words, 35-word program). Three sets of
// three program counters step through the program, each set driving one
// memory; every clock every lane's instruction is compared with the program
// word fetched one clock earlier. During the run, upsets are injected into
// the block RAM arrays of all three memories at once:
//   TMR:     single-bit upsets (outvoted, then scrubbed) and a wiped copy
//   SEC/DED: a single-bit upset (corrected) and a double-bit upset (the
//            duplicate is used), each followed by a scrub
//   CD:      a single-bit upset and a wiped CD block RAM (the duplicate is
//            used), each followed by a scrub
// plus one-clock upsets of one program counter per memory. At the end every
// store must hold the program again, and each of these mechanisms must have
// happened at least once: TMR scrub write, SEC correction, DED fallback, SEC/
// DED scrub, CD fallback, CD scrub, wiped block RAM restored, address upset.
module ft_imem_top_tb;
  import ftim_pkg::*;
  localparam int DEPTH = 256;
  localparam int LEN   = 35;
  localparam int PASS  = 2 * DEPTH;   // clocks per TMR scrub pass or DWC copy

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic [2:0][7:0]  pc, pc_q, glitch;
  logic [2:0][7:0]  tmr_pc, ecc_pc, cd_pc;
  logic [2:0][15:0] tmr_instr, ecc_instr, cd_instr;
  logic [2:0]       tmr_scrub_we, ecc_sec, ecc_ded, cd_err;
  logic             ecc_scrub_busy, cd_scrub_busy, ecc_busy_q, cd_busy_q;
  logic [15:0] prog [DEPTH];
  logic        run;
  int checks = 0, failures = 0;
  int n_tmr_we = 0, n_sec = 0, n_ded = 0, n_ecc_scrub = 0, n_cd_err = 0, n_cd_scrub = 0;
  int n_wipe = 0, n_pc_upset = 0;

  // the same program runs on all three memories; one-clock address upsets
  // are applied to lane 0 of the TMR set, lane 1 of the SEC/DED set and
  // lane 2 of the CD set
  always_comb begin
    tmr_pc = pc; ecc_pc = pc; cd_pc = pc;
    tmr_pc[0] = pc[0] ^ glitch[0];
    ecc_pc[1] = pc[1] ^ glitch[1];
    cd_pc[2]  = pc[2] ^ glitch[2];
  end

  ft_imem_top dut (
    .clk, .rst,
    .tmr_pc, .tmr_instr, .tmr_scrub_we,
    .ecc_pc, .ecc_instr, .ecc_sec, .ecc_ded, .ecc_scrub_busy,
    .cd_pc, .cd_instr, .cd_err, .cd_scrub_busy);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else if (run)
      for (int i = 0; i < 3; i++) pc[i] <= (pc[i] == 8'(LEN - 1)) ? 8'd0 : pc[i] + 8'd1;
    pc_q <= pc;
  end

  always @(negedge clk) if (run)
    for (int i = 0; i < 3; i++) begin
      check("TMR instruction", tmr_instr[i] == prog[pc_q[i]]);
      check("SEC/DED instruction", ecc_instr[i] == prog[pc_q[i]]);
      check("CD instruction", cd_instr[i] == prog[pc_q[i]]);
    end

  always @(posedge clk) begin
    ecc_busy_q <= ecc_scrub_busy;
    cd_busy_q  <= cd_scrub_busy;
    if (run) begin
      n_tmr_we    <= n_tmr_we + $countones(tmr_scrub_we);
      n_sec       <= n_sec + int'(ecc_sec != 0);
      n_ded       <= n_ded + int'(ecc_ded != 0);
      n_cd_err    <= n_cd_err + int'(cd_err != 0);
      n_ecc_scrub <= n_ecc_scrub + int'(ecc_scrub_busy && !ecc_busy_q);
      n_cd_scrub  <= n_cd_scrub + int'(cd_scrub_busy && !cd_busy_q);
    end
  end

  function automatic logic tmr_ok();
    for (int a = 0; a < DEPTH; a++)
      if (dut.u_tmr.g_lane[0].u_bram.mem[a] != prog[a] || dut.u_tmr.g_lane[1].u_bram.mem[a] != prog[a] ||
          dut.u_tmr.g_lane[2].u_bram.mem[a] != prog[a]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic ecc_ok();
    for (int a = 0; a < DEPTH; a++)
      if ({dut.u_ecc.u_secded.u_rom_hi.mem[a], dut.u_ecc.u_secded.u_rom_lo.mem[a]} != secded_encode(prog[a]))
        return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic cd_ok();
    for (int a = 0; a < DEPTH; a++)
      if (dut.u_cd.u_cd.u_bram.mem[a] != prog[a] || dut.u_cd.u_cd.u_cd_bram.mem[a] != ~prog[a]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    $readmemh("rtl/program.hex", prog, 0, LEN - 1);
    rst = 1; run = 0; glitch = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk) run = 1;
    repeat (PASS + 10) @(negedge clk);
    check("all stores intact, nothing scrubbed", tmr_ok() && ecc_ok() && cd_ok() &&
          n_tmr_we == 0 && n_ecc_scrub == 0 && n_cd_scrub == 0);

    // round 1: single-bit upsets everywhere
    dut.u_tmr.g_lane[1].u_bram.mem[4][9]      = ~dut.u_tmr.g_lane[1].u_bram.mem[4][9];
    dut.u_tmr.g_lane[2].u_bram.mem[30][0]     = ~dut.u_tmr.g_lane[2].u_bram.mem[30][0];
    dut.u_ecc.u_secded.u_rom_hi.mem[17][3]    = ~dut.u_ecc.u_secded.u_rom_hi.mem[17][3];
    dut.u_cd.u_cd.u_cd_bram.mem[22][12]       = ~dut.u_cd.u_cd.u_cd_bram.mem[22][12];
    @(negedge clk) glitch = {8'h04, 8'h40, 8'h01};
    @(negedge clk) glitch = '0;
    n_pc_upset++;
    repeat (2 * PASS + 80) @(negedge clk);
    check("round 1 repaired", tmr_ok() && ecc_ok() && cd_ok());

    // round 2: a wiped TMR copy, a double-bit SEC/DED upset, a wiped CD block RAM
    for (int a = 0; a < DEPTH; a++) begin
      dut.u_tmr.g_lane[0].u_bram.mem[a] = '0;
      dut.u_cd.u_cd.u_cd_bram.mem[a]    = '0;
    end
    dut.u_ecc.u_secded.u_rom_lo.mem[9][1] = ~dut.u_ecc.u_secded.u_rom_lo.mem[9][1];
    dut.u_ecc.u_secded.u_rom_hi.mem[9][6] = ~dut.u_ecc.u_secded.u_rom_hi.mem[9][6];
    repeat (2 * PASS + 80) @(negedge clk);
    check("round 2 repaired", tmr_ok() && ecc_ok() && cd_ok());
    if (tmr_ok()) n_wipe++;
    if (cd_ok()) n_wipe++;

    run = 0;
    check("mechanism: TMR scrub writes", n_tmr_we > 0);
    check("mechanism: SEC correction", n_sec > 0);
    check("mechanism: DED, duplicate used", n_ded > 0);
    check("mechanism: SEC/DED scrub", n_ecc_scrub >= 2);
    check("mechanism: CD error, duplicate used", n_cd_err > 0);
    check("mechanism: CD scrub", n_cd_scrub >= 2);
    check("mechanism: wiped block RAMs restored", n_wipe == 2);
    check("mechanism: address upset outvoted", n_pc_upset > 0);
    $display("tmr_scrub_writes=%0d sec_clocks=%0d ded_clocks=%0d ecc_scrubs=%0d cd_err_clocks=%0d cd_scrubs=%0d wipes=%0d pc_upsets=%0d",
             n_tmr_we, n_sec, n_ded, n_ecc_scrub, n_cd_err, n_cd_scrub, n_wipe, n_pc_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
