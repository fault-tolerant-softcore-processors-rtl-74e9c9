// cd_dwc_scrub_imem_tb: end-to-end check of the complement-duplicate
// instruction memory with duplication and scrubbing. Three program counters
// step through the 35-word program; every clock each lane's instruction is
// compared with the program word fetched one clock earlier. Upsets are
// injected by writing the block RAM arrays directly:
//   - a single-bit upset in the original or in the CD block RAM: detected by
//     the CD checks, the plain block RAM's word is used, and the error
//     triggers a scrub that rewrites both block RAMs of the CD module;
//   - a multi-bit upset in one word: detected the same way;
//   - the CD block RAM or the original block RAM wiped to zero, as an upset
//     write enable does: every word then fails the check, the plain copy is
//     used throughout, and one scrub restores the module;
//   - a bad word at the address the processors sit on: the scrub waits at
//     that address until the fetch moves on;
//   - a block RAM write enable of the protected store stuck high: it writes
//     only the duplicate's word at the scrub address, so nothing is lost;
//   - a one-clock upset of one program counter: outvoted.
// A scrub must last 2 * 256 clocks plus the clocks it waited. Each mechanism
// is counted and must happen at least once.
module cd_dwc_scrub_imem_tb;
  import ftim_pkg::*;
  localparam int DEPTH = 256;
  localparam int LEN   = 35;
  localparam int PASS  = 2 * DEPTH;

  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic [2:0][7:0]  pc, pc_q, glitch, pc_bus;
  logic [2:0][15:0] instr;
  logic [2:0]       cd_err;
  logic             scrub_busy;
  logic [15:0] prog [DEPTH];
  logic        run, hold_pc, check_on;
  int checks = 0, failures = 0;
  int n_stuck_we = 0;
  int n_err = 0, n_scrub = 0, n_wipe = 0, n_wait = 0, n_pc_upset = 0;

  assign pc_bus = pc ^ glitch;

  cd_dwc_scrub_imem dut (.clk, .rst, .pc(pc_bus), .instr, .cd_err, .scrub_busy);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic store_ok();
    for (int a = 0; a < DEPTH; a++)
      if (dut.u_cd.u_bram.mem[a] != prog[a] || dut.u_cd.u_cd_bram.mem[a] != ~prog[a]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic flip(int a, int bit_n);
    if (bit_n >= 16) dut.u_cd.u_cd_bram.mem[a][bit_n - 16] = ~dut.u_cd.u_cd_bram.mem[a][bit_n - 16];
    else             dut.u_cd.u_bram.mem[a][bit_n]         = ~dut.u_cd.u_bram.mem[a][bit_n];
  endtask

  // wait for a scrub to start and end; check its length against the waits
  task automatic scrub_and_time();
    int t, waits;
    t = 0;
    while (!scrub_busy && t < 200) begin @(negedge clk); t++; end
    check("scrub started", scrub_busy);
    t = 0; waits = 0;
    while (scrub_busy && t < 4 * PASS) begin
      if (int'(dut.g_fsm[0].u_fsm.state) == 2 && !dut.we) waits++;
      @(negedge clk); t++;
    end
    check("scrub lasts 2 * 256 clocks plus waits", t == PASS + waits);
    n_scrub++;
    n_wait += waits;
  endtask

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else if (run && !hold_pc)
      for (int i = 0; i < 3; i++) pc[i] <= (pc[i] == 8'(LEN - 1)) ? 8'd0 : pc[i] + 8'd1;
    pc_q <= pc;
  end

  always @(negedge clk) if (check_on)
    for (int i = 0; i < 3; i++) check("instruction", instr[i] == prog[pc_q[i]]);

  always @(posedge clk) if (run) n_err <= n_err + int'(cd_err != 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    $readmemh("rtl/program.hex", prog, 0, LEN - 1);
    rst = 1; run = 0; hold_pc = 0; check_on = 0; glitch = '0;
    repeat (3) @(negedge clk);
    rst = 0; run = 1;
    @(negedge clk); check_on = 1;
    repeat (PASS) @(negedge clk);
    check("module holds the program and its complement", store_ok());
    check("no errors, no scrub on a clean module", n_err == 0 && !scrub_busy);

    // single-bit upsets in the running program, original or CD block RAM
    for (int n = 0; n < 4; n++) begin
      a = $urandom_range(0, LEN - 1);
      flip(a, $urandom_range(0, 31));
      scrub_and_time();
      check("module restored after single upset", store_ok());
    end
    // multi-bit upset in one word of the original block RAM
    a = $urandom_range(0, LEN - 1);
    dut.u_cd.u_bram.mem[a] = prog[a] ^ 16'h0f0f;
    scrub_and_time();
    check("module restored after multi-bit upset", store_ok());
    check("upsets detected", n_err > 0);

    // critical failures: each block RAM of the CD module wiped in turn
    for (a = 0; a < DEPTH; a++) dut.u_cd.u_cd_bram.mem[a] = '0;
    scrub_and_time();
    check("wiped CD block RAM restored", store_ok());
    if (store_ok()) n_wipe++;
    for (a = 0; a < DEPTH; a++) dut.u_cd.u_bram.mem[a] = '0;
    scrub_and_time();
    check("wiped original block RAM restored", store_ok());
    if (store_ok()) n_wipe++;

    // processors sit on one address whose word is upset
    @(negedge clk) hold_pc = 1;
    @(negedge clk);
    a = int'(pc[0]);
    flip(a, 21);
    repeat (PASS + 100) @(negedge clk);
    check("scrub waits at the fetched address", scrub_busy && dut.scrub_addr[0] == 8'(a));
    hold_pc = 0;
    while (scrub_busy) @(negedge clk);
    check("store restored once the fetch moved", store_ok());
    n_wait++;

    // a write enable of the protected store stuck high
    force dut.u_cd.u_cd_bram.we_b = 1'b1;
    repeat (PASS) @(negedge clk);
    check("stuck write enable loses nothing", store_ok());
    release dut.u_cd.u_cd_bram.we_b;
    n_stuck_we++;

    // one-clock address upset on lane 2
    @(negedge clk) glitch[2] = 8'h21;
    @(negedge clk) glitch[2] = 8'h00;
    n_pc_upset++;
    repeat (10) @(negedge clk);

    check("mechanism: CD error, duplicate used", n_err > 0);
    check("mechanism: scrub", n_scrub > 0);
    check("mechanism: wiped block RAMs restored", n_wipe == 2);
    check("mechanism: scrub waited on a conflict", n_wait > 0);
    check("mechanism: address upset outvoted", n_pc_upset > 0);
    check("mechanism: stuck write enable", n_stuck_we > 0);
    $display("cd_err_clocks=%0d scrubs=%0d wipes=%0d wait_clocks=%0d pc_upsets=%0d",
             n_err, n_scrub, n_wipe, n_wait, n_pc_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
