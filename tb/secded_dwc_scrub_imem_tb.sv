// secded_dwc_scrub_imem_tb: end-to-end check of the SEC/DED instruction
// memory with duplication and scrubbing. Three program counters step through
// the 35-word program; every clock each lane's instruction is compared with
// the program word fetched one clock earlier. Upsets are injected by writing
// the block RAM arrays directly:
//   - a single-bit upset in either encoded half: corrected (sec), and the
//     error triggers a scrub that rewrites the whole SEC/DED store;
//   - a double-bit upset: detected (ded), the plain block RAM's word is used,
//     and a scrub follows;
//   - one encoded half wiped to zero, as an upset write enable does: the
//     store is fully restored by one scrub (the output is not checked while
//     words carry many upsets, which the code cannot always see);
//   - a bad word at the address the processors sit on: the scrub waits at
//     that address until the fetch moves on;
//   - a block RAM write enable of the protected store stuck high: it writes
//     only the duplicate's word at the scrub address, so nothing is lost;
//   - a one-clock upset of one program counter: outvoted.
// A scrub must last 2 * 256 clocks plus the clocks it waited. Each mechanism
// is counted and must happen at least once.
module secded_dwc_scrub_imem_tb;
  import ftim_pkg::*;
  localparam int DEPTH = 256;
  localparam int LEN   = 35;
  localparam int PASS  = 2 * DEPTH;

  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic [2:0][7:0]  pc, pc_q, glitch, pc_bus;
  logic [2:0][15:0] instr;
  logic [2:0]       sec, ded;
  logic             scrub_busy;
  logic [15:0] prog [DEPTH];
  logic [21:0] code [DEPTH];
  logic        run, hold_pc, check_on;
  int checks = 0, failures = 0;
  int n_stuck_we = 0;
  int n_sec = 0, n_ded = 0, n_scrub = 0, n_wipe = 0, n_wait = 0, n_pc_upset = 0;

  assign pc_bus = pc ^ glitch;

  secded_dwc_scrub_imem dut (.clk, .rst, .pc(pc_bus), .instr, .sec, .ded, .scrub_busy);

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
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic store_ok();
    for (int a = 0; a < DEPTH; a++)
      if ({dut.u_secded.u_rom_hi.mem[a], dut.u_secded.u_rom_lo.mem[a]} != code[a]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic flip(int a, int bit_n);
    if (bit_n >= 11) dut.u_secded.u_rom_hi.mem[a][bit_n - 11] = ~dut.u_secded.u_rom_hi.mem[a][bit_n - 11];
    else             dut.u_secded.u_rom_lo.mem[a][bit_n]      = ~dut.u_secded.u_rom_lo.mem[a][bit_n];
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

  always @(posedge clk) if (run) begin
    n_sec <= n_sec + int'(sec != 0);
    n_ded <= n_ded + int'(ded != 0);
  end

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
    for (int i = 0; i < DEPTH; i++) code[i] = ref_encode(prog[i]);
    rst = 1; run = 0; hold_pc = 0; check_on = 0; glitch = '0;
    repeat (3) @(negedge clk);
    rst = 0; run = 1;
    @(negedge clk); check_on = 1;
    repeat (PASS) @(negedge clk);
    check("store holds the encoded program", store_ok());
    check("no flags, no scrub on a clean store", n_sec == 0 && n_ded == 0 && !scrub_busy);

    // single-bit upsets in the running program
    for (int n = 0; n < 3; n++) begin
      a = $urandom_range(0, LEN - 1);
      flip(a, $urandom_range(0, 21));
      scrub_and_time();
      check("store restored after single upset", store_ok());
    end
    check("single upsets corrected", n_sec > 0);

    // double-bit upsets
    for (int n = 0; n < 3; n++) begin
      int b;
      a = $urandom_range(0, LEN - 1);
      b = $urandom_range(0, 21);
      flip(a, b);
      flip(a, (b + 1 + $urandom_range(0, 20)) % 22);
      scrub_and_time();
      check("store restored after double upset", store_ok());
    end
    check("double upsets detected", n_ded > 0);

    // critical failure: the bottom half wiped
    check_on = 0;
    for (a = 0; a < DEPTH; a++) dut.u_secded.u_rom_lo.mem[a] = '0;
    scrub_and_time();
    check("wiped half restored", store_ok());
    if (store_ok()) n_wipe++;
    @(negedge clk) check_on = 1;

    // processors sit on one address whose word is upset
    @(negedge clk) hold_pc = 1;
    @(negedge clk);
    a = int'(pc[0]);
    flip(a, 5);
    repeat (PASS + 100) @(negedge clk);
    check("scrub waits at the fetched address", scrub_busy && dut.scrub_addr[0] == 8'(a));
    hold_pc = 0;
    while (scrub_busy) @(negedge clk);
    check("store restored once the fetch moved", store_ok());
    n_wait++;

    // a write enable of the protected store stuck high
    force dut.u_secded.u_rom_lo.we_b = 1'b1;
    repeat (PASS) @(negedge clk);
    check("stuck write enable loses nothing", store_ok());
    release dut.u_secded.u_rom_lo.we_b;
    n_stuck_we++;

    // one-clock address upset on lane 2
    @(negedge clk) glitch[2] = 8'h21;
    @(negedge clk) glitch[2] = 8'h00;
    n_pc_upset++;
    repeat (10) @(negedge clk);

    check("mechanism: single error corrected", n_sec > 0);
    check("mechanism: double error, duplicate used", n_ded > 0);
    check("mechanism: scrub", n_scrub > 0);
    check("mechanism: wiped half restored", n_wipe > 0);
    check("mechanism: scrub waited on a conflict", n_wait > 0);
    check("mechanism: address upset outvoted", n_pc_upset > 0);
    check("mechanism: stuck write enable", n_stuck_we > 0);
    $display("sec_clocks=%0d ded_clocks=%0d scrubs=%0d wipes=%0d wait_clocks=%0d pc_upsets=%0d",
             n_sec, n_ded, n_scrub, n_wipe, n_wait, n_pc_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
