// secded_module_tb: checks the SEC/DED store: every program word is fetched
// one clock after its address with no flag; an upset bit in either encoded
// half is corrected on all three lanes with sec; two upsets in one word give
// ded; a scrub write re-encodes a word and clears the flags.
module secded_module_tb;
  import ftim_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0]  addr, scrub_addr;
  logic [15:0] scrub_data;
  logic        we, err;
  logic [2:0][15:0] instruction;
  logic [2:0]  sec, ded;
  logic [15:0] prog [DEPTH];
  int checks = 0, failures = 0;

  secded_module dut (.clk, .addr, .scrub_addr, .scrub_data, .we, .instruction, .sec, .ded, .err);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s addr=%0d instr=%h/%h/%h sec=%b ded=%b", what, addr,
               instruction[0], instruction[1], instruction[2], sec, ded);
    end
  endtask

  function automatic logic all_lanes(logic [15:0] w);
    return instruction[0] == w && instruction[1] == w && instruction[2] == w;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    $readmemh("rtl/program.hex", prog, 0, 34);
    we = 0; scrub_addr = 0; scrub_data = 0; addr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk) addr = 8'(i);
      @(negedge clk);
      check("clean fetch", all_lanes(prog[i]) && sec == 0 && ded == 0 && !err);
    end
    // single upsets, one in each half
    for (int n = 0; n < 40; n++) begin
      int a, b;
      a = $urandom_range(0, 34); b = $urandom_range(0, 10);
      if (n % 2 == 0) dut.u_rom_hi.mem[a][b] = ~dut.u_rom_hi.mem[a][b];
      else            dut.u_rom_lo.mem[a][b] = ~dut.u_rom_lo.mem[a][b];
      @(negedge clk) addr = 8'(a);
      @(negedge clk);
      check("single corrected", all_lanes(prog[a]) && sec == 3'b111 && ded == 0 && err);
      // double upset in the same word
      dut.u_rom_lo.mem[a][(b + 3) % 11] = ~dut.u_rom_lo.mem[a][(b + 3) % 11];
      @(negedge clk);
      @(negedge clk);
      check("double detected", ded == 3'b111 && sec == 0 && err);
      // scrub write repairs the word
      scrub_addr = 8'(a); scrub_data = prog[a]; we = 1;
      @(negedge clk) we = 0;
      @(negedge clk);
      check("scrub repaired", all_lanes(prog[a]) && sec == 0 && ded == 0 && !err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
