// cd_module_tb: checks the complement-duplicate store: every program word is
// fetched one clock after its address with no error; an upset in either block
// RAM is flagged on all three lanes; a whole word wiped to zero in the original
// block RAM is flagged; a scrub write restores both copies.
module cd_module_tb;
  import ftim_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0]  addr, scrub_addr;
  logic [15:0] scrub_data;
  logic        we, err;
  logic [2:0][15:0] instruction;
  logic [2:0]  lane_err;
  logic [15:0] prog [DEPTH];
  int checks = 0, failures = 0;

  cd_module dut (.clk, .addr, .scrub_addr, .scrub_data, .we, .instruction, .lane_err, .err);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s addr=%0d instr=%h lane_err=%b", what, addr, instruction[0], lane_err);
    end
  endtask

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
      check("clean fetch", instruction[0] == prog[i] && instruction[1] == prog[i] &&
                           instruction[2] == prog[i] && lane_err == 0 && !err);
    end
    for (int n = 0; n < 40; n++) begin
      int a, b;
      a = $urandom_range(0, 34); b = $urandom_range(0, 15);
      if (n % 3 == 0)      dut.u_bram.mem[a][b] = ~dut.u_bram.mem[a][b];
      else if (n % 3 == 1) dut.u_cd_bram.mem[a][b] = ~dut.u_cd_bram.mem[a][b];
      else                 dut.u_bram.mem[a] = '0;
      @(negedge clk) addr = 8'(a);
      @(negedge clk);
      check("upset detected", (prog[a] == 0 && n % 3 == 2) || (lane_err == 3'b111 && err));
      scrub_addr = 8'(a); scrub_data = prog[a]; we = 1;
      @(negedge clk) we = 0;
      @(negedge clk);
      check("scrub repaired", instruction[1] == prog[a] && lane_err == 0 && !err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
