// cd_module: the complement-duplicate protected instruction store
// ("CD Module").
//
// One block RAM holds the program, a second (the CD block RAM) holds the
// bitwise complement of every word. Both are fetched at addr on port A and
// three independent CD checks, one per processor lane, give instruction[i]
// (the original word) and lane_err[i], high when the original word is not
// the complement of the CD word. Outputs follow addr by one clock. err, the
// OR of the lane errors, is the scrub trigger: the inverse of the current
// instruction does not match the CD contents.
//
// Port B of both block RAMs is the scrub port: with we high, scrub_data is
// written at scrub_addr into the original block RAM and its complement into
// the CD block RAM. Complementing the scrub word inside the module is this
// design's choice.
module cd_module
  import ftim_pkg::*;
#(
  parameter string       INIT_FILE = "rtl/program.hex",
  parameter int unsigned INIT_LEN  = 35
) (
  input  logic                   clk,
  input  logic [ADDR_W-1:0]      addr,
  input  logic [ADDR_W-1:0]      scrub_addr,
  input  logic [DATA_W-1:0]      scrub_data,
  input  logic                   we,
  output logic [2:0][DATA_W-1:0] instruction,
  output logic [2:0]             lane_err,
  output logic                   err
);
  logic [DATA_W-1:0] orig_do, cd_do;
  logic [DATA_W-1:0] orig_do_b, cd_do_b;   // scrub read-back, unused

  bram_dp #(.INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN), .INIT_MODE(INIT_PLAIN)) u_bram (
    .clk, .addr_a(addr), .do_a(orig_do),
    .addr_b(scrub_addr), .di_b(scrub_data), .we_b(we), .do_b(orig_do_b));

  bram_dp #(.INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN), .INIT_MODE(INIT_CD)) u_cd_bram (
    .clk, .addr_a(addr), .do_a(cd_do),
    .addr_b(scrub_addr), .di_b(~scrub_data), .we_b(we), .do_b(cd_do_b));

  for (genvar i = 0; i < 3; i++) begin : g_chk
    cd_check u_chk (.orig(orig_do), .cd(cd_do), .data(instruction[i]), .err(lane_err[i]));
  end

  always_comb err = |lane_err;
endmodule
