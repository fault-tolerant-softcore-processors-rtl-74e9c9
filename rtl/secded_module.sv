// secded_module: the SEC/DED protected instruction store ("SEC/DED Module").
//
// The 16-bit program words are kept as (22,16) SEC/DED codewords split over
// two block RAMs: one holds the top half of each codeword (11 bits), the
// other the bottom half (11 bits). Both halves are fetched at addr on port A;
// the joined codeword feeds three independent decoders, one per processor
// lane, giving instruction[i] and that lane's sec/ded flags one clock after
// addr. err is high when any decoder reports a corrected or uncorrectable
// error: it is the scrub trigger.
//
// Port B of both block RAMs is the scrub port. With we high the 16-bit
// scrub_data word is encoded here and its two halves are written at
// scrub_addr. Encoding the scrub word inside the module is this design's
// choice.
module secded_module
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
  output logic [2:0]             sec,
  output logic [2:0]             ded,
  output logic                   err
);
  logic [ECC_W-1:0]  scrub_cw;
  logic [HALF_W-1:0] hi_do, lo_do;
  logic [HALF_W-1:0] hi_do_b, lo_do_b;   // scrub read-back, unused

  always_comb scrub_cw = secded_encode(scrub_data);

  bram_dp #(.AW(ADDR_W), .DW(HALF_W), .INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN),
            .INIT_MODE(INIT_ECC_HI)) u_rom_hi (
    .clk, .addr_a(addr), .do_a(hi_do),
    .addr_b(scrub_addr), .di_b(scrub_cw[ECC_W-1:HALF_W]), .we_b(we), .do_b(hi_do_b));

  bram_dp #(.AW(ADDR_W), .DW(HALF_W), .INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN),
            .INIT_MODE(INIT_ECC_LO)) u_rom_lo (
    .clk, .addr_a(addr), .do_a(lo_do),
    .addr_b(scrub_addr), .di_b(scrub_cw[HALF_W-1:0]), .we_b(we), .do_b(lo_do_b));

  for (genvar i = 0; i < 3; i++) begin : g_dec
    secded_decoder u_dec (.cw({hi_do, lo_do}), .data(instruction[i]), .sec(sec[i]), .ded(ded[i]));
  end

  always_comb err = |(sec | ded);
endmodule
