// bram_dp: dual-port block RAM holding the PicoBlaze program, modelled on a
// Virtex block RAM (256 x 16 by default).
//
// Port A is the instruction fetch port: read only, as the instruction memory
// is used as a ROM (its write enable and data inputs are tied low in the
// unprotected design). Port B is the scrub port: it reads at addr_b and, when
// we_b is high, writes di_b there. Both ports have a registered output, one
// clock after the address (synchronous block RAM). A port-B write does not
// change port A's output in the same cycle (port A sees the old word).
//
// The contents are loaded at configuration from a hex program image
// (INIT_FILE, one word per line) and transformed by INIT_MODE: as is, bitwise
// complemented (complement duplicate), or one 11-bit half of the (22,16)
// SEC/DED codeword. Words beyond the image are zero. The image format and the
// transform-at-load are this design's own choices.
module bram_dp
  import ftim_pkg::*;
#(
  parameter int unsigned AW        = ADDR_W,
  parameter int unsigned DW        = DATA_W,
  parameter string       INIT_FILE = "rtl/program.hex",
  parameter int unsigned INIT_LEN  = 35,
  parameter init_mode_e  INIT_MODE = INIT_PLAIN
) (
  input  logic          clk,
  // port A: instruction fetch
  input  logic [AW-1:0] addr_a,
  output logic [DW-1:0] do_a,
  // port B: scrubbing
  input  logic [AW-1:0] addr_b,
  input  logic [DW-1:0] di_b,
  input  logic          we_b,
  output logic [DW-1:0] do_b
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [DW-1:0] mem [DEPTH];

  initial begin : load
    logic [DATA_W-1:0] img [DEPTH];
    for (int i = 0; i < DEPTH; i++) img[i] = '0;
    if (INIT_LEN > 0) $readmemh(INIT_FILE, img, 0, INIT_LEN - 1);
    case (INIT_MODE)
      INIT_CD:
        for (int i = 0; i < DEPTH; i++) mem[i] = DW'(~img[i]);
      INIT_ECC_HI:
        for (int i = 0; i < DEPTH; i++) mem[i] = DW'(secded_encode(img[i]) >> HALF_W);
      INIT_ECC_LO:
        for (int i = 0; i < DEPTH; i++) mem[i] = DW'(secded_encode(img[i]));
      default:
        for (int i = 0; i < DEPTH; i++) mem[i] = DW'(img[i]);
    endcase
  end

  always_ff @(posedge clk) begin
    do_a <= mem[addr_a];
    do_b <= mem[addr_b];
    if (we_b) mem[addr_b] <= di_b;
  end
endmodule
