// ftim_pkg: shared sizes, types and the SEC/DED code for the fault-tolerant
// PicoBlaze instruction memories.
//
// The instruction memory holds 16-bit instruction words addressed by an 8-bit
// program counter (the original PicoBlaze for Virtex parts), one Virtex block
// RAM of 256 x 16 bits per copy. The SEC/DED code is a (22,16) extended
// Hamming code: 16 data bits, 5 Hamming check bits and one overall parity bit,
// stored as two 11-bit halves in two block RAMs. The bit layout of the code is
// this design's own choice: codeword bit 0 is the overall parity, bits 1..21
// are Hamming positions 1..21, with check bits at the power-of-two positions
// and data bits filling the other positions in ascending order.
package ftim_pkg;

  localparam int unsigned ADDR_W = 8;    // 256-word program space
  localparam int unsigned DATA_W = 16;   // instruction word
  localparam int unsigned ECC_W  = 22;   // SEC/DED codeword
  localparam int unsigned HALF_W = 11;   // one encoded half per block RAM

  // Contents transform applied when a block RAM is initialised from the
  // program image.
  typedef enum logic [1:0] {
    INIT_PLAIN  = 2'd0,   // program word as is
    INIT_CD     = 2'd1,   // bitwise complement (complement duplicate)
    INIT_ECC_HI = 2'd2,   // codeword bits 21..11
    INIT_ECC_LO = 2'd3    // codeword bits 10..0
  } init_mode_e;

  // Hamming position (1..21) of data bit i: the non-power-of-two positions in
  // ascending order.
  localparam int unsigned SECDED_DATA_POS [DATA_W] =
    '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19, 20, 21};

  // Check bit k (at position 2**k) covers the positions whose index has bit k
  // set: SECDED_CHECK_MASK[k] marks them in a 22-bit codeword.
  localparam logic [ECC_W-1:0] SECDED_CHECK_MASK [5] = '{
    22'b10_1010_1010_1010_1010_1010,
    22'b00_1100_1100_1100_1100_1100,
    22'b11_0000_1111_0000_1111_0000,
    22'b00_0000_1111_1111_0000_0000,
    22'b11_1111_0000_0000_0000_0000
  };

  function automatic logic [ECC_W-1:0] secded_encode(logic [DATA_W-1:0] d);
    logic [ECC_W-1:0] cw;
    cw = '0;
    for (int i = 0; i < DATA_W; i++) cw[SECDED_DATA_POS[i]] = d[i];
    for (int k = 0; k < 5; k++) cw[1 << k] = ^(cw & SECDED_CHECK_MASK[k]);
    cw[0] = ^cw[ECC_W-1:1];
    return cw;
  endfunction

endpackage
