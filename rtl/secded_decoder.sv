// secded_decoder: decoder of the (22,16) SEC/DED code ("Decode", "Decoder").
//
// Takes the 22-bit codeword read from the two encoded ROM halves and returns
// the 16-bit instruction with any single-bit error corrected. sec is high
// when a single-bit error was found and corrected, ded when an error that
// cannot be corrected (a double-bit error) was found; for three or more
// upsets the flags may or may not be raised. The five syndrome bits are the
// XOR of the Hamming positions whose index has that bit set; the overall
// parity bit separates odd (correctable) from even (uncorrectable) error
// counts. Combinational. The code layout is given in ftim_pkg.
module secded_decoder
  import ftim_pkg::*;
(
  input  logic [ECC_W-1:0]  cw,
  output logic [DATA_W-1:0] data,
  output logic              sec,
  output logic              ded
);
  logic [4:0]       syn;
  logic             par;
  logic [ECC_W-1:0] fixed;

  always_comb begin
    for (int k = 0; k < 5; k++) syn[k] = ^(cw & SECDED_CHECK_MASK[k]);
    par = ^cw;

    fixed = cw;
    sec   = 1'b0;
    ded   = 1'b0;
    if (par) begin
      // odd number of flipped bits: assume one, at position syn (0 = parity bit)
      if (int'(syn) < ECC_W) begin
        fixed[syn] = ~cw[syn];
        sec = 1'b1;
      end else begin
        ded = 1'b1;
      end
    end else if (syn != '0) begin
      ded = 1'b1;
    end

    for (int i = 0; i < DATA_W; i++) data[i] = fixed[SECDED_DATA_POS[i]];
  end
endmodule
