// cd_check: complement-duplicate check ("CD check").
//
// The CD block RAM holds the bitwise complement of every program word. The
// check passes the word from the original block RAM through and raises err
// when it is not the exact complement of the CD word. That detects any
// single-bit upset and any run of upsets that all go the same way in one
// word. Combinational.
module cd_check
  import ftim_pkg::*;
(
  input  logic [DATA_W-1:0] orig,
  input  logic [DATA_W-1:0] cd,
  output logic [DATA_W-1:0] data,
  output logic              err
);
  always_comb begin
    data = orig;
    err  = (orig != ~cd);
  end
endmodule
