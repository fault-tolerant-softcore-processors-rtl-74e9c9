// tmr_voter: bitwise two-out-of-three majority voter, the "v" circles of the
// TMR, SEC/DED and CD instruction memories.
//
// Each output bit is 1 when at least two of the three input bits are 1, so
// any single faulty input word is outvoted. Purely combinational; W sets the
// word width (16 for instructions, 8 for addresses).
module tmr_voter #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);
  always_comb y = (a & b) | (a & c) | (b & c);
endmodule
