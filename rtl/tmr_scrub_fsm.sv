// tmr_scrub_fsm: scrub controller of one block RAM copy in the TMR
// instruction memory with scrubbing.
//
// The scrubber walks the whole memory through port B. For each address it
// spends two clocks: READ, while the block RAM fetches the word at the scrub
// address, then WRITE, when the word of this copy (own_do) and the majority
// of all three copies (voted) are both valid. If they differ, the voted word
// is written back into this copy (we high for one clock); then the enable of
// this copy's counter is raised so the next address follows. The scrub
// address therefore runs at half the block RAM clock, and each copy has its
// own write enable, independent of the other copies' write enables.
//
// A write is skipped when the scrub address equals the address this copy is
// being fetched from on port A, so that no cell is read and written in the
// same clock; the counter still advances and the word is repaired on the next
// pass. Skipping, rather than waiting, keeps the three FSMs in the same phase:
// they all see the same addresses, so they all skip together, and a copy's
// scrubber never falls a clock behind the others. Writing only on mismatch
// and the skip are this design's choices. Synchronous reset to READ; no write
// is issued while reset is high, whatever state the FSM powered up in.
module tmr_scrub_fsm
  import ftim_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] own_do,      // port B output of this copy
  input  logic [DW-1:0] voted,       // majority of the three port B outputs
  input  logic [AW-1:0] scrub_addr,  // this copy's scrub counter
  input  logic [AW-1:0] fetch_addr,  // this copy's port A address
  output logic          we,          // port B write enable
  output logic          en           // advance the scrub counter
);
  typedef enum logic {S_READ, S_WRITE} state_e;
  state_e state;

  logic mismatch, conflict;

  always_comb begin
    mismatch = (own_do != voted);
    conflict = (scrub_addr == fetch_addr);
    we = 1'b0;
    en = 1'b0;
    if (state == S_WRITE && !rst) begin
      we = mismatch && !conflict;
      en = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                     state <= S_READ;
    else if (state == S_READ)    state <= S_WRITE;
    else                         state <= S_READ;
  end

  // Never write the cell that port A is reading in the same clock.
  a_no_conflict: assert property (@(posedge clk) disable iff (rst) we |-> scrub_addr != fetch_addr)
    else $error("scrub write to the address being fetched");
endmodule
