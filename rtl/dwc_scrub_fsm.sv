// dwc_scrub_fsm: scrub controller of the SEC/DED and CD instruction memories
// with duplication ("FSM x3"; three copies are instantiated and voted).
//
// The FSM idles until trig is raised, which happens when the protected block
// RAM pair (SEC/DED or complement duplicate) reports an error on the current
// instruction. It then copies the entire contents of the plain duplicate
// block RAM, taken as the good copy, into the pair: for each scrub address
// it spends a READ clock, while port B of the plain block RAM fetches the
// word, and a WRITE clock, in which we is raised to write the word into the
// pair and en advances the scrub counter. The scrub address thus runs at
// half the block RAM clock. After the write at the last address (2**AW-1)
// the counter has wrapped to 0 and the FSM returns to IDLE; triggers that
// arrive during a copy are ignored.
//
// As in the TMR scrubber, a write is held back while the scrub address equals
// the address the pair is being fetched from. busy is high during a copy.
// Starting each copy from the counter's rest value 0 and the stall are this
// design's choices. Synchronous reset to IDLE; no write is issued while
// reset is high.
module dwc_scrub_fsm
  import ftim_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          trig,
  input  logic [AW-1:0] scrub_addr,
  input  logic [AW-1:0] fetch_addr,
  output logic          we,
  output logic          en,
  output logic          busy
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;
  state_e state;

  always_comb begin
    busy = (state != S_IDLE);
    we   = (state == S_WRITE) && (scrub_addr != fetch_addr) && !rst;
    en   = we;
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:  if (trig) state <= S_READ;
        S_READ:  state <= S_WRITE;
        S_WRITE: if (we) state <= (scrub_addr == '1) ? S_IDLE : S_READ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Never write the cell that port A is reading in the same clock.
  a_no_conflict: assert property (@(posedge clk) disable iff (rst) we |-> scrub_addr != fetch_addr)
    else $error("scrub write to the address being fetched");
endmodule
