// tmr_scrub_imem: triple-modular-redundant instruction memory with block RAM
// scrubbing, for a triplicated PicoBlaze.
//
// Three copies of the program sit in three dual-port block RAMs. The three
// processor program counters (pc) are voted by three address voters, voter i
// addressing block RAM i on port A. The three port A outputs are voted again
// by three instruction voters, voter i feeding processor i (instr), one clock
// after pc. A single upset word in one copy is therefore outvoted.
//
// Without repair, upsets pile up until two copies are wrong at the same
// address and the vote fails; an upset of a block RAM write enable can wipe a
// whole copy, which a reset does not undo. The scrubber repairs both. A
// triplicated counter gives every copy the same scrub address on port B; the
// three port B outputs are voted by three more voters, and copy i's scrub FSM
// writes voter i's word back into copy i when it differs from copy i's own
// word. Each copy has its own voter, FSM, write enable and counter copy, so
// no single upset in the scrubber can corrupt two copies. One address is
// scrubbed every two clocks: a full pass over 2**ADDR_W words takes
// exactly 2 * 2**ADDR_W clocks. A word that is being fetched on port A when
// the scrubber reaches it is not written in that pass (see tmr_scrub_fsm),
// so an upset word is repaired within two passes.
//
// scrub_we brings out the three write enables, to watch repairs. Clock and
// reset are shared by the three lanes.
module tmr_scrub_imem
  import ftim_pkg::*;
#(
  parameter string       INIT_FILE = "rtl/program.hex",
  parameter int unsigned INIT_LEN  = 35
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [2:0][ADDR_W-1:0] pc,
  output logic [2:0][DATA_W-1:0] instr,
  output logic [2:0]             scrub_we
);
  logic [2:0][ADDR_W-1:0] addr_v;     // voted fetch addresses
  logic [2:0][ADDR_W-1:0] scrub_addr;
  logic [2:0][DATA_W-1:0] do_a, do_b, scrub_v;
  logic [2:0]             cnt_en;

  tmr_counter #(.W(ADDR_W)) u_cnt (.clk, .rst, .en(cnt_en), .q(scrub_addr));

  for (genvar i = 0; i < 3; i++) begin : g_lane
    tmr_voter #(.W(ADDR_W)) u_addr_v (.a(pc[0]), .b(pc[1]), .c(pc[2]), .y(addr_v[i]));

    bram_dp #(.INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN), .INIT_MODE(INIT_PLAIN)) u_bram (
      .clk, .addr_a(addr_v[i]), .do_a(do_a[i]),
      .addr_b(scrub_addr[i]), .di_b(scrub_v[i]), .we_b(scrub_we[i]), .do_b(do_b[i]));

    tmr_voter #(.W(DATA_W)) u_scrub_v (.a(do_b[0]), .b(do_b[1]), .c(do_b[2]), .y(scrub_v[i]));

    tmr_scrub_fsm u_fsm (
      .clk, .rst, .own_do(do_b[i]), .voted(scrub_v[i]),
      .scrub_addr(scrub_addr[i]), .fetch_addr(addr_v[i]),
      .we(scrub_we[i]), .en(cnt_en[i]));

    tmr_voter #(.W(DATA_W)) u_instr_v (.a(do_a[0]), .b(do_a[1]), .c(do_a[2]), .y(instr[i]));
  end
endmodule
