// cd_dwc_scrub_imem: complement-duplicate (CD) instruction memory with
// duplication with comparison (DWC) and scrubbing, for a triplicated
// PicoBlaze.
//
// The CD module holds the program in one block RAM and its bitwise complement
// in a second; three CD checks compare the two on every fetch. CD only
// detects upsets, so a third, plain block RAM holding the program is used to
// correct them. The three processor program counters (pc) are voted by three
// address voters; voter 0 addresses the CD module and voter 2 the plain block
// RAM. For each lane a 2:1 multiplexer passes the CD module's word (input 0),
// or the plain block RAM's word (input 1) when that lane's CD check fails. The
// three multiplexer outputs go through three instruction voters to the
// processors (instr), one clock after pc.
//
// Scrubbing: when the inverse of the current instruction does not match the
// CD contents, the triplicated scrub FSM copies the entire plain block RAM,
// read on its port B, into the CD module (the word into the original block
// RAM, its complement into the CD block RAM). This also repairs a CD module
// copy wiped by an upset write enable. A triplicated counter supplies the
// scrub address and advances every second clock; the three FSM write enables
// are voted. A full copy takes 2 * 2**ADDR_W clocks when no write is held
// back. Copying from the plain block RAM as the good one is this design's
// reading of the scheme.
module cd_dwc_scrub_imem
  import ftim_pkg::*;
#(
  parameter string       INIT_FILE = "rtl/program.hex",
  parameter int unsigned INIT_LEN  = 35
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [2:0][ADDR_W-1:0] pc,
  output logic [2:0][DATA_W-1:0] instr,
  output logic [2:0]             cd_err,     // per-lane CD mismatch, plain copy used
  output logic                   scrub_busy
);
  logic [2:0][ADDR_W-1:0] addr_v;
  logic [2:0][ADDR_W-1:0] scrub_addr;
  logic [2:0][DATA_W-1:0] cd_instr, mux_out;
  logic [DATA_W-1:0]      plain_do, plain_do_b;
  logic [2:0]             fsm_we, cnt_en, fsm_busy;
  logic                   err, we;

  for (genvar i = 0; i < 3; i++) begin : g_addr_v
    tmr_voter #(.W(ADDR_W)) u_v (.a(pc[0]), .b(pc[1]), .c(pc[2]), .y(addr_v[i]));
  end

  cd_module #(.INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN)) u_cd (
    .clk, .addr(addr_v[0]), .scrub_addr(scrub_addr[0]), .scrub_data(plain_do_b), .we,
    .instruction(cd_instr), .lane_err(cd_err), .err);

  bram_dp #(.INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN), .INIT_MODE(INIT_PLAIN)) u_bram (
    .clk, .addr_a(addr_v[2]), .do_a(plain_do),
    .addr_b(scrub_addr[0]), .di_b('0), .we_b(1'b0), .do_b(plain_do_b));

  for (genvar i = 0; i < 3; i++) begin : g_lane
    always_comb mux_out[i] = cd_err[i] ? plain_do : cd_instr[i];
    tmr_voter #(.W(DATA_W)) u_instr_v (.a(mux_out[0]), .b(mux_out[1]), .c(mux_out[2]), .y(instr[i]));
  end

  tmr_counter #(.W(ADDR_W)) u_cnt (.clk, .rst, .en(cnt_en), .q(scrub_addr));

  for (genvar i = 0; i < 3; i++) begin : g_fsm
    dwc_scrub_fsm u_fsm (
      .clk, .rst, .trig(err), .scrub_addr(scrub_addr[i]), .fetch_addr(addr_v[0]),
      .we(fsm_we[i]), .en(cnt_en[i]), .busy(fsm_busy[i]));
  end

  tmr_voter #(.W(1)) u_we_v   (.a(fsm_we[0]),   .b(fsm_we[1]),   .c(fsm_we[2]),   .y(we));
  tmr_voter #(.W(1)) u_busy_v (.a(fsm_busy[0]), .b(fsm_busy[1]), .c(fsm_busy[2]), .y(scrub_busy));
endmodule
