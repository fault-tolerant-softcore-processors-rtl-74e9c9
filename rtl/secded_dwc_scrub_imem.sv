// secded_dwc_scrub_imem: SEC/DED instruction memory with duplication with
// comparison (DWC) and scrubbing, for a triplicated PicoBlaze.
//
// The program is held twice: SEC/DED encoded in the SEC/DED module (two block
// RAMs with 11-bit codeword halves and three decoders) and as plain words in
// a third block RAM. The three processor program counters (pc) are voted by
// three address voters; voter 0 addresses the SEC/DED module and voter 2 the
// plain block RAM. For each lane a 2:1 multiplexer passes the decoder's word
// (input 0), corrected if one bit was upset, or the plain block RAM's word
// (input 1) when that lane's decoder reports an uncorrectable error. The three
// multiplexer outputs go through three instruction voters to the processors
// (instr), one clock after pc.
//
// Scrubbing: when any decoder reports an error (single corrected or double
// detected) on the current instruction, the triplicated scrub FSM copies the
// entire plain block RAM, read on its port B, into the SEC/DED module,
// re-encoding every word. A triplicated counter supplies the scrub address
// and advances every second clock; the three FSM write enables are voted.
// A full copy takes 2 * 2**ADDR_W clocks when no write is held back.
// Selecting the plain word only on a double error, and copying from the
// plain block RAM as the good one, are this design's reading of the scheme.
module secded_dwc_scrub_imem
  import ftim_pkg::*;
#(
  parameter string       INIT_FILE = "rtl/program.hex",
  parameter int unsigned INIT_LEN  = 35
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [2:0][ADDR_W-1:0] pc,
  output logic [2:0][DATA_W-1:0] instr,
  output logic [2:0]             sec,        // per-lane single error corrected
  output logic [2:0]             ded,        // per-lane double error, plain copy used
  output logic                   scrub_busy
);
  logic [2:0][ADDR_W-1:0] addr_v;
  logic [2:0][ADDR_W-1:0] scrub_addr;
  logic [2:0][DATA_W-1:0] ecc_instr, mux_out;
  logic [DATA_W-1:0]      plain_do, plain_do_b;
  logic [2:0]             fsm_we, cnt_en, fsm_busy;
  logic                   err, we;

  for (genvar i = 0; i < 3; i++) begin : g_addr_v
    tmr_voter #(.W(ADDR_W)) u_v (.a(pc[0]), .b(pc[1]), .c(pc[2]), .y(addr_v[i]));
  end

  secded_module #(.INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN)) u_secded (
    .clk, .addr(addr_v[0]), .scrub_addr(scrub_addr[0]), .scrub_data(plain_do_b), .we,
    .instruction(ecc_instr), .sec, .ded, .err);

  bram_dp #(.INIT_FILE(INIT_FILE), .INIT_LEN(INIT_LEN), .INIT_MODE(INIT_PLAIN)) u_bram (
    .clk, .addr_a(addr_v[2]), .do_a(plain_do),
    .addr_b(scrub_addr[0]), .di_b('0), .we_b(1'b0), .do_b(plain_do_b));

  for (genvar i = 0; i < 3; i++) begin : g_lane
    always_comb mux_out[i] = ded[i] ? plain_do : ecc_instr[i];
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
