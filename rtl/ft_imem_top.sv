// ft_imem_top: the three scrubbed, fault-tolerant PicoBlaze instruction
// memories side by side.
//
//   tmr_*    TMR instruction memory with scrubbing, the scheme that gives
//            the best protection (fewest sensitive bits, no critical failures)
//   ecc_*    SEC/DED instruction memory with DWC and scrubbing
//   cd_*     complement-duplicate instruction memory with DWC and scrubbing
//
// Each memory serves a triplicated PicoBlaze, which is not part of this RTL:
// the three processors' program counters come in on *_pc[i] and processor i
// takes its instruction from *_instr[i] one clock later. The remaining
// processor protection around the memories is plain TMR (the processors'
// outputs are voted outside). Clock and reset are common to all lanes. The
// status outputs show scrub activity and detected errors.
module ft_imem_top
  import ftim_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  // TMR with scrubbing
  input  logic [2:0][ADDR_W-1:0] tmr_pc,
  output logic [2:0][DATA_W-1:0] tmr_instr,
  output logic [2:0]             tmr_scrub_we,
  // SEC/DED with DWC and scrubbing
  input  logic [2:0][ADDR_W-1:0] ecc_pc,
  output logic [2:0][DATA_W-1:0] ecc_instr,
  output logic [2:0]             ecc_sec,
  output logic [2:0]             ecc_ded,
  output logic                   ecc_scrub_busy,
  // CD with DWC and scrubbing
  input  logic [2:0][ADDR_W-1:0] cd_pc,
  output logic [2:0][DATA_W-1:0] cd_instr,
  output logic [2:0]             cd_err,
  output logic                   cd_scrub_busy
);
  tmr_scrub_imem u_tmr (
    .clk, .rst, .pc(tmr_pc), .instr(tmr_instr), .scrub_we(tmr_scrub_we));

  secded_dwc_scrub_imem u_ecc (
    .clk, .rst, .pc(ecc_pc), .instr(ecc_instr), .sec(ecc_sec), .ded(ecc_ded),
    .scrub_busy(ecc_scrub_busy));

  cd_dwc_scrub_imem u_cd (
    .clk, .rst, .pc(cd_pc), .instr(cd_instr), .cd_err(cd_err), .scrub_busy(cd_scrub_busy));
endmodule
