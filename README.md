# Scrubbed fault-tolerant instruction memories for a triplicated PicoBlaze

A softcore processor on an SRAM-based FPGA keeps its program in block RAM.
Radiation can flip bits in that block RAM (single-event upsets, SEUs). A flip in
a stored instruction word is bad enough. A flip that reaches the block RAM's
**write enable** is worse. The program counter keeps moving, so the RAM overwrites
one instruction after another with whatever is on its data inputs, usually zero.
After that, resetting the processor restarts it, but the program is gone. These
upsets, which a reset cannot fix, are called **critical failures** below.

This RTL implements three instruction memories for a triplicated 8-bit PicoBlaze
(16-bit instructions, 8-bit program counter). Each memory masks upsets on the
fly, and each has a **scrubber** that writes good contents back into the
damaged block RAM. Scrubbing is what removes critical failures. A memory
without it can mask upsets for a while, but it cannot recover a block RAM that
has been wiped.

| memory | how a bad word is masked | what the scrubber does |
|---|---|---|
| `tmr_scrub_imem` (TMR with scrubbing) | three copies, majority vote | walks all addresses all the time and writes the voted word into any copy that disagrees |
| `secded_dwc_scrub_imem` (SEC/DED + duplicate + scrub) | (22,16) SEC/DED code corrects one bit; on a double error a plain duplicate is used | on any corrected or detected error, copies the whole duplicate into the coded store |
| `cd_dwc_scrub_imem` (complement duplicate + duplicate + scrub) | word stored with its bitwise complement; on a mismatch a plain duplicate is used | on a mismatch, copies the whole duplicate into the word/complement pair |

The study these designs come from found that **TMR with scrubbing** protects
best. In its fault injection on a Virtex FPGA, it left 28 sensitive
configuration bits, against 2881 for the unprotected memory, and no critical
failures. It was also cheaper in area, clock rate and power than the two
coded schemes. The study measured the SEC/DED and CD scrubbers as large and
slow. All three are provided here side by side in `ft_imem_top`.

Throughout, the processors themselves are protected by plain TMR: three
PicoBlaze copies, each with its own memory port (lane 0, 1, 2). The PicoBlaze
core is not part of this RTL. Each memory takes the three program counters
as `pc[2:0]` and returns the three instructions as `instr[2:0]`.

## Fetch path and timing (all three memories)

```
pc[0..2] --> 3 address voters --> block RAM(s), port A --(1 clk)--> check/decode
         --> per-lane 2:1 mux (coded memories only) --> 3 instruction voters --> instr[0..2]
```

* An instruction appears on `instr[i]` **one clock after** its address is on
  `pc[i]`, because the block RAM read is synchronous. Everything after the
  block RAM is combinational.
* The three addresses are voted first, so a corrupted program counter in one
  lane does not change what any lane fetches. The instructions are voted again
  at the end, so one bad lane of decoder, check or mux is outvoted.
* Clock and reset are shared by all lanes, not triplicated. Reset is
  synchronous. No scrub write is issued while reset is high.

## TMR with scrubbing (`tmr_scrub_imem`)

This is the part with the most structure:

```
                  +------------------ triplicated counter (tmr_counter) ------------------+
                  | q[0]                       | q[1]                       | q[2]        |
             port B addr                  port B addr                  port B addr        |
   BRAM 0 ---do_b[0]--+         BRAM 1 ---do_b[1]--+         BRAM 2 ---do_b[2]--+         |
                      +---- each scrub voter sees do_b[0], do_b[1], do_b[2] ----+         |
   scrub voter 0 -> di of BRAM 0, FSM 0   scrub voter 1 -> BRAM 1, FSM 1   ...            |
   FSM i -> WE of BRAM i, EN of counter copy i ---------------------------------------------+
```

* **Three independent scrub lanes.** Each copy has its own scrub voter, its
  own FSM (`tmr_scrub_fsm`), its own write enable and its own counter copy.
  One upset anywhere in the scrubber can therefore damage at most one copy, and
  the other two repair it.
* **Two clocks per address.** In the READ clock port B fetches the word at the
  scrub address. In the WRITE clock the copy's own word and the majority word
  are both valid. If they differ, the majority word is written back. The
  counter enable is raised in the WRITE clock, so the scrub address runs at
  half the block RAM clock. One pass over 256 words takes exactly 512 clocks.
* **Counters kept in step.** Each counter copy loads the majority of all three
  copies every clock, plus one when its enable is set. A copy knocked out of
  step is pulled back on the next clock.
* **Read/write conflicts.** A block RAM should not be written at the cell
  its other port is reading in the same clock. When the scrub address equals the
  address a copy is being fetched from, the write is **skipped**. The counter
  still advances, and the word is fixed on the next pass, so any upset word is
  repaired within two passes (1024 clocks). Skipping, rather than waiting, is
  deliberate. All three FSMs see the same addresses and skip together, so
  their phases never drift apart. In an earlier version only the FSM that
  needed to write waited. Its lane then fell one clock behind, and it began
  comparing words from two different addresses.
* **Critical failure.** If one copy is wiped, for example by a stuck write
  enable, the vote keeps every instruction correct. The scrubber then rewrites
  the whole copy within two passes.

## SEC/DED with duplicate and scrubbing (`secded_dwc_scrub_imem`)

* **Code.** (22,16) extended Hamming code: 16 data bits, 5 Hamming check bits and
  one overall parity bit. Codeword bit 0 is the overall parity. Bits 1..21 are
  Hamming positions, with check bits at 1, 2, 4, 8 and 16. The data bits fill
  the other positions in ascending order (`ftim_pkg::SECDED_DATA_POS`). The
  codeword is split over two block RAMs: bits 21..11 in one, 10..0 in the other
  (`secded_module`).
* **Decoders.** There are three decoders (`secded_decoder`), one per lane. A
  single upset is corrected and raises `sec`. A double upset raises `ded`.
  Three or more upsets may go unnoticed or be "corrected" wrongly; that is a
  property of the code.
* **Duplicate.** A fourth block RAM holds the plain program. Lane i's
  multiplexer takes the plain word when decoder i reports `ded`. Otherwise it
  takes the decoder's output, corrected if needed.
* **Scrub.** Any `sec` or `ded` starts a copy (`dwc_scrub_fsm`, three copies
  whose write enables are voted, plus a `tmr_counter`). For each of the 256
  addresses the copy reads the plain block RAM on its port B, re-encodes the
  word and writes both halves. That is one word per two clocks, 512 clocks in
  all, plus any waiting. While the scrub address equals the address being
  fetched, the copy **waits**. Here the three FSMs get identical inputs, so
  waiting cannot split them. Errors that arrive during a copy are ignored.

## Complement duplicate with duplicate and scrubbing (`cd_dwc_scrub_imem`)

* `cd_module` holds the program in one block RAM and its bitwise complement in
  a second. Three checks (`cd_check`) flag a word that is not the exact
  complement of its partner. That catches every single upset, and every
  group of upsets that all flip in the same direction, such as a word cleared
  to zero. Only some double upsets are caught.
* CD only detects. Correction comes from the plain duplicate block RAM, which
  lane i's multiplexer selects when its check fails.
* On a mismatch the copy FSM rewrites both block RAMs of the CD module from
  the duplicate: the word into one and its complement into the other. Its
  timing and conflict rule are the same as in the SEC/DED memory.

## Files

| file | contents |
|---|---|
| `rtl/ftim_pkg.sv` | sizes (`ADDR_W`=8, `DATA_W`=16, `ECC_W`=22, `HALF_W`=11), block RAM load modes, SEC/DED encoder and its position/mask tables |
| `rtl/ft_imem_top.sv` | the three memories side by side, ports prefixed `tmr_`, `ecc_`, `cd_` |
| `rtl/tmr_scrub_imem.sv`, `rtl/secded_dwc_scrub_imem.sv`, `rtl/cd_dwc_scrub_imem.sv` | the three memories |
| `rtl/bram_dp.sv` | dual-port block RAM: port A fetch (read only), port B scrub read/write, registered outputs |
| `rtl/tmr_voter.sv` | 2-of-3 bitwise majority |
| `rtl/tmr_counter.sv` | triplicated, self-voting scrub address counter |
| `rtl/tmr_scrub_fsm.sv`, `rtl/dwc_scrub_fsm.sv` | the two kinds of scrub controller |
| `rtl/secded_decoder.sv`, `rtl/secded_module.sv` | SEC/DED decoder; the two-half coded store with three decoders |
| `rtl/cd_check.sv`, `rtl/cd_module.sv` | complement check; the word/complement store with three checks |
| `rtl/program.hex` | program image, 35 words |
| `tb/*_tb.sv` | one self-checking testbench per module |

**Program image.** Each block RAM loads `rtl/program.hex` when it is
configured, through `$readmemh` with the path relative to the repository root.
`bram_dp`'s `INIT_MODE` then stores each word as it is, complemented, or as one
half of its SEC/DED codeword. This way one image serves every block RAM. The
image has 35 words, the size of the test program implied by the study's memory
figures (560 bits of 16-bit words). Its first twelve words are the example
contents shown in the study's figures. The other 23 are an arbitrary fixed
pattern, because the real program was not published. To run your own program,
replace the file and set `INIT_LEN`. Words after the image are zero.

## Simulating

Run from the repository root, so that `rtl/program.hex` is found:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module ft_imem_top_tb rtl/ftim_pkg.sv tb/ft_imem_top_tb.sv
./obj_dir/Vft_imem_top_tb
```

Swap the module name to run any other testbench. Every testbench ends with
`TB_RESULT checks=N failures=M` and has a watchdog that stops it and counts a
failure if it runs too long. The testbenches inject upsets by writing the block
RAM arrays through hierarchical references, for example
`dut.u_tmr.g_lane[1].u_bram.mem[a]`. If you rename instances, update these
references.

What is checked:

* **Every clock**, each lane's instruction is compared with the program word
  at the address sent one clock earlier (`*_imem_tb`, `ft_imem_top_tb`).
* **TMR**: single upsets are outvoted and repaired within two passes. A wiped
  copy is restored. The same word upset in two copies, one pass apart, is
  survived. A write to the word being fetched is skipped. A pass takes
  exactly 512 clocks. Upsets of one program counter or of one scrub counter
  copy are outvoted. A block RAM write enable held high in one copy leaves
  all three copies intact, because the scrub data is always the voted word.
* **SEC/DED**: single upsets in every one of the 22 bit positions are
  corrected, and double upsets are detected (the decoder's own testbench
  checks these against an independently written encoder). In the memory,
  each upset triggers a copy lasting 512 clocks plus the clocks it waited. A
  wiped half is restored. A copy waits on the address being fetched.
* **CD**: single, multi-bit and unidirectional upsets are flagged, the
  duplicate word is used, and each block RAM of the pair is restored after
  being wiped.
* In both coded memories, a write enable of the protected store held high
  only rewrites the duplicate's word at the scrub address, so nothing is lost.
* `ft_imem_top_tb` runs all three memories at their default sizes. It injects
  upsets into all of them together and requires each mechanism (TMR scrub
  write, SEC correction, DED fallback, SEC/DED copy, CD fallback, CD copy,
  restored wipe, address upset) to occur at least once.

## How far to trust it, and where it departs from the study

The structure follows the study's block diagrams: the scrubbed TMR memory with
triplicated counter, three scrub voters and three FSMs, and the SEC/DED and CD
modules with three decoders or checks, per-lane 2:1 multiplexers, voters, a
plain duplicate block RAM, a triplicated counter and a triplicated FSM. The
stated rules are implemented as given:

* each block RAM's scrub write enable is independent;
* the scrub counters stay in sync;
* the scrub address runs at half the block RAM clock;
* read/write conflicts are prevented;
* a coded memory's scrub is triggered by an error on the current instruction
  and copies a whole block RAM.

The study names these rules but not their logic. The following are this
design's own choices:

* **Sizes.** 8-bit addresses (256 words) are inferred from the example
  addresses the study shows. The 16-bit word and the 11-bit halves are stated
  in the study.
* **Scrub write rule (TMR).** The TMR scrubber writes only when a copy
  disagrees with the vote. Writing every word would also fit the description.
* **Conflict handling.** TMR skips the write and repairs on a later pass. The
  coded memories wait. A processor that spins on one address therefore delays
  the repair of that one word (TMR) or halts a copy at that address until it
  moves on (coded memories).
* **Multiplexer select (SEC/DED).** The duplicate is used only on a double
  error. A corrected single error keeps the decoder's word.
* **Which copy is good (coded memories).** The plain duplicate is always
  taken as the good copy, and the protected pair is the one rewritten. An
  upset confined to the duplicate is not detected and not repaired: the pair
  keeps the output right, but a later error in the pair at the same address
  would fall back to a bad duplicate word. The study describes the scrub as
  copying the good block RAM into the bad one without saying how the
  duplicate is judged.
* **Memory count (CD).** The CD memory uses three block RAMs, as the study's
  diagram shows. The study's resource table lists four block RAMs' worth of
  bits for the CD design and two coded stores' worth for the SEC/DED design.
  That suggests the measured implementations stored more than the diagrams
  show.
* **Counter voting.** The counter keeps its copies in sync by voting every
  clock.
* **Program contents.** As described under Files.

Not included:

* the PicoBlaze core;
* the plain-TMR voting of the processors' outputs;
* the eight unscrubbed variants the study compares against (single voter,
  three voters, feedback TMR, block-level TMR, SEC/DED, SEC/DED with duplicate,
  CD with duplicate, and the unprotected original).

The study's figures of merit (area, clock rate, power, sensitive bits) come
from a Virtex implementation with bitstream fault injection. Simulating this
RTL does not reproduce them.
