# LT-PTMAC: a Razor-protected truncated-multiply-accumulate processor with built-in self-test

A small DSP processor built around one idea: let the supply voltage drop below
the point where the critical path still meets timing, and survive the
resulting timing errors instead of avoiding them. Two techniques work
together:

* **Programmable truncated multiplication.** The 16 x 16 multiplier can switch
  off the low columns of its partial-product matrix. Fewer columns means a
  shorter carry path (and less switching), at the cost of a small, bounded
  error in the product.
* **Razor flip-flops on the accumulator.** The only registers on the critical
  path, the 40-bit accumulator, are Razor registers: a main flip-flop, a
  shadow flip-flop that captures the same node later, a comparator and a
  restore multiplexer. When the main flip-flop captured too early, the
  mismatch is flagged half a cycle later and the pipeline pays one stall
  cycle while the correct value is copied from the shadow.

Around the processor's MAC unit sits a built-in self-test (BIST): a
pseudo-random pattern generator, an input multiplexer, a signature register,
a ROM of golden signatures, a comparator and a test controller. The self-test
also runs while Razor corrections are happening and still passes, because a
corrected error leaves no trace in the results.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The processor's
block structure, widths and sizes (16-bit registers R0-R3, 16-bit data
memory, 16-bit truncated multiplier, 40-bit adder and accumulator, barrel
shifter, 32-bit x 1024 program memory, SPI interface, input and output
ports), the five pipeline stages, the Razor register with shadow flip-flop and
its four half-cycle phases, and the BIST structure follow the original
design description. The instruction set, every encoding, the truncation
compensation, the memory depths, the SPI protocol and the BIST sequence are
this implementation's own; the description leaves them open.

## Block map

```
                     +------------------------- lt_ptmac_top ---------------------------+
 spi_* ------------> | spi_slave --(program words)--> ptmac_core                        |
                     |                                  |  program_memory 1024x32        |
 run, wake --------> |                                  |  register_file  4x16           |
 in_port ----------> |                                  |  data_memory    256x16         |
 out_port <--------- |                                  |  pt_multiplier  16x16 trunc    |
 tv_late ----------> |                                  |  razor_accumulator 40 (razor_reg)
                     |                                  |  barrel_shifter 40             |
                     |   lfsr_tpg --pattern--> [input mux in ptmac_core] --> MAC          |
                     |   misr_compactor <------------- accumulator                       |
                     |   golden_sig_rom --> bist_controller (test controller+comparator) |
 bist_start -------> |                         --> bist_done, bist_pass, bist_fail_mask  |
                     +-------------------------------------------------------------------+
```

| file | what it is |
|---|---|
| `rtl/ptmac_pkg.sv` | widths, opcodes, instruction struct, accumulator operations |
| `rtl/lt_ptmac_top.sv` | top level: processor + SPI + BIST |
| `rtl/ptmac_core.sv` | five-stage processor, control unit, stalls, input multiplexer |
| `rtl/pt_multiplier.sv` | programmable truncated Baugh-Wooley multiplier |
| `rtl/razor_accumulator.sv` | 40-bit adder and Razor accumulator |
| `rtl/razor_reg.sv` | Razor register bank (main, shadow, compare, restore) |
| `rtl/barrel_shifter.sv` | 40-bit barrel shifter |
| `rtl/register_file.sv`, `rtl/data_memory.sv`, `rtl/program_memory.sv` | storage |
| `rtl/spi_slave.sv` | SPI program loader and status readback |
| `rtl/lfsr_tpg.sv`, `rtl/misr_compactor.sv`, `rtl/golden_sig_rom.sv`, `rtl/bist_controller.sv` | self-test |

## The Razor accumulator and its timing

This is the part that needs the most care when reading or changing the code.

A Razor execution is described in four half-cycle phases:

| phase | when | what happens |
|---|---|---|
| EP (execution) | first half of the Execute cycle | operands launched into multiplier and adder |
| AP (arrival) | second half | result arrives and is captured by the main flip-flop at the rising edge |
| EDP (error detection) | first half of the next cycle | a late result still reaches the shadow flip-flop; main and shadow are compared |
| ECP (error correction) | second half, up to the following rising edge | if they differ, the restore multiplexer loads the shadow value into the main flip-flop and the error clears |

`razor_reg` implements this with two clock edges:

* rising edge: the main flip-flop and the shadow flip-flop capture `d`
  (`en` high). If `late` is high the main flip-flop keeps its old value,
  which is what a flip-flop that sampled before the new value arrived holds.
* falling edge: `err <= (main != shadow)` (the EDP).
* next rising edge: while `err` is high the main flip-flop is loaded from the
  shadow (the ECP) and `en` is ignored; the falling edge after that clears `err`.

In a zero-delay simulation nothing is ever really late, so the timing failure
is injected through `late` (top-level `tv_late`). This is an emulation port:
on silicon it would be tied low and the failure would come from the supply
voltage. Likewise the shadow flip-flop samples at the same rising edge as the
main one in RTL; on silicon it is clocked later, and the short paths into it
need hold-time padding. A result that misses even the shadow flip-flop (a
system failure) and the metastability detector (an inverter delay) cannot be
expressed in RTL and are not modelled.

**Pipeline effect.** While `err` is high the processor treats the Execute
stage as stalled: the instruction that was executing during the EDP (the one
after the failing instruction) is not committed and executes again in the
next cycle; Fetch, Decode and Read hold and a bubble enters Write. Every
Razor error therefore costs exactly one cycle. `razor_err_count` counts error
cycles (saturating) so that an external voltage controller can watch the
error rate; the controller itself is not part of this design.

## Programmable truncated multiplier

`pt_multiplier` forms the modified Baugh-Wooley partial-product matrix of two
16-bit two's-complement operands: `a[i]&b[j]` for i, j < 15, the inverted terms
`~(a[15]&b[j])` and `~(a[i]&b[15])`, the term `a[15]&b[15]`, and the constants
2^16 and 2^31. With truncation level T (0..31, set by the `TRN` instruction or
by the BIST) every bit in a column i + j < T is removed and replaced by the
constant

    C(T) = ((T - 1) * 2^T + 1) / 4      (integer division; C(0) = 0)

which is the expected value of the removed bits if all of them were AND terms
of independent, uniformly distributed bits. Bits below column T of the sum
are then cleared. T = 0 gives the exact product. For T up to 15 the error
against the exact product stays below (T + 1) * 2^T (checked by the
testbench). The price is output accuracy: in the 8-tap smoothing filter of
`tb_fir_truncation` (Q15 coefficients, 16-bit samples near full scale) the
output's signal-to-noise ratio against the exact filter was about 100 dB at
T = 8, 76 dB at T = 12 and 50 dB at T = 16, so every four columns removed
cost roughly 25 dB. The synthesis result still contains the whole array: the
truncation switches partial products off at run time, which is what shortens
the active path and reduces switching.

## Processor

### Pipeline

| stage | work |
|---|---|
| Fetch | `pc` addresses the program memory (synchronous read) |
| Decode | the instruction word is registered |
| Read | registers R0-R3 read (write-through from Write); JMP, BNZ, SLEEP, HALT resolved |
| Execute | multiply/accumulate into the Razor accumulator, barrel shift, data memory access, output port, truncation level |
| Write | register write-back |

* **Data hazard:** an instruction in Read that needs a register written by
  the instruction in Execute waits one cycle.
* **Branches** resolve in Read; a taken branch flushes Fetch and Decode (two
  bubbles).
* **Razor error:** one stall cycle, see above.
* **Sleep mode:** `SLEEP` stops instruction fetch once it leaves Read; the
  pipeline drains and the data path stops switching. `wake` resumes at the
  next instruction. `HALT` stops until `run` drops. While `run` is low the
  pipeline is empty and `pc` is 0; registers, memories and accumulator keep
  their contents.
* **Self-test:** while the BIST runs (`bist_mode`) the pipeline is frozen and
  the MAC unit takes its operands, operation and truncation level from the
  BIST through the input multiplexer.

### Instruction set

32-bit words: `[31:26]` opcode, `[25:24]` rd, `[23:22]` rs1, `[21:20]` rs2,
`[19:16]` zero, `[15:0]` imm. `P(x, y)` is the truncated product at the current
truncation level; `acc` is 40 bits, products are sign-extended.

| op | code | effect |
|---|---|---|
| NOP | 0 | - |
| LDI | 1 | rd = imm |
| IN | 2 | rd = input port |
| LD | 3 | rd = dmem[rs1 + imm] |
| ST | 4 | dmem[rs1 + imm] = rs2 |
| ADDI | 5 | rd = rs1 + imm |
| MUL | 6 | acc = P(rs1, rs2) |
| MAC | 7 | acc = acc + P(rs1, rs2) |
| MSU | 8 | acc = acc - P(rs1, rs2) |
| CLRA | 9 | acc = 0 |
| SHL | 10 | acc = acc << imm[5:0] |
| SHR | 11 | acc = acc >>> imm[5:0] (arithmetic) |
| ACCH | 12 | rd = acc[31:16] |
| ACCL | 13 | rd = acc[15:0] |
| OUT | 14 | output port = sign-extended rs1 |
| OUTA | 15 | output port = acc |
| TRN | 16 | truncation level = imm[4:0] |
| JMP | 17 | pc = imm |
| BNZ | 18 | if rs1 != 0, pc = imm |
| SLEEP | 19 | sleep until `wake` |
| HALT | 20 | stop until `run` drops |

`ptmac_pkg::mk_instr()` assembles a word. Data memory addresses use the low 8
bits of `rs1 + imm`.

### Cycle count

Without Razor errors an instruction stream of n instructions with h data
hazards and b taken branches passes the Read stage in n + h + 2b cycles; the
first instruction leaves Read three rising edges after `run` is first
sampled high. Each Razor error adds one cycle.

## Built-in self-test

`bist_start` (a one-cycle pulse) runs four passes, one per ROM entry, at
truncation levels 0, 8, 12 and 16 columns. Each pass:

1. **CLEAR** - accumulator cleared, LFSR reloaded with its seed, MISR cleared.
2. **RUN** - 256 steps: the LFSR pattern supplies both operands
   (`a = pattern[31:16]`, `b = pattern[15:0]`), the accumulator adds the
   truncated product, and the MISR absorbs each new accumulator value.
3. **DRAIN** - the last accumulator value is absorbed.
4. **CHECK** - the comparator sets `bist_fail_mask[pass]` if the signature
   differs from the ROM.

`bist_done` then stays high; `bist_pass` is high when all four matched. A
clean test takes 4 x (256 + 4) = 1040 cycles, plus one per Razor error. A
Razor error stalls the step like in the processor, and the MISR waits for the
restored accumulator value, so the signature does not depend on how many
errors were corrected.

* Pattern generator: 32-bit Fibonacci LFSR, x^32 + x^22 + x^2 + x + 1, seed
  32'h1BAD5EED.
* Compactor: 40-bit MISR, `sig <= {sig[38:0], sig[39]^sig[37]^sig[20]^sig[18]} ^ acc`.
* Golden signatures: the MISR contents after the 256 steps of a fault-free
  MAC unit at that truncation level. If you change the generator, the
  multiplier, the compactor or the pattern count, recompute the four
  constants in `golden_sig_rom.sv`; `tb_golden_sig_rom` recomputes them in
  behavioural code and prints the expected value on a mismatch.

Start the self-test only while the processor is idle (`run` low, asleep or
halted): it freezes the pipeline and overwrites the accumulator.

## SPI port

SPI mode 0, MSB first, 48-bit frames while `spi_cs_n` is low; SCLK must be
slower than a quarter of the system clock (the inputs are synchronised).
MOSI carries `{address[15:0], instruction[31:0]}`; after the 48th bit the
word is written to program memory (address bits above 9 are ignored). Frames
of another length are dropped. MISO returns the status word captured when
`spi_cs_n` falls:
`{bist_done, bist_pass, bist_fail_mask[3:0], sleeping, halted, razor_err_count[15:0], out_port[23:0]}`.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --top-module tb_lt_ptmac_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/ptmac_pkg.sv tb/tb_lt_ptmac_top.sv
./obj_dir/Vtb_lt_ptmac_top
```

Replace `tb_lt_ptmac_top` by any other testbench (`tb_<module>`). The package
file must come first. The simulations are two-state; everything that is read
is reset or initialised.

* `tb_lt_ptmac_top` (top at its default sizes, about 9,000 cycles) loads a
  program over SPI, runs it with 30 % of the accumulator captures made late,
  sleeps, wakes and halts, runs the self-test with and without late captures,
  and reads the status over SPI. It counts each mechanism (SPI writes, hazard
  stalls, taken branches, truncation switches, Razor corrections in program
  and test mode, sleep, wake, halt, BIST passes, status readback) and fails
  if any never happened.
* `tb_ptmac_core` runs a dot-product program (exact and truncated) against an
  instruction-level model in the testbench, checks every output value and
  the exact cycle count, and checks that a run with late captures is longer
  by exactly the number of Razor errors.
* `tb_razor_pipeline_example` runs five back-to-back MAC instructions with a
  late capture in the second and checks, cycle by cycle, which instruction
  is in Decode, Read and Execute: the third executes twice, the fourth waits
  an extra cycle in Read, the fifth in Decode.
* `tb_fir_truncation` runs an 8-tap FIR filter over 72 samples on the
  processor at T = 0, 8, 12 and 16 with a fifth of the MAC captures made
  late. Every output must equal the sum of truncated products from the
  testbench's own partial-product model, T = 0 must be exact, the error must
  stay bounded and grow with T, and each run must last the cycles the
  pipeline rules predict plus one per Razor error.
* `tb_pt_multiplier`, `tb_razor_reg`, `tb_razor_accumulator`,
  `tb_barrel_shifter`, `tb_register_file`, `tb_data_memory`,
  `tb_program_memory`, `tb_spi_slave`, `tb_lfsr_tpg`, `tb_misr_compactor`,
  `tb_golden_sig_rom` and `tb_bist_controller` test the blocks one by one
  against reference models written independently in the testbench.

## What to trust, and what is not here

* Verified in simulation: every block against its own reference model; the
  processor against an instruction-level model including cycle counts; the
  self-test passing with and without injected timing errors. Every testbench
  was also shown to fail on a deliberately broken copy of its block.
* Not verified: behaviour on an FPGA, timing, power. The comparison figures
  of the original work (slice and LUT counts, logic and I/O power, minimum
  period) come from a vendor flow and are not reproduced here.
* Mixed clock edges: the Razor error flag is registered on the falling edge,
  everything else on the rising edge.
* Not built: the metastability detector and the system-failure path of the
  Razor register (timing-level effects); a supply-voltage controller; scan
  chains; transparent latches between the multiplier's compression tree and
  the adder (here the multiply and accumulate complete within one Execute
  cycle); the baseline PTMAC and I-PTMAC variants that the design was
  compared with.
* Sizes chosen here: data memory 256 words, 256 BIST patterns per pass, four
  truncation levels in the self-test.
