# Self-testing 16-bit photon counter (BIST-iDAQ)

A photon counting front end delivers a 16-bit digitized sample every few clock
cycles. The data acquisition logic behind it is a short chain: a **photon buffer**
holds the sample, a **Kogge-Stone accumulator** adds it to the running photon
count, and a **parallel-in serial-out (PISO) register** streams the count off
chip. This RTL adds built-in self-test (BIST) to that chain. Any of the three
stages can be tested on chip at full clock rate without external test
equipment. Each stage counts as a *circuit under test* (CUT):

| CUT | stage | pattern source in test | response compactor |
|-----|-------|------------------------|--------------------|
| CUT-1 | 16-bit photon buffer | test pattern generator (TPG) | BILBO-1 as MISR |
| CUT-2 | Kogge-Stone accumulator | BILBO-1 as LFSR | BILBO-2 as MISR |
| CUT-3 | PISO register | BILBO-2 as LFSR | output response analyzer (serial signature register) |

The main idea is that the two **BILBOs** (built-in logic block observers) each
do two jobs. A BILBO is a register whose mode inputs turn it into a scan chain,
a pseudo-random pattern generator, a plain register or a multiple-input
signature register (MISR). BILBO-1 first compacts the buffer's response and
then generates the accumulator's patterns. BILBO-2 compacts the accumulator's
response and then generates the PISO's patterns. A controller runs the three
tests in order. It compares each signature with a fault-free value held in a
small ROM, and it stops at the first stage that fails.

Everything runs on one clock `clk` with an asynchronous active-low reset
`rst_n`. All files are SystemVerilog (IEEE 1800-2017) and synthesizable.

## Normal mode: counting

```
 n_i ──►[entrance mux]─D1─►[photon buffer]─N1─►[KSA mux]─T1─►[accumulator]─N2─►[PISO mux]─T2─►[PISO]──► serial_o (N3)
            ▲ Q0                 │                 ▲ Q1          │  (KSA)        ▲ Q2            │
          [TPG]              [BILBO-1]─────────────┘         [BILBO-2]───────────┘            [ORA]
```

After reset the design is in normal mode. A free-running 4-bit clock divider
makes a one-cycle strobe every 8 and every 16 cycles. `clk_sel_i` chooses the
sampling strobe: 0 for every 16 cycles, 1 for every 8. On each sampling strobe:

* the buffer captures `n_i`;
* the accumulator adds the word the buffer captured at the *previous* strobe.
  The add is done by a 16-bit Kogge-Stone adder, `ksa_adder`.

Every 16 cycles the PISO loads the current total. In the 15 cycles between
loads it shifts the total out on `serial_o`, MSB first, with a zero fill. The
total wraps modulo 2^16. `carry_o` is high in a cycle where the add in
progress overflows. `count_o` is the running total.

In normal mode the BILBOs sit beside the chain as plain registers (mode 10) and
copy the buffer and accumulator outputs every cycle. They are not in the data
path: the three multiplexers pass normal data whenever the controller is in
normal mode.

## Test resources

**BILBO modes** (`bilbo.sv`, mode input B1B2):

| B1B2 | mode | next state |
|------|------|------------|
| 00 | serial scan | `{Q[14:0], SI}`, `SO = Q[15]` |
| 01 | LFSR pattern generator | `lfsr(Q)` |
| 10 | D flip-flops | `D` |
| 11 | MISR | `lfsr(Q) ^ D` |

`lfsr(x) = {x[14:0], x[15]^x[14]^x[12]^x[3]}` is the maximal-length
polynomial x^16+x^15+x^13+x^4+1. The TPG, both BILBOs and the response
analyzer all use it (`bist_pkg::lfsr_next`). Each BILBO also has a clock
enable, so a signature can be held, and a synchronous clear that loads the seed
`0001`. The TPG is the same LFSR seeded with `ACE1`. The output response
analyzer (ORA) is a serial-input signature register that starts at 0: each
cycle it steps the LFSR and XORs the PISO's serial bit into bit 0.

The **signature mux** (`ctrl_sel4`) selects Q1, Q2 or Q3 by the CUT under
test. The **ROM** gives the stored signature for the same CUT. The
**comparator** reports `pass_o` or `fail_o` in the compare cycle only.

## The self-test sequence

The controller (`bist_controller.sv`) follows this flowchart:

```
NORMAL ──int_i──► TEST (idle) ──start_i──► CUT-1 ─pass─► CUT-2 ─pass─► CUT-3 ─pass─┐
   ▲                 │  ▲                    │fail          │fail          │fail     │
   └──mode_reset_i───┘  └────────────────────┴──────────────┴──────────────┴─────────┘
```

* `int_i` moves from normal mode to test mode. In test mode the entrance mux
  blocks `n_i`.
* In test mode, `mode_reset_i` goes back to normal mode. It wins if it is high
  together with `start_i`.
* `start_i` clears all pass/fail flags and tests CUT-1, CUT-2 and CUT-3 in turn.
* A failing CUT sets its `display_fail_o` bit and ends the sequence: the later
  CUTs are not tested. The controller then waits in test mode for the next
  `start_i`, which retries from CUT-1.
* After CUT-3 passes, all three `display_pass_o` bits are set and the controller
  waits in test mode. The flags are kept after the return to normal mode, so the
  display can still show them.
* While the controller is idle in test mode, `scan_en_i` puts both BILBOs in scan
  mode. The chain is `scan_in_i → BILBO-1 → BILBO-2 → scan_out_o`, so 32 shifts
  read out BILBO-2 and then BILBO-1, MSB first.

Each CUT test has three phases: one **clear** cycle, a **run**, and one
**compare** cycle. The clear cycle seeds the pattern source and zeroes the CUT
and the compactor. The compare cycle registers the comparator's verdict. The
run works as follows:

| CUT | cleared | every run cycle | run length (default) |
|-----|---------|-----------------|----------------------|
| 1 | TPG=ACE1, buffer=0, BILBO-1=0001 | TPG steps, buffer ← Q0, BILBO-1 MISR ← buffer | `CUT1_CYCLES` = 64 |
| 2 | BILBO-1=0001, accumulator=0, BILBO-2=0001 | BILBO-1 LFSR, accumulator += Q1, BILBO-2 MISR ← accumulator | `CUT2_CYCLES` = 64 |
| 3 | BILBO-2=0001, PISO=0, ORA=0 | at cycles 0, 16, 32, …: PISO ← Q2 and BILBO-2 steps; otherwise PISO shifts; ORA ← serial bit | 16·`CUT3_WORDS`+1 = 129 |

The extra cycle in CUT-3 lets the last bit of the last word reach the ORA.
Cycle numbers are counted from the clock edge that samples `start_i`. With the
defaults, the CUT-1 result is registered at edge 66, the CUT-2 result at edge
132 and the CUT-3 result at edge 263. In general the results land at edges
L1+2, L1+L2+4 and L1+L2+16·W+7. The testbench checks these cycle counts.

The fault-free signatures for the defaults are `2E4D` (CUT-1), `9302` (CUT-2)
and `8302` (CUT-3). They are `SIG_CUT*_DEFAULT` in `bist_pkg.sv` and are
checked against an independent model in `tb_bist_idaq_top`. **If you change a
run length, a seed or the polynomial, you must also change the ROM contents.**
`tb_bist_idaq_top` prints the model's signatures on its first line
(`model signatures: ...`), so you can copy the new values into the
`SIG_CUT1..3` parameters or into the package.

## Status display

`status_display.sv` drives six BCD digits (`digit_o[0]` is the rightmost), the
matching active-low seven-segment codes (`hex_n_o`, segments g..a) and ten LEDs:

* **Normal mode:** the count in decimal on five digits. The top digit is 0.
* **Test mode:** `0020`, `0200` or `2000` on the four right-hand digits, for the
  CUT being tested or last tested. All digits are 0 before the first test.
* **LEDs:** `ledr_o[1]`, `[5]` and `[8]` light when CUT-1, CUT-2 and CUT-3 have
  passed. The other LEDs are always off.

## Top-level interface (`bist_idaq_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `n_i` | in | 16 | digitized photon sample from the analog front end |
| `clk_sel_i` | in | 1 | sampling strobe: 0 = every 16 cycles, 1 = every 8 |
| `int_i`, `start_i`, `mode_reset_i` | in | 1 | enter test mode / run self test / back to normal mode |
| `scan_en_i`, `scan_in_i`, `scan_out_o` | | 1 | BILBO scan chain |
| `serial_o` | out | 1 | PISO serial output |
| `count_o`, `carry_o` | out | 16, 1 | running total, carry of the add in progress |
| `test_mode_o`, `busy_o` | out | 1 | not in normal mode / a CUT test is running |
| `pass_o`, `fail_o` | out | 1 | comparator verdict, high in the compare cycle only |
| `display_pass_o`, `display_fail_o` | out | 3 | bit n-1 is CUT-n |
| `digit_o`, `hex_n_o`, `ledr_o` | out | 6×4, 6×7, 10 | display |

The control inputs are synchronous levels sampled on the rising edge. An
asynchronous source, such as a push button, needs a synchronizer in front of
them.

Parameters: `CUT1_CYCLES`, `CUT2_CYCLES`, `CUT3_WORDS` (the test lengths) and
`SIG_CUT1..3` (the ROM contents). The data width is `bist_pkg::DATA_W` = 16.

## Files

| file | contents |
|------|----------|
| `rtl/bist_pkg.sv` | width, LFSR polynomial and seeds, BILBO mode and CUT enums, controller command struct, default lengths and signatures |
| `rtl/bist_idaq_top.sv` | top: controller + datapath + display |
| `rtl/bist_controller.sv` | mode and test-sequence state machine, run timer, command decode |
| `rtl/bist_dpu.sv` | datapath: the chain, its three muxes, TPG, BILBOs, ORA, signature mux, ROM, comparator, clock divider |
| `rtl/photon_buffer.sv`, `ksa_accumulator.sv`, `ksa_adder.sv`, `piso_register.sv` | the three circuits under test |
| `rtl/test_pattern_generator.sv`, `bilbo.sv`, `output_response_analyzer.sv`, `signature_rom.sv`, `signature_comparator.sv`, `clock_divider.sv` | test resources and timing |
| `rtl/status_display.sv` | BCD, seven-segment and LED display |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |
| `tb/tb_fault_coverage.sv` | stuck-at fault coverage of the self test |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    --top-module tb_bist_idaq_top -y rtl -Irtl rtl/bist_pkg.sv tb/tb_bist_idaq_top.sv
./obj_dir/Vtb_bist_idaq_top
```

Replace `tb_bist_idaq_top` with any other testbench name to run that one. Each
testbench ends with `TB_RESULT checks=N failures=M` and stops itself through a
watchdog if something hangs. The testbenches reset or drive every register they
read. They also pass with Verilator's random initial values
(`+verilator+rand+reset+2`).

* `tb_bist_idaq_top` runs the whole design at its default parameters. It checks
  normal counting at both strobe rates (with wrap-around), the serial stream
  and the decimal display against a cycle model. It then runs INT, START and a
  full passing self test with its result cycles, the LEDs and the `2000`
  display, a 32-bit scan-out, RESET, and three runs with a stuck-at fault forced
  into the buffer, the adder and the PISO. Each of those runs must fail at the
  right CUT and stop the sequence. It counts each of these mechanisms and fails
  if one never happens.
* `tb_fault_coverage` forces 160 single stuck-at faults, one run per fault.
  The faults cover every bit of the buffer output, the adder sum, the adder
  carries, the accumulator register and the PISO register, each stuck at 0 and
  at 1. The self test detects 158 of them (98.75 %) and reports each against
  the right CUT. The two it misses are the adder's carry-out stuck at 0 or 1.
  The carry-out never reaches the stored total, so no signature can see it.
  That fault list is this design's own choice. Coverage of faults inside the
  test logic itself is not measured.
* The module testbenches check each block against a model written in the
  testbench. The models include their own LFSR, `+` for the adder and `/` and
  `%` for the decimal digits.

## What is this design's own choice

The overall structure comes from the design this RTL implements: the three CUTs,
the muxes and their names (N, D1, N1, T1, N2, T2, N3, Q0–Q4, R1, R2), the
BILBO mode table, the ROM-plus-comparator check, the flowchart and the display
patterns. The following are not given there and were chosen here:

* **Polynomial, seeds and test lengths.** The ROM values follow from these
  choices.
* **Clock divider.** It makes clock-enable strobes instead of divided clocks,
  and `clk_sel_i` picks the sampling rate.
* **Accumulator.** The second adder operand is the accumulator's own total. The
  total wraps at 2^16.
* **PISO.** MSB first, with zero fill.
* **ORA.** It is a serial-input signature register.
* **Controller.** It has a single run timer, where the original block diagram
  shows separate cycle counters and flags at the TPG and the BILBOs. The clear
  and compare cycles, the START/RESET priority and the scan hook are also
  choices made here.
* **Display.** The seven-segment encoding. The digits show the raw total, not a
  per-second rate.

## Not included

* **Analog front end.** The photodetector, the transimpedance amplifier and the
  ADC are outside; their digitized output is `n_i`.
* **Contamination level.** The board version of the design shows a liquid
  contamination percentage next to the count. It is not computed, because no
  formula for it is available.
* **Board clock.** The board version slows its clock to 1 Hz so a person can
  read the display, which makes the count a count per second. That board-level
  clocking is not part of this RTL. Run `clk` at any rate, or add a clock
  enable in a board wrapper.
* **Fault-tolerant adder.** An earlier version of this counter uses a "sparse",
  fault-tolerant Kogge-Stone adder. This RTL uses a plain Kogge-Stone adder.
* **Physical figures.** The reported 166.7 MHz clock, the ~0.031 mm² cell area
  and the ~2.9 mW power belong to a 180 nm standard-cell implementation. This
  RTL does not reproduce them.
