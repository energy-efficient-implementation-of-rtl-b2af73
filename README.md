# Multi-phase quasi-adiabatic CRC-16 for ISO/IEC 14443 (NFC)

This design computes the 16-bit frame check of ISO/IEC 14443 NFC, a bit-serial
CRC over a message word. It uses the generator polynomial x^16 + x^12 + x^5 + 1
and the preset 0x6363 (106 kbit/s) or 0x0000 (212/424 kbit/s). It is meant for
*adiabatic* (charge-recovery) logic. In that logic every gate is powered by a
trapezoidal power-clock and passes its result to the next gate in the next
phase, so each gate is effectively a pipeline stage. The RTL here models that
behaviour exactly at phase level. Every adiabatic gate is one register stage
that takes its value when its power-clock phase evaluates. Three
power-clocking schemes are supported: 4-phase, 2-phase, and single-phase with
two auxiliary clocks. They share one gate-level netlist; only the time per
phase changes.

The transistor circuits (IECRL, PFAL, EACRL, CPAL, CAL gates) and the
stepwise-charging power-clock generator are analog and are not part of the
RTL. What is here is their logic: which gate evaluates when, and what it
computes.

## The CRC being computed

The message is sent MSB first. For each bit `m`:

    fb  = m xor CR[15]
    CR' = {CR[14:0], 0} xor ({g15..g1, 1} & {16{fb}})

with `g = 0x8810` read as {g16, g15..g1}. Here g16 is implicit and
g1..g15 = 15'h0810. The polynomial is an input (`gpoly`), so any degree-16
polynomial with g0 = 1 works, and so does any preset (`init`). Appending the
16-bit CRC to the data and running the whole block through the CRC again
gives zero. The receiver check relies on this, and the testbench exercises it.

## Block structure

* `pclk_seq` gives the phase strobes `ph[3:0]` to every block.
* `crc_counter` steps while `R_count` and `new_message` are 1. Its count
  selects the message bit in `crc_msg_mux` and feeds `crc_decoder`.
* `crc_decoder` turns the count and `res` into R_count (to the counter), R0
  (to `crc_poly_gen`), R1, R2, R3 (to `crc_unit`) and R4 (RET of
  `crc_register_unit`).
* `crc_msg_mux` sends the message bit IN to `crc_unit` and, through
  `crc_delay_cell` (IN_d), to `crc_register_unit`.
* `crc_unit` gives the feedback `fb` = IN xor CR15 to `crc_poly_gen`, which
  returns the polynomial bits `gp`. Its CR[15:0] goes to `crc_register_unit`.

## Phase model: one gate, one stage

`clk` is one ramp time Tr, a quarter of a power-clock period.
`pclk_seq` turns it into a strobe `ph[3:0]`, one bit per *stage position*
0..3. A stage in position p is written only when `ph[p]` is 1, and it reads
only stages in position p-1 (mod 4). So data moves forward exactly one gate
per phase, as in the adiabatic circuit. A gate's output does not decay
between evaluations here. In silicon it is recovered and re-evaluated, but
the value seen by the next gate during its evaluation is the same.

| scheme | slots per period | Tr per slot | Tr per power-clock cycle | strobes |
|---|---|---|---|---|
| `PC_4PHASE` | 4 | 1 | 4 | Phi1..Phi4, one per position |
| `PC_2PHASE` | 2 | 3 | 6 | Phi1 drives positions 0 and 2, Phi2 positions 1 and 3 |
| `PC_1PHASE` | 2 | 4 | 4 (Cx and Cxb alternate cycles) | Cx: 0 and 2, Cxb: 1 and 3 |

A full trip through the four positions therefore takes 4 Tr (4-phase),
12 Tr (2-phase) or 16 Tr (single-phase). In the two-slot schemes, positions 0
and 2 evaluate at the same instant, and so do 1 and 3. A four-gate loop then
holds **two independent copies** of the computation, half a trip (two
slots) apart. The
controller and the datapath run both copies in step, so the logic result is
the same as in the 4-phase scheme. This has two visible effects:

* RES must stay high for at least 8 phases, so that both copies are reset.
* Inputs for the next word should be changed when `r_count` rises, not while
  it is low. The second copy is still reading the old values while it is low.

This is why the gate count of every loop must be a multiple of two (two-slot
schemes) or of four (4-phase). The design keeps every loop at four gates.

## Datapath

**Polynomial unit** (`crc_poly_gen`). For each coefficient g1..g15 it has an
AND of R0 and g_i, which selects either `fb` or zero. R0 = 0 disables the
feedback. The AND is in position 3; the selected bit `gp[i]` is in position 0.

**CRC unit** (`crc_unit`) has sixteen bit blocks of four gates, one power-clock
cycle per message bit:

| position | LSB block (bit 0) | bit block i = 1..15 |
|---|---|---|
| 3 | XOR: fb = IN xor CR15 | buffer of CR[i-1] |
| 0 | buffer | resettable buffer (R1) |
| 1 | resettable buffer (R2) | XOR with gp[i] |
| 2 | 2:1 mux: R3 ? b0 : data | 2:1 mux: R3 ? b_i : data |

A resettable buffer passes its input while its reset line is 1 and gives 0
while it is 0. The mux loads the preset while R3 is 1. CR is valid in
position 2 and feeds position 3 of the next cycle, which closes the loop.

**Delay cell** (`crc_delay_cell`). Four buffers delay the serial message bit
by one cycle, so that each message bit reaches the register unit together
with the CRC value it produced.

**Register unit** (`crc_register_unit`). 32 one-bit registers of four stages
(positions 3, 0, 1, 2); the last stage is a *retain* buffer. While RET
(= R4) is 1 the registers follow their inputs. While RET is 0 they keep
their value. The 16 CRC registers take CR in parallel. The 16 message
registers form a serial chain fed by the delayed message bit (`m_out[0]` is
the newest), so at the end of a word `m_out` holds the word that was
protected.

## Controller

**Test multiplexer** (`crc_msg_mux`). This is an MSG_W:1 multiplexer that
sends `msg[MSG_W-1 - count]`, so count 0 sends the MSB. It is three gates
deep: a 4:1 level selected by Q[1:0] from the position-3 copy, a 2:1 level
by Q[2], and a last level by the upper count bits from the position-1 copy.

**Counter** (`crc_counter`). A 4-bit (log2 MSG_W) binary counter, one step per
power-clock cycle. It has an enable gate `R_count AND New message` in
position 0, which also buffers the last count, and three function stages
whose first computes `en ? Q+1 : 0`. It gives copies of the count in
positions 3 (Q_3), 0 (Q) and 1 (Q_1) for the multiplexer and the decoder.

**Decoder** (`crc_decoder`). Every control line is a chain of gates behind the
all-ones detector, placed so that each reaches its user in the right
position:

| signal | position | value during computation | meaning when inactive |
|---|---|---|---|
| R_count = NOT(count = 1111 OR RES) | 3 | 1 | counter clears to 0 |
| R0 | 2 | 1 | feedback disabled |
| R1 | 3 | 1 | bit blocks 1..15 cleared |
| R2 | 0 | 1 | LSB block cleared |
| R3 = NOT R2, delayed | 1 | 0 | preset loaded (R3 = 1) |
| R4 = NOT R3, four gates later | 1 | 1 | register unit retains (RET = 0) |

## One word, cycle by cycle

With `new_message` = 1 the counter runs 15 → 0 → 0 → 1 → … → 15. Count 15
makes R_count low for one cycle, and that does three things:

1. The counter clears. So count 0 appears twice. The first of the two is
   discarded: its bit meets R0 = 0 and R1/R2 = 0.
2. The datapath is cleared and the preset is loaded (R3 = 1).
3. Four gates later R4 = 0 freezes the register unit, which now holds the
   finished word and its CRC.

A new word therefore starts every **MSG_W + 1 cycles** (17 for 16 bits), with
no gap other than the discarded count. The result stays on `m_out` /
`crc_out` for **8 phases**. That is two power-clock cycles in the 4-phase
scheme, four in the 2-phase scheme and eight in the single-phase scheme.
`wait_n` (R4) is 0 inside that window.

From the issue of count 0 of the first bit to the CRC being in the register
unit takes

    counter 4 + multiplexer 3 + datapath 4*k + register unit 4 = 4k + 11 phases

which is 75 phases for a 16-bit word:

| scheme | phases | Tr | power-clock cycles |
|---|---|---|---|
| 4-phase | 75 | 75 | 18.75 |
| 2-phase | 75 | 225 | 37.5 |
| single-phase | 75 | 300 | 75 |

For k = 32, 64, 128 and 256 the same rule gives 139, 267, 523 and 1035 phases.

## Using `crc_adia_top`

Parameters: `SCHEME` (`PC_4PHASE` by default), `CRC_W` = 16 and `MSG_W` = 16.
MSG_W must be a power of two, 16 or more, and at least CRC_W. Other CRC
widths come from changing CRC_W, which adds or removes bit blocks.

| port | dir | meaning |
|---|---|---|
| `clk` | in | ramp-time tick Tr |
| `pc_rst` | in | restarts the power-clock sequencer |
| `res` | in | RES, active high: clears the controller and datapath, loads the preset |
| `new_message` | in | 1 lets the counter run |
| `msg[MSG_W-1:0]` | in | message word, MSB sent first |
| `gpoly[CRC_W-1:1]` | in | g15..g1 (15'h0810 for NFC) |
| `init[CRC_W-1:0]` | in | preset (0x6363 or 0x0000 for NFC) |
| `m_out`, `crc_out` | out | last word and its CRC, retained |
| `r_count` | out | 0 for one cycle at the end of each word |
| `wait_n` | out | R4, 0 while the result is being held |
| `pc_ph[3:0]`, `pc_cycle` | out | phase strobes and cycle start |

To use it:

1. Hold `res` high for at least 8 phases (16 is safe) with `new_message` = 1.
   Set `msg`, `gpoly` and `init` at the same time.
2. Release `res`. Words are then processed back to back.
3. Present each next word's inputs when `r_count` rises again after its low
   cycle. Its CRC is on `crc_out` at the next `wait_n` low.
4. Dropping `new_message` while `res` is low parks the counter at 0, but the
   datapath keeps stepping. Pulse `res` before starting again.

## Where this departs from or goes beyond the source

* **Gate-level model only.** Energy, ramps, charge recovery, the 180 nm
  transistor gates and the retain transistors are not modelled. The
  stepwise-charging power-clock generator is replaced by a tick counter.
* **Control polarities are inferred.** The source's controller diagram does
  not show the gate types. R3 is taken as the inverse of R2. R1/R2 are
  active-low clears. R0 is 1 while feedback is enabled. These are the only
  polarities that make the described behaviour work. They are the most
  likely point of difference from the original circuit.
* **Phase offsets.** The offsets between the phases within a period are
  assumed: one slot apart, 1, 3 or 4 Tr.
* **Message in the register unit.** The source does not say how the serial
  message becomes the parallel word M0..M15. Here it is a chain of the same
  four-stage registers.
* **Multiplexer split.** The split into 4:1 / 2:1 / last level is a choice.
  Only its depth (three gates) and select copies are given.
* **Register depth.** The source mentions that the two-slot schemes need more
  register stages. Here the same four-stage register works for every scheme,
  because the two-copy interleaving keeps the phase-level pipeline
  identical.
* **Wait period.** The source gives the wait period as two power-clock
  cycles. Here the result is held for 8 phases in every scheme. That is two
  cycles with the 4-phase clock, but four (2-phase) or eight (single-phase)
  with the others.
* **Tick length.** One `clk` tick is one ramp time in every scheme. A real
  2-phase generator may use a faster reference clock to place its
  non-overlapping ramps.
* **Cycle counts.** The source's summary table swaps the 2-phase and
  single-phase computation times (75 and 37.5 cycles). The model follows the
  prose and its own arithmetic: 37.5 cycles for 2-phase, 75 for single-phase.
* **Word period.** The duplicate count 0 and the resulting MSG_W + 1 cycle
  word period are not described in the source. They follow from its counter
  and decoder structure.
* **Polynomial unit size.** The source's overview mentions twelve AND/mux
  pairs. Its detailed description and figure have fifteen, one per
  coefficient, and that is what is built.

## Files

`rtl/`: `crc_adia_pkg` (scheme enum, NFC constants), `pclk_seq`,
`crc_counter`, `crc_decoder`, `crc_msg_mux`, `crc_delay_cell`,
`crc_poly_gen`, `crc_unit`, `crc_register_unit` and `crc_adia_top`.

`tb/`: one self-checking testbench per block (`tb_<module>`), plus:

* `crc_top_driver`: stimulus and checker for the top.
* `tb_crc_adia_top`: all three schemes, plus a 32-bit receiver check.
* `tb_crc_adia_full`: the defaults, with no parameter overrides.
* `tb_crc_adia_wordlen`: 64-, 128- and 256-bit words.
* `tb_crc_adia_crcwidth`: 8- and 32-bit CRCs, each also with a receiver check.

Each testbench prints `TB_RESULT checks=N failures=M`. The top-level
testbenches check every retained CRC and word against a software reference.
They also check the latency (4k + 11 phases), the 8-phase hold and the
receiver zero remainder. They count each mechanism: back-to-back words,
preset switch, polynomial change, New message low, idle and mid-word RES.
A mechanism that never occurred counts as a failure.

## Simulating

With Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_crc_adia_top \
        rtl/crc_adia_pkg.sv rtl/*.sv tb/crc_top_driver.sv tb/tb_crc_adia_top.sv
    ./obj_dir/Vtb_crc_adia_top

Replace the top module and the testbench file for any other test. The unit
testbenches need only the package and their module. Every testbench finishes
in a few seconds.
