# Self-test circuits for FPGA CRC modules and global clock buffers

This RTL models two Built-In Self-Test (BIST) circuits. Each one tests a hard resource
of a Virtex-4/Virtex-5 class FPGA:

* the **CRC modules** next to the gigabit transceivers (each module is two CRC32 units,
  one of which can also act as a CRC64 unit);
* the **32 global clock buffers** (BUFGCTRL), which switch glitch-free between two
  clocks.

In the FPGA, the BIST is a configuration that is downloaded into the fabric. Test
pattern generators (TPGs) drive several identically configured blocks under test
(BUTs). Comparison-based output response analyzers (ORAs) check that neighbouring BUTs
agree. The hard part of both circuits is the **first clock cycle after
configuration**:

* The CRC register is *not* initialised by the configuration download. Until
  `CRCRESET` loads `CRC_INIT`, it holds whatever it powered up with. If the ORAs
  compared from clock 0, they would report random false failures. The circuit
  therefore keeps the ORAs disabled for the first half of the sequence.
* The clock buffer *does* have configuration-time state: `PRESELECT_I0`,
  `PRESELECT_I1` and `INIT_OUT`. Faults in these bits can only be seen before the
  control inputs take over. So the ORAs compare the buffer outputs from the very first
  clock edge, and the TPG puts different values on I0 and I1 right after configuration.

The RTL is synthesizable SystemVerilog. The FPGA's configuration memory is modelled as
plain inputs: one configuration struct per BUT, plus a global set/reset pulse `gsr`.
A testbench can therefore load BIST configuration #1 or #2 and inject a stuck-at
fault into any single configuration bit of any BUT.

## Circular comparison

```
      TPG 0 ──► odd BUTs          TPG 1 ──► even BUTs

      BUT 0 ──┬── ORAs(0,1) ──┬── BUT 1 ──┬── ORAs(1,2) ── ... ── BUT N-1 ──┬── ORAs(N-1,0) ── BUT 0
```

* BUT *m* is compared with BUT *m+1*, and the last BUT with BUT 0. Every BUT output is
  therefore watched by two ORAs.
* Neighbouring BUTs get their patterns from different TPGs. A faulty TPG therefore
  shows up as a mismatch instead of being masked.
* Each ORA (`ora_cell`) works as follows:
  * It XNORs the pairs it compares and ANDs the results with its own flip-flop.
  * Configuration sets the flip-flop to 1 (pass). Any mismatch clears it for good.
* All ORAs form one carry chain:
  * A passing ORA passes on the carry from the previous ORA. A failing ORA drives 1.
  * The end of the chain is a single fail bit for the whole circuit. `pass` is that
    bit inverted.
  * The ORA flip-flops are also brought out (`ora_flags`) for readback diagnosis. A
    faulty BUT is located by the two ORAs that flag.
  * An assertion in `ora_cell` checks that a failing flag stays failed until the next
    `gsr`.

## CRC module BIST (`crc_bist`)

### Blocks under test

`crc_module` holds two `crc_engine` units, A and B:

* Unit A is also the CRC64 unit. It shares all of A's pins, including `CRCOUT`. Its
  64-bit data word is {A's `CRCIN`, B's `CRCIN`}.
* Unit B always works as an independent CRC32.

So in either mode the module has 64 outputs. Each configuration covers both units and
the mode:

| | configuration #1 | configuration #2 |
|---|---|---|
| CRCCLK active edge | rising | falling |
| CRC_INIT | 0xAAAAAAAA | 0x55555555 |
| mode | CRC64 (+ CRC32 in unit B) | two CRC32 |

Inside a unit are 32 `crc_unit_cell`s, one per register bit. Cell *i* computes
`q[i-1] ^ (x^i in P(x) ? q[31] : 0) ^ CRCIN[i]`. A `CRCDATAVALID` mux holds the bit,
and a `CRCRESET` mux has priority and loads the `CRC_INIT` bit. The polynomial is the
CRC32 polynomial:

P(x) = x^32 + x^26 + x^23 + x^22 + x^16 + x^12 + x^11 + x^10 + x^8 + x^7 + x^5 + x^4 + x^2 + x + 1

(`bist_pkg::CRC32_POLY` = 0x04C11DB7).

The following are this design's own choices:

* **Width code.** `CRCDATAWIDTH` = *w* means bytes 0..*w* are valid, counted from
  bit 0. Invalid bytes read as 0. In CRC32 mode, codes 4–7 count as 3.
* **CRC64 step.** For *w* ≥ 4, the high word is folded in first, combinationally, and
  the cells then fold in the low word. A full 64-bit word is absorbed in one clock.
  For *w* < 4, only the low word is absorbed.
* **Output.** `CRCOUT` is the register itself, with no inversion and no bit reordering.

### TPG and the sequence

`crc_tpg` is a 10-bit up-counter (in the FPGA, a DSP slice set up as a counter). Its
bits drive the CRC inputs and the ORA enable:

| counter bit | drives |
|---|---|
| 0–3 | CRCIN[4k+0..3] (every fourth bit, all 64) |
| 4–6 | CRCDATAWIDTH[2:0] |
| 7 | CRCDATAVALID |
| 8 | CRCRESET |
| 9 | ORA clock enable |

One BIST run is 1,024 clocks:

* **Clocks 0–255.** The CRC registers run from their power-up values. The ORAs are
  disabled.
* **Clocks 256–511.** `CRCRESET` is high and every register loads `CRC_INIT`.
* **Clocks 512–1023.** The ORAs compare. `CRCRESET` is high again in clocks 768–1023.
* **After clock 1023.** The counter wraps, bit 9 falls, the ORAs freeze and `done`
  rises.

The ORAs of pair *m* take their enable from TPG *m* mod 2.

With `tpg_ora_inv = 1`, the TPGs and ORAs run on the falling clock edge. This is the
"same edge" way of running configuration #2: it doubles the achievable BIST clock
rate, at the price of a larger partial reconfiguration file.

Each module pair has 64 outputs, which go to 32 ORAs of two pairs each. A fault in one
CRC32 unit therefore changes 32 outputs. Each of these is seen by two ORAs, so 32 ORAs
flag the fault.

### Configuration bits

`crc_cfg_t` holds 67 bits per module:

* `mode64`;
* `clkinv_a` and `clkinv_b`;
* `init_a[31:0]` and `init_b[31:0]`.

The two modules of one transceiver have 134 bits, which gives 268 single stuck-at
faults.

## Clock buffer BIST (`bufg_bist`)

### Test pattern generator (`bufg_tpg`)

I0 and I1 come from a 2-bit twisted-ring (Johnson) counter:

* I1 takes I0, and I0 takes the inverse of I1.
* Configuration sets I0 = 0 and I1 = 1.
* The two inputs are square waves at a quarter of the BIST clock rate, 90° apart. They
  pass through all four value combinations, and they already differ on clock 0.

An FSM steps through the eight control patterns. It is enabled once per ring cycle, by
the ring state I0 = I1 = 1, so each pattern lasts four clocks and one pass takes 32
clocks. The FSM starts at the first pattern and wraps. The patterns are
(`bist_pkg::BUFG_PATTERNS`):

| IG1 | IG0 | CE1 | S1 | CE0 | S0 |
|---|---|---|---|---|---|
| 0 | 0 | 1 | 1 | 0 | 1 |
| 0 | 0 | 1 | 1 | 1 | 0 |
| 0 | 0 | 1 | 1 | 1 | 1 |
| 0 | 0 | 0 | 0 | 0 | 0 |
| 0 | 1 | 1 | 1 | 1 | 1 |
| 1 | 0 | 1 | 1 | 1 | 1 |
| 0 | 0 | 0 | 1 | 1 | 1 |
| 0 | 0 | 1 | 0 | 1 | 1 |

### Configurations and comparison

Buffer configurations (`bufg_cfg_t`, nine options):

| | #1 | #2 |
|---|---|---|
| six control inputs | non-inverted | inverted |
| PRESELECT_I0 | 1 | 0 |
| PRESELECT_I1 | 0 | 1 |
| INIT_OUT | 1 | 0 |

There is one ORA per buffer pair, and it compares a single output. The ORAs are
always enabled.

### The buffer model (`bufgctrl`)

The pins and the nine options are those of the real buffer. The switching mechanism
inside is this design's own, and is the part to read with the most care:

* **Request.** Input *k* is requested when S*k* and CE*k* are both active, after the
  per-pin inversion.
* **When an enable can change.** Each input has an enable that changes only on an edge
  of that same input.
  * Normally this is the edge where the input reaches the INIT_OUT level: falling for
    INIT_OUT = 0, rising for INIT_OUT = 1.
  * With IGNORE*k* active, either edge will do.
* **Mutual exclusion.** An enable only turns on while the other enable is off.
* **Output.** O follows the single enabled input. If no input or both inputs are
  enabled, O rests at INIT_OUT.
* **Result.** A switch cuts the old clock while it sits at INIT_OUT and lets the new
  clock in while it is also at INIT_OUT, so there are no runt pulses.
* **Configuration.** `gsr` loads the enables from PRESELECT_I0/I1.
  * Because enables only move on input edges, the preselected input drives O until its
    first edge.
  * This makes a PRESELECT fault visible on the very first clock edge, whatever the
    control pins say.
* **Implementation.** Each enable is a dual-edge register: a rising-edge and a
  falling-edge flip-flop whose XOR is the enable.

## How far the model can be trusted

Fault injection over all configuration bits reproduces the published results for the
CRC BIST. `tb_crc_fault_injection` injects all 268 faults of one transceiver:

* configuration #1 alone detects 134 (50%);
* configuration #2 alone detects 134 (50%);
* together they detect 268 (100%);
* every detected fault is flagged by exactly 32 ORAs.

For the clock buffer BIST, `tb_bufg_bist` injects the 18 option faults. Two results
differ from the published ones:

* **Detected faults.** It detects 16 of the 18, where 18 are published. In
  configuration #2, the IGNORE0 and IGNORE1 inversion faults go unseen. With all
  controls inverted, the only pattern that requests an input requests both, and this
  model then never selects I0. The silicon's behaviour in that case is not known here.
* **First-clock faults.** It catches four faults on the first clock edge (the four
  PRESELECT faults), where six are published. INIT_OUT faults are detected, but later,
  when the buffer rests at its INIT_OUT level. The published six presumably include
  INIT_OUT faults seen on the first edge.

Other limits:

* The CRC data-width encoding and the CRC64 word order are assumptions. The BIST
  itself does not depend on them, because identical BUTs are compared.
* The number of CRC modules in a column depends on the device. `N_CRC_MOD` defaults
  to 8, an assumed size. Devices with CRC columns on both sides compare each column in
  its own ring. For those, instantiate one `crc_bist` per column.
* The LUT buffers that give each clock buffer output a single load are plain fan-out
  here.
* The download, the partial reconfiguration and the Boundary Scan control are outside
  the RTL.

## Files

| file | content |
|---|---|
| `rtl/bist_pkg.sv` | configuration structs, the two configurations of each BIST, polynomial, control patterns |
| `rtl/fpga_bist_top.sv` | both BIST circuits side by side |
| `rtl/crc_bist.sv`, `rtl/crc_tpg.sv`, `rtl/crc_module.sv`, `rtl/crc_engine.sv`, `rtl/crc_unit_cell.sv` | CRC module BIST |
| `rtl/bufg_bist.sv`, `rtl/bufg_tpg.sv`, `rtl/bufgctrl.sv` | clock buffer BIST |
| `rtl/ora_cell.sv` | comparison ORA with carry-chain stage (shared) |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_crc_fault_injection.sv` | 268-fault configuration-memory injection on the CRC BIST |
| `tb/crc_ref_pkg.sv` | bit-level CRC reference model used by the CRC testbenches |

## Using it

To run a test session on one circuit:

1. Drive every element of its `cfg` array with configuration #1 (`CRC_CFG1` or
   `BUFG_CFG1`).
2. Pulse `gsr`.
3. Clock the circuit: for the CRC BIST until `done` rises (1,024 clocks); for the clock
   buffer BIST for at least 32 clocks.
4. Read `pass`.
5. Repeat with configuration #2. To inject a fault, change one bit in one element of
   `cfg`.

Simulate with Verilator, for example the end-to-end test at full size:

```
verilator --binary --timing -Irtl -Itb -y rtl +libext+.sv \
    rtl/bist_pkg.sv tb/tb_fpga_bist_top.sv --top-module tb_fpga_bist_top
./obj_dir/Vtb_fpga_bist_top
```

Every testbench ends with a `TB_RESULT checks=N failures=M` line. The CRC testbenches
also need `tb/crc_ref_pkg.sv` on the command line. All testbenches finish in well under
a second.

The clock buffers and the CRC units with an inverted clock use clocks derived from
logic (`clk ^ inv`, `i0 ^ ~INIT_OUT`). This is deliberate: it models the
programmable clock polarity of the hard blocks.
