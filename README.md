# Unclonable chip ID from polymorphic gates on REPOMO32

A polymorphic NAND/NOR gate has no select input. It is a NOR while the supply
is low (3.0–3.8 V) and a NAND once the supply is high (3.9–5 V). The exact
voltage where a gate changes over varies a little from gate to gate, even
between neighbours on the same die, because of fabrication variation. If the
supply is ramped from 3 V to 5 V, the gates of a die therefore change function
in an order that is specific to that die. This order cannot be written or
copied, so it can serve as a chip ID.

This RTL reads such an ID from REPOMO32, a small reconfigurable array whose
logic elements can each act as a polymorphic gate:

* four CLEs of one column are set up as NAND/NOR gates. Each gets a 0 on one
  input and a 1 on the other, so its output rises from 0 to 1 at the moment it
  becomes a NAND;
* the four outputs Z0..Z3 go to six S-R latches, one for each pair of gates.
  Each latch remembers which gate of its pair rose first. That gives six ID
  bits;
* the array is then partially reconfigured, so the next column is used, and
  the ramp is repeated. Eight columns give a 48-bit ID.

The work is done by a clocked controller, the logic of a CPLD next to the
array. It writes the configurations, asks the supply for high or low Vdd, and
collects the bits in a 48-bit register.

The method and the array follow the published description of the REPOMO32 ID
scheme ("Implementing a Unique Chip ID on a Reconfigurable Polymorphic
Circuit"). The section "Choices made here" lists what that description leaves
open and how this RTL fills it in.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/repomo_pkg.sv` | package | sizes, CLE configuration type, ID-procedure settings, die model thresholds |
| `rtl/cle.sv` | `cle` | one configurable logic element |
| `rtl/cfg_latches.sv` | `cfg_latches` | 32 × 8-bit configuration latches |
| `rtl/repomo32.sv` | `repomo32` | the 4 × 8 array |
| `rtl/polygate_vdd_model.sv` | `polygate_vdd_model` | **behavioural** Vdd threshold of one polymorphic gate |
| `rtl/sr_latch_bank.sv` | `sr_latch_bank` | S-R arbiter latches, n(n−1)/2 of them |
| `rtl/id_controller.sv` | `id_controller` | ID read sequencer and 48-bit ID register |
| `rtl/chip_id_top.sv` | `chip_id_top` | whole system (top) |
| `tb/vdd_ramp_model.sv` | `vdd_ramp_model` | simulation model of the programmable supply |
| `tb/tb_*.sv` | | self-checking testbenches |

## The REPOMO32 array

REPOMO32 has 32 two-input CLEs in 4 rows × 8 columns (`repomo32`). There are
primary inputs X1..X4 on the left, and Z0..Z3 are the outputs of column 8.
The array has no registers and no clock: `z` is a combinational function of
`x`, the configuration and the state of the polymorphic gates.

**CLE (`cle`).** A CLE has two 8:1 multiplexers that choose its inputs A and
B, and one 4:1 multiplexer that chooses its function. Each CLE is set by a
configuration byte:

| bits | field | meaning |
|---|---|---|
| 7:5 | `sel_a` | source of A: 0–3 = rows 1–4 of the previous column, 4–7 = rows 1–4 of the column two back |
| 4:2 | `sel_b` | source of B, coded the same way |
| 1:0 | `fn` | 0 AND, 1 OR, 2 XOR, 3 polymorphic NAND/NOR |

Column 1 has no previous column, and columns 1 and 2 have no column two back.
X1..X4 take the place of any column that does not exist. The `poly_nand` input
of a CLE is the supply-dependent state of its gate: 1 means NAND, 0 means NOR.
It matters only when `fn` = 3.

**Configuration (`cfg_latches`).** There is one 8-bit level-sensitive latch per
CLE. The CLE at column `c` and row `r` (both counted from 0) has address
`addr = 4*c + r`. To write a CLE, set `addr` and `data` and then pulse `we`
high. The addressed latch is open for as long as `we` is high, so `addr` and
`data` must stay stable during the pulse. A full configuration takes 32 steps.
The latches have no reset.

## The polymorphic gate model

`polygate_vdd_model` is the only part that is not synthesizable logic. It
stands in for the analog eight-transistor gate, and models only what the ID
needs. `nand_mode` is 1 when `vdd_mv`, the supply in millivolts, is at or
above the gate's threshold `VTH_MV`, and 0 below it. Each instance in
`chip_id_top` gets its threshold from `repomo_pkg::gate_vth_mv(DIE_SEED, i)`.
That function hashes the die number and the gate index into a value from 3801
to 3899 mV, which lies between the documented NOR and NAND ranges. A
`DIE_SEED` value therefore stands for one fabricated die.

The model has no noise, delay or hysteresis, so repeated reads of one die give
the same ID. Real silicon does not behave this way: 5.6 % to 18 % of the bits
were unstable, depending on the column.

## Reading an ID

### Routing 0 and 1 to the gates

Only column 1 sees the primary inputs, so the inputs of the NAND/NOR column
have to be carried there by CLEs acting as wires. A wire is an AND with both
inputs on the same signal (A AND A = A). The controller drives X1..X4 =
0, 1, 0, 1 (`x = 4'b1010`) and uses two settings (`repomo_pkg`):

* `wire_cfg(r)`: A = B = row r of the previous column, AND. Row r is passed on
  unchanged;
* `poly_cfg(r)`: A = row r, B = row r xor 1 of the previous column, NAND/NOR.
  Rows 1/2 and rows 3/4 form pairs, so A and B always hold inverse values.

With column k set to `poly_cfg` and every other column set to `wire_cfg`, gate
r of column k drives Z(r−1). Its output is 0 at low Vdd and 1 at high Vdd.

### S-R arbitration (`sr_latch_bank`)

There is one latch for each pair (i, j) with i < j. Z(i) is its R input and
Z(j) its S input. The pairs are numbered (0,1) (0,2) (0,3) (1,2) (1,3) (2,3),
which gives bits ID_0 (LSB) to ID_5. A latch changes only while exactly one of
its inputs is high: S alone sets it, R alone resets it, and both high hold
it. During the ramp both inputs start at 0, so the first one to rise decides
the bit:

* **1**: the higher-numbered gate (S) switched first;
* **0**: the lower-numbered gate (R) switched first.

If both rise in the same instant the latch keeps its old value. Real hardware
would be metastable here.

When Vdd falls again the outputs drop one after another, and the latches are
overwritten. The bits must therefore be copied out while Vdd is still high.
The module is parameterised by `NGATES`, so it also covers a larger array of
independent gates wired straight to latches, which gives NGATES·(NGATES−1)/2
bits.

### The sequence (`id_controller`)

After `start`, for column k = 1 … 8:

1. **Configure.** For column 1, all 32 CLEs are written: column 1 gets
   `poly_cfg`, the others `wire_cfg`. For each later column only 8 CLEs are
   written: the old NAND/NOR column becomes wires and the next column becomes
   NAND/NOR. Each write takes 3 clock cycles: set `addr`/`data`, `we` high,
   `we` low.
2. **Ramp up.** `vdd_up` goes to 1. The controller waits `RAMP_WAIT` cycles
   while the supply rises and the latches settle.
3. **Capture.** The six latch bits go into `chip_id[6(k−1)+5 : 6(k−1)]`, so
   column 1 is in the LSBs. In the same cycle `vdd_up` returns to 0.
4. **Ramp down.** The controller waits `RAMP_WAIT` cycles for the supply to
   return to 3 V.

After column 8, `done` pulses for one cycle. One read takes
88 × 3 + 8 × (2·`RAMP_WAIT` + 1) cycles from the clock edge that sees `start`.
That is 33 040 cycles at the default `RAMP_WAIT` = 2048. `vdd_up` is high for
`RAMP_WAIT` + 1 cycles per column.

There is no handshake with the supply. The supply must reach 5 V, or return
to 3 V, within `RAMP_WAIT` cycles.

## Top level: `chip_id_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | controller clock, asynchronous active-low reset |
| `start` | in | 1 | begin one ID read (sampled in idle) |
| `vdd_mv` | in | 13 | actual array supply in mV, from the external programmable supply |
| `vdd_up` | out | 1 | supply request: 1 = go to 5 V, 0 = go to 3 V |
| `busy` | out | 1 | read in progress |
| `done` | out | 1 | one-cycle pulse, `chip_id` valid |
| `chip_id` | out | 48 | the ID, column 1 in bits 5:0 |
| `z` | out | 4 | array outputs Z0..Z3, for observation |
| `col` | out | 3 | column being read (0 = column 1) |

Parameters: `RAMP_WAIT` (default 2048 cycles) and `DIE_SEED` (default 1; it
selects the simulated die's gate thresholds).

The programmable supply is not part of the RTL. On the original board it is a
digital potentiometer set by a microcontroller. `tb/vdd_ramp_model.sv` is a
small stand-in that moves `STEP_MV` per clock toward 3000 or 5000 mV.

## Choices made here

The source describes the array, the CLE multiplexers and the ID procedure, but
leaves the following open. This RTL chooses:

* the function codes of `fn` (listed in the order AND, OR, XOR, NAND/NOR) and
  the numbering of the multiplexer inputs. The source gives the select bit
  positions and says that a CLE's inputs come from the two columns to its
  left;
* what columns 1 and 2 see in place of missing columns (X1..X4);
* the address map `4*c + r`, active-high `we`, and latches without reset;
* the 0/1 pattern on X1..X4 and the row pairing of the NAND/NOR inputs;
* the S-R latch behaviour when both inputs are high (hold), and the fact that
  bit = 1 means the S gate was first;
* the clocked controller: 3 cycles per configuration step, a fixed ramp wait,
  capture before the ramp down, and the bit placement in `chip_id`;
* the whole gate model: the size and distribution of the threshold spread,
  millivolt integers, and no noise.

Not built: the analog transistor-level gate, the pads and package, the fast
input buffers, the programmable supply, the heated test chamber with its
microcontroller, and the error-correcting code that the source proposes as
future work.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/repomo_pkg.sv tb/tb_chip_id_full.sv --top-module tb_chip_id_full -Mdir obj -o sim
obj/sim
```

| testbench | what it checks |
|---|---|
| `tb_cle` | every configuration byte × every input value × both gate states, against the field decoding |
| `tb_cfg_latches` | transparency while `we` is high, hold afterwards, 500 random writes against a shadow copy |
| `tb_repomo32` | random configurations against an independent evaluation of the array; the ID settings carry each gate to its Z pin |
| `tb_polygate_vdd_model` | switching voltage of two thresholds, swept up and down |
| `tb_sr_latch_bank` | 2000 random rise orders, ties included: first-rising input wins, ties hold |
| `tb_id_controller` | 32 writes then 8 per column, the configuration before each ramp, `we` timing, `vdd_up` length, bit placement, exact cycle count |
| `tb_chip_id_top` | end to end on three dies with a fast ramp: each ID bit against the dies' switching order, distinct IDs, every mechanism occurs (full configuration, 7 partial reconfigurations, 8 ramps, gate switching, latches set and reset), cycle count |
| `tb_chip_id_full` | one read with all defaults (1 mV/clock ramp): ID and cycle count |
| `tb_chip_id_repeat` | 1000 consecutive reads of one die: bits not tied on the same ramp step never change; reports how many bits changed |
| `tb_chip_id_21dies` | 21 dies at default parameters: checks the IDs and that they are unique; reports average Hamming distance, ones/zeros and the shortest collision-free prefix |

On the model dies, `tb_chip_id_21dies` gives an average pairwise Hamming
distance of about 24.1 out of 48 bits, and the first 8 bits already tell all
21 dies apart. These numbers come from the hash-based threshold model. They
are not predictions for silicon: the published measurement on 21 real chips
found 22.8 and 10 bits.

## Where to be careful

* The ID bits come from asynchronous latches. `sr_q` is sampled into the
  clocked register only after `RAMP_WAIT` cycles of stable high Vdd. Choose
  `RAMP_WAIT` so that this holds for the real supply.
* `cfg_latches` and `sr_latch_bank` contain real latches on purpose. Timing
  analysis must treat `we` and the Z outputs as latch enables.
* In the model a tie means two gates of a pair crossed their thresholds on
  the same ramp step. The testbenches skip such pairs and count them, because
  real hardware would be metastable there.
