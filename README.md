# Low-power weighted pseudo-random scan BIST with fixed-value scan cells

Pseudo-random scan BIST has two known weak points. Some faults are hard to
reach with random patterns, so fault coverage stalls. And random patterns
make far more of the logic switch than normal operation does, so test power
is high. This design tackles both with one mechanism: **three-valued weight
sets**.

A weight set gives each scan cell a weight of 0, 1 or 0.5:

* A cell with weight 0 or 1 is *fixed*. It presents that constant to the
  circuit under test (CUT) for a whole run of patterns.
* A cell with weight 0.5 is *random*. It gets fresh LFSR values every pattern.

Fixing cells steers the patterns towards faults that random patterns miss.
The logic behind a fixed cell also does not switch, which saves power. The
weight sets are chosen offline so that about 90% of the cells are fixed.
The cells that get fixed are the ones that save the most power.

The hardware applies these weight sets with a special scan cell, the
**SFNC cell** (Scan-Fixed-Normal-Capture). Each cell stores its own fixed
value and its own fixed/normal flag. While the cell is fixed, its output to
the logic holds that value, and shifting and capture go on through the scan
path underneath. The rest is a standard STUMPS scan-BIST:

* an LFSR feeds parallel scan chains;
* a MISR compacts what the chains shift out;
* a ROM holds the weight sets;
* a controller sequences the test.

The RTL is SystemVerilog (IEEE 1800-2017). It lints cleanly with
Verilator 5 and elaborates in Yosys through its slang front end.

## The SFNC cell (`rtl/sfnc_cell.sv`)

```
             scan_en                          C=1: data_out = F
  scan_in ─┐  │                               C=0: data_out = Q
           ├─[mux]──► Q (scan flip-flop) ──┬──────────────► scan_out
  data_in ─┘                               ├─► F  (loaded by fixed_load)
                                           ├─► C  (loaded by config_load)
                                           └─[mux: C ? F : Q]──► data_out
```

| signal | meaning |
|---|---|
| `ctrl.scan_en` | 1: Q takes `scan_in` (shift). 0: Q takes `data_in` (capture). |
| `ctrl.fixed_load` | F takes Q (the value Q had before this clock edge). |
| `ctrl.config_load` | C takes Q (the value Q had before this clock edge). |
| `scan_out` | always Q, so the chain shifts the same way in both modes |
| `data_out` | goes to the CUT: F while C = 1 (fixed), Q while C = 0 (normal) |
| `rst_n` | asynchronous. Clears C, so the cell starts in normal mode. Also clears Q and F. |

With C = 0 the cell is an ordinary mux-D scan flip-flop. That is how it
behaves in functional operation.

With C = 1 the cell still shifts and captures as usual, and `scan_out`
carries Q as always. But the CUT sees only F.

The cell can capture in both modes. This is what makes it usable in a
test-per-scan STUMPS architecture: there, every pattern ends with a capture
of the CUT response into the chains.

### Loading a weight set

A weight set takes two full scans of the chain.

1. **Weight vector.** Shift in the value each fixed cell should hold.
   Random cells can take anything. Then give one cycle of `fixed_load`, which
   copies every Q into F.
2. **Configuration vector.** Shift in 1 for a fixed cell and 0 for a random
   cell. Then give one cycle of `config_load`, which copies every Q into C.

For example, take the weight set `1XX110XX01`, where X means random. Its
weight vector is `1--110--01`, where a dash is any value. Its configuration
vector is `1001110011`.

From then on the fixed cells hold their values on `data_out`. The normal
cells follow the pseudo-random patterns shifted through the chain.

Each strobe takes a clock cycle of its own, right after the last shift. F
and C copy Q as it was *before* that edge. Scan enable is low in the strobe
cycle, so the chains capture during it. This does no harm, because the
next scan overwrites the captured values and they are never compacted.

### Implementation note

The cell is described as four level-sensitive latches: the M/S pair of the
scan flip-flop, plus a minimum-size F latch and a minimum-size C latch. Here
the M/S pair is a rising-edge flip-flop, and F and C are enable flip-flops on
the same clock. The cycle-level behaviour is the same, without latch timing
in the RTL.

A cell built from latches would cost:

* 2 minimum-size latches and a mux more than a standard scan cell;
* about 40% more cell area (latch 30, inverter 7, mux 15, minimum latch 9
  area units);
* about 3.6% more chip area, when flip-flops are 15% of the logic and logic
  is 60% of the chip.

An ASIC flow that wants that cost should map F and C to small latches.

## One test session (`rtl/bist_controller.sv`)

`bist_start` (taken only in idle) runs one session. L is the chain length,
R the number of random patterns, N the number of weighted patterns per set,
and S the number of weight sets.

| phase | cycles | scan input | what happens |
|---|---|---|---|
| `PH_RANDOM` | R·(L+1) | LFSR | R pure random patterns with every cell normal (C = 0 from reset) |
| for each weight set s = 0..S-1: | | | |
| `PH_LOAD_W` | L | ROM | weight vector of set s; this scan also shifts out the last response |
| `PH_FIX_LOAD` | 1 | – | `fixed_load` |
| `PH_LOAD_C` | L | ROM | configuration vector of set s |
| `PH_CFG_LOAD` | 1 | – | `config_load` |
| `PH_WEIGHTED` | N·(L+1) | LFSR | N weighted patterns |
| `PH_UNLOAD` | L | LFSR | last response shifted into the MISR |
| `PH_DONE` | – | – | `bist_done` = 1 and `bist_signature` is final |

A pattern is L shift cycles (LFSR to the chains, LFSR stepping) followed by
one capture cycle (`bist_capture`). The response captured by a pattern goes
into the MISR during the next L shift cycles. Those can be the next pattern,
the next weight-vector load or the final unload. The configuration scans
only push out the weight vector, so they are not compacted.

Session length, from the cycle after `bist_start` to the first cycle of
`bist_done`:

    R·(L+1) + S·(N+2)·(L+1) + L

At the defaults (L = 107, R = 1024, N = 256, S = 12) that is
**445 067 cycles**.

The controller never clears the C bits. After a session, the fixed cells
stay fixed until `rst_n` is asserted. So a new session, or a return to
functional operation, needs a reset. `bist_start` is ignored in
`PH_DONE`.

The offline weight-selection procedure lowers the number of random cells
when a weight set detects nothing new, and it stops at the target fault
coverage. Both steps decide which weight sets go into the ROM. On chip, the
controller just applies all S sets in order.

## Weight ROM format (`rtl/weight_rom.sv`)

Each weight set is stored uncompressed as two scan vectors, 2 bits per scan
cell. A ROM word is one shift cycle, with one bit per chain. The address and
bit position are:

    address = (2·s + v)·L + j        v = 0: weight vector, v = 1: configuration vector
    bit c of the word  -> chain c, and ends in cell L-1-j after the scan

Here j is the shift cycle. Cell 0 is the cell next to the scan input. Reads
are asynchronous.

The ROM image is the top-level parameter `ROM_CONTENTS`, with word a at bits
`[a*NUM_CHAINS +: NUM_CHAINS]`. Real contents come from running a weight
selection for the actual CUT. That is a software step, outside this RTL. It
works as follows:

1. Run pure random patterns first.
2. Order the remaining faults by how few deterministic test vectors detect
   them.
3. Start a weight set from the vector with the highest coverage for the
   hardest fault.
4. Repeatedly merge in the test vector with the highest *power saved*.
   Power saved is the summed estimated saving of the positions where that
   vector agrees with the weight set. Positions that conflict become random.
5. Stop merging when K positions are random.
6. Turn any leftover don't-cares into fixed values with minimum-transition
   fill.

The default image is an example, built by `bist_pkg::example_cell_bit()`:

* Per set and cell, h = mix32(s·65536 + c·4096 + p).
* The cell is random when h[31:24] < 26, which is about 10% of the cells.
* Otherwise it is fixed to the XOR of h[23:0].

The example lets the design be simulated without a CUT-specific ROM. It is
not a set of weights for any real circuit.

## Pattern source and response compaction

* **LFSR** (`rtl/lfsr.sv`): a 32-bit Fibonacci LFSR with polynomial
  x^32 + x^22 + x^2 + x + 1 and seed 1. Chain c takes stage c·32/NUM_CHAINS.
  There is no phase shifter, so neighbouring chains see delayed copies of the
  same sequence.
* **Scan-input multiplexer** (`rtl/scan_in_mux.sv`): for every chain, selects
  the ROM while vectors are being loaded and the LFSR otherwise.
* **MISR** (`rtl/misr.sv`): 32 bits, same polynomial as the LFSR. The chain
  outputs are XORed into the low bits. It is cleared when a session starts.

## Top level (`rtl/sfnc_stumps_bist.sv`)

The top holds:

* the chains, each an `sfnc_scan_chain` of `CHAIN_LEN` cells;
* the LFSR, the weight ROM and the input multiplexer;
* the controller;
* the MISR.

The CUT's combinational logic sits outside the top and connects through
two ports:

* `cut_data_out[chain][cell]` carries the cell outputs (DO) to the CUT;
* `cut_data_in[chain][cell]` carries the CUT's next-state values (DI) back
  to the cells.

Outside a session, scan enable is low and every cell is a functional
flip-flop.

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `bist_start` | in | 1 | start a session (idle only) |
| `bist_busy`, `bist_done` | out | 1 | session running / finished |
| `bist_signature` | out | `MISR_WIDTH` | MISR contents; final when `bist_done` |
| `bist_phase` | out | 4 | `bist_pkg::bist_phase_e` |
| `bist_capture` | out | 1 | capture cycle of a pattern |
| `cut_data_out` | out | `NUM_CHAINS`×`CHAIN_LEN` | SFNC DO outputs |
| `cut_data_in` | in | `NUM_CHAINS`×`CHAIN_LEN` | SFNC DI inputs |

| parameter | default | origin |
|---|---|---|
| `NUM_CHAINS` | 2 | own choice |
| `CHAIN_LEN` | 107 | 2 × 107 = 214 cells, the scan-cell count of ISCAS-89 s5378 |
| `NUM_SETS` | 12 | the weight-set count reported for s5378 |
| `NUM_RANDOM` | 1024 | initial pure random patterns (R) used in the evaluation |
| `NUM_WEIGHTED` | 256 | weighted patterns per weight set (N) used in the evaluation |
| `LFSR_WIDTH`, `LFSR_TAPS`, `LFSR_SEED` | 32, x^32+x^22+x^2+x+1, 1 | own choice |
| `MISR_WIDTH`, `MISR_TAPS` | 32, same polynomial | own choice |
| `ROM_CONTENTS` | example image | must be replaced by real weight sets |

The default ROM is 2 × 214 × 12 = 5136 bits. Shared types are in
`rtl/bist_pkg.sv`:

* `scan_ctrl_t`, the control bundle sent to every cell;
* `scan_src_e`, the multiplexer select;
* `bist_phase_e`, the controller phases.

### Sizing for the evaluated circuits

The scheme was evaluated on four ISCAS-89 circuits. The table below gives,
for each, the scan-cell and weight-set counts reported for it and the ROM
size, 2 × cells × sets bits. All four sizes fit by setting parameters. Only
s5378 fits the defaults.

| circuit | scan cells | weight sets | ROM bits | parameters used in `tb_stumps_workloads` |
|---|---|---|---|---|
| s5378 | 214 | 12 | 5 136 | defaults (`tb_sfnc_stumps_bist`) |
| s9234 | 247 | 50 | 24 700 | 13 chains × 19, 50 sets |
| s13207 | 611 | 29 | 35 438 | 13 chains × 47, 29 sets |
| s15850 | 700 | 12 | 16 800 | 20 chains × 35, 12 sets |

The split into chains is this design's choice. All chains of one instance
have the same length, so pad with dummy cells if the cell count does not
divide evenly.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_sfnc_cell` | Every cycle of 2000 random control/data cycles against a Q/F/C model. Reset. A directed fix/hold/release sequence. |
| `tb_sfnc_scan_chain` | Four cells wired functionally as a shift register: load a weight set (cell 1 = 0, cell 2 = 1), load configuration `0110`, then scan, capture and scan out. Cells 1 and 2 must hold on DO while cells 0 and 3 follow their flip-flops. Then 3000 random cycles against a model. |
| `tb_lfsr` | The 8-bit instance has period exactly 255, holds when disabled, and matches the recurrence. The default 32-bit instance matches the recurrence. |
| `tb_misr` | Random data, enable and clear against a model, on 16-bit and 32-bit instances. |
| `tb_weight_rom` | Every word of a small custom ROM. An out-of-range read. The default image cell by cell against the example formula, which checks the layout. |
| `tb_scan_in_mux` | Exhaustive. |
| `tb_bist_controller` | Every output of a small instance, every cycle, against a schedule built from loops. `bist_start` is ignored while busy or done. Default-size session length is 445 067 cycles. |
| `tb_sfnc_stumps_bist` | Full default size: one whole session. See below. |
| `tb_stumps_workloads` | The same model, in `tb/stumps_session_check.sv`, for the s9234, s13207 and s15850 sizes. |

In `tb_sfnc_stumps_bist`, a made-up nonlinear CUT closes the loop. A
reference model of all cells, the LFSR and the MISR follows the expected
schedule. Every cycle, all 214 DO outputs and the status outputs are
compared with the model. At the end the signature is compared. The test
counts every mechanism and each must occur:

* random patterns;
* `fixed_load` and `config_load`;
* weighted patterns and captures;
* fixed cells holding a value different from the flip-flop underneath;
* MISR compaction.

Fixed cells must never toggle during weighted patterns.

The testbenches also report the DO toggles per pattern, which stand in
for the switching the CUT would see. With the example weight sets
(about 10% random cells):

| size | random patterns | weighted patterns |
|---|---|---|
| 214 cells | 11 528 | 1 222 |
| 611 cells | 14 668 | 1 510 |

That is about a 90% reduction. This count is much simpler than a real power
estimate, which would weight every node transition inside the CUT by its
fanout. It is also not a comparison with any other weight-selection method.

### Simulating

With Verilator 5, run from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/bist_pkg.sv tb/tb_sfnc_stumps_bist.sv --top-module tb_sfnc_stumps_bist
    ./obj_dir/Vtb_sfnc_stumps_bist

Replace the testbench name to run any other test. The default-size
end-to-end test simulates in a few seconds. The workload test takes about
two minutes to compile.

## Where this RTL departs from, or adds to, the scheme

* **Latches become flip-flops.** The cell's M/S pair is a flip-flop, and
  F and C are enable flip-flops rather than level-sensitive latches.
* **The F strobe is called `fixed_load`.** The scheme names this control
  both "Fixed_Mode" and "Fixed_Load". Its role is to copy the scan value
  into F at the end of the weight-vector scan, so it is named for that.
* **Reset is wider than required.** Clearing Q and F at reset, in addition
  to C, is an addition.
* **No circuit-specific data is included.** The weight-selection software
  and the power-estimation runs are not part of the RTL. The ROM holds an
  example image, not weight sets for a real circuit.
* **Own choices for unstated details.** These are:
  * the number of chains;
  * the LFSR and MISR width and polynomial, and the LFSR tap spacing;
  * having no phase shifter;
  * the ROM word layout and its asynchronous read;
  * strobe cycles with scan enable low;
  * the final unload phase and the MISR enables;
  * no clearing of the C bits at the end of a session.
* **The ROM is not compressed.** The stored weight data is highly
  compressible, but this design stores it plainly.
* **No output evaluation.** The signature is only output. Comparing it with
  a golden value is left to the user.
