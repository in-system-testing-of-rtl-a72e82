# Built-in self-test of FPGA logic blocks, as synthesizable SystemVerilog

Permanent faults in an FPGA's logic fabric (a LUT memory cell stuck at 0, a
broken multiplexer input, a dead carry link) cannot be fixed by rewriting the
configuration memory; they can only be found and avoided. This design finds
them without any user pin. The fabric is loaded with a series of test
configurations, and in each one the logic blocks under test are chained so
that **every block passes its input on unchanged** (or complemented). A pattern
generator drives the first block and an analyzer checks the last one. If the
pattern arrives intact, the whole chain is fault-free. A fault anywhere
corrupts the pattern, and because every later block copies what it receives,
the error reaches the end of the chain.

The repository models this scheme for the configurable logic blocks (CLBs) of
a Xilinx 7-series-like fabric. It contains the fabric elements that are tested
(LUTs, the SLICE data path, LUT-RAM, shift-register LUTs), the test structures
built from them, a controller that reports PASS/FAIL in one status bit, and
the logic that turns a read-back of all flip-flops into a fault location. A
fault-injection port emulates a corrupted configuration bit or a stuck net, so
you can watch a fault being detected and located.

## The chained-identity idea (iterative logic array)

Older schemes fed many blocks under test (BUTs) from one pattern generator
over long wires. On large devices that congests the routing. Here the chain
only uses short links from each BUT to its neighbour:

```
TPG ──► BUT0 ──► BUT1 ──► … ──► BUT(N-1) ──► ORA ◄── TPG vector
```

Each BUT is programmed to be an identity function, so the expected ORA input
is simply the TPG vector. A second configuration programs the complement, so
every memory cell is tested for both stuck-at values. The chain output is then
the vector, complemented when N is odd.

Flip-flops inside every BUT capture the BUT's output. When the ORA sees a
mismatch, the controller drops the TPG clock enable **in the same cycle**.
The array freezes on the failing vector, and a read-back of all flip-flops
shows where the wrong values begin.

## The four configuration families (30 configurations)

| family | configurations | structure in this RTL | cycles per run |
|---|---|---|---|
| LUT | 12: identity and complement × 6 rotations | `lut_ila` of `lut_but` (6 LUTs each), 6-bit counter TPG | 64 |
| data path | 13: rows 1–13 of the table below | `dp_ila` of `slice_dp` (4 `slice_circuit`s each), 4-bit TPG | 16 × (N_SLICE + 2) |
| RAM | 3: 32×2 dual port, 32×2 single port, 64×1 single port | `ram_bist`: MATS generator → 2 RAMs → local ORA, per group | 4 × words (128 or 256) |
| shift register | 2: 32-bit and 16-bit | `srl_bist`: two rings of `srl_lut`, XOR of bit 0 | 2 × 32 × N_SRL |

`clb_bist_top` holds all four structures. The input `cfg` (a `bist_cfg_t`)
stands for the loaded bitstream: the family, and the function, rotation, row
or mode within it. Holding `rst` high stands for "configuration in progress".
When `rst` falls, the selected family runs. Only that family leaves reset.

### LUT family

A LUT has six address inputs but only one output that is used here (O6). The
widths are matched by grouping **six LUTs into one BUT**. All six LUTs share
the 6-bit address bus that comes from the previous BUT. LUT *j* stores
`a[(j+r) mod 6]` at each address *a*, or its complement, so the six O6 outputs
form the output bus. Stepping the rotation *r* through 0–5 makes every
physical LUT compute every bit. This targets faults in the address decoder.
Two functions × six rotations give the 12 LUT configurations. The BUT's O6
values are also registered, for read-back.

### Data-path family: one SLICE circuit and Table I

Each SLICE has four identical circuits (A–D). Each circuit contains:

- a LUT;
- a carry multiplexer and an XOR;
- the PRE-MUX and the CIN-MUX for the carry input;
- the M1-MUX for the carry DI input;
- a wide multiplexer (F7) that can take the neighbour circuit's O6;
- a 6-input OUT-MUX driving AO;
- a 6-input FF-MUX feeding flip-flop FFQ (AF);
- a second flip-flop (5FF) fed through M5-MUX;
- a CLK-MUX that picks the rising or the falling clock edge.

**This is the part of the design that needs the most care.** Only the
multiplexer names and input numbers are specified. Which signal arrives on
which numbered input is this model's reading. It was chosen so that every one
of the 13 settings below makes the SLICE an identity, and the testbenches
confirm that for all 13:

| mux | input 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| OUT-MUX → AO | O6 | O5 | XOR | F7 | carry (CY) | 5FF |
| FF-MUX → FFQ | O6 | O5 | AX | XOR | carry (CY) | F7 |
| M1 (carry DI) | AX | O5 | | | | |
| M5 (5FF D) | O5 | AX | | | | |
| PRE-MUX | AX | 0 | 1 | | | |
| CIN-MUX | PRE-MUX | carry chain | | | | |

The carry multiplexer gives `CY = O6 ? carry_in : DI`, and `XOR = O6 ^ carry_in`.
The wide multiplexer gives `F7 = AX ? O6(neighbour) : O6(own)`, with A paired
to B and C paired to D. The column "M2" of the settings is read as the value
that the LUT drives on O6, which selects the carry multiplexer's input.

| row | CLK | OUT | FF | M1 | M2 (O6) | M5 | CIN | PRE | link to next SLICE |
|---|---|---|---|---|---|---|---|---|---|
| 1 | 0 | 0 | 0 | – | data | – | – | – | O bus → A/B address, F bus → C/D address |
| 2 | 1 | 1 | 1 | 1 | 0 | – | – | – | same as 1 |
| 3 | 0 | 4 | 4 | 1 | 0 | – | – | – | same as 1 |
| 4 | 1 | 4 | 4 | (0) | 1: data | – | 0 | 2 | same as 1 |
| 5 | 0 | 4 | 4 | (1) | 1: ~data | – | 0 | 1 | same as 1 |
| 6 | 1 | 5 | 2 | – | – | 1 | – | – | O bus → X inputs |
| 7 | 0 | 2 | 3 | 0 | 0 | – | 0 | 0 | same as 6 |
| 8 | 1 | 2 | 3 | 0 | 0 | – | 0 | 0 | F bus → X inputs |
| 9 | 0 | 5 | (1) | – | – | 0 | – | – | same as 6 |
| 10 | 0 | 5 | 2 | – | – | 1 | – | – | same as 8 |
| 11 | – | (4) | (4) | 1 | 1 | – | 1 | – | COUT → CIN |
| 12 | 0 | 3 | 5 | – | data | – | – | – | same as 1, X inputs tied 0 |
| 13 | 1 | 3 | 5 | – | neighbour's bit | – | – | – | same as 1, X inputs tied 1 |

A value in parentheses fills a setting that the row leaves unused. The value
is this model's choice and keeps the SLICE an identity. The functions that go
into the LUTs are computed in `bist_pkg::dp_row_cfg`. With LUT links, circuit
*k* passes address bit *k*. With X links, LUT address bit 0 is the circuit's
own X input. Address pin A6 is tied high, so O6 and O5 are separate 5-input
functions (O6 from `INIT[63:32]`, O5 from `INIT[31:0]`).

Rows 4 and 5 work as follows. The TPG data drives O6, and O6 selects between
a constant carry-in (1 in row 4, 0 in row 5) and DI. In row 4, DI is AX, which
is tied to 0. In row 5, DI is O5, which carries the data.

The TPG drives its 4-bit vector on every input that the row uses: both
address buses, the X inputs, or CIN (bit 0). Flip-flops can sit in the path,
and some rows clock them on the falling edge. Each vector is therefore held
for N_SLICE + 2 cycles before the ORA compares. Which buses are compared
depends on the link: both O and F for LUT links, the linked bus for X links,
and COUT for the carry row.

One consequence of this reading: in row 10, AO (5FF) is not on the chain, so
a 5FF fault is caught by row 6, not by row 10.

### RAM family

Only one SLICE in three can be RAM (a SLICEM). The other SLICEs have already
been tested, so they host small distributed pattern generators. Each
generator runs the MATS march `{w0 everywhere; (r0, w1) per word; r1
everywhere}` on two neighbouring LUT-RAMs. A local ORA compares the two RAMs
during the read cycles and sets its flip-flop on any difference. The RAM test
fails if the OR of all local ORAs is 1. The ORA that is set points at the
faulty pair. Comparing two RAMs needs no expected values. A fault that hit
both RAMs of a pair identically would escape, which the single-fault
assumption rules out.

### Shift-register family

The SRLs are split into two regions. Each region is cascaded into one ring,
and both rings start with `1010…`. They shift together. In a fault-free ring,
bit 0 alternates every cycle, identically in both rings. A stuck cell copies
its value to every cell after it. Within one revolution that run of constant
cells reaches bit 0, and the XOR of the two bit-0s turns 1.

## Fault isolation from read-back

- **ILA (`ila_fault_locator`).** Find the first unit whose flip-flops differ
  from the expected value (the frozen vector, complemented for even unit
  numbers under the complement function). Under a single stuck-at fault, one
  wrong bit means that the fault is in this unit. Several wrong bits mean that
  this unit received a wrong input, so the fault is in the unit before it. In
  the LUT family a faulty LUT always gives a single wrong bit, so the located
  BUT is exactly the faulty one. `tb_clb_bist_top` checks this for random
  faults.
- **Data path (the same `ila_fault_locator` on the FFQ read-back).** In
  `clb_bist_top`, a second locator compares every SLICE's FFQ outputs with
  the frozen vector. This works for the rows where the SLICE-to-SLICE bus
  carries the vector, the rows with LUT connectivity. A fault on a net
  before the FF-MUX shows up in its own SLICE. A fault on the OUT-MUX output
  shows up first in the next SLICE. So the located SLICE is the faulty one
  or its successor. In this model each LUT of the next SLICE reads only one
  bit of the bus, so a wrong bus bit gives one wrong flip-flop, not several.
  The multiple-bit rule therefore does not separate these two cases here.
  `tb_clb_bist_top` checks that the fault lies in the located SLICE or the
  one before it.
- **Shift registers (`srl_fault_locator`).** Find the start of the run of
  equal neighbours in the ring. That cell is the stuck cell, or the cell just
  before it when that cell already held the stuck value.
- **RAM.** The local ORA flip-flop that is set names the pair.

In the device, the host does this analysis on read-back data. The RTL runs
the same rules as combinational logic, so the results can be checked in
simulation.

## Controller, status bit and timing

`bist_controller` starts the loaded family when configuration ends. It keeps
the TPG enabled while the patterns match. The run ends on the last pattern, or
on the first mismatch. `status_done` (the status bit that the host reads back)
becomes 1 for PASS and stays 0 for FAIL. `pass`/`fail` give the same result on
separate outputs.

From the release of `rst`, `finished` rises after:

| family | cycles |
|---|---|
| LUT | 65 |
| data path | 16·(N_SLICE+2) + 1 |
| RAM | 4·words + 2 |
| shift register | 64·N_SRL + 2 |

The end-to-end testbench checks these counts. There is a single clock, which
in the device is derived from the configuration logic.

## Modules

| module | role |
|---|---|
| `bist_pkg` | types, fault descriptor, LUT contents for every configuration (`ila_lut_init`, `dp_row_cfg`) |
| `lut6` | LUT with O6/O5 |
| `lut_but`, `lut_ila` | LUT BUT and its chain |
| `ila_tpg`, `ila_ora` | counter TPG with clock enable and hold; comparator with sticky fail |
| `slice_circuit`, `slice_dp`, `dp_ila` | SLICE circuit, SLICE, and the data-path chain |
| `lutram`, `mats_tpg`, `local_ora`, `ram_bist` | RAM test |
| `srl_lut`, `srl_bist` | shift-register test |
| `ila_fault_locator`, `srl_fault_locator` | read-back analysis |
| `bist_controller` | run control, TPG stop, PASS/FAIL status |
| `clb_bist_top` | everything together |

Fault descriptor (`fault_t`): `en`, `unit`, `sub`, `idx`, `value`. It forces
one element to `value`:

- LUT family: memory cell `idx` of LUT `sub` in BUT `unit`.
- Data-path family: net `idx` (a `dp_site_e`) of circuit `sub` in SLICE
  `unit`.
- RAM family: cell `idx` of RAM `unit`.
- Shift-register family: cell `idx` of SRL `unit`, where `unit` = ring×256 +
  SRL index.

## Sizes

The top's parameters set the size of the test area:

| parameter | default | what it counts |
|---|---|---|
| `N_BUT` | 32 | LUT BUTs (192 LUTs) |
| `N_SLICE` | 16 | SLICEs in the data-path chain |
| `N_RAM_GROUP` | 4 | RAM groups (8 LUT-RAMs) |
| `N_SRL` | 8 | SRLs per ring |

The method is meant to cover a whole device in one pass per configuration,
without splitting it into partitions. As an example, an XC7Z020 has 53,200
LUTs and 13,300 SLICEs, of which 4,350 are SLICEMs. That would need about
8,866 LUT BUTs, a 13,300-SLICE data-path chain, about 8,700 RAM groups (17,400 LUT-RAMs) and
rings of about 8,700 SRLs each. These device figures are general knowledge,
not part of this design. The defaults are a small test area. All four
parameters can be raised. The data-path run time grows with the square of
N_SLICE, because every vector is held for N_SLICE + 2 cycles.

## Simulating

Every testbench in `tb/` checks its results itself and prints one line,
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/bist_pkg.sv tb/tb_clb_bist_top.sv \
          --top-module tb_clb_bist_top -y rtl -Mdir obj && obj/Vtb_clb_bist_top
```

Replace the top module with any other `tb_<module>`. `tb_clb_bist_top` runs
at the default sizes and does the following:

- It runs all 30 configurations fault-free and checks the status bit and the
  cycle count of each.
- It injects LUT, data-path, RAM and shift-register faults and checks
  detection, the frozen TPG vector and the located unit.
- It counts how often each mechanism occurred: identity, complement,
  rotation, each link type, clock inversion, wide mux, each RAM and SRL mode,
  TPG stop and each kind of location. A mechanism that never occurred counts
  as a failure.

## How far to trust it, and where it is this model's own

- Fabric elements are behavioural but synthesizable models.
  - The LUT memory is a configuration input.
  - Faults are forced values on nets or cells.
  - Gate-level faults inside a multiplexer (a stuck select line, exposed by
    holding the unused inputs at 1) are not modelled. The multiplexers are
    plain `case` statements.
- Which signal is on which multiplexer input, and the fill-in settings for
  unused multiplexers, are interpretations (see the data-path section).
- The data-path TPG is 4 bits wide and drives both address buses with the
  same vector.
- In the device, the TPG and the ORA of the ILA tests sit in one DSP block.
  Here they are ordinary logic.
- The following come from general knowledge and are not specified by the
  method:
  - the MATS sequence details;
  - the RAM bit placement;
  - the SRL cascade tap;
  - the run length of the ring test (two revolutions);
  - PASS = 1 in the status bit.
- The host, the configuration port, bitstream storage, partial read-back
  and the interconnect are not part of the RTL. Read-back is represented by
  the flip-flop outputs of `clb_bist_top`.
