# Serial fault simulation of the c17 benchmark, in synthesizable SystemVerilog

Fault simulation answers one question for every modelled fault in a circuit:
which test vectors make the faulty circuit's outputs differ from the fault-free
circuit's? The answers form a *fault dictionary* (fault → detecting vectors),
and the share of faults detected by at least one vector is the *fault coverage*:

    FC = F_D / F_T × 100 %      (F_D detected faults, F_T faults in the list)

The simplest method, serial fault simulation, activates one fault at a time
and applies the test vectors to it. This design does that in hardware for
the ISCAS-85 benchmark **c17**. Fault-free code is rewritten into
*instrumented* copies. Each copy carries a fault built into the logic, and a
small demultiplexer (the FISA unit) switches that fault on and off. The
fault-free ("golden") circuit and all faulty copies run side by side on the
same test vectors. A comparator per copy reports when the copy's response
differs from the golden response. The detection logic and a response memory
then build the fault dictionary and the coverage as the run proceeds.

With the default settings (12 faults, one per copy, 32 vectors, bit-flip
model) a run takes 64 clock cycles. It finds all 12 faults, so the coverage is
100 %. The dictionary it stores matches the published c17 dictionary.

## The circuit under test: c17 and its twelve fault sites

c17 has six 2-input NAND gates:

    G10 = NAND(G1, G3)    G11 = NAND(G3, G6)    G16 = NAND(G2, G11)   (G_1, G_2, G_3)
    G19 = NAND(G11, G7)   G22 = NAND(G10, G16)  G23 = NAND(G16, G19)  (G_4, G_5, G_6)

A test vector is the 5-bit number `{G7, G6, G3, G2, G1}`, so G1 is the LSB
and vector *k* is the binary value *k*. A response is `{G23, G22}`.

The fault sites are the twelve gate **input pins**. The nets G3, G11 and G16
fan out, and each branch is a separate site. Faults are numbered in netlist
order: gate by gate, and first input before second input. The numbering
decides how the dictionary reads, so it is given in full. The schematic
line labels C1..C12 are the names usually drawn on the c17 diagram.

| fault | pin             | line | fault | pin              | line |
|-------|-----------------|------|-------|------------------|------|
| f1    | G1 into G_1     | C1   | f7    | G11 into G_4     | C9   |
| f2    | G3 into G_1     | C2   | f8    | G7 into G_4      | C6   |
| f3    | G3 into G_2     | C3   | f9    | G10 into G_5     | C7   |
| f4    | G6 into G_2     | C4   | f10   | G16 into G_5     | C10  |
| f5    | G2 into G_3     | C5   | f11   | G16 into G_6     | C11  |
| f6    | G11 into G_3    | C8   | f12   | G19 into G_6     | C12  |

Three fault models are available (`sfs_pkg::fault_model_e`). Each is applied
to the pin while its enable `en` is high:

* `FM_BIT_FLIP`: `pin ^ en`, the inverted value. This is the default.
* `FM_STUCK_AT_0`: `pin & ~en`.
* `FM_STUCK_AT_1`: `pin | en`.

## Instrumented copies and the FISA unit

`c17_faulty` is c17 with an injector on each pin listed in its `FAULT_SITES`
mask. The pins not in the mask are plain wires. The injector enables come
from a **FISA unit** (Fault Injection, Selection and Activation,
`fisa_unit`). This unit is a demultiplexer. It routes the fault injection
signal FIS, tied to 1, to the one enable line named by the copy's `select`
input:

* `select = 0`: no fault. The copy behaves exactly like the golden circuit.
* `select = k` (1 ≤ k ≤ N): the *k*-th fault of the copy is active, counting
  from the lowest site in the mask.
* `select > N`: no fault.

The select port is `ceil(log2(N+1))` bits wide, so a single-fault copy has a
1-bit "fault on" input. The coding starts at 1 so that code 0 means
"fault-free" in every copy. One sequencer can then drive all copies together.
A common alternative numbers the first fault 0 and keeps the highest code for
"none". It is not used here.

## The simulator top: `serial_fault_sim_top`

    tv_sequencer ──tv──► c17 (golden) ────────────────┐
         │        └────► c17_faulty copy 0..N-1 ──► response_comparator[c] ── cmp[c]
         └─select──────► (select of every copy)                               │
                                                                               ▼
                         fault_dict_mem ◄── we / wmask / wdata ──── fault_detector
                                                                   ─► detected, F_D, FC

**Fault distribution.** `FAULTS_PER_COPY = K` splits the 12 faults into
contiguous groups of K. There are `ceil(12/K)` copies, and copy *c* holds
faults *cK .. cK+K-1*. Some examples:

* K = 1 (default): 12 copies of one fault each.
* K = 5: copies of 5, 5 and 2 faults.
* K = 12: a single copy. Here one fault is active at a time in one circuit,
  which is serial fault simulation in the strict sense.

**Schedule (`tv_sequencer`).** After `start`, the vectors 0..31 are applied
in order. Each vector is held for K+1 cycles, with select = 0, 1, …, K:

* In the select = 0 cycle all faults are off. Every comparator must stay
  low. If one fires, `leak_err` latches. This checks that the
  instrumentation does not disturb the fault-free function.
* In a select = p cycle, comparator *c* reports on fault *cK + p − 1*, for
  the current vector.

A run therefore lasts `32 × (K+1)` cycles: 64 cycles by default, 416 cycles
for K = 12. `done` then rises and stays high until the next `start`. A `start`
issued while `busy` is ignored. A `start` issued when idle or done clears the
previous results.

**Comparators (`response_comparator`).** There is one comparator per copy. It
outputs `|(golden ^ faulty)`. These are the `cmp` outputs of the top. With
K = 1 the outputs are cmp1..cmp12, one per fault.

**Fault detection (`fault_detector`).** This block turns the comparator
outputs into per-fault results:

* `wmask` marks the faults active in the current cycle, and `wdata` holds
  their comparator bits.
* `detected` holds one sticky flag per fault.
* `fd_count` is F_D.
* `fc_percent` is `F_D × 100 / 12`, rounded down.

`detected` and `leak_err` update one clock after the cycle that caused them.

**Response memory (`fault_dict_mem`).** The memory holds 32 words of 12 bits.
Bit *f* of word *v* is set when vector *v* detects fault *f*. Writes are
bit-masked, because with K > 1 the bits of one word arrive in different
cycles. Every bit is written once per run, so no clear is needed. Reading
word *v* through `dict_rd_addr` gives that word on `dict_rd_data` one clock
later. Reading one bit column across all words gives one row of the fault
dictionary.

### Top-level ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | begin a run (ignored while busy) |
| `busy`, `done` | out | 1 | run in progress / finished (held) |
| `tv` | out | 5 | vector being applied |
| `select` | out | `ceil(log2(K+1))` | fault select code being applied |
| `cmp` | out | `ceil(12/K)` | live comparator outputs |
| `detected` | out | 12 | sticky detected flag per fault |
| `fd_count` | out | 4 | detected faults F_D |
| `fc_percent` | out | 7 | fault coverage, % (rounded down) |
| `leak_err` | out | 1 | a comparator fired with all faults off |
| `dict_rd_addr` / `dict_rd_data` | in / out | 5 / 12 | dictionary read port, 1-cycle latency |

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `FAULTS_PER_COPY` | 1 | faults per copy |
| `FAULT_MODEL` | `FM_BIT_FLIP` | fault model of every copy |
| `N_VECTORS` | 32 | number of vectors applied, from 0 upward |

## Result at the default configuration

The full-size testbench prints the stored dictionary, read back from the
memory:

    f1   4,5,12,13,14,15,20,21,28,29,30,31
    f2   1,5,9,13,15,17,21,25,29,31
    f3   10,11,14,15,24..31
    f4   6,7,14,15,20..23,28..31
    f5   0..11,16..20,22,24..27
    f6   2,3,6,7,10,11,14,15,18,19,22,26,27,30,31
    f7   16,17,20,21,24,25,28..31
    f8   0,1,4,5,8,9,16,17,20,21,24,25
    f9   0,1,4,5,8,9,12..17,20,21,24,25,28..31
    f10  0..4,6,8..12,14,16..20,22,24..28,30
    f11  0..15,28..31
    f12  0,1,4,5,8,9,12..17,20,21,24,25,28..31
    F_T = 12, 32 vectors, FC = 100 %

The same set-up accepts the stuck-at models. With all 32 vectors, every
stuck-at-0 and every stuck-at-1 fault on these pins is also detected.

## How far this follows the original set-up, and what is its own

These points follow the published set-up:

* the c17 netlist;
* the golden copy plus faulty copies fed by one vector source, with one
  comparator per copy;
* the bit-flip injection as an XOR on a gate input;
* a demultiplexer fault controller with FIS tied to 1 and a one-bit select
  on single-fault copies;
* three fault models;
* contiguous distribution of faults over copies;
* 32 exhaustive vectors;
* the coverage formula;
* the resulting dictionary and the 100 % coverage.

These are this design's own choices:

* **Clocked operation.** The original top is driven by a simulation
  testbench. Here a sequencer with a start/busy/done handshake steps through
  (vector, select) pairs, one per cycle.
* **Coding of the fault-free select.** Code 0 means no fault, and codes 1..N
  select the copy's faults. The select = 0 cycle of each vector and the
  `leak_err` check follow from this.
* **Stuck-at injection.** The stuck-at forms (`pin & ~en`, `pin | en`) are
  the simplest gates that give those models.
* **Coverage in hardware.** The detected flags, F_D and the coverage
  percentage are computed in hardware. In the original flow an offline script
  computes them from stored simulation output.
* **Memory organisation.** One word per vector, bit-masked writes and a
  registered read port.
* **One parameterised copy.** The generated per-copy source files are
  replaced by one parameterised module with a site mask.

Not built:

* **Fault dropping.** Fault dropping stops applying vectors to a fault once
  it is detected. The dictionary needs every detecting vector, so all
  vectors are always applied.
* **Code generation for other circuits.** The netlist rewriting that would
  instrument an arbitrary circuit is not built. The RTL is written for c17
  only. Another circuit needs its own golden and instrumented modules, with
  the same FISA/comparator/detector/memory around them.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `sfs_pkg.sv` | types, fault-model enum, injection function, site/copy helpers |
| `c17.sv` | golden circuit |
| `c17_faulty.sv` | instrumented copy |
| `fisa_unit.sv` | fault select demultiplexer |
| `response_comparator.sv` | response comparator |
| `tv_sequencer.sv` | vector/select sequencer |
| `fault_detector.sv` | detected flags, F_D, FC, memory write, leak check |
| `fault_dict_mem.sv` | dictionary memory |
| `serial_fault_sim_top.sv` | top |

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_serial_fault_sim_top.sv`: the default configuration end to end, run
  twice. It checks the comparators cycle by cycle, the 64-cycle run length,
  F_D, FC, and all 32 memory words.
* `tb_sfs_top_variants.sv`: three more configurations:
  * K = 3 with bit-flip;
  * K = 5 with stuck-at-0;
  * K = 12 with stuck-at-1.
* `sfs_top_runner.sv`: the helper that runs one variant.
* `sfs_ref_pkg.sv`: the truth table, the bit-flip dictionary as constants,
  and an independent reference model with pin faults.

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/sfs_pkg.sv tb/sfs_ref_pkg.sv \
        tb/tb_serial_fault_sim_top.sv --top-module tb_serial_fault_sim_top -Mdir obj
    obj/Vtb_serial_fault_sim_top

Any other testbench builds the same way. Replace the file and the top module
name. Every run completes in well under a second. To lint a module:

    verilator --lint-only -Wall -Irtl rtl/sfs_pkg.sv rtl/serial_fault_sim_top.sv

To change the configuration, set `FAULTS_PER_COPY` (1..12) and `FAULT_MODEL`
on `serial_fault_sim_top`. Widths of `select` and `cmp` follow from
`FAULTS_PER_COPY`, as in the port table.
