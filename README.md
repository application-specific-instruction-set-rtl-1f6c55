# A parametric VLIW / multi-SIMD processor for design space exploration

This is a small, statically scheduled processor whose shape is fixed by three
numbers: how many SIMD units it has, how wide they are, and how many scalar
units sit next to them. A configuration is written `(SIMD units, SIMD width,
scalar units)`. `(1, 4, 0)` is one 4-wide vector unit, `(0, 0, 4)` is a 4-issue
VLIW machine of scalar units, and `(1, 4, 1)` has one of each. The point of the
model is to turn a candidate found by an early design-space search into real,
synthesizable hardware. You change parameters, not RTL, and then measure cycles
and area on the real thing.

Each cycle the processor fetches one *bundle*, with one instruction per unit.
All units read and write one shared register file. That register file is split
into as many banks as there are data lanes in the machine, so every lane can
read two operands and write one result in every cycle. The hardware does no
dependency checking. The program (hand-written or compiler-generated) must
space dependent instructions far enough apart and keep data where the vector
units expect it. There are no branches and no loads or stores. Data is
preloaded into the register file, the program runs straight through, and the
results are read back.

## Configurations and parameters

`asip_top` parameters, with their defaults:

| parameter    | default | meaning |
|--------------|---------|---------|
| `NUM_SIMD`   | 1       | number of SIMD pipelines |
| `SIMD_W`     | 4       | elements per vector (all SIMD units) |
| `NUM_SCALAR` | 1       | number of scalar pipelines |
| `DATA_W`     | 32      | width of a data word (signed integer) |
| `RF_DEPTH`   | 128     | words in each register bank |
| `PERM_DEPTH` | 16      | entries in each permutation memory |
| `IMEM_DEPTH` | 4096    | bundles of instruction memory |
| `PERM_INIT`  | `""`    | hex file loaded into every permutation memory at reset; empty for the default table |

The default is `(1, 4, 1)` because it contains both kinds of pipeline. For
`(1, 4, 0)`, set `NUM_SCALAR=0`. For `(0, 0, 4)`, set `NUM_SIMD=0, SIMD_W=0,
NUM_SCALAR=4`. Both are simulated by the workload testbenches. Every other
width in the design is derived from these parameters:

| derived                | formula                               | at (1,4,1) |
|------------------------|---------------------------------------|------------|
| banks `NB`             | `SIMD_W*NUM_SIMD + NUM_SCALAR`        | 5 |
| bank index bits        | `ceil(log2(NB))` (at least 1)         | 3 |
| slot index bits        | `log2(RF_DEPTH)`                      | 7 |
| register address `AW`  | slot bits + bank bits                 | 10 |
| permutation address    | `log2(PERM_DEPTH)`                    | 4 |
| scalar instruction     | `4 + 3*AW`                            | 34 bits |
| SIMD instruction       | `4 + 3*AW + 2*perm address`           | 42 bits |

## Bundles and instruction formats

A bundle has one slot per pipeline. The SIMD slots come first (slot
`0..NUM_SIMD-1`), then the scalar slots. Each slot has its own instruction
memory (`instr_mem`), so the whole bundle is read in one cycle. Fields are
listed from the most significant bit down:

```
scalar : op[3:0] | address1 | address2 | result address
SIMD   : op[3:0] | address1 | perm address1 | address2 | perm address2 | result address
```

| op | operation | result |
|----|-----------|--------|
| 0  | no-operation: the slot is skipped and nothing is sent down its pipeline | – |
| 1  | multiply | low `DATA_W` bits of a*b |
| 2  | add | a+b |
| 3  | subtract | a-b |
| 4  | and | a&b |
| 5  | or | a\|b |
| 6  | bitwise invert | ~a (b is ignored) |
| 7  | right shift | a >>> b, arithmetic; all sign bits if b ≥ `DATA_W` |
| 8  | left shift | a << b; zero if b ≥ `DATA_W` |
| 9–15 | treated as no-operation | – |

A SIMD instruction applies the same operation to every element pair. Before
that, it rearranges each operand vector through the permutation memory (see
below).

## The banked register file

This is the part to understand before writing a program.

**Addressing.** A register address is `{slot, bank}`. The words are numbered
bank first: word `slot*NB + bank`. A vector of `SIMD_W` elements at address
`{s, b}` is the `SIMD_W` consecutive words that start there. So element `e`
lives in bank `(b+e) mod NB`, slot `s + (b+e) div NB`. With 5 banks and 4-wide
vectors:

```
            bank0  bank1  bank2  bank3  bank4
 slot s      A0     A1     A2     A3     .        vector A at {s,0}
 slot s+1    B3     .      B0     B1     B2       vector B at {s,2}: last element wraps
 slot s+2    .      .      .      .      x        scalar word at {s+2,4}
```

A vector always touches `SIMD_W` different banks, because `SIMD_W <= NB`.
Every SIMD unit and every scalar unit adds banks to the file, so each bank
only has to serve two reads and one write per cycle. The bank index field
is a power of two wide, so it can hold values `>= NB` when `NB` is not a
power of two. Such a value is taken modulo `NB`. Programs should not use it.

**Ports and conflicts.** Each bank (`rf_bank`) has two read ports and one write
port for the pipelines. Each cycle, every pipeline's register-fetch stage may
ask for its operands, and every write-back stage may ask to write. The switch
in `regfile` serves the requests in a fixed order: host write, then SIMD
pipelines, then scalar pipelines, lowest number first. A request is granted
whole if every bank it touches still has a free port. The element requests
are then routed to those ports. Otherwise the pipeline gets no grant, stays
where it is for that cycle, and asks again in the next one. `rd_conflict` and
`wr_conflict` show such cycles. A well-scheduled program never causes one. A
program that does still computes the right values, only later. The stall
shifts the timing of everything behind it, so it can break hand-computed
dependency distances.

**Read during write.** Reads are combinational and writes happen at the clock
edge. A read of a word in the same cycle that word is being written returns the
*old* value.

**Host port.** `host_we/host_waddr/host_wdata` write one word, with priority
over the pipelines. `host_raddr/host_rdata` read one word through a third read
port on every bank. Use them while the processor is idle.

## Pipelines and timing

Each stage hands its result to the next through a one-entry FIFO
(`pipe_fifo`). A full FIFO accepts a new item in the same cycle its old item
leaves, so a stream moves one item per cycle. A stage fires only when its input
holds an item and its output has room. Any hold-up therefore travels back to
instruction fetch. Fetch issues a bundle only when every pipeline that receives
an instruction from it can take one (`fetch_stall` shows when it has to wait),
so the slots never drift apart.

```
scalar: fetch -> [F] -> register fetch -> [F] -> execute -> [F] -> write-back
SIMD:   fetch -> [F] -> register fetch -> [F] -> permute -> [F] -> execute -> [F] -> write-back
```

Register fetch reads the register file in the same cycle it dequeues the
instruction. The result is written at the end of the write-back cycle. This
gives the scheduling rules a program must follow (there are no interlocks):

* A scalar result can be read by an instruction fetched **3** bundles later.
* A SIMD result can be read by an instruction fetched **4** bundles later.
* An instruction fetched one bundle earlier than that reads the old value
  (read during write). Any earlier, it also reads the old value.
* After the last bundle, the pipelines drain in 3 (scalar) or 4 (SIMD) more
  cycles.

A vector unit reads only consecutive words. Data that a vector operation
needs must be laid out that way, or fixed up by a permutation, or moved by
extra instructions.

## The permutation stage

Each SIMD pipeline has a permutation memory of `PERM_DEPTH` entries. An entry
holds one source index per element position: `out[i] = in[entry[i]]`. Each
operand of a SIMD instruction names its own entry. For example, the entry
`2,3,1,0` turns `v` into `v[2], v[3], v[1], v[0]`. Repeated indices broadcast
an element. In a matrix product, for instance, one element of a row can be
multiplied by a whole row in one instruction.

An entry packs element `i`'s index into bits
`[i*log2(SIMD_W) +: log2(SIMD_W)]`, so `2,3,1,0` is `8'h1E` for width 4. At
reset the table is loaded from the hex file named by `PERM_INIT`, one entry
per line. `tb/perm_example.hex` is such a file. The table can also be
rewritten at any time with `pm_we/pm_unit/pm_waddr/pm_wdata`. Without a
file, reset loads a default table:

| entries | content |
|---------|---------|
| `p < SIMD_W` | rotate by p: `in[(i+p) mod SIMD_W]`; entry 0 is the identity |
| `SIMD_W <= p < 2*SIMD_W` | broadcast element `p-SIMD_W` |
| all further entries | reverse: `in[SIMD_W-1-i]` |

## Running a program

1. Hold `rst_n` low for a cycle. Reset empties the pipelines, stops fetch and
   loads the default permutation tables. Memories are not cleared.
2. Write each bundle: `ld_we=1`, `ld_slot` = slot number, `ld_addr` = bundle
   index, `ld_data` = instruction (in the low bits).
3. Optionally write permutation entries, and preload data with `host_we`.
4. Set `prog_len` to the number of bundles and pulse `start` for one cycle.
5. `busy` stays high until the last result is written. `done` pulses when
   `busy` falls. `cycle_count` then holds the number of cycles from the first
   fetch to the last write-back.
6. Read the results through `host_raddr`/`host_rdata`.

Example: the 4x4 matrix product `C = A*A` takes 28 bundles on `(1, 4, 0)` and
on `(1, 4, 1)`. Those are 16 vector multiplies of a broadcast `a[i][k]` with
row `k`, then 12 vector adds. They issue in 28 cycles, and the run ends after
32. On `(0, 0, 4)`, the 64 multiplies and 48 adds also fit in 28 bundles. Slot
`j` of bundle `(i, s)` multiplies `a[i][(j+s) mod 4]` by `a[(j+s) mod 4][j]`,
which loads every bank with exactly two reads per cycle. That run ends after
31 cycles.

## The 8x8 transforms: scheduling for banks and lanes

Two larger kernels exercise the machine the way it was meant to be used: the
8x8 forward DCT of JPEG and the 8x8 inverse DCT of MPEG-2. Both are integer
row-column transforms. The forward one is the usual "slow but accurate"
version with 13-bit constants and two extra fraction bits between the
passes: 944 operations. The inverse one uses the Chen-Wang butterflies with
11-bit constants: 952 operations. The usual clamp of the inverse transform's
outputs to [-256, 255] is left out. The instruction set has no min/max, and
the test inputs (the DCT of a random 8-bit block) never reach it.

There is no compiler, so the testbenches build the programs themselves.
Each kernel is written once as a graph of operations on values. A greedy
list scheduler then turns the graph into bundles, taking the ready
operation with the longest remaining path first. It keeps every rule the
hardware has:

* a slot takes one operation per bundle;
* a result may be read 3 (scalar) or 4 (vector) bundles after issue;
* a bank is read at most twice per bundle;
* a bank is written at most once per cycle. A vector result issued in
  bundle `t` is written in the same cycle as a scalar result from bundle
  `t+1`, so writes are tracked per cycle, not per bundle;
* a register is reused only after its last reader has issued. Its new value
  then lands after that read, even in the same bundle.

A correct schedule therefore never stalls. Each test checks that the run
had no conflict or stall, that it took exactly the scheduled number of
bundles plus the pipeline drain, and that all 64 results match a direct
computation.

The three configurations need different layouts:

* **`(0, 0, 4)`.** Every operation is scalar. Each operand is placed in
  whichever bank has a free write port. Constants are copied into every
  bank, so that a constant can be read from the bank with a spare read port.
  Without the copies, read ports are the limit: four operations need eight
  reads from four banks, every bundle.
* **`(1, 4, 1)`.** The row pass runs four rows at a time. Vector `(g, c)`
  holds column `c` of rows `4g..4g+3`. The column pass needs vectors that
  run along a row instead. The scalar unit transposes the 64 row-pass
  results with one move (`x + 0`) per element, overlapped with the rest of
  the row pass.
* **`(1, 4, 0)`.** There is no scalar unit, so the transpose uses the
  permutation stage and overlapping writes. Take element `j` of four vectors
  `v0..v3`. Read each source through permutation entry `j`, the rotation
  that brings element `j` to lane 0. Write the results in order to bases
  `x`, `x+1`, `x+2` and `x+3`. Each write overwrites the tail of the one
  before, which leaves `v0[j] v1[j] v2[j] v3[j]` in words `x..x+3`. This
  takes four vector operations per gathered vector, 64 in all. Their order
  is safe because the pipeline writes in issue order.

| kernel | configuration | bundles | cycles | peak register words |
|--------|---------------|---------|--------|---------------------|
| FDCT | `(0, 0, 4)` | 237 | 240 | 197 of 512 |
| FDCT | `(1, 4, 1)` | 261 | 265 | 209 of 640 |
| FDCT | `(1, 4, 0)` | 300 | 304 | 220 of 512 |
| IDCT | `(0, 0, 4)` | 239 | 242 | 158 of 512 |
| IDCT | `(1, 4, 1)` | 258 | 262 | 217 of 640 |
| IDCT | `(1, 4, 0)` | 302 | 306 | 216 of 512 |

For comparison, the best (loop-vectorised) hand schedules reported for the
original model took 238, 333 and 349 cycles for the FDCT, and 265, 361 and
391 for the IDCT, in the same order of configurations. Four lanes cannot go
below 236 bundles for 944 operations.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_pipe_fifo` | order under random stalls, no write when full, one item per cycle |
| `tb_instr_mem` | random write/read-back over the whole depth |
| `tb_rf_bank` | both read ports, old value on read during write |
| `tb_asip_alu`, `tb_simd_exec` | all operations against 64-bit reference arithmetic, corner cases |
| `tb_perm_stage` | default table; `tb/perm_example.hex` preloaded at reset and written through the port; the 2,3,1,0 example |
| `tb_regfile` | random traffic against a linear model: wrapped vectors, predicted grants and conflicts, old-value reads, final contents |
| `tb_instr_fetch` | slot order, NOP skipping, bundles leaving together, one bundle per cycle |
| `tb_scalar_pipe`, `tb_simd_pipe` | results in order with random refusals, latency 3 / 4 cycles, full rate |
| `tb_asip_top` | default configuration, end to end: matrix product (28 bundles, 32 cycles), then a program that forces a read conflict, a write conflict, a fetch stall, wrapped vectors, permutations, empty slots, all eight operations and a read during write; compares the whole register file with a model |
| `tb_matmult_simd`, `tb_matmult_vliw` | the matrix product on `(1, 4, 0)` and `(0, 0, 4)`: results, 28 bundles, no conflicts |
| `tb_dct_simd`, `tb_dct_simd_only`, `tb_dct_vliw` | the FDCT and IDCT on `(1, 4, 1)`, `(1, 4, 0)` and `(0, 0, 4)`: scheduled in the testbench, results against a direct computation, no conflicts, bundle and cycle counts; the IDCT reference is also checked to undo the FDCT within 2 |

To run one testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/asip_pkg.sv rtl/*.sv \
          tb/tb_asip_top.sv --top-module tb_asip_top -o sim
./obj_dir/sim
```

`tb_perm_stage` reads `tb/perm_example.hex` by a path relative to the
repository root, so run it from there.

## Where this design departs from, or goes beyond, the model it implements

These are choices of this implementation:

* **Encodings.** The numeric operation codes, the NOP at code 0, and the exact
  meaning of invert and the shifts (arithmetic right shift, shift count in
  operand 2, saturation at `DATA_W`).
* **Conflicts.** The fixed-priority switch and the stall on a port conflict.
  The model only requires that each bank serve two reads and one write per
  cycle.
* **FIFO behaviour.** FIFOs accept a write while their item is being taken.
  This is needed to reach one bundle per cycle.
* **Program control.** Run control (`start`, `prog_len`, `done`,
  `cycle_count`), the host port with its third read port, the run-time
  write port of the permutation table, and the default table used when no
  file is given.
* **Register depth.** `RF_DEPTH` is the depth of each bank, not of the whole
  file.
* **Instruction memories.** There is one instruction memory per slot, always.

These are not built:

* **Load and store.** There are no load/store instructions and no memory
  stage. The vector load/store variant of the FDCT measurement only added
  their cycle counts.
* **Branches.** There are no branches or loops.
* **Compiler.** There is no compiler. Programs are bundles written by hand or
  generated by the testbenches.
* **DCT programs.** The FDCT and IDCT programs are built from standard
  integer algorithms by the scheduler described above. They are not the
  original hand schedules, and the IDCT leaves out its final clamp.

## Files

`rtl/asip_pkg.sv` holds the operation codes and shared helpers.
`rtl/asip_top.sv` is the processor. `instr_fetch` and `instr_mem` make up
the fetch stage. `scalar_pipe` and `simd_pipe` are the two pipeline kinds,
with `pipe_fifo` between stages. `perm_stage` is the permutation stage.
`asip_alu` and `simd_exec` are the execute units. `regfile` and `rf_bank` form
the register file. Each file starts with a comment on its interface and timing.
