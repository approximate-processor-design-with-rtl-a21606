# An RV32IM processor with run-time adjustable approximate arithmetic

Many IoT workloads, such as nearest-neighbour classification, k-means clustering and
small neural networks, spend most of their time in multiply-accumulate loops and
tolerate small arithmetic errors. This design is a 32-bit RISC-V processor (RV32IM)
with two execute datapaths. The exact datapath handles the whole instruction set.
The approximate datapath handles three extra instructions:

* XADD, an approximate addition;
* XSUB, an approximate subtraction;
* XMUL, an approximate multiplication.

Approximation works by skipping part of the carry logic, not by dropping result bits.
How much is skipped is set by three 3-bit *approximation level* buses, one each for
XADD, XSUB and XMUL. Those buses come from a small control unit outside the core, so
the precision can change while a program runs. The approximate units also shrink to
the width the operands actually need: bits above that width stay at zero, so they do
not toggle. This is called dynamic sizing.

The design follows the thesis *Approximate Processor Design with RISC-V ISA*, which
describes an HLS-generated core with hand-written approximate units. This repository
is a plain SystemVerilog rendering of that design. Departures and gaps are listed in
"Where this design departs from the original".

## Contents

1. The approximate instructions
2. The approximate adder: bypassing gray cells of a Sklansky tree
3. Dynamic sizing
4. The approximate multiplier
5. Approximation level control and power-saving modes
6. The core
7. Memory map and the top-level ports
8. Verification
9. Where this design departs from the original
10. Files

## 1. The approximate instructions

Each approximate instruction is its exact R-type counterpart with bit 31 set. Bit 31 is
the top bit of funct7, and no standard R-type instruction sets it, so the decoder only
has to look at that one bit.

| instruction | funct7  | funct3 | opcode  | exact twin |
|-------------|---------|--------|---------|------------|
| XADD        | 1000000 | 000    | 0110011 | ADD        |
| XSUB        | 1100000 | 000    | 0110011 | SUB        |
| XMUL        | 1000001 | 000    | 0110011 | MUL        |

Which unit runs an approximate instruction:

* An OP-opcode instruction with bit 31 set goes to the approximate datapath.
* If funct7[0] is also set, XMULDIV runs it; otherwise XALU runs it.
* Any other approximate encoding writes 0 to rd. This is where new approximate
  operations would be added.

Exact ADD, SUB and MUL always give exact results, whatever the levels are.

## 2. The approximate adder: bypassing gray cells of a Sklansky tree

XADD, XSUB and the last stage of XMUL all use the same 32-bit Sklansky parallel-prefix
adder (`approx_sklansky_adder`, `sklansky_tree`).

**The exact adder.** For each bit, the adder forms a propagate bit p = a ^ b and a
generate bit g = a & b. A prefix tree of 5 rows then computes, for every column i, the
group generate G[i:0]. This is exactly the carry out of bit i. The sum is
s[i] = p[i] ^ G[i-1:0].

The Sklansky tree builds it as follows:

* In row r, each column i whose bit r-1 is set combines its own group (G,P)[i:k] with
  the group just below it, (G,P)[k-1:j].
  * k is the first column of the upper half of the current 2^r-column block.
* "Black" cells compute both G and P.
* "Gray" cells are the cells whose lower group reaches down to column 0. Their output
  is already a final carry, so they compute only G[i:0] = G[i:k] | P[i:k] & G[k-1:0].
* Columns without a cell pass G and P down unchanged.

Each column gets its final carry from exactly one gray cell:

| row | columns whose gray cell is in this row |
|-----|----------------------------------------|
| 1   | 1                                      |
| 2   | 2-3                                    |
| 3   | 4-7                                    |
| 4   | 8-15                                   |
| 5   | 16-31                                  |

**The approximation.** A bypassed gray cell does not combine anything. It passes
G[i:k] from the row above as the carry of column i. The carry from below column k is
lost, but only for column i. Every column's carry is computed separately, so dropping
one does not ripple further: the other columns keep their own, possibly exact, carries.
Each sum bit is still computed, and only some carries are wrong. This is why the method
differs from truncating low result bits.

The three bits of the level bus each bypass one group of gray cells:

| bit | gray cells bypassed         | rows |
|-----|-----------------------------|------|
| 0   | columns 1-7 (low byte)      | 1-3  |
| 1   | columns 8-15                | 4    |
| 2   | columns 16-31               | 5    |

The intended codes are cumulative:

| code | level |
|------|-------|
| 000  | exact |
| 001  | 1     |
| 011  | 2     |
| 111  | 3     |

Any other code still works and bypasses exactly the groups whose bits are set.

A small example at level 1: 3 + 1 gives 0.

* Column 0 generates a carry, and column 1 propagates it.
* Column 1's gray cell would make G[1:0] = 1. Bypassed, it passes g[1] = 0, so
  column 2 sees no carry.
* Bit 0 is p[0] = 0. Bit 1 is p[1] ^ G[0:0] = 1 ^ 1 = 0. Bit 2 is p[2] ^ 0 = 0.

In general, an addition is exact unless a carry chain crosses into a column whose gray
cell is bypassed. So results are often exact for small values, but errors, when they
happen, can be large (a lost carry into bit 16 costs 2^16).

**Subtraction.** XSUB negates the second operand exactly (two's complement) and feeds
the same approximate adder (`approx_add`). It uses the XSUB level bus, which
`approx_add` selects instead of the XADD bus. The carry-in pin of the adder enters only
the XOR of bit 0, not the tree, and the core always ties it to 0.

## 3. Dynamic sizing

`dynamic_sizing` finds each operand's *active width*: 32 minus its leading zeros.
A zero operand has an active width of 0. From these it forms two widths:

* The adder width is the active width of the larger operand (unsigned compare) plus
  one bit for the carry, capped at 32. Two zeros give a width of 1.
* The multiplier width is the sum of the two active widths, capped at 32.

Each width becomes a mask with that many low bits set. In the adder, the mask clears
the propagate and generate bits and the sum bits above the width. For XMUL, the mask is
applied through the final adder.

When the true result fits, which is always for unsigned operands, sizing changes
nothing in the result. It only keeps the upper part of the datapath still.

Points to know:

* A negative operand has no leading zeros, so any operation involving one runs at full
  width. The original found that sizing signed operands by magnitude did not pay off.
* XSUB always runs at full width, because its negated operand is usually negative
  anyway.
* The original's C model of the sizing omits the +1 carry bit that its prose asks for.
  This design follows the prose. Without the extra bit, 0xFF + 0x01 would lose its
  carry even at level 0.

## 4. The approximate multiplier

`approx_booth_multiplier` is a 16 x 16 radix-4 Booth multiplier with a Wallace tree
that produces a 32-bit product.

**Booth recoding** (`booth_encoder`). Each triplet of multiplier bits
X(2i+1) X(2i) X(2i-1) selects one partial product PP(i) from 0, +Y, +2Y, -Y or -2Y,
through three signals:

* single = X(2i) ^ X(2i-1)
* double = (X(2i+1) & !X(2i) & !X(2i-1)) | (!X(2i+1) & X(2i) & X(2i-1))
* negative = X(2i+1)

The selector outputs the one's complement when negative is set. The missing +1 is
added elsewhere, as described below.

**Partial-product array** (`booth_pp_gen`).

* The multiplier X is unsigned: X(-1), X(16) and X(17) are 0. That makes nine partial
  products, PP0 to PP8, and PP8 is either 0 or +Y.
* Each PP(i) is sign-extended to 32 bits and shifted left by 2i.
* Its +1 negation bit goes into row i+1, at column 2i. That position is empty in row
  i+1, because row i+1 starts at column 2i+2.
* PP8 is never negative, so no tenth row is needed.

**Wallace tree** (`wallace_tree`, `csa32`, `csa42`). The tree reduces the nine rows to
two:

* Level 1 uses three (3:2) carry-save adders, on PP0-2, PP3-5 and PP6-8.
* Level 2 uses two (3:2) adders. The first takes both outputs of the first level-1
  adder plus the sum of the second. The second takes the carry of the second level-1
  adder plus both outputs of the third.
* One (4:2) adder takes the four level-2 outputs.
* Carries beyond bit 31 are dropped, because the product is truncated to 32 bits.

**Final adder.** The last two rows are added by the approximate Sklansky adder of
section 2. It uses the XMUL level and the multiplier width from section 3. This final
adder is the only approximate part of the multiplier in this design (see section 9).

**Using a 16-bit multiplier in a 32-bit core** (`xmuldiv`). The original does not say
how 32-bit register values reach the 16 x 16 array. This design does the following:

* rs1[15:0] is the signed multiplicand Y, and rs2[15:0] is the unsigned multiplier X.
* If rs2 is negative, both operands are negated first, since (-a)(-b) = ab.
* At level 0, XMUL therefore equals MUL whenever:
  * -rs1 fits in signed 16 bits when rs2 is negative (rs1 alone when it is not);
  * |rs2| < 2^16.
* Squares of differences of 8-bit or 15-bit data meet these conditions. Wider operands
  give wrong results even at level 0.

The multiplier width is computed from the original register values.

## 5. Approximation level control and power-saving modes

`approx_level_ctrl` holds the three level buses in registers. They can be loaded in two
ways:

* **Direct writes:** `lvl_we[0]`, `lvl_we[1]` and `lvl_we[2]` load the add, sub and mul
  levels from `lvl_add`, `lvl_sub` and `lvl_mul`. Each level is a number from 0 to 3,
  sent to the core as the codes 000, 001, 011 or 111.
* **Power-saving mode:** `mode_we` loads all three at once from a 3-bit mode:

| mode | add | sub | mul |
|------|-----|-----|-----|
| 0    | 0   | 0   | 0   |
| 1    | 1   | 1   | 0   |
| 2    | 1   | 1   | 1   |
| 3    | 2   | 2   | 1   |
| 4    | 2   | 2   | 2   |
| 5    | 3   | 2   | 2   |
| 6    | 3   | 3   | 2   |
| 7    | 3   | 3   | 3   |

A write takes effect at the next clock edge. This can happen while the core runs, and
the next approximate instruction uses the new level. Reset sets all levels to exact.

Deciding *when* to change levels is outside this design. In the original system,
results go to a user or cloud service that sends back error feedback. Here, whatever
drives the write ports plays that role.

## 6. The core

`riscv_core` is a multi-cycle machine. Each instruction passes through these states:

| state  | what happens |
|--------|--------------|
| FETCH  | the instruction memory is read at pc |
| DECODE | the instruction word is latched |
| EXEC   | the control unit decodes and resolves branches and jumps, the registers are read, and one unit computes; a store writes memory at the end of this cycle |
| MEM    | loads only: the word arrives and the byte, half or word is extracted |
| WB     | rd is written and pc moves on |

The units EXEC can select are: ALU, shifter, MULDIV, XALU, XMULDIV, or the
load/store address.

Timing:

* Every instruction takes 4 clock cycles, and a load takes 5.
* Approximate instructions take exactly as long as their exact twins. The saving they
  offer is switching activity, not time.
* MUL, DIV and REM are single-cycle combinational units (`muldiv`), kept simple on
  purpose.

Control protocol (HLS-style pins):

* ap_rst is synchronous and active high.
* ap_idle is high while the core waits.
* On ap_start, pc is set to 0 and the program runs.
* On ebreak, ap_done and ap_ready pulse for one cycle and the core returns to idle.
* The core re-arms only after ap_start has been seen low. A start held high therefore
  runs the program once.

Other behaviour:

* fence and ecall execute as no-ops.
* Unknown opcodes are also no-ops; a simulation assertion warns about them.
* Misaligned loads and stores are not split: they use the aligned word, and an
  assertion warns.
* Nothing predicts branches.

## 7. Memory map and the top-level ports

| region             | bytes  | address range   | note |
|--------------------|--------|-----------------|------|
| instruction memory | 40 960 | 0 - 40 959      | registered read |
| data memory        | 92 160 | 40 960 - 133 119 | 80 KB data + 10 KB stack, byte enables, registered read |

Accesses outside the data region read 0 and ignore writes.

The top, `approx_iot_node`, contains the level control unit and the core. Its ports:

* `ap_clk`, `ap_rst`, `ap_start`, `ap_done`, `ap_idle`, `ap_ready`: clock, reset and
  the control protocol of section 6.
* `mode_we`, `mode[2:0]`, `lvl_we[2:0]`, `lvl_add/sub/mul[1:0]`: level control, see
  section 5.
* `approx_level_add/sub/mul[2:0]`: the codes currently applied, for observation.
* `imem_we`, `imem_waddr`, `imem_wdata`: load the program, one word per clock, by byte
  address.
* `dmem_we`, `dmem_waddr`, `dmem_wdata`: load data words, by absolute byte address.
* `Data_Result_Address[16:0]`, `Data_Result[7:0]`: read any data byte back,
  combinationally, by absolute byte address.

The intended sequence:

1. Reset.
2. Write the program and the data while idle.
3. Set the levels.
4. Raise ap_start, and wait for ap_done.
5. Read the results through the result port.

## 8. Verification

Every module has a self-checking testbench in `tb/`. Each one compares the module with
models written independently in `tb/tb_ref_pkg.sv`:

* a bit-level model of the bypassed carry tree;
* the sizing rules;
* an arithmetic model of the Booth rows and tree;
* a small RISC-V assembler.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

To run one testbench with plain Verilator (tested with 5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/approx_pkg.sv tb/tb_ref_pkg.sv tb/tb_approx_iot_node.sv \
  --top-module tb_approx_iot_node -o sim
./obj_dir/sim
```

Add `-Wno-fatal` if your Verilator version turns lint warnings into errors.

`tb_riscv_core` runs a directed program that covers every instruction class. It also
checks the cycle count (4 per instruction, 5 per load) and checks that approximate
instructions cost the same cycles as exact ones.

`tb_approx_iot_node` is the end-to-end test. It runs the top at its full default sizes
on a 1-nearest-neighbour kernel:

* 200 training records of 4 attributes each, 14-bit values in three clusters.
* For each record, a program computes the squared distance to a test point and stores
  it, then keeps the nearest record and its class.

It runs that program six times:

| run | program | levels | outcome |
|-----|---------|--------|---------|
| 1 | exact | mode 7 | exact results: the levels do not touch exact instructions |
| 2 | approximate | mode 0 | results and cycle count identical to run 1 |
| 3 | approximate | mode 2 | as modelled |
| 4 | approximate | mode 5 | as modelled |
| 5 | approximate | mode 7 | as modelled |
| 6 | approximate | 1, then 2, then 3 | levels raised after one third and two thirds of the records, while running |

Every XADD, XSUB and XMUL is checked against the reference model as it executes. All
200 stored distances and the final class and distance are checked against a software
model of the program.

The data are random, so the approximate outcomes vary from seed to seed. Two runs:

| mode | distances below exact (seed A) | (seed B) | nearest class |
|------|--------------------------------|----------|---------------|
| 2    | 116 of 200                     | 105      | unchanged in both |
| 5    | 141                            | 132      | unchanged in both |
| 7    | 3                              | 10       | unchanged in A, wrong in B |

Each run took about 19 300 cycles.

The test also counts each mechanism and fails if any never happened:

* XADD, XSUB and XMUL;
* an approximate result that differs from the exact one;
* a sized addition;
* mode writes;
* level changes during a run;
* loads, stores and taken branches;
* ap_done;
* no rerun while ap_start is held high.

Two more testbenches run the other two kinds of workload the design targets, at full
size. Both check every stored result against a software model of the same program.

`tb_workload_km` runs k-means clustering:

* 200 points of 4 attributes, K = 4, three iterations.
* XSUB, XMUL and XADD compute the distances. Exact ADD and DIV update the centroids.
* It runs at modes 0, 3 and 7, about 369 000 cycles each.
* In one run, mode 3 assigned every point as exact arithmetic did. Mode 7 changed
  nearly all assignments, because the clusters formed differently.

`tb_workload_ann` runs a small neural network:

* 7 inputs, 4 hidden units, 2 outputs, on 200 points of 8-bit attributes.
* Every multiply-accumulate uses XMUL and XADD.
* The original network used sigmoid units in floating point. This core has no
  floating point, so the test uses integer weights and a rectifier with a shift.
* In one run, modes 0 and 2 classified like exact arithmetic. Mode 4 changed 9 of 200
  classes, and mode 7 changed 94.

All testbenches pass. Each was also run against a copy of its module with one
deliberate bug, and each of those runs failed.

## 9. Where this design departs from the original

* **Approximate compressors are missing.** The original Wallace tree uses approximate
  (3:2) and (4:2) compressors taken from other published work. Their logic is not
  given, so this design uses exact compressors. The multiplier is approximate only in
  its final adder, and will be more accurate than the original at the same level.
* **Booth table.** The original truth table for the Booth selector has two rows that
  contradict radix-4 recoding:
  * triplet 100 is listed as -Y, where the recoding gives -2Y;
  * triplet 101 is listed as -2Y, where the recoding gives -Y.

  The design follows the standard recoding, which the rest of the table and the gate
  diagram support.
* **Adder width.** The width is the larger active width + 1, following the prose (see
  section 3).
* **32-bit operands on the 16 x 16 multiplier.** The negation of both operands for a
  negative rs2 is this design's own choice (see section 4).
* **Core timing and protocol.** The original core was generated by an HLS tool. There,
  ap_done follows each instruction and the cycle counts are unknown. Here, the state
  machine, the 4-cycle and 5-cycle timing and the meaning of ap_done (end of program)
  are this design's own choices.
* **Result readout.** The original reads results through a byte-wide port from a fixed
  address. Here the port decodes the same absolute address map as the data memory.
* **Level storage.** The original says only that the levels sit in registers that a
  circuit outside the core controls, and gives the mode table. The write ports, the
  reset to exact and the next-cycle timing of section 5 are this design's own choices.
* **Performance.** No power or accuracy figures are claimed. The original measured
  power on an FPGA and in 65 nm; none of that is reproduced here.
* **Workloads.** The original evaluates KNN, k-means and small neural networks on
  datasets of up to 2000 points of 7 8-bit or 4 16-bit attributes. Stored as 32-bit
  words, the largest one needs about 72 KB, within the 80 KB data region. 16-bit
  attributes can produce differences beyond the multiplier's operand range described in
  section 4.

## 10. Files

`rtl/` holds one module or package per file:

* `approx_pkg`: opcodes, level codes, the decoded-instruction struct.
* The adder: `sklansky_tree`, `approx_sklansky_adder`, `dynamic_sizing`, `approx_add`.
* The multiplier: `booth_encoder`, `booth_pp_gen`, `csa32`, `csa42`, `wallace_tree`,
  `approx_booth_multiplier`.
* The execute units: `xalu`, `xmuldiv`, `alu`, `shifter`, `muldiv`.
* The rest of the core: `regfile`, `control_unit`, `load_store_unit`, `imem`, `dmem`,
  `riscv_core`.
* Level control and the top: `approx_level_ctrl`, `approx_iot_node`.

`tb/` holds `tb_<module>.sv` for each module, plus `tb_ref_pkg.sv`. Every file opens
with a comment that gives its function, interface and timing, and marks what follows
the original design versus what is this design's choice.
