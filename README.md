# Bit-serial associative processor for neural-like classification

This is synthesizable SystemVerilog for a SIMD associative processor built for
classifiers such as RCE and LVQ. A control unit drives one or more processor
chips. Each chip has 128 one-bit processing elements (PEs), and each PE owns a
256-bit memory bank.

The design is **bit-serial and word-parallel**: in each clock every PE works
on the same bit position of its own word. An 8-bit addition therefore takes
about 8 clocks, but it runs on every PE at once. Two collective functions
serve the classification algorithms: finding the first active PE and summing
the outputs of all PEs. A wired-OR bus handles extremum searches.

The architecture follows the paper *A VLSI Associative Processor for
Neural-Like Classification Algorithms*. The paper describes a full-custom
1 µm CMOS chip. The micro-instruction format, the high-level instruction set
and all encodings here are this implementation's own, as the section on
departures explains.

## Structure

```
class_machine                      top: control unit + chain of N_CHIPS chips
├── ap_control_unit                host instruction -> one micro-instruction per clock
└── ap_chip  (x N_CHIPS)
    ├── ap_memory_array            N_PE banks x MEM_BITS bits, separate read/write address
    ├── ap_ram_links               PE <-> memory row above / in front / below
    ├── ap_pe  (x N_PE)
    │   ├── ap_pe_operand          input buffer, hold register, operand inversion
    │   ├── ap_pe_arith            full adder + carry latch
    │   ├── ap_pe_logic            MSB-first comparator (finished, decision)
    │   ├── ap_pe_outsel           4:1 output mux + output latch, zero when inactive
    │   └── ap_pe_status           status register S, operating modes
    ├── ap_first_active            first PE with S=1, token chain with group look-ahead
    ├── ap_adder_tree              pipelined tree of serial full adders
    └── ap_wired_or                global OR of all PE outputs
ap_pkg                             micro-instruction and host-instruction types
```

Defaults are those of the fabricated prototype: `N_CHIPS=1`, `N_PE=128` and
`MEM_BITS=256`. The performance figures of the paper assume 1024 PEs, which
is `N_CHIPS=8`.

## The PE pipeline and the micro-instruction

This is the part to understand before changing anything. A PE has three
pipeline stages:

| stage   | what happens in the clock                                         | micro-instruction fields |
|---------|-------------------------------------------------------------------|--------------------------|
| read    | the addressed memory bit enters the input buffer                  | `rd_en rd_addr rd_link` |
| compute | the operands pass through the adder and comparator; the selected result enters the output latch; S may load | `alu_en hold_en op2_sel inv c_init c_val cmp_clr out_sel st_load mode ext_bit` |
| write   | the output latch is written to memory                             | `wr_en wr_addr wr_link sum_start` |

A micro-instruction (`uinstr_t`) has fields for all three stages, and each
stage works on a different bit. The compute fields of the micro-instruction
issued at clock t act on the bit read at clock t-1. The write fields at
clock t+1 store the result computed at t. The control unit handles this
skew; the chip simply applies the fields.

Within the compute stage:

* **Operands.** `a` is the input-buffer bit, inverted when `inv` is set.
  `p` is the external bit `ext_bit` (`op2_sel=OP2_EXT`) or the hold register
  (`OP2_HOLD`). The hold register copies the input buffer when `hold_en` is
  set. This is how two memory operands are combined: read B, then read A
  while B moves to the hold register, then compute. That takes two clocks
  per bit.
* **Adder.** The sum is `p ^ a ^ cin`. `cin` is the carry latch, or `c_val`
  on the first bit (`c_init`). Subtraction p−a uses `inv=1` and `c_val=1`.
  The carry latch updates only when `alu_en` is set.
* **Comparator.** It sees the bits MSB first. At the first differing bit it
  records "finished" and a decision: `p` (p > a), or `~p` when `inv` is set
  (a > p). `cmp_clr` starts a new comparison.
* **Output select.** The output latch takes the sum, "finished", the
  decision or S. An inactive PE latches 0. `st_load` loads S from the same
  multiplexer, but only in an active PE.
* **Activity.** `mode` selects how a PE's activity is set. `MODE_NORMAL`:
  active = S. `MODE_FORCED`: every PE is active. `MODE_ONE`: only the first
  PE with S=1 is active. A PE that was inactive when its output was computed
  does not write memory. Instructions therefore apply conditionally to each
  PE.

`sum_start` is a write-stage field. It marks the clock in which the output
latches hold bit 0 of a stream entering the adder tree.

## Collective functions

* **First active PE** (`ap_first_active`). This is combinational. A token
  stops at the lowest-numbered PE with S=1. Groups of 8 PEs compute "any S
  set" in parallel, so the token skips whole groups, as in carry
  look-ahead. `tok_in`/`tok_out` extend the chain across chips. In
  one-active mode the control unit visits PEs one by one: it processes the
  first PE, clears its S, and the next PE becomes first.
* **Adder tree** (`ap_adder_tree`). There are log2(N) levels of bit-serial
  full adders with registered outputs. A sum that enters LSB first leaves
  the root log2(N) clocks later, one bit per clock. Feed W value bits plus
  log2(N) zero bits to get the full sum. With W = 1 the tree counts PEs.
* **Wired-OR bus** (`ap_wired_or`). It is high when any PE output is high.
  Chips OR the bus of the next chip into their own.

## Memory and links

Each row of `ap_memory_array` is a 1-bit-wide RAM with its own enable, and
all rows share one read address and one write address. A bit-column can be
read and another written in the same clock. Reads are combinational and
return the old data when the write address is the same. Contents are not
reset.

`ap_ram_links` lets every PE use the row above or below instead of its own.
"Above" is the lower row number. The link is set separately for reads and
writes. This triples the memory a PE can reach, and it lets data move along
the PE chain: with `wlink=LINK_DOWN`, `ADD_X` with X=0 copies a field one PE
down. At the ends of a chip the neighbouring row belongs to the adjacent
chip. At the ends of the whole chain the neighbour reads as 0 and writes go
nowhere.

## Control unit and host instructions

The host sends a `hinstr_t` (`op, mode, inv, rlink, wlink, a, b, c, n, x`)
using a valid/ready handshake. Fields live at bit addresses `a`, `b` and
`c`, LSB at the lowest address, and are `n` bits wide (1–63). X has 32
bits, and its bits above 31 read as 0. `READ1` returns at most `RES_W`
(40) bits. `busy` stays
high for exactly the clock counts below and then drops for at least one
clock.

| op        | effect (active PEs only, unless mode is forced)      | clocks  |
|-----------|------------------------------------------------------|---------|
| `ADD_X`   | C = X + A                                            | n+2     |
| `ADD_B`   | C = B + A                                            | 2n+2    |
| `SUB_X`   | C = X − A, n+1-bit two's complement                  | n+3     |
| `SUB_B`   | C = B − A, n+1-bit two's complement                  | 2n+3    |
| `CMP_X`   | S = X > A (`inv`: A > X)                             | n+1     |
| `CMP_B`   | S = B > A (`inv`: A > B)                             | 2n+1    |
| `WRITE_X` | C = X                                                | n+2     |
| `LOAD_S`  | S = mem[a]                                           | 2       |
| `STORE_S` | mem[c] = S                                           | 2       |
| `SET_S`   | S = X[0] (use `MODE_FORCED` to reach every PE)       | 2       |
| `COUNT`   | result = sum of field A over active PEs, all chips   | n+2L+2  |
| `MAX`     | keeps S only on PEs holding the largest A; result = max | 4n   |
| `READ1`   | result = field A of the first active PE; clears its S | n+2    |

Here L = log2(N_PE). The add and subtract counts reproduce the rates in the
paper's table for 1024 PEs at 100 MHz. For example, 8-bit X+A takes 10
clocks, so 1024 × 100 MHz / 10 = 10 240 million additions per second, and
32-bit B+A takes 66 clocks, giving 1 552 million. Subtraction takes one more
clock because it also writes the sign bit.

`MAX` is the classic associative search. For each bit, MSB first, the active
PEs put their bit on the wired-OR bus. If the bus is 1, every PE whose bit is
0 drops out. This takes 4 clocks per bit: read, output, re-read while the
control unit samples the bus, then the status update. `COUNT` streams the
field through the adder trees and adds the chips' serial sums. `READ1` uses
one-active mode to read out PEs one at a time. `res_flag` reports whether any
PE had S set.

## How far to trust it, and departures from the paper

* The paper defines the blocks, the three-stage pipeline, the 4-to-1 output
  selection, the three operating modes, the collective functions and the
  sizes. It gives no bit-level encodings, no control-unit microprogram and
  no internal timing diagram. Everything at that level is this design's own
  choice: which operand is inverted, the comparator's decision rule, the
  carry-initialisation field, write gating by activity, S loading only when
  active, and the chip-chaining ports.
* Memory is a register array, not the custom 8-transistor SRAM cell. The
  TSPC latches are ordinary flip-flops.
* The control unit covers addition, subtraction, comparison, count, maximum
  search and PE-by-PE readout. It has no multiply, divide or floating-point
  instruction: the paper reports their speed but not their algorithms.
  Multiplication and division are shown as sequences of host instructions
  (next section), at 8, 16 and 32 bits. Floating point is not built at
  all. RCE and LVQ are not microprograms inside the control unit either;
  they too run as sequences of host instructions. The LVQ learning step
  size and its clamp at the edge of the coordinate range are this design's
  choices.
* The host link of the FPGA control unit is reduced to the instruction
  handshake above. The chip's command-signal distribution, pads and package
  are not modelled.
* Reset is asynchronous and active-low on all control and PE state. Memory
  is not reset.

## Running the classifiers, multiplication and division

Two testbenches run the paper's workloads on the default machine (one
128-PE chip) at 100 MHz. Each one uses a generated two-class 2-D database of
1000 points: class 0 lies in a disc and class 1 in a ring around it. Each
runs with 5-bit, 8-bit and 16-bit coordinates. Every result is
checked against a software model of the same rules.

* **LVQ learning and classification** (`tb_workload_lvq`). There are 128
  centroids, one per PE. All PEs compute the Manhattan distance
  |x−cx| + |y−cy| in parallel. `SUB_X` turns it into max − distance, and
  `MAX` keeps only the nearest centroids active. The lowest-numbered of
  them wins.
  For classification, `READ1` returns the winner's class. For learning, the
  winner alone, in one-active mode, moves each coordinate by a quarter of
  its difference from the input. It moves towards the input when the
  classes agree and away otherwise, clamped to the coordinate range. The
  quarter is read from a copy of |x−c| two bits up, so no shift is needed.
  Every fifth training label is flipped so that both moves happen. The
  clamp never triggered in these runs.
* **RCE learning and classification** (`tb_workload_rce`). One PE holds one
  neuron: a centre, a radius, a class and used/free flags. `CMP_B` marks the
  neurons whose radius exceeds the distance. Wrong-class neurons that fire
  get their radius cut to the distance. If no right-class neuron fires, a
  new neuron is written into the first free PE in one-active mode.
  Classification counts the firing neurons and the class-1 ones with
  `COUNT`, so it can tell "unknown" and "ambiguous" apart from a clear
  answer.

Each cell gives the measured clocks per vector and vectors per second at
100 MHz. The paper's range (its theory and simulation columns) follows in brackets. The paper
gives no 8-bit figures; its conclusion claims about 400 k 8-bit vectors
classified per second on 1024 PEs.

| workload           | 5-bit                   | 8-bit      | 16-bit                 |
|--------------------|-------------------------|------------|------------------------|
| LVQ learning       | 239, 418 k (308–358 k)  | 326, 307 k | 554, 181 k (43–80 k)   |
| LVQ classification | 142, 704 k (909 k–1.14 M) | 193, 518 k | 329, 304 k (238–398 k) |
| RCE learning       | 147, 680 k (800 k–1.0 M)  | 192, 521 k | 314, 318 k (332–450 k) |
| RCE classification | 163, 613 k (1.2–1.28 M)   | 205, 488 k | 317, 315 k (490–536 k) |

Share of clocks spent computing distances:

| workload           | 5-bit | 8-bit | 16-bit | paper (5 / 16-bit) |
|--------------------|-------|-------|--------|--------------------|
| LVQ learning       | 41%   | 41%   | 41%    | 16–18% / 6–10%     |
| LVQ classification | 70%   | 70%   | 70%    | 46–58% / 30–51%    |
| RCE learning       | 67%   | 70%   | 73%    | 41–51% / 43–58%    |
| RCE classification | 61%   | 66%   | 73%    | 43–65% / 63–69%    |

The paper's LVQ learning is slower than the one here and spends less of its
time on distances, so its update step costs more. The paper does not
describe that step.

The sequences here are straightforward, not tuned. For example, each
absolute difference costs a subtraction, a comparison and a second
subtraction. The paper does not say how many PEs its figures assume.
All 100 LVQ test vectors land in their true class at every width. After a
single pass over 300 training vectors, RCE creates 16, 16 and 18 neurons at
5, 8 and 16 bits. Of 100 test vectors it gets 96, 95 and 94 right. The rest
are "unknown" (0, 1, 1) or "ambiguous" (4, 4, 3).

A third, `tb_workload_mul`, multiplies on every PE at once by shift and
add. The multiplicand A is stored with one extra zero bit on top, and the
product C is cleared first. For B × A, each bit i of B is loaded into S, and
`ADD_B` adds A into the (n+1)-bit slice of C that starts at bit i, on the
PEs where S is set. For X × A, the control side skips the zero bits of X and
adds on all PEs for each one bit. Each partial sum fits its n+1 bits,
because the product before step i is below 2^(n+i).

`tb_workload_div` divides by restoring division without moving any data.
The dividend sits in the low n bits of a (2n+1)-bit work field W. Step i,
from n−1 down to 0, treats the (n+1)-bit slice W[i..i+n] as the partial
remainder. There is no "greater or equal" compare, so A−1 is formed once,
by an n-bit `ADD_X` of all ones and a 0 written above it. `CMP_B` then sets
S = slice > A−1. `STORE_S` writes S as quotient bit i. `SUB_B` subtracts A
from the slice where S is set; its sign bit lands on W[i+n+1], which is
already 0. The remainder is left in the low n bits of W.

Both run at 8, 16 and 32 bits and check every result and every clock
count. Fields wider than 32 bits are cleared or read in 32-bit pieces. On
1024 PEs at 100 MHz the measured clock counts give the following, with the
paper's rate in brackets:

| operation | 8-bit                      | 16-bit                     | 32-bit                      |
|-----------|----------------------------|----------------------------|-----------------------------|
| B × A     | 211 clocks, 485 MOPS (317) | 675 clocks, 151 MOPS (92)  | 2374 clocks, 43 MOPS (25)   |
| X × A     | 159 avg, 644 MOPS (397)    | 429 avg, 238 MOPS (122)    | 1542 avg, 66 MOPS (35)      |
| B / A     | 375 clocks, 273 MOPS (112) | 1255 clocks, 81 MOPS (35)  | 4551 clocks, 22 MOPS (10)   |
| X / A     | same as B / A (132)        | same (40)                  | same (12)                   |

X × A depends on how many one bits X has; the averages are over three
random values, one of them all ones. Floating point is not built.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`
that prints `TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ap_pkg.sv \
    rtl/class_machine.sv tb/tb_class_machine.sv --top-module tb_class_machine
./obj_dir/Vtb_class_machine
```

* `tb_class_machine` runs the full-size machine (one 128-PE chip, 256 bits
  per PE) end to end. It loads a random A and B into every PE in one-active
  mode. It then runs every instruction, reads all results back, checks the
  clock counts and counts how often each mechanism ran. It takes well under
  a second.
* `tb_class_machine_chain` runs the same sequence on two 16-PE chips, so
  the token, the bus, the sums and the memory links cross a chip boundary.
* `tb_workload_lvq`, `tb_workload_rce`, `tb_workload_mul` and
  `tb_workload_div` run the workloads described above. Each takes about a
  second.
* `tb_ap_chip` drives micro-instructions directly into one full-size chip.
  `tb_ap_control_unit` checks the micro-instruction streams on their own.

Memory is not reset, and the testbenches write every field before they read
it. To change the machine, override `N_CHIPS`, `N_PE` (a power of two),
`MEM_BITS` (at most 256, the width of `ADDR_W` in `ap_pkg`) on
`class_machine`.
