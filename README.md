# RIPEMD-160 unfolded by four, with Gray-coded control

RIPEMD-160 compresses a 512-bit message block into a 160-bit chaining value
in 80 steps on each of two independent lines (left and right), then mixes the
two lines into the chaining value. A plain iterative core does one step per
line per clock and needs 80 cycles per block. This core applies the
*unfolding* transformation with factor 4: the step hardware is replicated four
times per line and chained combinationally, so one clock cycle performs four
steps and a block takes 20 step cycles. All state registers of the control
(the sequencer state and the round counter) are Gray coded, so a normal
transition toggles one register bit. The aim is lower switching activity and
so lower dynamic power.

The design follows the architecture published by S. Suhaili et al., "Power
Efficiency in Unfolding RIPEMD-160: Dynamic Power Analysis Using Gray
Encoding in FPGA Design" (J. Phys.: Conf. Ser. 3020, 2025). That work
reports the structure, the module split and the results. The exact cycle
sequencing, the handshake and several interface details are this
implementation's own. They are listed under "Departures and own choices".

## Using the core

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | clock, rising edge |
| `rst`      | in  | 1     | asynchronous reset, **active low** |
| `load`     | in  | 1     | write `data_in` to message word `addr` |
| `addr`     | in  | 4     | message word 0..15 |
| `data_in`  | in  | 32    | message word X[addr] |
| `start`    | in  | 1     | hash the stored block (taken only when idle) |
| `init`     | in  | 1     | sampled with `start`: 1 = first block of a message (start from the initial value), 0 = continue from the previous block's result |
| `hash_rmd` | out | 160   | digest after the last finished block, printed byte order (H0 in bits 159:128); zero after reset |
| `done`     | out | 1     | one-cycle pulse: `hash_rmd` has just been updated |
| `busy`     | out | 1     | a block is being hashed; writes are ignored |

**Message words.** `data_in` carries RIPEMD-160's own 32-bit words, which
are little-endian: byte 0 of the block is bits 7:0 of word 0. The core does
no padding; the host pads as usual for the MD4 family: append 0x80, zeros up
to 56 mod 64 bytes, then the 64-bit bit length, least significant byte first.
For `"abc"` the only non-zero words are X[0] = `32'h80636261` and
X[14] = `32'h00000018`. The digest is `8eb208f7e05d987a9b044a8e98c6b087f15a0bfc`.

**Timing of one block.**

| cycles | what happens |
|--------|--------------|
| 16     | one word per cycle with `load` high (any order) |
| 1      | `start` (with `init`) is sampled; working registers of both lines are loaded from the chaining value, round counter cleared |
| 20     | RUN: four steps per line per cycle, cycle index 0..19 |
| 1      | FINAL: the lines are mixed into the chaining value, `hash_rmd` is written |
| 1      | DONE: `done` is high |

`done` rises on the 21st rising edge after the edge that takes `start`, and
`busy` is high for 21 cycles. A block therefore costs 38 cycles when its
words are loaded just before it. The store is locked while `busy`, so the
next block can be loaded once `done` has been seen. For a message of several
blocks, start the first with `init = 1` and the rest with `init = 0`.

## The four-step chain

This is the part that needs the most care. One RIPEMD-160 step on one line is

    T = rol_s(A + f(B, C, D) + X[m] + K) + E
    A, B, C, D, E  <=  E, T, B, rol10(C), D

The register shift means that within one clock cycle every later step can be
written in terms of the registered values and the earlier T results. Call
the step results of the cycle Ta, Tb, Tc, Td. The inputs of the four steps are:

| step | A         | B  | C  | D          | E          |
|------|-----------|----|----|------------|------------|
| a    | A         | B  | C  | D          | E          |
| b    | E         | Ta | B  | rol10(C)   | D          |
| c    | D         | Tb | Ta | rol10(B)   | rol10(C)   |
| d    | rol10(C)  | Tc | Tb | rol10(Ta)  | rol10(B)   |

and after step d the registers hold
A = rol10(B), B = Td, C = Tc, D = rol10(Tb), E = rol10(Ta).

So the four boolean functions of a cycle are

    fa = f(B,  C,  D)          fb = f(Ta, B,  rol10(C))
    fc = f(Tb, Ta, rol10(B))   fd = f(Tc, Tb, rol10(Ta))

`rmd_func_parallel` evaluates these eight functions (four per line). The
right line uses B', C', D' and T1a..T1c. `rmd_step` holds the adders and the
variable rotate of one step, and eight instances form the two chains. The
critical path is therefore four dependent steps: three adds, a rotate and an
add per step, plus the function logic.

Because 16 is a multiple of 4, the four steps of a cycle always lie in the
same 16-step group. So one function select and one constant per line serve
the whole cycle. Group g = round / 4. The left line uses f1..f5 in order; the
right line uses them in reverse (f5 first).

The five functions are f1 = B^C^D, f2 = (B&C)|(~B&D), f3 = (B|~C)^D,
f4 = (B&D)|(C&~D), f5 = B^(C|~D).

## Step selection: coder and constants

`rmd_coder` turns the cycle index into four step codes per line. Each code is
one byte {message index m(t), rotate amount s(t)}, with t = 4*round + j. The
tables are the standard RIPEMD-160 permutations and rotate amounts in
`rmd160_pkg`. `rmd_kconst` gives K and K' for the group. `rmd_message` is the
16 x 32-bit block store with one write port and eight read ports: four steps
times two lines.

## Gray-coded control

`rmd_control` is a four-state machine encoded so that every transition flips
one bit:

| state | code | next |
|-------|------|------|
| IDLE  | 00   | RUN on `start` |
| RUN   | 01   | FINAL after cycle 19 |
| FINAL | 11   | DONE |
| DONE  | 10   | IDLE |

An assertion in the module checks the one-bit rule. The cycle index comes
from `rmd_gray_counter`, a modulo-20 counter whose register holds the Gray
code of the count. The binary value is decoded with an XOR prefix for the
table lookups. Every increment flips one register bit, except the wrap from
19 back to 0: a 20-count reflected Gray sequence is not cyclic.

The published work reports that Gray coding cut the dynamic power of its
FPGA implementation by 64.6% (0.65 mW to 0.23 mW, from simulation-based power
estimation). That figure belongs to its device and toolchain. Nothing here
reproduces or checks it.

## Files

| file | content |
|------|---------|
| `rtl/rmd160_pkg.sv` | types, initial value, constants, step tables, f, rotate, byte swap |
| `rtl/rmd_step.sv` | one step (adders, rotate, register shift) |
| `rtl/rmd_func_parallel.sv` | the eight chained boolean functions of a cycle |
| `rtl/rmd_coder.sv` | {m, s} codes of the four steps, both lines |
| `rtl/rmd_kconst.sv` | K and K' of the cycle |
| `rtl/rmd_message.sv` | 16-word message store |
| `rtl/rmd_gray_counter.sv` | Gray-coded modulo counter |
| `rtl/rmd_control.sv` | Gray-coded sequencer |
| `rtl/rmd_hash_update.sv` | final mixing and byte-order conversion |
| `rtl/ripemd160_unfold4.sv` | top level |
| `tb/tb_rmd_ref_pkg.sv` | independent software model (own tables, padding) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rmd160_abc` for the "abc" block |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
also has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal \
      --top-module tb_ripemd160_unfold4 -y rtl -y tb +libext+.sv \
      rtl/rmd160_pkg.sv tb/tb_rmd_ref_pkg.sv tb/tb_ripemd160_unfold4.sv
    ./obj_dir/Vtb_ripemd160_unfold4

Replace the top-module name for the other testbenches. The end-to-end
testbench runs at the core's only configuration. It hashes "", "a", "abc",
"message digest" and the 56-character two-block string against their
published digests. It also hashes random messages of 0..200 bytes against
the model. For every block it checks that `done` comes 21 edges after
`start` and that `busy` lasts 21 cycles. It also counts the mechanisms it
exercised: continuation blocks, writes attempted while busy, counter wraps,
and single-bit Gray increments. A run hashes 40 blocks. `tb_rmd160_abc`
hashes the "abc" block alone, as a host would drive it. It checks the digest
and the 38 cycles from the first write to `done`, which is 13.47 bits per
cycle.

## Departures and own choices

- **Interface.** The published names are `clk`, `rst`, `start`, `load`,
  `addr`, `data_in` and `hash_rmd`. `init`, `done` and `busy` are added. The
  reset polarity (active low), the write lock and the word format are
  choices made here.
- **Cycle count.** The published implementation reports 39.5 cycles per block
  in total, without a breakdown. Here a block takes 16 load + 1 start + 20
  step + 1 final cycles, with done one cycle later.
- **Step tables.** The standard RIPEMD-160 rotate amounts are used. The
  published digest for "abc" requires them, and the core reproduces it.
- **Function order on the right line** is the reverse of the left line
  (f5..f1), as RIPEMD-160 requires.
- **Multi-block messages** are supported through `init`. The published work
  shows only the single-block "abc" case.
- **Not included:** the iterative and factor-2 unfolded versions and
  binary-coded control. The published work uses them only for comparison.
  Its area, frequency and power figures (Arria II GX: 3224 to 3386 ALUTs,
  135.28 MHz, 1753.5 Mbit/s) are not reproduced here.
