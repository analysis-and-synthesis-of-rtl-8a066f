# Reversible code sequence generator

A small nonlinear-feedback shift register that produces a fixed 7-word code
sequence and can run it **forwards or backwards** on command:

    forward  (s = 01):  27 -> 55 -> 46 -> 29 -> 59 -> 54 -> 45 -> 27 ...
    backward (s = 10):  27 -> 45 -> 54 -> 59 -> 29 -> 46 -> 55 -> 27 ...

The words are 6-bit states, written in decimal with Q5 as the MSB. The
sequence comes from the polynomial x^5 + x^4 + x^2 + x + 1. Six bits are the
fewest for which no word in the cycle repeats. Generators like this serve as
pseudo-random or test sequence sources. Being able to step back through the
same sequence is the point of the design.

The circuit is built from the parts of a classic TTL schematic:

- one 8-bit bidirectional shift register (74198 function);
- two quad 2-to-1 multiplexers (74157 function), of which six channels are used;
- two inverters, two 2-input NANDs and two 3-input NANDs for the two feedback
  functions.

The RTL keeps that structure, one module per part.

## The step rules

Forward, each clock shifts the state one place towards the MSB. A new bit
`SRSI` enters at Q0:

    N+ = 2N + SRSI   (mod 64)
    SRSI = ~Q5 | ~Q4 | (Q1 & ~Q0) = NAND3(Q5, Q4, NAND2(Q1, ~Q0))

Backward, each clock shifts one place towards the LSB. A new bit `SLSI` enters
at Q5:

    N+ = floor(N/2) + 32*SLSI
    SLSI = ~Q0 | ~Q1 | (Q4 & ~Q5) = NAND3(Q0, Q1, NAND2(Q4, ~Q5))

`SLSI` is `SRSI` with every index i replaced by 5-i. Mirroring the state's bits
turns a backward step into a forward step. The main cycle is closed under this
mirror: 27<->54, 55<->59, 46<->29, and 45 maps to itself. That is why both
directions trace the same cycle, one in reverse of the other.

`SRSI` was minimised on a Karnaugh map. On that map only the seven states of
the cycle were fixed, and the other 57 were don't-cares. The same holds for
`SLSI`.

## Two windows on one 8-bit register

This is the least obvious part of the design.

A 6-bit state that can shift both ways is stored in an **8-bit** register,
`QA..QH` (`rg_q[0..7]`):

| s[1:0] | register action (on the rising edge of `c`) | window shown on `q` (mux select = s[1]) |
|---|---|---|
| 01 | shift right: `SRSI -> QA -> QB -> ... -> QH` | `QF..QA` (`rg_q[5:0]`) |
| 10 | shift left: `SLSI -> QH -> QG -> ... -> QA` | `QH..QC` (`rg_q[7:2]`) |
| 11 | parallel load `QA..QH <= d[0..7]` | `QH..QC` |
| 00 | hold | `QF..QA` |

- **Shifting right**, the state is the low six bits. QG and QH hold the two
  bits that have just fallen off the top.
- **Shifting left**, the state is the high six bits. QB and QA hold the bits
  that fell off the bottom.

The multiplexers pick the window for the current direction. Both feedback
functions read the multiplexer outputs `q`, not the register.

**What the window does when the direction changes.** The select follows
`s[1]` combinationally, so `q` jumps as soon as `s` changes, before any clock
edge:

- **Forward to backward.** The left window then holds the state from two
  forward steps ago. Each following left step walks backwards from there.
- **Backward to forward.** The right window holds the state from two
  backward steps ago, which is two steps further along the forward cycle.

Example, reproduced by the testbench:

1. Load 22 and set s = 01. The output is 22, 45, 27, 55, 46, 29, 59, 54, 45, 27,
   55, 46, 29, 59, 54.
2. One more forward edge moves the hidden state to 45.
3. Set s = 10. `q` shows 59 at once.
4. Backward steps then give 29, 46, 55, 27, 45, 54, 59, 29.

Note also these two cases:

- **Hold (s = 00)** shows the right window. After backward stepping, that
  window is not the state that was just on `q`.
- **Load (s = 11)** shows the left window. It shows `d[7:2]`, not
  `d[5:0]`, until `s` is set to 01.

To start a forward run at state N, load `d = {xx, N}`. To start a backward run
at N, load `d = {N, xx}`.

## Unwanted states: the design is not self-starting

The feedback functions as given do not lead every state into the main cycle.
In both directions the 11 states

    21, 23, 31, 42, 43, 47, 53, 58, 61, 62, 63

form a second closed cycle. Forward, it runs 23 -> 47 -> 31 -> 63 -> 62 -> 61
-> 58 -> 53 -> 42 -> 21 -> 43 -> 23. Of the 64 possible states:

- 16 reach the 7-state main cycle;
- the other 48 end in this second cycle and stay there.

The same split holds backward. A glitch that puts the register in one of those
48 states therefore locks the generator up until it is loaded or cleared.

The cause is the don't-care at state 23 (binary 010111). The term `~Q5`
covers it and gives `SRSI = 1`, so 23 steps to 47, inside the second cycle.
With `SRSI = 0` at state 23 only, 23 would step to 46, on the main cycle. All
64 states then reach the main cycle forward. The backward direction would need
the mirror change, `SLSI = 0` at state 58. This design implements the feedback
exactly as specified and does **not** include that correction. The testbench
checks the actual behaviour, including the lock-up.

## Interface and timing (`csg_reversible`)

| port | dir | width | meaning |
|---|---|---|---|
| `c` | in | 1 | clock, rising edge |
| `load` | in | 1 | **active-low asynchronous clear** of the register. It does not load `d`; loading is s = 11. |
| `s` | in | 2 | mode, see the table above |
| `d` | in | 8 | parallel load data, `d[0]` -> QA ... `d[7]` -> QH |
| `q` | out | 6 | generator state Q[5:0] |

- **Rate.** One state per clock. `q` is valid one clock-to-output delay after
  each rising edge.
- **Combinational paths.** `q` also depends on `s[1]` combinationally.
- **Critical path.** The path from register to register goes through one
  multiplexer, one inverter and two NAND levels.
- **Clock speed.** A fit into a programmable device of the same structure has
  been reported to run at about 115 MHz.

## Source files

| file | contents |
|---|---|
| `rtl/csg_pkg.sv` | mode enum `mode_e` (s encoding), sizes, the main cycle as a constant |
| `rtl/shift_reg_74198.sv` | 8-bit bidirectional shift register: hold, shift right/left, load, async clear |
| `rtl/mux_74157.sv` | quad 2-to-1 multiplexer with active-low enable |
| `rtl/srsi_excitation.sv` | forward feedback, NOT + NAND2 + NAND3 |
| `rtl/slsi_excitation.sv` | backward feedback, NOT + NAND2 + NAND3 |
| `rtl/csg_reversible.sv` | top level: register, two multiplexers, two feedback networks |
| `tb/tb_*.sv` | one self-checking testbench per module |

The top has no parameters. The sequence is fixed by the feedback gates. The
register and multiplexer modules take a `WIDTH` parameter (8 and 4 by default).

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one also has a watchdog. For example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_csg_reversible rtl/csg_pkg.sv tb/tb_csg_reversible.sv
    ./obj_dir/Vtb_csg_reversible

Replace the module name to run the other testbenches:

- `tb_shift_reg_74198`: 2000 random clocks against a bit-level model,
  including asynchronous clears.
- `tb_mux_74157`: exhaustive, 1024 input combinations.
- `tb_srsi_excitation` and `tb_slsi_excitation`: all 64 states against the
  sum-of-products form, plus the seven cycle transitions.

`tb_csg_reversible` runs the full design at its only size. It covers:

- clear;
- the load-and-run example above, checking one state per clock;
- hold;
- both direction switches;
- a 64-step walk from every one of the 64 states in each direction, against a
  model of the step rules. The walk also checks which states end in the main
  cycle and which in the second cycle. It compares every forward successor
  with a hand-drawn state graph of the design. That graph differs from the
  equations in two arrows: 23 -> 46, and 35 -> 39, which is not a valid shift
  of 35.

The testbench counts how often each mechanism occurred and fails if one never
did. The mechanisms are:

- clear, load, hold, forward, backward;
- both direction switches;
- recovery into the main cycle;
- lock-up in the second cycle.

It finishes in well under a second.

## Design choices beyond the original schematic

- **Part behaviour.** The 74198 and 74157 parts are modelled by their
  standard function tables. The original design uses them as catalogue
  parts.
- **Multiplexer enables** are tied active.
- **Asynchronous clear.** The pin called Load in the original schematic is
  wired to the register's active-low clear. It is kept as the `load` port
  with that meaning.
- **Feedback logic** is written as the NOT/NAND network, not as the minimised
  sum of products. Synthesis treats the two the same.
