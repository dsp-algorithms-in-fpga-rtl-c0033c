# A torus of self-controlled Operational Units for DSP on FPGAs

DSP processors are limited by one program bus, a handful of data buses and a
few MAC units. Fixed datapaths are fast but every block does one job and cannot
iterate. This design sits between the two. The FPGA fabric is divided into
many small **Operational Units (OUs)**. Each OU has an arithmetic module, a few
registers and input multiplexers, and its **own Control Unit (CU)** with its
own code memory. All OUs run in parallel. An OU can do a different operation
every cycle, so the same hardware is reused across the steps of an algorithm.
Code memory and data memory are both spread over the array, so there is no
shared bus to fight over.

The OUs form an N x M grid whose opposite edges are joined, so the grid is a
torus. Each OU reads its operands straight from the output registers of 16
neighbours (or 12 in the small-array variant). The units synchronise through a
**data available / data read acknowledge** handshake on every link. There is no
global schedule. An OU that takes a data-dependent number of cycles (an
iterative square root, a multi-cycle division) just makes its neighbours wait.

Everything here is synthesizable SystemVerilog. The top is `dsp_array`.

## Structure of one Operational Unit

```
            neighbour output registers (16 channels, each with data + available)
                 |                                   |
        +--------v---------+               +---------v--------+
        | ou_in_mux  (a)   |               | ou_in_mux  (b)   |  also: r0..r7, external input,
        +--------+---------+               +---------+--------+        immediate, own output
                 |                                   |
                 +-------------+       +-------------+
                               v       v
                     +---------------------------+
                     | ou_alu   (+ ou_div in some |----> ou_regfile r0..r7
                     |           OUs)             |
                     +-------------+--------------+
                                   v
                       output register + one "available" bit per consumer
                                   |
              to the input multiplexers of the neighbours and to the host port

   ou_cu  <--- microcode word ---  ou_code_mem (RAM or ROM, synchronous read)
     |  drives the selects, the operation and the write enables
     |  stalls on missing data / pending acknowledges / busy divider
     +--> "data read acknowledge" back to the producers it read from
```

| Module | Role |
|---|---|
| `ou_pkg` | Microcode word `instr_t`, operation and branch enums, source codes, neighbour offset table |
| `ou_in_mux` | Operand multiplexer: neighbour channel 0..15, register r0..r7, external input, immediate, own output |
| `ou_alu` | Arithmetic module, including the 40-bit multiply-accumulate register |
| `ou_div` | Iterative signed divider, built only in some OUs |
| `ou_regfile` | Eight local registers, the OU's share of the distributed data memory |
| `ou_code_mem` | Code memory, 256 x 66 bits. Loadable RAM or build-time ROM |
| `ou_cu` | Control Unit: sequencing, stalls, acknowledges, branches, loop counter, halt |
| `ou_unit` | One OU: all of the above, plus the output register and its handshake state |
| `dsp_array` | The N x M torus of `ou_unit`s and the host-side ports |

## The link handshake

This part needs the most care. Each OU has one output register. Up to 16
consumers see it at the same time. Every one of them must be able to take each
announced value exactly once. The producer must not overwrite the value while
some consumer still needs it.

* The output register carries **17 "available" bits**: one per neighbour
  channel plus one for the host port. Bit k goes to the consumer that reads
  this OU through *its* channel k. That consumer is the OU at the negative of
  offset k.
* A microcode word that writes the output register (`wr_out`) also gives a
  17-bit `pub` mask. It sets the available bits of the consumers the value is
  meant for. With `pub = 0` the register is still visible to every neighbour,
  but nothing is announced.
* A consumer word marks an operand with `wait_a` or `wait_b`. Such a word runs
  only when the available bit of that channel is set. In the cycle it runs, the
  CU pulses `ack` on that channel, and the producer clears that one bit at the
  clock edge. The consumer sees the bit low in the next cycle, so it cannot
  read the same value twice. An operand without a wait flag just samples the
  register.
* A producer word that writes the output register runs only when **all** 17
  bits are clear. So a value is never lost, even if it went to several
  consumers that read at different times.
* The external input and output ports of each OU use the same rule: available
  and acknowledge, one word per acknowledge.

The timing is strict. A value written at clock edge t is visible to the
neighbours, with its available bit, in cycle t+1. A consumer can use it in
that cycle. Its acknowledge lands at edge t+1, and the producer can write again
in cycle t+2. With no stall, a chain of OUs therefore moves one word per link
every other cycle.

## The microcode word

The CU runs one 66-bit word per cycle when nothing stalls. The fields are
defined in `ou_pkg::instr_t`:

| Field | Bits | Meaning |
|---|---|---|
| `op` | 4 | operation (table below) |
| `src_a`, `src_b` | 5 + 5 | operand sources: 0..15 neighbour channel, 16..23 r0..r7, 24 external input, 25 immediate, 26 own output register |
| `wait_a`, `wait_b` | 1 + 1 | the operand must be a freshly announced word: wait for it, then acknowledge it |
| `wr_reg`, `rd` | 1 + 3 | write the result to register `rd` |
| `wr_out`, `pub` | 1 + 17 | write the result to the output register and announce it on these channels (bit 16 = host) |
| `wr_lc` | 1 | load the loop counter with the result |
| `br` | 3 | `NEXT`, `JMP`, `BZ`, `BNZ`, `BNEG`, `BPOS`, `LOOP` (if the counter is not 0: decrement it and jump), `HALT` |
| `target` | 8 | branch target |
| `imm` | 16 | immediate, sign-extended |

Operations (16-bit two's complement, wrap-around, no saturation): `NOP`,
`PASS`, `ADD`, `SUB`, `MUL` (low half of the product), `MULQ` (Q15 product),
`MACZ` / `MAC` (start / continue a 40-bit accumulation; the result is the
accumulator in Q15), `AND`, `OR`, `XOR`, `SHL`, `SRA`, `MAX`, `MIN` and `DIV`. A
`NOP` writes nothing and leaves the flags alone.

Branches test the zero and negative flags of **the same word's result**, so one
word can compute and branch. For a `NOP` they test the held flags. The next
address is worked out in the executing cycle and sent straight to the
synchronous code memory. A taken branch therefore costs no cycle. After reset
the CUs idle. A `start` pulse runs every CU from word 0. `HALT` stops a CU
after its word, and a new `start` restarts it.

`DIV` truncates toward zero. Division by zero gives +32767 or -32768,
following the sign of the dividend. In an OU that has a divider, the word takes
DATA_W + 2 = 18 cycles once its operands are ready: one cycle to start,
16 quotient bits, and one cycle to retire. In an OU without a divider, `DIV`
returns 0 in one cycle.

### Example: an iterative square root

This program is from the end-to-end test. It computes floor(sqrt(N)) by Newton
steps. The number of steps, and so the time per result, depends on N.

```
0  PASS #K-1            -> lc                 ; number of inputs
1  PASS ext (wait)      -> r0                 ; N
2  PASS r0              -> r1                 ; x = N
3  DIV  r0, r1          -> r2                 ; N / x
4  ADD  r2, r1          -> r2
5  SRA  r2, #1          -> r2                 ; y = (x + N/x) / 2
6  SUB  r2, r1                 BNEG 9         ; y < x: keep going
7  PASS r1              -> out, pub host  LOOP 1
8  NOP                         HALT
9  PASS r2              -> r1  JMP 3
```

## Torus wiring

Input channel k of the OU at column n, row m comes from the OU at
((n + dn_k) mod N, (m + dm_k) mod M):

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| dn | +1 | -1 | 0 | 0 | +1 | -1 | +1 | -1 | +2 | -2 | 0 | 0 | +4 | -4 | 0 | 0 |
| dm | 0 | 0 | +1 | -1 | +1 | -1 | -1 | +1 | 0 | 0 | +2 | -2 | 0 | 0 | +4 | -4 |

Channels 0..7 are the eight direct neighbours, including the diagonals.
Channels 8..11 reach two units along the row and the column, and 12..15 reach
four units. With `LONG_LINKS = 0` only channels 0..11 exist. That gives
12-input multiplexers, which suits arrays of fewer than about 64 OUs. Data for
a unit that is not linked directly is relayed by the OUs in between. Each relay
is a word of the form `PASS nb (wait) -> out, pub ch`. On an 8-wide ring the +4
and -4 neighbours are the same OU. They remain two channels with separate
handshakes.

## Host interface

How data enter and leave the array is this design's own choice:

* `prog_we`, `prog_ou` (flat index m*N + n), `prog_addr`, `prog_data` write
  one microcode word into one OU's code RAM. Load code while the CUs are idle
  or halted.
* `start` starts all CUs. `running[i]` and `halted[i]` report each one.
* Each OU i has an external input stream (`ext_in_data/avail/ack[i]`; source
  code 24) and an external output stream (`ext_out_data/avail/ack[i]`; `pub`
  bit 16). Both use the handshake above.

## Build options (parameters of `dsp_array`)

| Parameter | Default | Meaning |
|---|---|---|
| `N`, `M` | 8, 8 | array size (64 OUs) |
| `DATA_W` | 16 | data width |
| `LONG_LINKS` | 1 | 16 channels (1) or 12 channels (0) |
| `NREG` | 8 | registers per OU (at most 8, the `rd` field is 3 bits) |
| `DEPTH` | 256 | code words per OU (at most 256, the `target` field is 8 bits) |
| `DIV_STRIDE` | 2 | OUs whose column and row are multiples of this get a divider. With 2, every OU has a divider among its direct neighbours |
| `CODE_RAM` | 1 | 1: loadable code RAM. 0: ROM filled from `ROM_FILE` |
| `ROM_FILE` | "" | hex image for the ROM form: DEPTH words per OU, in flat-index order |
| `IN_MASK` | 16'hFFFF | neighbour channels to keep. Cleared bits read as 0, and synthesis removes their mux legs and wiring |

`CODE_RAM = 0` together with `IN_MASK` gives the "partially fixed" build: the
programs are frozen at synthesis, and links no program uses cost nothing. The
default build is the fully configurable one. At defaults it synthesizes to
about 16 k flip-flop bits, 64 code memories of 256 x 66 bits, 64 MAC
multipliers and 16 dividers.

## What follows the architecture and what is chosen here

The following come from the architecture:
* The division into OUs, each with its own microcoded CU.
* Code memory that is RAM or ROM, chosen at build time.
* Registers in each OU as distributed data memory.
* A multiplexer at every arithmetic input.
* OUs that are not all alike: only some have a divider.
* The torus with 16 links (1, 2 and 4 units away) or 12 links.
* The data-available / acknowledge handshake between units.
* Relaying through intermediate OUs.
* Removing unused mux inputs when the code is fixed.

The following are this design's own choices, since the architecture leaves them
open:
* The data width, array size, register count and code depth.
* The operation set and the word format.
* Branching on flags and the loop counter.
* The exact handshake protocol: one available bit per consumer, and no
  overwrite while any bit is set.
* The host ports and the start/halt control.
* The divider's algorithm and its divide-by-zero result.
* The asynchronous active-low reset of all state except the code RAM.

Not included: the software that splits an algorithm into tasks, places them on
OUs and writes the CU code. All programs in the testbenches are written by
hand with the helper functions in `tb/ou_asm_pkg.sv`.

Limits to keep in mind:
* The arithmetic wraps and never saturates.
* Every word that writes the output register waits for all earlier consumers,
  even when it announces to nobody.
* A program that waits on a channel nobody announces on deadlocks. No hardware
  detects this.
* The ROM form was simulated end to end only on a 4 x 4, 12-channel array.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ou_alu` | every operation against integer arithmetic; MAC dot products; the accumulator holds when not enabled |
| `tb_ou_div` | 2000 divisions, including corner cases and division by zero; exact latency; `done` held until `clear` |
| `tb_ou_regfile`, `tb_ou_in_mux` | writes against a shadow copy; every select code, with and without `IN_MASK` |
| `tb_ou_code_mem` | RAM read latency and write port; ROM contents from `tb/rom_image.hex` (word i = ((i+1) * 0x123456789ABCDEF01) mod 2^66) with a base offset |
| `tb_ou_cu` | exact order of executed words through all branch types, stall cycle count, acknowledges, one division start, restart |
| `tb_ou_unit` | one OU running a MAC + divide loop against random producers and consumers; each value is delivered once and is correct; stalls for data and for acknowledges both occur |
| `tb_dsp_array` | full 8 x 8 default build: a neighbour exchange over all 16 channels, a 5-tap FIR spread over 5 OUs plus a relay with 1-, 2- and 4-unit and wrap-around links, and the Newton square root. Each mechanism is counted and must occur |
| `tb_dsp_array_12` | the same exchange and square root on a 4 x 4 array with 12 channels |
| `tb_dsp_array_rom` | the ROM build (`CODE_RAM = 0`) of a 4 x 4, 12-channel array, running the neighbour exchange from `tb/array_rom.hex` with no code loaded at run time |

`dsp_array_tb_core` holds the end-to-end test shared by `tb_dsp_array` and
`tb_dsp_array_12`. Run from the directory that contains `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ou_pkg.sv tb/ou_asm_pkg.sv rtl/*.sv tb/dsp_array_tb_core.sv tb/tb_dsp_array.sv \
  --top-module tb_dsp_array -Mdir obj_tb -o sim && obj_tb/sim
```

For a leaf block, drop `tb/dsp_array_tb_core.sv` and name the block's
testbench instead. The hex files are read by paths relative to that directory.
`tb/array_rom.hex` holds 32 words per OU: for OU i, the neighbour-exchange
program (announce i*7+1, sum the 12 inputs, report twice, halt), then zero
words. The
full-size end-to-end test builds in under a minute and runs in well under a
second.
