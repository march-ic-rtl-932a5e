# March iC-: a memory self-test for address decoder open faults

An open transistor in the NOR plane of an SRAM address decoder does not break
the decoder outright. When the address changes in a single bit, the NOR node
of the old line should discharge through the transistor driven by that bit.
If that transistor is open, the node keeps its charge and the old word line
stays high next to the new one. The result is an *address decoder open
fault* (ADOF). A resistive open gives the same effect for part of a cycle:
the discharge is only slow.

A double selection during a **write** copies the written value into a second
cell, and a later read of that cell shows the damage. A double selection
during a **read** puts two cells on one bit line. If they hold opposite
values, the sense amplifier sees an undefined level and the result is
unreliable. March C- run on a single-bit-change address order hits exactly
this case: it writes solid 0s and 1s, so the sensitising double access
happens on a read of two opposite values.

March iC- keeps the six elements and 10N length of March C-, and changes two
things:

* **Hd = 1 address order.** Consecutive addresses differ in one bit, so every
  address change is a single-bit transition that can sensitise an open.
* **Alternating data A_v.** Within an element, the data starts at `v` on the
  first address visited and flips on every following address. Neighbouring
  addresses in the order therefore hold opposite values. A double-selected
  write corrupts its neighbour, so it is detected. A double-selected read
  finds equal values, so it is not ambiguous.

This repository holds synthesizable SystemVerilog for a March iC- built-in
self-test (BIST) engine, and for the SRAM it tests. The SRAM's address
decoder is built from the NOR/NAND structure that the fault lives in, so the
fault can be injected and the test can be watched catching it.

## The algorithm

| element | order | operations            |
|---------|-------|-----------------------|
| M0      | up    | w A_v                 |
| M1      | up    | r A_v, w A_v̄          |
| M2      | up    | r A_v̄, w A_v          |
| M3      | down  | r A_v̄, w A_v          |
| M4      | down  | r A_v, w A_v̄          |
| M5      | up    | r A_v                 |

"Up" is the Hd = 1 order and "down" is its exact reverse. M0 followed by M1
sensitises and observes opens on the transitions of the up order. M3
followed by M4 does the same for the down order.

**How the data bit is computed.** The starting value of A_v belongs to
the first address an element *visits*. In a descending element that is the
highest index. Let k be an address's index in the up order, and N the
number of words (always even). Then A_v is `v ^ k[0]` in an up element, and
`v ^ 1 ^ k[0]` in a down element. Each operation carries a phase bit `p`
(0 for A_v, 1 for A_v̄), so the bit to write or expect is:

    bit = v ^ p ^ down ^ k[0]

This bit is replicated over the data word. Every step of the order flips
one address bit, so k[0] tracks the parity of the address weight (up to a
constant), and the pattern depends on the address alone. In a 4-word memory, after M2 the words hold v, v̄, v, v̄ in
visiting order. M3 then starts from the last word M2 visited and expects v̄
there.

**The last element reads A_v.** M4 writes A_v̄ in descending order, so
the last word it writes (index 0) receives v. An ascending read must
therefore start by expecting v. Some presentations of March iC- write M5 as
`up(r A_v̄)`. That version fails every fault-free memory, so it is not used
here. `march_pkg.sv` holds the table and the formula.

## Address order

An open in a decoder field is sensitised only by the one single-bit move
that leaves the defective line through the open transistor. Catching every
open therefore needs every directed single-bit transition of every field:
n·2^n of them for an n-bit field, 8 for the 2-bit field used here. The
descending elements replay the ascending order backwards. A move a → b
that the ascending order lacks is therefore made by the descending order,
as long as the ascending order contains b → a. The requirement becomes:
cross every edge of each field's n-cube at least once.

A plain binary Gray counter does not manage this. In each 2-bit field it
crosses 00–01, 01–11 and 11–10, but never 10–00, so the move
<A0,A1> = <0,0> → <0,1> is never made. `hd1_addr_gen` uses a *modular* Gray
code instead:

* The address is cut into FIELD_W-bit digits, matching the decoder fields.
* The index k counts up or down, and i = k + 1 (mod 2^ADDR_W) is written in
  base 2^FIELD_W as digits b_j.
* Digit j of the code is `d_j = b_j − b_(j+1) mod 2^FIELD_W`.
* Each address field is the reflected Gray code of its digit:
  0, 1, 2, 3 → 00, 01, 11, 10.

Each step of k changes exactly one digit by ±1 mod 4, including 3 ↔ 0. It
therefore flips exactly one address bit, and an assertion checks this in
simulation.

Every digit below the top one wraps around its cycle many times, so it
crosses all four edges. The code is cyclic, and the one cycle edge that the
path leaves out depends on the offset. With an offset of one, that edge is
a move of digit 0, so the top digit also makes all four of its moves. The
ascending order starts at address 01 and ends at 00. For FIELD_W = 2 every
transition of every field is covered, which the generator testbench checks.
For wider fields (for example 3-bit sub-decoders) the order stays Hd = 1,
but covers only the edges of each field's Gray cycle: 8 of the 12 edges of a
3-cube.

Because the order ends at 00 and starts at 01, moving from one ascending
element to the next is also a single-bit move. That move can double-select
two words during a read, and those two words hold opposite data. The
end-to-end test shows one such case.

## The memory under test

`sram_core` is a synchronous single-port SRAM with 2^ADDR_W words of DATA_W
bits. Its address path is built from decoder blocks:

* `nor_wl_decoder`: PRE_W address flip-flops (outputs A0', A1', …). One NOR
  gate per line forms node ZA_i; for two bits,
  `ZA0 = ~(A0'|A1')`, `ZA1 = ~(~A0'|A1')`, `ZA2 = ~(A0'|~A1')`,
  `ZA3 = ~(~A0'|~A1')`. A NAND with the line enable and a buffering
  inverter then drive the select line WLS_i.
* The address is split into ADDR_W/PRE_W fields with one decoder each. The
  lowest field acts as the bit-line (column) decoder, the others as
  word-line predecoders. A post-decoder ANDs one line of each field.
* **Several selected words.** A write stores the data in every selected
  word. A read returns the bitwise AND of the selected words, modelling a
  stored 0 discharging the shared bit line; it returns all ones when no word
  is selected. On silicon, opposite values give an undefined level. This
  two-valued model resolves that level to 0.

Timing: a request (`en`, `we`, `addr`, `wdata`) is sampled on a rising edge.
During the next cycle the select lines are active, `rdata` shows the
selected word, and a write lands on the edge that ends that cycle. A read
issued right after a write to the same word returns the new data. The array
itself is not reset.

## The sequencer

`march_ic_ctrl` issues one memory operation per cycle. In each element it
does the read before the write at each address, then steps to the next
address. After the last address it loads the first index of the next
element's order, without losing a cycle. Each read is compared one cycle
later with the expected word. A mismatch sets a sticky `fail` flag and
increments a saturating `err_count`. The element and address of the first
mismatch are recorded.

```
start ─┐ (accepted when idle or done; v sampled with it)
       └─ busy: 10·N issue cycles + 1 compare cycle ─ done (held until next start)
```

`done` rises exactly `10·2^ADDR_W + 1` cycles after the edge that accepts
`start`. At the default size (256 words) that is 2561 cycles.

## Top level

`march_ic_top` connects the sequencer to the SRAM.

| port        | dir | width  | meaning                                    |
|-------------|-----|--------|--------------------------------------------|
| clk, rst_n  | in  | 1      | clock, asynchronous active-low reset       |
| start, v    | in  | 1      | start pulse, start value of A_v            |
| busy, done  | out | 1      | run in progress / finished                 |
| fail        | out | 1      | at least one read mismatched               |
| err_count   | out | CNT_W  | number of mismatching reads (saturating)   |
| fail_elem   | out | 3      | element 0..5 of the first mismatch         |
| fail_addr   | out | ADDR_W | address of the first mismatch              |

Parameters (defaults): `ADDR_W = 8`, `DATA_W = 8`, `PRE_W = 2` (the 2-bit
NOR decoder), `CNT_W = 16`. ADDR_W must be a multiple of PRE_W. `PRE_W = 3`
gives 3-bit sub-decoders.

## What is modelled and what is chosen

Taken from the published description:

* the March iC- elements;
* the alternating-data rule and the Hd = 1 requirement;
* the NOR-plane decoder with NAND/inverter gating;
* predecoded address fields, with a similar decoder for the bit lines.

Chosen here:

* the modular Gray code as the Hd = 1 generator;
* the M5 data phase, derived from the alternation rule;
* memory size and word width, with the data bit replicated over the word;
* the read resolution for double selection;
* a rising-edge clock for the decoder flip-flops;
* one operation per cycle;
* the start/busy/done handshake and failure reporting.

The commercial memory that motivated the test is not modelled: not its
cells, sense amplifiers, timing, or exact decoder sizes. In particular, the
word-line enable is a level held for the whole cycle. A resistive open is
exposed best when the address changes close to the falling edge of that
enable, and that sub-cycle timing is outside this model. A resistive open
appears here only as a line that is released one cycle late.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

* `tb_nor_wl_decoder`: checks every address of a 2-bit and a 3-bit decoder,
  with the enable high and low. It also checks the <0,0> → <0,1> move.
* `tb_hd1_addr_gen`: checks that the order visits each address once, that
  consecutive addresses differ in one bit, the parity output and the `last`
  flag, and that the down order is the exact reverse.
* `tb_sram_core`: runs a random write/read-back of all words, then forces
  two NOR nodes of the bit-line decoder high together. It checks that a
  write then reaches both words and that a read returns their AND.
* `tb_march_ic_ctrl`: runs the sequencer on a 16-word behavioural memory.
  It rebuilds the full operation list independently and checks all 10N
  operations and the cycle count. It then injects a stuck-at bit and
  double-write faults (one on an ascending transition, one only on a
  descending transition) and checks the reported first element and address.
* `tb_march_ic_top`: runs the full design at its default size. It replaces
  one ZA node with a switch-level model of a defective node: pulled up when
  all its inputs are low, pulled down through an intact transistor,
  otherwise holding its charge. A resistive open holds the charge for one
  extra cycle only. The runs:
  * a fault-free memory with v = 0 and with v = 1;
  * an open on the A0 input of ZA0 in the lowest field, caught in M1;
  * the same open with v = 1. Here the first mismatch is a read of two
    words with opposite data, which the two-valued memory resolves to 0. It
    comes from the single-bit move between two ascending elements;
  * a resistive open in the second field, caught in M1;
  * an open on the A1 input of ZA0, made only by the descending order and
    caught in M4.

  The test counts each mechanism and fails if one never occurs: every
  element, both orders, double-selected writes, double-selected reads of
  equal data, and detections.

* `tb_march_ic_fault_coverage`: measures how well March iC- still catches
  the faults March C- was designed for. It runs the sequencer on a 16-word,
  1-bit memory model holding one fault at a time, on every cell or every
  ordered pair of cells, with both start values. Every instance must be
  detected. The result:

  | fault class                          | instances | detected | first failing element (M0..M5) |
  |--------------------------------------|-----------|----------|--------------------------------|
  | stuck-at (SAF)                       | 64        | 64       | 0 / 32 / 32 / 0 / 0 / 0        |
  | transition (TF)                      | 64        | 64       | 0 / 15 / 32 / 17 / 0 / 0       |
  | idempotent coupling (CFid)           | 1920      | 1920     | 0 / 351 / 480 / 369 / 480 / 240 |
  | inversion coupling (CFin)            | 960       | 960      | 0 / 367 / 480 / 113 / 0 / 0    |
  | dynamic coupling, read (CFdyn)       | 960       | 960      | 0 / 240 / 480 / 240 / 0 / 0    |
  | dynamic coupling, write (CFdyn)      | 960       | 960      | 0 / 480 / 480 / 0 / 0 / 0      |
  | state coupling (SCF)                 | 1920      | 1920     | 0 / 848 / 960 / 112 / 0 / 0    |
  | address fault, a reaches b           | 480       | 480      | 0 / 480 / 0 / 0 / 0 / 0        |
  | address fault, a reaches a and b     | 480       | 480      | 0 / 360 / 120 / 0 / 0 / 0      |

  The split between elements depends on the random initial contents. The
  detection counts do not.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/march_pkg.sv tb/tb_march_ic_top.sv --top-module tb_march_ic_top
./obj_dir/Vtb_march_ic_top
```

The other testbenches build the same way; only the file and top module name
change. The two testbenches that override decoder nodes with `force`
(`tb_sram_core`, `tb_march_ic_top`) make Verilator report the forced node as
driven from two places (MULTIDRIVEN); add `-Wno-fatal` to build them.
