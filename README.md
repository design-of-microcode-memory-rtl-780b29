# Microcode memory BIST

A built-in self test (BIST) for an embedded SRAM. The test algorithm is stored
as microcode rather than built into a hard-wired state machine. A small
sequencer steps through the microprogram. It issues one memory operation per
clock cycle and compares every read with the value it expects. At the end, a
single `fail` flag says whether the memory is good. Two march algorithms are
stored: **March C-**, with 10 operations per word, and **MATS**, with 4. A
test collar of multiplexers sits in front of the SRAM. In normal operation the
logic that uses the SRAM reaches it through the collar unchanged. During a
test the collar hands the SRAM to the BIST.

The block partition and the two algorithms follow the thesis "Design of
Microcode Memory Built-In Self Test". The block names are the thesis's:
program counter, `march_minus` microcode store, `decod`, address generator,
data generator, comparator, `OE WE`, `ucmbist_control` and the test collar
with its `muxaddr`, `muxce`, `muxcntr` and `muxdata`. The thesis does not give
the insides of these blocks, so this implementation chose them:

- the instruction format;
- the way an element loops over the addresses;
- the timing;
- the widths and the memory size.

The section "Choices and departures" lists these choices.

## March tests in brief

A march test is a list of *elements*. Each element visits every address in a
fixed order, ascending (⇑) or descending (⇓). At each address it applies a
short, fixed sequence of operations before it moves to the next address. `w0`
writes the data background (all zeros here), `w1` writes its inverse, and `r0`
and `r1` read and expect the background or its inverse.

    March C- : ⇑(w0) ⇑(r0,w1) ⇑(r1,w0) ⇓(r0,w1) ⇓(r1,w0) ⇑(r0)    10 ops/word
    MATS     : ⇑(w0) ⇑(r0,w1) ⇑(r1)                              4 ops/word

The literature writes some elements as "either order" (⇕). Here they run
upwards. March C- detects stuck-at, transition, and unlinked coupling faults.
MATS detects stuck-at faults and misses a cell that cannot fall from 1 to 0,
because MATS never writes a 0 over a 1. The end-to-end testbench shows both
results.

## The microinstruction and how an element loops

Each microinstruction is 5 bits (`mbist_pkg::ucode_t`):

| field  | bits | meaning |
|--------|------|---------|
| `op`   | 3    | `OP_W0`=0, `OP_W1`=1, `OP_R0`=2, `OP_R1`=3, `OP_END`=7. Codes 4–6 are no-operations. |
| `down` | 1    | this element walks the addresses downwards |
| `last` | 1    | last operation at one address |

Each operation of an element gets one instruction, so ⇑(r0,w1) takes two. The
`last` bit marks the element's final instruction. Looping is done by the
program counter (`pc`), which keeps a second register: the address of the
element's first instruction. On every executed instruction:

- `last` = 0: go to the next instruction;
- `last` = 1 and the address is not the final one in this order: go back to
  the element's first instruction, and the address generator advances;
- `last` = 1 at the final address: go to the next instruction, which becomes
  the new element start, and the address generator restarts.

The address generator (`addr_gen`) holds a count of the addresses already
finished in the element. An ascending element uses the count as the address.
A descending element uses `WORDS-1-count`. Because the direction comes from
the instruction in every cycle, no set-up cycle is needed between elements.
The microcode ROM (`march_minus`) holds both programs:

| addr | March C-        | addr | MATS            |
|------|-----------------|------|-----------------|
| 0    | w0 ⇑ last       | 11   | w0 ⇑ last       |
| 1    | r0 ⇑            | 12   | r0 ⇑            |
| 2    | w1 ⇑ last       | 13   | w1 ⇑ last       |
| 3    | r1 ⇑            | 14   | r1 ⇑ last       |
| 4    | w0 ⇑ last       | 15   | END             |
| 5    | r0 ⇓            |      |                 |
| 6    | w1 ⇓ last       |      |                 |
| 7    | r1 ⇓            |      |                 |
| 8    | w0 ⇓ last       |      |                 |
| 9    | r0 ⇑ last       |      |                 |
| 10   | END             |      |                 |

To run another march algorithm, write its elements into this table in the
same way and add its entry point to `mbist_pkg`. The 4-bit program counter
limits the ROM to 16 words, and both programs together use all of them. A
longer program needs a larger `PC_W`.

## Timing

- The test starts with a one-cycle `start` pulse, which is accepted while idle
  or done. The pulse loads the entry point of `alg_sel`, clears the address
  generator and the comparator, and raises `bist_active`.
- From then on, one memory operation is issued every cycle. The END
  instruction takes one more cycle. `done` rises **10N+1** cycles after the
  start edge for March C- and **4N+1** for MATS, where N = 2^`ADDR_W`. At the
  default N = 256 this is 2561 and 1025 cycles. The testbenches check these
  counts.
- The SRAM is expected to be synchronous. It writes on the clock edge when
  `mem_ce & mem_we` are high. It returns read data one cycle after
  `mem_ce & mem_oe`. The comparator registers the expected word and the
  address with each read and compares them with `mem_rdata` in the following
  cycle. The last read of a test is therefore checked during the END cycle,
  and `fail` is final when `done` rises.
- `done`, `fail`, `err_count` and `fail_addr` hold until the next `start`.
  `bist_active` is high only while the test runs.

## Blocks

| module | what it does |
|--------|--------------|
| `mbist_top` | the controller plus the test collar; the SRAM connects to the `mem_*` ports |
| `ucmbist_control` | IDLE/RUN/DONE sequencing; instantiates every block below except the collar |
| `pc` | program counter with the element-start register (looping rule above) |
| `march_minus` | combinational microcode ROM, 16 × 5 bits |
| `decod` | turns `op` into read, write, data polarity and end of test |
| `addr_gen` | address counter with a mirrored output for descending elements, and a last-address flag |
| `data_gen` | background or inverted background; the same word serves as write data and expected data |
| `oe_we` | chip, read (OE) and write (WE) enables, all active high; never OE and WE together |
| `comparator` | one-cycle-delayed compare, sticky `fail`, saturating 16-bit `err_count`, first `fail_addr` |
| `test_collar` | address, chip-enable, control and write-data multiplexers; the system side reads 0 during a test |
| `mbist_pkg` | instruction and control types, program entry points |

All registers use an asynchronous active-low reset, `rst_n`. `mbist_top` and
`ucmbist_control` have two parameters: `ADDR_W` (default 8) and `DATA_W`
(default 8).

### Top-level ports (`mbist_top`)

- `clk`, `rst_n`
- `start`, `alg_sel` (`ALG_MARCH_C_MINUS` = 0, `ALG_MATS` = 1): inputs
- `bist_active`, `done`, `fail`, `err_count[15:0]`, `fail_addr[ADDR_W-1:0]`:
  outputs
- functional side: inputs `sys_ce`, `sys_we`, `sys_oe`, `sys_addr` and
  `sys_wdata`; output `sys_rdata`
- SRAM side: outputs `mem_ce`, `mem_we`, `mem_oe`, `mem_addr` and
  `mem_wdata`; input `mem_rdata`

## Choices and departures

These points are this implementation's own. The thesis gives none of them:

- the 5-bit instruction format, its encoding and the element-start looping;
- both programs in one ROM, chosen by entry point. The thesis appears to have
  built a separate controller for each algorithm.
- a ROM for the microcode, not a loadable store;
- a memory size of 256 × 8. It is a parameter, and any `ADDR_W`/`DATA_W`
  works.
- a solid data background (all 0 / all 1). `data_gen` has a `BACKGROUND`
  parameter for other patterns, but March C- and MATS as written only use one
  background and its inverse.
- one operation per cycle, one-cycle read latency, active-high enables and
  asynchronous reset;
- `err_count` and `fail_addr`, diagnostic outputs that go beyond a pass/fail
  flag;
- the collar returns zeros to the system side during a test.

The thesis reports area and test-time comparisons with a finite-state-machine
BIST. That baseline is not part of this design. Its test times could not be
compared with the cycle counts above.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line.

- `tb_mbist_top` runs the full default configuration (256 × 8) with
  `tb/sram_model.sv`, a behavioural SRAM with one injectable fault. The test
  covers:
  - functional access;
  - both algorithms on a good memory, with exact cycle counts;
  - memory contents after each test;
  - stuck-at-0 and stuck-at-1 faults, including the failing address and the
    error count;
  - a 1→0 transition fault: March C- fails and MATS passes;
  - an inversion coupling fault;
  - a restart from the done state;
  - a return to functional use.

  It also counts element repeats, element changes, descending elements, collar
  mode switches, mismatches and restarts, and fails if any of them never
  happens.
- `tb_ucmbist_control` records every memory operation of both algorithms on a
  16 × 4 memory. It compares this trace with the algorithms expanded
  independently from march notation.
- The block testbenches check `pc` and `comparator` against reference models
  under random stimulus. `decod` and `oe_we` are checked exhaustively.
  `march_minus` is checked against the march notation, `addr_gen` with
  power-of-two and other sizes, and `data_gen` and `test_collar` directly.

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_mbist_top \
        -y rtl -y tb +libext+.sv rtl/mbist_pkg.sv tb/tb_mbist_top.sv
    ./obj_dir/Vtb_mbist_top

The `sram_model` fault types are stuck-at-0/1, transition 0→1 and 1→0, and
inversion coupling from an aggressor word. They are simulation-only and
cover one fault at a time.

## Trust

The design's behaviour is fully specified above and checked in simulation. The
thesis's own microinstruction format and its timing are not available, so this
RTL will not match the thesis's area or test-time figures cycle for cycle.
Its test times are the minimum for one operation per cycle.
