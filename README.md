# Factored systems from behavior tables: a shift-and-add multiplier, a JK flip-flop and a garbage-collector memory

A behavior table describes a synchronous system as one table. On the left a
decision table lists the cases: the current control state and the tests on
inputs and registers. On the right an action table gives, for each case, the
next value of every register and the current value of every combinational
signal. Each row is one clock cycle.

*System factorization* splits such a table into several smaller tables that
talk over wires. Three kinds of split are involved here:

- **Function factorization** moves uses of a function, such as a zero test or
  an adder, into a separate unit. The original table then sends the arguments
  out and reads the result back.
- **Signal factorization** moves registers into a separate unit. The original
  table then sends that unit a command token (for example *init*, *hold* or
  *shift*) instead of computing the next values itself.
- **Abstract-data-type factorization** combines the two. A memory and its
  read and write methods become a unit with an instruction port.

This RTL is the hardware that results from those splits. It holds three
independent examples, which `bt_top` places side by side:

| Example | Modules | Function |
|---|---|---|
| Shift-and-add multiplier, fully factored | `mult_system` = `mult_ctrl` + `bt_alu` (+ `zero_tester`) + `shiftreg` | `acc = a * b`, unsigned |
| JK flip-flop with synchronous preset | `jk_ff` | the textbook JK, where P = 0 forces Q = 1 |
| Half-space memory of a stop-and-copy garbage collector | `gc_mem` | two memories, OLD and NEW, behind a 7-instruction port |

Shared types live in `mult_pkg` (ALU instruction, shift-register command,
controller states) and `gc_mem_pkg` (memory instructions).

## The factored multiplier

### Algorithm

The unfactored multiplier has two operand registers, u and v, and an
accumulator, acc. It runs through four control states:

| state | condition | next state | u, v | acc | done |
|---|---|---|---|---|---|
| idle | go = 0 | idle | keep | keep | 1 |
| idle | go = 1 | zu | u := a, v := b | 0 | 0 |
| zu | | idle if u = 0, else zv | keep | keep | 0 |
| zv | | idle if v = 0, else shift | keep | keep | 0 |
| shift | | zv | u := 2u, v := v/2 | acc + u if v is odd, else acc | 0 |

Every right-hand side uses the register values from before the clock edge.
The shift row therefore tests the parity of the old v and adds the old u.

### How it is split

Two factorizations produce three units, connected as follows. The net names
x1 to x7 are those of the block diagram the design follows.

```
           a,b ───────────────────────────┐
                                          v
 go ──> ┌──────────┐  sop (x7)      ┌──────────┐
        │mult_ctrl │ ─────────────> │ shiftreg │
        │  (MULT)  │ <── u (x6) ─── │ u: 2W bit│
        │ state,acc│ <── v (x5) ─── │ v:  W bit│
        │          │                └──────────┘
        │          │ ── i1 (x1) ──> ┌──────────┐
        │          │ ── i2 (x2) ──> │  bt_alu  │
        │          │ ── inst (x3) > │ zero/add │
        │          │ <── out (x4) ─ └──────────┘
        └──────────┘ ──> done, acc
```

- **`shiftreg`** (signal factorization) owns u and v. It obeys the command
  `sop`: `SOP_INIT` loads a and b, `SOP_HOLD` keeps the values, and
  `SOP_SHFT` doubles u and halves v. Its outputs are registers, so a command
  takes effect on the next cycle. u is twice as wide as the operands so that
  no product bit is ever shifted out.
- **`bt_alu`** (function factorization) is purely combinational. With
  `inst = ALU_ZERO`, bit 0 of `out` is 1 when i1 is zero. With
  `inst = ALU_ADD`, `out = i1 + i2`. The zero test comes from a
  `zero_tester` instance. The boolean result and the sum share the single
  `out` line: the boolean goes in bit 0 and all other bits are 0.
- **`mult_ctrl`** keeps only the control state, acc and the parity test on
  v. In each state it sets the ALU's operands and instruction and the shift
  register's command:

| state | sop | i1 | i2 | inst | uses |
|---|---|---|---|---|---|
| idle, go=1 | INIT | – | – | – | |
| zu | HOLD | u | – | ZERO | `out[0]` selects the next state |
| zv | HOLD | v | – | ZERO | `out[0]` selects the next state |
| shift | SHFT | acc | u | ADD | `out` is loaded into acc if v is odd |

Unused outputs are driven as HOLD, ZERO and 0.

In the shift state the controller reads the ALU's sum in the same cycle that
it issues `SOP_SHFT`. No value is lost, because the shift register only
changes at the clock edge.

### Interface and timing

- While `done = 1` the multiplier is idle.
- Pulse `go` for one cycle. The multiplier samples `a` and `b` in that same
  cycle, so they may change on the next one.
- `done` drops on the next cycle. It returns to 1 with the product in `acc`,
  and acc keeps its value until the next `go`.
- Latency from the `go` cycle until `done = 1`:
  - 2 cycles when a = 0;
  - otherwise 2·n + 3 cycles, where n is the bit position of b's highest 1,
    plus one (n = 0 for b = 0).

  The worst case at the default width is 35 cycles.
- `rst_n` is a synchronous, active-low reset. It puts the controller in idle
  with acc = 0. The shift register has no reset, because it is always loaded
  before it is read.
- `WIDTH` (default 16) is the operand width. acc is `2*WIDTH` bits and holds
  every product exactly.

An assertion in `mult_ctrl` checks that the shift state is entered only when
v is non-zero.

## JK flip-flop

`jk_ff` updates `q` on the rising edge:

| P | J | K | next q |
|---|---|---|---|
| 0 | – | – | 1 (preset) |
| 1 | 0 | 0 | q |
| 1 | 0 | 1 | 0 |
| 1 | 1 | 0 | 1 |
| 1 | 1 | 1 | not q |

`r` is combinational and always equals not q. The initial state is left
open, so the flip-flop has no reset: hold P low for one clock to initialise
it.

## Garbage-collector memory

A stop-and-copy collector copies live objects from the OLD half-space into
NEW and then swaps the two half-spaces. `gc_mem` hides both half-spaces
behind one instruction port:

| `mop` | effect at the clock edge | `mout` in the same cycle |
|---|---|---|
| MNOP | – | 0 |
| MSWAP | OLD and NEW exchange roles | 0 |
| MWOLD | OLD[mwt_ad] := mdata | 0 |
| MWNEW | NEW[mwt_ad] := mdata | 0 |
| MROLD | – | OLD[mrd_ad] |
| MRNEW | – | NEW[mrd_ad] |
| MWNRO | NEW[mwt_ad] := mdata | OLD[mrd_ad] |

MWNRO is the copy step: it reads a word of OLD and writes a word of NEW in
one cycle.

How it is built:

- The memory is two register arrays, bank 0 and bank 1. Each has one write
  port and one asynchronous read port.
- A selector flip-flop, `old_sel`, names the bank that currently plays OLD.
  MSWAP only inverts that bit, so a swap takes one cycle whatever the size.
- MWNRO always writes one bank and reads the other, so neither bank needs a
  second port.
- Reads are combinational and show the state before the current cycle's
  write.
- `rst_n` sets OLD to bank 0. The array contents are not reset.
- An assertion checks that only the seven defined instructions are issued.
- The defaults are `ADDR_W = 10` and `DATA_W = 32`, which gives 1024 words of
  32 bits per half-space.

The collector's controller that would drive this port is not included. Its
data operations (object headers, tags, forwarding cells, size fields) have no
definition to build from. In `bt_top` the memory's port is therefore brought
out as top-level `mem_*` signals.

## Where this RTL departs from the behavior tables it implements

- **The accumulate term.** The source tables write the shift-row update as
  "acc + v", and the flowchart does the same. Because v is halved on every
  step, that sum is not a product. The same material shows `acc` ending at
  the product of the operands, so `mult_ctrl` adds u instead. For the same
  reason the ALU gets i2 = u in the shift state, not v. With u the result is
  a * b, which the testbenches check.
- **One ALU output.** An intermediate form of the split has separate boolean
  and integer ALU outputs. The final block diagram has a single `out` line,
  and this RTL follows that.
- **This design's own choices.** The tables do not specify the following:
  - all widths and memory sizes;
  - all token encodings;
  - the resets;
  - the value 0 driven on outputs the tables leave as don't-care;
  - building the half-space swap with a selector rather than by copying.
- **Not included.** The garbage collector's controller is not built. The
  intermediate forms of the multiplier split are not built either: one with
  only a zero tester factored out, and one with a three-input ALU. They
  compute the same thing as `mult_system`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
outputs with values it computes itself. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

| Testbench | What it covers |
|---|---|
| `tb_zero_tester` | zero, every one-hot word, all-ones and random words |
| `tb_bt_alu` | random and corner operands for both operations, including the zero high bits of the zero result |
| `tb_shiftreg` | 2000 random commands against its own model |
| `tb_mult_ctrl` | the controller with a behavioural shift register and ALU around it; checks the product, the latency, and the number of init and shift commands |
| `tb_mult_system` | 306 multiplications checked for product, latency and hold; every cycle, done and acc are also compared with a model of the unfactored multiplier, which shows that the split does not change behaviour cycle for cycle |
| `tb_jk_ff` | random inputs against the table; all five rows occur |
| `tb_gc_mem` | fills both half-spaces, then 4000 random instructions; the model physically exchanges its arrays on a swap |
| `tb_bt_top` | all three examples at the default parameters, running at the same time |

`tb_bt_top` also counts how often each mechanism occurred and fails any that
never did:

- the multiplier's exits through zu and through zv;
- shift steps that add and shift steps that do not;
- all five JK rows;
- all seven memory instructions, including repeated swaps and a copy pass
  built from MWNRO.

The testbenches have been run, and each one has been shown to fail when its
module is broken on purpose: a wrong bit, a missing carry or a miswired port.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mult_pkg.sv rtl/gc_mem_pkg.sv \
          tb/tb_bt_top.sv --top-module tb_bt_top -o sim
./obj_dir/sim
```

Replace `tb_bt_top` with any other testbench name to run that test. Every
file in `rtl/` lints cleanly with `verilator --lint-only -Wall`.
