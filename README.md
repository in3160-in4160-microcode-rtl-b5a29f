# Microcoded state machines: one vending machine, eight ways, and a microsequencer

A finite state machine can be built as a memory and a register. The state
register addresses a ROM, and the ROM word holds both the next state and the
outputs. Changing the ROM contents changes the machine without touching any
logic. The catch is storage: a plain table needs one word for every
state/input combination. Three things can shrink it. You can split the table
across two ROMs. You can fold outputs into transitions (Mealy). Or you can add
a small *sequencer* that computes the next address, so that the ROM only
stores how to branch. Carry that last idea further and you have a
microprogrammed processor: the state becomes a microprogram counter and the
ROM words become microinstructions.

This RTL implements each of these structures in SystemVerilog and runs them
all on the same example. There is also a general microsequencer with
conditional branches.

## The example machine

A drink costs 40c. The machine accepts 10c and 20c coins, each presented as
a one-clock pulse on `ten` or `twenty`. It has four lights:

| output     | meaning                                  |
|------------|------------------------------------------|
| `ready`    | idle, no money inserted                  |
| `coin`     | money inserted, more needed              |
| `dispense` | exactly 40c reached: the drink is served |
| `ret`      | more than 40c: all coins are returned    |

Every ROM word stores these four bits in the order `{ready, coin, dispense, ret}`,
bit 3 down to bit 0 (`microcode_pkg::vend_out_t`).

**Moore form (six states, 3 bits).** S_RDY=0, S_10=1, S_20=2, S_30=3,
S_DISP=4, S_RET=5. The states that wait for coins are numbered by amount, so
a 10c coin always means "+1" and a 20c coin "+2". The sequencer relies on
this. S_DISP and S_RET last one clock and then return to S_RDY.

**Mealy form (four states, 2 bits).** S_RDY=0 to S_30=3 count the money.
Dispense and return happen on the transition back to S_RDY, in the same clock
as the coin that completes the sum. So the Mealy machine needs two fewer
states and reacts one cycle earlier.

**Illegal inputs.** A cycle where both coins arrive cannot happen with a
mechanical coin slot, but the ROM still has a word for it. The same goes for
the unused Moore states 6 and 7. In every ROM table here, those entries are
zero: no output, next state S_RDY. The sequencer forms behave differently:
there, 10c wins when both coins arrive (see below). The table of variants
lists what each form does.

## The eight variants

`microcode_top` instantiates all of them on shared `clk`, `rst`, `ten` and
`twenty`. `vend_out[v]` is the output of variant `v`:

| v | name                  | module, settings                          | storage                            | outputs                        | both coins at once                              |
|---|-----------------------|-------------------------------------------|------------------------------------|--------------------------------|-------------------------------------------------|
| 0 | `V_SINGLE_MOORE`      | `single_rom_fsm`, S=3, SYNC_OUT=0         | 32 x 7 = 224 bits                  | from ROM, same cycle           | no output, to S_RDY                             |
| 1 | `V_SINGLE_MOORE_SYNC` | `single_rom_fsm`, S=3, SYNC_OUT=1         | 224 bits + 4 FF                    | registered, one cycle later    | no output (next cycle), to S_RDY                |
| 2 | `V_DUAL_MOORE`        | `dual_rom_fsm`, MEALY=0                   | 32 x 3 + 8 x 4 = 128 bits          | from output ROM on state only  | state's output shown, to S_RDY                  |
| 3 | `V_DUAL_MEALY`        | `dual_rom_fsm`, MEALY=1, S=2              | 16 x 2 + 16 x 4 = 96 bits          | from output ROM, Mealy         | no output, to S_RDY                             |
| 4 | `V_SEQ_SYNC`          | `seq_rom_fsm`, SYNC_OUT=1                 | 8 x 5 = 40 bits + adder/mux + 4 FF | registered, one cycle later    | counts as 10c                                   |
| 5 | `V_SEQ_FAST`          | `seq_rom_fsm`, SYNC_OUT=0                 | 8 x 5 = 40 bits + adder/mux        | from ROM, same cycle           | counts as 10c                                   |
| 6 | `V_MEALY_ROM`         | `single_rom_fsm`, S=2, SYNC_OUT=0         | 16 x 6 = 96 bits                   | from ROM, Mealy                | no output, to S_RDY                             |
| 7 | `V_MEALY_HARDWIRED`   | `vend_mealy_fsm` (no ROM)                 | gates                              | combinational, Mealy           | counts as 10c                                   |

Output timing relative to a coin pulse presented in cycle *n*:

* The Mealy variants (3, 6, 7) show `dispense` or `ret` in cycle *n* itself,
  while the coin is still present.
* The unsynchronized Moore variants (0, 2, 5) show it in cycle *n+1*, when
  the state has moved.
* The synchronized Moore variants (1, 4) show it in cycle *n+2*.

That extra cycle is the price of hazard-free, registered outputs. In return,
no ROM lookup sits in front of the logic the outputs drive.

One deliberate difference: in the hard-wired Mealy machine, `coin` is a state
output of S_10 to S_30. It therefore stays on in the cycle that also
dispenses or returns. The microcoded Mealy ROM clears `coin` in that cycle.
Both behaviours are kept, so the comparison shows that "the same" machine
can differ in its Mealy outputs.

## Microcode word formats

All ROM images are built by functions in `microcode_pkg` from the rules
above, not typed in as tables. Word `a` of an image sits at bits
`[a*DW +: DW]`. State is always the most significant part of an address.
Inputs are always `{twenty, ten}`, so input code 01 means 10c, 10 means 20c
and 11 is illegal.

| image                        | address              | word                                 | rule                                                       |
|------------------------------|----------------------|--------------------------------------|------------------------------------------------------------|
| `vend_moore_rom()`           | `{state[2:0], twenty, ten}` | `{next[2:0], ready, coin, dispense, ret}` | `next = state + coin value`; S_DISP and S_RET go to 0       |
| `vend_dual_moore_ns_rom()`   | same                 | `next[2:0]`                          | upper 3 bits of the above                                  |
| `vend_dual_moore_out_rom()`  | `state[2:0]`         | `{ready, coin, dispense, ret}`       | Moore output of the state                                  |
| `vend_seq_rom()`             | `state[2:0]`         | `{b, ready, coin, dispense, ret}`    | b = 1 in S_RDY to S_30                                     |
| `vend_mealy_rom()`           | `{state[1:0], twenty, ten}` | `{next[1:0], ready, coin, dispense, ret}` | sum = 40c: dispense and go to 0; above 40c: return and go to 0 |
| `vend_dual_mealy_*_rom()`    | same                 | next-state / output columns of the above |                                                        |

For example, `vend_mealy_rom()` word 10 (S_20, 20c) is `00 0010`: dispense,
back to S_RDY. `vend_seq_rom()` word 0 is `1 1000`: ready, branch on coins.

To reprogram a machine, pass a different image through the `ROM`, `NS_ROM`
or `OUT_ROM` parameter. `rom_async` is a plain asynchronous-read array, so a
synthesis tool will make it a LUT ROM or logic.

## The sequencer (`vend_sequencer`, `seq_rom_fsm`)

The sequencer removes the inputs from the ROM address, cutting the ROM from
32 x 7 to 8 x 5 bits. Each state then stores only a branch bit `b` and its
outputs. The next state is worked out by logic outside the ROM:

```
next_state = (b == 0) ? 0
           : ten      ? state + 1
           : twenty   ? state + 2
           :            state
```

This works only because of the state numbering: every coin moves the machine
a fixed distance forward. S_DISP and S_RET, and the unused states 6 and 7,
have `b = 0` and fall back to S_RDY. If both coins arrive at once, the `ten`
test comes first and the machine counts 10c.

An assertion in `seq_rom_fsm` checks that the state never goes past S_RET.
This holds for the vending microcode. Drop the assertion if you load a ROM
that uses states 6 and 7.

`SYNC_OUT` chooses between registered outputs (`out` follows the ROM word of
the previous state) and outputs taken straight from the ROM word of the
current state. The second form saves the cycle but puts the ROM lookup in the
output path. Both are Moore machines, because the ROM is addressed by the
state alone.

## General microsequencer (`microsequencer`, `branch_logic`)

This is the same idea in general form. The state is a microprogram counter
`uPC` that addresses a 2^S-word memory. Each microinstruction is:

```
{ branch_target[S-1:0], out[O-1:0], op[2:0], sel[IW-1:0] }
```

A three-input multiplexer picks the next `uPC`: input 0 is `uPC + 1`, input 1
is `branch_target` and input 2 is `0`. `branch_logic` decodes `op` and `sel`,
together with the condition inputs, into a one-hot select:

| op | name       | next uPC                                         |
|----|------------|--------------------------------------------------|
| 0  | NEXT       | uPC + 1                                          |
| 1  | JUMP       | branch_target                                    |
| 2  | IF_SET     | branch_target if `inputs[sel]` = 1, else uPC + 1 |
| 3  | IF_CLR     | branch_target if `inputs[sel]` = 0, else uPC + 1 |
| 4  | RESTART    | 0                                                |
| 5-7| (unused)   | uPC + 1                                          |

An assertion checks that the select is one-hot. The `out` field is
registered. The output you see is therefore that of the
microinstruction executed one clock earlier.

This operation set and its encoding are a choice made for this RTL. The
structure only asks for "branch logic" that drives a three-way select. The
defaults are S=4, I=2 and O=4, giving a 12-bit word.

The default microprogram `useq_demo_rom()` is a small demo:
* it waits at address 0 while `inputs[0]` is low;
* it steps through 1 and 2, and at 2 branches to 5 if `inputs[1]` is high;
* otherwise it jumps back to 1;
* it holds at 6 while `inputs[0]` is high, then restarts.

Together these exercise every operation.

The microprocessor this leads to is not implemented. It would add
instruction and data memory, and a datapath with an ALU and registers under
microcode control. There is no instruction set, ALU or register file
definition to build it from.

## Reset and clocking

There is one clock, and every register uses its rising edge. `rst` is
asynchronous and active high. It clears every state register, output
register and `uPC` to 0, so each machine starts in S_RDY (or at address 0)
with its outputs off. The coin inputs must be synchronous to `clk`. No
synchronizers are included.

## Where this RTL makes its own choices

* **ROM contents are parameters, not files.** The images are computed in
  SystemVerilog rather than read with `$readmemh`. That way simulators and
  synthesis tools see the same contents, and some synthesis front ends
  ignore `$readmemh`.
* **Dual-ROM contents.** These are the single-ROM tables split into their
  next-state and output columns.
* **Illegal entries.** Every illegal entry is all zero: no output, return to
  S_RDY.
* **Hard-wired Mealy machine.** It follows its ASM chart exactly, including
  `coin` staying on while dispensing or returning.
* **Microsequencer.** Its widths, branch operations and demo program are
  this design's own.

## Files

| file | contents |
|------|----------|
| `rtl/microcode_pkg.sv` | types, variant indices, branch op codes, ROM-image functions |
| `rtl/rom_async.sv` | asynchronous-read ROM |
| `rtl/single_rom_fsm.sv` | one ROM + state register (+ optional output register) |
| `rtl/dual_rom_fsm.sv` | next-state ROM + output ROM, Moore or Mealy addressing |
| `rtl/vend_sequencer.sv`, `rtl/seq_rom_fsm.sv` | branch-bit ROM + +0/+1/+2 sequencer |
| `rtl/vend_mealy_fsm.sv` | hard-wired Mealy reference |
| `rtl/branch_logic.sv`, `rtl/microsequencer.sv` | general microsequencer |
| `rtl/microcode_top.sv` | all of the above side by side |
| `tb/vend_ref_pkg.sv` | behavioural reference model used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/microcode_pkg.sv tb/vend_ref_pkg.sv tb/tb_microcode_top.sv \
    --top-module tb_microcode_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_microcode_top` with its name.

| testbench | what it checks |
|-----------|----------------|
| `tb_microcode_top` | all eight variants and the microsequencer at default parameters, 20,000 random cycles against the reference models; fails unless every mechanism happened (dispense, return, both-coin input, mid-run reset, sequencer +0/+1/+2 and return, registered-output delay, every branch kind) |
| `tb_lecture_sequence` | a fixed 21-coin sequence: 4 dispenses and 2 returns on every variant, with the state after each coin |
| `tb_seq_rom_fsm` | coin-light latency (1 cycle fast, 2 cycles synchronized) plus random run |
| `tb_single_rom_fsm`, `tb_dual_rom_fsm`, `tb_vend_mealy_fsm` | random coins, illegal inputs and resets against the reference model |
| `tb_microsequencer` | uPC and output against an interpreter of the microprogram |
| `tb_vend_sequencer`, `tb_branch_logic`, `tb_rom_async` | exhaustive or full-table checks |

The reference model in `tb/vend_ref_pkg.sv` is written from the rules of the
machine (amounts and thresholds), not from the ROM images. A wrong ROM
function is therefore caught.
