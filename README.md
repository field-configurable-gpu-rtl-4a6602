# A field-configurable SIMT processor built around DSP slices

This design is a small GPU-style processor meant to be generated to fit one
FPGA application exactly. It is a single streaming multiprocessor (SM). One
control unit fetches instructions from a ROM and broadcasts them to a row of
identical cores. Each core has a DSP multiply-accumulate slice, a few
registers and its own stack RAM. All cores run the same instruction in the
same cycle, on their own data.

Cores may disagree on a condition. When they do, the control unit does not
jump: it switches the disagreeing cores off for a stretch of code and on
again later, which is single-instruction multiple-thread (SIMT) execution.
A small stack of core masks makes nested if / else-if / else work.

Nearly everything is a parameter: the number of cores, instruction width,
data width, registers, RAM depth, inputs, loop-counter width, sync lines and
stack depths. Instructions are packed into as many ROM words as their
operands need, so narrow programs stay small.

To show it working, the SM is wrapped into a handwritten-digit classifier
(`fcnn_top`). This is a fully connected network with 400 inputs (a 20 x 20
image with 2-bit pixels), a hidden layer of 20 ReLU neurons and 10 output
neurons, running on 20 cores. Each core is one neuron.

```
 fcnn_top
 ├── pixel_buffer      400 x 2-bit image store
 ├── pixel_select      steps through the pixels on sync 0  ──► core input 0
 ├── l2_input_select   steps through the 20 hidden results on sync 1 ──► core input 1
 ├── max_select        on sync 2, index of the largest of the 10 scores
 └── sm
     ├── instr_rom     program, INSTR_W bits per word
     ├── control_unit  fetch/decode FSM, PC, loop counter, control registers
     │   ├── branch_stack      {cores done, cores active before} per nesting level
     │   └── subroutine_stack  return addresses
     └── core × N_CORES
         ├── reg_bank  N_REGS registers; the first N_OUT are the core's outputs
         ├── core_ram  RAM_DEPTH words, private stack pointer
         └── alu       dsp_slice + extra operations + flag comparator
```

`gpu_pkg` holds the opcode numbers, field widths and selector codes that all
files share.

## One core

Each core has one data bus. A multiplexer in front of it picks one source:

| `in_sel` | source on the bus |
|---|---|
| 0 | ALU output (the default whenever no instruction asks for another) |
| 1 | RAM word at `SP - offset` |
| 2 | register read port B |
| 3 | immediate value from the instruction |
| 4 + k | external input k |

The bus can be written into register A, pushed onto the core's stack, or
fed to the ALU in place of one register operand (the A/B selectors). That
last path lets a multiply-accumulate take its weight straight from RAM with
no load first.

An inactive core still sees every control signal, but all its write
enables are gated off. That covers the register write, RAM write, push and
pop, the ALU register and the conditional register.

Each core also has a one-bit conditional register, which a compare
instruction updates from the ALU flags. Its value is reported to the
control unit as `jump_ok`, and an inactive core always reports 1. That way
a switched-off core never blocks a jump.

### The ALU: a DSP slice with spare codes

The arithmetic is a model of the Xilinx DSP48E1 post-adder path. The 7-bit
OPMODE selects three operands:

* X = `opmode[1:0]`: 0, the product A·B, P, or A:B.
* Y = `opmode[3:2]`: 0, the product, all ones, or C.
* Z = `opmode[6:4]`: 0, PCIN, P, C, or P / PCIN shifted right by 17.

ALUMODE picks add or one of the subtract forms. P, the accumulator
register, loads only when an instruction executes an operation. Port C is
fed from operand A, and PCIN is tied to 0.

Z = 111 is an undefined code in the DSP, and the ALU wrapper uses it for
its own operations. With such an OPMODE the DSP is never clocked, and the
ALU output shows the extra result instead. The only extra operation built
is OPMODE 127: P shifted arithmetically right by `SHIFT` (8), which turns a
16-bit accumulation into an 8-bit value. It is combinational, so the shifted
value appears on the bus as soon as the OPMODE is loaded.

The classifier uses three OPMODEs:

| OPMODE | meaning |
|---|---|
| 0 | P ← 0 (clear) |
| 37 (`010_01_01`) | P ← P + A·B (multiply-accumulate) |
| 51 (`011_00_11`) | P ← C + A:B, which is A + B here (bias add) |

The flags are *zero* and *negative* of the ALU output. The compare
instruction selects one of them: code 1 is zero, 2 is negative, and 0 means
no compare. It also carries two setting bits:

* bit 1 inverts the flag;
* bit 0 ORs the result into the conditional register instead of ANDing it.

So a chain of compares can build a condition over several values. Both
`new_branch` and a finished `branch` reset the conditional register to 1,
which is why the first compare of a chain should use AND.

## Fetching variable-length instructions

The opcode is 5 bits, and each instruction is followed by exactly its
operand bits. The field widths follow from the parameters:

| field | width | FCNN value |
|---|---|---|
| register address | ⌈log2 N_REGS⌉ | 2 |
| RAM offset | ⌈log2 RAM_DEPTH⌉ | 9 |
| data selector | ⌈log2 (4+N_INPUTS)⌉ | 3 |
| program address | ⌈log2 ROM_DEPTH⌉ | 6 |
| sync index | ⌈log2 SYNC_BITS⌉ | 2 |
| loop count | LOOP_W | 9 |
| immediate | W | 16 |
| core mask | N_CORES | 20 |

An instruction of L bits takes ⌈L / INSTR_W⌉ ROM words. A one-word
instruction is left-aligned: opcode in the top bits, unused bits at the
bottom. A longer instruction fills its first words completely, and the last
word holds the remaining bits right-aligned, with the unused bits at the
left.

For example, `load_op` (5 + 5 + 7 + 4 = 21 bits) at 12-bit width is
`[op(5) inmode(5) opmode(2 MSBs)] [unused(3) opmode(5 LSBs) alumode(4)]`.

The control unit's state machine has four states:

* **FETCH** reads one word per cycle. As soon as the first word shows the
  opcode, the unit knows how many more words to collect.
* **CONT** is the same collector for the words after the first.
* When the last word arrives, the instruction executes. It writes the
  control registers, which the cores use in the next cycle.
* **JUMP** (one cycle) loads the PC after a jump, call, return, taken
  `loop` or jumping `update_branch`.
* **BRANCH** (one cycle) lets the cores' compare results settle before
  `branch` decides.

Cost of an instruction = words + 1 if it enters JUMP or BRANCH.

### Instruction set

Opcode numbers are this design's own. Word counts are given for 12-bit and
16-bit instruction widths with the classifier's parameters.

| op | mnemonic | operands | effect | words 12/16 |
|---|---|---|---|---|
| 0 | `activate_all` | – | all cores active | 1/1 |
| 1 | `activate_cores` | mask | active ← mask | 3/2 |
| 2 | `load_op` | inmode, opmode, alumode | set the DSP mode registers | 2/2 |
| 3 | `load_opmode` | opmode | set OPMODE only | 1/1 |
| 4 | `exec_op` | rA, rB | P ← f(rA, rB) | 1/1 |
| 5 | `exec_op_loop_offset` | rA, ofs | P ← f(rA, RAM[SP-(loop+ofs)]) | 2/1 |
| 6 | `exec_op_stack` | rA, ofs | P ← f(rA, RAM[SP-ofs]) | 2/1 |
| 7 | `load_in` | rA, sel | rA ← bus source `sel` | 1/1 |
| 8 | `load_imm` | rA, value | rA ← immediate | 2/2 |
| 9 | `save_to_reg` | rA | rA ← ALU output | 1/1 |
| 10 | `push` | r | RAM[SP] ← r, SP+1 | 1/1 |
| 11 | `pop` | r | r ← RAM[SP-1], SP-1 | 1/1 |
| 12 | `begin_loop` | count | loop ← count | 2/1 |
| 13 | `loop` | addr | loop-1; jump to addr unless it reached 0 | 1/1 |
| 14 | `sync_signal` | k | pulse sync[k] for one cycle | 1/1 |
| 15 | `load_in_and_sync` | rA, sel, k | `load_in` and `sync_signal` in one | 1/1 |
| 16 | `new_branch` | – | push {done = 0, before = active}; cond ← 1 | 1/1 |
| 17 | `compare` | settings, flag | cond ← cond AND/OR (flag XOR invert) | 1/1 |
| 18 | `branch` | addr | see below | 1/1 (+1) |
| 19 | `update_branch` | addr | see below | 1/1 |
| 20 | `end_branch` | – | active ← before; pop | 1/1 |
| 21 | `jump_addr` | addr | PC ← addr | 1/1 |
| 22 | `call` | addr | push PC+1, PC ← addr | 1/1 |
| 23 | `return` | – | PC ← popped address | 1/1 |

Notes on the table:

* The loop counter counts down from `count` to 1 inside the body.
* `exec_op_loop_offset` with offset 0 therefore reads
  RAM[SP-count] … RAM[SP-1] over the iterations.
* There is one loop level.
* Stacks, the RAM included, have no overflow protection: pointers wrap
  around.

## Divergent control flow

This is the part of the design that needs the most care. The
`branch_stack` holds, for each open branch construct, two masks of N_CORES
bits:

* **before**: the cores that were active when the construct opened;
* **done**: the cores that have already run one arm of it.

An if / else-if / else is written like this:

```
    new_branch                 ; push {done=0, before=active}, cond=1
    <compute>, compare ...     ; build the condition of arm 1 (true = skip arm 1)
    branch   ARM2              ; all active cores true  -> jump to ARM2
                               ; otherwise cores with cond=1 switch off
    <arm 1>                    ; runs on the cores whose condition was false
    update_branch END          ; done |= active; if done == before jump to END,
                               ; else active = before & ~done
    compare ...                ; condition of arm 2, on the remaining cores
    branch   ARM3
ARM2:
    <arm 2>
    update_branch END
ARM3:
    <arm 3>                    ; the last arm needs no update_branch
END:
    end_branch                 ; active = before, pop
```

A `branch` is taken only when every core agrees, and inactive cores count
as agreeing. Otherwise nothing jumps: the cores that wanted to jump stop,
and the rest run the code that follows.

`update_branch` records which cores have now had their turn. If that
covers every core that entered, the remaining arms are skipped with a jump.
If not, the cores still waiting are switched on and fall through into the
next arm.

Because the masks are stacked, an arm may open its own `new_branch`. The
depth is `BRANCH_DEPTH` (4).

The classifier's ReLU is a two-arm instance. The condition is "not
negative":

* The negative neurons run arm 1, which loads 0.
* The others skip to arm 2, which stores the shifted sum.

The testbench drives all three outcomes:

* all neurons positive: `branch` jumps at once;
* all negative: `update_branch` jumps to the end;
* mixed: both arms run, on different cores.

## Stack-relative memory and loops

Every core's RAM is addressed relative to its own stack pointer. A read at
offset `o` returns `RAM[SP-o]`. `push` writes at `SP` and increments it,
and `pop` reads `SP-1` and decrements it. Cores that push inside a branch
arm therefore end up with different stack pointers.

The classifier never pushes. It starts with SP = 424 and addresses its
parameters as fixed offsets below SP. Layer 1 reads them with the loop
counter as part of the offset.

## The classifier

Outside the SM the data path is deliberately dumb: the SM never addresses
the image. It asks for "the next one" with a sync pulse, and small counters
outside present the next value on a core input.

* **sync 0** advances `pixel_select`, which reads the pixel buffer and puts
  the next pixel (zero-extended to 16 bits) on input 0.
* **sync 1** advances `l2_input_select`, which puts the next hidden-layer
  result on input 1. Hidden results are register 0 of cores 0–19.
* **sync 2** makes `max_select` register the index of the largest of the
  ten scores, which are register 1 of cores 0–9, and raise `digit_valid`.
  On a tie the lowest index wins.

Both counters wrap, so consecutive images need no reset.

### RAM layout per core

Each core's RAM holds these words, counted down from SP = 424:

| address | content |
|---|---|
| SP-400 … SP-1 | layer-1 weights, pixel 0 … 399 |
| SP-401 | layer-1 bias |
| SP-421 … SP-402 | layer-2 weights, hidden neuron 0 … 19 |
| SP-422 | layer-2 bias |

Cores 10–19 do not need the layer-2 words. Weights and biases are written
through the `ld_en / ld_core / ld_addr / ld_data` port, one word per cycle,
while `rst` is high. `ld_addr` is an absolute RAM address.

### The program

The program (`rtl/fcnn_prog_base.hex`) runs forever, one image per pass:

1. Activate all cores and clear P. Set OPMODE 37 and loop 400 times. Each
   iteration loads input 0, multiply-accumulates it with the weight at
   `SP-(loop)`, and pulses sync 0.
2. Store P in a scratch register and add the bias (OPMODE 51, offset 401).
   Then select OPMODE 127, which shows P >> 8.
3. ReLU branch: negative cores load 0 into register 0. The others save the
   shifted value into register 0.
4. Clear P, activate cores 0–9 only, and loop 20 times. Each iteration loads
   input 1, multiply-accumulates with `SP-(loop+401)`, and pulses sync 1.
5. Add the bias (offset 422) and save the result in register 1. Pulse
   sync 2, then jump back to step 1.

Arithmetic wraps in 16 bits, with no saturation.

### Cycle counts

| program | instruction width | ROM words | cycles per loop iteration | cycles per image |
|---|---|---|---|---|
| `rtl/fcnn_prog_base.hex` | 12 | 51 | 6 | 2557–2560 |
| `rtl/fcnn_prog_opt.hex` | 16 | 35 | 4 | 1705–1708 |

The original design reports 6 and 4 cycles per iteration, matching this one.
It gives 2594 and 1740 cycles per image. The small remainder comes from
opcode numbering and word packing, which decide how many words the few
instructions outside the loops take.

The optimized program makes three changes:

* It uses `load_opmode` instead of `load_op`.
* It merges `load_in` + `sync_signal` into `load_in_and_sync`.
* It widens instructions to 16 bits, so `exec_op_loop_offset` fits one word.

To run it, instantiate `fcnn_top` with
`#(.INSTR_W(16), .ROM_FILE("rtl/fcnn_prog_opt.hex"))`.

### Program file format

A program file holds one hexadecimal ROM word per line, starting at
address 0. Words are packed as described under *Fetching*. Programs must
be assembled for the same parameter set as the RTL, because every field
width follows from the parameters. Unused ROM locations read as 0, which
is `activate_all`.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_CORES` | 20 | sm, control_unit |
| `INSTR_W` | 12 | ROM word and fetch width |
| `W` | 16 | data width of registers, RAM, DSP |
| `N_REGS` / `N_OUT` | 3 / 2 | registers per core / of which outputs |
| `RAM_DEPTH` | 512 | words per core |
| `SP_INIT` | 424 | initial stack pointer (0 in `core`) |
| `N_INPUTS` | 2 | external data inputs |
| `ROM_DEPTH` | 64 | program words |
| `LOOP_W` | 9 | loop counter bits |
| `SYNC_BITS` | 3 | sync pulse lines |
| `BRANCH_DEPTH` / `SUB_DEPTH` | 4 / 4 | nesting depth of branches / calls |
| `SHIFT` | 8 | right shift of OPMODE 127 |
| `N_PIX`, `PIX_W`, `N_L1`, `N_L2` | 400, 2, 20, 10 | classifier sizes (`fcnn_top`) |

The following are this design's choices rather than figures of the
original: `N_OUT`, `SP_INIT`, `ROM_DEPTH`, `LOOP_W`, and both stack depths.

The full 28 × 28 image (784 pixels) does not fit the defaults. It would
need `RAM_DEPTH` 1024, `LOOP_W` 10, `N_PIX` 784 and a reassembled program.

## Simulating

Each module is in a file of the same name, so the simulator finds the
sub-modules in `rtl/` by itself. The command line needs only the package
and the testbench. Run it from the directory that contains `rtl/` and
`tb/`, because the program files are read by relative path:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb rtl/gpu_pkg.sv tb/tb_fcnn_top.sv \
          --top-module tb_fcnn_top -o sim && obj_dir/sim
```

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fcnn_top` | Three images at full size: random weights and pixels, and a bit-exact reference model of both layers and the arg-max. All three ReLU outcomes occur. It also checks sync counts, 6 cycles per iteration, cycles per image, and the layer-2 core mask. A second instance with a 128-word ROM runs `tb/fcnn_mech.hex`, a short program using call/return (nested inside a branch), push/pop, an OR-chained compare, the zero flag, a nested branch and `load_in_and_sync`; its results are checked core by core. Every control-flow mechanism is counted, and one that never occurs is a failure. |
| `tb_fcnn_full` | The classifier part of `tb_fcnn_top` alone, with no parameter or program overridden. |
| `tb_fcnn_opt` | The same with the optimized program: 4 cycles per iteration, about 1740 per image. |
| `tb_sm` | A 4-core SM running a short program (`tb/sm_test.hex`). It covers a three-arm if / else-if / else on diverging cores, a call from inside a branch, a subroutine holding a nested branch, pushes in a loop, pop, and writes with a partial core mask. |
| `tb_control_unit` | Fetch timing, word collection and every decoded control register for the classifier program. |
| `tb_core`, `tb_alu`, `tb_dsp_slice`, `tb_reg_bank`, `tb_core_ram`, `tb_branch_stack`, `tb_subroutine_stack`, `tb_instr_rom`, `tb_pixel_buffer`, `tb_pixel_select`, `tb_l2_input_select`, `tb_max_select` | Each block against a model in the testbench, on random and corner-case stimulus. |

## Departures and limits

* **The DSP is a model, not the vendor primitive.** It is W bits wide
  instead of 25×18 / 48. A:B is cut to W bits, which leaves B. The INMODE
  pre-adder, carry input, pattern detector and logic-unit ALUMODEs are
  absent. On an FPGA it maps to ordinary multipliers and adders. The
  original design instantiates the DSP48E1 directly.
* **One fixed instruction set.** The original generates a control unit
  holding only the instructions a program uses, with one decode state per
  instruction shape. Here a single generic word collector decodes all 24
  instructions. The cycle cost per word and per jump is the same.
* **RAM offset width.** The original lists the offset of
  `exec_op_loop_offset` as 7 bits, yet also as part of a 16-bit instruction
  with a 512-word RAM. Here the offset is ⌈log2 RAM_DEPTH⌉ = 9 bits, which
  makes that instruction exactly 16 bits.
* **Loading weights.** The original preloads each core's RAM from a file.
  Here a load port is used, so the weights can change without rebuilding.
* **Operation after reset.** After reset the PC is 0, all cores are active,
  all registers are 0, and the conditional registers are 1.
* **Not covered.**
  * Resource use and clock rate on a particular FPGA are not covered; the
    original reports about 140 MHz on a Zynq-7010.
  * The original's software flow is not included: the program parser,
    assembler and RTL generator.
  * The matrix-multiply sketch that the original uses to compare with CUDA
    needs an instruction it never defines, so it is not provided.
