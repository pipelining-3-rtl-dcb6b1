# A five-stage Y86-64 pipeline with branch prediction, forwarding and stalling

This is a pipelined processor for the Y86-64 teaching instruction set. It
has five stages: fetch, decode, execute, memory and writeback. The design
has one job: keep one instruction entering the pipe every cycle, even
though later instructions often depend on earlier ones that are not yet
finished. Three mechanisms keep that promise, or fall back cheaply when
they cannot:

* **Forwarding.** A value computed but not yet written back is sent straight
  to the end of decode from the execute, memory or writeback stage.
* **Stalling.** When forwarding cannot help, the pipeline holds an
  instruction in place for a cycle and inserts a no-op ("bubble") behind
  it. Two cases need this: a load followed directly by a user of the loaded
  register, and a `ret`.
* **Branch prediction.** Fetch assumes every conditional jump is taken. If
  execute finds the condition false, the two wrongly fetched instructions
  are squashed before they change anything.

The RTL is in `rtl/` (SystemVerilog 2017, synthesizable). Self-checking
testbenches are in `tb/`.

## Where instructions change state

The squash mechanism depends on one property of this pipeline: the early
stages change nothing outside the pipeline registers.

| stage     | changes                         |
|-----------|---------------------------------|
| fetch     | nothing (only the predicted PC) |
| decode    | nothing                         |
| execute   | condition codes (ZF, SF, OF)    |
| memory    | data memory                     |
| writeback | registers, processor status     |

A jump's outcome is known at the end of execute. By then the wrongly fetched
instructions are only in fetch and decode. Squashing them means writing
bubbles into the D and E registers. Nothing has to be undone.

## Pipeline registers: stall and bubble

Each pipeline register (F, D, E, M, W) is one `pipe_reg` instance. Its type
is a packed struct from `y86_pkg`. A MUX in front of the flip-flops chooses
what the register loads at the next clock edge:

| stall | bubble | next value                                           |
|-------|--------|------------------------------------------------------|
| 0     | 0      | input (the instruction advances)                     |
| 1     | 0      | its own output (the instruction stays in this stage) |
| 0     | 1      | the default value: a no-op with register fields 0xF  |

Asserting both is a control error, and an assertion flags it. As a worked
example, take an 8-bit register with default 0xFF, fed 01, 02, 03, …. With
stall in cycles 1, 6 and 7 and bubble in cycle 3, it holds
`FF 01 01 03 FF 05 06 06 06`. `tb_pipe_reg` replays exactly this sequence.

## Fetch: the predicted-PC register

There is no ordinary PC register. The F register holds the *predicted* next
PC, which fetch writes at the end of each cycle (`fetch_predict`):

* jumps and calls: the target `valC` (a jump is predicted taken);
* everything else: the fall-through address `valP = PC + length`. Lengths
  are 1 (halt, nop, ret), 2 (rrmovq, OPq), 9 (jXX, call) or 10 (irmovq,
  rmmovq, mrmovq).

At the start of the next cycle, `pc_select` corrects the prediction with
facts from further down the pipe. The order of priority is:

1. A jump now in **memory** whose condition was false: fetch its
   fall-through address. That address travelled down the pipe in `valA`.
2. A `ret` now in **writeback**: fetch the return address it loaded
   (`W.valM`).
3. Otherwise: the predicted PC.

The correction happens one cycle after the deciding instruction leaves
execute. It reads the jump's outcome from the M register, not from the
execute logic. This keeps the long path "ALU → condition → PC MUX →
instruction memory" out of one cycle.

## The three hazards, cycle by cycle

### Load followed by use: one stall

```
cycle                 0  1  2  3  4  5  6
mrmovq 0(%rax),%rbx   F  D  E  M  W
subq %rbx,%rcx           F  D  D  E  M  W
```

`subq` reaches decode while `mrmovq` is in execute, and the value does not
exist yet. `hazard_ctrl` sees a load in execute whose destination matches a
source of decode. It stalls F and D and puts a bubble into E. In the next
cycle the loaded value leaves data memory and is forwarded into decode.
Forwarding stops at the end of decode. A load followed by a store of the
loaded register therefore also pays the one stall cycle.

### Mispredicted jump: two cycles

```
time  fetch        decode   execute          memory
3     addq (pred)  jne      subq (sets ZF)
4     rmmovq(pred) addq     jne (not taken)  subq
5     xorq         bubble   bubble           jne
```

At time 4, `hazard_ctrl` sees a not-taken jump in execute. It bubbles D and
E, which squashes `addq` and `rmmovq`. At time 5, `pc_select` takes the
fall-through address from the jump, which is now in memory. A correctly
predicted jump costs nothing.

### ret: three cycles

While a `ret` is in decode, execute or memory, fetch is held and decode
receives bubbles. When the `ret` reaches writeback, its loaded return
address goes to fetch. A `ret` therefore costs 4 cycles in all.

### Costs

| instruction       | cycles |
|-------------------|--------|
| taken jXX         | 1      |
| not-taken jXX     | 3      |
| ret               | 4      |
| load then use     | +1     |
| everything else   | 1      |

Take a mix of 3% not-taken jumps, 5% taken jumps, 1% rets and 91% other
instructions. This pipeline runs it at 1.09 cycles per instruction. If
every jump stalled until resolved (3 cycles each), the same mix would need
1.19. `tb_y86_pipe` runs such a 300-instruction mix and measures exactly
1.09.

## Forwarding

`fwd_unit` chooses each decode operand from the youngest producer of that
register, in this order:

1. `e_valE` (ALU output in execute);
2. `m_valM` (value being loaded in memory);
3. `M.valE`;
4. `W.valM`;
5. `W.valE`;
6. the register file.

Register number 0xF ("none") never matches. For `jXX` and `call`, operand A
is replaced by `valP`. For `call`, that is the return address to store. For
a jump, it is the fall-through address used if the prediction fails. The
register file has no internal write-through, because forwarding from
writeback covers that case.

## Execute, memory, writeback

* `alu` computes `b OP a`: `subq %rA,%rB` gives `rB - rA`. It also forms
  addresses (`valC + valB`) and moves the stack pointer (`valB ∓ 8`) for
  `call` and `ret`.
* `cond_unit` holds ZF, SF and OF. Only OPq sets them. At reset SF = 0 and
  ZF = 1. It evaluates the jump condition:
  * 0 = always, 1 = le, 2 = l, 3 = e;
  * 4 = ne, 5 = ge, 6 = g.

  An OPq followed directly by a jump needs no stall. The flags are stored at
  the same clock edge that moves the jump into execute.
* `data_mem` reads and writes little-endian 8-byte words at any byte
  address. The read is combinational. An access outside the memory sets the
  address-error status.
* `regfile` has fifteen 64-bit registers, with two read ports and two write
  ports. If both ports write the same register, the memory port wins.

## Instructions, status and halting

The core supports these instructions, with their standard Y86-64
encodings:

* `halt`, `nop`, `ret`
* `rrmovq`, `irmovq`, `rmmovq`, `mrmovq`
* `addq`, `subq`, `andq`, `xorq`
* `jmp`, `jle`, `jl`, `je`, `jne`, `jge`, `jg`
* `call`

`pushq`, `popq` and the conditional moves are not implemented. Like any
unknown code, they give the invalid-instruction status.

Each instruction carries a status code through the pipe:

| code | meaning                                 |
|------|-----------------------------------------|
| AOK  | normal                                  |
| HLT  | halt                                    |
| ADR  | instruction or data address out of range |
| INS  | invalid instruction                     |

When an instruction with a status other than AOK reaches memory or
writeback, younger instructions are blocked from changing state:

* the M register receives bubbles;
* the condition codes are frozen;
* W holds the faulting instruction.

`halted` then goes high. Instructions fetched after a `halt` still travel
through fetch, decode and execute, but never change state.

## Top-level interface (`y86_pipe`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst` | in | 1 | clock and synchronous reset. Reset clears the pipe, registers and condition codes, and sets the PC to 0 |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1/64/8 | load the program, one byte per clock, while `rst` is high |
| `dmem_dbg_we`, `dmem_dbg_addr`, `dmem_dbg_wdata` / `dmem_dbg_rdata` | in / out | 1/64/8 / 8 | preload and inspect data memory |
| `dbg_reg` / `dbg_reg_val` | in / out | 4 / 64 | inspect a register |
| `fetch_pc` | out | 64 | address fetched this cycle |
| `cc` | out | 3 | ZF, SF, OF |
| `stat`, `halted` | out | 2, 1 | status of the instruction in writeback |
| `events` | out | 7 | per-cycle flags (see below) |

The `events` flags are, per cycle:

* `load_use`, `ret_wait` and `mispredict`;
* `fwd_e`, `fwd_m` and `fwd_w`: forwarding from execute, memory or
  writeback;
* `retire`: an instruction other than a nop left writeback.

These flags let you count performance events outside the core.

Parameters: `IMEM_BYTES` and `DMEM_BYTES`, both 1024 by default. The
instruction and data memories are separate arrays.

## Files

| file | contents |
|------|----------|
| `rtl/y86_pkg.sv` | codes, pipeline-register structs, bubble values |
| `rtl/y86_pipe.sv` | top: stage wiring, decode register selection, ALU operand and memory address selection |
| `rtl/pipe_reg.sv` | stall/bubble register bank |
| `rtl/fetch_predict.sv` | instruction split, length, `valP`, prediction, fetch status |
| `rtl/pc_select.sv` | fetch-address correction MUX |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | memories |
| `rtl/regfile.sv` | register file |
| `rtl/fwd_unit.sv` | forwarding MUXes |
| `rtl/alu.sv`, `rtl/cond_unit.sv` | ALU, condition codes and jump condition |
| `rtl/hazard_ctrl.sv` | stall/bubble control |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_y86_pipe \
    rtl/y86_pkg.sv tb/tb_y86_pipe.sv -o sim && ./obj_dir/sim
```

Replace `tb_y86_pipe` with any other `tb_<module>`. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/y86_pkg.sv rtl/<module>.sv`.

`tb_y86_pipe` runs the core at its default sizes. Each program is checked
against an instruction-level reference model inside the testbench. The
programs are:

* the classic small sequences: forwarding paths, load/use, load then store,
  `jne` taken and not taken, `call`/`ret`, two dependency exercises;
* the instruction-mix program;
* three programs that stop on an invalid instruction or an out-of-range
  load or store;
* 200 random programs with forward branches, loads, stores and calls.

After each run it compares all registers, the data memory used, the
condition codes and the status. It also checks the exact cycle count, which
must equal N + 2 + 2·(not-taken jumps) + 3·(rets) + (load/use pairs), where
N is the number of instructions executed, including the final halt. The
count of each event must match as well. The test fails if any mechanism
never occurs. These mechanisms are load/use stall, ret stall,
misprediction, correct prediction, and forwarding from each stage.

## How far to trust it, and where it is this design's own

Everything passes in Verilator. The whole test takes well under a second.
It has not been run on an FPGA or through timing analysis.

The following come from the material the design is based on:

* the five stages and where each changes state;
* the stall/bubble register semantics;
* predict-taken with the correction made one cycle later from the memory
  stage;
* the ret handling;
* forwarding to the end of decode from three stages;
* the one-cycle load/use stall;
* the cycle costs and the 1.09 figure;
* the no-op register value 0xF;
* the reset condition codes (ZF = 1).

The following are this design's own choices:

* the memory sizes and their load and debug ports;
* separate instruction and data memories;
* the status and exception handling;
* the forwarding priority among stages;
* synchronous reset;
* the OF flag. It is needed for the signed jump conditions; only ZF and SF
  were shown.
* the event outputs;
* leaving out `pushq`, `popq` and conditional moves.

Two variants of the pipeline appear only as exercises and are not built:

* a four-stage pipeline with execute and memory merged;
* a six-stage pipeline with execute split into E1/E2.

The "stall on every jump" control, used as the baseline for the 1.19
figure, is not built either.
