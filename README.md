# A simple queue processor for an FPGA

This is a small 32-bit processor. Its instructions do not name registers.
Operands are taken from the head of a queue of registers, and results are
appended at its tail. An instruction therefore needs no register fields. A
16-bit word holds an 8-bit opcode and an 8-bit operand, which is an offset
into the queue or an immediate. The core is a seven-stage pipeline:

```
 FU ──> DU ──> QCU ──> IU ──> EU ──> MU ──> WBU
fetch decode queue   issue  execute memory write
             compute (regs)                 back ──┐
              ^                                    │
              └──────── register write ◄───────────┘ (into IU)
```

Around the core are a 4 KB data memory, an eight-digit seven-segment display,
a timer, slide switches and push buttons, all on one memory-mapped bus. There
is also an interrupt controller for the timer and the push buttons.
`rtl/qp_top.sv` is the whole system.

## Queue addressing (the QCU)

The operand store, `QREG`, has 32 words of 32 bits. It is used as a circular
queue. The queue computation unit (`qp_qcu`) keeps two 5-bit pointers: the
head `QH` and the tail `QT`. For every instruction, the decode unit says how
many entries it consumes (`CN`) and produces (`PN`). The QCU then turns the
instruction into physical register addresses:

| operand | address                      |
|---------|------------------------------|
| Src1    | `QH`                         |
| Src2    | `QH + offset` (modulo 32)    |
| Dst     | `QT`                         |

After the instruction, `QH += CN` and `QT += PN`.

A register-form ALU instruction with offset 0 takes both operands from the
head, so `CN = 2` and the offset becomes 1. A non-zero offset reaches an entry
further down the queue without consuming it, so `CN = 1`. For example, with
the queue holding 7, 5, 7, the instruction `sub` with offset 2 computes
7 − 7. It consumes only the first entry, which leaves 5, 7, 0.

Besides the queue there are 16 special-purpose registers (SPR):

| SPR   | name    | use                                  |
|-------|---------|--------------------------------------|
| 0–3   | `d0-d3` | bases for load and store             |
| 4–7   | `a0-a3` | bases for `jmp`                      |
| 8–15  | —       | general, reached only through moves  |

A register address is 6 bits. When bit 5 is set, the address names an SPR and
its low four bits are `RegNum`. `RegSel[2:0]` says which of Src1, Src2 and
Dst use the SPR instead of the queue.

Pipeline registers sit between the stages. Each queue address is fixed when
the instruction passes the QCU, three stages before its result is written.
So the QCU has already moved `QH` and `QT` on for younger instructions when
an older branch resolves. A taken branch therefore carries its own `QH` and
`QT` (its Src1 and Dst addresses). The QCU reloads both from the branch when
it flushes the younger instructions.

## Instruction set

The opcode sits in bits 15:8 and the operand in bits 7:0. The instruction
classes, the nine ALU functions and the branch conditions come from the
specification. The opcode values are this design's own (`qp_pkg`).

| opcode | mnemonic | operation | PN | CN |
|---|---|---|---|---|
| `00` | nop | | 0 | 0 |
| `1{b,r}` | setd r,b,imm | byte b (0 LL … 3 HH) of `d[r]` ← imm | 0 | 0 |
| `2{b,r}` | seta r,b,imm | same for `a[r]` | 0 | 0 |
| `30` | movsq s | queue ← SPR[s] | 1 | 0 |
| `31` | movqs s | SPR[s] ← queue head | 0 | 1 |
| `40+r` | ld r,off | queue ← M[d[r] + sext(off)] | 1 | 0 |
| `44+r` | st r,off | M[d[r] + sext(off)] ← queue head | 0 | 1 |
| `50+f` | alu f,off | queue ← head f entry(off) | 1 | 1 or 2 |
| `60+f` | alui f,imm | queue ← head f sext(imm) | 1 | 1 |
| `70` | mul off | signed product, low 32 bits | 1 | 1 or 2 |
| `80+c` | branch c,off | if C.C. matches c: PC ← PC + 2·sext(off) | 0 | 0 |
| `90` | b off | PC ← PC + 2·sext(off) | 0 | 0 |
| `94+r` | jmp r,off | PC ← a[r] + 2·sext(off) | 0 | 0 |
| `A0` `A1` `A2` | eint, dint, rfi | | 0 | 0 |

- **ALU function f:** 0 add, 1 sub, 2 or, 3 and, 4 compare, 5 shift left,
  6 shift right logical, 7 shift right arithmetic, 8 not.
  - Compare writes nothing to the queue. It sets cc[1] to the sign of
    Src1 − Src2 and cc[0] to "the difference is zero".
  - Shifts use the low five bits of the second operand. In the immediate form
    that is the operand field.
  - `not` is unary (CN = 1).
- **Branch condition c:** beq 010, bnq 000, blt 101, bgt 100, ble 011,
  bge 001.
- **Addresses:** the PC is a byte address and each instruction is 2 bytes.
  Data addresses are word addresses.

## Pipeline behaviour and programming rules

- **Jumps** (`b`, `jmp`) are resolved in decode. The instruction fetched
  behind a jump is dropped, so a jump costs one bubble. `jmp` reads its
  a-register straight from the register file, in decode. Write that register
  at least five instructions before the jump.
- **Conditional branches** are resolved in execute. When taken, they flush
  the four younger stages (fetch, decode, QCU, issue), so a taken branch
  costs four bubbles. There is no delay slot and no prediction. A compare
  may come directly before its branch.
- **Queue-register dependences are not checked.** A result is written three
  clocks after its instruction reads its operands. A read in the same clock
  as the write sees the new value. So a consumer must come at least three
  instructions after its producer, which means two instructions (or nops) in
  between.
- **SPR dependences are handled in execute.** The execute unit keeps the last
  value written to an SPR, with its address. A later instruction that reads
  that same SPR gets the kept value. Because of this, `setd d0,LH,..;
  setd d0,LL,..` and an immediately following `ld d0` all work. Only one SPR
  is tracked. Between writes to two different SPRs and their use, keep the
  same two-instruction distance as for the queue.
- **Branch shadow:** `eint`, `dint`, `rfi` and jumps take effect in decode.
  If one of them is in the two instructions behind a taken branch, it still
  acts before the branch flushes it. Do not place them there.

## Interrupts

There are two sources:

| request | source       | routine address | priority        |
|---------|--------------|-----------------|-----------------|
| int_req0 | timer        | `0x280`         | served second   |
| int_req1 | push buttons | `0x200`         | served first    |

Interrupts are off after reset. `eint` enables them and `dint` disables them.
Taking an interrupt clears the enable, so only one interrupt is in service at
a time. A request that arrives while interrupts are disabled stays pending.

On entry, the processor saves a copy of its whole state:

- all of `QREG` and the SPRs (`IQREG`, `ISPR` in `qp_iu`);
- `QH` and `QT` (`qp_qcu`);
- the condition code and the SPR-forwarding register (`qp_eu`);
- the return address (`IAR` in `qp_fu`).

On `rfi` it restores all of them and sets the enable again. For that copy to
be consistent, no instruction may be half-finished. So the interrupt
controller (`qp_intc`) first holds the fetch unit for `DRAIN` = 6 clocks,
until everything already issued has written back. Then it pulses
`IntAccept`, in the same clock as the routine address. `rfi` is handled the
same way: hold, drain, then the `RfiRestore` pulse.

An interrupt costs about 7 clocks of drain on entry and 7 more on return.

The routine runs on the interrupted program's queue pointers, which are not
reset. It must not rely on the queue being empty unless the program enables
interrupts only where its queue is empty. The test program does exactly that.
The instruction right after `eint` can still enter the pipeline before the
interrupt is taken.

## Memory map and peripherals

All bus addresses are word addresses. Loads return data one clock after the
read strobe, which is in the write-back stage.

| address | device | behaviour |
|---|---|---|
| `0x400-0x7FF` | data memory (`qp_dmem`) | 1024 × 32 bits, synchronous read |
| `0x80000000` | seven-segment (`qp_seg7`) | nibble i → HEX i, active-low segments gfedcba |
| `0x80000010` | timer command (`qp_timer`) | bit 2 Number Set (load counter), bit 0 Start/Stop |
| `0x80000011` | timer counter | write: initial value, read: current count |
| `0x80000018` | slide switches (`qp_sw`) | 18 switches, synchronised |
| `0x80000020` | push buttons (`qp_key`) | 4 buttons, active low, press → int_req1 |

Details of the devices:

- **Timer:** while running, it counts down once per clock. At 0 it raises
  `int_req0` for one clock and reloads its initial value, so it is periodic.
- **Unmapped addresses** read as 0 and ignore writes.
- **Instruction memory:** 1024 × 16 bits, inside the fetch unit. It is loaded
  through the `IMEM_*` ports of `qp_top`.
- **Reset:** synchronous, active-low `rst_n`. Execution starts at address 0.

## Where this design departs from the specification, or fills gaps

- **Opcode values** are this design's own assignment. Their meanings follow
  the specification.
- **The specified condition table** is not consistent:
  - It gives `bnq` and `bge` the same code. Here `bge` keeps 001 and `bnq`
    takes the unused code 000.
  - It gives `ble` a condition equal to `blt`. Here `ble` tests
    "negative or zero".
- **`st` addressing:** the specification says both "address = Src1 (d) +
  offset" and "memory ← Src1", which cannot both hold. Here `st` takes its
  data from Src1 (the queue head) and its base from Src2 (the d register).
  `ld` uses Src1 as its base.
- **The byte and register of `setd`/`seta`** are taken from the low opcode
  bits, because the operand byte carries the immediate.
- **Interrupt entry drains the pipeline** before the snapshot. The
  specification asks for a synchronous interrupt without flushing and lists
  the state to save. It does not say how in-flight instructions are kept out
  of the copy. `IntEnable` is therefore used only by the interrupt
  controller, not by every unit.
- **SPR forwarding:** the register is loaded by every SPR write, not only by
  `set`, and it is also used for Src2. Without that, a `movqs` followed by a
  `set` of the same SPR would read a stale value.
- **Jumps** are resolved entirely in decode. The execute unit does not act on
  them.
- **The issue unit passes on the Src2 address** as well as Src1, so that
  the SPR forwarding can cover the `st` base register.
- **Signal names** follow the `UNIT_I_Name`, `UNIT_O_Name`, `UNIT_Name_reg`
  and `UNIT_Name_wire` style inside the pipeline units. The bus and the
  peripherals use short lower-case names.
- **Not provided:**
  - There are no LED outputs. The specification lists LEDs as a peripheral
    but gives them no address.
  - There is no prediction for conditional branches.
  - There is no hazard check on queue registers. The specification leaves
    that to a superscalar version.
- **Choices that are this design's own:**
  - the instruction-memory size;
  - synchronous memories;
  - the seven-segment polarity;
  - the switch and button counts;
  - the timer's periodic reload at one count per clock;
  - `DRAIN`.

## Verifying and simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb/tb_qp_top.sv` assembles a test program in SystemVerilog, loads it and
runs the full-size system. The program:

- uses every ALU function, the multiplier, queue offsets, byte sets with
  forwarding, and moves;
- performs loads and stores to memory and to every device;
- takes branches and falls through them, with the queue pointers renewed
  after each flush;
- uses both jump forms;
- takes a timer interrupt whose routine overwrites registers and the queue;
- takes a push-button interrupt whose routine reads the switches.

The test checks the stored results, and checks that each mechanism occurred
(branch taken and not taken, jump, both interrupts, returns, drains, SPR
forwarding, queue wrap-around, bus traffic of each kind). It runs in about
1,500 clocks.

With Verilator:

```
verilator --binary --timing -y rtl rtl/qp_pkg.sv tb/tb_qp_top.sv --top-module tb_qp_top
./obj_dir/Vtb_qp_top
```

Any other testbench runs the same way. Replace `tb_qp_top` with its name,
for example `tb_qp_eu` or `tb_qp_qcu`.

To change sizes, `qp_top` has these parameters:

| parameter    | meaning                                    |
|--------------|--------------------------------------------|
| `IMEM_DEPTH` | instruction memory words                   |
| `DMEM_DEPTH` | data memory words                          |
| `N_SW`       | number of slide switches                   |
| `N_KEY`      | number of push buttons                     |
| `DRAIN`      | drain length; keep it at or above the distance from decode to write back |

The queue depth and the SPR count are constants in `qp_pkg`. The address
format depends on them.

## Files

| file | contents |
|---|---|
| `rtl/qp_pkg.sv` | widths, control structs, opcode classes, memory map |
| `rtl/qp_fu.sv`, `rtl/qp_imem.sv` | fetch unit, instruction memory |
| `rtl/qp_du.sv` | decode unit, jumps, interrupt enable |
| `rtl/qp_qcu.sv` | queue head/tail and address generation |
| `rtl/qp_iu.sv` | QREG/SPR register file and shadows |
| `rtl/qp_eu.sv` | ALU, multiplier, set/move, condition code, branches |
| `rtl/qp_mu.sv`, `rtl/qp_wbu.sv` | memory and write-back stages |
| `rtl/qp_iobus.sv`, `rtl/qp_dmem.sv` | bus decoder, data memory |
| `rtl/qp_seg7.sv`, `rtl/qp_timer.sv`, `rtl/qp_sw.sv`, `rtl/qp_key.sv` | peripherals |
| `rtl/qp_intc.sv` | interrupt controller |
| `rtl/qp_top.sv` | the system |
