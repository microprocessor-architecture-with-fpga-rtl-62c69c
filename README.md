# nod4.1 — an 8-bit accumulator soft processor for teaching

nod4 is a deliberately small von Neumann computer meant to be read, simulated and modified
by students: one accumulator, a condition-code register, a stack pointer, an index
register and a program counter, all 8 bits wide, on an 8-bit address bus. Its motto is
"simple yet nontrivial": it is small enough to understand completely, yet it has
subroutines, stack-relative addressing, interrupts, conditional branches and a two-byte
instruction fetch with pre-fetching.

This repository holds synthesizable SystemVerilog for the nod4.1 implementation: the
processor (a controller and a data path), a memory system with ROM, RAM and an LED output
register, and a system top that joins them. It also has self-checking testbenches for
every module.

The structure follows the original nod4.1 design: the register set, the data path, the
blocks of the fetch-execute cycle, the memory map and the memory-system components. Some
details of the original are not reproduced here. These are the exact operation codes
inside each encoding group, the microcode listing, the flag rules and the interrupt
handshake. This design fills them in with its own choices, and every such choice is
marked below.

## Programmer's model

| Register | Width | Use |
|---|---|---|
| A  | 8 | accumulator |
| C  | 8 | `C[7]` Z (zero), `C[6]` C (carry/borrow), `C[5]` I (interrupt enable), `C[4:0]` IID (interrupt identifier) |
| S  | 8 | stack pointer; a push decrements S and then writes, a pop reads and then increments |
| X  | 8 | index register |
| PC | 8 | program counter (in practice a fetch counter, see below) |

The flag positions within `C[7:5]` are this design's choice. The original only says which
three flags share the upper bits.

Memory map:

| Address | Contents |
|---|---|
| `$00` | PSA: the program start address, loaded into PC after reset |
| `$01` | PIA: the program interrupt address, the single interrupt vector |
| `$02..$BF` | rest of the 192-byte ROM |
| `$C0..$FB` | 60-byte RAM (variables, stack) |
| `$FC` | device 1: LED output register (write-only) |
| `$FD..$FF` | devices 2..4: brought out to the top level for external peripherals |

A program usually sets `S` to `$FC`, so the first push lands at `$FB`.

## Instruction set and encoding

There are four addressing modes. **Implied** (IMP) has no operand. **Immediate** (IMM) is
written `lda $12`. **Direct** (DIR) is written `lda [$C0]`. **Indexed** (IND) is written
`lda [X+3]` or `lda [S+1]`. Square brackets mean "the contents of the address".

| Mnemonic | Meaning | Modes | Registers R |
|---|---|---|---|
| `andR`, `orR`, `cmpR` | R &= M, R \|= M, flags of R − M | IMM DIR IND | A C X |
| `addR`, `subR`, `ldR` | R += M, R −= M, R = M | IMM DIR IND | A S X |
| `stR` | M = R | DIR IND | A S X |
| `pshR`, `popR` | push / pop | IMP | A C X |
| `incR`, `decR` | R ± 1 | IMP | A S X |
| `clra`, `inva`, `nega` | A = 0, A = ~A, A = −A | IMP | |
| `rts`, `rti`, `swi` | return, return from interrupt, software interrupt | IMP | |
| `jmp jeq jne jlo jhs jls jhi jsr` | jumps (target is the immediate byte) | IMM | |

An opcode byte is split into the fields `g | rr | mmn | xx`:

| Field | Bits | Meaning |
|---|---|---|
| `g` | 7 | register set: 0 = {A, C, X}, 1 = {A, S, X} |
| `rr` | 6:5 | register code A=00 C=01 S=10 X=11. The code that is not in the set marks a group with no register: `0 10` holds the implied and jump instructions; `1 01` is reserved. |
| `mmn` | 4:2 | mode: `00n` IMP, `01n` IMM, `10n` DIR, `110` IND from S, `111` IND from X |
| `xx` | 1:0 | operation within the group |

These four formats, the register codes and the mode field are the original encoding. How
operations are assigned within each group is this design's own:

* `g=0` with a register, IMM/DIR/IND: `xx` = 00 `and`, 01 `cmp`, 10 `or` (11 reserved).
* `g=1` with a register, IMM/DIR/IND: `xx` = 00 `add`, 01 `st`, 10 `sub`, 11 `ld`. `st`
  with the immediate mode is reserved.
* In IMM and DIR modes of the register groups, the `n` bit is ignored.
* Implied instructions use `{n,xx}` as the selector:
  * `g=0`: 000 `psh`, 001 `pop`.
  * `g=1`: 000 `dec`, 001 `inc`.
  * Group `0 10`: 000 `clra`, 001 `inva`, 010 `nega`, 011 `rts`, 100 `rti`, 101 `swi`.
* Jumps in group `0 10` IMM use `{n,xx}`: 000 `jmp`, 001 `jeq` (Z), 010 `jne` (!Z),
  011 `jlo` (C), 100 `jhs` (!C), 101 `jls` (C|Z), 110 `jhi` (!C & !Z), 111 `jsr`.
* Reserved opcodes execute as no-operations one byte long (implied) or two bytes long
  (other modes).

So `opcode = g<<7 | rr<<5 | mmn<<2 | xx`. Examples:

| Instruction | Opcode |
|---|---|
| `lds $FC` | `$CB` |
| `lda [X+0]` | `$9F` |
| `cmpa $80` | `$09` |
| `jlo` | `$4B` |
| `nega` | `$42` |
| `sta [$FC]` | `$91` |
| `rts` | `$43` |
| `jsr` | `$4F` |
| `jmp` | `$48` |

Flags (this design's rules):

* `add`, `sub`, `cmp` and `nega` set Z and C. C is the carry for `add` and the borrow
  (unsigned "lower") for `sub`, `cmp` and `nega`.
* `and`, `or`, `ld`, `clra`, `inva`, and `inc`/`dec` of A or X set Z only.
* `inc`/`dec` of S, stores, pushes and pops of A or X change no flag.
* When C itself is the destination (`andc`, `orc`, `popc`), the whole register is
  replaced. Interrupts are therefore enabled with `orc $20` and disabled with `andc $DF`.

## The fetch-execute cycle

This is the part of the design that needs the most care. The controller is
microprogrammed. A micro-program counter addresses a 68-word horizontal micro-ROM, and
each word gives one cycle's control word. The micro-routines are grouped into six blocks:

```
 INIT ──► FETCH1 ──► FETCH2 ──► EXECUTE ──► FETCH1 | FETCH2 | INTERRUPT
                        └──► ACCESS_EA ──► EXECUTE
 INTERRUPT ──► FETCH1
```

* **INIT** reads `$00` (PC is 0 after reset) and loads the start address into PC.
* **FETCH1** reads the opcode at PC into the data-bus register DX and increments PC.
* **FETCH2** moves the opcode from DX into IR, reads the *next* byte into DX and
  increments PC again. It also decodes the opcode (still in DX at that moment) to choose
  ACCESS_EA or EXECUTE.

Every instruction therefore fetches two bytes, whatever its length. For immediate, direct,
indexed and jump instructions the second byte is the operand. For an implied instruction
it is the next opcode: a **pre-fetch**. After an implied instruction that does not
disturb DX (clra, inva, nega, inc, dec, psh), EXECUTE goes straight to FETCH2, which
takes the pre-fetched opcode from DX. This saves the FETCH1 cycle, so such instructions
cost 2 cycles instead of 3. Fetching two bytes unconditionally also means no cycle is
spent deciding whether a second byte is needed.

The consequence is that after FETCH2, PC holds the opcode address plus two. That is the
right return address for the two-byte `jsr`, which simply pushes PC. But it is one too
far whenever an implied instruction is followed by a change of flow. There are three
such places:

* **Interrupt after a pre-fetching instruction.** The interrupt code first decrements
  PC, so the pushed return address is the pre-fetched opcode.
* **`swi`** is one byte long. It decrements PC before entering the interrupt code, so
  `rti` resumes at the instruction after `swi`.
* **`pop`, `rts` and `rti`** read the stack through DX and so overwrite the pre-fetched
  opcode. `pop` decrements PC and continues at FETCH1. `rts` and `rti` load a new PC
  anyway.

**ACCESS_EA** forms the effective address and does the memory access. A direct address is
the operand byte in DX itself (one cycle). An indexed address is first computed into the
hidden register ND (`ND <= S/X + offset`), and then accessed (two cycles). Loads read into
DX. Stores write the register in this block, and the EXECUTE cycle that follows only ends
the instruction.

Cycles from one FETCH2 to the next, including any FETCH1 in between:

| Class | Cycles |
|---|---|
| implied ALU (`clra` `inva` `nega` `inc` `dec`) | 2 |
| `psh` | 3 |
| `pop` | 5 |
| `rts` | 4 |
| `rti` | 10 |
| immediate | 3 |
| direct | 4 |
| indexed | 5 |
| jump, taken or not | 3 |
| `jsr` | 5 |
| interrupt entry | 14 (13 with nothing to undo) |

### Micro-program and jump-ahead dispatch

Each micro-instruction (`ucode()` in `nod4_controller`) has three parts:

* **A data-path control word.** This is `ctrl_t` from `nod4_pkg`.
* **Register fields.** `r_ld`, `r_do` and `r_b` say "the register named by IR" instead
  of naming one. `ix_b` says "S or X, by the indexed mode". This lets one routine serve
  `ldx` and `lds`, or `pshc` and `pshx`.
* **A sequencing field.** It has the values shown in the table below.

| Sequencing | Next micro-address |
|---|---|
| `NEXT` | upc + 1 |
| `FETCH1` | the fetch1 word |
| `DISPATCH` | jump ahead on the opcode just read into DX (end of fetch2): access-EA for direct/indexed, else the instruction's execute routine |
| `EXEC` | jump ahead on IR to the execute routine (end of access-EA) |
| `END` | interrupt routine (after its undo step) if `irq & I` and the step does not load C, else fetch1 |
| `END_PF` | interrupt routine (from its undo step) if `irq & I`, else fetch2 |
| `SWI` | interrupt routine after its undo step, IID 0 |

There are two dispatch functions. `dispatch()` is used at the end of fetch2;
`exec_entry()` is used there for non-memory instructions and at the end of access-EA.
Together they are the "jump-ahead rules". They keep the decode from becoming a binary
tree of micro-branches: every opcode reaches its routine in one step.

To add an instruction, add micro-words in a free range and extend `exec_entry()`. Adjust
`U_LAST` and the block boundaries used for `state_o`. The micro-program is this design's
own; the original lists its microcode separately.

## Interrupts

There is one vector, the PIA at `$01`, shared by hardware interrupts and `swi`. A hardware
request (`irq`, level sensitive) is taken at the end of an instruction when `I = 1`.
The one exception is an instruction that loads the whole C register (`and`, `or` or `pop`
with C). It never ends in an interrupt entry, and a waiting request is taken after the
next instruction instead. This way `and C,#$DF` really does shut interrupts out at once,
and `or C,#$20` enables them from the next instruction on.

The interrupt code does the following:

1. Undo a pre-fetch, if the last instruction made one.
2. Push PC, A, X and C, in that order. S is decremented before each write.
3. Write `C <= {Z, C, I=0, IID}`. The IID comes from `irq_id`, or is 0 for `swi`. In the
   same cycle, pulse `iack` (hardware interrupts only).
4. Load PC from `$01`.

`rti` pops C, X and A and then PC, which also restores I. A handler can read its IID with
`pshc` / `popa`. The device should drop `irq` when it sees `iack`.

Which registers are saved comes from the original instruction table: `swi` and `rti` use
A, C, S and X. The push order, the handshake and the sampling point are this design's
choices.

## Data path

Registers:

* Programmer-visible: A, C, S, X and PC.
* Hidden: DX (data-bus register), ND (temporary; holds indexed addresses) and IR.

The ALU has a D input fed by a 2:1 multiplexer {A, DX} and a B input fed by a 6:1
multiplexer {C, S, X, PC, ND, DX}. Every register loads the ALU result Y. C can instead
load single flags from the ALU flag output F, or the interrupt-entry value. IR loads from
DX.

Two further multiplexers drive the busses:

* The address bus `ax` selects {PC, S, DX, ND}.
* The write-data bus `dout` selects {A, C, S, X, PC}.

Memory data reach the processor only through DX. Nothing inspects the read bus directly,
which keeps the read path short and is why decoding happens one cycle after the opcode is
read.

Because A sits on the D side and C/S/X on the B side, the ALU offers subtraction in both
directions. It also has increment and decrement on either side. Which register feeds
which multiplexer input is this design's choice.

## Memory system and bus timing

The processor has three unidirectional busses and two strobes:

| Signal | Direction | Use |
|---|---|---|
| `ax` | out | address |
| `dout` | out | write data |
| `di` | in | read data |
| `rd` | out | read strobe |
| `wr` | out | write strobe |

* **Read cycle:** `rd` and `ax` are valid for one clock. ROM and RAM answer
  combinationally. DX captures `di` at the rising edge that ends the cycle.
* **Write cycle:** `wr`, `ax` and `dout` are valid for one clock. The RAM or LED register
  commits the byte at the rising edge that ends the cycle.

The memory system has these parts:

* **`nod4_memena`** decodes the address into RomEna, RamEna and Dev1..Dev4 enables.
* **`nod4_rom192`** holds the program. It reads asynchronously and is loaded from a hex
  file.
* **`nod4_ram60`** reads asynchronously and writes synchronously. It uses address bits
  `[5:0]`.
* **`nod4_reg8x`** drives the LEDs.

The original shares `di` with three-state drivers. Here every device drives 0 when it is
not selected, and the outputs are ORed, which gives the same result with two-state logic.
The LED register cannot be read back; a read of `$FC` returns 0. Reads of `$FD..$FF`
return the `dev_di` input.

## Module hierarchy

```
nod4_system                 top: processor + memory system
├── nod4_cpu
│   ├── nod4_controller     microprogrammed sequencer (micro-ROM + dispatch)
│   └── nod4_datapath       registers, multiplexers
│       └── nod4_alu
└── nod4_memsys
    ├── nod4_memena         address decode
    ├── nod4_rom192         program ROM (ROM_FILE)
    ├── nod4_ram60          data RAM
    └── nod4_reg8x          LED register
nod4_pkg                    shared types: control word, ALU ops, opcode fields, memory map
```

`nod4_system` parameter: `ROM_FILE` (default `rtl/nod4_ex0.hex`). Its ports are:

* `clock`, `reset` (synchronous, active high).
* `clear`: clears the LEDs. Reset also clears them.
* `irq`, `irq_id[4:0]`, `iack`.
* `leds[7:0]`.
* The bus, for external devices: `ax`, `dout`, `rd`, `wr`, `dev_ena[2:0]` (for
  `$FD..$FF`) and `dev_di[7:0]`.

## ROM images

Hex files hold one byte per line, in `$readmemh` format. Paths are relative to the
directory the simulator runs in, which is the repository root in the commands below.

* `rtl/nod4_ex0.hex` (the default) is a small demonstration program:
  1. Set `S` to `$FC` and point X at a data byte (`$37`).
  2. `jsr` to a subroutine that loads the byte through `[X+0]`, compares it with `$80`,
     negates it if it is negative, and writes it to the LEDs.
  3. Return, then loop on `jmp` to itself.
* `tb/nod4_cputest.hex` and `tb/nod4_systest.hex` are the test programs used by the
  testbenches.

To write your own program, encode it with the field formula above. Put the start address
at `$00` and the handler address at `$01`.

## Simulating

From the repository root, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/nod4_pkg.sv tb/tb_nod4_system_ex0.sv --top-module tb_nod4_system_ex0
./obj_dir/Vtb_nod4_system_ex0
```

Replace the testbench name to run another test. Every testbench prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_nod4_system_ex0` | The default system runs the demonstration program. The LEDs show `$37`. The return address `$08` was pushed at `$FB`. The stack pointer is back at `$FC`. The LED write happens in cycle 27 after reset. |
| `tb_nod4_system` | End to end, with the `nod4_systest` program. Random bytes are read from device 2. Their absolute values are computed through a stack-passed subroutine and checked on the LEDs and device 3. Three hardware interrupts and one `swi` occur, and `clear` is exercised. The bench counts each mechanism (pre-fetch, pre-fetch undo, hardware and software interrupt, ROM/RAM/device accesses). Any mechanism that never happens counts as a failure. It prints the cycles per instruction of the run, interrupts included (about 4.2). |
| `tb_nod4_cpu` | The processor on a flat memory running `nod4_cputest`, which uses every instruction class, every jump condition, both index registers, `jsr`/`rts`, five hardware interrupts with distinct IIDs while pre-fetching instructions run, and `swi`. It checks result bytes, the IID each handler sees, register preservation across interrupts, and the cycle count of every instruction against the table above. It also prints the average cycles per instruction (about 4.4 for this program). |
| `tb_nod4_cpu_random` | Sixty random programs run on the processor and on an instruction-level model written inside the bench. The programs use every opcode, reserved ones included. Hardware requests with random IIDs arrive at random times. A, C, S and X are compared after every instruction, and RAM at the end of each program. The model follows each acknowledged request, so the saved PC checks the pre-fetch undo. The bench also checks that no request is taken with I = 0 or left waiting while I = 1. A program stops early if `psh` overwrites the opcode the processor has already pre-fetched (code running in RAM). There the hardware correctly runs the old byte. |
| `tb_nod4_controller` | Block sequence and control-word fields for each part of the micro-program. |
| `tb_nod4_datapath` | Random control words against a register-level model. |
| `tb_nod4_alu` | ALU corners and random operands. |
| `tb_nod4_memsys` | Memory system at bus level. |
| `tb_nod4_memena` | Address decoder. |
| `tb_nod4_rom192` | Program ROM. |
| `tb_nod4_ram60` | Data RAM. |
| `tb_nod4_reg8x` | LED register. |

All of them pass. They also lint cleanly with `verilator --lint-only -Wall`; only
unused-signal and unused-parameter warnings remain. The controller asserts that `rd` and
`wr` are never high together.

## How far to trust it, and where it departs from the original

Taken from the original nod4.1:

* the registers and their roles;
* the four encoding formats, the register codes and the mode field;
* the instruction list per mode and register;
* the two-byte fetch, pre-fetching, and undoing the pre-fetch on interrupt;
* the single vector with PSA/PIA at `$00`/`$01`;
* the 5-bit IID, with 0 reserved for `swi`;
* the memory map and sizes (192-byte ROM, 60-byte RAM, four device addresses);
* asynchronous-read, synchronous-write RAM;
* the data-path register set, including hidden DX/ND/IR, and the rule that DX buffers
  all reads;
* the controller's blocks: init, fetch1, fetch2, access-EA, execute and interrupt.

This design's own choices, which a nod4 assembler or program written for the original
will not necessarily match:

* **Operation codes.** The codes within each group, and which five conditions the seven
  jumps test (besides `jmp` and `jlo`). Binary programs for the original will not run
  unchanged.
* **Flags.** Their positions in C and which instructions update them.
* **Interrupts.** The push order, the irq/iack handshake, and the use of the `irq_id`
  input.
* **Interrupt timing.** A request waits one instruction after an instruction that loads
  the whole C register.
* **Self-modifying code.** If `psh` writes to the address of the very next opcode (code
  running in RAM, with the stack growing down into it), the old opcode, already
  pre-fetched, is the one that runs.
* **Controller.** The micro-program is this design's own, as are the dispatch tables.
  Its cycle counts are therefore this design's, not the original's.
* **Data path.** The multiplexer inputs. ND is used only for indexed addresses.
* **Stores.** They finish with an EXECUTE cycle that does nothing.
* **Registers.** Reset is synchronous, all registers start at 0, and the RAM powers up
  cleared.
* **`di` bus.** It is built from OR logic instead of three-state drivers.

Not included:

* the optional peripherals at `$FD..$FF` (only their bus signals are brought out);
* the assembler;
* the earlier nod4.0 implementation with its bidirectional data bus.
