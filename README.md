# S3.0 multicore processor in SystemVerilog

S3.0 is a small teaching processor. Several copies of it run side by side
on one shared memory. Each core has a three-address, load/store instruction set
with 32-bit words and 32 general registers. Conditions are ordinary register
values (0 is false, anything else is true) rather than flags. Four instructions
turn the single-core design into a multicore one:

- `cid` gives a core its own number.
- `intx` sends an interrupt to another core.
- `wfi` sleeps until an interrupt arrives.
- `sync` is a barrier across all cores.

The instruction set fixes the encoding and what every instruction does. It does
not fix a micro-architecture. The non-pipelined, multi-cycle core and the memory
system here are this implementation's choices. They are described below.

## Instruction set as implemented

All instructions are one 32-bit word. The fields are listed from the most
significant bit down:

| format | fields                            | used by                                         |
|--------|-----------------------------------|-------------------------------------------------|
| L      | `op:5 r1:5 ads:22`                | absolute ld/st, `mv r1 #n`, jmp, jal, jt, jf    |
| D      | `op:5 r1:5 r2:5 disp:17`          | `ld/st r1 @d r2`, ALU operations with immediate |
| X      | `op:5 r1:5 r2:5 r3:5 xop:12`      | everything under opcode 31                      |

`ads`, `disp` and the immediates are sign-extended to 32 bits. Memory is
addressed in words.

Primary opcodes:

| op | instruction | op | instruction |
|----|-------------|----|-------------|
| 0 | nop | 1 | `ld r1 ads` |
| 2 | `ld r1 @d r2` (M[d+R[r2]]) | 3 | `st r1 ads` |
| 4 | `st r1 @d r2` | 5 | `mv r1 #n` |
| 6 | `jmp ads` | 7 | `jal r1 ads` |
| 8 | `jt r1 ads` | 9 | `jf r1 ads` |
| 10..24 | add sub mul div and or xor eq ne lt le gt ge shl shr, each with `r1 r2 #n` | 31 | X-format |

Extended opcodes (X-format, `xop`): the same 15 ALU operations with `r1 r2 r3`
use xop 0..14. The others are:

| xop | instruction | xop | instruction |
|-----|-------------|-----|-------------|
| 15 | `mv r1 r2` | 24 | `reti` |
| 16 | `ld r1 +r2 r3` | 25 | `ei` |
| 17 | `st r1 +r2 r3` | 26 | `di` |
| 18 | `ret r1` | 27 | `pushm r1` |
| 19 | `trap n` (n in the r1 field) | 28 | `popm r1` |
| 20 | `push r1 r2` | 29 | `cid r1` |
| 21 | `pop r1 r2` | 30 | `wfi` |
| 22 | `not r1 r2` | 31 | `intx r1` |
| 23 | `int 0` | 32 | `sync` |

Opcodes 25..30 and xops 33..4095 are undefined and execute as `nop`.

Arithmetic details. Where the instruction set leaves a point open, the choice
made here is marked "chosen":

- Arithmetic is two's complement. Comparisons are signed and return 1 or 0.
- `mul` keeps the low 32 bits (chosen).
- `div` truncates toward zero (chosen). Division by zero gives 0, and
  -2^31 / -1 gives -2^31 (chosen).
- `shl` is a logical shift. `shr` is arithmetic (chosen). The shift amount is
  the whole operand, so an amount of 32 or more gives 0 or the sign fill (chosen).
- `not` is a bitwise complement.
- `jal r1 ads` puts the address of the next instruction in R[r1]. `ret r1`
  then returns past the call.
- R[0] is an ordinary register. It is not hard-wired to zero.

Stack instructions. R[r1] is the stack pointer, and the stack grows upward:

- `push r1 r2` increments R[r1], then stores R[r2] at M[R[r1]]. The value stored
  is R[r2] from before the increment.
- `pop r1 r2` loads R[r2] from M[R[r1]], then decrements R[r1].
- `pushm r1` pushes R[0], R[1], ..., R[15].
- `popm r1` pops R[15] down to R[0], so it exactly undoes `pushm`.

Trap. `trap n` reports n and R[30] on the core's trap port. The environment
handles the codes:

- 1 prints R[30] as an integer.
- 2 prints R[30] as a character.
- 0 stops the core: it enters a halted state until reset.

## How a core executes (`s30_core`)

Each core is a state machine that runs one instruction at a time. Instructions
and data both go through the core's single memory port.

```
START -> FETCH -> IFWAIT -> EXEC -+-> FETCH                   (ALU, mv, jumps, cid, ei/di, intx, trap)
           |                      +-> MREQ -> MWAIT -> FETCH  (ld, st, push, pop, int 0)
           |                      +-> MULTI -> MREQ -> MWAIT -> MULTI ... (pushm/popm, 16 words)
           |                      +-> WFI / SYNC -> FETCH,  HALT
           +-> (interrupt pending and enabled) MREQ -> MWAIT: PC = M[1000+core_id]
```

With an uncontended memory:

| instruction              | cycles     |
|--------------------------|------------|
| ALU, mv, jump            | 3          |
| load, store, push, pop   | 5          |
| pushm, popm              | 3 + 16 x 3 |

Every cycle the arbiter withholds a grant adds one cycle. The core testbench
checks the 3- and 5-cycle figures.

The core contains:

- `s30_decode`, which splits the instruction into fields. It also maps opcodes
  10..24 and xops 0..14 and 22 onto one 4-bit ALU operation.
- `s30_regfile`, which has three read ports and one write port. Some
  instructions read three registers, for example `st r1 +r2 r3`.
- `s30_alu`.

The register write port is shared by all states. This is why `pop` writes
R[r1] in EXEC and R[r2] when the data arrives. It is also why each
`pushm`/`popm` step updates the stack pointer in MULTI and moves the data word
in MWAIT.

## Interrupts

This is the part of the design with the most choices of its own. The
instruction set says four things:

- There is one hardware interrupt level and one software interrupt.
- R[31] receives the return PC.
- Core c finds the address of its service routine in memory word M[1000+c].
- `reti` jumps back to R[31].

This implementation adds the following rules:

- **Pending flag.** Each core has a pending flag. It is set by the core's
  `irq` input, and the `irq` input is driven by two sources:
  - the core's external interrupt line;
  - an `intx` from any core, including the core itself.
- **When an interrupt is taken.** The flag is checked in FETCH, between
  instructions. If it is set and interrupts are enabled, the core takes the
  interrupt:
  - it saves the PC of the next instruction in R[31];
  - it saves the enable bit and then clears the enable;
  - it clears the pending flag;
  - it loads the new PC from M[1000+core_id].
- **`reti`.** Jumps to R[31] and restores the enable bit as it was before the
  interrupt was taken. Interrupts therefore do not nest, and a service routine
  needs no `ei` before it returns.
- **`int 0`.** Enters the service routine in the same way, whatever the enable.
  It saves the address after the `int` instruction.
- **`ei`, `di`.** Set and clear the enable. After reset interrupts are disabled.
- **`wfi`.** Waits until the pending flag is set. This also works with
  interrupts disabled. The race-free way to wait for a message from another
  core is therefore `wfi` with interrupts disabled, then `ei`. The interrupt is
  taken right after the `ei`.
- **Registers in the service routine.** Only R[31] is saved by hardware. A
  service routine that uses other registers saves them itself, for example with
  `pushm`/`popm`.

## Multicore: shared memory, intx, sync (`s30_system`)

```
           +--------+   +--------+        +--------+
 ext_irq ->| core 0 |   | core 1 |  ...   | core NC-1 |      host port
           +--------+   +--------+        +--------+          |
             |  ^ intx/irq  |  ^               |  ^            |
             |  +---- s30_int_router ----------+  |            |
             |  sync_arrive / sync_go: s30_sync_barrier        |
             +--------------+---------+--------+---------------+
                                      |
                               s30_mem_arbiter (round robin, NC+1 requesters)
                                      |
                               s30_mem (2^22 x 32-bit words)
```

- **Memory.** All cores and the host share one single-port RAM. The
  `s30_mem_arbiter` grants one request per cycle and searches round-robin,
  starting after the last requester it granted. A waiting requester is
  therefore served within NC+1 grants.
  - Protocol: the requester holds `req` until `gnt`. One cycle after the grant,
    `rvalid` comes back, with `rdata` if the access was a read.
  - There are no caches, so a store is seen by every core as soon as it is
    done.
- **intx.** `intx r1` pulses the `irq` of core R[r1] through `s30_int_router`.
  An id of NC or more reaches no core.
- **sync.** A core at `sync` raises `sync_arrive`. `s30_sync_barrier` raises
  `go` when every core is either arriving or halted, and at least one core is
  arriving. All waiting cores then leave in the same cycle. Halted cores count
  as present, so a core that has finished cannot block the others.
- **Start-up.** All cores start at address `RESET_PC` (0). They usually branch
  on `cid` to separate their work.

## Parameters

| parameter  | module                        | default | origin |
|------------|-------------------------------|---------|--------|
| `NC`       | `s30_system`                  | 4       | chosen; the instruction set allows any number of cores |
| `MEM_AW`   | `s30_system`, `s30_mem`       | 22      | the 22-bit direct address range (4M words) |
| `RESET_PC` | `s30_system`, `s30_core`      | 0       | chosen |
| `CORE_ID`  | `s30_core`                    | 0       | set to 0..NC-1 by the top |
| `N`, `W`   | `s30_regfile`                 | 32, 32  | instruction set |

The instruction-set constants are in `rtl/s30_pkg.sv`: opcodes, xops, the
vector base 1000 and the register numbers 30 and 31. The same package holds the
memory request and response structs.

## Top-level interface

`s30_system` has the following ports:

- `clk`, and `rst_n` (asynchronous, active low). The memory contents are not
  reset.
- Host port: `host_req`, `host_we`, `host_addr`, `host_wdata`, `host_gnt`,
  `host_rvalid`, `host_rdata`. It uses the same protocol as a core.
  - Writes are accepted while `rst_n` is low. This is how programs are loaded.
  - Reads answer only when reset is released, because the arbiter's response
    register is held in reset.
- `ext_irq[NC]`: external interrupt lines, one per core.
- `trap_valid[NC]`, `trap_code[NC]`, `trap_value[NC]`: one cycle per `trap`
  instruction.
- `halted[NC]`, `exec_valid[NC]`: core status.

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The tests use `tb/s30_asm_pkg.sv`, a package
of instruction encoders (`enc_l`, `enc_d`, `enc_x`) and a reference model of the
ALU, so test programs are written inside the testbench.

Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/s30_pkg.sv tb/s30_asm_pkg.sv tb/tb_s30_system.sv --top-module tb_s30_system
./obj_dir/Vtb_s30_system
```

The testbenches are:

| testbench | what it covers |
|-----------|----------------|
| `tb_s30_alu` | all 16 operations, corner operands and random operands, against the reference model |
| `tb_s30_regfile` | reset, writable R[0], random traffic against a shadow copy |
| `tb_s30_decode` | fields, sign extension and ALU mapping on random words |
| `tb_s30_mem` | read latency, random traffic (small memory) |
| `tb_s30_mem_arbiter` | one grant per cycle, rvalid timing, read data, the round-robin wait bound |
| `tb_s30_int_router`, `tb_s30_sync_barrier` | exhaustive or random comparison with the rule |
| `tb_s30_core` | one core (id 2) with a memory model. A program uses every instruction class, then results and cycle counts are checked. In the second half the memory refuses grants at random. |
| `tb_s30_system` | the full default system: 4 cores, 4M words. Details below. |

The system test does the following:

- Each core computes a sum and doubles it in a subroutine that uses `jal`/`ret`
  and `push`/`pop`.
- The cores meet at `sync`.
- Core 0 interrupts the others with `intx`, and is itself woken by the external
  line.
- Each service routine runs `pushm`/`popm`.
- The cores meet at `sync` again, then disable interrupts and enter the same
  service routine through the software interrupt `int 0`.
- Core 0 prints the total with trap 1, and every core prints a letter with
  trap 2 and halts.

The test counts memory stalls, barrier releases, intx, wfi, hardware and
software interrupt entries, jal/ret, push/pop, pushm/popm and traps, and fails if any of them did not happen. It runs in well
under a second.

## Limits and departures

- The design is a functional model of the instruction set on a simple
  multi-cycle core. It has no pipeline, caches or performance features.
- It does not model the full 32-bit (4G word) address space. Addresses are 32
  bits wide, but the memory decodes only the low `MEM_AW` bits, so higher
  addresses alias.
- The opcode table notes "use r1 as sp" for `ei` and `di`. Here both
  instructions ignore their operand fields.
- Printing and stopping a simulation (`trap 1/2/0`) are left to whatever is
  attached to the trap port. In hardware, trap 0 halts the core.
- Hardware interrupt entry, `int 0`, `wfi` and `intx` follow the rules in
  *Interrupts* above. Code written for another S3.0 implementation may assume
  different rules on the same points.
