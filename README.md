# A task processor for hard real-time systems

In a hard real-time controller a late result is a wrong result. What matters
is therefore not how fast the processor is on average, but whether the
worst-case time of every task can be known in advance. This design belongs to
an architecture built around that idea. The operating-system work is moved
out of the processors that run application code:

* A **kernel processor** keeps the real-time clock, takes external events and
  schedules tasks, earliest deadline first.
* One or more **task processors** run the tasks themselves. They are never
  interrupted by operating-system housekeeping.

This repository holds SystemVerilog RTL for the **task processor**. It has no
caches, no pipelining whose timing depends on history, and no interrupts
inside a task. Every functional unit takes a fixed number of cycles. An
instruction's time therefore depends only on its opcode, with one exception:
accesses to external memory also depend on the device that answers them.
The kernel processor is not part of this RTL. Its signals are ports of the
top module.

## The two halves and how they talk

The processor splits "what to do next" from "compute it". The two halves run
at the same time.

```
                 kernel processor (not included)
                           |
                   kernel_interface
                   /               \
   task_control_unit  --sync_out-->  task_process_unit --- external memory
   (program counter,  <--sync_in---  (local memory, logical unit,  (async
    program memory,   <--b_flag----   integer unit, FPU, int<->fp,  handshake)
    stack, controller)                external data access, sequencer)
```

**Task control unit (TCU).** It holds the program counter, a read-only
program memory, a return-address stack and a controller. The controller
consists of an instruction register, a wait timer and an FSM. The TCU
carries out all flow-control instructions itself. Each data-processing
instruction is handed to the TCU's partner with a one-cycle `sync_out`
pulse, and the TCU moves on to the next instruction straight away.

**Task process unit (TPU).** It is built around two 8-bit address buses
(a0, a1) and two 32-bit data buses (d0, d1) of a 255-word local memory,
which serves as the register file. It contains these functional units:

* logical unit: barrel shifter plus AND/NOR/XOR/AND_NOT;
* integer add/sub/mul/div unit;
* floating-point unit;
* two format converters;
* external data access unit.

A small sequencer steps each instruction through these phases: read the
operands, start the unit, wait for it, write the result. When the result is
written, the TPU answers with a one-cycle `sync_in` pulse.

**Synchronisation is conditional.** A unit runs as long as its operation
needs, then reports done. The TCU only waits when it has to:

* **Issue stall.** A second data instruction arrives while the first is
  still running. `stall` is high during this wait.
* **Flag wait.** A conditional jump (`jumpt`/`jumpf`) needs the B flag of
  the last result. The TCU waits until the TPU is idle, then samples the
  flag (`b_read` pulses).
* **Stop wait.** `halt` and a pre-emption wait for the TPU to go idle, so
  that a stopped task never leaves work in flight.

Flow-control instructions that do not depend on data, such as jump, call,
return and wait, run while the TPU is still computing.

## Instruction format

All instructions are 32 bits wide. Bit 31 selects the class.

Data processing (bit 31 = 1):

| bits | 31 | 30:27 | 26 | 25:24 | 23:16 | 15:8 | 7:0 |
|---|---|---|---|---|---|---|---|
| field | 1 | opcode | real | conversion | source1 | source2 | dest |

| opcode | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| op | add | sub | mul | div | and | nor | xor | and_not | move | rol | ror | shl | shr |

* `real` = 1 sends add/sub/mul/div to the FPU; otherwise the integer unit is
  used.
* `conversion` applies to `move` only: 1 means integer→float, 2 means
  float→integer, 0 means a plain copy.
* Shifts and rotates take their amount from the low 5 bits of source2.
* `and_not` is source1 AND NOT source2.
* Local memory address 0 holds no cell and always reads 0. A `move` uses it
  as the port to the outside:
  * `move 0, X, d` reads the external word whose 32-bit address is held
    in cell X into cell d;
  * `move s, X, 0` writes cell s to the external address held in cell X.

Flow control (bit 31 = 0):

| opcode | mnemonic | operand | action |
|---|---|---|---|
| 0 | `jump` | [23:0] target | jump |
| 1 | `jumpf` | [23:0] target | jump if B flag is 0 |
| 2 | `jumpt` | [23:0] target | jump if B flag is 1 |
| 3 | `call` | [23:0] target | push return address, jump |
| 4 | `return` | – | pop and jump |
| 5 | `wait T` | [23:0] T | pause T cycles |
| 6 | `wait T, dest` | [23:12] T, [11:0] dest | wait up to T cycles for the kernel's `continuation`; if it does not come, jump to dest |
| 15 | `halt` | – | the word `7FFFFFFF` |

The **B flag** is the sign bit of the last result the TPU wrote.

As an example, the program `temp = a*c; result = temp - b` in floating point,
with a, b, c, temp and result in cells 1 to 5, assembles to:

```
94010304   mul.real  a, c, temp
8C040205   sub.real  temp, b, result
7FFFFFFF   halt
```

This is the program in `rtl/pm_example.hex`, with its constants in
`rtl/lm_example.hex`. It is the default contents of the memories.

## Timing

The TCU fetches an instruction in one cycle: `read_rom` and the
program-counter increment are high together. It executes the instruction in
the next cycle. Cycles from `sync_out` to `sync_in`:

| instruction | cycles |
|---|---|
| logical, integer add/sub/mul, float add/sub/mul, move, conversions | 4 |
| integer divide, `IDIV_STEPS` = 1 (one quotient bit per cycle) | 35 |
| integer divide, `IDIV_STEPS` = 32 (single-cycle divider) | 4 |
| float divide (27 quotient bits, one per cycle) | 31 |
| move to/from address 0 | 4 + external handshake + 2-cycle synchroniser |

Each instruction goes through four steps: operand read, unit start, result
latch and write-back. A new instruction is accepted in the same cycle as the
previous one's `sync_in`, so back-to-back issue loses nothing.

On the TCU side:

* jump, call and return take 2 cycles each, fetch included;
* `wait T` takes T + 2 cycles, fetch included, and `wait T, dest` at most T + 2;
* a data instruction occupies the TCU for 2 cycles unless it stalls.

The example program above halts 10 cycles after reset.

The divider trade-off is left open on purpose:

* a one-cycle divider is large and slow to clock;
* a serial one takes 32 cycles.

`IDIV_STEPS` (1, 2, 4, 8, 16 or 32) sets how many quotient bits are retired
per cycle. In either case the divide time is constant and known in advance.

## Arithmetic

* **Integers** are 32-bit two's complement.
  * `mul` keeps the low 32 bits.
  * `div` truncates toward zero.
  * Signed overflow of add/sub/mul sets the overflow flag.
  * Division by zero gives 0 and sets the divide-by-zero flag.
* **Floating point** is IEEE-754 single precision.
  * Rounding is to nearest, ties to even.
  * Subnormal inputs and outputs are flushed to zero.
  * The FPU is split the classical way: an adder with exponent comparison
    and an alignment shifter, a multiplier (exponent adder and mantissa
    multiplier), and a restoring mantissa divider.
  * A separate checking unit handles NaN, infinity and zero operands, and
    detects invalid operations and division by zero.
* **Conversions.** Integer→float rounds to nearest even. Float→integer
  truncates toward zero. NaN gives 0 with the invalid flag set. Values out
  of range saturate and set the overflow flag. A nonzero value below one in
  magnitude becomes 0 and sets the underflow flag.
* **Exception flags** `exc = {invalid, divzero, overflow, underflow}` are
  sticky. The rest of the system is expected to read them and react; they
  never interrupt the task. Only a reset clears them.

## Local memory

The local memory has 255 cells of 32 bits at addresses 1 to 255. Both read
ports are combinational; the write is clocked.

On reset, the cells that hold a program's constants are loaded with them
(from `LM_INIT`) and every other cell is cleared. In the full system the
kernel processor would preload the constants instead. It would also save
and restore the whole register file on a context switch. The kernel port
below makes that possible.

## External data access

The task processor sees memory and peripherals through an asynchronous
four-phase handshake, so that slow or self-timed devices can be attached.

Read:
1. The processor drives `address_mem` and raises `oe_mem`.
2. The device raises `ack_mem` with `data_mem_in` valid.
3. The processor takes the word and drops `oe_mem`.
4. The device drops `ack_mem`.

Write: the same sequence with `wr_mem` and `data_mem_out`.

`ack_mem` passes a two-flop synchroniser.

## Kernel interface

The kernel processor controls the task through the following signals:

| signal | purpose |
|---|---|
| `int_req` | pre-empt: the task stops at the next instruction boundary, once the TPU is idle |
| `continuation` | resume a suspended or halted task; also ends a `wait T, dest` early, before dest is taken |
| `load_pc`, `save_pc`, `load_sp`, `save_sp` | write/read the program counter and stack pointer through `kp_data_in` / `kp_data_out` |
| `kp_lm_we`, `kp_lm_re`, `kp_lm_addr`, `kp_lm_wdata`, `kp_lm_rdata` | write/read local memory |
| `ack` | answers each accepted request one cycle later, together with the requested word |

Loads and memory accesses are accepted only while the task is stopped
(`suspended` or `halted`) and the TPU is idle. A request made while the
task runs waits, and `ack` stays low until the request is served. The
kernel processor's own protocol is not specified for this design, so this
protocol is a reasonable stand-in. It is the part to adapt when a real
kernel processor is attached.

## Where the design fills gaps

The architecture lists the units and instructions but leaves much
unspecified. The following are choices made here:

* the instruction encoding beyond the fields of the example program;
* the numbering of the opcodes;
* the meaning of the B flag;
* the two forms of `wait`;
* reaching external memory through `move` at address 0;
* the handshake protocols of the external and kernel ports;
* the stack depth (16) and program-memory depth (256 words);
* rounding, subnormal handling and conversion overflow;
* the exact cycle counts.

Other points:

* **Throughput.** The architecture aims at one instruction per clock. This
  design does not reach that. Each instruction takes a fetch cycle and an
  execute cycle in the TCU, and a data instruction spends at least 4 cycles
  in the TPU. Running flow control alongside data processing recovers only
  part of the gap. A pipelined TCU and TPU would be the next step.

* **Reset** is asynchronous and active low (`reset_n`).
* **Error stop.** A stack overflow or underflow, or an undefined flow
  opcode, stops the task and raises `err`.
* **Buses.** The original buses are tri-state. Here they are multiplexers
  with separate input and output ports.
* **Memory contents.** The program and constant memories are loaded from
  hex files given as parameters. The architecture instead generates them
  from an assembler.

## Parameters of `rttp_top`

| parameter | default | meaning |
|---|---|---|
| `PM_DEPTH` | 256 | program-memory words (address bus is 24 bits) |
| `PM_INIT` | `rtl/pm_example.hex` | program image |
| `LM_INIT` | `rtl/lm_example.hex` | local-memory reset image, 256 words, word 0 unused |
| `STACK_DEPTH` | 16 | return addresses |
| `IDIV_STEPS` | 1 | integer quotient bits per cycle (1 = 32-cycle divider) |

Fixed sizes live in `rtl/rttp_pkg.sv`: 32-bit data, 8-bit local-memory
address and 24-bit program address.

## Simulating

All paths are relative to the repository root. Run from there. With
Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rttp_pkg.sv tb/tb_rttp_top.sv
./obj_dir/Vtb_rttp_top
```

Every testbench in `tb/` is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_rttp_full` runs the example program at default parameters. It checks
  the results bit-exactly: temp = `358637BD`, result = `3DCCCD53`.
* `tb_rttp_top` runs `tb/prog_mech.hex` against `tb/ext_device.sv`, a
  behavioural memory with random response delays. The program makes every
  mechanism happen:
  * issue stalls, call/return;
  * taken and untaken conditional jumps;
  * both wait forms, including a timeout and an early continuation;
  * pre-emption, with the PC and SP saved and the PC reloaded;
  * kernel local-memory access;
  * external reads and writes;
  * integer and float divides, conversion, divide by zero.

  It counts each mechanism and fails if one never occurred.
* `tb_int_div_variants` runs three integer units with `STEPS` = 32, 4 and 2
  side by side. It checks their quotients and that each divide takes exactly
  32/`STEPS` cycles.
* The other testbenches exercise one unit each against independent
  reference models:
  * the FPU and converter checks use double-precision arithmetic with their
    own rounding to single;
  * the program-counter and stack checks compare against plain `+1`/`-1`.

To run your own program, write a hex image (one 32-bit word per line, up to
`PM_DEPTH` lines) and a 256-line local-memory image. Pass them as `PM_INIT`
and `LM_INIT`.
