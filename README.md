# Ærø: a partitioned processor for mixed-criticality avionics

Avionics software of different certification levels (a DAL A flight director
next to a DAL C moving map, say) may share one computer only if nothing one
application does can disturb another: not its memory contents (spatial
isolation) and not its timing (temporal isolation). The usual answer is a
partitioning operating system, which then has to be certified to the highest
level present. This design moves the partitioning into hardware instead.

A small 16-bit-instruction, 32-bit-data, four-stage processor is built once,
but everything that holds program state is replicated per partition: the
register bank, the program counter, the jump-address register and the stack
pointers. Each instruction, data and stack address is tagged with the index
of the active partition in its two top bits by a *memory control unit*, so a
program cannot even form an address in another partition's memory. A
hardware scheduler, the *switching control unit* (SwCU), hands the processor to
each partition at a fixed period for a fixed execution time. A partition
switch always costs the same 10 cycles, whatever the software is doing. So a
partition's worst-case timing depends only on its own code and its own
schedule entry.

The RTL here builds the processor core, the SwCU, the memories, a 64-bit
cycle timer, the memory-mapped I/O decoder and a UART with per-sample
receive ports, and wires them into one top level, `aero_soc`.

## Block overview

```
                 cfg_* (period, execution time, offset per partition)
                        |
                   +---------+  ptr_c_flag1 / ptr_c_flag2 / pc store+load
                   | aero_swcu|-------------------------------+
                   +---------+                                |
                                                              v
 +-----------+  {pid, pc}  +--------------------------------------------+
 | aero_imem |<------------| aero_core                                  |
 | 64K x 16  |------------>|  aero_pc_unit  aero_regbanks  aero_alu     |
 +-----------+             |  aero_addr_stack (per-partition pointers)  |
        ^ loader port      +--------------------------------------------+
                                      | local data address + pid
                                      v
                               +-----------+      +-------------+
 timer (aero_timer) ---------->| aero_mmio |<---->| aero_dcache |
 uart  (aero_uart_ip) <------->|  + MCUs   |      | 2048 x 32   |
                               +-----------+      +-------------+
```

| Module | Role |
|---|---|
| `aero_pkg` | widths, opcodes, instruction classes, encoder functions for test programs |
| `aero_alu` | arithmetic, logic, shifts, jump conditions, call/return decode |
| `aero_regbanks` | one 16 x 32-bit register bank per partition, write-through read |
| `aero_pc_unit` | `pc_reg`, saved pc per partition, jump register per partition |
| `aero_addr_stack` | return-address stack, one region and one pointer pair per partition |
| `aero_mcu` | memory control unit: `{partition, local address}` and shared-region decode |
| `aero_core` | the four-stage pipeline |
| `aero_swcu` | partition scheduler and switching sequencer |
| `aero_imem` | instruction memory, asynchronous read, loader write port |
| `aero_dcache` | data memory, one read and one write port, registered read |
| `aero_timer` | 64-bit free-running cycle counter |
| `aero_mmio` | I/O decode in front of the data memory |
| `aero_uart_ip` | 8N1 UART: buffered word transmit, sampling-port receive |
| `aero_soc` | top level |

## Instruction set

Instructions are 16 bits wide, in three formats chosen by the top bits:

| Format | [15:14] | [13] | [12:9] | [8:0] |
|---|---|---|---|---|
| memory access | `11` | 1 = store, 0 = load | register | data address (local, 9 bits) |

| Format | [15:14] | [13:0] |
|---|---|---|
| memory address (`jad`) | `10` | instruction address (local, 14 bits) |

| Format | [15] | [14:8] | [7:4] | [3:0] |
|---|---|---|---|---|
| operational | `0` | opcode | operand a (also destination) | operand b |

Operational opcodes:

| Opcode | Mnemonic | Effect |
|---|---|---|
| 0x11 | add | a = a + b |
| 0x12 | sub | a = a - b |
| 0x13 | mul | a = low 32 bits of a * b |
| 0x31 | xor | a = a ^ b |
| 0x32 | and | a = a & b |
| 0x33 | or  | a = a \| b |
| 0x34 | shr | a = a >> b[4:0] (logical) |
| 0x35 | shl | a = a << b[4:0] |
| 0x21 | jle | jump if a <= b |
| 0x22 | jge | jump if a >= b |
| 0x23 | jl  | jump if a < b |
| 0x24 | jg  | jump if a > b |
| 0x25 | je  | jump if a == b |
| 0x26 | jne | jump if a != b |
| 0x27 | juc | jump always |
| 0x28 | call | push pc + 1, jump |
| 0x29 | ret | pop return address, jump to it |
| 0x00 | nop | the all-zero word does nothing |

Comparisons are signed. Jumps and calls carry no target: they go to the
partition's *jump register*, which a preceding memory-address (`jad`)
instruction sets. So a branch is two instructions: `jad target` and then,
at any later point in the same partition, `jl a, b`. Calls can nest. The
return address is the call's own address + 1.

`aero_pkg` has `enc_op`, `enc_jad`, `enc_ld` and `enc_st` functions that
build instruction words. The testbenches write their programs with them.

## Pipeline and the rules software must follow

| Stage | Work |
|---|---|
| F | `pc_reg` addresses the instruction memory (combinational read) and the word is latched. No-ops are latched instead while a switch is under way, while no partition is active, or behind a taken branch. |
| D | The format is decoded. Operands a and b are read from the active partition's bank. `jad` writes the jump register. |
| E | The ALU runs. Jumps, calls and returns resolve here and load `pc_reg`. A load puts its address on the data side. |
| M | The ALU result or the load data is written to register a, or the store data goes to the data side. |

There is no forwarding and no interlock. The compiler or the programmer has
to keep to three rules:

* **One no-op between dependent instructions.** The bank returns a value
  written in the same cycle, so a consumer two slots behind its producer
  (ALU result or load) sees the new value. Directly behind, it sees the
  old one.
* **Taken jumps, calls and returns cost two cycles.** The two instructions
  fetched behind them are replaced by no-ops. Nothing is predicted.
* **A store and a load of the same word need one no-op between them.**
  Reading the data memory while the same word is written returns the old
  contents.

Every pipeline register carries the index of the partition its instruction
came from. Write-back, stack accesses and jump-register writes therefore go
to that partition even while a switch is in progress.

## Partition switching, cycle by cycle

Each partition *i* has a period clock that counts down every cycle. At reset
it is loaded with `cfg_offset[i]`, which sets the starting order. One shared
execution clock counts the cycles the active partition has run. With the
default `SWITCH_TIME = 10`, a switch to partition *i* goes like this (cycle
numbers relative to the edge on which the period clock reads 11):

| Cycle | What happens |
|---|---|
| 0 | `ptr_c_flag1` rises. `pc_reg` stops and fetch feeds no-ops. The outgoing partition's instructions drain from the pipeline. |
| 1..7 | Draining (4 stages, so SWITCH_TIME must be at least 4; an assertion checks it). |
| 8 | `pc_store`: the outgoing partition's `pc_reg` is saved. |
| 9 | `pc_load`: `pc_reg` takes partition *i*'s saved value. |
| 10 | `ptr_c_flag2 = i`, `ptr_c_flag1` falls, period clock *i* reloads with `cfg_period[i]`, execution clock restarts at 0. Partition *i* fetches its first instruction. |

So `ptr_c_flag1` is high for exactly 10 cycles, and partition *i* gets the
processor exactly when the cycle timer equals `cfg_offset[i] + k*cfg_period[i]`.
The first entry needs `cfg_offset[i] > SWITCH_TIME`. If the offset is
smaller, the first switch happens one period later. An offset of 0 wraps the
period clock and delays the first switch almost indefinitely. Periods must
be larger than `SWITCH_TIME` too.

When the execution clock reaches `cfg_exec` of the active partition,
`expiry_flag` rises. If no other partition is due, the SwCU runs the same
10-cycle sequence into the idle state, `ptr_c_flag2 = 0`. In that state
nothing is fetched, and the idle slot lasts until the next period clock
fires. `ptr_c_flag2` therefore reads 1, 2 or 3 for the partitions and 0 for
"none". A partition that is due takes priority over the idle switch. The
schedule is meant to be conflict-free. If a period clock fires while a
different partition is being switched in, it is ignored and the sticky
`sched_conflict` output is set. A partition with its `cfg_en` bit clear is
never switched in.

Example: the reference timing schedule at 50 MHz uses 4/12/8 ms execution
times (200000, 600000, 400000 cycles), periods of 800020 cycles for
partition 1 and 1600040 for partitions 2 and 3, and offsets 20/200030/1000050.
This gives the frame P1, P2, P1, P3, idle, with 10 cycles between slots.

## What the timing guarantee amounts to

A program's progress depends only on the cycles in which its own partition
runs. A computation that needs `L` cycles on an unshared processor therefore
needs `L` of its partition's cycles here, however often it is switched out.
If it starts at the beginning of a slot and needs `n = ceil(L / E)` slots of
`E` cycles each, with period `P`, it finishes `(n-1)*P + L - (n-1)*E` cycles
after it started. The end-to-end testbenches check both properties.

There is one small exception. A taken jump that reaches the execute stage
during a switch has its two flushed slots overlap the switch's no-ops. The
computation then finishes up to 2 of its own cycles early. It can never
finish late, so a worst-case bound still holds.

## Memory map and isolation

The core only ever sees *local* addresses: 14-bit instruction addresses and
9-bit data addresses. An `aero_mcu` in front of each memory adds the
partition index on top:

| Memory | Physical address | Size |
|---|---|---|
| instruction | `{partition[1:0], pc[13:0]}` | 64K x 16 bit, 16K words per partition |
| data | `{partition[1:0], addr[8:0]}`, except local 0x100..0x1FF -> `{2'b00, addr}` | 2048 x 32 bit |
| return stack | `{partition[1:0], pointer[5:0]}` | 64 entries per partition |

Partition indices are 1..3, so segment 0 of the data memory belongs to no
partition. Local addresses 0x100..0x1FF of every partition land there. This
256-word *shared region* is the only memory that partitions have in common.

Data addresses 0x018..0x01F are decoded as I/O in every partition and never
reach the memory:

| Local address | Read | Write |
|---|---|---|
| 0x018 | bit 0 = UART transmit buffer full | queue a 32-bit word for the UART |
| 0x019 | timer bits 31:0 | ignored |
| 0x01A | active partition index | ignored |
| 0x01B | timer bits 63:32 | ignored |
| 0x01C..0x01F | UART sampling ports 0..3 | ignored |

Programs and static data are written through the top-level loader ports
(`imem_ld_*`, `dmem_ld_*`) using physical addresses, while `rst` is held.
The core has no write path into instruction memory.

## UART and sampling ports

The UART runs 8N1 at `CLKS_PER_BIT = 434` (115200 bit/s from 50 MHz).

Transmit: a word written to 0x018 enters a 4-word buffer and goes out as
four bytes, least significant first. A word written while the buffer is full
is lost. `uart_tx_dropped` counts such words. Software that transmits too
often loses packets, so it should pace itself or poll 0x018.

Receive: a packet is one port-index byte followed by a 32-bit sample, least
significant byte first. The complete sample overwrites sampling port
*(index mod 4)*. Reading a port never clears it. Any partition can read any
port, and a port changes only when a new sample arrives. One partition
therefore cannot consume data meant for another, which a single shared
receive FIFO would allow.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/aero_pkg.sv tb/tb_aero_swcu.sv \
    --top-module tb_aero_swcu -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Change the testbench name to run another one.

* `tb_aero_core` runs a program with these parts:
  * loads and arithmetic;
  * a counted loop, with jumps both taken and not taken;
  * nested calls;
  * instructions that must be flushed behind taken branches;
  * a window in which the switching flag holds fetch.

  It then runs 40 random programs that follow the software rules. Some of
  their taken jumps have a store directly behind them, which must be
  flushed. A cycle-counting instruction-level model in the testbench
  predicts every store. The testbench checks each store's address, data and
  cycle against that prediction.
* `tb_aero_soc` runs the complete platform with the schedule scaled down by
  400 and a 4-clock UART bit. Each partition runs a counting loop that
  reports its partition id and the timer over the UART. The testbench checks:
  * every partition start cycle;
  * the 10-cycle switch length;
  * that each partition resumes its own loop where it stopped;
  * that each partition's data stays in its own segment;
  * the transmitted UART words, and words dropped on overflow;
  * sampling-port updates;
  * that jumps, calls, returns, expiries and idle slots all occurred.
  It also checks the timing guarantee described below.
* `tb_aero_soc_full` runs the same test at the default parameters and the
  full 50 MHz schedule above, for 3.2 million cycles (64 ms of platform
  time, a few seconds of simulation). The loop's threshold is set so one
  computation takes about 400000 cycles. That is longer than partition 1's
  4 ms slot, so partition 1 needs two slots per computation.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `aero_soc`, `aero_swcu` | `NPART` | 3 | partitions; the 2-bit partition field limits it to 3 |
| `aero_soc`, `aero_swcu` | `SWITCH_TIME` | 10 | cycles per partition switch (>= 4) |
| `aero_soc`, `aero_swcu` | `CNT_W` | 32 | width of period and execution clocks |
| `aero_soc`, `aero_core` | `STACK_DEPTH_W` | 6 | log2 of return-stack entries per partition |
| `aero_soc`, `aero_uart_ip` | `CLKS_PER_BIT` | 434 | clock cycles per UART bit |
| `aero_soc`, `aero_uart_ip` | `TXBUF_DEPTH` | 4 | transmit buffer words |
| `aero_soc`, `aero_uart_ip` | `NPORTS` | 4 | sampling ports |

## What is the original architecture and what is filled in

The original description fixes these points:

* the three instruction formats and the opcode table;
* the four stages and the lack of forwarding and prediction;
* the replicated per-partition state;
* the two-bit partition field added by the memory control units;
* the SwCU's period clocks, shared execution clock, expiry flag and the
  `ptr_c_flag1`/`ptr_c_flag2` handshake;
* the constant 10-cycle switch;
* the 64-bit timer;
* the I/O addresses 0x018 (UART), 0x019 (timer) and 0x01A (partition id);
* sampling ports in the UART receiver, and packet loss on transmit overflow.

The following are choices made here, where the description is silent:

* the encodings of call, return and the no-op;
* signed comparisons, and the shift amount taken from `b[4:0]`;
* the write-through register read, which makes one no-op enough;
* the asynchronous instruction read, and branch resolution in E with two
  flushed slots;
* the partition tag carried by each pipeline register;
* the position of the pc save and load inside the 10-cycle switch;
* switching into an idle state (`ptr_c_flag2 = 0`) when a partition's time
  runs out, and the `sched_conflict` flag;
* where the shared data region lies (local 0x100..0x1FF, segment 0);
* the timer's high word at 0x01B, the sampling ports at 0x01C..0x01F and the
  UART status bit;
* the UART packet format, buffer depth and port count;
* the return-stack depth;
* the loader ports, standing in for a program upload over the UART;
* schedule configuration as input ports, sampled at reset for the offsets.

Departures:

* The instruction memory holds 16K instructions per partition (64K
  words), which is what the 14-bit pc and 2-bit partition field address. The
  reference board used a smaller instruction memory.
* The debug port and the GPIO monitoring module are not built. The
  switching flags are top-level outputs, so a monitor can be attached there.
* The original schedule has the first partition running straight out of
  reset. Here every partition, the first included, is entered through a
  normal 10-cycle switch, so a schedule starts at cycle `cfg_offset`.
