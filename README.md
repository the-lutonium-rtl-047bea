# Lutonium-style 8051 microcontroller in SystemVerilog

An 8051 spends most of its energy getting instructions: reading program
memory, working out how long each instruction is, and deciding whether the
next one is really next. This design is built around that fetch loop. It
reads program memory two bytes at a time, splits each pair into two byte
lanes, and routes each byte on its own to the decoder, so that one-byte
instructions flow at one byte per clock, two-byte instructions at two bytes
per clock and three-byte instructions at one and a half. It never guesses:
when the opcode of a jump, call or return has been seen, fetching stops
after that instruction's last byte and resumes only when the execute side
sends back the next PC. Interrupts are folded into the same loop as cheap
"interrupt guesses", and the same mechanism gives a deep-sleep mode that
stops all instruction activity and restarts on the next timer or pin event.

The architecture follows the Lutonium, an asynchronous (quasi
delay-insensitive) 8051. This RTL is a clocked re-implementation of that
architecture: every asynchronous channel becomes a valid/ready pair and every
pipeline stage a register, so all timings below are in clocks.

## Block overview

```
            boot write port                         P1, P3 pins  T0/1, INT0/1, CLOCK
                  |                                      |              |
   +------+   pairs   +-----------+  instr_1/2/3  +----------+   SFR   +------+  +-----------+
   | imem |---------->| switchbox |-------------->| lut_core |<------->| prdm |  | pulse_sync|
   +------+           +-----------+               |  decode  |         +------+  +-----------+
      ^                  ^  route, flush          |  DRBY    |<------->| timer |<-----+
      | read pair        |                        |  ALU ... |   SFR   +-------+
   +-------+-------------+     next PC            |          |<------->| rupt_regs |
   | fetch |<-------------------------------------+----------+         +-----------+
   +-------+<---- interrupt guess ---- rupt_arb <------ IRUPT messages ------+
```

| Module | Role |
|---|---|
| `lutonium` | top level, wiring and observation ports |
| `imem`, `imem_bank` | 8 kB program memory, 64 banks, two-level 8-way tree |
| `fetch` | PC unit, opcode length/branch decode, interrupt check, SwitchBox control |
| `switchbox` | per-lane byte FIFOs and the router to instr_1/instr_2/instr_3/A |
| `rupt_arb` | interrupt arbiter: one probe of the IRUPT channel per instruction |
| `lut_core` | decoder, sequencer, special registers, execution |
| `drby_bus` | segmented operand bus, 9 sources to 7 destinations in 1-4 stages |
| `alu`, `mult_div`, `bit_unit`, `branch_unit`, `regfile` | execution units and internal RAM |
| `rupt_regs` | IE/IP/TCON bits, IRUPT messages, interrupt decision, SLP register |
| `timer` | one timer/counter fed by pin Ticks (instantiated as timer 0 and timer 1) |
| `pulse_sync` | turns pin pulses into Tick messages |
| `port_module`, `prdm` | port latch, direction register and pin read; the SFR side of P1/P3 |
| `lut_pkg` | SFR addresses, bus encodings, instruction-length table, shared types |

## Program memory

Program memory holds 8 kB (parameter `ADDR_W = 13`). It is read only in
aligned two-byte pairs. The 4096 pairs are spread over 64 banks of 64 rows by
16 bits. The low three bits of the pair index select the way at the first
tree level, the next three select the way at the second level, and the
remaining six select the row. Consecutive pairs therefore sit in different
banks, so a straight run of code never hits the same bank twice in a row;
a bank is only revisited with a 128-byte stride.

A read takes one clock: the request carries the pair index, and the response
comes back the next clock with the two bytes and the index. There is one
byte-wide write port, shared by the boot loader (`boot_we`, `boot_addr`,
`boot_data` at the top, used while reset is held) and the extra instruction
`A5h`, which writes the accumulator to program memory at DPTR.

## The fetch loop

This is the heart of the design and the part that takes the most care.

**Byte lanes.** Each pair from memory is split: the even byte goes to lane 0,
the odd byte to lane 1. Each lane is a three-entry FIFO that carries the
byte and its full address. A byte that cannot be used this clock simply
stays at the head of its lane; the other lane can move on. Fetch reads the
next pair whenever, counting the read already in flight, both lanes will
have room. Three entries are what it takes to keep two bytes per clock
flowing with a one-clock memory.

**Routing.** Every clock Fetch looks at both lane heads and gives each a
route: keep, discard, instr_1 (the opcode channel), instr_2, instr_3 or the
accumulator. Both lanes may be routed in the same clock when they go to
different channels. Bytes below the current PC (the tail of a pair that
started before a jump target, or stale bytes) are discarded.

**Consumption rule.** In one clock Fetch takes at most two consecutive bytes,
and an opcode can only be the last of them, because its length is decoded in
that same clock. So:

- an opcode alone, or
- the last operand byte of one instruction plus the next opcode, or
- the second and third bytes of a three-byte instruction.

That gives the three rates: NOPs 1 byte/clock, two-byte instructions
2 bytes/clock (operand + next opcode every clock), three-byte instructions
1.5 bytes/clock (opcode, then bytes 2+3, alternating). For two three-byte
instructions in a row the lane pattern is:

| clock | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| lane 0 | ... | I0 byte 2 | I1 byte 1 | I1 byte 3 |
| lane 1 | I0 byte 1 | I0 byte 3 | (waits) | I1 byte 2 |

`tb_fetch` checks this pattern clock by clock and measures the three rates.
`tb_fetch_mix` runs a program of uniformly random opcodes (about one in
five is branch-type) and measures about 0.84 bytes per clock when each
branch is answered one clock after Fetch starts waiting. The asynchronous
original reaches about 1.37 bytes per cycle on random code. Here each branch
costs three to four clocks: the wait for the answer, the flush, and the
one-clock memory read. That branch turnaround is the main gap between this
clocked model and the original's speed.

**Branches.** Fetch decodes from the opcode alone whether an instruction can
change the PC. For such an instruction it stops reading memory after the
pair holding its last byte and, once all its bytes have been routed, waits.
The core answers every branch-type instruction, taken or not, with the next
PC. On that answer Fetch flushes both lanes and starts reading at the new PC
(an odd target simply discards the even byte of the first pair). There is
no prediction and no speculative execution. Pairs prefetched before the jump
opcode was decoded (at most three) are thrown away.

**Interrupt guesses.** At every instruction boundary Fetch asks `rupt_arb`
for an interrupt guess. The arbiter only looks at whether an IRUPT message
is waiting, which is cheap. No message means "no interrupt" and the opcode
goes on. A message means "maybe": Fetch sends an interrupt pseudo-instruction
down instr_1 instead of the opcode, carrying the address of the instruction
it replaced, and waits for a next PC like after a branch. The core asks
`rupt_regs` whether the interrupt is really to be taken. If so it pushes the
return address and answers with the vector, otherwise it answers with the
same address and execution carries on.

## Decode and execute (`lut_core`)

The opcode is registered as soon as it arrives on instr_1; bytes 2 and 3 come
a clock later on their own channels. An instruction whose operand is a
register, a RAM byte or an SFR orders a transfer on the DRBY bus. Immediate
operands and A reach the units on their own paths. A, B, PSW, SP and DPTR
live in the core with their own update logic.

A small sequencer handles the instructions that need the stack twice:
LCALL/ACALL and a taken interrupt push the return address in two clocks;
RET/RETI pop it with two bus reads. Branch-type instructions compute their
target in `branch_unit` and always send it to Fetch.

Executed: all 8051 moves, arithmetic (including DA), logic, rotates, bit
instructions, XCH/XCHD, jumps, calls and returns on internal RAM and SFRs,
MUL, DIV, PUSH/POP, MOVC, and `A5h` (A to program memory at DPTR, for
loading code). MOVX is treated as a NOP because there is no external memory.

**Code reads.** MOVC is handled like a branch. Fetch stops after it. The
core computes the code address (A+DPTR or A+PC) and sends it back on the
next-PC channel with a `br_code` flag. Fetch then reads just that pair,
routes the wanted byte through the SwitchBox's accumulator channel, flushes
again and resumes at the instruction after the MOVC. The core writes the
byte into A and only then takes the next instruction.

## The DRBY operand bus

DRBY takes an operand from one of nine sources (RegFile, A, B, PSW, DPL, DPH,
SP, interrupt registers, port registers) to one of seven destinations
(Exchange, i.e. moves and exchanges; FBlock; ALU; BitUnit; PCL; PCH; DMem,
i.e. stack pushes). It is not one wide crossbar but a tree of small stages
placed by how often each path is used, like a Huffman code:

```
 RuptRegs PRDM SP DPH          RegFile
     \     |   |  /               |
      AltMerge --+                |
  A  B  PSW  DPL  |               |
   \  \   |   /   |               |
      RegMerge ---+----------->  Main  ---> Exchange
                                  |
                              ExecSplit --> FBlock ALU PCL PCH BitUnit DMem
```

RegFile to Exchange, the most common pair, crosses one stage. An uncommon
source adds RegMerge, a rare one AltMerge as well, and an uncommon
destination adds ExecSplit: 1 to 4 clocks. Each stage receives only the
control bits it needs. One transfer is in flight at a time. `bus_stages_m1`
and the top's `ev_bus_stages_m1` report how many stages the last transfer
used.

## Interrupts and deep sleep

`rupt_regs` holds IE, IP and the TCON interrupt bits. The sources are INT0
and INT1 (falling edges on P3.2 and P3.3) and the overflows of timers 0
and 1, polled in the usual 8051 order INT0, T0, INT1, T1. When an enabled
request appears, or interrupts are re-enabled while one is pending, it sends
one IRUPT message. That is all the fetch loop ever sees. The full decision
happens only when a pseudo-instruction asks: EA, the levels in service,
which source, vector 0003h/000Bh/0013h/001Bh, and clearing that source's
flag. IP gives the two standard 8051 priority levels: a high-priority
request can interrupt a low-priority handler, and RETI ends the higher level
in service.

Deep sleep uses the sequence

```
        ; interrupts disabled here
        MOV  SLP, A      ; SLP = CFh
loop:   SJMP loop
        CLR  EA
```

Writing SLP sets EA, arms a +2 adjustment of the next saved return address,
and queues a *sleep* message ahead of any other. When `rupt_arb` consumes it,
it gives no guess and goes to sleep. Fetch then stalls at the next
instruction boundary and nothing in the core switches. The timers keep counting
pin Ticks. The next IRUPT message wakes the arbiter. The interrupt is taken
with the return address moved past the `SJMP loop`, so RETI lands on
`CLR EA` and the program continues with exactly one interrupt handled. The
top's `sleeping` output shows the state.

## Peripherals

Every pin input goes through a `pulse_sync` (two flops, then a falling-edge
detector). It holds a Tick until the consumer takes it and flags `lost` if a
second edge comes first. Each timer counts Ticks from its pin (T0 = P3.4, T1 = P3.5) when its TMOD
C/T bit is set, otherwise from the CLOCK pin. It is never driven from the core clock,
which is what lets it run while the core sleeps. Modes 0, 1 and 2 are built;
mode 3 behaves as mode 1 and GATE is ignored. The serial port is not built.

Ports P1 and P3 each have a latch and a direction register (P1DIR at 91h,
P3DIR at B1h). Direction 0, the reset value, gives the classic
quasi-bidirectional pin, which drives only a 0 and otherwise lets the pin
float high. Direction 1 makes the pin a push-pull output, so no pull-up
current is needed. The top brings out `pN_out` and `pN_oe` per pin. Pin reads
go through two flops.

## Departures and limits

- Clocked valid/ready handshakes replace the asynchronous channels. Rates
  are per clock and match the byte-per-cycle figures above. Absolute speed
  and energy depend on the technology and are not modelled.
- The decoder is one block with a case statement, not a split into opcode
  decoder, operand decoder and router. MOVX is not executed.
- No external memory interface: P0 and P2 are not built, and there is no
  demultiplexed-SRAM or fast-read mode.
- FBlock is an unassigned DRBY destination; its bus output is not connected.
- No serial port.
- The direction-register addresses (91h, B1h), the A5h encoding and the
  boot write port are this design's choices.
- Internal RAM is 128 bytes and is cleared by reset.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_lutonium \
    rtl/lut_pkg.sv rtl/*.sv tb/tb_lutonium.sv -Mdir obj_top
./obj_top/Vtb_lutonium
```

Replace `tb_lutonium` with `tb_fetch`, `tb_drby_bus`, `tb_lut_core`, etc.
for the individual blocks. `lut_pkg.sv` must come first.

`tb_lutonium` runs the whole chip at its default sizes. It loads an 8051
program through the boot port and runs it to the end: arithmetic, a loop,
calls, the bus with all path lengths, the SLEEP sequence three times (each
time timer 0, counting pulses on the T0 pin, overflows and wakes the core),
an A5h write to program memory that is read back with MOVC, a MOVC
table read, and an INT1 pin pulse at the end. It then checks RAM, registers
and program memory. It also counts each mechanism and fails if any never
happened: two-byte clocks, discarded bytes, redirects,
interrupt inserts, interrupts taken, sequencer steps, each DRBY path length,
sleep, program-memory writes and code reads. It finishes in about 800 clocks.
