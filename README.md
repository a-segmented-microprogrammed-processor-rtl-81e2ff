# SMP-11: a segmented microprogrammed PDP-11

The SMP-11 is a processor that executes the basic PDP-11 instruction set. Its
control is split by the kind of work it does, not by pipeline stage. Every
PDP-11 instruction breaks down into a few **tasks**:

- instruction fetch;
- source and destination operand access;
- the operation itself;
- the store of the result;
- interrupt or trap service.

Memory and register access is one kind of work. Arithmetic is another. Each
kind gets its own small microprogrammed controller, a **segment controller**,
with a control store shaped for that work:

- The **ACU** (arithmetic control unit) handles every arithmetic, logic and
  condition-code operation. Each of these takes a single RALU cycle, so the
  ACU needs no microsequencer. The instruction decoder gives it one address,
  and that word runs for one cycle.
- The **MACU** (memory access control unit) handles fetch, the eight
  addressing modes, the result store, the control-transfer instructions,
  traps and the console routines. These are short straight-line routines,
  so its sequencer only loads a start address and counts up. It can also
  skip one word.
- The **handshake sequencer** (HS) sits above both. It is a 16-word store
  that steps through an instruction's task sequence. It enables one segment
  controller per task and waits for that controller's *finished* line
  before it moves on.

All three drive one shared 16-bit datapath (the "RALU"). It is built from
four 2901 4-bit ALU slices and a 2902 carry look-ahead unit. This is the
reduced-cost single-datapath form of the design: address arithmetic such as
indexing, auto-increment and branch offsets also runs in the RALU.

## Files

| file | contents |
|------|----------|
| `rtl/smp11_pkg.sv` | shared types: 2901 instruction fields, control-word structs for the HS, ACS and MACS stores, PSW control, start addresses |
| `rtl/smp11_top.sv` | the processor: sequencing, control multiplexer, datapath, bus, interrupts, clock |
| `rtl/am2901.sv` | one 4-bit RALU slice |
| `rtl/am2902.sv` | carry look-ahead across the four slices |
| `rtl/ralu16.sv` | 16-bit RALU: four slices, shift links, byte mode, flags |
| `rtl/psw_unit.sv` | PSW register (N Z V C T, priority), flag input selection, branch conditions |
| `rtl/dbus_mux.sv` | source selection for the RALU D input and the bus write data |
| `rtl/instr_decoder.sv` | instruction register and decoder: task sequence, routine start addresses, ACS address |
| `rtl/hs_sequencer.sv` | handshake sequencer |
| `rtl/acu.sv` | arithmetic control unit and its 32-word store |
| `rtl/macu.sv` | memory access control unit, its store and sequencer |
| `rtl/interrupt_ctrl.sv` | trap vectors, bus interrupt priority check, trace trap |
| `rtl/bus_interface.sv` | bus address/data registers, msyn/ssyn handshake, DMA grant, clock hold |
| `rtl/clock_ctrl.sv` | reset synchroniser, run enable, halt / continue / single step, INIT pulse |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## How an instruction runs

The HS store holds these overlapped sequences:

| HS address | task | controller |
|---|---|---|
| 0 | IF1: PC to bus address, start the read, PC+2 | MACU |
| 1 | IF2: instruction to IR; jump to the decoder's sequence | MACU |
| 2, 3, 4, 5 | double operand entry: SRC, DST, OP, POST-OP (single operand enters at 3) | MACU, MACU, ACU, MACU |
| 6 | OP only (condition-code instructions) | ACU |
| 12, 13 | JMP/JSR entry: DST (address only), then the post-op routine | MACU |
| 13 | entry for branches, SOB, RTS, RTI/RTT, MARK, HALT, WAIT, RESET: one post-op routine | MACU |
| 14, 15 | service (also entered directly by trap instructions): push PSW and PC, fetch vector; then PSW load | MACU, ACU |

Words 7–11 hold two more sequences that begin with a special pre-op task:
SPE, DST, OP, POST-OP at 7–10, and SPE at 11 ahead of DST, POST-OP at
12–13. This microcode needs no special pre-op task, so no instruction
enters at 7 or 11. JMP and JSR start directly at 12.

Each HS word carries four fields:

- which controller is enabled;
- which MACU start address to load (fetch 1, fetch 2, source mode,
  destination mode, special routine or post-op routine);
- which finished line steps the sequencer;
- how the next address is found.

There are three next-address choices:

- **+1**: go to the next word.
- **external**: take the decoder's sequence, either double operand, single
  operand or one of the special-instruction entries.
- **end of instruction**: go to the service sequence (address 14) if a
  trap or interrupt is pending, otherwise back to the fetch (address 0).

Every RALU cycle is one clock edge with `run` high. The HS, the ACU and the
MACU stores are read combinationally from their current address. The
controller therefore works in the same cycle that the HS enables it, and a
task change costs no idle cycle.

### Operands and buffers

The 2901 register file has 16 words:

- 0–7: R0–R7 (SP = 6, PC = 7);
- 13: the source buffer **SB**;
- 14: the destination and result buffer **DB**;
- 15: a temporary **TB**, used for vectors and return addresses.

The MACU source routine leaves the source operand in SB. The destination
routine leaves the destination operand in DB, and the address of a memory
destination in the bus address register. The ACU word then computes
`DB := SB op DB` in one cycle, or `DB := op DB` for a single operand, and
loads the PSW. The MACU post-op routine writes DB back, either to the
register or to memory at the held address. CMP, TST and BIT use a
"no store" word there instead.

MOV, and the MFPS and MOVB-to-register cases, use their own destination
routines (MV0–MV7) that compute only the address. The destination is then
never read, as on a real PDP-11.

### The MACU sequencer and the SOB skip

The MACU address register is loaded from the start multiplexer in the first
cycle of each task. It then counts up by one. A word with the skip bit
advances by two when the RALU result of that cycle is zero. SOB uses this:
it decrements the register and, if the result is zero, skips the branch
word. The lower bank (0–63) holds fetch and addressing. The upper bank
(64–127) holds stores, special instructions and the service routine.

### Byte operations

Byte instructions change only the low byte of a register. In byte mode:

- the two upper 2901 slices get a fixed "F = B, write back" code in place of
  the microinstruction;
- the shift link moves to bit 7;
- the carry and overflow flags are taken at bit 7.

Memory bytes at odd addresses are swapped into the low byte when read. On a
byte write to an odd address, the result is swapped so that its low byte
sits in the high half of the bus data. `bus_byte` tells the memory to write
only the half that `bus_addr[0]` selects. Auto-increment and
auto-decrement step by 1 for bytes in R0–R5 and by 2 otherwise. MOVB and
MFPS to a register sign-extend through a dedicated D-bus source.

### Traps, interrupts and the trace bit

The decoder classifies trap instructions and illegal opcodes. When the HS
dispatches such an instruction, the interrupt controller latches its vector:

| cause | vector |
|---|---|
| reserved instruction | 010 |
| BPT | 014 |
| IOT | 020 |
| EMT | 030 |
| TRAP | 034 |

The same happens for a device interrupt. A request on one of the four bus
levels (4–7) is accepted when its level is above the PSW priority. The
highest level wins, and that level gets a one-cycle grant pulse. The
device's vector arrives on `intr_vec`.

At every end of instruction the HS checks `service_req`. If it is set, the
HS runs the shared service routine:

1. push the PSW, then the PC;
2. load the PC from the vector;
3. load the PSW from vector+2.

The last step is the ACU's PSW-load word.

The T bit is sampled when an instruction is dispatched. If it was set, a
trace trap (vector 014) is taken when that instruction ends. This has two
consequences:

- an RTI or RTT that sets T runs one more instruction before the trace trap;
- the PDP-11's difference between RTI and RTT is not made here.

### Bus, stalls and DMA

`bus_interface` loads its address register from the RALU Y output and its
write data from the D bus in the cycle a MACU word asks for a transfer. It
then raises `msyn` and waits for `ssyn`. From that edge until the handshake
ends, `hold` stops the whole processor through `clock_ctrl`. Read data
lands in the bus data register. For a fetch it also lands in the
instruction register.

A DMA request (`npr`) is granted (`npg`) only while no processor transfer is
in progress. It holds the processor for as long as it lasts.

### Power-up, HALT, WAIT, RESET and the console

After `por_n` rises, the synchronised reset starts the HS in the service
sequence with vector 024. The MACU skips the two pushes the first time, so
the processor loads the PC from 024 and the PSW from 026, the PDP-11
power-up convention.

- **HALT** stops the clock and shows R0 and the PC on `cons_data` and
  `cons_addr`. A pulse on `cont` resumes. Holding `step` while halted runs
  exactly one RALU cycle.
- **WAIT** holds the MACU until an interrupt is pending.
- **RESET** drives `init` for `INIT_CYCLES` (default 8) cycles.

The console is only these ports.

## Interface of `smp11_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `por_n` | in | clock; asynchronous power-up reset, active low |
| `bus_addr[15:0]`, `bus_dout[15:0]`, `bus_din[15:0]` | out/out/in | bus address, write data, read data |
| `bus_wr`, `bus_byte` | out | write cycle; byte write (`bus_addr[0]` picks the half) |
| `msyn` / `ssyn` | out / in | transfer request / data ready; `msyn` stays high until `ssyn` |
| `npr` / `npg` | in / out | DMA request / grant |
| `br[3:0]` / `bg[3:0]`, `intr_vec[15:0]` | in / out, in | interrupt request / grant for levels 4–7, device vector |
| `init` | out | bus INIT from RESET and power-up |
| `cont`, `step` | in | console continue, single cycle |
| `halted`, `cons_addr`, `cons_data`, `psw[7:0]` | out | console displays |

The memory must keep `ssyn` low until `msyn` rises, and drop it after `msyn`
falls. Any number of wait cycles is allowed.

## Where this design departs from the original

- **Clock:** one clock and a run enable replace the original three-phase
  scheme, a 200 ns major cycle with two quarter-cycle phases.
- **Control store width and size:** the original stores are encoded and
  small: 57 × 24 bits for the MACS, 27 × 16 for the ACS and 16 × 8 for the
  HS. This design keeps its control words unencoded and wider: 31 bits for
  the MACS, 34 for the ACS and 8 for the HS. The MACS address is 7 bits
  rather than 6, because its routines use about 75 words.
- **Microcode:** the microcode is this design's own, written for the
  original's task structure and start-address scheme.
- **Bus:** a generic asynchronous bus replaces UNIBUS drivers and device
  arbitration.
- **Device vector:** the vector comes in on its own input rather than
  through the bus data register.
- **PSW:** the PSW has no bus address.
- **Timing:** some instructions take one cycle more than the reference
  timing. See the next section.
- **JSR:** JSR computes its destination before it pushes the link register.
- **JMP and JSR:** with a register destination (mode 0) they trap to 010.
- **Trace trap:** see the trace-bit rules above.
- **Not built:** the original also sketches a variant with a separate
  address unit and an extended-instruction-set expansion. Neither is built.

## Instruction timing

Memory waits do not count here: every count is in major cycles with `run`
high. The fetch takes 2 cycles. The rest of an instruction is its source
mode, its destination mode and the operation:

| addressing mode | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| bus transfers / cycles | 0/1 | 1/2 | 1/2 | 2/3 | 1/2 | 2/3 | 2/3 | 3/4 |

| instruction | cycles after the modes | reference |
|---|---|---|
| ADD, SUB, BIC, BIS, single-operand operations | 2 (operation, store) | 2 |
| MOV | 2 | 1 |
| CMP, BIT, TST | 2 | 1 |
| condition-code operations | 1 | 1 |
| branch taken / not taken | 1 / 1 | 1 / 0 |
| SOB taken / not taken | 2 / 2 | 2 / 1 |
| JSR, JMP (after the address calculation) | 4, 1 | 3, 0 |
| RTS, RTI | 3, 5 | 3, 4 |
| MARK | 4 | 4 |
| EMT, TRAP, IOT, BPT | 9 | 9 |

The reference is the published cycle counts for this machine. Where it is
one cycle shorter, the original avoided a routine cycle that this
microcode spends. Examples are the separate store cycle of MOV, and the
post-op cycle that an untaken branch or a no-store compare still runs.
`tb_smp11_timing` measures all of these. It checks against the reference
plus the listed extra cycle.

## A structural loop

The RALU Y output feeds the D-bus multiplexer, for sign extension, byte
swapping and PSW loads, and the multiplexer output is the RALU D input. So
there is a combinational path from Y back to D. Lint and synthesis tools
report it as a loop. No control word closes it in value: every word that
routes Y onto D has the 2901 take its operand from the A register alone, not
from D. Y therefore never depends on D in that cycle.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_smp11_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/smp11_pkg.sv tb/tb_smp11_top.sv -o sim
./obj_dir/sim
```

`tb_smp11_top` assembles a PDP-11 program into an 8 KB memory model that
answers after random waits. The program exercises:

- all addressing modes;
- word and odd/even byte operations;
- arithmetic, logic, shifts and rotates, and SWAB;
- MOVB and MFPS sign extension, and MTPS;
- branches, SOB, JSR/RTS and JMP;
- all trap instructions and an illegal opcode;
- the trace trap;
- WAIT woken by a device interrupt;
- RESET and HALT, then continue to a second HALT.

A random DMA master competes for the bus throughout. The testbench compares
the results in memory with hand-computed values. It also counts each
mechanism (bus stalls, DMA grants, traps, interrupt, trace, WAIT, SOB skip,
taken and untaken branches, odd-byte writes, INIT, halts) and reports a
failure for any mechanism that never happened. The top has no parameters,
so this run is at full size.

`tb_smp11_timing` runs single instructions from a zero-wait memory and
checks the cycle and transfer counts of the timing section.

The module testbenches compare each block against an independent model:

| testbench | checked against |
|---|---|
| `tb_am2901`, `tb_ralu16` | a bit-level 2901 model and 16-bit arithmetic |
| `tb_acu` | the ACU with the RALU, D-bus multiplexer and PSW unit, against PDP-11 results and condition codes |
| `tb_instr_decoder` | an opcode table |
| others | hand-written expectations with random stimulus |

## Changing it

- **A new MACU routine:** add its start address to `smp11_pkg.sv`, its words
  to the case table in `macu.sv`, and its selection to `instr_decoder.sv`.
  Keep each routine straight-line; a skip is the only branch.
- **A new single-cycle operation:** add an ACS word in `acu.sv` at a free
  address (1, 5–7 and 21 are free), and point the decoder at it.
- **Wider control words:** widen the structs in `smp11_pkg.sv`. All stores
  are built from those structs.
