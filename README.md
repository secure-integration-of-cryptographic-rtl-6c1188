# Trivium coprocessors for hardware/software co-design

Trivium is a stream cipher: an 80-bit key and an 80-bit IV seed a 288-bit
nonlinear shift register, which is clocked 1152 times to mix them and then
yields one key-stream bit per round. A round touches only 15 state bits,
so it costs a handful of gates and unrolls well: 1, 2, 8 or 32 rounds can be
evaluated per clock for little more logic.

That makes the cipher a good vehicle for a question that matters more than
the cipher itself: **how a crypto kernel should be attached to the processor
running the software around it**. The same Trivium kernel is delivered here
in three integrations, which differ in how much of the work moves from
software to hardware and how many cycles each exchange costs:

| Integration | Module | Rounds per step | How software talks to it |
|---|---|---|---|
| Free-running core | `trivium_top` | `BITS` (default 1) | direct signals: load, key, IV; bits come out every cycle |
| Memory-mapped coprocessor | `trivium_mmio` | 32 | four 32-bit registers on an APB bus |
| Special-function unit | `trivium_sfu` | 64 | operands and results of two custom instructions |

Two small pieces from the same study sit next to them: `msg_rcv`, the
hardware end of a toggle request/acknowledge channel, and `updown`, a
finite-state machine with datapath (FSMD) used as a modelling example.
`codesign_top` puts all five side by side on one clock.

## The Trivium datapath

### Kernel (`trivium_kernel`)

The state is one 288-bit vector. Bit *i* holds the cipher's s(*i*+1), so
the three shift registers are bits 92..0 (93 bits), 176..93 (84 bits) and
287..177 (111 bits). One round computes

```
t1 = s66 ^ s93      t2 = s162 ^ s177      t3 = s243 ^ s288
z  = t1 ^ t2 ^ t3
register 1 shifts up by one and takes t3 ^ s286&s287 ^ s69 at s1
register 2 shifts up by one and takes t1 ^ s91&s92   ^ s171 at s94
register 3 shifts up by one and takes t2 ^ s175&s176 ^ s264 at s178
```

The module is purely combinational. With parameter `BITS` it chains that
many rounds and returns `BITS` key-stream bits. **The bit of the first round
is the most significant bit of `z`**; a 32-bit word read from the
coprocessor is therefore the next 32 key-stream bits in order, MSB first.

### State register and initialisation (`trivium_keyschedule`)

On `ld` the register is loaded with

| state bits | content |
|---|---|
| s1..s80 | key, key bit 0 in s1 |
| s81..s93 | 0 |
| s94..s173 | IV, IV bit 0 in s94 |
| s174..s285 | 0 |
| s286..s288 | 1 |

and a down-counter is set to 1152/`BITS`. `ld` is a level: while it is held
the register keeps reloading. Once `ld` drops, the state takes the kernel's
output every cycle until the counter reaches 0, when `e` (valid) rises.
Because the counter counts steps rather than rounds, its width shrinks as
`BITS` grows: 11, 8 and 6 bits for 1, 8 and 32 rounds per cycle, so these
cores hold 299, 296 and 294 flip-flops.

After initialisation the state advances only in cycles where `go` is 1.
`trivium_top` exposes `go`: tie it to 1 for a core that delivers `BITS` new
bits every cycle, or pulse it to hand out one word per request, as the
memory-mapped coprocessor does.

### Core (`trivium_top`)

Register and kernel in a loop: `z` is combinational from the register and is
valid while `e` is 1. Cycle count from the clock edge that samples `ld` low:
1152/`BITS` edges until `e` rises (1152, 576, 144, 36 for 1, 2, 8, 32 bits).

## Memory-mapped coprocessor (`trivium_mmio`, `trivium_itf`)

A 32-round core behind four 32-bit registers, base address `BASE`
(default `0x8000_0000`):

| offset | register | access | content |
|---|---|---|---|
| 0x0 | data out | read | current 32-bit key-stream word |
| 0x4 | data in | read/write | word for the IV or key register |
| 0x8 | status | read | bit 0: key stream valid |
| 0xC | control | read/write | bits 26:24 command, bits 1:0 word index |

Commands (control bits 26:24):

| cmd | effect |
|---|---|
| 1 | copy data-in into IV word `ctl[1:0]` |
| 2 | copy data-in into key word `ctl[1:0]` |
| 3 | load key and IV (held while the command stays 3) |
| 4, 5 | step: every change 4→5 or 5→4 advances the core by 32 rounds |

**The interface is level-based, and this is the part that is easiest to get
wrong.** `trivium_itf` does not react to bus writes; it looks at the
*contents* of the control register every cycle:

* While the command is 1 or 2, the data-in register is copied into the
  selected word every cycle. Write control first, then data. If data is
  written first and control second, the word is still correct, but the next
  data write would also land in it, since the command is still active.
  Words 0 and 1 are 32 bits; word 2 takes only data bits 15:0 (80 = 32 + 32 + 16).
* The core is loaded for as long as the command is 3; initialisation (36
  cycles) starts when the command changes away from 3.
* A step is a one-cycle `go` pulse produced when the command differs from the
  previous cycle's command in one of the listed ways (4→5, 5→4, and 0→3,
  which falls inside the load and has no effect). Writing the same command
  twice does not step. Reading data out does not step either.

A driver therefore looks like:

```
ctl = 1<<24 | 0; din = iv[31:0];   ctl = 1<<24 | 1; din = iv[63:32];   ctl = 1<<24 | 2; din = iv[79:64];
ctl = 2<<24 | 0; din = key[31:0];  ... the same for the key ...
ctl = 0; ctl = 3<<24;               // load
ctl = 4<<24;                        // release load, initialisation runs
while (!status) ;                   // 36 core cycles
loop: read dout; ctl = (5 or 4)<<24 alternately
```

Polling while alternating 4 and 5, which also works, risks one extra step
if status turns valid between the write and the read. The first word read is
then the second word of the stream.

Bus: AMBA APB3, no wait states (`pready` = 1), write data taken at the end
of the access phase. An access outside the four registers sets `pslverr`;
writes to the two read-only registers are ignored. An assertion checks that
every access phase follows a setup phase.

## Special-function unit (`trivium_sfu`)

Here the processor drives the hardware through the operands of two custom
instructions. The state is nine 32-bit words (word *k* = state bits
32*k*+31..32*k*), and two 32-round kernels are chained, so one advance moves
64 rounds.

* **Advance:** an edge detector on `op2_d1[0]`. Any change of that bit
  since the previous cycle advances the state once. Software alternates 1
  and 0 in successive instructions. 18 advances make the 1152 initialisation
  rounds.
* **Key stream:** `op2_q1` and `op2_q2` are the 32-bit words of the first
  and second kernel, computed from the current state. The instruction that
  triggers an advance thus returns the 64 bits being stepped past.
  Software reads pairs after the 18 initialisation advances.
* **Load:** when `op3_d3` changes, `op3_d1` is written into state word
  `op3_d2` (0..8). `op3_q1` returns word `op3_d2`, or 0 for an index above 8.
  A write wins over an advance in the same cycle. Software builds the nine
  words from key, IV and the constant as in the load table above.

The load encoding (index in operand 2, strobe on a change of operand 3,
read-back) is this design's own. It is one plausible reading of the driver
code this unit was designed for, not a reproduction of it: software written
for the original unit will not load the state correctly without changes. `op2_d2` belongs to the
instruction format but is unused.

## Toggle handshake receiver (`msg_rcv`)

Two-phase handshake: software writes a word to `d` and inverts `req`; in the
first cycle where `req` differs from `ack` the receiver latches `d` into
`rd`, and one cycle later `ack` equals `req` again. Every edge of `req` is a
message. The hardware answers in one cycle; the rest of a round trip is the
software's polling.

## Up/down FSMD (`updown`)

Two states, S0 counting up and S1 counting down: in S0 it increments below
10 and at 10 decrements and turns to S1; in S1 it decrements above 0 and at 0
increments and turns to S0. Output: 0, 1, …, 10, 9, …, 1, 0, 1, … with
period 20.

## Top level (`codesign_top`)

The five blocks share `clk` and the asynchronous active-low `rst_n`, and
nothing else. Port prefixes: `t1_` (1-bit core, `go` tied to 1), `apb_`
(coprocessor), `sfu_` (function unit), `mp_` (handshake), `ud_` (counter).
The processor that would drive the bus and the custom instructions is not
part of this RTL; its side is the top's ports.

## Files

| rtl/ | |
|---|---|
| `trivium_pkg.sv` | sizes, register offsets, command enum |
| `trivium_kernel.sv` | `BITS`-round combinational kernel |
| `trivium_keyschedule.sv` | state register, load, initialisation counter, `go` |
| `trivium_top.sv` | core = key schedule + kernel |
| `trivium_itf.sv` | IV/key word registers, command decode, `go` generation |
| `trivium_mmio.sv` | APB slave with the four registers, wraps `trivium_itf` |
| `trivium_sfu.sv` | custom-instruction unit, 64 rounds per advance |
| `msg_rcv.sv` | toggle-handshake receiver |
| `updown.sv` | up/down FSMD |
| `codesign_top.sv` | everything side by side |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and
`trivium_ref_pkg.sv`, a bit-level reference model written directly from the
cipher's round equations with an array s[1..288], independent of the RTL's
vector slicing. Every testbench prints `TB_RESULT checks=N failures=M` and
has a cycle watchdog.

What the testbenches establish:

* the kernel matches the reference for random states at 1 and 32 rounds;
* the key schedule's load layout, reload while `ld` is held, exactly 1152
  (and 36) stepping cycles, and `go` gating;
* the core's key stream at 1, 8 and 32 bits per cycle against the reference,
  with 1152/144/36-cycle initialisation, across a reload;
* the bus interface and APB coprocessor driven as a driver would, including
  repeated commands, read-back, read-only registers and `pslverr`;
* the function unit through a full load, 18-advance initialisation and 64
  key-stream pairs;
* the handshake for 100 messages with one-cycle acknowledge, and the counter
  sequence cycle by cycle;
* `tb_codesign_top` runs all of the above at once at default sizes and
  counts each mechanism (load, initialisation, bus step, held command, bus
  error, unit write, unit advance, held operand, message, counter turns).

Known-answer vectors from the cipher's published test set were not used.
They differ from the convention here in the order of bits within key
bytes. The reference model fixes the convention in the load table above,
and agreement is with that model.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/trivium_pkg.sv tb/trivium_ref_pkg.sv tb/tb_codesign_top.sv \
  --top-module tb_codesign_top -o sim
./obj_dir/sim
```

Replace the testbench file and top module for any other block. Variables
not reset are random in a two-state simulator; all RTL state is reset by
`rst_n`.

## Design choices and departures

These points are not fixed by the original design description and were
decided here:

* Reset: asynchronous, active low, clearing every register; the key
  schedule comes out of reset with `e` = 1 on the all-zero state.
* Every width runs exactly 1152 initialisation rounds: the counter counts
  1152/`BITS` steps. A two-bit core built by simply chaining a second
  kernel onto an unchanged 1152-cycle counter would run 2304 rounds instead;
  the counter widths of the 1-, 8- and 32-bit versions (11, 8, 6 bits) show
  the scaled counter is the intended one.
* The exact effect of `go` on the key schedule: free-running during
  initialisation, one step per `go` cycle after it.
* Bit order of multi-bit key-stream words (first bit in the MSB), extended
  from the two-bit case to 8, 32 and 64 bits.
* The bus: APB3 with zero wait states, read-back of data in and control,
  `pslverr` for unmapped addresses.
* The function unit's state-load encoding, as described above.
* `rd` of the handshake receiver is an output port.

Not provided as RTL: the processor and its bus or custom-instruction
ports; the AMBA bus fabric; the vendor AES/TDES peripheral used as a
comparison; DMA engine and shared memory; checksum and ping-pong-buffer
accelerators; the multi-context AES interface with nonce-authenticated
agents; the oracle-partitioned coprocessor. Their functions are not
described in enough detail to implement.
