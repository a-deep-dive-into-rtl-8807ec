# KRONOS: three ways to attach a Keccak accelerator to a RISC-V core

Keccak-f[1600] is the permutation under SHA-3 and SHAKE, and with them under
most post-quantum signature and KEM schemes. On a 32-bit microcontroller it is
slow in software, chiefly because the algorithm works on 64-bit lanes: every
64-bit rotation turns into several shifts, ORs and XORs of 32-bit halves.

KRONOS (Keccak RISC-V Optimized eNginE fOr haShing) accelerates it in three
different ways, so that the integration styles can be compared on the same
algorithm:

| variant | module | attaches through | what it accelerates | state lives in |
|---|---|---|---|---|
| loosely coupled | `kronos_loose` | system bus (OBI slave) + interrupt | whole permutation | fifty 32-bit registers in the accelerator |
| tightly coupled | `kronos_tight` | CV-X-IF (core extension interface) | one instruction, `rol_32`: a 64-bit rotation on two 32-bit registers | the core's registers / memory |
| coprocessor | `kronos_cop` | CV-X-IF | whole permutation, via `load`/`start`/`store` instructions | a 1600-bit register in the accelerator |

The published comparison (SHA3-384 on a CV32E40PX-based microcontroller,
FPGA at 50 MHz) found the memory-mapped variant fastest (13.6x over software),
the coprocessor second (7.5x) and `rol_32` slowest (1.8x) but by far the
smallest, so that `rol_32` gives the best throughput per LUT. This RTL
provides all three variants; `kronos_top` places them side by side, each with
its own ports, since each belongs in a different system.

## Common parts

### The permutation engine (`keccak_f`, `keccak_round`)

`keccak_round` is one full round, purely combinational: theta (XOR of two
column parities into every bit), rho (a fixed rotation per lane), pi (lane
(x,y) moves to (y, 2x+3y mod 5)), chi (`a[x] ^= ~a[x+1] & a[x+2]` along each
row) and iota (round constant into lane (0,0)). The rotation offsets and the
24 round constants are those of the SHA-3 standard; `kronos_pkg` computes
them with functions (the standard's LFSR for the constants, the lane walk for
the offsets) rather than holding a table, and synthesis folds them into
constants.

`keccak_f` wraps one round instance around a 1600-bit state register and a
5-bit round counter and runs one round per clock:

```
cycle   0   start_i=1, state_i sampled
cycles  1..24  busy_o=1, round 0..23 applied at the end of each
cycle  25   done_o=1 for one cycle, state_o = permuted state (held until next start)
```

The engine keeps its own copy of the state: it reads the state register when
it starts and writes the result back into it on `done_o`. Both whole-
permutation variants therefore hold the state twice (register file plus
engine), 3,200 flip-flops in all, which is also what the published register
counts show.

### State layout (`keccak_state_reg`)

The state is 25 lanes of 64 bits, lane `k = x + 5*y`, bit `z` of a lane is
bit `z` of the word: the SHA-3 standard's byte order, so message byte `j`
lands in lane `j/8`, bits `8*(j%8)+7 .. 8*(j%8)`. Seen as 32-bit words, word
`2k` is the low half of lane `k` and word `2k+1` the high half; the first 12
words after the final permutation are the SHA3-384 digest, first byte in the
low byte of word 0.

`keccak_state_reg` is the register both whole-permutation variants use. Its
write word is a parameter: `WR_W = 32` (50 words, with byte enables, for bus
writes) or `WR_W = 64` (25 lanes, for the coprocessor's `load`). Reads are
always 32-bit words, combinational. A full-state load (the permutation result)
wins over a word write in the same cycle. Reset clears the state, which is
the sponge's initial value.

## Loosely coupled: `kronos_loose`

A memory-mapped peripheral. Software writes the state words, starts the
permutation, waits for the interrupt and reads the result; because the state
stays in the accelerator, absorbing the next block costs only a read, an XOR
and a write per rate word.

Register map (byte offsets; only address bits 7:0 are decoded, the bus
selects the window):

| offset | name | bits |
|---|---|---|
| 0x00 .. 0xC4 | STATE[0..49] | 32-bit state words, read/write (writes ignored while busy) |
| 0xC8 | CTRL | bit0 START (write 1; reads 0), bit1 IRQ_EN |
| 0xCC | STATUS | bit0 BUSY, bit1 DONE (sticky, write 1 to clear) |

The bus port is an OBI slave: `obi_gnt_o` follows `obi_req_i` in the same
cycle (it never stalls) and `obi_rvalid_o`/`obi_rdata_o` come one cycle
after the grant, for reads and writes alike. `intr_o = DONE & IRQ_EN` is a
level: it rises 27 cycles after the edge that takes the START write (1 to
register START, 25 in the engine, 1 to register DONE) and falls when the
driver writes 1 to STATUS bit 1.

Absorbing one SHA3-384 block (104 bytes = 26 words) from a driver:

```
for w in 0..25: STATE[w] = STATE[w] ^ msg_word[w]
CTRL = 3                      // START, interrupt enabled
wait for intr_o; STATUS = 2   // clear DONE
```
and after the last block the digest is STATE[0..11].

## Tightly coupled: `kronos_tight` and `rol32`

Here the accelerator is a single instruction; the permutation runs in
software and only the rotations go to hardware. A rotation of a 64-bit lane
by `n` needs both 32-bit halves as inputs, but the extension interface allows
two sources and one destination, so `rol_32` returns one half and a full
rotation takes two instructions:

```
rol_32 rd, rs1, rs2     rd = (half ? bits 63:32 : bits 31:0) of rotl64({rs2, rs1}, amount)

31      30..25   24..20  19..15  14..12  11..7  6..0
half    amount   rs2     rs1     000     rd     0001011 (custom-0)
```

The amount (0..63) and the half are in funct7, which suits Keccak, whose rho
offsets are constants. Software Keccak then issues 2 x (5 theta + 24 rho) =
58 `rol_32` per round, 1,392 per permutation.

`rol32` is the datapath: a 128-bit shift of `{lane, lane}` picks the rotation
without a special case for 0, and a 32-bit result register holds the chosen
half. `kronos_tight` is its CV-X-IF controller (see below): accepted
`rol_32`s are computed in the handshake cycle and the result is offered on
the result interface one cycle later if the core has already committed the
instruction.

## Coprocessor: `kronos_cop`

The whole permutation again, but reached through instructions instead of the
bus, with a 1600-bit state register (`keccak_state_reg`, `WR_W = 64`), the
engine and a controller (`kronos_cop_ctrl`). Three R-type instructions on
opcode custom-1 (`0101011`):

| funct3 | name | effect | writes rd |
|---|---|---|---|
| 000 | load | lane[funct7] = {rs2, rs1} (a 64-bit chunk) | no |
| 001 | start | run the 24-round permutation; completes when it is done | no |
| 010 | store | rd = 32-bit word funct7 (0..49) of the state | yes |

funct7 is the lane or word index. A `load` to a lane above 24 is accepted and
ignored, a `store` of a word above 49 returns 0.

The controller runs one instruction at a time: IDLE (offer taken) ->
WAIT_CMT (until the core commits the instruction; a kill returns to IDLE
with no effect) -> EXEC (one cycle: write the lane, read the word, or pulse
the engine's start) -> WAIT_KF (start only, until the engine is done) ->
RESULT (until the core takes it). `issue_ready` is high only in IDLE, so the
core cannot issue the next coprocessor instruction until a `start` has
finished: `start` is blocking, which is how software knows the state is
ready. With the commit arriving together with the issue, a result is offered
2 cycles after the issue handshake for `load` and `store` and 27 cycles after
it for `start`.

Absorbing a block: `store` the 26 rate words, XOR in software, `load` the 13
lanes back, `start`; read the digest with 12 `store`s.

## The extension interface as modelled here (`cvxif_pkg`)

Both instruction-based variants sit on a reduced CV-X-IF, defined as packed
structs in `cvxif_pkg`:

- **issue**: `issue_valid`/`issue_ready` handshake; the request carries the
  instruction, a mode, an id (4 bits) and the two source register values
  with their valid bits. The response, valid in the same cycle, says
  `accept` and `writeback` (other fields are 0). An instruction the
  accelerator does not own is answered at once with `accept = 0`. An owned
  instruction that needs source values waits (ready low) until both are
  valid.
- **commit**: `commit_valid` with the id and `commit_kill`. It may come in
  the issue cycle or any time later. Nothing architectural happens before
  it: a killed `load` leaves the state alone, a killed instruction returns no
  result.
- **result**: `result_valid`/`result_ready`; payload id, data, rd, we. The
  payload is held until taken (an assertion in each controller checks this).

Memory, compressed-instruction and register-file-extension channels of the
full interface are not modelled, and only one instruction is in flight at a
time per accelerator.

## Sizes

Flip-flops after generic synthesis, against the register counts reported for
the FPGA implementation:

| | this RTL | reported |
|---|---|---|
| loosely coupled, total | 3,243 | 3,252 |
| permutation engine | 1,607 | 1,617 |
| state register | 1,600 | 1,600 |
| memory-mapped controller | 36 | 35 |
| coprocessor, total | 3,328 | 3,372 |
| coprocessor controller | 121 | 125 |
| tightly coupled, total | 44 | 139 |
| `rol_32` result register | 32 | 32 |

The tightly coupled controller here keeps only state, id and rd (12 bits),
where the reported one has 102 registers; its insides were not published.
LUT counts and the 50 MHz timing were not checked.

## What follows the published design and what is this design's own

Taken from the published description: the three variants and their split
into controller, state register and permutation engine; fifty 32-bit state
registers and an OBI slave port with an end-of-operation interrupt for the
memory-mapped variant; `rol_32` as a two-source, one-destination instruction
doing a 64-bit rotation on two 32-bit registers, with a 32-bit result
register; the three coprocessor instructions, 64-bit `load`, 32-bit `store`
and `start` of the 24-round permutation; Keccak-f[1600] with 24 rounds of
theta, rho, pi, chi, iota.

Chosen here, because no detail was published: one round per cycle in the
engine; the register map, OBI timing and interrupt clearing; the instruction
encodings (opcodes, funct3, the funct7 index and amount fields); returning
one half per `rol_32`; the blocking `start`; waiting for commit before any
effect; the reduced CV-X-IF; active-low asynchronous reset, clearing the
state; the state's word order (that of the SHA-3 standard). The constants of
the permutation come from the SHA-3 standard.

Not included: the CV32E40PX core, the X-HEEP platform (bus, memory,
interrupt controller, DMA) and the software drivers. The published cycle
counts (4,169 / 31,527 / 7,553 cycles for SHA3-384 against 56,529 in
software) include that software on that core and cannot be reproduced from
this RTL alone; the testbench's hosts are not a CPU model, and the cycle
counts they print only show the accelerators' own share.

## Simulating

All code is SystemVerilog-2017; `rtl/` holds one module or package per file,
`tb/` the testbenches, a reference model package (`kronos_tb_pkg`, a direct
implementation of Keccak-f with literal tables, SHA3-384 padding and
known digests) and a behavioural CV-X-IF core side (`cvxif_host`). Every
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/kronos_pkg.sv rtl/cvxif_pkg.sv tb/kronos_tb_pkg.sv tb/tb_kronos_top.sv \
  --top-module tb_kronos_top -o sim
obj_dir/sim
```

Replace `tb_kronos_top` with any other testbench:

| testbench | checks |
|---|---|
| `tb_keccak_round` | every round index on random states against the reference; zero-state known answers |
| `tb_keccak_f` | Keccak-f of the zero state (lane 0 = F1258F7940E1DDE7), random states, 25-cycle latency, start while busy ignored |
| `tb_keccak_state_reg` | both word widths: byte-enable writes, all reads, loads, load-over-write priority, reset |
| `tb_kronos_loose_ctrl` | OBI timing, register map, START, writes dropped while busy, DONE/interrupt and its enable |
| `tb_kronos_loose` | random permutation and SHA3-384 of three messages through the bus; 27-cycle START-to-interrupt |
| `tb_rol32` | all 64 amounts, both halves, result register |
| `tb_kronos_tight` | `rol_32` results and 1-cycle latency, late commit, kill, refusal, operand wait, result back-pressure |
| `tb_kronos_cop_ctrl` | load/store/start sequencing, kill, latencies (2 / 2 / 27), refusal |
| `tb_kronos_cop` | random permutation and SHA3-384 of three messages through instructions |
| `tb_kronos_top` | SHA3-384 of the three messages on all three variants at once, with random commit delays, kills and back-pressure; counts that each mechanism occurred |

`tb_kronos_top` runs `kronos_top` with its default parameters and takes
about ten seconds. The test messages are the empty string, `"abc"` and 150
bytes `(7i + 3) mod 256` (two rate blocks); their SHA3-384 digests are
literal constants in `kronos_tb_pkg`.
