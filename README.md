# ECC-SoC hardware: a 161-bit modular arithmetic processor with SHA-1, timer and word I/O

This RTL is the hardware of a user terminal that authenticates itself to a
network server with elliptic-curve cryptography: ECDSA signatures and an
elliptic-curve Diffie-Hellman key agreement over the 160-bit prime curve
**secp160r1**. A general-purpose embedded processor runs the protocol. It
also runs the curve arithmetic (point addition, doubling and scalar
multiplication), the random number generator and an XOR stream cipher in
software. What is too slow in software goes to hardware on the processor's
bus:

| unit | module | what it does |
|---|---|---|
| Modular Arithmetic Processor (MAP) | `map` = `bus_interface` + `map_core` | 161-bit modular add, subtract, multiply, divide |
| SHA-1 unit | `sha1` | SHA-1 compression of one 512-bit block (FIPS 180-1) |
| timer | `timer32` | 32-bit cycle counter with reset/start/stop |
| IO1, IO2 | `abstract_io` (+ `sync_fifo`) | word FIFOs towards off-chip peers, standing in for a UART or USB link |
| bus slave | `ecc_soc` (top) | address decoding and read multiplexing for all of the above |

The main idea of the partitioning: everything above field arithmetic stays
in software, and the four GF(p) operations run in hardware. Modular
multiplication and division dominate an ECDSA run, so they gain the most
from hardware. The MAP built here holds all four units. Software may still
choose to do additions and subtractions itself.

The processor is not part of this RTL. Its bus is the top module's `bus_*`
port, and `tb/tb_ecc_soc.sv` plays its firmware.

## How the processor uses the MAP

The MAP looks like a set of 32-bit registers. Operands are 161 bits wide and
move as six 32-bit words, word 0 least significant. The top 31 bits of
word 5 are ignored on input and read as zero.

Control word (`ECC_control`):

| bits | field | meaning |
|---|---|---|
| [2:0] | opcode | 0 none, 1 `mod_mul`, 2 `mod_div`, 3 `mod_add`, 4 `mod_sub` |
| [4:3] | operand select | 0 none, 1 x, 2 y, 3 m |
| [5] | read | show the result z on the six output words |

Status word bit 0 is `done`.

One operation, as its driver performs it:

1. For each of x, y and m: write the six data words, write control = select
   code, then write control = 0. While a select code is set, the six words
   are copied into that operand register on every clock. Clearing the
   select before the next operand's words arrive is therefore required.
2. Write control = opcode. The opcode reaches the core only while no
   operand is selected.
3. Poll status until `done` = 1.
4. Write control = opcode | read, then read the six result words.
5. Write control = 0. The unit goes idle and `done` clears.

Results: `mul` z = y·x mod m, `div` z = y/x mod m, `add` z = y+x mod m,
`sub` z = y−x mod m. Note the order: y is the first argument of the
software driver and x the second. Operands must already be reduced
(below m). For division, m must be an odd prime and x nonzero. For x = 0
the divider returns 0 rather than hanging.

### Why 161 bits

The field prime p of secp160r1 has 160 bits, but the curve's group order
n = 0x01_00000000_00000000_0001F4C8_F927AED3_CA752257 has 161. ECDSA
computes s = k⁻¹(e + d·r) mod n and the verifier's u1, u2 modulo n. The MAP
signals are 161 bits wide (`DATA_WIDTH = 161`), so the one unit handles
both. The firmware just loads p or n as m.

## Inside the arithmetic units

All four units share the operand buses x, y, m from `bus_interface`.
`map_core` has a registered enable decoder that raises the `en` of the unit
named by the opcode one clock after the opcode arrives. Two multiplexers
return that unit's `z` and `done`. Each unit uses the same handshake:

- `en` is a level and starts the unit.
- `done` and `z` are held while `en` stays high.
- Dropping `en` returns the unit to idle.

Every unit samples its inputs in a load state S0. Its registers are one bit
wider than the operands, so sums and doublings below 2m fit.

### `mod_mul`: interleaved add-and-shift multiplication

It scans y from the least significant bit, keeping U (accumulator),
V = x·2ⁱ mod m and A = y >> i:

| state | action |
|---|---|
| S0 | U = 0, V = x, A = y, P = m |
| S1 | if A = 0 go to S4; else if A[0] then U = U + V |
| S2 | A = A >> 1, V = V << 1, and if U ≥ P then U = U − P |
| S3 | if V ≥ P then V = V − P; back to S1 |
| S4 | z = U, done = 1 |

U and V stay below P after each iteration, so one subtraction is enough
each time. Latency is **3·bitlen(y) + 3** cycles after `en` is first
sampled. That is 483 cycles for a 160-bit y, plus one cycle of opcode
decoding in `map_core`. The unit is one 162-bit adder, two 162-bit
subtracters and comparators, and shifts.

### `mod_div`: binary division

z = y·x⁻¹ mod m is computed directly, without a separate inversion, by a
binary extended-GCD loop with one iteration per clock. Registers A = x,
B = m, U = y and V = 0 keep two invariants:

    y·A ≡ U·x (mod m)      y·B ≡ V·x (mod m)

Each iteration does exactly one of these:

- A even: A = A/2, U = U/2 mod m.
- Otherwise, B even: B = B/2, V = V/2 mod m.
- Otherwise, A > B: A = (A−B)/2, U = (U−V)/2 mod m.
- Otherwise: B = (B−A)/2, V = (V−U)/2 mod m.

Halving modulo odd m is t/2 for even t and (t+m)/2 for odd t. The loop
stops when A = B, which is then gcd(x, m) = 1, so U = y/x. It needs at most
about 2·161 iterations; the number depends on the operands. One iteration
is a subtract, a conditional add and a shift on 162 bits, all in one cycle.
This is the longest combinational path in the design.

### `mod_add`, `mod_sub`

`mod_add` takes three states: load, add, then subtract m once if the sum is
≥ m. `mod_sub` also takes three: load, subtract (the 162nd bit is the
borrow), then add m back on a borrow. `done` comes 3 cycles after `en` is
sampled.

## SHA-1 unit

`init` loads the standard initial chaining value. `start` compresses the
16 words on `block_w` into it. One round runs per clock, with a 16-word
shift register producing the message schedule. `done` rises after the 80
rounds and the final addition, 81 cycles after the start edge. Message
padding is software's job. On the bus, writing SHA control bit 0 gives a
one-cycle init pulse and bit 1 a start pulse. The block words are
registers at 0x30–0x3F and the digest is read at 0x28–0x2C.

## Timer and I/O ports

`timer32` counts clock cycles between a start and a stop, and is cleared by
a reset pulse. A start written in cycle t0 and a stop written in cycle t1
leave count = t1 − t0. Firmware uses it to time operations.

`abstract_io` has a 16-word FIFO in each direction. Writing its data
address is *put_word* and reading it is *get_word*; the read pops the word.
Its status word gives rx-available (bit 0) and tx-full (bit 1). Off chip,
each direction is a valid/ready word stream.

## System bus and address map

`ecc_soc` is a single-cycle memory-mapped slave with 8-bit word addresses
and 32-bit data:

- A write takes effect at the clock edge where `bus_write` is high.
- `bus_readdata` follows `bus_addr` combinationally while `bus_read` is
  high, and is 0 otherwise.

| address | write | read |
|---|---|---|
| 0x00 | MAP control | MAP control |
| 0x01 | – | MAP status |
| 0x02–0x07 | MAP data_in0..5 | MAP data_out0..5 |
| 0x10 | timer: bit0 reset, bit1 start, bit2 stop | bit0 running |
| 0x11 | – | timer count |
| 0x20 | SHA: bit0 init, bit1 start | – |
| 0x21 | – | SHA bit0 done, bit1 busy |
| 0x28–0x2C | – | SHA digest H0..H4 |
| 0x30–0x3F | SHA block W0..W15 | – |
| 0x40 / 0x50 | IO1 / IO2 put_word | IO1 / IO2 get_word |
| 0x41 / 0x51 | – | IO1 / IO2 bit0 rx available, bit1 tx full |

The constants live in `rtl/ecc_soc_pkg.sv`, together with the opcode and
select enums.

## Performance seen in simulation

With this single-cycle bus, one 160-bit scalar multiplication on secp160r1
in software over the MAP takes **536,088 cycles**, as counted by the
on-chip timer in `tb_ecc_soc`. That run uses least-significant-bit-first
double-and-add in affine coordinates. The MAP calls reload all three
operands every time, as the reference driver does.

The original design measured about 3.8 million cycles for the same step.
That figure includes processor software time and about 19 cycles per bus
word on its FPGA board. The two numbers are not directly comparable: the
processor's own cycles are not modelled here.

`tb_ecc_soc` also times each step with the on-chip timer. The counts include
the bus transfers (two clock cycles per access in that testbench) and the
polling. The original design's RTL figures, with its processor and bus,
are given for scale:

| step (secp160r1) | cycles here | original RTL |
|---|---|---|
| one `mod_mul` call (operands Gy, Gx) | 548 | 1,935 |
| one `mod_div` call | 316 | 1,920 |
| one `mod_add` / `mod_sub` call | 74 / 74 | 1,458 / 1,452 |
| point doubling | 2,478 | 17,629 |
| point addition | 1,828 | 13,285 |
| point multiplication | 536,088 | 3,815,297 |
| ECDSA signing (without hashing) | 533,510 | 3,751,878 |
| ECDSA verification | 1,054,844 | 7,480,874 |

Division time depends on the operands; here it was shorter than the
multiplication.

`tb_ecdsa_partition` signs one message with each of the eight hardware /
software splits of the MAP that the original design compared (Arch. 1 all
software; Arch. 2 division; Arch. 3 multiplication; Arch. 4 subtraction;
Arch. 5 addition; Arch. 6 addition and subtraction; Arch. 7 multiplication
and division; Arch. 8 all four in hardware). The operations left in
software are computed by the testbench and take no simulated time. It
reports, per split, the timed cycles T and the bus-transfer cycles
μ = (control writes + one status read per operation + input writes +
output reads) × c, with c = 2 cycles per access for its bus master. It
also reports the cycles spent polling while a unit computes. One signing
needs 2,376 MAP operations. With all four in hardware, T is 519,204 cycles,
μ is 161,568 (31 %), and polling takes the rest. The original design
reported μ as 57 % of its all-hardware time, with 19 cycles per bus word.
Since the processor's own time is not modelled, T for the mixed splits
shows only their hardware share, not their full run time.

## Where this RTL departs from, or adds to, the original design

Taken from the original design:

- the split into MAP (bus interface + core with four units), SHA, timer and
  two I/Os;
- the MAP port list (32-bit control and status words, six 32-bit data
  words each way) and the 161-bit internal operand width;
- the multiplier's algorithm, its five states and its register widths;
- the driver sequence, the operand order z = y op x, and opcode 1 for
  multiplication;
- SHA-1 as the hash; the 32-bit timer.

This design's own choices:

- all bit positions, the other opcodes, the bus protocol and the address
  map;
- the done/en handshake (done held until en falls) and the registered
  enable decoder;
- the insides of the divider, adder and subtracter. The original design
  gives only their function and the add-and-shift family for the divider;
- one SHA-1 round per clock;
- FIFO depth 16 and valid/ready off-chip streams for the I/O ports. No real
  UART or USB line protocol is modelled;
- the reset: asynchronous, active low, on every register.

The original design lists the curve both as a "Koblitz curve" and as
secp160r1. secp160r1 is not a Koblitz curve. The tests use secp160r1.

The original design's preferred cost trade-off puts only multiplication and
division in hardware. This RTL keeps all four units, the all-hardware
version the original design also built and measured. Software can ignore
the adder and subtracter to get the cheaper variant.

Not built, because they are software or bought-in parts: the processor, the
random number generator, the XOR stream cipher, and the server and
certificate authority machines.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mod_mul`, `tb_mod_add`, `tb_mod_sub`, `tb_mod_div` | Edge-case and random operands modulo p, n and a small prime, compared with wide-integer references computed in the testbench; for division, z·x ≡ y is checked. Exact latency for mul/add/sub, an upper bound for div. Hold and clear of done. |
| `tb_map_core` | Each opcode against references; OP_NONE output; multiply latency including the decode cycle. |
| `tb_bus_interface` | Operand capture per select code; opcode gating; status; result only with read set. |
| `tb_map` | The full driver sequence on the word ports for all four operations. |
| `tb_sha1` | FIPS 180-1 vectors: "abc", the two-block 56-character message, and the empty message; 81-cycle latency; init. |
| `tb_timer32`, `tb_abstract_io` | Counting, stop, hold, reset, wrap; FIFO order, full, dropped put, rx back-pressure. |
| `tb_ecc_soc` | End to end at default parameters, in about 4 s of simulation. Details below. |
| `tb_mutual_auth` | The terminal side of the mutual authentication protocol on the SoC, against a server and certificate authority modelled in the testbench. Details below. |
| `tb_ecdsa_partition` | ECDSA signing for each of the eight hardware/software splits: signature against a reference, access counts per operation (18 input writes, 9 control writes, 6 output reads), accesses within the timed cycles. |

`tb_ecc_soc` plays the firmware and runs, all through the MAP:

- 2G and 3G on secp160r1;
- Q = d·G, timed by the on-chip timer;
- (n−1)·G = −G;
- SHA-1 of "abc" on the SHA unit;
- an ECDSA signature of that digest, checked against an independent
  reference computed with Fermat inversion in the testbench. The nonce is
  the one of the secp160r1 ECDSA example in the SEC "GEC 2" test vectors,
  and r is checked against the value published there;
- verification of that signature, and rejection of a tampered message;
- Q sent out through IO1 to a peer that stalls, and a reply received;
- IO2 looped back and filled until tx-full.

It counts each mechanism (every opcode, done polling, point add/double,
ECDSA accept/reject, SHA block, timer run, tx stall, tx full, put/get) and
fails if one never happened.

`tb_mutual_auth` runs the authentication and key agreement protocol the
hardware was built for, with the SoC as the user terminal. The terminal
firmware runs over the bus:

1. It deploys its key pair on the MAP and hashes its identity record on
   the SHA unit. The testbench's certificate authority signs the hash.
2. It receives the server's public key Q_s over IO1.
3. It sends its own key Q_u and a random challenge g_u.
4. It computes the shared point d_u·Q_s (elliptic-curve Diffie-Hellman).
5. It decrypts the server's message C0 and checks that g_u came back.
6. It verifies the server's CA-signed certificate on the MAP.
7. It sends its own encrypted certificate and the server's challenge g_s.
8. It hashes the key x-coordinate and both challenges into the session key.

The server must accept the terminal, and both session keys must match. In
a second session, the server's certificate is corrupted in transit, and
the terminal must abort. The random number generator and the XOR stream
cipher are software in this system. The testbench stands in for them with
`$urandom` and a placeholder keystream.

Concurrent assertions in the RTL, active in any simulator with assertions
on (`--assert` in Verilator), check that the MAP core enables at most one
unit at a time, that a unit raises done only after en was high, and that
the bus never reads and writes in the same cycle.

Run a testbench with plain Verilator from the project root:

    verilator --binary --timing --assert -y rtl -Irtl rtl/ecc_soc_pkg.sv tb/tb_ecc_soc.sv \
        --top-module tb_ecc_soc -Mdir obj_tb_ecc_soc -o sim && ./obj_tb_ecc_soc/sim

Replace `tb_ecc_soc` with any other testbench name. The unit testbenches
for the arithmetic are generated from one template; they differ only in the
reference formula and the latency check.

## Changing it

- `DATA_WIDTH` (default 161) sets the operand width of every arithmetic
  module and of `ecc_soc`. Up to 192 bits fit in the six bus words;
  `MAP_WORDS` in the package sets the number of words.
- The divider's one-cycle iteration is the critical path. To trade cycles
  for clock rate, split its S1 into a compare/subtract cycle and a halving
  cycle.
- `abstract_io` takes a `DEPTH` parameter (a power of two).
