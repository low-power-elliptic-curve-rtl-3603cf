# Low-power elliptic-curve processor for RFID tags

This is a public-key crypto core small enough for a passive RFID tag. It lets a tag prove
its identity to a reader with an elliptic-curve protocol (Schnorr identification or
EC-RAC). The design has two processors on one 8-bit bus:

- **EC processor.** A 163-bit elliptic-curve processor computes the one expensive
  operation, the scalar point multiplication x(kP) on a binary curve over GF(2^163).
- **Microcontroller.** An 8-bit microcontroller runs the protocol from ROM. It moves
  21-byte numbers between memory, the random number generator and the radio front end. It
  does the cheap arithmetic modulo the group order itself.

The EC processor keeps only x coordinates and uses a Montgomery ladder in which both
ladder points share one Z coordinate. This needs six 163-bit registers, one digit-serial
multiplier (4 bits per cycle) and a single inversion at the very end.

The target from the original design is 9.8 point multiplications per second at 847 kHz,
about 86,400 cycles each. This implementation takes 92,438 cycles for a 163-bit scalar,
which is 9.16 per second at 847 kHz (see "Timing").

## Structure

```
                 ecc_rfid_top
  start/start_pc -> mcu --------\               /-- rom  (1 KiB: keys, n, programs)
                                 bus_manager ---+-- ram  (1 KiB: 21-byte blocks)
  ecp_busy <------ ecp ---------/     |  |
                    |                 |  +-- rng_data / rng_valid / rng_ready   (port)
  ecp_control2 (point multiplication)  +----- rx_* / tx_*  front end             (ports)
  ecp_control1 (ladder step)
  ecp_regfile  (6 x 163 bit)
  malu         (GF(2^163) ALU)
```

| file | what it is |
|---|---|
| `rtl/ecc_pkg.sv` | field and curve constants, bus structs, memory map, instruction and micro-op encodings |
| `rtl/ecc_rfid_top.sv` | the whole chip: microcontroller, EC processor, bus manager, ROM, RAM |
| `rtl/mcu.sv` | 8-bit protocol microcontroller with block instructions |
| `rtl/bus_manager.sv` | two-master bus and address decoder |
| `rtl/ecp.sv` | EC processor: wires the four parts below together |
| `rtl/ecp_control2.sv` | upper controller: memory transfers, ladder loop, inversion |
| `rtl/ecp_control1.sv` | lower controller: one ladder step as 13 ALU micro-ops |
| `rtl/ecp_regfile.sv` | six 163-bit registers, three read ports, byte port |
| `rtl/malu.sv` | GF(2^163) multiply (digit-serial, d = 4), multiply-accumulate, add |
| `rtl/rom.sv`, `rtl/ram.sv` | byte-wide synchronous memories |
| `rtl/rom_image.hex` | default ROM contents (constants and the two protocols) |

The random number generator and the analog front end are outside this logic. Each is a
byte stream on the top-level ports with a valid/ready handshake. A byte moves in a cycle
where both valid and ready are high.

## Arithmetic: field, curve and data blocks

- **Field.** GF(2^163) in polynomial basis with f(x) = x^163 + x^7 + x^6 + x^3 + 1.
- **Curve.** NIST B-163, y^2 + xy = x^3 + x^2 + b. The hardware sees the curve only
  through two constants:
  - c = sqrt(b), wired into the register file;
  - the group order n, stored in ROM for the microcontroller.

  To use another curve over the same field, change `CURVE_C` in `ecc_pkg` and ROM
  block 3.
- **Blocks.** Every number the protocol handles is a 21-byte (168-bit) block. Its value
  is stored little-endian: byte 0 holds bits 7..0.

## The point multiplication

### Common-Z Montgomery ladder

The ladder keeps two points, P1 = kP and P2 = (k+1)P, whose difference is always the base
point P. Because of this, the x coordinate of P1 + P2 can be computed from x(P), X1, X2
and Z alone, and y is never needed. Here both points share one projective Z, so:

- x(P1) = X1 / Z and x(P2) = X2 / Z;
- the state is only X1, X2 and Z, plus x(P) in a fourth register.

One ladder step for key bit 1 computes P1 <- P1 + P2 and P2 <- 2 P2. In the formulas,
x is the affine x of the base point and c = sqrt(b):

```
S2  = (X1 + X2)^2            (Z of the sum, up to a factor Z^2)
D   = (X2 Z)^2               (Z of the double)
E   = (X2^2 + c Z^2)^2       (X of the double)
X1' = (x S2 + X1 X2) D
X2' = E S2
Z'  = S2 D
```

Each result is multiplied by the other point's Z, so that both end up on the common Z'.
The addition result has a factor Z^2 removed. This is allowed because projective
coordinates are defined only up to a common factor.

For key bit 0 the roles of the points swap: P2 <- P1 + P2 and P1 <- 2 P1. The lower
controller does this by swapping register addresses 1 (X1) and 2 (X2) in every micro-op.
Both bit values therefore run the same 13 operations in the same time.

`ecp_control1` runs a step as this sequence. T1 and T2 are the two temporary registers,
and MAC is a·b + c in one multiplier pass.

| # | op | result |
|---|---|---|
| 0 | MUL | T1 = X2 · Z |
| 1 | MUL | T1 = T1² = D |
| 2 | MUL | T2 = X1 · X2 |
| 3 | ADD | X1 = X1 + X2 |
| 4 | MUL | X1 = X1² = S2 |
| 5 | MUL | Z = Z² |
| 6 | MUL | X2 = X2² |
| 7 | MAC | X2 = c · Z² + X2² |
| 8 | MUL | X2 = X2² = E |
| 9 | MUL | X2 = E · S2 |
| 10 | MAC | T2 = x · S2 + X1X2 |
| 11 | MUL | Z = S2 · D |
| 12 | MUL | X1 = T2 · D |

This is 12 multiplications (squarings go through the multiplier) and one addition. It
uses exactly the six registers x, X1, X2, Z, T1 and T2, plus the read-only constant c.

### Set-up, key scan and final inversion

`ecp_control2` sequences a whole point multiplication:

1. **Load x.** It reads the 21-byte x of the base point from the block that
   Activate_ECP names, over the bus, into register x.
2. **Set up the ladder.** It sets P1 = P and P2 = 2P on the common Z = x^2, which gives
   X1 = x^3 and X2 = (x^2 + c)^2 (= x^4 + b). This takes three micro-ops.
3. **Scan the scalar.** It reads the scalar from RAM block 4, most significant byte
   first. Leading zero bits and the leading one are skipped, because the initial state
   already stands for the leading one. Every later bit starts one ladder step.
4. **Invert Z.** It computes Z^-1 = Z^(2^163 - 2) with the Itoh-Tsujii addition chain
   1, 2, 4, 8, 16, 32, 64, 128, 160, 162. That is 162 squarings and 9 multiplications,
   driven from a 20-entry table. Then x(kP) = X1 · Z^-1.
5. **Store.** It writes the result to RAM block 2 and pulses done.

A zero scalar writes zero.

### MALU

`malu` multiplies most-significant digit first, with D = 4 bits of b per cycle. Each
cycle it:

- shifts the 163-bit accumulator up by 4;
- folds the 4 overflow bits back with the reduction polynomial;
- adds a · (next digit of b), reduced the same way.

A multiplication is 41 digit cycles. The MAC form adds the operand c to the product in
the last cycle, at no extra time. ADD finishes in one cycle.

Operand b is copied into a shift register at start. Operands a and c are read from the
register file throughout the operation. This is safe because the register file is
written only when an operation ends.

### Register file

`ecp_regfile` has:

- six 163-bit registers: 0 x, 1 X1, 2 X2, 3 Z, 4 T1, 5 T2;
- read address 6, which returns the constant c;
- read address 7, which returns zero;
- three combinational read ports (MALU operands a, b, c) and one write port;
- an 8-bit byte port, indexed by register and byte 0..20, through which the upper
  controller loads x and reads out the result.

## Microcontroller

### Instructions

Each instruction is 3 bytes: opcode, operand A, operand B. Instruction `pc` starts at ROM
byte 0x200 + 3·pc. An operand is a block reference byte {device[2:0], index[4:0]}:

| device | reads | writes |
|---|---|---|
| 0 ROM | block of ROM | - |
| 1 RAM | block of RAM | block of RAM |
| 2 RNG | 21 random bytes | - |
| 3 front end | 21 received bytes | 21 transmitted bytes |

| opcode | instruction | effect |
|---|---|---|
| 0 | End_of_code | stop, pulse `done` |
| 1 | Block_Mov (A, B) | A <- B |
| 2 | Block_Add (A, B) | RAM[0] <- (A + B) mod n |
| 3 | Block_Mul (A, B) | RAM[0] <- (A · B) mod n |
| 4 | Block_Comp (A, B) | flag <- (A == B) |
| 5 | Cond_Jump (A) | if flag then pc <- A |
| 6 | Activate_ECP (A) | start the EC processor on point block A |
| 7 | Wait_for_ECP | stall until the EC processor is done |

### Modular arithmetic, byte by byte

The microcontroller has only an 8-bit ALU and 8-bit registers. Every 168-bit operation is
therefore a sequence of passes over 21 bytes, least significant byte first. A pass keeps
one carry/borrow bit between bytes and writes each result byte back to memory at once.
The modulus n is ROM block 3.

- **Block_Add** takes two passes:
  1. s = A + B into scratch block RAM[5];
  2. s − n into RAM[6].

  If the second pass did not borrow, the difference is the result; otherwise the sum is.
  A final pass copies the result to RAM[0].
- **Block_Mul** is left-to-right double-and-add over the 168 bits of A. For each bit it
  doubles the partial result, subtracts n on trial, and, if the bit is one, adds B and
  subtracts n on trial again. The partial results move between RAM[5] and RAM[6]
  (ping-pong), and a pointer bit records which block holds the current value. No 168-bit
  register is needed.

Each trial subtraction removes at most one n. So:

- Block_Add needs A + B < 2n;
- Block_Mul needs B < n.

Both hold for all values in the two protocols.

### The protocols in ROM

`rom_image.hex` holds 1,024 bytes at most, as one hex byte per line from address 0.

| address | contents |
|---|---|
| block 0 | x of the base point G |
| block 1 | the tag's secret key (a test value) |
| block 2 | x of the server's public key Y = y·G (test value y = 0x0badc0ffee1234567) |
| block 3 | the group order n |
| pc 0 | Schnorr |
| pc 16 | EC-RAC |
| pc 40 | a short compare-and-jump program that exercises Block_Comp and Cond_Jump |

Schnorr (pc 0):

```
Block_Mov    RAM[4], RNG          r
Activate_ECP ROM[0]               X = x(rP)   (scalar is always RAM[4], result RAM[2])
Wait_for_ECP
Block_Mov    FE, RAM[2]           send X
Block_Mov    RAM[0], FE           receive challenge e
Block_Mul    RAM[0], ROM[1]       a e
Block_Add    RAM[0], RAM[4]       y = a e + r
Block_Mov    FE, RAM[0]           send y
End_of_code
```

EC-RAC (pc 16) sends T1 = x(r_t P). It then receives the server's r_s, computes
x(r_s P), forms v = r_t + x(r_s P)·s1 mod n, and sends T2 = x(v Y).

## Bus manager and memory map

The 13-bit master address is split in two:

- addr[12:10] selects ROM, RAM, RNG or the front end;
- addr[9:0] is the byte address in ROM or RAM.

Block i of a memory starts at byte 21·i.

Both masters use a request/acknowledge handshake (`bus_req_t`, `bus_rsp_t`). A master
holds req, we, addr and wdata until ack, and read data is valid with ack. Assertions in
`bus_manager` check this rule.

- **ROM and RAM** are synchronous. An access takes two cycles: address, then ack with
  the data.
- **RNG and front end** accesses are acknowledged in the cycle the device is ready. The
  device sees a one-cycle ready or valid strobe in that same cycle.
- **Priority.** The EC processor has priority. An access that has started is always
  finished first.

## Timing

All figures are in clock cycles, measured in simulation.

| operation | cycles |
|---|---|
| MALU multiplication | 42 from the start pulse to done |
| ladder step | 519 in `ecp_control1`; 520 per key bit seen from the EC processor |
| point multiplication, t-bit scalar | 8,198 + 520 (t − 1) with ecp_busy high; 92,438 for t = 163 |
| fixed part (63 byte transfers, set-up, inversion, final multiplication) | about 8,200 |
| Block_Mov | about 90 |
| Block_Add | about 380 |
| Block_Mul | about 42,000 |
| Schnorr, end to end, randomly stalling front end | about 157,000 |
| EC-RAC, end to end | about 339,000 |

The original chip reaches 9.8 point multiplications per second at 847 kHz, about 86,400
cycles each. This RTL reaches 9.16, so its cycle count is about 7% higher. Possible
reasons:

- a shorter multiplier start-up;
- overlap between micro-ops;
- fewer operations per step, with squarings in a dedicated squarer.

The original design does not give these details.

## Departures and limitations

- **Curve choice.** The curve (B-163), the reduction polynomial, all encodings, the
  memory map, the bus handshake and the microcontroller's arithmetic algorithms are
  choices of this implementation.
- **k = n − 1.** With the common Z, a ladder point at infinity makes Z zero for both
  points. For k = n − 1 (and k = 0 mod n) the result is therefore 0, not x(−P). Random
  scalars below n − 1 are unaffected.
- **Not constant-time.** Skipping leading zero bits makes the time depend on the
  scalar's length: 520 cycles per bit. Each step runs the same operations for both bit
  values. If the length must not leak, set the top bits of the scalar (k + n or k + 2n)
  or remove the skip.
- **Operand limits.** Block_Add needs A + B < 2n, and Block_Mul needs B < n.
- **Register-file byte path.** The original design draws this path through the lower
  controller. Here it runs from the upper controller straight to the register file; it
  is the same connection.
- **Not included.** The chip's test mode (testing each component separately over a
  test bus) is not built. Neither are the random number generator and the RF front end.

## Verification

Each block has a self-checking testbench in `tb/`. The expected values come from
`tb/ecc_ref_pkg.sv`, which uses different algorithms from the RTL:

- bit-serial field multiplication;
- Fermat inversion by square-and-multiply;
- the classic Lopez-Dahab ladder with separate Z coordinates and the constant b;
- wide integer arithmetic mod n.

| testbench | covers |
|---|---|
| `tb_malu` | random and corner operands for MUL, MAC and ADD; latency |
| `tb_ecp_regfile` | all ports, constants c and 0, byte port, bits above 162, writes to the constant addresses |
| `tb_ecp_control1` | ladder steps for both key bits against the reference formulas; 519-cycle latency |
| `tb_ecp` | point multiplication for k = 0, 1, 2, 3, a short scalar with the point read from a RAM block, n − 2 and random 163-bit scalars; checks the cycle formula |
| `tb_mcu` | every instruction with a behavioural bus and EC processor, including a Block_Add that must wrap |
| `tb_bus_manager` | two random masters against all slaves; arbitration; latency |
| `tb_rom`, `tb_ram` | memory behaviour and latency |
| `tb_ecc_rfid_top` | whole chip with default parameters, running Schnorr, EC-RAC and both jump outcomes; checks every transmitted value and every point multiplication's time; counts RNG reads, receives, transmits, point multiplications, ladder steps with each bit value, Wait_for_ECP stall cycles and jumps |

### Simulating

Run from the directory that contains `rtl/` and `tb/`, because the top reads
`rtl/rom_image.hex` by that relative path:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_rfid_top.sv \
    --top-module tb_ecc_rfid_top -o sim
./obj_dir/sim
```

The other testbenches build the same way with their own top module. Each prints
`TB_RESULT checks=N failures=M`. The full-chip test simulates about 500,000 cycles and
runs in well under a minute.
