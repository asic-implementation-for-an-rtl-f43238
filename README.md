# A small-area P-256 elliptic curve processor

This is synthesizable SystemVerilog for an elliptic curve cryptography (ECC)
processor on the NIST P-256 curve. It is aimed at IoT devices that need a
public-key handshake (DTLS-style mutual authentication) in hardware. It
runs three protocols on one core:

- ECDH key generation (Q = d·G) and shared-secret computation (Z = d·P)
- ECDSA signature generation
- ECDSA signature verification

plus a general scalar multiplication Q = k·P.

The design keeps its area small. The core has one modular adder/subtractor,
one combined Montgomery multiplier and modular divider, and one operand
memory. A micro-programmed control unit runs everything on them: point
doubling, point addition, the double-and-add loop, and the signature flows.
There is no separate point-addition or point-doubling hardware. The
additions are done in redundant signed-digit (RSD) arithmetic, and so is the
multiplier's accumulator, so no carry ripples across 256 bits inside those
steps.

The architecture follows a published ASIC ECC processor. That publication
describes the blocks and what they do (RSD arithmetic, Montgomery
multiplication, a shared multiply/divide unit, op-code control, an SRAM, and
an FT245 USB link). It does not give their internal algorithms, encodings or
interfaces. Those were worked out for this implementation;
[Departures and own choices](#departures-and-own-choices) lists them.

## Block diagram

```
 FT245 USB FIFO pins
        |
   +----------+   256-bit word port,   +------------------------------------+
   | ft245_if |<--- command, status -->|          ecc_processor             |
   +----------+                        |                                    |
                                       |  ecc_control  (micro-ROM, FSM)     |
                                       |     |  addresses, op, modulus      |
                                       |     v                              |
                                       |  ecc_regfile  (25 words + 7 const) |
                                       |     | a, b                         |
                                       |     +--> mod_addsub (RSD) ---+     |
                                       |     +--> mod_muldiv ---------+--> write back
                                       +------------------------------------+
 ecc_chip = ft245_if + ecc_processor
```

## Commands and operand words

The host writes 256-bit operand words, starts a command, waits for it to end,
and reads the results. Word addresses (`ecc_pkg`):

| addr | word | use |
|---|---|---|
| 9 | K | scalar for PMUL, nonce k for SIGN |
| 10 | D | private key (write-only: reads as 0 from outside) |
| 11 | H | message hash H(m) |
| 12, 13 | R, S | signature (output of SIGN, input of VERIFY) |
| 14, 15 | QX, QY | public key (output of KEYGEN, input of VERIFY) |
| 16, 17 | INX, INY | input point for ECDH and PMUL |
| 18, 19 | OX, OY | output point of ECDH and PMUL |
| 0–8, 20–21 | | working words |
| 25–31 | | read-only constants: 0, 1, R² mod p, R² mod n, 3R mod p, Gx, Gy |

| code | command | effect |
|---|---|---|
| 1 | KEYGEN | (QX, QY) = D·G |
| 2 | ECDH | (OX, OY) = D·(INX, INY) |
| 3 | PMUL | (OX, OY) = K·(INX, INY) |
| 4 | SIGN | R = x(K·G) mod n, S = (H + D·R)/K mod n |
| 5 | VERIFY | valid = (x(u1·G + u2·Q) mod n == R), with u1 = H/S and u2 = R/S |

Status bits: `busy`, `done` (a pulse on the core, sticky on the USB link),
`err` and `valid`. `err` is set if the scalar is zero, or if a division by
zero occurs. A division by zero happens when the result would be the point
at infinity, for example when S = 0. A VERIFY with `err` set reports not
valid. Host writes are ignored while a command runs.

The hash H(m) and the nonce k come from outside. The core contains no hash
unit and no random number generator.

## How a scalar multiplication runs

This is the part that needs the closest reading.

**Coordinates.** Points are kept in affine coordinates (x, y). Each field
value is held in Montgomery form, x̃ = x·R mod p with R = 2^256. Affine
coordinates are possible because the core has a modular divider. Each point
operation forms its slope λ with one division and needs no final inversion.

**The Montgomery/division interplay.** A Montgomery product of two
Montgomery-form values is again in Montgomery form:
MM(ã, b̃) = ã·b̃·R⁻¹ = (ab)·R. A quotient of two Montgomery-form values
loses the factor: ã / b̃ = a/b. So right after each division, the control
unit multiplies λ by the constant R² mod p, which gives λ·R. Everything stays
in Montgomery form until the final conversion, a Montgomery product with 1.

**Point doubling** (14 micro-ops, curve a = −3):

```
T1 = X·X            T2 = T1+T1          T1 = T2+T1          T1 = T1 − 3R
T2 = Y+Y            T1 = T1 / T2 (λ)    T1 = T1·R²  (λ̃)     T2 = T1·T1
T2 = T2 − X         T2 = T2 − X (x3)    T3 = X − T2         T3 = T1·T3
Y  = T3 − Y         X  = T2
```

**Point addition** Q + P (11 micro-ops): λ = (Py − y)/(Px − x),
x3 = λ² − x − Px, y3 = λ(x − x3) − y, in the same pattern.

**Double-and-add.** The scalar is loaded into a 256-bit shift register.
Leading zero bits are shifted out one per cycle, and the top one bit starts
the result at Q = P. For each remaining bit, Q is doubled, and if the bit is
one, P is added. The micro-sequencer has a one-level call mechanism: the
SMUL and PADD micro-ops jump into the shared routines and return to the
command program afterwards.

**Micro-op timing.** A micro-op takes one cycle to read the operand memory
(reads are synchronous, like an SRAM), one cycle to issue, and then the
unit's latency. The result is written in the cycle the unit signals done.

| operation | cycles |
|---|---|
| modular add/sub | 3 per micro-op |
| Montgomery product | 259 (WIDTH + 3) + 2 |
| modular division | data-dependent, ≤ ~2·256; 387 was the largest seen on random P-256 operands |
| point doubling | 4 products + 1 division + 9 add/sub ≈ 1 450 |
| point addition | 3 products + 1 division + 7 add/sub ≈ 1 200 |
| P-256 scalar multiplication | 517 441 for the test scalar below |
| SIGN / VERIFY | 521 495 / 1 024 848 |

The published FPGA prototype reports about 490 000 cycles per scalar
multiplication (4.9 ms at 100 MHz). This implementation is about 5 % slower
in cycles: 5.2 ms at 100 MHz, or 2.6 ms at the 200 MHz the ASIC is reported
to reach.

## The integrated multiplier/divider (`mod_muldiv`)

One register set (A, B, U, V) serves both operations. The modulus m is p or
n and is chosen per micro-op.

- **Montgomery multiplication, radix 2, signed-digit accumulator.** The
  accumulator T is kept as T = U − V, with U the plus digits and V the minus
  digits. Each cycle does the following:
  1. S1 = T + a_i·B, a carry-free signed-digit addition.
  2. q = parity of S1. This is simply `plus[0] xor minus[0]`, so no
     conversion is needed to find it.
  3. S2 = S1 + q·m, a second carry-free addition.
  4. T = S2/2, which drops digit 0.

  T stays below 2m < 2^257. So the top digit the additions produce can
  always be folded into the digit below it (2·d_top + d_next ∈ {−1, 0, 1}),
  which keeps the accumulator at 258 digits. After 256 cycles, the shared
  U − V subtractor converts T to binary, and one more cycle subtracts m if
  needed.
- **Modular division, binary.** Starting from (A, B, U, V) = (b, m, a, 0),
  each cycle halves an even A or B, or replaces the larger of the two by
  their halved difference. U or V is updated to keep the invariant
  U·b ≡ a·A (mod m). When A reaches 1, U = a/b mod m. "Halve mod m" is
  (w + w₀·m)/2. The division compares A with B and takes signs every cycle,
  so it works on binary words.

## Signed-digit addition (`rsd_adder`, `mod_addsub`)

A digit is a pair of bits (plus, minus) with value plus − minus ∈ {−1, 0, 1}.
`rsd_adder` adds two such numbers with two rows of full adders and no carry
chain:

```
row 1: FA(xp, yp, ¬xn)       gives  xp + yp − xn      = 2·c1 − ¬s1
row 2: FA(¬s1, yn, ¬c1<<1)   gives  ¬s1 + yn − c1<<1  = 2·c2 − ¬s2
Z = X + Y:  plus = {c1[top], ¬s2},  minus = {c2, 0}
```

The result is exact and one digit wider than the inputs. `mod_addsub` forms
a ± b as a signed-digit number (for a − b the binary operands are already
one: plus = a, minus = b). Then it forms d = s ∓ m with a second
`rsd_adder`. It converts both to binary (`rsd_to_bin`) and lets a sign
choose the result. The result is registered, with one cycle of latency.

## Operand memory (`ecc_regfile`)

The memory has 32 addresses of 256 bits. 25 are storage, an array standing
in for an SRAM macro. 7 are read-only constants decoded from the address.
Each of the three read ports (two operand ports and a host port) is
registered. The host port masks the private key word to zero.

## USB link (`ft245_if`)

The chip talks to a host PC through an FT245-style USB FIFO. It reads a
byte with an RD# pulse while RXF# is low, and writes a byte with a WR pulse
while TXE# is low. RXF# and TXE# are synchronised. The strobes are `PULSE`
clock cycles long, with a `PULSE`-cycle gap (default 10 cycles, 50 ns at
200 MHz). Byte protocol:

| bytes | meaning |
|---|---|
| `001aaaaa` + 32 bytes | write word `a`, most significant byte first |
| `010aaaaa` | read word `a`: 32 bytes come back, MSB first |
| `011xxxxx` | status: one byte back, `{4'b0, done, err, valid, busy}` |
| `10000ccc` | start command `ccc` |

The data bus comes out as `ft_din`, `ft_dout` and `ft_doe`, to be joined in
the pad ring.

## Departures and own choices

These points follow the published design: the curve (P-256), RSD arithmetic,
Montgomery multiplication, merging multiplication and division into one
unit, an op-code control unit that sequences point addition and doubling, an
SRAM for the operands, an FT245 USB link, and a 200 MHz target.

These points are this implementation's own:

- Affine coordinates, left-to-right double-and-add, the micro-op set, the
  command codes and the address map.
- The radix-2 algorithms, the signed-digit encoding, and the top-digit fold.
- The division runs in binary, not in signed digits. The adder and the
  multiplier's accumulator use signed digits, but operands are stored in
  binary.
- Two read ports plus a host port on the operand memory. A real single-port
  SRAM macro would need operand reads serialised, which would add one cycle
  per micro-op.
- The FT245 byte protocol and strobe timing.
- Edge cases of the point arithmetic, which the published design does not
  address:
  - A zero scalar, or a sum that is the point at infinity, raises `err`.
  - In VERIFY, the rare case u1·G = u2·Q is reported as not valid. It would
    need a doubling instead of an addition.
  - r = 0 is not rejected.
- No parallel issue: the add/sub unit and the multiply/divide unit never
  work at the same time. The source names hardware parallelism as a speed
  technique without describing it. The signed-digit adders are the
  digit-parallel part of this design.

Not included: a SHA-2 hash unit, a random number source for k, the SRAM
macro itself, and pads or clocking.

## Files

| file | contents |
|---|---|
| `rtl/ecc_pkg.sv` | P-256 constants, Montgomery constants, address map, commands, micro-op type |
| `rtl/ecc_chip.sv` | chip top: `ft245_if` + `ecc_processor` |
| `rtl/ecc_processor.sv` | core: memory, units, control, modulus select |
| `rtl/ecc_control.sv` | micro-ROM and sequencer (routines, scalar loop, command programs) |
| `rtl/mod_muldiv.sv` | integrated Montgomery multiplier (RSD accumulator) / modular divider |
| `rtl/mod_addsub.sv` | modular adder/subtractor in signed digits |
| `rtl/rsd_adder.sv`, `rtl/rsd_to_bin.sv` | carry-free signed-digit adder, conversion to binary |
| `rtl/ecc_regfile.sv` | operand memory with constant words |
| `rtl/ft245_if.sv` | FT245 FIFO link and byte protocol |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ecdh_exchange.sv`, `tb/tb_ecdsa_roundtrip.sv` | protocol-level tests on the core with random keys |
| `tb/ft245_model.sv` | behavioural FT245 FIFO (host side as byte queues) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/ecc_pkg.sv tb/tb_ecc_chip.sv --top-module tb_ecc_chip
./obj_dir/Vtb_ecc_chip
```

Replace `tb_ecc_chip` with any other testbench name. `tb_ecc_chip` runs the
whole chip at its default parameters through the FT245 pins. It completes
every command once and takes about 25 s. `tb_ecc_processor` does the same on
the core's word port.

## What has been verified

- The test scalar k = 38F65D6D…5CAF5 is from a NIST ECDH test vector. It
  produces the expected public key 119F2F04…A3F6D0 / 8F52B726…704D1D and
  the shared secret 057D6360…9CDA67.
- KEYGEN, SIGN and both VERIFY outcomes match values computed independently
  in software.
- Each arithmetic block is checked against wide-integer reference arithmetic
  on random and corner operands, for both moduli.
- The control unit is checked with stand-in arithmetic units. For each
  scalar it must issue exactly (L−1) doublings and (w−1) additions, where L
  is the scalar's bit length and w is the number of one bits.
- Each testbench has been shown to fail on a deliberately broken copy of its
  module.

The workload testbenches `tb_ecdh_exchange` and `tb_ecdsa_roundtrip` need no
stored answers. In the first, two parties with random keys must agree on the
shared point, and every point must satisfy the curve equation. In the
second, random signatures must satisfy s·k ≡ H + d·r (mod n), must verify,
and must fail once altered.

Not verified: gate-level timing at 200 MHz. The likely critical path is the
division step of `mod_muldiv`. It has three 256-bit carry chains in series
(compare A with B, U − V mod m, halve mod m); the Montgomery step has none.
Also not verified: behaviour on points that are not on the curve. The core
does not check that input points lie on the curve.
