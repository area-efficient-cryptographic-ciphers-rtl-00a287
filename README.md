# Serial HIGHT-128 and PRESENT-128 encryption cores

Two small block-cipher cores for devices where area matters more than
speed. Both encrypt 64-bit blocks under a 128-bit key. They stay small by
processing only a slice of the block per clock cycle: a byte for HIGHT, 16
bits for PRESENT. Neither core keeps the full state in a wide register file
with wide multiplexers. The state and key live in storage that FPGAs make
cheap: small distributed RAMs and shift registers. The cipher's own data
movement (HIGHT's byte rotation, PRESENT's bit permutation and key
rotation) is done by choosing addresses or shift amounts, not by extra
logic. Counters and a little logic drive each core; neither has a
hand-coded state table.

| core | datapath | state storage | key storage | cycles per block |
|------|----------|---------------|-------------|------------------|
| `hight_core`   | 8 bit  | 8x8 dual-port RAM | 16x8 single-port RAM | 160 |
| `present_core` | 16 bit | two 64-bit shift registers (SR1, SR2) | 128-bit shift register, 3-bit A and B | 256 back to back, 260 for a single block |

At the critical-path delays reported for this architecture on a Spartan-3
class FPGA (6.12 ns for HIGHT, 8.78 ns for PRESENT), these cycle counts give
about 65 Mbit/s and 28 Mbit/s.

`lw_crypto_top` places the two cores side by side. They share only the
clock and reset.

## HIGHT core: rotating the state by moving addresses

HIGHT is a generalized Feistel network over eight bytes X7..X0. Each of its
32 rounds computes four new bytes and rotates the whole state by one byte:

    X'1 = X0   X'2 = X1 + (F1(X0) ^ SK4i)
    X'3 = X2   X'4 = X3 ^ (F0(X2) + SK4i+1)
    X'5 = X4   X'6 = X5 + (F1(X4) ^ SK4i+2)
    X'7 = X6   X'0 = X7 ^ (F0(X6) + SK4i+3)

`+` is addition mod 256. F0 and F1 XOR three rotations of a byte
(F0 uses rotations by 1, 2 and 7; F1 by 3, 4 and 6). The last round does not
rotate. An initial transformation adds or XORs the whitening keys WK0..WK3
into P0, P2, P4 and P6. A final transformation does the same with WK4..WK7.

**One byte per cycle.** Each cycle the core reads two bytes of the state
RAM: the byte to update (port A) and its neighbour that feeds F0 or F1
(port B). It writes the result back through port A. A round therefore takes
4 cycles. The byte datapath (`hight_round_fn`) has two paths. One is an XOR
path with the operand `F0(x_b) + SK`. The other is an addition path with the
operand `F1(x_b) ^ SK`. For the whitening steps, both operands are replaced by
the raw key byte. The subkey SK is the key byte plus a 7-bit constant from an
LFSR (`hight_delta_lfsr`: x^7+x^3+1, seed 0x5A).

**No data movement.** Each new byte X'2k+2 replaces X2k+1 in place. The
even bytes it reads are never overwritten within a round. The rotation then
only changes which address holds which logical byte. With the placement rule

    logical byte j of round i  lives at  address (i - j + 7) mod 8

cycle k of round i writes address `a = place(i, 2k+1)` and reads
`a + 1 = place(i, 2k)`. That second address is also where byte 2k+1 sits in
the next round. `hight_addr_gen` therefore keeps the four write addresses of
a round in a 12-bit shift register SR. Each cycle it uses the head of SR,
forms head+1 with a 3-bit adder for port B, and shifts head+1 back into SR
for the next round. Counter C3 counts bytes during loading and output:

* loading writes plaintext byte Pj to address `~C3`. SR is seeded
  with `{~C3[1:0], 0}`, the four write addresses of round 0;
* the output phase reads Cj's byte from address `~(C3 + 1)`. This is the
  placement of round 32 shifted by one byte, which undoes the rotation that
  the last round must not perform.

**Subkey order from two counters.** Subkey 16i+j uses key byte
K((j−i) mod 8) for j < 8, and K(8 + (j−i) mod 8) otherwise. Every group of
eight subkeys starts one byte earlier than the last. `hight_key_addr` holds
two 3-bit counters, C1 for K7..K0 and C2 for K15..K8. A multiplexer (M5)
picks one by the address MSB, which is bit 1 of the round number. The counter
in use increments on every key byte, except on the last byte of a group of
eight, where it holds. That hold is the one-byte shift. C2 starts at 4, so it
first delivers WK0..WK3 = K12..K15 and then wraps to 0 for the subkeys. After
its 64 subkeys, C1 is back at 0 and delivers WK4..WK7 = K0..K3.

### HIGHT interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `start` | in | 1 | one-cycle pulse in idle begins a block |
| `din` | in | 8 | K0..K15, then P0..P7 (Pj = plaintext bits 8j+7..8j) |
| `din_ready` | out | 1 | `din` is sampled this cycle (24 consecutive cycles) |
| `dout`, `dout_valid` | out | 8, 1 | C0..C7 on 8 consecutive cycles |
| `busy`, `done` | out | 1 | busy from start to the last byte; `done` pulses after it |

Cycle budget: 16 cycles of key load, then 8 cycles of plaintext load with
the initial transformation applied as each byte is written, then 32 × 4
round cycles, then 8 output cycles with the final transformation applied on
the way out. That is 160 cycles from the first key byte to the last
ciphertext byte. The key is loaded again for every block. There is no
back-pressure: the host must supply a byte in every `din_ready` cycle.

## PRESENT core: a permutation made of shifts

PRESENT-128 runs 31 rounds on a 64-bit state. Each round does three things:

1. XOR the state with the top 64 bits of the key register.
2. Pass all sixteen nibbles through a 4-bit S-box.
3. Apply the bit permutation P(i) = 16·i mod 63 (bit 63 stays).

After the round, the key is rotated left by 61 bits. Its top two nibbles go
through the S-box, and the round counter is XORed into bits 66..62. A last
key XOR follows round 31.

**State path (`present_state_path`).** SR1 holds the state as sixteen
nibbles 15..0. It rotates left by 16 bits per cycle, and its top 16 bits go
through the Data-in multiplexer, the round-key XOR and four S-boxes. The
permutation works because of a property of P. Nibbles 4q+3..4q of the input
land, bit by bit, in exactly four output nibbles: 12+q, 8+q, 4+q and q. Bit m
of the S-box output for input nibble 4q+b becomes bit b of output nibble
4m+q. The four new nibbles go into positions 12, 8, 4 and 0 of a second
register SR2, which shifts left by 4 bits at the same time:

| compute cycle | SR1 nibbles used | SR2 nibbles written (final position) |
|---|---|---|
| 0 | 15..12 | 15, 11, 7, 3 |
| 1 | 11..8  | 14, 10, 6, 2 |
| 2 | 7..4   | 13, 9, 5, 1 |
| 3 | 3..0   | 12, 8, 4, 0 |

Nibbles written in cycle c are shifted 3−c more times, so after four cycles
SR2 holds the permuted state. Four copy cycles then move SR2 back into SR1,
16 bits per cycle, for 8 cycles per round. In round 1 the multiplexer takes
the plaintext from `din` instead of SR1, so loading costs no extra cycles.

**Key register (`present_key_sched`, `present_rkgen`).** The key sits in a
128-bit register that also moves 16 bits per cycle, and only in the compute
cycles. Each cycle its top 16 bits go through `present_rkgen`, which
produces the round-key slice for that cycle. The same slice is written back
at the bottom of the register. So the register moves 64 bits per round,
while the PRESENT-128 key rotates by 61. Two 3-bit registers, A and B, take
up the difference on the read side:

* round 1 reads the top 16 bits as they are, and A keeps their low 3 bits;
* round 2 reads A followed by the top 13 bits, and B keeps the last 3 bits
  read in that round;
* from round 3 on, each slice is B, A and the top 10 bits, and B and A keep
  the low 6 of the top 16.

On the write side, the last slice of a round is written back as its bits
15..6 followed by its bits 8..3. This puts the register back in step without
a further register. RKgen applies the S-boxes to the two top nibbles of the
first slice of each round from round 2 on. The round-counter XOR (key bits
66..62) is split between two points where the stream passes through RKgen.
In round r, bits 4..2 of counter value r+1 go into the last slice written
back. All five bits of counter value r-2 go into the first slice read. The result is the exact PRESENT-128
key schedule, with no cycles spent on the key outside the compute cycles.

### PRESENT interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `start` | in | 1 | begins a block; only accepted while `start_ready` |
| `start_ready` | out | 1 | high in idle and in the last cycle of round 31 |
| `din` | in | 16 | K[127:112]..K[15:0], then P[63:48]..P[15:0] |
| `din_ready` | out | 1 | `din` is sampled this cycle (12 word cycles per block) |
| `dout`, `dout_valid` | out | 16, 1 | C[63:48] first, 4 consecutive cycles |
| `busy`, `done` | out | 1 | as for HIGHT |

A single block takes 8 cycles of key load and 31 × 8 round cycles, with the
plaintext entering during the first four. That is 256 cycles, followed by 4
output cycles that apply the last round key: 260 cycles in all. If `start` is
given in the last cycle of round 31, the next block's first four key words
enter at the bottom of the key register while the last round key leaves at
its top (`din_ready` is high during the output). The next block then starts
256 cycles after the previous one.

## How far this follows the architecture it implements

These parts follow the published architecture:

* the byte-serial HIGHT core with its dual-port state RAM, single-port key
  RAM, SR/C3 address generation, C1/C2/M5 key addressing, 7-bit LFSR and
  4-cycle rounds;
* the PRESENT SR1/SR2 permutation scheme with four S-boxes and 8-cycle
  rounds;
* the 16-bit key shift register with a two-S-box, 5-bit-XOR RKgen;
* the cycle counts: 160 for HIGHT and 256 for PRESENT;
* the key read order A||13 bits in round 2 and the 3-bit registers A and B.

These are this design's own choices:

* **PRESENT key write-back and read order.** The architecture stores 3 bits
  in A after round 1 and in B after round 2. It then reads "B, A and the
  most significant key bits", and writes round keys back "taking the 3-bit
  difference into account". The exact taps are this design's own: 10 key
  bits after B and A to fill 16, the 6-bit tap on the last slice written
  back, and where each piece of the round-counter XOR is applied.
* **HIGHT addressing formulas.** The placement rule, the SR seed and the
  counter hold rule are derived here. The architecture names the parts (SR,
  C3, a 3-bit adder, two 3-bit key counters) but not their formulas. The
  2-bit adder it also lists is not needed with this placement.
* **Interfaces.** The byte and word orders, the load phases, the
  `din_ready`/`dout_valid` strobes, the back-to-back start and the
  synchronous active-low reset are all this design's. The reset covers only
  the control registers; RAM and shift-register contents are always written
  before they are read.
* **Cipher constants.** F0/F1, the delta constants, the subkey and whitening
  order, the S-box table, the bit permutation and the key-update positions
  are those of the HIGHT and PRESENT specifications.

Encryption only: neither core decrypts. The RAMs are written as arrays with
asynchronous read and synchronous write, which infer distributed RAM on
FPGAs and registers elsewhere. The FPGA-specific mapping onto SRL16 shift
registers and LUT RAM is left to synthesis.

## Files

| file | contents |
|------|----------|
| `rtl/lw_crypto_top.sv` | both cores side by side |
| `rtl/hight_pkg.sv` | HIGHT phase/operation enums, F0, F1, delta seed |
| `rtl/hight_core.sv` | HIGHT controller and wiring |
| `rtl/hight_round_fn.sv` | byte datapath (F0/F1, subkey adder, M2/M3/M4) |
| `rtl/hight_addr_gen.sv` | C3, SR and the state RAM addresses |
| `rtl/hight_key_addr.sv` | C1, C2, M5: key RAM address |
| `rtl/hight_delta_lfsr.sv` | subkey constants |
| `rtl/hight_data_ram.sv`, `rtl/hight_key_ram.sv` | state and key RAMs |
| `rtl/present_pkg.sv` | PRESENT operation codes and phases |
| `rtl/present_core.sv` | PRESENT controller and wiring |
| `rtl/present_state_path.sv` | SR1, SR2, Data-in mux, key XOR, four S-boxes |
| `rtl/present_key_sched.sv` | 128-bit key shift register, registers A and B |
| `rtl/present_rkgen.sv` | two S-boxes, counter XOR, offset write-back |
| `rtl/present_sbox.sv` | 4-bit S-box |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every module has a testbench that compares it with an independent model
written in the testbench. The models are not copies of the RTL structure.
The core testbenches check the published vectors:

* HIGHT: key `00112233…eeff`, plaintext 0 → `00f418aed94f03f2`; key
  `ffeedd…1100`, plaintext `0011223344556677` → `23ce9f72e543e6d8`.
* PRESENT-128: the four all-zero/all-one combinations, for example key 0,
  plaintext 0 → `96db702a2e6900af`.

The core testbenches also run random blocks and check the exact cycle
counts. `tb_lw_crypto_top` runs both cores at once, with PRESENT blocks
started at random offsets and then back to back. It counts how often each
mechanism occurs and fails if any never does: whitening in and out, the key
counter hold, F0 and F1 cycles, Data-in entry, the A/B key write-back, SR2→SR1
copies, output key addition and back-to-back starts. Each testbench prints
`TB_RESULT checks=N failures=M`.

To run one with Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/hight_pkg.sv rtl/present_pkg.sv tb/tb_lw_crypto_top.sv \
      --top-module tb_lw_crypto_top -o sim
    ./obj_dir/sim

Replace the testbench name to run another. Every simulation finishes in
well under a second.
