# One-clock light block cipher instructions for an AVR-class microcontroller

Small IoT controllers need encryption but cannot spend many cycles on it. This
design adds a cipher unit to an 8-bit AVR-style microcontroller. The unit holds
a 128-bit block as a 4x4 byte matrix and scrambles it with *vector
instructions* (VIs). Each VI finishes in one clock. There are no S-boxes and no
arithmetic. Every VI moves bytes or bits around the matrix, steered by a 4-bit
*nibble-key* taken from one of four key bytes in the core's registers R1..R4.
A program chooses its own sequence of VIs and keys. Decryption runs the same
sequence backwards with the rotation direction reversed, so the cipher is
symmetric.

Three pieces are added to the core:

* **Instruction toggling switch** (`lbc_its`). The AVR leaves opcode FFFFh
  unassigned. Here FFFFh is `TOGGL`: it flips the opcode stream between the
  core's own instruction decoder and the cipher unit.
* **Cipher unit, FDSLBC** (`lbc_fdslbc`). FDSLBC stands for "fast dynamic
  symmetric light block cipher". The unit holds the matrix, the key buffer and
  the direction flag, and decodes the VIs.
* **Widened data memory** (`lbc_sram`). Besides the normal 8-bit port, the 16
  bytes at 0100h..010Fh and the key bytes R1..R4 are wired straight to the
  cipher unit. A block or the keys move in one clock.

```
 instruction register ──16──> lbc_its ──16──> core instruction decoder (outside)
                                 │
                                 └──16──> lbc_fdslbc ──┬── lbc_key_buffer
                                           │  ▲  ▲     ├── lbc_p1_byte_rot
                          cipher bus 16x8 │  │  │     ├── lbc_p2_bit_rot
                          + store strobe  ▼  │  │     ├── lbc_p3_byte_shuffle
                                       lbc_sram │     └── lbc_p4_updown_rot
                     plain bus 16x8 (0100h..010Fh)  key bus 4x8 (R1..R4)
                     core's 8-bit data port <──> lbc_sram
```

`lbc_avr_top` wires the three pieces together. The AVR core is not part of this
RTL. The top brings out the core's side as ports: the opcode stream from the
instruction register, the opcodes for the core's decoder, and the core's 8-bit
data-memory port.

## The matrix and its memory image

Byte E*rc* (row *r*, column *c*, both 1..4) sits at data address
`0100h + 4(r-1) + (c-1)`:

```
E11 E12 E13 E14      0100 0101 0102 0103
E21 E22 E23 E24  <=> 0104 0105 0106 0107
E31 E32 E33 E34      0108 0109 010A 010B
E41 E42 E43 E44      010C 010D 010E 010F
```

In the RTL the matrix is `lbc_pkg::matrix_t`, a packed `[3:0][3:0][7:0]` array
indexed `m[r-1][c-1]`. The key bytes are `Key_R1..Key_R4`, copied from data
addresses 0001h..0004h.

## Vector instructions

After a `TOGGL`, every opcode goes to the cipher unit until the next `TOGGL`.

| VI | opcode | effect (one clock) |
|----|--------|--------------------|
| TOGGL | FFFF | switch the opcode route (handled in `lbc_its`, seen by neither side) |
| LOD16 | DD00 | matrix ← memory 0100h..010Fh |
| STO16 | DD10 | memory 0100h..010Fh ← matrix |
| LDKEY | DD20 | Key_R1..R4 ← memory 0001h..0004h |
| HIKEY / LOWKY | DD30 / DD31 | the high / low nibbles of the keys become the nibble-keys |
| CLW / ACLW | DD40 / DD41 | clockwise / anticlockwise rotation |
| FLPK*B* | DD5*B* | reverse the bit order of the active nibble of Key_R*B*, in place |
| CRY1*B* | DD6*B* | protocol 1, half-matrix byte rotation |
| CRY2*B* | DD7*B* | protocol 2, outer-ring bit rotation |
| CRY3*B* | DD8*B* | protocol 3, keyed byte swaps |
| CRY4*B* | DD9*B* | protocol 4, column or row rotation |

*B* is 1..4 and selects Key_R*B*. Whether its high or low nibble is used depends
on the last HIKEY/LOWKY. Nibble bit 3 belongs to column 1 (or row 1) and bit 0 to
column 4 (or row 4). Any other opcode, including *B* = 0 or 5..F, changes nothing.

### Protocol 1: half-matrix byte rotation (`lbc_p1_byte_rot`)

The left half (columns 1-2) and the right half (columns 3-4) each form a ring
of eight bytes. One clockwise step moves every byte one place, as for the left
half:

```
E11 → E12 → E22 → E32 → E42 → E41 → E31 → E21 → E11
```

Nibble bit 0 enables the right half and bit 1 the left half, so `11` rotates
both halves. Anticlockwise is the reverse step.

### Protocol 2: outer-ring bit rotation (`lbc_p2_bit_rot`)

The twelve border bytes are joined into a 96-bit word. E11 is the most
significant byte, followed by E12, E13, E14, E24, E34, E44, E43, E42, E41, E31
and E21. Clockwise rotates this word right by the nibble value (0..15 bits).
Anticlockwise rotates it left. The four inner bytes do not change. This is the
only protocol that moves bits across byte boundaries.

### Protocol 3: keyed byte swaps (`lbc_p3_byte_shuffle`)

The sixteen bytes form eight fixed pairs, and an enabled pair swaps its bytes.
A pair inside one column needs that column's key bit. A pair spanning two
columns needs both columns' bits.

| pair | key bits | pair | key bits |
|------|----------|------|----------|
| E11↔E22 | 3,2 | E21↔E41 | 3 |
| E12↔E23 | 2,1 | E31↔E34 | 3,0 |
| E13↔E24 | 1,0 | E32↔E43 | 2,1 |
| E14↔E44 | 0 | E33↔E42 | 2,1 |

For example, key 1001b swaps E14↔E44, E21↔E41 and E31↔E34: bytes move only
within and between the outer columns. The pairs do not overlap, so the step is
its own inverse and ignores the direction.

### Protocol 4: column or row rotation (`lbc_p4_updown_rot`)

* **Two or more key bits set.** Each column whose bit is 1 rotates vertically
  by one row. For example, 0011b rotates columns 3 and 4, and 0111b rotates
  columns 2-4.
* **At most one key bit set.** The rows whose bit is 0 rotate as whole rows
  among themselves. 0000b moves all four rows. 0001b cycles rows 1, 2 and 3
  and leaves row 4.

Clockwise moves bytes down, and the bottom byte wraps to the top.
Anticlockwise moves them up.

## Why decryption works

Protocols 1, 2 and 4 are permutations whose anticlockwise step is the exact
inverse of the clockwise step. Protocol 3 is its own inverse. FLPK is its own
inverse, as long as the same nibble half is active. To decrypt:

1. Load the ciphertext and the keys.
2. Repeat any FLPK needed to bring the keys to the state they had at the end of
   encryption.
3. Select ACLW.
4. Issue the cipher VIs in reverse order, each with the same key number and
   nibble half.

The worked example, with keys E3h and 71h and 13 VIs for each direction,
encrypts the block 11h, 12h, …, 44h to

```
90 89 92 0A / 98 88 19 9A / 20 33 22 22 / 21 23 12 21
```

and decrypts it back.

## Timing

* Everything is synchronous to `clk`, with an asynchronous active-low `rst_n`.
* The switch routes combinationally. The opcode in the cycle after `TOGGL`
  already takes the new path. The side that is not selected sees
  `valid = 0` and opcode 0000h, which is the AVR's NOP.
* The cipher unit decodes the opcode in the same cycle and updates the matrix,
  the keys or the flags at the next rising edge. The result of a VI is visible
  one clock after it is presented, and one VI can be issued every clock.
* `STO16` raises `cipher_we` during its own cycle, and the memory stores all 16
  bytes at that edge.
* Memory reads (the normal port, the plain bus and the key bus) are
  combinational, and writes happen at the rising edge. If a block store and a
  normal write hit the same byte in one cycle, the block store wins.
* After reset the matrix and keys are zero, the direction is clockwise, the low
  nibbles are active, and opcodes go to the core's decoder. The memory is not
  reset.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `lbc_avr_top`, `lbc_sram` | `DEPTH` | 2304 | data-space bytes (0000h..08FFh); must exceed 0110h |

The matrix is fixed at 4x4 bytes, and there are four key bytes.

## How far to trust it, and where it is this design's own

The behaviour of every VI was checked against a published worked example: 13
encryption and 13 decryption VIs on one block. Each intermediate matrix in that
example matches. Some behaviour that the example does not exercise had to be
inferred:

* **Protocol 3.** The eight swap pairs are fixed by the all-ones case. Only
  one enable condition was stated outright: E31↔E34 needs bits 3 and 0. The
  "bits of the columns involved" rule is a generalisation. It agrees with
  every published case (keys 1111b, 1001b, 0111b and 0001b) but is not
  confirmed for the others.
* **Protocol 4.** The shuffle table calls some two-column cases "replacing"
  (0110b, 1001b, 1010b, 0101b) and others "rotating". The only worked
  two-column case (0011b) is a vertical rotation, although it too was
  described as "replacing", so all of these cases rotate here. Keys 0000b
  and 1111b give the same result. How the selected rows cycle for 0001b,
  0010b, 0100b and 1000b is this design's reading.
* **Protocol 2.** The full nibble value (0..15) is the rotation amount. The
  original description mentions 1 to 7 bits, and only a 1-bit rotation was
  demonstrated.
* **FLPK** rewrites the key register, and the change lasts until the next
  `LDKEY`. The worked example depends on this.
* **This design's own choices:**
  * the valid strobes and NOP fill of the switch;
  * ignoring undefined opcodes;
  * the reset values;
  * the memory's read and write timing and its 2304-byte size;
  * the status outputs `lbc_clockwise`, `lbc_hi_key` and `lbc_keys` on the
    top.
* **Not included.** The AVR core (program flash, instruction register,
  decoder, ALU) is outside this RTL. A real integration must also stop the
  core from executing while the route points at the cipher unit. Here the
  core simply receives NOPs.

## Files

`rtl/`
* `lbc_pkg.sv`: types, opcodes, VI decoder function
* `lbc_avr_top.sv`: top level
* `lbc_its.sv`, `lbc_fdslbc.sv`, `lbc_key_buffer.sv`, `lbc_sram.sv`
* `lbc_p1_byte_rot.sv`, `lbc_p2_bit_rot.sv`, `lbc_p3_byte_shuffle.sv`,
  `lbc_p4_updown_rot.sv`

`tb/`
* `tb_lbc_util_pkg.sv`: matrix helpers
* one self-checking testbench per module, `tb_<module>.sv`

Each testbench prints `TB_RESULT checks=N failures=M`. The testbenches compare
against the published example values and against independent models:
* explicit per-byte assignments for protocol 1;
* bit-at-a-time rotation for protocol 2;
* involution and key-bit properties for protocol 3;
* the shuffle table written out case by case for protocol 4.

`tb_lbc_avr_top` runs at the default size. It plays the core: it writes the
block and keys through the data port, streams opcodes through the switch, runs
the published encryption and decryption, then runs 50 random encrypt/decrypt
round trips of 10..59 steps. It checks that 13 VIs take 13 clocks. It also
counts every mechanism (toggle, each VI, both directions, both nibble halves).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lbc_pkg.sv tb/tb_lbc_util_pkg.sv tb/tb_lbc_avr_top.sv \
    --top-module tb_lbc_avr_top -o sim
./obj_dir/sim
```

For a module testbench, replace `tb_lbc_avr_top` with that testbench's name.
List the packages first. Every simulation finishes in well under a second.
