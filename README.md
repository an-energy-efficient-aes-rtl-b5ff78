# AES-128 encryption core with a 32-bit datapath and four shared S-boxes

This core encrypts 128-bit blocks with a 128-bit key (AES-128, FIPS-197). It is
built for small, low-energy IoT devices. It processes the state one 32-bit
column per clock and has only **four** S-boxes. Those four S-boxes do SubBytes
for the data and also SubWord for the key schedule, so there is no second set
for the key. The cost is one extra cycle per round. Each round takes five
cycles (four data columns and one key cycle), and a block takes **54 cycles**
from the first input word to the last output word.

The architecture follows the AES core of M.-H. Dao, V.-P. Hoang, V.-L. Dao and
X.-T. Tran, "An Energy Efficient AES Encryption Core for Hardware Security
Implementation in IoT Systems". That work describes the block structure, the
sharing of the S-boxes, the 5-cycle round and the 54-cycle total, but not the
gate-level insides. The cycle-exact schedule, the ShiftRows register
arrangement, the S-box field basis and the port protocol are this design's own.
The list under "Where this RTL goes beyond or departs from the source" says
which is which. The source reports 4.3 kgates and 4 pJ/bit in a 32 nm library.
This RTL has not been synthesised to a standard-cell library, so those numbers
are not reproduced here.

## Datapath

```
 data_in ─┐
          XOR ──┐
 key_in ──┘     │  (cycles 0..3)
                ▼
 rot_word ───► MUX ──► 4 x S-box ──► ShiftRows register ──► shift delay ──┬──► MixColumns ──► XOR ──► (back to MUX)
 (key cycle)    ▲          │          (4 x 32 bit)           (32 bit)     │                   ▲
                │          └──► key expansion (SubWord result)             └──► XOR ──► data_out (last round)
                │               4 x 32-bit shift register, one 32-bit XOR ───────────────────┘ round-key word
```

- **S-box input mux** (`aes_core`). There are three sources. During loading it
  takes `data_in ^ key_in`, which is the initial AddRoundKey. In rounds 2..10 it
  takes `MixColumns(delay) ^ round-key word`. In the fifth cycle of every round
  it takes `RotWord` of the last key word.
- **Four S-boxes** (`aes_sbox4`, `aes_sbox`). They are combinational.
- **ShiftRows register** (`aes_shift_rows`). This is 128 bits of flip-flops,
  organised as four column words.
- **Shift delay** (`aes_shift_delay`). It holds one shifted column for one cycle.
- **MixColumns** (`aes_mix_column`). It is combinational and works on one column.
- **Key expansion** (`aes_key_expansion`). It makes the round key on the fly,
  one word per cycle.
- **Controller** (`aes_ctrl`). It has a round counter (0..10) and a phase
  counter (0..4), and drives the datapath through one control struct.

The last round has no MixColumns. In that round the output is taken straight
from the shift delay and XORed with the round-key word. The MixColumns path is
then unused.

## The 54-cycle schedule

Cycle `n` counts from the cycle in which `start` is seen. Cycles 0..49 form ten
*round slots* of five cycles each (slot `k = n / 5`, phase `p = n % 5`). Cycles
50..53 are the output cycles.

| cycles | S-boxes do | ShiftRows register | shift delay loads | key register | output |
|---|---|---|---|---|---|
| slot 0, p = 0..3 | SubBytes of `data_in ^ key_in`, column p | shift in column p | – | shift in `key_in` | – |
| slot k, p = 4 | SubWord(RotWord(W3)) | rotate rows, emit shifted col 0 | shifted col 0 | start the next round key | – |
| slot k≥1, p = 0 | SubBytes of `MC(delay) ^ rk[0]` | shift in; col 1 leaves | shifted col 1 | next key word | – |
| slot k≥1, p = 1 | SubBytes of `MC(delay) ^ rk[1]` | shift in; col 2 leaves | shifted col 2 | next key word | – |
| slot k≥1, p = 2 | SubBytes of `MC(delay) ^ rk[2]` | shift in; col 3 leaves | shifted col 3 | next key word | – |
| slot k≥1, p = 3 | SubBytes of `MC(delay) ^ rk[3]` | shift in | – | hold | – |
| 50..52 | unused | shift (drain) | shifted cols 1..3 | next key word | `delay ^ rk10[0..2]` |
| 53 | unused | – | – | – | `delay ^ rk10[3]` |

Slot `k` does SubBytes for AES round `k+1`. Its fifth cycle computes round key
`k+1`, and that key is used word by word in slot `k+1` or, after slot 9, in the
output cycles. Adding it up gives 4 load cycles, plus 9 × 5 round cycles, plus
one key cycle, plus 4 output cycles, which is 54. A design with eight S-boxes
can overlap the key cycle with the data and needs only 44 cycles. That matches
the 10-cycle penalty per block that comes from sharing the S-boxes.

MixColumns works on the column the shift delay loaded in the cycle before. So
in cycle `p` of a slot, the S-box input is column `p` of the state after round
`k` (`MixColumns ∘ ShiftRows ∘ SubBytes`, plus the round key). These four
cycles are also the next round's SubBytes.

## How ShiftRows works with one column per cycle

ShiftRows output column `c` needs the byte of row `r` from input column
`(c + r) mod 4`. So shifted column 0 cannot be produced until input column 3 has
arrived. Also, the next round's columns start to arrive while the current
round's shifted columns 1..3 are still being read. The register handles both
with four column words `C0..C3` and two enables:

- **shift**: `C0 ← C1, C1 ← C2, C2 ← C3, C3 ← column_in`. The output is `C0`.
- **permute** (fifth cycle of a slot): the row rotation is applied to all four
  words at once. Shifted column 0 goes straight out (row `r` comes from `C[r]`),
  and shifted columns 1..3 are written into `C0..C2`. `C3` keeps its old value.

After the permute, the three shift cycles push out shifted columns 1..3 from
`C0`. At the same time they bring in the first three SubBytes columns of the
next round at `C3`. The fourth shift completes the new state. The register
never holds more than four live words, so no second buffer is needed.
Flip-flops load only when an enable is high. The shift delay has its own
enable and loads four times per slot.

## Key schedule on the fly

`aes_key_expansion` keeps the round key in a shift register of four words
`W0..W3`. The word the datapath needs now is always `W3`. It has one 32-bit XOR,
`W0 ^ x`, and each cycle does one of these operations:

- **load**: shift in `key_in`. This runs for cycles 0..3 and resets rcon to 01.
- **exp** (key cycle): shift in `W0 ^ SubWord(RotWord(W3)) ^ {rcon, 0, 0, 0}`,
  then double rcon. The `RotWord` leaves on `rot_word`. It passes through the
  shared S-boxes and comes back on `sub_word` in the same cycle.
- **step**: shift in `W0 ^ W3`.

One exp followed by three steps turns `[w0 w1 w2 w3]` of one round key into the
next round key, one word per cycle. Each word appears at `W3` exactly in the
cycle where the datapath XORs it in. The round constant is an 8-bit register
doubled in GF(2^8).

## S-box in a composite field

`aes_sbox` computes the S-box from the field inverse, with no lookup table. It
follows the compact composite-field approach (Canright), but it uses
polynomial bases instead of Canright's normal bases:

1. A constant 8×8 GF(2) matrix maps the byte into GF((2^4)^2). That field is
   built as GF(2^4)[y]/(y² + y + 8) over GF(2^4) = GF(2)[x]/(x⁴ + x + 1). The
   matrix columns are the powers `β^i`, where `β` is a root of the AES
   polynomial in the tower field (β = 0x20 in tower coordinates).
2. The inverse of `a = ah·y + al` is `d⁻¹·(ah·y + (ah ^ al))`, where the norm is
   `d = 8·ah² ^ ah·al ^ al²`. The GF(2^4) inverse is `d¹⁴ = d²·d⁴·d⁸`, and
   squaring is linear. Zero maps to zero.
3. A second constant matrix maps back to the AES basis and applies the AES
   affine matrix. It is the product of the two. Then 0x63 is added.

To change the field representation, recompute both matrices from these
definitions.

## Interface and timing (`aes_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock. Synchronous active-high reset. |
| `start` | in | 1 | Starts a block. Word 0 of the data and the key must be present in this cycle. It is ignored while `busy`. |
| `data_in`, `key_in` | in | 32 | Plaintext and key words 0..3, in cycles 0..3. Word 0 is bytes 0..3 of the block, with byte 0 in bits [31:24]. |
| `load` | out | 1 | High in cycles 0..3, while the input words are taken. |
| `busy` | out | 1 | High in cycles 1..53. |
| `data_out` | out | 32 | Ciphertext words 0..3 in cycles 50..53. It is 0 otherwise. |
| `out_valid` | out | 1 | High in cycles 50..53. |
| `done` | out | 1 | High in cycle 53. |

A new `start` is accepted in the cycle right after `done`, so blocks can run
back to back at one block per 54 cycles. Each block takes a new key, and the
key must be reloaded for every block. At 10 MHz, one block takes 5.4 µs,
which is about 23.7 Mbit/s.

## Where this RTL goes beyond or departs from the source

- **Schedule.** The source gives the 5-cycle round, the key work in the fifth
  cycle and the 54-cycle total. The assignment of every operation to a cycle
  (table above) is this design's own.
- **ShiftRows.** The source describes a 128-bit shift register with an enable
  that permutes a state in four cycles. The shift-plus-in-place-rotation scheme
  above is this design's own.
- **Key expansion.** The source describes four 32-bit shift registers and a
  32-bit XOR, with the S-box part of the schedule in one cycle per round. Here
  the XOR chain is spread over the following cycles so that one XOR is enough.
- **S-box.** This design uses a composite-field S-box, as the source does. The
  bases and the GF(2^4) inversion are different from Canright's, so the gate
  count will differ from the 292 gates quoted for that S-box.
- **Last round.** The source does not say how MixColumns is skipped in round 10.
  Here the output is taken from the shift delay.
- **Own choices.** The port protocol, the reset, and forcing `data_out` to 0
  outside the output cycles are this design's own.
- **Not built.** Decryption and 192/256-bit keys are not built. The source
  covers only encryption with a 128-bit key.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare against
`tb/aes_ref_pkg.sv`, a byte-oriented AES model written independently of the
RTL. Its S-box is computed as x^254 followed by the affine map, and its
MixColumns uses a general GF(2^8) multiplier.

- `tb_aes_sbox` checks all 256 inputs. `tb_aes_sbox4` and `tb_aes_mix_column`
  check random words and the known MixColumns columns.
- `tb_aes_shift_rows` runs 30 rounds of the shift/permute pattern, with random
  idle cycles in between.
- `tb_aes_key_expansion` checks every round-key word for the FIPS-197 key and
  for 20 random keys.
- `tb_aes_ctrl` checks the control word in every cycle against the schedule
  table, plus `busy`/`done`, stray starts and back-to-back blocks.
- `tb_aes_core` is the end-to-end test at the core's only configuration. It
  runs the FIPS-197 appendix B and C.1 vectors and then 40 random blocks. It
  checks the exact output cycles (50..53) and the 54-cycle block length, and
  counts that the key-cycle S-box sharing, the ShiftRows rotation, the
  MixColumns bypass, back-to-back blocks and ignored starts all occur.

`aes_ctrl` carries assertions: the enables are mutually exclusive, and `done`
comes 53 cycles after a start.

Simulating with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_core.sv --top-module tb_aes_core
./obj_dir/Vtb_aes_core
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. For a
lint-only run, use `verilator --lint-only -Wall -Irtl rtl/aes_pkg.sv rtl/aes_core.sv`.

## Files

- `rtl/aes_pkg.sv`: types, constants (`NR`, `ROUND_CYCLES`, `BLOCK_CYCLES`),
  the control struct and `xtime`.
- `rtl/aes_core.sv`: the top-level module, with the S-box input mux and the
  output XOR.
- `rtl/aes_ctrl.sv`: the controller.
- `rtl/aes_sbox.sv`, `rtl/aes_sbox4.sv`: the S-box and the bank of four.
- `rtl/aes_shift_rows.sv`, `rtl/aes_shift_delay.sv`, `rtl/aes_mix_column.sv`,
  `rtl/aes_key_expansion.sv`: the datapath blocks.
- `tb/`: one testbench per module, plus the reference model package.
