# Folded AES-128 encryption/decryption core

This core encrypts and decrypts 128-bit blocks with AES-128. One circuit
does both directions. It is built for a small FPGA footprint. A full AES
round would take sixteen S-boxes and four MixColumns units. This datapath
is one quarter of a round: 32 bits wide, with four S-box lookups and one
MixColumns unit. It computes one state column per clock, so a round takes
four clocks. The state lives in four byte-wide row memories. ShiftRows and
InvShiftRows cost no logic: the sequencer only chooses which entry of each
row memory it reads. All 44 round-key words are computed once per key and
kept in a block RAM. The datapath reads them in forward order to encrypt
and in reverse order to decrypt.

Performance at a glance:

| quantity | value |
|---|---|
| key schedule | 44 clocks of computation, `keys_valid` 45 clocks after the first key word |
| one block, start to last output word | 45 clocks (1 start + 4 load + 10 rounds x 4) |
| block rate, blocks back to back | one block per 45 clocks; 128/45 = 2.84 bit/clock |
| clock needed for 235 Mbit/s | about 82.6 MHz |

## The datapath (`aes_encdec_unit`)

```
              +------- feedback from c(x) -------------------------------+
              |                                                          |
din --[mux]--(+)-- subkey --+                                            |
              |             |--[mux]--> folded register --[fwd mux]--> S-box RAMs --[mux: +subkey]--> c(x)
              +--> d^2(x) --+              (4 row memories)                           |
                                                                                     +--> dout
```

The same hardware runs both directions. Only the multiplexers change:

| step | encryption | decryption |
|---|---|---|
| load (4 clocks) | `din ^ k0` into the state | `din ^ k10` into the state |
| rounds 1..9 | S-box, then c(x) (MixColumns), then `^ k_r`, written back | inverse S-box, then `^ k_(10-r)`, then c(x) and d^2(x) (InvMixColumns), written back |
| round 10 | S-box, then `^ k10`, to `dout` | inverse S-box, then `^ k0`, to `dout` |

ShiftRows comes before SubBytes here, the reverse of the textbook order.
The two steps commute, because SubBytes works on single bytes and
ShiftRows only moves bytes. So each round reads its shifted bytes straight
from the row memories. Address bit 8 of the S-box RAMs selects the forward
table (`0x000-0x0FF`) or the inverse table (`0x100-0x1FF`).

AddRoundKey sits in two places: before the state register (the left XOR)
and after the S-boxes (the right XOR). Encryption adds the key after
MixColumns, so it uses the left XOR on the feedback path. Decryption adds
it before InvMixColumns, so it uses the right XOR. Both directions use the
right XOR in the last round, and the left XOR during the load. In any clock
only one of the two is in use, so a single 32-bit round-key word per clock
is enough.

### Shared MixColumns / InvMixColumns (`aes_mixcolumns`)

MixColumns multiplies a column by c(x) = {03}x^3+{01}x^2+{01}x+{02}
modulo x^4+1. InvMixColumns multiplies by its inverse d(x), whose
coefficients {0e},{0b},{0d},{09} are expensive. Since c(x)·d(x) = 1, it
follows that c(x)·d²(x) = d(x), and d²(x) = {04}x^2+{05} has tiny
coefficients. So InvMixColumns is the MixColumns network followed by a
small second stage. That stage computes `b_i = 05·a_i ^ 04·a_(i+2)`. The
decryption path sends every column through c(x) and then d²(x).

## Row memories, ShiftRows by addressing, and forwarding

This is the part that takes the most care.

Byte `4c+r` of the state is row `r` of column `c`. Each row `r` is a
byte-wide shift register with a variable read tap (`aes_srl`, 16 deep: one
FPGA LUT per bit). Together the four rows form `aes_folded_register`. A
computed column is written by shifting its four bytes into the four rows at
once, so writes need no address. Output column `k` of a round needs row `r`
from input column `m`:

- encryption (ShiftRows): `m = (k + r) mod 4`. Column 0 reads bytes 0, 5, A, F.
- decryption (InvShiftRows): `m = (k - r) mod 4`. Column 0 reads bytes 0, D, A, 7.

The previous round's columns are still in the shift registers, deeper than
the columns of the round now being written. So one shift register per row
holds both rounds, and no separate input and output memories are needed.
The tap is the number of writes made since the needed column was stored
(0 = newest).

A column is read in one clock and written in the next, because the S-box
RAM is synchronous. Counting writes then gives these depths for input
column `m` when reading output column `k`:

| clock | depth |
|---|---|
| round 1, k = 0 (just after the 4 load writes) | 3 - m |
| rounds 2..10, k = 0 | 2 - m; for m = 3 the column is being written in this very clock |
| rounds 1..9, k = 1..3 | k + 2 - m |
| round 10, k = 1..3 (the last round writes nothing back) | 3 - m |

Take the first column of rounds 2 to 10. The byte from input column 3 is
still on its way into the register in that clock. The forwarding
multiplexer between the register and the S-boxes takes it straight from the
write data. So a round needs exactly four clocks, with no bubble. Each
block uses forwarding in nine clocks, one row each time. The greatest depth
used is 5, well inside the 16 entries.

## S-box block RAMs (`aes_sbox_bram`)

Each RAM is a 512 x 8 ROM with two synchronous read ports. Both ports
reach both tables. Two RAMs give the four lookups that a column needs. The
contents are computed at elaboration. The inverse in GF(2^8) (modulo
x^8+x^4+x^3+x+1) comes from a table of powers of the generator {03}: if
a = g^k, then a^-1 = g^(255-k). Then the affine map is applied
(SubBytes), or the inverse affine map is applied first (InvSubBytes).

## Key schedule (`aes_key_schedule`) and round-key RAM (`aes_key_ram`)

The key schedule makes one 32-bit word per clock. The four key words come
in through the input multiplexer. After that, the newest word w[i-1] sits
in a register, and a three-deep shift register behind it supplies w[i-4].
Each new word is `w[i-4] ^ w[i-1]`. For every fourth word, w[i-1] is first
passed through RotWord and SubWord and XORed with Rcon. Rcon is kept in a
register and doubled in GF(2^8) after each use. The SubWord lookups use two
more S-box RAMs, addressed from the register's input, so their synchronous
output lines up with the register and adds no clock. The words are written
to `aes_key_ram` (44 x 32, synchronous read), one clock after each is
computed.

The sequencer (`aes_controller`) gives the RAM address one clock ahead.
Encryption reads words 0..43 in order. Decryption reads 40..43 first,
then 36..39, and so on down to 0..3.

## Interface of `aes_top`

All signals are sampled on the rising edge of `clk`. `rst` is a
synchronous reset, active high. Words are 32 bits, most significant word
first, so a block written as hex in the usual AES notation goes in from
left to right.

1. **Key.** Offer the four key words with `key_valid` while `key_ready` is
   high. Gaps between the words are allowed. `keys_valid` drops when the
   first word is taken. It rises again once all 44 words are stored. A key
   is refused (`key_ready` low) while a block is in flight.
2. **Block.** Raise `start` with `decrypt` (0 to encrypt, 1 to decrypt)
   while `ready` is high. Then give the four input words with `in_valid`
   while `in_ready` is high. Each clock without `in_valid` delays the result
   by one clock.
3. **Result.** `out_valid` marks four consecutive clocks that carry the
   result words on `dout`. There is no back-pressure. `ready` comes back in
   the clock of the last result word, so the next block can start at once.

`DEPTH` (default 16) is the depth of the row shift registers. It only has
to be at least 6.

## Choices made in this implementation

- **One shift register per row.** The reference architecture has separate
  input and output row memories that swap roles every four clocks. Here one
  shift register per row holds both rounds, using deeper taps for the older
  round. The result is the same; it saves the second set of memories and
  the swap.
- **Forwarding.** The architecture has a forwarding multiplexer in front of
  the S-boxes. What it carries, and when, comes from the pipeline described
  above.
- **Protocol and timing.** The load phase, the start/valid/ready
  handshakes, the reset and the 45-clock block time are all choices of this
  design. The round-key RAM is written one clock after each word is
  computed.
- **Memory count.** This design has five block-RAM-style memories: two
  S-box RAMs in the datapath, two in the key schedule, and the key RAM.
  The reference implementation reports eight block RAMs on a Virtex-II
  XC2V2000, 3383 slices and 235 Mbit/s. The split of those eight is not
  known, and this RTL has not been through FPGA place-and-route.
- **The block RAM's write port is not modelled.** It is the
  `WEA`/`DIA` pins of the block RAM. The S-box RAMs are fixed tables.
- **AES-128 only.** There is no 192-bit or 256-bit key size and no chaining
  mode (ECB only).

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | column type, NR/KEY_WORDS, GF(2^8) helpers, c(x) and d²(x) products |
| `rtl/aes_top.sv` | top level: key schedule, key RAM, sequencer, datapath |
| `rtl/aes_controller.sv` | phases, tap depths, forwarding, key addresses, strobes |
| `rtl/aes_encdec_unit.sv` | the quarter-round datapath |
| `rtl/aes_folded_register.sv`, `rtl/aes_srl.sv` | row memories built from variable-tap shift registers |
| `rtl/aes_sbox_bram.sv` | dual-port SubBytes/InvSubBytes ROM |
| `rtl/aes_mixcolumns.sv` | c(x) and d²(x) |
| `rtl/aes_key_schedule.sv`, `rtl/aes_key_ram.sv` | key expansion and round-key storage |
| `tb/aes_ref_pkg.sv` | behavioural AES-128 reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_aes_top` is the end-to-end test, and `tb_aes_nist_kat` runs known-answer sweeps |

## Simulating

Each testbench checks itself. At the end it prints
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

The reference model in `tb/aes_ref_pkg.sv` was written separately from the
RTL. It finds S-box entries by searching for the inverse. It uses the full
{0e},{0b},{0d},{09} InvMixColumns, not the shared c(x)·d²(x) form. The
testbenches first check it against the FIPS-197 example vectors.

## How far it has been verified

- **`tb_aes_top`.** It runs the core at its default parameters. It covers
  the FIPS-197 examples (Appendix B and C.1) and six random keys, some
  loaded with gaps. For each key it encrypts and decrypts random blocks,
  with and without input gaps, and runs two blocks back to back. It checks
  every result against the reference model. It checks the 45-clock key and
  block timings. It confirms that encryption, decryption, direction
  switches, forwarding, input stalls, key reloads, a key refused while busy,
  and a back-to-back start each happen.
- **Module testbenches.** Each one checks its module against independent
  models. Examples: all 512 S-box entries, random MixColumns products, tap
  reads from the row memories, the order of key-RAM addresses, and all 44
  key words.
- **Not checked.** Timing closure, FPGA resource use and throughput on real
  hardware.
