# Variable key length AES encryption processor

This processor encrypts 128-bit blocks with AES. It does not fix the key length. For every
block it draws AES-128, AES-192 or AES-256 at random from a small pseudo-noise generator.
An eavesdropper therefore does not know which of the three ciphers to attack. A receiver still
has to learn the key length, so every cipher text goes out behind a 40-bit header. The header
says the key length only through its *number of ones*: 11–17 ones mean AES-128, 21–27 mean
AES-192 and 31–37 mean AES-256. Both the exact count and where the ones sit are random.

The control is built around a ROM, not a hand-written state machine. The order of AES
sub-operations is stored as a program of control words. Each word enables exactly one of the
four AES units (ByteSub, ShiftRows, MixColumns, AddRoundKey) for one clock cycle. The key
length picks which of three programs runs.

This RTL follows the architecture of the published design "Design of a variable key length
cryptographic processor". The original gives the architecture and what each block does, but
not the inside of most blocks. Everything the original leaves open was chosen here; the
section "Departures and choices" lists those choices.

## Block diagram

```
 Key In ──► key_scheduler ──► key_register ─────────┐
                                                    ▼
 Data In ─► state_register ◄──────────────────► aes_block (byte_sub, shift_rows,
                  │                                  ▲      mix_columns, add_round_key)
 seq_lut ◄──► sequencer ────── unit enables ─────────┘
                  ▲   │
        b1,b0     │   │ hdr_gen
 lfsr (RNG) ──────┴───┼───────► header_gen ──┐
                      │                      ▼
                      └── sel_hdr/sel_ct ─► out_mux ──► Data out
 state_register ─────────────────────────────┘
```

`crypto_processor` is the top level and wires these blocks together exactly as shown.

## One encryption, cycle by cycle

| phase  | cycles            | what happens |
|--------|-------------------|--------------|
| IDLE   | 1 (start)         | `data_in` is loaded into the state register |
| DRAW   | D = 1..3          | b1b0 of the generator is read and the generator is stepped. Code 11 names no key length and is drawn again. The 3-bit generator can show 11 twice in a row, so D ≤ 3. On a good code the key length is latched, the key scheduler is started and the header is generated |
| KEYEXP | L = 4(Nr+1) − Nk  | key expansion, one 32-bit word per cycle (40 / 46 / 52 cycles), plus 1 cycle to see `done` |
| RUN    | 4·Nr + 1          | the look-up-table program, one sub-operation per cycle (41 / 49 / 57) |
| HDR    | 1                 | the header is put on Data out |
| CT     | 1                 | the cipher text is put on Data out; `done` |

Data out is registered, so the cipher text appears on `data_out` **D + L + 4·Nr + 5** cycles
after the cycle in which `start` was sampled:

| key length | Nk | Nr | start → cipher text |
|------------|----|----|---------------------|
| 128        | 4  | 10 | 85 + D              |
| 192        | 6  | 12 | 99 + D              |
| 256        | 8  | 14 | 113 + D             |

The header appears one cycle before the cipher text. A new `start` is accepted in the cycle
after `done`. Expanding the key before encryption, instead of alongside it, makes the design
simple but slow. Running the two in parallel, or pipelining, would cut the latency. The
original mentions both only as possible improvements, and neither is built here.

## The control program (`seq_lut`, `sequencer`)

The look-up table holds three programs, one per key length. Each program sits in a 64-word
slot, and the address is `{keylen, step}`. A control word (`aes_pkg::ctrl_t`) holds:

- `en_sub`, `en_shift`, `en_mix`, `en_ark`: at most one of these is set. It enables that AES unit
  for the cycle, and the state register captures the unit's result.
- `kld` and `round`: load round key `round` into the key register.
- `last`: the final word of the program.

For Nr rounds the program is:

```
step 0          kld 0                         (key register <- round key 0)
step 1          AddRoundKey
rounds 1..Nr-1  ByteSub + kld r, ShiftRows, MixColumns, AddRoundKey
round Nr        ByteSub + kld Nr, ShiftRows, AddRoundKey (last)
```

The key for round r is loaded during that round's ByteSub, three cycles before its
AddRoundKey. So the key register needs only one entry. An assertion in the top level checks
that every AddRoundKey uses the key of its own round. The ROM is not typed in: a constant
function builds it from the loop above, so a different schedule means editing
`build_rom()`.

The sequencer does not know the AES round structure. It walks `step` from 0 until it reads
`last`, and it gates the word's bits with its RUN phase. A small six-phase state machine
(IDLE, DRAW, KEYEXP, RUN, HDR, CT) wraps that walk.

## Drawing the key length (`lfsr`)

The generator is a 3-bit Fibonacci LFSR. On every enabled clock it shifts right, and its new
left bit is `q[1] ^ q[0]`. That gives the maximal period 7 and never reaches zero. Its two low
bits, b0 and b1, are the key-length code: 00 = AES-128, 01 = AES-192, 10 = AES-256, and 11 is
drawn again. The generator advances only in DRAW cycles, so successive blocks use successive
states. A 3-bit LFSR is predictable and gives an uneven mix of the three lengths. Over one
period, AES-128 is drawn once and AES-192 and AES-256 twice each. A real deployment should
widen it (`WIDTH`, `TAPS`, `SEED` are parameters, but the `b0`/`b1` mapping stays the same).

## The header (`header_gen`)

This is the least obvious part of the design. The header carries the key length as a count of
ones. It is built in three steps:

1. **Count.** A second, free-running 3-bit LFSR (the local generator) gives Q = 1..7. LUT1, a
   3 × 7 table addressed by row b1b0 and column Q, gives the number of ones,
   `n = 10·(row+1) + Q`.
2. **Pattern.** The same address picks one of 21 rows of a 21 × 40 pattern memory. The row for
   count n holds a 40-bit word with exactly n ones, spread evenly: bit i is set when
   `floor((i+1)·n/40) ≠ floor(i·n/40)`. Like the program ROM, it is computed at elaboration.
3. **Rotation.** The word is rotated left by a free-running 0..39 counter, so the position of the
   ones also varies. Rotation keeps the count of ones; a plain shift would not, so no shift is
   used.

A receiver recovers the key length as follows: popcount the header, then 11–17 → 128,
21–27 → 192, 31–37 → 256. The ranges are ten apart, so the decision is simple. This RTL
contains no receiver.

## Key expansion (`key_scheduler`, `key_register`)

`key_in` is 256 bits wide, with word 0 in bits [255:224]. A shorter key uses its leftmost Nk
words. So the FIPS-197 example key `000102…1f` is the 128-, 192- and 256-bit example key at
the same time. The scheduler produces one word per cycle by the standard recurrence into a
60 × 32-bit register file:

- `w[i] = w[i−Nk] ^ SubWord(RotWord(w[i−1])) ^ Rcon` when i mod Nk = 0;
- `w[i] = w[i−Nk] ^ SubWord(w[i−1])` for the extra AES-256 step;
- `w[i] = w[i−Nk] ^ w[i−1]` otherwise.

The scheduler avoids dividers: i mod Nk is a wrapping counter, and Rcon is a byte that is
doubled in GF(2^8) after each use. It has four S-box ROMs of its own. The key register copies
the round key that the sequencer names.

## The AES units (`aes_block`)

All four units are combinational, 128 bits wide, and take one cycle.

- **`byte_sub`**: 16 S-box ROMs (`sbox`). The 256-byte table is computed at elaboration from the
  GF(2^8) inverse and the affine map (`aes_pkg::make_sbox`).
- **`shift_rows`**: wiring. Row r is rotated left by r.
- **`mix_columns`**: the fixed {02,03,01,01} matrix with `xtime` only. The original says it
  uses a new MixColumns method but does not describe it, so the textbook form is used.
- **`add_round_key`**: XOR with the key register.

`aes_block` passes on the result of the enabled unit with a write strobe, and asserts that no
two units are enabled at once. The state is stored big-endian: byte 0 is in [127:120], and
bytes fill the 4×4 state column by column.

## Top-level interface (`crypto_processor`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | rising-edge clock, asynchronous active-low reset |
| `start` | in | 1 | begin a block; sampled while `busy` is low |
| `data_in` | in | 128 | plaintext; captured with `start` |
| `key_in` | in | 256 | key; captured at the end of DRAW (1–3 cycles after `start`), so hold it until `keylen` changes or for 3 cycles |
| `data_out` | out | 128 | header beat (`[39:0]`, upper bits 0), then cipher-text beat |
| `out_valid`, `out_is_hdr` | out | 1 | beat qualifiers |
| `busy`, `done` | out | 1 | operation in progress; `done` is high in the cycle before the cipher beat |
| `keylen` | out | 2 | key length drawn for the current or last block (0/1/2) |
| `hdr_ones` | out | 6 | number of ones placed in the header |

## Departures and choices

Taken from the original design:

- the block set and its connections;
- random selection of AES-128/192/256 by a 3-bit PN generator with outputs b0, b1;
- control words read from a ROM, one sub-operation per machine cycle;
- four separate AES units;
- a key scheduler feeding a key register;
- the 40-bit header with marker-count ranges per key length;
- LUT1 addressed by b1b0 and three local random bits;
- a 21-row × 40-bit pattern memory and rotation;
- an output multiplexer sending header and cipher text.

Chosen here:

- the b1b0 → key-length mapping and the redraw of code 11;
- the LFSR taps and seeds;
- the control-word format and the key-load slot;
- the six-phase wrapper around the program;
- key expansion before encryption, one word per cycle;
- the 256-bit key port and the use of its leftmost words;
- the pattern formula and the rotation source;
- the header-then-cipher beat order on a 128-bit output;
- all handshakes and reset values.

Known differences:

- The marker ranges of the original are 11–17, 21–27 and 31–38. Here the third range is 31–37,
  because the local generator has seven states and the pattern memory 21 = 3 × 7 rows. A count
  of 38 is never produced. A receiver that accepts 31–38 still decodes correctly.
- In the original, MixColumns takes more cycles than the other units. Here every unit takes one
  cycle.
- Resource figures for the original FPGA build list an 8-bit input for ByteSub and 256 outputs
  for ShiftRows. Here both are 128 bits wide.
- The optional extra encryption of the header is not built, because its method is not given.
  Decryption, a receiver, the parallel key schedule and the pipelined variant are not built
  either.

## Verifying and changing it

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The shared package `tb/aes_ref_pkg.sv` is a
reference AES written independently of the RTL. Its S-box comes from x^254 by repeated
multiplication, and it uses a byte-array state and a table-based Rcon.

- `tb_crypto_processor` runs the full design at its default parameters. It encrypts the
  FIPS-197 Appendix C plaintext 12 times and checks each known answer for whichever key length
  was drawn. It then encrypts 60 random blocks and keys against the reference model. For every
  block it checks the header popcount against the drawn key length, the header-then-cipher
  order and the exact latency above. It fails unless all three key lengths, a redraw and all 21
  header counts occurred.
- `tb_seq_lut` executes each ROM program on the reference model and requires the result to equal
  AES encryption.
- `tb_key_scheduler` checks every round key (including the FIPS-197 A.1 last round key) and the
  expansion latency.

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert --top-module tb_crypto_processor \
  -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_crypto_processor.sv
./obj_dir/Vtb_crypto_processor
```

Replace the top-module name and the last file to run another testbench. The end-to-end test
takes well under a second.

To change the design:

- the schedule lives in `seq_lut::build_rom()`;
- the header ranges and patterns live in `header_gen` (`build_lut1`, `build_pat`);
- the key-length code mapping lives in `sequencer` and `header_gen`;
- widths and the control-word layout live in `rtl/aes_pkg.sv`.
