# SEA_{n,b}: a scalable block cipher core, one round per clock

SEA (Scalable Encryption Algorithm) is a small Feistel block cipher built
for devices with very little logic or code space: RFID tags, sensor nodes,
smart cards. It needs no tables and no multiplier. Each round uses only
word-wise addition, AND/OR/XOR and rotations. Its unusual feature is that
everything is a parameter: the block and key size `n`, the word size `b`, and
the number of rounds `nr`. This RTL keeps that property. One SystemVerilog
description gives SEA_{24,4}, SEA_{48,8}, SEA_{96,8} or any other legal size
through three module parameters.

The architecture is a *loop* (iterative) core. It has one register for the
data state and one for the key state. A combinational data round and a
combinational key-schedule round sit between them, and each clock cycle
computes one of each. Encryption and decryption share the datapath and the
key schedule. A block of any size takes `nr` cycles.

## Sizes and parameters

| parameter | meaning | default | rule |
|---|---|---|---|
| `N` | block size and key size, bits | 48 | multiple of `6*B` |
| `B` | word size, bits | 8 | |
| `NR` | number of rounds | `sea_pkg::sea_rounds(N,B)` = 51 | odd, at least 3 |

A block is split into halves L and R of `N/2` bits. Each half holds
`nb = N/(2B)` words, numbered from 0 at the least significant end. The S-box
and bit rotation work on groups of three words, so `nb` must be a multiple of
3, which is why `N` must be a multiple of `6B`.

The default round count follows the cipher's own rule,
`nr = 3n/4 + 2(nb + floor(b/2))`, raised to the next odd number
(SEA_{48,8}: 50, so 51). The core needs an odd `NR`, for the key-schedule
reason given below. You can set `NR` by hand (more rounds for margin, fewer
for experiments), as long as it is odd.

The default size SEA_{48,8} is this implementation's choice, based on the
48-bit blocks the design was demonstrated with. Nothing in the RTL depends on
it.

## The round functions

Three word-level operations, plus two fixed wire permutations:

* **`+`**: addition modulo 2^b, word by word, with no carry between words
  (`sea_word_add`).
* **S**: a 3-bit S-box, S = {0,5,6,7,4,3,1,2}, applied across words 3i, 3i+1
  and 3i+2. Bit j of each of the three words forms one 3-bit input, with
  word 3i+2 as the MSB. It is computed in bit-sliced form (`sea_sbox`): three
  whole-word operations, each using the result of the previous one:
  `x0 ^= x2 & x1;  x1 ^= x2 & x0;  x2 ^= x0 | x1`.
* **r**: bit rotation (`sea_bit_rot`). In each group of three words, word 3i
  is rotated right by one bit and word 3i+2 is rotated left by one bit.
* **R**: word rotation (`sea_word_rot`). Word i moves to position i+1, and
  the top word wraps to position 0. R^-1 goes the other way.

From these three, the rounds are built:

| round | left out | right out |
|---|---|---|
| FE (encrypt), `sea_data_round` | R | R(L) ^ r(S(R + K)) |
| FD (decrypt), `sea_data_round` | R | R^-1(L ^ r(S(R + K))) |
| FK (key), `sea_key_round` | KR | KL ^ R(r(S(KR + C(i)))) |

`C(i)` is a half-width constant that is zero except for word 0, which holds
the round number i (modulo 2^b). FD undoes FE once the two halves are
exchanged, so one adder, S-box and bit rotation serve both directions. A
single `decrypt` select chooses where the word rotation goes and which value
is written back.

## The key schedule: why it runs forwards and backwards

This is the subtle part of the core. The key is never expanded into a
table. The key state (KL, KR) is updated on the fly, once per cycle. Let
`h = floor(NR/2)`. Round i runs as follows:

| round i | data round keyed with | key update after the round | constant |
|---|---|---|---|
| 1 .. h-1 | KR | FK | C(i) |
| h | KR | FK, then exchange KL and KR | C(h) |
| h+1 | KR | FK | C(NR-i) = C(h) |
| h+2 .. NR-1 | KL | FK | C(NR-i) |
| NR | KL | exchange KL and KR only | none |

FK is a Feistel round. Exchanging the halves and applying FK again with the
same constant therefore gives back the exchanged previous state. After the
middle exchange, the second half of the schedule uses the constants
h, h-1, .., 1, which retraces the first half back to the starting key.
Because `NR` is odd, the round keys used by rounds 1..NR read the same
forwards and backwards.

Two consequences:

* **Decryption needs no separate key schedule.** Decryption applies the round
  keys in reverse order, which here is the same order. So the decryptor loads
  the same key, runs the same controller and only switches the data round to
  FD.
* **The key register ends where it started.** After the last round exchanges
  the halves once more, KL/KR hold the loaded key again. The testbench checks
  this after every block.

The middle exchange is applied when K_h is written. This means the exchanged
state already keys data round h+1. That follows the cipher's description,
in which the whole key schedule, including the exchange, comes before the
data rounds. The final exchange comes after round NR has used its key.

## Interface and timing (`sea_core`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle request; ignored while `busy` |
| `decrypt` | in | 1 | 0 encrypt, 1 decrypt; captured with `start` |
| `key_in` | in | N | key, KL in the upper half |
| `data_in` | in | N | text, L in the upper half |
| `data_out` | out | N | R_NR & L_NR (halves exchanged at the output) |
| `busy` | out | 1 | high for the NR round cycles |
| `done` | out | 1 | one-cycle pulse; `data_out` is valid from here until the next start |

```
cycle      0     1     2    ...   NR    NR+1
start    /‾‾‾‾\_______________ .../‾‾‾‾\___   (next start may come here)
busy     ______/‾‾‾‾‾‾‾‾‾‾‾ ...‾‾\_____/‾‾‾
round i          1     2    ...  NR
done     ___________________ .../‾‾‾‾\___
```

The edge that samples `start` loads the registers. The next NR edges each
compute one round. `done` is raised by the NR-th of those edges, and a new
`start` is accepted in that same cycle. A stream of blocks therefore costs
NR+1 cycles per block: 52 cycles per 48-bit block at the default size.

`start`, `busy`, `done` and the parallel ports are this implementation's
choices. The published design reports far fewer bonded I/O pins (103) than
three parallel 48-bit buses need (150). How it shared its pins is not known,
so no serial loading was invented here.

Immediate assertions in `sea_core` and `sea_ctrl` check that `done` never
comes while busy, that no block is loaded over a running one, and that the
round index stays in 1..NR.

## Modules

```
sea_core            top: data and key registers, key-half select
├── sea_ctrl        IDLE/RUN machine, round counter, constants, exchanges
├── sea_data_round  FE / FD
│   ├── sea_word_add, sea_sbox, sea_bit_rot
│   └── sea_word_rot (R and R^-1)
└── sea_key_round   FK with bypass and exchange
    ├── sea_word_add, sea_sbox, sea_bit_rot
    └── sea_word_rot
sea_pkg             sea_words(), sea_rounds()
```

At the default size, generic synthesis gives 105 flip-flop bits (96 for the
data and key state, 1 for the mode, 8 for the controller). It also gives two
sets of three 8-bit adders, two S-box layers and the muxes.

## How far to trust it

* The round functions, the S-box, the rotations and the constant C(i) follow
  the published SEA specification. The schedule of exchanges and key halves
  follows the cipher's pseudo-code. The core has not been checked against
  published known-answer vectors. It is checked against a reference model
  written separately (`tb/sea_ref_pkg.sv`). The
  ordering choices listed next could make it differ from another SEA
  implementation. Check those against a known-answer vector before you rely
  on interoperability.
* Points where a choice had to be made: word 0 is the least significant word.
  S-box bit order is word 3i+2 = MSB. The middle exchange is applied before
  round h+1 uses KR. C(i) sits in word 0.
* Decryption inverts encryption in every test: every block the testbenches
  encrypt is decrypted back and compared.
* Only the 48-bit block of the published waveforms is known from the
  original design. Its key was not published, so the tests pair that block
  with a chosen key.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sea_pkg.sv tb/sea_ref_pkg.sv tb/tb_sea_core.sv \
    --top-module tb_sea_core -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_sea_core` | default size, no overrides: 43 encrypt+decrypt pairs plus random decryptions against the model; latency, key restored, ignored start, back-to-back start, middle/final exchange counts |
| `tb_sea_core_sizes` | SEA_{24,4}, {36,6}, {48,8}, {96,8}, {96,16}, {144,8} against the model |
| `tb_sea_ctrl` | cycle-by-cycle schedule for NR = 51 and NR = 9 |
| `tb_sea_data_round` | FE/FD against the model; FD(FE(x)) = x |
| `tb_sea_key_round` | FK, bypass and exchange; the walk-back property |
| `tb_sea_sbox` | the S-box table at every bit position; random words |
| `tb_sea_word_add` | carry isolation between words |

`sea_ref_pkg` holds the model. It applies the S-box by table lookup rather
than in bit-sliced form. It computes the whole key schedule before encrypting,
in the order the cipher's definition gives, and decrypts with explicitly reversed
round keys. It handles any `n` up to 256 at run time.

To change the size, override `N` and `B` (and `NR` if wanted) on `sea_core`.
An illegal combination stops elaboration with an `$error`.
