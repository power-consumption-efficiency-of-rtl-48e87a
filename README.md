# Low-power AES-128 and Salsa20 cores for passive RFID tags

A passive UHF RFID tag runs on the energy it harvests from the reader's field:
roughly 20 µW in total at a few metres. This is too little for a fast cipher
datapath. The two cores here are built for low switching activity, not for
speed. Each uses a very small set of processing units again and again, works on
narrow slices of its state (two bytes, one column or one word per clock), and
takes about 170 to 200 cycles per block. At a 100 kHz tag clock that is under
2 ms.

They are an RTL rendering of the two designs compared in the paper *Power
Consumption Efficiency of Encryption Schemes for RFID*:

| | AES-128 core | Salsa20 core |
|---|---|---|
| kind | block cipher, encrypt and decrypt | stream cipher in counter mode |
| block | 128 bits | 512-bit keystream block (128 bits XORed by default) |
| key | 128 bits | 128 bits (16-byte-key variant) |
| latency | 168 cycles (the paper reports 180) | 202 cycles (as in the paper) |
| main storage | State 128 b + 10 round keys × 128 b | matrix 16 × 32 b + 2 × 128 b quarterround outputs + 64 b counter |
| module | `aes_core` | `salsa20_encryption` |

`rfid_crypto_top` places the two side by side. They share only `clk` and
`rst_n`, and each keeps its own ports. All state is reset by the active-low
asynchronous `rst_n`.

## AES-128 core

### Units and how they are reused

```
                 +--------------------+
 key_i --------->|  aes_key_schedule  |-- round key (rk_sel) --+
                 |  10 x 128 b bank   |                        |
                 +---------+----------+                        v
                           | 16 b                   +---------------------+
                           v                        |  State register     |
                 +--------------------+   16 b      |  (128 b) + AddRound-|
                 |  aes_sbox_share    |<------------|  Key XOR (aes_core) |
                 |  mux + 2 x aes_sbox|------------>|                     |
                 +--------------------+  aes_subbytes (SubByte+ShiftRow)  |
                                                    |                     |
                 aes_mixcolumn -> aes_word_mixcolumn -> 4 x aes_byte_col  |
                                                    +---------------------+
```

`aes_core` owns the 128-bit State register and one state machine. It starts
each unit by holding that unit's enable high, and it loads whatever the unit
offers on `state_o` while `state_we_o` is high. A unit raises `done_o` in its
last cycle so that the controller moves on at the same clock edge. No cycle is
spent on handshakes.

| step | unit | cycles |
|---|---|---|
| key expansion, all ten round keys | `aes_key_schedule` | 30 (3 per key) |
| AddRoundKey | XOR in `aes_core` | 1 |
| SubByte + ShiftRow | `aes_subbytes` via the shared S-boxes | 9 (8 × two bytes, then 1 shift) |
| MixColumn | `aes_mixcolumn` | 4 (one column per cycle) |

The round sequences:

* **Encryption:** expand the keys, then AddRoundKey(k0). Rounds 1–9 are
  SubByte+ShiftRow, MixColumn, AddRoundKey(k_r). Round 10 is SubByte+ShiftRow,
  AddRoundKey(k10).
* **Decryption:** expand the keys, then AddRoundKey(k10) and
  InvSubByte+InvShiftRow. Rounds 9 down to 1 are AddRoundKey(k_r),
  InvMixColumn, InvSubByte+InvShiftRow. The last step is AddRoundKey(k0).

Both directions take 1 + 30 + 1 + 9·14 + 10 = **168 cycles**. `ready_o` is high
168 clock edges after the edge that samples `start_i`. The equal latency comes
from expanding every round key into the register bank before any data is
processed. Decryption can then read the keys in reverse order, and no inverse
key schedule is needed.

### The shared S-box pair

Only `aes_subbytes` and `aes_key_schedule` need S-boxes, and never in the same
cycle: the key schedule runs first, on its own. So the two share one pair of
S-boxes through a multiplexer (`aes_sbox_share`). Each side presents 16 bits
(two bytes) and gets the two substituted bytes back in the same cycle. The key
schedule always uses the forward S-box. SubByte asks for the inverse one while
decrypting. An assertion in `aes_core` checks that the two sides never claim
the pair together.

### The S-box: inversion in GF((2^4)^2)

`aes_sbox` has no lookup table. The forward direction is the multiplicative
inverse followed by the affine map. The inverse direction is the inverse affine
map followed by the same inverter, so both directions share one inverter. To
make the inverter small, the byte is mapped into the composite field
GF((2^4)^2) and inverted there:

* GF(2^4) uses the polynomial z^4 + z + 1.
* The extension uses y^2 + y + λ, where λ is the smallest value that makes it
  irreducible.
* An element is h·y + l. Its inverse is (h·D⁻¹)·y + (h+l)·D⁻¹, where
  D = λh² + hl + l².

This needs a few 4-bit multipliers and one 4-bit inverter (computed as a^14).
The maps into and out of the composite field are 8×8 bit matrices. Their
columns are the powers β^0..β^7 of a root β of the AES polynomial
x^8 + x^4 + x^3 + x + 1, taken in the composite field.

Constant functions in the module find λ, β and both matrices at elaboration,
so no magic numbers are hard-coded. To use different field polynomials, change
`gf4_mul` and `find_lambda`; the matrices follow by themselves.
`tb_aes_sbox` checks all 256 inputs in both directions against a brute-force
S-box.

### MixColumn with shared multipliers

`aes_mixcolumn` feeds one 32-bit column per cycle to `aes_word_mixcolumn`.
Inside it, four `aes_byte_col` blocks each produce one output row from the
column rotated by that row's index. The inverse transform reuses the forward
one:

```
InvMixColumn row = MixColumn row  ^  08·(a0^a1^a2^a3)  ^  04·(a0^a2)
```

Decryption therefore adds only two constant multipliers to each byte block,
applied to already-XORed bytes. The coefficients check out: 02+08+04 = 0e,
03+08 = 0b, 01+08+04 = 0d and 01+08 = 09.

### Key schedule

Each round key takes three cycles. In the first two, RotWord of the last word
goes through the S-box pair two bytes at a time (bytes 1,2, then 3,0). In the
third, all four words are XORed in a chain together with Rcon. The ten results
fill a bank of ten 128-bit registers. Round key 0 is `key_i` itself, so
**`key_i` must stay stable until `ready_o`**. `data_i` and `decrypt_i` are
latched at `start_i`.

## Salsa20 core

### Counter mode wrapper (`salsa20_encryption`)

```
INIT_I ─┬─ clear ─┐                        ┌───────────────────────────┐
START_I ┴─ +1 ────┴─ I_COUNTER (64 b) ───> │ salsa20_expansion         │
INIT_I|START_I ─> flip-flop ─ start ─────> │  {T0,K,T1,N|ctr,T2,K,T3}  │─ 512 b ─> XOR ─> DATA_O
NONCE_I, KEY_I ──────────────────────────> │  salsa20_core             │           ^
                                           └───────────────────────────┘  DATA_I ──┘
(I_COUNTER == max) & START_I ─> flip-flop ─> OVFF_O
```

* `INIT_I` clears the block counter and encrypts block 0.
* Each `START_I` advances the counter and encrypts the next block. Give it only
  after `READY_O` of the previous block: a start during a block advances the
  counter but is not served (an assertion flags it).
* Either one is registered for one cycle and then starts the keystream
  generator.
* `DATA_O = DATA_I ^ keystream[511 -: DATA_W]`, so the first `DATA_W/8`
  keystream bytes are used. `DATA_W` is 128 by default and can go up to 512
  to use the whole block.
* Decryption is the same operation.
* `OVFF_O` is high for one cycle after a `START_I` given while the counter holds
  its largest value; the counter then wraps to 0.
* `READY_O` is a one-cycle pulse 202 clock edges after the edge that sampled
  `INIT_I`/`START_I`.
* `DATA_O` stays valid while `KEY_I`, `NONCE_I` and `DATA_I` are held and no
  new block is started. The feed-forward addition reads the live input, and no
  copy of it is kept.

### Byte order

This is the part most easily got wrong. Every byte string (key, nonce, 64-byte
block) is packed with **byte 0 in the most significant bits**, so a
concatenation reads in the same order as the Salsa20 specification. The core
input is `{T0, KEY, T1, NONCE, COUNTER, T2, KEY, T3}`, where T0..T3 are
"expa", "nd 1", "6-by" and "te k": the constants for a 16-byte key. The counter
is inserted least significant byte first, so word x8 holds its low 32 bits, as
the specification's block index requires. `little_endian()` in `salsa20_pkg`
reverses the bytes of each 32-bit word. The core applies it on the way in, to
turn bytes into words, and on the way out, to turn words back into bytes.
Inside the core, word x0 is the most significant word.

### Core, double-round controller and quarterround

`salsa20_core` computes Z = X + DR(X): the 32-bit word-wise sum of the input
matrix and the matrix after the double-rounds. `salsa20_doubleround10` holds
the matrix in a 512-bit register and owns two `salsa20_quarterround` units.
Each double-round is split into four half-rounds. In each half-round both units
work on two independent quadruples:

| state | half-round | unit 1 | unit 2 |
|---|---|---|---|
| S1 | column, 1st half | x0,x4,x8,x12 | x5,x9,x13,x1 |
| S2 | column, 2nd half | x10,x14,x2,x6 | x15,x3,x7,x11 |
| S3 | row, 1st half | x0,x1,x2,x3 | x5,x6,x7,x4 |
| S4 | row, 2nd half | x10,x11,x8,x9 | x15,x12,x13,x14 |

When both units report ready, their results are written back and the next
half-round is launched by a registered start pulse. `ROUND` counts single
rounds in steps of two. After S4 with `ROUND == ROUNDS-2` (18), the controller
returns to S0 and pulses `ready_o`.

`salsa20_quarterround` produces one word per cycle, OUT1, OUT2, OUT3, then
OUT0:

```
OUT1 = IN1 ^ ((IN0  + IN3 ) <<< 7)
OUT2 = IN2 ^ ((OUT1 + IN0 ) <<< 9)
OUT3 = IN3 ^ ((OUT2 + OUT1) <<< 13)
OUT0 = IN0 ^ ((OUT3 + OUT2) <<< 18)
```

A four-state machine enables one 32-bit output register per cycle, so only one
sub-block switches at a time. These enables are where a clock-gated netlist
puts its gates; the RTL expresses them as register enables and leaves the
clock-gating cells to synthesis. The inputs are read straight from the matrix
register, which does not change while the unit runs.

Timing: 5 cycles per half-round (1 launch + 4 steps) × 4 half-rounds × 10
double-rounds = 200 cycles. Add the start register and the launch, and a block
takes **202 cycles**, the figure the paper reports. The paper's count of 80
quarterround executions per block also holds: 10 × 8.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `salsa20_encryption` | `COUNTER_W` | 64 | block counter width; smaller only wraps sooner |
| `salsa20_encryption` | `DATA_W` | 128 | data bits XORed per block, 8..512, whole bytes |
| `salsa20_*` | `ROUNDS` | 20 | Salsa20/ROUNDS; must be even (e.g. 8 or 12 for the reduced variants) |
| `rfid_crypto_top` | `SALSA_COUNTER_W` | 64 | passed to `COUNTER_W` |
| `aes_pkg` | `NR` | 10 | AES-128 rounds; fixed, since the key schedule is AES-128 only |

## Departures from the paper and choices of this RTL

* **AES latency 168, not 180.** The paper lists the steps of each unit but not
  how its 180 cycles are split. This RTL spends no cycle on handshakes or
  idle, and the 12-cycle gap is left rather than padded. `LATENCY` in
  `tb_aes_core` and the full-size test pin the value at 168.
* **Salsa20 key of 128 bits.** The paper's algorithm section speaks of a
  256-bit key. Its hardware block diagram has a 128-bit `KEY_I` and uses the
  16-byte-key constants, and this RTL follows the hardware.
* **Which keystream bits meet `DATA_I`.** The block diagram XORs a 512-bit
  keystream with 128-bit data without saying which bits. This RTL uses
  keystream bytes 0..15. `DATA_W = 512` uses the whole block, the 512-bit block
  size the paper quotes.
* **No gated clocks.** The paper's counter is clocked by `START_I`, and its
  quarterround gates the clocks of its sub-blocks. Here everything runs on
  `clk`, and enables take the place of the gated clocks.
* **Inverse S-box.** The paper does not say how InvSubByte is made. Here it
  shares the composite-field inverter with the forward S-box.
* **Round key 0 is not stored.** The bank holds round keys 1..10, and key 0 is
  read from `key_i`, which therefore has to be held.
* **Not included:** the test-control logic and the pad ring of the paper's test
  chips (described only by name), and all power, area and timing results, which
  come from a 0.18 µm cell library.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog. The reference
models are written independently of the RTL:

* `aes_ref_pkg` is a FIPS-197 AES with the S-box computed by exponentiation.
* `salsa20_ref_pkg` is a loop-based Salsa20 hash.

Known-answer vectors are also used: FIPS-197 Appendix B and C.1, the FIPS key
expansion, the Salsa20 specification's quarterround examples, and its 16-byte
key expansion example.

| testbench | what it shows |
|---|---|
| `tb_aes_sbox` | all 256 bytes, forward and inverse |
| `tb_aes_byte_col`, `tb_aes_word_mixcolumn`, `tb_aes_mixcolumn` | (Inv)MixColumn values; 4-cycle timing |
| `tb_aes_sbox_share`, `tb_aes_subbytes`, `tb_aes_key_schedule` | S-box routing; 9-cycle SubByte+ShiftRow; 30-cycle key expansion, all 11 round keys |
| `tb_aes_core` | FIPS vectors and random encrypt/decrypt pairs, 168 cycles each |
| `tb_salsa20_quarterround`, `tb_salsa20_doubleround10`, `tb_salsa20_core`, `tb_salsa20_expansion` | quarterround in 4 cycles with at most one output register switching per cycle; double-rounds and hash in 201 edges; specification example |
| `tb_salsa20_encryption` | 16 blocks in sequence, 202 cycles, counter wrap and `OVFF_O` (4-bit counter), decryption, and a 512-bit `DATA_W` instance |
| `tb_rfid_crypto_top` | both cores running at once: AES encryptions and decryptions, Salsa20 `INIT_I`, `START_I` and counter overflow (3-bit counter). Each mechanism is counted. |
| `tb_rfid_crypto_top_full` | the top with all defaults: one AES encryption and decryption, two Salsa20 blocks |

To run one with Verilator 5 (the packages are listed first; `-y` finds the
modules by file name):

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/aes_pkg.sv rtl/salsa20_pkg.sv tb/aes_ref_pkg.sv tb/salsa20_ref_pkg.sv \
  tb/tb_rfid_crypto_top.sv --top-module tb_rfid_crypto_top
./obj_dir/Vtb_rfid_crypto_top
```

Each testbench finishes in well under a second. Verilator's `-Wall` lint
reports two warnings. `SYNCASYNCNET` arises because the reset is used
asynchronously by the registers and as a `disable iff` condition in the
assertions. `UNUSEDSIGNAL` marks the keystream bits that the default
`DATA_W = 128` leaves unused.
