# DSTU 7624 / DSTU 8845 cipher cores for FPGA

This is synthesizable SystemVerilog for the two current Ukrainian symmetric
cipher standards, packaged as IP cores for an FPGA-based embedded system:

* **DSTU 7624:2014 "Kalyna"**, a block cipher. It is AES-like, with four
  different S-boxes, an 8×8 MDS matrix over GF(2^8), and key additions that
  alternate between XOR and addition modulo 2^64. The core runs one full round
  per clock.
* **DSTU 8845:2019 "Strumok"**, a SNOW-family keystream generator. It has a
  16-cell linear feedback register over GF(2^64), and a two-register finite
  state machine whose nonlinear function T reuses Kalyna's S-boxes and
  MixColumn. It makes one 64-bit keystream word per clock.

A small system wraps the two cores: control logic, a dual-port result RAM and
clock-domain synchronisers. It lets a host processor on a slower bus clock
start jobs and read the results.

> **Read this first: the S-box contents are stand-ins.** The four 256-byte
> substitution tables π0..π3 are published in the appendix of DSTU 7624:2014
> and are not included here. `kalyna_pkg::sbox_value()` returns a family of
> bijections with the same shape instead:
> π_m(x) = rotl8(x⁻¹, m+1) ⊕ C_m, where x⁻¹ is the GF(2^8) inverse.
> The one published entry used as a check, π1(0x11) = 0x15, holds. **With these
> tables neither core produces standard ciphertext or keystream.** Every
> structure around the tables follows the standards: round, key schedule, LFSR
> and FSM. To get the standard ciphers, replace the body of `sbox_value()`
> with a lookup into the four published tables. All ROMs are built from that
> one function: the Kalyna S-box ROMs and the eight Strumok T tables.
> Then check the result against the standards' test vectors, which this
> repository does not include.

## Conventions shared by both ciphers

* **GF(2^8)** is built on p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11d).
  β = 0x02 is its primitive element.
* **Kalyna state.** A block of `NB` 64-bit columns is a
  `logic [NB-1:0][63:0]`. Column c is word c. Byte r of a word is row r.
  So byte w_k of the block sits at bits 8k+7:8k: it is little-endian, and
  columns are filled first. A 128-bit block is 2 columns × 8 rows.
* **Strumok words.** A 64-bit word is an element of GF(2^64) = GF(2^8)[z]/g(z).
  Byte i holds the coefficient of z^i.

## Kalyna block cipher

### Round datapath (`kalyna_round`)

A round is one combinational path. It is instantiated once for encryption and
once for the key schedule.

1. **SubBytes** (`kalyna_sub_bytes`). There is one 256×8 ROM per state row
   (`kalyna_sbox_row`). Row r uses table π_(r mod 4), and one ROM serves all
   NB bytes of its row. For a 128-bit block that makes eight ROMs, each
   16 bits wide. The ROMs are read asynchronously.
2. **ShiftRows** (`kalyna_shift_rows`). Row r rotates right by
   ⌊r·64·NB/512⌋ columns: new column (c + shift) mod NB takes old column c.
   With a fixed block size this is wiring only.
3. **MixColumns** (`kalyna_mix_columns`, `kalyna_mix_column`). Each column
   is multiplied by the circulant matrix whose first row is
   `01 01 05 01 08 06 07 04`. Row r is that row rotated right by r, so
   out[r] = ⊕_b v[(b−r) mod 8]·in[b]. The products come from a chain of
   "times 2" circuits (`kalyna_gf_mul`). Times 2 is a left shift, plus XOR
   with 0x1d when the top bit was set. The other multiples follow from it:

   | multiple | how it is built |
   |---|---|
   | 3x | 2x ⊕ x |
   | 4x | 2(2x) |
   | 5x | 4x ⊕ x |
   | 6x | 2(3x) |
   | 7x | 6x ⊕ x |
   | 8x | 2(4x) |

   So each output byte is the XOR of eight such products.

Key addition is kept out of the round (`kalyna_key_add`). It is either an
XOR, or a per-column 64-bit addition with the carry out dropped.

### Encryption (`kalyna_encrypt`)

`start` whitens the plaintext with K0 (addition modulo 2^64) into the state
register. Each of the next NR cycles runs one round:

* rounds 1..NR−1 XOR in K_i;
* round NR adds K_NR modulo 2^64 and registers the ciphertext.

`done` pulses **NR cycles after the cycle that took `start`**. That is 10
cycles for the default 128-bit block. A new block can start in the cycle
after `done`. One core therefore encrypts one block every NR+1 cycles.

### Key schedule (`kalyna_key_expand`)

This is the hardest part to follow. One round unit is driven by a small FSM
through two phases:

The key has NK 64-bit words, NK = NB or 2·NB. Call its low NB words K_a
and its high NB words K_b; when NK = NB both are the whole key.

* **KT phase, 3 cycles.** The intermediate key Kt is built. Start from the
  state whose word 0 is the constant NB+NK+1 and whose other words are zero.
  Then apply, in order:
  1. add K_a modulo 2^64, then a round;
  2. XOR K_b, then a round;
  3. add K_a modulo 2^64, then a round.
* **EVEN phase, 2 cycles per even key K_2j, j = 0..NR/2.**
  Let ktr = Kt + tmv_j, added per column modulo 2^64.
  Start from NB of the key words (see below). Then apply, in order:
  1. add ktr, then a round;
  2. XOR ktr, then a round;
  3. add ktr.

  The result is K_2j. In the same cycle the odd key K_2j+1 is written: it
  is K_2j rotated by 2·NB+3 bytes, so new byte i = old byte i+2NB+3.
  tmv_0 has every word equal to 0x0001000100010001. Each even key shifts
  every tmv word left by one bit.

  With NK = NB the key words rotate by one word position after each even
  key. With NK = 2·NB the even keys take the low half and the high half of
  the key words in turn, and the words rotate by one position after each
  high half. The odd-key rotation stays 2·NB+3 bytes, the size of the block
  being rotated, for both key lengths.

`key_load` latches the key and restarts the schedule, even one that is
already running. `key_ready` rises 3 + 2·(NR/2+1) cycles later: 15 cycles for
a 128-bit key, 19 for a 256-bit key. All NR+1 round keys sit in registers, so encryption can use
any of them in any cycle.

### Core (`kalyna_core`)

`kalyna_core` joins the key schedule and the encryption datapath behind a
valid/ready interface:

* `in_ready` is high when the keys are ready and the datapath is idle.
* `out_valid` pulses with the ciphertext.
* An assertion forbids `key_load` while a block is being encrypted.

## Strumok keystream generator

### Field arithmetic

g(z) is z^8 + β^170 z^7 + β^166 z^6 + β^2 z^5 + β^224 z^4 + β^70 z^3 + β^2.
The coefficients of z^2 and z are zero. This polynomial is primitive over
GF(2^8). Multiplying by α, the class of z, is a byte shift plus one 256×64
ROM lookup on the byte that falls out (`strumok_alpha_mul`):

* α·w = (w ≪ 8) ⊕ A[w[63:56]], where A[c] has byte i = c·g_i;
* α⁻¹·w = (w ≫ 8) ⊕ A'[w[7:0]]. Here A'[c] = c·g_0⁻¹·(z^7 + g_7 z^6 + … + g_1),
  because z·(z^7 + g_7 z^6 + … + g_1) = g_0.

Both tables are computed at elaboration from the six coefficients in
`strumok_pkg`.

### Nonlinear function T (`strumok_t`, `strumok_t_table`)

T(w) = T_0[w_0] ⊕ … ⊕ T_7[w_7], where w_i is byte i of w. T_i[x] is MDS
column i multiplied by π_(i mod 4)(x). So one lookup does the S-box and all
the MixColumn products for one byte, and T costs eight ROM reads and seven
64-bit XORs. The result equals Kalyna SubBytes followed by MixColumn on the
word taken as one column.

### Register and modes (`strumok_keystream`)

Each clock with a step, all of the following happen at once:

```
fsm_out = (s15 + r1) ^ r2                       (+ is modulo 2^64)
fb      = α·s0 ^ α⁻¹·s11 ^ s13  [^ fsm_out in INIT mode]
s_i <= s_(i+1),  s15 <= fb
r2  <= T(r1),    r1  <= r2 + s13
z    = fsm_out ^ s0
```

A mode FSM runs the generator:

| mode | what it does | how it ends |
|---|---|---|
| IDLE | holds the state | a `load` pulse |
| INIT | 32 steps with `fsm_out` fed back; `load` has written s0..s15 from `init_state` and cleared r1 and r2 | after 32 steps |
| WARM | one plain step; its output is thrown away | after 1 step |
| GAMMA | `z_valid` is high; each cycle with `z_ready` delivers `z` and advances the state | a new `load` |

In GAMMA, `z_ready` low stalls the generator.

**Expanding key and IV into `init_state` is not built.** The caller supplies
the 16 initial words directly.

## System around the cores (`dstu_crypto_top`)

The reference system has three parts:

* an SoC FPGA, whose processor runs Linux and a web control panel;
* a memory-mapped bridge that reaches the FPGA fabric;
* a PLL that makes a 200 MHz core clock from the 50 MHz reference.

The top module is the fabric side of that system. The PLL, the processor and
the bridge are outside it, and both clocks are inputs.

* **Host side (`clk_bus`).** The host starts a job with a one-cycle
  `bus_cmd_start`. `bus_cmd_mode` selects the cipher: 0 for DSTU 7624,
  1 for DSTU 8845. `bus_cmd_count` gives the number of blocks or keystream
  words. Both must hold until `bus_cmd_done` returns. The host then reads
  results through `bus_rd_addr` and `bus_rd_data`, with one cycle of latency.
* **Sync (`dstu_pulse_sync`).** Start and done pulses cross the clock
  domains through a toggle synchroniser (toggle flop, two flops, edge detect).
* **Control logic (`dstu_ctrl`, `clk_core`).**
  * A block-cipher job loads `kalyna_key` and waits for the round keys. It
    then passes `bus_cmd_count` plaintext blocks from the
    `data_valid`/`data_ready` stream to the core, and writes each ciphertext
    to the RAM as NB words, column 0 first.
  * A keystream job loads `strumok_init_state`, waits for GAMMA mode, and
    writes `bus_cmd_count` words.

  Writes start at address 0 and wrap at the RAM depth.
* **Result RAM (`dstu_dp_ram`).** A simple dual-port RAM, 256 × 64 bits by
  default. It is written on `clk_core` and read on `clk_bus`.

The host protocol, the RAM size and the synchroniser are this design's own
choices. The reference system names these blocks without defining them.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `kalyna_*` | `NB` | 2 | 64-bit columns per block; 2, 4 or 8 |
| `kalyna_core`, `kalyna_key_expand`, `dstu_crypto_top` | `NK` | NB | 64-bit words per key; NB or 2·NB (at most 8) |
| `kalyna_*` | `NR` | 10 / 14 / 18 | rounds, for a 128-, 256- or 512-bit key |
| `strumok_keystream` | `INIT_STEPS` | 32 | initialisation steps |
| `dstu_crypto_top` | `RAM_DEPTH` | 256 | result RAM words |
| `dstu_crypto_top` | `CW` | 16 | job-length counter width |

## What is not built, and where this departs from the standards

* The S-box tables are stand-ins; see the note at the top.
* **Kalyna:**
  * Only encryption is built, not decryption.
  * All five block/key sizes are built (128/128, 128/256, 256/256, 256/512,
    512/512). Only the key schedule is checked for the double-length keys;
    the encryption datapath takes NR as a parameter and is the same.
  * How the two key halves enter the schedule for a key twice the block is
    taken from the standard.
  * The cores are iterative: one round, or one generator step, per clock.
    They are not pipelined.
  * The rotation of the key words between even round keys, and the tmv_0
    value, follow the standard.
* **Strumok:**
  * The key/IV loading rule of DSTU 8845:2019 is not implemented.
  * The initialisation (32 feedback steps plus one discarded step) follows
    the SNOW-family scheme of the standard.
* The round keys of Kalyna are kept in flip-flops: (NR+1)·64·NB bits,
  1408 bits at the default size. They are not in a RAM.
* The ShiftRows layout for a 256-bit block follows the formula
  ⌊r·L/512⌋ for every row.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference models in
`tb/kalyna_ref_pkg.sv` are written independently of the RTL structure:

* GF(2^8) products come from carry-less multiplication and long division.
* The MDS matrix is typed out row by row.
* The key schedule and encryption are plain loops over bytes.
* The α multiplications are done as polynomial arithmetic in GF(2^8)[z].
* α⁻¹ is found by solving v·z = w coefficient by coefficient.

Only the S-box function is shared with the RTL.

| testbench | what it covers |
|---|---|
| `tb_kalyna_sbox_row`, `tb_kalyna_gf_mul`, `tb_strumok_t_table` | exhaustive over all 256 inputs |
| `tb_kalyna_sub_bytes`, `tb_kalyna_shift_rows`, `tb_kalyna_mix_columns`, `tb_kalyna_round` | random states at NB = 2, 4 and 8 |
| `tb_kalyna_key_expand` | all round keys at NB = 2, 4, 8, the 15/21/27-cycle schedule time, and a restart in mid-schedule |
| `tb_kalyna_encrypt` | ciphertexts and the NR-cycle latency at NB = 2 and 8 |
| `tb_kalyna_core` | bursts with random gaps and re-keying, at NB = 2 and 4 |
| `tb_strumok_keystream` | 4 × 200 keystream words against the step model, random `z_ready` stalls, mode timing |
| `tb_dstu_crypto_top` | the whole system at default parameters, from host commands to RAM read-back |

`tb_dstu_crypto_top` runs two block-cipher jobs (16 and 128 blocks, with a
new key each) and two keystream jobs (256 and 33 words). It counts
re-keying, plaintext stalls, clock crossings and RAM reads, and fails if any
of them never happened.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/kalyna_pkg.sv rtl/strumok_pkg.sv tb/kalyna_ref_pkg.sv \
  tb/tb_dstu_crypto_top.sv --top-module tb_dstu_crypto_top
./obj_dir/Vtb_dstu_crypto_top
```

Use the same pattern for any other testbench. The two packages in `rtl/` and
the reference package must come first on the command line.

Since the S-box contents are stand-ins, the tests show that the structure
matches the algorithm descriptions. They cannot show agreement with the
published test vectors.
