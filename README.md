# Dynamic-key RC4 stream cipher with a Toeplitz-hash key generator

A plain RC4 stream cipher uses one fixed secret key for as long as it runs.
This design replaces the fixed key with a **dynamic key**. A public key byte
goes through an LFSR-based Toeplitz hash, and the hash values become the RC4
key. Every `REKEY_BYTES` data bytes the unit makes a new key and runs the RC4
key scheduling again. The hash LFSR is never reset between hash
computations, so the new key differs from the old one even when the public key
stays the same. Encryption and decryption are the same operation
(`C = P ^ K`, `P = C ^ K`). A receiver built from the same unit and given the
same public key produces the same key stream, byte for byte.

```
 public key ──► Toeplitz hash ──► key box (16 B) ──► RC4 (S-box 256 B) ──► K
                 (LFSR + MAC)                                             │
 data in ───────────────────────────────────────────────────────────────► XOR ──► data out
```

All data paths are 8 bits wide. The defaults are a 256-entry S-box, a 16-byte
key and a rekey every 256 bytes.

## The Toeplitz hash (`toeplitz_hash`, `toeplitz_lfsr`, `hash_mac`)

The hash is the GF(2) product of an 8×8 binary Toeplitz matrix `T` and the
8 message bits `m`: `h[r] = XOR over c of T[r][c] & m[c]`. A Toeplitz matrix
is constant along its diagonals. It is therefore fully defined by
`8 + 8 − 1 = 15` bits, and those bits come from an LFSR:

* **Sequence.** The seed is `a0..a7 = 0 1 0 1 0 0 1 0`. Each new element is
  `a(k+8) = a(k+6) ^ a(k+5) ^ a(k+4) ^ a(k)`. This recurrence belongs to the
  polynomial `g(y) = y^8 + y^4 + y^3 + y^2 + 1`, taken in its reciprocal tap
  form. The first 15 elements are `0 1 0 1 0 0 1 0 1 0 0 0 1 0 0`. The
  sequence has the maximal period of 255.
* **Matrix.** `T[r][c] = a(7 − r + c)`. Row 7 is `a0..a7` and row 0 is
  `a7..a14`. Each column is the previous column moved down one row, with the
  next sequence element on top. So the 8-bit LFSR window, read in reverse bit
  order, *is* the current column, and each clock moves on to the next one.
* **Bit-serial product.** The public key is shifted right, least significant
  bit first, so key bit `c` multiplies column `c`. The column is ANDed with
  the message bit, and the product is XOR-accumulated into 8 flip-flops
  (`hash_mac`). A 3-bit control counter marks the 8th column. On that column
  the finished sum is loaded into the output register and `hash_valid`
  pulses. This gives one hash every 8 enabled clocks.
* **Worked example.** After reset, public key `8'hF3` (message bits
  `m0..m7 = 1 1 0 0 1 1 1 1`) hashes to `8'h68` (`h7..h0 = 0 1 1 0 1 0 0 0`).

**Why the LFSR is not reset.** If the LFSR were reloaded for every hash, a
constant public key would always give the same hash value. Here the window
keeps moving: the n-th hash uses sequence elements `a(8n) .. a(8n+14)`. The
hash only advances while `en` is high. The hash sequence therefore depends on
how many hashes were taken, not on clock timing. That is what keeps a
transmitter and a receiver in step.

## RC4 (`rc4_keystream`, `rc4_sbox`, `key_box`)

This is textbook RC4 over a 256-entry S-box of bytes, with a key of
`KEY_LEN` bytes (`L[i] = key[i mod KEY_LEN]`). The datapath registers are:

* the index counter `i`;
* `j_register`;
* `si_register`, which holds S[i];
* `t_register`.

A 2:1 multiplexer feeds an adder chain `j + mux + S[i]`. During key setup the
multiplexer passes `L[i mod KEY_LEN]`, and during generation it passes 0. A
separate adder forms `t = S[i] + S[j]`. A 4-bit counter walks the key box
index (`i mod 16`). The S-box has three read ports: S[i], S[j] and S[t]. A
swap writes both entries in one clock.

| phase | per step | clocks |
|---|---|---|
| INIT: `S[i] = i` | 1 | M = 256 |
| KSA: `j += S[i] + L[i]`, then swap | 2 | 2M = 512 |
| PRG: `j += S[i]`; swap and `t = S[i]+S[j]`; `K = S[t]`, `i++` | 3 (+1 hand-over) | 4 per byte |

The first key-stream byte is offered `3·M + 3` clocks after `start`. After
that, one byte is ready every 4 clocks, as long as the consumer takes each byte
at once. The RC4 test vector for the key `"Key"` (`EB 9F 77 81 B7 34 CA 72 A7
19`) is reproduced (`KEY_LEN = 3` instance in `tb_rc4_keystream`).

## One cipher unit (`dks_cipher`) and the link (`dks_top`)

`dks_cipher` cycles through three states:

1. **FILL.** The hash runs for exactly `KEY_LEN × 8` = 128 clocks. Each of
   the 16 hash values is written into the key box.
2. **SCHED.** RC4 initialisation and key setup run, up to the first
   key-stream byte.
3. **RUN.** Each data byte on `din` is XORed with one key-stream byte. After
   `REKEY_BYTES` bytes the unit goes back to FILL.

During FILL and SCHED, `din_ready` is low and `rekeying` is high. One rekey
holds off the data for exactly `KEY_LEN·8 + 3·M + 5` = **901 clocks** at the
defaults. The public key is sampled at the first column of each hash, so a new
public key takes effect at the next rekey.

`dks_top` is a complete link. A transmitter unit encrypts `plain_in`. Its
output `cipher_out` is visible at the top, and it goes straight into a
receiver unit that decrypts it to `plain_out`. Both units see the same
`pub_key`, so they rekey after the same byte count with identical keys.

**Interfaces.** All data ports are valid/ready pairs: a byte moves on a clock
edge where valid and ready are both high. Reset is synchronous and active low
(`rst_n`). The S-box has no reset, because it is initialised before every use.
Throughput in RUN is one byte per 4 clocks.

## Choices beyond the original description

The original description gives the algorithms, the hash polynomial and seed,
the block structure (hash → key box → RC4 → XOR) and 8-bit data. The
following are this design's own choices:

* **Rekey period.** The description only says the key is replenished "every
  n cycles". Here `n` is counted in data bytes, and the default is 256.
* **Key length.** 16 bytes, the top of the usual 5–16 byte RC4 range. The
  key box is filled with 16 successive hash values. This length is confirmed
  by the original worked example (see below). Of the lengths 1 to 16, only 16
  reproduces it.
* **S-box size and arithmetic.** Bytes, modulo 256. One of the original
  flow charts writes the index arithmetic "mod 8". With 8 entries the key
  stream could only take the values 0–7, which contradicts the 8-bit
  key-stream, so that reading was not followed.
* **Bit order of the hash.** Least significant key bit first, hash bit `r` =
  matrix row `r`. This is the only order that reproduces the published hash
  example. That example's printed message column (`1 0 1 0 1 1 1 1`)
  disagrees with its message text (`11001111`); the text was followed.
* **No separate `sj` register.** S[j] is added straight from the S-box read
  port.
* **Timing and control.** The handshakes, the cycle-level timing, the
  one-clock swap and the output register on the XOR are all this design's
  own.

**Worked example.** Take public key `00001111` and plaintext `00011011`.
The first key after reset is the 16 hash values `29 F5 5C 18 AC CB F7 9B B9
52 89 68 CE 78 D8 45`. RC4 with that key produces `01111100` as its first
key-stream byte, so the ciphertext is `01100111`. The receiver turns it back
into `00011011`. These are the published encryption and decryption results,
and `tb_dks_example` checks them through the whole link. The result depends
jointly on four choices: the 16-byte key, the bit order, the LFSR tap form,
and the LFSR that keeps running between hashes.

**Known departure.** The original encryption module was reported at 77
flip-flops and 75 LUTs. That size cannot hold a 256-byte S-box. One
`dks_cipher` here synthesises to about 113 flip-flops plus 2,176 memory bits
(S-box and key box). That still fits easily in a small FPGA such as the
XC7Z020.

## Files

| file | content |
|---|---|
| `rtl/dks_pkg.sv` | shared types, LFSR seed and taps, state enums |
| `rtl/toeplitz_lfsr.sv` | hash LFSR, one matrix column per clock |
| `rtl/hash_mac.sv` | AND and XOR-accumulate stage |
| `rtl/toeplitz_hash.sv` | bit-serial hash with control counter and output register |
| `rtl/key_box.sv` | 16-byte key register file |
| `rtl/rc4_sbox.sv` | 256-byte S-box with 3 read ports and a one-clock swap |
| `rtl/rc4_keystream.sv` | RC4 controller and datapath |
| `rtl/xor_cipher.sv` | XOR combiner |
| `rtl/dks_cipher.sv` | one encrypt/decrypt unit with rekeying |
| `rtl/dks_top.sv` | transmitter and receiver linked |
| `tb/dks_ref_pkg.sv` | reference models: LFSR sequence, Toeplitz hash, RC4 |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at full default size runs 700 bytes through
three key periods, with a public-key change each period:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dks_pkg.sv tb/dks_ref_pkg.sv tb/tb_dks_top.sv --top-module tb_dks_top -o sim
./obj_dir/sim
```

Replace `tb_dks_top` with any other `tb_*` to test one block. What each test
covers:

* **`tb_dks_top`** checks every cipher byte against the reference key
  stream, and every recovered byte against the plaintext. It also counts
  rekeys on both ends, sender stalls, receiver back-pressure and public-key
  changes, and fails if any of them never happened.
* **`tb_dks_example`** runs the worked example above through the whole
  link.
* **`tb_dks_cipher`** checks the 901-clock rekey stall, using a 20-byte rekey
  period.
* **`tb_toeplitz_lfsr`** checks the 15-bit sequence, the 8×8 matrix and the
  255-step period.
* **`tb_toeplitz_hash`** checks the worked example and random keys with
  random enable gaps.

To change the configuration, set the parameters `M` (a power of two, at
most 256), `KEY_LEN` and `REKEY_BYTES` on `dks_top` or `dks_cipher`.
