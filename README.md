# Iterative AES-128 encryption/decryption core

This is a compact AES-128 core. It encrypts and decrypts 128-bit blocks under a 128-bit key, following FIPS-197. The aim is small area rather than top speed:

- One 128-bit state register is reused for all ten rounds, so the core computes one full round per clock.
- The S-boxes are lookup tables.
- MixColumns and InvMixColumns are fixed XOR networks, with no general GF(2^8) multipliers and no registers for intermediate products.
- A separate key scheduler expands the key once and keeps all eleven round keys, so any number of blocks can then be encrypted or decrypted without expanding the key again.

```
            key, key_load                        din, mode, start
                 |                                      |
        +--------v---------+   rk_addr (0..10)  +-------v-----------------------+
        |  key_schedule    |<-------------------|  aes_cipher                   |
        |  key_expand_round|                    |   state register (128 b)      |
        |  11 x 128 b RAM  |------------------->|   round counter 1..10         |
        +------------------+   rk (same cycle)  |   enc path: SubBytes,         |
                 |                              |     ShiftRows, MixColumns, ARK|
             key_ready                          |   dec path: InvShiftRows,     |
                                                |     InvSubBytes, ARK, InvMix  |
                                                +-------+-----------------------+
                                                        |
                                                   dout, done
```

## Using the core (`aes128_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_load` | in | 1 | pulse: store `key` and expand it |
| `key` | in | 128 | cipher key |
| `key_ready` | out | 1 | all round keys are stored |
| `start` | in | 1 | pulse: process `din`; taken only while `ready` is high |
| `mode` | in | 1 | `aes_pkg::aes_mode_e`: `MODE_ENC` (0) or `MODE_DEC` (1); sampled with `start` |
| `din` | in | 128 | plaintext or ciphertext |
| `ready` | out | 1 | a key is expanded and no block is running |
| `dout` | out | 128 | result; valid when `done` is high, and held until the next block |
| `done` | out | 1 | one-cycle pulse |

Timing, counted in rising clock edges:

1. Pulse `key_load` on edge 0. On edge 10, `key_ready` goes high.
2. While `ready` is high, raise `start` with `mode` and `din` on edge S. The initial AddRoundKey is applied as the block is loaded.
3. Edges S+1 to S+10 each compute one round. After edge S+10, `done` is high for one cycle and `dout` holds the result.
4. `ready` is high again in that same cycle, so the next block can start on edge S+10. The throughput is one block every 10 cycles in either direction.

Handshake rules:

- A `start` while `ready` is low is ignored. That covers both "no key yet" and "a block is running".
- A `key_load` during a running block is ignored, so the round keys never change under a block.
- A `key_load` at any other time restarts the expansion and drops `key_ready`.

Byte order is that of FIPS-197. The first byte of a block or key is in bits 127:120. State byte *i* is row *i* mod 4, column *i*/4. The FIPS-197 examples therefore apply as written. For example, key `000102…0f` and plaintext `00112233…ff` give `69c4e0d86a7b0430d8cdb78070b4c55a`.

## The round datapath (`aes_cipher`)

The state register holds the state after AddRoundKey. The round counter `round` runs 1..10. Each clock, the register takes one of two results:

- encrypt: `MixColumns(ShiftRows(SubBytes(s))) ^ RK[round]`
- decrypt: `InvMixColumns(InvSubBytes(InvShiftRows(s)) ^ RK[10-round])`

In round 10 the (Inv)MixColumns output is bypassed. This is the only difference of the last round.

The two directions have separate combinational paths: forward and inverse transformations. They share three things: the state register, the round counter and the round-key port. `rk_addr` tells the key memory which key is needed: RK[0] then RK[1..10] when encrypting, and RK[10] then RK[9..0] when decrypting. The memory read is asynchronous, so the key arrives in the same cycle. Decryption uses the straightforward inverse cipher. It does not use the "equivalent inverse cipher", which would need InvMixColumns applied to the round keys.

Within a decryption round, the operations run in the order InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns. Another common description puts the round boundary elsewhere and reads "AddRoundKey, InvMixColumns, InvShiftRows, InvSubBytes". Both give the same sequence of operations.

## MixColumns as an XOR network

Each column `a0..a3` (row 0 first) is multiplied by c(x) = {03}x³ + {01}x² + {01}x + {02} mod x⁴+1. Written out directly, that costs four constant multiplications per output byte. `mix_columns` uses an equivalent factored form instead:

```
t  = a0 ^ a1 ^ a2 ^ a3
bi = ai ^ t ^ xtime(ai ^ a(i+1 mod 4))
```

This holds because {03}x = {02}x ^ x. So b0 = {02}(a0^a1) ^ a1 ^ a2 ^ a3 = a0 ^ t ^ {02}(a0^a1). A column then needs only four `xtime` units ({02} multipliers) and XOR gates. An `xtime` is a one-bit shift that XORs in {1B} when the top bit falls out, which is three XOR gates.

InvMixColumns multiplies by d(x) = {0B}x³ + {0D}x² + {09}x + {0E}:

```
b0 = {0E}a0 ^ {0B}a1 ^ {0D}a2 ^ {09}a3      (b1..b3: rotate the coefficients)
```

`inv_mix_columns` instantiates one `gf_mul_const` per product, 16 per column. A `gf_mul_const` builds a, {02}a, {04}a and {08}a with a chain of three `xtime` units. It then XORs together the multiples picked out by the coefficient's bits: {0D} = {08}^{04}^{01}, {0B} = {08}^{02}^{01}, {09} = {08}^{01} and {0E} = {08}^{04}^{02}. The result is a pure XOR network. Synthesis merges the doubling chains that products of the same input byte share.

## S-boxes

`sbox` and `inv_sbox` are 256 × 8 ROMs indexed by the byte. The table contents are not typed into the source. Constant functions in `aes_pkg` compute them at elaboration:

- `sbox_table()`: S(a) = affine(a⁻¹), where a⁻¹ = a²⁵⁴ in GF(2⁸) mod x⁸+x⁴+x³+x+1 (with 0⁻¹ = 0). The affine map gives bit *i* = bᵢ ⊕ b₍ᵢ₊₄₎ ⊕ b₍ᵢ₊₅₎ ⊕ b₍ᵢ₊₆₎ ⊕ b₍ᵢ₊₇₎ ⊕ c₍ᵢ₎ with c = {63}, indices mod 8.
- `inv_sbox_table()`: the forward table inverted.

So the hardware is a plain table lookup, the same as a typed-in table. The computation only runs in the elaborator, which takes tens of seconds in some tools. `sub_bytes` and `inv_sub_bytes` hold 16 tables each, and `key_expand_round` holds four more. In total the core has 20 forward tables and 16 inverse tables. An area-driven variant could share the forward tables between the round and the key scheduler, since the two never run at the same time. This core keeps them separate for simplicity.

## Key schedule (`key_schedule`, `key_expand_round`)

`key_expand_round` performs one FIPS-197 KeyExpansion step for Nk = 4. It takes the previous round key w0..w3 and the round constant:

```
tmp = SubWord(RotWord(w3)) ^ {rc,00,00,00}
n0 = w0 ^ tmp;  n1 = w1 ^ n0;  n2 = w2 ^ n1;  n3 = w3 ^ n2
```

`key_schedule` runs this step once per clock, starting from the key, and doubles the round constant each step: 01, 02, … 80, 1B, 36. It writes RoundKey[0..10] into an 11 × 128-bit memory. The memory has one write port and one asynchronous read port. Storing all eleven keys costs 1408 bits of memory. In return, decryption can read the keys in reverse with no inverse key schedule, and a key serves any number of blocks after a single 10-cycle expansion. Reset clears the control state, not the memory. `key_ready` guards every read.

## Modules

| module | role |
|---|---|
| `aes_pkg` | types (`byte_t`, `block_t`, `aes_mode_e`), `NR = 10`, the constant functions that compute the S-box tables |
| `aes128_top` | key scheduler + cipher, handshake gating |
| `aes_cipher` | state register, round counter, both round paths |
| `key_schedule` | sequential key expansion, round-key memory |
| `key_expand_round` | one KeyExpansion step |
| `sub_bytes`, `inv_sub_bytes` | 16 (inverse) S-boxes |
| `sbox`, `inv_sbox` | 256-entry ROMs |
| `shift_rows`, `inv_shift_rows` | byte permutations (wiring only) |
| `mix_columns`, `xtime` | MixColumns network and its {02} multiplier |
| `inv_mix_columns`, `gf_mul_const` | InvMixColumns and its fixed-coefficient multipliers |
| `add_round_key` | 128-bit XOR |

Assertions check three invariants:

- the round counter stays within 1..10 while a block runs;
- `done` never coincides with `busy`;
- the top never runs a block without an expanded key.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. They share `tb/aes_ref_pkg.sv`, a behavioural AES written separately from the RTL:

- the state is a byte matrix;
- the S-box is found by searching for the multiplicative inverse;
- products are general shift-and-add multiplies;
- the key expansion is word-based.

The model itself is checked against the FIPS-197 Appendix B and C.1 answers.

Coverage by module:

- The byte-level units (`sbox`, `inv_sbox`, `xtime`, `gf_mul_const` for all four coefficients) are checked exhaustively. `inv_sbox` is also checked against entries of the published inverse S-box table.
- The state transformations are checked on the FIPS-197 Appendix B round-1 intermediate states and on 500 random states each.
- `key_schedule` is checked on the FIPS-197 Appendix A.1 key and 20 random keys. The test also checks the 10-cycle latency and a restart in the middle of an expansion.
- `aes_cipher` is checked on both FIPS-197 examples in both directions and on 60 random blocks. The test also checks the 10-cycle latency, the round-key address sequence and that a start during a running block is ignored.
- `tb_aes128_top` runs the whole core at its only configuration. It checks 27 key expansions and about 170 blocks, including the FIPS-197 examples and round trips through the core. It counts each mechanism (expansion, encryption, decryption, key reuse, back-to-back blocks, start without a key, start while busy, key_load while busy) and fails if one never happens.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes128_top.sv --top-module tb_aes128_top
./obj_dir/Vtb_aes128_top
```

Replace `tb_aes128_top` with any other `tb_<module>` to test one unit.

## How far it follows the original design, and what is its own

The following follows the original description:

- the iterative architecture with a single state register;
- AES-128 only (Nk = 4, Nb = 4, Nr = 10);
- S-boxes as pre-calculated lookup tables;
- MixColumns built from {02} fixed-coefficient multipliers and XORs;
- InvMixColumns built from fixed {0D}/{0B}/{09}/{0E} XOR multipliers;
- a separate key-scheduling module that produces all eleven round keys;
- decryption with the round keys in reverse order.

The original gives no gate-level drawings of the multipliers that could be reused here. So the following are this core's own choices, each a plain reading of what AES requires:

- the exact XOR factoring of the two mixing networks;
- one round per clock;
- storing the round keys in a memory rather than computing them on the fly;
- the separate encryption and decryption paths;
- every handshake, reset and latency detail.

The original reports neither area, clock rate, latency nor throughput figures that could be compared. The 10-cycle block latency and 10-cycle key expansion are properties of this implementation only. The original was prototyped on an Altera APEX20KC FPGA. This RTL is generic, with no device-specific primitives, and has not been timed or fitted on any device.

Not supported: AES-192 and AES-256. The algorithm allows them, but the design is fixed at 128-bit keys. There are no block-cipher modes (CBC, CTR, …): the core processes single blocks.
