# Hybrid AES-128 / RSA encryption link

A message is encrypted with a fast symmetric cipher (AES-128) under a
session key, and only that 128-bit session key is encrypted with the slow
public-key cipher (RSA). Whoever holds the RSA private key can unwrap the
session key and then decrypt the message. This repository holds synthesizable
SystemVerilog for both sides of such a link on one chip: a sender that
encrypts a block and wraps its key, and a receiver that unwraps the key and
decrypts the block.

```
            aes_key ─────────────┬──────────────┐
                                 │              │ (RSA data)
 data_in ──► AES encrypt ◄───────┘        RSA  X^E mod M ◄── public_key, modulus
                 │                              │
            cypher_text                    cypher_key            (the link)
                 │                              │
                 ▼                              ▼
            AES decrypt ◄──── key' ──── RSA  X^D mod M ◄── private_key, modulus
                 │
          original_data
```

The top module is `crypto_system`. It contains four engines, two per side:
`aes_core` (encrypt) and `rsa_modexp` (public exponent) for the sender,
`rsa_modexp` (private exponent) and `aes_core` (decrypt) for the receiver.

## Using the top module

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous, active-high reset |
| `ds1` | in | 1 | one-clock pulse: start the sender |
| `ds2` | in | 1 | one-clock pulse: start the receiver (after `done1`) |
| `aes_key` | in | 128 | session key; must be below `modulus` |
| `data_in` | in | 128 | plaintext block |
| `public_key`, `private_key`, `modulus` | in | `RSA_BITS` | E, D, M of an RSA key pair |
| `cypher_text` | out | 128 | AES ciphertext |
| `cypher_key` | out | `RSA_BITS` | `aes_key^E mod M` |
| `original_data` | out | 128 | recovered plaintext |
| `done1`, `done2` | out | 1 | sender / receiver finished (levels, cleared by the next start) |

`ds1` starts the sender's AES encryption and RSA key wrap together; `done1`
rises when both are finished, 17,551 clocks later (the RSA part dominates;
the AES part takes 22). `ds2` starts the receiver's RSA unwrap; the clock in
which it finishes also starts the receiver's AES decryption, and `done2`
rises 17,551 + 22 clocks after `ds2`. The receiver reads `cypher_text` and
`cypher_key` straight from the sender's output registers, so assert `ds2`
only once `done1` is high.

`RSA_BITS` (default 128) is the RSA key length. At 128 the RSA operand is
exactly as wide as the AES key it carries. The RSA unit is parameterised and
has been simulated at 1024 bits; the top passes `aes_key` to it truncated or
zero-extended to `RSA_BITS`, so `RSA_BITS` must be at least 128.

Key generation is not part of the hardware: the session key and the RSA key
pair (primes p and q, M = p·q, E with gcd(E, (p-1)(q-1)) = 1,
D = E⁻¹ mod (p-1)(q-1)) are supplied at the ports.

## AES engine (`aes_core`)

AES-128, 10 rounds, one round per clock on a 128-bit datapath with a single
round unit shared by both directions.

Schedule after a `ds` pulse:

1. 10 clocks: `aes_key_schedule` expands the key and stores all 11 round
   keys in an 11 × 128-bit register array.
2. 1 clock: initial AddRoundKey.
3. 10 clocks: rounds 1–10; round 10 skips (Inv)MixColumns.

`ready` rises 22 clocks after the clock in which `ds` was high and holds
`data_out` until the next `ds`. A `ds` during a run restarts the engine.

### Decryption in encryption order

The textbook inverse cipher applies the inverse steps in reverse order
(InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns). This design uses
the rearranged ("equivalent") form instead, so that a decryption round has
the same shape as an encryption round:

```
encrypt round:  SubBytes    → ShiftRows    → MixColumns    → ⊕ K[r]
decrypt round:  InvSubBytes → InvShiftRows → InvMixColumns → ⊕ InvMixColumns(K[10-r])
```

Two facts make this legal: InvSubBytes works byte by byte, so it commutes
with InvShiftRows; and InvMixColumns is linear, so
InvMixColumns(S ⊕ K) = InvMixColumns(S) ⊕ InvMixColumns(K). The price is paid
in the key schedule. When it is started with `dec = 1` it stores round keys
1–9 after an InvMixColumns step (keys 0 and 10 stay plain), and the core
reads them from index 10 down to 0. Because both directions now run
substitution, then row shift, then column mix, then key addition, a single
`aes_round` with an `inv` select does both. Its substitution and row-shift
steps act as one combined stage.

### Byte order and S-box

The 128-bit vector holds the state column by column, as in FIPS-197: bits
127:120 are s[0,0], the next byte is s[1,0], and byte 4c+r is s[r,c]. The
S-box is not a stored table. `aes_pkg::sbox` computes it from its
definition: the multiplicative inverse in GF(2⁸), taken as x²⁵⁴ with seven
squarings and six multiplications, followed by the affine map. The inverse
S-box applies the inverse affine map first, then the GF inverse. Rcon is
computed by repeated doubling in GF(2⁸).

## RSA engine (`rsa_modexp`, `mont_mult`)

`rsa_modexp` computes `cypher = indata^inexp mod inmod` with right-to-left
binary exponentiation on Montgomery products. The same unit encrypts
(exponent E), decrypts (D), signs (D) or verifies (E).

### The Montgomery product

`mont_mult` is bit-serial, radix 2, one multiplicand bit per clock:

```
P = 0
for i = 0 .. N+2:              (N+3 iterations; N = modulus width)
    q = P[0]
    P = (P + q·M) / 2 + a_i·B
result = P ≡ A·B·2^-(N+2)  (mod M),   0 ≤ result < 2M
```

Note the order: the division by two comes before the addition of a_i·B. The
multiplicand is thus consumed from its least significant bit, and the
result carries the factor R⁻¹ with R = 2^(N+2). As long as A < 2M and B < 2M,
the top two multiplicand bits are zero, so the last two iterations only
halve. That brings P, which can reach 5M inside the loop (hence an N+3-bit
register), back below 2M. Results can therefore be fed back as operands
without a subtraction. M must be odd.

### Exponentiation

```
R2     = R² mod M                       (2N+4 clocks, shift-and-subtract)
root   = MonMult(1, R2)      square = MonMult(X, R2)       } in parallel
for i = 0 .. N-1:
    temp = MonMult(root, square)   square = MonMult(square, square)   } in parallel
    if e_i = 1: root = temp
cypher = MonMult(root, 1), then minus M if ≥ M
```

Two `mont_mult` instances, a multiplier and a squarer, run side by side and
are started together. The controller waits until both report ready. Every
exponent bit costs one product time whether it is 0 or 1, so the run time
does not depend on the exponent. Latency from `ds` to `ready`:

    2N + 5 + (N+2)(N+5) clocks  =  17,551 at N = 128,  1,057,944 at N = 1024

R² mod M is computed on chip, so only X, the exponent and M have to be
supplied. The closing comparison against M is this design's own addition: the last
product is only guaranteed to be below 2M, not below M.

## What follows the source and what is this design's choice

Taken from the system description:

- the four-engine structure;
- AES-128 with 10 rounds and the round contents;
- the rearranged decryption with the modified key generation;
- the right-to-left exponentiation algorithm with paired multiply and
  square;
- the radix-2 Montgomery recurrence with N+3 iterations;
- the 128-bit RSA size of the reference simulations;
- the signal names `ds`, `ready`, `indata`, `inexp`, `inmod`, `cypher`,
  `mpand`, `mplier`, `modulus`, `product` and the top-level names.

Choices made here:

- the iterative one-round-per-clock AES datapath;
- expanding all round keys before a block is processed, and storing them;
- computing the S-box rather than storing it;
- the `ds`/`ready` handshake and the meaning of `ds` as a start pulse;
- synchronous reset;
- computing R² mod M on chip;
- the final subtraction;
- automatic chaining of the receiver's RSA into its AES;
- the `modulus` and `done2` ports.

Where the source disagrees with itself:

- **Which key the sender's AES uses.** The system diagram labels the input
  of the sender's AES as the RSA-encrypted output. The prose says the
  message is encrypted with the session key and the key is then wrapped by
  RSA, and only that reading lets the receiver decrypt. The design follows
  the prose. The published end-to-end example supports this: for key =
  block = 00112233445566778899aabbccddeeff, its ciphertext is
  62f679be2bf0d931641e039ca3401bb2, the AES-128 encryption of the block
  under the plain key.
- **The RSA key length.** A 1024-bit RSA key length is named as well. The
  default follows the 128-bit example, and `RSA_BITS`/`N` can be raised.

Not built: key generation (session keys and RSA key pairs), the hosts at
either end of the link, and further units (ECC, SHA-1, LZSS compression)
that the source names only in passing. The conclusion speaks of "switching"
between AES and RSA. Here both engines of a side run at the same time, since
each side needs both; no shared-engine mode exists.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_aes_sub_bytes` | published S-box entries; all 256 values: permutation, no fixed points, inverse |
| `tb_aes_shift_rows` | FIPS-197 step; random states against a 4×4-matrix model; inverse |
| `tb_aes_mix_columns` | published columns; random states against an independent xtime model; inverse |
| `tb_aes_add_round_key` | FIPS-197 step; bitwise XOR; self-inverse |
| `tb_aes_round` | FIPS-197 round 1; final round; inverse rounds by algebraic identities |
| `tb_aes_key_schedule` | FIPS-197 A.1 round keys 0, 1, 2, 10; decryption keys via MixColumns; 10-clock expansion |
| `tb_aes_core` | FIPS-197 Appendix B and C.1 both ways; 20 random round trips; 22-clock latency |
| `tb_mont_mult` | A·B ≡ P·2^(N+2) mod M with wide arithmetic; P < 2M; edge operands; N+3 iterations |
| `tb_rsa_modexp` | 128-bit key pair: known ciphertext, decrypt, exponents 0 and 1, random exponents against a square-and-multiply model; latency |
| `tb_rsa_1024` | 1024-bit key pair: encrypt a session key, decrypt it; latency |
| `tb_crypto_system` | five full send/receive transfers at default size: FIPS ciphertext, known wrapped keys, recovered key and data, `done1`/`done2` latencies; counts AES encryptions and decryptions, RSA wraps and unwraps, exponent bits 0 and 1, RSA-to-AES hand-overs, and fails if any never happened |

The RSA test keys were generated for these tests: M = p·q with 64-bit
(respectively 512-bit) primes, E = 65537.

`mont_mult` also carries an assertion that a finished product is below 2M,
and `crypto_system` one that `ds2` only arrives while `done1` is high.

## Simulating

With Verilator 5, from the repository root. Modules are found in `rtl/` by
file name; the package is named first:

```
verilator --binary --timing --assert -y rtl rtl/aes_pkg.sv \
          tb/tb_crypto_system.sv --top-module tb_crypto_system
./obj_dir/Vtb_crypto_system
```

Replace the testbench file and top name for any other test. The end-to-end
test runs in about a second; `tb_rsa_1024` takes a few seconds.

## Files

- `rtl/aes_pkg.sv`: state types, GF(2⁸) arithmetic, S-box, (Inv)MixColumns
  column functions, Rcon.
- `rtl/aes_sub_bytes.sv`, `aes_shift_rows.sv`, `aes_mix_columns.sv`,
  `aes_add_round_key.sv`: the four AES transformations, each with an
  inverse select where one exists.
- `rtl/aes_round.sv`: one round built from them.
- `rtl/aes_key_schedule.sv`: key expansion and round-key store.
- `rtl/aes_core.sv`: the AES engine.
- `rtl/mont_mult.sv`, `rtl/rsa_modexp.sv`: the RSA engine.
- `rtl/crypto_system.sv`: the top-level link.
