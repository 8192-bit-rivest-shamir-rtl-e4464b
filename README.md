# 8192-bit RSA coprocessor with bit-level Montgomery multiplication

RSA encryption and decryption are the same operation: a modular
exponentiation `y = x^k mod n`. The public exponent `e` is used to encrypt and
the private exponent `d` to decrypt. At 8192 bits every multiplication
works on numbers 8192 bits long. A software loop is too slow for this, and a
full-width divider for the `mod` is too large to build. This core avoids
division altogether. It uses radix-2 Montgomery multiplication, which handles
one bit of the multiplier per clock. The partial result is kept in
carry-save form, so no carry ripples across 8192 bits inside the loop. Every
clock costs the delay of two full adders, whatever the key size.

Everything is parameterised by the key size. The default is 8192 bits, and
the same source builds 128-bit and 1024-bit cores. A core also accepts any
odd modulus smaller than its width: an 8192-bit core runs 1024-bit keys
unchanged.

## Structure

```
rsa_coprocessor            key registers (n, e, d), request register, encrypt/decrypt select
 └─ rsa_modexp             state machine for right-to-left binary exponentiation
     ├─ mont_r2            R^2 mod n by modular doubling (R = 2^KEY_BITS)
     ├─ mont_mult u_mm_sq  Montgomery multiplier: squares
     │   └─ carry_save_adder x2
     └─ mont_mult u_mm_mul Montgomery multiplier: multiplies into the accumulator
         └─ carry_save_adder x2
rsa_pkg                    default key size, state-machine enum
```

All files are in `rtl/`, one module or package per file.

## The Montgomery multiplier (`mont_mult`)

`mont_mult` returns `a*b*2^-N mod m`, where `N` is the parameter `N_BITS`
and `m` is odd. The sum `T` is held as two registers, `S` and `C`, with
`T = S + C`. The multiplier `a` is shifted out least-significant bit first,
and each clock does one step:

1. `q = S[0] ^ C[0] ^ (a_i & b[0])`. This is the parity of `T + a_i*b`.
2. A first carry-save row adds `a_i*b` to `S + C`.
3. A second row adds `q*m`. Since `m` is odd, this makes the total even.
4. The new sum vector is shifted right by one bit, which is the division by
   2. The new carry vector is kept as it is, because halving cancels its
   weight of 2.

If `T < 2m` before a step, it is still below 2m after it. This holds
whenever `b < m`, so `S` and `C` need only `N+2` bits. An assertion checks
that the sum's low bit is zero at every step. After `N` steps, one more clock
adds `S + C` with a single carry-propagate adder. It subtracts `m` once if
the sum is at least `m`. The result is therefore fully reduced (`< m`) and
can be fed straight back in.

Timing: `start` is sampled on a clock edge, and `done` pulses `N+1` clocks
later. `a` and `b` are captured at `start`. `m` is not captured and must stay
stable while `busy` is high.

The one wide carry-propagate adder and comparator in the final clock are the
timing-critical path at 8192 bits. The loop itself has no long path. On an
FPGA, or at a high clock rate, the final step can be pipelined over a few
clocks without changing anything else.

## Exponentiation (`rsa_modexp`)

The state machine (`modexp_state_e` in `rsa_pkg`) runs these steps:

| state | work | clocks |
|---|---|---|
| `ME_R2` | `mont_r2`: `x=1`, then 2N times `x = 2x (- m)` | 2N + 1 |
| `ME_TO_MONT` | `S = X*R mod m` and `A = R mod m`, on both multipliers at once | N + 2 |
| `ME_LOOP_ISSUE`/`ME_LOOP_WAIT` | per exponent bit: `S = S*S` always; `A = A*S` when the bit is 1, at the same time | N + 3 per bit |
| `ME_FROM_MONT` | `A*1*R^-1` gives `X^E mod m` | N + 2 |

The exponent is scanned from its least significant bit. Because of this, the
square and the conditional multiply in each step are independent, and the two
multipliers run side by side: a step costs one multiplication time whether its
bit is 0 or 1. The loop stops as soon as the bits not yet scanned are all
zero. A short public exponent therefore costs only its own length.

Latency of `rsa_modexp`, from the `start` clock to `done`:
`4N + 6 + L*(N + 3)` clocks, where `L` is the bit length of the exponent.
`rsa_coprocessor` adds one clock for its request register.

| key | exponent | clocks (`rsa_coprocessor`, start to done) |
|---|---|---|
| 8192 | 65537 (17 bits) | 172,090 |
| 8192 | full 8192-bit `d` | 67,168,775 |
| 1024 | full 1024-bit `d` | 1,055,751 |
| 128 | full 128-bit `d` | 17,287 |

A throughput of about 3.4 kbit/s for 8192-bit blocks with full-length
exponents needs a clock of roughly 28 MHz (8192 bits per 67.2 M clocks). No
clock rate has been established for this RTL.

The base may be larger than the modulus; the conversion into the Montgomery
domain reduces it. An exponent of 0 gives `1 mod n`. The modulus must be odd
and greater than 1. This is not checked in hardware.

## Host interface (`rsa_coprocessor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `key_load` | in | 1 | write `key_n`, `key_e`, `key_d` (only when not busy); sets `key_valid` |
| `key_n`, `key_e`, `key_d` | in | KEY_BITS | modulus, public and private exponent |
| `start` | in | 1 | begin one operation (only when not busy and `key_valid`) |
| `decrypt` | in | 1 | sampled with `start`: 0 uses `e`, 1 uses `d` |
| `data_in` | in | KEY_BITS | message or ciphertext block |
| `key_valid` | out | 1 | a key has been loaded |
| `busy` | out | 1 | an operation is in progress |
| `done` | out | 1 | one-clock pulse; `data_out` is valid from then on |
| `data_out` | out | KEY_BITS | result, held until the next result |

Requests made while the core is busy are ignored, and so is `start` before a
key has been loaded. Key generation is outside the core.

## What comes from where

The overall method is the basis of this design. It consists of RSA as one
modular exponentiation for both directions, binary exponentiation, and
radix-2 bit-level Montgomery multiplication with carry-save adders, with the
key size as a parameter and 8192 bits as the target. The following are
choices made for this RTL, not taken from a published
microarchitecture:

- Right-to-left scanning with two multipliers. Left-to-right scanning with
  one multiplier is the main alternative. It would use half the multiplier
  area and take on average 1.5 multiplication times per exponent bit instead
  of 1.
- The step structure of the multiplier: two carry-save rows per bit, and one
  final clock for the carry-propagate addition and the subtraction.
- Computing `R^2 mod n` on chip (`mont_r2`, 2N clocks per operation). A host
  that knows `R^2 mod n` could skip it, but the core has no port for that.
- The early stop of the exponent loop.
- The host interface: full-width ports, a key register file, and
  start/busy/done handshakes.
- No Chinese-remainder decryption and no protection against side channels.
  The run time depends on the bit length of the exponent, although not on the
  values of its bits.

The full-width ports suit use as an on-chip block. A stand-alone device would
need a word-serial bus around the key and data registers.

## Verification

Each testbench in `tb/` checks against a reference computed independently in
the testbench. Each ends with a `TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `carry_save_adder_tb` | 130-bit row: `x+y+z == sum + 2*carry`, and bitwise full-adder outputs |
| `mont_mult_tb` | N=96: `result < m` and `result*2^N == a*b (mod m)`, for full and short moduli and corner operands; latency N+1 |
| `mont_r2_tb` | N=80: `r2 == 2^(2N) mod m`; latency 2N |
| `rsa_modexp_tb` | N=64: against square-and-multiply with `%`; exponents 0, 1, 2, 3, 65537, all ones, random lengths; latency formula |
| `rsa_coprocessor_tb` | K=64: real key pairs (textbook 3233/17/2753, and a 64-bit key built from two 32-bit primes); encrypt → decrypt round trips, ignored requests, message ≥ n; counts that every mechanism occurred |
| `rsa_keysize_tb` | cores built for 128 and 1024 bits, full-length random exponents, against a shift-and-add reference |
| `rsa_coprocessor_full_tb` | default 8192-bit core, no parameter overrides: one encryption with e = 65537 (172,090 clocks, about 2 s of simulation) |

No 8192-bit operation with a full-length private exponent has been
simulated. It takes 67 M clocks, about 12 minutes in Verilator at the
roughly 90,000 clocks per second measured for the default core. The largest
full-length runs are the 1024-bit ones in `rsa_keysize_tb`.

To run a testbench with Verilator (the package goes first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/rsa_pkg.sv rtl/carry_save_adder.sv rtl/mont_mult.sv rtl/mont_r2.sv \
  rtl/rsa_modexp.sv rtl/rsa_coprocessor.sv \
  tb/rsa_coprocessor_tb.sv --top-module rsa_coprocessor_tb -Mdir obj -o sim
./obj/sim
```

For `rsa_keysize_tb`, also add `tb/rsa_keysize_run.sv`. The simulator has
only two states, so all state that is read is reset by `rst_n`.

## Changing it

- Key size: `KEY_BITS` on `rsa_coprocessor`, or `N_BITS` on the
  submodules. Sizes from 64 to 8192 bits have been simulated. Area grows
  linearly: two multipliers of about `4N` flip-flops and `2(N+3)` full adders
  each, `mont_r2` with `N` flip-flops, plus ten N-bit registers in
  `rsa_modexp` and `rsa_coprocessor`.
- To use one multiplier, make `u_mm_mul` do the squaring in a second pass of
  the loop. This halves the multiplier area and doubles the loop time.
- The wide final adder in `mont_mult` is the place to pipeline for a faster
  clock. If it is given `P` clocks, every latency above grows by `P - 1` for
  each multiplication.
