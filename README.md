# Low-latency RSA with radix-16 Montgomery exponentiation

RSA encryption and decryption both come down to one operation:
modular exponentiation, `y = x^k mod N`, with a 256-bit modulus `N`. Done
directly, every step needs a 512-by-256-bit division. This design avoids
division altogether. It uses Montgomery multiplication, where reduction
modulo `N` becomes a series of additions and shifts. It speeds that
multiplication up by consuming the multiplier four bits per clock (radix 16)
instead of one. A 256-bit Montgomery product therefore takes 64 digit steps
instead of 256. Each step adds two precomputed multiples read from small
lookup tables.

The top level is an RSA cipher unit. It holds one key: the modulus `N`, the
public exponent `e`, the private exponent `d`, and the constant `R^2 mod N`.
It encrypts (`x^e mod N`) or decrypts (`x^d mod N`) one 256-bit block per
request.

```
 rsa_top            key registers N, e, d, R^2 mod N; encrypt/decrypt select
  └─ mod_exp        left-to-right square-and-multiply, Montgomery domain in/out
      └─ mont_mult  radix-16 Montgomery multiplier, one 4-bit digit per clock
          ├─ mult_table (k*B, k = 0..15)
          └─ mult_table (k*N, k = 0..15)
 mont_pkg           default sizes, key-register enum, -N^-1 mod 2^k helper
```

## The radix-16 Montgomery multiplier (`mont_mult`)

With `R = 2^W` (`W = 256`), the Montgomery product of `a` and `b` is
`MM(a, b) = a*b*R^-1 mod N`. `N` must be odd. The multiplier splits `a`
into `W/4 = 64` hexadecimal digits `a_0 … a_63`, least significant first,
and keeps a running sum `S`, which starts at 0. Each clock it does one step:

```
T   = S + a_i*B
q_i = (T mod 16) * (-N^-1 mod 16) mod 16
S   = (T + q_i*N) / 16
```

`q_i` is chosen so that `T + q_i*N` is divisible by 16. Dividing by the
radix is then just dropping four zero bits, and no remainder is ever
discarded. After 64 steps, `S*R ≡ a*b (mod N)`.

**Why the sum stays small.** Suppose `S < 2N` before a step. Then
`T + q_i*N < 2N + 15N + 15N = 32N`. After dividing by 16, `S < 2N` again. So
the sum never needs more than `W+5` bits; the RTL carries `W+RB+2 = 262`
bits. At the end, `S` is below `2N`, and a single conditional subtraction
(`S >= N ? S-N : S`) produces a fully reduced result. This bound needs
`a*b < R*N`, which holds whenever both operands are below `N`, and also when
one of them is any `W`-bit value and the other is below `N`.

**Lookup tables instead of multipliers.** The products `a_i*B` and `q_i*N`
involve a 4-bit digit and a 256-bit operand. Rather than build 4×256
multipliers, the design keeps two 16-entry tables of multiples
(`mult_table`). One holds `0, B, 2B, …, 15B`; the other holds
`0, N, 2N, …, 15N`. A digit step is then two table reads and two wide
additions. The tables are filled at the start of every multiplication,
one entry per clock, by adding the operand to the previous entry, so the
fill costs one adder and 15 clocks. Both tables fill in parallel. A larger
radix means fewer steps but larger tables: 2^RB entries each.

**The quotient constant.** `-N^-1 mod 16` is not an input. It is computed
inside `mont_mult` from the low bits of `N` by a few Newton iterations
(`mont_pkg::neg_inv_mod2k`). The result is constant for a given key, so
synthesis sees a small piece of combinational logic.

**Critical path.** Within one step the path is: read `a_i*B`, add it to `S`,
take the 4×4-bit quotient product from the low bits, read `q_i*N`, and add
again. That is two table multiplexers and two 262-bit adders in series. The
design adds no pipelining or carry-save arithmetic.

**Timing.** A one-cycle `start` (while `busy` is low) samples `a`, `b` and
`n`. `done` pulses `2^RB + W/RB + 1` cycles after the start edge: 15 cycles
of table fill, 1 hand-over cycle, 64 digit steps and 1 subtraction cycle,
81 cycles in all. `p` holds until the next result.

## Exponentiation (`mod_exp`)

One multiplier is reused for every step of a binary square-and-multiply
that scans the exponent from its most significant bit down:

1. `xm = MM(x, R^2 mod N) = x*R mod N`. This puts the base into Montgomery
   form.
2. Scan the exponent from bit `W-1` downwards. Each leading zero bit costs
   one clock. The first one bit sets the accumulator to `xm` without
   multiplying.
3. For each remaining bit: square (`acc = MM(acc, acc)`), and when the bit
   is one also multiply (`acc = MM(acc, xm)`).
4. `y = MM(acc, 1)`. This converts back to ordinary form, and the final
   subtraction leaves `y < N`.

An all-zero exponent returns 1. Each multiplication step costs
`M = 2^RB + W/RB + 3` clocks (83 at the defaults): one to issue it, 81 in
the multiplier and one to take the result. Let `h` be the position of the
exponent's top one bit and `k` the number of one bits below it. Then `done`
arrives `M*(2 + h + k) + (W - h)` clocks after the start edge.

`R^2 mod N` has to be supplied with the key. It depends only on `N`, so
compute it in software once per key, as `2^(2W) mod N`.

## The cipher unit (`rsa_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_we` | in | 1 | write `key_data` into the register selected by `key_sel` |
| `key_sel` | in | `mont_pkg::key_sel_e` | `KEY_N`=0 modulus, `KEY_E`=1 public exponent, `KEY_D`=2 private exponent, `KEY_R2`=3 `R^2 mod N` |
| `key_data` | in | KEY_BITS | key register data |
| `start` | in | 1 | begin one operation; ignored while `busy` |
| `decrypt` | in | 1 | sampled with `start`: 0 uses `e`, 1 uses `d` |
| `data_in` | in | KEY_BITS | message or ciphertext, must be below `N` |
| `busy` | out | 1 | operation in progress; key writes are ignored meanwhile |
| `done` | out | 1 | one-cycle pulse; `data_out` valid from then until the next result |
| `data_out` | out | KEY_BITS | `data_in^e mod N` or `data_in^d mod N` |

The unit registers `start` before passing it on, so the latency is the
exponentiation latency plus one clock.

Measured latencies at a 256-bit key (clock cycles):

| operation | radix 2 | radix 4 | radix 16 (default) |
|---|---|---|---|
| encrypt, `e = 65537` | 5200 | 2806 | 1818 |
| private exponent, full 256 bits (random) | 102,575 | 53,327 | 33,119 |

Radix 16 cuts encryption latency by 65% compared with radix 2. Larger keys
work with the same RTL through `KEY_BITS`:

| key | `e = 65537` | full-width private exponent (random) |
|---|---|---|
| 1024 bits | 6234 | 424,327 |
| 2048 bits | 12,122 | 1,621,145 |

The default build (256 bits, radix 16) synthesizes to about 5,200 flip-flop
bits, plus two tables of 15 stored 260-bit entries each (entry 0 is a constant zero).

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `KEY_BITS` / `W` | 256 | `rsa_top` / `mod_exp`, `mont_mult`, `mult_table` | operand and key width |
| `RADIX_BITS` / `RB` | 4 | same | log2 of the radix: 1 = radix 2, 2 = radix 4, 4 = radix 16 |

`RB` must divide `W` and be at most 16, and `W` must be at least 16.
`mont_mult` checks the first two at elaboration.

## What to be aware of

- **Not constant-time.** Latency depends on the exponent's bit pattern:
  leading zeros are skipped, and a multiplication happens only for one bits.
  Power draw also follows the exponent. For a private key this leaks
  information through timing and power. The design has no blinding and no
  Montgomery ladder.
- **Operand preconditions are not checked.** These are: `N` odd and greater
  than 1, `data_in < N`, and a correct `R^2 mod N`. An even modulus triggers
  a simulation assertion in `mont_mult`; the hardware does nothing about it.
- **Choices of this design.** The source this design follows fixes only its
  outline: RSA by Montgomery modular exponentiation, a 256-bit key, a
  radix-16 multiplier with lookup tables, and radix 2 and 4 as the points of
  comparison. Everything else was chosen here. That includes the digit
  recurrence, the table contents and fill, the on-chip `-N^-1`, the
  square-and-multiply order with leading-zero skipping, supplying
  `R^2 mod N` with the key, the key-register port and all handshakes.
- The tables are refilled for every multiplication, including the `N`
  table, although `N` does not change during an exponentiation. That costs
  15 of every 83 clocks.

## Simulating

All files are SystemVerilog-2017. `rtl/mont_pkg.sv` must be read first.
Modules are found by file name:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/mont_pkg.sv tb/tb_rsa_top.sv --top-module tb_rsa_top -o sim
./obj_dir/sim
```

Each testbench checks its results against values it computes itself with
wide integer arithmetic. It ends with a line
`TB_RESULT checks=<n> failures=<n>`, and a watchdog stops it if it hangs.

| testbench | what it covers |
|---|---|
| `tb_mult_table` | every entry `k*x` for random and corner operands; fill time; restart during a fill |
| `tb_mont_mult` | 207 products (random moduli, 0, 1, N-1, N = 3): checks `p < N`, `p*R ≡ a*b (mod N)` and the exact latency |
| `tb_mod_exp` | random and special exponents (0, 1, 2, 65537, all ones, short) against a reference; exact latency formula |
| `tb_rsa_top` | default parameters, real 256-bit RSA key (two 128-bit primes, `e = 65537`): encrypt, check against a reference, decrypt, compare with the message; key writes and starts while busy are ignored; counts squarings, multiplications, skipped zeros, mode switches and both outcomes of the final subtraction |
| `tb_rsa_key_sizes` | the cipher at 256, 1024 and 2048 bits (uses `tb/rsa_size_check.sv`), about 5 s |
| `tb_radix_latency` | radix 2, 4 and 16 at 256 bits; requires at least a 55% encryption latency reduction for radix 16 |
