# A 256-bit RSA engine built around one combinational Karatsuba multiplier

This is SystemVerilog RTL for a complete RSA cryptosystem with moduli of up to
256 bits. You give it two 128-bit primes `p`, `q`, a public exponent `e` and a
message. It then generates the key (`n`, `d` and the Montgomery constants),
encrypts and decrypts. The design trades area for speed. A single 256 × 256-bit
Karatsuba–Ofman multiplier, purely combinational, produces a 512-bit product
in one clock cycle. Everything that needs a multiplication goes through it:
each Montgomery product uses it three times in three cycles, and key
generation uses it directly to form `n = p·q` and `φ = (p−1)(q−1)`. The two
other expensive operations avoid multiplication altogether:

* **remainders** (`t mod n`, used to move values into Montgomery form) come
  from a bit-serial non-restoring divider, one dividend bit per cycle;
* **modular inverses** (`d = e⁻¹ mod φ` and `−n⁻¹ mod 2²⁵⁶`) come from
  L. Hars' shifting Euclidean algorithm, which needs only shifts, additions
  and bit-length detection.

The architecture, the algorithms and the sizes (256-bit modulus, 512-bit
dividend, 16-bit multiplier leaves, 3-cycle Montgomery product) follow a
published FPGA design for a Virtex-II Pro. Where that design leaves
something open, this RTL makes its own choice. Examples are the handshakes,
the instruction encoding and clocking the loops. Each such choice is listed
under "Where this RTL departs from the original design" below.

## Operations and their cost

The top level, `rsa_top`, runs one operation each time its 2-bit `instr`
input takes a new non-zero value while the engine is idle:

| instr | operation | steps | unit used |
|---|---|---|---|
| 1 | key generation | `n = p·q` | exponentiator in multiply mode, 1 cycle |
|   |                | `φ = (p−1)(q−1)` | exponentiator in multiply mode, 1 cycle |
|   |                | `x = 2²⁵⁶ mod n` **and** `d = e⁻¹ mod φ`, in parallel | remainder unit, inverter |
|   |                | `ni = −n⁻¹ mod 2²⁵⁶` | inverter with a 257-bit modulus |
| 2 | encryption | `M̄ = (P·2²⁵⁶) mod n`, then `C = P^e mod n` | remainder unit, exponentiator |
| 3 | decryption | `C̄ = (C·2²⁵⁶) mod n`, then `P = C^d mod n` | remainder unit, exponentiator |
| 0 | reset | clears flags and results, holds the arithmetic units in reset | |

Decryption works on the ciphertext left by the last encryption. Encryption and
decryption requests are ignored until a key exists. The flags `keygen`,
`cipher` and `decipher` go high when their operation finishes and stay high.
`busy` is high while an operation runs. Results appear on `n_out`, `d_out`,
`c_out` and `m_out`.

Cycle counts at 256 bits:

| unit | cycles |
|---|---|
| direct product `a·b` | 1 |
| Montgomery product | 3 |
| exponentiation, exponent with leading one at bit k and Hamming weight H | 3·(k + H − 1) + 3 + 1 (1534 for 256 ones) |
| remainder of an L-bit dividend | L + 1 (at most 513) |
| inversion, k iterations (k ≤ ‖N‖ + ‖Mod‖) | k + 2 |

Measured in the end-to-end test: with the 120-bit example key, key generation
takes 392 cycles, encryption with `e = 97` takes 405 and decryption 933. With
a full 256-bit key and `e = 65537`, the same three take 469, 571 and 1629
cycles.

## The Karatsuba multiplier (`karatsuba_mul`)

This is the largest and least obvious block. One Karatsuba step splits W-bit
operands into halves of H = ⌈W/2⌉ bits and needs three half-size products:

    t0 = a0·b0     t2 = a1·b1     u = (a0 + a1)·(b0 + b1)
    a·b = t2·2^(2H) + (u − t0 − t2)·2^H + t0

The half sums `a0 + a1` are H+1 bits wide. If they were fed on as they are,
the middle product would need (H+1)-bit operands. Its own halves would then
be uneven, and the extra bit would spread down every level. Instead the top
bit (carry) Cx, Cy of each sum is cut off. The middle product recurses on the
H-bit remainders sx, sy, and the cut bits are added back with shifts:

    (sx + Cx·2^H)(sy + Cy·2^H) = sx·sy + 2^H·(Cy·sx + Cx·sy) + Cx·Cy·2^(2H)

Every node on a level therefore has the same width. With W = 256 the widths
run 256 → 128 → 64 → 32 → 16. Splitting stops once a width is at most `LEAF`
= 17, the operand width of an FPGA's 18 × 18 hard multiplier. That leaves
3⁴ = 81 leaf multipliers of 16 × 16 bits. The 128-bit version (`W = 128`,
256-bit product) has 27.

The recursion is written as a flat tree rather than a module that instantiates
itself. Node 0 is the whole product. Level l holds 3^l nodes starting at index
(3^l − 1)/2. Node j of level l has its three children at 3j, 3j+1 and 3j+2 on
level l+1: low halves, high halves and truncated half sums. Two generate loops
carry operands down the tree (`na`, `nb`) and products back up (`np`). The
leaves use the `*` operator, so synthesis can map them to DSP blocks. Odd
widths work as well: the upper half is then one bit short and is
zero-extended.

The multiplier is pure logic with a long path: four Karatsuba levels of
adders on top of a 16-bit multiply. Whatever clocks `mont_pro` must allow for
that.

## Montgomery product and the exponent loop (`mont_pro`, `mont_exp`)

`mont_pro` computes `a·b·r⁻¹ mod n` for a power-of-two radix r. "mod r" is
then a mask (`mr = r − 1`) and "/ r" a right shift:

    cycle 1 (the load cycle)  T  = a·b
    cycle 2                   m  = (T mod r)·ni mod r
    cycle 3                   u  = (T + m·n)/r,   Pn = u ≥ n ? u − n : u

The radix is an input: `mr = r − 1 = 2^k − 1` is the mask, and a priority
encoder turns its bit length into the shift amount k. The RSA top uses
r = 2²⁵⁶. Smaller radices such as 2²⁵⁵ work as well, as long as n < r.
A multiplexer in front of the shared multiplier selects the operands for each
cycle. `done` is high in the cycle after the third. The block is idle again in
that same cycle, so products can be chained back to back every three cycles.
With `direct = 1` the block simply captures `a·b` (512 bits) at the load edge.

`mont_exp` is the MSB-first square-and-multiply loop. Its operands come already
in Montgomery form: `M = message·r mod n`, `x = r mod n`. On `start` a priority
encoder finds the leading one of the exponent, and the running value starts at
`M`, so the leading bit costs nothing. Each lower bit costs a squaring, and a
one bit a further multiplication by `M`. A last `MonPro(y, 1)` converts back.
The loop issues the next product in the cycle the previous one reports
`done`, taking the operand straight from the product register. The multiplier
is therefore never idle, and a 256-bit exponent of all ones takes
3 · 511 + 1 = 1534 cycles. `mode = 1` turns the block into a plain multiplier
(`prod = M·Ne`, `Out` = its low half, `Dn` one cycle after `start`). This is
how key generation gets `n` and `φ` without a second 256-bit multiplier.

Requirements: n is odd, n < r, and all operands are below n.

## Remainder unit (`div_mod`, `div_loop`)

Textbook non-restoring division aligns the divisor under the dividend and
shifts it right, which needs 512-bit shifted copies. This unit keeps the
divisor fixed instead. It shifts a signed 258-bit partial remainder left,
brings in the next dividend bit from the MSB down, and then adds or subtracts
`n` according to the remainder's sign (`div_loop`, pure logic). `div_mod` forms
`−n` once at start. Its priority encoder skips the dividend's leading zeros, so
an L-bit dividend takes L steps. A final cycle adds `n` back to a negative
remainder. Only the remainder is produced, no quotient.

## Modular inverter (`hars_inv`)

The Hars algorithm keeps `U ≡ R·a` and `V ≡ S·a (mod m)`. Each iteration
subtracts (or adds, if the signs differ) `V` shifted left by `‖U‖ − ‖V‖`
from `U`, where ‖·‖ is the bit length of the magnitude. The same is done to
`R` with `S`, and the pairs are swapped when `U` has become shorter than `V`.
Every iteration removes at least one bit, and the loop ends when `V` is 0 (no
inverse, result 0) or ±1. `S` is then corrected in sign and range. In
hardware one iteration is one clock. Each clock uses two bit-length encoders
(before and after the subtraction), two barrel shifts and two
adder/subtractors on signed 259-bit values. The modulus input is 257 bits
wide so that `n⁻¹ mod 2²⁵⁶` fits; even moduli such as `φ` work too.

## Register block and top-level interface (`reg_block`, `rsa_top`)

The register block holds three 256-bit words: `{q, p}` (two 128-bit primes, p
in the low half), `e`, and the plaintext. Reset and `WE` load built-in
defaults: the example key `p = 113680897410347`,
`q = 7999808077935876437321`, `e = 97` and a 116-bit message, whose
ciphertext is `0x47f48d12669e2a2e53e0a5c3d2b4de`. `wr_en`/`wr_addr`/`wr_data`
overwrite one word (0: `{q,p}`, 1: `e`, 2: plaintext); `WE` wins over a write.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `instr` | in | 2 | 0 reset, 1 key generation, 2 encrypt, 3 decrypt |
| `WE` | in | 1 | reload register-block defaults |
| `wr_en`, `wr_addr`, `wr_data` | in | 1, 2, 256 | write one register-block word |
| `keygen`, `cipher`, `decipher` | out | 1 | operation finished (held) |
| `busy` | out | 1 | an operation is running |
| `n_out`, `d_out`, `c_out`, `m_out` | out | 256 | modulus, private exponent, ciphertext, decrypted message |

An operation runs once per change of `instr`. To repeat the same operation,
pass through another value (for example 0, which also clears the results).

## Where this RTL departs from the original design

* **Clocked loops.** The original divider and inverter loop through
  combinational feedback between two modules, without a clock. Here both are
  ordinary FSMs that take one step per clock.
* **Handshakes.** The `start`/`load` inputs and held `done` flags of the
  divider, inverter and exponentiator are this design's own. So are the
  instruction encoding and the rule of "run on a new value of instr".
* **Carry correction.** The correction for the removed half-sum bits is the
  exact identity above. The original states it only loosely.
* **Cycle count.** The exponentiator takes 1534 cycles in the worst case.
  The original quotes 1533 (510 + 1 products of 3 cycles); the extra cycle is
  the start cycle.
* **Start value.** The exponent loop starts from `M` at the leading one,
  not from `r mod n`. This gives the original's cycle count; `x = r mod n` is
  still needed, for `e = 0`.
* **Radix.** The original text fixes r = 2²⁵⁶, while its exponentiator was
  also exercised with r = 2²⁵⁵ (mask 0x7FF…F). Here r follows the `mr`
  input, so both work. The top level always uses 2²⁵⁶.
* **Direct-multiply mode** is passed from the exponentiator down to the
  Montgomery product block, which owns the multiplier. `mont_exp` also
  brings out the full 512-bit product.
* **Divisor bit length.** The original divider also takes a precomputed
  divisor bit length; this one does not need it and has no such input.
* **Additions of this design.** The register block's write port, the
  `busy` output, ignoring encryption before key generation, and `instr = 0`
  holding the arithmetic units in reset.
* **Not included.** Prime generation (random number generator, primality
  test) is left out, as in the original: the primes are inputs. The
  processor/Ethernet front end that the original outlines as future work is
  left out too.

The design makes no attempt at side-channel resistance. The exponent loop's
running time depends on the exponent's bit pattern, and so do the divider's
and inverter's.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against
values computed independently inside the testbench, mostly with the
simulator's own wide `*` and `%`:

| testbench | what it checks |
|---|---|
| `tb_karatsuba_mul` | 256-bit products (corner cases, all-ones operands, random), a 128-bit instance (27 leaves) and a 75-bit odd-width instance |
| `tb_div_loop` | one step against integer arithmetic on a 30-bit instance |
| `tb_div_mod` | 512/256-bit remainders, 3019 mod 53 = 51, 586491296780565 mod 1587421 = 0x8dfe3, latency L+1 |
| `tb_hars_inv` | inverses with coprime and non-coprime inputs, even moduli, 2²⁵⁶; iteration count against a behavioural model |
| `tb_mont_pro` | Pn·r ≡ a·b (mod n) for r = 2²⁵⁶ and smaller radices, 3-cycle occupancy, back-to-back loads, direct mode |
| `tb_mont_exp` | exponentiation against square-and-multiply, the example encryption/decryption, e = 0, 1, 2, all ones; the original's decryption vector prepared for r = 2²⁵⁵; cycle formula; multiply mode |
| `tb_reg_block` | defaults, writes, address 3, WE priority |
| `tb_rsa_top` | full size: the example key (n, d, ni, C, plaintext), a 256-bit key with e = 65537, abort by instr = 0, WE reload, encryption without a key |

`tb_rsa_top` runs at the default 256-bit size and also counts each mechanism:
multiply mode, exponent mode, multiply steps, parallel remainder and
inversion, the 2²⁵⁶ inversion, abort, reload, write and ignored request. It
fails if any of them never happens. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

What is not verified: timing closure and area on any FPGA, and behaviour with
inputs outside the stated ranges (even or zero modulus, operands ≥ n).

## Simulating

Every file holds one module or package. The package `rtl/rsa_pkg.sv` must come
first; Verilator finds the rest with `-y`. For example:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
        rtl/rsa_pkg.sv tb/tb_rsa_top.sv --top-module tb_rsa_top -o sim
    ./obj_dir/sim

Swap in any other `tb/tb_*.sv` and its module name to run that block's test.
All of them finish in seconds. The simulator is two-state, so every register
that is read has a reset value.

To change the size, set `W` (and `DW = 2W`, `MW = W+1`) in `rsa_pkg`. The
multiplier adapts its tree depth by itself. The register block's defaults are
parameters of `reg_block`.

## Files

| file | contents |
|---|---|
| `rtl/rsa_pkg.sv` | widths, instruction codes, bit-length function |
| `rtl/karatsuba_mul.sv` | combinational Karatsuba–Ofman multiplier |
| `rtl/mont_pro.sv` | 3-cycle Montgomery product / 1-cycle product |
| `rtl/mont_exp.sv` | exponent loop, multiply mode |
| `rtl/div_loop.sv`, `rtl/div_mod.sv` | non-restoring remainder step and controller |
| `rtl/hars_inv.sv` | shifting-Euclid modular inverter |
| `rtl/reg_block.sv` | 3 × 256-bit key/message registers |
| `rtl/rsa_top.sv` | key generation, encryption, decryption sequencing |
| `tb/tb_*.sv` | one self-checking testbench per module |
