# 64-bit parallel CRC-32 generator based on the LFSR state matrix

A bit-serial CRC circuit is a shift register that divides the message by
the generator polynomial one bit per clock. This design does 64 of those
shifts in one clock. A 64-bit word goes in each cycle, and a 32-bit CRC
comes out after ⌈(k+32)/64⌉ cycles for a k-bit message. A 64-byte frame
takes 9 cycles. A 32-bit-wide version of the same circuit would need 17.

The trick is linear algebra over GF(2). One shift of the register is a
fixed 32×32 bit matrix **F** applied to the state, plus the incoming bit.
So *n* shifts are the matrix power **F**ⁿ. The circuit builds **F**³² and
**F**⁶⁴ from the polynomial and applies them with AND-XOR arrays.

```
 poly ──► fmatrix_gen ──► F^32, F^64
                              │
 d[31:0]  ──► [F^32 · ] ──⊕──► x_temp ──⊕──► crc_next ──► crc_fcs_reg ──► crc
 d[63:32] ────────────────┘              │                     │
                       crc ──► [F^64 · ] ┘◄────────────────────┘
```

## The serial register this circuit parallelises

The reference is the plain dividing LFSR with register bits X₀ … X₃₁:

```
X'_0 = (p_0 AND X_31) XOR d
X'_i = (p_i AND X_31) XOR X_(i-1)        i = 1 .. 31
```

The message bit *d* enters at X₀. The top bit X₃₁ is the feedback that
subtracts the polynomial. p₃₁ … p₀ are the generator's coefficients without
the leading x³² term. For Ethernet CRC-32 that is `32'h04C11DB7`.

This register computes *remainder(message · x^32)* only after the message
has been followed by 32 zero bits. So a k-bit message costs k+32 shifts,
and the cycle counts above include those 32 bits.

## The F matrix and its powers (`fmatrix_gen`)

Written as X' = **F**·X ⊕ (d into bit 0), the matrix is

* `F[i][j] = 1` when j = i−1 (the shift), and
* `F[i][31] = p_i` (the feedback column).

Everywhere in the RTL, `mat[i][j]` is the weight of input bit X_j in output
bit X'_i. For CRC-32, the rows of F that drive X'₃₁, X'₃₀, …, written as
32-bit words with column X₃₁ in the top bit, begin `40000000 20000000
10000000 08000000 04000000 82000000 01000000 00800000 80400000`.

`fmatrix_gen` raises F to the powers it needs with a chain of W = 64
left-multiplications by F. Multiplying an arbitrary matrix A by a
companion matrix needs no real matrix product:

```
(F·A)[0] = p_0 ? A[31] : 0
(F·A)[i] = A[i-1] XOR (p_i ? A[31] : 0)
```

Each step is therefore one row shift plus one polynomial-masked row: 32×32
AND/XOR gates. The chain is tapped after 32 and 64 steps:
`f_pow[0] = F^32` and `f_pow[1] = F^64`.

The polynomial is an input port, so the same hardware computes any 32-bit
CRC, and a change of polynomial takes effect in the same cycle. If `poly`
is tied to a constant, synthesis folds the whole generator to constants.

Worked small case for checking: for x⁴+x³+1 (p₃..p₀ = 1001), F and F⁴ are
the following (rows X'₃ … X'₀, columns X₃ … X₀):

```
F = 1100   F^4 = 0111
    0010         1100
    0001         1110
    1000         1111
```

## Advancing 64 bits at once (`crc_parallel_next`, `gf2_matvec`)

The word is two 32-bit chunks. **`d[31:0]` is the earlier chunk and
`d[63:32]` the later one. Inside a chunk the most significant bit comes
first in time.**

Consider one chunk D fed into a 32-bit register that holds X. After 32
shifts the register holds F³²·X ⊕ D. The chunk arrives unchanged because
none of its bits has reached the feedback tap yet. Applying that twice gives

```
x_temp   = F^32 · d[31:0]  XOR  d[63:32]
crc_next = F^64 · crc      XOR  x_temp
```

Each product is a `gf2_matvec` array, where output bit i is the XOR over j
of `a[i][j] AND x[j]`. There is one array for the first data chunk and one
for the state. The second chunk is XORed in bit by bit. The two arrays work
in parallel, so the critical path is one 32-input XOR tree plus two XORs.

The module takes any W that is a multiple of 32. W = 32 is the
single-array form `crc_next = F^32·crc XOR d`. Wider words use chunk *c*
through F^(32·(C−1−c)).

## The checksum register (`crc_fcs_reg`) and control

The 32-bit state register works as follows:

* `clr` (active high, synchronous) loads `INIT`. The default is all ones.
* `en` loads `crc_next`.
* Otherwise the register holds its value.

`clr` wins over `en`. There is no other control. The user frames the
message and counts words.

## Framing a message

To get the CRC of a k-bit message with W = 64:

1. Build the bit stream: *z* leading zeros, then the k message bits, then
   32 zero bits. *z* is the number that makes the length a multiple of 64.
2. Pulse `clr`, then present the stream one 64-bit word per cycle with
   `en` high, packed as described above.
3. One clock after the last word, `crc` holds the remainder.

Leading zeros leave the remainder unchanged only when the register starts
at zero. So use `INIT = 0` for plain polynomial division. With
`INIT = 0`, appending the CRC instead of the 32 zeros leaves a remainder
of zero. This is how a receiver checks a frame.

The standard CRC-32 variants follow from the plain remainder (with
`INIT = 0`):

| variant | how to get it |
|---|---|
| CRC-32/POSIX | complement the result |
| CRC-32/MPEG-2 (start value all ones) | complement the first 32 message bits |
| Ethernet / zip CRC-32 | feed each byte least-significant bit first, complement the first 32 message bits, then bit-reverse and complement the result |

The testbench checks all three against their published check values for
the string "123456789": 765E7680, 0376E6E7 and CBF43926.

The default `INIT` of all ones gives a register preset as in the reference
runs of this architecture. It is not the same as the MPEG-2 start value
in this augmented form.

## Interface of `crc_parallel_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `clr` | in | 1 | synchronous preset of `crc` to `INIT` |
| `en` | in | 1 | consume `d` this cycle |
| `poly` | in | M | p_{M−1} … p₀; `crc_pkg::CRC32_POLY` = 04C11DB7 |
| `d` | in | W | data word; `d[M-1:0]` earliest chunk |
| `crc` | out | M | register contents (the CRC when a frame is done) |
| `crc_next` | out | M | combinational next state |
| `x_temp` | out | M | combinational data term |
| `f_matrix` | out | M×M | single-step F, for observation |

Parameters: `M = 32` (CRC length), `W = 64` (bits per clock, a multiple of
M), `INIT = 32'hFFFFFFFF`. Defaults live in `rtl/crc_pkg.sv`.

The circuit accepts one word per clock with no stalls. The latency is one
clock from `d` to `crc`.

## Size

With the polynomial tied to 04C11DB7, generic synthesis gives 591
two-input XOR gates and 32 flip-flops.

With a run-time polynomial the matrix powers are live logic: about 4,100
word-level cells and still 32 flip-flops. Most of that is the 64-step
power chain plus two full 32×32 AND-XOR arrays.

## Where this differs from the published architecture

* **State matrix.** The original equations use the same matrix symbol
  ("Fw", elsewhere F₃₂) on the first data word and on the state. Here the
  state goes through F⁶⁴. The state must advance by all 64 bits, and with
  F³² the register would not hold the CRC. The data word uses F³² as
  published.
* **Example waveforms.** The published example runs show the single-step F
  (the row words above) and, for an all-ones 64-bit word, the results
  1B64C2B0 (next state) and 6DB88320 (data term).
  * 6DB88320 is the single-step F applied to the first chunk, XOR the
    second chunk.
  * The next-state value follows from the polynomial 04C11DB7 being fed in
    as the state, not from the register.

  This design does not reproduce those numbers. From the all-ones preset,
  an all-ones word gives 51FF99DD. Its correctness is shown instead by the
  bit-serial reference model and the catalogue check values.
* **Interface choices.** These are this design's own:
  * the synchronous all-ones preset (the original shows only a `clr` pin
    and the register reading FFFFFFFF while it is high);
  * the `en` input;
  * the run-time polynomial port;
  * leading-zero padding for message lengths that are not a multiple of W.
* **Left out.** The bit-serial LFSR and the 32-bit-wide design are
  reference points, not part of this circuit. The 32-bit-wide design is
  available as `W = 32`.

## Files

| file | contents |
|---|---|
| `rtl/crc_pkg.sv` | default M, W, polynomial, preset |
| `rtl/fmatrix_gen.sv` | F and its powers from the polynomial |
| `rtl/gf2_matvec.sv` | AND-XOR matrix-vector array |
| `rtl/crc_parallel_next.sv` | x_temp / crc_next logic |
| `rtl/crc_fcs_reg.sv` | checksum register |
| `rtl/crc_parallel_top.sv` | the generator |
| `tb/crc_ref_pkg.sv` | bit-serial reference model (one shift per message bit) |
| `tb/*_tb.sv` | self-checking testbenches, one per module |
| `tb/crc_workload_tb.sv` | 64-byte frame at W = 64 and W = 32 (9 and 17 cycles), zero remainder after appending the CRC, check values |

## Verification

Every testbench compares the RTL with `crc_ref_pkg`. That package shifts
bits one at a time through the serial register and shares no code with the
matrix logic. The testbenches cover:

* **`fmatrix_gen_tb`:** every element of F, F³² and F⁶⁴ for CRC-32 and
  random polynomials, plus the 4-bit worked example.
* **`crc_parallel_next_tb`:** random states, words and polynomials at
  W = 64 and W = 32.
* **`crc_parallel_top_tb`:** the generator at its default parameters end to
  end. It runs about 60 random-length frames with:
  * random idle cycles;
  * polynomial switches;
  * a preset in mid-frame;
  * a 64-byte frame that must finish in 9 words.

  It counts each of these events and fails if one never happens.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/crc_pkg.sv tb/crc_ref_pkg.sv tb/crc_workload_tb.sv \
    --top-module crc_workload_tb
./obj_dir/Vcrc_workload_tb
```

Each testbench ends by printing `TB_RESULT checks=N failures=F`. All run in
well under a second.
