# Strong BCH error correction for multilevel NAND Flash

Storing more levels per Flash cell (6, 8 or 12 instead of 4) raises capacity but makes
raw bit errors far more frequent: about 5e-7, 5e-5 and 2e-3 per bit instead of 8e-12.
The way out studied by F. Sun, K. Rose and T. Zhang ("On the Use of Strong BCH Codes for
Improving Multilevel NAND Flash Memory Storage Capacity") is to keep the cell
programming as it is and protect each page with a long, strong binary BCH code. This
is practical because NAND pages are long (8192 or 16384 user bits) and read latency
matters less than throughput. That paper sizes a family of such codes and an ASIC
decoder for them. This repository is a SystemVerilog implementation of that decoder,
plus a matching encoder:

* a **syndrome-based BCH decoder**. It processes 4 bits per clock. It has three
  blocks, pipelined across consecutive codewords: syndrome computation, a fully
  serial inversion-free Berlekamp–Massey error locator, and a 4-parallel Chien
  search. An SRAM buffer holds the received word until it can be corrected;
* a **systematic BCH encoder** (a 4-bit-per-clock LFSR) for the write path.

The default build is the strongest code that was evaluated, **(n, k, t) = (17914,
16384, 102) over GF(2^15)**. It is used with 12 levels per cell (7 bits per 2 cells),
and it is the code behind the largest capacity gain (about 59% over 2 bits/cell).
All six evaluated codes are parameter sets of the same RTL (see *Code parameters*).

## Codes and arithmetic

A binary BCH code over GF(2^m) with designed correction t has roots α, α^2, ..., α^(2t).
Its generator g(x) is the product of the minimal polynomials of α, α^3, ..., α^(2t-1),
so n − k = m·t for all the codes used here. The codes are *shortened*: only the
lowest n of the 2^m − 1 degrees are used. Field elements are m-bit vectors in the
polynomial basis. The primitive polynomials are x^15 + x + 1 and
x^14 + x^10 + x^6 + x + 1 (`bch_pkg`). The paper does not give them, so they are
this design's choice.

All constant multipliers (by α^e) are XOR matrices. Their columns α^e·α^b are computed
during elaboration by the functions in `bch_pkg`, so no tables are stored.

## Codeword layout on the 4-bit streams

Every stream carries one codeword as `BEATS = ceil(n/4)` beats of 4 bits, highest
degree first. Within a beat, bit 3 is the highest degree. Beat c, bit q holds degree
`4·BEATS − 1 − 4c − (3 − q)`. Most evaluated lengths (17914, for instance) are not
multiples of 4. The codeword is therefore zero-extended at the top to `4·BEATS` bits,
and those padding bits must be zero. A zero-extended codeword is still a codeword of
the shortened code, so nothing else changes. The encoder and the decoder use the same
layout. For the default code, `BEATS` = 4479 and the two top bits of the first beat are
padding. The lowest n − k degrees hold the parity and the degrees from n − k to n − 1
hold the user data.

## Decoder (`bch_decoder`)

```
 r ──┬─> bch_syndrome ──S──> bch_ibm ──Λ──> bch_chien ──e──┐
     │   (t odd generators   (serial iBM,   (4-parallel)   ├─ XOR ─> corrected word
     └─> bch_fifo (SRAM) ───────────────────────────────────┘
```

The blocks hand over through valid/ready pairs. Each block holds its result until the
next block takes it. `PIPE` selects how far the blocks overlap:

* `PIPE = 2` (codes with large t): all three blocks can work on three
  consecutive codewords. The buffer holds 3 codewords.
* `PIPE = 1` (t from 5 to 15): syndrome computation and error locator work on one
  codeword, and the Chien search on the previous one. The syndrome block starts a new
  codeword only while the error locator is idle. The buffer holds 2 codewords.

The output has no back-pressure. A corrected codeword streams out at one beat per
clock, `out_last` marks its final beat, and the decoder returns all n bits (parity
included). Latency from the last input beat to the first output beat is
`t(t+3)/2 + 3` cycles. From the first beat in to the last beat out it is
`2·BEATS + t(t+3)/2 + 2` cycles.

### Syndrome computation (`bch_syndrome`, `bch_syndrome_gen`)

For a binary code S_2j = S_j², so only the t odd syndromes S_1, S_3, ..., S_(2t−1) get
a generator. The even ones come from squaring circuits (`gf_square`, also XOR
matrices). Each generator evaluates the received polynomial at α^i in Horner form,
4 coefficients per clock:

    S_i ← S_i·α^(4i) + r_0 + r_1·α^i + r_2·α^(2i) + r_3·α^(3i)

That is four input multipliers, an adder, a register and a feedback multiplier α^(4i).
The first beat of a codeword drops the register term, so codewords can follow each
other without a clear cycle.

### Error locator: serial inversion-free Berlekamp–Massey (`bch_ibm`)

This is the block with the least obvious inner workings. The algorithm is the
inversion-free Berlekamp–Massey algorithm, reduced to t iterations because every
second discrepancy of a binary BCH code is zero. In iteration r (0 ≤ r < t):

    δ      = Σ_j Λ_j · S_(2r+1−j)
    Λ(x)  ← γ·Λ(x) + δ·x·B(x)
    if δ ≠ 0 and k ≥ 0:   B(x) ← x·Λ_old(x),  γ ← δ,  k ← −k
    else:                 B(x) ← x²·B(x),               k ← k + 2

The paper fixes the cost: t(t+3)/2 cycles, three GF multipliers and two coefficient
FIFOs. The schedule behind that count is this design's reading of it. Iteration r
spends r + 2 cycles, one per coefficient j = 0 .. r+1, and Σ(r+2) = t(t+3)/2. In cycle
j:

* multipliers 1 and 2 form Λ'_j = γ·Λ_j + δ·B_(j−1). The new B_j is Λ_(j−1) or
  B_(j−2), taken from two small delay registers;
* multiplier 3 adds Λ'_j · S_(2r+3−j) into the discrepancy of the **next** iteration.
  So that discrepancy is complete when the iteration ends, and no cycles are spent
  on it separately.

Λ and B are stored as (t+1)-entry arrays that are read and written in order. One
extra cycle copies in the syndromes, so `out_valid` comes `1 + t(t+3)/2` cycles
after the start: 5356 cycles for t = 102. Λ is not normalised (Λ_0 ≠ 1), which
changes none of its roots.

**Limitation.** With exactly r+2 cycles, iteration r cannot form coefficients above
degree r+1. Such coefficients appear only if a discrepancy is zero before all errors
have been located. For a random error pattern that has a probability of about 2^-15
per iteration. When it happens, the word is decoded wrongly. Processing coefficients
up to degree t in every iteration would remove this limitation, at a cost of t(t+1)
cycles.

### Chien search (`bch_chien`)

Register j (1 ≤ j ≤ t) holds Λ_j·α^(j·i). Each clock, lanes q = 1..4 form Λ_0 + Σ_j
Λ_j·α^(j(i+q)) with constant multipliers α^(jq), and test each sum for zero. The
lane-4 products are also the register values for the next clock. A root α^i marks an
error at degree 2^m − 1 − i. The code is shortened, so the search must start at the
first transmitted degree. When Λ is loaded, register j therefore takes
Λ_j·α^(j·(2^m − 1 − 4·BEATS)), one more constant multiplier per register. The error
bits come out in the same layout as the data, one beat per clock for `BEATS` clocks.

### Codeword buffer (`bch_fifo`)

This is a memory array with one write port and one synchronous read port, meant to
map onto an SRAM. Its depth is `(PIPE+1)·BEATS` words of 4 bits (53748 bits for the
default). The Chien search reads it in step with the error bits. The error bits are
registered for one cycle to line up with the read data.

## Encoder (`bch_encoder`)

The paper says only that BCH encoding is done with linear shift registers. This
encoder is a systematic LFSR unrolled 4 bits per clock:
`fb = u ^ rem[R−1]; rem = (rem << 1) ^ (fb ? g : 0)`, where R = n − k. The caller
sends all `BEATS` beats with the user data in the data degrees. The encoder passes
those bits through and fills in the parity degrees (their input bits are ignored).
One beat may hold both user data and parity bits, which the unrolled loop handles.

g(x) is computed at elaboration. Each minimal polynomial is found as the first binary
linear dependency among the powers of α^i, once per cyclotomic coset. For
(9130, 8192, 67) over GF(2^14), the coset of α^129 has only 7 members. The true g(x)
therefore has degree 931, not n − k = 938. The encoder then uses g(x)·x^7, so the
7 lowest parity bits are always zero and the code keeps the listed (n, k).

## Top level (`bch_flash_ecc`)

The top holds the encoder (write path) and the decoder (read path). They are
independent of each other. Between them would be the multilevel cell array and its
mixed-signal parts, which are not part of this RTL: the program-and-verify circuit,
serial sensing, and the packing of 5/3/7 bits into 2/1/2 cells. The codeword leaving
the encoder (`enc_out_*`) and the word read back (`dec_in_*`) are therefore ports.

## Code parameters

| cells | code (n, k, t) | `M` | `POLY` | `N` | `K` | `T` | `PIPE` | first-in to last-out | cycles at 400 MHz | published |
|---|---|---|---|---|---|---|---|---|---|---|
| 6 levels | (8262, 8192, 5) | 14 | `'h4443` | 8262 | 8192 | 5 | 1 | 4154 cycles | 10.4 µs | 10.4 µs |
| 8 levels | (8360, 8192, 12) | 14 | `'h4443` | 8360 | 8192 | 12 | 1 | 4272 | 10.7 µs | 10.9 µs |
| 12 levels | (9130, 8192, 67) | 14 | `'h4443` | 9130 | 8192 | 67 | 2 | 6913 | 17.3 µs | 17.6 µs |
| 6 levels | (16459, 16384, 5) | 15 | `'h8003` | 16459 | 16384 | 5 | 1 | 8252 | 20.6 µs | 20.7 µs |
| 8 levels | (16609, 16384, 15) | 15 | `'h8003` | 16609 | 16384 | 15 | 1 | 8443 | 21.1 µs | 21.4 µs |
| 12 levels (default) | (17914, 16384, 102) | 15 | `'h8003` | 17914 | 16384 | 102 | 2 | 14315 | 35.8 µs | 40.2 µs |

`P` (bits per clock) is 4 throughout. The cycle counts are measured in simulation.
The last column gives the post-layout latencies published for the 0.13 µm ASIC. The
published figure for t = 102 is higher than this design's. That suggests its error
locator spends more cycles than the stated t(t+3)/2 on that code. This design follows
the stated count.

Throughput: 4 bits per clock while streaming (1.6 Gbps at 400 MHz). With `PIPE = 2`
and t = 102 the error locator is the bottleneck, at one codeword per 5357 cycles
(about 1.34 Gbps). With `PIPE = 1` and t = 5, one codeword takes about 4138 cycles
(about 1.59 Gbps).

The same decoder also serves the defect-tolerance trade-off that was studied. It
corrects any mix of up to t bit errors, whether they come from threshold-voltage
spread or from defective cells. That is enough for every (defects, threshold-voltage
errors) pair proposed for these codes: for example, 27 + 6 and 6 + 81 against t = 102.
Choosing the programming accuracy is a test-time procedure, not logic.

## Files

| file | contents |
|---|---|
| `rtl/bch_pkg.sv` | GF(2^m) multiply, power and constant-matrix functions; default primitive polynomials |
| `rtl/gf_cmul.sv`, `rtl/gf_mult.sv`, `rtl/gf_square.sv` | constant multiplier, general multiplier, squarer |
| `rtl/bch_syndrome_gen.sv`, `rtl/bch_syndrome.sv` | one syndrome generator; the 2t-syndrome block |
| `rtl/bch_ibm.sv` | serial inversion-free Berlekamp–Massey |
| `rtl/bch_chien.sv` | 4-parallel Chien search |
| `rtl/bch_fifo.sv` | codeword buffer |
| `rtl/bch_decoder.sv` | decoder pipeline and correction |
| `rtl/bch_encoder.sv` | systematic LFSR encoder |
| `rtl/bch_flash_ecc.sv` | top: encoder and decoder |
| `tb/tb_bch_ref.sv` | reference model: table-based GF arithmetic, generator polynomial from its roots, syndromes, error injection |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_bch_workloads` |

## Verification

Every testbench checks its module against `tb_bch_ref`. That model works differently
from the RTL: it uses log/antilog tables built at run time and evaluates everything
directly. Each testbench prints `TB_RESULT checks=N failures=M`.

* `tb_bch_syndrome_gen`, `tb_bch_syndrome`: the syndromes of random words, including
  the squared ones; result timing and hold.
* `tb_bch_ibm` (t = 10): for 0..t random errors, Λ has the error locations as roots,
  has degree equal to the error count and has Λ_0 ≠ 0. It takes exactly
  1 + t(t+3)/2 cycles.
* `tb_bch_chien` (GF(2^8), shortened): the error bits match the chosen roots,
  including the first and last degree, over exactly `BEATS` cycles.
* `tb_bch_fifo`: against a queue model with wrap-around, full and empty.
* `tb_bch_decoder` (GF(2^10), t = 12 with `PIPE = 2` and t = 4 with `PIPE = 1`):
  10 back-to-back codewords with 0..t errors, one of them on the top degree. It also
  checks the first-codeword latency, and that stalls and block overlap occur.
* `tb_bch_encoder` (default size): all 2t syndromes of the output are zero, and the
  user data passes unchanged.
* `tb_bch_flash_ecc` (default size, no parameter overrides): three pages are encoded,
  then given t, some and no errors, and decoded back to back. The decoded codewords
  must equal the written ones. It checks the latency and requires input stalls, Chien
  search/syndrome overlap, three codewords in flight and a t-error codeword to occur.
  It runs in a few seconds.
* `tb_bch_workloads`: all six codes at full size, with t errors and random errors,
  and latencies within 85–100% of the published figures.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bch_pkg.sv tb/tb_bch_ref.sv tb/tb_bch_flash_ecc.sv --top-module tb_bch_flash_ecc
./obj_dir/Vtb_bch_flash_ecc
```

The `-I` paths let Verilator find the other modules by file name.

## Departures and open points

* Syndromes are S_1..S_2t. The published index range "0 .. 2t−1" cannot be meant
  literally, given S_2j = S_j².
* The Chien sum adds Λ_0 rather than 1, because Λ is not normalised. The search
  start offset for the shortened code is this design's own.
* The error locator limitation described above comes from the fixed t(t+3)/2 schedule.
* There is no decoding-failure flag. A word with more than t errors comes out
  miscorrected or unchanged.
* The hand-off protocol, buffer depth, reset (asynchronous, active low), bit order,
  padding and primitive polynomials are not specified by the paper. The choices made
  here are stated above.
* Not implemented: the cell array, program-and-verify and sensing circuits, the
  mapping of bits to cell levels, and the spare-row/column repair flow.
