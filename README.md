# Fully pipelined decimal (BCD) multiplier

This is an N x M digit multiplier for unsigned decimal numbers in BCD
(BCD-8421). It takes one new pair of operands every clock cycle and returns
the N+M digit BCD product a fixed number of cycles later. It works like a
parallel binary multiplier: form all partial products at once, compress them
with carry-save adders, then resolve the carries once at the end. Three
decimal tricks keep the logic small:

* **Signed-digit radix-10 recoding of the multiplier.** Every multiplier digit
  is rewritten as a digit in {-5 .. +5}. Only five multiples of the
  multiplicand are then needed (1A .. 5A). A negative multiple is a bit
  inversion plus one.
* **BCD-4221 inside the datapath.** In the 4221 code (bit weights 4, 2, 2, 1)
  every 4-bit pattern is a valid digit, and inverting the bits gives the 9's
  complement. So binary full adders can add 4221 digits bit by bit, with no
  decimal correction. Only the carries need to be doubled, by a small "2X"
  recode-and-shift block.
* **Blocked reduction.** The M+1 partial products are cut into NBLK blocks.
  Each block is compressed on its own to a carry-save pair. A short
  pipelined tree of decimal carry-chain adders then sums the blocks.

The default build is 16 x 16 digits with 4 blocks and 7 pipeline stages. The
RTL is parameterised in N, M and NBLK.

## Digit codes

All digits are 4 bits, with digit 0 in bits 3:0 of a packed vector.

| code | bit weights | where it is used |
|------|-------------|------------------|
| BCD-8421 | 8 4 2 1 | operands, the final adders, the product |
| BCD-4221 | 4 2 2 1 | multiples, partial products, carry-save reduction, adder recoding |
| BCD-5421 | 5 4 2 1 | doubling a BCD digit: `5421 << 1` reads as BCD |
| BCD-5211 | 5 2 1 1 | doubling a 4221 digit: `5211 << 1` reads as 4221 |

Where a value has to be turned into 4221, the RTL uses one fixed ("reduced")
pattern per value: 0000, 0001, 0100, 0101, 0110, 1001, 1010, 1011, 1110, 1111
for 0 .. 9. These patterns are self-complementing. The 5211 patterns are this
design's own choice: 0000, 0001, 0100, 0101, 0111, 1000, 1001, 1100, 1101, 1111.
All code tables are functions in `rtl/bcd_pkg.sv`.

**Doubling by shifting.** Write a digit d in 5211 and shift the whole vector
left by one bit. Each group of four bits then reads as a 4221 digit of value
2·(d mod 5). The 5-bit that falls out is worth 10, and it lands in bit 0 (worth
1) of the next digit up. This is `dec_x2`, the 2X block. The same idea with
5421 to BCD doubles a BCD number. Shifting BCD left by three bits reads as 5A
in 5421.

## Pipeline

| stage | what is registered at its end | modules |
|-------|-------------------------------|---------|
| 1 | operands A, B | `bcd_multiplier` |
| 2 | multiples 1A..5A (4221), recoded digits of B | `multiples_gen`, `sd_recoder` |
| 3 | S and 2H of each block | `pp_gen` ×(M+1), `csa_reduction_tree` |
| 4 | digit-pair sums D and pair carries of each block | `adder_recoding` ×NBLK |
| 5 | each block resolved to BCD, aligned, sign-extended | `decimal_adder_tree`, level 1 |
| 6 .. | pairwise sums of the block results | `decimal_adder_tree`, levels 2 .. |

There are `clog2(NBLK) + 1` adder levels, so the latency is
**LAT = clog2(NBLK) + 5** cycles. A new operation can start every cycle.

| N x M | NBLK | stages |
|-------|------|--------|
| any x 4 | 1 | 5 |
| any x 8 | 2 | 6 |
| any x 16 | 4 | 7 (default) |
| any x 32 | 8 | 8 |
| 16 x 16 | 8 | 8 |

NBLK must divide M. The usual choice is NBLK = M/4 (four rows per block).

### Multiples of A (`multiples_gen`)

All five multiples are N+1 digits wide, in 4221:

* 1A: each digit recoded from BCD to 4221.
* 2A: A in 5421, shifted left 1 bit, which gives 2A in BCD; then recoded to 4221.
* 4A: 2A (BCD) recoded to 5211 and shifted left 1 bit, which gives 4A in 4221.
* 3A: A + 2A, added in a BCD carry-chain adder (`pg_adder`), then recoded to 4221.
* 5A: A shifted left 3 bits reads as 5A in 5421; then recoded to 4221.

### Signed-digit recoding (`sd_recoder`) and partial products (`pp_gen`)

For multiplier digit b(i), the transfer is ys(i) = (b(i) >= 5). The recoded
digit is y(i) = b(i) − 10·ys(i) + ys(i−1), which lies in −5..+5. The transfer
ys(i) doubles as the sign. The top digit y(M) = ys(M−1) is 0 or +1. So there
are M+1 partial products, and the last one is never negative.

The magnitude is one-hot over {1,2,3,4,5}. `pp_gen` selects the matching
multiple with an AND-OR and XORs every bit with the sign. The missing "+1" of
a negative row (the *hot one*) and its sign extension are added in the
reduction.

A digit of 9 that receives a transfer gives "−0". The design keeps it as a
negative zero: all-nines plus the hot one is exactly zero modulo the window.

## Blocked carry-save reduction (`csa_reduction_tree`)

This stage holds most of the subtlety.

**Blocks and windows.** Let R = M/NBLK. Block 0 holds rows 0..R (R+1 rows).
Block b > 0 holds rows bR+1 .. (b+1)R (R rows). Each block is a window of
**WB = N + R + 3 digits**. Digit 0 of block b's window has weight 10^(bR).
For 16 x 16 this is one 5-row block and three 4-row blocks, each 23 digits
wide and shifted by 4, 8 and 12 digits.

**Row layout inside a window.** Row k sits at window position j = k − bR.
Its N+1 digits fill positions j .. j+N.

* **Sign extension.** Above a row, the window is filled with 9s (1111) if the
  row is negative and 0s otherwise.
* **Hot ones.** The +1 of a negative row k goes into row k+1, at position j.
  That digit is free, because row k+1 starts one position higher. So the hot
  one of a block's last row lands in digit 0 of the next block. This is why
  blocks b > 0 start one digit below their first row.

Each block's digits then add up, modulo 10^WB, to the block's exact signed
partial sum in 10's complement. WB leaves enough headroom that the sign can
be read from the top digit.

**Decimal Q:2 compressors (`dec_csa_q2`).** Each block's Q rows are reduced
to two vectors, S and 2H, such that the sum of the rows equals S + 2H
(mod 10^WB). The building blocks:

* `full_adder`: the bit cell.
* `dec_csa32` (3:2): one full adder per bit gives S and H, which are valid
  4221 digits because 4221 is a weighted code. Then the 2X block doubles H.
* `bin_csa43`, `bin_csa73`, `bin_csa94`: binary counters that count the Q
  bits of one bit position into outputs of weight 1, 2 and 4.
* `dec_csa42` (4:2): a 4:3 counter per bit, 2X on both weight-2 vectors, and
  a closing 3:2.

How each Q is built:

| Q | construction |
|---|--------------|
| 1 or 2 | nothing to reduce |
| 3 | 3:2 |
| 4 | 4:2 |
| 5..7 | 7:3 counters (unused inputs tied to 0), 2X on the weight-2 vector, 2X twice on the weight-4 vector, then 3:2 |
| 8..9 | 9:4 counters, 2X / 2X·2X, then 4:2 |
| >9 | a chain of 3:2s down to 9 operands first |

## From carry-save to BCD

**Adder recoding (`adder_recoding`).** S and 2H are added two digits at a
time. Each pair gives two 4221 digits, D0 (low) and D1 (high). Each digit is
a binary add of the two digit values plus a "subtract 10 and carry" correction.
The low digit's carry goes into a second add on the high digit. The carry
*out* of a pair is not passed on. It leaves as a separate bit vector `c`
(`c[2g+2]` belongs to pair g). So S + 2H = D + c, and the carries are at most
one bit every two digits.

**Adder tree (`decimal_adder_tree`, `pg_adder`).**

* Level 1 turns each block into one number: D (recoded to BCD) plus c (read
  as a BCD number of 0/1 digits), added in a WB-digit carry-chain adder.
* `pg_adder` forms, per digit, generate (sum ≥ 10) and propagate (sum = 9),
  then runs c(i+1) = g(i) | p(i)·c(i). It works modulo 10^W, so 10's-complement
  operands simply add.
* The block result is shifted to weight 10^(bR) and sign-extended to N+M
  digits: 9s when its top digit is 5 or more.
* The following levels add pairs of these full-width numbers. An odd one out
  is only registered.

The final sum is the product, which always fits in N+M digits.

## Interface (`bcd_multiplier`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock, all registers on the rising edge |
| rst_n | in | 1 | synchronous, active-low; clears only the valid pipeline |
| in_valid | in | 1 | a and b carry an operation this cycle |
| a | in | 4N | multiplicand, BCD-8421 |
| b | in | 4M | multiplier, BCD-8421 |
| p | out | 4(N+M) | product, BCD-8421 |
| out_valid | out | 1 | p is valid; it rises LAT cycles after the matching in_valid |

Operands are sampled on the rising edge where in_valid is high, and the
product appears LAT edges later. There is no back-pressure: the pipeline
never stalls. Data registers are not reset, so p is meaningless while
out_valid is low. An immediate assertion flags non-BCD operand digits.

Instantiation:

```systemverilog
bcd_multiplier #(.N(16), .M(16), .NBLK(4)) u_mul (
  .clk, .rst_n, .in_valid, .a, .b, .p, .out_valid);
```

## Files

* `rtl/bcd_pkg.sv`: digit code functions.
* `rtl/bcd_multiplier.sv`: the top level and the pipeline registers of stages 1–4.
* `rtl/multiples_gen.sv`, `rtl/sd_recoder.sv`, `rtl/pp_gen.sv`
* `rtl/csa_reduction_tree.sv`, `rtl/dec_csa_q2.sv`, `rtl/dec_csa42.sv`,
  `rtl/dec_csa32.sv`, `rtl/dec_x2.sv`, `rtl/full_adder.sv`,
  `rtl/bin_csa43.sv`, `rtl/bin_csa73.sv`, `rtl/bin_csa94.sv`
* `rtl/adder_recoding.sv`, `rtl/decimal_adder_tree.sv`, `rtl/pg_adder.sv`
* `tb/tb_<module>.sv`: a self-checking testbench per module.
* `tb/mult_harness.sv`: a stimulus and checker for one multiplier instance,
  used by:
  * `tb/tb_bcd_multiplier.sv`: seven sizes and block counts.
  * `tb/tb_bcd_multiplier_full.sv`: the default 16 x 16 build with no
    parameter overrides, 2,000 operations.
  * `tb/tb_table_configs.sv` and `tb/tb_table_configs_32.sv`: every size
    from 4x4 to 32x32 with M/4 blocks, plus the 5/7-stage 8x8 and the
    6/8-stage 16x16 variants.

## Simulating

Every testbench prints one line `TB_RESULT checks=<n> failures=<n>` and ends
with `$finish`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/bcd_pkg.sv \
  tb/tb_bcd_multiplier_full.sv --top-module tb_bcd_multiplier_full
./obj_dir/Vtb_bcd_multiplier_full
```

Swap in any other `tb/tb_*.sv` to run a different testbench. The package file
must come first. Other modules are found through `-Irtl -Itb`.

Build times:

* The block testbenches build in seconds.
* `tb_bcd_multiplier` and the full-size test take under a minute.
* `tb_table_configs_32`, which holds the 32-digit multipliers, takes several
  minutes of C++ compilation.

## Verification

The expected product comes from schoolbook long multiplication on digit
arrays. It is computed independently of the design.

* **Operands.** Random operands are mixed with all-nines, all-zero, sparse and
  5/9-heavy operands.
* **Timing.** Bubbles in in_valid are random. Each product must appear
  exactly LAT cycles after its operands.
* **Mechanisms.** `mult_harness` also counts how often each datapath
  mechanism fired, and fails if any never did:
  * negative partial products;
  * negative-zero digits;
  * hot ones crossing into the next block;
  * pair carries out of the adder recoding;
  * negative block sums (which need sign extension);
  * back-to-back operations;
  * bubbles.
* **Block tests.** These check the arithmetic identity of each module, for
  example A+B+C = S+2H for the 3:2 CSA and D + c = S + 2H for the adder
  recoding. They use random 4221 patterns, not only the reduced ones. The
  counter tests are exhaustive.

## Design choices and departures

The architecture is the published one: SD radix-10 recoding, multiples in
4221, blocked decimal Q:2 reduction, 4221 adder recoding, and a tree of
carry-chain decimal adders with log2(#blocks)+1 levels. The points below are
this implementation's own reading or choice.

* **Multiple width.** Multiples and partial products are N+1 digits, enough
  for 5A.
* **Sign handling.** Negative rows use plain sign extension with 9s up to the
  block width. The published layout uses a compact two-digit sign encoding,
  whose exact digit values are not given. The block width (N + M/NBLK + 3)
  and the hot-one placement match the published layout.
* **Q:2 compressors.** The decimal 8:2 is built from 9:4 counters with one
  input tied to 0, not from the binary 8:4 counters described in the
  literature. The 7:3 counter has outputs of weight 1, 2 and 4, using a
  fourth full adder for the three weight-2 carries, so that every count up
  to seven can be represented with three outputs.
* **Adder recoding.** The carry out of each digit pair is kept as a separate
  vector and absorbed by the first adder level. That level also turns each
  block into a single BCD number.
* **Adder tree width.** The tree adds full-width (N+M digit) numbers after
  level 1, rather than trimming each adder to its bits' span.
* **Pipeline boundaries.** The boundaries inside the first four stages, the
  valid/reset handshake, and the one-hot magnitude encoding are this design's
  choice. The stage counts agree with the published ones for every size.
* **Correction logic.** The generate/propagate form of the decimal adder and
  the correction logic inside the adder recoding are the simplest correct
  ones, not a gate-level copy.
* **Not reproduced.** The FPGA-specific mapping (LUT packing, slices, carry
  primitives) and the area and frequency results are not part of this RTL.
  The RTL is technology-independent, and its area will differ.
