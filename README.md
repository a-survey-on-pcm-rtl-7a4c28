# Non-binary orthogonal Latin square ECC for multilevel phase change memory

A multilevel phase change memory (PCM) cell stores several bits as one of
2^b resistance levels. Over time the resistance of a programmed cell drifts
upward and can cross the threshold that separates two levels; the read then
returns a wrong level. When that happens the whole b-bit symbol of the cell is
wrong, often in more than one bit at once. A binary error-correcting code sees
that as several independent bit errors and spends its correction power on
them.

This RTL protects data with a code that works on whole cell symbols instead:
a **non-binary orthogonal Latin square (OLS) code over GF(2^b)**. It keeps the
two properties that make binary OLS codes attractive for memories, namely
correction of several errors and a decoder that finishes in one parallel,
non-iterative pass, and makes them count errors in cells rather than in bits.
A (n, k) code built here corrects any **t erroneous cells** in a word of
n = k + r cells, whatever values those cells hold.

The default build protects k = 64 octal symbols (b = 3 bits, 8-level cells)
with r = 32 check symbols and corrects t = 2 cells per 96-cell word.

## The idea: same matrix, bigger alphabet

A binary OLS code with k = m^2 data bits that corrects t bit errors has a
parity-check matrix H with r = 2tm rows holding only 0s and 1s. The
non-binary code uses **exactly the same H**. Only the alphabet changes: each
position is now a b-bit symbol, and the sums that H describes are taken in
GF(2^b). Since H holds only 0 and 1, no multiplications are needed, and
addition in GF(2^b) is the bitwise XOR of the b-bit symbols. The encoder and
syndrome generator are therefore b parallel copies of the binary OLS XOR
networks. Only the error calculator differs in substance, because it must
recover a b-bit error value and not a single flipped bit.

Compared with running a binary OLS code over the k*b bits, the check part
shrinks. It has 2tm symbols, with m = sqrt(k) counted in symbols, not in
bits. A t-cell error is also handled as t errors, not up to t*b.

### How H is built (`nbols_pkg`)

Lay the k = m*m data symbols out in an m x m square, symbol j at row
a = j / m and column c = j % m. The 2t*m check symbols form 2t groups of m.
Data symbol j belongs to exactly one check of each group:

| group g  | check row inside the group |
|----------|----------------------------|
| 0        | a (its row of the square)  |
| 1        | c (its column)             |
| 2 .. 2t-1| L_(g-1)(a, c) = (g-1)*a + c |

Each L_l is a Latin square of order m. The arithmetic is done in GF(m) when m
is a power of two, using a fixed primitive polynomial, and modulo m when m is
prime. For l = 1 .. m-1 these squares, together with the row and column
partitions, are mutually orthogonal. So:

* every data symbol is covered by exactly 2t checks (column weight 2t);
* two different data symbols share **at most one** check. This is the
  row-column constraint, which makes one-step majority decoding possible.

Hence t can be at most (m+1)/2, and m must be a prime or a power of two.
Any other combination raises an `$error` at elaboration, for example k = 100 (m = 10).
H is only ever evaluated at elaboration. It becomes wiring and costs no
logic.

The codeword is systematic. Data symbols sit at indices 0 .. k-1 and check
symbols at k .. n-1 (`codeword = {check, data}` as a packed array).

## Decoding in one pass

`nbols_decoder` chains three combinational stages:

1. **Syndrome generator** (`nbols_syndrome_gen`). It re-encodes the received
   data with the same check generator as the write path and XORs the
   received check symbols in. A symbol error of magnitude e in data symbol j
   makes every one of the 2t checks that cover j differ by e (unless another
   error in the same check cancels it).
2. **Error pattern calculator** (`nbols_error_calc`). For each data symbol j
   it picks out its 2t syndrome symbols S_j, one from each group, and feeds
   them to a majority circuit that returns the error magnitude e_j.
3. **Adder** (`nbols_adder`). It computes d_j = d'_j XOR e_j.

### Why the majority can be taken digit by digit

The hard part is stage 2. A true majority vote over b-bit symbols would
decode each symbol into 2^b one-hot lines, count votes per value and encode
the winner back. `nbols_digit_majority` does something much cheaper. It
votes on each of the b binary digits on its own. Output bit d is 1 exactly
when more than t of the 2t inputs have bit d set.

This is *not* a majority function in general. The inputs (3, 3, 4, 5) over
GF(8) with t = 2 give 001 = 1, although 3 is the majority. It is still
exact for decoding, because of what the row-column constraint guarantees
when at most t cells are wrong:

* **If symbol j is wrong** by e_j, the other at most t-1 errors can disturb
  at most t-1 of its 2t checks. Each of them shares at most one check with
  j. So at least t+1 inputs equal e_j. Every digit of e_j then has at least
  t+1 votes for its value: a 1 gets more than t ones, and a 0 allows at most
  t-1 ones.
* **If symbol j is right**, the at most t errors disturb at most t of its
  checks, so at least t inputs are 0. No digit can collect more than t ones,
  and the output is 0.

Patterns such as (3, 3, 4, 5), where the digit vote and the symbol vote
disagree, cannot arise from t or fewer errors. Each digit's vote is a small
adder chain that counts the ones, followed by a compare with t.

Check symbols are not corrected. An error in a check cell only spoils one
syndrome symbol, which the vote absorbs, and the decoder outputs only the
k data symbols.

## Modules

| module | role |
|---|---|
| `nbols_pkg` | defaults (K = 64, T = 2, B = 3), GF(m) arithmetic, Latin squares, H |
| `nbols_encoder` | check symbol generator; builds the systematic codeword |
| `nbols_syndrome_gen` | re-encode received data, XOR received checks |
| `nbols_digit_majority` | digit-wise vote of 2t symbols, threshold t+1 |
| `nbols_error_calc` | one digit-majority per data symbol, inputs chosen by H |
| `nbols_adder` | GF(2^b) correction (XOR) |
| `nbols_decoder` | syndrome generator, error calculator and adder |
| `nbols_pcm_ecc` | top: encoder on the write path, decoder on the read path |

### Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 64 | information symbols per word; must be m*m with m prime or a power of two, m <= 256 |
| `T` | 2 | correctable erroneous symbols; 1 <= T and 2T-2 <= m-1 |
| `B` | 3 | bits per symbol (cells with 2^B levels) |
| `M`, `R`, `N` | 8, 32, 96 | derived: sqrt(K), 2*T*M check symbols, K+R cells per word |

The choices made here where the method leaves freedom are: k = 64, t = 2
and b = 3 as defaults; the particular set of Latin squares; and the codeword
layout. Exposing the syndrome and error pattern on the decoder and the top
is also this design's addition. A nonzero `rd_syndrome_o` tells the system
that a word held errors, which is useful for scrubbing or for logging drift.

### Interface and timing of the top (`nbols_pcm_ecc`)

| port | dir | width (default) | meaning |
|---|---|---|---|
| `wr_data_i` | in | [K-1:0][B-1:0] (64 x 3) | data to store |
| `wr_codeword_o` | out | [N-1:0][B-1:0] (96 x 3) | symbols to program into the cells |
| `rd_codeword_i` | in | [N-1:0][B-1:0] | levels read back from the cells |
| `rd_data_o` | out | [K-1:0][B-1:0] | corrected data |
| `rd_syndrome_o` | out | [R-1:0][B-1:0] | zero when the read word is a codeword |
| `rd_err_o` | out | [K-1:0][B-1:0] | error magnitude removed from each data symbol |

Both paths are purely combinational and have no clock or reset. Put
registers around the top to suit the memory's timing. The cell array, with
its programming and sensing circuits, is analog and outside this RTL. It
connects through the two codeword ports, one symbol per cell.

The decoder's logic depth is the syndrome XOR tree (m + 1 inputs), then a
popcount of 2t bits and a compare, then one XOR. After coarse synthesis the
default top is about 1,700 word-level cells (XORs, adders and compares) and
has no flip-flops.

## What has been checked, and the limits

Each module has a self-checking testbench in `tb/` that compares it against a
reference model written separately in `tb/tb_ols_ref_pkg.sv`. That model
builds the Latin squares with log/antilog tables instead of shift-and-add
multiplication.

* `tb_nbols_encoder`: encodes unit words and checks column weight 2t, one
  check per group and the row-column constraint for all pairs; then random
  words against the reference.
* `tb_nbols_digit_majority`: every input combination for (t, b) = (2, 3) and
  (3, 2), the (3, 3, 4, 5) -> 1 case, and t+1 equal inputs always winning.
* `tb_nbols_syndrome_gen`, `tb_nbols_error_calc`, `tb_nbols_adder`,
  `tb_nbols_decoder`: random words and 0 .. t random symbol errors.
* `tb_nbols_pcm_ecc`: end to end at the default size. It runs 3000
  write / drift / read operations through a model of the cell array. Drift
  either moves a cell up one or more levels or changes its symbol
  arbitrarily. The test counts, and requires, clean reads, corrected data
  cells, errors in check cells, words with the full t bad cells, errors that
  change several digits of a symbol, and one-level drift.
* `tb_nbols_pcm_ecc_cfgs`: the same flow at (k, t, b) = (16, 2, 2),
  (16, 1, 3), (25, 3, 3), (49, 4, 2), (64, 4, 3) and (121, 2, 3). These
  cover quaternary cells, prime square orders and a word of about 100
  symbols.

Limits to keep in mind:

* Only GF(2^b) is built. The same construction works over any finite ring,
  such as modulo-3 arithmetic for ternary cells. That would need adders
  modulo q in place of XOR and a true symbol majority in place of the digit
  vote. It is not implemented.
* More than t bad cells are neither corrected nor reliably flagged. The
  syndrome is nonzero for any detectable pattern, but no separate
  uncorrectable-error signal is produced.
* The code assumes the cell reads give a symbol. Threshold placement,
  drift-aware sensing and iterative programming belong to the analog array.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_nbols_pcm_ecc -y rtl -y tb +libext+.sv \
    rtl/nbols_pkg.sv tb/tb_ols_ref_pkg.sv tb/tb_nbols_pcm_ecc.sv
./obj_dir/Vtb_nbols_pcm_ecc
```

Swap in any other testbench name. Each one ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. All of them
finish in well under a second.

To change the code, set `K`, `T` and `B` on `nbols_pcm_ecc` (or on any
sub-block). Use, for example, `#(.K(16), .T(2), .B(2))` for 4-level cells.
A combination that has no OLS construction raises an `$error` at elaboration.
