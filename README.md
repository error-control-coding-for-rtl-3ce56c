# Error-control circuits for semiconductor memories

Memory cells fail in two ways. Some fail for good, like a stuck cell, a dead
chip or a broken line. Others flip for a moment, for example when an alpha
particle hits a dynamic cell. The circuits here add redundant bits to each
stored word. On a read, the extra bits let the hardware find an error, and
often repair it, before the data leaves the memory.

The collection covers the main families of memory codes, from one parity bit
up to multiple-error correction and codes built for unidirectional errors:

| family | what it handles | modules |
|---|---|---|
| parity | detects any odd number of flipped bits | `parity_gen_check`, `parity_memory`, `bpw_parity`, `bpb_parity`, `bpmc_parity`, `bpc_parity`, `interlace_parity` |
| duplication, m-of-n | detects disagreement or wrong weight | `dup_codec`, `m_of_n_checker` |
| H-V parity | corrects one bit in a 2-D array, bit-serially | `hv_encoder`, `hv_decoder` |
| modified Hamming SEC-DED | corrects 1 error, detects 2 | `mh_encoder`, `mh_decoder`, `ecc_memory` |
| orthogonal Latin square (OLS) | corrects up to t errors by one-step majority vote | `ols_codec`, `ols_shortened` |
| erasure location and correction | finds stuck cells by writing a word and its complement, then corrects them from a table of stored syndromes | `erasure_locator`, `erasure_corrector` |
| unordered codes | detect all unidirectional errors | `balanced_codec`, `berger_codec` |
| tED-AUED | detects up to t random errors and all unidirectional errors | `ted_aued_codec` |
| SEC-AUED | corrects one error and detects all unidirectional errors | `product_sec_aued`, `ngp_codec`, `bp_codec` |

`ecc_suite_top` places every block side by side. Each block keeps its own
port group, marked by a prefix such as `mem_`, `hv_`, `ols_` or `ngp_`. Apart
from the erasure locator, which feeds the erasure corrector, the blocks do
not feed each other. They are separate circuits for different memory
organisations. Every module is synthesizable SystemVerilog with
parameters. The defaults are the sizes of the classic examples:
- a (72,64) main-memory word;
- a (19,12) H-V code;
- a (55,25) OLS code and its (44,16) shortened form;
- (8,4)-based unidirectional codes.

## The main-memory word: `ecc_memory`

This is the largest block. It models the scheme in which the CPU bus carries
byte parity while the array stores a (72,64) SEC-DED codeword.

- **Bus format.** A 72-bit bus word carries 8 bytes, and each byte is
  followed by its parity bit. Byte *b* is at `bus[9b +: 8]` and its parity
  at `bus[9b+8]`. Even-numbered bytes use odd parity and odd-numbered bytes
  use even parity. With this sense, an all-zero or all-one bus word is never
  valid.
- **Write.** `bpb_parity` checks the bus parity. If it is wrong, nothing is
  stored and `wr_reject` pulses. Otherwise the parity bits are dropped,
  `mh_encoder` adds 8 check bits, and the 72-bit codeword is written into
  the array in the same clock.
- **Read.** The codeword is registered at the clock edge. In the next cycle
  (`rd_valid`), `mh_decoder` does the following:
  - it corrects a single error, which raises `corrected`;
  - otherwise it flags a double or multiple error on `err_irq`, the
    interrupt to the CPU.

  Fresh byte parity is then generated for the bus.
- **Choices made here.** The corrected word is not written back. The depth
  is 1024 words. A read and a write to the same address in the same cycle
  return the old word.

## Modified Hamming codes: how the H matrix is chosen

`mh_encoder` and `mh_decoder` build the parity-check matrix at elaboration
time. The function `ecc_pkg::mh_data_columns(k, r)` computes it, so any
(k+r, k) size is a parameter change up to k = 256 and r = 10. The rules are
those of odd-weight-column SEC-DED codes:

- Check bit *i* has the unit column *e_i*.
- Data columns are distinct and have odd weight of at least 3. All
  weight-3 columns are used before any weight-5 column, so the matrix has
  as few ones as possible. This keeps the XOR trees small.
- Within a weight class, the columns are taken greedily. Each step picks the
  candidate that adds least to the busiest rows, so the row weights differ
  by at most one. This balances the delay of the check-bit trees. Ties go to
  the larger binary value, with row 0 as the most significant bit. For
  (8,4) this gives exactly the textbook matrix: data columns 1110, 1101,
  1011 and 0111.

The decoder forms the syndrome and acts on it as follows:

| syndrome | result |
|---|---|
| zero | no error |
| equal to a data column | that bit is flipped, `single_err` |
| a unit column | a check bit was hit, `single_err`, data unchanged |
| non-zero with even weight | `double_err` |
| odd weight but no column | `multi_err` |

Because every column has odd weight, a double error can never look like a
single error.

## H-V parity and the serial decoder

`hv_encoder` arranges the data as ROWS x COLS and produces one H (row)
parity bit per row and one V (column) parity bit per column. Data bit *n*
lies in row n / COLS and column n % COLS.

`hv_decoder` fixes errors one bit at a time. This suits decoding along a
memory word line during a read cycle. A `start` pulse captures the word.
Each following clock is one subcycle *n*:

1. The H-group selector feeds row *r* of the captured word to the H-parity
   generator.
2. The V-group selector feeds column *c* to the V-parity generator.
3. The correction circuit compares the new parities with the stored
   `hpar[r]` and `vpar[c]`. When both differ, the error sits at their
   crossing, bit *n*, and `corr` goes high.
4. The output multiplexer emits bit *n*, inverted when `corr` is high, on
   `bit_out`/`bit_idx` with `bit_valid`.

After ROWS*COLS subcycles, `done` pulses, `data_out` holds the corrected
word, and `n_corr` holds the number of corrections. The default 3 x 4 array
takes 12 subcycles.

`tb_hv_word_line` runs the same RTL at 16 x 32, the size of a 512-cell word
line. Decoding then takes exactly 512 clocks, which is 8.19 us at a 16 ns
subcycle. An error in a parity bit alone is never corrected, because only
data bits are output.

## Orthogonal Latin square codes: `ols_codec`

There are K = M² data bits, d(M*i + j), placed on an M x M square. The code
has 2T groups of M check bits. In every group, each data bit appears in
exactly one equation:

| group | a check bit covers |
|---|---|
| 0 | one row |
| 1 | one column |
| *s* ≥ 2 | the cells where the Latin square L[i][j] = ((s-1)·i + j) mod M has value *g* |

For prime M these squares are mutually orthogonal. So the 2T equations that
contain a given bit share no other bit. The decoder builds 2T independent
estimates of each bit, each equal to the syndrome bit XOR the received bit.
It adds the received bit as one more vote and takes the majority of the
2T+1 votes. Any T errors, in data or check bits, are out-voted.

With M = 5, the code is (35,25) for T = 1, (45,25) for T = 2 and (55,25) for
T = 3. Groups 2 and 3 reproduce the published incidence rows for m = 5, and
the testbench checks this bit by bit. Raising T only appends groups, so a
code with smaller T is a prefix of one with larger T. The H matrix is a
constant computed at elaboration, and the logic is a flat generate
structure: XOR trees plus one (2T+1)-input majority per bit.

### Shortened OLS code: `ols_shortened`

Memories want 8, 16, 32 or 64 data bits, not M². Shortening deletes data
columns of H, which is the same as fixing those bits at 0. Orthogonality and
the number of equations per bit do not change, so T errors are still
corrected. `ols_shortened` deletes row 0 of the square (d0..d4 for M = 5)
and then the rest of column 0 (d5, d10, d15, d20). That leaves 16 data bits.
The row-0 and column-0 check bits now cover nothing and are dropped, so
T = 3 gives a (44,16) code with 28 check bits. No remaining check covers
more than 4 data bits, against 5 in the full code, so the XOR trees are
shallower. Deleting the first 9 columns in order would also give 16 bits,
but some checks would still have 5 inputs. The module wraps `ols_codec`
with the deleted inputs tied to 0. Data bit k is cell
(1 + k/(M-1), 1 + k%(M-1)) of the square.

## Parity arrangements

These modules are separate circuits, each with its own organisation of
parity bits:

- **`parity_gen_check`**: one even-parity bit over a word. `parity_memory`
  uses it around a 16 x 4 array: the generator on write, the checker on
  read.
- **`bpw_parity`**: one bit per word. Parameter `ODD` selects odd or even
  parity.
- **`bpb_parity`**: one bit per byte, using the odd/even sense described in
  the main-memory section.
- **`bpmc_parity`**: each parity bit covers one bit position across all
  chips. Parity bit *i* is the XOR of bit *i* of every 4-bit chip. When
  every group fails together, `chip_fail` signals that a whole chip is
  dead.
- **`bpc_parity`**: one parity bit per chip, so `chip_err` points at the
  faulty chip.
- **`interlace_parity`**: bit *j* belongs to group j mod GROUPS. A burst of
  adjacent errors therefore spreads over different groups.

Two further checkers, also without correction:

- **`dup_codec`**: stores the word together with a plain copy, its
  complement (the default) or a half-swapped copy. It reports when the two
  halves disagree.
- **`m_of_n_checker`**: counts the ones and flags any word whose weight is
  not M. The default is 8-of-16.

## Erasure location

`erasure_locator` is a small state machine in front of any memory port with
one clock of read latency. It performs these steps:

1. write the test word *d*;
2. read it back as y1;
3. write its complement;
4. read that back as y2;
5. output `erasures = NOT(y1 XOR y2)`.

A working cell follows the complement, so y1 and y2 differ there. A stuck
cell returns the same value both times, so its position shows up as a 1.

For example, with d = 00010110 and the last cell stuck at 1, y1 is
00010111, y2 is 11101001 and `erasures` is 00000001. `done` rises 7 clocks
after `start`.

`erasure_corrector` uses these positions. A code of distance d corrects up
to d-1 erasures, so 3 for the (8,4) SEC-DED word used here. On `learn`, the
erasure vector is merged into the set of known defective positions. For
every non-empty combination of the first three known positions, the
corrector stores two things: the syndrome that combination would produce if
those cells were wrong, and the combination itself. That gives 7 entries,
written one clock after `learn`.

On a read, the syndrome of the word is compared with all stored entries at
once:
- a zero syndrome gives `clean`;
- a match gives `hit`, and the stored pattern is flipped out of the word;
- no match gives `miss`, which means a new defect. It must be located and
  learned, which adds its syndromes to the table.

With at most three erasures in a distance-4 code, every combination has a
different syndrome, so a match is never ambiguous. In `ecc_suite_top`, the
locator's `done` and erasure vector drive `learn` and `erase_mask`. Every
defect the locator finds is therefore learned automatically.

## Unidirectional-error codes

Many memory failures push bits in one direction only: all 1→0 or all 0→1.
A code detects every such error exactly when no codeword covers another
codeword bit by bit, that is, when the code is unordered.

- **`balanced_codec`**: the efficient balanced code with K = 10 and R = 5.
  - Encoding: complementing the first *j* bits of X (from the MSB) changes
    its weight by ±1 at each step. Some *j* therefore makes the word
    balanced, with K/2 ones. The encoder takes the smallest such *j* and
    appends a 5-bit check word of weight 2 that names *j*. The check words
    are the weight-2 words in ascending order: *j* = 0 → 00011, 1 → 00101,
    and so on.
  - Decoding: look up *j* and complement back. `error` is raised when the
    information part is unbalanced or the check word is not in the table.
  - Example: for X = 0111001101, the values j = 3, 5 and 9 all balance the
    word. This encoder emits j = 3.
- **`berger_codec`**: the check field is the number of zeros in the
  information, on ⌈log2(K+1)⌉ bits. With K = 8 there are 4 check bits, so
  00010110 gets 0101.
- **`ted_aued_codec`**: the information is first encoded with a distance-4
  modified Hamming code (K = 8, R = 5). The 13-bit result is then
  Berger-encoded, giving a 17-bit codeword. The Hamming part catches up to
  3 random errors and the Berger part catches every unidirectional error.
- **`product_sec_aued`**: the K1 x K2 information (3 x 2 by default) gets an
  even-parity bit per row. Each of the K2+1 columns then gets a Berger
  check of 2 bits, written downwards with the MSB first, which gives a
  5 x 3 codeword. One failing row together with one failing column locates
  a single error, which is then corrected. Any other pattern of failures is
  reported as `multi_err`.
- **`ngp_codec`**: built on the (8,4) modified Hamming codeword X, with
  check symbols B1 = k0 (4 bits) and B2 = ⌊k0/2⌋ (3 bits), where k0 is the
  number of zeros in X. The codeword is 15 bits.
  - Decoding: compute the syndrome; correct X if the syndrome names a
    column; recompute the symbols; form Q = Z + W(B' ⊕ D'), where Z is 1 if
    a correction was made.
  - The word is accepted (`ok`) when Q ≤ 1. Otherwise the errors are
    detected (`detected`).
  - `clean` means there was no error at all. `corrected` means the word was
    accepted after a correction.
- **`bp_codec`**: a Bose–Pradhan-style code for t = 1, also on the (8,4)
  code. It uses B1 = zeros of X and B2 = zeros of X‖B1, 4 bits each, for a
  16-bit codeword. If both recounted symbols are more than 1 away from the
  stored ones, the errors are detected. Otherwise the Hamming decoder
  corrects X, and a syndrome it cannot correct is also reported as
  detected.

For the three single-error-correcting codes, exhaustive testbenches check
two properties:
- every single error is corrected;
- no unidirectional pattern of any size, over all data words, is accepted
  with wrong data.

## Where this RTL departs from, or adds to, the published scheme

- **NGP check symbol B2.** The classic worked example prints B2 as 2 bits,
  for instance 01 for k0 = 4. But the defining formula B2 = ⌊k0/2⌋ needs 3
  bits for an 8-bit word. With only 2 bits, an exhaustive search finds
  unidirectional errors that are accepted with wrong data. The RTL follows
  the formula with 3 bits. The example word 11101000 therefore encodes as
  11101000 0100 010.
- **Erasure vector.** The erasure vector is the complement of y1 XOR y2.
  This is what makes the classic example give 00000001, since y1 XOR y2
  itself would be 11111110.
- **Balanced code, choice of j.** The smallest balancing *j* is used. The
  example word is balanced by j = 3 as well as by the j = 5 and j = 9
  usually quoted, so it encodes with j = 3.
- **Bit numbering in the H-V code.** Data bits are numbered d0…d(n-1),
  row-major.
- **Added by this design.** None of the following comes from the published
  scheme:
  - every handshake (`start`/`done`, `rd_valid`, `wr_reject`);
  - memory depths and latencies;
  - the tie-break rule for Hamming columns;
  - the table that maps *j* to a check word;
  - the code, size and timing of the erasure-syndrome table;
  - the t = 1 BP variant;
  - the use of a distance-4 Hamming code inside the tED-AUED code.
- **Not built as logic.** Memory cells, the 2D/3D/2½D array organisations
  and the host computer are described only as physical structures or
  context. They are not modelled.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops through a watchdog if it
hangs. Expected values are computed independently: popcounts, reference
masks and the published worked examples. Highlights:

- `tb_mh_encoder` checks the column rules (odd weight ≥ 3, distinct, fewest
  ones, balanced rows) for the (8,4), (13,8), (22,16), (39,32) and (72,64)
  codes.
- `tb_mh_decoder` tries every single-bit position of random (72,64) words,
  random double and triple errors, and all single and double errors of the
  (8,4) code.
- `tb_ols_codec` compares the check equations with the published m = 5
  incidence rows. It then checks random patterns of up to T errors for all
  three codes.
- `tb_ols_shortened` checks that every check of the (44,16) code covers 1 to
  4 data bits and compares the check bits with an independent H. It then
  tries every single error and random double and triple errors.
- `tb_ecc_memory` injects 1, 2 and 3 errors into stored words and bad bus
  parity, and checks the one-clock read latency.
- `tb_ecc_suite_top` runs the whole top at its default sizes. It counts 26
  separate mechanisms: correction, interrupt, rejection, each parity
  detection, the H-V correction, OLS triple correction (full and shortened), erasures located,
  corrected and missed, and each unidirectional detection or correction. A mechanism that never happens
  counts as a failure.
- `tb_erasure_corrector` tries every set of 1–3 erased cells, every
  combination of wrong cells within the set, and every data word. It also
  checks the miss-then-learn path.
- `tb_hv_word_line` decodes 512-bit word lines (16 x 32) and checks the
  512-subcycle timing.

Running a testbench with plain Verilator (5.x), from the repository root:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_ols_codec \
  -y rtl rtl/ecc_pkg.sv rtl/ecc_types_pkg.sv tb/tb_ols_codec.sv -Mdir obj
./obj/Vtb_ols_codec
```

Replace `tb_ols_codec` with any other testbench. The packages `ecc_pkg` and
`ecc_types_pkg` must come first. Other modules are found through `-y rtl`.
The simulations run in seconds, and the full top test takes well under a
minute.

Three testbenches reach into the design hierarchically to flip stored bits:
`tb_ecc_memory`, `tb_parity_memory` and `tb_ecc_suite_top` use
`dut.mem` / `dut.u_mem.mem`. If you rename those arrays, update the
testbenches as well.

## Changing sizes

| module | parameters | constraint |
|---|---|---|
| `mh_encoder`, `mh_decoder`, `ecc_memory` | `K`, `R` | K ≤ 256, R ≤ 10, and 2^(R-1) ≥ K + R |
| `ecc_memory` | `K` | multiple of 8 |
| `hv_encoder`, `hv_decoder` | `ROWS`, `COLS` | any |
| `ols_codec`, `ols_shortened` | `M`, `T` | M prime, T ≤ (M-1)/2 + 1 |
| `balanced_codec` | `K`, `R` | K even, C(R, ⌊R/2⌋) ≥ K |
| `berger_codec`, `ted_aued_codec` | `K` | check widths follow from K |
| `ngp_codec`, `bp_codec` | `K`, `R` (`B1W`, `B2W`, `BW`) | check symbols wide enough for the zero counts |
