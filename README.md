# P-Match cache-word compressor

P-Match compresses a 64-bit cache word by coding it against a small
dictionary, and it does so in two pipeline stages of plain combinational logic.
Runs of zeros and ones are kept as they are. Every other group of bits is kept
only as a one-symbol "matched" or "not matched" verdict against a dictionary
entry. The word is coded against all four dictionary entries in parallel. A
*priority selection unit* (PSU) then keeps the coding with the fewest
mismatches. This repository holds synthesizable SystemVerilog for the
compressor in its 2:1 and 4:1 configurations and for three PSU structures that
make the same choice with different amounts of hardware.

The coding loses information, because an unmatched group becomes a bare `X`.
The output is also not tagged with the dictionary entry that produced it. No
decompressor is defined for it, and none is included.

## Symbols

A compressed word is a string over four symbols:

| symbol | meaning for one group of input bits               | encoding here |
|--------|----------------------------------------------------|---------------|
| `0`    | the group is all zeros                             | `2'b00`       |
| `1`    | the group is all ones                              | `2'b11`       |
| `W`    | mixed group, equal to the same group of the entry  | `2'b01`       |
| `X`    | mixed group, different from it                     | `2'b10`       |

In the 2:1 configuration a group is a bit pair. The dictionary holds four 8-bit
entries: `10100101`, `10101010`, `01011010` and `01010101`. For example, the
byte `10011100` has the pairs `10 01 11 00`. Against the entry `10100101`
(pairs `10 10 01 01`) it codes as `W X 1 0`.

Symbols are packed into `pmatch_pkg::sym_t` arrays. The highest index holds the
leftmost symbol, which comes from the most significant input bits. The
encoding column is this design's choice. The "2:1" and "4:1" names count
symbols, not bits: 64 input bits become 32 or 16 symbols. At two bits per
symbol the 2:1 output is still 64 bits wide and the 4:1 output is 32 bits wide.
Keep this in mind before reading the ratios as storage savings.

## Stage 1: candidate words

`pattern_match` cuts the 64-bit word into segments: eight 8-bit segments for
2:1, or four 16-bit segments for 4:1. Each segment feeds one `pm_segment`. That
unit splits its segment into four groups, leftmost first, and codes them
against each of the four dictionary entries. This gives four symbols per entry
and segment. The codes from all segments for dictionary entry *k* are
concatenated, leftmost segment first, into candidate word W(k+1). So there are
four candidates of 32 symbols (2:1) or 16 symbols (4:1).

The `0` and `1` symbols depend only on the input. They are therefore identical
in all four candidates, and the candidates differ only in where they have `W`
and where `X`.

Worked example (2:1): the input `0xD2F0B0B0F8B8B4E1` gives these candidates:

```
W1  1x0x1100w100w10011x0w1x0w1w01w0w   score 28
W2  1x0w1100w100w10011w0w1w0w1x01w0x   score 29   <- selected
W3  1w0w1100x100x10011w0x1w0x1x01x0x   score 25
W4  1w0x1100x100x10011x0x1x0x1w01x0w   score 24
```

## Stage 2: priority selection

The score of a candidate is its number of `0` symbols, plus its `1` symbols,
plus its `W` symbols. Equivalently, it is the word length minus the number of
unmatched `X` groups. The unit outputs the candidate with the highest score. A
tie goes to the lower-numbered candidate.

All three structures use the same tail. Two "Max" units compare W1 with W2 and
W3 with W4, and a third compares the two winners. Each Max unit is one
less-than comparator that keeps its first input on equality. The selector then
compares the maximum with the scores of W1, W2 and W3 (three equality
comparators). It outputs the first candidate that matches, or W4 if none does.

| structure | module | counting                                                   | wide adders | Max (less) | selector (equal) |
|-----------|--------|------------------------------------------------------------|-------------|------------|------------------|
| PSU 1     | `psu1` | counter 0, counter 1 and counter W for every candidate      | 8           | 3          | 3                |
| PSU 2     | `psu2` | zeros and ones counted once, on W1; counter W per candidate  | 5           | 3          | 3                |
| PSU 3     | `psu3` | counter W per candidate only                                | 0           | 3          | 3                |

PSU 2 relies on the observation under Stage 1: the zeros and ones are the
same in every candidate, so counting them on one candidate is enough. PSU 3
goes one step further. Adding the same number to every score cannot change
which score is largest, nor how ties fall, so it drops that count altogether.
For candidates produced by stage 1 the three structures therefore always give
the same output. They are not equivalent for arbitrary unrelated words, and only
`psu1` is tested on such words.

Counts and sums are `VAL_W` = 32 bits wide by default, to match 32-bit adders
and comparators. Only `clog2(NSYM+1)` bits (6 for 32 symbols) are ever
non-zero, so `VAL_W` can be reduced to that.

## Pipeline and interface

`pmatch_compressor` has two register stages:

1. `pattern_match`, then a register holding the four candidates
   (`cand_q`), loaded when `in_valid` is high;
2. the selected PSU, then the output register `out_word`.

A word presented with `in_valid` at clock edge *t* appears on `out_word`
with `out_valid` after edge *t+2*. One word can be accepted every cycle. There
is no stall or back-pressure. `rst_n` is an asynchronous, active-low reset
that clears only the two valid flags. Words in flight when reset is asserted
are dropped, and the data registers are not reset. The register placement,
the valid flags and the reset scheme are this design's choices; the split into
a matching stage and a selection stage is the P-Match structure. An assertion,
`a_sel_is_candidate`, checks that the selected word is always one of the four
candidates.

Parameters of `pmatch_compressor`:

| parameter  | default     | meaning                                             |
|------------|-------------|-----------------------------------------------------|
| `SEG_W`    | 8           | segment width; a group is `SEG_W/4` bits             |
| `N_SEG`    | 8           | segments per word (input width `SEG_W*N_SEG`)        |
| `DICT`     | `DICT_2TO1` | four dictionary entries of `SEG_W` bits, entry 0 at index 0 |
| `PSU_ARCH` | 3           | PSU structure: 1, 2 or 3                             |
| `VAL_W`    | 32          | width of counts, sums and comparators               |

Default `PSU_ARCH` is 3 because it is the smallest and fastest of the three.

## Top level

`pmatch_top` places both configurations side by side, with shared `clk` and
`rst_n`:

* `c2_*`: 2:1 compressor, 64-bit `c2_in_data`, 32-symbol `c2_out_word`.
* `c4_*`: 4:1 compressor, 64-bit `c4_in_data`, 16-symbol `c4_out_word`.

Its only parameter, `PSU_ARCH`, is passed to both compressors.

The 4:1 configuration uses 4-bit groups against 16-bit dictionary entries.
No 4:1 dictionary is published. `DICT_4TO1` = `C3C3`, `3C3C`, `A5A5`, `5A5A`
is this design's own choice. It is picked so that a word of repeated `1100`
compresses to `wxwxwxwxwxwxwxwx`, the result quoted for that configuration.
Replace it through the `DICT` parameter if you have a better one. The 2:1
dictionary is the published one.

## Files

| file                         | contents                                                   |
|------------------------------|------------------------------------------------------------|
| `rtl/pmatch_pkg.sv`          | `sym_t`, dictionaries, PSU selector codes                   |
| `rtl/pm_segment.sv`          | one segment coded against the four dictionary entries      |
| `rtl/pattern_match.sv`       | stage 1: all segments, concatenation into W1..W4           |
| `rtl/sym_counter.sv`         | counter 0 / 1 / W (population count of one symbol)          |
| `rtl/max_unit.sv`            | Max comparator, first input wins ties                       |
| `rtl/psu_selector.sv`        | selector with three equality comparators                   |
| `rtl/psu1.sv` `psu2.sv` `psu3.sv` | the three PSU structures                               |
| `rtl/pmatch_compressor.sv`   | the two-stage compressor                                    |
| `rtl/pmatch_top.sv`          | 2:1 and 4:1 compressors side by side                        |
| `tb/pmatch_ref_pkg.sv`       | text-based reference model used by the testbenches          |
| `tb/tb_*.sv`                 | one self-checking testbench per module, plus top-level runs |

## Verification

Every testbench compares the RTL with `pmatch_ref_pkg`. That model works on
strings of `0`/`1` characters and shares nothing with the RTL except the symbol
encoding. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_pm_segment`: the twelve published codes of the three example bytes
  (`10011100`, `10011001`, `11001001`). It also checks the example with the
  entries `11000110 11010010 11100000 10101010`, which gives
  `10xx 10xx 10xx 10wx`. Then it runs all 256 bytes, and random 16-bit
  segments.
* `tb_pattern_match`: the worked example above, `1100...` words in both
  configurations, and random words.
* `tb_sym_counter`, `tb_max_unit`, `tb_psu_selector`: unit checks, including
  ties.
* `tb_psu1/2/3`: the published 4-symbol case. The candidates `10XW 10XX 10WW
  10WX` must select `10WW`, and the internal sums, scores and Max outputs must
  have their published values. Then thousands of coded candidate sets, with
  ties and every winning position required to occur.
* `tb_pmatch_compressor`: 2:1 with PSU 1/2/3 and 4:1 with PSU 1/3 on one
  stream. It checks the exact two-cycle latency, back-to-back words, idle
  cycles and a reset in mid-stream.
* `tb_pmatch_top`: end-to-end at default parameters on both compressors. It
  requires each of the following to occur: all four output symbols, each
  candidate winning, ties, back-to-back words, idle cycles and a reset.
  `tb_pmatch_top_psu1` and `tb_pmatch_top_psu2` run the same test with the
  other PSU structures.

To run one testbench with Verilator (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/pmatch_pkg.sv tb/pmatch_ref_pkg.sv tb/tb_pmatch_top.sv \
    --top-module tb_pmatch_top -Mdir obj_top
./obj_top/Vtb_pmatch_top
```

`-y rtl` lets Verilator find the modules by file name. Swap in another
`tb/tb_<name>.sv` and top-module name to run a different testbench. Every
testbench finishes in well under a second.

## Where this design departs from or goes beyond its source

* **Selection rule.** The source also states a priority order: all-ones
  words first, then all-zeros, then mixtures of the two, then matched groups,
  with unmatched groups last. The hardware it draws is different: it adds up
  the counts and takes the maximum, and its simulation values follow that
  sum. This RTL implements the sum.
* **Symbol width, pipeline registers, valid/reset and the 4:1 dictionary**
  are this design's choices, described above.
* **No side information.** Nothing in the output says which dictionary entry
  was used. A decompressor would need at least that 2-bit index, and it would
  still have to reconstruct the `X` groups.
* **Fixed dictionary.** The dictionary is a build-time parameter. No update
  mechanism is described, so none is built.
* **Lint notes.** Verilator reports the score input of W4 at the selector as
  unused. That is intended: the last candidate is the fallback, so it needs no
  comparator. Verilator also reports `rst_n` as used both synchronously and
  asynchronously, because the assertion's `disable iff` reads it.
