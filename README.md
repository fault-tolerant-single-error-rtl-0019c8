# Fault tolerant SEC-DED encoder for an ECC-protected memory

A memory protected by a single error correcting, double error detecting (SEC-DED) code survives
one flipped bit per word. The encoder that computes the check bits on every write can also
suffer a soft error. In a normal, area-optimised encoder, XOR gates are shared between check
bits. One upset on a shared gate then flips two or more check bits of the word being written.
That word is stored with what looks like a double error, and it cannot be corrected.

The usual fix is to triplicate the encoder and vote (TMR), which costs about 2.3 to 2.6 times
the area and power. This design takes a cheaper route. Every check bit gets its own XOR tree,
and no gate is shared between trees. An upset anywhere in the encoder can then corrupt at most
one bit of the stored word. The decoder corrects that bit on the next read, just like an upset
in a storage cell. The encoder then behaves like one more memory word as far as reliability
goes: an upset only matters if it hits during a write, and a later rewrite of the word clears
it.

The RTL contains three parts:

- the fault tolerant encoder;
- the codeword memory, with a port for injecting soft errors;
- a plain syndrome decoder. The decoder is taken to be fault free and is not hardened.

## Block diagram

```
            K bits                 K+R bits                 K+R bits                K bits
 wr_data_i ───────► ft_sec_encoder ────────► ecc_memory_array ────────► sec_ded_decoder ───────► rd_data_o
                    (R independent          (DEPTH words,             (syndrome, correct     + single / multi
                     parity_tree's)          upset port)               1, detect 2)            error flags
```

| module              | file                       | role |
|---------------------|----------------------------|------|
| `ft_ecc_memory`     | `rtl/ft_ecc_memory.sv`     | top: encoder, memory and decoder wired together |
| `ft_sec_encoder`    | `rtl/ft_sec_encoder.sv`    | one `parity_tree` per check bit |
| `parity_tree`       | `rtl/parity_tree.sv`       | balanced tree of 2-input XORs over the bits selected by a mask |
| `ecc_memory_array`  | `rtl/ecc_memory_array.sv`  | DEPTH x (K+R) storage, 1 write, 1 read, 1 upset port |
| `sec_ded_decoder`   | `rtl/sec_ded_decoder.sv`   | syndrome, single-bit correction, error flags |
| `sec_pkg`           | `rtl/sec_pkg.sv`           | the code: parity-check columns and helper functions |

Parameters of the top are `K` (data bits, default 16), `R` (check bits, default 6) and `DEPTH`
(words, default 256).

## The code

The default is a (22,16) code: 16 data bits and 6 check bits. The codeword keeps data bit `i` in
bit `i` and check bit `c(j+1)` in bit `16+j`. This is the column order of a systematic
generator matrix `G = [I | P]`. Row `i` of `P` lists the check bits that data bit `i` enters
(written c1..c6, left to right):

| data bit | c1..c6 | data bit | c1..c6 |
|---|---|---|---|
| b0 | 111000 | b8  | 011010 |
| b1 | 110010 | b9  | 101100 |
| b2 | 110001 | b10 | 100110 |
| b3 | 100011 | b11 | 011100 |
| b4 | 101001 | b12 | 001110 |
| b5 | 100101 | b13 | 010101 |
| b6 | 011001 | b14 | 001011 |
| b7 | 110100 | b15 | 000111 |

Every row has exactly three ones, and no two rows are equal. A single error therefore gives a
syndrome that is either one of these rows (a data bit) or a unit vector (a check bit). A double
error always gives a nonzero syndrome of even weight. That is what makes the code SEC-DED.

Read by columns, the check bits sum 9, 8, 8, 8, 7 and 8 data bits (c1 to c6). The rows for
b0–b5, b7 and b9–b11 follow the published (22,16) code this design is built around. The rows
for b6, b8 and b12–b15 were chosen here: they are the remaining weight-3 vectors, picked to
balance the check-bit sums. Error-correcting behaviour does not depend on that choice. Only
the exact check-bit values stored for a given data word do. If you need bit-exact
compatibility with another implementation of this code, replace `H22_COLS` in `sec_pkg`.

For any other `K`/`R`, `sec_pkg` generates the columns itself: all weight-3 vectors of `R` bits
in increasing numeric order, then the weight-5 ones, and so on (minimum odd-weight columns).
With `R=7` this gives a (39,32) code, and with `R=8` a (72,64) code. These two sizes are used
in the tests. The encoder checks at elaboration that `K` columns exist for the chosen `R`.

## Why the trees must stay separate

`ft_sec_encoder` instantiates one `parity_tree` per check bit. Each tree is a complete binary
tree of 2-input XORs over the data bits that its mask selects. The trees take 8, 7, 7, 7, 6 and
7 gates, 42 in all, and at most four XOR levels. Nothing connects two trees except the shared
data inputs. An input-wire fault is not an encoder fault: it is the same as writing different
data.

The separation only holds if the gate-level netlist keeps it. A synthesis tool that flattens
the design will find common sub-expressions (for example `b0^b1` appears in both the c1 and c2
trees) and share them. That brings back exactly the multi-bit failure the design removes. A
flattened synthesis run of `ft_sec_encoder` came out at 39 XOR cells instead of 42: three gates
were merged across trees. `parity_tree` therefore carries the `keep_hierarchy` attribute. In
your own flow, keep each `parity_tree` instance as its own hierarchy, or use your tool's
directive against resource sharing for these cells. The same applies to later netlist
optimisation.

The published gate-level version of this encoder uses multi-input XOR gates, 24 in all for the
(22,16) code, about a quarter more than the 19 of a shared-logic encoder. This RTL describes the
same function with 2-input gates. The gate count and grouping you get depend on your library.

## Timing and interfaces

- **Encoder and decoder** are purely combinational.
- **Write:** `wr_en_i`, `wr_addr_i` and `wr_data_i` are sampled at the rising clock edge. The
  encoded word is written at that edge. An encoder upset only matters if it coincides with this
  edge.
- **Read:** raise `rd_en_i` with `rd_addr_i` for one cycle. In the next cycle `rd_valid_o` is
  high, and the following outputs are valid:
  - `rd_data_o`: corrected data;
  - `rd_syndrome_o`: the syndrome;
  - `rd_single_err_o`: one bit was wrong and has been corrected;
  - `rd_multi_err_o`: uncorrectable, for example a double error.

  The decoder sits after the memory's read register, so the decoder's delay is part of the next
  path. A read and a write to the same address in the same cycle return the old word.
- **Upset port:** `upset_en_i`, `upset_addr_i` and `upset_mask_i` (K+R bits) XOR the mask into
  the stored word at the clock edge. If the same word is written in that cycle, the mask is
  applied to the new word. This port exists to model soft errors in storage cells. In silicon,
  tie `upset_en_i` low.
- **Reset:** `rst_n` is asynchronous, active low, and clears only the read register and
  `rd_valid_o`. The storage array is not reset, as in an SRAM.

Word count, read latency, read-during-write behaviour, the flags and the upset port are choices
of this design. The block diagram itself only fixes the chain: encoder, memory words, decoder.

## Reliability argument in brief

Let the memory have M words. With TMR on the encoder, failures come from upsets accumulating in
the storage cells. The mean number of upsets to failure grows like sqrt(pi*M/2).

With this encoder, an encoder upset can at most add one wrong bit to one word on a write. It
acts like an M+1-th word, which gives sqrt(pi*(M+1)/2): no practical difference for large M. In
fact it is a little better than that. A write replaces any error the word held before, so a
faulty write leaves exactly one wrong bit.

An unprotected, shared-logic encoder caps the figure at about M+1. That is harmless without
scrubbing. With scrubbing, however, the memory alone would do far better, and the encoder
becomes the weak point. Scrubbing itself is not part of this RTL.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=<n> failures=<n>`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sec_pkg.sv tb/ft_ecc_memory_tb.sv \
          --top-module ft_ecc_memory_tb
./obj_dir/Vft_ecc_memory_tb
```

Replace the testbench name to run the others. The package file must come first; the other
modules are found through `-Irtl`.

| testbench | what it shows |
|---|---|
| `tb/ft_sec_encoder_tb.sv` | (22,16), (39,32) and (72,64) encoders match check equations written out in the testbench, on walking-one and 3000 random words. The (22,16) columns are distinct and of weight 3. Every one of the 42 XOR gates is forced to the wrong value in turn, for 8 data words: exactly one check bit, the tree's own, changes each time. |
| `tb/sec_ded_decoder_tb.sv` | For (22,16): every single error (22) and every double error (231) on 12 words. For (72,64): random single and double errors on 600 words. Checks corrected data, the flags, and the syndrome equal to the XOR of the flipped columns. |
| `tb/ecc_memory_array_tb.sv` | Random writes, reads and upsets against a reference array, including write and upset on one word in one cycle. Checks the one-cycle read latency and that the read register holds. |
| `tb/ft_ecc_memory_tb.sv` | End to end at the default size, (22,16) with 256 words, over 8000 random operations. Encoder faults are injected by forcing one gate of one tree during a write, and storage upsets through the port. Each read's data, flags and `rd_valid_o` timing are checked. The test requires each case to occur: clean read, corrected data-bit upset, corrected check-bit upset, corrected encoder fault (its syndrome must name the tree's check bit), detected double error, and an error removed by a rewrite. |
| `tb/ft_ecc_memory_codes_tb.sv` | The full memory built as (39,32) and (72,64), 64 words each, under random writes, single and double upsets, and reads. |

What is not verified:

- no gate-level or timing simulation;
- no check that a particular synthesis flow keeps the trees apart. Inspect the netlist for
  that: each check-bit output cone must share no gate with another.

## Departures and limits

- **Columns of the (22,16) code.** Six of the sixteen rows of the parity table are this
  design's choice, as described above. The (39,32) and (72,64) codes are generated, not taken
  from a published table.
- **Gate style.** The XOR trees use 2-input gates, not the multi-input gates of the published
  circuit.
- **Not included:**
  - the triplicated (TMR) encoder and the shared-logic encoder, which are only reference points
    for the cost comparison;
  - memory scrubbing;
  - any hardening of the decoder.
- **Memory size.** `DEPTH=256` is an arbitrary default. The reliability argument only assumes a
  large memory.
