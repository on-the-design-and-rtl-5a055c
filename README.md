# LZ77 compressor on a systolic match array

This is a lossless LZ77 data compressor in synthesizable SystemVerilog. LZ77
replaces a string that has already appeared with a pointer to where it
appeared and its length. The costly part is finding the longest earlier
occurrence of the upcoming text. Here a chain of small, identical processing
elements (PEs) does that search: each PE holds one upcoming symbol, and the
earlier text is streamed past them one symbol per clock.

The default configuration has 8-bit symbols, a 512-symbol searching buffer
(N) and a 15-symbol coding buffer (M). A compressed codeword is 14 bits:
a flag, a 9-bit pointer and a 4-bit length. An uncompressed symbol is 9 bits:
a flag and the 8-bit symbol.

## The algorithm as the hardware runs it

The input runs through a window of N+M symbols. The first N symbols are the
*searching buffer* (text already coded). The last M are the *coding buffer*
(text still to code). Each **codification step** has two parts:

1. **Search.** Find the longest prefix of the coding buffer that starts
   somewhere in the searching buffer. It may continue past the end of the
   searching buffer into the coding buffer itself; this is the usual
   overlapping LZ77 copy.
2. **Emit and shift.** If the longest match is more than `CW_SYMS` = 2
   symbols, emit the codeword `{1, pointer, length}` and shift the window by
   that length. Otherwise emit the first coding symbol as `{0, symbol}` and
   shift by one. Because of this check, a codeword never costs more bits than
   the symbols it replaces.

**Pointer convention.** The pointer is the searching-buffer cell where the
match starts, and cell 0 is the oldest. A decoder that has already produced
`k` symbols copies `length` symbols one by one, starting at output index
`k - (N - pointer)`. Copying one at a time makes overlapping matches come out
right.

**Ties.** If several positions give the same longest length, the oldest one
(lowest pointer) wins.

## Datapath

```
 in_data ──► up_buffer (N+M cells, shift left) ──parallel load──► shifter_buffer (N+M cells)
                 │ cells N..N+M-1 (coding symbols y[j])                 │ x (one symbol per cycle,
                 ▼                                                      ▼  broadcast)
 pointer_counter ──token(ptr)──► PE I[0] ─► PE I[1] ─► … ─► PE I[M-1] ─► PE II ─► best_ptr/best_len
                                                                                      │
                                                      codeword_unit ◄─────────────────┘
                                                           │
                                              out_code / out_is_match / out_ptr / out_len / out_literal
 lz_control (FSM) drives every enable above
```

* **`up_buffer`**: a cascade of N+M symbol registers. When its enable is
  high, every cell takes its right neighbour's value and the new input symbol
  enters the last cell. All cells are visible in parallel.
* **`shifter_buffer`**: a second chain of N+M registers, with a
  load/shift multiplexer in each cell. At the start of a step it copies the
  whole up-buffer in one cycle. It then shifts out one symbol per cycle to
  the PE array. The up-buffer therefore stays still during the search.
* **`pointer_counter`**: counts the cycles of the search phase. Its low bits
  are the searching-buffer position of the symbol now being broadcast.
* **`pe_array`**: M Type I PEs in a chain, closed by one Type II PE.
* **`codeword_unit`**: the expansion check and the codeword format
  (combinational).
* **`lz_control`**: the state machine.

## How the systolic search works

This is the part worth understanding in detail.

Type I PE `j` holds the coding symbol `y[j]` in its own register. It
captures the symbol in the LOAD cycle. The shifter-buffer sends
`X0, X1, …, X(N+M-1)` to *all* Type I PEs at once: first the searching
buffer, then the coding buffer.

In the cycle when `Xp` is on the bus, a **match token** for start position
`p` enters PE 0. A token holds:

* a valid flag
* a "still matching" flag
* the pointer `p`
* the length found so far

The token moves one PE per cycle. So it reaches PE `j` exactly when `X(p+j)`
is on the bus, which is the one symbol that PE must compare with `y[j]`.
Each PE uses one 4-input AND of (token valid, still matching, symbols equal,
PE enabled) to decide whether the match grows to length `j+1`. A multiplexer
then forwards either `j+1` or the incoming length.

M cycles after it was injected, the token reaches the Type II PE. That PE
keeps the pointer and length of the longest token so far, using a
greater-than comparator that drives two multiplexers.

Tokens are injected during the first N cycles of the stream. The stream lasts
N+M cycles, so the last token finishes just as the stream ends. **The search
takes N+M cycles no matter what the data is.**

Two signals mask the search:

* `code_len` counts the valid symbols in the coding buffer. It is below M
  only at the end of a stream. PEs at or beyond it are disabled, so no match
  reads padding.
* Searching-buffer positions that hold no data yet, at the start of a
  stream, get no token.

## Control and timing

States of `lz_control`:

| state | cycles | what happens |
|-------|--------|--------------|
| FILL  | M (plus input stalls) | the first M symbols enter the coding buffer |
| LOAD  | 1 | shifter-buffer loaded, counter and Type II PE cleared |
| MATCH | N+M | search (step 1) |
| EMIT  | 1 (plus output stalls) | `out_valid` held until `out_ready` |
| SHIFT | L (plus input stalls) | the window advances by the L symbols just coded (step 2) |
| DONE  | 1 | `done` pulse, then FILL for the next stream with an empty searching buffer |

With input and output always ready:

* The first codeword is valid `2M+N+1` cycles after the first symbol is
  offered.
* After that, the step that codes `L` symbols takes **N+M+2+L** cycles.
* At the defaults this is 529+L cycles per step.

Throughput is `clk · 8 · L_avg / (529 + L_avg)` bit/s. Text that averages
about 3.3 symbols per step gives roughly 11 Mbit/s at 219 MHz. The ideal
figure of N+M cycles per step counts only the search. This design adds the
load, emit and shift cycles, about 1% at the defaults.

### Interfaces

* **Input.** `in_valid` / `in_ready` / `in_data`. Raise `in_last` with the
  final symbol of a stream. Streams must be at least one symbol long.
* **After `in_last`.** The controller shifts zeros into the window and
  excludes them from matching. The stream ends when the coding buffer is
  empty.
* **Output.** `out_valid` / `out_ready`. When both are high, one item is
  transferred: either a codeword (`out_is_match`, `out_ptr`, `out_len`) or a
  literal (`out_literal`).
* **Packed word.** `out_code` is the same item as one word: `{1, ptr, len}`
  for a codeword, or `{0, zeros, symbol}` for a literal.
* **Reset.** `rst_n` is an asynchronous, active-low reset.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W` | 8 | symbol width |
| `N` | 512 | searching-buffer size (a power of two; the pointer is `$clog2(N)` bits) |
| `M` | 15 | coding-buffer size, which is also the number of Type I PEs and the longest match |
| `CW_SYMS` | 2 | a match must be longer than this many symbols to be emitted as a codeword |

The codeword is `1 + $clog2(N) + $clog2(M+1)` bits wide. It fits in two
bytes at the defaults, but grows with larger buffers.

Other sizes worth trying are N=4096 with M=16, or N=512 with M=32, 63 or
127. The trade-offs are described below. Hardware cost grows linearly: two
N+M-symbol register chains and M PEs. At the defaults, coarse synthesis gives
about 8.8k flip-flops, almost all of them in the two buffers. The PE array
itself is small.

### Buffer sizes

The choice of N and M trades compression against speed:

* A larger searching buffer finds longer matches, so it compresses better.
  It also makes every step longer, because a step takes N+M+2+L cycles.
* A longer coding buffer allows longer matches, but it widens the length
  field. It only helps when the data really contains long repeats.

`tb_lz77_sweep` shows both effects. Its stream is made of words drawn from a
120-word random vocabulary:

| N | M | output/input bits | symbols per step |
|---|---|-------------------|------------------|
| 512 | 15 | 0.561 | 2.29 |
| 512 | 16 | 0.575 | 2.29 |
| 512 | 32 | 0.590 | 2.29 |
| 512 | 127 | 0.604 | 2.29 |
| 4096 | 16 | 0.533 | 2.89 |

On this data, words are short and no match reaches 15 symbols, so a larger M
only costs bits. On long repetitive text, a larger M pays off.

## Where this design makes its own choices

The RTL follows the published architecture: an up-buffer and a shifter-buffer,
an (M+1)-PE systolic array of M Type I PEs and one Type II PE, a pointer
counter, a codeword module that checks for expansion, and an FSM controller.
It also keeps the default sizes and the PE component lists. The following
points are choices made for this implementation:

* **Broadcast bus.** The searching symbol is broadcast to all Type I PEs,
  while match tokens move through the chain. This is what makes a search take
  N+M cycles.
* **The PE's symbol register.** Each Type I PE's w-bit register holds its
  coding symbol. The register is loaded from the up-buffer in the same cycle
  as the shifter-buffer.
* **Shifter-buffer length.** The shifter-buffer is N+M symbols long, so that
  matches can extend into the coding buffer.
* **Codeword threshold.** A match of exactly `CW_SYMS` symbols is coded as a
  literal. Only strictly longer matches become codewords.
* **One literal per step.** A step that does not emit a codeword emits
  exactly one literal.
* **Ties.** The oldest position wins.
* **Not specified in the source design, and chosen here:** the codeword bit
  layout, the handshakes, the end-of-stream handling, the reset behaviour
  and the state encoding.
* **Not included:** the public-key encryption stage the compressor is meant
  to feed. Connect it to the output handshake.

## Files and simulation

`rtl/`:

* `lz77_pkg.sv`: default sizes and the state type
* `up_buffer.sv`, `shifter_buffer.sv`, `pointer_counter.sv`
* `pe_type1.sv`, `pe_type2.sv`, `pe_array.sv`
* `codeword_unit.sv`, `lz_control.sv`
* `lz77_compressor.sv`: the top level

`tb/`:

* One self-checking testbench per module: `tb_<module>.sv`.
* `lz77_ref_pkg.sv`: a software LZ77 reference, a decoder and a generator
  for text-like test data.
* `tb_lz77_compressor.sv`: end-to-end test at N=32, M=7. It covers three
  streams, random input and output stalls, and an exact cycle count for each
  step. It checks every codeword against the reference, decodes the output
  and compares it with the input. It also checks that each case occurs at
  least once:
  * literal with no match
  * literal because the match was too short
  * codeword
  * full-length match
  * match that runs into the coding buffer
  * partly filled searching buffer
  * end-of-stream flush
  * input stall and output stall
  * stream restart
* `tb_lz77_full.sv`: the default configuration on a 3000-symbol stream. It
  prints the compression ratio and the average symbols per step.
* `tb_lz77_sweep.sv`, with helper `lz77_stream_check.sv`: the buffer-size
  study. It compresses one deterministic 2000-symbol text stream with five
  (N, M) configurations and checks every one against the reference. It then
  checks that the larger searching buffer does not compress worse. It runs in
  about 1.5 minutes.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and then finishes.
To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_lz77_compressor \
    rtl/lz77_pkg.sv tb/lz77_ref_pkg.sv rtl/*.sv tb/tb_lz77_compressor.sv
./obj_dir/Vtb_lz77_compressor
```

For a single block, list only the package and the modules it uses. For
example, `tb_pe_array` needs `pe_type1.sv`, `pe_type2.sv` and `pe_array.sv`.
The full-size test simulates about 250k cycles in about a second.

## How far to trust it

* **Codeword-by-codeword checks.** Every block is checked against an
  independent model. The whole compressor is checked one codeword at a time
  against a software LZ77 search that uses the same rules, and its output
  decodes back to the input. This holds at both the reduced and the default
  sizes.
* **Timing.** The step timing is checked to the cycle.
* **Not verified here:** timing closure and area on an FPGA. No
  place-and-route was run, so a 219 MHz clock is a target, not a verified
  result.
