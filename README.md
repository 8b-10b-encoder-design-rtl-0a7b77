# 8B/10B transmit encoder with special-character check and output FIFO

A fast serial link, such as an optical fibre, needs its bit stream to be
DC-balanced and to change level often. Otherwise the receiver's baseline
drifts and its clock recovery loses lock. The 8B/10B code does this. Each byte
becomes a 10-bit word with five ones, or with four or six. The encoder keeps
track of the imbalance so far, called the running disparity (RD). When a word
must be unbalanced, the encoder picks the form that cancels the imbalance
instead of adding to it. As a result the line never has more than five equal
bits in a row, and its running sum stays within ±1 at word boundaries.

This RTL implements such an encoder as a lookup-table design in three stages:

```
 dtin[7:0], kin, wr ──► special-character check ──► 8B/10B encoder ──► FIFO ──► dout[9:0]
                        (kerror)                     (dtout[9:0])
```

It accepts one byte per clock and has one clock of latency to `dtout`. The
design is small: about 80 word-level cells, 24 flip-flop bits and a 16×10
FIFO memory.

## Files

| file | what it is |
|---|---|
| `rtl/enc_pkg.sv` | shared types, the special-character table, bit-count helpers |
| `rtl/enc_5b6b.sv` | 5B/6B lookup: EDCBA → abcdei, both RD forms |
| `rtl/enc_3b4b.sv` | 3B/4B lookup: HGF → fghj, both RD forms, alternate x.7 |
| `rtl/k_detect.sv` | special-character check and lookup, `kerror` register |
| `rtl/rd_control.sv` | running disparity, choice of forms, output register |
| `rtl/enc8b10b.sv` | the encoder: the four blocks above wired together |
| `rtl/sync_fifo.sv` | single-clock FIFO for the 10-bit words |
| `rtl/enc8b10b_top.sv` | the whole path: encoder followed by the FIFO |
| `tb/enc_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fig4_sequence` |

## How a byte is split and what comes out

The input byte is named `HGFEDCBA`, where A is `dtin[0]`.

- The five low bits EDCBA (`dtin[4:0]`) go through the 5B/6B table and become
  the six bits `abcdei`.
- The three high bits HGF (`dtin[7:5]`) go through the 3B/4B table and become
  the four bits `fghj`.
- A data byte with value `EDCBA = x` and `HGF = y` is called D.x.y.

The output is `dtout[9:0] = {a,b,c,d,e,i, f,g,h,j}`. So `a` is in bit 9 and
should be sent first. For example:

| byte | name | dtout |
|---|---|---|
| `00100110` | D6.1 | `011001 1001` |
| `00110001` | D17.1 | `100011 1001` |

## Running disparity: the part that matters

Each 6-bit or 4-bit sub-block is one of three kinds:

- **Balanced, with one form.** D.3 in 5B/6B, or x.1 in 3B/4B. It is sent as
  it is and RD does not change.
- **Balanced, with two forms.** This is D.7 (`111000`/`000111`) and x.3
  (`1100`/`0011`). Both forms have equal ones and zeros. Two forms are still
  needed, because one of them would make a long run of equal bits next to the
  rest of the word. RD does not change.
- **Unbalanced, with two complementary forms.** At RD−, the form with more
  ones is sent; at RD+, the form with more zeros is sent. RD then flips.

`rd_control` applies these rules twice per word. First, the current RD picks
the 6-bit form. If that form is unbalanced, RD flips. The RD after the 6-bit
block then picks the 4-bit form, and RD flips again if that form is
unbalanced. This covers every pairing of one-form and two-form sub-blocks.
RD is negative after reset.

Both lookup blocks are purely combinational and give both forms of their
sub-block (`code_n` for RD−, `code_p` for RD+). `rd_control` holds the single
state bit (`rd_pos`, 1 = RD+) and the output register.

**The alternate x.7 code.** For y = 7, the primary forms `1110`/`0001` would
make a run of five equal bits after a balanced 6-bit block that ends in `11`
or `00`. The alternate forms `0111`/`1000` are used instead in two cases:

- at RD−, after x = 17, 18 or 20;
- at RD+, after x = 11, 13 or 14.

This selection is in `enc_3b4b`, which also reads EDCBA to make it.

## Special characters (kin = 1)

With `kin = 1`, the byte is not data. It is an index into a table of twelve
control characters, and HGF must be `000`:

| dtin | character | RD− word | RD+ word |
|---|---|---|---|
| 0x00–0x07 | K28.0 – K28.7 | `001111 yyyy` | complement |
| 0x08 | K23.7 | `111010 1000` | `000101 0111` |
| 0x09 | K27.7 | `110110 1000` | `001001 0111` |
| 0x0A | K29.7 | `101110 1000` | `010001 0111` |
| 0x0B | K30.7 | `011110 1000` | `100001 0111` |

`yyyy` for K28.0–K28.7 is `0100 1001 0101 0011 0010 1010 0110 1000`. Only the
RD− words are stored, in `enc_pkg::kcode_rdn`. The RD+ word is always the
bitwise complement of the RD− word. RD flips after a special character whose
word is unbalanced.

Note that the standard byte values of these characters are not accepted
(for example 0xBC for K28.5). With `kin = 1`, any byte above 0x0B is illegal.
For an illegal byte, the encoder does three things:

- it sends the balanced filler word `0101010101`;
- it leaves RD unchanged;
- it raises `kerror` together with that word, so the error is in step with
  the data.

## Interfaces and timing

**`enc8b10b`** (the encoder)

- Inputs: `clk`, `RSTn` (asynchronous reset, active low), `wr`, `kin`,
  `dtin[7:0]`.
- Outputs: `dtout[9:0]`, `dtout_vld`, `kerror`, `rd_pos`.
- A byte presented with `wr = 1` before a rising edge shows up on `dtout` after
  that edge, with `dtout_vld = 1`.
- With `wr = 0`, `dtout` is cleared, `dtout_vld` and `kerror` are low, and RD
  holds.

**`sync_fifo`**

- Parameters: `WIDTH` (10) and `DEPTH` (16, must be a power of two).
- First-word fall-through: while `empty` is low, `dout` shows the head word.
  `rd_en` pops it at the next edge.
- A push while full is dropped and gives a one-cycle `overflow` pulse. A pop
  while empty is ignored.

**`enc8b10b_top`**

- Parameter: `FIFO_DEPTH = 16`.
- Every valid encoder word goes into the FIFO, except the filler of an illegal
  special character.
- The line side reads the FIFO with `rd`, `dout` and `empty`.
- The encoder's own outputs are brought out as well.

## Where this design makes its own choices

The overall structure, the port names (`clk`, `RSTn`, `wr`, `kin`, `dtin`,
`dtout`, `kerror`), the 3B/4B table, the special-character table with its
0x00–0x0B indexing, the RD rules and the filler word on an illegal character
are the design as specified. The following are this implementation's own
choices or readings:

- **The 5B/6B table is the standard 8B/10B table.** It was not specified
  separately. The rule for choosing the alternate x.7 code is also the
  standard one.
- **RD naming follows the usual convention and the special-character table.**
  RD− means that the line so far has one more 0 than 1, so the next
  unbalanced sub-block is sent with more ones. One informal description in the
  source material says the opposite. The tables, however, only agree with the
  usual convention.
- **Bit order.** `a` is in bit 9 of `dtout`. This matches the reference
  output values. It differs from a drawing that labels `a` and `f` as the low
  ends of their groups.
- **One register stage.** It sits in `rd_control`, with a matching `kerror`
  register in `k_detect`. The lookups are combinational. `dtout_vld` and
  `rd_pos` are extra outputs.
- **With `wr` low, `dtout` is cleared to zero.** Holding the last word would
  be equally valid.
- **The FIFO is specified only as a buffer.** Its depth (16), read style,
  drop-on-full behaviour, overflow flag and the dropping of illegal-character
  fillers are all choices.
- **No decoder.** The validation text mentions a "decoding circuit", but
  every signal it names belongs to the encoder, so no decoder is built.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Reference model (`tb/enc_ref_pkg.sv`).** It is written apart from the
  RTL. Both forms of every sub-block and every special character are written
  out in full, as bit strings in sending order. The alternate x.7 code is
  chosen by checking for a run of equal bits, not from a list of byte values.
- **`tb_enc_5b6b`, `tb_enc_3b4b`, `tb_k_detect`.** These check every input
  exhaustively.
- **`tb_rd_control`.** Drives 3000 random words, special characters, illegal
  characters and idle cycles, and checks the output and RD after every clock.
- **`tb_enc8b10b`.** Runs the reference sequence (illegal character →
  `kerror` and `0101010101`; D6.1 → `0110011001`; D17.1 → `1000111001`), then
  all special characters at both RDs, then 20 000 random bytes. On the serial
  stream it checks two things: no run longer than five, and a running sum of
  ±1 at every word boundary. It also checks the one-clock latency.
- **`tb_sync_fifo`.** Compares the FIFO with a queue model and checks that it
  reaches full, empty and overflow.
- **`tb_enc8b10b_top`.** The end-to-end test at default parameters. It runs
  3000 cycles in fill, drain and mixed phases. Everything read from the FIFO
  must equal the model's words in order, minus illegal characters and
  overflow drops. It counts each mechanism and fails if one never happens:
  special character, illegal character, alternate x.7, RD change, idle cycle,
  FIFO full, overflow, read while empty.
- **`tb_fig4_sequence`.** Runs the reference sequence through the whole path
  and checks that only the two data words reach the FIFO.

Two assertions are built in:

- `rd_control` checks that every word sent has 4, 5 or 6 ones.
- `sync_fifo` checks that the occupancy never exceeds `DEPTH`.

To simulate one testbench with Verilator, for example the end-to-end one:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/enc_pkg.sv tb/enc_ref_pkg.sv rtl/enc_5b6b.sv rtl/enc_3b4b.sv \
  rtl/k_detect.sv rtl/rd_control.sv rtl/enc8b10b.sv rtl/sync_fifo.sv \
  rtl/enc8b10b_top.sv tb/tb_enc8b10b_top.sv --top-module tb_enc8b10b_top
./obj_dir/Vtb_enc8b10b_top
```

All testbenches finish in well under a second. For lint, use
`verilator --lint-only -Wall` with the same RTL file list.

Verilator reports `SYNCASYNCNET` for `RSTn`. This is expected: `RSTn` is the
asynchronous reset of the flip-flops and also the `disable iff` condition of
the assertions.
