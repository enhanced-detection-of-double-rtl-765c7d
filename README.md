# Hamming coding with selective bit placement

A Hamming code corrects one wrong bit per word. When two bits are wrong, it
usually "corrects" a third bit that was fine and reports success. In memories
and on buses, the most common multi-bit upset is a pair of *neighbouring* bits.
This design makes such pairs far more likely to be caught, and it adds no
logic to do so.

The idea works because of a spare-syndrome property of shortened Hamming
codes. The (12,8) code used here has four check bits, so its syndrome can take
16 values. Only 0 (no error) and 1..12 (a single error in that position) are
produced by zero or one error. When a double error produces a syndrome of 13,
14 or 15, it cannot be mistaken for a single error, so the decoder reports it
instead of miscorrecting it. A double error in code positions *a* and *b* has
syndrome *a* XOR *b*. Which physical bits are neighbours is decided only by the
order in which the twelve code positions are laid out on the wire or in the
memory row. This design chooses that order so that most neighbouring pairs
XOR to 13..15.

## Data path

The design handles a block of four 4-bit data words. Everything is
combinational; there is no clock and no reset.

```
            hamming_encoder                                hamming_decoder
 data[1..4] ─┬─ secded84_enc x4 ──► code[1..4]   (row code words, output only)
             │
             └─ bit_transpose ──► int_data[1..4]
                  └─ secded84_enc x4 ─► hamming128_enc x4 ─► tx[1..4] (12 bits each)
                                                                │
                                              err_mask ──► XOR (channel, top level only)
                                                                │
   org_data[1..4] ◄─ bit_transpose ◄─ secded84_dec x4 ◄─ hamming128_dec x4
                                         │  dec_out[1..4]        │
                                         └──── flag, per-word status ┘
```

1. **Interleave.** The four data words are treated as a 4x4 bit matrix and
   transposed. Interleaved word *k* holds bit *k* of every data word, so damage
   confined to one transmitted word reaches each data word as at most one bit.
2. **Inner code, (8,4) SEC-DED.** Each interleaved word becomes an 8-bit word
   `c1..c8`. Positions c1..c7 are a (7,4) Hamming word laid out
   `p1 p2 d1 p3 d2 d3 d4`, with `p1 = d1^d2^d4`, `p2 = d1^d3^d4` and
   `p3 = d2^d3^d4`. `c8` is the parity of c1..c7. The decoder corrects one
   error and detects two.
3. **Outer code, (12,8) shortened Hamming.** The 8-bit inner word is the
   payload `d1..d8`. It is placed at code positions 3, 5, 6, 7, 9, 10, 11 and
   12. The check bits at positions 1, 2, 4 and 8 each cover the positions whose
   binary number has the matching bit set.
4. **Placement.** The twelve positions are put on the wire in the selective
   order described next.

The decoder undoes these steps in reverse order. The row code words
`code[1..4]` (the (8,4) word of each data word) are produced as an output for
observation only; nothing downstream uses them.

## The selective bit placement

Wire slot 1 is the most significant bit of `tx[k]` (`tx[k][12]`). Slot *s* and
slot *s*+1 are neighbours.

| wire slot     | 1 | 2 | 3  | 4 | 5 | 6 | 7 | 8  | 9 | 10 | 11 | 12 |
|---------------|---|---|----|---|---|---|---|----|---|----|----|----|
| code position | 3 | 1 | 12 | 2 | 4 | 9 | 7 | 10 | 5 | 8  | 6  | 11 |

The XORs of neighbouring slots are 2, 13, 14, 6, 13, 14, 13, 15, 13, 14 and 13.
So 9 of the 11 neighbouring double errors give a syndrome above 12 and are
detected. In the plain order 1..12, only the pair (7,8) is detected.

Nine is the best possible. Positions 1, 2 and 3 XOR to more than 12 only with
position 12. Position 12 has two neighbours at most, so one of 1, 2 and 3 has
no good neighbour. Laying out the other eight positions as 4-9-7-10-5-8-6-11
makes all seven of their pairs good. The order was found with the
search-and-reorder procedure of the method: list every error pair whose
syndrome exceeds the code length, then reorder by hand. The slot table is
`SBP_ORDER` in `rtl/hamming_pkg.sv`.

The two remaining pairs are slots 1-2 (positions 3 and 1, syndrome 2) and
slots 4-5 (positions 2 and 4, syndrome 6). The outer decoder miscorrects them,
but in both cases the damage left in the inner word is a single bit, which the
(8,4) decoder then corrects. Together the two codes therefore handle every
neighbouring double error inside a word: 9 of 11 are flagged and 2 of 11 are
repaired. In the plain order, 3 of the 11 leave three wrong bits in the inner
word. The inner decoder then miscorrects with no warning.

The placement changes nothing but wiring. Parameter `SBP` (default 1) selects
it; `SBP = 0` gives the plain order with identical logic.

## Decoder status

`hamming128_dec` produces one of three outcomes per word:

| syndrome | action                                              |
|----------|-----------------------------------------------------|
| 0        | word accepted                                       |
| 1..12    | that position inverted (`outer_corrected`)          |
| 13..15   | word passed on unchanged, `outer_detected` raised   |

`secded84_dec` raises `inner_corrected` when the overall parity fails, and
inverts the position named by the syndrome, or c8 if the syndrome is 0. It
raises `inner_detected` when the syndrome is non-zero but the parity holds.

`flag` is high when the block is believed good: no word raised
`outer_detected` or `inner_detected`. The per-word status vectors
(`[4:1]`, bit *k* for word *k*) are also brought out.

## Bit numbering

These conventions are easy to get wrong:

| signal               | most significant bit | least significant bit  |
|----------------------|----------------------|------------------------|
| `data[k][4:1]`       | d1 (bit 4)           | d4                     |
| `code[k][7:0]`, `dec_out[k][7:0]`, inner word | c1 | c8 (overall parity) |
| `hamming128_enc.data[7:0]` | outer payload d1 = inner c1 | d8 = inner c8 |
| `tx[k][12:1]`        | wire slot 1          | wire slot 12           |

`int_data[k][5-j]` is `data[j][5-k]`.

## Modules

| file | role |
|------|------|
| `rtl/hamming_pkg.sv` | code sizes, syndrome types, the slot-order tables |
| `rtl/secded84_enc.sv`, `rtl/secded84_dec.sv` | (8,4) SEC-DED inner code |
| `rtl/hamming128_enc.sv`, `rtl/hamming128_dec.sv` | (12,8) outer code with placement |
| `rtl/bit_transpose.sv` | 4x4 bit transpose, used for interleaving and de-interleaving |
| `rtl/hamming_encoder.sv` | block encoder |
| `rtl/hamming_decoder.sv` | block decoder |
| `rtl/hamming_sbp_top.sv` | encoder, error-injection channel (`err_mask`) and decoder |

The logic is small. After coarse synthesis the whole top is about 350
word-level cells, with no flip-flops.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. The testbenches
share the reference models in `tb/hamming_ref_pkg.sv`. Those models are
written differently from the RTL: the encoders search for the check bits that
zero the syndrome, and the SEC-DED decoder searches for the nearest code word.
Each testbench prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/hamming_pkg.sv tb/hamming_ref_pkg.sv tb/tb_hamming_sbp_top.sv \
    --top-module tb_hamming_sbp_top -o sim
./obj_dir/sim
```

For another testbench, replace the testbench file and the top module name.

What the tests cover:

- **Leaf blocks.** `tb_secded84_*` and `tb_hamming128_*` cover all data words.
  Each word is sent clean, with every single error and with every double error.
  Both bit orders are tested. The (12,8) tests also count neighbouring double
  errors: 9 of 11 per word must be detected with `SBP = 1`, and 1 of 11 with
  `SBP = 0`.
- **Encoder and decoder.** `tb_hamming_encoder` and `tb_hamming_decoder`
  compare random blocks, carrying random errors, with the reference chain.
- **Whole design.** `tb_hamming_sbp_top` runs the top at its default
  parameters. It applies, for 200 random blocks:
  - no error;
  - each single error;
  - each neighbouring double error in each word;
  - random double errors;
  - one error in every word at once.

  It requires that no neighbouring double error passes silently. It also
  checks that outer correction, outer detection, inner correction, inner
  detection and a low `flag` each happen.
- **Published values.** These reference values come from published
  waveforms of the design, in the plain order:
  - the row code words and interleaved words for the data block
    `1010 1100 1001 0100`;
  - the 12-bit words for four 8-bit payloads;
  - the decoding of four received words, clean and with the last wire bit
    corrupted.

  The testbenches check all of them.

## Where this design makes its own choices

- **Transmitted words of the published example.** In the published encoder waveform,
  each 12-bit word carries the (8,4) word of the interleaved data with one
  check bit inverted. That is c1, c8, c4 and c2 for words 1 to 4. This reads as
  errors deliberately injected to exercise the inner decoder. This encoder
  produces the clean words, so its `tx` values for that block differ from the
  waveform in those bits. Fed the waveform's words, the decoder gives the
  waveform's outputs.
- **`flag`.** Only its name and a value of 1 are known. Here it means "block
  valid". The per-word status outputs are an addition.
- **Row code words.** `code[1..4]` is computed and brought out, but nothing
  downstream uses it. No cross-check between the row and column codes (a full
  product-code decoder) is built.
- **Uncorrectable words.** The data bits of a word with an uncorrectable error
  are passed on unchanged.
- **Timing.** The datapath is combinational. Register the ports if it sits on
  a clocked path.
- **Channel.** The error-injection XOR in the top exists for testing. In a real
  memory, `tx` is written and the stored word is read back into the decoder.
- **Not built.**
  - The same placement idea applied to a parity-extended shortened code, where
    it catches triple neighbouring errors. No size or order is defined for it.
  - Any code size other than (12,8).

  The bit order for another shortened code is found the same way: list the
  pairs whose position XOR exceeds the code length, then find a layout that
  makes as many of them neighbours as possible.
