# MRFC crosstalk-avoidance CODEC

On a long on-chip bus, two neighbouring wires that switch in the same clock
cycle disturb each other. Opposite-direction switching couples mainly through
the capacitance between the wires; same-direction switching couples through
their mutual inductance, and that effect grows with clock frequency. This
design encodes 3-bit data words into 4-bit **Modified Redundant Fibonacci
Code (MRFC)** words. It watches every pair of adjacent wires. When two of them
would switch together, it inverts the last two bits of the word before
sending it. The receiver undoes the inversion and turns each code word back
into binary.

The design moves *frames*: eight code words, one for each data value
000..111, which together form a 32-bit encoded frame and a 24-bit decoded
frame.

## The code

The four digits of an MRFC word weigh 3, 2, 1 and 1, from the most
significant digit down. The value of a word is the sum of the weights of its
1 digits. Most values can be written in more than one way. The MRFC picks
one representation per value:

| data | 000  | 001  | 010  | 011  | 100  | 101  | 110  | 111  |
|------|------|------|------|------|------|------|------|------|
| code | 0000 | 0001 | 0011 | 0110 | 0111 | 1100 | 1101 | 1111 |

Encoding is this fixed table (`mrfc_encoder`). Decoding only adds weights
(`mrfc_to_binary`), so it gives the right value for *any* representation,
not just the one in the table.

## Detecting and avoiding a clash (transmit side)

`transition_detector` XORs the word on the wires with the next word; a 1
marks a wire that will toggle. It then ANDs each pair of neighbouring XOR
bits. The result is three pair flags (wires 3-2, 2-1 and 1-0). If any flag is
set, two adjacent wires would switch together. The detector does not look at
the direction of the switching.

`mrfc_codec` takes one data word per clock:

1. It encodes the word.
2. It compares the encoded word with the word sent just before it in the same
   frame.
3. On a clash, it inverts bits 1:0 of the new word (`tx_flip`).
4. It checks the inverted word against the same predecessor. `tx_residual`
   reports a clash that is still there.
5. The word actually sent becomes the predecessor of the next word. An
   inversion therefore carries forward into the next comparison.

The first word of a frame has no predecessor and is always sent as encoded.

When the data is the sequence 000..111, only one clash occurs: 0111 → 1100,
where wires 1 and 0 both fall. The word 1100 is sent as 1111 instead. The
frame is then

```
slot   0    1    2    3    4    5    6    7
sent  0000 0001 0011 0110 0111 1111 1101 1111     = 32'h0136_7FDF
```

No two adjacent wires switch together anywhere inside this frame.

**What inversion cannot fix.** Inverting bits 1:0 removes a clash on wires
1-0 or 2-1. A clash on wires 3-2 stays, and the inversion may even add one
lower down. For example, 0000 followed by 1100 clashes on wires 3-2, and
1111 clashes on every pair. The design sends the inverted word anyway and
raises `tx_residual`. It does not invert a second time, because that would
only restore the original word. The counting sequence never reaches this
case. Random data reaches it often (see `tb_mrfc_codec`).

## Undoing the inversion (receive side)

Nothing in a sent word says whether it was inverted. Nor can the receiver
work it out from the previous word. Take the frame above: 0111 followed by a
received 1111 could be

- a 111 sent unchanged: 0111 → 1111 is no clash, so it would not have been
  inverted; or
- a 101 (1100) that was inverted.

Both readings are consistent. So the receiver works from a *reference*: the
original code word it expects in each slot. `flip_corrector` compares the
received word with the reference:

- If they are equal, the word passes through unchanged.
- If they differ, it inverts bits 1:0 and compares again. A match restores
  the word and sets `flipped`.
- If neither form matches, it sets `error` and passes the received word on
  unchanged.

In `mrfc_decoder`, slot k always carries data value k. The reference for slot
k is therefore the MRFC code of k, which an `mrfc_encoder` with a constant
input produces. This follows how the scheme is defined, but it limits what
the decoder can do. The receive path only works for frames that carry the
counting sequence 000..111 in order. Arbitrary data cannot be recovered
without adding a side channel, such as one flag wire per word saying
"inverted".

## Frame format and timing

- Code frame: slot 0 in bits [31:28], slot 7 in bits [3:0].
- Decoded frame: slot 0 in bits [23:21], slot 7 in bits [2:0]. For the
  counting sequence it is `24'h05_3977` (000 001 010 011 100 101 110 111).
- Per-slot flag vectors (`flipped`, `error`, `dec_flipped`, `dec_error`):
  slot k is bit 7-k.
- `mrfc_codec` registers its outputs. `tx_word` is the word for the `din` of
  the previous clock. `frame` and a one-cycle `frame_valid` update at the
  edge that takes in the eighth word of a frame.
- `mrfc_decoder` has one register stage. `data_out`, the flags and
  `out_valid` follow `frame_in` and `in_valid` by one clock.
- Top level: the first `fib_code` frame appears at the eighth rising edge
  after `rst_enc` goes low. After that, a new frame arrives every 8 clocks,
  and `decoded_binary` follows one clock after each frame.
- All resets are synchronous and active high. The encoder side (`rst_enc`)
  and the decoder (`rst_dec`) have separate resets.

## Modules

| file | role |
|------|------|
| `rtl/mrfc_pkg.sv` | widths (3-bit data, 4-bit code, 8-word frame), digit weights, inversion mask, types |
| `rtl/data_word_gen.sv` | 3-bit counter producing 000..111, one per clock (data source and slot index) |
| `rtl/mrfc_encoder.sv` | data → MRFC table, combinational |
| `rtl/transition_detector.sv` | XOR/AND adjacent-switching flags, combinational |
| `rtl/mrfc_codec.sv` | encoder, two detectors, inversion, frame assembly |
| `rtl/flip_corrector.sv` | reference comparison and re-inversion, combinational |
| `rtl/mrfc_to_binary.sv` | weighted-sum decoding, combinational |
| `rtl/mrfc_decoder.sv` | 8 × (reference, flip_corrector, mrfc_to_binary) + output register |
| `rtl/mrfc_codec_top.sv` | data_word_gen → mrfc_codec → mrfc_decoder |

The sizes are fixed, not parameters. The MRFC table is defined only for
3-bit data, and a frame holds exactly the 2³ data values.

## Where this design makes its own choices

These points are not fixed by the scheme itself:

- One word per clock. All outputs are registered.
- The first word of each frame is not compared with the last word of the
  previous frame. As a result every frame of the counting sequence is
  identical. On a serial 4-wire view (`tx_word`), the step from slot 7 (1111)
  to the next slot 0 (0000) does switch adjacent wires together.
- The transmit side inverts once and then reports `tx_residual`; it does not
  loop.
- The receive side reports `error` instead of looping.
- The valid strobes, the pair, residual, flipped and error flags, and the
  decoder's register stage are additions.
- The decoder uses no latches.

The physical wire model that motivates the code is not part of the RTL.
It is a pair of coupled RLC lines, an aggressor and a victim.

## Simulation

Each testbench in `tb/` checks its module on its own against values computed
in the testbench, and prints `TB_RESULT checks=N failures=M`. To run one
with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mrfc_pkg.sv \
    tb/tb_mrfc_codec_top.sv --top-module tb_mrfc_codec_top
./obj_dir/Vtb_mrfc_codec_top
```

The same command works for the others (`tb_mrfc_codec`, `tb_mrfc_decoder`,
`tb_flip_corrector`, `tb_transition_detector`, `tb_mrfc_encoder`,
`tb_mrfc_to_binary`, `tb_data_word_gen`).

- `tb_mrfc_codec_top` runs the whole CODEC at its real sizes for 17 frames.
  It checks:
  - the sent word stream, which must have no adjacent-wire clash inside a
    frame;
  - every frame against `32'h0136_7FDF`;
  - the first-frame latency and the 8-clock frame period;
  - that the decoder output stays zero while `rst_dec` is held;
  - `decoded_binary = 24'h05_3977`, with slot 5 flagged as restored.

  It also counts encoder inversions, decoder restorations and frames that
  arrive while the decoder is held in reset, and fails if any of these never
  happens.
- `tb_mrfc_codec` first checks the counting sequence. It then runs 800
  random words against a reference model, so that clashes on the upper wire
  pairs and the residual case both occur.
- `tb_mrfc_decoder` builds frames with random sets of inverted words and
  some corrupted words. It checks the decoded values, the flags and the
  one-clock latency.
- The combinational blocks are checked exhaustively.
