# Image-in-image data hiding with graded repetition

This RTL hides a small grey-scale image inside a larger one, and gets it back
out. The hidden image (the *message*) has 4-bit pixels. The carrier (the *cover*)
has 8-bit pixels. Each message pixel is spread over 16 cover pixels, one bit per
cover pixel, written into one chosen bit plane. The bits of a message pixel are
not equally protected:

| message bit | copies hidden | receiver decides by            |
|-------------|---------------|--------------------------------|
| bit 3 (MSB) | 9             | majority: at least 5 of 9 ones |
| bit 2       | 5             | majority: at least 3 of 5 ones |
| bit 1       | 1             | the bit itself                 |
| bit 0 (LSB) | 1             | the bit itself                 |

So 9 + 5 + 1 + 1 = 16 cover pixels carry one message pixel. The MSB decides most
of what the recovered picture looks like, so it gets the most redundancy. If a
filter, noise or compression flips some hidden bits, the recovered image
degrades gracefully: up to 4 of the 9 MSB copies and up to 2 of the 5 copies of
bit 2 can be wrong without any effect. A 64 x 64 message fills a 256 x 256 cover
exactly (4096 x 16 = 65 536 pixels).

The circuit is a pure stream processor with no image memory. Pixels go in and
come out in raster order. The transmitter and the receiver are separate circuits.
`dh_top` places them side by side, so that whatever damages the image between them
(the channel) stays outside the design.

The scheme and its block structure come from the paper *Low cost data
authentication scheme and hardware design*. The sections below point out where
this RTL makes its own choices.

## The transmitter's 144-clock hiding cycle

The transmitter is the subtle part. It does not set a bit with a mask. It copies
a serial, counter-driven structure built from flip-flops, small counters and
multiplexers. Four units work together:

* `tx_control` is the master timer. An 8-bit counter runs 0..143 and then clears.
  One count is one clock, and 144 = 16 cover pixels x 9 clocks each.
* `tx_embed` is an 8-bit shift register that can be loaded in parallel or rotated.
* `tx_bit_select` is a 3-bit step counter, a 3-to-8 decoder and an 8-to-1 mux on `st`.
* `tx_msg_ext` is a 4-bit parallel-in serial-out register with a 0..15 counter.

### One cover pixel: load, then 8 rotations

Each cover pixel takes 9 clocks. On the first clock it is loaded into the
register. On the next 8 clocks the register rotates one place towards bit 0, and
the bit leaving bit 0 re-enters at bit 7. In rotate step *k* (k = 0..7), the bit
leaving is the pixel's original bit *k*. In the step where *k* equals `st`,
`tx_bit_select` raises `insert`. The current message bit is then fed in instead
of the original bit. After 8 steps every bit is back in its own place, except
bit `st`, which now holds the message bit.

Example with `st = 2`, cover `1011_0110`, message bit `0`:

```
load      1011_0110
step 0    0101_1011   original bit 0 (0) leaves bit 0 and re-enters at bit 7
step 1    1010_1101   original bit 1 (1) goes round
step 2    0101_0110   original bit 2 (1) is dropped; message bit 0 enters instead
step 3    0010_1011
  ...
step 7    1011_0010   every bit is home again; bit 2 is now the message bit
```

The finished stego pixel sits in the register for the one clock in which the
next cover pixel is loaded. `stego_valid` marks that clock.

### Pulses over the cycle

| counter value          | pulse from `tx_control`      | effect                                      |
|------------------------|------------------------------|---------------------------------------------|
| 0, 9, 18, ..., 135     | `cov_load_n` low             | embedding register loads `cover_pixel`      |
| all other values       | `shift`                      | one rotate step (and `tx_bit_select` counts) |
| 8, 17, ..., 143        | `step`                       | this cover pixel is done; extension counter +1 |
| 0                      | `msg_load_n` low             | extension register loads `msg_pixel`        |
| 143                    | `sync_n` low                 | extension counter cleared, ready for count 0 |
| 0, 9, ... (after the first pixel) | `out_valid`       | stego pixel of the previous cover pixel is ready |

The load and sync pulses are active low, as in the original scheme. They travel
in a packed struct, `dh_pkg::tx_ctl_t`.

### Message extension

The message pixel's MSB sits in the flip-flop that drives the serial output. The
0..15 counter advances on each `step`. The register shifts on the steps at
counts 8, 13, 14 and 15. So the output holds bit 3 for counts 0..8 (9 pixels),
bit 2 for 9..13 (5 pixels), then bit 1, then bit 0. No 16-bit string is ever
stored.

### Rates and latency (transmitter)

* One cover pixel is taken every 9 enabled clocks (`cover_take`). One message
  pixel is taken every 144 (`msg_take`). Each input is sampled in the clock its
  strobe is high.
* A stego pixel appears 9 enabled clocks after its cover pixel was taken.
* A full 64 x 64 message in a 256 x 256 cover takes 4096 x 144 = 589 824
  enabled clocks.
* `en` low freezes the whole transmitter. It is a stall input and can be held
  low for any number of clocks.

## The receiver

The receiver is a three-stage chain. It accepts up to one stego pixel per clock,
marked by `pixel_valid`, and any gaps between pixels.

1. `rx_bit_extract` stores the pixel and picks bit `st` with an 8-to-1 mux, one
   clock later.
2. `rx_decision` has a 0..15 position counter. The position is decoded into a
   group code: `00` for the first 9 bits, `01` for the next 5, then `10` and
   `11`. A 2-to-4 decoder on the group code enables one of two ones-counters. On
   the last bit of a group it raises `grp_end`. The majority outputs include
   that last bit combinationally, so each decision is ready on that clock.
3. `rx_msg_form` uses a 4-to-1 mux on the group code to select the 9-copy
   majority, the 5-copy majority or the raw bit. It shifts the selected bit into
   a 4-bit register, MSB first. One more flip-flop marks the clock after the
   fourth bit. In that clock it presents the pixel (`msg_valid`), then clears
   the register.

A decoded pixel comes out two clocks after the 16th stego pixel that carries
it. The receiver has no frame marker. After reset it assumes the first pixel
starts a message pixel, so transmitter and receiver must be reset together, or
the stream must be cut at a 16-pixel boundary.

## Interface of `dh_top`

| port          | dir | width | meaning                                                   |
|---------------|-----|-------|-----------------------------------------------------------|
| `clk`, `rst_n`| in  | 1     | clock; asynchronous active-low reset of every register     |
| `st`          | in  | 3     | bit plane that carries the message (same for both halves). Hold it constant while running |
| `tx_en`       | in  | 1     | transmitter clock enable (stall)                          |
| `cover_pixel` | in  | 8     | next cover pixel, taken when `cover_take` = 1              |
| `cover_take`  | out | 1     |                                                           |
| `msg_pixel`   | in  | 4     | next message pixel, taken when `msg_take` = 1              |
| `msg_take`    | out | 1     |                                                           |
| `stego_pixel` | out | 8     | stego pixel, valid when `stego_valid` = 1                  |
| `stego_valid` | out | 1     |                                                           |
| `rx_valid`    | in  | 1     | receiver input strobe                                     |
| `rx_pixel`    | in  | 8     | received (possibly damaged) stego pixel                   |
| `dec_pixel`   | out | 4     | recovered message pixel, valid when `dec_valid` = 1        |
| `dec_valid`   | out | 1     |                                                           |

All sizes are constants in `rtl/dh_pkg.sv`: `COVER_W` = 8, `MSG_W` = 4,
`REP_HI` = 9, `REP_MID` = 5, `PHASE` = 9 and `EXT_LEN` = 16. The leaf modules
take them as parameters. The 0..15 counters fix the extended length at 16, and an
assertion checks it at the start of simulation, so `REP_HI` and `REP_MID` can only move
together (for example 7 and 7). Synthesised, the whole design is about 54
flip-flops and 160 word-level cells.

## What the scheme has and this RTL does not

The full algorithm has three more steps. None of them is part of the circuit the
scheme describes, and none is built here:

* **Spatial dispersal.** The message pixels are permuted by a pseudo-random (PN)
  sequence before hiding. Here they are hidden in the order they are given.
* **PN2 encryption.** The 16-bit extended string is XORed with a second PN
  sequence, and the receiver decrypts it. Neither the generator nor its seed is
  specified. Without this step the hidden plane carries the extended bits in
  clear, so anyone who knows `st` can read the message. Adding a keystream XOR
  at `tx_embed.msg_bit` and at `rx_decision.bit_in` would close that gap.
* **"Negative modulation".** This adjusts the stego pixels so that the hidden
  bit survives low-pass filtering. Its rule is not specified.

## Choices made in this RTL

These are this design's own choices where the scheme gives no detail:

* **Plane select width.** `st` is 3 bits, which is what an 8-to-1 mux needs. The
  scheme suggests using the third or fourth least significant plane. The
  end-to-end test uses plane 2, the third least significant bit.
* **Rotation.** The rotation goes towards bit 0, with bit 0 fed back. This is
  what makes rotate step *k* carry bit *k*. The scheme only states that the
  register rotates fully in 8 steps and that the replaced bit lands in its own
  position.
* **Control details.** The exact counts of `sync_n` (one clock before the
  message load) and of `step` are this design's. So are the `en` input and all
  valid/take strobes.
* **Shift decode.** The extension unit decodes its shift points itself, from its
  counter and `step`.
* **Reset.** An asynchronous active-low reset clears every register.
* **Receiver gaps.** The receiver accepts gaps in its input. The scheme implies
  one bit per clock.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come
from a separate reference model, `tb/dh_ref_pkg.sv`. It works directly from the
rules above: a bit substitution for the transmitter and majority counts for the
receiver. Every testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog.

| testbench            | what it establishes |
|----------------------|---------------------|
| `tb_tx_control`      | pulse positions over three hiding cycles with random enable gaps, 144-clock period |
| `tb_tx_bit_select`   | `insert` in exactly one rotate step, step `st`, for all 8 planes |
| `tb_tx_msg_ext`      | 9/5/1/1 output sequence for all 16 pixel values and random ones |
| `tb_tx_embed`        | only bit `st` changes; 8 rotations without insert restore the pixel |
| `tb_dh_transmitter`  | every stego pixel, the 9- and 144-clock take rates and the 9-clock latency, for all 8 planes, with stalls |
| `tb_rx_bit_extract`, `tb_rx_decision`, `tb_rx_msg_form` | plane pick; group codes and majority thresholds, including near-ties; pixel assembly and clearing |
| `tb_dh_receiver`     | decoded pixels against the reference decision, with correctable and uncorrectable damage and random input gaps |
| `tb_dh_top`          | whole design at its built-in sizes, described below |
| `tb_dh_attacks`      | full-size stego image under filtering and noise, described below |

`tb_dh_top` hides a 64 x 64 test image in a 256 x 256 test image through plane
2. The channel flips the hidden bit with about 4 % probability. The testbench
checks all 65 536 stego pixels and all 4096 decoded pixels against the model.
It counts transmitter stalls, receiver gaps, damage corrected in each repeated
group, and damage the vote cannot correct, and it fails if any of these never
happens. In a typical run 2597 of the 65 536 hidden bits arrive flipped (4.0 %).
After the vote 321 of the 16 384 message bits are wrong (2.0 %). Nearly all of
those are in the two unprotected low bits. The run simulates about 630 000
clocks and takes about a second.

`tb_dh_attacks` applies real image operations to a full 256 x 256 stego image,
then decodes the result. The testbench keeps the whole stego image, damages it,
and plays it into the receiver. It checks every decoded pixel against the
reference decision, and it checks that recovery is exact with no attack. It uses
synthetic images and plane 2. A typical run gives:

| attack                       | hidden bits flipped | message bits wrong | message pixels wrong |
|------------------------------|---------------------|--------------------|----------------------|
| none                         | 0 %                 | 0 %                | 0 %                  |
| 3 x 3 mean filter            | 53 %                | 53 %               | 96 %                 |
| 3 x 3 median filter          | 7.9 %               | 17 %               | 55 %                 |
| noise of variance 0.05 (on a 0..1 scale) | 47 % | 46 %               | 91 %                 |

These figures show two things the hardware alone cannot provide.

* **Filtering.** A mean filter simply erases a low bit plane. Surviving it needs
  the stego-pixel adjustment that is not built here.
* **Clustered errors.** The median filter flips few hidden bits, but it flips
  them in runs of neighbouring pixels. Those runs hit the 16 consecutive copies
  of one message pixel together, so the majority vote fails far more often than
  it would for scattered errors. Spreading the message pixels over the image
  with a pseudo-random permutation is meant to break up such runs.

That permutation is also not built. Plan for both before relying on the
robustness of this circuit. JPEG-style compression is not modelled.

### Running a test

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dh_pkg.sv tb/dh_ref_pkg.sv tb/tb_dh_top.sv --top-module tb_dh_top
./obj_dir/Vtb_dh_top
```

Replace `tb_dh_top` with any other testbench name to run that test. The
embedding register has a concurrent assertion: `insert` may only be high during
a rotate step. `--assert` enables it.
