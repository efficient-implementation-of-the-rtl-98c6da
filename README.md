# RDM-QIM watermarking core

This core hides one bit in every sample of a signal and reads it back, in a
way that survives a change of gain. It streams one sample per clock, on the
insertion side and on the detection side alike.

Plain quantisation index modulation (QIM) hides bit b by moving a sample onto
one of two interleaved lattices, spaced Delta and offset by Delta/2. A gain
change moves every sample off its lattice, so the bits are lost. Rational
dither modulation (RDM) avoids this by quantising the *ratio* of the sample to
a reference built from past watermarked samples. That reference scales with
the signal, so the ratio does not change when the gain does:

    y_k = g * ( q(x_k / g + v_k, Delta) - v_k ),   q(u, Delta) = Delta * round(u / Delta)

Here x_k is the host sample and y_k the watermarked sample. g is the
reference, and v_k is a key-dependent dither that selects the lattice for bit
b_k. The detector rebuilds g from the samples it receives, re-quantises each
sample onto both lattices, and outputs the bit of the nearer one.

## Number formats

| quantity | format | bits | notes |
|---|---|---|---|
| samples x, y, z | signed 17Q8 | 25 | 17 integer bits, 8 fractional bits |
| reference g, history, means | unsigned 17Q8 | 25 | magnitudes |
| dither v | signed Q8 | 8 | range [-0.5, 0.5) |
| Delta | constant | | 0.25 = 64 LSBs |
| initial memory value | constant | | 1.0 = 256 LSBs |

All quantities share the same LSB weight, 2^-8, so nothing has to be aligned.
The constants are in `rtl/rdm_qim_pkg.sv`.

## The reference g and why the stream never stalls

The part that is hardest to see is the reference. The divider needs 54 clocks,
so a plain |y_{k-1}| feedback from one sample to the next would let only one
sample in every ~57 clocks. This design avoids that by laying the stream out in
frames of `FRAME_LEN` positions (for an image, a run of pixels). The reference
of a sample is the mean magnitude of the last `NUM_FRAMES` = 16 outputs *at
the same position* in earlier frames. That value was last updated a whole frame
ago. As long as `FRAME_LEN` is longer than the pipeline (57 clocks; checked at
elaboration), every sample's reference is ready when the sample arrives.

Two memories hold the reference (`rdm_g_avg`):

* The **history memory** holds the magnitude of each position in each of the
  last 16 frames: 16 x `FRAME_LEN` words, addressed by frame slot and position.
* The **mean memory** holds the current mean of each position: `FRAME_LEN`
  words.

This way a mean costs one read, not 16. When a new output leaves the
pipeline, it replaces the value from 16 frames earlier, and the mean is
updated incrementally:

    mean_new = ((mean_old << 4) + |y_k| - |y_{k-16}|) >> 4

Both reads (mean and oldest value) happen when the sample enters, and the two
values travel with the sample. Both writes happen when it leaves. After reset,
every word is set to 1.0; this takes `FRAME_LEN*NUM_FRAMES` = 2048 clocks,
during which `ready` is low.

The `>> 4` truncates. The stored mean therefore drifts slightly below the true
mean over time, on average by about half an LSB per frame, and it is held at
zero if it would go negative. The inserter and the detector apply the same
arithmetic, so the drift does not harm decoding. A mean of zero is replaced by
one LSB before it is used as a divisor.

## Insertion pipeline

`rdm_insertion` accepts a sample (`in_valid` while `ready`) and processes it
in these steps:

1. **Accept (edge 0).** The control unit (`rdm_ctrl`) gives the sample's
   position and frame slot, and the sample's memory reads are issued. The
   dither generator (`rdm_vgen`) supplies v_k: for b = 0, v_k is the value of
   an 8-bit LFSR seeded by the key; for b = 1, it is phi(v) = v +/- Delta/2
   (towards the other lattice). The LFSR then steps.
2. **Quantifier (`rdm_quantizer`, 56 clocks).**
   * The divider (`rdm_divider`) computes x/g in 17Q8. It is a restoring
     divider with 33 bit-stages, padded to 54 clocks, truncating toward zero.
     It keeps only the low 25 quotient bits, so a quotient out of range
     wraps.
   * Meanwhile, g, v and the side data wait in a block-RAM delay line
     (`rdm_delay_ram`) instead of a chain of registers.
   * One clock adds v, rounds to the nearest multiple of 64 (ties round up)
     and subtracts v.
   * One clock multiplies by g, shifts back to 17Q8 and saturates to 25 bits.
3. **Leave (edge 57).** `y` appears with `out_valid`, and |y| updates the
   reference memories.

Latency is 57 clocks from acceptance to `out_valid`, at one sample per clock.
`x_out` carries the input sample aligned with `y`.

## Detection

`rdm_detection` holds two copies of the insertion stage, one with b tied to 0
and one with b tied to 1, fed with the received z_k and the same key. In this
mode (`REF_FROM_INPUT = 1`), each copy builds its reference from |z_k| instead
of from its own output. A gain on the channel therefore scales the reference
by the same factor. Each copy gives the nearest point z'_kb of its lattice.
The two distances |z_k - z'_k0| and |z_k - z'_k1| are compared, and the nearer
lattice gives `b_hat`; a tie decodes as 0. Both distances are also brought
out. Latency is 58 clocks.

For the bits to match, the detector must see the samples in the same frame
order as the inserter, start from reset with the same key, and be fed
continuously from the inserter's first sample. Under a gain attack, the
reference needs 16 frames of attacked samples before it has fully scaled, and
decoding is reliable from then on.

## Top level

`rdm_qim_top` places the insertion stage (`ins_*` ports) and the detection
stage (`det_*` ports) side by side. Each has its own key, handshake and
latency. Whatever lies between `ins_y` and `det_z` (a channel, an attack,
storage) is outside the core.

Parameters (the same on every level):

| parameter | default | meaning |
|---|---|---|
| `FRAME_LEN` | 128 | positions per frame; must exceed 57 |
| `NUM_FRAMES` | 16 | frames averaged for the reference; power of two |
| `DIV_LATENCY` | 54 | divider pipeline depth; at least 34 |
| `DELTA_Q8` (stages) | 64 | quantisation step in Q8 LSBs; power of two |
| `TAPS` (stages) | `8'b1011_1000` | LFSR feedback taps |

At the defaults, the core holds three sets of reference memories: one for the
inserter and two for the detector. Each set is 2176 words of 25 bits. Each
quantifier also has a 64-word delay line.

## Where this design makes its own choices

These points are not fixed by the algorithm. Each was chosen to be simple and
predictable:

* **LFSR polynomial.** The feedback polynomial is x^8+x^6+x^5+x^4+1, which
  gives the longest sequence (255) for an 8-bit word. It is a parameter, so it
  can be changed.
* **Frame length.** 128 positions. With this size, the 16-frame history fits
  four 18-kbit block RAMs and the means a fifth.
* **Magnitude feedback.** The reference is the mean of |y| (or |z|) rather
  than of y, so it cannot cancel to zero.
* **Initial value.** The memories start at 1.0, not all-ones bits.
* **Rounding and overflow.** Rounding ties go up; the product saturates; the
  quotient wraps.
* **Handshake.** There is no output back-pressure; the pipeline always moves.
* **Detector memories.** The detector holds two identical sets of reference
  memories, one per branch. A leaner version could share one.
* **Not included.** The remainder output of the divider, and any combining of
  several samples into one bit, are not part of this core.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/tb_rdm_model_pkg.sv` is an integer reference model of the whole datapath
(LFSR, phi, division, quantiser, mean update, a full insertion stage), written
from the equations. The testbenches compare the RTL against it bit for bit.

    verilator --binary --timing --assert --top-module tb_rdm_qim_top \
        -y rtl -y tb +libext+.sv -Irtl \
        rtl/rdm_qim_pkg.sv tb/tb_rdm_model_pkg.sv tb/tb_rdm_qim_top.sv
    ./obj_dir/Vtb_rdm_qim_top +verilator+rand+reset+2

`tb_rdm_qim_top` runs the core at its default size, in three runs from reset:

* **No attack:** every bit must decode.
* **Gain of 2:** no more than 0.5 % errors once the detector's reference has
  settled.
* **Gain of 1/2:** the same bound.

Each run is 40 frames of 128 samples. The first half is streamed back to back,
and the second half with random gaps. The testbench checks every `y` against
the model, and checks both latencies. It also counts each mechanism: both
dither branches, both phi cases, history replacement, both decoded values,
gaps, back-to-back streaming and decoding under attack. A mechanism that never
happens counts as a failure. In the current runs, the gain attacks decoded
every settled bit. The run takes about ten seconds.

`tb_rdm_video` streams one whole 720x480 synthetic 8-bit image through the
core, one pixel per clock, with one hidden bit per pixel. It checks:

* every bit is recovered;
* insertion takes exactly 345600 + 57 clocks for the image, and detection
  finishes 58 clocks after that;
* every tenth row matches the model bit for bit.

It also reports the distortion, about 28.8 dB PSNR at Delta = 0.25. That is
the cost of a reference near the mean pixel value: the lattice step is then
about 32 grey levels. The run takes about fifteen seconds.

The unit testbenches are `tb_rdm_lfsr`, `tb_rdm_phi`, `tb_rdm_vgen`,
`tb_rdm_divider`, `tb_rdm_delay_ram`, `tb_rdm_g_avg`, `tb_rdm_ctrl`,
`tb_rdm_quantizer`, `tb_rdm_insertion` and `tb_rdm_detection`. Several of
them check a latency as well as values.

## What is not known

The published implementation ran on a Virtex-4 at 84.8 MHz (insertion) and
60.2 MHz (detection). At one sample per clock, that means 84.8 and 60.2
Msamples/s, or about 245 and 174 frames per second of 720x480 video. This RTL
keeps the one-sample-per-clock structure. It has not been placed and routed,
so its clock rate and resource use are not known. The divider, the biggest
block, is a generic restoring pipeline, not a vendor core.
