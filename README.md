# A 16-point FFT/IFFT processor built from one 4-point FFT

This is a small fixed-point FFT/IFFT processor for 16 complex points, meant as
a building block for the larger transforms of OFDM modems (for example a
256-point transform for IEEE 802.16). Its aim is to use few real multipliers.
It has only one arithmetic core, a 4-point FFT that needs no multiplier.
Each 16-point frame passes through that core twice. Between the two passes a
small "multiplier unit" weights the intermediate results by the
inter-dimensional twiddle factors W16^(s·l). Only 6 real multiplications are
left in the whole datapath, in two complex multipliers that use three real
multiplications each.

The architecture comes from M. Arioua, S. Belkouch and M. M. Hassani,
*Efficient 16-points FFT/IFFT Architecture for OFDM Based Wireless Broadband
Communication*. This RTL is an independent SystemVerilog implementation of that
architecture. The publication leaves the control, the handshakes, the buffer
organisation, the rounding and the inverse transform unspecified; they are
this implementation's own choices and are marked as such below.

## The decomposition

Write the input index as n = l + 4m and the output index as k = s + 4t, with
l, m, s, t each in 0..3. Then the 16-point DFT becomes

```
X[s+4t] = sum_l  W4^(t·l) · [ W16^(s·l) · sum_m x[l+4m] · W4^(s·m) ]
                 \________/   \________/   \__________________________/
                 2nd 4-point   multiplier    1st 4-point FFT (over m)
                 FFT (over l)  unit
```

- **First pass.** For each l, a 4-point FFT over the four samples
  x[l], x[l+4], x[l+8], x[l+12]. The result is Y_l[s], s = 0..3.
- **Weighting.** Multiply Y_l[s] by W16^(s·l). As a 4×4 table (rows s,
  columns l = 0..3):

  | s | l=0 | l=1 | l=2 | l=3 |
  |---|-----|-----|-----|-----|
  | 0 | W0  | W0  | W0  | W0  |
  | 1 | W0  | W1  | W2  | W3  |
  | 2 | W0  | W2  | W4  | W6  |
  | 3 | W0  | W3  | W6  | W9  |

- **Second pass.** For each s, a 4-point FFT over l. Its output t is
  X[s+4t].

The 4-point FFT needs only the factors ±1 and ±j. Multiplying by −j is an
exchange of the real and imaginary parts followed by a sign change. So every
real multiplication sits in the weighting step.

## Data flow

```
 serial x[n] --> input_buffer --+
                                +--> fft_mux --> fft4_pe --> fft_demux --> X (4 lanes)
 vector port -------------------+       ^                        |
                                        |                        v  first pass
                                     fb_reg <-- mult_unit <-- sp_buffer
```

| module           | role |
|------------------|------|
| `input_buffer`   | Collects 16 natural-order serial samples and hands them out as vectors l = 0..3. Lane m of vector l is x[l+4m]. Two banks (ping-pong). |
| `fft16_ctrl`     | 8-clock schedule. Produces `sel`, the input acceptance window and the S/P read timing. |
| `fft_mux`        | `sel = 0`: a new input vector enters. `sel = 1`: a fed-back vector enters. |
| `fft4_pe`        | Radix-2 4-point FFT in two pipelined butterfly stages. Latency 2 clocks. |
| `fft_demux`      | Sends first-pass results to the S/P buffer and second-pass results to the outputs. The output is registered. |
| `sp_buffer`      | Transposes the 4×4 block of first-pass results: rows (l) are written, columns (s) are read. Two banks (ping-pong). |
| `mult_unit`      | Weights lane l of column s by W16^(s·l). Registered output. |
| `cmult3`         | Complex multiplier with three real multiplications (used in lanes 1 and 3). |
| `twiddle_rom`    | Constants C, C+S and C−S of W16^k. |
| `shift_add_unit` | Lane-2 weighting with no multiplier. |
| `fb_reg`         | Register on the feedback path. |
| `fft16_top`      | Wires the above together. |
| `fft16_pkg`      | Shared types (`cpx_t`, `vec_t`, `tag_t`, `stage_t`) and sizes. |

Each vector travels with a tag (`tag_t`) holding four fields: valid, which pass
it is in, its index (l or s), and whether the frame is an inverse transform.
The demultiplexer steers by the pass bit, so it needs no control line of its
own.

## The schedule: two frames share the core

The 4-point FFT is the only arithmetic core, so the control is about time
slots. `fft16_ctrl` runs a free 3-bit phase counter. In phases 0–3 the core
takes the four vectors of a new frame (first pass). In phases 4–7 it takes the
four weighted columns of the previous frame (second pass). When frames arrive
back to back, the core is busy every clock and one 16-point transform finishes
every 8 clocks.

Period k, for a frame F whose first vector enters at phase 0:

| phase | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| core input (period k) | F l=0 | F l=1 | F l=2 | F l=3 | prev s=0 | prev s=1 | prev s=2 | prev s=3 |
| S/P write (period k)  |   |   | F row 0 | F row 1 | F row 2 | F row 3 | | |
| S/P read (period k+1) |   |   | F col 0 | F col 1 | F col 2 | F col 3 | | |
| mult_unit out (k+1)   |   |   |   | col 0 | col 1 | col 2 | col 3 | |
| fb_reg → core (k+1)   |   |   |   |   | F s=0 | F s=1 | F s=2 | F s=3 |
| `out_valid` (k+1) |   |   |   |   |   |   |   | F s=0 |
| `out_valid` (k+2) | F s=1 | F s=2 | F s=3 |   |   |   |   |   |

Column 0 can only be read after row 3 is written, which happens at the end of
phase 5. So the second pass of F cannot share F's own period. It runs in
period k+1, at the same time as the first pass of the next frame. That is why
the S/P buffer has two banks: the next frame's rows go into one bank while F's
columns are read from the other.

**Latency.** The first result appears on `out_valid` 15 clocks after the clock
in which vector 0 is taken. The four result vectors follow on consecutive
clocks.

**Serial input.** The input buffer takes one sample per clock, so it fills at
most one frame per 16 clocks. That is half of what the core can take. The
vector port can supply a frame every 8 clocks.

## The multiplier unit

The four lanes of a column use four different circuits, chosen so that only
two of them need multipliers:

- **lane 0.** The factor is always W0, so the lane is a wire.
- **lane 1.** Factors W0, W1, W2, W3. This lane uses `cmult3` with constants
  from `twiddle_rom`.
- **lane 2.** Factors W0, W2, W4, W6. This lane uses `shift_add_unit`, which
  picks one of four paths:
  - W0: the input unchanged.
  - W4 = −j: exchange the real and imaginary parts, then change a sign.
  - W2 = (1−j)/√2 and W6 = −(1+j)/√2: the sum X+Y and the difference Y−X
    are scaled by 1/√2 using shifts and adds. The constant is
    181/256 = 2⁻¹+2⁻³+2⁻⁴+2⁻⁶+2⁻⁸ ≈ 0.70703.
- **lane 3.** Factors W0, W3, W6, W9. This lane also uses `cmult3`.

`cmult3` computes (X+jY)(C+jS) with three multiplications, one addition and
two subtractions:

```
Z = C·(X−Y)        R = (C−S)·Y + Z        I = (C+S)·X − Z
```

C, C+S and C−S are constants, so they are stored rather than computed.
`twiddle_rom` fills a 16-entry table at elaboration time from
C = cos(2πk/16) and S = −sin(2πk/16). Each value is rounded to the nearest
multiple of 2⁻⁷ and stored as a 9-bit two's-complement number. The
multiplications are therefore at most 9×9 bits, and the datapath has six of
them.

## Number format and accuracy

- **Samples.** 8 bits per real or imaginary part, two's complement
  (`DATA_W = 8`). This is the width the reference processor was simulated
  at. Its authors suggest 16 bits for better accuracy. Changing `DATA_W` in
  `fft16_pkg` is the only edit needed.
- **Growth.** No scaling is applied anywhere. Every adder wraps at `DATA_W`
  bits, so a result whose exact value exceeds the range comes out modulo
  2⁸. For results that fit, the input magnitudes must be small enough that
  no 4-point or 16-point sum overflows. For example, |re| and |im| ≤ 5 is
  always safe.
- **Rounding.** Products are truncated (arithmetic right shift by 7, or by 8
  in the shift-and-add path). There is one truncation per multiplier output.
  Against the exact DFT the results stay within 4 LSB in all tests.
- **Published example.** The published 8-bit example frame comes out within
  3 LSB of the published hardware output in every part. Its bin X[2] has an
  exact value of 140.2 + 37.7j and wraps to −116 + 36j; the published result
  is −117 + 37j.

## Inverse transform

`s_inverse` or `p_inverse` set to 1 with the first sample or vector of a frame
makes that frame an inverse transform. Internally, the real and imaginary
parts are exchanged when the vectors enter (`fft_mux`) and exchanged back at
the output (`fft_demux`). This uses the identity
IFFT(x) = swap(FFT(swap(x))). The result is the unscaled inverse
Σ x[n]·e^(+j2πnk/16). The 1/16 factor is left to the user; with 8-bit samples
it would cost four bits of precision. The publication names the processor
FFT/IFFT but does not say how the inverse is formed, so this method is this
implementation's own choice.

## Interface of `fft16_top`

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low
reset that clears every valid flag and the control state.

| port | dir | width | meaning |
|---|---|---|---|
| `in_serial` | in | 1 | 1: the serial port feeds the processor; 0: the vector port does. Change it only between frames. |
| `s_valid`, `s_ready`, `s_data`, `s_inverse` | in/out/in/in | 1, 1, `cpx_t`, 1 | Serial input, one sample per accepted clock, x[0] first. `s_inverse` is sampled with x[0]. `s_ready` is low while both buffer banks are full (for example while the vector port is selected). |
| `p_valid`, `p_ready`, `p_data`, `p_inverse` | in/out/in/in | 1, 1, `vec_t`, 1 | Vector input. Lane m of vector l is x[l+4m]. Hold `p_valid` with vector 0 until `p_ready`; vectors 1–3 must follow on the next three clocks, with `p_valid` high (an assertion checks this). `p_inverse` is sampled with vector 0. |
| `out_valid`, `out_idx`, `out_inv`, `out_data` | out | 1, 2, 1, `vec_t` | Four consecutive clocks per frame. In the clock with `out_idx = s`, lane t of `out_data` is X[s+4t]. |

`cpx_t` is a packed struct `{re, im}` of two `DATA_W`-bit signed parts.
`vec_t` is `cpx_t [3:0]`, with lane i in element i.

## Simulating

The testbenches are self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fft16_pkg.sv tb/tb_fft16_top.sv --top-module tb_fft16_top -Wno-fatal
./obj_dir/Vtb_fft16_top
```

Replace `tb_fft16_top` with any other testbench in `tb/`:

- **`tb_fft16_top`** is the end-to-end test at the default sizes. It runs the
  published example frame, back-to-back vector frames (forward and inverse
  mixed), and serial frames sent while the serial port is deselected, so the
  input buffer fills and holds the writer off. It checks every result against
  the exact DFT and the 15-clock latency. It also counts each mechanism
  (back-to-back interleaving, slot waits, buffer hold-off, wrap-around,
  inverse) and fails if one never occurred.
- **`tb_workloads`** runs the two evaluation signals:
  - a square wave 1,1,0,0,… (amplitude 15);
  - the published random frame.

  Both run forward and inverse, through both input ports.
- **`tb_<module>`** tests each module on its own against independently
  computed values.

The simulator has no X state, so everything that is read is reset or
initialised.

## Departures and open points

Points where the publication gives no detail, and what was chosen:

- **Control and handshakes.** These are not specified. The 8-clock schedule,
  the valid/ready input, and `out_valid`/`out_idx` are this implementation's.
- **Input buffer.** The publication asks for an input buffer that turns
  natural-order serial data into the four vectors, but states an unusable
  size for it. Here it holds two full frames. The vector port follows the
  block diagram and the published waveforms, which feed four lanes in
  parallel. Both inputs are provided.
- **S/P buffer.** It is two 4×4 register banks. The publication only names
  the block.
- **Pipeline registers.** Placing registers after each butterfly stage, after
  the multiplier unit, on the feedback path and at the output is a choice
  here.
- **Twiddle constants.** They are stored in plain two's complement. The
  publication mentions canonical-signed-digit storage as an option.
- **Shift-and-add constant.** The 1/√2 constant and its shift decomposition
  are a choice here.
- **Inverse transform.** See above.
- **Not reproduced.** The FPGA figures (1146 logic elements, 75.93 MHz on a
  Cyclone II) are specific to that device and tool flow, and are not
  reproduced.
- **Not built.** Larger transforms (128, 256 or 1024 points) built from this
  block are proposed as future use but not described, so they are not
  included.
