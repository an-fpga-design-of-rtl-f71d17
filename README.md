# A multiple-clock-cycle processor for the 2-D S-method

The S-method is a space/spatial-frequency distribution. It starts from a 2-D
short-time Fourier transform (STFT) and sharpens it. The spectrogram |STFT|²
is blurred. The Wigner distribution is sharp, but full of cross-terms. The
S-method sits between them: at every point of the frequency plane it adds
products of STFT samples that lie symmetrically around that point, inside a
small window of (2L+1)×(2L+1) points. This RTL evaluates the method for a
3×3 window (L = 1) on 8-bit STFT frames that are streamed in one sample at a
time.

The main idea of the architecture is to **reuse one multiplier and one adder
over several clock cycles per output point**. A fully parallel version needs
one multiplier per product. Here, one kernel (the *STFT-to-SM gateway*)
computes one product per system clock, and a small table sequences it. The
number of cycles per point depends on the distribution. The spectrogram takes
1 cycle. The S-method with L = 1 takes CN(1) = 5 cycles, where
CN(L) = 2L² + 2L + 1. The logic stays about the same size whichever
distribution is chosen, and only the cycle count changes.

## What is computed

STFT samples are unsigned 8-bit numbers, 0..255 (the STFT is normalised to
that range before it is fed in). The design computes the real part of the
S-method. The imaginary part has exactly the same form, so it needs a second,
identical instance of `sm2d_system`. The two results are added outside this
RTL. For a point (k1,k2), with S the STFT sample:

```
SM(k1,k2) = S(k1,k2)^2
          + 2 [ S(k1,k2+1)  S(k1,k2-1)      (i1=0, i2=1)
              + S(k1+1,k2+1)S(k1-1,k2-1)    (i1=1, i2=1)
              + S(k1+1,k2)  S(k1-1,k2)      (i1=1, i2=0)
              + S(k1+1,k2-1)S(k1-1,k2+1) ]  (i1=1, i2=1, other diagonal)
```

The first term on its own is the spectrogram. The largest possible value is
9 × 255² = 585 225, which fits the 20-bit result without overflow.

## The convolution window: nine registers and two row delays

The frame is N×N samples (N = 64 by default). It enters in raster order, with
the row index k1 slow and the column index k2 fast. `conv_window_regs` holds
nine 8-bit registers in three rows of three, and each sample load shifts
every row by one place:

```
 stft_in -> [0] -> [1] -> [2] -> FIFO delay (N-3) --+
            (k1+1,k2+1) (k1+1,k2) (k1+1,k2-1)         |
   +------------------------------------------------+
   +-> [3] -> [4] -> [5] -> FIFO delay (N-3) -------+
       (k1,k2+1) (k1,k2) (k1,k2-1)                    |
   +------------------------------------------------+
   +-> [6] -> [7] -> [8]
       (k1-1,k2+1) (k1-1,k2) (k1-1,k2-1)
```

The path from one row's first register to the next row's first register is
three registers plus a delay of N − 3 samples, which is exactly one frame row.
So the nine taps always hold a 3×3 neighbourhood, centred on tap 4, of the
point N + 1 samples behind the newest one. `fifo_delay` implements each row
delay as an N-word circular buffer whose length is the programmable delay FD.
The two buffers take 2 × N × 8 bits. Together with the 192-bit sequencing
table that makes 1216 memory bits for N = 64 (4288 for N = 256).

## The gateway and its step table

`stft_to_sm_gateway` contains the following units:

* MUX1 and MUX2 select two of sixteen inputs. Inputs 0..8 are the taps, and
  inputs 9..15 are tied to zero.
* MULT is an 8×8 multiplier giving a 16-bit product.
* ShLEFT doubles the product.
* CumADD is a 20-bit accumulator.
* OutREG is the output register.

`gateway_ctrl` drives all of these. It holds a step counter and a 16-word ×
12-bit table addressed by `{mode, step}`. Each word (`sm2d_pkg::lut_word_t`)
has the following fields:

| bits | field | meaning |
|------|-------|---------|
| 11 | acc | add this step's product; 0 marks an idle word |
| 10 | int_reset | clear the accumulator after this step |
| 9 | store | load the completed sum into OutREG |
| 8 | shl | double the product |
| 7:4 | sel1 | MUX1 tap |
| 3:0 | sel2 | MUX2 tap |

Table content:

| mode | step | taps | doubled | store |
|------|------|------|---------|-------|
| S-method (1) | 0 | 4 × 4 | no | |
| | 1 | 3 × 5 | yes | |
| | 2 | 0 × 8 | yes | |
| | 3 | 1 × 7 | yes | |
| | 4 | 2 × 6 | yes | yes |
| spectrogram (0) | 0 | 4 × 4 | no | yes |

All other words are idle. The counter advances on each enabled clock and
stops on the first idle word. It stays there until `ext_reset` returns it to
step 0. To add a distribution (for example, a one-axis S-method), fill more
words in `lut_entry()` and widen the mode field. The datapath does not change.

## Frame control and border padding

This is the least obvious part of the design.

**Registers.** `config_regs` holds five values derived from N and L. You can
write them through `cfg_en`, `cfg_addr` and `cfg_din`. Reset loads the values
for the built N with L = 1.

| addr | name | formula | N = 64 |
|------|------|---------|--------|
| 0 | FD, FIFO delay | N − (2L+1) | 61 |
| 1 | SC, start convolution | 2LN + (2L+1) − 1 | 130 |
| 2 | WS, window size | 2L + 1 | 3 |
| 3 | DB, down border | (N − 2L)·N | 3968 |
| 4 | EOF, end of frame | N·N − 1 | 4095 |

**Counters.** `frame_ctrl` compares three counters against these values:

* **SM_START.** The load counter counts samples taken since `clear`. On the
  load of sample number SC the window is full for the first time, with its
  centre at input point (1,1). SM_START then rises and stays high.
* **Window positions.** From then on, every load starts a new window
  position q = 0, 1, 2, …. A column counter wraps at the row length FD + WS.
* **LEFT_BORDER.** This flag is high in the last 2L columns (column > FD).
  There, the window would take samples from two different frame rows.
* **DOWN_BORDER.** This flag is high for q ≥ DB, which is the last 2L rows
  of the output.
* **END_PROC_FRAME.** This flag rises on the load after position EOF. It
  stays high until `clear`, and no further positions start.

**Zero padding.** LEFT_BORDER or DOWN_BORDER drives `CumADD_Clear`. This
holds the accumulator at zero, so those positions store 0.

**Output layout.** The result is one output per position, N×N outputs in
raster order:

> output (r, c) = SM at input point (r+1, c+1) for r, c ≤ N−3, and 0 in the
> last two rows and the last two columns.

In other words, the output frame is the S-method moved up and left by one
point, with a two-wide border of zeros on the right and at the bottom. The
data source must keep supplying samples (zeros or the next frame) for SC
loads after the last sample of a frame, so that the last positions can
complete. A frame therefore takes N² + 2N + 3 loads after `clear`.

## Timing

There is one clock. `clk_sync` produces a load strobe (`shift_in_stb`) every
DIV = 8 clocks, and `shift_in_clk` is the same period as a square wave. For
each period:

| cycle | what happens |
|-------|--------------|
| 0 (load edge) | the window and the FIFOs shift; SM_CLK_EN is low, so the gateway is reset (EXT_RESET = NOT SM_CLK_EN) |
| 1..7 | SM_CLK_EN is high; the gateway takes its CN steps and then waits |

`sm_valid` pulses in the cycle after the CN-th enabled edge. That is 5 edges
after the load edge for the S-method and 1 edge for the spectrogram. There is
one result per DIV clocks.

DIV must be at least CN + 1 = 6, and an assertion in `sm2d_system` checks
this. A 64×64 frame takes about (4096 + 131) × 8 ≈ 34 000 clocks.

## Top-level interface (`sm2d_system`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| clear | in | 1 | one-cycle frame restart; no sample is taken in that cycle |
| cfg_en, cfg_addr, cfg_din | in | 1, 3, 2·log2N+2 | configuration register write |
| tfd_mode | in | 1 | 0 spectrogram, 1 S-method; change between frames |
| stft_in | in | 8 | current sample; hold it until `shift_in_stb`, then present the next |
| shift_in_stb, shift_in_clk | out | 1 | load strobe; shift clock as a square wave |
| dout | out | 9×8 | window taps 0..8 |
| sm_out, sm_valid | out | 20, 1 | result and its one-cycle valid |
| cum_sm, sel_stft, shl_or_no, int_reset, sm_step | out | 20, 12, 1, 1, 3 | gateway internals (running sum, table word, step) |
| fifo_ready | out | 1 | both row delays filled since `clear` |
| sm_start, sm_clk_en, left_border, down_border, end_proc_frame, position | out | | frame control state |

The parameters are N = 64 and DIV = 8. FDW = log2 N and CW = 2·log2 N + 2 are
derived from N.

## Where this RTL departs from the original FPGA design

* **Clocking.** The original used several derived clocks: a divided shift
  clock, half-rate clocks for the FIFOs and the controller, and an inverted,
  gated SM_CLK for the gateway. Here every register runs on one clock, and
  those clocks become enables. A consequence is that the load period must be
  6 clocks rather than 5, because the load cycle doubles as the gateway's
  reset cycle. DIV = 8 is a choice.
* **Row delays.** The vendor FIFO megafunction is replaced by a circular
  buffer. Its output reads 0 until it has been filled once after `clear`.
* **Sequencer.** The bit layout of the 12-bit table word, the term order and
  the stop-on-idle counter are this design's own choices. The original
  counter wrapped through a reset bit.
* **Frame counting.** The exact counting conventions of the border
  controller are a reconstruction. This design's reading gives the output
  alignment described above: shifted by (1,1), with zero padding at the end
  of rows and at the bottom. A different reading would shift the output or
  pad different edges. The test benches define the behaviour precisely.
* **Mode select.** The configuration decoder is a single mode bit. It chooses
  between the spectrogram and the S-method with L = 1, the two distributions
  that the fixed 3×3 register block supports.
* **One line only.** Only one computational line (the real part) is built.
* **Widths.** The width of WS (4 bits), the configuration address map and
  the reset values of the configuration registers are choices.

For N = 64, synthesis gives 1216 memory bits and 230 flip-flops. This is the
same memory figure that the original 64×64 implementation reported, and a
flip-flop count close to its figure.

## Verification

Each module has a self-checking test bench in `tb/`. Each one compares
against values computed independently in the bench, and ends by printing
`TB_RESULT checks=… failures=…`.

* `tb_sm2d_system` runs the full design at its default parameters:
  * one 64×64 S-method frame of a chirp-plus-modulated-cosine test image;
  * one 32×32 spectrogram frame, after reprogramming the registers through
    the configuration port;
  * one 64×64 S-method frame of random data.

  It checks every output value, the latency, the rate, the result count,
  END_PROC_FRAME and the border counts. It also counts each mechanism (start,
  left and down borders, end of frame, configuration writes, both modes, FIFO
  fill) and fails if one never occurred.
* `tb_sm2d_workload` runs the reference test case of the design. It takes a
  chirp image plus a phase-modulated component and a small, fast chirp patch
  (all defined in the bench header). It computes the 2-D STFT of this image
  at one space point with a 64×64 Hanning window. It quantises the real and
  imaginary parts to 8 bits and streams both through the default-size
  processor. Every result is compared with the integer S-method of the same
  samples.
* `tb_sm2d_n256` builds the design with N = 256 and checks one full 256×256
  S-method frame.
* There are unit benches for the gateway (random operands, latency, padding,
  maximum value), the sequencer, the window registers, the FIFO delay
  (delays 61, 29 and 1), the frame controller (a 16×16 frame, twice), the
  configuration registers and the clock divider.

The RTL also carries concurrent assertions, which are active when you
simulate with `--assert`. They check three things: a load never happens with
a zero-length row delay; the gateway stores at most once per window
position; and nothing runs after END_PROC_FRAME. In addition, an elaboration
check requires DIV ≥ CN + 1.

To simulate with Verilator 5, run from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sm2d_pkg.sv \
          tb/tb_sm2d_system.sv --top-module tb_sm2d_system -o sim
./obj_dir/sim
```

Replace `tb_sm2d_system` with any other bench name to run that bench. Each
run finishes in well under a second.

## Files

* `rtl/sm2d_pkg.sv`: widths, the table word type, the mode and
  configuration-address enums, and the table content.
* `rtl/sm2d_system.sv`: the top level.
* `rtl/stft_to_sm_gateway.sv`, `rtl/gateway_ctrl.sv`: the shared kernel and
  its sequencer.
* `rtl/conv_window_regs.sv`, `rtl/fifo_delay.sv`: the convolution window.
* `rtl/frame_ctrl.sv`, `rtl/config_regs.sv`, `rtl/clk_sync.sv`: control,
  configuration and timing.
* `tb/tb_*.sv`: the test benches described above.
