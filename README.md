# Channel-utilization stress forecaster: histogram-based percentile engine

Low-latency wireless services need the network to see channel congestion coming
before it hurts. A useful indicator is a high percentile of the *block maxima* of
channel utilization (CU): the largest CU seen in each short interval, collected
over a window (for example 180 values for one hour at three per minute). The
usual statistical tool for such maxima is a generalized-extreme-value (GEV) fit,
which needs iterative numerical optimization and is a poor fit for hardware.

This design replaces the fit with three cheap streaming steps that map well onto
an FPGA:

1. **histogram** the window of CU values into equal-width bins;
2. **cumulative sum** of the histogram, giving an empirical distribution curve;
3. **invert** that curve by linear interpolation: for a probability `p`, find
   the CU value below which a fraction `p` of the window lies.

The RTL here is the programmable-logic part of such a forecaster, as it would
sit in a Zynq-class SoC: a processor programs it over AXI-Lite, a DMA engine
streams the window of samples into it over AXI-Stream, and the processor reads
back one percentile per run. It follows the structure of a published
HLS-based design (three stages called *makehist*, *cumsum* and *invcum*, joined
by AXI-Stream and controlled over AXI-Lite); the RTL, its fixed-point formats,
its register map and its timing are this design's own.

```
  AXI-Lite from the processor
          |
   +------v-----+   0x0000 window    +----------+
   | axil_split |------------------->| makehist |<--- AXI-Stream samples
   |            |                    +----+-----+     (from the DMA engine)
   |            |                         | AXI-Stream: bin counts
   |            |   0x1000 window    +----v-----+
   |            |------------------->|  cumsum  |
   |            |                    +----+-----+
   |            |                         | AXI-Stream: cumulative sums
   |            |   0x2000 window    +----v-----+
   |            |------------------->|  invcum  |---> result register
   +------------+                    +----------+

   interrupt[0] = makehist done, interrupt[1] = cumsum done,
   interrupt[2] = invcum done
```

## The estimator

Let the window hold `N` samples, the bins be `[i*B, (i+1)*B)` for
`i = 0 .. NB-1` (default `B = 5`, `NB = 20`, so CU 0..100 %), and `h_i` the
count of bin `i`. The cumulative curve is sampled at the bin edges:

```
x_k = k*B,      c_0 = 0,      c_k = h_0 + ... + h_(k-1)        (k = 0 .. NB)
```

For a probability `p`, the target count is `P = N*p`. The engine finds the
first `k` with `c_k <= P < c_(k+1)` and interpolates on the straight line
between `(x_k, c_k)` and `(x_(k+1), c_(k+1))`:

```
Q = x_k + (P - c_k) * B / (c_(k+1) - c_k)
```

`Q` is the estimate: about a fraction `p` of the window's maxima lie below it.
Example: 100 samples all in bin 14 (70..75 %) and `p = 0.5` give `P = 50`,
`k = 14`, `Q = 70 + 50*5/100 = 72.5`.

Things to know about this estimator as built:

* `p` counts from below: a larger `p` gives a larger `Q`. (The published text
  writes the probability once as an exceedance probability, but its algorithm
  and results use it this way.)
* The cumulative sum `c_(k+1)` is paired with the **upper** edge of bin `k`
  and the curve starts at `(0, 0)`. This is the natural empirical distribution
  function; the source text leaves the pairing open.
* A sample at or above `NB*B` (with the defaults, a CU of exactly 100) falls in
  no bin and is not counted, exactly as in the source algorithm. Then the last
  cumulative sum is below `N`, and for `p` close to 1 no interval brackets `P`.
  In that case the result is clamped to the top edge `NB*B` and the interval
  register reads `NB`, so software can tell.
* The same window must be streamed again for each further `p`: one run gives
  one percentile.

### Fixed-point formats

| quantity | format | notes |
|---|---|---|
| CU sample | unsigned 32-bit integer | percent, one per stream word |
| bin count, cumulative sum | unsigned 32 bits | |
| `p` | unsigned 0.16 | write `round(p * 65536)`; 1.0 is not representable |
| `P = N*p` | unsigned 32.16 | exact product |
| result `Q` | unsigned 16.16 | fraction truncated (always rounds down, error below 2^-16) |

## Stages

**makehist** (`rtl/makehist.sv`). After a start it takes exactly `W` samples
(the value of its window register), one per cycle. Every bin comparison is done
in parallel, so the bin is found in the same cycle the sample arrives. Then the
`NB` counts go out on its output stream, bin 0 first, `TLAST` on the last; each
counter is zeroed as it is sent, so the next window starts clean. The input
`TLAST` is ignored: the window register decides where a window ends.

**cumsum** (`rtl/cumsum.sv`). A running adder with one output register. Its only
register is the control register: each start converts one histogram, and the
run ends when the word carrying `TLAST` has been taken in. The sum is cleared
after `TLAST`.

**invcum** (`rtl/invcum.sv`). On start it forms `P = N*p` from its own window and
probability registers. It then takes the `NB` cumulative sums, keeping the first
pair that brackets `P`. There is no need to store the whole curve. After `TLAST`
it runs one division in a bit-serial restoring divider (`rtl/serial_div.sv`,
51 cycles). It then writes `Q` and `k` to its registers and raises done.

**axil_slave** (`rtl/axil_slave.sv`) and **ip_ctrl** (`rtl/ip_ctrl.sv`) are shared by
the three stages. The first turns AXI-Lite transfers into one-cycle register
accesses. The second implements the start / done / idle bits.
**axil_split** (`rtl/axil_split.sv`) routes the single AXI-Lite port to the three
register windows by address bits 13:12. The fourth window number has no stage
behind it: reads and writes there get a DECERR response, and reads return zero.

## Programming model

Register windows: makehist at `0x0000`, cumsum at `0x1000`, invcum at
`0x2000`; `0x3000` is unmapped. Address bits above bit 13 are ignored. All
registers are 32 bits wide.

| offset | makehist | cumsum | invcum |
|---|---|---|---|
| `0x00` CTRL | W: bit 0 = start. R: bit 0 busy, bit 1 done (cleared by this read), bit 2 idle | same | same |
| `0x10` WINDOW | window size `W` (samples) | — | window size `N` used for `P = N*p` |
| `0x18` PROB | — | — | `p`, 0.16 |
| `0x20` RESULT | — | — | `Q`, 16.16 (read-only) |
| `0x28` BIN | — | — | interval index `k`, or `NB` if clamped (read-only) |

Unused offsets read as zero. `interrupt[0]`, `interrupt[1]` and `interrupt[2]`
are the done bits of makehist, cumsum and invcum. Each stays high until its
CTRL register is read.

One run:

1. write `W` to makehist WINDOW and to invcum WINDOW, and `p` to invcum PROB;
2. write 1 to all three CTRL registers;
3. stream the `W` samples into `s_axis`;
4. wait for `interrupt[2]`, read invcum RESULT (and BIN), and read the three
   CTRL registers to clear the interrupts.

The order of steps 2 and 3 does not matter. A stage that has not been started
yet simply does not accept its input (`TREADY` low), so the data waits. The
stall passes back through the earlier stages and, if needed, to the DMA engine.

## Timing

All numbers are clock cycles with streams that never stall.

| stage | this RTL | reference HLS build |
|---|---|---|
| makehist, 64-sample window, first sample to done | 64 + 1 + 20 = 85 | 36 .. 288 |
| cumsum, 20 bins, first word in to last word out | 21 | 35 |
| invcum, first word in to done | 20 + 54 = 74 | 102 |

For a 180-sample (one-hour) window the whole chain takes about 257 cycles from
the first sample to the result. The reference build's clock estimates were
4.8 ns (makehist), 4.3 ns (cumsum) and 8.5 ns (invcum). Nothing here has been
synthesized for timing: the longest paths are likely the 20 parallel 32-bit
comparisons in makehist and the 48-bit multiply `N*p` in invcum. That multiply
runs once per run and could be made multicycle.

## What is not in this RTL

* **The processor software** that moves data from the host, programs the stages
  and reads results. The end-to-end testbench plays this part.
* **The DMA engine, DDR memory, reset block, memory-side interconnect and
  interrupt concatenation** of the SoC. These are vendor parts. The sample stream
  and the interrupts are top-level ports instead. The DMA engine's own control
  registers would sit behind a fourth interconnect port; here that window is
  the unmapped one.
* **The CU measurement itself**: energy detection on IQ samples, moving
  average, and block maxima. The forecaster takes finished block-maxima values.
* **A stream output of results.** The result is read from a register. The DMA
  engine's stream-to-memory channel is not used.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_makehist` | random windows of 64 and 180 samples including out-of-range values, with input gaps and output back-pressure. It compares the counts against its own histogram and checks edge values, clearing between windows, `TLAST` placement, the register read-back and the clear-on-read done bit. It also checks the exact 85-cycle count for 64 samples. |
| `tb_cumsum` | running sums against its own adder, restart after `TLAST`, stalls on both sides, a histogram offered before the start, the done bit and interrupt, and the 21-cycle count. |
| `tb_invcum` | hand-worked cases: a single full bin, `P` exactly on a cumulative value, and a clamped result. It runs 30 random windows with `p` between 0.01 and 0.99 against a floating-point model, feeds it a stream that arrives before the start, and checks the 74-cycle count. |
| `tb_serial_div` | random divisions against `/` and `%`, the latency, and that a start while busy is ignored. |
| `tb_axil_slave` | random reads and writes with byte strobes and master wait states, against a register model. |
| `tb_axil_split` | random traffic to the three windows with random high address bits, checking that no write leaks into another window, DECERR from the unmapped window, and the read latency. |
| `tb_cu_stress_pl` | the whole chain at its default parameters, with a floating-point model. Cases: a 64-sample window; a one-hour window swept over `p = 0.01 .. 0.99`, where the estimate must never fall; nine one-hour windows at `p = 0.8`; and a 20-minute window. Each stage is also started last in some runs. It counts input stalls, histogram output held back by cumsum and by invcum, dropped samples, clamped results, the interrupts of all three stages and DECERR responses, and fails if any of them never happened. |

The CU samples in the testbenches are synthetic: a skewed bump mostly between
40 and 90 %, shaped like block maxima. Measured data are not included.
Results agree with the floating-point model to within the 16.16 truncation.

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cu_pkg.sv tb/tb_cu_stress_pl.sv --top-module tb_cu_stress_pl -o sim
./obj_dir/sim
```

Replace the testbench name for the others. `rtl/cu_pkg.sv` must come first. The
end-to-end run takes well under a second.

## Changing it

* `N_BINS` and `BIN_SIZE`, on `cu_stress_pl`, `makehist` and `invcum`, set the
  bin layout. Their defaults come from `cu_pkg`. The top passes the same values
  to makehist and invcum; keep them equal when using the stages on their own.
  A finer layout lowers the interpolation error but costs one comparator and one
  counter per bin in makehist, and one cycle per bin in every stage.
* `PROB_FRAC` and `RES_FRAC` in `cu_pkg` set the fixed-point formats. The
  divider width follows from them. Keep the two equal: the result's fraction is
  the quotient's fraction.
* The register offsets are in `cu_pkg`. The window size per stage is
  `2**AXIL_AW` bytes. `axil_split` takes any number of windows; window numbers
  without a port answer DECERR.
