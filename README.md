# Two-parallel FIR filters by unfolding

A serial FIR filter makes one output per clock, so its sample rate is set by
how fast one multiply-and-add can run. Unfolding the filter by a factor of two
copies its dataflow twice. The copy then computes two consecutive outputs,
y(2k) and y(2k+1), from two consecutive inputs, x(2k) and x(2k+1), in each
clock of the datapath. The datapath therefore runs at half the sample rate and
the filter keeps the full throughput.

This RTL applies that to three low-pass FIR filters in broadcast
(transposed-direct) form, with 2, 4 and 11 taps:

* input samples: 8-bit signed, at 2.4 MHz;
* datapath rate: 1.2 MHz;
* system clock: 100 MHz.

Each filter is a complete unit with four parts:

* a rate generator;
* a serial-to-parallel converter;
* the constant coefficients;
* the unfolded datapath of 8x8 multipliers, 16-bit adders and 16-bit delay
  registers.

A small fourth design sits beside the filters: the unfolded recursive loop
y(n) = a·y(n−7) + x(n). It is the textbook example of the same technique.

## The broadcast FIR and what unfolding does to it

The serial filter broadcasts the current sample x(n) to every multiplier. The
products are summed along a chain with one delay `D` between taps. With the
taps numbered from the far end (tap 0, whose product passes through the most
delays) to the output end (tap N−1):

```
s_0 = c_0·x(n)
s_i = c_i·x(n) + D(s_{i-1})        i = 1 .. N-1
y(n) = s_{N-1}          =>  y(n) = Σ_k c_{N-1-k} · x(n-k)
```

Unfolding by J = 2 follows one rule. Every node U becomes U0 (even samples)
and U1 (odd samples). Every edge U→V that carries w delays becomes
Ui → V((i+w) mod 2) with ⌊(i+w)/2⌋ delays. The multiplier edges carry no
delay, so each lane gets its own full set of multipliers. Each one-delay edge
of the sum chain splits into two edges:

| original edge  | lane 0 source          | lane 1 source               |
|----------------|------------------------|-----------------------------|
| s_{i-1} →D→ s_i | lane 1, **one** delay  | lane 0, **no** delay        |

```
lane 0:  s0_i = c_i·x(2k)   + D(s1_{i-1})       y(2k)   = s0_{N-1}
lane 1:  s1_i = c_i·x(2k+1) + s0_{i-1}          y(2k+1) = s1_{N-1}
```

This crossing is the part that is easy to get wrong. Lane 1 is one sample
later than lane 0 in the same block, so it takes lane 0's partial sum
directly. Lane 0 needs lane 1's partial sum from the previous block, so it
goes through a register. The register is clocked once per block, and one block
is two samples. Each register therefore still holds the single sample delay of
the original chain.

For the 2-tap filter, with coefficients a (tap 0) and b (tap 1):

```
y(2k)   = b·x(2k)   + D(a·x(2k+1))   = b·x(2k)   + a·x(2k-1)
y(2k+1) = b·x(2k+1) + a·x(2k)
```

An N-tap filter needs 2N multipliers, 2(N−1) adders and N−1 delay registers.
`unfolded_fir_datapath` builds this for any NTAPS ≥ 2 with a generate loop.

**Critical path.** Lane 1's adder input s0_{i-1} is itself an adder output,
so the longest path is one multiplier plus two adders. That path starts at a
delay register or a lane input and ends at y(2k+1). It does not grow with the
number of taps.

## Rates and strobes

Everything runs on the one system clock `clk`. `clk_enable_gen` makes two
one-cycle enable strobes:

* `sample_tick`: 2.4 MHz. The ratio 100/2.4 = 41.67 is not an integer, so a
  phase accumulator is used. It adds 2 400 000 each cycle and wraps at
  100 000 000. The strobes are therefore 41 or 42 cycles apart, and the
  average rate is exactly 2.4 MHz (2400 strobes per 100 000 cycles).
* `frame_tick`: 1.2 MHz. It is 1 on every second `sample_tick`, the one that
  carries an odd sample x(2k+1). The first sample after reset is x(0).

The delay registers (`dff16`) and the converter registers load only on these
strobes. No derived clocks are used.

## Serial-to-parallel converter

`serial_to_parallel` has one register that loads `xin` on every sample
strobe, so it holds the previous sample. On the block strobe, two output
registers load together:

* x(2k) from that register;
* x(2k+1) from `xin`, directly.

Both outputs change in the cycle after the block strobe and hold for the whole
block. At that same edge, the datapath's delay registers capture the partial
sums of the block that is ending. This is why the core and the converter share
the same enable.

## Number format

* Samples and coefficients: 8-bit two's complement.
* Products: 16 bits (exact for 8×8).
* Adders and delay registers: 16 bits.
* Overflow: sums wrap modulo 2^16. There is no saturation.

Whether a sum can wrap depends on the coefficients. Σ|h| × 128 stays below
2^15 for the 2-tap filter (26 112) and the 4-tap filter (16 896), so those two
never wrap. The 11-tap set has Σ|h| = 356, so inputs near full scale can make
its output wrap (for example, a long run of samples of magnitude above about
92 with matching signs). Scale the input, or widen `ACC_W` in `fir_pkg`, if
that matters for your use.

## Coefficients

`fir_pkg` holds the constant tables. Element i is tap i, counted from the far
end, so the impulse response is h[k] = COEF[N−1−k]. All three sets are
symmetric, so the order does not change the response.

| filter | taps (tap 0 … N−1)                            | origin |
|--------|-----------------------------------------------|--------|
| 2-tap  | 102, 102                                      | original values |
| 11-tap | −15, −13, 7, 38, 66, 78, 66, 38, 7, −13, −15  | original values |
| 4-tap  | 2, 64, 64, 2                                  | this design's own low-pass set |

The published design used 8-bit low-pass coefficients from a filter-design
tool, but did not list them. It did publish simulation outputs for the 2-tap
and 11-tap filters, and those outputs fix the values.

* **The test input.** The published runs share one test input:
  20, 20, −20 ×4, −21 ×6, −20 ×6, −21 ×2, −22 ×4.
* **11-tap.** The first output is y(0) = −300 = −15·20, which fixes the first
  coefficient. Each later output fixes one more coefficient, and the resulting
  symmetric set reproduces all 24 published 11-tap outputs.
* **2-tap.** The same input gives every published 2-tap value, for example
  2040 = 102·20.
* **Checks.** `tb_fir_pkg` checks both tables against those outputs by
  arithmetic alone. `tb_fir2p_11tap` and `tb_fir2p_2tap` run the published
  input through the hardware and compare the results with the published
  values.
* **4-tap.** No output of the 4-tap filter was published, so its set is a
  Hamming-windowed sinc with cutoff 0.25 of the sample rate and peak scaled to
  64:

  h[n] = round(64·s[n]/max|s|), with
  s[n] = sin(2π·fc·(n−M/2)) / (π·(n−M/2)) · (0.54 − 0.46·cos(2πn/M)) and
  M = N−1.

  Replace it with the intended values if you have them. `tb_fir_pkg`
  recomputes the formula and will then flag the change.

## The recursive example

`unfolded_iir7` unfolds y(n) = a·y(n−7) + x(n) by two:

```
y(2k)   = a·y(2k−7) + x(2k)        y(2k−7) is lane 1, four blocks back
y(2k+1) = a·y(2k−6) + x(2k+1)      y(2k−6) is lane 0, three blocks back
```

The single loop with seven delays becomes two crossing loops. Lane 1 feeds
lane 0's multiplier through four block delays, and lane 0 feeds lane 1's
through three. The loop still holds seven delays in total.

The example gives no number formats. Here:

* a is an 8-bit input port;
* x is 8 bits and y is 16 bits;
* products and sums wrap modulo 2^16.

The example has no rate generator of its own. The top brings out its block
strobe and sample pair as `ex_*` ports.

## Modules

| file | what it is |
|------|------------|
| `rtl/fir_pkg.sv` | widths, types (`sample_t`, `coef_t`, `acc_t`), coefficient tables |
| `rtl/mult8x8.sv` | signed 8×8 → 16 multiplier |
| `rtl/adder16.sv` | 16-bit wrapping adder |
| `rtl/dff16.sv` | 16-bit delay register with enable |
| `rtl/clk_enable_gen.sv` | 2.4 MHz / 1.2 MHz strobe generator |
| `rtl/serial_to_parallel.sv` | x(n) → x(2k), x(2k+1) |
| `rtl/unfolded_fir_datapath.sv` | generic 2-unfolded broadcast FIR core (NTAPS, COEFS) |
| `rtl/fir2p_2tap.sv`, `fir2p_4tap.sv`, `fir2p_11tap.sv` | complete filters |
| `rtl/unfolded_iir7.sv` | 2-unfolded recursive example |
| `rtl/fir_unfolding_top.sv` | all four designs side by side |

### Filter interface (`fir2p_*tap`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 100 MHz system clock |
| `rst_n` | in | 1 | synchronous, active-low reset; clears every register |
| `xin` | in | 8 | sample x(n); taken in each cycle where `sample_tick` is 1 |
| `sample_tick` | out | 1 | 2.4 MHz strobe: present the next sample after it |
| `frame_tick` | out | 1 | 1.2 MHz strobe, on the odd sample's `sample_tick` |
| `y_valid` | out | 1 | 1 in the cycle after `frame_tick`: a new pair is on the outputs |
| `y2k`, `y2kplus1` | out | 16 | y(2k), y(2k+1); held until the next `y_valid` |

Latency: y(2k) and y(2k+1) appear one system cycle after the strobe of
x(2k+1). Samples before reset count as zero.

In the top, the strobe vectors have bit 0 for the 11-tap filter, bit 1 for the
2-tap filter and bit 2 for the 4-tap filter. The ports carry the suffixes
`_11`, `_2` and `_4`.

### Parameters

| module | parameter | default |
|--------|-----------|---------|
| filters and top | `SYS_CLK_HZ` | 100 000 000 |
| filters and top | `SAMPLE_HZ` | 2 400 000 (must be ≤ SYS_CLK_HZ/2) |
| `unfolded_fir_datapath` | `NTAPS` | 11 |
| `unfolded_fir_datapath` | `COEFS` | `COEF_11TAP` |

## Where this departs from the published design

* **Clocking.** The original generates separate 2400 kHz and 1200 kHz clocks
  from the board clock. This design uses enable strobes on a single clock
  instead. Each block computes the same values, and the design needs no
  clock-domain crossings. Output timing is measured in system-clock cycles,
  not in edges of a 1.2 MHz clock.
* **Coefficients.** The 4-tap coefficients are not the original ones (see
  above).
* **Reset and `y_valid`.** Neither is specified by the original. Reset is
  synchronous, active low and clears everything. The original's waveforms
  show its reset line held high while the filter runs, which suggests active
  low.
* **Test data.** The original read input samples from a text file and wrote
  the outputs to text files. These testbenches generate the data and compare
  against a model instead.
* **Not reproduced.** The FPGA results: LUT counts, path delay and power on an
  Artix-7.
* **The example's formats.** The recursive example's number formats and its
  coefficient port are this design's own.

## Simulation

Each testbench in `tb/` checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`. For example, the whole design at its default
parameters (about 1.2 ms of simulated time, under a second to run):

```
verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv \
    tb/tb_fir_unfolding_top.sv --top-module tb_fir_unfolding_top -Mdir obj
./obj/Vtb_fir_unfolding_top
```

Verilator finds the other modules in `rtl/` by name through `-Irtl` (add
`-y rtl` if your version needs it). Use the same command with another
testbench to run a single block.

| testbench | what it checks |
|-----------|----------------|
| `tb_fir_unfolding_top` | all four designs against reference models, with a mid-block reset; checks that 41- and 42-cycle strobe gaps both occur |
| `tb_fir2p_{2,4,11}tap` | each filter against direct convolution; 1200 pairs per ms; `y_valid` timing; outputs held between pairs; 2- and 11-tap: the published outputs for the published input |
| `tb_unfolded_fir_datapath` | the core for 11, 2, 4 taps and a 5-tap set with extreme coefficients that wraps |
| `tb_serial_to_parallel`, `tb_clk_enable_gen` | pairing and hold; exact strobe rates and gaps |
| `tb_mult8x8`, `tb_adder16`, `tb_dff16` | exhaustive / random checks of the leaf cells |
| `tb_fir_pkg` | coefficient tables: published outputs recomputed from the 2- and 11-tap tables, the 4-tap window formula, symmetry, 16-bit headroom of the 2- and 4-tap sets |
| `tb_unfolded_iir7` | the recursive example against the serial recursion for several values of a |

The testbenches use two-state simulation and initialise everything they read.
