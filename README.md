# DA-LUT FIR filters for an SDR channel equalizer

This is a finite impulse response (FIR) filter that uses no multipliers. It is built on
distributed arithmetic (DA): the filter's coefficients are summed ahead of time into small
look-up tables (LUTs), and each output is put together from table reads, shifts and additions.
The filter is used twice in a software-defined radio (SDR) receive chain:

* once as a reconfigurable filter that models the transmission channel;
* once as an adaptive channel equalizer that learns to undo that channel.

The design works on blocks: eight samples enter and eight outputs leave on every clock. Each
output sums its partial products with a tree of parallel prefix adders, which keeps the carry
chains short. A decimator with a run-time factor thins out the equalized output.

Default size: 64 taps, 8 samples per clock, 16-bit two's-complement samples and 16-bit
coefficients in Q1.15 (15 fraction bits, range [-1, 1)).

## System

```
 s(n) ──┬──> [DA-LUT RFIR filter + PPA] ──> [limiter] ──(+)── r(n) ──> [DA-LUT equalizer] ──┬──> [decimator] ──> out
        │      coefficients loaded serially       noise e(n) ┘                 ^           │ O(n)
        │                                                                      │ e(n)      │
        └──> [z^-DELAY] ── d(n) ───────────────────────────────────────────> (d - O) <─────┘
```

| module | role |
|---|---|
| `da_lut_fir_sdr` | top level: the chain above |
| `coef_reg_chain` | chain of coefficient registers for the channel filter, loaded serially |
| `da_fir_block` | block DA-LUT FIR filter: shared tables and delay line, one multiplier array and PPA tree per output lane |
| `da_lut_bank` | the DA look-up tables, rebuilt from the coefficients on every clock |
| `tap_delay_line` | register array of delay units; advances one block per clock |
| `da_multiplier_array` | multiplier-less product for one output: bit-plane table reads, shifted and signed |
| `ppa_tree`, `ppa_adder` | adder tree whose adders are Kogge-Stone parallel prefix adders |
| `channel_nonlinearity` | scaling, symmetric hard limiter, added noise, saturation |
| `ref_delay` | the desired response d(n) = s(n-DELAY), lined up with the equalizer output |
| `channel_equalizer` | adaptive DA-LUT FIR trained by a block sign-error LMS rule |
| `decimator` | keeps every M-th sample; M can change at run time |
| `da_fir_pkg` | shared word lengths and sizes |

## How one output is computed

For taps h[k] and B-bit two's-complement samples with bits x_b:

```
y(n) = sum_k h[k] x(n-k)
     = sum_{b<B-1} 2^b ( sum_k h[k] x_b(n-k) )  -  2^(B-1) ( sum_k h[k] x_{B-1}(n-k) )
```

The inner sums depend only on one bit of each sample, so they can be looked up instead of
computed. The 64 taps are split into 16 groups of 4 (`GRP`). Each group has a 16-entry table
whose entry at address a is the sum of the group's coefficients whose bit in a is set:

```
lut[g][a] = sum_{j : a[j]=1} h[4g+j]
```

A table for all 64 taps at once would need 2^64 entries. Sixteen tables of 16 entries hold the
same information.

`da_multiplier_array` reads every group's table at every bit plane in the same clock. The
address is bit b of the group's four samples. The value read is shifted left by b; in the sign
plane (b = 15) it is negated. That gives 16 groups x 16 planes = 256 partial products per
output. `ppa_tree` adds them in a balanced tree of 38-bit Kogge-Stone adders, 8 levels deep.
The 38-bit result is exact: |y| <= 64 * 2^15 * 2^15 = 2^36.

The classic DA filter is bit-serial and takes B clocks per output. Here all bit planes are
handled at once, so each lane produces one output per clock. The eight lanes of `da_fir_block`
share one table bank and one delay line. Lane p reads the window shifted by p.

## The adaptive equalizer

`channel_equalizer` feeds the received samples through a second `da_fir_block`. Its
coefficients are registers:

```
O(n)  = sat16( y(n) >>> 15 )
e(n)  = d(n) - O(n)                                  d(n) = s(n - DELAY)
w[k] += ( sum_{p<8} sgn(e(n0+p)) * x(n0+p-k) ) >>> mu_shift      once per block, when adapt_en
coef[k] = w[k] >>> 8                                 (w has 8 extra fraction bits, saturating)
```

Using only the sign of the error turns every update term into +x, -x or 0, so the update also
needs no multiplier. The tables are rebuilt from the coefficients on every clock, so new weights
reach the filter one clock after they are written. The filter pipeline is two blocks deep, so
this is a delayed LMS rule. It converges as long as the step is small:

* `mu_shift` = 1 trains a 64-tap equalizer on a ±8192 BPSK signal within a few hundred blocks;
* 3 to 4 gives a quieter steady state.

The error is formed at the full sample rate. The decimator sits after it, outside the
adaptation loop.

## Timing

| path | latency |
|---|---|
| `da_fir_block`: input block to outputs | 2 clocks (delay line register, output register) |
| coefficient change to filter | +1 clock (table refresh) |
| top: `s_in` to `eq_out`/`eq_err` | 5 clocks |
| top: `s_in` to decimated `out_data` | 6 clocks |
| `noise_in` | sampled 2 clocks after the block it is added to |

One block of 8 samples can enter every clock. There is no back-pressure: `s_valid` may have
gaps, and every stage carries a valid bit along. The channel filter is loaded by pulsing
`coef_load` for 64 clocks with h[63] first and h[0] last. The decimator packs the samples it
keeps into the low lanes of `out_data`, with their number in `out_count`. Its phase runs across
blocks, so M does not have to divide 8. It restarts when M changes.

## Where this design makes its own choices

Most of the design's source material describes what the filter does rather than how. These
parts are choices made here:

* **Word lengths.** 16-bit samples and Q1.15 coefficients. The group size of 4.
* **Pipeline.** The pipeline placement and the valid-only handshake.
* **Bit-parallel DA.** All bit planes are evaluated at once, instead of a bit-serial scale
  accumulator, to reach one output per lane per clock.
* **Prefix adder.** Kogge-Stone, in a balanced tree.
* **Nonlinearity.** The channel's "nonlinear function" is a symmetric hard limiter with a
  run-time threshold. Noise is an input port.
* **Reference delay.** DELAY = 32 samples, the middle of the 64-tap equalizer.
* **Adaptation rule.** The sign-error, once-per-block form of LMS, with 8 extra weight fraction
  bits and saturation. The equalizer is feed-forward only: there is no decision-feedback section,
  and it trains on the delayed source. There is no decision-directed mode.
* **Decimator.** It sits on the equalizer output. Factors 1 to 8. It only down-samples: the DA
  filters before it do the filtering.
* **Reset.** All registers (coefficients, weights, history) reset to zero asynchronously.

The FPGA figures this architecture is usually quoted with (LUT count, 260 MHz, 938 Mbps, 1 mW)
were not reproduced. This RTL has not been mapped to an FPGA, and no timing closure has been
attempted. The 38-bit, 8-level adder tree after the table read is a single pipeline stage. It
will be the critical path; split `ppa_tree` with a register if a higher clock is needed.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against an independent
integer model and prints `TB_RESULT checks=N failures=M`:

* `tb_ppa_adder`, `tb_ppa_tree`: random and corner operands against plain addition.
* `tb_da_lut_bank`, `tb_da_multiplier_array`: table contents from their definition. The sum of
  the partial products against the direct dot product, full-scale negative values included.
* `tb_da_fir_block`: 16 taps, 4 lanes. Random stream with gaps and a coefficient change. Exact
  outputs and the 2-clock latency.
* `tb_channel_equalizer`: a model of the weights predicts every output, error and coefficient,
  clock by clock. A system-identification run then checks convergence: mean |e| falls from
  about 1100 to under 10.
* `tb_da_lut_fir_sdr`: the whole system at the default size, 1500 blocks = 12000 BPSK symbols.
  The model covers every stage exactly. The run includes a channel reload, the limiter switched
  on, step-size changes and decimation factors 1, 2, 3 and 8; each event is counted and must
  occur. After training, the bit error rate must stay under 1%: 0 errors in the last 3200
  symbols. This testbench finishes in well under a second once built.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
          --top-module tb_da_lut_fir_sdr rtl/da_fir_pkg.sv tb/tb_da_lut_fir_sdr.sv
./obj_dir/Vtb_da_lut_fir_sdr
```

Building the full-size system takes about two minutes of C++ compilation.

## Changing the design

* Size: `TAPS`, `BLOCK` and `GRP` are parameters of the top. `TAPS` must be a multiple of `GRP`.
* Word lengths: `DATA_W` and `COEF_W`. Internal widths (table entries, partial products,
  accumulator) are derived from them in `da_fir_pkg`.
* Other equalizer rules: the weight update is a single `always_ff` block in
  `channel_equalizer.sv`. It has the block's error vector and sample window (`y_win`) at hand.
