# Real-time covariance engine for a 12-antenna RFID direction finder

An RFID anti-theft gate can find a tag by its angle of arrival. Twelve antennas
receive the tag's reply. Each antenna has its own IQ demodulator and 16-bit ADC,
and all of them are sampled at the same moment at 3 Msps. The MUSIC algorithm
then locates the tag from the 12 x 12 covariance matrix of these complex signals.
The covariance is the only step that has to keep pace with the ADC: a set of
samples is valid only until the next one arrives 333 ns later. So it runs in
FPGA logic. The eigendecomposition and the spectrum search that follow have no
hard deadline and run in floating point on an ARM CPU.

This RTL is that FPGA part. It accumulates, over blocks of 1024 samples:

- the 12 channel sums, and
- the 78 products `S_i * conj(S_j)` of the upper triangle (the matrix is
  Hermitian, so the lower triangle is not computed).

From these it forms the 78 covariance entries as exact 44-bit complex integers.
It stores them in a dual-clock RAM that the CPU reads on its own clock.

The central idea is time multiplexing. There are no 78 multiply-accumulators.
There is **one** complex multiplier and **one** adder, clocked at 240 MHz, so
there are 80 cycles per sample. The running sum of each of the 78 products waits
in a shift register for its next turn.

## Where it sits

```
 12 x (I,Q) 16 bit, 3 Msps         clk (240 MHz)                          rd_clk (CPU side)
 ─────────────────────────► cov_ctrl ──► sample_summation ──┐
        sample_valid          (bank,      (1 adder, 12 cyc)  ├─► cov_matrix_calc ──► cov_result_ram ──► rd_re/rd_im
                               first,  ─► product_summation ─┘    (78 entries,        (78 x 88 bit,
                               last)      (1 cmult + 1 adder,      1 per cycle)        2 clocks)
                                           78 cyc)                        matrix_done ─► frame_sync ──► rd_matrix_ready
```

These steps are not in this RTL. The reader of the RAM does them in software:

- divide every entry by N-1 = 1023;
- fill the lower triangle with the conjugates of the upper triangle;
- run the eigendecomposition;
- isolate the noise subspace;
- evaluate the MUSIC spectrum over a 251 x 251 grid of steering vectors.

## What an entry contains

For antennas i <= j, a block of N = 1024 samples, channel sums `s_i = Σ S_i` and
product sums `P_ij = Σ S_i·conj(S_j)`, the engine delivers:

```
C_ij = P_ij − s_i·conj(m_j) − m_i·conj(s_j) + N·m_i·conj(m_j),   m = floor(s / N)
```

This is the sample covariance multiplied by N-1. The means are formed by an
arithmetic right shift by 10, so the real and imaginary parts are each rounded
towards minus infinity. With exact means, the four terms would collapse to
`P_ij − s_i·conj(s_j)/N`. The truncation leaves a small, fully predictable error.
Write `e = s/N − m`; its parts lie in [0, 1). Then:

```
C_ij − (P_ij − s_i·conj(s_j)/N) = N·e_i·conj(e_j)
```

- The real part of this error lies in [0, 2N).
- The imaginary part lies in (−N, N).
- After the division by 1023, the error is at most about 2 in the real part and
  1 in the imaginary part. Real covariances are in the tens of thousands.

The testbenches check both forms: the exact bit pattern, and this bound against
the exact value.

The error analysis of the reference design gives N for a single real product.
It reports at most 1.001 after the division, on its example. The real part of a
complex entry carries two such products, so this design's bound is 2N/1023. On a
simulated tag reply, `tb_cov_accuracy` measures at most 1.66 in the real part and
0.93 in the imaginary part.

Bit widths for 16-bit samples:

| quantity                       | width | why                                    |
|--------------------------------|-------|----------------------------------------|
| sample (I or Q)                | 16    | ADC                                    |
| channel sum `s`                | 26    | 16 + log2(1024)                        |
| mean `m`                       | 16    | `s >>> 10`                             |
| product `S_i·conj(S_j)` part    | 33    | sum of two 31-bit products, with carry |
| product sum `P`                | 43    | 33 + 10                                |
| entry `C`                      | 44    | holds the worst case for 1024 samples  |

The diagonal entries are real and non-negative, and their imaginary parts come
out exactly 0.

## The 80-cycle schedule

A sample strobe (`sample_valid`) in cycle t copies the 12 samples into the sample
bank. `start` rises in cycle t+1, and both engines begin in that cycle (call it
s):

| cycles             | product_summation                           | sample_summation     |
|--------------------|---------------------------------------------|----------------------|
| s .. s+77          | issue pair k = 0..77 to the complex multiplier | channel a = 0..11 in s .. s+11 |
| s+1 .. s+78        | add product k to its partial sum, push it back | —                    |
| s+2 .. s+79        | running sum of pair k on `psum_*`           | (s+1 .. s+12) `sum_*` |

Pairs are issued row-major over the upper triangle:
(0,0), (0,1) … (0,11), (1,1), (1,2) … (11,11).
The index k of a pair is also the RAM address of its entry.

The bank is read until cycle s+77. So the next strobe may come 78 cycles after
the previous one. At 3 Msps and 240 MHz the spacing is 80, which leaves 2 spare
cycles. A strobe that comes earlier is **dropped**, and the sticky `overrun`
output is set. The block then completes with later samples. At a 60 MHz clock
there would be only 20 cycles per sample, and this structure would not fit;
the 240 MHz clock is what lets a single multiplier do all 78 products.

## Partial-sum shift registers

The shared adder needs, for pair k, the running sum of that same pair from the
previous sample. That sum was pushed exactly 78 pushes earlier. `partial_sum_sreg`
is a first-in-first-out store of fixed depth, 78 for the products and 12 for the
channel sums:

- every push (enable high) stores the adder's result;
- `dout` always shows the value pushed DEPTH pushes ago, which is the sum whose
  turn it is;
- while the enable is low, nothing moves, so gaps between samples do not matter.

It is a circular buffer in a memory array with one pointer, so it maps to block
RAM. It is not built from 78 x 86 flip-flops.

A block restarts without clearing anything. On the first sample of a block, the
adder takes zero instead of `dout`. The first and last flags are captured at
`start` and travel down the pipeline with each pair. So a new sample can start
while the previous one is still in the adder stage.

## End of a block

On the last sample of a block, both engines mark their output streams with
`*_last`. `cov_matrix_calc` then does two things:

- It stores the 12 final channel sums as they appear.
- It turns each final product sum into an entry as it streams past. There is no
  wait for a buffer to fill.

The pairs must come out in an order that keeps this safe. Pair (i, j) has index
k >= j, and its final sum appears at s+k+2. The final sum of channel j is stored
by s+j+2 at the latest. An operand register stage adds one more cycle of margin.

The stage is a three-step pipeline:

1. register the product sum;
2. three registered `cplx_mult_conj` for `s_i·conj(m_j)`, `s_j·conj(m_i)` and
   `m_i·conj(m_j)`;
3. a four-term add, formed modulo 2^44.

So the 78 entries are written in 78 consecutive cycles, the last one 83 cycles
after the strobe of the block's last sample. At the nominal spacing a whole block,
from its first strobe to the last entry, takes 1023·80 + 83 = 81,923 cycles. At
240 MHz that is 341 µs.

## Reading the matrix (CPU clock domain)

`cov_result_ram` is a simple dual-port RAM. Port A writes on `clk`. Port B reads
on `rd_clk`: assert `rd_en` with `rd_addr` = k, and `{rd_re, rd_im}` hold the
entry after the next `rd_clk` edge.

When the last entry has been written, `matrix_done` flips a toggle. `frame_sync`
carries it into the read domain, where it becomes a one-cycle `rd_matrix_ready`
pulse (3-4 `rd_clk` edges later) and increments `rd_matrix_count`.

The RAM is rewritten only during the last sample of the next block, about 82,000
processing cycles later. A reader that fetches the 78 words within that window
gets a consistent matrix.

To turn entry k = (i, j) into the covariance, divide by 1023. For j < i, use the
complex conjugate of entry (j, i).

## Modules

| file                   | role |
|------------------------|------|
| `cov_pkg.sv`           | default sizes, `num_pairs`, `pair_index` (upper-triangle numbering) |
| `rfid_cov_top.sv`      | top level: ports listed below |
| `cov_ctrl.sv`          | sample bank, block sample counter, first/last flags, 78-cycle hold, overrun |
| `sample_summation.sv`  | 12 channel sums, one adder, 12-deep partial-sum store |
| `product_summation.sv` | 78 pair-product sums, one complex multiplier + adder, 78-deep store |
| `cplx_mult_conj.sv`    | `a·conj(b)`, one-cycle registered |
| `partial_sum_sreg.sv`  | fixed-delay partial-sum store with shift enable |
| `cov_matrix_calc.sv`   | final-sum capture and the four-term entry formula |
| `cov_result_ram.sv`    | dual-clock 78 x 88-bit RAM |
| `frame_sync.sv`        | toggle synchroniser for the matrix-ready event |

Top-level ports of `rfid_cov_top`, with its parameters `N_ANT = 12`, `SAMPLE_W = 16`,
`LOG2_NSAMP = 10` and `COV_W = 44`:

- **clk domain:** `clk`, `rst_n`; `sample_valid`, and `adc_re[12]` / `adc_im[12]`
  (signed 16-bit); `overrun`; `matrix_count[15:0]`.
- **rd_clk domain:** `rd_clk`, `rd_rst_n`; `rd_en`, `rd_addr[6:0]`;
  `rd_re` / `rd_im` (signed 44-bit); `rd_matrix_ready`; `rd_matrix_count[15:0]`.

Both resets are synchronous and active low. The memories are not reset.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cov_pkg.sv tb/tb_rfid_cov_top.sv \
          --top-module tb_rfid_cov_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_rfid_cov_top` with any other testbench name, which is `tb_` plus the
module name. Verilator finds the modules it needs in `rtl/` by their file names.

`tb_rfid_cov_top` runs the design at its full default size. It sends three
blocks of 1024 samples, about 250,000 cycles in a few seconds:

- full-scale random data at the 80-cycle spacing;
- a simulated tag reply (a ±1 backscatter symbol with a different phase on each
  antenna, plus offset and noise) at the minimum 78-cycle spacing, with one
  strobe sent too early;
- the same reply at random spacing.

It reads every matrix back through the read port on a separate clock. It compares
all 78 entries with a 64-bit reference computed from the accepted samples, and
checks the truncation bound against the exact covariance. It also checks the
timing:

- the 78 entries are written in 78 consecutive cycles;
- a block takes at most 82,000 cycles at the nominal spacing.

It counts that each mechanism really happened: the restart of the partial sums,
the dropped strobe and `overrun`, back-to-back samples, and the clock-domain
hand-over.

`tb_cov_accuracy` runs two simulated tag replies, one at 80 and one at 133
cycles per sample (a 240 MHz and a 400 MHz clock). It divides every entry by 1023
and compares it with a double-precision, mean-subtracted covariance of the same
samples. It prints the largest deviation.

The block testbenches check the following:

| testbench | what it checks |
|-----------|----------------|
| `tb_cplx_mult_conj` | corner operands (−32768), one-cycle latency |
| `tb_partial_sum_sreg` | the exact DEPTH-push delay, holding still with the enable low |
| `tb_sample_summation` | running sums, restart, 12 cycles per sample |
| `tb_product_summation` | running sums, pair order, restart, 78 cycles per sample, back-to-back samples |
| `tb_cov_matrix_calc` | the entry formula on random sums, entries only on the last sample, the error bound |
| `tb_cov_ctrl` | 80 / 78 / 77-cycle spacings, first/last flags with 8-sample blocks |
| `tb_cov_result_ram` | dual-clock write/read, registered read |
| `tb_frame_sync` | one pulse per event, fast-to-slow and slow-to-fast |

## How far to trust it, and what is this design's own

These parts follow the reference design closely:

- the partitioning (covariance in hardware, the rest in software);
- the sizes: 12 antennas, 16-bit samples, 1024 samples, 78 upper-triangle
  products, 44-bit output;
- one multiplier reused 78 times at 240 MHz, with 12 summation cycles and 78
  product cycles per sample;
- the partial sums held in enabled shift registers between the adder's output
  and its input;
- the truncating division by 1024, with the final division by 1023 left to the
  CPU;
- a two-clock block RAM as the hand-over to the CPU.

These choices are this implementation's own, made where the reference design is
silent:

- the strobe-plus-parallel-bus sample interface;
- dropping a sample that comes too early, and the `overrun` flag;
- the row-major entry order and RAM addressing;
- the multiplier with built-in conjugation;
- streaming the last sample's product sums straight into the entry calculation,
  and the three-stage pipeline of that calculation;
- the floor (not toward-zero) rounding of negative means;
- the toggle synchroniser and the read-side counters;
- synchronous active-low resets.

The reference design reports 80 cycles for its final covariance step. This design
writes the 78 entries in 78 cycles, the last one 83 cycles after the final
strobe. The total of about 82,000 cycles per block agrees.

Not verified:

- timing closure at 240 MHz;
- FPGA resource use. The reference build used 764 ALMs and 20 DSP blocks. This
  RTL has four complex multipliers: one in the product engine and three in the
  entry stage.

Generic synthesis reports about 14,800 bits of memory for the shift registers and
the result RAM together.

Not included:

- the antenna/IQ-demodulator/ADC front end;
- the CPU software;
- the bus bridge between the FPGA fabric and the CPU. The RAM read port stands
  in for it.

## Changing it

- `N_ANT` changes the number of pairs, and with it the cycles needed per sample
  (`N_ANT·(N_ANT+1)/2` must not exceed the clock/sample-rate ratio).
- `LOG2_NSAMP` sets the block length (a power of two).
- `SAMPLE_W` sets the ADC width. The sum, product and entry widths follow from
  these; keep `COV_W >= 2·SAMPLE_W + LOG2_NSAMP + 2`.

Fewer ADC bits shrink every multiplier and accumulator: one input bit less
removes two bits from every product.
