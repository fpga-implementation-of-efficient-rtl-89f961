# filter_alu: a 16-tap floating-point FIR filter with one multiplier and one adder

A direct-form FIR filter with N taps computes

    y(n) = h(0)·x(n) + h(1)·x(n-1) + ... + h(N-1)·x(n-N+1)

and, drawn as hardware, needs N multipliers and N-1 adders working side by side
on a chain of N-1 sample delays. In IEEE-754 single precision, each of those
floating-point multipliers and adders is large. This design trades speed for
area. It keeps **one** single-precision multiplier and **one** single-precision
adder and walks them over the taps, one tap per clock cycle. Each new input
sample starts a 16-cycle multiply-accumulate loop: the delay line supplies
x(n-k), a coefficient table supplies h(k), and the products are summed in an
accumulator. The sum is then presented as the output.

The result is a filter that costs about as much as one MAC unit plus two
16-word tables. It delivers one output every 20 clock cycles.

The architecture follows the design published as *"FPGA Implementation of
Efficient FIR Filter"* (R. Yadav, R. Tripathi, S. Yadav). That design is an
"ALU-based" FIR filter with 16 taps, 32-bit single-precision data, one shared
floating-point adder and multiplier, and the port list used here. The
publication does not give the inside of the arithmetic units, the coefficient
values, the sequencing or the handshake. Those parts are this implementation's
own and are marked as such below and in each file's header.

## Ports and timing

| port             | dir | width | meaning |
|------------------|-----|-------|---------|
| `clk`            | in  | 1     | clock, all logic on the rising edge |
| `reset`          | in  | 1     | synchronous, active high |
| `data_in`        | in  | 32    | input sample x(n), IEEE-754 single precision |
| `data_in_valid`  | in  | 1     | one-cycle strobe: `data_in` is a new sample |
| `sample_out`     | out | 32    | output y(n), single precision, held until the next result |
| `data_out_valid` | out | 1     | one-cycle strobe: `sample_out` has just changed to a new y(n) |

- **Latency:** suppose `data_in_valid` is high in cycle t while the filter is
  idle. Then `data_out_valid` is high in cycle t + 20, and `sample_out` carries
  y(n) from then on. In general the latency is NTAPS + 4.
- **Throughput:** the filter accepts a new sample in cycle t + 20, the same
  cycle the previous result appears. So the input rate may be at most one
  sample every 20 cycles.
- **Samples arriving while busy are ignored.** From the accepting cycle until
  the result appears, `data_in_valid` has no effect. There is no ready or
  back-pressure signal, so the source must pace itself.
- **Reset** empties the arithmetic pipeline and returns the sequencer to idle.
  It also clears the whole delay line to +0, so the filter restarts from a zero
  history, and clears `sample_out`.

## How one output is computed

`fir_ctrl` is a three-state sequencer: IDLE, MAC and DRAIN. `fir_alu` is a
three-stage pipeline:

```
stage 1   mult_operand1/2 <= x(n-k), h(k)
          mult_out         = mult_operand1 * mult_operand2      (fp_mul, combinational)
stage 2   add_operand2    <= mult_out
          add_out          = acc + add_operand2                 (fp_add, combinational)
stage 3   acc             <= add_out
```

For one sample strobed in cycle t:

| cycle        | sequencer | what happens |
|--------------|-----------|--------------|
| t            | IDLE      | sample shifted into delay word 0, accumulator cleared, `setup_start` |
| t+1 … t+16   | MAC       | `count_mem` = k = 0…15: x(n-k) and h(k) enter stage 1 |
| t+17, t+18   | DRAIN     | the last two products finish stages 2 and 3 |
| t+19         | DRAIN     | pipeline empty: `out_load`, y(n) copied to `sample_out` |
| t+20         | IDLE      | `data_out_valid`; a new sample may be strobed |

Only the adder sits inside the accumulation loop, and it is combinational. So
`acc` takes one new product every cycle and the 16 taps run back to back
without stalls. The multiplier lies outside the loop and could be pipelined
further without changing the schedule: DRAIN simply waits until the
arithmetic unit reports `idle`.

The delay line (`fir_sample_mem`) is a 16-word shift register with a read
multiplexer rather than a chain of wires to 16 multipliers. Word k always holds
x(n-k), so the tap counter addresses the delay line and the coefficient table
with the same index.

## Arithmetic

`fp_mul` and `fp_add` are combinational IEEE-754 binary32 units.

- **Multiplier:** multiplies the 24-bit significands (hidden bit restored),
  normalises by at most one place, and rounds to nearest with ties to even,
  using a guard bit and a sticky bit.
- **Adder:** orders the operands by magnitude, aligns the smaller one with
  guard, round and sticky bits, then adds or subtracts. It normalises with a
  leading-zero count and rounds to nearest with ties to even. An exact
  cancellation gives +0.
- **Departures from full IEEE-754**, chosen here:
  - Subnormal inputs are read as zero, and results that would be subnormal
    become a signed zero (flush-to-zero).
  - Overflow gives ±infinity.
  - Any NaN input, ∞·0 and (+∞) + (−∞) all give the quiet NaN `0x7FC00000`.
  - Only round-to-nearest-even is provided.

Outside the subnormal range, the results are the correctly rounded IEEE
results. The accumulation order is fixed: h(0)·x(n) first, up to
h(15)·x(n-15). Each product and each partial sum is rounded to single
precision. A software model that repeats that order reproduces `sample_out`
bit for bit. The end-to-end testbench relies on this.

## Coefficients

The published design loaded 16 coefficients prepared offline but did not list
them. The default table here (`fir_pkg::H_DEFAULT`) is a linear-phase low-pass
filter: a Hamming-windowed sinc with cutoff fc = 0.25 cycles/sample, scaled to
unity gain at DC.

    m    = k - 7.5
    h[k] = sin(2π·fc·m) / (π·m) · (0.54 - 0.46·cos(2π·k/15)),   k = 0..15
    h[k] = h[k] / Σ h

Each value is rounded to the nearest single-precision number. The table is
symmetric, h(k) = h(15-k). To use another filter, pass your own table through
the `COEFFS` parameter of `filter_alu`.

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | word width, default tap count, `fp32_t` field struct, constants, default coefficients |
| `rtl/filter_alu.sv` | top level: wiring plus the output register |
| `rtl/fir_ctrl.sv` | sequencer: IDLE/MAC/DRAIN, 5-bit tap counter `count_mem` |
| `rtl/fir_alu.sv` | shared multiply-accumulate pipeline (one `fp_mul`, one `fp_add`) |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv` | single-precision multiplier and adder |
| `rtl/fir_sample_mem.sv` | 16-word delay line with addressed read |
| `rtl/fir_coeff_rom.sv` | coefficient table, asynchronous read |
| `tb/tb_fp_ref_pkg.sv` | testbench reference arithmetic (double precision, rounded once to single) |
| `tb/tb_*.sv` | one self-checking testbench per module |

Register and signal names inside `fir_alu` and `fir_ctrl` follow the names
used in the published design's simulation trace: `mult_operand1/2`,
`mult_out`, `add_operand1/2`, `add_out`, `sample_mem`, `count_mem` and
`setup_start`.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Every one has a watchdog.

- **`tb_fp_mul`, `tb_fp_add`:** directed corner cases, such as rounding ties,
  cancellation, overflow, zero, infinity and NaN. Then 20,000 random operand
  pairs, compared bit for bit with a reference. The reference computes in
  double precision and rounds once to single, which is exact for a single
  product or sum.
- **`tb_fir_alu`:** 300 runs of 1 to 20 random pairs, some back to back and
  some with gaps. It checks the sum, the three-cycle latency and the `idle`
  flag.
- **`tb_fir_sample_mem`:** reads all 16 words after every cycle and compares
  them with a model; it also tests a reset in the middle.
- **`tb_fir_coeff_rom`:** recomputes the coefficients from the formula above
  (within one unit in the last place) and checks the symmetry.
- **`tb_fir_ctrl`:** checks the tap order, `count_mem`, the 19-cycle
  `out_load` timing and one-cycle strobes. It also sends strobes while busy,
  which must be ignored.
- **`tb_filter_alu`:** runs the whole filter at its default parameters, with:
  - a unit impulse, whose outputs must equal the 16 coefficients;
  - a constant 1.0 input, whose output must settle to a DC gain of 1 within
    1e-6;
  - two periods of a 16-sample sine;
  - 200 random samples with random gaps, extra strobes while busy, and
    back-to-back inputs;
  - a reset in the middle of a computation.

  Every output must match a bit-exact model and arrive exactly 20 cycles after
  its strobe.
- **`tb_filter_alu_32tap`:** builds the filter with NTAPS = 32 and a 32-entry
  table of signed powers of two. It checks 100 random outputs bit for bit, with
  the 36-cycle latency.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/fir_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_filter_alu.sv --top-module tb_filter_alu
./obj_dir/Vtb_filter_alu
```

Replace `tb_filter_alu` with any other testbench name. The testbenches
initialise everything they read, so they also run on a two-state simulator.

## Changing the design

- **Tap count:** `filter_alu #(.NTAPS(32), .COEFFS(my_table))`. The delay line,
  the table, the counter width ($clog2(NTAPS)+1) and the schedule all follow
  NTAPS. The latency becomes NTAPS + 4 cycles. The default table has 16 entries,
  so any other NTAPS needs its own COEFFS. `tb_filter_alu_32tap` runs a
  32-tap instance.
- **Clock speed:** the longest path is the combinational adder inside the
  accumulation loop. To clock faster, the adder would have to be pipelined, and
  then the loop would need several interleaved partial sums combined at the
  end. That changes the rounding order and therefore the exact output bits.
- **Flow control:** if the source cannot pace itself, derive a ready signal
  from `fir_ctrl`'s `busy` output, which is already there but unused at the
  top.

## Where this departs from the published design

- The published design called its adder and multiplier as Verilog functions
  inside one module. Here they are separate modules with the same role.
- The published trace also shows two memories, `computation_mem` and
  `data_out_mem`, and the text mentions reusing the first location of a
  computation memory from the ninth cycle on. Neither their size nor their use
  is described, so they are not built. The running sum lives in the
  accumulator register, and results leave through `sample_out`.
- The published text describes the outputs after the eighth sample as a mirror
  image of the first eight. That is a property of its symmetric test values.
  This design always computes all 16 products and does not exploit any
  symmetry.
- Reported FPGA results are not reproduced here: a Spartan-6 XC6SLX25 with 68
  I/Os, 8 DSP blocks, 1771 logic elements and 0.047 W total power. The port
  list does come to the same 68 I/O pins.
- The latency, the busy behaviour and the reset behaviour are this
  implementation's choices. The published design does not specify them.
