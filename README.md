# Low-power FIR filter: block processing with coefficient segmentation

This is a single-multiplier FIR filter,
`y(n) = sum_{k=0}^{N-1} h(k) x(n-k)`, organised so that the multiplier's inputs switch as
little as possible. Two techniques are combined:

* **Block processing.** The filter computes `L` consecutive outputs together. Each coefficient
  is fetched once per block and held steady on the datapath while it is applied to the `L`
  samples of the block. The samples sit in a small register file, and only one new sample
  enters per coefficient. The coefficient operand therefore changes once every `L`
  operations instead of every operation. Memory traffic per block falls from `N*L`
  coefficient reads and `N*L` sample reads to `N` and `N+L-1`.
* **Coefficient segmentation.** Every coefficient is split as `h = s + m`. Here `s = ±2^i`
  is applied with a shifter. Only the residue `m` goes to the multiplier, and `m` is always
  ≥ 0 and below `2^(W-2)`. The multiplier's coefficient operand is therefore short, has no
  sign changes and has its top bits constantly zero.

The result is exact: the shifter result plus the multiplier result equals `x*h`, and the
accumulators are wide enough that no sum of `NMAX` products can overflow.

The default build uses 16-bit data and coefficients, a block size `L = 2` and room for
128 taps. The tap count `N` (1 to 128) is chosen at run time.

## Coefficient segmentation

`coeff_segmenter` applies the following rule to a W-bit two's-complement coefficient `h`:

1. Find the smallest `i` with `2^i >= |h|`.
2. If `|h| = 2^i`, the coefficient is a pure shift: `s = h`, `m = 0`.
3. Otherwise:
   * if `h > 0`, then `s = +2^(i-1)` and `m = h - 2^(i-1)`;
   * if `h <= 0`, then `s = -2^i` and `m = h + 2^i`.

In both non-power-of-two cases `0 < m < 2^(i-1)`. Examples for W = 8:

| h    | i | s    | m  |
|------|---|------|----|
| 100  | 7 | 64   | 36 |
| -100 | 7 | -128 | 28 |
| 64   | 6 | 64   | 0  |
| -128 | 7 | -128 | 0  |
| 0    | 0 | -1   | 1  |

Zero goes down the `h <= 0` branch, so it becomes `-1 + 1`. This is harmless and keeps the
rule uniform.

The split happens in hardware as a coefficient is written into the coefficient memory. Each
memory word holds `{s_neg, s_shamt, m}`: the sign and shift amount are the shifter's control
inputs, and `m` is the multiplier's coefficient operand. The search for `i` is a priority
encoder, so segmentation is combinational.

## The block schedule

This is the part that needs the most care. The `L` outputs of a block are
`y(n0) .. y(n0+L-1)`, and accumulator `ACC_j` collects `y(n0+j)`. Coefficients are used from
`h(N-1)` down to `h(0)`. For coefficient `k`, accumulator `j` needs sample `x(n0+j-k)`. The
samples needed for `k` are therefore those for `k+1` shifted by one: the oldest is dropped and
`x(n0+L-k)` is added.

The example below uses L = 3 and N = 4, for the block n0 = 3:

```
y3 = x3h0 + x2h1 + x1h2 + x0h3   -> ACC_0
y4 = x4h0 + x3h1 + x2h2 + x1h3   -> ACC_1
y5 = x5h0 + x4h1 + x3h2 + x2h3   -> ACC_2
```

The computation runs column by column, from right to left:

| coefficient | R_0 | R_1 | R_2 | processing order (ACC_0, ACC_1, ACC_2) |
|-------------|-----|-----|-----|----------------------------------------|
| h3 (load)   | x0  | x1  | x2  | R_0, R_1, R_2 |
| h2          | x3  | x1  | x2  | R_1, R_2, R_0 |
| h1          | x3  | x4  | x2  | R_2, R_0, R_1 |
| h0          | x3  | x4  | x5  | R_0, R_1, R_2 |

The register file `R_0..R_{L-1}` is a circular buffer with a pointer to its oldest entry. A
new sample always overwrites the oldest entry, and the pointer then advances. Reads are by
age: offset 0 is the oldest register and goes to `ACC_0`, offset `L-1` is the newest and
goes to `ACC_{L-1}`.

The description this design is built from words step 8 differently. Read literally, it
sends register `R_j` to accumulator `ACC_j` after each update, which would mix terms of
different outputs in one accumulator. This design keeps accumulators tied to outputs, as in
the example above.

### Controller states and timing

| state   | cycles | what happens |
|---------|--------|--------------|
| IDLE    | 1      | Wait for `run` and for samples up to `x(n0+L-1)`. Then clear all accumulators and issue reads of `h(N-1)` and `x(n0-N+1)`. |
| LOAD    | L      | The first data block arrives into `R_0..R_{L-1}`. |
| MAC     | L      | Per register: `ACC_j += (x << s) + x*m`. The last cycle fetches `h(k-1)` and `x(n0+L-k)`. |
| UPD     | 1      | The new sample replaces the oldest register. Back to MAC with `k-1`. |
| OUT     | 1 (+wait) | Hand the accumulators to the output unit, then set `n0 += L`. |

A block takes `N*L + N + L + 1` cycles when the output side is free. That is about
`N(L+1)/L` cycles per output, against `N` for a one-MAC-per-cycle direct filter. The extra
cycle per coefficient is the update cycle. Both memories have a one-cycle read latency.

The coefficient memory's read-data register doubles as the coefficient register: it changes
only when a new coefficient is read. So `s` and `m` stay fixed on the shifter and multiplier
for all `L` operations of a coefficient.

Samples before `x(0)` count as zero, so the filter starts from rest. The controller flags
these reads, and the register file stores zero for them. The data memory itself needs no
clearing.

## Datapath and module map

```
fir_bs_top
├── coeff_segmenter      h -> {s_neg, s_shamt, m}, on the coefficient write path
├── dp_ram (coefficients) NMAX words of {s_neg, s_shamt, m}
├── input_unit           sample handshake, writes the data ring, flow control
├── dp_ram (data)        ring of DEPTH samples, x(n) at address n mod DEPTH
├── control_unit         the schedule above
├── data_regfile         R_0..R_{L-1}, circular, read by age
├── seg_mac              acc + x*m + x*s
│   ├── baugh_wooley_mult  W x W signed array multiplier
│   └── pow2_shifter       x * (±2^shamt)
├── acc_bank             ACC_0..ACC_{L-1}
└── output_unit          buffers a finished block and streams it out
```

`fir_pkg` holds the default sizes and the controller state type.

* **Multiplier.** `baugh_wooley_mult` builds the signed product from unsigned partial-product
  bits. The bits where exactly one index is the sign position are inverted, and two constant
  ones are added at weights `2^W` and `2^(2W-1)`. Rows are summed one after another, as in a
  ripple array multiplier.
* **Operand order.** `SWAP_INPUTS` chooses which multiplier operand carries the sample.
  Value-wise the two orders are identical. For power they differ, because the array is not
  symmetric.
* **Data memory ring.** `DEPTH` defaults to the smallest power of two ≥ `NMAX + L`. The input
  unit stalls the source (`in_ready = 0`) whenever accepting another sample would overwrite
  one the current block still needs. It learns the oldest needed sample from the controller.

## Interface of `fir_bs_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset. |
| `run` | in | 1 | Start new blocks while high. |
| `num_taps` | in | `$clog2(NMAX+1)` | N, from 1 to NMAX. Hold it constant while running. |
| `coef_we`, `coef_waddr`, `coef_wdata` | in | 1, `$clog2(NMAX)`, W | Write `h(waddr)`. Only allowed while `busy = 0`; an assertion checks this. |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1, 1, W | Samples `x(0), x(1), ...`. A sample moves when valid and ready are both high at a clock edge. |
| `out_valid`, `out_ready`, `out_data` | out/in/out | 1, 1, AW | Outputs `y(0), y(1), ...` in order, exact. `AW = 2W + log2(NMAX)`. |
| `out_last` | out | 1 | Marks the last output of each block. |
| `busy` | out | 1 | The controller is not idle. |

To use the filter:

1. Reset.
2. Write the N coefficients with `run = 0`.
3. Set `num_taps` and raise `run`.
4. Stream samples in and outputs out.

Outputs come in blocks of L. A block can start only after all L of its input samples have
arrived. Any trailing input short of a full block is not processed.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W` | 16 | Data and coefficient word length. The filter was studied at 8, 16 and 24 bits. |
| `L` | 2 | Block size, i.e. the number of accumulators and data registers. It was studied at 2, 4, 8 and 16; 2 gave the largest saving. |
| `NMAX` | 128 | Largest tap count held by the coefficient memory. |
| `SWAP_INPUTS` | 0 | 0: sample on multiplicand `a`, `m` on `b`. 1: swapped. |
| `DEPTH` | `2**$clog2(NMAX+L)` | Data memory ring size. |
| `AW` | `2W + $clog2(NMAX)` | Accumulator and output width. |

## Design choices beyond the published algorithm

The published algorithm specifies:

* the segmentation rule;
* the block schedule;
* the processing order of coefficients, registers and accumulators;
* the use of a Baugh-Wooley array multiplier.

Everything below was chosen here:

* **Timing.** One shift-multiply-accumulate per cycle, with no pipelining. Memory reads take
  one cycle, and each coefficient update takes a separate cycle.
* **Run-time tap count.** The tap count is an input rather than a parameter, so filters of
  different lengths run on one build.
* **Segmentation at load time.** Coefficients are split by hardware as they are loaded. The
  original work split them beforehand in software; the stored values are the same.
* **Zero start.** Samples before `x(0)` are treated as zero.
* **Ring-buffer data memory.** It comes with flow control, valid/ready handshakes and an
  output buffer that frees the accumulators for the next block.
* **Widths and encoding.** Accumulators are full precision, and `s` is encoded as a sign
  plus a shift amount.
* **Reset.** Reset is asynchronous and active-low. The memory arrays are not reset.

Not included:

* **Gate-level multiplier.** The multiplier is word-level RTL: partial-product gates and
  row adders, with the full-adder cells left to synthesis. Switched-capacitance figures
  depend on the gate-level netlist and layout, so the RTL cannot reproduce them.
* **Power evaluation flow.** The flow used to evaluate power is not part of this design. It
  consists of gate-level simulation with a switching monitor and layout-extracted
  capacitances.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_coeff_segmenter` | Every 8-bit coefficient and 20k random 16-bit ones against a step-by-step model of the rule. Also checks `s + m = h`, `m >= 0` and `m < 2^(W-2)`. |
| `tb_baugh_wooley_mult` | All 8x8 operand pairs, plus random and corner cases at 16 and 24 bits. |
| `tb_pow2_shifter`, `tb_seg_mac` | `x*s`, and `acc + x*h`, for both operand orders. |
| `tb_dp_ram`, `tb_data_regfile`, `tb_acc_bank`, `tb_input_unit`, `tb_output_unit` | Against behavioural models: latency, hold, circular order, clear, stall condition and output order. |
| `tb_control_unit` | With modelled memories and register file, for N = 1, 2, 5 and 8 with L = 3: <ul><li>the register given to `ACC_j` at coefficient `k` is `x(n0+j-k)`;</li><li>coefficients are fetched in descending order;</li><li>there are `N*L` accumulations per block;</li><li>a block takes `N*L+N+L+1` cycles.</li></ul> |
| `tb_fir_bs_top` | Default build, end to end, for N = 1, 3, 24, 31 and 128. See below. |
| `tb_fir_workloads` | The eight benchmark filter lengths at W = 8, 16 (the default build) and 24, each with L = 2. See below. |
| `tb_fir_bs_variants` | W = 8 with L = 4; W = 24 with L = 16 and swapped operands; W = 16 with L = 8 (swapped) and with L = 3. |

**`tb_fir_bs_top`** loads random coefficients mixed with zeros, ±powers of two and the most
negative value. Input arrives with gaps and the output side applies random back-pressure.
Every output is compared with direct convolution. The testbench also checks, per block:

* N coefficient reads;
* `N+L-1` sample reads;
* the block time.

It counts, and requires, at least one occurrence of each of the following:

* input stalls;
* output back-pressure;
* waiting for input;
* zero samples before `x(0)`;
* register-file wrap;
* each segmentation branch.

**`tb_fir_workloads`** generates coefficients for each length by the windowed ideal-response
method: low-pass, band-pass, band-stop, five-band, differentiator and Hilbert. These stand in
for equiripple designs of the same lengths. Each output is checked, and the testbench counts
bit transitions at the multiplier's coefficient operand against a conventional filter.

Transitions per output at the coefficient operand, from `tb_fir_workloads` at W = 16,
L = 2:

| filter | N | conventional | this design |
|--------|---|--------------|-------------|
| low-pass | 24 | 156 | 54 |
| band-pass | 32 | 264 | 80 |
| band-pass | 50 | 420 | 136 |
| band-stop | 31 | 272 | 78 |
| five-band | 55 | 458 | 127 |
| differentiator | 32 | 400 | 60 |
| Hilbert | 20 | 142 | 57 |
| band-pass | 128 | 896 | 306 |

These count transitions only, not switched capacitance. The sample operand's activity is
not included.

Split by bit for the 32-tap band-pass filter, the conventional filter switches every bit of
the coefficient operand 12 to 20 times per output. In this design the low bits switch about
half as often, because each coefficient serves two outputs. Bits 8 to 13 switch 1 to 5
times. Bits 14 and 15 never switch, because `m < 2^(W-2)`. The testbench requires the two
top bits to stay quiet for every filter and word length.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/fir_pkg.sv tb/tb_fir_bs_top.sv --top-module tb_fir_bs_top
./obj_dir/Vtb_fir_bs_top
```

Replace `tb_fir_bs_top` with any other testbench name. Uninitialised variables do not
matter, because everything that is read is reset or written first. The full-size
end-to-end test runs in a few seconds.
