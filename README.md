# Transpose-form block FIR filters for ECG noise removal

A finite impulse response (FIR) filter of length N computes

    y(n) = sum_{t=0}^{N-1} h(t) x(n-t)

The designs here compute it for **L samples per clock**, a block at a time. The
block formulation is done in **transpose form**. In transpose form every
coefficient multiplies only the *current* input samples, and all delays sit on
the output side. This matters for fixed-coefficient filters: a single input
sample meets many constants at once. So the general multipliers can be replaced
by one shift-and-add *multiple constant multiplication* (MCM) block per sample,
and the MCM block shares adders between its constants. Direct-form block
filters cannot be arranged this way.

Two filters are provided. Both use the default size of block L = 4, length
N = 16, 8-bit signed samples and coefficients, and 16-bit results:

| module | coefficients | multipliers |
|---|---|---|
| `block_fir_reconf` | held in a small coefficient store; a `sel` input picks one of `NCH` channel filters | general signed multipliers |
| `block_fir_mcm` | fixed at elaboration (parameter) | CSD shift-add MCM blocks, no multipliers |

`ecg_block_fir_top` puts both side by side on one input stream. The intended
use is cleaning ECG data, for example 360 Hz records with mains hum and
wide-band noise. The two built-in coefficient sets are a 16-tap moving sum and
a 16-tap low-pass.

## The block formulation

Split the N taps into M = N/L short weight vectors:

    c_m = [h(mL), h(mL+1), ..., h(mL+L-1)],   m = 0 .. M-1

For block k, define the L x L input matrix S_k with row l, column i:

    S_k[l][i] = x(kL + l - i)

Then the k-th output block y_k = [y(kL), ..., y(kL+L-1)] is

    y_k = sum_{m=0}^{M-1} S_{k-m} c_m

Each term uses an *old* matrix. The transpose form turns this around. Every
weight vector is applied to the *current* matrix:

    r_k^m = S_k c_m          (M matrix-vector products, all in parallel)

The partial blocks are then delayed by m blocks and added:

    y_k = sum_m r_{k-m}^m

Only 2L-1 distinct samples appear in S_k. They are the current block and the
newest L-1 samples of the previous block. Sample x(kL+L-1-j) lies on one
diagonal of the matrix, the one with l - i = L-1-j. That diagonal has L-|L-1-j|
positions.

## Reconfigurable filter (`block_fir_reconf`)

```
 x_blk --> register_unit --win--> M x inner_product_unit --r^m--> pipelined_adder_unit --> y_blk
                                       ^ c_m
 sel ----> coef_storage_unit ----------+
```

- **`register_unit`**: registers each block and keeps the newest L-1 samples
  of the previous one. It outputs the window `win[j] = x(kL+L-1-j)`, newest
  first. Row l of S_k is `win[L-1-l .. 2L-2-l]`.
- **`coef_storage_unit`**: N small ROM look-up tables, one per tap, each with
  one entry per channel. `sel` addresses all of them at once, so a complete
  coefficient set is registered in one clock.
- **`inner_product_unit`**: one per weight vector. It holds L
  `inner_product_cell`s; cell l takes row l. Each cell has L multipliers and a
  log2(L)-level adder tree. This is the combinational critical path:
  multiplier, then adder tree, then one adder in the PAU.
- **`pipelined_adder_unit`** (PAU): the transpose-form delay line. Stage M-1
  registers r^{M-1}. Each lower stage adds its own r^m to the register above
  and registers the sum. Stage 0's sum is registered as the output.

### Channel switching

The coefficient register follows `sel` one clock later. A block is multiplied
by the coefficients in force when it is accepted. The PAU, however, still
holds partial sums that earlier blocks formed with the previous set. So for M-1
output blocks after a switch, the output mixes the two filters, exactly as in
any transpose-form filter whose coefficients change. After that the output is
the new filter alone. If a clean switch is needed, flush with M blocks or reset.

## MCM filter (`block_fir_mcm`)

```
 x_blk --> register_unit --win[j]--> (2L-1) x mcm_block --p--> adder_network --r^m--> pipelined_adder_unit --> y_blk
```

Window sample j meets coefficient h(mL+i) once for every column i on its
diagonal, and that holds for each of the M weight vectors. So sample j feeds
one `mcm_block` with M(L-|L-1-j|) constants. For L = 4, N = 16 the seven
blocks have **4, 8, 12, 16, 12, 8 and 4** constants. The middle sample (j = 3)
meets all 16 taps.

`mcm_block` builds its products without multipliers:

1. Each constant is written as sign x odd x 2^s.
2. For each distinct odd part, the product odd x x is built once from the
   canonical signed digit (CSD) form of the odd part. Each non-zero digit adds
   or subtracts one shifted copy of x.
3. Each constant then reuses that product, shifted by s and negated if needed.

The digit patterns are worked out by constant functions in `fir_pkg`
(`csd_digit`, `tz_count`) at elaboration time. Sharing stops at equal odd
parts. Deeper common-subexpression search is not done here; synthesis may
merge further.

`adder_network` forms `r^m[l] = sum_i p[L-1-l+i][m][i]`, the same values the
inner-product units of the reconfigurable filter produce. The
`pipelined_adder_unit` is the same module in both filters.

## Number format

- Samples and coefficients are two's-complement signed, 8 bits.
- All products and sums are carried at the output width Y_W = 16 and wrap
  modulo 2^16. The result is exact whenever the true value fits in 16 bits.
  For 8-bit samples the worst case is 128 x sum|h|: 17408 for the low-pass and
  2048 for the moving sum. Coefficient sets with sum|h| above 255 can overflow;
  widen `Y_W` for them.
- Nothing is rounded or scaled. The low-pass has a DC gain of 128 (Q7), so its
  output is 128 x the filtered signal.

## Coefficient sets (`fir_pkg`)

| set | taps | origin |
|---|---|---|
| `COEF_AVG`, channel 1 of `COEF_TABLE` | 16 x `1` (moving sum) | the coefficient set of the source design's reference simulation. A constant input of -75 settles at -1200 |
| `COEF_LP`, channel 0, and the default of `block_fir_mcm` | 0 -1 -1 0 4 12 22 28 28 22 12 4 0 -1 -1 0 | this design's own: a 16-tap Hamming-window low-pass, 40 Hz cut-off at 360 Hz, scaled to sum to 128 |

To change the coefficients, override the `TABLE` parameter
(`[NCH][N]`, signed `C_W` bits) or the `COEF` parameter (`[N]`) on the filters
or on the top.

## Interface and timing

All three filter modules share this interface (`sel` only on the
reconfigurable ones):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset that clears all history and loads channel 0 |
| `in_valid` | in | 1 | `x_blk` holds a block. Every register advances only on valid blocks, so gaps are allowed |
| `x_blk[L]` | in | X_W | `x_blk[i] = x(kL+i)`, oldest sample in element 0 |
| `sel` | in | clog2(NCH) | channel of the reconfigurable filter |
| `out_valid` / `rec_valid`, `mcm_valid` | out | 1 | output block valid |
| `y_blk[L]` / `rec_y`, `mcm_y` | out | Y_W | `y(kL+l)` in element l |

If a block is accepted in clock cycle k, its output block is valid in cycle
k+2, one cycle for the register unit and one for the PAU. Throughput is one
block of L samples per clock. Samples before the first block after reset count
as zero.

## How far this follows the source design

The structure follows the published transpose-form block FIR architecture for
fixed and reconfigurable use, as applied to ECG filtering. That includes the
decomposition into register unit, coefficient store, inner-product units and
cells, and pipelined adder unit, as well as the 2L-1 MCM blocks of widths
4/8/12/16/12/8/4 feeding an adder network. The sizes L = 4, N = 16, 8-bit data
and coefficients, 16-bit outputs and the all-ones channel are taken from it.

The following are this design's own choices:

- the `in_valid`/`out_valid` handshake, the reset, and the register placement
  (two-cycle latency);
- the low-pass coefficient set and the number of channels (two);
- the sample order inside a block;
- the adder-tree shape, and the wrap-around 16-bit arithmetic;
- the extent of subexpression sharing in the MCM blocks.

Known departures and gaps:

- The reference simulation of the source design shows a filter with a single
  8-bit input and a single 16-bit output port. Here the block interface of its
  architecture diagram is used: L samples in and L out per clock.
- The source design's table of the product terms each MCM block must produce,
  and its optimised subexpression sharing, are not reproduced. Any coefficient
  set works here; sharing is limited as described above.
- No FPGA area or timing figures are claimed. The source reports about 147
  slices and a 30.7 ns delay on an unnamed FPGA.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=F` line. Their reference values are worked out
independently, from the filter's definition:

| testbench | what it checks |
|---|---|
| `register_unit_tb` | window contents after random blocks with gaps |
| `coef_storage_unit_tb` | full coefficient set one clock after each random `sel` |
| `inner_product_cell_tb`, `inner_product_unit_tb` | random and extreme operands against integer sums |
| `adder_network_tb` | every diagonal sum, with random data in unused slots |
| `pipelined_adder_unit_tb` | y_k = sum r_{k-m}^m with random enable gaps, one-cycle latency |
| `mcm_block_tb` | all 256 inputs against three constant sets (shared odd parts, 0, +-1, 127, -128) |
| `block_fir_reconf_tb` | constant input -75 settling at -1200, impulse response, 2000 random cycles with gaps and channel switches, exact two-cycle latency |
| `block_fir_mcm_tb` | default low-pass and an extreme coefficient set: impulse, full-scale constant, random data with gaps |
| `ecg_block_fir_top_tb` | both filters at default parameters on 2880 samples of synthetic ECG with 50 Hz hum and noise, plus a mid-stream reset, gaps and channel switches; the low-pass output must be much closer to the clean ECG than the input is |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv tb/ecg_block_fir_top_tb.sv \
          --top-module ecg_block_fir_top_tb -o sim
./obj_dir/sim
```

Every testbench runs in well under a second.
