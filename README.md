# KeyRAM: a recurrent-attention keyword-spotting processor with in-memory compute

KeyRAM classifies spoken keywords. Its classifier is a recurrent attention model (RAM). A dense
network looks at the whole spectrogram. RAM instead takes a series of *glimpses*. Each glimpse
reads a small feature vector `x_t` at a location `l_t`, updates a hidden state `h_t`, and emits
two things: class scores, and the location of the next glimpse. More glimpses give a surer
decision at the cost of more energy and latency, so that trade-off can be set at run time.

One glimpse is six fully connected layers:

| layer | inputs → outputs | operands | runs on | role |
|---|---|---|---|---|
| fc1 | 2 → 63 | 8 bit | digital (DM2VM) | location embedding `e_l`, ReLU |
| fc2 | 64 → 64 | 8 bit | digital | feature embedding `e_p`, ReLU |
| fc3 | 127 → 127 | 4 bit | IMC bank 0 | glimpse vector `g_t` from `[e_l, e_p]` |
| fc4 | 254 → 127 | 4 bit | IMC bank 1 | `h_t` from `[g_t, h_{t-1}]` |
| fc5 | 127 → 10 | 8 bit | digital | class scores (softmax left to the host) |
| fc6 | 127 → 2 | 8 bit | digital | next location `l_{t+1}`, hard tanh |

Every layer has one extra bias input. fc3 and fc4 hold about 89 % of the multiply-accumulates
(48.6k of 54.5k per glimpse). They run inside two SRAM banks as analog dot products. The small
layers run on a 64-PE digital matrix-vector engine. All weights stay on chip: two 32 kB IMC banks
plus 6 kB of digital weight SRAM, 38 kB in total.

## Chip structure

```
            host command port                       IO buffer port (l_t, x_t in; y, l_t+1, h_t out)
                  │                                              │
           ┌──────┴──────┐  pass table / start   ┌───────────────┴──────────────┐
           │  main_ctrl  │──────────────────────▶│ dm2vm  (96x512 SRAM, 64 PEs,  │
           │  6 modes,   │◀────────────── done ──│  25-bit acc, 256-byte IO buf) │
           │  ADC ctrl   │                        └──────┬────────────────────────┘
           └┬────┬────┬──┘                               │ fc2/fc1 outputs, 4 bit
            │    │    │                          ┌───────▼────────┐   ┌───────────────────┐
            │    │    └────────────────────────▶ │ input_buffer 0 │   │ input_buffer 1     │
            │    │                               │ 128 x 4 bit    │   │ 256 x 4 bit        │
            │    │                               └───────┬────────┘   └─────────┬─────────┘
            │    ▼                                       ▼                      ▼
            │  imc_block 0 (fc3)                   imc_block 1 (fc4)
            │    vy0_p, vy0_n ─────────┐        ┌──── vy1_p, vy1_n
            ▼                          ▼        ▼
        adc_bank: two pairs of 6-bit single-slope ADCs ──▶ imc_interface (scale, ReLU, requantise)
```

`keyram_top` wires these blocks together. The host loads weights and configuration through a
64-bit command port. It writes `l_t` and `x_t` into the DM2VM IO buffer and reads the results
back from the same buffer.

## The in-memory dot product

`imc_block` computes `y = Σ_i w_i x_i` with 4-bit signed weights and 4-bit unsigned inputs, over
up to 256 columns. A weight vector occupies four adjacent rows of the 512×256 bank: row 4m+k
holds bit 3−k of `W[m][i]` in column i, MSB first. So one bank holds 128 weight vectors of 256
elements. A dot product runs in four stages:

1. **Pulse-width word lines** (`wl_pulse_gen`). The four rows of the vector are driven at once.
   The MSB row's pulse lasts `T_MAX` = 8 cycles and each lower row gets half the previous one
   (8, 4, 2, 1). A bit line therefore discharges in proportion to the binary value stored in its
   column.
2. **Charge-redistribution multiply**. Each column's discharge is multiplied by its 4-bit input
   and held on a column capacitor (phase φ1).
3. **Charge-sharing sum** (`sparse_sum_ctrl`, phase φ3). The capacitors are shorted together and
   settle at their mean.
4. **A/D conversion** of the result (`adc_bank`).

**Sparsity-aware summation.** Plain charge sharing averages over all 256 columns. After ReLU,
50–70 % of the inputs are zero, so the output swing would shrink by that much before the ADC sees
it. Instead, column i joins the sharing only if its input is non-zero (`φ3,i = φ2 · (x_i ≠ 0)`).
The result is the mean over the nnz active columns. The digital side multiplies the mean back by
nnz, which `sparse_sum_ctrl` counts and latches.

**Differential read-out, as modelled here.** Two ADCs serve each dot product. This model reads
that as two rails:
- The sign (MSB) row discharges the negative rail: `dn = 8·b3`.
- The other three rows discharge the positive rail: `dp = 4·b2 + 2·b1 + b0`.
- So `w = dp − dn`, and each rail's mean is converted separately.

`imc_bitline_model` is a behavioural, noise-free model of stages 1–3. Its voltages are integers
in Q8, 256 per unit of `discharge × input`, and the mean is taken with a division. The model does
not try to reproduce the circuit's nonlinearity, mismatch or the effect of the word-line voltage.

**Compute timing:** `start` → 1 cycle precharge → 8 cycles of pulses → φ1 → φ2/φ3 → `done`. That
is 13 cycles in all, after which both rail voltages stay held until the next start.

## ADCs and requantisation

`ss_adc` is a 6-bit single-slope converter. It counts ramp steps of size `adc_step` until the ramp
passes the held input, saturating at 63. A conversion takes 100 cycles, which is 10 MS/s at the
1 GHz clock. The four ADCs form two pairs, and each pair converts the p and n rails of one dot
product. The controller alternates the pairs: dot product m goes to pair m mod 2. The IMC bank
starts vector m+1 while a pair is still converting vector m, so an IMC layer of M outputs takes
about 50·M cycles.

`imc_interface` turns a pair's codes back into a signed integer and requantises it:

```
dot = ((code_p − code_n) · adc_step · nnz) >>> 8      // undo the averaging and the Q8 scale
q4  = min(15,  max(dot, 0) >> sh4)                     // 4-bit input of the next IMC layer
q8  = min(127, max(dot, 0) >> sh8)                     // 8-bit h_t for fc5 / fc6
```

Both IMC layers use ReLU. The shifts and `adc_step` come from the glimpse configuration.

## DM2VM: the diagonal-major digital engine

`dm2vm` runs an N-input, M-output product (N, M ≤ 64) on PEs `col .. col+N−1`. It works in four
steps:

1. **Inputs stay put.** PE k keeps its input `x_k` for the whole pass.
2. **Partial sums move.** Each partial sum moves one PE to the left per cycle, and each PE adds
   its own product `x_k·w` on the way.
3. **A new output starts every cycle.** The sum for output m enters at the right end of the
   window at step m, carrying the bias on the first pass.
4. **It leaves finished.** It comes out at PE `col` N steps later, having picked up every input.

So the matrix streams through in N+M cycles, and outputs leave one per cycle with no idle PEs
between them.

At a given step, PE k holds partial sum `m = s − (N−1−k)`. The weights needed in that step are
therefore a diagonal of W. They are stored as one SRAM row, which is where "diagonal-major"
comes from. With wrap-around, SRAM row `w_row + r`, byte `col + k` holds `W[(r − (N−1−k)) mod M][k]`.
A layer then needs exactly M dense rows, and the step reads row `w_row + (s mod M)`.

**Tiling.** A layer larger than 64×64 is split into passes, each described by a 64-bit pass
descriptor (`dm_pass_t` in `keyram_pkg`). A descriptor can do several things:
- Start from the bias (`first`) or add to the 64-entry accumulator memory (a pass without
  `first`), so a long input vector is split into several passes (fc5, fc6 use two, over h[0..63]
  and h[64..126]).
- Write a slice of outputs at `out_base`, so a long output vector is split into tiles (fc2 in two
  tiles of 32, fc1 in eight tiles of 8).
- Use any PE window `col`, so several small matrices share SRAM rows.

The last pass of an output (`last`) shifts the 25-bit accumulator right by `shift` and applies the
activation:
- none: saturate to 8 bit;
- ReLU;
- hard tanh: clamp to ±64, i.e. 1.0 in Q6.

It then writes the result either to the 8-bit IO buffer or, saturated to 0..15, into IMC bank 0's
input buffer.

**Pass timing:** N+M+3 cycles. Descriptor fetch and bias-row read take 1 cycle, bias latch
1 cycle, N+M streaming cycles, and 1 more for the last write-back.

### Example memory map

The testbench package `tb/keyram_tb_pkg.sv` (`build_map`) builds a full map. All four digital
layers, with their biases, fit into the 96 rows:

| SRAM rows | contents |
|---|---|
| 0–63 | fc2, two tiles of 32 outputs |
| 64–73, 74–83 | fc5 on h[0..63] and on h[64..126] |
| 84–85, 86–87 | fc6, the same two halves |
| 88–95 | fc1, eight tiles of 8 outputs, PE window 2t |
| 88–91 (upper bytes) | biases of fc1, fc5, fc6 and fc2 |

IO buffer addresses in this map:

| addresses | contents |
|---|---|
| 0–1 | `l_t` |
| 2–65 | `x_t` |
| 66–192 | `h_t` |
| 193–202 | class scores |
| 203–204 | `l_{t+1}` |

A glimpse runs 10 passes before the IMC layers and 4 after them.

## Main controller and the glimpse sequence

`main_ctrl` accepts one host command at a time (`cmd_valid` while `cmd_ready`) in six modes:

| mode | address | effect |
|---|---|---|
| `IMC_WRITE` | [11] bank, [10:2] row, [1:0] column group | write 64 bits; bit j goes to column 4j+group |
| `IMC_READ` | same | `rdata` valid with `rvalid` |
| `DM_WRITE` | [9:3] row, [2:0] 64-bit slice | write DM2VM SRAM |
| `SETUP` | 0..15 pass descriptor, 16 glimpse configuration | |
| `NEW_DECISION` | – | clear `h_{t−1}`; set bias inputs (IMC0 word 127, IMC1 word 254) to 1 |
| `GLIMPSE` | – | run one glimpse, pulse `glimpse_done` |

A glimpse runs these steps in order:
1. The DM2VM passes `0..n_pre−1` (fc1, fc2) fill IMC input buffer 0.
2. fc3 writes `g_t` into IMC input buffer 1, words 0..126.
3. fc4 computes `h_t`. Each output goes to the DM2VM IO buffer at `h_base` as an 8-bit value,
   and as a 4-bit value into a staging area of input buffer 0. It cannot go straight to buffer 1,
   since fc4 still reads `h_{t−1}` from there until its last dot product.
4. `h_t` is copied from staging into buffer 1, words 127..253, taking 127 cycles.
5. The remaining passes run fc5 and fc6.

The host feeds `l_{t+1}` back as the next `l_t`.

## Performance

At the default sizes, a glimpse takes 13.1k–13.7k cycles (13.7 µs at 1 GHz). Most of that is the
two IMC layers at about 50 cycles per output each. The chip this design follows reports 18.2 µs
per glimpse and 0.05–0.15 ms per decision, so three glimpses (41 µs here) meet the lower end and eight glimpses (109 µs) the upper end.
The end-to-end testbench checks that no glimpse exceeds 18,200 cycles.

## Where this design departs from, or fills in, the published chip

Taken from the published chip:
- layer sizes and their mapping;
- 512×256 IMC banks and two of them;
- 4-bit IMC operands;
- PWM word lines, charge-redistribution multiply and sparsity-aware charge sharing;
- four 6-bit single-slope ADCs at 10 MS/s, two per dot product;
- 64 8-bit PEs with a 25-bit accumulator;
- the 6 kB (96×512) weight SRAM;
- N+M streaming cycles per product;
- a 1 GHz controller with six modes;
- 128- and 256-word 4-bit input buffers.

Chosen here:
- the command set and address map;
- the pass descriptor and glimpse configuration formats;
- how biases are realised (a constant-1 input on the IMC banks, a stored bias on the digital
  side);
- the differential split of the weight into sign and magnitude rails;
- the ping-pong use of the ADC pairs;
- all requantisation shifts;
- hard tanh at ±64;
- the h_t staging copy;
- one host command port for everything. The published chip gives each IMC bank's 64-bit
  read/write buffer its own pins, and lets the digital engine's controller write the 4-bit
  input buffers; here `main_ctrl` does both;
- the wrapped diagonal storage and the 3 extra cycles per pass.

Not built:
- MFCC feature extraction, which happens before the chip;
- the softmax of fc5, which is left to the host;
- the pads;
- any model of the analog non-idealities and of the word-line voltage knob that the chip uses to
  trade energy for accuracy.

`imc_bitline_model` and `ss_adc` are behavioural models: they simulate, but are not meant for
synthesis as logic.

Synthesis notes:
- `imc_block` leaves the unused `busy`/`phi2` outputs of its sub-blocks unconnected.
- `keyram_top` leaves a few status outputs (bank and ADC busy, the full-width dot product) unused.

## Files and simulation

- `rtl/keyram_pkg.sv` holds the shared sizes and types. There is one module per file in `rtl/`,
  and `keyram_top` is the top.
- `tb/tb_<module>.sv` is a self-checking testbench for each module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/keyram_tb_pkg.sv` holds the reference arithmetic and the example memory map.
- `tb/tb_keyram_top.sv` runs the chip at its default sizes:
  1. loads random weights through the command port;
  2. reads some IMC words back;
  3. runs two decisions of 3 and 8 glimpses, feeding each `l_{t+1}` back;
  4. compares every `h_t`, class score and location with an integer model of the same
     arithmetic.

  It also counts the mechanisms it exercised: sparse inputs, ReLU zeros, hard-tanh clamps, ADC
  full-scale clipping (the second decision uses a finer ADC step), 4-bit saturation,
  recurrence, state clear and both ADC pairs.

With Verilator 5:

```
verilator --binary --timing --assert rtl/keyram_pkg.sv tb/keyram_tb_pkg.sv tb/tb_keyram_top.sv \
          -y rtl -y tb --top-module tb_keyram_top -Wno-fatal
./obj_dir/Vtb_keyram_top +verilator+rand+reset+2
```

Replace `tb_keyram_top` with any other testbench to run it. The full-size top test takes about
15 s to build and run.
