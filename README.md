# DA LMS adaptive filter (16-bit, multiplier-less)

An LMS adaptive FIR filter adjusts its coefficients every sample so that its
output y(k) follows a desired signal d(k), driven by the error
e(k) = d(k) - y(k). A direct implementation needs N multipliers for the
filter and N more for the update. This design needs none: it uses
distributed arithmetic (DA) and runs the LMS update on a table of partial
products instead of on the coefficients. The whole filter then consists of
shift registers, a RAM, one add/subtract accumulator, one adder and a bank of
fixed shifts.

Default size: 16 taps, 16-bit input samples, 16-bit d(k) and y(k), and a
2^16 x 24-bit partial-product RAM.

## The idea: filtering and adapting through a table of partial products

Let the input samples be B-bit two's-complement fractions with bits
b_0 (sign) ... b_{B-1} (LSB), so that

    s = -b_0 + sum_{j=1..B-1} 2^-j b_j,   F = [-2^0, 2^-1, ..., 2^-(B-1)].

Take bit j of each of the N samples in the delay line, s(k) ... s(k-N+1).
Together they form an N-bit address A_j. The RAM holds, at every address a,
the partial product P[a] = sum of the coefficients w_m whose bit m is set in
a. The filter output then becomes a sum of B RAM words:

    y(k) = sum_j F_j * P[A_j] = -P[A_0] + sum_{j=1..B-1} 2^-j P[A_j].

The coefficients are never stored. The LMS update W(k+1) = W(k) + 2 mu e S(k)
is carried into the table. For white input, the expectation
E[A^T A F] = N/2 F replaces the exact term, and the update becomes

    P[A_j] <- P[A_j] + c * e(k) * F_j      for j = 0 ... B-1,

with one constant c. When c is a power of two, c * e * F_j is a fixed shift of
e (negated for j = 0), so no multiplier is needed. Only the B words addressed
by the current sample change. An address that occurs twice among the B slices
of one sample is updated twice, one after the other.

## Datapath

```
 s_k ─► PISO ─► SISO_1 ─► SISO_2 ─► ... ─► SISO_N     (bit-serial, LSB first)
          │        │         │                │
          └─ filter address: PISO, SISO_1 .. SISO_N-1
                   └─────────┴── update address: SISO_1 .. SISO_N
                         │
                         ▼
                 ┌──── RAM 2^N x PW ─────┐ rd_wr
                 │ rdata          wdata  │
                 ▼                  ▲    │
   ADD/SUB (s_a) ◄─ ACC·2^-1        │
        │                           │
       ACC ──► y buffer (lr) ──►(−)─┼── e(k) ──► shift bank c·e·F_j ──► (+) ──┘
        │                      (+)  │                                  ▲
        │          d buffer (lr) ───┘                         RAM word ┘
        └──► output buffer (lbuff_op) ──► y_k, e_k
```

* **Delay line** (`piso`, `siso`). The PISO takes a new sample on `lr`. N
  SISOs follow it in one serial chain. Every register shifts towards its LSB
  and presents its LSB on its output.
* **Two address groups.** During the filtering pass the chain shifts. The
  PISO and SISO_1..SISO_N-1 then present bit j of s(k)..s(k-N+1), so the RAM
  sees A_{B-1} first and A_0 last. After B shifts every sample has moved one
  register down, and SISO_1..SISO_N hold s(k)..s(k-N+1). During the update
  pass `re_turn` makes the SISOs recirculate (LSB back into MSB). That group
  presents the same B addresses again and ends where it started. The PISO
  stays still during the update, since it already holds the next sample.
  This is why there are N SISOs behind the PISO and not N-1.
* **Shift-accumulator** (`scaling_acc`). Each cycle ACC <- ACC/2 + P, or
  ACC/2 - P on the sign slice (`s_a`). The RAM word enters shifted left by
  B-1 bits, so the halving is exact and y(k) carries no rounding error.
* **Error and update** (`error_sub`, `pp_update`). e(k) is the full-precision
  difference between the buffered d(k) and y(k). The bank holds all B shifts
  of e. Slice j's entry is added to the RAM word read in the same cycle, the
  sum is saturated to PW bits, and it is written back. The RAM reads
  asynchronously, so one word is read, updated and written in one cycle, and
  a repeated address sees its own earlier update.
* **Buffers** (`load_buffer`). One for y(k) and one for d(k), both loaded by
  `lr`, feed the subtractor. The output buffer, loaded by `lbuff_op`, holds
  y(k), taken from ACC, for a D/A converter. It also holds e(k) for
  observation.

## Sample schedule

`control_unit` runs one sequence of 2B + 2 cycles per sample (34 cycles at
B = 16):

| phase  | cycles | strobes                                                  |
|--------|--------|----------------------------------------------------------|
| FILTER | B      | shift, lacc; `sc` on the first cycle; `s_a` on the last  |
| LATCH  | 1      | `lr`: y(k) and d(k) into their buffers, s(k+1) into PISO |
| OUTPUT | 1      | `lbuff_op` (y_k, e_k updated), `clacc`                   |
| UPDATE | B      | shift + `re_turn`, `rd_wr`: B read-modify-writes         |

After reset, the RAM is cleared in a sweep of 2^N write cycles. This gives
all coefficients the start value zero, which takes 65,536 cycles at the
default size. Then `sc` requests s(0), `lr` loads it B cycles later, and
`ready` rises.

Immediate assertions in `control_unit` guard the schedule. The RAM is never
written while ACC accumulates. No sample is loaded while the delay line
shifts. Every update write happens in recirculating mode.

## Interface

| port      | dir | width | meaning                                                    |
|-----------|-----|-------|------------------------------------------------------------|
| `clk`     | in  | 1     | system clock                                               |
| `rst_n`   | in  | 1     | asynchronous reset, active low                             |
| `s_k`     | in  | B     | input sample, signed fraction                              |
| `d_k`     | in  | DW    | desired response, signed fraction                          |
| `sc`      | out | 1     | start-of-conversion request, one pulse per sample          |
| `y_k`     | out | DW    | filter output, rounded down and saturated                  |
| `e_k`     | out | DW    | error of the same sample, rounded down and saturated       |
| `y_valid` | out | 1     | one-cycle pulse: y_k/e_k just changed                      |
| `ready`   | out | 1     | RAM clearing done                                          |

**Sample hand-off.** A single strobe `lr` captures both the next input and
the desired value. At that moment the filter has just produced y(k), so it
needs d(k), while the PISO is free for s(k+1). The converter therefore
answers the n-th `sc` pulse with s(n) on `s_k` and d(n-1) on `d_k`. Both must
be stable B cycles later, at `lr`, and held until the next `sc`. The first
`sc` after clearing loads s(0) only, and its `d_k` is not used.
`y_valid` pulses two cycles after `lr`.

## Parameters and number formats

| parameter  | default | meaning                                                      |
|------------|---------|--------------------------------------------------------------|
| `N`        | 16      | taps; the RAM has 2^N words                                  |
| `B`        | 16      | input word length; bit slices per sample                     |
| `DW`       | 16      | width of d(k), y_k, e_k (DW-1 fraction bits)                 |
| `PW`       | 24      | partial-product width                                        |
| `PFRAC`    | 20      | fraction bits of partial products, y and e (≥ DW-1)          |
| `MU_SHIFT` | 1       | update constant c = 2^-MU_SHIFT                              |

N = 16, B = 16 and the 16-bit data width are the source configuration.
PW and PFRAC are this design's choices. They give 4 integer bits of headroom
and 5 fraction bits below the 16-bit output.

**Step constant.** The derivation sets c = 0.5·mu·N and asks for a power of
two. With mu = 0.5 and N = 16 that would be c = 4. Here c = 4 makes the
correction of each sample overshoot: one update changes y for the same input
by about 1.33·c·e. The default is therefore c = 1/2, equal to the stated
convergence factor of 0.5. Choose the constant through `MU_SHIFT`.

## How well it adapts

* With 4 taps and 8-bit samples (16 partial products), the system
  identification test in `tb_da_lms_filter` converges. The mean square error
  falls from 3.6e-2 over the first 50 samples to 7e-5 over the last 50 of 400.
* With 8 taps and 8-bit samples (256 partial products), `tb_da_lms_ale` runs
  the filter as an adaptive line enhancer on a tone in white noise. The filter
  input is the noisy signal delayed by one sample, and the desired response
  is the noisy signal itself. Over 1000 samples the MSE falls from about
  0.098 (first 100) to 0.041 (last 100). The output carries slightly less
  noise around the tone than the input does.
* At the default 16 taps, each sample updates only 16 of the 65,536 words.
  Random input seldom comes back to an address, so 1000 iterations teach the
  table little: in `tb_da_lms_full` the MSE stays about 0.25. The
  expectation-based update trades convergence speed for the absence of
  multipliers, and the cost grows with the table size. Expect slow adaptation
  from large N with broadband input.
* Partial products saturate rather than wrap. The outputs y_k and e_k are
  rounded down and saturated to DW bits. Internally e keeps full precision.

## Departures from the source architecture, and open points

* The architecture drawing labels the shift-enable line `clk`. Here it is an
  enable (`shift`) on a single system clock.
* `re_turn` appears in the source only as a control-unit output. Here it is
  the SISO recirculate select that produces the second pass of addresses.
* The shift bank is built as fixed wiring shifts with a multiplexer, not as
  clocked shift registers. The cycle schedule, the clearing sweep,
  saturation, the formats and the asynchronous-read RAM are this design's.
* The A/D and D/A converters are not modelled. Their signals are the ports
  `sc`, `s_k`, `y_k` and `y_valid`.
* A 2^16-word asynchronous-read RAM maps to distributed memory or registers,
  not to FPGA block RAM. A block-RAM version needs a registered read and one
  more pipeline stage in both passes.

## Files

`rtl/`: `da_lms_pkg` (control-strobe struct, state type), `piso`, `siso`,
`pp_ram`, `scaling_acc`, `load_buffer`, `error_sub`, `pp_update`,
`control_unit`, and the top `da_lms_filter`.

`tb/`: one self-checking testbench per module (`tb_<module>`).
`tb_da_lms_full` runs the top at its default size for 1000 iterations.
`tb_da_lms_ale` is the noisy-tone (line enhancer) run.
`da_lms_model_pkg` is the bit-exact reference model that the three top-level
tests use. Every testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/da_lms_pkg.sv tb/da_lms_model_pkg.sv tb/tb_da_lms_filter.sv \
  --top-module tb_da_lms_filter
./obj_dir/Vtb_da_lms_filter
```

Replace `tb_da_lms_filter` with any other testbench name. Module testbenches
that do not use the model need only `rtl/da_lms_pkg.sv` and their own file.
Verilator finds the remaining modules through `-Irtl`. The full-size run
takes a few seconds.
