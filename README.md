# COMPAC: a time-domain, pooling-aware CNN convolution engine

COMPAC computes the convolution layers of a CNN with multiply-accumulates done in
the *time domain*. An 8-bit activation is not sent to a multiplier; it is sent as
a pulse whose width is the activation value. Each MAC unit is a delay line that
advances one unit per clock while "pulse AND weight bit" is high. Whenever the
line has moved a full length, an up/down counter counts once. The weight is
applied one magnitude bit at a time, MSB first. Between two bits the accumulated
value is doubled: the counter shifts left, and the part of a length still held
in the delay line (the *time residue*) is rescaled by a small lookup table.

Three ideas keep this cheap:

* **Compressed time-domain (CTD) encoding.** Four activations are sent at once.
  The next four start as soon as the widest has ended, instead of after the
  full-scale pulse width. All-zero sets cost almost nothing.
* **Pooling-aware convolution (PAC).** The four MACs of a 2x2 max-pooling window
  are computed side by side. At fixed points during the computation, a MAC that
  lags the current leader by more than a threshold is switched off. Only the
  maximum survives pooling, so a switched-off MAC is not needed.
* **Data reuse.** Each activation is read from SRAM once per phase and broadcast
  into every window that uses it. The sign plane of the weights is loaded once
  per job. Partial sums never leave the counters.

The RLC decoder is included. The published chip did not have one; it was only
evaluated in simulation.

## Value representation in one MAC

A MAC holds `value = 32*C + r`:

* `C` is the signed 24-bit counter, `compac_mac_engine.count`.
* `r` is the time residue held by the 16-unit delay line (MDL), `|r| < 32`.

The MDL is modelled as a 16-bit twisted-ring (Johnson) register
(`compac_mdl`):

* One forward step shifts the register up and feeds the inverted top bit back
  in. A backward step does the reverse.
* A full length is 32 steps: 16 to turn all ones into all zeros, then 16 to
  return.
* Bit 0 is node A (unit 1), bit 7 is node M (unit 8), bit 15 is node E (unit 16).
* The all-ones state means "zero residue".

The sign of the residue is tracked by a phase flag, `pos` (START_POS /
START_NEG):

* Forward, a 0→1 edge reaching E increments `C` if the residue is positive. If
  it is negative, the edge only flips the phase.
* Backward, a 0→1 edge reaching A decrements `C` if the residue is negative.
  Otherwise it only flips the phase.
* Leaving the zero state sets the phase from the direction of the step.

With these rules, pure accumulation is exact.

### Doubling: counter shift plus time residue scaling

Before every weight bit except the first of a phase, the engine doubles the
value. This takes two cycles:

1. `OP_SHL1` doubles `C`.
2. `OP_TRS` looks up `{pos, A, M, E}` in `compac_trs_lut`. It forces the MDL to a
   new state and may add ±1 to `C`.

The table drives the line to a quarter-point state. It does not double the
residue exactly:

| residue r (positive) | new r | carry |   | residue (negative) | new r | carry |
|---|---|---|---|---|---|---|
| 1..7   | 8  | 0 |  | -1..-8   | -8  | 0  |
| 8..15  | 24 | 0 |  | -9..-15  | -24 | 0  |
| 16     | 0  | +1 |  | -16     | 0   | -1 |
| 17..23 | 8  | +1 |  | -17..-24 | -8  | -1 |
| 24..31 | 15 | +1 |  | -25..-31 | -15 | -1 |

The "16 → 15" row comes from the table's "all zeros except unit 16" pattern. The
testbenches' value model (`tb/compac_model.svh`) encodes exactly this table. The
end-to-end comparison is therefore bit-exact, not approximate.

## Input encoding (pulse generator, selectors, CTD controller)

* `compac_pulse_gen` makes 16 PWM lines. `pwm[k]` is high for the first `k`
  cycles after `run` rises.
* A `compac_pulse_sel` per stream picks `pwm[x]` for the stream's current 4-bit
  nibble.
* `compac_ctd_ctrl` ORs the four selected pulses. One input set runs
  PULSE → STOP → HALT → APPLY:
  * PULSE lasts until the OR is seen low, which is max(x)+1 cycles.
  * STOP and HALT take one cycle each.
  * APPLY shifts the next taps into the activation registers and the weight
    registers.

  A set therefore takes `max(X1..X4) + 4` cycles, and an all-zero set takes 4.
  One CTD run is the 288 taps of a window.

One clock period stands for t0, half an input-clock period. Activations are
encoded as two 4-bit phases: X[7:4], then X[3:0].

## Phases, alignment and PAC

Each job walks through a fixed schedule of *(nibble, weight-bit range)* phases
(`compac_pkg::phase_of`):

| PAC mode | phases |
|---|---|
| off, mode 2 | (X[7:4], w6..w0), (X[3:0], w6..w0) |
| mode 1 | (X[7:4], w6..w4), (X[3:0], w6..w4), (X[7:4], w3..w0), (X[3:0], w3..w0) |

Two consecutive phases do not continue at the same significance. Before each
new phase, the value is aligned by the difference in weight between the last
product of the previous phase and the first product of the new one. The weight
of a product is (4 for the high nibble) + bit.

| PAC mode | alignment before each new phase |
|---|---|
| mode 2 / off | one arithmetic right shift by 2 |
| mode 1 | +2 doublings, a right shift by 3, +1 doubling |

A right shift clears the residue. The alignment rule is this design's own.
Because of the shifts, the low-nibble contributions are truncated. The result is
a scaled MAC:

* mode 2 / off: about MAC/32 after the shift, in units of one MDL length.
* mode 1: a different but fixed scaling.

Between phases, if PAC is on, the filter's three comparators run a two-cycle PAC
evaluation (`compac_pac_pool`):

1. The first cycle finds the maximum of the active MACs.
2. The second cycle switches off every other MAC `i` with
   `(max >>> k) > (mac_i >>> k)`.

The thresholds are powers of two. The configuration holds `thr0..thr2` as log2
of the threshold in MAC units, one per PAC phase. The shift used is
`k = thr - 5 - weight(last product of the phase)`, clamped at 0. A switched-off
MAC gets no more pulses, doublings or shifts. At the end, the same comparators
give the pooled value: ReLU of the maximum of the still-active MACs.

## Data flow of one job

One job computes, for all 32 filters, the four MACs of one 2x2 pooling window
and then pools them (`compac_ctrl`). The window is 3x3 taps over 32-channel
groups (1 to 15 groups). Its four positions X1..X4 sit at offsets (0,0), (0,S),
(S,0) and (S,S) for stride S.

For every phase, weight bit and channel group:

1. **Activations.** This step runs once per phase, or for every bit when there
   are several groups. The controller reads the `(S+3)^2` pixels covered by the
   four windows, one 256-bit row per pixel. It writes each row, as the phase's
   nibbles, into every stream whose window contains that pixel, in the same
   cycle. `compac_act_regs` holds 4 streams x 288 nibbles, which is the published
   144 x 32-bit register file. A stream rotates once per CTD run, so after 288
   taps it is back in place for the next weight bit.
2. **Signs.** Each filter holds the sign plane (weight bit 7) in nine 32-bit
   cyclic registers. With one group it is loaded once per job.
3. **Weight bit plane.** For each filter, nine 32-bit words are loaded into
   shift registers.
4. **CTD run** of 288 sets. In every filter, each MDL steps while
   `pwm_x[i] & weight_bit & active[i]`. The sign selects the direction.
5. After the last group of a bit: a doubling, an alignment plus PAC, or pooling.

At the end, the 32 pooled values are written to the output region and sent on
the output bus.

Reads take two cycles: issue, then capture. A job with PAC off, stride 1 and
one group takes about 68k cycles in simulation. Most of that time is the 14 CTD
runs of 288 sets each.

### Global buffer

`compac_global_buffer` is 11 banks (`compac_sram_bank`) of 8, 8, 8, 8, 8, 8, 8,
4, 4, 2 and 1 KB, in rows of 256 bits. The configured layer gives each bank to
the activation, weight or output region:

| layer | activations | weights | outputs |
|---|---|---|---|
| 1 | 44 KB | 18 KB | 5 KB |
| 2 | 12 KB | 50 KB | 5 KB |
| 3 | 16 KB | 50 KB | 1 KB |
| 4, 5 | 12 KB | 54 KB | 1 KB |

A region's banks are concatenated in ascending order and addressed by 32-bit
word. An address beyond the region raises `oob`, and the access is dropped.

Memory layouts, in words:

* Activation pixel (y,x) of group g is row `(g*tile_h + y)*tile_w + x`.
  Channel c is byte `c%4` of word `c/4`.
* Weight plane (filter f, group g, bit b, with b = 7 being the sign) is words
  `((g*32 + f)*8 + b)*9 + t`. Word t is tap position `ky*3+kx`, and bit c is
  channel c.
* Output word f is `{8'b0, pooled[23:0]}`.

## Host interface (`compac_top`)

**Configuration.** The configuration is a `cfg_t` word (51 bits: layer, PAC
mode, `thr0..2`, stride, tile width and height, window origin, groups). It is
shifted in MSB first on `scan_in` while `scan_en` is high. The previous word
leaves on `scan_out`.

**Input bus.** The input bus accepts writes only while `busy` is low, with a
`in_valid`/`in_ready` handshake.

* `in_rlc = 0` writes `in_data` raw at `in_addr` of `in_region`.
* `in_rlc = 1` or `2` sends the word to the run-length decoder
  (`compac_rlc_dec`):
  * Mode 1 fields, from bits 31:28 down: level, level, run, level, level, run,
    level, level.
  * Mode 2 fields: level, run, repeated.
  * A run stands for that many zero nibbles.
  * Decoded nibbles are packed eight per word, the first in bits 31:28, and
    written from the address and region given with `in_first`.

  The document uses mode 1 for weights and layer-1 activations, and mode 2 for
  the sparse activations of later layers. Wait for the decoder to drain before
  switching to raw writes.

**Job control.** A `start` pulse runs one job. `busy` stays high until the 32
results have been sent, filter 0 first, with `out_valid`.

## Files

| file | block |
|---|---|
| `rtl/compac_pkg.sv` | sizes, bank allocation, PAC phase schedule, configuration word |
| `rtl/compac_mdl.sv` | 16-unit memory delay line |
| `rtl/compac_trs_lut.sv` | time residue scaling table |
| `rtl/compac_mac_engine.sv` | MDL + residue control + 24-bit counter/shifter |
| `rtl/compac_pulse_gen.sv`, `rtl/compac_pulse_sel.sv` | 16 PWM lines and per-stream selector |
| `rtl/compac_ctd_ctrl.sv` | compressed time-domain controller |
| `rtl/compac_act_regs.sv` | 144 x 32-bit activation registers (4 streams) |
| `rtl/compac_filter.sv` | one filter: weight/sign registers, 4 MAC engines, comparators |
| `rtl/compac_pac_pool.sv` | PAC comparators, max pooling, ReLU |
| `rtl/compac_sram_bank.sv`, `rtl/compac_global_buffer.sv` | 67 KB, 11-bank buffer |
| `rtl/compac_rlc_dec.sv` | RLC mode 1/2 decoder |
| `rtl/compac_scan_cfg.sv` | configuration scan chain |
| `rtl/compac_ctrl.sv` | controller and address generators |
| `rtl/compac_top.sv` | top level |

Every block has a self-checking testbench `tb/tb_<module>.sv`.
`tb/tb_compac_top.sv` runs four full-size jobs against a value-level model of the
whole data flow:

* PAC off, mode 1 and mode 2;
* strides 1, 2 and 3;
* one or two channel groups;
* raw and RLC loads.

It fails if any of these mechanisms never occurs: zero and early-ended CTD sets,
broadcast loads, negative weights, TRS carries, right-shift alignment, PAC
switch-offs, ReLU clamps, both RLC modes and scan read-back. It runs in a few
seconds.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/compac_pkg.sv tb/tb_compac_top.sv \
          --top-module tb_compac_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `top` with any block name for its unit test. Each test prints
`TB_RESULT checks=N failures=M`. Building the top takes about two minutes.

## Departures and limits

* **Window shapes.** Only 3x3 windows over 32-channel groups are sequenced. These
  use the 1x1x32 row slices of layers 2 to 5. Layer 1's 4x2x3 slices with an
  11x11 stride-4 window, and the 5x5 window of the second AlexNet layer, are not
  supported. Every job ends in 2x2 pooling, so unpooled layers cannot be computed
  as such. With its buffer allocation, the fifth AlexNet conv layer (3x3x192)
  fits one job per pooled pixel: six channel groups and 54 KB of weights.
* **Delay line.** The MDL is a synchronous register with one unit per clock.
  The real delay line is an analog/mixed-signal chain of gated delay cells with
  a calibration unit; neither its delays nor its calibration are modelled.
* **Doubling.** Doubling takes two clock cycles.
* **Nibble-phase alignment.** The alignment between nibble phases, with its
  right-shift truncation, is this design's own. So is the PAC shift
  `thr - 5 - weight`. The thresholds printed for AlexNet can be loaded as their
  log2.
* **Counter overflow.** Counter overflow wraps. Its handling is not specified
  for the original.
* **Chip-level parts.** The bus protocol, the RLC nibble packing, the
  configuration word and the buffer layouts are this design's choices. The
  off-chip DRAM/FPGA side, the pads and the MDL calibration are not part of the
  RTL.
