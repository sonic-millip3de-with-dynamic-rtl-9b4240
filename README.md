# Sliding-aperture 3D ultrasound beamformer (Sonic Millip3De style)

Forming a 3D ultrasound image means moving every echo sample of every receive
element to the right place on every scanline and adding them up. Done naively that is
about 10^11 round-trip delay calculations per frame, each with a square root, or a
delay table far too large for a hand-held probe. This RTL implements the digital
beamformer of a 3D-stacked design that avoids both:

* a **sliding 32x32 receive sub-aperture** moves over a 120x88 transducer array in
  steps of 8 elements (12 x 8 = 96 firings per frame), so only 1024 elements receive
  at a time and one channel per **bank** of transducers is enough;
* each of the **1024 channels** streams its stored echo, interpolated 4x, past ten
  **select sub-units** that each follow one scanline and pick the sample nearest each
  focal point using an **iterative piece-wise quadratic delay** (16 coefficients per
  scanline instead of 4096 delays, evaluated with adds and shifts);
* the picked values are weighted by a **zonal apodization** (one weight per depth
  zone, three zones) and summed across all channels by a **1024-stage pipelined
  reduce network**, whose head reads the partial image from memory and whose tail
  writes the updated image back.

The transducers, the analog multiplexers, the ADCs, the through-silicon vias, the
memory-side processor and the DRAM are outside the RTL; their signals are ports of
the top level.

## Block map

```
sm3d_top
 ├─ firing_sequencer        window origin and virtual-source centre per firing
 ├─ bank_select  x1024      which transducer of each bank is inside the window
 └─ beamsum_channel x1024   (channel c, chained c -> c+1)
     ├─ channel_sram        4096 x 12-bit echo store (6 kB)
     ├─ interp_unit         4x linear interpolation, valid/ready stream
     ├─ select_unit         coefficient registers + 10 x select_subunit
     │   └─ select_subunit  delay_iter + apod_zone + sync_fifo queue
     └─ summing_unit        one stage of the reduce network
```

`sm3d_pkg` holds the shared widths, types (`dcoef_t`, `rpkt_t`, ...) and the
saturating adder; `sync_fifo` is a small helper FIFO.

## Sliding sub-aperture and transducer banks

`firing_sequencer` keeps the window origin. `frame_start` puts it at (0,0); each
`fire_next` moves it 8 elements along x, and at the end of a row back to x = 0 and 8
elements down. After 96 firings `fire_active` drops and `frame_done` pulses. The
virtual source is reported as the element at the window centre (origin + 16). The
transmit side itself (the 76-element virtual source pattern and its delays) is not
implemented.

Banking: transducer (x, y) belongs to bank (x mod 32, y mod 32). Any 32x32 window,
wherever it is placed, contains exactly one transducer of every bank, so each bank
needs a single ADC and channel, and channel c serves bank (c mod 32, c div 32).
`bank_select` computes, for the current window, that transducer
(`x = org_x + ((bank_x - org_x) mod 32)`) and its number inside the bank
(`x div 32`, `y div 32`, 2 bits each), which is what the bank's analog multiplexer
needs. This modulo rule is a choice of this implementation; the architecture only
requires that one transducer per bank receives in any window.

## The channel: store, interpolate, select, sum

**Store.** All ADCs sample together: `rx_start` clears a shared write address and each
`adc_valid` writes one 12-bit sample into every channel's `channel_sram`, up to 4096
samples (`rx_full`); further strobes are ignored. The store is a simple dual-port
array with registered read data.

**Interpolate.** `pass_start` starts every channel's `interp_unit`. For each stored
pair x[p], x[p+1] it emits `4x[p]`, `3x[p]+x[p+1]`, `2x[p]+2x[p+1]`, `x[p]+3x[p+1]`:
the linear interpolation in quarter steps, exact in 14 bits, with the sample after
the last taken as 0. The stream index `s_idx = 4p + phase` runs 0..16383. It produces
one value per cycle while `s_ready` is high; the first value comes two cycles after
the start, and the SRAM is read once every four values.

**Select.** The ten sub-units watch the same stream. Each holds the stream index of
its current focal point; when that value passes, it takes it, apodizes it, pushes it
into its 16-entry queue and moves its delay generator on to the next focal point.
Two rules follow from sharing one stream:

* a sub-unit takes at most one focal point per stream value, so the delay
  coefficients must advance the index by at least one sample per focal point (with
  4096 focal points over 16384 interpolated samples the average is four). An
  assertion (`a_no_miss`) fires if a focal point's sample has already gone by;
* if a sub-unit must take the current value but its queue is full, it holds the whole
  stream (`s_ready` low) for all ten.

Focal points whose sample lies beyond the end of the stream are produced as zeros once
the stream has finished (`s_done`), so every enabled sub-unit always delivers exactly
4096 values per pass. `sub_en` disables sub-units that have no scanline in a pass.

**Sum.** See the reduce network below.

## Iterative delay generation (`delay_iter`)

The quantity approximated is the *advance* of the sample index from one focal point
to the next along a scanline. Over each of three sections it is a quadratic in the
step number, evaluated by forward differences. Per scanline and channel the
coefficients are:

| word | meaning |
|------|---------|
| 0 | start offset: 16.16 fixed-point sample position of focal point 0 |
| 1+5s | section s length, in focal points |
| 2+5s | D0: first increment of section s |
| 3+5s | E0: first difference of the increment |
| 4+5s | F: second difference (constant) |
| 5+5s | k: shift; D, E, F are in units of 2^-(16+k) samples |
| 16, 17, 18 | apodization weights of zones 0, 1, 2 (see below) |

Words 0..15 are the 16 delay coefficients (five per section plus the start offset);
that count is part of the architecture, while the meaning given to the five
per-section words is this implementation's. On each step:

```
pos += D >>> k          // unsigned 16.16 position; idx = pos[31:16]
if (last step of a section, not the last section)
    D, E <= next section's D0, E0
else
    D += E;  E += F
```

so the j-th step of section s adds `floor((D0 + j*E0 + F*j*(j-1)/2) / 2^(16+k))`
samples. The per-section shift lets a section with a gently curving delay keep its
small differences at higher precision without wider adders. The index is the
integer part of the position; adding 0.5 to the start offset turns truncation into
rounding to the nearest interpolated sample. The last section runs to the end of the
scanline, whatever its length word says. 32-bit accumulators wrap; coefficient sets
must keep D, E and the position in range. Fitting coefficients to real geometry is
left to software.

## Zonal apodization (`apod_zone`)

The depth along a scanline is divided into three zones by two focal-point boundaries
`zb1`, `zb2` (shared by all channels, inputs of the top): zone 0 is `fp < zb1`, zone 1
`zb1 <= fp < zb2`, zone 2 the rest. Each channel has one weight per zone and scanline,
unsigned Q1.7 (128 = 1.0, up to 1.99). The selected 14-bit sample is multiplied by
the weight, shifted right by 7 (floor) and saturated to 14 bits. Three zones and three
weights per scanline follow the architecture; the boundaries, weight format and
rounding are this implementation's.

## The reduce network

The summing units of the 1024 channels form a chain. A packet `rpkt_t` carries a
scanline number within the pass (4 bits), a focal-point number (13 bits) and a 14-bit
partial sum. Channel c takes a packet when its queue for that scanline is not empty,
adds the queue head with saturation, and passes the packet on through a 2-entry
buffer: one cycle per stage, one packet per cycle, and a ready signal that depends
only on registered state and the queue head, so the 1024-stage chain has no long
combinational path.

The memory side feeds the head (`head_*`) with the current image value of each
(scanline, focal point) and writes back what leaves the tail (`tail_*`), so the image
accumulates over the 96 firings. Rules for the memory side:

* packets of one scanline must enter in focal-point order (the queues carry no tags);
* scanlines may be interleaved in any way; focal-point-major order
  (fp0 of all scanlines, then fp1, ...) is the natural one;
* only enabled scanlines may be sent.

**Queue depth and deadlock.** A channel's ten scanlines are served from one stream,
but the network asks for them in its own order. If, in one channel, one scanline's
focal points come more than `FIFO_D` (16) ahead of another's in stream order, the
leader's queue fills and holds the stream before the laggard reaches the sample the
network is waiting for: the pass deadlocks. The ten scanlines of a pass are meant to
be neighbours, whose delays differ by a few samples; coefficient sets that violate
this need a larger `FIFO_D`. This constraint comes from this implementation's
buffering, not from the architecture.

The sum is 14 bits wide, saturating at every stage, as in the architecture's 14-bit
fixed-point beam sum. With 1024 channels the apodization weights must scale the
channel contributions so that the sum stays in range.

## Operating the top level

Per firing:

1. `fire_next` (or `frame_start` for the first) to set the window; `bank_sel_x/y` are
   then valid for the analog multiplexers.
2. `rx_start`, then 4096 `adc_valid` strobes with `adc_sample[c]` for every channel.
3. For each pass: load coefficients with `cfg_we` (one 32-bit word per cycle;
   `cfg_ch` selects the channel, `cfg_bcast` writes all channels, `cfg_sub` the
   sub-unit, `cfg_idx` the word number of the table above); set `sub_en`, `zb1`,
   `zb2`; pulse `pass_start`; send 4096 packets per enabled scanline into the head
   and collect them at the tail. `busy` drops when every channel has produced all its
   focal points.

Registers reset asynchronously with `rst_n` low; coefficients reset to zero. A pass
takes about max(16384, 4096 x scanlines) cycles plus 1024 cycles of network latency.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `ARR_X`, `ARR_Y` | 120, 88 | array size |
| `SUB`, `STEP` | 32, 8 | window size (channels = SUB^2 = 1024) and step |
| `N_SUB` | 10 | select sub-units (scanlines per pass) |
| `N_SAMP` | 4096 | samples stored per channel and firing |
| `N_FP` | 4096 | focal points per scanline |
| `FIFO_D` | 16 | queue depth per sub-unit (own choice) |
| `ADC_W`, `IS_W`, `SUM_W` | 12, 14, 14 | in `sm3d_pkg` |

All defaults except `FIFO_D` and the internal delay widths are the architecture's
numbers.

## How far to trust it, and where it departs

Follows the architecture: array and window sizes, the 8-element step and 96 firings,
1024 banks and channels, 4096 x 12-bit stores, linear 4x interpolation, ten select
sub-units on ten scanlines, a three-section quadratic delay with 16 coefficients
computed with adds and shifts, three apodization zones with three weights per
scanline, a 14-bit beam sum, and a unidirectional pipelined summing chain whose ends
connect to memory.

Own choices: everything about encodings and handshakes (valid/ready streams,
packet format, configuration bus), the meaning of the five per-section delay
coefficients, the banking rule, the scan order of the window, the queue depth, zero
fill past the end of the store, saturation, and a single clock (the original has a
40 MHz ADC clock and a 1 GHz SRAM clock; here the ADC rate is a strobe).

Known gaps:

* The store holds 4096 samples per firing, which at 40 MHz covers about 7.9 cm of
  round-trip depth, less than the 10 cm image depth the system targets; deeper focal
  points read as zero.
* No transmit logic: only the virtual-source centre is reported.
* No coefficient fitting, no image memory controller, no analog parts.
* Whether a 1 frame/s rate is met depends on the number of scanlines per frame and the
  clock, neither of which is fixed here.

## Verification

Every block has a self-checking testbench in `tb/` whose expected values come from
closed-form reference models in `tb/sm3d_ref_pkg.sv` (interpolation formula, the
closed form of the quadratic delay, apodization with saturation) rather than from the
RTL's own iterations. Each prints `TB_RESULT checks=N failures=M`.

| testbench | covers |
|-----------|--------|
| `tb_channel_sram` | all 4096 words, read latency, hold |
| `tb_interp_unit` | every interpolated value, rate of one per cycle, random stalls |
| `tb_delay_iter` | 20 random coefficient sets x 300 focal points |
| `tb_apod_zone` | zones at and around boundaries, saturation |
| `tb_select_subunit` | stream holds, zero fill, all zones |
| `tb_select_unit` | configuration port, three scanlines, disabled sub-unit |
| `tb_summing_unit` | sums, saturation, order, one packet per cycle |
| `tb_beamsum_channel` | one channel end to end, channel and broadcast addressing |
| `tb_firing_sequencer` | 96 window positions, frame end |
| `tb_bank_select` | all 96 windows x 1024 banks, one transducer per bank |
| `tb_sm3d_top` | 16 channels, 6 firings, image accumulated over a frame |
| `tb_sm3d_large` | all default sizes but an 8x8 window (64 channels): one firing, 9 scanlines x 4096 focal points |

`tb_sm3d_top` counts and requires each mechanism: stream holds, head and tail
back-pressure, zero fill, section switches, all three zones, saturation, a disabled
sub-unit, per-channel and broadcast configuration, ignored ADC strobes and the end of
a frame. Its coefficient sets for the scanlines of a pass are neighbours (start up to
three samples apart, drifting apart by at most about one sample over the
scanline), as the queue-depth rule
requires.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sm3d_pkg.sv tb/sm3d_ref_pkg.sv tb/tb_sm3d_top.sv --top-module tb_sm3d_top
./obj_dir/Vtb_sm3d_top
```

The largest configuration simulated is `tb_sm3d_large`: 64 channels with the default
4096-sample stores, 4096 focal points and ten sub-units. The default top with 1024
channels lints and elaborates, but Verilator turns it into more than a gigabyte of
C++ (each channel's connections to the chained packet arrays get their own code),
which does not compile in reasonable time; no full 1024-channel simulation has been
run.
