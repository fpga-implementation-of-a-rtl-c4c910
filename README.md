# Parallel (frame-based) direct digital synthesizer

A direct digital synthesizer (DDS) makes a sine wave by adding a tuning
word `k` to a phase register every clock and looking the phase up in a
table holding one period of the wave. It gives one sample per clock, so
the highest sample rate is the clock rate.

Wide-band receivers built around time-interleaved ADCs process their
data as *frames*: several consecutive samples per clock on parallel
datapaths. This design gives such a datapath its sine or cosine carrier.
Each clock it produces `LANES` consecutive samples (4 by default). The
stream is sample for sample the one a classic DDS would give running
`LANES` times faster. The clock does not have to rise for a higher sample
rate or output frequency.

    output frequency   F = k * LANES * f_clk / 2^PHASE_W
    sample rate            LANES * f_clk

For example, the 4-lane design clocked at 385 MHz gives 1.54 GS/s. It can
produce tones up to 770 MHz (k = 512).

## Structure

```
            +-----------------+      +---------------------------+      +-----------+
 k_i ---+-->| phase generator |--Ph>| frame address generator   |--A0->| LUT lane 0|--> sample_o[0]
        |   |  Ph <= Ph + k   |      |  A_i = LANES*Ph + i*k     |--A1->| LUT lane 1|--> sample_o[1]
        |   +-----------------+      |  (1 multiplier,           |--A2->| LUT lane 2|--> sample_o[2]
        +--------------------------->|   LANES-1 adders)         |--A3->| LUT lane 3|--> sample_o[3]
                                     +---------------------------+      +-----------+
```

* **`phase_generator`**: a `PHASE_W`-bit accumulator, `Ph <= Ph + k` mod
  2^PHASE_W. It also brings out its carry as `wrap_o`.
* **`frame_address_generator`** (FAG): computes the table address of
  every lane of the frame, then registers them.
* **`sine_lut`**: one table per lane. All the tables hold the same data.
  One table cannot be read at `LANES` addresses in one clock, so each lane
  has its own copy. Each table is a ROM with a registered read, the shape
  of an FPGA block RAM.
* **`parallel_dds`**: the top. It wires the three together.
* **`dds_pkg`**: the default sizes, the `wave_e` type (`WAVE_SINE` or
  `WAVE_COSINE`) and the formula for the table contents.

## The frame address arithmetic

Each clock the accumulator adds `k` once, but the frame moves on by
`LANES` samples. If `Ph(n)` is the sum of the tuning words of clocks
0..n-1, sample `i` of frame `n` is sample `m = LANES*n + i` of the
equivalent serial DDS. When `k` is constant its phase is `m*k`, that is

    A_i = LANES * Ph + i * k        (mod 2^PHASE_W)

The FAG computes this with one multiplier shared by all lanes, whose gain
is the parallelism `LANES`, and one adder per lane for the offsets
0, k, 2k, 3k. Lane 0 needs no adder.

Where this departs from the architecture it follows: that architecture
writes the lane addresses as `Ph*k + i*k` and labels the multiplier `k`.
Its phase generator is also an accumulator of `k`. Taken together, those
would make the phase grow as `n*k^2`, and the output would not match a
classic DDS, which the architecture is meant to reproduce. This design
keeps the accumulator of `k` and the offsets `i*k`, and makes the
multiplier gain `LANES`. With `LANES` a power of two, that multiplier is
only wiring.

**Changing k on the fly.** The offsets `i*k` are formed from the same
`k_i` that the accumulator adds in that clock. So the frame built in clock
`n` ends exactly where frame `n+1` starts, and a new tuning word changes
the frequency without a jump in phase. The result is the serial DDS with
`k` changed at a frame boundary.

All arithmetic is `PHASE_W` bits wide and wraps. The full phase addresses
the table, so no phase bits are dropped. For `LANES = 4`, the two low
address bits of lane 0 are always zero (the address is 4*Ph). Synthesis
reports them as constant.

## Timing

* `rst_i` is synchronous and active high. It clears the phase to zero.
* `k_i` is sampled at every rising edge.
* Latency is two clocks: one for the FAG address register and one for
  the table read. The frame built from the `k_i` sampled at edge `n` is on
  `sample_o` after edge `n+1`. The first valid frame (phase 0) is there
  after the second rising edge with `rst_i` low.
* Output order: `sample_o[0]` is the oldest sample of the frame and
  `sample_o[LANES-1]` the newest. Send lanes 0..LANES-1 out in that order
  to get the serial stream.
* Before the first valid frame, `sample_o` holds whatever the pipeline
  registers power up with. Nothing flags this, so count two clocks after
  reset.
* `wrap_o` is the carry of the accumulator adder in the current clock.
  It is held low during reset.

## Wave table

Entry `n` of a 2^PHASE_W-entry table is

    round((2^(AMP_W-1) - 1) * sin(2*pi*n / 2^PHASE_W))

It is a signed two's-complement value, so with the defaults it runs from
-511 to +511. With `WAVE = WAVE_COSINE` the table holds `cos` instead.
The table is computed at elaboration by a constant function in
`sine_lut`, so there is no data file. Synthesis tools infer a ROM with
initial contents from it (4 x 1024 x 10 = 40960 bits at the defaults).

## Parameters (of `parallel_dds`)

| parameter | default | meaning |
|-----------|---------|---------|
| `LANES`   | 4       | samples per clock (the parallelism) |
| `PHASE_W` | 10      | phase, tuning-word and table-address width: 2^10 samples per period |
| `AMP_W`   | 10      | sample width |
| `WAVE`    | `WAVE_SINE` | table contents, sine or cosine |

The 4 lanes, the 10-bit path and the 2^10 x 10-bit table follow the
architecture this design implements. So do its block structure: the
accumulator, an address generator made of one multiplier and adders, and
one table per lane.

These are this design's own choices:

* the synchronous reset;
* the `wrap_o` output;
* the FAG address register and the two-clock latency;
* the sample format and rounding;
* the lane order;
* the multiplier gain `LANES`.

The original has 51 I/O: the clock, a 10-bit `k` and four 10-bit samples.
This one adds `rst_i` and `wrap_o`.

The original makes sine and/or cosine. Here one instance makes one wave,
chosen by `WAVE`. For a quadrature pair, use two instances with the same
`k_i` and reset.

Timing closure (385 MHz on the original's device), area and power have
not been checked for this RTL.

## Verification

Each testbench checks the design against values it works out on its own
and ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_phase_generator` | phase and wrap flag each clock against an integer model; reset at the start and mid-run |
| `tb_frame_address_generator` | every lane address for random and corner (Ph, k), with 4 and 3 lanes |
| `tb_sine_lut` | every word of a sine and a cosine table against real-arithmetic values, and the quarter-period points |
| `tb_parallel_dds` | the top at its defaults against a serial DDS model, frame by frame, with a two-clock latency (6000 clocks) |
| `tb_parallel_dds_variants` | 2, 3 and 8 lanes, and 4 lanes with a cosine table, against the same kind of model |

In `tb_parallel_dds`, the tuning word runs through constant stretches
with many accumulator wraps, k = 0, k = 511, k = 512 (Nyquist) and random
changes. A reset comes in mid-run. The test counts each of those events
and fails if one never happens. It also checks that one frame leaves
every clock. It counts zero crossings to check `F = 4*k*f_clk/1024`.
`dds_lane_checker` is a helper module for the variants testbench.

To simulate with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_parallel_dds rtl/dds_pkg.sv tb/tb_parallel_dds.sv
./obj_dir/Vtb_parallel_dds
```

Swap in another testbench name for the others. To lint a module on its
own:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/dds_pkg.sv rtl/parallel_dds.sv
```

The only lint messages are about unused package constants. Each module
uses only some of the package's default sizes.
