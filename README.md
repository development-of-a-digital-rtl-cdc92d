# Digital longitudinal damper: bunch-by-bunch phase feedback

In an electron storage ring, cavity higher-order modes drive coupled-bunch
oscillations of the bunches in the longitudinal plane: each bunch arrives a
little early or late, and that phase error grows from turn to turn. A
bunch-by-bunch damper measures the phase of every bunch on every pass, filters
each bunch's phase history on its own, and sends each bunch back an energy kick
that damps its oscillation.

This RTL is the digital core of such a damper, sized for a ring with 200
bunches 2 ns apart (500 MHz rf, one 8-bit phase sample per bunch, 500 MS/s).
It takes the A/D converter's sample stream and returns, at the same rate and
in the same bunch order, the 8-bit correction stream for the D/A converter
that drives the kicker. In between it:

- splits the stream into eight slower lanes;
- keeps one turn in sixteen;
- runs a 5-tap FIR filter per bunch on 32 parallel processing elements;
- puts the results back in bunch order;
- replays each bunch's latest correction on every turn.

The block structure and the numbers come from a published design for the TLS
storage ring. That design used commercial floating-point DSP boards for the
filtering. Here the boards are fixed-point datapaths, and several details
the source leaves open are this design's own choices (listed below).

## Signal path

```
 A/D samples, 1 per clock            D/A corrections, 1 per clock
 (bunch 0 marked by adc_first)       (bunch 0 marked by dac_first)
        |                                    ^
   s2p_demux  1:8                        p2s_mux  8:1
        |  8 lanes, a word every 8 clocks    |
        +--> fifo_controller (slot, turn, capture, frame check)
        |                                    |
   dsp_module x 8, one per lane -------------+
     in FIFO x4 -> fir_pe x4 -> out FIFO x4 -> reorder_buffer (hold memory)
```

| module            | what it is                                                      |
|-------------------|-----------------------------------------------------------------|
| `damper_pkg`      | shared sizes, coefficient type, default coefficients, mid-scale |
| `s2p_demux`       | serial-to-parallel 1:LANES at the converter output              |
| `fifo_controller` | slot number, turn count modulo 16, down-sampling, turn check    |
| `sync_fifo`       | FIFO memory in front of and behind every processing element     |
| `fir_pe`          | one processing element: per-bunch 5-tap FIR, 8-bit fixed point  |
| `reorder_buffer`  | drains a module's output FIFOs into a per-bunch hold memory      |
| `dsp_module`      | one DSP board: 4 elements with their FIFOs and the hold memory  |
| `p2s_mux`         | parallel-to-serial LANES:1 towards the D/A converter            |
| `damper_top`      | the whole path                                                  |

## Bunches, lanes, slots and elements

This mapping is the key to the rest of the design.

- **Lane.** The demultiplexer gives sample *i* of every 8-sample word to
  lane *i*. Bunch *b* therefore always travels in lane `b % 8`, and each lane
  is one DSP module. The fiducial (`adc_first`, bunch 0) restarts the word
  count, so words always start at a bunch number that is a multiple of 8.
- **Slot.** Within a lane, a bunch's slot is its word number in the turn:
  `slot = b / 8`, from 0 to 24. The 25 bunches of a lane are equally spaced
  around the ring, 16 ns apart.
- **Element.** A module hands slot *s* to processing element `s % 4`, with
  local index `s / 4`. The four elements serve 7, 6, 6 and 6 bunches.
  Every FIFO word carries the local index next to the sample. The result
  comes back with the same index, and the reorder buffer writes it to slot
  `index*4 + element`.

So a bunch's filter state lives in exactly one element:
lane `b % 8`, element `(b/8) % 4`, entry `(b/8) / 4`.

## Down-sampling and hold

Successive turns are 400 ns apart, while the synchrotron oscillation period
is about 1/0.0115 ≈ 87 turns. Filtering every turn would waste most of the
work, so the controller counts turns modulo 16. Only turn 0 of each group
is written into the input FIFOs (`capture`). Each element therefore filters
a sampled sequence in which one sample is 16 turns. At that rate the
oscillation advances 0.184 cycles per sample, well inside the filter's
band.

The output side does not down-sample. For every word of every turn, the
module reads the held correction of that slot, so each bunch is kicked on
every pass. A correction computed on processed turn T is applied from turn
T+1 to turn T+16, until the next processed turn replaces it. After reset,
all hold entries are mid-scale (code 0x80, no kick).

At full size this timing is not tight. The sample of slot *s* is processed
in a few tens of clocks, and that slot is not read again until 200 clocks
later. Each element is busy for 49 of every 3200 clocks.

## The filter element (`fir_pe`)

For each sample x[n] of bunch b:

    y[n] = sum_{k=0..4} c_k * x[n-k]      (history of bunch b only)

- **Number formats.** Samples enter and leave in offset binary, as the
  converters use them (0x80 = zero phase error or zero kick). Inside, they
  are two's complement.
- **Coefficients.** 10-bit signed with 8 fraction bits, so the range is
  ±2.
- **Rounding and clipping.** The sum is kept at full width, shifted right
  by 8 (rounding toward minus infinity) and clipped to −128..127. `sat`
  flags each clipped result.
- **Timing.** The element is sequential, with one multiply-accumulate per
  clock. A sample is accepted when the element is idle. The result is
  registered on the 5th clock edge after that and held until the output
  FIFO takes it. Back to back, the element handles one sample every
  TAPS+2 = 7 clocks.
- **Default coefficients.** Tap 0 (the newest sample) first, the values
  are {−20, 84, 78, −30, −112}/256. They are the minimum-norm 5-tap set
  with H(0) = 0 and H(f₀) = −j, where f₀ = 0.0115 × 16 = 0.184 cycles per
  sample:

      sum_k c_k = 0,   sum_k c_k e^{-j 2π f₀ k} = −j

  This is a band-pass with unity gain and 90° lag at the down-sampled
  synchrotron frequency. It turns a phase oscillation into an energy kick
  in quadrature with it, and it ignores any constant phase offset. The
  loop gain and the phase have to be tuned on the machine. Write new taps
  with `coef_we/coef_addr/coef_data`. All 32 elements share one set.
  Change the set only on turns when no processed samples are in flight,
  for example not on a processed turn or the turn after it.

## Top-level interface and timing (`damper_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | one clock per bunch (500 MHz at full size); asynchronous active-low reset |
| `adc_valid`, `adc_first`, `adc_data[7:0]` | in | phase sample, bunch-0 marker, offset binary |
| `coef_we`, `coef_addr[2:0]`, `coef_data[9:0]` | in | write one filter tap |
| `dac_valid`, `dac_first`, `dac_data[7:0]` | out | correction stream, bunch-0 marker |
| `synced` | out | a fiducial has been seen and the turn length is right |
| `capture` | out | the current word belongs to a processed turn |
| `frame_err` | out | a turn was too short or too long (pulse) |
| `fifo_ovf` | out | a FIFO dropped a word (pulse; never seen at full size) |
| `sat` | out | a correction was clipped (pulse) |
| `upd` | out | a new correction reached a hold memory (pulse, ORed over lanes) |

**Latency.** The correction for bunch *b* leaves on `dac_data` exactly
LANES+1 = 9 clock edges after the edge that took in bunch *b*'s sample.
This delay is fixed, so an external delay line can line the kick up with
the bunch. A sample waits for the rest of its 8-sample word, then takes
one edge for the hold-memory read and one for the multiplexer load, then
waits for its place in the output shift: 7 + 2 edges in all.

**Framing.**

- A turn that is not exactly 25 words long raises `frame_err`.
- An early fiducial restarts the count, and its turn becomes a processed
  turn. Samples of a word cut short by the fiducial are dropped.
- A missing fiducial drops `synced` until the next fiducial arrives.
- Before the first fiducial, nothing is captured, and the output shows
  what slot 0 holds.

## What follows the source and what is this design's own

Taken from the source design:

- 200 bunches at 2 ns spacing and 8-bit converters.
- Demultiplexing into 8 lanes at one eighth of the rate, one DSP board per
  lane.
- Four processing elements per board, 32 in all.
- Down-sampling by 16 before the processing elements.
- 5-tap FIR filters.
- FIFO memories on both sides of the elements.
- A multiplexer that reverses the demultiplexer.

Own choices:

- **Single clock.** Everything runs on the bunch clock, with strobes. The
  original split the path over ECL demultiplexers and 40 MHz DSP chips in
  their own clock domains.
- **Processing elements.** Fixed-point datapaths replace the floating-point
  DSP programs and do the same filtering job. The conversions to and from
  floating point, which the source counts as overhead, are gone.
- **Demultiplexer.** One 1:8 stage replaces the converter's two half-rate
  ports followed by 1:4 serial-to-parallel chips.
- **Down-sampling.** It keeps one whole turn in 16. The source does not say
  how the turns are chosen.
- **Output reordering.** The source only calls it reorganising the data in
  the proper sequence. Here it is a hold memory per lane, reset to zero
  kick and read every turn.
- **Sizes and formats.** The coefficient width and defaults, the offset
  binary/two's complement handling, rounding and clipping, and the FIFO
  depth (8) are all this design's own.
- **Status and checks.** The FIFO handshakes, the index tagging, the frame
  check and the status outputs are this design's own.

Outside this RTL, and not modelled:

- the analog bunch phase detector (3 GHz burst and mixer);
- the A/D and D/A converter chips;
- the 1125 MHz rf chain with its modulator and power amplifier;
- the kicker cavity.

The testbenches drive the digital sample stream directly.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_sync_fifo` | order, full/empty/count, overflow drop, against a queue model |
| `tb_s2p_demux` | word contents, bunch-0 flag, one-clock timing, mid-word fiducial |
| `tb_p2s_mux` | lane order, timing, gaps, reload in mid-word |
| `tb_fifo_controller` | slot/turn/capture on every word, short and long turns, pre-sync words |
| `tb_fir_pe` | results against an integer model, default and random taps, clipping, latency, 7-clock throughput, back-pressure |
| `tb_reorder_buffer` | slot placement, fair draining, read-during-write, reset value |
| `tb_dsp_module` | 192 turns of oscillating bunches; every held correction, clipping and update counts |
| `tb_damper_top` | full size with default parameters, 160 turns; every D/A sample for value, marker and exact clock |
| `tb_damper_proto` | the one-board configuration (below) |

`tb_damper_top` runs the whole design at its default parameters. It makes
each of the following happen and fails if any never does:

- samples before the first fiducial;
- processed turns and held turns;
- a short turn, which must raise exactly one frame error and restart the
  turn count;
- a coefficient reload;
- clipped corrections.

It also checks that no FIFO ever overflows at full rate.

**One-board configuration.** The source also describes a one-board
system: 25 equally spaced bunches at one eighth of the rate. It is
`damper_top #(.LANES(1), .BUNCHES(25))`. With one clock per bunch on a
single lane, element 0 needs 7 × 7 = 49 clocks for its bunches, but a turn
is only 25 clocks. So about three corrections per processed turn reach the
hold memory one turn late. `tb_damper_proto` allows that on the turn right
after a processed turn only, and reports the count.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/damper_pkg.sv tb/tb_damper_top.sv --top-module tb_damper_top -o sim
./obj_dir/sim
```

Use the same command for any other testbench, changing the file and top
names. The full-size run takes about a second.

## Changing it

All sizes are parameters of `damper_top`, with defaults in `damper_pkg`:
`BUNCHES`, `LANES`, `NPE`, `DOWNSAMPLE`, `TAPS`, `W`, `COEF_W` and
`COEF_FRAC`. Keep to these rules:

- `BUNCHES` must be a multiple of `LANES`.
- A lane needs at least two slots.
- The per-element FIFO depth (`dsp_module.FIFO_DEPTH`, 8) must hold the
  bunches one element serves in a turn, `ceil(BUNCHES/LANES/NPE)`.
  Otherwise `fifo_ovf` reports dropped samples.
- If you shrink the lane count or make the filter longer, check the
  element load. It is `(TAPS+2) × ceil(BUNCHES/LANES/NPE)` clocks per
  processed turn, against `BUNCHES` clocks per turn, as the one-board
  configuration shows.

At full size the design synthesises to about 6,500 word-level cells and
14,500 flip-flop bits, plus 5,600 bits of FIFO memory.
