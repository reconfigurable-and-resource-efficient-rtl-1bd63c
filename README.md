# Four-channel parallel FFT core for real-time spectrum analysis

A wideband digitiser delivers complex baseband samples faster than any single streaming FFT
can take them. This design handles up to 1.2 GS/s, i.e. four complex 24-bit samples on every
edge of a 300 MHz clock. Four ordinary one-sample-per-clock FFT pipelines run side by side,
and each one works on whole frames.

- **Full rate (1200 MHz analysis bandwidth):** consecutive frames go to the four channels in
  turn. Each channel buffers its frame in a small input FIFO and drains it at one sample per
  clock.
- **Lower rates:** fewer channels are needed. The spare channels compute *overlapping*
  frames, which start 3/4, 1/2 or 1/4 of a frame apart.
- **After the FFT:** every channel turns its results into magnitudes and writes them into a
  per-channel output RAM, indexed by frequency bin.
- **Trace unit:** one shared unit merges the four channels into a display trace
  (max-hold, min-hold, clear-write or average). The trace is kept in one of two store RAMs,
  so the host can read a finished trace while the next one is being built.

Everything is set at run time by a configuration word:

- FFT size: 16 to 32768 points
- number of active channels
- overlap
- window on/off
- trace function and number of averages
- whether the input runs at full rate

## Data path

```
DATA (192 b) ──► frame distributor ──► channel 0..3:
 DATA_VALID        (frames, overlap,      input FIFO block (4 × 8K × 24, dual clock)
                    round robin)            → window (coefficient RAM, 2 multipliers)
                                            → streaming FFT (16..32K points)
                                            → |X| = sqrt(re²+im²)   + delay of bin index/valid
                                            → output RAM (24 b × 32K, one per channel)
                                                        │ CHAN-0..3
                                        trace unit (MAX/MIN/CLR_WR/AVG) ◄┘
                                            ↕ two 32 b × 32K stores (+ 8 b count)
                                          host read port
```

| File | Role |
|------|------|
| `fft_pkg.sv` | widths, sample/beat/config/store types, bit reversal, twiddle arithmetic |
| `parallel_fft_top.sv` | top level: clock mux, distributor, four channels, trace unit |
| `frame_distributor.sv` | cuts the beat stream into frames and hands them to channels |
| `clock_mux.sv` | glitch-free choice of the FIFO write clock (1× or 2× clock) |
| `input_fifo_block.sv`, `async_fifo.sv` | per-channel input buffer built from four dual-clock FIFOs |
| `window_unit.sv` | window coefficient RAM and multipliers |
| `fft_core.sv`, `sdf_stage.sv` | run-time sized streaming FFT |
| `power_calc.sv` | pipelined magnitude (square root of the power) |
| `delay_line.sv` | delays bin index and valid to match the magnitude pipeline |
| `fft_output_ram.sv` | per-channel magnitude RAM with a per-bin "written" toggle |
| `fft_channel.sv` | one channel: FIFO block → window → FFT → magnitude → output RAM |
| `trace_unit.sv` | trace functions and the double-buffered store |
| `sdp_ram.sv` | simple dual-port block RAM (stores, coefficient RAMs) |

### Input format

`data[191:0]` carries four samples per beat:

```
[191:168] IM[n-3]  [167:144] RE[n-3]  [143:120] IM[n-2]  [119:96] RE[n-2]
[95:72]   IM[n-1]  [71:48]   RE[n-1]  [47:24]   IM[n]    [23:0]   RE[n]
```

Sample n-3 is the oldest. In the `beat_t` type the lanes are numbered from the top, so
lane 0 is n-3. `data_valid` marks a beat.

| Analysis bandwidth | `data_valid` |
|--------------------|--------------|
| 1200 MHz | high on every clock |
| 600 MHz | high every 2nd clock |
| 300 MHz | high every 4th clock |
| 150 MHz | high every 8th clock |

The design accepts any pattern up to one beat per clock when `cfg.abw_full` is set, and up
to one beat every two clocks otherwise.

## Frames, channels and overlap

A frame has N = 2^`log2n` samples. Frames start every *hop* samples:

| Overlap | Hop |
|---------|-----|
| 0 % | N |
| 25 % | 3N/4 |
| 50 % | N/2 |
| 75 % | N/4 |

- Frame f goes to channel f mod `nch`. Channels at index `nch` and above stay idle.
- A beat that lies in several overlapping frames is sent to each of their channels.
- If a frame is due on a channel that is still receiving its previous frame, the new frame
  is dropped and `busy_err` is set. This only happens when there are too few channels for
  the chosen overlap.

For each beat a channel must store, its `beat_tgl` line toggles and the beat is held in
`beat_data`. This handover works whether the FIFOs are written on the 300 MHz clock or on
the doubled clock.

Overlap options by analysis bandwidth:

| Analysis bandwidth | Overlap options | Channels needed |
|--------------------|-----------------|-----------------|
| 1200 MHz | 0 % | 4 |
| 600 MHz | 0 %, 50 % | 2 at 0 %, 4 at 50 % |
| 300 MHz and below | 0, 25, 50, 75 % | 1, 2, 2, 4 |

## Input buffering and the doubled write clock

Each channel stores its samples in four 8K × 24-bit FIFOs:

| FIFO | Contents |
|------|----------|
| 0 | real parts of lanes n-2 and n |
| 1 | imaginary parts of lanes n-2 and n |
| 2 | real parts of lanes n-3 and n-1 |
| 3 | imaginary parts of lanes n-3 and n-1 |

Each write stores two complex samples, so a 4-sample beat takes two write cycles.

At full rate a beat arrives on every 300 MHz clock. The FIFOs are therefore written on a
doubled clock (`clk_2x`) rather than built twice as wide. `clock_mux` selects that clock
only when `cfg.abw_full` is set. At lower rates a beat arrives at most every other clock, and
the 300 MHz clock is enough. The mux needs no reset: its enables settle within two edges of
each clock. On an FPGA the vendor's clock buffer with a select input would take its place.

The read side runs at 300 MHz. It starts as soon as the FIFO holding the next sample is not
empty, alternating between the odd and even FIFO pairs, so samples leave in order at one per
clock. Starting early is what keeps the FIFOs small. A channel only has to hold the part of a
frame that arrives faster than it can be read:

- 3/4 of a frame at full rate
- 1/2 of a frame at 600 MHz
- almost nothing at 300 MHz and below

Lost samples set the sticky `fifo_overflow` bit of that channel.

**Capacity limit.** One channel holds 2 × 8192 = 16384 samples. So with the default
`FIFO_DEPTH`:

| Case | Needed | Fits? |
|------|--------|-------|
| 32K points at 1200 MHz | 24576 | no, samples are lost |
| 32K points at 600 MHz | 16384 plus the few samples in flight before the read side reacts | no, overflows by a few samples |
| 16K points at 1200 or 600 MHz | at most 12288 | yes |
| any size at 300 MHz and below | a few samples | yes |

`tb_workloads` demonstrates all of these cases. Running 32K frames at the two highest rates
needs `FIFO_DEPTH` = 16384 (12K would do at 1200 MHz, but the depth must be a power of two).

## The streaming FFT

`fft_core` is a radix-2 decimation-in-frequency pipeline with single-path delay feedback:

- There are 15 stages (`sdf_stage`). The stage delays are 16384, 8192, …, 1 samples.
- For a smaller FFT the leading stages are bypassed. The size can be anything from 16 to
  32768 points.
- Each stage has one butterfly, one complex multiplier and a twiddle ROM.
- Every butterfly halves its result with rounding. The output is therefore X(k)/N, and the
  25-bit datapath (24-bit input plus one guard bit) cannot overflow.

Timing and output order:

- Results come out in bit-reversed order. `out_bin` (FFT_BIN_INDEX) gives the natural bin
  number of each result, and the output RAM is written at that address.
- The pipeline is never flushed. Result p of a frame leaves 2·15 clocks after input sample
  N-1+p has entered, so a frame's spectrum leaves while the next frame enters. Bin 0 comes
  out together with the frame's last sample.
- The first N-1 outputs after reset are suppressed.
- The input may pause at any time; the core only advances on valid samples.

The twiddle ROMs are filled at elaboration by an integer cos/sin routine in `fft_pkg`: a
Taylor series, with each angle split into a coarse and a fine part. No table files are
needed. Each stage keeps a full-length ROM, about 1.2 Mbit per channel. A quarter-wave
table would save most of that.

## Magnitude and output RAM

`power_calc` computes sqrt(re² + im²). Its stages are:

1. two squares
2. their sum
3. a restoring square root that settles one bit per clock

The latency is 28 clocks, and the result is truncated and saturated to 24 bits. Storing the
magnitude instead of the power keeps the output RAM at 24 bits per bin. `delay_line` delays
the bin index and the valid signal by the same 28 clocks, and an assertion in `fft_channel`
checks that they stay aligned.

`fft_output_ram` holds 32K × 24-bit magnitudes. Beside them, a 1-bit RAM keeps a toggle per
bin that flips on every write. The trace unit uses the toggle to tell whether a bin holds a
value it has not yet seen.

## Trace unit and store switching

This is the part with the most design of its own.

**The sweep.** The trace unit does not react to individual FFT results. An address runs over
bins 0 … N-1 continuously, one bin per clock. For each bin it reads, at the same address:

- all four output RAMs, with their toggles
- the active store word
- a "last seen" RAM holding one toggle bit per channel

One clock later it writes the merged store word and the updated "seen" bits back. A channel's
value is *fresh* when its toggle differs from the one last seen. So every FFT frame is folded
in exactly once, whether frames come faster or slower than the sweep. A sweep takes N clocks,
and a channel produces a frame no more often than every N clocks, so no frame can be missed.

**The store word.** Each word is 40 bits: a 32-bit value and an 8-bit count of frames folded
in. Count 0 marks an empty bin. The fresh values of one visit are merged by trace function:

| `cfg.trace` | New value |
|-------------|-----------|
| MAX | the largest of the old value and all fresh values |
| MIN | the smallest of the old value and all fresh values |
| CLR_WR | the fresh value of the highest-numbered fresh channel (the newest frame) |
| AVG | the old value plus all fresh values; adding stops once the count reaches `avg_num` |

For AVG the host divides the sum by the count. The 32-bit value leaves room for 255 sums
of 24-bit magnitudes.

**Switching stores.** There are two stores. One is being filled; the host reads the other
through `host_raddr` → `host_rdata`, which has one clock of latency. A pulse on `host_req`
asks for a switch:

1. At the start of the next sweep the stores swap roles, and `host_ready` goes high. The
   store the host now sees is the trace collected up to the swap.
2. The store that has just become active still holds an old trace. Its words are treated as
   empty during the first sweep after the swap, so clearing it costs no extra time. It starts
   collecting at once.

After reset, the first sweep only records the toggle states and clears the active store.

## Configuration and ports

`cfg` (`fft_cfg_t`) must stay constant between resets. Its fields:

| Field | Meaning |
|-------|---------|
| `log2n` | FFT size, 4 to 15; values outside this range are clamped |
| `nch` | active channels, 1 to 4 |
| `overlap` | 0, 25, 50 or 75 % |
| `win_en` | apply the window |
| `trace` | MAX, MIN, CLR_WR or AVG |
| `avg_num` | number of frames to average |
| `abw_full` | input at full rate: write the FIFOs on `clk_2x` |

Window coefficients are unsigned 18-bit numbers, with 1.0 = 2^17. They are written through
`coef_we`/`coef_addr`/`coef_data`. `coef_ch_mask` selects which channels' RAMs are written.

`rst` is synchronous to `clk` and must be held for at least 8 clocks. The write-clock side
gets its own synchronised copy.

Status outputs:

| Output | Meaning |
|--------|---------|
| `fifo_overflow[3:0]` | a channel lost input samples |
| `busy_err` | a frame was dropped because its channel was still busy |
| `ch_fft_valid` | each channel's FFT output valid |
| `frame_start` | a frame was handed to a channel |
| `sweep_wrap` | the trace sweep passed its last bin |

Parameters of the top:

- `LOG2N` (15): the largest FFT size and the depth of all per-bin RAMs
- `FIFO_DEPTH` (8192): the depth of each input FIFO

## Where this design departs from, or adds to, the architecture it follows

- **Taken from the architecture:**
  - the input format
  - four channels
  - 8K × 24 input FIFOs written two samples at a time, on a doubled clock at full rate
  - one host-loaded coefficient RAM and two multipliers per channel
  - a 16–32K streaming FFT with bin index and valid outputs
  - magnitude by two multipliers, an adder and a square root
  - delay buffers on index and valid
  - 24-bit × 32K output RAMs
  - the four trace functions, with division left to the host
  - two 32-bit × 32K stores switched on a host request
- **This design's own choices:** the FFT's internal architecture and scaling; all fixed-point
  formats; the round-robin frame rule and the busy check; the toggle-based freshness test
  and the continuous sweep; the 8-bit count beside each store value; the CLR_WR tie-break;
  and the status outputs.
- **The ADC, the digital down-converter and the host link are not part of this RTL.** The
  down-converter consists of the mixers with their oscillator, the anti-aliasing filter and
  the decimator. The core starts at the 192-bit DATA/DATA_VALID interface and ends at the
  store read port. The doubled clock comes from outside, from an FPGA clock manager.
- **Capacity:** as explained above, 32K-point frames at 600 MHz and 1200 MHz need deeper
  FIFOs than 8K.
- **Memory:** the core synthesises to about 22.8 Mbit of memory. Most of the excess over a
  lean implementation is the full-length twiddle ROMs.
- **Timing:** no timing analysis for 300 MHz was done.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/fft_pkg.sv tb/tb_parallel_fft_top.sv --top-module tb_parallel_fft_top
./obj_dir/Vtb_parallel_fft_top
```

| Testbench | What it covers |
|-----------|----------------|
| `tb_<module>` | one block each, against independently computed results. `tb_fft_core` compares against a direct DFT at 16, 32 and 64 points with gaps in the input. |
| `tb_parallel_fft_top` | the whole core at 64 points with 64-word FIFOs. Eight scenarios cover every trace mode, every overlap, 1 to 4 channels, both clocking modes, windowing, store switching, FIFO overflow and a busy channel. It counts each of these mechanisms and fails if one never happened. |
| `tb_full_size` | the core with all parameters at their defaults: 32K points, four channels, 75 % overlap at 300 MHz, two tones, max-hold. All 32768 bins are checked. |
| `tb_workloads` | each bandwidth/overlap combination above, at default sizes. It includes the two 32K cases that must report an overflow. |

All simulations finish within seconds to a minute. To change the maximum size or the FIFO
depth, override `LOG2N` or `FIFO_DEPTH` on `parallel_fft_top`. Package widths such as
`DATA_W` and `WIN_W` are in `fft_pkg.sv`.
