# Singing River: a hand-played pitch shifter in SystemVerilog

Singing River is an instrument with no strings and no keys. A singer (or any
other roughly periodic sound source) goes in at one end. The player moves a
hand through a fan of laser light:

- moving the hand sideways chooses the pitch the sound comes out at;
- moving it up and down sets the volume.

Three cooperating digital subsystems run from one 10 MHz clock with 40 kHz
audio:

| subsystem | module | job |
|---|---|---|
| vision | `vision_subsystem` | finds the hand in a camera image; sends volume to a digital potentiometer and a pitch coordinate to the shifter |
| fundamental frequency estimator (FFE) | `ffe_subsystem` | records 1024 audio samples and finds their fundamental frequency F0 by autocorrelation |
| pitch shifter | `ps_subsystem` | plays the live audio back at rate F1/F0, where F1 is the pitch the hand asks for |
| time-scaling pitch shifter | `solaf_subsystem` | a more elaborate alternative shifter that splices the resampled sound at matching points (SOLAF style) |

`singing_river_top` wires the three together. The time-scaling shifter
sits beside the simple one, listening to the same two links, with its own
converter and SRAM ports. It also includes the external
SRAMs as on-chip arrays. The two serial links between the subsystems are
wired inside the top and also brought out as pins so they can be watched.

```
 camera ──► vision_subsystem ──(16-bit SPI)──► MCP41010 volume pot
 laser  ◄──        │
                   └──(8-bit link: hand coordinate)──┐
                                                     ▼
 mic ─► ADC12441 ─► ffe_subsystem ──(9-bit link: F0)──► ps_subsystem ─► AD558 DAC ─► pot ─► speaker
 mic ─► AD670 ─────────────────────────────────────────►     ▲
                                                      mix switch
```

## Seeing the hand

The camera is mounted turned by 90°. One video line is therefore one
*column* of the picture. A laser line reflected from a hand crosses each
column at most once. Each line can then be handled on its own, as it
streams past, with no need to keep a whole picture in memory.

The laser is switched on and off on alternate frames. The reflection is
whatever changes between two consecutive frames. The rest of the scene stays
the same and cancels. One frame must be stored for this.

**Metapixels.** The video ADC delivers one 8-bit sample per clock, which is
faster than the frame SRAM can take. Each group of five samples is therefore
reduced to one *metapixel*: the sum of the two brightest samples, halved to
fit 8 bits (`vis_sampler`). A frame becomes 330 lines × 100 metapixels =
33,000 bytes. It is stored in a 64K × 8 RAM (in the original hardware, two
HM62256 chips) at address `{line[8:0], index[6:0]}`.

**Per line** (`vis_column_fsm`), for each metapixel:

1. `vis_mem_access` reads the metapixel stored at that place from the
   previous frame.
2. In the next clock it writes the new one there.
3. The column FSM takes the absolute difference of the two and keeps the
   largest along the line and its position.

Both parities work: laser-on minus laser-off and laser-off minus laser-on.
A line is a *hit* if its largest difference exceeds `THRESH` (32). A line
takes 500 sample clocks + 3 clocks, well inside the 64 µs (640 clock) NTSC
line.

**Per frame** (`vis_frame_fsm`):

1. The frame FSM waits for vertical sync and skips 10 blank lines.
2. It starts the column FSM on each of the next 330 horizontal syncs.
3. For each hit it adds the hit's metapixel position and its line number to
   two sums.
4. At the end of the frame two sequential dividers form the means.

The results are scaled to 8 bits:

- volume = mean position × 5/2 (range 0..247);
- pitch coordinate = mean line × 198/256 (range 0..254).

A frame with no hit keeps the previous results and reports `found = 0`.

**Top FSM** (`vision_subsystem`):

- It toggles the laser at the start of each frame.
- It ignores the very first frame, since there is nothing to subtract it
  from yet.
- After each frame with a hit it sends:
  - the 16-bit potentiometer command `0x11, volume` to the MCP41010, which
    sets the audio gain;
  - the 8-bit pitch coordinate to the pitch shifter.

## Finding the fundamental frequency

`ffe_subsystem` alternates between two phases that never overlap.

**Capture.** On each 40 kHz tick the major FSM takes one sample:

1. It has `ffe_adc_fsm` start an ADC12441 conversion: `wr_n` low for 3
   clocks (300 ns).
2. It waits for `int_n`.
3. It drops `rd_n`, which holds the 13-bit result on the bus.
4. `ffe_ram_writer` registers the address and data, lets them settle for a
   clock, then pulses the 6264 write strobe for one clock (100 ns).
5. Only then are `rd_n` and `cs_n` released.

After 1024 samples the FSM switches to analysis.

**Analysis** (`ffe_autocorr`). For lag = 0, 1, 2, … it computes
R(lag) = Σ x[n]·x[n+lag] over the stored samples:

- Each product takes 5 clocks: two SRAM reads, multiply, accumulate.
- `ffe_mac` multiplies two's-complement numbers by their magnitudes. It
  negates the product when the signs differ, and accumulates into 36 bits.

Only three sums are kept: reg0 = R(lag), reg1 = R(lag−1), reg2 = R(lag−2).
From lag 4 on, the first lag where reg1 is larger than both neighbours marks
a peak at lag−1. That lag is the period P in samples.

`ffe_freq_divider` then finds F0 = floor(40000 / P) without a divider. It
multiplies P by i = 1, 2, 3, … until the product passes 40000, and answers
i−1. The result is saturated to 9 bits and sent on the F0 link. Then capture
starts again.

One round takes 256,000 clocks of capture, plus roughly 5·Σ(1024−lag)
clocks of correlation up to the peak. For a 220 Hz voice (P = 181) that is
about 1.1 M clocks, or 0.11 s. The method assumes the pitch changes slowly
compared with that.

Limits of the method:

- A 40 Hz input (P = 1000) leaves only 24 products at the peak lag, so the
  low end of the 40–500 Hz range is weak.
- Strong harmonics can produce an earlier peak than the fundamental.
- If no peak is found by lag 1022, P = 1022 is used.

## Shifting the pitch

`ps_subsystem` is a plain resampling pitch shifter with a double buffer of
2 × 4000 samples in one 8K × 8 6264 SRAM. One half is being recorded from
the AD670. The other, full half is played back to the AD558 DAC. When the
recording half is full, the halves swap, every 0.1 s.

**Playback.** The read pointer (`ps_addr_manager`) is fixed point, with 12
integer bits and 6 fraction bits.

- At every output sample it advances by `rate` = F1/F0.
- When it reaches the end of the 4000-sample half it wraps to the start.
- The output therefore stays exactly as long as the input while its pitch
  moves by F1/F0.
- The wrap makes an audible discontinuity. That is the known price of this
  method.

**Rate** (`ps_rate_converter`):

- F1 comes from a 256-entry ROM indexed by the hand coordinate:
  F1 = 40 + coord·460/255 Hz, covering 40–500 Hz.
- rate = F1·64/F0, computed with a 20-bit sequential divider and saturated
  to 11 bits (5.6 fixed point, at most 31.98).
- Until an F0 has been received, the rate is exactly 1.0.

**Major FSM.** Each 40 kHz tick takes about 70 of its 250 clocks and runs in
order:

1. **Play** (`ps_resampler`): read the sample at the read pointer. With the
   `mix` switch on, it also reads the sample at the recording position of
   the played half ("original") and averages the two. The result is written
   to the DAC.
2. **Record** (`ps_ad_writer`): start an AD670 conversion, wait at least 8
   clocks and then for `status` to fall, read the byte, and write it at
   `{buffer, count}`.
3. **Advance** the count (swapping halves at 4000) and all pointers.

**SRAM address.** The address is 16 bits: three active-low chip enables and
13 address bits. Only the first chip is used. `3'b111` means "bus
released".

## Time-scaling pitch shifter (SOLAF style)

Looping one buffer, as the simple shifter does, clicks at every wrap.
`solaf_subsystem` rebuilds each output buffer instead, so that its pieces
join where the waveforms agree. It is a cut-down synchronous overlap-add
(SOLAF).

**Buffers.** The I/O block (`solaf_io`) records into double buffer S1 and
plays double buffer S3, one sample each per 40 kHz tick. The halves swap
every 4000 samples.

**One round.** After each swap the major FSM turns the S1 half just filled
into the S3 half not playing, in five steps:

1. **Resample** (`solaf_resampler`): S2[j] = S1[floor(j·rate)]. S2 has the
   new pitch, but it is 4000/rate samples long, not 4000.
2. **First search** (`solaf_cross_sign`): find the lag Km, 0 ≤ Km < 400, at
   which the window S2[Km .. Km+299] agrees best with the last 300 samples of
   the S3 half now playing. The comparison uses sign bits only. The score is
   the number of equal signs (XNOR, summed), and the first best lag wins.
   This takes 2 clocks per comparison, about 241,000 clocks per search.
3. **First copy** (`solaf_output_writer`): copy S2 from Km into the new S3
   half, until S2 ends or S3 is full.
4. **Second search**: if S3 is not full yet, search again. The reference is
   now the last 300 samples just written, which gives Km2.
5. **Second copy**: copy S2 from Km2 again and again until S3 holds 4000
   samples.

A round takes about 540,000 of the 1,000,000 clocks between swaps.
`overrun` flags a swap that arrives before the round has finished.

**Shared bus.** All blocks share one bus to three 8K × 13 SRAMs (S1, S2,
S3). The address is 16 bits: active-low chip enables {S3, S2, S1} in bits
15..13. Read data comes one clock after the address, from the chip read
last.

**Pause/unpause.** The I/O block needs the bus for 5 clocks per sample.

1. It starts the conversion first. The converter latches its result, so the
   bus is not needed yet.
2. When the result is ready it raises `bus_req`.
3. The major FSM passes this on as `pause` to whichever minor FSM is
   running.
4. That FSM stops at its next sample boundary, releases the bus and raises
   `paused`.
5. The I/O block is granted the bus and keeps it until it drops the request.
   The minor FSM then carries on.

Limits:

- If the rate exceeds about 13 (S2 shorter than 300 samples), no lag fits,
  Km = 0 and the splice is arbitrary. The 40–500 Hz range keeps the rate at
  12.5 or below.
- The output is a 13-bit word. The DAC for this path is left to the board.

## Serial links

All three serial outputs use one `serial_tx`:

- select low for the whole word;
- data MSB first, changed on the falling clock edge and sampled on the rising
  edge;
- clock at 1 MHz (`HALF` = 5 system clocks);
- a word occupies `HALF·(2·WIDTH+1)` clocks.

`serial_rx` synchronises the three lines, shifts on rising clock edges and
accepts a word when select rises. A word with the wrong bit count is
discarded.

## Top-level ports (`singing_river_top`)

| group | ports |
|---|---|
| control | `clk` (10 MHz), `rst` (synchronous, active high), `enable`, `mix` |
| camera | `cam_data[7:0]` (AD775), `hsync_n`, `vsync_n` (GS4981), `laser_on` |
| volume | `pot_cs_n`, `pot_sck`, `pot_si` (MCP41010) |
| FFE ADC | `fadc_cs_n`, `fadc_wr_n`, `fadc_rd_n`, `fadc_int_n`, `fadc_data[12:0]` (ADC12441) |
| audio ADC/DAC | `ad_cs_n`, `ad_rw_n`, `ad_status`, `ad_data[7:0]` (AD670); `dac_data[7:0]`, `dac_cs_n` (AD558) |
| links | `pitch_sel_n/sclk/sdata`, `f0_sel_n/sclk/sdata` (driven internally, observable) |
| status | `frame_done`, `hand_found`, `volume`, `hand_pitch`, `f0_valid`, `f0_est`, `f0_period`, `ffe_capturing`, `ps_f0`, `ps_coord`, `rate`, `buffer_swap` |
| time-scaling shifter | `s_adc_cs_n`, `s_adc_wr_n`, `s_adc_rd_n`, `s_adc_int_n`, `s_adc_data[12:0]` (its own ADC12441); `s_dac_data[12:0]`, `s_dac_cs_n`; status `s_rate`, `s_len2`, `s_km`, `s_km2`, `s_swap`, `s_proc_done`, `s_overrun` |

Parameters and their defaults:

| parameter | default |
|---|---|
| `LINES` | 330 |
| `BLANK_LINES` | 10 |
| `MP_PER_LINE` | 100 |
| `THRESH` | 32 |
| `FFE_N` | 1024 |
| `BUFFERSIZE` | 4000 |
| `SAMPLE_DIV` | 250 |

## Where this design makes its own choices

The structure follows the original description: the FSM hierarchy, the
metapixel rule, laser differencing, the reg0/reg1/reg2 peak search, the
repeated-addition divider, sign-magnitude multiplication, the double buffer
with a looping read pointer, and the 16-bit enable-plus-address scheme.

These details were not specified and were chosen here:

- **SRAMs.** The asynchronous SRAM chips are modelled as synchronous arrays
  with one clock of read latency. The FSMs keep separate address, strobe and
  latch steps.
- **Metapixel width.** The two-pixel sum is halved to fit 8-bit RAM.
- **Frame differencing.** The absolute difference is used, so either laser
  parity works.
- **Threshold.** 32.
- **Scaling.** Volume and pitch are scaled to 8 bits by ×5/2 and ×198/256.
- **Serial protocol.** Bit order, edges and clock rate, and the potentiometer
  command byte `0x11`.
- **Pitch-shifter ROM.** F1 is linear in the hand coordinate.
- **Mix mode.** It averages, rather than adds, the two samples, so the result
  stays within 8 bits.
- **Autocorrelation schedule.** It is shortened to 5 clocks per product.
- **Rate converter divider.** It is a restoring divider (20 clocks) rather
  than repeated subtraction.
- **Sample pacing.** FFE conversions are paced by the 40 kHz tick.

The analog parts are outside the RTL and appear only as ports: camera, laser,
sync separator, video ADC, audio converters, potentiometer and amplifier.

The time-scaling shifter is built as a working alternative that runs beside
the simple shifter. Its details are this design's own:

- the search range (400 lags) and window (300 samples);
- the 2-clock comparison pipeline;
- the second search against the samples just written;
- pausing at sample boundaries;
- the sticky grant to the I/O block;
- the overrun flag.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/sr_pkg.sv tb/tb_singing_river_top.sv --top-module tb_singing_river_top
./obj_dir/Vtb_singing_river_top
```

The testbenches use these behavioural models in `tb/`:

- `camera_model`: video syncs, background, and a reflection that is visible
  only while the laser is on;
- `adc12441_model`: a tone with a second harmonic;
- `ad670_model`: a known byte sequence;
- `spi_monitor`: decodes the serial links;
- `serial_driver`.

`tb_singing_river_top` runs the whole instrument at its default sizes, about
2.6 M clocks (a few seconds of simulation). It:

- first holds the hand out of view, then at one place, then moves it;
- checks the potentiometer words, the pitch coordinate and its arrival at the
  shifter;
- checks that a 220 Hz tone is estimated within 3% and that F0 reaches the
  shifter;
- checks the rate F1·64/F0 for two hand positions (pitch down, then pitch
  up);
- checks every DAC sample against a reference model of the double buffer,
  including a stretch in mix mode;
- for the time-scaling shifter, checks its rate against the simple
  shifter's, checks the S2 length, checks every output word against S3 and
  checks that no round overruns.

It also counts that each mechanism happened at least once: laser alternation,
empty and hit frames, both link types, two F0 rounds, buffer swaps, pointer
wraps, rates above and below 1, and mixed output.

`tb_solaf_subsystem` runs four full-size rounds of the time-scaling shifter
against a reference model of all five steps (a few seconds).

Some block testbenches shrink parameters (fewer lines, smaller buffers) to
stay short: `tb_vis_frame_fsm`, `tb_vision_subsystem`, `tb_ps_subsystem` and
`tb_ps_addr_manager`. `tb_ffe_subsystem` and `tb_ffe_autocorr` run at the
full 1024 samples.

## Files

- `rtl/sr_pkg.sv`: shared constants (clock, sample rate, F range).
- `rtl/sample_tick.sv`: 10 MHz to 40 kHz tick.
- `rtl/sync2.sv`: synchroniser.
- `rtl/serial_tx.sv`, `rtl/serial_rx.sv`: serial links.
- `rtl/seq_divider.sv`: restoring divider.
- `rtl/sram_model.sv`: SRAM.
- `rtl/vis_*.sv`, `rtl/vision_subsystem.sv`: vision.
- `rtl/ffe_*.sv`, `rtl/ffe_subsystem.sv`: F0 estimator.
- `rtl/ps_*.sv`, `rtl/ps_subsystem.sv`: pitch shifter.
- `rtl/solaf_pkg.sv`, `rtl/solaf_*.sv`, `rtl/solaf_subsystem.sv`:
  time-scaling shifter.
- `rtl/singing_river_top.sv`: top.
- `tb/`: testbenches and models.

Each file opens with a comment describing its behaviour, interface and
timing.
