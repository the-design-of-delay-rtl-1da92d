# 1 ns delay pulse circuit for an ultrasonic phased array

A phased-array ultrasound front end steers and focuses its beam by timing. Each
transducer element is fired at its own moment on transmit. On receive, each
element's echo is sampled at its own moment. Good focusing needs these delays in
steps of about 1 ns. A plain programmable down-counter would then need a 1 GHz
clock.

This design gets 1 ns steps from ordinary FPGA clock rates. A PLL makes six
copies of a 166.7 MHz (6 ns) clock, each lagging the previous one by 1 ns. A
delay of `d` ns is split in two parts:

    d = 6 * coarse + fine        coarse = d / 6,  fine = d mod 6

- **fine** picks which of the six phase clocks a channel runs on. That shifts
  every edge of the channel by `fine` ns.
- **coarse** is loaded into a counter clocked by that phase clock. It counts
  whole 6 ns periods.

The same mechanism serves both directions:

- **Transmit.** Eight trigger outputs fire the pulsers, each delayed 0–255 ns
  (or more) after a common SYNC.
- **Receive.** Eight A/D sample clocks (24 ns period, 41.7 MHz) each start at
  their own focusing delay. This is "non-uniform sampling": the converters
  sample at the focused instants, so no interpolation or delay memory is needed
  afterwards. Per-channel FIFOs line the samples up, and an adder sums them into
  the beam output.

The RTL is SystemVerilog-2017 in `rtl/`, with self-checking testbenches in
`tb/`.

## The phase clocks

The PLL (a vendor FPGA macro, not part of this RTL) takes the 25 MHz board
clock. It multiplies it by 20/3 into three 6 ns clocks, `c0`, `c1` and `c2`.
These have 50 % duty and sit at 0°, 60° and 120°. `phase_clocks` inverts each
one, which adds 180°:

| output       | source  | phase | lag behind clk_out[0] |
|--------------|---------|-------|-----------------------|
| `clk_out[0]` | c0      | 0°    | 0 ns                  |
| `clk_out[1]` | c1      | 60°   | 1 ns                  |
| `clk_out[2]` | c2      | 120°  | 2 ns                  |
| `clk_out[3]` | ~c0     | 180°  | 3 ns                  |
| `clk_out[4]` | ~c1     | 240°  | 4 ns                  |
| `clk_out[5]` | ~c2     | 300°  | 5 ns                  |

The outputs are held low until the PLL's `locked` goes high.

`clk_out[0]` is the **reference clock**. SYNC is captured on it, and the FIFO
read side and the adder run on it.

## How one channel produces an exact delay

This is the subtle part of the design. The channel's counter runs on
`clk_out[k]`, but the start command comes from the reference clock. The start
must be moved from one clock to the other without losing the 1 ns relation.

1. `sync_start` registers `trigger_in` on `clk_out[0]`. The first reference edge
   that sees it high is the **capture edge**, at time `t_cap`. From there,
   `start` is high for exactly one reference period. All delays are measured
   from `t_cap`.
2. A channel on phase `k = 1..5` first samples `start` at `t_cap + k`.
   A channel on phase 0 shares the capture edge, so it sees `start` one period
   later, at `t_cap + 6`.
3. To hide that step, `start_align` passes `start` through one more register
   when `k ≠ 0`. Its output `go` then rises at `t_cap + 6 + k` for every `k`.
4. On the edge that sees `go`, the counter loads `coarse`, or fires at once if
   `coarse = 0`. It then counts one 6 ns period per clock and fires at zero.

As a result, every output edge sits a fixed latency plus exactly `d` ns after
the capture edge:

| output                          | time after `t_cap`  | length                        |
|---------------------------------|---------------------|-------------------------------|
| `trigger_out[i]` rises          | `12 + d_tx[i]` ns   | 16 clocks = 96 ns             |
| first `sample_clk[i]` rise      | `18 + d_rx[i]` ns   | 256 periods of 24 ns          |
| first `beam_sample`             | after the last channel's first sample has crossed its FIFO | one per 24 ns |

The constants are in `delay_pkg` as `TX_LATENCY_NS` and `RX_LATENCY_NS`.

The receive side adds one clock because the 1/4 divider registers its output.

This scheme needs two things from the hardware:

- **SYNC must be synchronous to `clk_out[0]`.** An asynchronous SYNC would add
  up to 6 ns of jitter.
- **Fast clock-to-clock paths must meet timing.** The paths from `clk_out[0]`
  into `clk_out[1..5]` have only 1–5 ns. On an FPGA they must be constrained.
  The simulation has ideal, zero-delay logic.

## Transmit: `tx_delay_pulse`

For each of the 8 channels there is:

- a `clk_mux6` that selects `clk_out[fine[i]]`;
- a `tx_delay_counter` with a 16-bit counter, clocked by the mux output.

One `sync_start` serves all channels. Each counter has three states:

- **idle**;
- **count**, counting the coarse delay;
- **pulse**, holding the trigger high for `PULSE` clocks.

A new SYNC restarts a channel in any state. The delay inputs are static
settings: change `coarse`/`fine` only while no channel is running. The clock
multiplexer is a plain multiplexer, not a glitch-free one.

## Receive: `rx_beamformer`

`rx_sample_clocks` has the same mux-and-counter front end per channel. After
the coarse count, the counter raises `div_en` for exactly `4 * NSAMP` clocks.
`clk_div4` turns that window into `NSAMP` sample-clock periods of 24 ns, with
the first rising edge on the first enabled clock.

Because channel `i` samples at `t_cap + 18 + d_rx[i] + 24n`, sample `n` of every
channel belongs to the same focal point. When `d_rx[i]` matches the echo's
arrival delay at element `i`, all channels see the same point of the echo.

Each converter's output is written into a per-channel `async_fifo` on the
**falling** edge of that channel's sample clock. That is 12 ns after the
sampling edge, when the converter output is stable. The FIFO is dual-clock:
Gray-coded pointers with two-flop synchronisers. Reads are first-word
fall-through, and depth is 16.

`beam_adder` pops all eight FIFOs on `clk_out[0]` whenever none is empty. It
registers their signed sum, 12 + 3 = 15 bits, as `beam_sample`, with
`beam_valid` set.

The first channel to start collects up to 11 samples before the last one (255
ns later) produces its first. The FIFOs absorb that skew. Every channel delivers
the same `NSAMP` samples per shot, so the FIFOs are empty again at the end of
each shot. A write into a full FIFO is dropped and sets the sticky
`fifo_overflow[i]`.

## Module map

```
delay_pulse_top
├── phase_clocks                  c0..c2 + inverters -> clk_out[5:0]
├── tx_delay_pulse
│   ├── sync_start                SYNC capture on clk_out[0]
│   └── 8 x { clk_mux6, tx_delay_counter (start_align inside) }
└── rx_beamformer
    ├── rx_sample_clocks
    │   ├── sync_start
    │   └── 8 x { clk_mux6, rx_delay_counter (start_align inside), clk_div4 }
    ├── 8 x async_fifo
    └── beam_adder
delay_pkg                          shared sizes, latencies, coarse_of()/fine_of()
```

The PLL and the A/D converters are outside the RTL.

Top-level ports:

- **From the PLL:** `pll_clk[2:0]`, `pll_locked`.
- **Control inputs:** `rst_n` (asynchronous, active low) and `trigger_in`
  (SYNC).
- **Per-channel settings:** `tx_coarse`, `tx_fine`, `rx_coarse`, `rx_fine`.
- **Converter data in:** `adc_data`.
- **Outputs:** `clk_out`, `trigger_out`, `sample_clk`, `beam_sample`,
  `beam_valid` and `fifo_overflow`.

One `trigger_in` starts a transmit shot and a receive shot together.

## Parameters (defaults)

| parameter | default | origin |
|-----------|---------|--------|
| channels `NCH` | 8 | original design |
| phase clocks / period | 6 / 6 ns | original design |
| coarse counter `CW` | 16 bits | original design |
| sample clock divider | 1/4 (24 ns) | original design |
| trigger pulse `PULSE` | 16 clocks | chosen here |
| samples per shot `NSAMP` | 256 | chosen here |
| A/D width `DW` | 12 bits, two's complement | chosen here |
| FIFO depth `DEPTH` | 16 | chosen here (≥ 12 needed for 255 ns skew) |

## How far this follows the original design

These parts follow the original description:

- the PLL configuration;
- the three inverters;
- the 6-to-1 clock multiplexer for the fine delay;
- a 16-bit counter loaded with the coarse delay;
- the 1/4 divider giving a 24 ns sample clock;
- the chain converter → FIFO → adder;
- 8 channels with a 0–255 ns range.

The published text names `clk_out[5]` as the 120° clock in one place. Its block
diagrams, and the 1 ns spacing rule, make it 300° (inverted c2), which is what
is built. Likewise, the prose calls the transmit outputs `Trigger_clk`. Its diagrams
and waveforms call them `trigger_out`, the name used here.

These parts are choices made here, because the original leaves them open:

- the start-alignment scheme and its 12 / 18 ns latency;
- the trigger pulse length;
- that a shot has a fixed number of samples;
- the insides of the FIFO and adder, the converter width and the FIFO write
  edge;
- the asynchronous reset;
- gating the phase clocks with `locked`.

The original reports measured step-zero delays of 8.34 ns (transmit) and 6.7 ns
(receive), and sub-nanosecond tolerances on real silicon. A zero-delay RTL
simulation cannot reproduce these figures. In simulation, every delay is exact
to the picosecond, with the fixed latencies above.

## Simulation

The testbenches use timing controls and need Verilator 5 with `--timing`. For
example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_delay_pulse_top \
    rtl/delay_pkg.sv tb/tb_delay_pulse_top.sv
./obj_dir/Vtb_delay_pulse_top
```

Every testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_delay_pulse_top` | top at default sizes, 6 shots. It checks the phase spacing, every trigger edge and width, every sample-clock edge, and all 256 beam sums per shot. It also checks that each fine phase, zero and 255 ns delays, FIFO skew and re-triggering occurred. |
| `tb_delay_sweep` | top at default sizes, 256 shots. Every channel runs at every delay 0–255 ns, transmit and receive (2 × 2048 settings). It prints the worst deviation (0.000 ns). |
| `tb_phase_clocks` | k ns lag and 6 ns period of each output; all outputs low before lock |
| `tb_clk_mux6` | output equals the selected clock; edge lag per select |
| `tb_tx_delay_counter`, `tb_rx_delay_counter` | `12 + 6C + k` ns timing on every phase; pulse / window length; restart |
| `tb_clk_div4` | 24 ns period, 12 ns high, N edges per 4N enabled clocks |
| `tb_tx_delay_pulse`, `tb_rx_sample_clocks` | 8-channel delays over many shots |
| `tb_async_fifo` | fill to full, overflow flag, drain, random dual-clock traffic against a queue |
| `tb_beam_adder` | pop rule and signed sums, including full-scale samples |
| `tb_rx_beamformer` | focused and unfocused echoes through converter models, every beam sum |

Simulation-only models live in `tb/`:

- `pll_model`: ideal 6 ns clocks at 0/1/2 ns.
- `phase_gen_model`: six ideal phase clocks.
- `adc_model`: samples an echo waveform that changes every nanosecond, so a
  1 ns timing error changes the converted value.

The simulator is two-state. Pulse `rst_n` low once at start-up: the FIFO write
clocks do not run outside a shot, so their registers are only reset by an
`rst_n` edge.
