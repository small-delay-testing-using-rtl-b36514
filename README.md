# On-chip path delay measurement for small-delay testing

A small-delay defect makes a path only slightly slower than it should be. A
pass/fail at-speed test misses it unless the path is already close to the
clock period. This design measures the delay of a chosen path on the chip
itself, as a number, so a tester can compare the measured value with the
expected one and catch defects far smaller than the slack.

The idea is simple. The clock edge that launches a transition into the circuit
under test (CUT) also starts a time-to-digital converter (the DVMC, delay value
measurement circuit). The transition travels down the path under measurement
(PUM) and reaches a flip-flop input or an internal node. A multiplexer, the
stop signal generator (SSG), picks out that one line and stops the converter.
The converter's 14-bit result is then shifted out. Only one converter is
built per CUT, so each test pattern pair measures exactly one path.

The rest of the design helps in two ways:

- **Making more paths measurable:** segmented scan, control points and
  observation points.
- **Cutting test time and test data:** each pattern reuses what the previous
  one left in the scan chain, so only a few bits are shifted between
  measurements.

The method follows a 2015 thesis on small-delay testing with on-chip delay
measurement (W. Zhang, Chiba University). The RTL, the cycle-level protocol
and the choices listed under "Where this design departs or fills gaps" are
this implementation's own.

## Block map

```
            tdi ─► segmented scan chain (LEN cells, NSEG segments) ─► control-point FFs (NC) ─► tdo
                        │ cut_q                ▲ cut_d                      │ cp_node_out
                        ▼                      │                            ▼
                   ┌──────────── circuit under test (outside this RTL) ────────────┐
                   └───────────────────────────────────────────────────────────────┘
                                         cut_d │  obs_node (NO)
                                               ▼
                               SSG: (LEN+NO)-to-1 mux, select = d_i
                                               │ stop
              clk ───────────────────────────► DVMC (start) ──► serial result ──► controller ──► result, result_delay
```

| File | What it is |
|---|---|
| `rtl/odm_pkg.sv` | Shared constants (14-bit DVMC, 7 taps, 7-bit counter) and enums (launch mode, controller state) |
| `rtl/scan_cell.sv` | Mux-D scan flip-flop with hold |
| `rtl/segmented_scan_chain.sv` | The CUT's flip-flops as one chain, with one scan enable per segment |
| `rtl/control_point.sv` | Selector on a CUT node, driven by its own scan flip-flop in test mode |
| `rtl/ssg.sv` | Stop signal generator |
| `rtl/ring_oscillator.sv` | Gated inverter ring (behavioural model with delays) |
| `rtl/trc.sv` | Round counter of the ring, with capture and shift register |
| `rtl/dvmc.sv` | The time-to-digital converter: arm FF, ring, tap FFs, counter, readout |
| `rtl/dvmc_decoder.sv` | Turns a result word into a delay in ring stage delays |
| `rtl/odm_controller.sv` | Sequencer: shift, launch, readout for each measurement |
| `rtl/odm_top.sv` | Everything wired around the CUT |

The CUT's combinational logic is not part of the RTL. Its flip-flops are the
chain cells: `cut_q` goes out to the logic and `cut_d` comes back. Control
points and observation points are brought out as ports too.

## The DVMC: how a delay becomes a number

This is the part that needs the most care.

**Start.** `start` is the CUT clock. Its rising edge sets an arm flip-flop
(async-cleared by `rst`). The arm output enables a gated ring of 7 stages.
Stage 0 computes `~(en & last_tap)` and stages 1 to 6 are inverters. While
disabled, the ring rests with tap k at 1 for even k. Once enabled, a
wavefront runs round the ring. One full oscillation period is 14 stage
delays.

**Counting.** The last tap clocks the TRC, a 7-bit up counter, so the counter
holds the number of full periods.

**Stop.** On the arm edge the DVMC also records the level of `stop`.
`stop_edge = stop ^ stop_init` therefore rises on the first transition of
`stop`, rising or falling. That rising edge makes seven tap flip-flops
sample the ring stages, and makes the counter's shadow register sample the
count. Later transitions of `stop`, such as a glitch returning to the old
level, give a falling `stop_edge` and change nothing.

**Readout.** With `se = 1` the capture clock becomes `clk0` and all 14 bits
shift out on `so`, one per `clk0` rising edge. The count comes first, least
significant bit first, then taps 6 down to 0. In the top, `clk0 = ~clk`, so
the DVMC shifts on falling edges and the controller samples on rising edges.

**Decoding.** After m stage delays with m < 14, the taps differ from the rest
pattern in one of two ways:

- if m ≤ 7, in the first m taps;
- if m > 7, in all but the first m−7 taps.

`dvmc_decoder` recognises these two thermometer forms, gives the phase m, and
outputs `delay = 14·count + m`. It sets `valid = 0` if the taps match neither
form, for example a metastable sample.

**Range and resolution.** Resolution is one stage delay. Range is 14·128 =
1792 stage delays. Turning stage delays into picoseconds needs a calibration
of the real ring, which is outside this design.

The ring is a behavioural model with a 50 ps transport delay per stage
(`TD_PS`). A silicon version would be a placed cell chain. By design the
ring is a combinational loop, and its taps are used both as clocks and as
data. Lint reports these as warnings, and they are expected.

## Segmented scan and the two launch modes

The chain has `LEN` cells split into `NSEG` segments of `ceil(LEN/NSEG)`
cells, each with its own scan enable. Cell 0 is the scan-out end. A pattern
written as a string has cell 0 on the left, and new bits enter at the right
end (cell `LEN-1`).

**Launch on shift (LOS).** The last shift is the launch. With per-segment
enables, some segments shift on that edge while others capture their
functional input. This widens the set of transition pairs the chain can
apply. Example: a cell at the start of a capturing segment takes its
functional value instead of its neighbour's. The enables for the launch edge
come with each measurement (`desc_launch_se`). After an LOS launch the chain
is frozen at once. No capture is needed, because the DVMC has already seen
the transition. The chain therefore keeps the transition pattern, and that
pattern is the starting point of the next one.

**Launch on capture (LOC).** The chain loads the initial pattern, then every
segment captures on the launch edge. The following edge is an ordinary
capture, and then the chain freezes for readout.

**Control points.** A control point is a selector on a CUT node. When
`test_mode = 1` the node is driven by a dedicated scan flip-flop, which
forces off-path inputs to non-controlling values. These flip-flops sit at
the scan-out end of the chain and shift only in the shift phase, so they keep
their value through an LOS launch.

**Observation points.** These are extra SSG inputs (`obs_node`). They let a
path be measured at an internal node instead of at a flip-flop.

## The measurement sequence and test data

A measurement is given by a descriptor with four fields:

- the mode (LOS or LOC);
- `d_i`, the SSG select;
- `s_i`, the number of new bits to shift;
- the launch segment enables.

Test data comes in on `tdi`, one bit per cycle while `tdi_req = 1`. LOS takes
`s_i + 1` bits and LOC takes `s_i` bits.

| Phase | Periods | Chain | DVMC |
|---|---|---|---|
| SHIFT | s_i | all segments and control-point FFs shift | held in reset |
| LAUNCH | 1 | LOS: shift or capture per segment; LOC: capture | reset released; the closing edge is the start |
| READ, first period | 1 | LOS: frozen; LOC: captures at its end | the path delay elapses; stop fires |
| READ, rest | 13 | frozen | 14 bits sampled on rising edges, shifted on falling ones |

Each measurement takes exactly `s_i + 1 + 14` clock periods. A new
descriptor is accepted in the last readout period, so a run of measurements
takes `sum(s_i + 1 + 14)` cycles. Each result appears on `result_valid`, with
its `d_i` on `result_sel`, one cycle after its last bit. The measured
transition must reach `stop` within the first READ period (one clock
period). Longer delays need a slower test clock.

**Merging.** The point of the descriptor format is pattern merging. If the
chain state left by pattern n agrees with the initial vector of pattern n+1
after k shifts (an X agrees with anything), only k new bits are needed
instead of a full load. Patterns are ordered greedily by fewest shifts, with
all LOS patterns before all LOC ones. The X bits of the stream are then fixed
to whatever later patterns need. The hardware does nothing special for this:
it applies `s_i` and the bits it is given. The merging itself is an off-line
computation. `tb/merge_rig.sv` contains a small version of it, which checks
two published worked examples end to end.

## Top-level interface

`odm_top` parameters:

- `LEN = 214`: chain cells;
- `NSEG = 8`: segments;
- `NC = 10`: control points;
- `NO = 20`: observation points;
- `TD_PS = 50`: ring stage delay in ps.

Derived: `SW = $clog2(LEN+NO)`, `CW = $clog2(LEN+NC+1)`, `DW = 11`.

- `clk`, `rst` (asynchronous, active high, also clears the DVMC), `test_mode`
  (enables the control points).
- `desc_valid`/`desc_ready`, `desc_mode`, `desc_sel[SW]`, `desc_shift[CW]`,
  `desc_launch_se[NSEG]`: descriptor handshake. A waiting descriptor must stay
  stable, and an assertion checks this.
- `tdi`, `tdi_req`, `tdo`: test data stream. The scan order is `tdi` → cell
  `LEN-1` … cell 0 → control-point FF 0 … `NC-1` → `tdo`. A full load is
  `s_i = LEN + NC`.
- `cut_q[LEN]`, `cut_d[LEN]`, `cp_node_in[NC]`, `cp_node_out[NC]`,
  `obs_node[NO]`: the CUT. The SSG select indexes `{obs_node, cut_d}`:
  values `0..LEN-1` pick a flip-flop input and `LEN..LEN+NO-1` an
  observation point.
- `result_valid`, `result[14]`, `result_sel`, `result_delay[DW]`,
  `result_delay_ok`, `busy`.

The defaults are the published s5378 configuration of the combined LOS/LOC
system: 8 segments, 10 control points, 20 observation points. The chain
length of 214 is not part of that configuration; it assumes the benchmark's
179 flip-flops plus one per primary input. Larger benchmarks only need larger
parameters.

## Where this design departs or fills gaps

- The source describes the DVMC's structure but not its sizes. The 7 taps +
  7-bit counter split of the 14 register bits is this design's choice, as
  are the bit order and the automatic stop-polarity detection. The original
  uses a selector on the stop path for the polarity.
- The original drawing marks the DVMC's arm flip-flop with the readout
  clock. Here the start edge itself sets it, as the written description has
  the start transition trigger the measurement.
- The source gives the test flow and the S/D/V data, but no sequencer. The
  controller, its valid/ready handshake, freezing the chain with a hold
  input, and the inverted readout clock are this design's choices.
- Control points are enabled by `test_mode` rather than by the scan enable,
  so that they also hold during an LOC launch. The source is ambiguous on
  this point.
- The decoder's phase decoding follows from the ring's structure. The source
  only says the delay is computed from the captured states and count.
- Reset behaviour and segment lengths when `LEN` is not a multiple of `NSEG`
  (rounded up; the last segment is shorter) are this design's choices.
- Not included: test-point selection, path selection, ATPG and pattern
  merging. These are off-line software. The delay calibration of the ring is
  also not included.

## Testbenches and simulation

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. To
run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/odm_pkg.sv tb/tb_odm_top.sv --top-module tb_odm_top
obj_dir/Vtb_odm_top
```

| Testbench | What it checks |
|---|---|
| `tb_segmented_scan_chain` | Random shift/capture/hold against a reference model, plus a segmented LOS launch on a four-cell example |
| `tb_control_point` | Selector and dedicated FF in every mode |
| `tb_ssg` | Every select value |
| `tb_ring_oscillator` | Rest state, phase sequence, period, return to rest |
| `tb_trc` | Counts, capture while running, serial readout, clear |
| `tb_dvmc` | 40 start-to-stop intervals with both stop polarities against the expected word; a returning stop does not disturb the result |
| `tb_dvmc_decoder` | Every delay from 0 to 1777 stage delays, plus invalid patterns |
| `tb_odm_controller` | 40 back-to-back LOS and LOC measurements: enables, freeze, reset window, bits taken, exact `s_i+1+14` spacing |
| `tb_odm_top` | End to end at small size (4-cell chain) with a behavioural example CUT (`tb/cut_example.sv`), see below |
| `tb_odm_top_full` | The same at the default size |
| `tb_pattern_merging` | Greedy ordering and stream planning of two published examples (7-cell chain with three LOS pairs; 6-cell chain with three LOS and two LOC pairs), then applied to the controller and chain |

The end-to-end test runs five measurements:

- an LOS launch where one segment captures while the next shifts;
- an LOS launch measured at an observation point;
- an LOS launch with a control point forcing a side input;
- two LOC measurements with `s_i = 0`, using rising and falling stops.

It checks that each decoded delay equals the model's path delay divided by
the 50 ps stage delay, rounded down. It also checks that merged shifts use
exactly the bits given, that the total time is `sum(s_i + 1 + 14)` cycles, and that each mechanism
happened.

The ring model makes simulation event-driven at picosecond resolution. It is
still fast: the full-size end-to-end test runs in well under a second.
