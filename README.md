# Router for a multichannel TCSPC detector

In time-correlated single-photon counting (TCSPC), a pulsed laser excites a sample
80 million times per second. A detector pixel records when, inside the 12.5 ns laser
period, a photon arrives. The time measurement is made by a time-to-amplitude
converter (TAC), which is large, power-hungry and usually sits on a separate chip.
A large array can therefore afford only a few converters. In a useful experiment only
a few percent of the pixels see a photon in any one period.

This design is a **router**: N single-photon pixels share M external converters
(N = 32, M = 4 by default). In every laser period it does three things:

- It finds out which pixels saw a photon.
- It hands the converters to at most M of them. The choice must be unbiased, so that
  no pixel is favoured over time.
- It sends the untouched timing edge of each chosen pixel, together with its address,
  to the converter it was given.

A new set of up to M measurements leaves the router in every laser period.

The RTL is synthesizable SystemVerilog except for two analog parts of the per-pixel
delay line: the ring oscillator and its differential output stage. Those two are
behavioural models.

## The four-phase pipeline

Each photon goes through four phases. Every phase lasts one laser period
(12.5 ns at 80 MHz).

| Phase | Pixel | Shared logic |
|---|---|---|
| **Dwell** | armed; the first photon sets a flag and starts the delay line | – |
| **Selection** | raises its validity bit `vb` | the selection tree counts requests and returns selection bits `sb` |
| **Tim_path** | if chosen, points its demux at converter x, tree L or R | `n_trig` and `addr` are presented; the timing path is set up |
| **Conversion** | its delayed edge travels to the converter | – |

A pixel that loses in Selection is cleared at the end of that period and is armed again
in the next one. A winner is busy for two more periods. Photons that reach a busy pixel
are ignored. The phases of different photons overlap, so the shared logic handles a new
Selection in every period.

The timing edge must survive from the photon to Conversion. That is Dwell + Selection +
Tim_path, about 37.5 ns, or three periods. A tunable delay line in each pixel holds it
for that long, and its output runs straight into the converter line.

## The selection tree (`selection_logic`)

This is the part that needs the most care. It is a binary tree with log2 N levels over
the pixels.

Nodes are numbered as a heap:

- Node 1 is the root.
- Node i has children 2i and 2i+1.
- Pixel j is leaf N+j.

Every node holds three small blocks.

### Counting: `therm_adder`

- Counts are **thermometric** M-bit words: k requests are the lowest k bits set.
- Each node adds its children's counts and saturates at M.
- The count at the root is `n_trig`. Bit x of `n_trig` means "converter x is in use
  this period".
- With thermometric coding, adding two words is a small sum of products:
  output bit k is high if, for some split a + b = k+1, the left count has at least a
  and the right count has at least b.

### Splitting: `select_block` + `bit_shifter`

The root's selection word is `n_trig` itself. At each node the incoming word `SB_in`
(which converters are handed to this subtree) is split in two:

1. **Which side goes first.** The node's priority bit `p` picks the **preferred** child:
   left when p = 0, right when p = 1.
2. **What the preferred child gets.** It receives as many bits as it has requests, taken
   from the top of the contiguous run of ones in `SB_in`.
   - The `bit_shifter` builds this mask.
   - It bit-reverses the preferred child's count and shifts it right by (M−1 − position
     of the highest set bit of `SB_in`).
   - Because `SB_in` is always a run that starts at bit 0, the mask lands on its top bits.
3. **What the other child gets.** It receives the rest of `SB_in`.

The two outputs never share a bit, and together they hold exactly the ones of `SB_in`.

Each winning leaf therefore ends with a one-hot `sb[j]` that names its converter. A
losing leaf ends with all zeros.

### Fairness: `priority_node`

- Each node has one flip-flop. Together they form a binary counter that advances once
  per laser period.
- The root is the least significant bit. It toggles every period.
- A node at depth d toggles when every node above it on its path holds 1 (a carry
  passed down the tree).
- As a result, all 2^(log2 N) patterns of preference occur once every N periods, and
  every pixel position spends the same time at the head of the queue.

The same behaviour can be stated without the tree. Let c be the period number mod N.
Rank the requesting pixels by `j XOR bitrev(c)`. The first K = min(M, requests) win,
and the pixel of rank r gets converter K−1−r. The testbenches use this statement as
their reference model.

### Address and direction bits

- For converter x, each tree level has exactly one node whose output carries bit x.
- Address bit d of converter x (the MSB is the root level) is 1 when that node sent x to
  its **right** child. The OR of all right outputs of that level gives it.
- The same right-output bit, taken node by node, is the select `dir[i][x]` of the
  matching node in the extraction trees. The route and the address therefore come from
  one computation.

The whole tree is combinational except for the priority flip-flops. It settles within
the Selection period, and everything it produces is registered at the clock edge that
ends Selection.

## Extraction trees (`extraction_logic`, `extraction_node`)

- Each converter has a mux tree of the same shape as the selection tree, running from
  the pixels' demux outputs to the converter pin. Each node is a 2:1 mux whose select
  is the stored direction bit.
- A converter's line is busy for two periods: Tim_path and Conversion. A new Selection
  finishes every period, so each converter has **two** trees, L and R.
  - They are used in alternate periods. A `tree_phase` flip-flop in the top toggles
    every clock.
  - Tree t takes its direction bits at the end of the Selections in which
    `tree_phase == t`, and holds them for two periods.
- Both trees are brought out (`conv_l[x]`, `conv_r[x]`). How they are merged in front of
  the converter is left to the board. `out_phase` says which tree carries the edges of
  the current `addr` / `n_trig`.

Tim_path gives the tree one spare period. A signal path across a large array can take
several ns. The delay line can be shortened by that fixed amount so that the edge still
arrives in the Conversion period, even for a photon that came early in Dwell. Without
the extra phase, such an edge would leave the delay line during Selection, before the
pixel knew where to send it.

## Per-pixel logic (`pixel`)

### `pixel_fsm`

A 2-bit state machine: Dwell → Selection → Tim_path → Conversion.

- **Photon flag.** The flag is a pair of toggle flip-flops. One is clocked by the photon
  pulse and one by the laser clock. This lets the flag be set at any time in Dwell and
  be cleared cleanly at a clock edge.
- **Selection.** In Selection the FSM drives `vb`. At the end of Selection it stores
  which converter (from the one-hot `sb`) and which tree (`tree_phase`) it was given.
- **Demux enable.** During Tim_path and Conversion it enables the demux.
- **Clearing the delay line.** It clears the delay line when it is discarded, and again
  at the end of Conversion.

### `delay_line`

Each pixel's delay line is built from three parts.

- **`ring_osc`**: a differential ring oscillator with an 840 ps period. It runs only
  while a timing edge is being held. (Behavioural model.)
- **`osc_output_stage`**: converts the differential signal to a single-ended clock.
  `tune[0]` picks which half-cycle gives the clock edge, which is a 420 ps fine step.
  (Behavioural model.)
- **`delay_line_digital`**: synthesizable. It contains:
  - A start flip-flop clocked by the timing edge. Its output closes the oscillator loop.
  - A counter clocked by the oscillator.
  - A compare against `37 + tune[4:1]`. On a match, the delayed edge is raised, the
    oscillator stops and the counter resets.
  - The line stays high until the FSM clears it at a laser-clock edge. It can be armed
    again in the same period.

The delay is

    delay = (37 + tune[4:1]) · 840 ps − (tune[0] ? 0 : 420 ps)

The default word `5'b10000` gives 37.38 ns. The full range is 30.66–43.68 ns in 420 ps
steps. That range is wide enough to absorb a process spread of about 2 ns and a tree
delay of a few ns. All pixels share one `tune` word.

### `cal_mux` and `pixel_demux`

- **`cal_mux`.** With `cal_en` high, the shared test lines `ph_cal` / `tim_cal` replace
  the detector's outputs in the pixel addressed by `cal_addr`. All other pixels get no
  input. This allows deterministic tests of the FSM and the delay line.
- **`pixel_demux`.** Sends the delay-line output to one of 2·M tree inputs, or to none.

## Timing at the top (`router_top`)

For a photon at time t in period k:

| Period | What happens |
|---|---|
| k | Dwell: the photon flag is set and the delay line starts |
| k+1 | Selection: `vb` is high; the tree decides |
| k+2 | Tim_path: `n_trig`, `addr[x]` and `out_phase` are registered at its start and valid |
| k+3 | Conversion: the edge appears on `conv_l[x]` or `conv_r[x]` at t + delay (with a short tune word it may come at the end of k+2) |

The pixel is armed again in period k+4. A losing pixel is armed again in period k+2.

## Files

| File | Content |
|---|---|
| `rtl/router_pkg.sv` | constants (sizes, periods, tune defaults) and the pixel state enum |
| `rtl/router_top.sv` | top: pixels, selection tree, extraction trees, output registers |
| `rtl/selection_logic.sv`, `therm_adder.sv`, `select_block.sv`, `bit_shifter.sv`, `priority_node.sv` | selection tree |
| `rtl/extraction_logic.sv`, `extraction_node.sv` | double mux trees |
| `rtl/pixel.sv`, `pixel_fsm.sv`, `cal_mux.sv`, `pixel_demux.sv` | per-pixel logic |
| `rtl/delay_line.sv`, `delay_line_digital.sv`, `ring_osc.sv`*, `osc_output_stage.sv`* | delay line (* behavioural) |
| `tb/tb_<block>.sv` | one self-checking testbench per block, plus the two larger-array tests |

Parameters: `N` (pixels, a power of two, default 32), `M` (converters, default 4),
`OSC_PERIOD_PS` (840) and `TUNE_BASE` (37). All files use `timeunit 1ps`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. Each one
also has a watchdog. Example for the top:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_router_top \
        rtl/router_pkg.sv rtl/*.sv tb/tb_router_top.sv -o tb_router_top
    ./obj_dir/tb_router_top +verilator+rand+reset+2

(`router_pkg.sv` must come first; the shell glob lists it again, which verilator
tolerates. Alternatively list the files explicitly.)

`tb_router_top` runs the full default size (32 pixels, 4 converters) for 1310 laser
periods. It compares every output against the ranking model above, and checks every
delivered edge to the picosecond at photon time + delay. It runs these phases:

- 5 %, 30 % and 100 % photon rates;
- a short tune word, so that edges arrive during Tim_path;
- calibration mode, with detector noise that must be ignored;
- 10 % rate.

It counts these mechanisms and fails if any of them never happened:

- under- and over-subscribed periods;
- half the array requesting;
- discarded pixels, and their re-arming in the next period;
- photons ignored by busy pixels;
- use of both trees;
- edges during Tim_path;
- calibration measurements.

It also requires every pixel to have been selected at least once. It takes well under
a second. `tb_selection_logic` compares the tree against the ranking model for random
request patterns over many priority periods.

Two more testbenches run larger arrays through parameters:

- `tb_router_top_n64` repeats the end-to-end test with 64 pixels, the size of the
  linear array made from two 32-pixel chips.
- `tb_selection_logic_n1024` checks the selection tree of a 32×32 array (1024 pixels,
  10 levels). It covers 1100 periods, a full turn of the priority counter. Its
  simulation is quick, but compiling it takes about a minute.

## Choices and departures

- **Priority.** The selection is called random in one place and a distributed counter in
  another. The counter is built, so the choice is deterministic but rotates fairly over
  N periods.
- **Bit placement.** Which bits of `SB_in` the preferred branch gets (the top of the run)
  and the exact bit-shifter rule are this design's reading of the block's function.
  Any rule that keeps the outputs disjoint and complete would meet the same
  requirement.
- **Tune mapping.** The mapping of `tune[4:1]` to a count (base 37) and the default word
  are this design's own. The fine step, the period and the target delay are the
  original's. The default is 120 ps short of 37.5 ns because 37.5 ns is not a multiple
  of 420 ps.
- **Analog models.** The oscillator and output stage are ideal: no jitter (the circuit
  has about 8 ps FWHM), no process spread and no supply effects.
- **Tree delay.** The tree muxes have zero delay in simulation. In silicon, the delay
  line is shortened by the tree's propagation time.
- **Calibration addressing.** The `cal_addr` decoder is this design's own. Only a
  demultiplexer giving outside access to a pixel is specified.
- **Output registers.** `n_trig`, `addr` and `out_phase` are registered. Their exact
  output timing is this design's choice.
- **Reset.** An asynchronous active-low `rst_n` is used throughout. No reset scheme is
  specified.
- **Not included:**
  - the SPAD quenching circuit (its outputs are the `ph_spad` / `tim_spad` inputs);
  - the external TACs (fed by `conv_l` / `conv_r`);
  - the master–slave cascade of two 32-pixel chips into a 64-pixel line;
  - the FPGA test bench used to characterise the chip.
- **Larger sizes.** 64 pixels, or a 32×32 array with 1024 pixels, are reached by setting
  `N`. They make a single deeper tree, not a cascade of chips. The 32- and 64-pixel
  routers are simulated end to end. At 1024 pixels only the selection tree is
  simulated.
- **Two warnings stand.**
  - The pixel's `state` output is left open in the top.
  - The delay line's `running` flag is unused in the pixel.
  - Both are there for observation in block tests.
