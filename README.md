# Reconfigurable 4x4 ADPLL network for distributed clock generation

A large synchronous chip does not have to be clocked from one tree. This design places
sixteen small all-digital PLLs (ADPLLs) on a 4x4 grid. Each one makes its own local clock. It
measures its phase against its neighbours' clocks and corrects its oscillator until the whole
grid runs at the reference frequency, with every clock in phase with the reference. The
corner node also watches the reference clock, and the rest of the grid follows through
the links between neighbours.

The RTL is written as an FPGA emulator of such a network. The published prototype it
follows was built to study coupled ADPLLs before building them in silicon. For that reason
the delay-based parts of an ASIC ADPLL are replaced by counters:

- the oscillator is a reloadable counter on a fast clock;
- the time-to-digital converter (TDC) is a chronometer on a second, unrelated clock.

All time constants are scaled down together (the "homothety" of the prototype), so the
filter coefficients of the ASIC can be used unchanged. Every filter coefficient of every node can
be reprogrammed at run time, all at the same instant. This is what makes the network
*reconfigurable*: it can start up with one-way coupling and then switch to full coupling.

## The grid

```
 f_ref -> [PFD] FO1 -[PFD]- FO2 -[PFD]- FO3 -[PFD]- FO4        tile SCA00 .. SCA03
                 |           |           |           |
               [PFD]       [PFD]       [PFD]       [PFD]
                 |           |           |           |
                FO5 -[PFD]- FO6 -[PFD]- FO7 -[PFD]- FO8        tile SCA04 .. SCA07
                 :           :           :           :
                FO13-[PFD]- FO14-[PFD]- FO15-[PFD]- FO16       tile SCA12 .. SCA15
```

- **Nodes.** Nodes are numbered 1..16 row by row. In the RTL, arrays use index n = node - 1
  = 4*row + col. For example, node 11 is row 2, column 2, and its neighbours are nodes 7,
  10, 12 and 15.
- **Tiles.** A tile (`sca_cell`) holds one FO (filter/oscillator) node plus the phase
  detectors on its left and lower borders. Tile SCA00 instead has the detector comparing
  `f_ref` with node 1. In all there are 24 border detectors plus this one.
- **Shared detectors.** One detector serves two nodes. Its plus input is the upper or
  left (upstream) clock and its minus input is the lower or right one. It produces
  `err = phase(plus) - phase(minus)`. The downstream node uses `err` as it is, and the
  upstream node uses `-err`. So on every link a node sees
  `phase(neighbour) - phase(own clock)`, and a positive value tells it to speed up.
- **Filter inputs.** Each node has four inputs, always in the order left, right, top,
  bottom (`link_e` in `adpll_pkg`). Links that do not exist at the edges of the grid read
  zero.

## One node: filter, DCO, divider

`fo_node` = `loop_filter` + `dco` + `freq_div`.

**Loop filter.** Each input error `e_i` is held until its detector reports again. It is then
multiplied by its link weight `Kw_i`, and the four products are summed into `total_err`
(9 bits). The filter is a PI filter, `H(z) = Kp + Ki/(1 - z^-1)`:

```
I(n)    = clamp(I(n-1) + Ki * total_err(n),  +/-2^11)
code(n) = clamp(C_NOM + floor(Kp * total_err(n) + I(n)),  0 .. 2046)
```

- `Kp` and `Ki` are unsigned 12-bit numbers with 8 fractional bits: 1/256 is 1, and 4.0 is
  1024.
- `Kw_i` is 2 bits. The published coupling schemes use only the values 0 (link off) and 1
  (link on).

**When the filter runs.** The filter is evaluated once per period of the node's own
divided clock, 22 TDC clocks after that clock's rising edge is seen. By then every detector
measuring an error of up to the saturation value (15 steps) has reported.

**DCO.** An 11-bit counter runs on `clk_dco`. When it reaches 2047 it is reloaded with the
code, so the period is `(2048 - code) x T_dco`. With a 62.5 MHz clock, the nominal code
798 gives 1250 clocks = 20 us = 50 kHz. One code step near nominal is about 40 Hz.

- A larger code gives a shorter period, so a positive error speeds the node up.
- The code crosses from the TDC clock domain through two flip-flops. It is accepted only
  when both flip-flops agree.
- A new code takes effect at the next reload, never in the middle of a period.
- The output is high for the first half of each period.

**Divider.** `freq_div` divides the DCO clock by `M` (default 1). Its output is the clock
that the neighbouring detectors see.

Timing of a correction: a phase step seen at edge *n* changes the code about 3.3 us later,
and the DCO uses the new code from the start of period *n+1*.

## The phase detector: bang-bang automaton plus chronometer

`pfd` = `edge_sync` (x2) + `bbpfd` + `tdc` + `pfd_arith`, all on `clk_tdc`.

- **Edge detection.** Both input clocks are asynchronous. Each is resynchronised and its
  rising edges are turned into one-cycle events.
- **`bbpfd`.** A three-state automaton. The first event opens an interval: `MODE` goes
  high, and `SIGN` records which input led. The other input's event closes the interval
  and pulses `done`.
  - More events of the leading input while the interval is open are ignored.
  - Two events in the same cycle give an empty interval, which reads 0.
- **`tdc`.** Counts TDC clock edges while `MODE` is high and saturates at 15. It reports the
  count when `done` arrives.
- **`pfd_arith`.** Turns `SIGN` and the count into a two's-complement error in -15..+15
  (5 bits).

The result appears 4 TDC clocks after the lagging edge is seen.

Because the counting clock is not aligned with the interval, a delay `d` reads either
`floor(d/T_tdc)` or `ceil(d/T_tdc)`. A delay shorter than one step can therefore read ±1,
always with the sign of the true error. This is the correlated ±1 code noise that the
published counter-based prototype has and a delay-line TDC would not.

**Pairing of edges.** The detector pairs each edge with the next edge of the other input.
It does not pick the nearest edge. If the clocks start with the "wrong" edge first (for
example, the neighbour is 1 us ahead but the node's edge happens to be seen first), the
detector reads a lag of almost a full period, saturated at -15. In closed loop this acts
like a phase-frequency detector and pulls the clocks together. In an open-loop test you
must start the clocks in the intended order (see `tb_sca_cell`).

## Scaling: the numbers that tie the parts together

| quantity | ASIC target | this RTL (defaults) |
| --- | --- | --- |
| detector step (period of `clk_tdc`) | 30 ps | 149.88 ns (6.672 MHz), supplied by the user |
| DCO clock | - | 62.5 MHz (`clk_dco`, supplied) |
| nominal frequency | 250 MHz | 50 kHz = 1250 DCO clocks, code 798 of an 11-bit counter |
| DCO step | 200 kHz/LSB | 40.03 Hz/LSB |
| detector code | 5-bit signed | 5-bit signed, ±15 |

The ratios step/nominal (8.0e-4) and nominal/resolution (133) are the same on both sides.
Together they set `f_tdc / f_dco = 0.1068`. For the design to keep the ASIC's behaviour,
the two input clocks must keep that ratio.

The nominal code is chosen to give exactly 50 kHz. This is a deliberate departure from the
published rule that the centre code of the range (1024) is the nominal one. With a 62.5 MHz
clock, 1024 would give 61 kHz, and no counter width puts the centre exactly at 1250 clocks.

## Programming and run-time reconfiguration

All coefficients are held in one serial-to-parallel register (`cfg_chain`, 512 bits,
running on `clk_tdc`):

1. Shift the new word in through `cfg_sdi` while `cfg_shift` is high, one bit per clock,
   most significant bit first. The running network does not see the shifted bits.
2. Pulse `cfg_load` for one clock. This copies all 512 bits into every filter at once.

Word layout: node n occupies bits `[32n+31 : 32n]`, so node 16's word is sent first. Each
32-bit node word is the packed `node_cfg_t`:

| bits | 31:30 | 29:28 | 27:26 | 25:24 | 23:12 | 11:0 |
| --- | --- | --- | --- | --- | --- | --- |
| field | Kw bottom | Kw top | Kw right | Kw left | Ki | Kp |

After reset all coefficients are zero, so every DCO runs free at its nominal code.

**Two-phase start-up.** A coupled network can settle into a state where every node has the
right frequency but a fixed, non-zero phase offset to its neighbours (the errors on a
node's links then cancel). One-way coupling cannot settle like that. In one-way coupling
each node listens only to its upper and left neighbours (`Kw_top = Kw_left = 1`, others 0),
so phase information flows from the reference corner outwards. Its weakness is that a
disturbance near the corner spreads across the whole grid.

The remedy is to start one-way and then, once every node is in phase, load a configuration
with all links on. This is a single `cfg_load` while the network runs. There is no on-chip
sequencer: whoever drives the chain decides when to switch.

## Clock domains

| domain | what runs there |
| --- | --- |
| `clk_tdc` | detectors, filters, configuration chain, filter update timers |
| `clk_dco` | DCOs, dividers |
| none | `f_ref`; node clocks as seen by their neighbours |

The two clocks are treated as unrelated (on the FPGA they came from two separate PLLs). The
crossings are:

- clocks into the detectors: two-flop synchronisers (`edge_sync`);
- codes into the DCOs: two flip-flops plus an agreement check;
- divided clocks back into the filter update timers: two-flop synchronisers.

All registers reset asynchronously through `rst_n`.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/adpll_pkg.sv tb/tb_adpll_network.sv --top-module tb_adpll_network
./obj_dir/Vtb_adpll_network
```

| testbench | what it shows |
| --- | --- |
| `tb_adpll_network` | **Full grid at default parameters.** The two-phase start-up: one-way configuration loaded, grid locked by about 30 ms (all link errors within ±1 step, codes 808 ±2 for a reference 10 codes above nominal), switch to all links at about 30 ms, still locked at 50 ms, with every node clock within 48 ns of the reference. It also counts detector saturation, zero readings, both loads, the switch, and activity on the right and bottom links. Runs in about 10 s. |
| `tb_scrambled_start` | **Why the start-up has two phases.** Node phases are first scrambled by holding the DCO codes apart for 100 us. With all links on from the start, the grid settles at least once into an undesired state: every node at the right frequency, but neighbours up to 15 steps apart. From moderate scrambles, the two-phase start-up always ends in phase: one-way coupling for 30 ms, then all links, with link errors within ±2 steps and every node clock within 1.5 us of the reference (typically ±1 step and about 100 ns). |
| `tb_coeff_tests` | The grid with all links on, run with the three coefficient sets of the published stability measurements (see below). |
| `tb_sca_cell` | Tile wiring and signs: left and lower detector readings against known clock offsets, negation of shared errors, weights, and a corner tile with no detectors. |
| `tb_fo_node` | One ADPLL (detector + node) locking to a reference: saturation at first, then lock with error ±1 and code 808 ±1, with an average period equal to the reference's. |
| `tb_pfd` | 300 random offsets between ±3.5 us: floor/ceil quantisation, sign, saturation, zero readings, one result per period. |
| `tb_bbpfd`, `tb_tdc`, `tb_pfd_arith` | Automaton against a reference model; chronometer lengths and saturation; sign/magnitude conversion. |
| `tb_loop_filter` | 6000 random updates against an integer model of the PI filter, including the published coefficient sets and both clamps. |
| `tb_dco`, `tb_freq_div`, `tb_cfg_chain` | Period `2048 - code` and duty cycle, new code applied only at a period boundary; divider periods for M = 1 and 3; shift, atomic load and reset value. |

To change the design:

- Network-wide sizes live in `adpll_pkg`.
- The DCO width, nominal code, divider ratio and update delay are parameters of
  `adpll_network` (`NC_P`, `C_NOM_P`, `DIV_M`, `UPD_DLY`).
- If you change `TDC_W`, also change `UPD_DLY` so that a saturated measurement still
  finishes before the filter runs.

## How far to trust it, and where it differs from the published design

- **Taken from the published design:** the topology, the shared detectors and their
  signs, the detector structure (bang-bang automaton, chronometer TDC, arithmetic block),
  the PI filter with four weighted inputs, the counter DCO and its period formula, the
  atomic serial programming, and the timing numbers above.
- **Choices made here, because the published design does not give them:**
  - the TDC width and its saturation value;
  - all filter number formats and clamps;
  - the 2-bit weights;
  - the instant at which the filter runs;
  - the DCO duty cycle, the clock-domain crossings and `M = 1`;
  - the layout of the configuration chain, and the all-zero reset configuration.
- **Published coefficient sets do not reproduce the published results.** The stability
  measurements used three (Ki, Kp) pairs: (0.75, 0.0039), (4, 0.0078) and
  (0.375, 0.4063). They were reported as slow damped convergence, fast convergence with
  about ±4 steps of noise, and instability. In this model, with all links on, none of the
  three settles within 50 ms: the node 1 to node 2 error keeps reaching the saturation
  value. Running for 0.4 s, the length of the published traces, does not change this.
  Nor does scaling both gains down by the same power of two (tried from 2^-4 to 2^-14):
  no single scale gives the published order of behaviour. The filter follows the
  published transfer function, so the difference most likely lies in the number formats
  and update timing, which were not published. The
  coefficients used in the testbenches (Kp = 1, Ki = 1/16) are this design's own. Treat
  loop dynamics as a property of this implementation, not of the original prototype.
- **Undesired stable states are reproduced.** `tb_scrambled_start` scrambles the initial
  phases and then turns on all links at once. The grid can then settle with every node at
  the right frequency but neighbours locked up to 15 steps (about 2.2 us) apart, with each
  node's error sum near zero. The two-phase start-up reaches true phase lock from the
  same kind of start.
- **The one-way mode can also get stuck.** The detector pairs each edge with the next edge
  of the other input, and saturates at ±15. From very wide initial scrambles (clocks up to
  16 us apart; the runs up to 8 us apart were all fine), a node with two upstream links can therefore be held by one
  reading of +15 and one of -15. One-way coupling is free of undesired states only while
  every detector pairs the right edges. A detector that picks the nearest edge would need
  to know the period, which this design does not assume.
- **Not included:** the two clock-generating PLLs, which are FPGA vendor primitives.
  The testbenches generate `clk_tdc` and `clk_dco` directly.
- **Idle outputs:** the weighted-error outputs of the 15 links that do not exist at the
  grid edges are constant zero.
