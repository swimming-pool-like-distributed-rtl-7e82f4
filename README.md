# Swimming-pool clock network: a 10 x 10 grid of coupled ADPLLs

A large chip cannot be fed by one global clock tree: the wires are too slow.
Giving each region its own unrelated clock brings back metastability at every
crossing. This design takes a third route. Every region (a "node") has its own
all-digital PLL, and each PLL steers its oscillator towards the *average phase
of its neighbours* rather than towards a distant reference. Only the four corner
nodes see the reference clock. Phase information spreads from node to node
until the whole grid runs at one frequency and one phase, and every region
has a local clock that is synchronous with all the others.

A grid of nodes that each average their neighbours behaves like a damped
membrane. A phase disturbance travels as a wave and is slowly damped out. The
trouble is the edge of the grid: a wave that reaches the border is reflected
back inwards, the way a wave bounces off the wall of a pool. The remedy is the
"swimming pool" topology. The outermost ring of nodes is coupled only along
itself, so it forms a stiff rim locked to the reference at the corners. It
passes its phase *into* the interior (the kernel), but never listens to the
interior. Disturbances inside the kernel run into the rim and are not reflected
back. The rim also stays calm, because nothing in the kernel can disturb it.

## Who listens to whom

The grid has `ROWS x COLS` nodes, 10 x 10 by default. Node `(r,c)` has its
flat index `r*COLS + c`. The arrows below show the direction phase information
flows, from a source clock to the node whose PFD compares against it.

| node kind | compares its own clock with | inputs |
|---|---|---|
| kernel (not on the outer ring) | west, east, north and south neighbours, including ring nodes | 4 |
| ring, not a corner | its two neighbours along the ring | 2 |
| corner | its two ring neighbours, and the reference clock twice | 4 |

The coupling inside the kernel and along the ring is two-way: both nodes
listen to each other. Between the ring and the kernel it is one-way, ring
to kernel. On a 10 x 10 grid that gives 32 one-way links into the kernel, and
the reference is used 8 times. `clkgen_pkg::node_src()` holds the whole rule.
Every module that builds the grid uses it, and `tb/clkgen_pkg_tb.sv` checks it
against an independent statement of the rules.

**Corner weighting.** How strongly the reference pulls a corner is this
design's own choice. A corner has two ring neighbours and two sides that face
out of the array. The reference drives the two outward-facing PFDs, so it
carries half the weight of the corner's average. This holds the ring more
firmly to the reference. With a single reference PFD, one third of the weight,
the network also locks. Over eight mismatch patterns it was 10 to 20 % slower,
and in one of them the underdamped steady error went out of bounds.

## One node

```
           nb_clk[0..N_IN-1]
                 |
   clk_div --> [ PFD x N_IN ] --code--> [ error combiner ] --err--> [ PI loop filter ] --cw--+
      ^                                     (average)               (clocked by clk_div)    |
      |                                                                                     v
  [ divide by 4 ] <----------------------- clk_hf ---------------------------------- [ DCO ] <-- trim
```

Every node (`rtl/adpll_node.sv`) is a complete ADPLL:

* **PFD** (`rtl/pfd.sv`, behavioural). It measures the time from the node's
  divided clock edge to the neighbour's edge, and gives a 5-bit signed code
  in 20 ps steps, saturating at -16..+15. A positive code means the
  neighbour is ahead, so the node must speed up. It is a tri-state
  phase-frequency detector. When two rising edges of one input arrive with
  none of the other in between, it reports saturation in that direction, so
  a frequency offset cannot look like a small phase error. The code is
  updated at the falling edge of the local divided clock.
* **Error combiner** (`rtl/error_combiner.sv`). It adds the codes and divides
  by the number of inputs. The result keeps two fractional bits, so one unit
  of `err` is a quarter of a PFD step (5 ps).
* **Loop filter** (`rtl/loop_filter.sv`). A PI filter whose gains are
  run-time power-of-two shifts: `cw = sat((err<<kp_sh + I) >> 8)` with
  `I += err<<ki_sh`. The integrator is clamped to the control-word range. `cw`
  is registered on the rising edge of the divided clock, which gives the
  loop its one-cycle delay. With `loop_en` low, the integrator and `cw` are
  held at zero (open loop).
* **DCO** (`rtl/dco.sv`, behavioural). Frequency = 1 GHz + (cw + trim) x
  2.26 MHz. `trim` stands for process mismatch, or for a disturbance a test
  injects. While `en` is low the output is held low. When `en` rises, the
  oscillator starts from phase zero.
* **Divider** (`rtl/clk_divider.sv`). Divides by 4 (parameter `DIV_N`), giving
  a 250 MHz clock. This clock is what the neighbours compare against, and it
  runs the node's loop filter.

**Timing inside a node.** The PFD closes its measurement and updates `code` at
the falling edge of `clk_div`. The combiner is combinational. The filter
registers the new `cw` at the next rising edge, and the DCO uses it from its
next half period. A correction of one code step moves the node's phase by
about 9 ps per divided cycle.

## Gain settings

The filter gains set how the grid settles, like the damping of the membrane:

| setting | `kp_sh` | `ki_sh` | behaviour in simulation |
|---|---|---|---|
| overdamped | 6 | 1 | locks fast (about 1 us); larger steady error, neighbours within about 80 ps |
| underdamped | 4 | 2 | locks slower (about 3 us); neighbours within about 45 ps |

These two settings are this design's choice. The shift values themselves are
not taken from anywhere. What matters is the trend: a stiffer proportional path
acquires faster but leaves more residual jitter.

## Start-up

1. Hold `rst_n` low. All DCOs stop, with their outputs low, and all dividers
   and filters reset.
2. Release `rst_n` half a nanosecond before a rising edge of the reference.
   Every DCO starts from phase zero at the same instant, so the grid starts in
   phase. This plays the role of a programming stage, after which the phase
   errors start from zero.
3. Drive `loop_en` high. Each node pulls towards its neighbours. The corners
   pull the ring to the reference, and the ring pulls the kernel.

With `loop_en` low the nodes run free at `1 GHz + trim x 2.26 MHz`. The
testbench uses this to check that the mismatch really makes the clocks drift
apart before the loop is closed.

## The top: `swimming_pool_network`

Parameters: `ROWS=10`, `COLS=10`, `DIV_N=4`, `RES_PS=20.0`,
`F0_MHZ=1000.0`, `STEP_MHZ=2.26`.

| port | dir | meaning |
|---|---|---|
| `ref_clk` | in | reference, F0/DIV_N = 250 MHz |
| `rst_n` | in | active-low reset; also stops every DCO |
| `loop_en` | in | close all loops |
| `kp_sh`, `ki_sh` | in | 4-bit gain shifts, shared by all nodes |
| `dco_trim[ROWS][COLS]` | in | signed 8-bit frequency offset per node, in DCO steps |
| `clk_hf[ROWS][COLS]` | out | local 1 GHz clocks |
| `clk_div[ROWS][COLS]` | out | local 250 MHz clocks |
| `cw[ROWS][COLS]` | out | control words |
| `node_err[ROWS][COLS]` | out | average phase error of each node |

## Results at full size (10 x 10)

`tb/swimming_pool_network_tb.sv` builds the grid at its default parameters. It
gives every node a random trim of up to +/-10 steps (+/-23 MHz), then runs
both gain settings. For each setting it checks lock, steady state and the
response to a disturbance. Phase errors are measured once per reference cycle,
relative to the reference edge. `CLKxy` names the node in column x and row y,
counting from 1 at the top left, so CLK35 is `[4][2]` and CLK15 is the ring
node `[4][0]`.

| measurement | simulated |
|---|---|
| overdamped: lock / steady error / neighbours | 1.05 us / 45 ps / 81 ps |
| underdamped: lock / steady error / neighbours | 2.76 us / 43 ps / 45 ps |
| underdamped: border vs kernel steady error, worst / mean | 34 vs 43 ps / 8.1 vs 13.0 ps |
| underdamped: disturbance of 15 steps for 125 cycles on CLK35: peak deviation at CLK35 / CLK25 / CLK15 | 979 / 234 / 0 ps |

These are the figures for the default random seed. Over twelve seeds
(`+verilator+seed+N` on the simulation command line), lock
took 0.9 to 1.1 us (overdamped) and 2.5 to 6.1 us (underdamped). The
underdamped steady error stayed below 80 ps, with neighbours within 55 ps.

The numbers match the expected behaviour:

* Neighbouring clocks end within about two PFD steps of each other.
* The border is calmer than the kernel.
* The overdamped setting locks faster but settles with larger errors.
* A disturbance at CLK35 spreads into the kernel, but the ring node CLK15,
  two columns away, hardly moves.

The test counts each mechanism it relies on:

* open-loop drift;
* PFD saturation during acquisition;
* lock;
* the disturbance;
* the ring staying isolated from it;
* the switch between gain settings.

Any mechanism that never happened counts as a failure.

## Limits: mismatch and phase winding

Acquisition is reliable when the oscillators start within about +/-2 % of the
reference. With +/-20 steps (+/-4.5 %), about half of the random mismatch
patterns end in a false lock. During acquisition, some clocks slip by a whole
cycle. A ring segment between two corners then settles with its phase winding
linearly through one full cycle. Each ring node sits exactly between its two
neighbours, so it sees no error. Only the link into a corner is saturated,
and the loops cannot undo this. The network is frequency-locked, but a column
of the ring is off by up to half a period. The restart in phase at start-up
limits this, but does not remove it. A wider pull-in would need the
oscillators set close to the reference before the loops close, and this
design does not include that.

## What is behavioural and what is assumed

* The PFD and the DCO are behavioural models (`real` arithmetic and delays).
  A 20 ps time-to-digital converter and an oscillator are analog parts. The
  models give the interfaces and transfer functions the rest of the loop
  needs. The combiner, filter, divider and topology are synthesizable.
* Own choices:
  * widths (8-bit control word, 2 fractional error bits, 24-bit integrator);
  * saturation and rounding;
  * the gain encoding;
  * the corner weighting;
  * the DCO enable;
  * the 250 MHz reference;
  * the disturbance size.
* The PFD records edges as timestamps and replays them in time order at the
  falling edge of the local clock. This gives the same result as a plain
  edge-driven state machine, but it cannot lose an edge when several events
  fall on the same simulation instant.
* The conventional grid, where the border nodes listen to the kernel too, is
  only a point of comparison for this topology and is not included.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends by itself.
With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/clkgen_pkg.sv tb/adpll_node_tb.sv \
    --top-module adpll_node_tb -o sim && ./obj_dir/sim
```

Replace `adpll_node_tb` with any of:

* `pfd_tb`
* `error_combiner_tb`
* `loop_filter_tb`
* `dco_tb`
* `clk_divider_tb`
* `clkgen_pkg_tb`
* `swimming_pool_network_tb`

The full-size network test simulates 27 us of 100 oscillators. It takes about
half a minute. To try another grid, set `ROWS` and `COLS` on the top. The
topology functions accept any grid of at least 3 x 3. To try other gains,
change the `run_setting` calls at the end of the network testbench.
