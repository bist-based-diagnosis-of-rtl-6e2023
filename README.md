# Built-in self-test and diagnosis of FPGA interconnect

An FPGA's routing is made of wire segments joined by configurable
interconnect points (CIPs): transmission gates, each switched by a
configuration bit. Testing that routing from inside the FPGA works like this.
Part of the logic blocks become a test pattern generator (TPG), wires are
routed into *wires under test* (WUTs), and other logic blocks become output
response analyzers (ORAs) that check what comes out at the far end.

This RTL models the logic of such a BIST test phase at the size of a mid-size
device. Self-testing areas (STARs) sit side by side; together they are called a
*galaxy*. Each STAR holds one BIST structure:

- a TPG drives the same exhaustive count onto two groups of WUTs;
- comparator ORAs latch any disagreement between a wire in group A and its
  partner in group B;
- all ORAs of all STARs form one long scan chain. Reading it out tells which
  STAR, which point along the wires and which wire pair failed.

The same structure also supports the diagnostic configurations used to find
a fault once a phase has failed:

- ORAs at several points along the wires;
- the "flipped" configuration, with the TPG at the other end;
- scan ORAs that record the raw response to one chosen pattern;
- turning individual CIPs off to delete parts of a net.

The routing itself is modelled in logic too, so that faults can be injected
and the whole test run in simulation. The model covers stuck-at segments,
stuck-open CIPs, and shorts that are dominant, wired-AND or wired-OR.

## Structure

```
galaxy_bist                      top: N_STAR STARs + sequencer + MUX CIP test
 ├─ bist_sequencer               runs one test phase
 ├─ bist_tile  (x N_STAR)        one BIST structure per STAR
 │   ├─ tpg                      exhaustive counter, aggressor drive, roll/pause
 │   ├─ wut_fabric               2 x W WUTs of SEGS segments, fault injection
 │   └─ ora_chain                N_TAP*W ORA positions in a scan chain
 │       ├─ ora_cell             comparator ORA + scan bit
 │       └─ scan_ora_cell        scan ORA (captures one wire)
 ├─ mux_cip (x2)                 multiplexer CIPs under test
 └─ ora_cell                     ORA comparing the two MUX CIPs
bist_pkg                         fault descriptor and ORA configuration types
```

Default sizes: 10 STARs. Each STAR has 2 groups of 8 WUTs, 20 segments per WUT
and ORAs at 4 points along the wires. There are 6 injectable faults per STAR
and 5 aggressor wires per STAR. The scan chain is 10 × 4 × 8 + 1 = 321 bits.

- **STARs.** The 10 STARs match a 20 × 20 logic-block array cut into STARs two
  blocks wide.
- **WUT width.** The 8-bit TPG is the largest counter normally used for this
  kind of test, and one WUT per counter bit was chosen.
- **Segments.** Each WUT crosses the array with one segment per logic-block
  row, which gives 20.
- **ORA points.** Four points keep the read-out below 380 bits.

## The ORA cell and the scan chain

`ora_cell` is the core of the result path. Its flip-flop input has two
choices:

- **input 1:** `(wut_a XOR wut_b) OR q`, which compares and latches. One
  mismatch at any clock edge sets the bit, and it stays set until `clr`.
- **input 0:** `scan_in`, the previous ORA's output, which shifts.

**Watch the polarity:** `scan_mode = 1` selects input 1, so *high means
compare/capture and low means shift*. The cell keeps this assignment of the
select inputs from the published drawing of the integrated ORA. `scan_ora_cell` uses the same polarity.

In a scan ORA the logic block's look-up table just passes one wire through, so
the flip-flop holds that wire's value from the last edge. A flip-flop then sees
one net instead of a pair. Group A and group B therefore need separate
capture runs, selected by `ora_cfg = ORA_CAPTURE_A / ORA_CAPTURE_B`.

`ora_chain` puts both cell types at every position. `ora_cfg` picks which one
drives the chain. On the FPGA this choice is two different look-up-table
programmings of the same logic block.

Chain order, with position 0 read first:

- **Inside a tile:** position `t*W + i` is ORA tap `t`, wire pair `i`.
  Tap 0 is the far end (segment SEGS-1) and tap N_TAP-1 is the near end
  (segment 0), with the taps spread evenly in between.
- **In the galaxy:** STAR 0 comes first. Global position
  `s*N_TAP*W + t*W + i` is STAR `s`; the last position is the MUX CIP ORA.

## The interconnect model (`wut_fabric`)

This is the least obvious part. It stands in for routing, which has no
logic function of its own, and its rules decide what every fault looks like
at the ORAs.

- **Wires.** Wires 0..W-1 form group A and W..2W-1 form group B. Wires 2W and
  up are the aggressors: the wires that an open CIP separates from the WUTs.
- **Segments and CIPs.** A WUT is segments 0..SEGS-1 in a row. CIP `k` joins
  segment `k-1` to segment `k`. CIP 0 connects the near-end driver and CIP
  SEGS the far-end driver. `cip_on` holds all (SEGS+1) configuration bits of
  every wire.
- **Direction.** With `flip = 0` the signal enters through CIP 0 and travels
  up. With `flip = 1` it enters through CIP SEGS and travels down.
- **Floating segments.** A segment whose path to the driver contains an open
  CIP (configured off, or stuck-open) floats and reads `OPEN_VAL` (1).
- **Fault reach.** A fault at a segment affects that segment and everything
  downstream of it. Whether an ORA tap sees a fault therefore depends on the
  direction. That is what the flipped configuration exploits: with ORAs at
  both ends and both directions run, an open is bracketed between ORAs.
- **Shorts.** A short is resolved from the fault-free values of both wires:
  - dominant: the victim `wire_a` takes `wire_b`'s value;
  - wired-AND / wired-OR: both wires take the AND / OR of the two values.
  If one of the two segments is floating, it takes the driven one's value and
  disturbs nothing. Progressive net deletion relies on this: turning off the
  CIPs of the dominant net one at a time, from the far end, clears the failure
  exactly when the shorted segment is cut off.
- **Fault slots.** Faults are written into `NF` descriptor slots
  (`bist_pkg::fault_t`: kind, wire_a, seg_a, wire_b). For `F_CIP_OPEN`,
  `seg_a` is the CIP index. A stuck-closed CIP is written as a short between
  its two segments.

Limits of the model, so that results are not over-read:

- Shorts resolve in one step. A short does not see the effect of another
  fault on its partner wire.
- Only two-wire shorts exist. A three-wire short with majority-vote behaviour
  cannot be represented.
- Routing through logic blocks configured as wires, and cross-point CIPs to
  other wires, are not modelled separately. A WUT is a plain chain of
  break-point CIPs.
- Two groups carrying identical faults at the same place are not detected by
  their own comparison. This is correct for a comparator ORA, and the
  testbenches check that it happens. The two-testing mode (next section)
  is the remedy.

## Two-testing

A comparator cannot see a fault that both of its inputs share. So every WUT
group should also be compared against a second group. With `two_test = 1`,
the ORAs of STAR `s` compare STAR `s`'s group A with group B of STAR `s+1`
(the last STAR wraps round to STAR 0). This works because all TPGs run in
lock-step and carry the same pattern.

Running a phase in both modes compares each group against two others:

- **Shared faults.** Equivalent faults that pass the normal phase fail in the
  two-testing phase.
- **Naming the faulty group.** A fault that fails in STAR `s+1` normally, and
  moves to STAR `s` under two-testing, is in group B of STAR `s+1`. A fault
  that stays in STAR `s+1` is in its group A.

Inside a tile this is the `use_ext_b` / `ext_b` / `tap_b_out` ports of
`bist_tile`.

## Divide-and-conquer

With `split_en` set, every tile is cut in two at break-point CIP `split_at`.
That CIP is left out, and the segment beyond it is driven straight from the
pattern, as if a second TPG were running in step with the first. Each half
then behaves as a smaller tile with the same pattern. The ORA taps do not
move, so a tap reports only on its own half. The CIP at the cut is not tested
in such a phase. To cover it, run again with a different `split_at` (the
tile "slides").

In the testbench, one wire has a stuck-at-0 at segment 2 and a stuck-at-1 at
segment 15. Whole, the tile fails at the taps at segments 19, 13 and 7, which
hides the fact that there are two faults. Split at CIP 10, the tap at segment
13 passes and the tap at segment 19 still fails, so the far fault lies
between segments 13 and 19 and the near one before segment 7.

## Test phases and timing (`bist_sequencer`)

All STARs share one clock and one sequencer. Everything is synchronous to the
rising edge, and `rst_n` is an asynchronous, active-low reset.

**Fault detection** (`scan_ora = 0`). `go` is sampled in IDLE. The phase then
runs:

1. one START cycle: TPG start and ORA clear;
2. the TPG shows pattern `k` in the k-th cycle after the start edge, and every
   ORA compares during that cycle;
3. TPG `done` rises 2^W cycles after start;
4. the next cycle the ORAs switch to shift (`scan_mode = 0`), and `res_bit` /
   `res_idx` / `res_valid` stream the chain out, position 0 first, one bit
   per cycle;
5. `phase_done` pulses.

From the edge that samples `go` to the edge that raises `phase_done` there are
`2 + 2^W + CHAIN_LEN` cycles: 579 at the defaults. `star_fail[s]` and
`mux_fail` summarise the read-out from `phase_done` on.

**Scan ORA capture** (`scan_ora = 1`).

- The TPGs start with roll-over on. The sequencer waits for the cycle in which
  the pattern equals `target`. The edge at the end of that cycle is the
  capture, and the read-out starts in the next cycle.
- `hold_tpg = 1` pauses the TPGs during the read-out. Otherwise they keep
  counting.
- A later `go` with `cont = 1` skips the restart and waits for the next
  target from wherever the counter is. A pattern already passed is reached
  after the counter rolls over.

The useful targets are all 0s, all 1s, a walking 1 and a walking 0:

- a wire that reads the same value for every pattern is open, or shorted to
  a supply;
- a wire that fails only a walking pattern names the pair of wires that are
  shorted.

**TPG detail.** The aggressor wires carry the complement of the counter's
most significant bit. So they are 1 while the WUTs carry all 0s, and 0 while
the WUTs carry all 1s. Any stuck-closed CIP or short to an aggressor is
therefore driven both ways.

## MUX CIP test

A multiplexer CIP needs one configuration per input. The selected input gets
both 0 and 1, and every other input gets the opposite value. That exposes a
stuck-open selected gate, and a stuck-closed gate on any other input.

`galaxy_bist` holds two identical non-decoded MUX CIPs of `MUX_IN` inputs
(`mux_cfg` one-hot). They receive TPG bit 0 on the selected input and its
complement elsewhere, and one comparator ORA at the end of the scan chain
compares their outputs. Gate faults are injected through `mux_stuck_open` and
`mux_stuck_closed`.

`mux_cip` on its own also supports the decoded form (`DECODED = 1`: log2(N_IN)
select bits). When several gates conduct, the output is a wired-AND
(`BRIDGE_OR = 0`) or a wired-OR. When none conducts, the output floats to
`OPEN_VAL`.

## What is and is not here

Built:

- the BIST structure (TPG, WUT groups, comparator ORAs with integrated scan);
- scan ORAs, and capture of a pattern of interest with roll-over or pause;
- ORAs at several points along the WUTs, and the flipped configuration;
- two-testing, by comparing a STAR's group A with the next STAR's group B;
- divide-and-conquer, by splitting every tile in two at a chosen CIP;
- CIP-level configuration for net deletion;
- parallel STARs with one long result chain;
- the MUX CIP test;
- a fault-injectable model of the routing.

Not built:

- **Outside the logic.** The device's boundary-scan port, its configuration
  memory and partial reconfiguration, and the logic block itself. Here, the
  configuration is ports.
- **Software.** The host software: fault dictionaries, and the adaptive
  procedure that picks the next diagnostic configuration from earlier results.
- **Diagnostic configurations this RTL cannot represent:**
  - more than two sub-tiles per tile, with ORAs placed per sub-tile;
  - rotating which wires are compared;
  - STARs of both orientations crossing each other to test cross-point CIPs
    between horizontal and vertical wires.

  Each tile has one TPG (plus the optional second drive point for a split),
  two groups and fixed tap positions.
- **Three-wire majority shorts**, as noted above.

Choices made here rather than taken from the source method:

- the select polarity kept as drawn (see above);
- the aggressor value (the MSB complement);
- one tile per STAR and four evenly spaced ORA taps;
- pairing each STAR with the next one for two-testing;
- the floating value of 1;
- the chain order;
- the sequencer's state machine and its timing;
- resets and clears (on an FPGA, downloading the configuration initialises
  the flip-flops);
- the summary outputs.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

- **`tb/wut_fabric_tb.sv`** checks every segment, for thousands of random
  single faults and CIP settings in both directions. The expected values come
  from a reference that reasons about which CIPs lie between a segment and its
  driver.
- **`tb/galaxy_bist_tb.sv`** runs the top at its default parameters. It
  covers:
  - a fault-free phase, with its length checked;
  - a segment shorted to power in one STAR, normal and flipped;
  - faults in two STARs at once;
  - walking-1 and walking-0 captures with scan ORAs that expose a dominant
    short;
  - a roll-over to an earlier pattern, and TPG pause;
  - progressive net deletion that locates the shorted segment (segment 12);
  - six stuck-open CIPs in one STAR;
  - two-testing, which unmasks equivalent faults and names a faulty group B;
  - divide-and-conquer, where splitting the tiles separates two faults on
    one wire;
  - the MUX CIP test with stuck-closed and stuck-open gates.

  It counts how often each mechanism happened and fails if one never did. It
  runs in about a second.

Every testbench was also run against a copy of its module with one
deliberate bug, and each one detected its bug.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bist_pkg.sv \
          tb/galaxy_bist_tb.sv --top-module galaxy_bist_tb -o sim
./obj_dir/sim
```

Replace `galaxy_bist_tb` with any other testbench name. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/bist_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about unused bits and a spare package
constant.

To change the size, override the `galaxy_bist` parameters (`N_STAR`, `W`,
`SEGS`, `N_TAP`, `NF`, `N_AGG`, `MUX_IN`). The chain length and the
read-out index width follow from them. The testbench's expected tap segments
(`TAP_SEG`) assume `SEGS = 20` and `N_TAP = 4`.
