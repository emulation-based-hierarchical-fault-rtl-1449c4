# Hierarchical fault injection for approximate hardware

Image and vision accelerators often tolerate a few wrong bits: a disparity map with
a handful of bad pixels still steers a robot correctly. To decide which parts of
such an accelerator deserve hardening, one has to inject single event upsets
(SEUs, one flipped flip-flop) into it while it processes long real input
streams, and watch what happens at the output. Simulation is far too slow for
that; this RTL does it in hardware, next to the circuit under analysis (CUA), at
full speed and without a host computer or a stored fault list.

The key idea is that the CUA is treated as a hierarchy of memory elements:

    system  >  component  >  register  >  bit

and faults can be confined to any level. A campaign starts coarse (faults
anywhere, or per component), finds which components matter, marks the others
resilient, and goes down to registers and finally single bits only where it
pays. Every fault location is drawn on the fly from LFSRs according to one of
two probability models.

## Parts

| module | role |
|---|---|
| `hfi_pkg` | mode and scheme enums, LFSR tap table, default register map |
| `hfi_map.svh` | constant functions that derive offsets and counts from a register map |
| `lfsr` | maximal-length LFSR, 2..32 bits |
| `ser_ctrl` | soft-error-rate control: when to inject (`fi`, the fault_inject pulse) |
| `cw_sel` | component-weighted location draw |
| `bw_sel` | bit-weighted location draw |
| `target_ctr` | the component / register / bit under analysis, with skip masks |
| `fim` | the mechanism: the four parts above plus the injectC / injectR decoders |
| `fi_reg` | fault-injectable register: every register of the CUA is one of these |
| `oa_unit` | obstacle-avoidance decision unit (eight accumulators, one comparator) |
| `err_mon` | compares faulty and fault-free outputs |
| `hfi_top` | emulation set-up: mechanism, two OA units, comparison |

## The register map

Every selection module receives the CUA's structure as parameters:

- `NC`, `NR`: number of components and registers;
- `REG_W[r]`: width of register `r` (16-bit field of a packed array);
- `REG_C[r]`: component of register `r`.

Registers are numbered globally and those of one component must be contiguous.
All flip-flops are also numbered 0..TOTAL-1, register after register; `hfi_map.svh`
derives each register's first flip-flop, each component's first register,
register count and size at elaboration time.

The default map is that of the evaluated system: a disparity-estimation (DE)
kernel of 12 components followed by the obstacle-avoidance (OA) unit, 1813
registers and about 130,000 flip-flops in all. How the DE kernel's registers are
split between its components and how wide each is is not known, so the default
spreads the 1805 DE registers evenly (150 or 151 per component, 72 bits each) and
adds the OA unit's eight 22-bit accumulators as component 12: 130,136 flip-flops.
For a real CUA, replace the map with its actual register list.

## Where a fault lands: the two probability models

Both selectors draw a complete location (component, register, bit) every cycle
from free-running LFSRs; `fim` samples whichever the `scheme` input picks.

**Component-weighted (`cw_sel`).** First a component uniformly, then a register
uniformly among that component's registers, then a bit uniformly in that
register:

    P(flip-flop) = 1/NC * 1/NR(c) * 1/NB(r)        P(component) = 1/NC

Every component gets the same share of faults whatever its size, so the result
ranks components by what they do, not by how big they are.

**Bit-weighted (`bw_sel`).** One LFSR draws a flat flip-flop number; a bank of
range comparators (one per register boundary) turns it into register, bit and
component. Every flip-flop is equally likely, so a component is hit in proportion
to its size:

    P(flip-flop) = 1/TOTAL                         P(component) = bits(c)/TOTAL

This is the scheme to use for ranking individual registers across the whole
design, because the component-weighted one over-rates small components and
under-rates large ones.

**Mapping a draw onto n choices.** An LFSR of k bits gives 1..2^k-1, never zero, so
taking "LFSR mod n" or an LFSR exactly log2(n) long would favour some choices
(and, for n a power of two, never pick the last one). Each level therefore uses
an LFSR `EXTRA` (8) bits longer than log2 of its largest count and maps the draw
`u` by multiply-shift, `index = (u * n) >> K`. The shares are equal to within
2^-8 relative and every draw is valid, so no retry cycles are needed. `n` is
looked up per draw: the register count of the chosen component, the width of
the chosen register, or the size of the current scope.

Each level of `cw_sel` has its own LFSR (component, register, bit); `bw_sel` has
a single one.

## Analysis modes and the target counter

| mode | faults go to | fixed by `target_ctr` |
|---|---|---|
| `MODE_SYSTEM` | any flip-flop of the map | nothing |
| `MODE_COMPONENT` | any flip-flop of one component | component |
| `MODE_REGISTER` | any flip-flop of one register | component, register |
| `MODE_BIT` | one flip-flop | component, register, bit |

In `bw_sel` the mode sets the scope of the flat draw (whole map, the target
component's flip-flops, or the target register's). In `cw_sel` the fixed levels
simply replace the LFSR draws.

`target_ctr` holds the target. `load` sets it. `step` advances the finest fixed
level, carrying bit to register to component and wrapping at the end of the
map (`wrapped` pulses). The `skip_c` and `skip_r` masks mark components and
registers already found resilient. The counter moves past them one position per
cycle, with `ready` low. A fault that arrives in that time is dropped. This is
the coarse-to-fine exclusion: after a component-level campaign, set `skip_c` for
the harmless components, and a register-mode sweep with `step` visits only the
registers that matter.

## When a fault is injected: `ser_ctrl`

A slot counter divides time into slots of `period` cycles; the first enabled
cycle is a slot. At each slot a 20-bit LFSR is compared with the `rate`
threshold and `fi` fires when `lfsr <= rate`. The probability per slot is
`rate / (2^20 - 1)`. The evaluated range of 0.0144 % to 2.10 % is thresholds 151
to 22020; 0.1298 % is 1361. Rates are per slot, which is per clock cycle with
`period` = 1. A different time base, such as per frame, is made by setting
`period`. `rate = '1` with a long `period` gives exactly one fault per slot,
which suits bit mode.

## How a fault travels: timing

    cycle t     ser_ctrl raises fi
    cycle t+1   fim raises inject_c[c], inject_r[r] (one-hot) and inject_bit, and
                logs the location on inj_valid / inj_c / inj_r / inj_b
    cycle t+2   register r of component c holds its value with that bit inverted

Each strobe lasts one cycle. Every fault is in place two cycles after `fi`. The
location log lets an outside recorder attribute output errors to registers.

## The fault-injectable register

`fi_reg` is an enabled register with one 2-to-1 multiplexer in front. Normally it
stores `en ? d : q`. When `inj` (the AND of its component's `inject_c` and its own
`inject_r`) is high, it stores that same word XOR a one-hot mask of `inj_bit`.
This is the state an upset leaves just after the clock edge. A flip never
delays or replaces the functional write. Every register of the CUA must be
built from this cell, at the cost of one multiplexer level on its input path.
A bit index at or above the width flips nothing.

## The emulation set-up: `hfi_top`

Two copies of the system run in lockstep on the same input. Only one of them
gets faults. The system is a DE kernel followed by the OA unit.

- **DE kernel** (12 components: address generator, scan-line buffer,
  serial-in/parallel-out register structure, two pixel-cost units, box filter,
  winner-takes-all, two multipliers, summation unit, two synchronisers). Its
  internals are not part of this RTL. Both copies sit outside `hfi_top`. Their
  disparity streams come in on `gold_*` and `test_*`, with `frame_end` on the
  last pixel. The faulty copy takes `de_inject_c`, `de_inject_r` (global register
  numbers 0..1804) and `inject_bit`.
- **OA unit** (`oa_unit`, inside): the frame is cut into eight vertical strips.
  Each strip's disparities are summed in its own accumulator, so there are eight
  adders. After the frame, one comparator scans the eight sums in eight cycles.
  The strip with the smallest sum has the farthest content, and its index is the
  direction. `oa_gold` gets the fault-free stream. `oa_test` gets the faulty one,
  and its accumulators are component 12 of the map. A frame must be followed by
  at least 9 idle cycles (blanking); an assertion flags violations.
- **Comparison** (`err_mon`): counts differing pixels per frame (`frame_err` out of
  `frame_pix`, the affected-pixel share), frames with any error, and frames whose
  two decisions differ (`wrong_decisions`).

Defaults: 640 x 480 frames, 6-bit disparities, 13 components, 1813 registers,
20-bit rate threshold. No top parameter changes the map format. `DE_NC`, `DE_NR` and
`DE_REG_W` resize the DE part of the map.

## How far to trust it, and where it departs from the source description

Taken from the described framework:

- the four sub-mechanisms (rate, component, register and bit selection);
- the counter / LFSR / decoder structure;
- the four modes;
- both probability models and their formulas;
- the range decode of the bit-weighted draw;
- one multiplexer per register and injection within two cycles;
- the golden/faulty comparison;
- affected pixels and wrong decisions as the measures;
- the OA unit's eight registers, eight adders and comparator;
- the system size.

This design's own choices:

- **LFSR length.** Each LFSR is log2(count) + 8 bits with multiply-shift
  scaling, not exactly log2(count). The reason is given above.
- **Component-weighted draw.** Component, register and bit each have their own
  LFSR.
- **Rate encoding.** The threshold encoding, the slot counter and the reading
  of rates as per-slot probabilities are not given by the source.
- **Targets.** How targets are stepped, and the skip masks for excluded
  components and registers.
- **Default map.** The split of registers over components and the register
  widths in the default map.
- **OA decision rule.** The strip split, the smallest-sum rule, and the
  sequential scan with its blanking requirement.
- **Sizes.** Frame size, disparity width, 16-bit bit index and 32-bit counters.

Not provided:

- the DE kernel itself (only the names of its components are known);
- the FPGA board and camera;
- any software that turns the counters into criticality charts.

The unit tests check the probability models statistically on a small,
uneven map: shares within 15 % of the formula over 40,000 draws. They are not a
proof of exact uniformity.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, from the folder that holds
`rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/hfi_pkg.sv \
        tb/fim_tb.sv --top-module fim_tb -Mdir obj_fim
    ./obj_fim/Vfim_tb

The same works for each `tb/<module>_tb.sv`. `hfi_pkg.sv` must come first, and
`-y rtl` finds the rest. The testbenches:

- `lfsr_tb`: full period at six widths.
- `ser_ctrl_tb`: the pulse rate at 2.10 % against a 6-sigma band, and the slot
  spacing.
- `cw_sel_tb` and `bw_sel_tb`: the distributions in all four modes.
- `target_ctr_tb`: stepping, carries, wrap and skips.
- `fi_reg_tb`: random writes and flips against a model.
- `fim_tb`: a bank of `fi_reg`s. Checks the 1-cycle strobe and 2-cycle flip
  latencies, one-hot decode, both schemes and target confinement.
- `oa_unit_tb`: sums, decisions, latency, and a flipped accumulator bit that
  changes the decision.
- `err_mon_tb`: the counters.

End to end:

- **`hfi_top_tb`** runs a 64 x 8 frame. The testbench stands in for the DE
  kernels: each fault in DE component c corrupts the next 1 + c mod 4 faulty
  pixels. It runs six frames, one campaign each:
  1. system mode, component-weighted;
  2. system mode, bit-weighted;
  3. component mode on the OA unit;
  4. register mode on a DE register;
  5. bit mode on the top bit of the free strip's accumulator, which must produce
     a wrong decision;
  6. a target step over skipped components.

  It checks both decisions against a model of the accumulators, the affected
  pixels, and that every mechanism occurred.
- **`hfi_top_full_tb`** runs the same six frames at the default size (640 x 480,
  full 1813-register map) at the 0.0144 % rate. It takes about 10 seconds.
- **`hfi_campaign_tb`** runs the analysis flow on 160 x 120 frames with the
  full map:
  - Component level: each of the 13 components in turn, with both schemes, at
    0.0144 %, 0.1298 % and 2.10 %.
  - Register level: each OA accumulator at 2.10 %.

  It prints affected pixels and wrong decisions per target, which is the raw
  data of a criticality chart. It checks that faults stay in the target and that
  the fault count per rate lies within 6 sigma of the expected count. About 10
  seconds.
