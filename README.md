# Pre-bond TSV delay test through IEEE 1500 wrapper cells

Before dies are stacked, each through-silicon via (TSV) can be reached from
one end only. Its far end is a bare pad that should not be probed. A defect
in the via still shows from the near end: it changes how long the via's
driver takes to charge or discharge it. A pin-hole in the oxide leaks to the
substrate. It slows charging and speeds discharging. A void or an open hides
part of the via's capacitance, so both transitions get faster.

This RTL finds such defects with the die's IEEE 1500 wrapper and no extra
test pins. Each wrapper cell on a TSV gets a small feedback path. With that
path closed, the cell's storage element, the TSV driver and the TSV form a
ring with a single inversion. Two fast clock edges then launch a transition
onto the via and capture the via's node one clock period later. A fault-free
via swings in time and the cell gets its loaded pattern back. A slow via
does not swing in time and the cell gets the complement. All TSV cells do
this at once, and the results are shifted out as ordinary scan data.

A high test clock is hard to generate, so the tx-TSV drivers are made
tunable. During the test they drive weakly, which stretches the via's
transition time. A slower test clock can then tell a good via from a bad
one.

The method comes from the paper *Efficient Pre-Bond Testing of TSV Defects
Based on IEEE std. 1500 Wrapper Cells*. This RTL is an independent
implementation of it. Where the paper leaves something open, the choice made
here is marked below.

## Structure

```
prebond_die                 top: one unbonded die, wrapper + its TSVs
├── tsv_wrapper             IEEE 1500 wrapper (synthesizable)
│   ├── wir                 instruction register + decoder (TSV_TEST -> VTE)
│   ├── WBY                 one bypass flip-flop (inline)
│   └── WBR chain, WSI -> WSO:
│       ├── wc_sd1_cii      x N_STD  standard basic cell, non-TSV terminals
│       ├── tsv_wc_in       x N_RX   basic cell on a receive TSV
│       ├── tsv_wc_out      x N_TX   basic cell on a transmit TSV
│       ├── tsv_wc_sd2_in   x N_RX2  two-storage cell on a receive TSV
│       └── tsv_wc_sd2_out  x N_TX2  two-storage cell on a transmit TSV
└── tsv_model               one per TSV: driver strength + via load (behavioural)
tsv_pkg                     opcodes, cell control struct, defect enum, timing table
```

The default sizes are 2 standard cells, 4 + 4 basic TSV cells and 2 + 2
two-storage TSV cells. They are this design's own numbers, because the paper
fixes none. `tsv_wrapper` is plain synthesizable logic.
`prebond_die` is not synthesizable, because it contains the behavioural
via models. In silicon those models are the drivers and the vias themselves.

### Ports

`prebond_die` has the wrapper serial port (`wrck`, `wrstn`, `select_wir`,
`shift_wr`, `capture_wr`, `update_wr`, `wsi`, `wso`) and `vte`, which is high
while TSV_TEST is loaded. It also has the core-side terminals of the cells:
`std_cfi/std_cfo`, `rx_cfo`, `tx_cfi`, `rx2_cfo` and `tx2_cfi`. The TSVs have
no ports, because before bonding nothing outside the die can reach them.

Inside, every tri-state TSV node is split into three plain signals. These
are the value the cell drives (`*_tsv_drv`), a drive enable or strength
select (`*_tsv_drv_en` or `*_tsv_weak`), and the sensed node (`*_tsv_in`).
The split keeps the design two-state.

## The augmented cells

### Basic cell, one storage element

The standard basic cell `wc_sd1_cii` has one flip-flop, SC:

```
m0 = ShiftWR ? CTI : CFI          SC <= m0 on WRCK rise while shifting or capturing
CFO = mode ? SC : CFI             CTO = SC
```

**Receive TSV (`tsv_wc_in`).** The TSV is on CFI. The cell adds a test
inverter that VTE enables. It drives `~SC` back onto the TSV node. The
capture input of m0 already senses that node, so the ring is:
SC → inverter → TSV → m0 → SC. On the functional side the node reaches CFO
through an inverting receiver. This matches the inverting tx driver, so data
crosses a bonded TSV pair with its true polarity.

**Transmit TSV (`tsv_wc_out`).** The TSV hangs on CFO, behind the functional
driver, which is an inverter. The cell adds a mux in front of m0's capture
input. It selects CFI when VTE = 0 and the TSV node when VTE = 1. The ring is:
SC → m1 → inverting driver → TSV → VTE mux → m0 → SC. Under VTE the cell
also raises `tsv_weak`, which switches the tunable driver to its weak half.

**What two fast edges do.** Take pattern `p`, shifted into SC while VTE is
already on. The slow shift clock leaves time for the TSV node to settle at
`~p`.

| moment                     | SC            | TSV node                           |
|----------------------------|---------------|------------------------------------|
| after shift                | `p`           | `~p` (settled)                     |
| fast edge 1 (launch)       | `~p`          | starts swinging to `p`             |
| fast edge 2, one period on | `p` if node arrived, else `~p` | —                 |

So the result equals the pattern for a via that swings within one test clock
period. It is the complement for a slower via. Pattern `1` tests the
charging transition and pattern `0` the discharging one.

### Two-storage cells

For cells with a shift/capture flip-flop F0 and an update flip-flop F1, the
paper gives only equations, not a schematic. The two flip-flops are used as
a launch/capture pair, with no inverter needed:

```
rx (tsv_wc_sd2_in):   F0 <= Shift ? CTI : TSV      TSV driven with F1 while VTE (tri-state buffer)
tx (tsv_wc_sd2_out):  F0 <= Shift ? CTI : (VTE ? TSV : CFI)
                      TSV = buffer(mode ? F1 : CFI), weak while VTE
both:                 F1 <= F0 on WRCK rise with UpdateWR
```

The launch comes from F1, so F1 must first hold the complement of the
pattern:
1. Shift `~p`.
2. Update.
3. Shift `p`.
4. Give the two fast edges with both CaptureWR and UpdateWR active. Edge 1
   copies `p` into F1, which launches it. Edge 2 captures the node into F0.

The second update at edge 2 does no harm. The result is read from F0. The
basic cells ignore UpdateWR, so one chain can hold both cell kinds and they
are all tested together.

## Test procedure

The wrapper decodes three instructions. The WIR is 3 bits, loaded LSB first.
The opcodes are this design's own.

| opcode | name      | mode | VTE | WSI→WSO through |
|--------|-----------|------|-----|-----------------|
| 000    | WS_BYPASS | 0    | 0   | bypass bit      |
| 001    | WS_EXTEST | 1    | 0   | WBR             |
| 010    | TSV_TEST  | 1    | 1   | WBR             |

Other opcodes act as WS_BYPASS. A TSV test runs as follows:

1. Load TSV_TEST. This sets VTE in every cell.
2. Load the charging pattern (all ones). Two-storage cells get the
   complement-update-pattern preload described above.
3. Give two WRCK edges at the fast test clock, with CaptureWR (and UpdateWR)
   high.
4. Shift the results out while shifting in the discharging pattern (all
   zeros).
5. Give two fast edges again.
6. Shift the results out.

A TSV passes a step if its cell returns the pattern. With `NC` cells, one
complete test takes 5·NC + 6 WRCK edges: two shifts and one update per
pattern, two fast edges per pattern, and one final unload.

**Test window.** A good via must swing within a window: slower than tL and
faster than tH. A slow defect, such as a pin-hole on charging, fails the test
run at period tH. A fast defect, such as a void, an open, or a pin-hole on
discharging, is caught by running the same procedure at a shorter period tL.
There a good via must fail, so a via that passes is too fast. The
testbenches use tH = 877 ps (1.14 GHz) and tL = 700 ps. The paper does not
give a value for tL.

The fast WRCK pulses would come from an on-chip PLL, such as one already
present for memory BIST. That PLL is not part of this RTL. The testbenches
drive WRCK directly.

## Drive strength and test clock

The paper's HSPICE results give the test clock at which a fault-free via of
50.9 fF (30 µm long, 2 µm wide, 120 nm oxide) is just caught, for each
driver strength:

| strength | x1  | x2    | x4    | x8    | x16   |
|----------|-----|-------|-------|-------|-------|
| MHz      | 400 | 1,140 | 1,850 | 2,650 | 3,250 |
| period   | 2500 ps | 877 ps | 541 ps | 377 ps | 308 ps |

The design's test setting is x2 at 1.14 GHz. At that setting a 50 fF via is
captured and vias of 55 to 70 fF are not. In normal operation both halves of
the tunable driver are on. This design assumes that gives x4. The rx test
drivers are fixed at x2.

## The via model (`tsv_model`) and how far to trust it

The via is a digital node with an *inertial* delay. After the drive changes,
the node follows only once the transition time has passed without a further
change. A shorter pulse is lost, just as a partly charged via falls back when
the drive reverses before the threshold is crossed. The transition time is:

```
t = 0.95 × period(strength) × C / 50.9 fF
```

It is then scaled for the defect class:
- pin-hole: rise ×3/2, fall ×1/2
- void: ×2/3
- open: ×1/3

The 0.95 calibration and the defect factors are this design's own. The paper
gives only the table above, the 50/55 fF result at 1.14 GHz, and the
*direction* in which each defect moves each transition. The model ignores
the via's resistance (about 0.2 Ω), setup and clock-to-Q times, supply and
threshold variation, and the actual analog waveform. It is good enough to
show that the digital test logic makes the right decision for a via that is
"in time" or "late". It does not predict real silicon margins.

## Choices this design makes where the paper is silent

- **m0 and m1 selects.** The cell schematics label the mux inputs but not the
  selects. m0 is steered by ShiftWR and m1 by `mode`.
- **Clock enable.** SC loads only while shifting or capturing. The
  schematic shows no hold path.
- **Reset.** All flip-flops reset asynchronously on WRSTN low. The WIR
  resets to WS_BYPASS.
- **Instructions.** The paper names TSV_TEST. WS_BYPASS, WS_EXTEST and the
  one-bit bypass register are added so the wrapper behaves as IEEE 1500
  expects.
- **Receive path.** The rx basic cell's functional path to CFO inverts,
  following the receiver drawn in the cell schematic. The two-storage cells
  use non-inverting buffers.
- **Update edge.** Updates happen on the rising WRCK edge, not on the falling
  edge that many IEEE 1500 cells use.
- **Chain order.** WSI → standard → rx → tx → rx2 → tx2 → WSO.
- **Not modelled.** Bidirectional TSV cells, cross-talk and bridge faults
  between vias, and Monte Carlo variation are outside this RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. To build and run one
with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/tsv_pkg.sv \
          tb/prebond_die_tb.sv --top-module prebond_die_tb -Mdir obj
./obj/Vprebond_die_tb
```

| testbench              | what it shows |
|------------------------|---------------|
| `wc_sd1_cii_tb`, `tsv_wc_in_tb`, `tsv_wc_out_tb`, `tsv_wc_sd2_in_tb`, `tsv_wc_sd2_out_tb` | Random controls against a reference model. Then the launch/capture ring with a via that is faster and one that is slower than the test period. |
| `wir_tb`               | Every opcode, decoding, hold without update, and reset. |
| `tsv_wrapper_tb`       | Bypass, EXTEST drive and capture, and a TSV_TEST run with ideal vias. |
| `tsv_model_tb`         | Measured rise and fall times, the 1.14 GHz 50/55 fF split, pulse rejection, and a floating node. |
| `prebond_die_tb`       | Full test at tH and tL on a die with a pin-hole, a void, an open and 50–70 fF vias. It checks the diagnosis and counts every mechanism: charge and discharge tests, slow and fast detections, two-storage launch, functional mode, EXTEST and strong drive. |
| `prebond_die_full_tb`  | The top at default parameters. All 12 nominal vias pass at 1.14 GHz and none at tL. It also checks the WRCK edge count. |
| `strength_sweep_tb`    | Five dies at x1 to x16, each at its own test clock: 50.9 fF passes and 55 fF fails. The x1 die fails at 1.14 GHz. |

To build a die with faults, override the top's packed parameter arrays.
Element 0 of each array is the rightmost:

```
prebond_die #(.N_TX(5), .TX_CAP_DFF({16'd700, 16'd650, 16'd600, 16'd550, 16'd500}),
              .RX_DEFECT({TSV_OPEN, TSV_VOID, TSV_PINHOLE, TSV_OK})) dut (...);
```

Capacitances are in units of 0.1 fF. `TX_WEAK_X` and `RX_TEST_X` select the
test drive strength (1, 2, 4, 8 or 16). The testbench must then use the
matching clock period from the table above.
