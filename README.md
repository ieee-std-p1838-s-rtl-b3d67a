# Flexible Parallel Port (IEEE P1838) — Test@First example in SystemVerilog

In a stack of dies, the external test pins reach only the first die. IEEE
P1838 gives every die a one-bit serial test port (a TAP) and, optionally, a
*flexible parallel port* (FPP). The FPP is a wider test data path that a die
can pass up to the next die, send into its own core, or turn back towards the
stack pins. It is not a fixed circuit but a template. It is built from
one-bit **lanes**, and a lane is described by the **paths** it implements
between its terminals. This repository holds that template as parameterised
RTL. It also holds one complete FPP built from it: the *Test@First* FPP of
one die, with 8 lanes up, 8 lanes down, a clock lane and a 4-bit
configuration register.

In Test@First, the parallel test data travels up the stack. At each die it
either passes through the core under test or bypasses it. It then either goes
on up to the next die or turns around and runs back down to the stack pins.
Each core is therefore tested on the data's way up, the first time the data
reaches the die.

## Lanes and paths

Every lane has the same six data terminals:

| terminal | direction | connects to |
|---|---|---|
| `FPP_PRI` | bidirectional | previous die (towards the stack pins) |
| `FPP_SEC` | bidirectional | next die |
| `FPP_TO_SIDE` / `FPP_FROM_SIDE` | out / in | another lane of the same die |
| `FPP_TO_CORE` / `FPP_FROM_CORE` | out / in | the core under test |

A non-registered lane also has the output `FPP_CLK_OUT`. A path joins one
source (`PRI`, `SEC`, `FROM_SIDE`, `FROM_CORE`) to one destination (`PRI`,
`SEC`, `TO_SIDE`, `TO_CORE`, and `CLK_OUT` in a non-registered lane).
`PRI` and `SEC` may be the source of one path and the destination of
another, but never both in the same path. A registered lane therefore has at
most 4 × 4 − 2 = 14 paths.

There are two kinds of lane:

* **Registered lanes** (`fpp_reg_lane`) carry data that may be pipelined,
  such as scan data. They have a clock input (`FPP_CLK_IN`). Each path can
  have pipeline registers, each triggered on the rising (P) or the falling
  (N) clock edge. A path can also have a bypass control that skips its
  registers. Every destination ends in a hold element.
* **Non-registered lanes** (`fpp_nonreg_lane`) carry signals that must not be
  pipelined, typically a clock. All their paths are combinational.

If a destination serves several paths, a multiplexer picks one. The
selection, the pipeline bypasses and the output enables of the `PRI` and
`SEC` drivers are all configuration bits.

### Describing a lane: the path table

A lane module is generated from one parameter, `CFG`. It is a packed array
indexed `[destination][source]` (types in `fpp_pkg`), with one descriptor
per path:

| field | meaning |
|---|---|
| `en` | the path exists |
| `mux_val` | the multiplexer control value that selects this path |
| `pl_regs` | number of pipeline registers, 0 to `MAX_PL` = 4 |
| `pl_pos` | trigger edge per stage, bit *i* = stage *i*: 1 = rising (P), 0 = falling (N) |
| `pl_bypass` | the path has a bypass control (`pl_bypass_i[d][s]`) |

The helper `fpp_pkg::reg_path(val, regs, edges, bypass)` builds one
descriptor. The UpLane, for example, is:

```systemverilog
c[DST_TO_CORE][SRC_PRI]       = reg_path(2'd0, 0, '0,      1'b0); // PRI -> TO_CORE
c[DST_SEC][SRC_PRI]           = reg_path(2'd0, 1, 4'b0001, 1'b0); // PRI -> P reg -> SEC   (select 0)
c[DST_SEC][SRC_FROM_CORE]     = reg_path(2'd1, 0, '0,      1'b0); // FROM_CORE -> SEC      (select 1)
c[DST_TO_SIDE][SRC_PRI]       = reg_path(2'd0, 1, 4'b0001, 1'b0); // PRI -> P reg -> TO_SIDE
c[DST_TO_SIDE][SRC_FROM_CORE] = reg_path(2'd1, 0, '0,      1'b0); // FROM_CORE -> TO_SIDE
```

At run time each destination `d` has a 2-bit control word `mux_ctrl_i[d]`.
The path whose `mux_val` equals that word drives the destination. A
destination with a single path has no multiplexer, and a destination with no
path drives 0. Elaboration stops with an error for a path table that has a
`PRI→PRI`/`SEC→SEC` path, more than `MAX_PL` registers on a path, or two
paths into one destination with the same select value.

The bidirectional terminals are split into `*_i`, `*_o` and `*_oe_o`. The
tri-state micro-bump or TSV driver is left to the pad level. `pri_oe_o` and
`sec_oe_o` copy the configuration bits `pri_oe_i` and `sec_oe_i` when the
terminal is a destination of the lane, and are 0 otherwise.

## Timing: pipeline edges and lock-up latches

This is the part that most needs care when you change or connect the design.

**Hold element.** Every destination of a registered lane passes through
`fpp_lockup_latch`. This latch is transparent while the lane clock is low and
closed while it is high. A value launched at a rising edge therefore appears
at the terminal only after the next falling edge. It then stays stable
through the following rising edge, where the next die samples it. That gives
half a clock period of hold margin on the inter-die wire, which is the point
of the latch: clock skew between dies cannot cause a race. Outputs of
registered lanes change only while the clock is low.

**Latency.** Let cycle *k* run from rising edge *k* to rising edge *k+1*,
and let source values change early in the cycle. Sampled just before rising
edge *k+1*, a destination shows:

| path | value at the end of cycle *k* |
|---|---|
| no registers | source of cycle *k* (it passed the latch while the clock was low) |
| one P register | source of cycle *k−1* |
| *n* P registers | source of cycle *k−n* |
| one N register | source of cycle *k* (taken at the falling edge, then through the open latch) |
| bypassed path | source of cycle *k* |

More generally, count time in half cycles, with rising edge *k* at 2*k* and
falling edge *k* at 2*k*+1. A P stage takes its value at the next even time
and an N stage at the next odd time. The latch then passes whatever was
launched before the last falling edge. The lane testbench computes its
expected values with exactly this rule.

**Non-registered lanes** have no latch and no register. In the clock lane,
`FPP_CLK_OUT` and `FPP_SEC` are copies of `FPP_PRI`.

## The Test@First die (`fpp_test_at_first`)

```
              TestClock ──► ClkLane ──► FppClock (clock of both channels)
                                  └───► TestClock_UP ──► next die  (enable SEC_UP_OE)

 PRI_UP[7:0] ──► UpChannel (8 × UpLane) ──► SEC_UP[7:0] ──► next die  (enable SEC_UP_OE)
                   │   ▲          │
           TO_CORE ▼   │ FROM_CORE│ LaneConn[7:0]
                  core under test ▼
 PRI_DOWN[7:0] ◄── DownChannel (8 × DownLane) ◄── SEC_DOWN[7:0] ◄── next die
   (enable PRI_DOWN_OE)

 TAP ──► configuration register {PRI_DOWN_OE, SEC_UP_OE, TURN, BYPASS}
```

| lane | destination | select | source | registers |
|---|---|---|---|---|
| UpLane | `TO_CORE` | — | `PRI` | 0 |
| | `SEC`, `TO_SIDE` | `!BYPASS` = 0 | `PRI` | 1 (P) |
| | | `!BYPASS` = 1 | `FROM_CORE` | 0 |
| DownLane | `PRI` | `!TURN` = 0 | `FROM_SIDE` (LaneConn) | 0 |
| | | `!TURN` = 1 | `SEC` | 1 (P) |
| ClkLane | `CLK_OUT`, `SEC` | — | `PRI` | — |

Configuration bits (`fpp_pkg::taf_cfg_t`; bit 0 first):

| bit | name | effect |
|---|---|---|
| 0 | `BYPASS` | 1: PRI_UP is registered and sent on, and the core is skipped; 0: the core's scan output FROM_CORE is sent on |
| 1 | `TURN` | 1: PRI_DOWN returns the up data of this die (LaneConn); 0: PRI_DOWN carries SEC_DOWN from the next die |
| 2 | `SEC_UP_OE` | drives SEC_UP and TestClock_UP to the next die |
| 3 | `PRI_DOWN_OE` | drives PRI_DOWN to the previous die |

`TO_CORE` always follows `PRI_UP` through its latch, so the core sees the
incoming data whenever it is in the path. The data goes "on" over two
connections: `SEC_UP` (up to the next die) and `LaneConn` (to the down
channel). `TURN` decides which of the two the down channel uses.

**Latency through a stack**, in test clock cycles, from PRI_UP of the bottom
die to PRI_DOWN of the bottom die, when the path turns in die *t*:

```
  sum over dies 0..t of ( BYPASS ? 1 : length of that die's core scan chain )  +  t
```

The final `+ t` is the DownLane register of each die below the turning die.

### Connecting dies

Connect SEC_UP and TestClock_UP of die *d* to PRI_UP and TestClock of die
*d+1*, and PRI_DOWN of die *d+1* to SEC_DOWN of die *d*. A die's clock
reaches the next die only while `SEC_UP_OE` is set. Every die below the
turning die needs `SEC_UP_OE = 1`, `TURN = 0` and `PRI_DOWN_OE = 1`. The
turning die needs `TURN = 1` and `PRI_DOWN_OE = 1`.

### Configuration register (`fpp_config_reg`)

This register is a test data register of the die's TAP. The TAP controller
itself is not included. Its strobes are ports: `cfg_select_i` (the
instruction selects this register), `capture_dr_i`, `shift_dr_i` and
`update_dr_i`, all sampled on `tck_i`.

* Capture-DR (rising TCK): the shift stage loads the current configuration.
* Shift-DR (rising TCK): one bit per clock, from `tdi_i` towards `tdo_o`. Bit
  0 (`BYPASS`) sits next to TDO, so it is shifted out first and the new bit 0
  is shifted in first.
* Update-DR (falling TCK): the configuration takes the shifted word.
* `trst_ni` low clears both stages. After reset the core is in the path,
  nothing turns, and all drivers are off.

The lanes keep their configuration while a new word is being shifted.

## Files

| file | content |
|---|---|
| `rtl/fpp_pkg.sv` | terminal codes, path descriptor types, the UpLane/DownLane/ClkLane tables, Test@First configuration layout |
| `rtl/fpp_lockup_latch.sv` | hold element, a latch on the inverted clock |
| `rtl/fpp_path_pipe.sv` | pipeline of one path: *N* stages with P/N edges, optional bypass |
| `rtl/fpp_reg_lane.sv` | registered lane generated from a path table (default UpLane) |
| `rtl/fpp_nonreg_lane.sv` | non-registered lane generated from a path table (default ClkLane) |
| `rtl/fpp_reg_channel.sv` | `LANES` identical registered lanes with shared clock and configuration |
| `rtl/fpp_config_reg.sv` | TAP test data register holding the configuration bits |
| `rtl/fpp_test_at_first.sv` | top: the Test@First FPP of one die (`LANES` = 8) |
| `tb/tb_*.sv` | one self-checking testbench per module |

To build another FPP, write its path tables (see `up_lane_cfg()` in
`fpp_pkg`). Instantiate `fpp_reg_channel` and `fpp_nonreg_lane` with them,
and drive their `mux_ctrl_i`, `pl_bypass_i` and output enable inputs from
configuration bits. A control that is an inverted bit, like `!BYPASS`, is
inverted where it is wired, as in `fpp_test_at_first`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl +libext+.sv -Irtl rtl/fpp_pkg.sv tb/tb_fpp_test_at_first.sv \
  --top-module tb_fpp_test_at_first -Mdir obj_top
./obj_top/Vtb_fpp_test_at_first
```

Replace the testbench name to run the others. Each runs in well under a
second. The testbenches do not depend on initial values; for random start
values add `+verilator+rand+reset+2` at run time.

What the testbenches establish:

* **`tb_fpp_test_at_first`**: three dies at the default size (8 lanes),
  stacked. Each die's core is modelled as a scan chain per lane, of lengths
  2, 3 and 1. The dies are configured through their TAP-side ports. A random
  word per cycle goes into the bottom die, and the returning stream is
  compared with the latency formula above. Six configurations are run: the
  turn in each die, cores bypassed, cores tested, and mixes of the two. The
  testbench also checks the output enables, the configuration readback on
  TDO, and the test clock reaching the top die. It counts each mechanism
  and fails if one never occurred.
* **`tb_fpp_reg_lane`**: four lanes on one random stream: the UpLane, the
  DownLane, a lane with a four-way multiplexer, and a lane with all 14 paths.
  These cover 0 to 4 registers in mixed edge orders and bypasses. Expected
  values come from the half-cycle rule above. The testbench also checks
  before every falling edge that outputs hold.
* **`tb_fpp_path_pipe`**, **`tb_fpp_lockup_latch`**, **`tb_fpp_nonreg_lane`**,
  **`tb_fpp_reg_channel`**, **`tb_fpp_config_reg`**: each unit's own
  behaviour. This includes edge order, bypass, transparency and hold,
  per-lane independence, the shift/update order, unselected accesses and
  asynchronous reset.

Simulation is cycle-based and has no delays. It shows the order of events
(a latch opens on the falling edge and a register takes its value on the
rising edge), not timing margins.

## What follows the standard and what is this design's own

These follow the P1838 FPP lane template and the published Test@First
example:

* the six terminals plus `FPP_CLK_OUT`, and the path rules;
* pipeline registers with per-stage P/N edges and an optional bypass;
* a hold element at every destination of a registered lane;
* multiplexers selected by configuration bits, and output enables for
  `PRI`/`SEC`;
* channels of identical lanes;
* the UpLane, DownLane and ClkLane path tables;
* the four configuration bits and their use (`!BYPASS`, `!TURN`,
  `SEC_UP_OE`, `PRI_DOWN_OE`);
* the eight-lane channels joined by LaneConn.

These are choices made here:

* **The path table is an elaboration parameter.** The FPP description
  language turns a text specification into a netlist with a software
  generator; here the same information is a SystemVerilog parameter.
  `MAX_PL` = 4 registers per path and `MUX_W` = 2 control bits per
  destination are limits of this implementation.
* **Pipeline registers are private to each path.** The standard allows
  paths to share registers, but that is not implemented. In the UpLane the
  `PRI→SEC` and `PRI→TO_SIDE` registers are therefore separate; they hold
  the same value, and synthesis may merge them.
* **The hold element is always a latch on the inverted clock.** The standard
  only requires *a* hold element and gives this latch as its example.
* **No reset in lanes.** Pipeline registers and latches have no reset; they
  are flushed by clocking data through.
* **Configuration register.** Its structure (1149.1-style shift plus update
  stage), bit order and reset value (all zero) are choices made here.
* **Unmatched selection.** A control word that matches no path selects 0.
* **Output enables stay configurable.** The example uses `PRI`/`SEC` in one
  direction only, so its enables could be tied to 1 and their two
  configuration bits dropped. That simplification is not applied: both bits
  remain.

Not included:

* the TAP controller and the rest of the serial control mechanism;
* the die wrapper register;
* the tri-state pad drivers;
* the Test@Last variant, in which the core is accessed on the data's way
  down.

## Tool notes

Verilator may print `NOLATCH` for `fpp_lockup_latch` when the latch enable
is also the clock of flip-flops in the same lane. Synthesis does infer a
latch there, one per used destination. The non-registered lane in its
default ClkLane form is pure wiring, so a synthesis report lists all its
outputs as wired to inputs. Its multiplexers appear only for path tables
where several paths share a destination.
