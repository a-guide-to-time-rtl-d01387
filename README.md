# TRS: a superframe controller for time-resolved neutron diffraction

At a pulsed neutron source such as ISIS, every proton pulse is marked by a
400 ns "master pulse" at 50 Hz. The instrument's data acquisition electronics
(DAE) take each master pulse as the start of a new time-of-flight frame. In a
time-resolved experiment, a sample is driven by an external field (for
example a high voltage) that is switched in step with the source. The
interesting timescale is often longer than one 20 ms frame.

The TRS (Time ReSolved) controller sits in the master-pulse line between the
source and the DAE. It works in three main modes:

- **Superframe mode.** Only the first pulse of every N reaches the DAE, so the
  DAE records one long frame of N × 20 ms. The rest of the pulses are checked,
  but not passed on.
- **Superperiod mode.** Every pulse reaches the DAE, but the TRS still counts
  N-frame cycles.
- **Field trigger.** Each cycle start (SFC) triggers the external field output
  EFA after a programmed delay and for a programmed length.

Because the DAE accumulates over many superframes, one irregular source pulse
would smear the data. Inside a superframe, every pulse is therefore checked
against a narrow window. After a bad pulse, or a loss of the source:

- the incomplete superframe is vetoed;
- in superperiod mode, the DAE's period counter is reset;
- the field is held off;
- normal operation resumes only after the source has proved itself stable
  again.

This repository is a synthesizable SystemVerilog model of that controller. It
was rebuilt from a published description of the original FPGA design. All
logic runs on the 10 MHz master clock.

## Signal flow

```
isis ─► system control ─ISIS_INT─► superframe register ─► dae, sfc, f2p_rst_n
            │  ITP, LOAD_LL, L_CLK        ▲  IFC     │ PRE_SF, SFC
            ▼                             │          ▼
      limit generator ─LL,UL─► comparator ─┘   external field control ─► efa
                                   │ GRST, VETO             ▲
                                   ▼                        │ WDOG_A
                                 watchdog ─ WDOG_A, WDOG_B ─┘
```

The blocks and their roles:

| Module | Role |
|---|---|
| `trs_top` | Wires the blocks together. Brings out the DAE-side outputs, the register bus and a monitor struct. |
| `trs_clk_div` | Clock distribution. Produces the S_CLK (5 MHz), T_CLK (1 MHz) and R_CLK (10 kHz) enables. |
| `trs_reg_ctrl` | The five 16-bit registers and the mode-bit decode. |
| `trs_sys_ctrl` | ISIS gating, arming, the limit-generator preload and clock, and the 30 ms source-failure timer. |
| `trs_limit_gen` | The LL/UL window pulses, once per source period. |
| `trs_comparator` | Pass/fail decision per pulse, plus GRST and VETO. |
| `trs_superframe_reg` | Frame counting, PRE_SF, gating of the first pulse as SFC/DAE, mode outputs and F2P_RST. |
| `trs_efc` | Delay and length counters for EFA. |
| `trs_watchdog` | WDOG_A (dummy superframes) and WDOG_B (standby after a source loss). |
| `trs_pulse_stretch` | Helper that forms fixed-width pulses from T_CLK ticks. |
| `trs_pkg` | Register indices, control-bit struct, clock divisors, pulse widths and the monitor struct. |

## Registers

The registers are written over a 16-bit bus, one strobe per register. A
register loads on the trailing edge of its WRITE strobe. All strobes are
active low except the superframe register's, which is active high. Each
strobe passes a two-flop synchroniser, so a write takes effect three clocks
after the strobe ends. A READ strobe drives the register onto `data_out` and
raises `data_oe`.

| Address | Index | Meaning |
|---|---|---|
| 2164 | MUT | Mode bits (below) |
| 2166 | LIM | `[7:0]`: LL advance in 0.2 µs units. `[15:8]`: window width in 0.1 µs units. With a window from LWIN µs before to UWIN µs after the expected pulse, LIM = 2565·LWIN + 2560·UWIN. |
| 2168 | DLY | Field delay: (DLY+1) × 10 µs. 0 disables the field. |
| 2170 | LTH | Field length: (LTH+1) × 10 µs. 0 disables the field. |
| 2172 | SFM | Frames per superframe minus one |

Mode bits in 2164:

| Bit | Name | Effect |
|---|---|---|
| 6 | SR | Superperiod mode. Also forces LO. |
| 7 | RN | Field allowed outside a run |
| 8 | LN | Limit-generator clock always on |
| 9 | FA | Field permanently on during a run |
| 10 | MO | TRS enabled. When 0, ISIS passes straight through to the DAE. |
| 11 | IS | Inhibit ISIS |
| 12 | DO | Zero field delay |
| 13 | EO | Field trigger off |
| 14 | LO | Limit window off |
| 15 | SM | One-frame superframes |

Common values:

| Value | Mode |
|---|---|
| 0 | Bypass. This is also the state after reset. |
| 1024 | Superframes |
| 1088 | Superperiods |
| 33792 | One-frame superframes |

## How a superframe is built

1. **Preload.** The first pulse after a reset only arms system control. It
   fires LOAD_LL, which preloads the limit generator's 17-bit counter with
   LIM[7:0]. No window exists for this pulse.
2. **Window and comparator start.** Every later pulse becomes ITP and runs the
   limit-generator clock (5 MHz). The counter reaches 99999 and emits LL, a
   100 µs pulse, LIM[7:0] × 0.2 µs before the next expected pulse. It then
   restarts at 1, so LL repeats every 99999 × 0.2 µs = 19999.8 µs. That is the
   measured source period, not the nominal 20 ms. UL (150 µs) follows
   LIM[15:8] × 0.1 µs after LL rises. The window is LL-high-and-UL-low. The
   first ITP of a superframe only switches the comparator on.
3. **Checking.** An ITP inside the window sets IFC. The decision is taken when
   LL falls while UL is still high:
   - after a pass, IFC ends 90 µs later;
   - without a pass (early, late or missing pulse) the comparator raises GRST
     and VETO, each 90 µs.
4. **Counting.** The superframe register counts IFC pulses. When the count
   reaches SFM, it emits PRE_SF (10 µs). PRE_SF clears the count, switches the
   comparator off, stops the limit clock and fires a new preload.
5. **Start of the next superframe.** The trailing edge of PRE_SF opens a gate.
   The next pulse leaves as SFC and as the DAE pulse, and the gate shuts 4 µs
   later.

So with SFM = N−1, the DAE sees exactly one pulse every N frames. Because the
comparator is off between PRE_SF and the next SFC, the first pulse of a
superframe is never window-checked.

### Recovery after a bad pulse

GRST clears the count and the gate, disarms system control and sets WDOG_A.
Recovery then runs as follows:

1. The next pulse is a preload.
2. A first "dummy" superframe is counted with no SFC at its start.
3. The SFC that opens the second dummy superframe is blocked from the DAE and
   the field by WDOG_A. It clears WDOG_A 4 µs later.
4. The next SFC is a real superframe start.

With 4-frame superframes, the next DAE pulse comes 10 frames after the bad
one. Any failure during the dummies starts the sequence again.

### Source loss

System control counts R_CLK (10 kHz) and clears the count on every pulse. On
reaching 300 (30 ms) it issues IOFF, and the comparator then raises GRST.
Whether that GRST also raises VETO depends on timing:

- **Mid-superframe:** a window failure has usually already vetoed the
  superframe. The IOFF GRST vetoes it again, which is harmless.
- **Just after PRE_SF:** the superframe is complete, and VETO is suppressed.
  A flag set by PRE_SF and cleared by the next SFC does this.

The GRST that follows IOFF sets WDOG_B when it ends. WDOG_B stops ISIS_INT
(standby) and counts ISIS pulses. At the end of the 10th, WDOG_B drops. The
normal recovery (preload plus two dummy superframes) follows, so the first DAE
pulse is the 20th pulse after the source returns.

A single missing pulse leaves a 40 ms gap. That also trips the 30 ms timer,
so it is treated as a source loss.

In superperiod mode, every GRST also pulls `f2p_rst_n` low to reset the DAE's
period counter.

### Field trigger

On an SFC, the field trigger starts only if all of these hold:

- WDOG_A is low;
- DLY and LTH are both non-zero;
- MO is set;
- EO is clear.

A prescaler then counts fifty 0.2 µs ticks per 10 µs step:

- The delay counter stops after DLY+1 steps.
- START_UL then rises.
- The length counter runs LTH+1 steps.
- A 10 µs STOP_EFA follows.

The output is `efa = (run_dae | RN) & ((START_UL & ~WDOG_A) | FA)`.

## Timing and clocking choices

- **One clock.** The original uses gated and divided clocks. Here, every
  flip-flop is on `m_clk`, and the divided clocks are one-cycle enables.
  Pulse widths counted in T_CLK ticks (LOAD_LL, PRE_SF, GRST and others)
  therefore have up to 1 µs of phase uncertainty. The original dividers have
  the same uncertainty.
- **Synchronisers.** `isis` and `run_dae` pass two-flop synchronisers. `dae`
  follows the pin by 200 ns.
- **Reset.** `rst_n` is asynchronous and active low. It clears every register
  to zero, so the TRS starts in bypass.
- **Data bus.** The bidirectional bus is split into `data_in`, `data_out` and
  `data_oe`.

## Where this model departs from, or fills in, the source description

- **Register addresses.** The description is inconsistent on whether the
  superframe register is 2172 or 2174, and on which register sets the field
  length. This model uses 2172 for the superframe count and 2170 for the
  length, matching the host software's register usage.
- **Window period.** The period constant is 99999, the tuned value, although
  100000 is also quoted.
- **Comparator.** Its internal schematic was not available. Its logic is
  built from the prose: the on switch, pass capture, decision at the end of
  LL, the 90 µs tail, and the "complete" flag that suppresses VETO.
- **Invented details.** These timings are this design's own:
  - IOFF is a one-cycle strobe, and the timer runs only while armed or while a
    watchdog is set;
  - WDOG_B is tied to "a GRST that followed IOFF";
  - the 4 µs clear delays;
  - the 10 µs STOP_EFA.
- **Superperiod gate.** The superperiod DAE gate includes ~WDOG_A. The
  polarity at that gate is an assumption.
- **Not modelled.** The DAE (its ping-pong memories and 8-bit period
  counter), the high-voltage switch, the EFA line drivers, the configuration
  EEPROM and the oscillator are outside the logic. `trs_top` brings their
  signals out as ports.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. Build any of them
with plain Verilator, package first. For example:

```
verilator --binary --timing -Irtl -Itb rtl/trs_pkg.sv tb/tb_trs_top.sv \
          --top-module tb_trs_top -Mdir obj_top
obj_top/Vtb_trs_top
```

`tb_trs_top` runs the whole controller at its real sizes and timing: 10 MHz,
a 19999.8 µs source period, a 30 ms timeout and 10-pulse standby. It takes
about 3.4 s of simulated time and roughly 1.5 minutes of wall time. It covers:

- bypass;
- 4-frame superframes with a 2 ms / 10 ms field;
- late, early and missing pulses;
- a source loss inside a superframe and just after one;
- superperiod mode with F2P_RST;
- one-frame superframes;
- register read-back.

It counts each of these mechanisms and fails if any never happened.

`tb_trs_workloads` also runs at full size, on the largest settings in normal
use:
- 22-frame superframes;
- the widest window, with ±5 µs jitter on every pulse;
- a 400 ms field.

It also checks that a pulse 20 µs late is still rejected.

The block testbenches check the following:

| Testbench | Checks |
|---|---|
| `tb_trs_clk_div` | Divider rates |
| `tb_trs_reg_ctrl` | Random writes and reads, strobe polarity, decode |
| `tb_trs_sys_ctrl` | Gating, preload, ITP, IOFF at 30 ms |
| `tb_trs_limit_gen` | LL position and period (199998 cycles), widths, UL offset |
| `tb_trs_comparator` | Pass, early, late, missing, VETO suppression |
| `tb_trs_superframe_reg` | Superframe length, gate, modes, F2P_RST |
| `tb_trs_efc` | Delay and length formulas (up to the 655.35 ms maximum delay), all gating bits |
| `tb_trs_watchdog` | WDOG_A release and WDOG_B standby count |

## Parameters

`trs_top` exposes these parameters. Their defaults are the original values.

| Parameter | Default | Meaning |
|---|---|---|
| `LL_PERIOD` | 99999 | S_CLK ticks per source period |
| `IOFF_COUNT` | 300 | R_CLK ticks without a pulse before IOFF |
| `WDB_PULSES` | 10 | Pulses to leave standby |
| `EFA_STEP` | 50 | S_CLK ticks per field step |

Other pulse widths live in `trs_pkg`:

| Constant | Default | Unit |
|---|---|---|
| LL | 100 | µs |
| UL | 150 | µs |
| GRST | 90 | µs |
| PRE_SF | 10 | µs |
| LOAD_LL | 10 | µs |
