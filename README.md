# Completion-detection timing error detection and correction

A processor run at near-threshold voltage needs a large timing margin to
cover process, voltage and temperature variation. Most of that margin can be
recovered if late signals are detected and corrected at run time. The usual
way to detect them is double sampling: a shadow latch re-samples each
endpoint shortly after the clock edge. That approach has a cost. Every
monitored path must then be slower than the re-sampling window, which means
hold-time padding, and a detected error needs a replay or rollback.

This circuit does the detection differently. It watches the critical gates
themselves, not the endpoints. A short time before each system clock edge,
it checks whether any of those gates is still switching. If one is, the
pending edge is dropped. The datapath gets one whole extra clock period, the
late value is never captured, and nothing has to be corrected afterwards.
The check happens before the edge, so a path that switches right after the
edge is never seen and needs no hold padding.

The RTL covers the detection and correction circuit at its full size: 1000
monitored gates, a 3-stage tree of 10-input dynamic OR gates, a programmable
evaluation pulse and the root clock gate. The processor it protects is a
RISC-V RV32IM core. That core is not part of this RTL. Its monitored nets
and its clock are ports of the top module `cd_edac_top`.

## How one clock cycle works

```
 crit_node[999:0] ──► td_cell x1000 ──► dyn_or x100 ──► dyn_or x10 ──► dyn_or ──► ERROR ──► E ┐
                                          ▲               ▲              ▲                     │
 CLK_IN ──► edyn_pulse_gen ── E_DYN ──────┴───────────────┴──────────────┘                     ▼
                   └──────── CLK_DEL ───────────────────────────────────────────────► root_clk_gate ──► CLK_SYS
```

1. **Transition detectors (`td_cell`).** Each monitored gate output drives
   a detector. The detector XORs the net with a delayed copy of itself. Every
   toggle therefore gives a pulse on the detector output: it starts 0.4 ns
   after the edge and lasts 0.5 ns.
2. **Evaluation pulse (`edyn_pulse_gen`).** `CLK_IN` goes through a
   programmable delay line and becomes `CLK_DEL`, the clock that feeds the
   clock gate. `E_DYN` is high from the rising edge of `CLK_IN` to the rising
   edge of `CLK_DEL`. Its width equals the programmed delay:
   `(n + 1) x 0.25 ns` for a thermometer code with `n` ones, so 0.25 ns to
   4 ns in 16 steps.
3. **Dynamic OR tree (`dyn_or_tree`, `dyn_or`).** Every gate in all three
   stages precharges while `E_DYN` is low and evaluates while it is high.
   A gate whose input goes high during evaluation discharges its node, and
   the node stays discharged until the next precharge. The tree therefore
   takes a snapshot: any detector pulse that overlaps `E_DYN` (long enough
   to get through) sets `ERROR`. Each stage takes 0.4 ns.
4. **Root clock gate (`root_clk_gate`).** A latch, transparent while
   `CLK_DEL` is low, stores `!ERROR`, and `CLK_SYS = CLK_DEL & latch`. If
   `ERROR` is high when `CLK_DEL` rises, that `CLK_SYS` pulse is removed.
   The next `CLK_IN` edge has been precharged and evaluated again by then.
   Normally the late signals have settled, and that edge passes.

A corrected error therefore costs exactly one `CLK_IN` period. No state is
rolled back, and the processor needs no change except having its critical
gates tapped.

## The detection window and the E_DYN width

Hardest to see from the code is which toggles get caught. Let `E` be the
`CLK_SYS` edge, which is also the `CLK_DEL` rising edge, and `W` the `E_DYN`
width. `E_DYN` is high from `E - W + 20 ps` to `E + 20 ps`. A toggle at time
`t` gives a detector pulse at `[t + 0.4, t + 0.9)` ns. The toggle gates the
edge when that pulse reaches the first stage while `E_DYN` is high, and the
three stages (1.2 ns) then deliver `ERROR` before `E`:

```
caught  <=>  t + 0.9 ns > E - W + 0.02 ns   and   max(t + 0.4 ns, E - W + 0.02 ns) + 1.2 ns < E
```

Two consequences follow:

* **There is a minimum pulse width.** If `W <= 1.22 ns` (that is, 0.02 ns
  plus three stage delays), `ERROR` can never arrive before the edge, and
  nothing is ever corrected. With these cell delays the smallest safe
  setting is `n = 4` (1.25 ns). The delay line exists to tune the pulse
  width against the real tree delay of each chip. `tb_edyn_width_sweep`
  finds this minimum by shrinking the width until late paths escape.
* **The per-gate window is short, and the coverage comes from many gates.**
  Above the minimum, the toggles that are caught lie in a window
  `W - 0.72 ns` wide. The window ends 1.6 ns (the detection delay) before
  the edge. A single gate sees only this narrow slice. The wide detection
  window (6 ns, 12 % of a 50 ns period in the sized design) comes from
  monitoring every gate whose worst-case switching time falls within 6 ns
  of the sign-off edge. When the path slows down, some gate along it is
  switching inside the slice just before the edge. The selection of those
  950 gates is a static-timing step, not logic. The 1000-slot tree holds
  them, plus 50 more gates added to fill it.

The testbenches build such a path from 17 monitored gates 0.5 ns apart.
At `W >= 1.25 ns` the caught slice is wider than the gate spacing, so every
endpoint arriving up to 6 ns late is caught.

## Modules

| file | kind | what it is |
|---|---|---|
| `rtl/cd_edac_top.sv` | top | 1000 detectors, pulse generator, OR tree, clock gate |
| `rtl/td_cell.sv` | behavioural model | transition detector cell (XOR with delayed copy) |
| `rtl/dyn_or.sv` | RTL with a simulation delay | 10-input dynamic OR with keeper |
| `rtl/dyn_or_tree.sv` | RTL with simulation delays | `FANIN**LEVELS`-input tree of `dyn_or` |
| `rtl/edyn_pulse_gen.sv` | behavioural model | thermometer-coded delay line and `E_DYN` pulse |
| `rtl/root_clk_gate.sv` | RTL | latch-based root clock gate |

Parameters of `cd_edac_top` and their defaults:

| parameter | default | meaning |
|---|---|---|
| `N_TD` | 1000 | monitored nets (slots above `N_TD` are tied off) |
| `FANIN` | 10 | inputs per dynamic OR gate |
| `LEVELS` | 3 | stages in the tree (`FANIN**LEVELS` slots) |
| `CODE_W` | 15 | width of the thermometer delay code |
| `TD_DELAY_PS` | 500 | detector pulse width |
| `TD_LATENCY_PS` | 400 | detector latency |
| `OR_DELAY_PS` | 400 | delay of one OR stage |

The detectors and the delay line are analog custom cells in silicon. Here
they are event-driven models with delays: they need a simulator with timing
support, and synthesis turns them into constants. The OR gates and the clock
gate are real logic, and synthesis keeps their latches. The dynamic node of
each OR gate is written as a latch (111 in the tree) because it holds its
value between evaluations. The 400 ps gate delays on them are simulation
annotations that synthesis ignores. All timing is in picoseconds
(`timeunit 1ps`).

## Where this RTL makes its own choices

The structure follows the design: XOR-based detectors, 10:1 dynamic OR gates
in three stages on a shared evaluation pulse, a programmable pulse width of
0.25 to 4 ns, and a clock gate on the root clock driven by `ERROR`. The
design gives only bounds or nothing for the following, so these are this
RTL's choices:

* Cell delays. The design bounds the detector latency and the OR gate delay
  at 0.5 ns each and the total detection delay at 2 ns. The models use
  0.4 ns for each (1.6 ns in total), and a 0.5 ns detector pulse. The
  minimum safe pulse width of 1.25 ns follows from these numbers. On silicon
  it is measured per chip.
* The delay code. It is 15 bits of thermometer code with ones from bit 0 up,
  and delay = (ones + 1) x 0.25 ns. An assertion flags a code that is not a
  thermometer code.
* `E_DYN` timing. It spans from the `CLK_IN` edge to the `CLK_DEL` edge, and
  a 20 ps gate delay makes it end just after the clock gate has closed.
* The clock gate structure. It is a standard latch-and-AND gate.
* Which detector feeds which first-stage gate. Here it goes by index. In
  silicon it comes from placement clustering, which does not change the
  logic.
* No reset. The only state is the dynamic nodes and the gate latch, and
  every cycle's precharge and low clock phase clear both.

Not modelled:

* **The host processor.** Its monitored nets enter on `crit_node`, and it
  takes `clk_sys`.
* **FDSOI body biasing.** The design uses it to trade supply voltage against
  leakage. It is a supply-level feature with no logic.
* **Sizing of the detection window.** Statistical timing analysis chooses
  the window, and hence the 950 gates. That is a design-flow step.
* **Wire and distribution delays.** `E_DYN` reaches all 111 OR gates at
  the same instant, and the clock gate drives `CLK_SYS` with no clock-tree
  delay. The detectors are ideal apart from their fixed latency and pulse
  width. On silicon, spread in these delays adds to what the `E_DYN` width
  must cover. That is one reason the width is programmable.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_cd_edac_top tb/tb_cd_edac_top.sv -o sim
./obj_dir/sim
```

`-Wno-fatal` keeps Verilator's width and static-lifetime notes on the
testbenches from stopping the build. The `ZERODLY` note on the delay line is
expected: its delay is a run-time value.

Testbenches:

* `tb_cd_edac_top` runs the full-size top, with no parameter overrides,
  against a behavioural datapath clocked by `CLK_SYS`. It runs 400 cycles at
  50 ns, with E_DYN at 1.5 ns and then at 2.5 ns. The datapath mixes late
  paths (endpoint up to 6 ns after the edge), marginal and early paths, a
  short path that toggles 0.1 ns after every edge, and random activity on
  20 other detectors per cycle. For every edge, a reference built from the
  timing equation above predicts whether `CLK_SYS` must be gated and whether
  `ERROR` must pulse. The testbench checks that prediction. It also checks
  that the endpoint register never captures a stale value, and that
  `CLK_SYS` pulses = `CLK_IN` pulses - corrections. It counts each mechanism
  (corrections, stale captures prevented, short-path toggles ignored, clean
  cycles, both settings) and fails if any one never happens.
* `tb_edyn_width_sweep` uses the same top. For each of the 16 settings it
  launches 40 late paths and counts escapes. It checks for zero escapes from
  1.25 ns up and for escapes below that.
* `tb_error_rate_sweep` stands in for lowering the supply by slowing down
  20 modelled critical paths step by step, from 1.00x to 1.30x. It reports
  corrected errors per 10000 cycles. The rate is zero up to 1.10x, then
  rises steeply: about 140, 3100, 4800 and 5000, which is one per launch.
  No stale value is ever captured. The rates depend on the path model,
  not on silicon data.
* `tb_td_cell`, `tb_dyn_or`, `tb_dyn_or_tree`, `tb_edyn_pulse_gen` and
  `tb_root_clk_gate` test the blocks one by one: detector pulse timing;
  precharge, evaluation and hold of the OR gate; all 1000 tree slots and a
  too-short pulse; all 16 delay settings measured with timestamps; and
  pulse removal without glitches.

To watch the design at work, run `tb_cd_edac_top` with `--trace` and look
at `clk_in`, `e_dyn`, `dut.td_out`, `error` and `clk_sys`. A cycle with a
late path shows `ERROR` rising inside the `E_DYN` pulse, followed by one
missing `CLK_SYS` pulse.
