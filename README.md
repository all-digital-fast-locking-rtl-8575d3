# All-digital pulsewidth-control circuit with programmable duty cycle

A clock with an arbitrary duty cycle (30–70 %) comes in. A clock at the same frequency goes out, with a duty
cycle set by a 3-bit code: 31.25 % to 68.75 % in steps of 6.25 %. The circuit needs no analog loop and no
look-up table. It locks 7 to 11 input cycles after reset.

The main idea is that **one pair of delay lines does two jobs**:

1. **Measuring.** The input clock is divided by two into REF. The high time of REF is exactly one input
   period. REF is sent down a coarse delay line (16 cells of delay τc) and then a fine delay line (3 cells of
   τf = τc/4). Flip-flops record how far its rising edge got before REF fell. The result is the input period
   as a 6-bit count of fine cells, P = {Bc[3:0], Bf[1:0]}.
2. **Generating.** P is multiplied by k/16 (k = 5..11) with shifts and two adders. The delay lines are then
   switched over to carry a short pulse, made once per input cycle. The pulse sets the output flip-flop
   straight away. After travelling the computed number of coarse and fine cells, the same pulse resets the
   flip-flop. The output high time is therefore k/16 of the measured period.

This RTL describes the digital parts as synthesizable SystemVerilog. The delay cells and the one-shot pulse
generator are analog parts; they are written as behavioural models with explicit delays. The whole circuit
simulates with plain Verilator (`--timing`).

## Block diagram

```
 clk_in ──┬──► clk_div2 ──REF──┬────────────────────────────► cpi ◄── Out4/8/12 ──┐
          │                    │                               │ F4..F1, FC_FINISH │
          │                    ├─► input_mux ──► coarse_delay_line ──taps[15:0]────┤
          └──► one_shot ──┬────┘   (REF / pulse)   (4 power groups)              ▼
                          │                                                     mux1 (16→4)
                          │                      REF ──► coarse_detector ◄──────┤ Bc
                          │                                                     ▼
                          │                                                    mux2 (4→1)
                          │                                                     ▼ Input_fine
                          │                                  fine_delay_line (0..3 cells)
                          │                                                     ▼ Input_buf / Out_fine
                          │                    ~REF ──► fine_detector ◄──────────┤ Bf
                          │                                                     │
                          └───────── set ──► output_clock_gen ◄──── reset ──────┘──► clk_out

   {Bc,Bf} ──► duty_cycle_setting ◄── duty_code{a,c,d}  ──► fsm_control ──► all selects and enables
```

`fsm_control` drives every select and enable. It powers cell groups on and off, drives the MUX1, MUX2 and
FDL selects, gates REF, switches the delay-line input, and enables the detectors and the output flip-flop.

## Lock sequence, cycle by cycle

The controller runs on the input clock. REF toggles on every rising input edge, so a REF period is two input
cycles. A new REF period starts at an edge where REF is low. Each detection step uses one REF pulse.

| input cycles | state                         | what happens |
|--------------|-------------------------------|--------------|
| 0–1          | coarse pulsewidth identifying | All 16 coarse cells are on. The CPI sees how many of Out4, Out8, Out12 rise while REF is still high. The result is the one-hot F4..F1, the quarter of the line the period falls in. |
| 2–3          | coarse detection              | Cell groups above that quarter are powered off. MUX1 passes the four taps of the quarter to four flip-flops, which sample REF. The encoder gives Bc = the number of coarse cells that fit in the period. |
| 4–5 (…9)     | fine detection                | MUX2 feeds tap Bc into the fine line. Paths of 3, 2, then 1 fine cell are tried, one per REF pulse. The search stops at the first path whose edge still arrives before REF falls. This takes 2, 4 or 6 cycles. |
| 1 cycle      | duty-cycle setting            | P·k/16 is computed and latched. |
| then         | output generation             | REF is frozen. The delay line carries the one-shot pulse. MUX1, MUX2 and the FDL are set from the latched result. |

The lock time depends only on the fine step: Bf = 3 gives 7 cycles, Bf = 2 gives 9, Bf = 1 or 0 gives 11.

## Measuring the period: the three detectors

These are the subtle parts of the design.

**Sampling rule.** Every detector flip-flop decides one question: *did the delayed REF edge arrive before
the end of the REF pulse?* The coarse detector clocks on the delayed taps and samples REF. A 1 means
"still high", so that tap is shorter than the period. The fine detector does the opposite. It clocks on
REF1, the complement of REF, whose rising edge marks the end of the pulse, and samples the delayed signal.
The two are equivalent.

**CPI (`cpi.sv`).** It has three flip-flops, triggered by Out4, Out8 and Out12, and each records "REF
still high". FC_FINISH is set by the first falling edge of REF and then blocks all three triggers. This
matters at high input frequencies. At 600 MHz, Out12 of the first pulse arrives after 3.84 ns, while the
*second* REF pulse is already high. Without the block, Out12 would be counted. The thermometer
{Out12, Out8, Out4} becomes the one-hot F4..F1. After reset, F4..F1 = 0001.

**Coarse detector (`coarse_detector.sv`).** The CPI group g selects taps 4g..4g+3. Their four samples form
a thermometer code. A4..A1 marks its last 1. The encoder output is:

- Bc[1:0] = the position of the set bit of A, minus 1;
- Bc[3:2] = the position of the set bit of F, minus 1.

For example, A = 1000 with F = 0100 gives Bc = 1011, which is 11 cells. All four taps of the group are
shorter than the period plus 4τc. The design therefore needs **4τc < input period**, so that these taps
finish inside the REF period they belong to.

**Fine detector (`fine_detector.sv`).** This is a serial detector with a single sampling flip-flop. Trying
the paths one after another means only the last fine cell carries a flip-flop load. The shift register
Q4..Q1 starts at 0001 and selects the path: 0001 is three cells, 0011 two, 0111 one. After each REF period
it either stops (the path led) or shifts in another 1 (the path lagged). Q = 1111 means all three paths
lagged, and Bf = 00. The encoder gives Bf = 3 − (number of ones in Q4..Q2). The detector tells the
controller on the same edge that detection has ended (`finish_now`), so no cycle is lost.

The result: P = 4·Bc + Bf is the largest count of fine cells whose delay is shorter than the input period,
that is, P = ⌈T/τf⌉ − 1.

## Duty-cycle setting arithmetic

The code {a, c, d} selects the weights 1/2 (a), 1/4 (b = not a), 1/8 (c) and 1/16 (d). The result is

    P · (a/2 + b/4 + c/8 + d/16),   k/16 with k = 5 … 11.

1/2 and 1/4 are never needed together in that range, so b is not a separate input. The 1/2 and 1/4 terms
also share one adder operand.

| code acd | 001   | 010  | 011   | 100 | 101   | 110  | 111   |
|----------|-------|------|-------|-----|-------|------|-------|
| duty     | 31.25 | 37.5 | 43.75 | 50  | 56.25 | 62.5 | 68.75 |

In `duty_cycle_setting.sv`, bit positions are numbered 0..9. Position *i* weighs 2^(i−4) fine cells, so P
occupies positions 4..9. The circuit works as follows:

- P>>4, gated by d, lands at positions 0..5. Position 0 is dropped.
- P>>3, gated by c, lands at positions 1..6.
- A 6-bit adder sums these two. Position 1 of the sum is dropped, leaving positions 2..7.
- P>>1 (when a) or P>>2 (when not a) gives one operand at positions 2..8.
- A 7-bit adder produces positions 2..9.

The two dropped bits lose less than a quarter of a fine cell. The integer part, positions 4..9
(`delay_int`), is the number of fine cells the output pulse must travel. The controller splits it into
MUX1 group = [5:4], MUX2 input = [3:2], and FDL cells = [1:0]. The two fractional bits are not used. For
example, P = 16 (4 coarse cells) with code 001 gives 5 fine cells, which is 1 coarse cell plus 1 fine cell.

Code 000 is accepted and gives 1/4 (25 %). That setting is outside the specified range and is not tested.

## Output generation

`output_clock_gen` is a D flip-flop with D tied high. The one-shot pulse clocks it, and the same pulse,
delayed through the coarse and fine lines (Out_fine), clears it asynchronously. A flip-flop is used rather
than an SR latch because it tolerates the reset pulse overlapping the set pulse. In silicon the set pulse
passes through a matching delay line. That line has the same tri-state structure as MUX1 and MUX2, so both
edges see the same multiplexer delay. Here the multiplexers have zero delay, so that match holds by
construction and there is no separate matching-line module.

The output is low until output generation starts. The first one or two output cycles after the switch-over
may be irregular: the last REF pulse is still leaving the delay line.

## Files

| file | contents | kind |
|------|----------|------|
| `rtl/pwcc_pkg.sv` | state enum, duty-code struct, cell counts | package |
| `rtl/pwcc_top.sv` | the complete circuit | top |
| `rtl/clk_div2.sv` | ÷2 making REF, with an enable for REF gating | RTL |
| `rtl/one_shot.sv` | one fixed-width pulse per rising input edge | behavioural |
| `rtl/input_mux.sv` | REF or one-shot pulse into the coarse line | RTL |
| `rtl/coarse_delay_line.sv` | C1..C15 and the matching load C16, four power groups | behavioural |
| `rtl/cpi.sv` | coarse pulsewidth identification | RTL |
| `rtl/mux1.sv` | 16→4 tap selection | RTL |
| `rtl/coarse_detector.sv` | 4 sampling flip-flops and the Bc encoder | RTL |
| `rtl/mux2.sv` | 4→1 selection into the fine line | RTL |
| `rtl/fine_delay_line.sv` | 3 fine cells, paths of 3/2/1/0 cells | behavioural |
| `rtl/fine_detector.sv` | serial fine detector and the Bf encoder | RTL |
| `rtl/duty_cycle_setting.sv` | shift, gate and add multiplier | RTL |
| `rtl/fsm_control.sv` | state machine and control circuit, with assertions | RTL |
| `rtl/output_clock_gen.sv` | output flip-flop | RTL |

The flip-flops in `cpi`, `coarse_detector` and `fine_detector` are clocked by delay-line taps or by REF, not
by the input clock. That is how the circuit works, and those domains are asynchronous to one another. Each
result is read by the controller only after it has settled, one input cycle or more later.

## Parameters and timing model

| parameter | default | meaning |
|-----------|---------|---------|
| `TAU_C_PS` | 320 | coarse cell delay, ps |
| `TAU_F_PS` | `TAU_C_PS/4` = 80 | fine cell delay, ps |
| `ONESHOT_PS` | 120 | one-shot pulse width, ps |

The original circuit does not state numeric cell delays, so 320 ps is a choice. It meets both range limits:

- 16τc = 5.12 ns covers a 200 MHz period, and P stays within 6 bits.
- 4τc = 1.28 ns is below a 600 MHz period. This is the condition from the coarse detector above.

Two more conditions must hold:

- **The fine delay must be exactly τc/4.** The control circuit turns one number into coarse and fine cells
  by splitting its bits.
- **The one-shot pulse must end before the next set.** The delayed reset pulse of one cycle must finish
  before the next set pulse, which means ONESHOT_PS < 5/16 of the shortest period.

The delay models use transport delays, so a 120 ps pulse passes cells longer than itself. A powered-off
cell outputs 0.

## Accuracy

The output high time is always a whole number of fine cells, rounded down. Against the ideal k/16 of the
period it is short by less than two fine cells:

- one cell from measuring the period;
- one cell from rounding the product down;
- a quarter cell from the dropped adder bits.

With τf = 80 ps, the simulated errors at the characterised points are:

| input | output duty error (simulated) |
|-------|-------------------------------|
| 200 MHz, all 7 settings | −0.4 % to −1.9 % |
| 500 MHz, all 7 settings | −0.25 % to −3.75 % |
| 600 MHz, all 7 settings | −2.0 % to −6.4 % |

The original silicon reports errors within ±2.5 % from 200 to 600 MHz. With 16 + 3 cells and a 6-bit code
covering 5 ns, one fine cell is at least about 78 ps, which is about 5 % of a 600 MHz period. A model with
ideal cells therefore cannot match that figure at the top of the range. The delay values of the real cells
are not known.

## How this RTL differs from the original circuit

These points are choices made for this RTL where the original description is silent or analog:

- Cell delays, one-shot width, reset polarity (active-low `rst_n`) and all select encodings are this
  design's own choices.
- The tap-clocked flip-flops of the CPI and the coarse detector are written with REF or enable as a
  qualifier, not as logically gated clocks. The behaviour is the same.
- REF1 is taken to be the complement of REF. Its rising edge marks the end of the REF pulse.
- The fine shift register and the controller run on the input clock and act at REF-period boundaries.
- The fine line has a fourth, zero-cell path. Output generation needs it when the computed delay has fine
  part 00.
- The multiplexers have zero delay, so there is no matching delay line. The output pad driver, an inverter
  chain, is not modelled.
- Output generation uses only the integer part of the duty-cycle result.
- The inputs must stay inside the design range: 4τc < T < 16τc. Group 0 of the coarse detector, for periods
  below 4τc, samples REF with REF itself and is not meaningful.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. All of them use
`` `timescale 1ps/1ps ``. To run one:

```sh
verilator --binary --timing --assert -Irtl rtl/pwcc_pkg.sv rtl/*.sv tb/tb_pwcc_top.sv \
          --top-module tb_pwcc_top
./obj_dir/Vtb_pwcc_top
```

For a unit testbench, list `rtl/pwcc_pkg.sv`, the one module and its testbench.

| testbench | what it covers |
|-----------|----------------|
| `tb_pwcc_top` | End-to-end at default parameters: 14 periods from 600 to 200 MHz, chosen to give every F group and every Bf, × input duty 30/50/70 % × all 7 codes. Checks P = ⌈T/τf⌉−1, lock time 7/9/11 matching Bf, the latched delay, output period, high time = delay × τf, and error < 2τf. Counts every mechanism: CPI groups, fine outcomes, lock times, codes, input duties, REF gating, cell power-down. |
| `tb_pwcc_workloads` | The characterised points: 200 and 600 MHz at 50 %; 200 MHz at 37.5 % with 30 % and 70 % input; full sweeps at 500, 600 and 200 MHz. Prints the measured duty and error. |
| `tb_cpi`, `tb_coarse_detector`, `tb_fine_detector` | Detectors driven by ideal delayed copies of REF across the whole range, including the late-edge case and the worked code examples (A=1000, F=0100 → Bc=1011; Q=0111 → Bf=01). |
| `tb_duty_cycle_setting` | All 64 × 8 inputs against the exact product minus the dropped bits, and the 16 × 5/16 = 5 example. |
| `tb_fsm_control` | State timing for 1, 2 and 3 fine steps, and every control output in every state. |
| the rest | Delay lines (tap times, pulse width, power groups), one-shot, multiplexers, ÷2, output flip-flop. |

The top-level simulations take well under a second.
