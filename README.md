# Instruction-driven ultra-dynamic clocking

A processor's clock period is normally set by the slowest path anywhere in the
pipeline, although almost no instruction ever exercises that path. This design
gives every clock cycle its own length instead. Each instruction in the program
carries a 3-bit clock control value, computed offline from the longest delay
that instruction was ever seen to take (its *delay bound*). A small controller
turns that value into a number of oscillator phases to drop, and a glitch-free
phase multiplexer at the output of an all-digital PLL makes the next cycle
exactly that much shorter. After a pipeline flush, when the pipeline is empty
and fast, the controller makes a few cycles short regardless of the program.

The RTL follows the Greybox co-design methodology for a 6-stage ARMv5 pipeline in
65 nm: conventional clock 750 MHz (T_clk = 1.33 ns), dynamic periods from 0.8 ns
to T_clk in 0.1 ns steps, an ADPLL whose 11-stage ring DCO gives 22 phases, and a
5-bit phase selection. The ARM pipeline itself is not part of this RTL; the clock
system has ports for the pipeline's fetch address, its flush signal and its
clock.

```
            prog_*                     pc  pc_recover
              |                         |      |
        +-----v-------+   instr   +-----v------v---+
        | instr_cache |---------->|   (pipeline,   |
        | {tcode,     |           |    external)   |
        |  instr}     |           +-------^--------+
        +-----+-------+                   | clk_dyn
              | tcode                     |
        +-----v----------+ sel_next +-----+-----+
        | clk_controller |--------->| phase_mux |
        |                |<---------|  22:1     |
        +----------------+ sel_cur  +-----^-----+
                                          | phases[21:0]
   ref_clk  +-----+   +-----------+  +----+----+
   -------->| tdc |-->| pi_filter |->|   dco   |
            +--^--+   +-----------+  +----+----+
               |      +--------------+    | phases[0]
               +------| freq_divider |<---+
                      +--------------+
                 adpll
```

## How long is a cycle

The DCO runs at T_out = 1333 ps (750 MHz) and offers 22 copies of its output,
phase k delayed by k * t_delay with t_delay = T_out / 22 = 60.6 ps. The
multiplexer passes one of them. If it switches, at a rising edge, from phase s to
phase s - n, the next rising edge arrives n * t_delay early:

    T_cycle = T_out - n * T_out / 22

Moving back by n on every cycle is the normal case. The selection just wraps
around the ring modulo 22. The phase is never "reset": only the step matters.

The controller's table, for the default T_out and no extra margin:

| code | delay bound | n | period | frequency |
|------|-------------|---|--------|-----------|
| 0 | 0.8 ns | 8 | 848 ps | 1179 MHz |
| 1 | 0.9 ns | 7 | 909 ps | 1100 MHz |
| 2 | 1.0 ns | 5 | 1030 ps | 971 MHz |
| 3 | 1.1 ns | 3 | 1151 ps | 869 MHz |
| 4 | 1.2 ns | 2 | 1212 ps | 825 MHz |
| 5 | 1.3 ns | 0 | 1333 ps | 750 MHz |
| 6, 7 | T_clk | 0 | 1333 ps | 750 MHz |

n is the largest step that keeps the period at or above the bound plus
`MARGIN_PS`: n = floor((T_out - bound - margin) * 22 / T_out), capped at 10.
The controller computes the table at elaboration from `T_OUT_PS`.
The margin exists because the period must cover the bound plus PLL jitter and PVT
variation. The simulated ADPLL jitter of the original design is far below 50 ps,
so the default margin is 0. Set `MARGIN_PS = 50` for a conservative table.

The 0.1 ns steps of the clock plan and the 60.6 ps phase grid do not line up. So
every period is rounded up to the next phase, and the gain is smaller than with
exact 0.1 ns steps. For a program whose mean bound is 1.100 ns, `tb_bound_mix`
measures a mean period of 1141.6 ps: 876 MHz, a 16.8 % speedup over 750 MHz.
Periods that follow the bounds exactly would give 21 %.

## When a code takes effect

The 3-bit value of the word fetched in cycle k sets the length of cycle k+1.
The cache output register changes at the edge that starts cycle k. During
cycle k the controller decodes the value and presents `sel_next = sel_cur - n`.
The multiplexer loads it at the rising edge that starts cycle k+1. The offline
tagging therefore puts in each word the bound of the cycle one after its fetch.
That is what "encoded one cycle early" means here: the controller gets a whole
cycle for its decode.

## Why the switch is glitch-free

Changing the selection is safe only while the old and the new phase are both
high. Then the output does not move, and its next rising edge is the new
phase's. Each phase is high for half a period (11 * t_delay), so the safe
instant depends on the direction of the step:

- **Shrink** (back by n = 1..10): at the rising edge of the output itself. The
  new phase rose n * t_delay earlier and is still high.
- **Stretch** (forward by n = 1..10): 10 * t_delay into the cycle, at the rising
  edge of the phase 10 positions after the old one (the *strobe*). By then the
  new phase has risen and the old one has not yet fallen.

`phase_mux` registers the controller's request at every output rising edge.
Backward requests take effect at once. A forward request keeps the old phase
until the strobe. A toggle pair marks whether the strobe has fired in this
cycle: `tog_a` flips at the output edge and `tog_b` copies it at the strobe.
The strobe's own selection (old phase + 10) changes only at an output rising
edge. At that moment the new strobe phase is always low, so the change can
only make the strobe fall, never rise.
An assertion flags any request more than 10 positions away.

The controller steps from `sel_cur`, which is the selection the multiplexer will
have at the end of the current cycle. Both directions therefore use the same
timing: the code fetched in cycle k sets cycle k+1.

In the main configuration the PLL runs at T_clk and every bound is at most
T_clk, so only shrinking occurs. Set `T_OUT_PS` below T_clk, with the PLL
retuned to match, and the longer bounds get negative steps:
n = -ceil((bound - T_out) * 22 / T_out). At 1 GHz (T_OUT_PS = 1000, 40 MHz
reference) the table becomes n = 4 2 0 -3 -5 -7 -8 -8 for codes 0..7.
`tb_greybox_fast` runs that configuration.

## After a flush

A taken branch or `ldr pc` flushes the pipeline. The pipeline signals this with
`pc_recover`. The controller then forces the 0.8 ns step (n = 8) for
`RECOVER_CYCLES` cycles: the cycle in which `pc_recover` is high, plus the two
after it by default. The post-flush instructions are known to be short, but
their number is not given. Three is this design's choice. The window restarts
with every new `pc_recover` pulse.

With `dyn_en = 0` the step is always 0, and the clock is a plain 750 MHz clock
for comparison.

## Program words

A program word is `tagged_instr_t = {tcode[2:0], instr[31:0]}` (`greybox_pkg`).
The control value sits beside the instruction rather than inside unused
instruction bits. How the original design hides the 3 bits in the instruction
stream is not specified. `instr_cache` is a 1024-word synchronous memory with a
load port and one-cycle read latency. It always hits; there is no refill path.
Its output resets to `mov r0, r0` with code 7 (full period).

## The clock source: ADPLL

`adpll` is a type-II digital loop. Its parts:

- **tdc** (behavioural): at each divided-clock edge it reports the time since the
  last reference edge, folded into +-T_ref/2. The step is 10 ps and the range
  +-127.
- **pi_filter**: once per reference cycle, `acc += e/32` and
  `word = acc + e/4`. Arithmetic is fixed point with 8 fraction bits. The word
  counts 0.3 MHz fine steps above 30 MHz. It is saturated and split into
  coarse = word / 100 (6 bits, 30 MHz steps) and fine = word mod 100 (7 bits).
  After reset the word is `INIT_WORD` = 2400, which is 750 MHz.
- **dco** (behavioural): f = 30 MHz + 30 MHz * coarse + 0.3 MHz * fine, and it
  produces the 22 phases. The tuning is re-read every t_delay.
- **freq_divider**: 1/N on phase 0, with N = 25. A 30 MHz reference thus gives
  750 MHz.

From a start 9 MHz off, the loop locks within about 100 reference cycles. It then
holds the phase error within +-20 ps and the word within 2399..2401. The
mean period is 1333.33 ps. The fine-step quantisation shows up as a +-0.5 ps
wobble. Phase noise and jitter are not modelled.

The TDC and DCO are behavioural models of analog circuits. They use real-valued
delays and will not synthesize. Everything else is synthesizable. Some choices
here are not given by the original: the reference frequency, N, the gains, the
TDC resolution and the coarse/fine law.

## Files

| file | contents |
|------|----------|
| `rtl/greybox_pkg.sv` | constants, `tagged_instr_t`, code-to-bound and phase-step functions |
| `rtl/greybox_top.sv` | the clock system |
| `rtl/instr_cache.sv` | program store |
| `rtl/clk_controller.sv` | code decode, phase-step arithmetic, post-flush window |
| `rtl/phase_mux.sv` | glitch-free 22:1 phase multiplexer, shrink and stretch |
| `rtl/adpll.sv` | PLL loop |
| `rtl/tdc.sv`, `rtl/dco.sv` | behavioural models |
| `rtl/pi_filter.sv`, `rtl/freq_divider.sv` | loop filter, divider |

Top-level parameters: `IMEM_DEPTH` (1024), `DIV_N` (25), `T_OUT_PS` (1333),
`MARGIN_PS` (0), `RECOVER_CYCLES` (3), `INIT_WORD` (2400). If you change the PLL
frequency, `T_OUT_PS` must follow it, because the step table is computed from
it at elaboration.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

    verilator --binary --timing --assert --no-sched-zero-delay \
      -Irtl -y rtl +libext+.sv rtl/greybox_pkg.sv tb/tb_greybox_top.sv \
      --top-module tb_greybox_top
    obj_dir/Vtb_greybox_top

Replace the testbench name to run another. `--no-sched-zero-delay` tells
Verilator that the DCO's computed delay is never zero. All testbenches finish
in well under a second.

| testbench | what it shows |
|-----------|---------------|
| `tb_greybox_top` | the whole system at default size. It locks the PLL, loads a 256-word program with branches and runs it with dynamic clocking on, off and on. Every one of 3300 periods is checked against an independent model, together with each fetched instruction. It counts each code, flushes, post-flush cycles, fixed-clock cycles and selection wrap-arounds. |
| `tb_greybox_fast` | the same with the PLL at 1 GHz, where long bounds stretch cycles |
| `tb_bound_mix` | effective frequency of a 1000-word loop with a fixed mix of bounds (mean 1.100 ns) |
| `tb_clk_controller` | step tables at 750 MHz and 1 GHz, next selection, post-flush window, `dyn_en` |
| `tb_phase_mux` | period and high time for every step -10..10, from ideal phases |
| `tb_adpll` | lock from a 9 MHz offset, phase spacing, mean period |
| `tb_dco`, `tb_tdc`, `tb_pi_filter`, `tb_freq_divider`, `tb_instr_cache` | each block against its formula |

## Limits and departures

- The ARMv5 pipeline is not included. Its interface is `pc`, `pc_recover`,
  `instr` and `clk_dyn`. `pc_recover` is expected high for one cycle per flush.
- Steps are limited to 10 phases either way, so one cycle spans 12 to 32
  phases (0.73 to 1.94 * T_out).
- The control value is a separate field of the program word. The program store
  is a fixed-size memory, not a cache with refill. Real benchmark programs
  (megabytes of code) do not fit it.
- The code-to-bound table, the post-flush length, the margin default, the
  reference and divider, the loop gains and the DCO law are choices of this
  design.
- The offline part of the methodology is not hardware and is not here. That
  part covers delay-bound extraction, critical-endpoint mapping, path weighting
  and back-end timing constraints. Only its product is used: the 3-bit codes in
  the program.
