# Synchronous high-resolution digital PWM for FPGAs

A counter-based digital PWM clocked at f has a time step of 1/f: 2.5 ns at
400 MHz. A power converter needs a finer step, but a faster counter clock is
not available. These modulators keep the counter for the coarse part of the
pulse and place the **end** of the pulse with a step much smaller than one
clock period. Two FPGA resources can provide that fine step:

| modulator | fine-step source | step at default settings | RTL |
|---|---|---|---|
| `dcm_hrpwm` | 4·R phase-shifted copies of the counter clock from R clock managers (Spartan-3 DCM) | T/4 = 625 ps at 400 MHz, R = 1 | `rtl/dcm_hrpwm.sv` |
| `iodelay_hrpwm` | a 32-tap calibrated I/O delay line (Virtex-6 IODELAYE1), fed by an MMCM | T/32 = 78.125 ps at 400 MHz | `rtl/iodelay_hrpwm.sv` |

Both designs are synchronous. The start of the pulse and the coarse end are
taken from registered comparator outputs, so there are no comparator glitches
on the PWM pin. Only one signal, the end-of-pulse strobe, is delayed by a
fraction of a period. `hrpwm_top` places the two modulators side by side.
Each has its own board clock, duty command and PWM output, and they share
only the reset.

## Duty command and output timing

The duty command `dc` has `DC_W` bits (8 by default). The modulator splits it
into two fields:

```
 dc = [ coarse : DC_W-F bits | fine : F bits ]
   coarse  whole counter cycles (counter width is DC_W-F)
   fine    fractions of a cycle: F = log2(4R) phase steps, or F = 5 delay taps
```

With step `s = T / 2^F` (T is the counter clock period):

* PWM period = 2^DC_W · s (160 ns for the DCM modulator, 20 ns for the
  delay-line one at the defaults).
* Pulse width = dc · s, exact for every code from 0 to 2^DC_W − 1.
* dc = 0 produces no pulse. dc = 2^DC_W − 1 leaves the output low for one step
  per period.
* A new `dc` may change at any time. It is captured on the clock edge that
  starts the next period, so a running pulse always finishes with the old
  value.

The pulse is made by three steps:

1. **Set.** The comparator raises SETD while the counter reads 0. A flip-flop
   retimes it into SET, and SET sets the output.
2. **Coarse clear.** The comparator raises CLRD while the counter equals the
   coarse field.
3. **Fine clear.** CLRD is retimed and delayed by `fine` steps into RESET, and
   RESET clears the output.

SET and RESET pass through the same number of registers, so the fixed
latencies cancel. Only the fine delay remains in the pulse width.

## Clock-manager (multiphase) modulator: `dcm_hrpwm`

```
clk_in ─► dcm ×R ─┬─ CLKFX (manager 0) ─► hrpwm_counter ─► hrpwm_comparator ─┬ SETD ─► FF @ phase 1 ─► SET ─┐
                  │                                                          └ CLRD ─► multiphase_circuit ─► RESET ─► hrpwm_sr_ff ─► pwm
                  └─ CLK0/90/180/270 of every manager = P = 4R phase clocks ──────────────┘      ▲ sel = dc[F-1:0]
```

* **Phase clocks.** Manager `j` runs with a fixed phase shift of
  `j·256/P`, in 1/256ths of a period. Its four quadrant outputs therefore land
  between those of the other managers. Phase clock `k = q·R + j` (q is the
  quadrant) lags CLK0 by `k/P` of a period. R must be a power of two.
* **Counter clock.** The frequency-synthesis output CLKFX of manager 0, set
  to ×2/÷2. It has the same frequency as the phase clocks and is aligned
  with CLK0.
* **`multiphase_circuit`.** P flip-flops all sample CLRD, each on its own
  phase clock. The flip-flop on phase k (k ≥ 1) repeats CLRD k/P of a period
  after the counter edge. The flip-flop on phase 0 repeats it a full period
  later. The multiplexer uses select `s` to take flip-flop `(s+1) mod P`,
  which gives a delay of `(s+1)/P`.
* **Why SET is retimed on phase 1.** SETD is registered on phase clock 1, so
  SET lags the counter by 1/P. That is the same lag as the reset path at
  `fine = 0`. The pulse is therefore exactly `coarse·T + fine·T/P`. Both
  paths cross from the counter clock to a clock only T/P later. In a real
  device this is the tightest timing path, and it is the same for set and
  reset.

With R = 2 (eight phases, 312.5 ps) the counter loses one more bit and the
period halves. `tb_dcm_hrpwm` runs R = 1 and R = 2 together. It also runs an
R = 32 instance with a 10-bit command: 128 phases give a 19.53 ps step at
400 MHz. In simulation every phase is ideal. On a device, the number of clock
managers and the skew between the P phase clocks limit how far R can grow.

## Delay-line modulator: `iodelay_hrpwm`

```
clk_in (CK) ─► mmcm ─┬ CLKOUT[0] = CK2 = CK·8/(2·2) ─► counter, comparator, FFa/FFb, delay-line C
                     └ CLKOUT[1] = CK_REF = CK·8/(2·4) ─► idelayctrl (tap calibration)
comparator ─ SETD ─► FFa ─ SET ───────────────────────────────────────┐
           └ CLRD ─► FFb ─ CLR ─► iodelaye1 (tap = dc[4:0]) ─ RESET ──►  hrpwm_sr_ff ─► pwm
   NVALUE = counter's last state ──► iodelaye1 RST (loads CNTVALUEIN = dc[4:0])
```

* The 32 taps of the delay line span half a CK_REF period. CK_REF is the
  200 MHz calibration reference, so 32 taps are 2.5 ns. The counter clock CK2
  is twice CK_REF, so one CK2 cycle is exactly 32 taps. With a 200 MHz board
  clock the MMCM settings M = 8, D = 2, O = 2 and 4 give CK2 = 400 MHz and
  CK_REF = 200 MHz.
* FFa and FFb register SETD and CLRD on CK2, so the delay line and the
  output flip-flop see clean, one-cycle pulses.
* The delay line runs in *loadable variable* mode. Its RST pin acts as a load
  strobe (NVALUE). NVALUE is high during the counter's last state, so the next
  `dc[4:0]` is loaded on the same CK2 edge at which the comparator registers
  the new command.
* **Several outputs.** `NCH` outputs share the MMCM, the calibration block
  and the counter. Each output has its own duty command, comparator,
  FFa/FFb, delay line and output flip-flop. A device provides one delay
  element per I/O pin, so the number of outputs is limited by pins, not by
  clock managers.
* Worked example, dc = 8'b100_10011 (147 taps). CLRD is high while CNT = 4,
  and CLR is high while CNT = 5. RESET rises 19 taps into that cycle. SET rose
  at the start of CNT = 1, so the pulse is (5 − 1)·32 + 19 = 147 taps
  = 11.484 ns.

## The output flip-flop: `hrpwm_sr_ff`

The PWM pin is driven by a set/reset element. This RTL makes it
**edge-triggered**: the output takes the value of whichever input rose last.
It is built from two flip-flops, one clocked by SET and one by RESET, whose
XOR is the output.

A level-sensitive latch with reset priority is not enough. When the coarse
field is at its maximum and the fine field is non-zero, RESET rises in one
period and is still high when the next period's SET rises. A latch would then
hold the output low until RESET falls and shorten that pulse by up to a whole
cycle. The edge-triggered form has no such overlap problem, but it needs
distinct edges. For that reason the comparator suppresses SETD when dc = 0,
because the set and reset edges would otherwise coincide.

## Clock and delay primitives (behavioural models)

`dcm`, `mmcm`, `iodelaye1` and `idelayctrl` are **simulation models of vendor
primitives, not synthesizable logic**. For a device build, replace them with
the vendor primitives, with the attributes given in each file's header. The
models:

* measure the input period and lock after a few edges;
* generate the outputs with `#` delays. All clock outputs change by
  non-blocking assignment, so flip-flops on two clocks that rise at the same
  instant both sample pre-edge values;
* `iodelaye1` delays each DATAIN edge by `tap · 78.125 ps`. A new tap applies
  1 ps after the C edge that loads it, so a DATAIN edge launched by that same
  edge still uses the old tap;
* `idelayctrl` only reports RDY after 16 reference cycles. Calibration itself
  is not modelled: the tap value is a parameter of `iodelaye1`;
* flag a stopped clock: DCM `STATUS[1]` (CLKIN) and `STATUS[2]` (CLKFX),
  MMCM `CLKINSTOPPED` and `CLKFBSTOPPED`. A flag is high while its clock has
  had no edge for more than two periods. The modulators leave these flags
  unconnected. After a stop, reset the clock manager.

Simulate with `timescale 1ns/1fs`, which every file sets: a tap is not a
whole number of picoseconds.

## Limits and departures

* **Reset.** All registers reset asynchronously on a falling edge of
  `rst_n`, and the cores stay in reset until their clocks are locked. After
  power-up, apply one `rst_n` pulse once `locked_dcm` and `ready_iod` are high.
  The testbenches do this.
* **Largest coarse step to smallest.** Suppose the command steps from a value
  whose coarse field is at its maximum to one whose coarse field is 0. The
  old clear strobe then falls in the last counter state (DCM) or the first
  one (delay line), and the new strobe follows in the very next cycle. The
  two one-cycle strobes merge, so RESET shows a single rising edge. The first
  period with the new command then has no clear, and its pulse lasts until
  the following period's clear. All other command changes take effect
  cleanly at the period boundary. Only this one transition is affected.
* **Choices made here, where the source architecture is silent:**
  * the board clock frequencies;
  * DC_W = 8 for the DCM modulator;
  * the phase shifts of managers 1…R−1;
  * CLKFX = CLKIN;
  * the select-to-phase mapping and the phase-1 set flip-flop;
  * NVALUE timing and the period-boundary command register;
  * zero-duty suppression;
  * the edge-triggered output stage;
  * all model internals (lock time, PSDONE latency of two PSCLK cycles).
* **Taken from the source architecture:**
  * the block structure of both modulators;
  * p = 4·r phase flip-flops feeding a p:1 multiplexer on the duty LSBs;
  * an (m−4)-bit counter compared with dc(m:5);
  * FFa/FFb;
  * loadable-variable mode with a 5-bit CNTVALUEIN;
  * 32 taps over half a CK_REF period;
  * MMCM M = 8, D = 2, O = 2 and 4;
  * the dc = 10010011 example.
* Resolution figures: 625 ps (DCM) and 78 ps (delay line) are reproduced in
  simulation. A further architecture with a step of about 20 ps is not
  described in enough detail to build and is not included. The generalized
  DCM modulator reaches the same step in simulation with R = 32.

## Files

| file | contents |
|---|---|
| `rtl/hrpwm_pkg.sv` | delay-line mode enum, tap width |
| `rtl/hrpwm_counter.sv` | coarse counter with last-state flag |
| `rtl/hrpwm_comparator.sv` | duty register, SETD/CLRD comparators |
| `rtl/multiphase_circuit.sv` | P phase flip-flops and P:1 multiplexer |
| `rtl/hrpwm_sr_ff.sv` | edge-triggered set/reset output stage |
| `rtl/dcm_hrpwm.sv`, `rtl/iodelay_hrpwm.sv` | the two modulators |
| `rtl/hrpwm_top.sv` | both modulators side by side |
| `rtl/dcm.sv`, `rtl/mmcm.sv`, `rtl/iodelaye1.sv`, `rtl/idelayctrl.sv` | behavioural models of the clock and delay primitives |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Example, the end-to-end test at default sizes: it sweeps all 256 codes on both
modulators and checks every pulse width to 1 ps, a mid-pulse command change,
and that zero duty, coarse-only codes, every phase, every tap, the spilling
clear and full scale each occur. It runs in under a second:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/hrpwm_pkg.sv \
          tb/tb_hrpwm_top.sv --top-module tb_hrpwm_top -o sim
./obj_dir/sim
```

Replace `tb_hrpwm_top` with any other testbench name (`tb_dcm_hrpwm`,
`tb_iodelay_hrpwm`, `tb_multiphase_circuit`, …). Parameters to change:

* `DC_W` (resolution bits) on either modulator;
* `R` (number of clock managers, power of two) on `dcm_hrpwm`;
* `NCH` (number of outputs) on `iodelay_hrpwm`, `IOD_N` on `hrpwm_top`;
* `TAP_NS` on `iodelaye1` if the reference clock differs.
