# Look-up-table PID DPWM controller for a point-of-load buck converter

A point-of-load (POL) regulator sits next to a low-voltage processor or FPGA
and must react to load steps within microseconds. A conventional digital
controller samples the output with an ADC and then computes the PID law, and
the two delays add up to several hundred nanoseconds of dead time in the loop.
This controller removes both delays:

* **No ADC.** A DAC plays a falling saw-tooth ramp, one ramp per switching
  term, and an analog comparator compares it with the output voltage Eo. The
  comparator output `Vcomp` rises when the ramp crosses Eo. The up-counter
  value at that instant is the digitised output voltage.
* **No arithmetic after sampling.** The whole PID law is folded into a table
  (memory 2), and the table is read every clock at an address that runs
  alongside the up-counter. When `Vcomp` rises, the word that is on the table
  output is already the duty for the sensed voltage. It is latched and acts on
  the pulse that is running in the same switching term.

All logic runs on one clock, fCLK (500 MHz in the reference converter). The
switching term is 512 counts of a 9-bit up-counter. The duty word u(k) is also
9 bits. The RTL includes the overvoltage protection that this scheme needs, and
a five-phase extension in which phases 2 to 5 copy phase 1's on-time with fixed
phase shifts.

## One switching term, count by count

The counter `y1` runs 0..511. `dac_code` is the memory 1 entry for the
previous count (the table read is registered). All times below are in fCLK
counts. The reference numbers are for the default parameters.

| count | event |
|---|---|
| 511 of the previous term | PR generator presets D-ff 4 (`u`) to 511. The programmable address counter is loaded with `a - b`. Protection flip-flop cleared. |
| 0 | PWM' rises, because `y1 < u = 511`. The ramp restarts at full scale (Vref+) one count later. |
| 4 | The protection samples the synchronised `Vcomp`. If it is high, Eo was above the top of the ramp: phase 1 is forced low until the term ends. |
| c | The ramp falls below Eo and `Vcomp` rises. |
| c+2 | The two-flop synchroniser output rises and the edge detector fires `trig`. D-ff 1 takes nI(k) and D-ff 3 takes y1(k) = c+2. |
| c+3 | Memory 2's output is the word for address' = y1(k) + a - b (read in count c+2). D-ff 4 loads it at the end of this count. |
| c+4 | `u` shows the new u(k): **4 clocks (8 ns at 500 MHz) from the Vcomp edge**. From here on, PWM' = (y1 < u(k)). D-ff 2 holds D-ff 3's value. |
| rest of term | Memories 3 and 4 turn nI(k) and y2(k) into a and b for the next term. |

If u(k) is already below the current count when it is latched, PWM' falls at
once. The on-time is then c+4 counts, the shortest pulse the loop can produce
for that Eo. If no crossing occurs, `u` stays at 511 and the switch is on for
511 of 512 counts. That is why the protection below exists.

Only the first rising edge in a term is used. Edges in counts 0..2 are
ignored, because they still come from the previous ramp. Edges in the last
three counts are also ignored, so that a - b for the next term can settle.

## The PID law as a table

The controller implements

    u(k)  = uref + KP e(k) + KI nI(k) + KD (e(k) - e(k-1))
    e(k)  = y1(k) - r                   (r: counter value of the reference voltage)
    nI(k) = nI(k-1) + e(k)

Gathering the terms in y1 gives

    u(k) = uref - (KP+KI) r + A (y1(k) + a - b),   A = KP + KI + KD
    a = (KI/A) nI(k-1)          -> memory 3, addressed by D-ff 1
    b = (KD/A) y2(k-1)          -> memory 4, addressed by D-ff 2

So the only thing that depends on the sensed count within the term is
`address' = y1 + a - b`. This is a counter that starts each term at a - b and
counts with y1. Memory 2 holds

    memory2[x] = clamp(uref - (KP+KI) r + A x, 0, U_MAX)

for every 9-bit x. With KP=5, KI=0, uref=86, r=40 the table is 0 up to
address 22, 1 at 23, rises by 5 per address, and is 500 from address 123 on.
The reference converter uses KP=10, KI=KD=0, which are the parameter defaults.
uref=86 and r=40 are kept for KP=10. A larger KP narrows the linear region.

All tables are filled at elaboration from these formulas (`pol_pkg` holds
them), so changing a gain means changing a parameter. Memories 3 and 4 round
to the nearest integer. With KI=KD=0 they are all zero and synthesis removes
them. address' is saturated to 0..511, which gives the same result as extending
memory 2's flat ends.

Sign conventions: a higher Eo crosses the falling ramp earlier, so it gives a
smaller y1 and a smaller duty. r is therefore the count at which the ramp
equals the reference voltage, including the fixed 2-count delay of the DAC
register and synchroniser. With Vref+ = 1.6 V on a 9-bit DAC, Eo = 1.5 V is
sensed at about count 36. With the defaults, an ideal buck would settle at about
1.49 V. In the closed-loop testbench the term-to-term average stays between
about 1.46 and 1.52 V.

## Overvoltage protection (`ov_protect`)

If Eo is above Vref+ at the start of a term, the comparator never crosses and
the preset u = 511 would drive the output higher still. A reset pulse at count
511 clears a flip-flop. A sample pulse at count `SAMPLE_CNT` (4) loads it with
the synchronised `Vcomp`. While it is set, the selector outputs ground instead
of PWM' for the rest of the term. In a protected term, phase 1 therefore shows
a pulse of about 5 counts and then stays low. `ov_active` brings the
flip-flop out.

## Multi-phase extension (`phase_follower`)

Phases 2..5 do not have their own sense path. Each follower works as follows:

* **Start:** the follower sets its output at count OFFSET (102, 204, 306, 408
  for phases 2..5).
* **D-ff I:** captures the counter at the falling edge of phase 1's
  (protected) PWM. This value is phase 1's on-time.
* **Adder:** adds OFFSET to D-ff I.
* **Phase:** clears the output when the counter reaches the Adder result.

With phase 1 at 204 counts, phase 2 is high from 102 to 305. Pulses of later
phases may run past count 511 into the next term.

**Departure from a literal equality test.** "Reaches" is implemented as
"counts elapsed since OFFSET >= on-time", not as "counter == Adder". The two
differ in one case: a pulse that wraps past the term end, while phase 1's new
on-time is shorter than the time that pulse has already run. An equality
compare then misses its count. The phase stays on for about 540 counts, which
happened repeatedly in closed-loop simulation. Here the pulse ends at once.

Further properties of the followers:

* They use phase 1's latest completed on-time. In a term where phase 1 falls
  after a follower's would-be end, that follower repeats the previous term's
  on-time.
* They carry no protection of their own. In a protected term they copy phase
  1's short pulse.

## Hierarchy and interfaces

```
pol_controller_top            five phases, ports to DAC, comparator, drivers
├── dpwm_controller           single-phase loop
│   ├── up_counter            y1, term_end
│   ├── wave_rom              memory 1: ramp table (writable)
│   ├── vcomp_trigger         synchroniser, edge detect, one trigger per term
│   ├── ni_generator          nI(k) = sat(nI(k-1) + y1 - r)
│   ├── pid_state_regs        D-ff 1, D-ff 3, D-ff 2
│   ├── gain_rom  (x2)        memory 3 (a), memory 4 (b)
│   ├── addr_counter          address' = y1 + a - b
│   ├── duty_rom              memory 2
│   ├── duty_latch            D-ff 4 + PR generator
│   └── dpwm_compare          PWM' = y1 < u
├── ov_protect                protection of phase 1
└── phase_follower (x4)       phases 2..5
pol_pkg                       widths, table formulas
```

Ports of the top:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | fCLK. Synchronous active-low reset. |
| `vcomp` | in | 1 | Comparator output (Eo > ramp), asynchronous. |
| `wave_we`, `wave_waddr`, `wave_wdata` | in | 1, 9, DAC_W | Reload the ramp table with any waveform. |
| `dac_code` | out | DAC_W | Ramp code for the DAC. |
| `pwm` | out | NPHASE | Gate signals. `pwm[0]` is phase 1. All are registered. |
| `cnt_o` | out | 9 | Counter value aligned with `pwm`. |
| `u_k` | out | 9 | Duty word u(k), useful as a probe. |
| `trig` | out | 1 | Latch pulse (Eo sensed). |
| `ov_active` | out | 1 | Protection active in this term. |

Parameters (defaults): `NPHASE=5`, `PHASE_STEP=102`, `PERIOD=512`,
`DAC_W=9`, `KP=10`, `KI=0`, `KD=0`, `UREF=86`, `R=40`, `U_MAX=500`,
`SAMPLE_CNT=4`.

A 512-count term at 500 MHz switches at 976.6 kHz. `PERIOD=500` gives exactly
1 MHz. The ramp then stops 12 codes above zero, and the follower offsets must
still be below PERIOD.

## What is outside the RTL

These parts have no logic to write. They connect through the top's ports:

* the PLL that makes fCLK (`clk` input);
* the DAC (driven with a 9-bit code);
* the fast analog comparator;
* the drivers and power MOSFETs;
* the buck power stage.

The closed-loop testbench contains a simple averaged model of the DAC,
comparator and power stage.

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pol_pkg.sv \
    tb/tb_pol_controller_top.sv --top-module tb_pol_controller_top -Mdir obj
./obj/Vtb_pol_controller_top
```

Replace the name to run another one. There is one testbench per module
(`tb_<module>.sv`):

* Table blocks: compared entry by entry with formulas computed in the
  testbench.
* Sequential blocks: compared cycle by cycle with reference models.
* `tb_duty_rom`: checks the printed rows of the KP=5 example table.
* `tb_dpwm_controller`: runs KP=5, KI=2, KD=3 against an ideal comparator.
  It checks u(k) against an independent model of the PID recursion, PWM'
  every cycle, on-times, and the 4-clock latency. It also covers terms without
  a crossing and both table clamps.
* `tb_phase_follower`: includes the shrinking-on-time case described above.
* `tb_pol_controller_top`: runs the whole design at its default parameters,
  closed loop, for about 0.5 ms of simulated time in well under a second. The
  plant is five phases of 3.3 uH (10 mOhm), 57 uF with 30 mOhm ESR, 12 V in,
  and a 50 A/us electronic load.
  * It checks every latched u(k) against the duty law for the sensed count,
    and the sensed count against Eo.
  * It checks phase-1 on-times, every follower's edges and widths, and Eo
    within 3 % of 1.5 V.
  * It counts each mechanism: triggered and untriggered terms, both table
    clamps, protected terms, and all four followers. It fails if any of them
    never happens.
  * Observed: the 1.5 -> 4.5 A step dips to 1.374 V and is back inside 3 %
    after 44 us. The 4.5 -> 1.5 A step is back inside 3 % after 1.4 us.
  * These numbers depend on the plant model, above all on its ESR. With
    KP=10 and ceramic-only ESR (2 mOhm), the model loop oscillates.
* `tb_single_phase_loadstep`: the single-phase converter (`NPHASE=1`, 10 uF
  with 30 mOhm ESR), otherwise at the defaults.
  * Static characteristic: the average Eo is 1.495 V for every load from
    0.3 A to 0.9 A. The test requires it to be within 3 % of 1.5 V.
  * 0.3 <-> 0.9 A load steps: Eo stays between 1.45 and 1.54 V and is back in
    the 3 % band within 5 us.
  * Every latched u(k) is checked against the duty law.

## Choices this design makes where the description is open

* **Vcomp handling.** `Vcomp` is treated as asynchronous: two-flop
  synchroniser, then a registered edge detect. The D-ffs are clock-enabled
  registers on fCLK, not clocked by `Vcomp`.
* **Trigger rules.** One trigger per term, and none in counts 0..2 or in the
  last three counts.
* **D-ff 2.** Copies D-ff 3 one clock after the trigger. It holds y2(k-1)
  through the next term.
* **D-ff 4 preset.** The preset is all ones (511) and wins over a
  simultaneous latch. The duty table itself stops at 500.
* **Number formats.** nI, a and b are 9 bits: nI and a signed and
  saturating, b unsigned.
* **Protection timing.** The protection samples at count 4 and clears at
  count 511.
* **Follower offsets.** Phases 3..5 use 204, 306 and 408. Only 102 (phase 2)
  comes from the reference design.
* **Writable ramp table.** Memory 1 has a write port so another ramp shape
  can be loaded. Memories 2..4 are fixed by parameters.
* **Clock rate.** Timing closure at 500 MHz has not been checked. The longest
  paths are 11-bit adds and compares and the 512-entry table reads.
