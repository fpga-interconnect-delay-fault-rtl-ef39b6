# Interconnect delay-fault test chain for FPGAs

Most of an FPGA's die is routing: wire segments, vias, programmable
interconnect points and switch matrices. A resistive open in one of them,
such as a bad via or a partly open wire, does not break the connection. It
makes it slow. Such defects can get worse in the field. This design tests
routing for them: it checks for small extra delays, and it also finds
stuck-at, stuck-open and bridging faults. The FPGA is configured into one
long chain of slices. Each slice is a timing comparator for the wires that
lead into it. One transition at the input pin travels the whole chain. The
output pin shows whether every set of wires was fast enough. Reading back
the flip-flops afterwards shows which set was not.

The RTL models the configured FPGA. The slice logic and the result
localiser are synthesizable SystemVerilog. The routing under test and the
clock feedback loops are behavioural models with real delays in
picoseconds. A testbench can place resistive opens, stuck lines and bridges
on any wire and watch the chain detect them.

## The chain

```
test_in -> [starter, slice 0] -set 1-> [slice 1] -set 2-> ... -set N-> [slice N] -> test_out
```

* A *set* is the four wires that join slice i-1 to slice i. Two of them are
  X lines, driven by slice i-1's flip-flop X. The other two are Y lines,
  driven by flip-flop Y. X and Y always switch in opposite directions. On
  the bus the lines lie in the order X1, Y1, X2, Y2, so neighbouring lines
  always carry opposite values.
* The *starter block* (slice 0) turns the one tester transition into an X
  transition and an opposite Y transition. The tester then drives only one
  pin, so skew between tester channels cannot enter the measurement.
* Each later slice judges set i, then launches set i+1.

## How a slice judges its input wires

A slice has two 4-input LUTs and two flip-flops. In the test configuration
the two LUTs see the same four wires, X1, X2, Y1 and Y2:

| phase | LUT F = First_i          | LUT G = Last_i             | FF clock | init {Q_X,Q_Y} |
|-------|--------------------------|----------------------------|----------|----------------|
| A     | X1 \| X2 \| ~Y1 \| ~Y2   | ~X1 \| ~X2 \| Y1 \| Y2     | rising   | 01             |
| B     | X1 & X2 & ~Y1 & ~Y2      | ~X1 & ~X2 & Y1 & Y2        | falling  | 10             |

In phase A the X wires rise and the Y wires fall. First_i switches when the
*earliest* wire arrives. Last_i switches only when the *latest* one has
arrived. First_i leaves the slice, goes round a routing loop of length
t_feedback and comes back as the slice's own clock, Clock_i. So the
flip-flops sample t_feedback after the earliest arrival. Flip-flop X samples
First_i, which has always switched by then. Flip-flop Y samples Last_i:

* every wire arrived within t_feedback of the first one: Y switches too.
  This is the **Pass Signal Transition** (PST), {Q_X,Q_Y} = 10 in phase A.
* some wire is later than that, or never switches: Y keeps its old value.
  This is the **Fail Signal Transition** (FST), {Q_X,Q_Y} = 11 in phase A.

The flip-flop outputs drive the next set. An FST at the next slice makes
First switch but not Last, so the next slice also produces an FST. A failure
therefore travels to the end of the chain. The output pin is Q_Y of the last
slice. In phase A it falls only if every set passed; in phase B it rises.

Phase B is a partial reconfiguration of phase A. The OR LUTs become AND
LUTs, the clock is inverted and the init values are swapped. X then falls
and Y rises, so every wire is tested for both edge directions (pass code 01,
fail code 00).

**Sensitivity.** With the ideal flip-flops of this model, a set passes when
its latest wire is less than t_feedback behind its earliest. On a real part,
the flip-flop setup time shrinks the largest defect that is sure to pass
(t_feedback - t_setup). The hold time raises the smallest defect that is sure
to fail (t_feedback + t_hold). A resistive open R on a segment of
capacitance C adds R*C*ln 2 to the wire delay. With C = 0.5 pF, feedback
loops of 360 ps to 1020 ps catch defects from about 1 kOhm to 3 kOhm. A
longer loop makes the test less sensitive. That gives a margin for normal
delay mismatch between the wires of a set.

**Other faults.** A stuck wire, or a stuck-open wire that keeps its charge,
never switches, so Last never switches. A bridge between an X and a Y wire
forces both to the same value. Because neighbouring wires always carry
opposite polarity, this disturbs First or Last whatever the bridge model
(wired-AND or wired-OR). In every one of these cases the slice either
launches an FST or gets no clock edge and keeps its init value. Either way
the output pin does not move.

## Finding the failing set

After the test every slice's {Q_X,Q_Y} is read back. Slices before the first
bad set hold the PST. From the bad set on, they hold the FST, or their init
value if nothing reached them. `readback_localizer` XORs each entry with the
phase's pass code. The first non-zero entry is the failing set, so one test
run is enough and no search is needed. Entry i is slice i and judges set i.
Phase A example with set 4 bad:

```
readback  10 10 10 10 11 11 11 11 11
syndrome  00 00 00 00 01 01 01 01 01   -> fail_set = 4
```

## Modules

| file | kind | what it is |
|------|------|-----------|
| `rtl/fdt_pkg.sv` | package | phase enum, readback codes, fault types, LUT tables computed from the functions above |
| `rtl/lut4.sv` | RTL | K-input LUT |
| `rtl/fpga_slice.sv` | RTL | generic slice: 2 LUTs, clock polarity select, 2 flip-flops with init values and global set/reset |
| `rtl/test_slice.sv` | RTL | slice loaded with the phase A / B test configuration |
| `rtl/starter_block.sv` | RTL | slice 0: First_0 = input, Last_0 = ~input |
| `rtl/readback_localizer.sv` | RTL | syndrome and first-failing-set search |
| `rtl/feedback_delay.sv` | behavioural | First_i -> Clock_i loop, `DELAY_PS` |
| `rtl/path_set.sv` | behavioural | four wires of a set, with fault-free delay and injectable defects |
| `rtl/fdt_chain.sv` | top (simulation model) | starter + `N_SLICES` slices + routing + localiser |

Top parameters: `N_SLICES` = 8, `PATH_DELAY_PS` = 500 and
`FEEDBACK_DELAY_PS` = 1020 (the average minimum loop delay of a fast Virtex
part). Fault injection is through `defects[set-1][line]`, a packed struct per
wire: `defect_ps` (extra delay), `defect_edge` (`EDGE_BOTH`, `EDGE_RISE`,
`EDGE_FALL`: which edges it slows), `fault` (`LINE_OK`, `STUCK_AT_0`,
`STUCK_AT_1`, `STUCK_OPEN`) and `bridge_up` (`NO_BRIDGE`, `WIRED_AND`,
`WIRED_OR` to the next wire on the bus).

### Running a test

1. Set `phase`, `test_in` to its start level (0 in phase A, 1 in phase B)
   and the defects. Then raise `cfg`. Its rising edge loads the flip-flop
   init values, and while it is high the wires settle without delay.
2. Keep `cfg` high for longer than `FEEDBACK_DELAY_PS`, then drop it.
3. Toggle `test_in` once.
4. If the chain passes, `test_out` toggles once, exactly
   `(N_SLICES+1)*FEEDBACK_DELAY_PS + N_SLICES*PATH_DELAY_PS` after the input
   (13 180 ps at the defaults), plus, for each set, the smallest extra
   delay among its wires: the earliest wire clocks each slice. If it fails,
   `test_out` does not move.
5. `readback`, `syndrome`, `fail_found` and `fail_set` give the result per
   slice.

Change `phase` only while `cfg` is low, then raise `cfg` again. This is the
partial reconfiguration between phases.

## Simulation

All files carry `` `timescale 1ps/1ps ``. The behavioural models need
`--timing`. For example, the end-to-end test at full default size:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fdt_pkg.sv tb/tb_fdt_chain.sv --top-module tb_fdt_chain -o sim
obj_dir/sim
```

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
through a watchdog.

* `tb_fdt_chain`: the whole chain at its default parameters, in both phases.
  It runs a fault-free chain (checking the exact output latency), opens just
  below and above the threshold on every wire position, stuck-at-0/1,
  stuck-open, both bridge types, two faulty sets at once, slow-to-rise
  and slow-to-fall wires, and a random campaign of small defects on every
  wire plus single faults at random places. It counts each
  mechanism (pass, below-threshold pass, delay failure, FST propagation,
  each fault kind, phase switch, localisation) and fails if one never
  occurred.
* `tb_device_sensitivity`: six chains, with the loop delays of Spartan-II
  (840 ps), Spartan-IIE (360), Virtex (1020), Virtex-II (970), Virtex-IIE
  (370) and Virtex-IIPro (790). A defect 20 ps under the loop delay passes
  and one 20 ps over fails, in both phases. It also checks that the
  published R_defect and effective-clock figures follow from
  R = t/(C ln 2) and f = 1/t.
* One testbench per block: `tb_fpga_slice`, `tb_test_slice`,
  `tb_starter_block`, `tb_feedback_delay`, `tb_path_set`,
  `tb_readback_localizer`.

The slowest test finishes in well under a second.

## Where the model departs from the method, and choices it makes

* **Ideal flip-flops.** There is no setup or hold time, so the pass/fail
  threshold is exactly t_feedback. The device-specific max-pass and
  min-fail numbers, which include setup and hold, are not reproduced, and
  neither is a metastable window between them. The slow speed grades differ
  only in those terms and are not modelled.
* **Four wires per set, two of each polarity.** The configuration drawings
  show one X and one Y input per slice, but a set is four wires and the LUTs
  have four inputs. Q_X fans out onto both X wires and Q_Y onto both Y
  wires.
* **Phase B starter block.** It is the phase A starter with the clock
  inverted and the init values swapped, the same change that turns
  configuration A into B.
* **Starter clock loop.** It gets the same delay as the other feedback
  loops.
* **Routing abstraction.** A wire is a single delay (500 ps, chosen).
  Switch matrices and PIPs are not modelled individually. A defect delays
  both edges, or only rising or only falling ones. A one-direction defect
  is caught only by the phase that drives that edge on the wire, which is
  why both phases are run. A bridge is static, so it already acts during
  configuration. In that case the slice sees First already switched and gets
  no clock edge, instead of an FST. It is detected and localised all the
  same.
* **Stuck-open** is modelled as a wire that keeps its configuration-time
  value, through a deliberate latch in `path_set`.
* **Configuration** is modelled by inputs (LUT contents, clock polarity,
  init values) and a global set/reset, `cfg`. The device's real
  configuration and readback ports are not modelled. Readback is a parallel
  output.
* **Localisation in logic.** The XOR and first-non-zero search are meant to
  run on the tester's computer. Here they are a combinational block so that
  the chain reports its own result.
* `N_SLICES` = 8 is a choice. In a real device the chain snakes through
  every slice. Any size works.
