# Petri nets as FPGA logic: the EFDIA failure-detection circuit

A Petri net describes a system as places, which can hold tokens, and
transitions, which move tokens between places. A synchronous circuit can
carry out the same net directly:

| Petri-net element        | circuit element                                    |
|--------------------------|----------------------------------------------------|
| place                    | D flip-flop; `Q = 1` means the place holds a token |
| token                    | logic 1                                            |
| arc                      | wire                                               |
| immediate transition     | junction, or the gate that joins its input arcs    |
| inhibitor arc            | wire with an inverter                              |
| timed transition         | timer that starts on a rising input and fires `t` seconds later |
| counting place           | binary event counter with asynchronous clear       |

This repository holds two designs built from these elements:

* **EFDIA**, the *early failure detection and isolation arrangement*. This
  is the main design. It is the Petri net of one monitored subsystem *i*.
  It raises a warning when a monitored signal passes its warning level. It
  tells whether the fault lies in subsystem *i* or comes from the subsystem
  below it. It declares a failure if no maintenance action arrives within a
  lead time. It keeps 4-bit logs of warnings, errors, maintenance actions
  and failures. It is shown wired to the switches, LEDs and seven-segment
  displays of a small FPGA demonstration board.
* **A macro library** of the basic Petri-net logic structures, such as
  TRANSFER, AND, OR and INHIBITION. Each structure is a small circuit of
  places and a gate.

`pn_fpga_top` puts both designs side by side. They share the clock and the
reset and have separate ports.

## The EFDIA net

Inputs (11 pins) and outputs (28 pins) are grouped in the packed structs
`efdia_in_t` and `efdia_out_t` in `rtl/pn_pkg.sv`.

| input  | meaning                                                     |
|--------|-------------------------------------------------------------|
| SIN    | `S_i`: the monitored signal of subsystem *i* passed its warning value |
| TI-1S  | transition `T_S` of the next-lower subsystem fired (its fault propagates up) |
| PIA    | `P_i^A`: maintenance or inspection action taken             |
| IRW, IRR, IRE | reset buttons that fire the logging transitions W, R, E |
| CPI-1W, CPIR, CPIL, CPIM, CPIF | asynchronous clears of the five counters |

The net, as built in `rtl/efdia.sv`. Each `place <= x` is a flip-flop
loaded every clock with `x`. Each `T = ...` is a gate.

```
SIN --T_iS--> places PIB1, IWS (warning), PIT, NHPB2 (next-higher B2)
TI-1S ------> place  PIB2
TIE = PIB1 & ~PIB2          -> place PIE        error lies in subsystem i
TIW = PIB2 & IRW            -> counter PI-1WQ   warning log of the next-lower subsystem
TIR = PIB1 & IRR            -> counter PIRQ
TIL = PIE  & IRE            -> counter PILQ     error log
TIP = PIA  & IWS            -> place PIP
H3: start on PIP & PIT,     output TIM -> counter PIMQ  maintenance log
H4: start on IWS & ~PIA,    stop on PIA or H3 running,
                            output TIU -> place PIU
TIT = PIU & PIT             -> PI (failure), ASFM (shutdown request), counter PIFQ
```

There are two kinds of decision in this net.

* **Where the fault lies.** PIB1 is marked by the subsystem's own warning.
  PIB2 is marked when the subsystem below reported first. The inhibitor arc
  from PIB2 into `T_iE` sets the error flag PIE only when the warning is not
  explained from below. If TI-1S arrives before SIN, PIE stays low. In that
  case IRW logs the warning against the lower subsystem instead.
* **Maintenance or failure.** The warning starts H4, which measures the
  *maintenance lead time*. This is the time between the warning level and
  the largest value the system allows. If PIA arrives first, it stops H4
  and starts H3, which measures the maintenance time. When H3 completes,
  the maintenance log counts one. If PIA never comes, H4 completes after
  20 s and TIU marks PIU. TIT then raises PI and ASFM for one second and
  the failure log counts one.

### Why H4 is also held while H3 runs

H4 starts on a *rising edge* of `IWS & ~PIA`. A press of PIA stops H4. When
a short press ends, `IWS & ~PIA` rises again and would start H4 a second
time. Twenty seconds later it would then declare a failure even though
maintenance had been done. The published timing shows H4 staying idle
after the press, and the circuit description says H4 stops once H3 starts
counting. This design therefore drives H4's stop with `PIA | H3.busy`.
For this to work, PIA must be held for at least three clock cycles, so that
H3 is already running when PIA falls. A pushbutton press easily meets this.

## Timed transitions: `delay20` and `freqdiv15`

This is the part with the most timing detail. A timed transition is built
from the following parts:

1. A start flag is set by a rising edge on `in2`. A start edge is ignored
   while `stop` is high or while a run is in progress.
2. While the flag is set, `base_tick` pulses go to the `freqdiv15`
   prescaler. This is 15 Hz on the original board, from the FPGA's on-chip
   oscillator. The prescaler emits one pulse for every 15 input pulses,
   which gives a 1 Hz tick.
3. The seconds are counted by two cascaded decade counters (`bcd_counter`,
   74160-style), ones and tens, so the count is BCD.
4. `out2` is high while the count equals `N` (20). On the next second,
   which would take the count to `N+1`, the flag, the prescaler and the
   count are all cleared. `out2` is therefore a pulse exactly one second
   long.

With `base_tick` high every cycle, a start edge sampled at clock edge 0
gives `out2` high after edge `PRESCALE*N` = 300. It stays high for
`PRESCALE` = 15 cycles. In the EFDIA, SIN sampled at edge 0 marks IWS
after edge 0. H4 sees the start at edge 1, `TIU` rises after edge 301, and
PI rises after edge 302. `tb_efdia` checks these cycle counts.

`PRESCALE` and `N` are parameters, so other delays can be built from the
same parts. `N` may be 1..98 and `PRESCALE` 2..99, because each uses two
decades. The timer asserts that its count never exceeds `N`.

## Event counters: `cb4ce`

`cb4ce` is a 4-bit binary counter with clock enable `ce`, asynchronous
clear `clr`, terminal count `tc` (all ones) and cascade output
`ceo = tc & ce`. In the EFDIA each counting place counts one for every
firing of its transition. A small edge detector turns the rising edge of
the transition signal into a one-cycle `ce`. The counters wrap from 15 to 0.

## The macro library

| module            | structure | behaviour (after the stated number of clock edges) |
|-------------------|-----------|-----------------------------------------------------|
| `pn_place`        | place | `q` = `d` of the previous edge |
| `pn_relation`     | TRANSFER, AND, OR, INVERT, INHIBITION, IMPLICATION, NAND, NOR, XOR, XNOR, chosen by the `REL` parameter (`pn_pkg::pn_relation_e`) | input places X1 and X2, gate, output place Y: `y = REL(x1, x2)` two edges later |
| `pn_transfer_and` | TRANSFER AND | a token in X reaches both Y1 and Y2 two edges later |
| `pn_transfer_or`  | TRANSFER OR | the token of X goes to Y1 if `x1` and to Y2 if `x2`; `x1`/`x2` enter the gates without a place |
| `pn_identity`     | IDENTITY | self-holding place: D = x OR Q; once marked it stays marked until reset |

`PN_TRANSFER` and `PN_INVERT` use `x1` only. The default `REL` is
`PN_AND`.

## Board wiring: `efdia_board`

| board part | signal |
|------------|--------|
| SW3-1 .. SW3-8 (`sw3[0..7]`, on = 1) | CPI-1W, TI-1S, SIN, IRW, IRR, CPIL, CPIR, CPIM |
| SW4, SW5 pushbuttons (active low) | IRE, PIA |
| `cpif` (own input pin) | CPIF |
| LEDs D9..D16 (`led_n[0..7]`, active low) | PI, ASFM, IWS, PIT, PIB1, NHPB2, PIB2, PIE |
| U7 segments a..g (`u7_seg_n[0..6]`, active low) | PI-1WQ0, PI-1WQ1, PIRQ1, PILQ0, PILQ1, PILQ2, PIRQ0 |
| U8 segments a..g (`u8_seg_n[0..6]`, active low) | PIMQ0, PIMQ1, PIFQ1, PIFQ3, PIFQ2, PIMQ2, PIFQ0 |
| `aux_q[5:0]` (active high) | PIMQ3, PILQ3, PIRQ3, PIRQ2, PI-1WQ3, PI-1WQ2 |

Each display segment shows one counter bit; the segments do not form
digits. FPGA pad numbers are left to the pin-constraint file of a real
build.

## Clocking and reset

Everything runs on one clock, `clk`. On the original board the places
were clocked by the on-chip oscillator and the timers by its 15 Hz output.
Here the timers use `clk` too and advance on `f15_tick`, a one-cycle enable
at the 15 Hz rate. Drive `f15_tick` high all the time if `clk` itself is
15 Hz. The oscillator is not part of the RTL.

`rst` is synchronous and active high. It empties every place, stops both
timers and clears the counters. The original relies on the FPGA's
configuration-time clear. The five counter clears are asynchronous, as in
the original counter.

Gated clocks in the original are clock enables here. This applies to the
timer start, the prescaler input and the counters, which were clocked by
their transition signals. Counts and durations are unchanged. Events are
resolved to one `clk` period.

## Where this RTL departs from the original circuit

The net list follows the published schematic and Petri net of the EFDIA.
The testbenches reproduce the three published failure scenarios with the
same order of events and the same 20-second timer runs. The differences are
the following.


* **Single clock domain.** See above.
* **H4 stop.** H4 is also stopped while H3 runs, and PIA must last at
  least three cycles. The reason is explained above.
* **H3 stop.** Its stop input is tied to `rst`. The original circuit
  does not say what drives it, and its behaviour does not need it.
* **Divide-by-15.** The original prescaler decodes counts 15 and 16 with an
  asynchronous clear. Taken literally, that divides by 16. This design
  divides by exactly 15, which is what the 15 Hz to 1 Hz use requires.
* **Self-clear.** The timer's clear past `N`, and the prescaler's wrap, are
  synchronous, so `out2` is exactly one second long. The prescaler is also
  cleared between runs, so every run lasts exactly `N` seconds. In the
  original it kept its residue, which made a run up to one second shorter.
* **TRANSFER OR.** The structure does not arbitrate between X1 and X2. If
  both are high, both outputs receive the token, exactly as the gate
  circuit does.
* **`cb4ce`.** `ceo = tc & ce` and the wrap-around are assumed.
* **Macro library.** One parameterised `pn_relation` replaces a separate
  macro per relation.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pn_fpga_top \
    -y rtl -Irtl rtl/pn_pkg.sv tb/tb_pn_fpga_top.sv
./obj_dir/Vtb_pn_fpga_top
```

Replace the top module and testbench file for any other block.
`tb_pn_fpga_top` runs the whole design at its default parameters, through
the board pins. It runs the three failure scenarios and clears every
counter, and it drives the macro library with random inputs. It counts
each mechanism and fails if any never occurred: warning, failure,
lead-time timer stopped by maintenance, maintenance completed, error flag
inhibited by a lower-level cause, each counter counting, counter clear, and
every library output showing both 0 and 1. `tb_efdia` checks the same
three scenarios on the bare core, including the exact cycle counts of the
timers. The unit testbenches compare each block with a reference model
written independently in the testbench.

The three scenarios are:

1. SIN without TI-1S, with PIA pressed 7 s into the lead time. There is no
   failure. The maintenance log counts after 20 s, PIE is set, and IRE
   logs the error.
2. TI-1S then SIN, with PIA pressed. PIE is inhibited, IRW logs the
   lower-level warning, IRR logs R, the maintenance log counts, and there
   is no failure.
3. SIN without TI-1S and without PIA. PI and ASFM pulse for one second
   after the 20 s lead time, the failure log counts, and IRE logs the
   error.

All files are synthesizable SystemVerilog-2017 apart from the testbenches.
The EFDIA with its board wrapper needs 66 flip-flops.
