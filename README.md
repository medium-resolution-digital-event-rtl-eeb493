# Digital event timer and range gate generator for kHz satellite laser ranging

A kHz satellite laser ranging station fires thousands of laser pulses per
second at targets up to tens of thousands of kilometres away. For a high
satellite, up to about 300 pulses are in flight at once. The station can
therefore not measure one start-to-stop interval at a time. Instead it
time-stamps every laser firing and every return on its own. It also has to
switch its single-photon detector on just before the photons of each shot
come back.

This design puts two fast, fully digital timing functions into one FPGA:

* **Event timer.** It time-stamps the laser start pulse with 250 ps
  resolution. The result is ready at most 10 ns after the pulse.
* **Range gate generator.** It opens the detector gate at a programmed
  epoch. The epoch is set in 500 ps steps.

Both functions measure time the same way. An epoch is a count of a
free-running 200 MHz clock (5 ns steps) plus a fraction of a clock period.
That fraction comes from a chain of AND gates, each with a transit time of
about 250 ps. A PC closes the loop. It reads the start epoch, predicts the
return epoch, and loads that into the range gate generator.

```
             event_in (laser start)
                  |
   +--------------v---------------+        +-------------------+
   | et_multi: 4 x et_unit        |        | coarse_counter    |
   |  20 AND chains + out register|<-------| 200 MHz, 32 bit   |
   +--------------+---------------+        +---------+---------+
                  | coarse/fine/valid                |
   +--------------v-----------------+                |
   | host_regs  (PC register bus)   |<---------------+
   +--------------+-----------------+                |
                  | epoch, width, arm                |
   +--------------v-----------------+                |
   | range_gate_gen                 |<---------------+
   |  compare -> AND chain -> 10 DFF|---> range_gate (to detector)
   +--------------------------------+
```

## Epochs and the clock edge numbering

Everything refers to one numbering of clock edges. The coarse counter holds
`n` after the n-th rising edge following reset. Call the time of that edge
`T(n)`. The edges are 5 ns apart, so `T(n) = T(0) + n * 5 ns`.

* An event-timer result `(coarse = E, fine = f)` means that the event
  happened in the interval `[T(E) - (f+1)*250 ps, T(E) - f*250 ps)`. In
  250 ps units this is `E*20 - f - 1`, the lower end of the interval. The
  midpoint, `T(E) - (f + 0.5)*250 ps`, is the best estimate.
* A range gate programmed with `(coarse = C, fine = k, width = W)` rises at
  `T(C) + k*500 ps` and falls at `T(C + W)`.

The host does the conversion between the two units. Take the averaged start
estimate `s` in ps since `T(0)`, the predicted time of flight `tof`, and a small
lead `L`. The gate epoch is then `g = s + tof - L`. The host writes
`C = g div 5000` and `k = (g mod 5000) div 500`.

## How the vernier event timer works (`et_unit`)

This is the subtle part of the design. The event pulse enters 20 AND-gate
chains in parallel. Chain `k` has `k+1` gates, so its far end goes high
`(k+1)*250 ps` after the event. Nothing is clocked while the pulse runs
through the chains.

The next rising clock edge is the *stop* pulse. It latches the far ends of
all 20 chains into an output register. A chain that the event has already
run through gives a 1; a chain still in flight gives a 0. If the event came
`d` ps before the edge, the register holds a thermometer code with about
`d / 250` ones. So the register measures the time from the event to the next
clock edge, not from the previous edge. That is why the result is
subtracted from `T(E)`.

The same edge also samples the event pulse itself into a flip-flop. On the
next edge the unit sees that flip-flop rise and stores three things:

* the coarse count, which still holds the stop edge's number `E`;
* the number of ones in the output register;
* `valid`.

The ones are counted rather than searched for the first 0. This means a
"bubble" (a single out-of-order bit, which uneven real gates can cause) costs
at most one step and does not give a wild value.

Conditions on the event pulse:

* It must stay high for at least one clock period. Otherwise its falling
  edge could still be inside the chains at the stop edge.
* It must go low again before the next event.

The event input goes straight into a flip-flop without a synchroniser. This
matches the timing idea, because the stop edge must be the first edge after
the event. In hardware this flip-flop can go metastable, which the model
does not show.

A new event overwrites an unread result. `clear` (from the host) drops
`valid`. `enable = 0` empties the chains and ignores events.

### Four units in parallel (`et_multi`)

One unit has a quantisation error of ±125 ps. Four units sit on the same
event. Each has its own chains and output register, and the host averages
their four results. In the FPGA the units differ through their placement.
The model exposes this as `UNIT_SKEW_PS`, an extra input delay of
`i * UNIT_SKEW_PS` for unit `i`. The default is 0, so the units are
identical in simulation.

With a quarter-gate skew (62 ps), the four quantisation grids interleave. The
simulated RMS error then falls from about 70 ps for one unit to about 17 ps
for the average. The average carries a constant offset of 1.5 × the skew,
which the host calibrates out. In real hardware, noise and gate non-linearity
dominate, so the gain is much smaller.

## How the range gate generator works (`range_gate_gen`)

The host writes:

* the coarse epoch `C`;
* the tap `k` (0–9);
* the gate width `W` in clock cycles.

It then arms the generator, which copies all three values. Then:

1. The generator waits until the coarse counter is about to reach `C`. On
   edge `T(C)` it raises a start pulse.
2. The start pulse runs down a chain of 18 AND gates. Every second gate is a
   tap, so tap `j` is reached `j*500 ps` after the edge. Tap 0 is the start
   pulse itself.
3. Each tap is the clock of its own D flip-flop. The selection logic is a
   one-hot decode of `k`, and it puts a 1 on the D input of flip-flop `k`
   only. So only that flip-flop switches as the pulse passes, and its output
   is the gate.
4. After `W` cycles (a width of 0 counts as 1), the start pulse drops.
   At the same edge the flip-flops are cleared asynchronously, so the gate
   falls on `T(C+W)`.

The generator then returns to idle. It is one-shot: the host arms it once
per expected return. An arm that comes while it is armed or firing is
ignored.

Two details protect against flip-flops that power up set:

* The tap flip-flops are cleared on the first clock edge after reset, and
  kept cleared while idle.
* The gate output is ANDed with the start pulse.

Because of these, no gate can appear outside a programmed window. An
assertion checks that at most one tap flip-flop is ever set.

A tap value of 10–15 selects no flip-flop, and no gate appears. An epoch
that is already in the past fires only after the counter wraps, 21.47 s
later. The host must keep the epochs ahead of time.

## Host register interface (`host_regs`)

The register interface is a simple synchronous port in the 200 MHz domain.
The ISA bus logic of the card is not part of this design and would sit in
front of this port. A write strobe `wr` takes effect on the clock edge. A
read strobe `rd` returns `rdata` on the following edge.

| address | register | meaning |
|---|---|---|
| 0x00 | CTRL | bit 0: event timers enabled (reset 1). Bit 1: write 1 to arm the range gate. |
| 0x04 | STATUS | bits 3:0: unit results valid, write 1 to clear. Bit 8: gate armed. Bit 9: gate firing. |
| 0x08 | RG_COARSE | gate epoch, 5 ns count |
| 0x0C | RG_FINE | gate tap, 0–9 (500 ps) |
| 0x10 | RG_WIDTH | gate length in 5 ns cycles (reset 1) |
| 0x14 | COUNTER | live coarse counter |
| 0x20 + 8i | ET i coarse | stop-edge number of unit i |
| 0x24 + 8i | ET i fine | fine code of unit i (0–19) |

Addresses that are not listed read as 0.

## The delay chains are a behavioural model (`and_delay_chain`)

Both timing functions rely on the physical transit time of placed FPGA
gates. RTL cannot express that, so `and_delay_chain` gives each gate a
delay: `assign #(GATE_DELAY_PS) out = in & enable`, with `timescale 1ps/1ps`.

* **In simulation.** Simulate with timing enabled, `verilator --timing`.
  The chains then behave as ideal 250 ps gates.
* **In synthesis.** The delays are ignored, and a synthesis tool would
  collapse a chain of ANDs into one gate. A real build needs the vendor's
  keep/no-optimise attributes and a fixed placement for the chains, their
  output register and the range-gate flip-flops. That placement is what
  sets the linearity.

The model leaves out the following:

* gate-to-gate variation;
* placement non-linearity;
* temperature drift (about 10 ps per °C on a 100-gate chain);
* jitter;
* metastability.

The simulated accuracy is therefore the ideal quantisation limit, not what
hardware achieves.

The range-gate flip-flops are clocked by chain taps. This is intended: it is
the mechanism of the generator. Timing analysis must treat each tap as a
clock of its own.

## Parameters

| parameter | default | where |
|---|---|---|
| clock period | 5000 ps (200 MHz) | `timer_pkg::CLK_PERIOD_PS` |
| gate transit time | 250 ps | `GATE_DELAY_PS` |
| event timer chains | 20 (5 ns / 250 ps) | `NCHAINS` |
| event timer units | 4 | `NUNITS` |
| range gate taps | 10 (5 ns / 500 ps), 2 gates each | `RG_NTAPS`, `GATES_PER_TAP` |
| coarse counter width | 32 bits (wraps after 21.47 s) | `CW` |
| gate width register | 16 bits | `RG_WW` |

The clock, gate delay, number of units and the two resolutions come from
the system this design implements. The widths, the register map, the bus,
the arming handshake, the gate length, the reset behaviour, the unit skew
and the chain count per step are choices of this design.

## Files

`rtl/`:

* `timer_pkg.sv`: constants and register map.
* `coarse_counter.sv`, `and_delay_chain.sv`, `et_unit.sv`, `et_multi.sv`,
  `range_gate_gen.sv`, `host_regs.sv`: the blocks described above.
* `graz_fpga_timer.sv`: the top. Its ports are `clk`, `rst_n`, `event_in`,
  the register bus (`addr`, `wr`, `wdata`, `rd`, `rdata`) and `range_gate`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`.

* `tb_et_unit`: 400 random events off the 250 ps grid. Checks the coarse and
  fine results against a reference, the 20 ns latency, clear and disable,
  and that every fine code 0–19 occurs.
* `tb_et_multi`: four skewed units, plus the averaging gain.
* `tb_range_gate_gen`: 200 random epochs. Checks exact rise and fall times,
  that every tap is used, and the ignored re-arm and out-of-range cases.
* `tb_host_regs`: register read and write, clear and arm pulses.
* `tb_and_delay_chain`: tap timing, and a 100-gate chain of 25 ns.
* `tb_coarse_counter`: counting and wrap.
* `tb_graz_fpga_timer`: end-to-end, at default parameters, with the
  testbench acting as the PC. It runs 60 laser shots, each timed by all four
  units, averaged, and followed by a range gate. It checks that each gate
  lands on its programmed step and within 1 ns of the wanted epoch. Every
  second shot fires while the previous gate is still armed. At the end the
  timers are disabled and must ignore a pulse. Each of these mechanisms is
  counted.

To run one testbench:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb --top-module tb_et_unit \
    rtl/timer_pkg.sv tb/tb_et_unit.sv
./obj_dir/Vtb_et_unit
```

The full testbench set runs in a few seconds.
