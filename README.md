# Zone-1 fault-locating relay as a five-state machine

A protective relay on a ship's distribution cable has to decide two things
after a single-line-to-ground (SLG) fault: that something happened, and
whether the fault lies inside the stretch of line it protects. This design
reduces that decision to a small synchronous state machine. It first waits
for a jump in both the measured resistance R and reactance X. Then it narrows
down where the fault is, one clock per step: within 80 % of the line, within
100 %, within 120 %. The first "yes" gives a trip, and the trip is held. A
fault beyond 120 % is outside the reach, and the machine goes back to waiting.

The logic was first worked out as a small neural-network-style decision
structure and then reduced by hand to a state table, Boolean equations and
three D flip-flops. The RTL here is that reduced circuit: about 25 gates and
3 flip-flops.

## Inputs and output

| Port        | Meaning                                             |
|-------------|-----------------------------------------------------|
| `TrpSig1Z1` | A: large increase in resistance R                   |
| `b_x`       | B: large increase in reactance X                    |
| `BRKF80`    | C: fault at or within 80 % of the line              |
| `BRKF100`   | D: fault at or within 100 % of the line             |
| `BRKF120`   | E: fault at or within 120 % of the line             |
| `Trp1Z1`    | Y: trip                                             |
| `state`     | present state `{S0,S1,S2}`, for observation         |
| `clk`, `rst_n` | clock (rising edge) and asynchronous active-low reset to S_0 |

All inputs are single-bit levels. This design does not compute the flags
from voltages and currents. They come from the surrounding protection
system: a mho distance element for A, and the measured or simulated fault
position for C, D and E. The upper-case port names are net names of the original
schematic.

## The search

States are held in three flip-flops S0 S1 S2, with S0 as the most significant bit:

| State | Code | Y | Leaves to                                  |
|-------|------|---|--------------------------------------------|
| S_0   | 000  | 0 | S_1 if A=1 and B=1, else stays in S_0      |
| S_1   | 001  | 0 | S_3 if C=1 (fault ≤ 80 %), else S_2         |
| S_2   | 010  | 0 | S_3 if D=1 (fault ≤ 100 %), else S_4        |
| S_3   | 011  | 1 | stays (trip held until reset)               |
| S_4   | 100  | 0 | S_3 if E=1 (fault ≤ 120 %), else S_0        |

The codes are not a binary count of the state number: S_4 is 100 and S_3
is 011. This is the encoding the equations are built on. Codes 101, 110 and
111 are never entered. If one ever appears (for example after an upset),
every product term below is 0, so the machine goes to S_0 on the next clock.

### Next-state equations

The next-state block (`combo_logic_zone1`) is a plain sum of products with
one product per table row. Write `s0`, `s1`, `s2`, `s3`, `s4` for the
decoded states (for example `s4 = S0 & ~S1 & ~S2`). Then:

```
S0' = ~D & s2
S1' = ~S0 & S2  |  D & s2  |  E & s4
S2' = A & B & s0  |  C & s1  |  D & s2  |  s3  |  E & s4
Y   = ~S0 & S1 & S2
```

`~S0 & S2` covers both S_1 (which always moves on to S_2 or S_3, and both
have S1'=1) and S_3 (which holds). `S0'` is 1 only on the way from S_2 to S_4.

### Latency

Count from the rising edge that samples A=B=1 in S_0. `Trp1Z1` goes high

* 2 edges later for a fault within 80 %,
* 3 edges later for one above 80 % and up to 100 %,
* 4 edges later for one above 100 % and up to 120 %.

The flags are nested: a fault at 100 % sets D and E but not C. The relay
only looks at the first flag of its search that applies, so a single flag
for the fault's band (C only, D only or E only) gives the same result.

A fault beyond 120 % sends the machine back to S_0 after 4 edges, with no
trip. Each of C, D and E is read only on the edge that leaves the state that
asks about it (S_1, S_2 and S_4). The flags must therefore be valid during
that clock, not when the disturbance starts. The original circuit gives no
clock frequency. Turning clocks into time is left to the integrator.

## Where this departs from the original schematic

* **No return from S_1 on AB=0.** The original state diagram also draws an
  arrow from S_1 back to S_0 labelled AB=0. The original state table, and
  the equations derived from it, do not have that arrow: in S_1 the next
  state depends on C alone. This RTL follows the table. To add the return,
  gate the S_1 terms of S1' and S2' with `A & B`.
* **Reset, clock edge and unused codes** are choices made here. The original
  shows only clocked D flip-flops that start in S_0.
* **Only zone 1 of one relay.** The ship system has four relays. Only one
  relay's zone-1 logic is specified, and only that is built. Further zones
  or relays would be more instances with their own flags.
* **Not built:** the mho element and the other sources of the flags. The
  same goes for the neural network and its training, from which the state
  machine was derived: it has no hardware form here, so the relay does not
  "learn". It gives the same answer for the same flags every time.

## Files

| File                        | Contents                                           |
|-----------------------------|----------------------------------------------------|
| `rtl/ebp_pkg.sv`            | state encoding (`ebp_state_e`)                     |
| `rtl/combo_logic_zone1.sv`  | next-state logic                                   |
| `rtl/state_flip_flops.sv`   | three D flip-flops with Q and Q-bar                |
| `rtl/trip_gate.sv`          | `Y = ~S0 S1 S2`                                     |
| `rtl/ebp_relay_zone1.sv`    | top level. Its assertions check that only the five codes occur and that a trip is held |
| `tb/tb_*.sv`                | one self-checking testbench per module             |

The testbenches are:

* `tb_combo_logic_zone1`: all 256 input and state combinations, checked
  against a case-statement model of the table.
* `tb_trip_gate`: all eight state codes.
* `tb_state_flip_flops`: random loads, asynchronous reset, and that Q is
  complemented on Q-bar.
* `tb_ebp_relay_zone1`: the end-to-end test. It injects faults at 80, 88,
  100, 101, 117, 120 and 130 % and one-sided disturbances, and checks whether
  each trips and after how many clocks. It then runs 20,000 random clocks
  with random resets against a reference model, and counts every
  state-diagram transition, the held trip and the reset. A transition that
  never happens counts as a failure.

Each testbench prints `TB_RESULT checks=N failures=M` and stops.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ebp_pkg.sv \
    tb/tb_ebp_relay_zone1.sv --top-module tb_ebp_relay_zone1
./obj_dir/Vtb_ebp_relay_zone1
```

Replace the testbench name to run the others. The design has no size
parameters apart from `state_flip_flops.WIDTH`, which must stay 3 for the
relay. The end-to-end test therefore runs the design exactly as built, in
well under a second.
