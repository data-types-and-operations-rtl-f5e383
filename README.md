# Redundant data types in hardware: triplicated storage and operators, and a hardened maze-robot controller

SRAM-based FPGAs lose bits of their configuration to single-event upsets, so a
circuit running in one can silently compute the wrong thing. A common fix is to
triplicate the whole design and vote (TMR). This RTL shows a finer-grained
variant: instead of copying the whole circuit, each *variable* of the
algorithm is given a redundant data type. A TMR variable is three copies of the
ordinary value, every operation on it is done three times, and the three
results are voted and written back to all three copies. Where a hardened
variable meets an unhardened one, or one hardened differently (duplex), the
operator adapts the operand. Only the data path is hardened this way; the
control path stays single.

The repository holds two things built from that idea:

* a small library of TMR building blocks: a majority voter, a TMR register, a
  triplicated unary operator, a triplicated binary operator for the three kinds
  of second operand, a duplex compare/switch stage, and the conditional
  operator built on a cast of a TMR value to Boolean;
* a maze-robot controller that follows the left-hand rule, with every
  data-path variable and operation built from that library.

`rdt_top` puts the controller and the three binary-operator cases side by side.

## How a TMR value travels

A TMR value of width `W` is a packed array `logic [2:0][W-1:0]`; index 0, 1, 2
are the copies x, y, z. A duplex value is `logic [1:0][W-1:0]`. The types and
operator codes are in `rdt_pkg`.

* **Assignment of a constant or unhardened value** repeats it into all three
  copies: `b = 7` becomes `b_x = b_y = b_z = 7`.
* **An operator** (`tmr_unop`, `tmr_binop`, `tmr_cond`) has three operator
  copies M1, M2, M3. Copy *i* of the result passes through its own voter
  (`tmr_voter`), which sees all three results. So the three outputs are the
  majority, each from an independent voter: a fault in one operator copy or in
  one voter affects at most one output copy, which the next vote removes.
* **Storage** (`tmr_reg`) keeps three copies. A write stores three already
  voted copies. In every cycle without a write, each copy is rewritten from
  its own voter, so a flipped bit in one copy lives for one cycle.
* **Leaving the TMR domain**, for example at an output port, takes one voter.

Nothing is voted only once and shared, except the Boolean cast of a condition
(see below): that is the single point where three copies become one decision.

## The three kinds of second operand

`tmr_binop` fixes, by the parameter `B_SRC`, where its second operand comes
from:

| `B_SRC`      | second operand            | feeding M1..M3                                    |
|--------------|---------------------------|---------------------------------------------------|
| `SRC_TMR`    | another TMR value         | copy *i* feeds M*i*                               |
| `SRC_DUPLEX` | a duplex value (2 copies) | through `duplex_cs`, whose one output feeds all three |
| `SRC_PLAIN`  | an unhardened value       | the one value feeds all three                     |

In the duplex and unhardened cases, a fault in the second operand reaches all
three copies and cannot be voted out. The hardening there covers only the
operator and the first operand.

`duplex_cs` is the compare/switch stage. Two copies cannot outvote each other,
so when they differ the stage passes copy 0 and raises `dup_mismatch`. Which
copy to pass is a choice of this design; a system that hardens its duplex parts
would use the flag to retry or to signal an error.

Operators available (`binop_e`): add, subtract, multiply, and, or, xor, shift
left/right (by the low log2(W) bits), and the comparisons ==, !=, < giving 0
or 1. Unary (`unop_e`): negate, bitwise not, logical not, increment,
decrement. All arithmetic is unsigned.

## The conditional operator

`cond ? a : b` needs one decision, not three. `tmr_cond` votes the three
condition copies and tests the majority against zero (the cast to Boolean,
output `sel`). That one decision selects, copy by copy, between the TMR
operands `a` and `b`, and the three selected copies are voted again. A single
corrupted condition copy cannot change the decision.

## The robot controller (`robot_ctrl`)

The robot has three wall sensors, relative to itself: left, front, right
(`sens_walls = {left, front, right}`, 1 = wall). At each decision point it
keeps the wall on its left:

1. left open: turn left and step;
2. otherwise front open: step forward;
3. otherwise right open: turn right and step;
4. otherwise (dead end): turn back and step.

The move command `move_e` encodes the turn in quarter turns clockwise
(FORWARD 0, RIGHT 1, BACK 2, LEFT 3), so the new heading is `heading + cmd`
modulo 4. The data path, with every variable TMR:

```
sens  <= sens_walls                                (tmr_reg, plain write)
wl, wf, wr = sens & 3'b100, & 3'b010, & 3'b001     (tmr_binop, plain operand)
turn  = wl ? (wf ? (wr ? BACK : RIGHT) : FORWARD) : LEFT     (3 x tmr_cond)
cmd   <= turn                                      (tmr_reg)
head  <= head + turn                               (tmr_binop, TMR operand)
steps <= steps + 1                                 (tmr_unop, increment)
```

`cmd`, `heading` and `steps` leave through voters. The two valid flags that
sequence the data path are the control path and are single copies.

**Timing.** `sens_valid` samples `sens_walls` on a rising edge. The decision is
stored on the next edge, and `cmd_valid` is high for the cycle after that, with
`cmd`, `heading` (after this move's turn) and `steps` (moves so far, including
this one). The answer thus comes two clocks after the sample. A new sample may
be given every cycle. `rst_n` is asynchronous and active low and clears
everything (heading 0, count 0).

**Fault injection.** While `fi_en` is high, bit `fi_bit` of copy `fi_copy` at
site `fi_site` is inverted. Twelve sites (`fsite_e`, the first
`N_DATA_FSITES`) are the four registers and eight operators of the data path.
In a register the copy is flipped as it is clocked; in an operator that copy's
result is inverted. Two more sites, `FS_CTRL_DEC` and `FS_CTRL_OUT`, invert
the input of one of the two single-copy valid flags; nothing masks those. A
held fault stands in for an upset configuration bit that stays wrong for the
whole run. `tmr_err` is
high in any cycle in which some voter sees disagreeing copies. It is a
monitor, not needed for correction.

The left-hand rule and the full hardening of the data path are the design's
core. The exact variables (sensor word, command, heading, move count), the
widths, the handshake and the latency are this RTL's own choices; the
controller is the simplest one that implements the rule.

## Parameters

| module        | parameter | default   | meaning |
|---------------|-----------|-----------|---------|
| `rdt_top`     | `DATA_W`  | 32        | width of the operand copies of the three operator cases (a C++ `int`) |
| `rdt_top`, `robot_ctrl` | `STEP_W` | 16 | width of the move counter (own choice) |
| `tmr_voter`, `tmr_reg`, `tmr_unop`, `tmr_binop`, `duplex_cs` | `W` | 32 | value width |
| `tmr_reg`     | `RESET_VAL` | 0       | value of all copies after reset |
| `tmr_binop`   | `B_SRC`   | `SRC_TMR` | source of the second operand |
| `tmr_cond`    | `W`, `CW` | 32, 32    | width of the selected values and of the condition |

## What is verified

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_tmr_voter`, `tb_duplex_cs`, `tb_tmr_unop`, `tb_tmr_binop`,
  `tb_tmr_cond`: random operands against reference models written in the
  testbench, with a fault in one copy (operator result, operand copy or
  condition copy) that must be voted out and flagged.
* `tb_tmr_reg`: reset, writes, a one-cycle upset masked at the voter and gone
  one clock later, an upset arriving with a write.
* `tb_robot_ctrl`: random sensor words, back to back and with gaps, against a
  reference left-hand rule, with the exact two-clock latency checked. Then
  single persistent faults at every data-path site and every copy: outputs
  must not change, and `tmr_err` must fire. Last, each control flag is
  inverted, which must produce unrequested answers.
* `tb_rdt_top` runs the top at its default parameters. It checks the
  triple-`int` example 7 + 8 = 15 and 2000 random operations through the three
  operand cases, with operator faults and duplex disagreement. Then it plays
  the robot in an 8 x 8 perfect maze, generated by a randomised depth-first
  search driven by a fixed-seed xorshift generator. It makes 1000 runs from
  (0,0) to (7,7), each after a reset: the first fault-free, each other one
  with a random single fault held for the whole run. All 1000 runs reach the
  goal with no collision, along the fault-free path (70 moves). Each move
  type, each fault site and each operand case is counted and must occur.

## Fault campaign

`tb_fault_campaign` repeats a single-upset experiment in simulation. It makes
1000 maze runs, each from reset, in the same maze with the same start and
goal. Each run holds one fault, drawn uniformly from all 170 fault bits: 3
copies of every bit at the twelve data-path sites (168) and the two control
flags (2). Both the maze and the draws come from fixed-seed generators, so
the result does not depend on the simulator seed. Each run is compared with
the fault-free one:

| outcome                                   | runs |
|-------------------------------------------|------|
| electronically correct                    | 993  |
| electronically failed                     | 7    |
| goal not reached                          | 5    |
| collision with a wall                     | 5    |
| goal reached although the answers were wrong | 2 |

All 993 runs with a data-path fault were masked. All 7 failures are
control-flag faults (7 of 7 such runs failed). The testbench fails if any
data-path fault gets through. The split depends on how many fault bits sit
in the unhardened control path. In this small controller that is 2 of 170;
in an FPGA it would be far more, together with the voters themselves.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rdt_pkg.sv tb/tb_rdt_top.sv --top-module tb_rdt_top -o sim
./obj_dir/sim
```

Replace `tb_rdt_top` with any other testbench name. All of them finish in well
under a second.

## Limits and departures

* **Fault sites are the data-path copies and the two control flags.**
  Voters, the compare/switch stage and the sensor input before it is copied
  are not fault sites. A real upset in an FPGA can land in any of those, and in
  the routing, so the campaign's failure rate is a lower bound for a real
  device.
* **No faults accumulate across copies.** Two faults in different copies of
  one variable defeat TMR, as they would in any TMR design.
* **Scrubbing on idle cycles.** `tmr_reg` rewrites itself from its voters in
  every cycle. The scheme itself only requires the vote after each operation;
  the refresh is added so that register upsets do not linger.
* **The duplex stage's choice** on disagreement (copy 0) is arbitrary, as
  explained above.
* **One fixed schedule.** A controller produced by high-level synthesis could
  be scheduled many ways (no optimisation, a pipelined main loop, a loop
  unrolled twice); this RTL is one hand-written schedule, and its size and
  speed say nothing about those variants.
* **Not included:** the host-side fault injector, the robot and maze
  simulation, the Ethernet link between controller and simulation, and the
  rest of the verification environment. The controller's sensor and command
  signals are plain ports, and `tb_rdt_top` plays the robot and the maze.
