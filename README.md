# Shift-register multiplier

A small sequential multiplier for two 4-bit unsigned numbers. It works by
shift-and-add. The multiplicand sits in a register that doubles every clock
cycle. The multiplier sits in a register that shifts one bit toward bit 0 every
cycle. Whenever the multiplier's current bit 0 is 1, the adder adds the
multiplicand to an accumulator. The work ends as soon as no 1 bits of the
multiplier are left. A multiplier of zero is answered almost at once, and
`b = 1111` takes longest.

The published result is the product **divided by two**, truncated. It is the
accumulator without its least significant bit, so it is 7 bits wide:

| a | b | a·b | result |
|---|---|-----|--------|
| 1010 (10) | 0011 (3) | 30 | 0001111 (15) |
| 1010 (10) | 0000 (0) | 0 | 0000000 (0) |
| 0001 (1) | 1111 (15) | 15 | 0000111 (7) |

These three cases are the reference cases of the design. `tb/designedsystem_tb.sv`
checks them first and then every other operand pair.

## Structure

```
             +-----------+   load            +---------------------------+
 start ----->|  control  |------------------>|         datapath          |
 ready <-----| (2 flops) |<------------------|  operand a (8b, <<1/cycle) |
             +-----------+  internal_ready   |  operand b (4b, >>1/cycle) |
                 ^ clock                     |  adder (8b)                |
                 |                           |  accumulator (8b)          |---> result[6:0]
 clock ----------+------------[inverter]---->|  (falling edge)            |
 a[3:0], b[3:0] ------------------------------>                           |
                                             +---------------------------+
```

| Module | File | Role |
|---|---|---|
| `designedsystem` | `rtl/designedsystem.sv` | top level: controller plus data path, clock inversion |
| `control` | `rtl/control.sv` | start/ready controller, two D flip-flops and a few gates |
| `datapath` | `rtl/datapath.sv` | the three registers, the adder, the zero detector |
| `shift_reg_cle` | `rtl/shift_reg_cle.sv` | loadable shift register (toward MSB), clock enable, async clear |
| `shift_reg_cled` | `rtl/shift_reg_cled.sv` | loadable bidirectional shift register, clock enable, async clear |
| `adder` | `rtl/adder.sv` | adder with carry in, carry out, overflow |
| `mult_pkg` | `rtl/mult_pkg.sv` | operand width and the controller's state type |

The three leaf modules behave like the standard FPGA library parts that the
data path was drawn with: an 8-bit shift register with clock enable, a 4-bit
bidirectional one, and an 8-bit adder. They are written here as generic
parameterised RTL. Their behaviour (clear before load, load before enable) is
the usual behaviour of those parts.

## Data path

All three registers are clocked together (see *Clock edges* below).

* **Operand a** (`shift_reg_cle`, 8 bits) loads `{4'b0000, a}` while `load`
  is high. At every other edge it shifts toward the MSB with a 0 coming in.
  In cycle *k* after the load it holds `a << k`.
* **Operand b** (`shift_reg_cled`, 4 bits, direction tied to "right") loads
  `b`. At every other edge it shifts toward bit 0 with a 0 coming in at
  the top. In cycle *k* its bit 0 is bit *k* of `b`.
* **Adder** (`adder`, 8 bits, carry in tied to 0) computes
  accumulator + operand a. Its carry and overflow outputs are unused: with
  4-bit operands the product is at most 225, so it never overflows 8 bits.
* **Accumulator** (`shift_reg_cle`, 8 bits, shifting disabled). `load`
  clears it *asynchronously*. On each edge where bit 0 of operand b is 1,
  it loads the adder's sum. Otherwise it holds.
* **internal_ready** is the NOR of the four operand-b bits.
* **result** is accumulator bits 7..1.

The multiplicand keeps shifting after the multiplication is done, and it
eventually becomes zero. This does no harm, because the accumulator only loads
while operand b has a 1 in bit 0, and operand b stays zero until the next
load.

## Controller

The controller is two D flip-flops, `q1` and `q2`, both with rising-edge
clocks. Their next-state logic and outputs are:

```
q1'   = (q1 & start) | q2
q2'   = (start & ~q1 & ~q2) | ~internal_ready
load  = q2 & ~q1
ready = q1 & ~q2
```

`control.sv` keeps exactly these equations. It gives the four values of
`{q1,q2}` names (`mult_pkg::ctrl_state_e`):

| state | {q1,q2} | outputs | next |
|---|---|---|---|
| IDLE  | 00 | — | LOAD if `start` |
| LOAD  | 01 | `load` | BUSY if `internal_ready` = 0, else READY |
| BUSY  | 11 | — | stays while `internal_ready` = 0, then READY |
| READY | 10 | `ready` | stays while `start` = 1, then IDLE |

The encoding is a Gray sequence: IDLE → LOAD → BUSY → READY → IDLE, and one
flip-flop changes at each step. `load` is high for exactly one cycle, and an
assertion in `control.sv` checks this.

## Handshake and latency

1. Drive `a` and `b`, then raise `start`. Hold all three until `ready` is 1.
2. `result` is valid while `ready` is 1. `ready` stays high, and `result`
   stays unchanged, for as long as `start` is held.
3. Lower `start`. The controller is idle after the next rising edge. A new
   request may be raised right away.

Call R0 the rising edge that first sees `start`. If `b` = 0, `ready` rises at
R1. Otherwise it rises at R(k+2), where *k* is the position of the highest 1
bit of `b`. So `b = 1111` takes R5, the maximum. The work is proportional to
the length of `b`, not to its number of 1 bits.

Example: 10 × 3. R and F are the rising and falling edges of `clock`.

| edge | controller | operand a | operand b | accumulator | result |
|---|---|---|---|---|---|
| R0 | IDLE → LOAD | – | – | cleared by `load` | 0 |
| F0 | | 00001010 | 0011 | 0 | 0 |
| R1 | LOAD → BUSY | | | | |
| F1 | | 00010100 | 0001 | 10 | 5 |
| R2 | BUSY | | | | |
| F2 | | 00101000 | 0000 | 30 | 15 |
| R3 | BUSY → READY | | | | 15 |

## Clock edges

The controller runs on the rising edge of `clock` and the data path on the
falling edge. `designedsystem` feeds the data path `~clock`. This is a choice
of this implementation, made for the following reason.

In LOAD, the controller decides between BUSY and READY by looking at
`internal_ready`. If the data path shared the controller's edge, the operands
would be captured on the same edge that leaves LOAD. The controller would then
still see the *previous* multiplier register, which is empty after any
finished request. It would go to READY and raise `ready` for one cycle before
the multiplication had even started. A user who ends `start` on the first
`ready` would take a wrong result. With the falling-edge data path, the
operands are captured half a cycle after `load` rises. `internal_ready`
already describes the new multiplier when the controller leaves LOAD, and
`ready` rises exactly once per request.

To make this work, the path from the controller's flip-flops through the
`load` gate to the data path's registers must settle within half a clock
period. The same holds for the path from the data path's registers through
the NOR to the controller.

## No reset

The design has no reset input, and the flip-flops' clear pins are not used.
It still reaches a known state by itself. Operand b shifts every cycle and is
therefore empty within 4 cycles. With `start` low and `internal_ready` high,
the controller falls to IDLE within two cycles from any state. **Hold `start`
low for at least 6 cycles after power-up.** Until its first `load`, the
accumulator, and therefore `result`, holds an arbitrary value.

The accumulator's clear is asynchronous and is driven by the controller's
`load` gate. A lint tool reports `load` as used both synchronously (as the
load enable of the operand registers) and asynchronously (as a clear). This
is the intended structure.

## Parameters

`designedsystem` and `datapath` take `N` (default `mult_pkg::OPERAND_WIDTH` =
4). This is the operand width; the operand-a register and the accumulator are
2N bits and `result` is 2N−1 bits. Only N = 4 is the original size; other
values follow the same structure. The leaf modules take `WIDTH` (default 8
for `shift_reg_cle` and `adder`, 4 for `shift_reg_cled`).

## Simulating

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mult_pkg.sv \
    tb/designedsystem_tb.sv --top-module designedsystem_tb
./obj_dir/Vdesignedsystem_tb
```

Replace `designedsystem` with `datapath`, `control`, `shift_reg_cle`,
`shift_reg_cled` or `adder` to test one block.

* `designedsystem_tb` runs at the default size. After power-up it runs the
  three reference cases, then all 256 operand pairs. The time `start` is held
  after `ready` varies, and so does the idle gap. It checks the results, the
  latency formula above, that `ready` and `result` hold while `start` is held,
  and that `ready` falls after `start`. It also confirms that each situation
  happened at least once: zero multiplier, longest multiplier, skipped add,
  odd product, held ready, back-to-back requests.
* `reference_sequence_tb` replays the three reference cases with their
  original stimulus timing: 2 ns clock, `start` first raised at 14 ns, held
  3 ns past `ready`, 15 ns gaps. It checks each result and that `ready`
  pulses exactly once per request.
* `datapath_tb` drives the data path alone on a single clock edge. For all
  256 pairs it checks the product and the number of shift cycles.
* `control_tb` compares the controller with an independent state-table model
  under directed and random `start` / `internal_ready` stimulus.
* `shift_reg_cle_tb`, `shift_reg_cled_tb` and `adder_tb` check the leaf
  parts against reference models. The adder test is exhaustive.

## Where this RTL goes beyond the original design

* The data path runs on the falling clock edge (see *Clock edges*). The
  original only shows that the two subsystems share one clock input. Its
  simulated behaviour matches the falling-edge arrangement: one `ready`
  pulse per request.
* The library shift registers and the adder are written as generic RTL. They
  are not vendor primitives.
* The state names, the width parameter `N` and the assertions belong to this
  implementation. The logic equations and the wiring do not change.
