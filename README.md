# Serial combination lock (eight-state Mealy machine)

A lock that is opened by clocking a secret bit pattern into a single input.
One bit arrives on `x` at every rising clock edge. The lock opens (`unlk = 1`)
when a `0` is presented after the seven bits `0110111`, that is, on the last
bit of the pattern `01101110`. A second output, `hint`, is 1 whenever the bit
currently on `x` is the "right" one, the bit that moves the lock one step
closer to opening, so the combination can be discovered bit by bit by
watching `hint`.

Both outputs are Mealy outputs: they depend on the current state *and* the
current input bit, and are valid during the same clock period as the bit
they refer to, before the edge that consumes it.

## The state machine

The state records how much of the combination has been matched so far:

| state | matched so far | x = 0: next, unlk hint | x = 1: next, unlk hint |
|-------|----------------|------------------------|------------------------|
| A     | nothing        | B, 0 1                 | A, 0 0                 |
| B     | `0`            | B, 0 0                 | C, 0 1                 |
| C     | `01`           | B, 0 0                 | D, 0 1                 |
| D     | `011`          | E, 0 1                 | A, 0 0                 |
| E     | `0110`         | B, 0 0                 | F, 0 1                 |
| F     | `01101`        | B, 0 0                 | G, 0 1                 |
| G     | `011011`       | E, 0 0                 | H, 0 1                 |
| H     | `0110111`      | B, 1 1                 | A, 0 0                 |

The correct path is A → B → C → D → E → F → G → H and then the opening `0`.
What happens on a wrong bit is the part that needs thought, because the
machine must not lose a partial match that overlaps the bits already seen:

* A wrong `1` sends the lock back to A: no suffix ending in a `1` that
  breaks the pattern can start the combination, which begins with `0`.
* A wrong `0` sends it to B, because that `0` may be the first bit of a new
  attempt.
* The one exception is state G. After `011011` a `0` gives `0110110`, whose
  last four bits `0110` are the first four bits of the combination, so the
  lock goes to E, not B.
* After opening (H with `0`) the lock goes to B: the opening `0` counts as
  the start of the next attempt.

Because of these overlaps the machine is an exact recogniser: `unlk` is 1
if and only if `x = 0` and the seven bits received before it, since the last
reset, were `0110111`. The unit testbench checks this property against a
plain shift register of received bits, independently of the table.

`hint` follows the table above. It is 1 on every step along the correct
path, including A → B on the first `0`, D → E on the `0` of `0110`, and the
opening bit itself; it is 0 on every wrong bit, including the wrong `0` in
G that falls back to E.

## Interface and timing

| port    | dir | width | function                                           |
|---------|-----|-------|----------------------------------------------------|
| `clk`   | in  | 1     | state advances on the rising edge                  |
| `reset` | in  | 1     | active high, asynchronous: forces state A at once  |
| `x`     | in  | 1     | serial combination bit, sampled at the rising edge |
| `unlk`  | out | 1     | 1 in state H while `x = 0`                         |
| `hint`  | out | 1     | 1 while `x` holds the bit that advances the lock   |

Outputs are combinational from the state register and `x`; a change on `x`
appears on `unlk`/`hint` in the same cycle. If they drive anything that
must not glitch, register them or present `x` synchronously. Reset is
asynchronous on assertion and, as written, also asynchronous on release;
synchronise the release to `clk` in a real system.

## Files

* `rtl/lock_pkg.sv`: the state enum `state_t` (A = 0 … H = 7) and the output
  struct `lock_out_t`.
* `rtl/combination_lock.sv`: the lock, which is also the top module. One
  3-bit state register and one `always_comb` case over (state, `x`) giving
  the next state and both outputs. It contains an assertion that `unlk` is
  only ever 1 in state H with `x = 0` and `hint = 1`.
* `tb/lock_ref_pkg.sv`: a testbench-only reference: the state table
  transcribed with letters `'A'..'H'`, sharing nothing with the RTL.
* `tb/tb_combination_lock.sv`: unit test. Every one of the 16 table entries
  from a clean reset, the combination after 200 random prefixes, 6000 random
  bits biased towards the combination with random resets, and an
  asynchronous reset from every state (checked before any clock edge). It
  compares state, `unlk` and `hint` with the reference table, and `unlk`
  also with the shift-register definition of the lock, and fails if any
  transition, the unlock or a reset never occurs.
* `tb/tb_lock_waveforms.sv`: end-to-end replay at a 100 ns clock of six
  reference runs: the full combination followed by a reset, and the
  wrong-bit transitions A→A, B→B, C→B, D→A, E→B, F→B, G→E and H→B. Each run
  is a string of input bits and the state sequence it must produce.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lock_pkg.sv tb/lock_ref_pkg.sv rtl/combination_lock.sv \
  tb/tb_combination_lock.sv --top-module tb_combination_lock -o sim
./obj_dir/sim
```

Use `tb/tb_lock_waveforms.sv` and `--top-module tb_lock_waveforms` for the
replay. Each ends with a line `TB_RESULT checks=N failures=M`; both finish
in well under a second. The testbenches read the internal `state` register
of the lock hierarchically (`dut.state`) and compare it by enum name, so
they keep working if the state encoding is changed.

## Design choices and departures

The transition and output table, the ports, the use of an enumerated state
type, the rising-edge clock, the reset to A on `reset = 1`, and the
separation into a clocked state register and a combinational
next-state/output block all follow the original design. The following are
choices made here:

* Reset is asynchronous, because the original clocked process lists reset
  next to the clock in its sensitivity list and tests it first.
* The state encoding is binary, A = 0 to H = 7. Nothing depends on it; a
  synthesis tool may re-encode it (one-hot, for instance).
* The internal state is not a port. The original reference waveforms
  display it as a probed signal only.
* The G → E replay sequence (A B C D E F G E F G H B) was built from the
  table; the input bits of all replayed runs were derived from the table
  so as to reproduce the reference state sequences, and how many cycles
  the lock dwells in A and B in the A→A/B→B run is this design's choice.

## How far to trust it

The machine is small enough to be checked exhaustively: every table entry
is exercised from reset and checked for next state and both outputs, and
the lock's defining property is checked against an independent model on
tens of thousands of random bits. A copy of the RTL with the G → E
exception changed to G → B fails the unit testbench with hundreds of
mismatches. Synthesised, the lock is a handful of gates and a 3-bit state
register (8 flip-flops if the tool re-encodes it one-hot).
