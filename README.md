# Decimal-base binary logic: a one-hot decimal adder and register

A decimal machine normally stores a digit in four BCD bits and pays for it in
the adder, which must add in binary and then correct the result whenever the
digit sum passes 9. Decimal-base binary logic (DBBL), the decimal case of
*n-base binary logic* (NBBL), removes the coding altogether: a decimal digit
travels on **ten wires, exactly one of which is high**. With the digit in that
form:

* an adder stage is nothing but a two-level AND-OR network, one sum-of-products
  per output wire, with no correction step;
* a storage unit is ten set/reset cells, each set by its own input wire and
  cleared by the others;
* the 9's complement needed for subtraction costs no logic at all: wire `i` is
  crossed over to wire `9-i`.

All signals stay purely binary (0/1), so this is ordinary digital logic, unlike
multi-valued schemes that put ten voltage levels on one wire. The price is
wiring: a 6-digit word, about the range of a 20-bit binary word, takes 60 wires.

This repository holds synthesizable SystemVerilog for the DBBL adder stage, a
6-digit ripple adder, the one-digit storage unit, the 6-digit register with
normal/complement output selection, and a small datapath that uses them to add
and subtract. Beside it are the alternative realizations of the same idea for
small bases: two carry-less base-3 adder stages organised as read-only-memory
arrays, a base-4 latch storage stage, and behavioural models of a base-3
thyristor (SCR) steering-array adder stage and of three base-2 SCR storage
stages.

## The 1-out-of-n code

| signal | lines | meaning |
|---|---|---|
| digit `x` of base N | `logic [N-1:0]`, bit `i` is line x^i | value `v` ⇔ only bit `v` high |
| word of D digits | `logic [D-1:0][N-1:0]`, digit 0 least significant | |
| carry | `nbbl_carry_t {c1, c0}` (in `nbbl_pkg`) | `c1` high: carry 1; `c0` high: carry 0 |

An all-zero digit means "no digit". An adder stage fed all zeros drives all
zeros, and a storage unit fed all zeros keeps what it holds. That is how a
register is told to hold: there is no separate enable. Two lines high at once
is never a valid code. The blocks do not check for it; what each block does
with it is given in the file's header.

Base 10 and a word of 6 digits are the defaults (`nbbl_pkg::DBBL_BASE`,
`DBBL_DIGITS`). Six digits are used because 10^d = 2^b gives d/b = 1/3.33, so
20 bits correspond to 6 digits. The match is only approximate: 10^6 is slightly
less than 2^20.

## The adder stage (`nbbl_adder_stage`)

The stage has 22 inputs (x^0..x^9, y^0..y^9, c^0, c^1) and 12 outputs
(s^0..s^9, c^0, c^1). For every augend value `a`, addend value `b` and carry
value `c` there is one three-input AND term

    t(a,b,c) = x^a · y^b · c^c

and every output is the OR of the terms that belong to it:

    s^k      = OR of t(a,b,c) over (a+b+c) mod N == k
    cout.c1  = OR of t(a,b,c) over a+b+c >= N
    cout.c0  = OR of t(a,b,c) over a+b+c <  N

Without the carry this gives, for example, s^0 = x^0y^0 + x^1y^9 + x^2y^8 + … +
x^9y^1. A valid input makes exactly one term true, so exactly one sum line and
one carry line go high. No term can fire on an idle input, so it gives all
zeros. There are N·N·2 = 200 terms for base 10. The RTL enumerates them in
nested loops, and synthesis turns them into the AND/OR network. The delay is two
gate levels, the same as one bit of a two-level binary adder.

## The 6-digit adder and subtraction (`dbbl_adder`)

`dbbl_adder` is a row of `DIGITS` stages, with the carry rippling on its two
lines. The worst path is the carry through all six stages, two gate levels
each. A 20-bit binary ripple adder built from the same kind of stage would
take 20. The ports add up to the DBBL adder chip's 184 signal pins:
120 digit inputs, 60 sum outputs and the two carry pairs.

Subtraction X − Y uses the adder unchanged. Feed X on `x`, the 9's complement
of Y on `y`, and a carry of one on `cin` (the *pre-carry*):

* a carry out (`cout.c1`) means X ≥ Y, and the sum is X − Y;
* no carry out means X < Y, and the sum is 10^6 − (Y − X). This is the 10's
  complement of the magnitude, and its 9's complement is Y − X − 1.

## Storage: unit, complement gate and register

`nbbl_register_unit` is one digit: N set/reset flip-flops. Flip-flop `i` is set
by input line `i` and reset by the OR of all the other input lines. A new digit
therefore sets its own cell and clears the cell of the old digit in the same
step.

`nbbl_complement_gate` crosses line `i` to line `N-1-i`, which is the whole
(N−1)'s complement. It then selects with two lines, as on the register chip:
`norm` passes the digit, `comp` passes the complement. With neither high, the
output is all zero.

`dbbl_register` is six units, each followed by a complement gate. It has 60 set
lines, 60 outputs and `norm`/`comp`: the register chip's 122 signal pins.
Digits whose set lines are all zero keep their value, so one digit can be
written on its own.

Timing: the storage is **clocked in this implementation**. Set lines that are
valid at a rising edge of `clk` are stored at that edge and show on `q` after
it. The synchronous active-low `rst_n` loads digit 0 into every unit, so a unit
never holds a non-code. The output selection is combinational.

## The decimal datapath (`dbbl_top`)

```
 x_set ──► [X register] ──x_q──────────────► x ┐
                                               ├─[6-digit adder]─ sum ─┬─► sum, carry_out
 y_set ──► [Y register] ─(norm/comp: y_norm,   │   cin = pre_carry     │
                          y_comp)──────────► y ┘                       │
                                         s_load ──► AND ◄──────────────┘
                                                     │
                                                     ▼
                              [S register] ─(s_norm/s_comp)─► s_q
```

One operation takes three clock edges:

1. Put the operands on `x_set` and `y_set` for one cycle. They are stored at the
   edge.
2. Choose the operation and raise `s_load` for one cycle. For X + Y, use
   `y_norm=1`, `pre_carry=CARRY_ZERO` (or `CARRY_ONE` for X + Y + 1). For
   X − Y, use `y_comp=1`, `pre_carry=CARRY_ONE`. `sum` and `carry_out` are valid
   in the same cycle. S stores the sum at the edge, and it shows on `s_q` in the
   next cycle.
3. Read `s_q`. For a negative difference, `s_comp=1` gives the 9's complement.

While `s_load` is low the S set lines are all zero, so S holds its value.

Beside the datapath, each with its own ports:

* `rom_x`/`rom_y` feed the three base-3 adder stages (`diode_s`, `braid_s`,
  and `scr_steer_s` from the SCR steering-array model);
* `latch_clk`/`latch_d`/`latch_q` is the base-4 latch stage;
* `scr_cs_*`, `scr_cc_*`, `scr_pc_*` are the three SCR storage stage models.

After synthesis the design is about 5,100 gate-level cells and 180 flip-flops
(three registers of 60 cells each). It also has 6 latch bits: 4 in the latch
stage and 2 in the current-sharing SCR model.

## Alternative realizations

These show that the same code suits other circuit styles. None of them has
carries. The RTL follows the drawn base (3, 4 or 2), and each module takes `N`
as a parameter where the structure generalises.

* **Diode ROM adder stage** (`diode_rom_adder_stage`, N=3): an AND plane of
  nine product rows, one per input pair (x^a, y^b). Row (a,b) drives output
  column s^((a+b) mod 3) through an OR.
* **Braid-transformer ROM adder stage** (`braid_rom_adder_stage`, N=3): one
  core per input pair. Every input wire threads every core, except that x^a and
  y^b go around core (a,b). The input pair (a,b) therefore leaves exactly one
  core quiet. The cores are grouped by the sum of their pair, three to a group,
  and each group feeds an NLEQ gate (output 0 iff all inputs are equal). Only
  the group that holds the quiet core outputs a 1. An idle stage leaves every
  core quiet, so every output is 0. The core lists, left to right, are those of
  the bypass pairs x^0y^0, x^1y^2, x^2y^1 | x^0y^1, x^1y^0, x^2y^2 |
  x^0y^2, x^1y^1, x^2y^0. The model treats a core's output as a level, not as
  the transformer's pulse.
* **Latch storage stage** (`latch_register_stage`, N=4): four D latches on one
  clock, transparent while the clock is high. Synthesis reports the latch; it
  is the design.
* **SCR steering-array adder stage** (`scr_steering_adder_stage`, behavioural
  model, N=3): the high augend line supplies a current, and the addend line
  fires the thyristor that steers that current b lines over, onto
  s^((a+b) mod 3). Only the steering is modelled, at the logic level with zero
  delay. No switching times are given for the array.
* **SCR storage stages** (behavioural models, base 2). A thyristor that has been
  fired stays on until its current is taken away, which makes it a natural
  one-hot storage cell. The three models describe the logic behaviour and the
  measured switching times, not the circuits:
  * `scr_current_sharing_stage`: the SCRs share one supply resistor, so firing
    one starves the other. The stored line switches at once.
  * `scr_cap_coupled_stage`: a capacitor between the cathodes commutates the
    old SCR off. The new SCR is on at once, and the old one is off
    `TURN_OFF_NS` = 80 µs later.
  * `scr_preclear_stage`: every rising gate line pulls all cathodes up, which
    clears all SCRs, and then only the gated one stays on. All outputs are high
    during the pull-up, and after `TURN_OFF_NS` = 11.5 µs only the new one is.

  These models use delays and `initial` blocks, so synthesis ignores their
  timing. Their inputs must not switch faster than the turn-off time.

## How far to trust it, and where it departs

Taken from the description of the design:

* the 1-out-of-n code and the two-line carry;
* the two-level sum-of-products adder stage and its 22/12 port count;
* the 6-digit width and the 184 and 122 pin counts;
* the set/reset storage unit with OR-of-the-other-lines reset;
* the wire-crossing complement and the two select lines;
* subtraction by complement plus pre-carry;
* the structure of the diode and braid ROM stages and the core lists;
* the clocked latch stage;
* the 80 µs and 11.5 µs turn-off times.

Choices made here:

* **Clocked storage.** The storage is described as unclocked set/reset cells.
  Here they are flip-flops sampled on a clock edge.
* **Reset.** There is a synchronous reset that loads digit 0.
* **Invalid codes.** When two set lines are high at once, set wins over reset.
* **Output selection.** With both select lines low the output is all zero, and
  with both high the two outputs are ORed.
* **Datapath.** The X/Y/S arrangement and the `s_load` gate form one simple
  datapath. No complete machine around the adder and register is described.
* **Negative differences.** These are left in 10's complement form. No
  recomplementing step is described, so none is built.
* **ROM stages.** Generalising the ROM stages to any N follows the remark that
  the circuits extend to larger bases. Only N = 3 is described in detail.
* **Latch polarity.** The latches are transparent while the clock is high.
* **SCR power-up.** The SCR storage models power up with nothing conducting.

Not built:

* a whole-word two-level adder, mentioned as the fastest option;
* encoded (4-line) chip pins, mentioned as a way to cut pin count and rejected
  for speed;
* core memory;
* the BCD, Post-algebra and binary circuits the design is compared with.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
testbenches share the helper package `tb/tb_nbbl_util_pkg.sv`, which converts
between integers and one-hot words. The end-to-end test `tb_dbbl_top` runs the
full-size design:

* 300 random additions and subtractions plus directed ones;
* register hold and single-digit loads;
* all inputs of the three base-3 adder stages;
* the latch and the SCR models.

It checks every result against integer arithmetic and fails if any of these
mechanisms never occurred: carry ripple, carry out, positive and negative
differences, hold, digit load, ROM, latch, SCR.

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/nbbl_pkg.sv tb/tb_nbbl_util_pkg.sv tb/tb_dbbl_top.sv \
    --top-module tb_dbbl_top -o sim
./obj_dir/sim
```

Replace `tb_dbbl_top` with any other `tb/tb_<module>.sv` to test one block.
`--timing` is needed by all of them: the testbenches and the SCR models use
delays. `-Wno-fatal` keeps lint warnings from stopping the build. One of them is
the intended latch of the current-sharing SCR model. For lint only:
`verilator --lint-only -Wall --timing -Irtl rtl/nbbl_pkg.sv rtl/dbbl_top.sv`.

Files: `rtl/nbbl_pkg.sv` (types), `nbbl_adder_stage`, `dbbl_adder`,
`nbbl_register_unit`, `nbbl_complement_gate`, `dbbl_register`,
`diode_rom_adder_stage`, `braid_rom_adder_stage`, `scr_steering_adder_stage`,
`latch_register_stage`,
`scr_current_sharing_stage`, `scr_cap_coupled_stage`, `scr_preclear_stage`, and
the top `dbbl_top`. Each file begins with a description of its interface and
timing.
