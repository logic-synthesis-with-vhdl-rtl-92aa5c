# A BlackJack dealer, two 16-bit adders and a family of multiplexers

This is a small collection of synthesizable SystemVerilog circuits that go together as teaching
examples of writing synthesizable RTL with reusable packages. It has three independent designs:

* **A BlackJack dealer.** It is a clocked controller plus a datapath. It asks for cards, adds
  them up, counts one ace as 11 while that keeps it at 21 or under, and stands or goes broke by
  the house rule "draw to 16, stand on 17".
* **Two 16-bit adders** built from the same full-adder functions. One is a ripple-carry adder.
  The other is a carry-select adder in groups of 4, 5 and 7 bits.
* **A 3:1 multiplexer test circuit.** It has a 1-bit and a 4-bit mux, built from a package of
  2:1, 3:1 and 4:1 mux functions.

`examples_top` places all three side by side. Nothing connects one design to another.

## The BlackJack dealer (`bj_struct`)

### How a game is played

The dealer holds `hit` high while it wants a card. The player puts the card value on
`card[3:0]` and presses `card_rdy`. An ace is 1, the cards 2 to 10 are their value, and face
cards are 10. The dealer then does the following:

1. It adds the card to `score[4:0]`.
2. If the card is an ace and no ace is counted as 11 yet, it adds 10 more. The ace now counts 11.
3. It tests the score:
   * 16 or less: it raises `hit` again.
   * 17 to 21: it sets `stand`.
   * over 21 with an ace counted as 11: it subtracts 10, so the ace counts 1, and tests again.
   * over 21 otherwise: it sets `broke`.

`stand` and `broke` stay set until the next press. That press starts a new game: the score is
cleared and the new card becomes the first card of the new hand.

Two example games, with the scores after each card:

| cards        | scores              | end                         |
|--------------|---------------------|-----------------------------|
| 5, 8, 4      | 5, 13, 17           | stand                       |
| A, 2, 9, 10  | 11, 13, 12, 22      | broke (the ace dropped to 1 at 9) |

### Datapath (`bjdpath`)

The datapath has these parts:

* A 5-bit **score register**. It has a synchronous clear (`clear_b` low) and a load enable
  (`load`). The clear wins over the load. The asynchronous `reset_b` also clears it.
* A **3-way operand mux**, controlled by `sel`:
  * `00` gives +10 (`01010`).
  * `10` gives −10 (`10110`, two's complement).
  * Any other code gives the card, zero-extended. The controller uses `01`.
* A 5-bit **ripple-carry adder** that adds the score and the operand. Its carry out is dropped,
  so −10 works as modulo-32 subtraction.
* An **ace finder**: `acecard = (card == 1)`.
* Two **unsigned comparators** on the registered score: `score16gt` and `score21gt`.

The largest score a game can reach is 16 + 1 + 10 = 27, so five bits are enough.

### Controller (`bjcontrol`)

The controller is a four-state machine. The state codes are in `bj_pkg`:

| state | code | outputs                               | next |
|-------|------|---------------------------------------|------|
| GET   | 00   | `hit` while the button is up          | ADD on a button press |
| ADD   | 01   | `sel`=card, load                      | USE for a first ace, else TEST |
| USE   | 11   | `sel`=+10, load, set ace11            | TEST |
| TEST  | 10   | see below                             | GET, or TEST after a −10 step |

In TEST the controller checks these cases in order:

1. `score16gt` is low: go back to GET.
2. `score21gt` is low: set `stand`.
3. The ace11 flag is clear: set `broke`.
4. Otherwise: load score − 10, clear ace11 and stay in TEST.

When GET sees a press it clears `stand` and `broke`. If either was set, it also pulses
`score_clear_b` low and clears ace11. This is how a new game starts.

The controller has three flag flip-flops: ace11, stand and broke. `stand` and `broke` come
straight from their flip-flops, so these outputs are glitch-free.

### The card-ready button and timing

`card_rdy` is asynchronous to the clock. Two flip-flops in series give `card_rdy_sync` and
`card_rdy_dly`. These two signals also detect the press edge:

* `sync` low means the button is up. GET raises `hit`.
* `sync` high and `dly` low means the press was just seen. GET moves to ADD.
* `sync` high and `dly` high means the button is still held. GET waits with `hit` low.

Because of this, a held button adds its card only once.

Counted in rising clock edges from the first edge that samples `card_rdy` high:

* edge 1: `card_rdy_sync` goes high;
* edge 2: the state changes to ADD (and, for a new game, the score is cleared);
* edge 3: the score takes the card;
* edge 4: TEST, or USE and then TEST one edge later. Each −10 step adds one more edge.

`hit` rises on the edge that returns the controller to GET if the button is already up.
Otherwise it rises on the first edge that samples the button up.

**`card` must stay stable from the press until the score has taken it (edge 3).** Holding it
until `hit` rises again is always safe.

### Reset

`reset_b` is asynchronous and active low. It puts the controller in GET, clears the score, and
clears the ace11, stand and broke flags and both button flip-flops.

## Ripple-carry adder (`adder_ripple`)

`sum = a + b + cin` over `N` bits, with carry out `cout`. The default is `N = 16`. Every bit is
a full adder built from `iscas_pkg::xor3` (sum) and `iscas_pkg::carry3` (carry, which is
`ab + c(a+b)`). The carry ripples from bit 0 to bit N−1.

## Carry-select adder (`adder_cs`)

This adder computes the same sum. The operand is split into groups, counted from the least
significant end. The default is three groups of 4, 5 and 7 bits (16 in all), set by the
`GROUPS` array parameter.

* **Group 0** is one ripple-carry adder fed by `cin`.
* **Every later group** has two ripple-carry adders that work in parallel. One assumes a carry
  in of 0 and the other a carry in of 1.
* When the real carry out of the group below arrives, it picks one of the two sums.
* The group's own carry out is `carry0 | (carry_in & carry1)`.

The selecting carry therefore passes through the 4-bit ripple of group 0 and then one AND-OR
per later group, not through all 16 bits. Each upper group ripples its two sums in parallel
with this. A group adds delay only if its own ripple is slower than the arrival of the carry
from below. That is why the groups grow towards the top (4, 5, 7): the higher a group sits, the
later its carry arrives, so the more bits it can ripple in the meantime.

Each group instantiates `adder_ripple`. If the `GROUPS` entries do not add up to `N`,
elaboration stops with an error. To change the split, set all three parameters, for example
`#(.N(16), .NGROUPS(4), .GROUPS('{4,4,4,4}))`.

## Multiplexers (`genmux_pkg`, `muxtest`)

`genmux_pkg` provides 2:1, 3:1 and 4:1 multiplexers, each for a single bit (`muxN_bit`) and for a
32-bit word (`muxN_vec`). A narrower vector is zero-extended on the way in and truncated on the
way out.

The select coding is:

* `00` picks the first input.
* `01` picks the second input.
* `10` picks the third input.
* `11` picks the fourth input in the 4:1 versions and the third input in the 3:1 versions.

`muxtest` uses the two 3:1 functions:

* `y` picks one of `a`, `b` and `c` by `s_a`.
* `z[3:0]` picks one of `j`, `k` and `l` by `s_b`.

## Where this RTL departs from the original description

* **Reset.** In the original controller, reset sets only the state register. Here reset also
  clears the flags and the button flip-flops. Without this, the first game after power-up could
  start with a random ace11, stand or broke flag.
* **Don't-care select.** The original leaves select `11` of the 3:1 mux as don't-care. This
  design has no don't-care values, so it gives the third input.
* **Overloaded mux name.** The original uses one overloaded name, `mux`, and picks the version
  from the argument types. SystemVerilog has no overloading, so each version has its own name.
  The vector versions use a fixed 32-bit word.
* **Procedures become modules.** The original writes the adders as width-generic procedures.
  Here they are parameterized modules. Only the full-adder equations are shared package
  functions. The carry-select group sizes are a parameter array rather than an argument.
* **Module name.** The original calls the 16-bit ripple-carry adder `adder_test`. Here it is
  `adder_ripple`, so that it is not taken for a testbench.

## How far it has been checked

Every module has a self-checking testbench in `tb/`:

| testbench          | what it checks |
|--------------------|----------------|
| `tb_bj_struct`     | The two example games above, card by card. Then 300 random games with random button hold times, against a rules model (`tb/bj_ref_pkg.sv`) that counts the hand as "hard total, +10 if it holds an ace and that stays ≤ 21". It also checks the three-edge latency. |
| `tb_bjcontrol`     | The controller alone, with a behavioural score register. Covers the per-state outputs, held-button rejection, the +10 and −10 steps, and random games. |
| `tb_bjdpath`       | Random loads, clears and selects against an integer model. Covers the comparator thresholds 16/17 and 21/22. |
| `tb_adder_ripple`, `tb_adder_cs` | Corner cases and random operands. The carry-select test makes sure that each upper group selects both ways. |
| `tb_muxtest`, `tb_genmux_pkg` | All select codes, exhaustively for the 1-bit mux. |
| `tb_examples_top`  | Everything at the default sizes: 500 dealer cards plus random adder and mux inputs every clock. It counts each mechanism (hit, stand, broke, new game, ace as 11, ace back to 1, held button, both carry-select choices, every mux select) and fails if one never occurs. |

All of these tests pass. Each module's own testbench also fails against a deliberately broken copy of its module.
The synthesized sizes are small: the whole dealer has 14 flip-flops and the top is about 340
word-level cells.

Not checked: the original gives no clock rate or gate-level timing, so none is claimed. The
two-flip-flop synchronizer is functional only, and metastability is not modelled.

## Files and simulation

| file | contents |
|------|----------|
| `rtl/bj_pkg.sv` | state and select enums, widths, ±10 constants |
| `rtl/iscas_pkg.sv` | full-adder functions `xor3`, `carry3` |
| `rtl/genmux_pkg.sv` | mux functions |
| `rtl/bjdpath.sv`, `rtl/bjcontrol.sv`, `rtl/bj_struct.sv` | the dealer |
| `rtl/adder_ripple.sv`, `rtl/adder_cs.sv` | the adders |
| `rtl/muxtest.sv` | the mux circuit |
| `rtl/examples_top.sv` | all three side by side |
| `tb/*.sv` | testbenches and the dealer rules model |

To simulate, list the packages first. For example, the whole design:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bj_pkg.sv rtl/iscas_pkg.sv rtl/genmux_pkg.sv tb/bj_ref_pkg.sv \
  rtl/bjdpath.sv rtl/bjcontrol.sv rtl/bj_struct.sv rtl/adder_ripple.sv \
  rtl/adder_cs.sv rtl/muxtest.sv rtl/examples_top.sv tb/tb_examples_top.sv \
  --top-module tb_examples_top -Mdir obj_top
./obj_top/Vtb_examples_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Any other testbench builds the
same way, with its module and the modules it uses.
