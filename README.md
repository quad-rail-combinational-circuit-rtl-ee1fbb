# Quad-rail NULL Convention Logic: a partial-product generator and a 4-bit counter

NULL Convention Logic (NCL) is a clockless, delay-insensitive logic style.
Instead of a clock telling when a value is valid, each value carries its own
validity. A signal is encoded on several one-hot wires ("rails"). Exactly one
rail high is a DATA value; all rails low is NULL, a spacer that every DATA
wavefront must be separated by. Most NCL uses dual-rail signals (one bit on
two rails). Quad-rail signals carry two bits on four rails, `rail^0 .. rail^3`
for the values 0..3. They switch fewer wires per bit and often need fewer
gates.

This repository holds RTL for two quad-rail circuits, each designed the NCL way:

* `qr_pp_gen`: a quad-rail partial-product (PP) generator. It computes one
  2-bit by 2-bit unsigned product digit pair, `A x B = 4*PPH + PPL`. This is
  the building block of a quad-rail multiplier.
* `ncl_up_counter`: a 4-bit NCL up-counter. It has quad-rail increment logic
  (`qr_increment`) and a ring of three NCL registers that feeds the count
  back. It has a full NCL request/acknowledge interface.

`ncl_quad_rail_top` puts the two side by side. They do not interact.

## Encoding

`ncl_pkg` defines `dr_t` (dual-rail, 2 bits) and `qr_t` (quad-rail, 4 bits).
Bit *i* is rail *i*, so the quad-rail DATA value *v* is `4'b0001 << v`, and
`'0` is NULL. A 4-bit number is a `qr_t [1:0]`, with `[0]` the low digit.
Two rails of one signal high at once is illegal. A correctly used circuit
never produces that.

## Threshold gates with hysteresis (`ncl_gate`)

Every NCL gate is a threshold gate with hysteresis:

* Its output rises when its set function of the inputs is true.
* It falls only when **all** its inputs are low.
* Otherwise it holds its value.

This holding is what makes NCL delay-insensitive. Each gate switches at most
once per DATA wavefront and once per NULL wavefront, whatever the wire delays.
`ncl_gate` is one gate with a `KIND` parameter. The kinds are the gates these
circuits use:

| kind      | set function    | notes                                   |
|-----------|-----------------|-----------------------------------------|
| TH12/13/14| OR of 2/3/4     | 1-of-n                                   |
| TH22, TH33| AND of 2/3      | C-elements                               |
| TH33W2    | A(B + C)        | A weighs 2, threshold 3                  |
| TH34W32   | A + B(C + D)    | weights 3,2,1,1, threshold 3             |
| TH24COMP  | (A + B)(C + D)  | = AC + BC + AD + BD                      |
| THAND0    | AB + BC + AD    |                                          |

The hold state is written as an `always_latch`. Lint and synthesis tools
therefore report latches, and combinational loops wherever gates feed back.
Both are intended. The optional `rst` input forces the output to `RST_VAL`.
This gives the reset-to-0 and reset-to-1 gates that registers need.

## How an NCL circuit is designed

1. Draw a K-map per output digit, with entries 0..3 instead of 0/1.
2. Group the cells holding each value to get a sum of products for that
   rail. Only groups of four remove a quad-rail input from a product.
3. Make the circuit **input-complete**: the outputs may not all become
   DATA before every input is DATA, nor all NULL before every input is NULL.
   Otherwise the completion detection downstream could be fooled. If needed,
   add terms that contain the missing input.
4. Add "don't care" products where they let an equation map onto a single
   gate. Such products can never be true for legal inputs, for example two
   rails of one signal at once.
5. Split the equations into groups of at most four variables, one gate each.
   No product term may be split across gates, so that every gate that fires
   is observed at an output (**observability**).

## Partial-product generator (`qr_pp_gen`)

| rail  | equation                                      | gate(s) |
|-------|-----------------------------------------------|---------|
| PPH^0 | A^0 + A^1 + B^0 + B^1                         | TH14 |
| PPH^1 | A^2B^2 + A^2B^3 + A^3B^2                      | THand0(A^2,B^2,A^3,B^3) |
| PPH^2 | A^3B^3                                        | TH22 |
| PPH^3 | 0 (the largest product is 3x3 = 9 = 21 in base 4) | constant |
| PPL^0 | A^0(B^3+B^1) + B^0(A^3+A^1) + (A^2+A^0)(B^2+B^0) | TH33w2, TH33w2, TH24comp into TH13 |
| PPL^1 | A^1B^1 + A^3B^3 (+ A^1A^3 + B^1B^3)           | TH24comp(A^1,B^3,B^1,A^3) |
| PPL^2 | A^2(B^3+B^1) + B^2(A^1+A^3)                   | TH33w2 into TH34w32 |
| PPL^3 | A^1B^3 + A^3B^1 (+ A^1A^3 + B^1B^3)           | TH24comp(A^1,B^1,B^3,A^3) |

The key point is completeness. PPH is **not** input-complete: PPH^0 fires
as soon as A or B alone is 0 or 1. PPL^0 carries extra terms instead, so that
PPL needs both inputs. Putting the extra terms in PPL keeps PPH at one gate of
delay, while PPL's depth stays at two gates. So a consumer must find
completion through PPL, or through PPH and PPL together, never through PPH
alone. The rail `pph[3]` is the constant 0.

The second gate of PPL^2 has a weight-3 input (the first gate's output), a
weight-2 input (B^2) and two weight-1 inputs at threshold 3. That is the
standard four-input TH34w32 gate, and this design uses it. Some texts call
this gate "TH33w32".

## Increment circuitry (`qr_increment`)

This block computes `S = X + Inc mod 16` from a dual-rail Inc and two quad-rail
digits X_0 (low) and X_1 (high):

    S_0^k = TH24comp(Inc^0, X_0^(k-1), Inc^1, X_0^k)     = Inc^0 X_0^k + Inc^1 X_0^(k-1)
    t1    = TH14(Inc^0, X_0^0, X_0^1, X_0^2)             "no carry out of digit 0"
    t2    = TH22(Inc^1, X_0^3)                           "carry out of digit 0"
    S_1^k = TH24comp(X_1^k, t2, t1, X_1^(k-1))           = X_1^k t1 + X_1^(k-1) t2

Rail indices are taken mod 4. t1 and t2 are shared by all four S_1 rails.
They are mutually exclusive, so their product and the product of two X_1
rails are don't cares, and each S_1 rail fits one TH24comp.

Completeness holds for S as a whole. S_1 may already fire from X alone
(through t1). S_0, however, needs both Inc and X_0, so S is never complete
early. S can be all NULL only when every input is NULL.

## The counter ring (`ncl_up_counter`)

This is the hardest part to follow. An NCL loop must hold a DATA wavefront and
a NULL wavefront at the same time, with an empty stage between them, so a
feedback path needs **three** registers:

```
         inc (dual-rail)
            |
  X --> qr_increment --S--> reg1 --count--> reg2 ----> reg3 --+--> X
  ^                        (DATA 0)        (NULL)     (NULL)  |
  +-----------------------------------------------------------+

  reg1.Ki = COMP(reg2.Ko[1:0], ki)       C-element (ncl_completion, N=3)
  reg2.Ki = reg3.Ko                      per signal, direct
  reg3.Ki = ko = COMP(reg1.Ko[1:0])      C-element (ncl_completion, N=2)
```

`ncl_qr_register` builds each rail from a TH22 gate of the input rail and Ki.
Ko is the NOR of a signal's rails: 1 means "send DATA", 0 means "send NULL".
Ki and Ko are kept per quad-rail signal. Between reg2 and reg3 there is no
logic, so the acknowledge there is bitwise. Where the incrementer mixes both
digits, the two Ko bits are merged by a completion C-element. Immediate
assertions in the register flag any signal with more than one rail high,
whether it arrives or leaves.

One count step, from reset (reg1 = DATA 0, reg2 = reg3 = NULL, `ki` = 1):

1. reg2 copies the DATA 0 (reg3 is empty). `ko` = 0, since reg1 holds DATA.
2. The consumer reads `count` = 0 and drops `ki`. reg1's request falls and
   reg1 takes the incrementer's NULL output. `ko` rises.
3. reg3 copies the DATA from reg2. reg2 then takes the NULL from reg1.
4. The consumer sees `count` NULL and raises `ki`. The producer sees `ko` = 1
   and sends Inc DATA. The incrementer adds it to X (reg3) and reg1 latches
   the new count. `ko` falls and the producer returns Inc to NULL.
5. The process repeats from step 2.

Reset (`rst`, active high, asynchronous) sets reg1 to DATA 0000, reg2 and
reg3 to NULL, and the two completion elements to the matching handshake state.
Hold `inc` at NULL while resetting. The count wraps from 1111 to 0000.

## Interfaces at a glance

| module | ports |
|--------|-------|
| `ncl_quad_rail_top` | counter: `rst, inc (dr_t), ki, ko, count (qr_t[1:0])`; PP: `pp_a, pp_b, pph, ppl (qr_t)` |
| `ncl_up_counter` | `rst, inc, ki, ko, count` |
| `qr_increment` | `inc, x[1:0] -> s[1:0]` |
| `qr_pp_gen` | `a, b -> pph, ppl` |
| `ncl_qr_register #(N, RESET_DATA0)` | `rst, ki[N], d[N], q[N], ko[N]` |
| `ncl_completion #(N, RST_VAL)` | `rst, in[N], out` |
| `ncl_gate #(KIND, RST_VAL)` | `rst, a, b, c, d, z` |

There is no clock anywhere. The RTL has zero delay. A wavefront propagates
within one simulation time step, and handshakes advance when the environment
changes `inc` and `ki`.

## What follows the source design and what is chosen here

Taken from the source design:

* all gate equations and gate pin assignments of the PP generator and the
  incrementer;
* the three-register counter ring, the reset flavours (DATA 0 / NULL), where
  `count` is taken, and where the completion components sit.

Choices made here:

* **Register insides.** The register is a TH22 per rail with NOR-based Ko
  per signal.
* **Completion component.** It is a single N-input C-element, instead of a
  tree of TH22/TH33/TH44 gates. The function is the same.
* **Handshake and reset.** The handshake polarities are the usual NCL ones.
  Reset is asynchronous and active high, and it also initialises the
  completion elements.
* **Gate library.** Only the nine gate kinds used here exist, not the full
  set of 27 NCL gates.

Not modelled:

* **Timing.** No gate delays, so the gate depths (one gate for PPH, two for
  PPL) show only in the structure, not in simulation.
* **The multiplier.** The quad-rail multiplier that would use `qr_pp_gen` is
  not included, because its structure is not specified.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M` and has a watchdog:

* `tb_ncl_gate`: every kind, all 15 input patterns. It checks the set
  function, the hold on every shrinking subset, the clear on NULL, and reset.
* `tb_ncl_completion`: 2000 random acknowledge patterns against a C-element
  model.
* `tb_ncl_qr_register`: reset values, then random legal DATA/NULL traffic
  with random per-signal Ki, checking outputs and Ko.
* `tb_qr_increment`: all 32 Inc/X pairs in both arrival orders. It checks the
  sum, that S_0 stays NULL until both inputs are DATA, and the return to
  NULL.
* `tb_qr_pp_gen`: all 16 products in both arrival orders. It checks the
  value, that PPL stays NULL with one input, and that PPL is held while one
  input is still DATA.
* `tb_ncl_up_counter`: a producer and a consumer with random handshake
  delays run 67 Inc values. The test covers increments, Inc = 0 holds, at
  least one rollover and a reset in mid-count. Every read is checked against
  a model, and the rails are checked one-hot at every change.
* `tb_ncl_quad_rail_top`: both environments at once on the top. It counts
  each mechanism: increment, hold, rollover, reset, all 32 products, the 3x3
  maximum, and PPL held back.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/ncl_pkg.sv tb/tb_ncl_quad_rail_top.sv --top-module tb_ncl_quad_rail_top
./obj_dir/Vtb_ncl_quad_rail_top
```

Verilator warns `UNOPTFLAT` on the counter's feedback loops. It settles them
by iteration, and that is expected. Each wavefront passes through a latch
that changes at most once. The testbenches drive only legal NCL traffic:
DATA and NULL alternate, and new DATA arrives only after the acknowledge
asks for it. The circuits are not meant to handle anything else.
