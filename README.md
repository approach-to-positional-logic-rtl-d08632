# A programmable logic circuit built on positional logic algebra

This RTL computes Boolean functions of many variables with a regular,
programmable combinational circuit. The circuit's shape comes from the
*positional logic algebra* way of writing a function. The input space is
split into fragments. Inside each fragment the function is approximated by a
**symmetric** function of k variables, one whose value depends only on how many
of those variables are 1. A few single-vector corrections then make the
approximation exact. A symmetric function of k variables is fully described by
k+1 bits, so each fragment costs a ones-counter, a (k+1)-bit lookup and a few
k-input AND gates. The circuit therefore grows roughly with the number of
fragments rather than with 2^n.

Two circuits are provided:

* `pla_lc`: the general programmable circuit. Its size is set by
  parameters; the function it computes is set by its inputs.
* `pla_flow_z`: a fixed four-stage pipeline. It evaluates one example function
  of five variables along its positional-logic flow graph. It shows how the
  operator form runs in parallel, and it is a reference for `pla_lc`.

`pla_top` holds both side by side.

## Notation

* **Simple positional operator** `S_j^k[x_k ... x_1]`. Let m be the number of
  ones among the k arguments. The value is bit m of the integer j, so
  `j = sum(j_m * 2^m)` with 0 <= j < 2^(k+1). Examples:
  * `S_{2^k}^k` is the AND of all k arguments.
  * `S_{2^(k+1)-2}^k` is the OR.
  * `S_5^2` is the XNOR of two arguments.
  * `S_8^4` is "exactly three of four".
* **lambda_w transformation.** It inverts every argument whose position holds a
  1 in the binary code of w. The leftmost argument as written is the most
  significant bit. So `lambda_16[x1 x5 x4 x3 x2]` inverts x1 only.
* **Fragment record.** One fragment is written as

      f_i = (x~_a1 & ... & x~_a(n-k)) & ( f_cor1(X_k) | S_j^k[X_k] & f_cor0(X_k) )

  * The leading conjunction picks out the fragment. Each `x~` is a variable or
    its complement.
  * `S_j^k` is the symmetric prototype of the function on the remaining k
    variables.
  * `f_cor1` is 1 on the vectors where the prototype is 0 but the function is 1.
  * `f_cor0` is 0 on the vectors where the prototype is 1 but the function is 0.

  The function is the OR of all its fragment records.

## The programmable circuit `pla_lc`

```
 x_l[c] (k bits) --> ones_counter c --one-hot count--+--> FB 2c   --+
                                                     +--> FB 2c+1 --+--> OR (element 4) --> z
                                                         ...        |
 FB i:  count --> pos_select (s[i]) ------- proto --+               |
        x_cb0/m0 --> L0 x corr_block -- cb0 ------> corr_merge --f--> frag_and(x_h[i], n_inv[i]) --> f_i
        x_cb1/m1 --> L1 x corr_block -- cb1 ------>
```

Parameters: `N` variables, operator order `K`, and `L0`/`L1` correction blocks
of each kind per functional block (FB). They fix the following sizes:

| quantity | value | default (N=5, K=3) |
|---|---|---|
| functional blocks `NFB` | 2^(N-K) | 4 |
| ones counters `NCNT` | 2^(N-K-1) (1 when N = K); counter c serves FBs 2c and 2c+1 | 2 |
| conjunction width per FB | N-K | 2 |
| correction blocks per FB | L0 of kind "0", L1 of kind "1" | 1 + 1 |

The parts of one FB:

* **`ones_counter`** counts the ones in its k-bit argument. It outputs the count
  as k+1 one-hot lines.
* **`pos_select`** (logic group 1) ANDs each operator bit `s[i][m]` with count
  line m and ORs the products. The result is `S_j^k[X_k]`, the prototype.
* **`corr_block`** (CB) is a k-input AND behind controlled inverters:
  `y = &(x ^ m)`. It fires on exactly one input vector, `x == ~m`. A CB is
  disabled by feeding it zeros with `m = 0`.
* **`corr_merge`** (logic group 2) computes `f = |cb1 | (proto & ~|cb0)`:
  * a firing CB "1" forces the fragment to 1;
  * a firing CB "0" forces it to 0;
  * CB "1" wins when both fire.
* **`frag_and`** (block 3) computes `f & &(x_h ^ n_inv)`. A `n_inv` bit of 1
  means the conjunction uses that variable complemented.
* **OR element 4** joins the fragment terms into `z`.

The circuit is purely combinational, with no clock. `z` settles after the
counter, the select, group 2, block 3 and the final OR.

### Ports and bit order

All vectors are packed, with index 0 the least significant bit. When a
vector is written as a string, the leftmost character is the MSB.

| port | shape | meaning |
|---|---|---|
| `x_l` | `[NCNT][K]` | argument vector of each ones counter |
| `x_h` | `[NFB][N-K]` | conjunction variables of each FB |
| `s` | `[NFB][K+1]` | operator vector j of each FB, `s[i][m] = j_m` |
| `x_cb0`, `m0` | `[NFB][L0][K]` | CB "0" information inputs and inverter controls |
| `x_cb1`, `m1` | `[NFB][L1][K]` | CB "1" information inputs and inverter controls |
| `n_inv` | `[NFB][N-K]` | block-3 inverter controls, 1 = complement |
| `z` | 1 | function value |

The variables reach the circuit through `x_l`, `x_h` and the CB information
inputs. The integrator wires them from the function's arguments, so the
choice of which variables are "conjunction" and which are "counted" is a
matter of routing. The usual wiring is:

* the same k variables on every `x_l[c]`;
* the same n-k variables on every `x_h[i]`;
* `x_l` on every CB in use, and zeros on every unused CB.

### Programming a function

1. Choose the n-k conjunction variables. Each of the 2^(n-k) value
   combinations h gives one fragment. Give it an FB i with `n_inv[i] = ~h`.
2. For every count m = 0..k, let `s[i][m]` be the majority value of the
   function over the vectors of the fragment that have m ones.
3. Each vector where the prototype gives 0 but the function is 1 needs a
   CB "1" with `m1 = ~vector`. Each vector where the prototype gives 1 but the
   function is 0 needs a CB "0" with `m0 = ~vector`.
4. If a fragment needs more CBs than there are, change the split. Any function
   fits once L0 and L1 are large enough; the circuit pays off when few
   corrections are needed.

### Worked example (default size)

The function has ones on input vectors 1-3, 13-15, 19, 21-23 and 25-28, with
x1 the least significant bit. It is programmed as follows:

* `x_l[0] = x_l[1] = {x5,x4,x3}`;
* `x_h[i] = {x1,x2}` for every FB;
* every CB "0" is fed zeros.

| FB | fragment | `s` | CB "1" (`m1`, input) | `n_inv` |
|---|---|---|---|---|
| 1 | x1' x2  : S_4^3 or x5'x4'x3' | `0100` | `111`, {x5,x4,x3} | `10` |
| 2 | x1' x2' : S_8^3 | `1000` | `000`, zeros | `11` |
| 3 | x1  x2' : S_5^3 | `0101` | `000`, zeros | `01` |
| 4 | x1  x2  : S_5^3 or x5 x4'x3' | `0101` | `011`, {x5,x4,x3} | `00` |

This program reproduces the function on all 32 vectors. Splitting
`S_8^4[x5x4x3x2]` on x2 gives `x2 S_4^3[x5x4x3] | x2' S_8^3[x5x4x3]`: with
x2 = 1 two more ones are needed among x5x4x3, and with x2 = 0 three are
needed. The operator vectors of FB 1 and FB 2 must be assigned that way round.
With `s` swapped between them the circuit is wrong on eight vectors
(12, 14, 20, 22, 24, 26, 28, 30).

## The flow-graph evaluator `pla_flow_z`

The same example function in operator form is

```
Z = S_14^3[ S_4^2 S_8^4 lambda_16[x1 x5 x4 x3 x2],
            S_16^4 S_5^2 lambda_24[x4 x3 x2 x5 x1],
            S_4^2[x1, S_5^3[x5 x4 x3]] ]
```

In Boolean terms this is `x1' S_8^4[x5x4x3x2] | x4'x3'x2 (x5 XNOR x1) | x1 S_5^3[x5x4x3]`.
The operators of each level are independent, so the graph runs in four
steps:

| step | computes |
|---|---|
| 1 | y = lambda_16[x1x5x4x3x2], y' = lambda_24[x4x3x2x5x1], t3 = S_5^3[x5x4x3] |
| 2 | t1 = S_8^4[y4..y1], t2 = S_5^2[y'2 y'1], t6 = S_4^2[x1 t3] |
| 3 | t4 = S_4^2[y5 t1], t5 = S_16^4[y'5 y'4 y'3 t2] |
| 4 | Z = S_14^3[t4 t5 t6] |

In the pipeline:

* Each step ends in a register, so a result comes out every cycle.
* `x` (bit 0 = x1) is sampled on a rising edge when `valid_in` is 1.
* `z` and `valid_out` appear four rising edges later.
* `rst_n` is synchronous and active low. It clears only the valid bits, so
  results in flight are dropped. Data registers are not reset.

`pos_op` (a fixed `S_J^K`) and `lambda_xform` (a fixed `lambda_W`) are the
building blocks. They are reusable for other operator expressions.

## Sizes, cost and limits

* Degenerate sizes are allowed:
  * `N == K` builds one FB and one counter, with no conjunction; block 3 is
    left out.
  * `L0 = 0` or `L1 = 0` removes that kind of correction block.

  An empty port keeps a single bit, which is ignored.
* Any size can be set by parameter. The regression covers the following
  (n-k, l) pairs, with l correction blocks of each kind:

  | (n-k, l) | n |
  |---|---|
  | (0,0) | 6, 12 |
  | (1,1) | 5 |
  | (1,2) | 7 |
  | (2,0) | 7 |
  | (2,1) | 5, 6 |
  | (2,2) | 9, 14 |
  | (3,1) | 8 |
  | (3,2) | 10 |
  | (1,1) at k = 12 | 14 |
* Cost: the ones counter is written as an adder chain with a decoder. Its
  two-input-gate count and depth therefore depend on how synthesis maps it.
  Gate-count estimates that assume a particular counter structure will not
  match this RTL exactly.
* Input count: with the routing brought out as ports, the default circuit has
  86 input bits, of which 24 belong to the CB "0" blocks. A design that always
  routes the same variables could share `x_l`/`x_h` internally and needs far
  fewer pins.

## Design choices

These are the points where this RTL fixes something the algebra leaves open.

* **Count coding.** The counter output is one-hot, so that group 1 is a
  plain AND-OR.
* **Counter sharing.** FBs 2c and 2c+1 share counter c. With a single FB,
  one counter is built.
* **Routing.** Variable routing is done outside the circuit, through
  separate ports. There is no on-chip crossbar.
* **Correction-block counts.** `L0` and `L1` are independent parameters.
  Defaults are one of each.
* **Polarity.** A control bit of 1 complements, in `m0`, `m1` and `n_inv`.
* **Flow-graph timing.** `pla_flow_z` has one register per step, a valid bit
  and synchronous reset.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=<n> failures=<n>` line.

| testbench | what it checks |
|---|---|
| `tb_ones_counter`, `tb_pos_select`, `tb_corr_block`, `tb_corr_merge`, `tb_frag_and`, `tb_pos_op`, `tb_lambda_xform` | exhaustive checks of the leaf blocks |
| `tb_pla_fb` | one FB with two CBs of each kind, random stimulus against the fragment formula |
| `tb_pla_lc` | the worked example on all 32 vectors; random programs (via the `pla_lc_checker` helper); counter-to-FB pairing |
| `tb_pla_flow_z` | all 32 vectors back to back, random traffic with gaps, exact 4-cycle latency, reset flush |
| `tb_pla_top` | end to end at the default size: both circuits on the example, then random LC programs against a reference model |
| `tb_pla_lc_configs` | the circuit at the regression sizes listed above, with random programs |

`tb_pla_top` runs at the top's default parameters. It requires each of these
to happen at least once:

* a CB "1" setting the output;
* a CB "0" clearing it;
* an inverted conjunction variable;
* back-to-back pipeline inputs;
* a pipeline bubble;
* a reset with results in flight.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_pla_top tb/tb_pla_top.sv
./obj_dir/Vtb_pla_top
```

Replace `tb_pla_top` with any testbench name. Every testbench finishes in
well under a second. To lint a module on its own:

```
verilator --lint-only -Wall -Irtl rtl/pla_lc.sv
```

## Files

* `rtl/`: `ones_counter`, `pos_select`, `corr_block`, `corr_merge`,
  `frag_and`, `pla_fb`, `pla_lc`, `pos_op`, `lambda_xform`, `pla_flow_z`,
  `pla_top`. There is one module per file, and the file is named after its
  module.
* `tb/`: one testbench per module, `tb_pla_lc_configs`, and the
  `pla_lc_checker` helper.
