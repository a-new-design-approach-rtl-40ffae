# Reference-guided selection: a full adder that survives a stuck output wire

Triple modular redundancy masks a faulty copy of a circuit by majority vote.
This design uses the same three copies differently. One copy, the
**reference** `fa_r`, is trusted: it is assumed to have passed an exhaustive
test. The other two, `fa_1` and `fa_2`, are the **working copies**, and only
their outputs ever reach the design's outputs. For each output bit a pair of
ex-or gates asks "does copy 1 agree with the reference?" and "does copy 2
agree?". A small priority encoder then sets a 2:1 multiplexer: it takes copy 1
while copy 1 agrees, otherwise copy 2. A single stuck-at-0 or stuck-at-1 fault
on any output wire of a working copy is therefore routed around. The same
holds for the ex-or outputs (the encoder inputs), the encoder outputs (the mux
selects) and the mux data inputs.

The circuit under test here is a one-bit full adder with outputs sum and
carry. The selection circuit is written for any number of output bits.

## The decision for one output bit

Names as used in the code: `y1`, `y2` and `yr` are the bit from copy 1, copy 2
and the reference. The two ex-or gates give `x1 = y1 ^ yr` and
`x2 = y2 ^ yr`. Copy 1 is the priority input of the encoder.

| x1 | x2 | select | output | meaning |
|----|----|--------|--------|---------|
| 0  | –  | 0      | y1     | copy 1 agrees with the reference |
| 1  | 0  | 1      | y2     | copy 1 wrong, copy 2 agrees: reconfigured |
| 1  | 1  | 0      | y1     | both copies wrong (outside the single-fault model); `none` = 1 |

The reference is never passed to the output; it only steers the choice. For
the full adder there are two lanes: lane 0 is the sum (`mux_1`, select `o_1`)
and lane 1 is the carry (`mux_2`, select `o_2`).

Why faults inside the selector are also tolerated, assuming only one fault
exists:

- If an encoder input is stuck at 1, the select moves to copy 2, which is
  correct.
- If an encoder input is stuck at 0, or copy 2's input is stuck at anything,
  copy 1 stays selected, and copy 1 is correct.
- If an encoder output is stuck, either copy may be selected, and both are
  correct.

The design does not cover faults on the adders' inputs, faults on the mux
outputs, or faults in the reference itself.

## Fault injection and timing

To exercise the fault model, each of the four working-copy output nets (`s_1`,
`c_1`, `s_2`, `c_2`) passes through a `fault_inject_ff`. This is a D
flip-flop with asynchronous, active-high reset and set. While reset is held,
the net is stuck at 0, and while set is held it is stuck at 1. Reset wins if
both are high. With neither held, the flip-flop samples the adder output on
each rising edge of `clk`.

The reference outputs go through the same flip-flop type with reset and set
tied low. That keeps the ex-or gates comparing results of the same input
vector. As a result:

- **`FAULT_INJECTION = 1` (default).** `sum_o`/`carry_o` show the result for
  the inputs present at the previous rising edge of `clk`, one cycle of
  latency. A stuck-at control takes effect at once, without a clock edge.
  After the control is released, the net keeps the stuck value until the next
  rising edge.
- **`FAULT_INJECTION = 0`.** The flip-flops are left out and the design is
  purely combinational. `clk`, `inj_sa0` and `inj_sa1` are unused. This is
  the form to use once testing is done.

Injection site numbering (`ftol_pkg`): 0 = `s_1`, 1 = `c_1`, 2 = `s_2`,
3 = `c_2`. Bit *k* of `inj_sa0` / `inj_sa1` drives reset / set of site *k*.

## Modules

| module | role |
|--------|------|
| `ftol_pkg` | shared constants (output bit positions, injection sites) and the `fa_out_t` struct |
| `top_final_stuck` | three full adders, six injection flip-flops, the selector |
| `full_adder` | `s = a^b^ci`, `co = majority(a,b,ci)` |
| `fault_inject_ff` | D flip-flop with async set/reset for stuck-at injection |
| `fault_tolerant_select` | `WIDTH` lanes of compare, encode and select (default 2) |
| `exor_compare` | the two ex-or gates of one lane |
| `priority_encoder` | two-input priority encoder, priority on copy 1, plus the `none` flag |
| `mux2` | 2:1 multiplexer, select 1 = copy 2 |

Ports of `top_final_stuck`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock of the injection flip-flops |
| `a`, `b`, `ci` | in | 1 each | adder inputs |
| `inj_sa0` | in | 4 | per site, stuck-at-0 (flip-flop reset) |
| `inj_sa1` | in | 4 | per site, stuck-at-1 (flip-flop set) |
| `sum_o`, `carry_o` | out | 1 each | fault-free sum and carry |
| `sel_sum`, `sel_carry` | out | 1 each | mux selects; 1 = copy 2 in use |
| `multi_fault` | out | 2 | [0] sum, [1] carry: neither copy agrees with the reference |

After generic synthesis the default top has 6 flip-flops and 35 word-level
cells.

## Verification

`fault_tolerant_select` carries an assertion in each lane. Unless both
copies disagree with the reference, the forwarded bit must equal the
reference bit. Any simulation of the design therefore checks the central
property on every evaluation.

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_full_adder`, `tb_exor_compare`, `tb_priority_encoder`, `tb_mux2`: all
  input combinations.
- `tb_fault_inject_ff`: the capture delay, that forcing needs no clock edge,
  holding while forced, release, and reset winning over set.
- `tb_fault_tolerant_select`: all 64 combinations at `WIDTH = 2`, and 500
  random vectors with independent per-bit corruption at `WIDTH = 6`.
- `tb_top_final_stuck`: the whole design at default parameters.
  - It applies the 8 exhaustive vectors and the 4 pseudo-random vectors (000,
    011, 001, 111) under each of 9 fault conditions: none, plus stuck-at-0
    and stuck-at-1 on each of the four sites.
  - It checks the one-cycle latency, the two reference cases (001 with `s_1`
    stuck-at-0 gives sum 1 from copy 2; 011 with `s_1` stuck-at-1 gives sum 0
    from copy 2), and stuck-at values forced on the encoder inputs and
    outputs.
  - It also runs a double fault, which must raise `multi_fault`, and 400
    random vectors with random single faults.
  - It counts each of these mechanisms and fails if any never occurred.
- `tb_top_final_stuck_comb`: the `FAULT_INJECTION = 0` build. It checks
  outputs within the same time step, that the injection ports have no effect,
  and stuck values forced directly onto the adder output nets.

To run one testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb rtl/ftol_pkg.sv tb/tb_top_final_stuck.sv \
  --top-module tb_top_final_stuck -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.

## What follows the original scheme and what is this implementation's choice

These follow the original scheme:

- three copies of the full adder, one of them a trusted reference;
- ex-or comparison of each working copy's output with the reference;
- one priority encoder per output, with priority on copy 1;
- multiplexers fed only by the working copies, where select 1 means copy 2;
- a D flip-flop with set and reset on a net to inject stuck-at faults, reset
  giving stuck-at-0 and set giving stuck-at-1;
- the test vectors described above.

These are this implementation's own choices:

- the clock, and active-high asynchronous set/reset with reset winning;
- the matching flip-flops on the reference outputs, which cause the
  one-cycle latency;
- the `FAULT_INJECTION` switch;
- the behaviour when both copies disagree (copy 1 kept, `none` raised);
- the observation outputs `sel_sum`, `sel_carry` and `multi_fault`;
- the generalisation of the selector to `WIDTH` bits;
- the gate equations of the full adder (only its truth table is fixed).

A gate-level implementation of this scheme on an FPGA is reported to collapse
to two 3-input LUTs when the synthesis tool is allowed to merge the identical
adder copies. A real deployment must keep the copies apart, for example with
keep or don't-touch attributes, or the redundancy disappears. This RTL does
not carry such attributes.
