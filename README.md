# Three-step signed-digit adder built from fixed-weight neurons

This design adds two binary numbers written in *modified signed-digit* (BMSD)
form. Each digit is -1, 0 or +1, and the value is `sum(d_i * 2^i)`. Because a
number has more than one BMSD form, an adder can be arranged so that no carry
ever travels more than one digit position. The adder then settles in the same
time for any operand length. Here the addition is split into three steps.
Every step is done by small "neurons": each one sums two digits with unit
weights and then applies a fixed activation function. The default
configuration, `tsa_top`, performs six independent 15-digit additions side by
side.

## The three steps

For operands `X = X_{n-1} ... X_0` and `Y = Y_{n-1} ... Y_0`, each digit
position `i` computes:

| step  | rewrite                           | inputs               | outputs                   |
|-------|-----------------------------------|----------------------|---------------------------|
| one   | `X_i + Y_i = 2*T_{i+1} + W_i`     | own operand digits   | carry `T`, interim sum `W` |
| two   | `T_i + W_i = 2*T'_{i+1} + W'_i`   | `T` from position i-1 | carry `T'`, interim sum `W'` |
| three | `S_i = T'_i + W'_i`               | `T'` from position i-1 | sum digit `S_i`          |

Each rewrite is done by one pair of neurons (or, in step three, one neuron).
A neuron's net input is `S = a + b`, which lies in -2..+2:

| neuron (module) | activation                   | S=-2 | S=-1 | S=0 | S=+1 | S=+2 |
|-----------------|------------------------------|------|------|-----|------|------|
| T  (`t_neuron`)  | sign(S)                      | -1   | -1   | 0   | +1   | +1   |
| W  (`w_neuron`)  | `-delta(S-1) + delta(S+1)`   | 0    | +1   | 0   | -1   | 0    |
| T' (`tp_neuron`) | `delta(S-2) - delta(S+2)`    | -1   | 0    | 0   | 0    | +1   |
| W' (`wp_neuron`) | `delta(S-1) - delta(S+1)`    | 0    | -1   | 0   | +1   | 0    |

Step three reuses the T neuron, fed with `T'_i` and `W'_i`.

### Why step three never needs a carry

This is the key property of the design, and the reason the carries stop after
one position. Suppose `T'_i = +1`. Then `T_{i-1} + W_{i-1} = +2`, so
`W_{i-1} = +1`. The W neuron outputs +1 only when `X_{i-1} + Y_{i-1} = -1`,
and in that case the T neuron gives `T_i = -1`. So `T_i + W_i` lies in
-2..0, and `W'_i` is 0 or -1. The mirror argument holds for `T'_i = -1`.
Hence `T'_i + W'_i` is always in -1..+1. The sign neuron of step three
returns it exactly, with nothing left over to carry.

### Result width

An n-digit addition yields an (n+1)-digit sum. The step-one carry out of the
top operand digit, `T_n`, becomes digit n. Cell n has no operand digits, so
`W_n = 0`, `|T_n| <= 1`, and neither carry leaves cell n. An assertion in
`tsa_adder` checks that both carries out of cell n are zero.

## Digit encoding

A digit is a 2-bit two's complement number (`bmsd_pkg::sd_digit_t`):

| code    | value |
|---------|-------|
| `2'b11` | -1    |
| `2'b00` | 0     |
| `2'b01` | +1    |

`2'b10` is not a digit. No module produces it, and the inputs must not carry
it. Vectors are packed arrays of digits, indexed by weight: element `i` has
weight `2^i`. The neuron's net input is a 3-bit signed number
(`sd_sum_t`).

## Module hierarchy

```
tsa_top        OPS lanes, each a tsa_adder          (default OPS = 6, N = 15)
 └ tsa_adder   N+1 bannu cells, carry chains T and T'
    └ bannu    one digit position: 5 neurons
       ├ t_neuron   step-one T, and step-three S
       ├ w_neuron   step-one W
       ├ tp_neuron  step-two T'
       └ wp_neuron  step-two W'
bmsd_pkg       digit types, constants, neuron summation function
```

The `bannu` ("basic arithmetic neural network unit") cell for position `i`
has these ports:

- inputs: `x`, `y`, plus `t_in` (`T_i`) and `tp_in` (`T'_i`) from position i-1;
- outputs: `t_out` (`T_{i+1}`) and `tp_out` (`T'_{i+1}`) to position i+1, plus
  `w`, `wp` and `s`.

`tsa_adder` ties the carry inputs of cell 0 to zero.

`tsa_adder` and `tsa_top` bring out the intermediate vectors `t`, `w`, `tp`
and `wp` (N+1 digits each) next to the sum `s`. This lets the work of each
step be watched, and the end-to-end testbench checks them. The following
outputs are constant by construction:

- `t[0]` and `tp[0]` are zero;
- `w[N]` is zero.

## Timing

Everything is combinational, and there is no clock, reset or handshake.
Every path goes through three neurons in series, whatever N is. Each neuron
is a 3-bit add followed by a comparison with a constant. A system that needs
registered ports or a pipeline with one step per cycle has to add the
registers outside `tsa_top`, or between the neuron rows in `bannu`.

## Worked example (default configuration)

The six additions below are run together in `tb/tsa_top_tb.sv`. The testbench
checks every digit of T, W, T', W' and S, not only the values.

| op | x        | y        | sum     |
|----|----------|----------|---------|
| 1  | 13923    | -6236    | 7687    |
| 2  | 32767    | 32767    | 65534   |
| 3  | -32767   | -32767   | -65534  |
| 4  | 31527    | 32481    | 64008   |
| 5  | 32767    | 0        | 32767   |
| 6  | -32767   | 0        | -32767  |

For example, op 1 is
`x = 1 0 0 -1 -1 1 0 1 0 -1 0 1 -1 0 -1` and
`y = -1 1 0 1 0 -1 1 1 1 0 -1 -1 -1 0 0` (most significant digit first).
It produces a single step-two carry (`T'_7 = -1`) and the 16-digit sum
`0 1 -1 0 -1 1 1 0 0 0 0 1 -1 0 -1 1`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench      | what it checks |
|----------------|----------------|
| `*_neuron_tb`  | All 9 input pairs, compared with the algorithm's rule table. |
| `bannu_tb`     | All 81 combinations of `x`, `y`, `t_in`, `tp_in`. Each output is compared with the rule table applied step by step, and the identities of steps one and two are checked. |
| `tsa_adder_tb` | Exhaustive at N = 4 (6561 operand pairs). At N = 15: constant-digit corner patterns plus 3000 random pairs. It checks the value of the sum, that every digit is legal, the identities at every position, and the constant edge digits. |
| `tsa_top_tb`   | The six worked additions at the default size, digit by digit. Then 2000 random rounds on all six lanes. It requires that each of these occurred at least once: positive and negative T and T' carries, a sum that grew into digit N, and a negative result. |

`tsa_top_tb` uses the top's default parameters. To run it with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/bmsd_pkg.sv \
    rtl/t_neuron.sv rtl/w_neuron.sv rtl/tp_neuron.sv rtl/wp_neuron.sv \
    rtl/bannu.sv rtl/tsa_adder.sv rtl/tsa_top.sv tb/tsa_top_tb.sv \
    --top-module tsa_top_tb
./obj_dir/Vtsa_top_tb
```

The other testbenches run the same way: change the testbench file and the
`--top-module`, and list only the modules it needs. Every testbench finishes
in well under a second.

## What follows the algorithm, and what was chosen here

From the algorithm itself:

- the three rewrite steps;
- the four activation functions;
- the reuse of the T neuron in step three;
- one cell per digit position;
- the default size of six parallel 15-digit additions.

Choices made in this design:

- **Zero output of the T neuron.** The activation's formula names only
  `S < 0` and `S > 0`. The rule table gives 0 when the two inputs cancel, so
  the T neuron returns 0 for `S = 0`.
- **Digit encoding.** The 2-bit two's complement code above.
- **Cell ports.** The carries are split out of each cell as ports to the
  neighbouring cell.
- **Result width.** The sum has N+1 digits.
- **Intermediate outputs.** The step-one and step-two vectors are exposed as
  outputs.
- **No registers.** The design is fully combinational.

Not built:

- a general trainable neuron or multilayer network (with learnable weights);
- conversion between BMSD and ordinary binary or decimal.

The adder needs neither. Every neuron in it has fixed unit weights and a
fixed activation.

## Changing the design

- **Operand length and number of lanes.** `N` and `OPS` are parameters of
  `tsa_top`, and `N` is a parameter of `tsa_adder`. Any `N >= 1` works. The
  delay does not grow with `N`; the area grows linearly.
- **Another activation.** Change the comparison in the matching neuron
  module. The shared summation is `bmsd_pkg::neuron_sum`.
- **Registered steps.** Add flip-flops on the `t`/`w` and `tp`/`wp` nets
  inside `bannu`, or between the rows in `tsa_adder`. The carry for position
  i+1 must be registered in the same stage as the interim sum for position i.
