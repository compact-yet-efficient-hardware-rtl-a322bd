# Fraction-arithmetic MLP accelerator

This is synthesizable SystemVerilog for a multilayer-perceptron (MLP) inference
engine. It follows the architecture published as "Compact Yet Efficient Hardware
Architecture for Multilayer-Perceptron Neural Networks". Three ideas keep the
circuit small:

* **Real numbers are fractions of integers.** A value is `N/D`, where `N` and
  `D` are 16-bit integers and a separate bit holds the sign. Fraction products
  and sums need only an integer multiplier, an integer adder and a right
  shifter. There is no floating point and no fixed-point scaling.
* **One physical layer serves every network layer.** There are `NMAX` hardware
  neurons. Each network layer runs on the first `n` of them. The outputs of that
  layer are stored, then fed back as the inputs of the next layer.
* **The sigmoid runs on the weighted-sum hardware.** `exp(-|v|)` is
  approximated by one of three quadratic polynomials, chosen by the range of
  `|v|`. The same multiplier and adder evaluate that polynomial. The sigmoid is
  then `D/(D+N)` or `N/(D+N)`, so no lookup table is needed.

The topology is set at run time: number of inputs, number of layers, neurons
per layer, and a bias flag per layer. The limits are `IMAX` inputs, `NMAX`
neurons per layer and `LMAX` layers. The defaults are 220, 24 and 7. These
cover the 220-24-10 speech-recognition network used to evaluate the
architecture, and every configuration of its area study: (2,6,3), (4,9,5) and
(8,13,7).

## The number format

`ffp_pkg::frac_t` is one 33-bit word:

| bits  | 32..17        | 16   | 15..0                   |
|-------|---------------|------|-------------------------|
| field | numerator `N` | sign | denominator `D` (magnitude) |

The value is `(-1)^sign * N / D`. Zero is `0/1`. The largest magnitude is
`65535/1`. For example, `12/-3777` is `N=12`, sign 1, `D=3777`.

Given `a = Na/Da` and `b = Nb/Db`:

* product: `(Na*Nb) / (Da*Db)`. This is two 16x16 multiplications and gives
  32-bit parts.
* sum: `(Na*Db ± Nb*Da) / (Da*Db)`. This is three multiplications and one
  addition. The numerator can reach 33 bits.

### Adaptive framing (`frame_shifter`)

A wide result goes back into 16/16 bits by shifting the numerator and the
denominator right together, one bit per clock, until neither has a set bit
above bit 15. Shifting both keeps the ratio, and only the low bits are lost.
For example, 450023/1279030 needs five shifts and becomes 14063/39969: the value
0.3518471 becomes 0.3518477. Keeping the low 16 bits of each part instead would
give 6/19 = 0.316.

If a shift would leave the denominator at zero (a huge numerator over a tiny
denominator), the result saturates to `65535/1` with the original sign.

`fits` is the NOR of the upper bits of both registers. It is low for exactly as
many clocks as shifts are needed. The most is 17 shifts, for a 33-bit sum
numerator. The control unit waits for `fits` on every active neuron before it
issues the next operation. These waits are the only data-dependent stalls in
the design.

### Signs (`aspu`)

Numerators and denominators are naturals, so signs are handled beside the
integer path:

* **Product:** the sign is the XOR of the two signs.
* **Sum, same signs:** the adder adds the two cross products and the result
  keeps the common sign.
* **Sum, opposite signs:** the unit has the smaller cross product two's
  complemented before the adder (`twoc1` or `twoc2`). The adder then produces a
  non-negative magnitude, and the result takes the sign of the larger term.
  Equal magnitudes give +0.

## The hardware neuron (`neuron`)

Every neuron has these parts:

* operand A in `Reg1`;
* operand B in `Reg2`/`Reg3` (numerator, and signed denominator);
* an accumulator fraction;
* two 32-bit cross-product temporaries;
* one combinational 16x16 multiplier and one adder with two's complementers;
* a framing shifter;
* a comparator.

All neurons receive the same micro-operation (`ffp_pkg::neuron_op_t`) in the
same Clk1 period. Each neuron works on its own weight, taken from its `Regw`
register, and on the broadcast input `x`.

| operation      | effect |
|----------------|--------|
| `N_ACC_CLR`    | accumulator = 0/1 |
| `N_LOAD_XW`    | A = x, B = w |
| `N_MUL_N`      | T1 = A.N * B.N |
| `N_MUL_D`      | start framing T1 / (A.D * B.D), sign A^B. This gives the product P |
| `N_SUM_1`      | T1 = Acc.N * P.D |
| `N_SUM_2`      | T2 = P.N * Acc.D |
| `N_SUM_3`      | start framing (T1 ± T2) / (Acc.D * P.D). The ASPU gives the sign |
| `N_ACC_WB`     | accumulator = framed sum |
| `N_CMP s`      | segment test `(Acc.N >> s) < Acc.D`, for s = 1, 2, 3 |
| `N_LOAD_V`     | A = abs(accumulator); remember the sign of v |
| `N_LOAD_W`     | B = w |
| `N_ACC_LOAD`   | accumulator = r (from Regw) |
| `N_LOAD_B_ACC` | B = accumulator |
| `N_SIG`        | start framing D/(D+N) if v >= 0, or N/(D+N) if v < 0 |

One weighted-sum term `acc += x*w` takes this sequence:

`LOAD_XW, MUL_N, MUL_D, SUM_1, SUM_2, SUM_3, ACC_WB`

That is seven Clk1 periods, plus any framing that runs past the end of a Clk1
period.

## The sigmoid on the same datapath

`sigmoid(v) = 1/(1+exp(-v))`. The hardware approximates `exp(-|v|)` piecewise
(least-squares fits):

| segment | range of abs(v) | a (v^2)       | b (v)           | c             |
|---------|-----------------|---------------|-----------------|---------------|
| 0       | [0, 2)          | 12858/64703   | -11691/14482    | 56072/57521   |
| 1       | [2, 4)          | 1046/38893    | -13883/64027    | 12560/27423   |
| 2       | [4, 8)          | 63/38032      | -581/24655      | 456/5425      |
| 3       | [8, inf)        | 0             | 0               | 0             |

The host loads these nine fractions into the coefficient memory, at word
`3*segment + k` (k = 0, 1, 2 for a, b, c). The test benches use exactly these
values.

**Segment selection.** Because the segment borders are powers of two, the test
`|v| < 2^s` is the integer test `(N >> s) < D`. Integer division by `2^s` gives
the same answer as exact division whenever D is a positive integer. The neurons
run this test for s = 1, 2, 3. Each neuron keeps its own segment, so the control
unit then loads each neuron's own coefficients into its `Regw`.

**Polynomial evaluation.** The polynomial is evaluated as `(a|v| + b)|v| + c`.
This is two fraction products and two fraction sums on the weighted-sum
hardware. `b` and `c` enter the accumulator through the neuron's `r` input.

**Result.** With the result written `N/D ≈ exp(-|v|)`:

* `sigmoid(v) = D/(D+N)` for v >= 0;
* `sigmoid(v) = N/(D+N)` for v < 0, using `sigmoid(v) = 1 - sigmoid(-v)`.

Either result is framed once more.

**Accuracy.** Over several hundred random `v` in [-12, 12], the result stays
within 0.02 of the true sigmoid.

## One physical layer for all network layers (`annalu`)

`annalu` holds:

* `NMAX` neurons;
* a broadcast input register;
* a `Regw` register per neuron, written from the 33-bit data bus;
* a `Regy` output register per neuron.

A network layer with `n` neurons switches on neurons `0..n-1`. The others
ignore operations and keep their `Regy`.

The broadcast input comes from one of three sources:

* the data bus, for layer 0;
* `Regy[j]` of the previous layer, for later layers (the feedback path);
* the constant 1/1, for a layer's bias term.

A bias is an extra input term: 1/1 times the bias weight. A neuron without a
bias simply has 0 as that weight.

## Control (`anncu`, `clock_gen`)

The design has two clock rates. Framing shifts happen at the fast Clk2 rate.
The control unit issues one operation per Clk1 period, and Clk1 is a quarter of
Clk2. Here the whole design runs on a single clock `clk` at the Clk2 rate.
`clock_gen` produces a one-cycle enable, `clk1_tick`, every fourth clock.

The **primary FSM** walks each network layer through these steps:

1. **LAYER**: clear the accumulators.
2. **DI/WSC** for every input term j: copy the staged operands into the
   neurons, then run the seven-operation multiply-accumulate.
3. **AFC**: run CMP s=1,2,3, then LOAD_V. Two polynomial passes follow, and
   then SIG. Regy captures the outputs.
4. Go to the next layer, or to **END**.

`done` is high in END. A new `start` reruns the network. The operands can be
new by then, because the memories are host-written.

The **secondary FSM LSW** stages the next operands while the neurons compute:

* the next input `x_j` goes into the broadcast register;
* neuron m's weight, or its segment's coefficient, goes into `Regw[m]`.

LSW makes one data-bus request per clock and asks the load and control system
for each word. With 24 neurons, loading a term takes about 26 clocks, which is
well inside the roughly 28+ clocks of one multiply-accumulate. Loading is
therefore hidden except at layer starts.

Assertions in `anncu` check the handshake between the two machines:

* a job starts only when LSW is free;
* a staged job is consumed only when it is complete.

## Load and control system (`lcs`)

The load and control system holds three memories and the topology registers.

**Input memory:** `IMAX` words.

**Weight and bias memory:** `(IMAX+1)*NMAX + NMAX*(NMAX+1)*(LMAX-1)` words,
which is 8904 at the defaults. Word (layer l, row j, neuron m) is at:

```
base(l) + j*NMAX + m
base(0) = 0
base(l) = (IMAX+1)*NMAX + (l-1)*(NMAX+1)*NMAX      for l >= 1
```

The bias row is row `IMAX` in layer 0 and row `NMAX` in the later layers.

**Coefficient memory:** nine words. Segment 3 reads as 0/1.

**Topology registers:**

* `H_NET`, address 0: number of inputs;
* `H_NET`, address 1: number of layers;
* `H_LAYER`, address l: neurons in layer l in bits 15..0, and its bias flag in
  bit 16.

**Reads.** A read request returns the word on the bus one clock later, with
`bus_valid`. The memories are plain arrays with a synchronous read, so they map
to block RAM.

### Using the top (`mlp_top`)

1. Write the memories and registers through `host_we`, `host_sel`, `host_addr`
   and `host_wdata`. There is one write per clock.
2. Pulse `host_start` for one clock.
3. `busy` rises.
4. When `done` rises, `y[0..n-1]` hold the last layer's outputs as fractions.

## Timing

One input term costs 7 Clk1 periods, that is 28 clocks. Framing can add time:
after a product or a sum, framing needs up to 17 shifts, and any shifts beyond
the current Clk1 period add whole Clk1 periods. The sigmoid costs about 21 Clk1
periods plus framing.

The 220-24-10 network takes **12,151 clocks** (about 3,040 Clk1 periods) from
`host_start` to `done`. The published figures for the original implementation
are 356 cycles at a 49.341 ns clock and an evaluation time of 17.565 ms. These
two figures agree only if the count is 356 thousand cycles. The original
per-operation schedule is not published, so this schedule claims no match with
either reading.

## Where this implementation departs from the published design

* **Host side.** The published design is driven by a soft processor over FIFO
  links, with a UART and a timer. This implementation has a plain synchronous
  host write port instead. The processor, links and peripherals are not part
  of it.
* **Clocking.** Clk1 and Clk2 are not separate clocks. There is one clock plus
  a Clk1 enable, and shifts happen on the rising edge, not on the falling edge
  of Clk2.
* **Framing registers.** The two numerator shift registers, one for products
  and one for sums, are merged into one 33-bit register. The shared
  denominator shift register is kept.
* **Cross products.** Two temporaries hold the cross products of a fraction
  sum.
* **Segment test.** The comparator uses a constant shift by s, instead of
  reusing the framing shift register.
* **ASPU.** The ASPU is combinational logic giving the same outputs. Its
  gate-level circuit, with its flip-flops and clock gating, is not reproduced.
* **Control.** The published description gives only the states of the control
  unit. The micro-operation set, the state sequences and the request protocol
  are this implementation's own.
* **Layer loop.** The control unit, not the load and control system, loops
  over the layers.
* **Coefficients.** LSW also loads the per-neuron polynomial coefficients.
* **Memory words.** Memory words are 33 bits wide, so one word holds one whole
  fraction.
* **Negative polynomial values.** A negative polynomial value would be treated
  as 0. The fits are positive on their ranges, so this does not occur.

## Files

`rtl/` contains:

| file            | contents |
|-----------------|----------|
| `ffp_pkg.sv`    | `frac_t`, micro-operation, request and host enums |
| `frame_shifter.sv`, `aspu.sv`, `neuron.sv` | the neuron datapath |
| `annalu.sv`     | the physical layer |
| `anncu.sv`      | the control unit |
| `clock_gen.sv`  | the Clk1 enable |
| `annch.sv`      | the computing hardware: `annalu` + `anncu` + `clock_gen` |
| `lcs.sv`        | memories, topology registers and bus server |
| `mlp_top.sv`    | the top: `lcs` + `annch` |

`tb/` contains:

* `ffp_ref_pkg.sv`, a bit-exact integer reference of the framing, the products,
  the sums, the sigmoid and a whole network;
* one self-checking testbench per module;
* `tb_mlp_top.sv`, end to end at reduced size. It runs four jobs with topology
  changes and no reset in between. It checks the outputs bit-exactly and
  against a floating-point MLP (within 0.06). It also counts the design's
  mechanisms and fails if any never occurs: framing shifts, framing longer
  than a Clk1 period, saturation, all four segments, both signs of v, both
  two's complement selects, bias terms, feedback, load overlap, idle neurons,
  and topology changes;
* `tb_mlp_full.sv`, the 220-24-10 network at the default sizes. It checks the
  outputs bit-exactly, against floating point, and against a clock-count bound.
* `tb_mlp_configs.sv`, the three area-study sizes (2 inputs and 3 layers of 6;
  4 and 5 of 9; 8 and 7 of 13, every layer with a bias), run back to back on
  the default-size design. They take 1,273, 3,020 and 5,840 clocks.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ffp_pkg.sv tb/tb_mlp_full.sv --top-module tb_mlp_full
./obj_dir/Vtb_mlp_full
```

To run another testbench, replace `tb_mlp_full` with its name. The full-size
run takes a few seconds. Any sizes can be chosen through the `IMAX`, `NMAX` and
`LMAX` parameters of `mlp_top`.
