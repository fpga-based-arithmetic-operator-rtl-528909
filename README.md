# 16-tap FIR filter on carry look-ahead arithmetic in fracturable-LUT logic

This is a direct-form FIR filter, `y(n) = sum_k coeff[k] * x(n-k)`, in
which every addition is done by a carry look-ahead adder (CLA). The
multipliers are shift-and-add arrays of CLA adders. The adders that sum the
taps are modelled as the arithmetic logic block of an FPGA: a row of
fracturable 6-input LUTs that feed a hardened CLA. So the design has two
parts:

* an adder family, from the one-bit cell up to a WIDTH-bit adder and the
  LUT-plus-adder logic block;
* the filter built from that family: a delay line, 16 multipliers, a
  chain of 15 adders and an output register.

All RTL is synthesizable SystemVerilog-2017. Every block has a
self-checking testbench.

## The carry look-ahead adder, bottom up

The adder separates what each bit can compute alone from the carries,
which it computes in parallel.

**`pfa`: partial full adder.** One per bit. It forms the generate
`g = a & b` and the propagate `p = a ^ b` from the operands alone, and the
sum `s = p ^ c` once its carry `c` arrives. It never forms a carry-out.
Each bit does one of three things:

| a b | bit's role | carry-out |
|-----|------------|-----------|
| 0 0 | kill       | 0 |
| 0 1, 1 0 | propagate | carry-in |
| 1 1 | generate   | 1 |

**`cla_lookahead`: the 4-bit look-ahead unit.** Each carry is a two-level
AND-OR of the group's g, p and carry-in:

```
C1 = G0 + P0.Cin
C2 = G1 + P1.G0 + P1.P0.Cin
C3 = G2 + P2.G1 + P2.P1.G0 + P2.P1.P0.Cin
C4 = GG + PG.Cin,   GG = G3 + P3.G2 + P3.P2.G1 + P3.P2.P1.G0,   PG = P3.P2.P1.P0
```

C4 settles as soon as the g/p bits and Cin are valid. It does not wait for
C3. Groups stay at 4 bits because each further carry needs a wider AND and
OR gate.

**`cla4`: the 4-bit CLA.** It has four `pfa` cells and one look-ahead
unit. Its ports are `a[3:0]`, `b[3:0]`, `cin` and `sum[4:0]`, where
`sum[4]` is the carry-out. It also brings out the block generate and
block propagate.

**`cla_adder #(WIDTH)`: a wide adder.** It is made of `cla4` groups. Inside
a group the carries are parallel. Between groups the carry ripples: a
group's C4 is the next group's Cin. A carry made in one group reaches that
group's left end after a fixed two-level delay and then enters the next
group. There is no second level of look-ahead. A WIDTH that is not a
multiple of 4 is zero-extended to whole groups. Default WIDTH is 32.

## `flut_cla`: fracturable LUTs in front of a hardened adder

This block models the FPGA logic block that the filter's adders map onto.
Each bit position `i` has:

* two 5-input LUTs, A and B, that read the same inputs `lut_in[i][4:0]`;
* a 2:1 mux on the sixth input `lut_in[i][5]`. It joins the pair into one
  6-input LUT, picking B when the sixth input is 1;
* operand wiring: LUT A drives the adder's operand bit A_i and LUT B drives
  B_i. So each LUT half can reshape its operand before the add. For
  example, it can pass an input, invert it to subtract, or select between
  inputs;
* an output mux set by `cfg_arith[i]`. It drives `out[i]` with the adder's
  sum bit (arithmetic mode) or the 6-LUT output (logic mode).

The hardened adder is a `cla_adder` of the row's width, with `cin` and
`cout` brought out.

The configuration ports stand for the block's SRAM configuration cells. Hold
them static. `cfg_lut[i][31:0]` is LUT A's truth table and
`cfg_lut[i][63:32]` is LUT B's. Entry `k` is the output when
`lut_in[i][4:0] == k`. Useful tables:

| LUT function | table |
|---|---|
| copy input 0 | `32'hAAAA_AAAA` |
| copy input 1 | `32'hCCCC_CCCC` |
| NOT input 1 (with `cin = 1` this subtracts) | `32'h3333_3333` |

The default WIDTH is 4, as in the 4-bit structure the block comes from.

The following parts of this block are this design's reading, not given
structure:

* which LUT half feeds A and which feeds B;
* that the 6-LUT mux is steered by a sixth input;
* that the output mux is a configuration bit.

No configuration-loading chain is modelled.

## `cla_multiplier`: shift-and-add on CLA adders

The product `x * c` of a signed XW-bit sample and a signed CW-bit
coefficient works like this:

* For each set bit `c[j]`, a copy of `x` shifted left by `j` is a partial
  product. `x` is first sign-extended to XW+CW bits.
* The top coefficient bit weighs `-2^(CW-1)`, so its partial product is
  subtracted: it is inverted and added with carry-in 1.
* CW-1 `cla_adder`s of XW+CW bits add the partial products in a linear
  chain.

The product is always exact. At the defaults it is 16 × 16 → 32 bits.
There is no Booth recoding and no adder tree: this is the plain
shift-and-add array.

## `delay_line` and the filter, `fir_filter`

`delay_line #(W, DEPTH)` is a chain of W-bit D flip-flop stages.
`taps[0]` is the current input and `taps[k]` is the input from k clock
edges ago. A synchronous reset clears every stage.

`fir_filter` wires the blocks as a direct-form filter:

```
 filter_in ──┬── D ──┬── D ── ... ── D ──┐        (15 delay stages)
             │       │                   │
           mul0    mul1     ...       mul15        (cla_multiplier, coeff[k])
             │       │                   │
             └──── add1 ── add2 ── ... ── add15 ──> register ──> filter_out
                   (each adder: flut_cla, 32 bits, arithmetic mode)
```

* The input x(n) feeds multiplier 0 directly. Delay stage k feeds
  multiplier k+1.
* Each product is sign-extended to 32 bits.
* Adder k adds product k to the running sum of the adders before it.
* Each adder is a 32-bit `flut_cla` configured the way a mapped design
  would use it:
  * LUT A copies LUT input 0, which carries the running-sum bit;
  * LUT B copies LUT input 1, which carries the product bit;
  * every output mux selects the sum.

**Interface**

| port | width | meaning |
|---|---|---|
| `clk` | 1 | one sample per rising edge |
| `rst` | 1 | synchronous, active high; clears the delay line and `filter_out` |
| `coeff[NTAPS]` | 16 each, signed | `coeff[k]` multiplies x(n-k); may change at any time |
| `filter_in` | 16, signed | x(n) |
| `filter_out` | 32, signed | y(n) |

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `NTAPS` | 16 | taps; must be at least 2 |
| `XW` | 16 | sample width |
| `CW` | 16 | coefficient width |
| `YW` | 32 | output width |

These defaults are also in `fir_pkg`.

**Timing.** The filter has one clock of latency. After a rising edge,
`filter_out` holds y(n) for the `filter_in` that was present before that
edge. At that edge the delay line held the samples of the earlier edges.

All multipliers and adders sit combinationally between the delay line and
the output register. The critical path is therefore:

* the chain of 15 32-bit CLA adders inside a multiplier;
* then the 15-adder sum chain;
* each 32-bit adder ripples through 8 look-ahead groups.

Nothing is pipelined.

**Arithmetic.** The output is the exact sum modulo 2^32, with no
saturation. Each 16 × 16 product fits in 32 bits, but a sum of 16
full-scale products can need up to 36 bits. Such a sum wraps. Keep
`sum |coeff[k]| * max|x|` below 2^31 for an exact result. A typical low-pass filter with
Q15 coefficients and full-scale input stays inside that range.

## Where this design makes its own choices

These choices follow the published design:

* the CLA structure and its 4-bit groups;
* the per-bit generate/propagate/sum cell;
* the LUT-pair-plus-hardened-CLA logic element;
* the direct-form structure: delay chain, one multiplier per tap and a
  chain of CLA adders;
* 16 taps, 16-bit input and 32-bit output;
* shift-and-add multiplication on CLA adders.

These are this design's own choices:

* the 16-bit signed coefficient width, with coefficients as input ports;
* two's-complement signed arithmetic and the way the sign bit is
  subtracted in the multiplier;
* the synchronous active-high reset and the registered output;
* wrap-around instead of saturation;
* group-to-group ripple between 4-bit CLA groups, with no second
  look-ahead level;
* the LUT/mux select details of `flut_cla`.

Known differences from the published implementation:

* The published FPGA implementation reports 17 DSP blocks. Its synthesis
  tool mapped the products to hard multipliers. This RTL keeps the
  CLA-based multiplier that the design is about. A synthesis tool may
  still recognise and remap it.
* The published implementation reports 332 flip-flops. This RTL has 272:
  240 in the delay line and 32 in the output register. The published
  implementation very likely also registered its input, which this RTL
  does not.
* The single-tap flow graph the design starts from shows a gain after the
  adder. This is not built, because the convolution sum has no such gain.
* The FPGA fabric is not modelled: its routing crossbar, I/Os, memories and
  fracturable hard multipliers. Only the arithmetic logic element is.

## Verification

Each testbench in `tb/` compares its block with a reference computed
independently in the testbench. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_pfa` | all 8 input combinations |
| `tb_cla_lookahead` | all 512 g/p/cin combinations against a ripple reference |
| `tb_cla4` | all 512 a/b/cin combinations against integer addition, plus block G/P |
| `tb_cla_adder` | 32-bit and 10-bit widths; corner cases that carry through every group; 20,000 random operand pairs |
| `tb_flut_cla` | random truth tables and modes in both modes; configured adder and subtractor |
| `tb_cla_multiplier` | 16 × 16 corner cases and random operands; 5 × 3 exhaustively |
| `tb_delay_line` | every tap against a history model; reset in mid-stream |
| `tb_fir_filter` | the filter at default parameters, checked every cycle against a 64-bit model reduced mod 2^32 (details below) |

`tb_fir_filter` runs these phases:

* an impulse response, which must reproduce the coefficients;
* the step response of a symmetric low-pass filter;
* a noisy square-wave stream;
* full-scale random data that drives the output into wrap-around;
* coefficients rewritten while data streams;
* a reset in mid-stream.

It counts each of these events and fails if one never happened.

To run a testbench with Verilator 5 from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv \
          tb/tb_fir_filter.sv --top-module tb_fir_filter -Mdir obj -o sim
./obj/sim
```

Replace `tb_fir_filter` with any other testbench name. The full-size
filter test takes under a second of simulation time once it is built.
