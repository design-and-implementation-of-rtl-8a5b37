# Systolic multiplier with multiplexer-dependent adders and Razor correction

An unsigned N x N-bit multiplier (N = 32 by default) built as a pipelined
systolic array. It combines three ideas:

* **Multiplexer-dependent adder (MDA).** The only arithmetic cell is a 2-to-1
  multiplexer feeding a full adder. The multiplier bit selects whether the
  multiplicand bit or zero goes into the full adder, so partial-product
  generation and accumulation happen in one cell.
* **Systolic array.** N rows of N MDA processing elements, each with its own
  registers, pass sums and carries from row to row. A new operand pair can
  enter every clock. The critical path between registers is one MDA cell,
  except in the final carry-propagate row.
* **Razor flip-flops with a correction loop.** The product is captured by
  Razor flip-flops. Each one pairs a main flip-flop with a shadow flip-flop
  clocked slightly later. When a result arrives late, the pair disagrees and
  raises an error. The bank then restores the correct value from the shadow.
  A correction unit holds the array for that one cycle, so no product is lost.
  This lets the multiplier run with little timing margin (for example at a
  lowered supply voltage) and still give correct products.

```
 a_i, b_i ──► operand_register ──► systolic_array ──► razor_ff ──► product_o, valid_o
                    ▲ en                ▲ en             │ error
                    └──────── correction_unit ◄──────────┘
                                  │ ready_o, corr_count_o
```

## The MDA cell (`mux_adder`)

```
sum, cout = FA( x, (sel ? y : 0), cin )
```

In the array, `x` is the incoming partial-sum bit and `y` the multiplicand bit
`a[i]`. `sel` is the row's multiplier bit `b[j]` and `cin` the incoming carry.
The mux takes the place of the AND gate of a conventional array multiplier.
With `sel` tied to 1 the cell is a plain full adder. The vector-merging row
uses it that way.

## The array (`systolic_array`, `systolic_pe`)

Processing element PE(j,i), in row j and column i, works at weight 2^(i+j). It
adds three bits:

* the partial product a[i]·b[j];
* the sum bit that PE(j-1,i+1) registered;
* the carry bit that PE(j-1,i) registered.

It registers its sum and carry. It also registers a[i] and hands it down to
PE(j+1,i). Row 0 starts from zero sums and carries. Inside a row nothing
ripples, so each row is one pipeline stage of carry-save addition.

* **Low half of the product.** Bit 0 of the sum vector leaving row j is final:
  it is product bit j. These bits are collected, one per row, in a small
  per-row register, so that all low bits of one operand pair travel together.
* **High half of the product.** After row N-1, the sum and carry vectors still
  hold the weights N to 2N-1. A registered ripple-carry row of MDA cells adds
  them. Its carry out is always zero, and an assertion checks that.
* **Side registers.** The multiplier bits `b` and a valid flag move down the
  array in per-row registers, in step with the data.

An operand pair that the array takes at one clock edge appears on `product_o`
N enabled edges later. An `en` input freezes every register, which is how the
correction loop holds the array.

The array has N² PEs with 3 flip-flops each. The side registers add at most
2N² more, and synthesis trims the bits that are never read. At N = 32 the top
level comes to about 4,800 flip-flops.

## Razor stage and correction loop (`razor_ff`, `correction_unit`)

This is the part that needs the most care.

**Clocking.** The operand register and the array run on the rising edge of
`clk`. The Razor bank's main flip-flops sample on the falling edge of `clk`.
Its shadow flip-flops sample on the falling edge of `clk_del`, a copy of `clk`
delayed by less than half a period. The last array stage therefore has half a
period to reach the main flip-flops. The short window up to the delayed edge
is where a late result is still caught. In silicon the path into the bank
must be slower than that delay, which is the usual Razor hold constraint.
In a zero-delay simulation it is satisfied automatically, because the data
changes only at rising edges.

**Detection.** At each delayed edge the bank stores `d` in the shadow and
compares it with what the main flip-flops captured. A mismatch sets `error`
for one clock period.

**Correction.** At the next main edge the main flip-flops load the shadow
value instead of `d`. No comparison is made in that restore cycle.
The restore cycle cannot take a new result, so the correction unit turns
`error` into a hold:

* `en` goes low for the array and the operand register;
* `ready_o` goes low for the operand source.

Each error pulse also increments the saturating `corr_count_o`.

Timeline of one late arrival (period T; the rising edge that launched product
X is at time 0):

| time        | event                                                                  |
|-------------|------------------------------------------------------------------------|
| 0           | array output register launches X                                       |
| T/2         | Razor main edge captures a stale/garbled X' (X arrived too late)       |
| T/2 + δ     | shadow captures X, mismatch: `error` = 1, `valid_o` = 0, `ready_o` = 0 |
| T           | array and operand register hold (en = 0); X stays on the array output  |
| 3T/2        | main flip-flops reload X from the shadow                               |
| 3T/2 + δ    | `error` = 0, `valid_o` = 1 with the correct X                          |
| 2T          | the array advances again                                               |

Each late arrival costs exactly one cycle of throughput. Every product still
leaves once, in order, and correct.

## Interface of `systolic_multiplier`

| port            | dir | width | meaning                                               |
|-----------------|-----|-------|-------------------------------------------------------|
| `clk`           | in  | 1     | main clock                                            |
| `clk_del`       | in  | 1     | `clk` delayed by δ < T/2, for the Razor shadows       |
| `rst_n`         | in  | 1     | asynchronous reset, active low                        |
| `a_i`, `b_i`    | in  | N     | unsigned operands                                     |
| `valid_i`       | in  | 1     | operands valid                                        |
| `ready_o`       | out | 1     | operands are taken at this rising edge                |
| `product_o`     | out | 2N    | a·b                                                   |
| `valid_o`       | out | 1     | product valid (low while a product is being restored) |
| `error_o`       | out | 1     | Razor error                                           |
| `corr_count_o`  | out | CNT_W | corrections so far, saturating                        |

Parameters: `N` (operand width, default 32, at least 2) and `CNT_W` (counter
width, default 16).

**Handshake.** Operands driven before a rising edge are taken at that edge if
`ready_o` is high there. If `ready_o` is low, keep them on the inputs.

**Reading the output.** Sample the outputs on the rising edge of `clk`.
Between a falling edge of `clk_del` and the next falling edge of `clk` they
are stable.

**Latency.** A product taken at rising edge k is valid at rising edge
k + N + 2, plus one edge for each hold in between. Throughput is one product
per cycle.

## Where this RTL makes its own choices

The block structure follows the design it implements: operand register,
systolic array of MDA processing elements with local registers, Razor
flip-flop on the output, and an error path into a correction unit that acts
on the array. So does the MDA cell, a mux plus a full adder. The following
details are choices of this implementation:

* **Operand format and array organisation.** Operands are unsigned. The array
  uses carry-save rows, with one pipeline stage per row and the multiplier bit
  broadcast across its row. A registered ripple-carry row produces the high
  half of the product.
* **Placement of the Razor flip-flops.** They guard only the product register.
  One description of the design places Razor flip-flops inside every
  processing element; its block diagram shows a single Razor stage on the
  array output. This RTL follows the block diagram.
* **What the correction unit does.** It is described only as a feedback path
  from the Razor error to the array. Here it is the one-cycle hold and the
  correction counter. Nothing in the design approximates: the products are
  exact.
* **Ports beyond the datapath.** The valid/ready handshake, the falling-edge
  Razor stage with a separate `clk_del`, and asynchronous active-low resets
  all belong to this implementation. The design itself counts only the
  data ports: 32 + 32 + 64 = 128 at N = 32.

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=<n> failures=<n>`:

* `mux_adder_tb`: all 16 input combinations.
* `systolic_pe_tb`: random inputs with random holds.
* `systolic_array_tb`: N = 32 with corner operands (0, all ones, 1, the top
  bit) and random operands, with gaps and random holds. It checks each
  product, the order, and a latency of exactly N enabled cycles.
* `operand_register_tb`, `correction_unit_tb`: loading, holding, reset,
  counting per pulse, saturation.
* `razor_ff_tb`: values that arrive on time and values that arrive late. It
  checks the stale value, the error flag, restoration from the shadow (not
  from `d`), and that on-time data raises no false error.
* `systolic_multiplier_tb`: the whole design at its default parameters,
  2000 multiplications. It injects late arrivals by briefly forcing the Razor
  bank's data input to a garbled value between the main and shadow edges. It
  checks every product, the order, the latency, the error count and the
  counter. It also requires that a Razor error, a restore and a pipeline hold
  each occurred (about 120 of each in a run).

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl --top-module systolic_multiplier_tb \
    rtl/sysmul_pkg.sv tb/systolic_multiplier_tb.sv
./obj_dir/Vsystolic_multiplier_tb
```

Timing closure, power and area have not been evaluated for this RTL. The
Razor stage's hold constraint (data path slower than δ) has to be met by the
physical implementation.
