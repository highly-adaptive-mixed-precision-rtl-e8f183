# Mixed-precision divide-and-conquer MAC unit

Quantized neural networks often use different bit-widths per layer and per tensor. For example, a layer can have
8-bit activations and 4-bit weights. A processor's SIMD multiplier usually offers only 16- and 8-bit lanes, so a 4-bit × 8-bit product
is widened to 8 × 8 and pays for hardware it does not need. This unit is a
multiply / multiply-accumulate (MAC) block for a 32-bit processor. It handles
every power-of-two operand width from 2 to 32 bits, and it handles asymmetric pairs in which one operand
is half as wide as the other (32×16, 16×8, 8×4, 4×2). Each operation takes one clock cycle. It is built as a
*divide-and-conquer* multiplier: a 32×32 product is assembled from 256
independent 2×2 multipliers. Any narrower operation is then a subset of that array. The unit switches on
only the 2×2 multipliers whose operand slices belong to the same lane. In
asymmetric mode it also switches off those that would only multiply the zero
padding of the narrow operand.

All arithmetic is unsigned.

## Operand formats

`op_A` and `op_B` are 32-bit registers holding packed lanes. Lane *i* of width
*N* occupies bits `[N*i +: N]` of both registers. In asymmetric mode the
`op_B` lane holds an *N/2*-bit operand in its lower half. The upper half of the lane is
ignored, whatever it holds.

| `width`   | lanes | symmetric | asymmetric | 2×2 multipliers on (sym / asym) | lane product |
|-----------|-------|-----------|------------|-------------------------------|--------------|
| `W32` (4) | 1     | 32×32     | 32×16      | 256 / 128                     | 64 bits      |
| `W16` (3) | 2     | 16×16     | 16×8       | 128 / 64                      | 32 bits      |
| `W8`  (2) | 4     | 8×8       | 8×4        | 64 / 32                       | 16 bits      |
| `W4`  (1) | 8     | 4×4       | 4×2        | 32 / 16                       | 8 bits       |
| `W2`  (0) | 16    | 2×2       | —          | 16                            | 4 bits       |

In a 4×8 case, where the narrow operand is the first one, swap the operands. The narrow operand always goes in `op_B`.
`asym` is ignored for 2-bit lanes. Width codes 5 to 7 act as `W32`.

Two operations exist (`op_e`):

* `OP_MUL` returns all lane products, packed: lane *i*'s 2N-bit product sits at bits `[2N*i +: 2N]` of the 64-bit result. With `W32` this is the ordinary 64-bit product.
* `OP_MAC` adds the **sum of all lane products** (a dot product of the two registers) to the accumulator and returns the new value. `acc_clr` starts a new accumulation from zero instead of from the register.

## The multiplier tree

`dc_tree` is the core of the design. It has five node levels. Level 1 is a 16×16 square of
`mul2x2` cells. Cell `[i][j]` multiplies 2-bit slice *i* of `op_A` by slice *j*
of `op_B`. A node `[i][j]` of level *k* (k = 2…5) is a 2^k × 2^k-bit
multiplier. It takes four nodes of level k−1, which multiply the low (L) and high (H) halves of its operand parts, and adds them with three
two-input adders in two adder levels. Let h = 2^(k−1):

```
s0 = LL + (LH << h)          adder level 2k-3
s1 = HL + (HH << h)
p  = s0 + (s1 << h)          adder level 2k-2
```

One input of each adder is shifted before the addition. This is the
shift-and-add of long multiplication, applied recursively. Four node levels of two
adder levels each give eight adder levels between the 2×2 multipliers and the
32×32 product.

**SIMD lanes lie on the diagonal.** With N-bit lanes, the lane products are
exactly the diagonal nodes `[i][i]` of level log2(N). Every node off the diagonal
multiplies slices of two different lanes. Those nodes must contribute nothing, and the
shift control disables all their 2×2 multipliers, so they read zero.

**Above the lane width the adders add lanes instead of aligning them.** In a
node wider than the lane, LH and HL are zero, and the shift control clears that
level's shift enable. The node then outputs LL + HH, which is the sum of the lane products
below it. The root of the tree therefore delivers Σ A_i·B_i, the dot product, in
every SIMD mode. With `W32` the root is the 64-bit product. The accumulator
consumes this root value.

**Taps for packed products.** `lvl_o[k]` concatenates the diagonal nodes of
level k, node i at bits `[2^(k+1)·i +: 2^(k+1)]`. For 2^k-bit lanes this tap is
the packed vector of lane products. The output multiplexer picks the tap that
matches the width. Taps exist only after the second adder level of each node
level, because whole lane products only exist at those points.

Node widths never overflow. A level-k node's output is kept at 2^(k+1) bits. This is
enough both for a full product and for a sum of lane products, because (S/N)·(2^N−1)² < 2^(2S) for lane
width N ≤ node width S.

## Shift control and hardware gating

`shift_control` decodes `width` and `asym` into 256 multiplier enables and one
"sum lanes" bit per node level:

* multiplier `[i][j]` is on when `⌊2i/N⌋ = ⌊2j/N⌋`, that is, when both slices are in the same lane
* in asymmetric mode the multiplier must also have slice j in the lower half of its `op_B` lane
* level k sums lanes (shift off) when 2^k > N

A disabled `mul2x2` ANDs its operands with zero before its gates, which is
operand isolation. The array therefore does not toggle for lanes or half-lanes that are not
in use. The adders above the enabled multipliers see constant zeros on
the disabled side. The input registers also hold their contents while no
request arrives. In `OP_MUL` the levels above the lane width still form the
lane sum, and nothing separately gates them.

## Accumulator and timing

```
cycle      t               t+1                     t+2
req_valid  1 (request R)   1 (request R+1)
input regs                 R                       R+1
res_o                      result of R             result of R+1
acc reg                                            updated by R (if MAC)
```

A request is captured in the input registers at the edge that ends its cycle.
During the next cycle `res_valid_o` is high and `res_o` is the combinational result. For a MAC, the
accumulation register takes the new value at the end of that cycle. The
latency is one cycle and the throughput is one operation per cycle. Back-to-back MACs need
no forwarding or stall. `accumulator` computes Op_C + Σ, where Op_C is the
dedicated 64-bit register, or zero with `acc_clr`. The register wraps modulo 2^64 and
is cleared by the asynchronous active-low reset.

## Interface of `mp_mac`

| port          | dir | width        | meaning |
|---------------|-----|--------------|---------|
| `clk_i`       | in  | 1            | clock |
| `rst_ni`      | in  | 1            | asynchronous reset, active low |
| `req_valid_i` | in  | 1            | request present |
| `req_i`       | in  | `mac_req_t`  | `op`, `width`, `asym`, `acc_clr`, `a` (op_A), `b` (op_B) |
| `res_valid_o` | out | 1            | `res_o` holds the result of the request captured at the last edge |
| `res_o`       | out | 64           | packed lane products (`OP_MUL`) or new accumulator value (`OP_MAC`) |
| `acc_o`       | out | 64           | accumulation register |

## Files

| file | contents |
|------|----------|
| `rtl/mac_pkg.sv`       | widths, `width_e`, `op_e`, `mac_req_t` |
| `rtl/mul2x2.sv`        | 2×2 multiplier: AND gates, two half adders, operand isolation |
| `rtl/shift_adder.sv`   | two-input adder with a selectable pre-shift of one input |
| `rtl/dc_tree.sv`       | 256 multipliers and eight adder levels, with the diagonal taps |
| `rtl/shift_control.sv` | multiplier enables and per-level shift selection |
| `rtl/output_mux.sv`    | selects the lane-product tap or the MAC result |
| `rtl/accumulator.sv`   | Op_C register and accumulate adder |
| `rtl/mp_mac.sv`        | top: input registers plus the blocks above |

The design has 256 `mul2x2`, 85 tree nodes × 3 = 255 adders, 135 flip-flops (72-bit
request register, valid bit, 64-bit accumulator) and no memories.

The operand width is fixed at 32 bits. `XLEN` in `mac_pkg` is not a free
parameter, because the five width codes, the tap count and `sum_lvl` are sized for it.

## Simulation

Every testbench checks itself. Each one prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mac_pkg.sv tb/tb_mp_mac.sv \
          --top-module tb_mp_mac -o sim && obj_dir/sim
```

Replace `tb_mp_mac` with any testbench below.

| testbench | what it shows |
|-----------|---------------|
| `tb_mul2x2`          | all 16 operand pairs, enabled and disabled |
| `tb_shift_adder`     | random sums at both adder-level widths, with and without shift |
| `tb_dc_tree`         | full 64-bit products, every tap, dot products and lane products for each width, and the loss of exactly one partial product when one multiplier is disabled |
| `tb_shift_control`   | every enable and level bit recomputed from bit positions, and enabled-multiplier counts |
| `tb_output_mux`      | tap and MAC selection |
| `tb_accumulator`     | random accumulate / clear / hold sequences, and reset |
| `tb_mp_mac`          | the full unit at its only size. For each of the nine operand configurations, 1000 random loads as multiplications and 1000 as MACs, issued back to back with random idle cycles and clears. Asymmetric `op_B` lanes carry random upper halves. It checks results, the one-cycle latency, the accumulator after every MAC and the number of enabled multipliers, and it counts that each mechanism occurred |
| `tb_pointwise_conv`  | a 1×1 convolution slice with 8-bit activations and 4-bit weights, 16 → 96 channels over 64 pixels, as 8×4 asymmetric MACs. 98 304 MACs take 24 577 cycles, which is four MACs per cycle plus the one-cycle latency |

At 4 MACs per cycle in 8×4 mode, a network of about 300 M such MACs takes
about 75 M cycles.

## Design choices and limits

The overall structure follows a published description: 256 2×2 multipliers, two-input adders with one pre-shifted input, eight
adder levels, a shift control, an output multiplexer, an accumulator with a
dedicated Op_C register, operation in one cycle, and the operand table above. The following are this design's own
choices, made where that description stops:

* Unsigned lanes only. There is no signed or mixed-sign mode. Signed weights need an
  offset in software, or a change to the leaf cells and the tree.
* The narrow asymmetric operand is `op_B`, zero-extended in the lower half
  of each lane.
* A SIMD MAC is a dot product into one accumulator, not per-lane
  accumulation. It uses the tree's upper levels for the summation, with shifts switched off.
* The result and the accumulator are 64 bits wide. A processor that writes back 32 bits
  must select a half.
* "Capturing results at each level" is done with multiplexer taps, not
  pipeline registers, so that the operation stays in one cycle. The request/valid handshake and the input
  registers that hold their value while idle are also this design's own.
* Power is reduced by operand isolation only. There is no clock gating. The upper adder
  levels are not gated in `OP_MUL`.
* The area, power and energy figures of the published 28 nm implementation
  (about 9930 µm², 25 % lower dynamic power than a RI5CY-style SIMD
  multiplier) depend on a synthesis flow and library. The RTL cannot
  reproduce them.
