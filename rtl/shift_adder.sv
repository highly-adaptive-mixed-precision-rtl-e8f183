// Two-input adder with its second input pre-shifted, the adder cell of the
// divide-and-conquer multiplier tree.
//
// sum_o = a_i + (b_i << SHIFT) when shift_en_i is high, a_i + b_i otherwise.
// Shifting one input in front of the adder is how partial products of
// different weights are aligned; the shift control clears shift_en_i in the
// tree levels that sit above the lane width, where the adders sum lane
// products of equal weight instead of building one product. The output is
// wide enough that no carry is lost. Purely combinational.
//
// The pre-shifted input follows the published architecture; making the
// shift selectable is this design's way of letting one tree serve both
// products and lane sums.
module shift_adder #(
  parameter int unsigned WA    = 8,   // width of a_i
  parameter int unsigned WB    = 8,   // width of b_i
  parameter int unsigned SHIFT = 4,   // shift applied to b_i when enabled
  parameter int unsigned WS    = ((WA > WB + SHIFT) ? WA : WB + SHIFT) + 1
) (
  input  logic          shift_en_i,
  input  logic [WA-1:0] a_i,
  input  logic [WB-1:0] b_i,
  output logic [WS-1:0] sum_o
);

  logic [WS-1:0] b_al;   // b_i aligned to its weight

  always_comb begin
    b_al = WS'(b_i);
    if (shift_en_i) b_al = b_al << SHIFT;
    sum_o = WS'(a_i) + b_al;
  end

endmodule
