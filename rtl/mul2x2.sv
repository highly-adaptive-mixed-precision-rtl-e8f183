// 2-bit x 2-bit unsigned multiplier, the leaf cell of the divide-and-conquer
// multiplier (256 of them make a 32x32 product).
//
// The four bit products are AND gates; the two middle ones meet in a half
// adder and its carry joins the top bit product in a second half adder, the
// gate-level 2x2 multiplier of a textbook array multiplier. The enable is
// this design's operand isolation: when en_i is low both operands are forced
// to zero before the gates, so the product is zero and a multiplier that the
// current operand widths do not need does not toggle. Purely combinational.
module mul2x2 (
  input  logic       en_i,
  input  logic [1:0] a_i,
  input  logic [1:0] b_i,
  output logic [3:0] p_o
);

  logic [1:0] a, b;
  logic       pp00, pp01, pp10, pp11;  // bit products a[i] & b[j]
  logic       c1;                      // carry of the middle half adder

  assign a = a_i & {2{en_i}};
  assign b = b_i & {2{en_i}};

  assign pp00 = a[0] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp10 = a[1] & b[0];
  assign pp11 = a[1] & b[1];

  assign p_o[0] = pp00;
  assign p_o[1] = pp10 ^ pp01;
  assign c1     = pp10 & pp01;
  assign p_o[2] = pp11 ^ c1;
  assign p_o[3] = pp11 & c1;

endmodule
