// Divide-and-conquer multiplier tree: a 32-bit x 32-bit multiplier built
// from 256 2x2 multipliers and eight levels of two-input shift-adders.
//
// Level 1 is the square of 2x2 multipliers: node [i][j] multiplies the 2-bit
// slice i of op_A by slice j of op_B. Level k (k = 2..5) holds nodes of
// 2^k x 2^k bits; node [i][j] combines four nodes of level k-1, the low (L)
// and high (H) halves of its op_A and op_B parts, with two adder levels:
//   s0 = LL + (LH << 2^(k-1))
//   s1 = HL + (HH << 2^(k-1))
//   p  = s0 + (s1 << 2^(k-1))
// which is the full product. Four node levels of two adder levels each make
// the eight adder levels of the 32-bit tree.
//
// SIMD operation: when the lanes are narrower than a node, the shift control
// has disabled the multipliers of the cross terms LH and HL (their op_A and
// op_B slices lie in different lanes, so they read zero) and clears the
// level's shift enable. The node then outputs LL + HH, the sum of the lane
// products below it; at the root this is the sum of all lane products, the
// dot product a MAC needs.
//
// lvl_o[k] carries the products of the diagonal nodes [i][i] of level k,
// concatenated (node i at bits [2^(k+1)*i +: 2^(k+1)]); with lanes of 2^k
// bits these are exactly the packed SIMD lane products. These taps are what
// the output multiplexer selects from; p_o is the root. Combinational.
//
// The multiplier count, the 2-input pre-shifted adders and the eight adder
// levels follow the published architecture; the pairing of the inputs, the
// lane summing above the lane width and the position of the taps are this
// design's choices.
module dc_tree
  import mac_pkg::*;
(
  input  logic [XLEN-1:0]                 a_i,
  input  logic [XLEN-1:0]                 b_i,
  input  logic [NSLICE-1:0][NSLICE-1:0]   mul_en_i,   // [op_A slice][op_B slice]
  input  logic [5:0]                      sum_lvl_i,  // bit k: level k sums lanes
  output logic [RLEN-1:0]                 p_o,
  output logic [RLEN-1:0]                 lvl_o [1:5]
);

  localparam int unsigned NLVL = $clog2(XLEN);   // 5 node levels

  for (genvar k = 1; k <= NLVL; k++) begin : g_lvl
    localparam int unsigned S  = 1 << k;          // node operand width
    localparam int unsigned N  = XLEN / S;        // nodes per row / column
    logic [2*S-1:0] p [N][N];

    if (k == 1) begin : g_mul
      for (genvar i = 0; i < N; i++) begin : g_i
        for (genvar j = 0; j < N; j++) begin : g_j
          mul2x2 u_mul (
            .en_i (mul_en_i[i][j]),
            .a_i  (a_i[2*i +: 2]),
            .b_i  (b_i[2*j +: 2]),
            .p_o  (p[i][j])
          );
        end
      end
    end else begin : g_add
      localparam int unsigned H  = S / 2;
      localparam int unsigned WS = S + H + 1;     // first adder level width
      for (genvar i = 0; i < N; i++) begin : g_i
        for (genvar j = 0; j < N; j++) begin : g_j
          logic [WS-1:0] s0, s1;
          // adder level 2k-3
          shift_adder #(.WA(S), .WB(S), .SHIFT(H), .WS(WS)) u_add_s0 (
            .shift_en_i (~sum_lvl_i[k]),
            .a_i        (g_lvl[k-1].p[2*i][2*j]),
            .b_i        (g_lvl[k-1].p[2*i][2*j+1]),
            .sum_o      (s0));
          shift_adder #(.WA(S), .WB(S), .SHIFT(H), .WS(WS)) u_add_s1 (
            .shift_en_i (~sum_lvl_i[k]),
            .a_i        (g_lvl[k-1].p[2*i+1][2*j]),
            .b_i        (g_lvl[k-1].p[2*i+1][2*j+1]),
            .sum_o      (s1));
          // adder level 2k-2; the node result never needs more than 2S bits
          shift_adder #(.WA(WS), .WB(WS), .SHIFT(H), .WS(2*S)) u_add_p (
            .shift_en_i (~sum_lvl_i[k]),
            .a_i        (s0),
            .b_i        (s1),
            .sum_o      (p[i][j]));
        end
      end
    end

    // diagonal taps: the packed lane products for 2^k-bit lanes
    for (genvar i = 0; i < N; i++) begin : g_tap
      assign lvl_o[k][2*S*i +: 2*S] = p[i][i];
    end
  end

  assign p_o = g_lvl[NLVL].p[0][0];

  // Bits 0 and 1 of sum_lvl_i would belong to levels without adders.
  logic unused;
  assign unused = ^sum_lvl_i[1:0];

endmodule
