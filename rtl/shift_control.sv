// Shift control of the mixed-precision MAC unit: turns the operand width and
// the asymmetric flag into the enables of the 256 2x2 multipliers and the
// shift enables of the adder levels.
//
// With lanes of 2^(w+1) bits (width code w), a lane is 2^w two-bit slices.
// Multiplier [i][j] (op_A slice i, op_B slice j) is enabled only when both
// slices lie in the same lane, so cross-lane partial products never switch.
// In asymmetric mode the op_B operand fills only the lower half of each
// lane, and the multipliers reading the upper (zero) half are disabled too:
// a 8x4 operation runs on half the multipliers of an 8x8 one. Asymmetric
// mode is ignored for 2-bit lanes, which have no narrower partner.
// Tree nodes of 2^k bits build products while 2^k is no wider than a lane and
// sum lane products (shift disabled) above it: sum_lvl_o[k] = (2^k > lane).
// Purely combinational.
//
// That the unit enables only the hardware an operation needs is the
// published idea; the enable rule, the placement of the narrow operand in
// op_B and the per-level summing select are this design's choices.
module shift_control
  import mac_pkg::*;
(
  input  width_e                          width_i,
  input  logic                            asym_i,
  output logic [NSLICE-1:0][NSLICE-1:0]   mul_en_o,   // [op_A slice][op_B slice]
  output logic [5:0]                      sum_lvl_o
);

  int unsigned w;     // width code, invalid codes read as 32-bit lanes
  int unsigned lane;  // lane width in slices

  always_comb begin
    w    = (width_i > W32) ? int'(W32) : int'(width_i);
    lane = 1 << w;
    for (int unsigned i = 0; i < NSLICE; i++) begin
      for (int unsigned j = 0; j < NSLICE; j++) begin
        mul_en_o[i][j] = ((i >> w) == (j >> w)) &&
                         !(asym_i && (w > 0) && ((j % lane) >= lane / 2));
      end
    end
    for (int unsigned k = 0; k < 6; k++) begin
      sum_lvl_o[k] = (k > w + 1);
    end
  end

endmodule
