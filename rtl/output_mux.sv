// Output multiplexer of the mixed-precision MAC unit.
//
// For a multiplication it returns the packed lane products, taken from the
// tree level whose nodes are one lane wide (lane i of 2N-bit products at bits
// [2N*i +: 2N] for N-bit lanes: 32 x 4-bit products for 2-bit lanes down to
// one 64-bit product for 32-bit operands). For a MAC it returns the
// accumulator output. Purely combinational.
//
// An output multiplexer fed from the tree levels is part of the published
// architecture; the packed result format and its 64-bit width are this
// design's choices.
module output_mux
  import mac_pkg::*;
(
  input  op_e              op_i,
  input  width_e           width_i,
  input  logic [RLEN-1:0]  lvl_i [1:5],   // tree taps, lvl_i[k] for 2^k-bit lanes
  input  logic [RLEN-1:0]  mac_i,         // accumulator result
  output logic [RLEN-1:0]  res_o
);

  always_comb begin
    if (op_i == OP_MAC) begin
      res_o = mac_i;
    end else begin
      unique case (width_i)
        W2:      res_o = lvl_i[1];
        W4:      res_o = lvl_i[2];
        W8:      res_o = lvl_i[3];
        W16:     res_o = lvl_i[4];
        default: res_o = lvl_i[5];
      endcase
    end
  end

endmodule
