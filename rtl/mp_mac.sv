// Mixed-precision multiply-accumulate unit for a 32-bit processor.
//
// One request multiplies the 32-bit registers op_A and op_B as 1, 2, 4, 8 or
// 16 packed unsigned lanes (32, 16, 8, 4 or 2 bits), optionally with op_B
// lanes holding half-width operands (32x16, 16x8, 8x4, 4x2). The product is
// computed by a divide-and-conquer tree of 256 2x2 multipliers and eight
// levels of shift-adders; the shift control enables only the multipliers the
// operand widths need and decides, per tree level, whether the adders build a
// product or sum lane products. OP_MUL returns every lane product, packed;
// OP_MAC adds the sum of the lane products to the accumulation register
// (Op_C) and returns the new value.
//
// Timing: a request presented with req_valid_i is captured in the 32-bit
// input registers at the clock edge. During the next cycle the result is on
// res_o with res_valid_o high, and at the end of that cycle the accumulator
// register is updated, so one operation completes per clock cycle and
// back-to-back MACs accumulate without a stall. acc_o shows the register.
// The input registers hold their value while no request arrives, so the
// multiplier array does not toggle when idle.
//
// The block structure, the one-cycle operation and the operand formats
// follow the published architecture; the request/valid handshake, the
// result format and unsigned-only arithmetic are this design's choices.
module mp_mac
  import mac_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            req_valid_i,
  input  mac_req_t        req_i,
  output logic            res_valid_o,
  output logic [RLEN-1:0] res_o,
  output logic [RLEN-1:0] acc_o
);

  mac_req_t req_q;
  logic     valid_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      req_q   <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= req_valid_i;
      if (req_valid_i) req_q <= req_i;
    end
  end

  logic [NSLICE-1:0][NSLICE-1:0] mul_en;
  logic [5:0]                    sum_lvl;
  logic [RLEN-1:0]               tree_p;
  logic [RLEN-1:0]               lvl [1:5];
  logic [RLEN-1:0]               mac_sum;

  shift_control u_shift_control (
    .width_i   (req_q.width),
    .asym_i    (req_q.asym),
    .mul_en_o  (mul_en),
    .sum_lvl_o (sum_lvl)
  );

  dc_tree u_tree (
    .a_i       (req_q.a),
    .b_i       (req_q.b),
    .mul_en_i  (mul_en),
    .sum_lvl_i (sum_lvl),
    .p_o       (tree_p),
    .lvl_o     (lvl)
  );

  accumulator u_acc (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .en_i   (valid_q && (req_q.op == OP_MAC)),
    .clr_i  (req_q.acc_clr),
    .in_i   (tree_p),
    .sum_o  (mac_sum),
    .acc_o  (acc_o)
  );

  output_mux u_out (
    .op_i    (req_q.op),
    .width_i (req_q.width),
    .lvl_i   (lvl),
    .mac_i   (mac_sum),
    .res_o   (res_o)
  );

  assign res_valid_o = valid_q;

endmodule
