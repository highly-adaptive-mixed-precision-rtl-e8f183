// Accumulator of the mixed-precision MAC unit.
//
// sum_o = Op_C + in_i, where Op_C is the dedicated accumulation register, or
// zero when clr_i starts a new accumulation. On a clock edge with en_i high
// the register takes sum_o, so a MAC issued every cycle accumulates without
// a stall. The register is 64 bits wide, as wide as a 32x32 product, and
// wraps modulo 2^64. Reset is asynchronous, active low, and clears it.
//
// The dedicated register feeding Op_C back follows the published
// architecture; its width, the clear input, the reset and the dot-product
// use of SIMD MACs are this design's choices.
module accumulator
  import mac_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             en_i,    // accumulate this cycle
  input  logic             clr_i,   // use Op_C = 0
  input  logic [RLEN-1:0]  in_i,    // sum of lane products
  output logic [RLEN-1:0]  sum_o,   // Op_C + in_i, this cycle
  output logic [RLEN-1:0]  acc_o    // register contents (Op_C)
);

  logic [RLEN-1:0] acc_q;
  logic [RLEN-1:0] op_c;

  assign op_c  = clr_i ? '0 : acc_q;
  assign sum_o = op_c + in_i;
  assign acc_o = acc_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   acc_q <= '0;
    else if (en_i) acc_q <= sum_o;
  end

endmodule
