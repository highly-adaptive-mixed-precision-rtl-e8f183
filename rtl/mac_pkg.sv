// Shared types and constants of the mixed-precision MAC unit.
//
// The unit multiplies two 32-bit registers, op_A and op_B, that hold 1, 2,
// 4, 8 or 16 packed unsigned lanes of 32, 16, 8, 4 or 2 bits. The lane width
// is coded as its base-2 logarithm minus one (width_e), so that a lane of
// width code k is 2^k two-bit slices wide. In asymmetric mode the op_B lanes
// carry an operand of half the lane width, zero-extended in the lower half
// of each lane (32x16, 16x8, 8x4, 4x2). The operation is either a plain SIMD
// multiplication (every lane product returned, packed) or a MAC (the sum of
// all lane products added to the accumulator).
//
// The lane widths and asymmetric pairs follow the published operand table;
// the codes, the request struct and the op_B placement are this design's.
package mac_pkg;

  localparam int unsigned XLEN    = 32;            // operand register width
  localparam int unsigned RLEN    = 2 * XLEN;      // product / accumulator width
  localparam int unsigned NSLICE  = XLEN / 2;      // 2-bit slices per operand

  // Lane width of op_A (and of op_B unless asymmetric).
  typedef enum logic [2:0] {
    W2  = 3'd0,
    W4  = 3'd1,
    W8  = 3'd2,
    W16 = 3'd3,
    W32 = 3'd4
  } width_e;

  typedef enum logic [0:0] {
    OP_MUL = 1'b0,   // packed lane products
    OP_MAC = 1'b1    // accumulator + sum of lane products
  } op_e;

  // One request to the unit.
  typedef struct packed {
    op_e        op;
    width_e     width;
    logic       asym;     // op_B lanes hold half-width operands
    logic       acc_clr;  // MAC only: take Op_C = 0 instead of the register
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
  } mac_req_t;

  // Lane width in bits for a width code.
  function automatic int unsigned lane_bits(width_e w);
    return 2 << w;
  endfunction

endpackage
