// Workload testbench: a slice of a quantized pointwise (1x1) convolution
// layer with 8-bit activations and 4-bit weights, run as 8x4 asymmetric MACs.
//
// The layer shape follows the first expansion layer of MobileNet V2 (16
// input channels, 96 output channels) on an 8x8 pixel tile. Each output is a
// dot product over the 16 input channels: four activations are packed in
// op_A (8-bit lanes) and four weights in op_B (the lower 4 bits of each
// 8-bit lane; the upper 4 bits are filled with random values the unit must
// ignore), so an output takes 16/4 = 4 back-to-back MAC cycles, the first
// with the accumulator clear. Activations and weights are unsigned, as the
// unit's lanes are. The testbench checks every output against a reference
// computed with integer arithmetic, and that the whole tile takes exactly
// one cycle per MAC request plus the one-cycle result latency.
module tb_pointwise_conv;
  import mac_pkg::*;

  localparam int CIN = 16, COUT = 96, PIX = 64, LANES = 4;
  localparam longint NCYC = longint'(PIX * COUT * CIN / LANES);   // MAC requests

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            req_valid;
  mac_req_t        req;
  logic            res_valid;
  logic [RLEN-1:0] res, acc;
  int checks = 0, failures = 0;

  mp_mac dut (.clk_i(clk), .rst_ni(rst_n), .req_valid_i(req_valid), .req_i(req),
              .res_valid_o(res_valid), .res_o(res), .acc_o(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (PIX * COUT * CIN / LANES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned act [PIX][CIN];
  byte unsigned wgt [COUT][CIN];   // 4-bit values
  longint       cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    longint start;
    for (int p = 0; p < PIX; p++)
      for (int c = 0; c < CIN; c++) act[p][c] = 8'($urandom());
    for (int o = 0; o < COUT; o++)
      for (int c = 0; c < CIN; c++) wgt[o][c] = 8'($urandom_range(0, 15));
    req_valid = 1'b0;
    req       = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = cycles;
    for (int p = 0; p < PIX; p++) begin
      for (int o = 0; o < COUT; o++) begin
        automatic longint unsigned expected = 0;
        for (int c = 0; c < CIN; c++) expected += act[p][c] * wgt[o][c];
        for (int g = 0; g < CIN / LANES; g++) begin
          req_valid   = 1'b1;
          req.op      = OP_MAC;
          req.width   = W8;
          req.asym    = 1'b1;
          req.acc_clr = (g == 0);
          for (int l = 0; l < LANES; l++) begin
            req.a[8*l +: 8] = act[p][LANES*g + l];
            req.b[8*l +: 8] = {4'($urandom()), wgt[o][LANES*g + l][3:0]};
          end
          @(negedge clk);
        end
        // the last MAC of this output was captured at the previous edge
        checks++;
        if (!res_valid || res !== expected) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d channel %0d: got %0d expected %0d", p, o, res, expected);
        end
      end
    end
    req_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (cycles - start != NCYC + 1) begin
      failures++;
      $display("FAIL cycle count %0d", cycles - start);
    end
    $display("%0d MACs in %0d cycles", PIX * COUT * CIN, cycles - start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
