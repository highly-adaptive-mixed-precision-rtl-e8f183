// Exhaustive testbench of the 2x2 multiplier: all 16 operand pairs with the
// enable high must give the integer product, and with the enable low must
// give zero.
module tb_mul2x2;
  logic       en;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  mul2x2 dut (.en_i(en), .a_i(a), .b_i(b), .p_o(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) begin
          en = e[0];
          a  = 2'(i);
          b  = 2'(j);
          #1;
          checks++;
          if (p !== 4'(e * i * j)) begin
            failures++;
            $display("FAIL en=%0d %0d*%0d: got %0d", e, i, j, p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
