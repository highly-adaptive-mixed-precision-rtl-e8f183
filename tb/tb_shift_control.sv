// Testbench of the shift control. For every width and asymmetric setting it
// recomputes each multiplier enable from bit positions: multiplier [i][j]
// must be on exactly when op_A bits 2i..2i+1 and op_B bits 2j..2j+1 belong
// to the same lane and, for asymmetric operands, op_B's bits lie in the
// lower half of their lane. It also checks the number of enabled
// multipliers and which tree levels sum lanes instead of building products.
module tb_shift_control;
  import mac_pkg::*;
  width_e     w;
  logic       asym;
  logic [15:0][15:0] en;
  logic [5:0] sum_lvl;
  int checks = 0, failures = 0;

  shift_control dut (.width_i(w), .asym_i(asym), .mul_en_o(en), .sum_lvl_o(sum_lvl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) begin
      for (int s = 0; s < 2; s++) begin
        automatic int n = 2 << k;   // lane bits
        automatic int cnt;
        w    = width_e'(k);
        asym = s[0];
        #1;
        for (int i = 0; i < 16; i++) begin
          for (int j = 0; j < 16; j++) begin
            automatic int abit = 2 * i, bbit = 2 * j;
            automatic bit exp = (abit / n == bbit / n);
            if (s == 1 && n > 2 && (bbit % n) >= n / 2) exp = 0;
            checks++;
            if (en[i][j] !== exp) begin
              failures++;
              $display("FAIL w=%0d asym=%0d en[%0d][%0d]=%0d", n, s, i, j, en[i][j]);
            end
          end
        end
        cnt = (32 / n) * (n / 2) * (n / 2);
        if (s == 1 && n > 2) cnt /= 2;
        checks++;
        if ($countones(en) != cnt) begin failures++; $display("FAIL count w=%0d", n); end
        for (int l = 2; l <= 5; l++) begin
          checks++;
          if (sum_lvl[l] !== ((1 << l) > n)) begin
            failures++;
            $display("FAIL sum_lvl[%0d] w=%0d", l, n);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
