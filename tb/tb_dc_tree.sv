// Testbench of the divide-and-conquer multiplier tree, driven directly.
// Full mode (all 256 multipliers on, no level summing): the root must be the
// 64-bit product a*b and every tap lvl_o[k] the packed products of the
// matching 2^k-bit slices of a and b. Lane mode, for each lane width: only
// same-lane multipliers are enabled and the levels above the lane sum; the
// root must be the dot product of the lanes and the lane-width tap the packed
// lane products. Finally one single multiplier is disabled in full mode, and
// the product must lose exactly its partial product.
module tb_dc_tree;
  import mac_pkg::*;
  logic [31:0]       a, b;
  logic [15:0][15:0] en;
  logic [5:0]        sum_lvl;
  logic [63:0]       p;
  logic [63:0]       lvl [1:5];
  int checks = 0, failures = 0;

  dc_tree dut (.a_i(a), .b_i(b), .mul_en_i(en), .sum_lvl_i(sum_lvl), .p_o(p), .lvl_o(lvl));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned chunk(logic [31:0] v, int n, int i);
    return longint'((64'(v) >> (n * i)) & ((64'd1 << n) - 1));
  endfunction

  function automatic logic [63:0] packed_prod(logic [31:0] x, logic [31:0] y, int n);
    logic [63:0] r = '0;
    for (int i = 0; i < 32 / n; i++) r |= (chunk(x, n, i) * chunk(y, n, i)) << (2 * n * i);
    return r;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h (a=%h b=%h)", what, got, exp, a, b);
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      a = $urandom();
      b = $urandom();
      if (n == 0) begin a = '1; b = '1; end
      // full mode
      en      = '1;
      sum_lvl = '0;
      #1;
      check("full product", p, longint'(a) * longint'(b));
      for (int k = 1; k <= 5; k++) check($sformatf("full tap %0d", k), lvl[k], packed_prod(a, b, 1 << k));
      // lane mode
      for (int k = 1; k <= 5; k++) begin
        automatic logic [63:0] dot = 0;
        automatic int nb = 1 << k;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) en[i][j] = ((2 * i) / nb == (2 * j) / nb);
        for (int l = 0; l < 6; l++) sum_lvl[l] = ((1 << l) > nb);
        #1;
        for (int i = 0; i < 32 / nb; i++) dot += chunk(a, nb, i) * chunk(b, nb, i);
        check($sformatf("dot %0d-bit", nb), p, dot);
        check($sformatf("lanes %0d-bit", nb), lvl[k], packed_prod(a, b, nb));
      end
      // one multiplier off
      begin
        automatic int i = $urandom_range(0, 15), j = $urandom_range(0, 15);
        en      = '1;
        sum_lvl = '0;
        en[i][j] = 1'b0;
        #1;
        check("one disabled", p, longint'(a) * longint'(b) -
              ((chunk(a, 2, i) * chunk(b, 2, j)) << (2 * (i + j))));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
