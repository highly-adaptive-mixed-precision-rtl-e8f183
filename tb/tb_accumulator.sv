// Testbench of the accumulator: random sequences of accumulate, clear and
// hold cycles against a model register; sum_o is checked in the cycle, the
// register after the edge, and reset must clear it.
module tb_accumulator;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        en, clr;
  logic [63:0] in, sum, acc;
  logic [63:0] model = '0;
  int checks = 0, failures = 0;
  int n_en = 0, n_clr = 0, n_hold = 0;

  accumulator dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .clr_i(clr),
                   .in_i(in), .sum_o(sum), .acc_o(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      logic [63:0] exp_sum;
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 9) == 0);
      in  = {$urandom(), $urandom()};
      #1;
      exp_sum = (clr ? 64'd0 : model) + in;
      checks++;
      if (sum !== exp_sum) begin failures++; $display("FAIL sum %h vs %h", sum, exp_sum); end
      if (en) begin model = exp_sum; n_en++; if (clr) n_clr++; end
      else n_hold++;
      @(posedge clk);
      #1;
      checks++;
      if (acc !== model) begin failures++; $display("FAIL acc %h vs %h", acc, model); end
    end
    checks++;
    if (n_en == 0 || n_clr == 0 || n_hold == 0) failures++;
    rst_n = 1'b0;
    #1;
    checks++;
    if (acc !== 64'd0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
