// Testbench of the shift-adder: random operands, with and without the shift,
// at the widths of the first and second adder levels of a 32-bit tree node.
module tb_shift_adder;
  logic        sh;
  logic [31:0] a1, b1;
  logic [48:0] s1;
  logic [48:0] a2, b2;
  logic [63:0] s2;
  int checks = 0, failures = 0;

  shift_adder #(.WA(32), .WB(32), .SHIFT(16), .WS(49)) u_l1 (
    .shift_en_i(sh), .a_i(a1), .b_i(b1), .sum_o(s1));
  shift_adder #(.WA(49), .WB(49), .SHIFT(16), .WS(64)) u_l2 (
    .shift_en_i(sh), .a_i(a2), .b_i(b2), .sum_o(s2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint unsigned ea, eb;
      sh = n[0];
      a1 = $urandom();
      b1 = $urandom();
      a2 = 49'({$urandom(), $urandom()} >> 15);
      b2 = 49'({$urandom(), $urandom()} >> 16);  // keeps the level-2 sum in 64 bits
      if (n == 0) begin a1 = '1; b1 = '1; end  // largest level-1 sum
      #1;
      ea = longint'(a1) + (sh ? (longint'(b1) << 16) : longint'(b1));
      eb = longint'(a2) + (sh ? (longint'(b2) << 16) : longint'(b2));
      checks += 2;
      if (s1 !== 49'(ea)) begin failures++; $display("FAIL l1 %h %h sh=%0d: %h", a1, b1, sh, s1); end
      if (s2 !== eb)      begin failures++; $display("FAIL l2 %h %h sh=%0d: %h", a2, b2, sh, s2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
