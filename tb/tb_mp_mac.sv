// End-to-end testbench of the mixed-precision MAC unit at its default size.
//
// It runs the evaluation the unit was designed for: for each of the nine
// operand configurations (32x32, 32x16, 16x16, 16x8, 8x8, 8x4, 4x4, 4x2,
// 2x2) the input registers are loaded LOADS times with random values, once
// as SIMD multiplications and once as MACs. Requests are issued back to
// back, with random idle cycles and random accumulator clears mixed in. A
// reference model computes every lane product from the operands with plain
// integer arithmetic; asymmetric requests carry random garbage in the unused
// upper half of each op_B lane, which the unit must ignore.
// Checked: res_o one cycle after each request (the one-cycle latency),
// res_valid_o, the accumulator register after every MAC, and that exactly
// lanes x (lane/2)^2 multipliers (half of that for asymmetric operands) are
// enabled. Every mechanism (each configuration in both operations, clears,
// back-to-back MACs, idle cycles) is counted and must have happened.
module tb_mp_mac;
  import mac_pkg::*;

  localparam int unsigned LOADS = 1000;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            req_valid;
  mac_req_t        req;
  logic            res_valid;
  logic [RLEN-1:0] res, acc;

  int checks = 0, failures = 0;

  mp_mac dut (
    .clk_i       (clk),
    .rst_ni      (rst_n),
    .req_valid_i (req_valid),
    .req_i       (req),
    .res_valid_o (res_valid),
    .res_o       (res),
    .acc_o       (acc)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40 * LOADS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----------------------------------------------------
  function automatic int unsigned nbits(int unsigned w);
    return 2 << w;
  endfunction

  // Product of lane i, op_B narrowed to its lower half when asymmetric.
  function automatic longint unsigned lane_prod(logic [31:0] a, logic [31:0] b,
                                                int unsigned w, bit asym, int unsigned i);
    int unsigned n = nbits(w);
    longint unsigned la = 0, lb = 0;
    for (int unsigned t = 0; t < n; t++) begin
      la[t] = a[n*i + t];
      if (!(asym && w > 0 && t >= n/2)) lb[t] = b[n*i + t];
    end
    return la * lb;
  endfunction

  function automatic logic [63:0] ref_mul(logic [31:0] a, logic [31:0] b, int unsigned w, bit asym);
    logic [63:0] r = '0;
    int unsigned n = nbits(w);
    for (int unsigned i = 0; i < 32 / n; i++) begin
      longint unsigned p = lane_prod(a, b, w, asym, i);
      for (int unsigned t = 0; t < 2*n; t++) r[2*n*i + t] = p[t];
    end
    return r;
  endfunction

  function automatic logic [63:0] ref_dot(logic [31:0] a, logic [31:0] b, int unsigned w, bit asym);
    logic [63:0] s = '0;
    for (int unsigned i = 0; i < 32 / nbits(w); i++) s += lane_prod(a, b, w, asym, i);
    return s;
  endfunction

  // ---- stimulus and checking ---------------------------------------------
  logic [63:0] acc_model = '0;
  int          seen [2][5][2];   // [op][width][asym]
  int          n_clr = 0, n_b2b = 0, n_idle = 0;
  bit          last_mac = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_one(op_e op, int unsigned w, bit asym);
    logic [63:0] exp;
    int unsigned n = nbits(w);
    int unsigned exp_en;
    @(negedge clk);
    req_valid   = 1'b1;
    req.op      = op;
    req.width   = width_e'(w);
    req.asym    = asym;
    req.acc_clr = ($urandom_range(0, 15) == 0);
    req.a       = $urandom();
    req.b       = $urandom();
    @(posedge clk);
    #1;
    req_valid = 1'b0;
    check("valid", 64'(res_valid), 64'd1);
    // the previous MAC wrote the register at this same edge
    check("accumulator", acc, acc_model);
    if (op == OP_MUL) begin
      exp = ref_mul(req.a, req.b, w, asym);
      last_mac = 0;
    end else begin
      if (last_mac) n_b2b++;
      if (req.acc_clr) begin
        acc_model = '0;
        n_clr++;
      end
      acc_model += ref_dot(req.a, req.b, w, asym);
      exp = acc_model;
      last_mac = 1;
    end
    check($sformatf("res op=%0d w=%0d asym=%0d", op, n, asym), res, exp);
    exp_en = (32 / n) * (n / 2) * (n / 2);
    if (asym && w > 0) exp_en /= 2;
    check("enabled multipliers", 64'($countones(dut.u_shift_control.mul_en_o)), 64'(exp_en));
    seen[op][w][asym]++;
  endtask

  initial begin
    req_valid = 1'b0;
    req       = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    check("reset acc", acc, 64'd0);
    check("reset valid", 64'(res_valid), 64'd0);
    for (int op = 0; op < 2; op++) begin
      for (int w = 4; w >= 0; w--) begin
        for (int asym = 0; asym < 2; asym++) begin
          if (asym != 0 && w == 0) continue;
          for (int l = 0; l < LOADS; l++) begin
            // consecutive calls issue back to back; insert an idle
            // cycle now and then
            if ($urandom_range(0, 7) == 0) begin
              @(negedge clk);
              req_valid = 1'b0;
              @(posedge clk);
              #1;
              check("idle valid", 64'(res_valid), 64'd0);
              n_idle++;
              last_mac = 0;
            end
            run_one(op_e'(op), w, asym[0]);
          end
        end
      end
    end

    @(posedge clk);
    #1;
    check("final accumulator", acc, acc_model);

    // every mechanism must have happened
    for (int op = 0; op < 2; op++)
      for (int w = 0; w < 5; w++)
        for (int asym = 0; asym < 2; asym++) begin
          if (asym != 0 && w == 0) continue;
          checks++;
          if (seen[op][w][asym] == 0) begin
            failures++;
            $display("FAIL: op %0d width %0d asym %0d never ran", op, w, asym);
          end
        end
    checks += 3;
    if (n_clr == 0)  begin failures++; $display("FAIL: no accumulator clear"); end
    if (n_b2b == 0)  begin failures++; $display("FAIL: no back-to-back MAC"); end
    if (n_idle == 0) begin failures++; $display("FAIL: no idle cycle"); end
    $display("ran: %0d clears, %0d back-to-back MACs, %0d idle cycles", n_clr, n_b2b, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
