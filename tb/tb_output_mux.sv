// Testbench of the output multiplexer: with distinct random values on every
// tree tap and on the MAC input, each width must select its own tap for a
// multiplication and every width must select the MAC input for a MAC.
module tb_output_mux;
  import mac_pkg::*;
  op_e         op;
  width_e      w;
  logic [63:0] lvl [1:5];
  logic [63:0] mac, res;
  int checks = 0, failures = 0;

  output_mux dut (.op_i(op), .width_i(w), .lvl_i(lvl), .mac_i(mac), .res_o(res));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 1; k <= 5; k++) lvl[k] = {$urandom(), $urandom()};
      mac = {$urandom(), $urandom()};
      for (int o = 0; o < 2; o++) begin
        for (int k = 0; k < 5; k++) begin
          op = op_e'(o);
          w  = width_e'(k);
          #1;
          checks++;
          if (res !== (o == 1 ? mac : lvl[k+1])) begin
            failures++;
            $display("FAIL op=%0d w=%0d: %h", o, k, res);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
