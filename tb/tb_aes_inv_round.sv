// Testbench for aes_inv_round: random states and round keys against the
// reference inverse round, with and without InvMixColumns, and a check that
// the inverse round undoes a forward round (last-round form, key zero).
module tb_aes_inv_round;
  import aes_ref_pkg::*;

  logic [127:0] state_i, rk, state_o, x;
  logic final_round;
  int checks = 0, failures = 0;

  aes_inv_round dut (.state_i, .rk, .final_round, .state_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      state_i = {$urandom, $urandom, $urandom, $urandom};
      rk      = {$urandom, $urandom, $urandom, $urandom};
      final_round = i[0];
      #1;
      checks++;
      if (state_o !== ref_inv_round(state_i, rk, final_round)) begin
        failures++; $display("FAIL inv round final=%0b in=%h", final_round, state_i);
      end
    end
    for (int i = 0; i < 50; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      state_i = ref_round(x, '0, 1'b1);
      rk = '0;
      final_round = 1;
      #1;
      checks++;
      if (state_o !== x) begin failures++; $display("FAIL undo of final round %h", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
