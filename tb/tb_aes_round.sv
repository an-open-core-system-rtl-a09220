// Testbench for aes_round: random states and round keys against the
// reference round, with and without MixColumns, plus the first round of
// FIPS-197 appendix B.
module tb_aes_round;
  import aes_ref_pkg::*;

  logic [127:0] state_i, rk, state_o;
  logic final_round;
  int checks = 0, failures = 0;

  aes_round dut (.state_i, .rk, .final_round, .state_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 appendix B: start of round 1 and round key 1
    state_i = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk      = 128'ha0fafe1788542cb123a339392a6c7605;
    final_round = 0;
    #1;
    checks++;
    if (state_o !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin
      failures++; $display("FAIL FIPS round 1: %h", state_o);
    end
    for (int i = 0; i < 200; i++) begin
      state_i = {$urandom, $urandom, $urandom, $urandom};
      rk      = {$urandom, $urandom, $urandom, $urandom};
      final_round = i[0];
      #1;
      checks++;
      if (state_o !== ref_round(state_i, rk, final_round)) begin
        failures++; $display("FAIL round final=%0b in=%h", final_round, state_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
