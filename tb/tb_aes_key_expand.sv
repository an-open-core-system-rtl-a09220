// Testbench for aes_key_expand: every round key of random keys against the
// reference schedule, plus the FIPS-197 appendix A.1 last round key; also
// checks that the key holds while STEP is low.  192- and 256-bit key
// instances are stepped through all their round keys the same way.
module tb_aes_key_expand;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [127:0] key = '0, rk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_key_expand dut (.clk, .rst_n, .load, .key, .step, .rk);

  logic [191:0] key192 = '0;
  logic [255:0] key256 = '0;
  logic [127:0] rk192, rk256;
  aes_key_expand #(.KEY_BITS(192)) dut192 (.clk, .rst_n, .load, .key(key192), .step, .rk(rk192));
  aes_key_expand #(.KEY_BITS(256)) dut256 (.clk, .rst_n, .load, .key(key256), .step, .rk(rk256));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [127:0] got, logic [127:0] exp, int r);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL round key %0d: %h expected %h", r, got, exp);
    end
  endtask

  initial begin
    logic [127:0] k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 21; t++) begin
      k = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); key = k; load = 1;
      @(negedge clk); load = 0;
      chk(rk, k, 0);
      for (int r = 1; r <= 10; r++) begin
        step = 1;
        @(negedge clk);
        step = ($urandom_range(3, 0) != 0);
        if (!step) begin
          @(negedge clk);   // idle cycle: key must hold
        end
        chk(rk, ref_round_key(k, r), r);
      end
      step = 0;
      if (t == 0) chk(rk, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, 10);
    end
    // 192- and 256-bit keys: FIPS-197 appendix A.2 / A.3 keys, then random
    for (int t = 0; t < 11; t++) begin
      logic [255:0] k2, k3;
      k2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 64'h0};
      k3 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (t == 0) begin
        k2 = {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0};
        k3 = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
      end
      @(negedge clk); key192 = k2[255 -: 192]; key256 = k3; load = 1;
      @(negedge clk); load = 0;
      for (int r = 0; r <= 14; r++) begin
        if (r <= 12) chk(rk192, ref_round_key_k(k2, 6, r), 100 + r);
        chk(rk256, ref_round_key_k(k3, 8, r), 200 + r);
        step = 1;
        @(negedge clk);
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
