// Testbench for aes_inv_cipher: FIPS-197 vectors plus random blocks that
// the reference model encrypts and the DUT must decrypt back.  Checks that
// DONE comes exactly 22 clocks after LD, that a back-to-back LD in the DONE
// cycle works and that LD restarts a block; 192- and 256-bit key instances
// are checked the same way (26 and 30 clocks).
module tb_aes_inv_cipher;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ld = 0, done;
  logic [127:0] key = '0, text_in = '0, text_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_inv_cipher dut (.clk, .rst_n, .ld, .key, .text_in, .done, .text_out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // 192- and 256-bit key instances
  logic ld192 = 0, ld256 = 0, done192, done256;
  logic [191:0] key192 = '0;
  logic [255:0] key256 = '0;
  logic [127:0] out192, out256;

  aes_inv_cipher #(.KEY_BITS(192)) dut192 (.clk, .rst_n, .ld(ld192), .key(key192), .text_in,
                                   .done(done192), .text_out(out192));
  aes_inv_cipher #(.KEY_BITS(256)) dut256 (.clk, .rst_n, .ld(ld256), .key(key256), .text_in,
                                   .done(done256), .text_out(out256));

  // One block with an NK-word key (6 or 8); K is left-aligned.
  task automatic run_k(int nk, logic [255:0] k, logic [127:0] t, logic [127:0] exp);
    int n, lat;
    lat = 22 + 4 * (nk - 4) / 2;
    @(negedge clk);
    text_in = t;
    if (nk == 6) begin key192 = k[255 -: 192]; ld192 = 1; end
    else         begin key256 = k;             ld256 = 1; end
    @(negedge clk);
    ld192 = 0; ld256 = 0; n = 0;
    while (!(nk == 6 ? done192 : done256)) begin @(negedge clk); n++; end
    check($sformatf("%0d-bit key block", 32 * nk), nk == 6 ? out192 : out256, exp);
    checks++;
    if (n != lat) begin failures++; $display("FAIL latency %0d, expected %0d (%0d-bit key)", n, lat, 32 * nk); end
  endtask

  // Decrypt one block, measuring cycles from the LD edge to DONE.
  task automatic run(logic [127:0] k, logic [127:0] p, logic [127:0] exp);
    int n;
    @(negedge clk);
    key = k; text_in = p; ld = 1;
    @(negedge clk);
    ld = 0; n = 0;   // edges after the LD edge
    while (!done) begin @(negedge clk); n++; end
    check("plaintext", text_out, exp);
    checks++;
    if (n != 22) begin failures++; $display("FAIL latency %0d, expected 22", n); end
  endtask

  initial begin
    logic [127:0] k, p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 appendix B and C.1
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
        128'h3243f6a8885a308d313198a2e0370734);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    // random blocks encrypted by the reference model
    for (int i = 0; i < 40; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, ref_encrypt(k, p), p);
      checks++;
      if (ref_decrypt(k, ref_encrypt(k, p)) !== p) begin failures++; $display("FAIL reference round trip"); end
    end
    // restart: a second LD in the middle of a block
    @(negedge clk);
    key = 128'h1; text_in = 128'h2; ld = 1;
    @(negedge clk); ld = 0;
    repeat (5) @(negedge clk);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    // back-to-back: new LD in the DONE cycle
    @(negedge clk);
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; text_in = 128'h3925841d02dc09fbdc118597196a0b32; ld = 1;
    @(negedge clk); ld = 0;
    while (!done) @(negedge clk);
    check("first of pair", text_out, 128'h3243f6a8885a308d313198a2e0370734);
    key = 128'h000102030405060708090a0b0c0d0e0f; text_in = 128'h69c4e0d86a7b0430d8cdb78070b4c55a; ld = 1;
    @(negedge clk); ld = 0;
    while (!done) @(negedge clk);
    check("second of pair", text_out, 128'h00112233445566778899aabbccddeeff);
    // FIPS-197 appendix C.2 and C.3, then random blocks
    run_k(6, {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, 128'hdda97ca4864cdfe06eaf70a0ec0d7191, 128'h00112233445566778899aabbccddeeff);
    run_k(8, 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 128'h8ea2b7ca516745bfeafc49904b496089, 128'h00112233445566778899aabbccddeeff);
    for (int i = 0; i < 20; i++) begin
      logic [255:0] kk;
      kk = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      if (i[0]) kk[63:0] = '0;
      run_k(i[0] ? 6 : 8, kk, ref_encrypt_k(kk, i[0] ? 6 : 8, p), p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
