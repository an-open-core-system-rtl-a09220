// Iterative AES cipher for 128-, 192- or 256-bit keys (parameter KEY_BITS).
//
// The cipher is built from a key-expansion module, an initial permutation
// (the first AddRoundKey), one round-permutation module that is used ten
// NR times (NR = 10, 12 or 14 for 128-, 192- and 256-bit keys), and the
// final permutation (the last pass, without MixColumns).  It encrypts one
// 128-bit block at a time.
//
// Timing: the edge that samples LD (cycle 0) captures KEY and TEXT_IN into
// input registers and loads the key schedule.  Edge 1 applies the initial
// AddRoundKey, edges 2 to NR+1 run rounds 1 to NR, and edge NR+2 moves the
// result to TEXT_OUT and raises DONE for one cycle (12 clocks after LD for
// the default 128-bit key, 14 and 16 for 192 and 256); TEXT_OUT then holds the
// ciphertext until the next block finishes.  A new LD may be given in the
// cycle DONE is high.  An LD while a block is in progress restarts the
// cipher with the new inputs.
//
// The module split and the ten-iteration loop follow the platform's AES
// core, as do the three key sizes; the exact schedule and the DONE pulse
// are this design's.  The block is always 128 bits (AES); the wider
// Rijndael block lengths are not supported.
module aes_cipher
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld,
  input  logic [KEY_BITS-1:0] key,
  input  block_t text_in,
  output logic   done,
  output block_t text_out
);

  localparam int unsigned NR = KEY_BITS / 32 + 6;

  block_t     text_q, state, rk, rnd_out;
  logic [4:0] ph;        // 0 idle, 1 initial add, 2..NR+1 rounds 1..NR, NR+2 output
  logic       kload, kstep;

  assign kload = ld;
  assign kstep = (ph >= 5'd1) && (ph <= 5'(NR)) && !ld;

  aes_key_expand #(.KEY_BITS(KEY_BITS)) u_key (
    .clk, .rst_n, .load(kload), .key(key), .step(kstep), .rk(rk)
  );

  aes_round u_round (
    .state_i(state), .rk(rk), .final_round(ph == 5'(NR + 1)), .state_o(rnd_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      text_q   <= '0;
      state    <= '0;
      text_out <= '0;
      ph       <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ld) begin
        text_q <= text_in;
        ph     <= 5'd1;
      end else if (ph == 5'd1) begin
        state <= text_q ^ rk;
        ph    <= 5'd2;
      end else if (ph == 5'(NR + 2)) begin
        text_out <= state;
        done     <= 1'b1;
        ph       <= 5'd0;
      end else if (ph != 5'd0) begin
        state <= rnd_out;
        ph    <= ph + 5'd1;
      end
    end
  end

endmodule
