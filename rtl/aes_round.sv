// One AES round (the cipher's round and final permutations).
//
// Purely combinational: SubBytes on all 16 bytes, ShiftRows (row r rotated
// left by r columns), MixColumns on each column unless FINAL_ROUND is set
// (the last of the ten AES-128 rounds leaves it out), then AddRoundKey with
// RK.  Byte 0 of the state is the block's most significant byte and the
// state is stored column by column, as in the AES standard.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t rk,
  input  logic   final_round,
  output block_t state_o
);

  block_t sr;   // after SubBytes and ShiftRows
  block_t mc;   // after MixColumns

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[127 - 8*(4*c + r) -: 8] = sbox(st_byte(state_i, r, (c + r) % 4));
    for (int c = 0; c < 4; c++)
      mc[127 - 32*c -: 32] = mix_column(sr[127 - 32*c -: 32]);
    state_o = (final_round ? sr : mc) ^ rk;
  end

endmodule
