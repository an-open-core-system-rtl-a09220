// One AES inverse round.
//
// Purely combinational: InvShiftRows (row r rotated right by r columns),
// InvSubBytes, AddRoundKey with RK, then InvMixColumns unless FINAL_ROUND
// is set (the last of the ten AES-128 inverse rounds leaves it out).  Byte
// order as in aes_round.
module aes_inv_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t rk,
  input  logic   final_round,
  output block_t state_o
);

  block_t sr;   // after InvShiftRows, InvSubBytes and AddRoundKey
  block_t mc;

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[127 - 8*(4*c + r) -: 8] = inv_sbox(st_byte(state_i, r, (c + 4 - r) % 4));
    sr = sr ^ rk;
    for (int c = 0; c < 4; c++)
      mc[127 - 32*c -: 32] = inv_mix_column(sr[127 - 32*c -: 32]);
    state_o = final_round ? sr : mc;
  end

endmodule
