// Iterative AES inverse cipher for 128-, 192- or 256-bit keys (KEY_BITS).
//
// Decryption needs the round keys in reverse order, so the block first runs
// the key schedule forward (aes_key_expand, one round key per clock) and
// keeps all NR+1 round keys in registers (NR = 10, 12 or 14), then applies
// the initial AddRoundKey with round key NR and NR passes through the
// inverse round (the last one without InvMixColumns) using round keys NR-1
// down to 0.
//
// Timing: the edge that samples LD (cycle 0) captures KEY and TEXT_IN;
// edges 1 to NR expand the key, edge NR+1 applies the initial AddRoundKey,
// edges NR+2 to 2NR+1 run the inverse rounds and edge 2NR+2 moves the
// result to TEXT_OUT and raises DONE for one cycle: 22 clocks after LD for
// the default 128-bit key, 26 and 30 for 192 and 256.  LD while busy
// restarts.  The split into a cipher and an inverse cipher and the three
// key sizes follow the platform's AES core; the schedule is this design's.
// The block is always 128 bits.
module aes_inv_cipher
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld,
  input  logic [KEY_BITS-1:0] key,
  input  block_t              text_in,
  output logic                done,
  output block_t              text_out
);

  localparam int unsigned NR = KEY_BITS / 32 + 6;

  block_t     text_q, state, rk, rnd_out;
  block_t     kb [NR+1];   // round keys 0..NR
  logic [4:0] ph;          // 0 idle, 1..NR key expansion, NR+1 initial add,
                           // NR+2..2NR+1 rounds, 2NR+2 output
  logic [3:0] ridx;        // round key used by the current inverse round
  logic       kstep;

  assign kstep = (ph >= 5'd1) && (ph <= 5'(NR)) && !ld;
  assign ridx  = 4'(5'(2*NR + 1) - ph);   // ph NR+2 -> NR-1 ... ph 2NR+1 -> 0

  aes_key_expand #(.KEY_BITS(KEY_BITS)) u_key (
    .clk, .rst_n, .load(ld), .key(key), .step(kstep), .rk(rk)
  );

  aes_inv_round u_round (
    .state_i(state), .rk(kb[ridx]), .final_round(ph == 5'(2*NR + 1)), .state_o(rnd_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      text_q   <= '0;
      state    <= '0;
      text_out <= '0;
      ph       <= '0;
      done     <= 1'b0;
      for (int i = 0; i <= NR; i++) kb[i] <= '0;
    end else begin
      done <= 1'b0;
      if (ld) begin
        text_q <= text_in;
        ph     <= 5'd1;
      end else if (ph >= 5'd1 && ph <= 5'(NR)) begin
        kb[4'(ph - 5'd1)] <= rk;
        ph <= ph + 5'd1;
      end else if (ph == 5'(NR + 1)) begin
        kb[NR] <= rk;
        state  <= text_q ^ rk;
        ph     <= ph + 5'd1;
      end else if (ph == 5'(2*NR + 2)) begin
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
