// AES key expansion, one round key per clock, for 128-, 192- and 256-bit keys.
//
// The schedule is a sequence of 32-bit words w[0], w[1], ...: the first NK
// (= KEY_BITS/32: 4, 6 or 8) are the cipher key, and every later word is
//   w[j] = w[j-NK] ^ g(w[j-1])
// where g is SubWord(RotWord(x)) ^ {rcon, 24'h0} when j is a multiple of NK
// (rcon starting at 0x01 and doubled in GF(2^8) each time it is used),
// SubWord(x) when NK = 8 and j mod 8 = 4, and x otherwise.  Round key r is
// w[4r..4r+3].
//
// The module keeps a window of the NK words w[4r .. 4r+NK-1], so the current
// round key RK is always the oldest four words of the window.  LOAD fills
// the window with the key (RK = round key 0).  Each STEP computes the next
// four words in one clock and slides the window by four, so after n steps
// RK holds round key n.  For a 128-bit key this is the familiar
// one-round-key-per-clock schedule.
//
// Computing the schedule alongside the rounds rather than storing it
// follows the key-expansion-module structure of the cipher; the window
// scheme and the one-step-per-clock timing are this design's.
module aes_key_expand
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [KEY_BITS-1:0] key,
  input  logic                step,
  output block_t              rk
);

  localparam int unsigned NK = KEY_BITS / 32;

  logic [31:0] win [NK];      // w[4r] .. w[4r+NK-1]
  logic [31:0] nw  [4];       // w[4r+NK] .. w[4r+NK+3]
  logic [31:0] ext [NK+4];    // window followed by the new words
  logic [2:0]  jm;            // (4r + NK) mod NK, i.e. 4r mod NK
  byte_t       rcon, rcon_n;

  initial assert (NK == 4 || NK == 6 || NK == 8)
    else $fatal(1, "aes_key_expand: KEY_BITS must be 128, 192 or 256");

  assign rk = {win[0], win[1], win[2], win[3]};

  always_comb begin
    logic [31:0] prev;
    logic [3:0]  m;
    rcon_n = rcon;
    prev   = win[NK-1];
    for (int t = 0; t < 4; t++) begin
      m = 4'(jm) + 4'(t);
      if (m >= 4'(NK)) m = m - 4'(NK);
      if (m == 0) begin
        prev   = sub_word({prev[23:0], prev[31:24]}) ^ {rcon_n, 24'h0};
        rcon_n = xtime(rcon_n);
      end else if (NK == 8 && m == 4) begin
        prev = sub_word(prev);
      end
      nw[t] = win[t] ^ prev;
      prev  = nw[t];
    end
    for (int i = 0; i < NK; i++) ext[i] = win[i];
    for (int t = 0; t < 4; t++) ext[NK + t] = nw[t];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NK; i++) win[i] <= '0;
      rcon <= 8'h01;
      jm   <= '0;
    end else if (load) begin
      for (int i = 0; i < NK; i++) win[i] <= key[KEY_BITS-1 - 32*i -: 32];
      rcon <= 8'h01;
      jm   <= '0;
    end else if (step) begin
      for (int i = 0; i < NK; i++) win[i] <= ext[i + 4];
      rcon <= rcon_n;
      jm   <= (32'(jm) + 4 >= NK) ? 3'(32'(jm) + 4 - NK) : jm + 3'd4;
    end
  end

endmodule
