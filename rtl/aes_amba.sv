// AES IP block with its AMBA wrapper: an AHB bus master and APB slave.
//
// Structure: ip_amba_ctrl (APB registers and LOAD/GO/STORE sequencer) and
// ahb_dma_master (bus-master engine) form the wrapper; an input RAM sits in
// front of the AES cipher and an output RAM behind it.  LOAD fills the input
// RAM from system memory, STORE copies the output RAM back, and GO runs the
// engine below, which feeds the cipher from the input RAM.
//
// Input RAM layout: words 0..NK-1 hold the key (NK = KEY_BITS/32 = 4, 6
// or 8; word 0 = the key's most significant 32 bits), followed by the
// plaintext blocks, four words each, most significant word first.  PARAM (register 0x18) gives the number of blocks.
// GO encrypts block b with the key and writes the ciphertext to output RAM
// words 4b..4b+3.  PARAM bit 31 selects the direction: 0 runs the cipher
// (encrypt), 1 runs the inverse cipher (decrypt, the input blocks are
// ciphertext).  With the default 128-bit key each block costs 5 cycles to
// read the block (the key is read once), 13 cycles in the cipher (23 in
// the inverse cipher) and 4 cycles to write it out.  To process N blocks
// software sets SRC, LOADN = NK + 4N, DST, STOREN = 4N, PARAM = N (plus
// bit 31 to decrypt) and writes CMD = 7, then polls STATUS.
//
// The split into a bus part and a control part, the RAMs in front of and
// behind the core, a core made of a cipher and an inverse cipher, and the
// GO/DONE handshake and the three key sizes follow the platform; the RAM
// depth, layout, the direction bit and the engine are this design's.  The
// key size is fixed by the KEY_BITS parameter (default 128).
module aes_amba
  import amba_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned RAM_WORDS = 64,
  parameter int unsigned KEY_BITS  = 128
) (
  input  logic           clk,
  input  logic           rst_n,
  input  apb_slv_in_t    apbi,
  input  logic           psel,
  output logic [HDW-1:0] prdata,
  input  ahb_mst_in_t    mi,
  output ahb_mst_out_t   mo
);

  localparam int unsigned AW = $clog2(RAM_WORDS);
  localparam int unsigned NK = KEY_BITS / 32;

  // wrapper
  logic          go, core_done;
  logic [31:0]   param;
  logic          dma_start, dma_write, dma_done, dma_err, dma_busy;
  logic [HAW-1:0] dma_addr;
  logic [AW:0]   dma_nwords;
  // RAMs
  logic          in_we, out_we;
  logic [AW-1:0] in_waddr, in_raddr, out_waddr, out_raddr;
  logic [31:0]   in_wdata, in_rdata, out_wdata, out_rdata;

  ip_amba_ctrl #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .apbi, .psel, .prdata,
    .go, .core_done, .param,
    .dma_start, .dma_write, .dma_addr, .dma_nwords, .dma_done, .dma_err
  );

  ahb_dma_master #(.AW(AW)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .write(dma_write), .addr0(dma_addr), .ram_base('0),
    .nwords(dma_nwords), .busy(dma_busy), .done(dma_done), .err(dma_err),
    .ram_raddr(out_raddr), .ram_rdata(out_rdata),
    .ram_we(in_we), .ram_waddr(in_waddr), .ram_wdata(in_wdata),
    .mi, .mo
  );

  dw_ram #(.DEPTH(RAM_WORDS), .WIDTH(32)) u_in_ram (
    .clk, .rst_n, .we(in_we), .waddr(in_waddr), .wdata(in_wdata),
    .raddr(in_raddr), .rdata(in_rdata)
  );

  dw_ram #(.DEPTH(RAM_WORDS), .WIDTH(32)) u_out_ram (
    .clk, .rst_n, .we(out_we), .waddr(out_waddr), .wdata(out_wdata),
    .raddr(out_raddr), .rdata(out_rdata)
  );

  // ---------------------------------------------------------------------
  // Engine: RAM -> cipher -> RAM
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {E_IDLE, E_KEY, E_TXT, E_LD, E_RUN, E_WR, E_DONE} estate_t;

  estate_t     es;
  logic [3:0]  k;              // word counter inside a key or block read/write
  logic [AW:0] blk, nblk;
  logic [KEY_BITS-1:0] key_q;
  block_t      txt_q, ct;
  block_t      enc_out, dec_out;
  logic        ld, enc_done, dec_done, aes_done, dec;

  aes_cipher #(.KEY_BITS(KEY_BITS)) u_aes (
    .clk, .rst_n, .ld(ld && !dec), .key(key_q), .text_in(txt_q),
    .done(enc_done), .text_out(enc_out)
  );

  aes_inv_cipher #(.KEY_BITS(KEY_BITS)) u_inv (
    .clk, .rst_n, .ld(ld && dec), .key(key_q), .text_in(txt_q),
    .done(dec_done), .text_out(dec_out)
  );

  assign ld        = (es == E_LD);
  assign aes_done  = dec ? dec_done : enc_done;
  assign ct        = dec ? dec_out : enc_out;
  assign core_done = (es == E_DONE);

  always_comb begin
    in_raddr = '0;
    if (es == E_KEY) in_raddr = AW'(k);
    if (es == E_TXT) in_raddr = AW'(NK + 4*blk + k);
    out_we    = (es == E_WR);
    out_waddr = AW'(4*blk + k);
    out_wdata = ct[127 - 32*k[1:0] -: 32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      es <= E_IDLE; k <= '0; blk <= '0; nblk <= '0;
      key_q <= '0; txt_q <= '0; dec <= 1'b0;
    end else begin
      unique case (es)
        E_IDLE:
          if (go) begin
            nblk <= param[AW:0];
            dec  <= param[31];
            blk  <= '0;
            k    <= '0;
            es   <= (param[AW:0] == 0) ? E_DONE : E_KEY;
          end
        E_KEY: begin
          if (k != 0) key_q <= {key_q[KEY_BITS-33:0], in_rdata};
          k <= k + 4'd1;
          if (k == 4'(NK)) begin k <= '0; es <= E_TXT; end
        end
        E_TXT: begin
          if (k != 0) txt_q <= {txt_q[95:0], in_rdata};
          k <= k + 4'd1;
          if (k == 4'd4) begin k <= '0; es <= E_LD; end
        end
        E_LD:  es <= E_RUN;
        E_RUN: if (aes_done) es <= E_WR;
        E_WR: begin
          k <= k + 4'd1;
          if (k == 4'd3) begin
            k   <= '0;
            blk <= blk + 1'b1;
            es  <= (blk + 1'b1 == nblk) ? E_DONE : E_TXT;
          end
        end
        E_DONE: es <= E_IDLE;
        default: es <= E_IDLE;
      endcase
    end
  end

endmodule
