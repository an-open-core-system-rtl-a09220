// FIR IP block with its AMBA wrapper: an AHB bus master and APB slave.
//
// The same wrapper as the AES block (ip_amba_ctrl + ahb_dma_master, input
// and output RAMs) around the FIR filter.  Input RAM layout: words
// 0..NTAPS-1 hold the coefficients (signed, in bits 15:0), followed by the
// samples, one per word (signed, bits 15:0).  PARAM gives the number of
// samples N.  GO clears the delay line, loads the coefficients, then streams
// the N samples through the filter at one per clock and writes output n
// (the low 32 bits of the accumulator, sign included) to output RAM word n.
// GO therefore takes about NTAPS + N + 4 cycles.  Software sets SRC,
// LOADN = NTAPS + N, DST, STOREN = N, PARAM = N and writes CMD = 7.
//
// Wrapper reuse, the RAMs and the GO/DONE handshake follow the platform;
// the layout, engine and sizes are this design's.
module fir_amba
  import amba_pkg::*;
#(
  parameter int unsigned NTAPS     = 16,
  parameter int unsigned RAM_WORDS = 256
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
  localparam int unsigned TW = $clog2(NTAPS);
  localparam int unsigned YW = 32 + TW;

  logic          go, core_done;
  logic [31:0]   param;
  logic          dma_start, dma_write, dma_done, dma_err, dma_busy;
  logic [HAW-1:0] dma_addr;
  logic [AW:0]   dma_nwords;
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
  // Engine: coefficients, then samples, at one RAM word per clock.
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {F_IDLE, F_COEF, F_SAMP, F_DONE} fstate_t;

  fstate_t        fs;
  logic [AW:0]    ri;          // words issued in this phase
  logic [AW:0]    nsamp, nout;
  logic           v1, v1_coef; // RAM data arriving this cycle
  logic [TW-1:0]  v1_idx;
  logic           clr, coef_we, in_valid, out_valid;
  logic signed [YW-1:0] y;

  fir_filter #(.NTAPS(NTAPS), .DW(16)) u_fir (
    .clk, .rst_n, .clr, .coef_we, .coef_idx(v1_idx), .coef(in_rdata[15:0]),
    .in_valid, .x(in_rdata[15:0]), .out_valid, .y
  );

  assign clr       = (fs == F_IDLE) && go;
  assign coef_we   = v1 && v1_coef;
  assign in_valid  = v1 && !v1_coef;
  assign out_we    = out_valid;
  assign out_waddr = AW'(nout);
  assign out_wdata = y[31:0];
  assign core_done = (fs == F_DONE);

  always_comb begin
    in_raddr = '0;
    if (fs == F_COEF) in_raddr = AW'(ri);
    if (fs == F_SAMP) in_raddr = AW'(NTAPS + ri);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs <= F_IDLE; ri <= '0; nsamp <= '0; nout <= '0;
      v1 <= 1'b0; v1_coef <= 1'b0; v1_idx <= '0;
    end else begin
      v1 <= 1'b0;
      if (out_valid) nout <= nout + 1'b1;
      unique case (fs)
        F_IDLE:
          if (go) begin
            nsamp <= param[AW:0];
            nout  <= '0;
            ri    <= '0;
            fs    <= F_COEF;
          end
        F_COEF: begin
          v1      <= 1'b1;
          v1_coef <= 1'b1;
          v1_idx  <= TW'(ri);
          ri      <= ri + 1'b1;
          if (ri == (AW+1)'(NTAPS - 1)) begin
            ri <= '0;
            fs <= F_SAMP;
          end
        end
        F_SAMP: begin
          if (ri < nsamp) begin
            v1      <= 1'b1;
            v1_coef <= 1'b0;
            ri      <= ri + 1'b1;
          end
          if (nout + AW'(out_valid) == nsamp) fs <= F_DONE;
        end
        F_DONE: fs <= F_IDLE;
        default: fs <= F_IDLE;
      endcase
    end
  end

endmodule
