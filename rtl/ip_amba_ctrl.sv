// Control half of the IP-block AMBA wrapper: APB registers and sequencer.
//
// The processor drives an IP block through seven 32-bit APB registers (the
// AES block sits at 0x80000300-0x80000318).  Word offsets:
//   0x00 SRC     AHB address the input data is loaded from
//   0x04 DST     AHB address the results are stored to
//   0x08 LOADN   number of words to load into the input RAM (from word 0)
//   0x0C STOREN  number of words to store from the output RAM (from word 0)
//   0x10 CMD     write: bit0 LOAD, bit1 GO, bit2 STORE; read: last command
//   0x14 STATUS  read: bit0 busy, bit1 load done, bit2 go done,
//                bit3 store done, bit4 bus error (cleared by the next command)
//   0x18 PARAM   core-specific parameter (AES: blocks, FIR: samples)
// A CMD write while busy is ignored.  The steps named in a command run in
// the fixed order LOAD, GO, STORE: LOAD has the AHB engine copy LOADN words
// from SRC into the input RAM, GO gives the core a one-cycle GO pulse and
// waits for its DONE pulse, STORE has the AHB engine copy STOREN words from
// the output RAM to DST.  A bus error skips the remaining steps.
//
// The platform fixes the register window, the 32-bit address and data
// widths, the load/GO/DONE handshake with the core and the rule that a
// register write starts an operation; the register layout and command
// encoding are this design's choices.  APB reads are combinational during
// the access (AMBA 2 APB), writes are taken in the ENABLE cycle.
module ip_amba_ctrl
  import amba_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  // APB slave
  input  apb_slv_in_t    apbi,
  input  logic           psel,
  output logic [HDW-1:0] prdata,
  // core handshake
  output logic           go,
  input  logic           core_done,
  output logic [31:0]    param,
  // AHB engine
  output logic           dma_start,
  output logic           dma_write,
  output logic [HAW-1:0] dma_addr,
  output logic [AW:0]    dma_nwords,
  input  logic           dma_done,
  input  logic           dma_err
);

  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_LOADW, C_GO, C_GOW, C_STORE, C_STOREW} cstate_t;

  logic [31:0] src_q, dst_q, param_q;
  logic [AW:0] loadn_q, storen_q;
  logic [2:0]  cmd_q;
  logic        ld_done, go_done, st_done, err_q;
  cstate_t     cs;
  logic        wr_en;
  logic [2:0]  regsel;

  assign wr_en  = psel && apbi.penable && apbi.pwrite;
  assign regsel = apbi.paddr[4:2];
  assign param  = param_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q <= '0; dst_q <= '0; param_q <= '0;
      loadn_q <= '0; storen_q <= '0; cmd_q <= '0;
      ld_done <= 1'b0; go_done <= 1'b0; st_done <= 1'b0; err_q <= 1'b0;
      cs <= C_IDLE;
    end else begin
      if (wr_en) begin
        unique case (regsel)
          3'd0: src_q    <= apbi.pwdata;
          3'd1: dst_q    <= apbi.pwdata;
          3'd2: loadn_q  <= apbi.pwdata[AW:0];
          3'd3: storen_q <= apbi.pwdata[AW:0];
          3'd6: param_q  <= apbi.pwdata;
          default: ;
        endcase
      end
      unique case (cs)
        C_IDLE:
          if (wr_en && regsel == 3'd4 && apbi.pwdata[2:0] != 3'b000) begin
            cmd_q   <= apbi.pwdata[2:0];
            ld_done <= 1'b0; go_done <= 1'b0; st_done <= 1'b0; err_q <= 1'b0;
            cs <= apbi.pwdata[0] ? C_LOAD : apbi.pwdata[1] ? C_GO : C_STORE;
          end
        C_LOAD:  cs <= C_LOADW;
        C_LOADW:
          if (dma_done) begin
            ld_done <= !dma_err;
            err_q   <= dma_err;
            cs <= dma_err ? C_IDLE : cmd_q[1] ? C_GO : cmd_q[2] ? C_STORE : C_IDLE;
          end
        C_GO:    cs <= C_GOW;
        C_GOW:
          if (core_done) begin
            go_done <= 1'b1;
            cs <= cmd_q[2] ? C_STORE : C_IDLE;
          end
        C_STORE: cs <= C_STOREW;
        C_STOREW:
          if (dma_done) begin
            st_done <= !dma_err;
            err_q   <= dma_err;
            cs <= C_IDLE;
          end
        default: cs <= C_IDLE;
      endcase
    end
  end

  assign dma_start  = (cs == C_LOAD) || (cs == C_STORE);
  assign dma_write  = (cs == C_STORE);
  assign dma_addr   = (cs == C_STORE) ? dst_q : src_q;
  assign dma_nwords = (cs == C_STORE) ? storen_q : loadn_q;
  assign go         = (cs == C_GO);

  always_comb begin
    prdata = '0;
    if (psel && !apbi.pwrite) begin
      unique case (regsel)
        3'd0: prdata = src_q;
        3'd1: prdata = dst_q;
        3'd2: prdata = 32'(loadn_q);
        3'd3: prdata = 32'(storen_q);
        3'd4: prdata = 32'(cmd_q);
        3'd5: prdata = {27'd0, err_q, st_done, go_done, ld_done, cs != C_IDLE};
        3'd6: prdata = param_q;
        default: prdata = '0;
      endcase
    end
  end

endmodule
