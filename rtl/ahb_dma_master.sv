// AHB bus-master engine of the IP-block AMBA wrapper.
//
// The platform's IP blocks (AES, FIR) are AHB bus masters: they fetch their
// input data from system memory and write their results back themselves.
// This engine does the bus side of that.  On START it requests the bus
// (HBUSREQ) and, once it owns it, moves NWORDS 32-bit words between the AHB
// address ADDR0 (incrementing by 4) and the local buffer RAM starting at
// RAM_BASE: WRITE = 0 copies memory into the RAM, WRITE = 1 copies the RAM
// out to memory.  DONE pulses for one cycle when the last data phase has
// completed; ERR is then set if any transfer got a non-OKAY response.
//
// Bus behaviour:
//  * transfers are word-sized INCR bursts: NONSEQ for the first beat, after
//    every re-grant and at each 1 KB boundary, SEQ otherwise;
//  * ownership follows AMBA 2: the engine drives the address bus in the
//    cycles after an edge where HGRANT and HREADY were both high, so a
//    higher-priority master can take the bus between any two beats and the
//    burst resumes with NONSEQ when the grant returns;
//  * the address phase advances on every edge with HREADY high, so slave
//    wait states stall the engine;
//  * on an ERROR (or RETRY/SPLIT) response the engine drives IDLE, lets the
//    outstanding data phase finish and stops with ERR set (no retry).
//
// Buffer RAM interface: registered read with one cycle latency (see dw_ram).
// The read address is looked ahead so that RAM_RDATA always holds the word
// of the next beat to be issued; it is latched into HWDATA when that beat's
// address phase completes.  Read data from memory is written to the RAM as
// each data phase completes.  The engine's structure is this design's own;
// the platform describes only that the block requests the bus and moves the
// data once granted.
module ahb_dma_master
  import amba_pkg::*;
#(
  parameter int unsigned AW = 10      // buffer RAM address width
) (
  input  logic           clk,
  input  logic           rst_n,
  // command
  input  logic           start,
  input  logic           write,
  input  logic [HAW-1:0] addr0,
  input  logic [AW-1:0]  ram_base,
  input  logic [AW:0]    nwords,
  output logic           busy,
  output logic           done,
  output logic           err,
  // buffer RAM
  output logic [AW-1:0]  ram_raddr,
  input  logic [HDW-1:0] ram_rdata,
  output logic           ram_we,
  output logic [AW-1:0]  ram_waddr,
  output logic [HDW-1:0] ram_wdata,
  // AHB master
  input  ahb_mst_in_t    mi,
  output ahb_mst_out_t   mo
);

  logic           wr_q;
  logic [HAW-1:0] addr_q;       // address of the next beat to issue
  logic [AW-1:0]  base_q;
  logic [AW:0]    n_q;
  logic [AW:0]    issued;       // beats whose address phase completed
  logic [AW:0]    finished;     // beats whose data phase completed
  logic           owner;        // we own the address bus this cycle
  logic           first_beat;   // next beat must be NONSEQ
  logic           abort;
  logic           dp_valid;     // a data phase of ours is in progress
  logic [AW-1:0]  dp_idx;
  logic [HDW-1:0] hwdata_q;
  logic           want;         // beats left to issue
  logic           active;       // we drive a NONSEQ/SEQ this cycle
  logic           bad_resp;

  assign want     = busy && !abort && (issued < n_q);
  assign bad_resp = dp_valid && (mi.hresp != HRESP_OKAY);
  assign active   = owner && want && !bad_resp;

  // AHB outputs
  always_comb begin
    mo.hbusreq = want;
    mo.hlock   = 1'b0;
    mo.haddr   = addr_q;
    mo.hwrite  = wr_q;
    mo.hsize   = HSIZE_WORD;
    mo.hburst  = HBURST_INCR;
    mo.hprot   = 4'b0001;
    mo.hwdata  = hwdata_q;
    if (!active)
      mo.htrans = HTRANS_IDLE;
    else if (first_beat || addr_q[9:0] == 10'h000)
      mo.htrans = HTRANS_NONSEQ;
    else
      mo.htrans = HTRANS_SEQ;
  end

  // Buffer RAM: look-ahead read address, write on read-data completion.
  logic adv;
  assign adv = active && mi.hready;
  always_comb begin
    if (start && !busy)
      ram_raddr = ram_base;
    else
      ram_raddr = base_q + AW'(issued) + AW'(adv);
  end
  assign ram_we    = dp_valid && mi.hready && !wr_q && (mi.hresp == HRESP_OKAY);
  assign ram_waddr = dp_idx;
  assign ram_wdata = mi.hrdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      err        <= 1'b0;
      wr_q       <= 1'b0;
      addr_q     <= '0;
      base_q     <= '0;
      n_q        <= '0;
      issued     <= '0;
      finished   <= '0;
      owner      <= 1'b0;
      first_beat <= 1'b1;
      abort      <= 1'b0;
      dp_valid   <= 1'b0;
      dp_idx     <= '0;
      hwdata_q   <= '0;
    end else begin
      done <= 1'b0;
      if (mi.hready) owner <= mi.hgrant;
      if (mi.hready && !mi.hgrant) first_beat <= 1'b1;

      if (start && !busy) begin
        busy       <= (nwords != 0);
        done       <= (nwords == 0);
        err        <= 1'b0;
        wr_q       <= write;
        addr_q     <= addr0;
        base_q     <= ram_base;
        n_q        <= nwords;
        issued     <= '0;
        finished   <= '0;
        first_beat <= 1'b1;
        abort      <= 1'b0;
      end else if (busy) begin
        if (bad_resp) begin
          abort <= 1'b1;
          err   <= 1'b1;
        end
        if (mi.hready) begin
          // data phase completes
          if (dp_valid) finished <= finished + 1'b1;
          // address phase completes
          dp_valid <= active;
          if (active) begin
            dp_idx     <= base_q + AW'(issued);
            hwdata_q   <= ram_rdata;
            addr_q     <= addr_q + 32'd4;
            issued     <= issued + 1'b1;
            first_beat <= !mi.hgrant;
          end
          // finished when nothing is outstanding
          if ((dp_valid && !active && (finished + 1'b1 == issued) && (abort || bad_resp || issued == n_q)) ||
              (!dp_valid && !active && (abort || bad_resp))) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  a_no_idle_in_burst: assert property (@(posedge clk) disable iff (!rst_n)
                                       (mo.htrans == HTRANS_SEQ) |-> !first_beat);

endmodule
