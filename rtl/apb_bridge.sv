// AHB-to-APB bridge.
//
// The bridge is an AHB slave (at 0x80000000-0x8FFFFFFF in the platform) and
// the only master of the APB, over which the processor reaches the on-chip
// peripheral registers and the control registers of the AES and FIR blocks.
// PADDR[9:0] is decoded against the APB slot table of amba_pkg (first/last
// address and an enable flag per slot); a slot that is not enabled is never
// selected, and an access to it reads zero.
//
// Timing: an AHB transfer addressed to the bridge is registered at the end
// of its address phase.  The following cycle is the APB SETUP cycle (PSEL
// high, PENABLE low, HREADYOUT low); the next is the ENABLE cycle (PENABLE
// high) during which HREADYOUT is high and PRDATA of the selected slot is
// returned as HRDATA, so every APB access costs one AHB wait state.  PWDATA
// is taken from HWDATA, which the master holds for the whole data phase.
// APB is the AMBA 2 version (no PREADY/PSLVERR); the bridge always answers
// OKAY.  The slot table follows the platform; the cycle-level timing is this
// design's choice.
module apb_bridge
  import amba_pkg::*;
#(
  parameter int unsigned NSLOT = NAPB
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ahb_slv_in_t       si,
  input  logic              hsel,
  output ahb_slv_out_t      so,
  output apb_slv_in_t       apbo,
  output logic [NSLOT-1:0]  psel,
  input  logic [HDW-1:0]    prdata [NSLOT]
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_ENABLE} state_t;
  state_t         state;
  logic [HAW-1:0] addr_q;
  logic           write_q;
  logic           start;
  logic [NSLOT-1:0] slot;

  assign start = hsel && si.hready && (si.htrans inside {HTRANS_NONSEQ, HTRANS_SEQ});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      write_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_ENABLE: begin
          if (start) begin
            state   <= S_SETUP;
            addr_q  <= si.haddr;
            write_q <= si.hwrite;
          end else begin
            state   <= S_IDLE;
          end
        end
        S_SETUP: state <= S_ENABLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Slot decode on PADDR[9:0].
  always_comb begin
    slot = '0;
    for (int unsigned i = 0; i < NSLOT && i < NAPB; i++)
      if (APB_SLOTS[i].enable &&
          addr_q[9:0] >= APB_SLOTS[i].first && addr_q[9:0] <= APB_SLOTS[i].last)
        slot[i] = 1'b1;
  end

  always_comb begin
    apbo.paddr   = addr_q;
    apbo.pwrite  = write_q;
    apbo.pwdata  = si.hwdata;
    apbo.penable = (state == S_ENABLE);
    psel         = (state == S_IDLE) ? '0 : slot;
  end

  always_comb begin
    so.hready = (state != S_SETUP);
    so.hresp  = HRESP_OKAY;
    so.hrdata = '0;
    if (state == S_ENABLE && !write_q)
      for (int unsigned i = 0; i < NSLOT; i++)
        if (slot[i]) so.hrdata = prdata[i];
  end

  a_psel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(psel));
  a_enable_after_setup: assert property (@(posedge clk) disable iff (!rst_n)
                                         (state == S_SETUP) |=> apbo.penable);

endmodule
