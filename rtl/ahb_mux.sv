// AHB central decoder and multiplexers, with a default slave.
//
// The platform uses the AMBA AHB central-multiplexer scheme: the arbiter picks
// which master's address and control reach the slaves (HMASTER), the write
// data of the master owning the data phase follows one transfer later
// (HMASTER_D), and the decoder selects one slave from the address.  The
// decoder remembers which slave was selected for the transfer now in its data
// phase; that slave's HREADYOUT, HRESP and HRDATA are returned to all masters
// and its HREADYOUT becomes the bus-wide HREADY.
//
// Address map (default LEON-2): 0x00000000-0x7FFFFFFF memory controller,
// 0x80000000-0x8FFFFFFF APB bridge, 0x90000000-0x9FFFFFFF debug support unit.
// Any other address reaches the built-in default slave, which answers an
// active transfer with the two-cycle AHB ERROR response (first cycle HREADY
// low, second cycle HREADY high), and IDLE/BUSY transfers with a zero-wait
// OKAY.  The default slave is this design's choice.  HGRANT is not produced
// here: the top module combines this record with the arbiter's grant vector.
module ahb_mux
  import amba_pkg::*;
#(
  parameter int unsigned NMST = 3,
  parameter int unsigned NSLV = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ahb_mst_out_t            mo [NMST],
  input  logic [$clog2(NMST)-1:0] hmaster,
  input  logic [$clog2(NMST)-1:0] hmaster_d,
  input  logic                    hmastlock,
  output ahb_mst_in_t             mi,
  output ahb_slv_in_t             si,
  output logic [NSLV-1:0]         hsel,
  input  ahb_slv_out_t            so [NSLV]
);

  logic [NSLV-1:0] dsel;        // slave owning the data phase
  logic            def_active;  // default slave answering an active transfer
  logic            def_err2;    // second cycle of the ERROR response
  logic            hready;
  logic [NSLV-1:0] asel;

  // Address and control from the address-phase owner, data from the data-phase owner.
  always_comb begin
    si.haddr     = mo[hmaster].haddr;
    si.hwrite    = mo[hmaster].hwrite;
    si.htrans    = mo[hmaster].htrans;
    si.hsize     = mo[hmaster].hsize;
    si.hburst    = mo[hmaster].hburst;
    si.hprot     = mo[hmaster].hprot;
    si.hwdata    = mo[hmaster_d].hwdata;
    si.hmaster   = 4'(hmaster);
    si.hmastlock = hmastlock;
    si.hready    = hready;
  end

  // Address decode; the default LEON-2 map has three slaves.
  always_comb begin
    logic [NSLV-1:0] full;
    full = NSLV'(ahb_decode(si.haddr));
    asel = full;
    hsel = full;
  end

  // Data-phase select register and default slave.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsel       <= '0;
      def_active <= 1'b0;
      def_err2   <= 1'b0;
    end else begin
      if (hready) begin
        dsel       <= asel;
        def_active <= (asel == '0) && si.htrans inside {HTRANS_NONSEQ, HTRANS_SEQ};
        def_err2   <= 1'b0;
      end else if (def_active && !def_err2) begin
        def_err2   <= 1'b1;
      end
    end
  end

  // Response multiplexer.
  always_comb begin
    mi.hgrant = 1'b0;
    mi.hready = 1'b1;
    mi.hresp  = HRESP_OKAY;
    mi.hrdata = '0;
    for (int unsigned s = 0; s < NSLV; s++) begin
      if (dsel[s]) begin
        mi.hready = so[s].hready;
        mi.hresp  = so[s].hresp;
        mi.hrdata = so[s].hrdata;
      end
    end
    if (def_active) begin
      mi.hready = def_err2;
      mi.hresp  = HRESP_ERROR;
    end
    hready = mi.hready;
  end

  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dsel));

endmodule
