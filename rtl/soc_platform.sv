// Open-core system-on-chip platform: top level.
//
// A LEON-2 (SPARC V8) processor system extended with two IP blocks that are
// AHB bus masters: an AES-128 encryption block and an FIR filter block.  The
// processor programs an IP block over the APB, the block then fetches its
// input from system memory over the AHB by itself, processes it and writes
// the result back, so the processor is free while the block works.
//
// What is built here:
//  * AHB: fixed-priority arbiter (LEON-2 = 0, AES = 1, FIR = 2, higher number
//    wins) and the central decoder/multiplexer with the default LEON-2 map:
//    0x00000000-0x7FFFFFFF memory controller, 0x80000000-0x8FFFFFFF APB
//    bridge, 0x90000000-0x9FFFFFFF debug support unit;
//  * APB bridge with the LEON-2 slot table; the AES block answers at
//    0x80000300-0x800003FF, the FIR block at 0x80000200-0x800002FC;
//  * the AES and FIR blocks with their AMBA wrappers (AES key size set by
//    AES_KEY_BITS: 128, 192 or 256, default 128);
//  * the processor's register-file and cache RAMs: Artisan dual-port macros
//    behind the LEON-2 timing wrappers.
// What is outside and reaches this module through ports: the LEON-2
// integer unit and cache controllers (AHB master 0 and the RAM-side ports),
// the memory controller and debug support unit (AHB slaves), and the LEON-2
// APB peripherals (timers, UARTs, interrupt controller, I/O port, ...),
// which get the shared APB request, one PSEL per slot and return one PRDATA
// per slot.  HSEL of the two external AHB slaves is brought out with them.
//
// All logic runs on one clock (the platform was timed at 25 MHz) with an
// asynchronous active-low reset.
module soc_platform
  import amba_pkg::*;
  import soc_pkg::*;
#(
  parameter int unsigned AES_RAM_WORDS = 64,
  parameter int unsigned AES_KEY_BITS  = 128,
  parameter int unsigned FIR_TAPS      = 16,
  parameter int unsigned FIR_RAM_WORDS = 256
) (
  input  logic           clk,
  input  logic           rst_n,
  // LEON-2 processor AHB master port
  input  ahb_mst_out_t   cpu_mo,
  output ahb_mst_in_t    cpu_mi,
  // memory controller and DSU AHB slave ports
  output ahb_slv_in_t    ahb_si,
  output logic           memctrl_hsel,
  input  ahb_slv_out_t   memctrl_so,
  output logic           dsu_hsel,
  input  ahb_slv_out_t   dsu_so,
  // LEON-2 APB peripherals
  output apb_slv_in_t    apb_o,
  output logic [NAPB-1:0] apb_psel_o,
  input  logic [31:0]    apb_prdata_i [NAPB],
  // LEON-2 register file (two read ports, so two RAMs) and caches
  input  rf_ram_in_t     rf_i [2],
  output logic [31:0]    rf_o [2],
  input  tag_ram_in_t    itag_i,
  output logic [TAG_BITS-1:0] itag_o,
  input  data_ram_in_t   idata_i,
  output logic [31:0]    idata_o,
  input  tag_ram_in_t    dtag_i,
  output logic [TAG_BITS-1:0] dtag_o,
  input  data_ram_in_t   ddata_i,
  output logic [31:0]    ddata_o
);

  localparam int unsigned MW = $clog2(NMST);

  // ---------------------------------------------------------------------
  // AHB
  // ---------------------------------------------------------------------
  ahb_mst_out_t    mo [NMST];
  ahb_mst_in_t     mi_common;
  ahb_mst_in_t     mi [NMST];
  ahb_slv_out_t    so [NSLV];
  logic [NSLV-1:0] hsel;
  logic [NMST-1:0] hbusreq, hlock, hgrant;
  logic [MW-1:0]   hmaster, hmaster_d;
  logic            hmastlock;

  assign mo[MST_LEON] = cpu_mo;
  assign cpu_mi       = mi[MST_LEON];

  always_comb begin
    for (int unsigned m = 0; m < NMST; m++) begin
      hbusreq[m]   = mo[m].hbusreq;
      hlock[m]     = mo[m].hlock;
      mi[m]        = mi_common;
      mi[m].hgrant = hgrant[m];
    end
  end

  ahb_arbiter #(.NMST(NMST)) u_arb (
    .clk, .rst_n, .hbusreq, .hlock, .hready(mi_common.hready),
    .hgrant, .hmaster, .hmaster_d, .hmastlock
  );

  ahb_mux #(.NMST(NMST), .NSLV(NSLV)) u_mux (
    .clk, .rst_n, .mo, .hmaster, .hmaster_d, .hmastlock,
    .mi(mi_common), .si(ahb_si), .hsel, .so
  );

  assign memctrl_hsel    = hsel[SLV_MEMCTRL];
  assign dsu_hsel        = hsel[SLV_DSU];
  assign so[SLV_MEMCTRL] = memctrl_so;
  assign so[SLV_DSU]     = dsu_so;

  // ---------------------------------------------------------------------
  // APB
  // ---------------------------------------------------------------------
  apb_slv_in_t     apbi;
  logic [NAPB-1:0] psel;
  logic [31:0]     prdata [NAPB];
  logic [31:0]     aes_prdata, fir_prdata;

  apb_bridge #(.NSLOT(NAPB)) u_apb (
    .clk, .rst_n, .si(ahb_si), .hsel(hsel[SLV_APB]), .so(so[SLV_APB]),
    .apbo(apbi), .psel, .prdata
  );

  always_comb begin
    for (int unsigned i = 0; i < NAPB; i++) prdata[i] = apb_prdata_i[i];
    prdata[APB_AES_SLOT] = aes_prdata;
    prdata[APB_FIR_SLOT] = fir_prdata;
    apb_psel_o = psel;
    apb_psel_o[APB_AES_SLOT] = 1'b0;
    apb_psel_o[APB_FIR_SLOT] = 1'b0;
  end
  assign apb_o = apbi;

  // ---------------------------------------------------------------------
  // IP blocks (AHB masters 1 and 2)
  // ---------------------------------------------------------------------
  aes_amba #(.RAM_WORDS(AES_RAM_WORDS), .KEY_BITS(AES_KEY_BITS)) u_aes (
    .clk, .rst_n, .apbi, .psel(psel[APB_AES_SLOT]), .prdata(aes_prdata),
    .mi(mi[MST_AES]), .mo(mo[MST_AES])
  );

  fir_amba #(.NTAPS(FIR_TAPS), .RAM_WORDS(FIR_RAM_WORDS)) u_fir (
    .clk, .rst_n, .apbi, .psel(psel[APB_FIR_SLOT]), .prdata(fir_prdata),
    .mi(mi[MST_FIR]), .mo(mo[MST_FIR])
  );

  // ---------------------------------------------------------------------
  // LEON-2 memories on Artisan macros
  // ---------------------------------------------------------------------
  for (genvar r = 0; r < 2; r++) begin : g_rf
    leon_dpram_box #(.ABITS(RF_ABITS), .DBITS(32)) u_rf (
      .clk, .rdaddress(rf_i[r].rdaddress), .rden(rf_i[r].rden), .dataout(rf_o[r]),
      .wraddress(rf_i[r].wraddress), .wren(rf_i[r].wren), .datain(rf_i[r].datain)
    );
  end

  leon_syncram_box #(.ABITS(TAG_ABITS), .DBITS(TAG_BITS)) u_itag (
    .clk, .address(itag_i.address), .datain(itag_i.datain), .dataout(itag_o),
    .enable(itag_i.enable), .write(itag_i.write)
  );
  leon_syncram_box #(.ABITS(DAT_ABITS), .DBITS(32)) u_idata (
    .clk, .address(idata_i.address), .datain(idata_i.datain), .dataout(idata_o),
    .enable(idata_i.enable), .write(idata_i.write)
  );
  leon_syncram_box #(.ABITS(TAG_ABITS), .DBITS(TAG_BITS)) u_dtag (
    .clk, .address(dtag_i.address), .datain(dtag_i.datain), .dataout(dtag_o),
    .enable(dtag_i.enable), .write(dtag_i.write)
  );
  leon_syncram_box #(.ABITS(DAT_ABITS), .DBITS(32)) u_ddata (
    .clk, .address(ddata_i.address), .datain(ddata_i.datain), .dataout(ddata_o),
    .enable(ddata_i.enable), .write(ddata_i.write)
  );

endmodule
