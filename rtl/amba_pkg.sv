// AMBA 2.0 AHB/APB types shared by the platform.
//
// The platform follows the bus scheme of the LEON-2 distribution: every AHB
// master drives an ahb_mst_out_t record and receives an ahb_mst_in_t record,
// every AHB slave receives an ahb_slv_in_t record and drives an ahb_slv_out_t
// record, and APB slaves see one shared apb_slv_in_t request plus their own
// PSEL.  Address and data are 32 bits wide, as the platform's IP-block
// guidelines require.  The address map constants are those of the default
// LEON-2 configuration; the APB slot numbers for the AES and FIR wrappers are
// the platform's own additions.
package amba_pkg;

  localparam int unsigned HAW = 32;   // address width
  localparam int unsigned HDW = 32;   // data width

  // HTRANS
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  // HBURST
  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_t;

  // HRESP (AMBA 2)
  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_t;

  // HSIZE values used here
  localparam logic [2:0] HSIZE_BYTE = 3'b000;
  localparam logic [2:0] HSIZE_HALF = 3'b001;
  localparam logic [2:0] HSIZE_WORD = 3'b010;

  // Master -> interconnect
  typedef struct packed {
    logic            hbusreq;
    logic            hlock;
    htrans_t         htrans;
    logic [HAW-1:0]  haddr;
    logic            hwrite;
    logic [2:0]      hsize;
    hburst_t         hburst;
    logic [3:0]      hprot;
    logic [HDW-1:0]  hwdata;
  } ahb_mst_out_t;

  // Interconnect -> master
  typedef struct packed {
    logic            hgrant;
    logic            hready;
    hresp_t          hresp;
    logic [HDW-1:0]  hrdata;
  } ahb_mst_in_t;

  // Interconnect -> slave (HSEL travels separately)
  typedef struct packed {
    logic [HAW-1:0]  haddr;
    logic            hwrite;
    htrans_t         htrans;
    logic [2:0]      hsize;
    hburst_t         hburst;
    logic [HDW-1:0]  hwdata;
    logic [3:0]      hprot;
    logic            hready;      // HREADY of the whole bus
    logic [3:0]      hmaster;
    logic            hmastlock;
  } ahb_slv_in_t;

  // Slave -> interconnect
  typedef struct packed {
    logic            hready;      // HREADYOUT
    hresp_t          hresp;
    logic [HDW-1:0]  hrdata;
  } ahb_slv_out_t;

  // APB request shared by every APB slave (PSEL travels separately)
  typedef struct packed {
    logic            penable;
    logic [HAW-1:0]  paddr;
    logic            pwrite;
    logic [HDW-1:0]  pwdata;
  } apb_slv_in_t;

  // ---------------------------------------------------------------------
  // Platform configuration
  // ---------------------------------------------------------------------
  // AHB masters: the index is also the arbitration priority (higher wins).
  localparam int unsigned MST_LEON = 0;
  localparam int unsigned MST_AES  = 1;
  localparam int unsigned MST_FIR  = 2;
  localparam int unsigned NMST     = 3;

  // AHB slaves and their address ranges (default LEON-2 map).
  localparam int unsigned SLV_MEMCTRL = 0;   // 0x00000000 - 0x7FFFFFFF
  localparam int unsigned SLV_APB     = 1;   // 0x80000000 - 0x8FFFFFFF
  localparam int unsigned SLV_DSU     = 2;   // 0x90000000 - 0x9FFFFFFF
  localparam int unsigned NSLV        = 3;

  // APB slot table: one entry per slave slot, PADDR[9:0] first..last.
  typedef struct packed {
    logic [9:0] first;
    logic [9:0] last;
    logic       enable;
  } apb_slot_t;

  localparam int unsigned NAPB = 16;          // 15 slots used, one spare
  localparam int unsigned APB_FIR_SLOT = 13;  // former PCI-arbiter slot
  localparam int unsigned APB_AES_SLOT = 14;

  localparam apb_slot_t APB_SLOTS [NAPB] = '{
    '{10'h000, 10'h008, 1'b1},   //  0 memory controller
    '{10'h00C, 10'h010, 1'b0},   //  1 AHB status register
    '{10'h014, 10'h018, 1'b1},   //  2 cache controller
    '{10'h01C, 10'h020, 1'b0},   //  3 write protection
    '{10'h024, 10'h024, 1'b1},   //  4 configuration register
    '{10'h040, 10'h06C, 1'b1},   //  5 timers
    '{10'h070, 10'h07C, 1'b1},   //  6 UART 1
    '{10'h080, 10'h08C, 1'b1},   //  7 UART 2
    '{10'h090, 10'h09C, 1'b1},   //  8 interrupt controller
    '{10'h0A0, 10'h0AC, 1'b1},   //  9 I/O port
    '{10'h0B0, 10'h0BC, 1'b0},   // 10 second interrupt controller
    '{10'h0C0, 10'h0CC, 1'b0},   // 11 DSU UART
    '{10'h100, 10'h1FC, 1'b0},   // 12 PCI configuration
    '{10'h200, 10'h2FC, 1'b1},   // 13 FIR block
    '{10'h300, 10'h3FF, 1'b1},   // 14 AES block
    '{10'h3FF, 10'h000, 1'b0}    // 15 unused
  };

  // AHB slave decode by address bits [31:28]
  function automatic logic [NSLV-1:0] ahb_decode(logic [HAW-1:0] a);
    logic [NSLV-1:0] s;
    s = '0;
    if (a[31] == 1'b0)          s[SLV_MEMCTRL] = 1'b1;
    else if (a[31:28] == 4'h8)  s[SLV_APB]     = 1'b1;
    else if (a[31:28] == 4'h9)  s[SLV_DSU]     = 1'b1;
    return s;
  endfunction

endpackage
