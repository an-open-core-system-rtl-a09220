// Port bundles of the platform top for the LEON-2 processor memories.
//
// The LEON-2 register file and caches are built from Artisan RAM macros
// behind wrappers (leon_dpram_box, leon_syncram_box).  The processor logic
// that drives them is not part of this RTL, so the top brings their
// processor-side ports out; these records group them.  Sizes are those of
// the platform's configuration: 136 x 32 register file in a 256-word macro,
// 8 KB direct-mapped instruction and data caches with 32-byte lines (256
// tags of 27 bits, 2048 data words).
package soc_pkg;

  localparam int unsigned RF_ABITS  = 8;    // 256 words (136 used)
  localparam int unsigned TAG_ABITS = 8;    // 256 lines
  localparam int unsigned TAG_BITS  = 27;
  localparam int unsigned DAT_ABITS = 11;   // 2048 words = 8 KB

  typedef struct packed {
    logic [RF_ABITS-1:0] rdaddress;
    logic                rden;
    logic [RF_ABITS-1:0] wraddress;
    logic                wren;
    logic [31:0]         datain;
  } rf_ram_in_t;

  typedef struct packed {
    logic [TAG_ABITS-1:0] address;
    logic [TAG_BITS-1:0]  datain;
    logic                 enable;
    logic                 write;
  } tag_ram_in_t;

  typedef struct packed {
    logic [DAT_ABITS-1:0] address;
    logic [31:0]          datain;
    logic                 enable;
    logic                 write;
  } data_ram_in_t;

endpackage
