// Synchronous buffer RAM for the IP blocks' input and output data.
//
// Each IP block of the platform has one RAM in front of the core (filled
// from system memory over AHB) and one behind it (emptied back to system
// memory).  This RAM has one write port and one read port on the same clock;
// a write lands at the rising edge, and the read data for RADDR appears one
// clock after RADDR is presented (registered read).  Reading and writing the
// same address in one cycle returns the old word.
//
// The array is built from flip-flops, in the manner of the DesignWare
// flip-flop RAMs, so that the asynchronous active-low reset can clear every
// word together with the read register: the platform's guidelines ask for a
// reset that initialises all registers and RAMs of an IP block.  Word width
// is 32 bits as those guidelines fix; the depth is a parameter (this
// design's choice).
module dw_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end

endmodule
