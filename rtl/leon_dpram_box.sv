// LEON-2 register-file RAM (one write port, one read port) on an Artisan
// dual-port macro.
//
// The LEON-2 register file is built from two-port RAMs: one port writes,
// the other reads, both with inputs launched by the rising clock edge.  As
// in leon_syncram_box the macro is clocked with the inverted clock so it
// samples the LEON-2 signals half a cycle after launch, and the read data is
// re-timed by a rising-edge register, so DATAOUT holds the word addressed in
// cycle N for all of cycle N+1.  Port A of the macro is the write port, port
// B the read port.  A read of the address written in the same cycle returns
// the old word (the write lands at the same falling edge).  The platform
// uses a 256-word macro for the 136 x 32 register file.
module leon_dpram_box #(
  parameter int unsigned ABITS = 8,
  parameter int unsigned DBITS = 32
) (
  input  logic             clk,
  input  logic [ABITS-1:0] rdaddress,
  input  logic             rden,
  output logic [DBITS-1:0] dataout,
  input  logic [ABITS-1:0] wraddress,
  input  logic             wren,
  input  logic [DBITS-1:0] datain
);

  logic             clk_n;
  logic [DBITS-1:0] qa, qb;

  assign clk_n = ~clk;

  artisan_dpram #(.WORDS(2**ABITS), .BITS(DBITS)) u_ram (
    .CLKA(clk_n), .CENA(~wren), .WENA(1'b0), .AA(wraddress), .DA(datain), .QA(qa),
    .CLKB(clk_n), .CENB(~rden), .WENB(1'b1), .AB(rdaddress), .DB('0),     .QB(qb)
  );

  always_ff @(posedge clk) dataout <= qb;

endmodule
