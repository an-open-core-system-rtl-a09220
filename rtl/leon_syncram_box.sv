// LEON-2 single-port synchronous RAM built on an Artisan dual-port macro.
//
// The LEON-2 caches use a synchronous RAM whose address, data, enable and
// write inputs are launched by the rising clock edge and whose read data is
// used during the following cycle.  The Artisan macro also samples its
// inputs on a rising edge, but needs them set up before that edge, so
// driving it straight from LEON-2 signals that change at the same edge
// fails.  This wrapper clocks the macro with the inverted clock, so it
// samples the LEON-2 signals half a cycle after they were launched, and
// re-times the macro output with a rising-edge register, so DATAOUT holds
// the word addressed in cycle N for the whole of cycle N+1, exactly as the
// LEON-2 behavioural RAM does.  It also converts the active-high ENABLE and
// WRITE to the macro's active-low CEN and WEN.  Only port A of the macro is
// used (the platform uses dual-port macros for all its RAMs); port B is
// held disabled.  The wrapper's existence and purpose follow the platform;
// the half-cycle scheme is this design's reading of it.
module leon_syncram_box #(
  parameter int unsigned ABITS = 11,
  parameter int unsigned DBITS = 32
) (
  input  logic             clk,
  input  logic [ABITS-1:0] address,
  input  logic [DBITS-1:0] datain,
  output logic [DBITS-1:0] dataout,
  input  logic             enable,
  input  logic             write
);

  logic             clk_n;
  logic [DBITS-1:0] qa, qb;

  assign clk_n = ~clk;

  artisan_dpram #(.WORDS(2**ABITS), .BITS(DBITS)) u_ram (
    .CLKA(clk_n), .CENA(~enable), .WENA(~write), .AA(address), .DA(datain), .QA(qa),
    .CLKB(clk_n), .CENB(1'b1),    .WENB(1'b1),   .AB('0),      .DB('0),     .QB(qb)
  );

  always_ff @(posedge clk) dataout <= qa;

endmodule
