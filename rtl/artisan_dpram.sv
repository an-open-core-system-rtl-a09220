// Behavioural model of an Artisan TSMC 0.18 um synchronous dual-port SRAM.
//
// The real part is a hard macro produced by the Artisan RAM generator; this
// model stands in for it in simulation and lint only and is not meant for
// synthesis.  Both ports reach the same WORDS x BITS array.  Each port
// latches its address, data, chip enable (CENx, active low) and write enable
// (WENx, active low) on the rising edge of its own clock.  A read (CEN low,
// WEN high) drives the word onto Qx after that edge and holds it until the
// next read on that port; a write (CEN and WEN low) stores Dx and leaves Qx
// unchanged.  When both ports write one address in the same instant the
// result is undefined in the real part, and in this model as well (it
// depends on the order the simulator runs the two port processes).  Sizes used in the
// platform: 256x32 (the 136x32 register-file RAM rounded up by the
// generator), 256x27 (cache tags) and 2048x32 (cache data).
//
// The array is written from two processes, one per port clock, because the
// two ports are independent clock domains of one storage array; lint
// reports this as a multiply driven signal, which is what a true dual-port
// memory is.  In the platform both clocks are the same inverted clock and
// the wrappers never write through both ports.
module artisan_dpram #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned BITS  = 32,
  localparam int unsigned ABW  = $clog2(WORDS)
) (
  input  logic            CLKA,
  input  logic            CENA,
  input  logic            WENA,
  input  logic [ABW-1:0]   AA,
  input  logic [BITS-1:0] DA,
  output logic [BITS-1:0] QA,
  input  logic            CLKB,
  input  logic            CENB,
  input  logic            WENB,
  input  logic [ABW-1:0]   AB,
  input  logic [BITS-1:0] DB,
  output logic [BITS-1:0] QB
);

  logic [BITS-1:0] mem [WORDS];

  initial begin
    QA = '0;
    QB = '0;
  end

  always @(posedge CLKA) begin
    if (!CENA) begin
      if (!WENA) mem[AA] <= DA;
      else       QA <= mem[AA];
    end
  end

  always @(posedge CLKB) begin
    if (!CENB) begin
      if (!WENB) mem[AB] <= DB;
      else       QB <= mem[AB];
    end
  end

endmodule
