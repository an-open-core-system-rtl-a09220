// Behavioural AHB master standing in for the LEON-2 processor in the
// testbenches.  Single word transfers issued by the tasks below; the model
// requests the bus, waits until it owns it (HGRANT and HREADY high), runs
// the address and data phases and releases the request.  Signals are driven
// and sampled at the falling clock edge.
module tb_ahb_cpu
  import amba_pkg::*;
(
  input  logic         clk,
  input  ahb_mst_in_t  mi,
  output ahb_mst_out_t mo
);

  int unsigned wait_grant_cycles = 0;   // cycles spent waiting for the bus
  hresp_t      last_resp;

  initial begin
    mo = '0;
    mo.htrans = HTRANS_IDLE;
    mo.hsize  = HSIZE_WORD;
  end

  task automatic xfer(input logic [31:0] addr, input logic write,
                      input logic [31:0] wdata, output logic [31:0] rdata);
    @(negedge clk);
    mo.hbusreq = 1'b1;
    while (!(mi.hgrant && mi.hready)) begin
      wait_grant_cycles++;
      @(negedge clk);
    end
    @(negedge clk);                 // we own the address bus in this cycle
    mo.htrans = HTRANS_NONSEQ;
    mo.haddr  = addr;
    mo.hwrite = write;
    mo.hsize  = HSIZE_WORD;
    mo.hburst = HBURST_SINGLE;
    while (!mi.hready) @(negedge clk);
    @(negedge clk);                 // data phase
    mo.htrans  = HTRANS_IDLE;
    mo.hbusreq = 1'b0;
    mo.hwdata  = wdata;
    while (!mi.hready) @(negedge clk);
    rdata     = mi.hrdata;
    last_resp = mi.hresp;
  endtask

  task automatic write32(input logic [31:0] addr, input logic [31:0] data);
    logic [31:0] d;
    xfer(addr, 1'b1, data, d);
  endtask

  task automatic read32(input logic [31:0] addr, output logic [31:0] data);
    xfer(addr, 1'b0, 32'h0, data);
  endtask

endmodule
