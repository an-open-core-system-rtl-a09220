// Testbench for ahb_dma_master: loads and stores of random length between a
// behavioural AHB memory with random wait states and two buffer RAMs, while
// the testbench's arbiter takes the grant away at random moments.  Checks
// the data moved, the DONE pulse, and the ERR flag when a transfer hits an
// address that answers ERROR.  Counts grant losses in mid-burst and wait
// states, and fails if either never happened.
module tb_ahb_dma_master;
  import amba_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  logic start = 0, write = 0, busy, done, err;
  logic [31:0] addr0 = '0;
  logic [AW-1:0] ram_base = '0;
  logic [AW:0] nwords = '0;
  logic [AW-1:0] ram_raddr, ram_waddr;
  logic [31:0] ram_rdata, ram_wdata;
  logic ram_we;
  ahb_mst_in_t  mi;
  ahb_mst_out_t mo;
  ahb_slv_in_t  si;
  ahb_slv_out_t so;
  int unsigned waits, errs;
  logic grant, owner;
  int checks = 0, failures = 0, regrants = 0;

  always #5 clk = ~clk;

  ahb_dma_master #(.AW(AW)) dut (.clk, .rst_n, .start, .write, .addr0, .ram_base, .nwords, .busy, .done, .err,
    .ram_raddr, .ram_rdata, .ram_we, .ram_waddr, .ram_wdata, .mi, .mo);

  dw_ram #(.DEPTH(64)) u_in  (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata), .raddr(6'd0), .rdata());
  dw_ram #(.DEPTH(64)) u_out (.clk, .we(1'b0), .waddr(6'd0), .wdata(32'd0), .raddr(ram_raddr), .rdata(ram_rdata));

  tb_ahb_mem #(.WORDS(1024), .MAXWAIT(2), .ERR_BASE(32'h0000_1000)) u_mem (
    .clk, .rst_n, .si, .hsel(1'b1), .so, .waits, .errs);

  // Arbiter stand-in: grants on request, but withdraws it now and then.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin grant <= 0; owner <= 0; end
    else if (mi.hready) begin
      owner <= grant;
      grant <= mo.hbusreq && ($urandom_range(4, 0) != 0);
      if (owner && grant && mo.hbusreq && mo.htrans == HTRANS_SEQ) ; // keep
    end
  end
  always @(posedge clk) if (mi.hready && owner && mo.htrans == HTRANS_NONSEQ && dut.issued != 0) regrants++;

  always_comb begin
    si = '{haddr: mo.haddr, hwrite: mo.hwrite, htrans: owner ? mo.htrans : HTRANS_IDLE, hsize: mo.hsize,
           hburst: mo.hburst, hwdata: mo.hwdata, hprot: mo.hprot, hready: so.hready, hmaster: 4'd1, hmastlock: 1'b0};
    mi = '{hgrant: grant, hready: so.hready, hresp: so.hresp, hrdata: so.hrdata};
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic w, logic [31:0] a, int base, int n);
    int pulses = 0;
    @(negedge clk);
    start = 1; write = w; addr0 = a; ram_base = AW'(base); nwords = (AW+1)'(n);
    @(negedge clk);
    start = 0;
    while (busy) begin @(negedge clk); if (done) pulses++; end
    repeat (2) begin @(negedge clk); if (done) pulses++; end
    checks++;
    if (pulses != 1) begin failures++; $display("FAIL done pulses %0d", pulses); end
  endtask

  initial begin
    int n, base, w0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = $urandom;
    for (int t = 0; t < 60; t++) begin
      n = $urandom_range(40, 1); base = $urandom_range(63 - n, 0); w0 = $urandom_range(900, 0);
      // load
      run(1'b0, 32'(4 * w0), base, n);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (u_in.mem[base + i] !== u_mem.mem[w0 + i]) begin failures++; $display("FAIL load word %0d", i); end
      end
      checks++; if (err) begin failures++; $display("FAIL unexpected err"); end
      // store
      for (int i = 0; i < 64; i++) u_out.mem[i] = $urandom;
      w0 = $urandom_range(900, 0);
      run(1'b1, 32'(4 * w0), base, n);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (u_mem.mem[w0 + i] !== u_out.mem[base + i]) begin failures++; $display("FAIL store word %0d", i); end
      end
    end
    // a burst that runs into the ERROR region stops with ERR
    run(1'b0, 32'h0000_0ff0, 0, 10);
    checks++; if (!err || errs == 0) begin failures++; $display("FAIL error not reported"); end
    run(1'b0, 32'h0, 0, 4);
    checks++; if (err) begin failures++; $display("FAIL err not cleared"); end
    checks++; if (regrants == 0 || waits == 0) begin failures++; $display("FAIL coverage"); end
    $display("regrants=%0d wait_states=%0d", regrants, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
