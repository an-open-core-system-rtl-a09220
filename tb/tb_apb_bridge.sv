// Testbench for apb_bridge: AHB single transfers from a behavioural master
// to random APB addresses.  Simple APB register slaves sit in every slot.
// Checks the slot decode against the LEON-2 table (disabled slots never
// selected), the SETUP/ENABLE sequence, write data, read data, and the one
// wait state each APB access costs.
module tb_apb_bridge;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  ahb_mst_out_t mo;
  ahb_mst_in_t  mi;
  ahb_slv_in_t  si;
  ahb_slv_out_t so;
  apb_slv_in_t  apbo;
  logic [15:0]  psel;
  logic [31:0]  prdata [16];
  logic [31:0]  apbmem [256];
  int checks = 0, failures = 0, accesses = 0, setup_cycles = 0;

  always #5 clk = ~clk;

  tb_ahb_cpu u_cpu (.clk, .mi, .mo);

  // single master, single slave: grant always, address map not involved
  always_comb begin
    si = '{haddr: mo.haddr, hwrite: mo.hwrite, htrans: mo.htrans, hsize: mo.hsize, hburst: mo.hburst,
           hwdata: mo.hwdata, hprot: mo.hprot, hready: so.hready, hmaster: 4'd0, hmastlock: 1'b0};
    mi = '{hgrant: 1'b1, hready: so.hready, hresp: so.hresp, hrdata: so.hrdata};
  end

  apb_bridge #(.NSLOT(16)) dut (.clk, .rst_n, .si, .hsel(1'b1), .so, .apbo, .psel, .prdata);

  // APB register slaves: slot i returns {i, stored[23:0]}
  always_comb
    for (int i = 0; i < 16; i++) prdata[i] = psel[i] ? {8'(i), apbmem[apbo.paddr[9:2]][23:0]} : 32'hdead_beef;

  always @(posedge clk) begin
    if (psel != 0 && !apbo.penable) setup_cycles <= setup_cycles + 1;
    if (psel != 0 && apbo.penable) begin
      accesses <= accesses + 1;
      if (apbo.pwrite) apbmem[apbo.paddr[9:2]] <= apbo.pwdata;
    end
  end

  // ENABLE must follow SETUP with the same select
  logic [15:0] psel_q; logic pen_q;
  always @(posedge clk) begin
    psel_q <= psel; pen_q <= apbo.penable;
    if (rst_n && apbo.penable && (psel != psel_q || pen_q)) begin
      failures++; $display("FAIL APB protocol at %0t", $time);
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int slot_of(logic [9:0] a);
    for (int i = 0; i < NAPB; i++)
      if (APB_SLOTS[i].enable && a >= APB_SLOTS[i].first && a <= APB_SLOTS[i].last) return i;
    return -1;
  endfunction

  initial begin
    logic [31:0] a, d, r;
    int s, t0, n0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      a = 32'h8000_0000 | {22'd0, 8'($urandom), 2'b00};
      d = $urandom;
      s = slot_of(a[9:0]);
      @(negedge clk);
      n0 = accesses;
      u_cpu.write32(a, d);
      @(negedge clk);
      checks++;
      if ((s >= 0) != (accesses == n0 + 1)) begin failures++; $display("FAIL select for %h slot %0d", a, s); end
      t0 = int'($time);
      u_cpu.read32(a, r);
      checks++;
      if (s >= 0 && r !== {8'(s), d[23:0]}) begin failures++; $display("FAIL read %h: %h slot %0d", a, r, s); end
      if (s < 0 && r !== 32'h0) begin failures++; $display("FAIL unmapped read %h: %h", a, r); end
    end
    // the AES and FIR windows are decoded
    checks++;
    if (slot_of(10'h300) != APB_AES_SLOT || slot_of(10'h318) != APB_AES_SLOT || slot_of(10'h200) != APB_FIR_SLOT) begin
      failures++; $display("FAIL slot table");
    end
    checks++;
    if (setup_cycles != accesses) begin failures++; $display("FAIL setup %0d enable %0d", setup_cycles, accesses); end
    $display("apb_accesses=%0d", accesses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
