// End-to-end testbench of the platform at its default sizes.
//
// A behavioural processor (AHB master 0) places an AES key with fifteen
// plaintext blocks and a 16-tap FIR job of 240 samples in memory, programs
// both IP blocks over the APB and starts them together, then keeps polling
// their STATUS registers while they move data over the AHB.  Both results
// are checked against reference models.  A second AES job then decrypts
// the ciphertext with the inverse cipher and must give back the plaintext.
// The run also exercises a LEON-2
// peripheral APB slot, the debug-support-unit AHB slot, an unmapped address
// (default-slave ERROR) and the register-file and cache RAM wrappers.
//
// Mechanisms counted (a failure is counted for any that never happens):
// FIR taking the bus while AES requests it (priority), the processor kept
// waiting for the bus, memory wait states, APB accesses to each IP block,
// AES (encrypt and decrypt) and FIR completions, default-slave errors, DSU and peripheral
// accesses, and RAM wrapper read-backs.
module tb_soc_platform;
  import amba_pkg::*;
  import soc_pkg::*;
  import aes_ref_pkg::*;

  localparam int NT = 16, NS = 240, NB = 15;

  logic clk = 0, rst_n = 0;
  ahb_mst_out_t cpu_mo;
  ahb_mst_in_t  cpu_mi;
  ahb_slv_in_t  ahb_si;
  logic         memctrl_hsel, dsu_hsel;
  ahb_slv_out_t memctrl_so, dsu_so;
  apb_slv_in_t  apb_o;
  logic [NAPB-1:0] apb_psel_o;
  logic [31:0]  apb_prdata_i [NAPB];
  rf_ram_in_t   rf_i [2];
  logic [31:0]  rf_o [2];
  tag_ram_in_t  itag_i, dtag_i;
  data_ram_in_t idata_i, ddata_i;
  logic [TAG_BITS-1:0] itag_o, dtag_o;
  logic [31:0]  idata_o, ddata_o;
  int unsigned  waits, errs, dsu_waits, dsu_errs;
  int checks = 0, failures = 0;

  // mechanism counters
  int fir_over_aes = 0, cpu_waits = 0, aes_apb = 0, fir_apb = 0, periph_apb = 0;
  int aes_dec_n = 0, aes_done_n = 0, fir_done_n = 0, default_errs = 0, dsu_acc = 0, ram_checks = 0;

  always #5 clk = ~clk;

  soc_platform dut (
    .clk, .rst_n, .cpu_mo, .cpu_mi, .ahb_si, .memctrl_hsel, .memctrl_so, .dsu_hsel, .dsu_so,
    .apb_o, .apb_psel_o, .apb_prdata_i, .rf_i, .rf_o, .itag_i, .itag_o, .idata_i, .idata_o,
    .dtag_i, .dtag_o, .ddata_i, .ddata_o);

  tb_ahb_cpu u_cpu (.clk, .mi(cpu_mi), .mo(cpu_mo));
  tb_ahb_mem #(.WORDS(8192), .MAXWAIT(2)) u_mem (
    .clk, .rst_n, .si(ahb_si), .hsel(memctrl_hsel), .so(memctrl_so), .waits, .errs);
  tb_ahb_mem #(.WORDS(64), .MAXWAIT(1), .ERR_BASE(32'hffff_ffff)) u_dsu (
    .clk, .rst_n, .si(ahb_si), .hsel(dsu_hsel), .so(dsu_so), .waits(dsu_waits), .errs(dsu_errs));

  // LEON-2 APB peripherals: one register per slot
  logic [31:0] preg [NAPB];
  always_comb for (int i = 0; i < NAPB; i++) apb_prdata_i[i] = apb_psel_o[i] ? preg[i] : 32'h0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NAPB; i++)
      if (apb_psel_o[i] && apb_o.penable) begin
        periph_apb++;
        if (apb_o.pwrite) preg[i] <= apb_o.pwdata;
      end
    if (dut.psel[APB_AES_SLOT] && apb_o.penable) aes_apb++;
    if (dut.psel[APB_FIR_SLOT] && apb_o.penable) fir_apb++;
    if (dut.mo[MST_AES].hbusreq && dut.hgrant[MST_FIR]) fir_over_aes++;
    if (cpu_mo.hbusreq && !cpu_mi.hgrant) cpu_waits++;
    if (dut.u_aes.core_done) aes_done_n++;
    if (dut.u_fir.core_done) fir_done_n++;
    if (dut.u_aes.u_inv.done) aes_dec_n++;
    if (dut.u_mux.def_active && dut.u_mux.def_err2) default_errs++;
    if (dsu_hsel && ahb_si.htrans[1] && ahb_si.hready) dsu_acc++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word index of an address in the memory model
  function automatic int widx(logic [31:0] a);
    return int'((a >> 2) % 8192);
  endfunction

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Write and read back the processor memories through the wrappers.
  task automatic ram_test();
    logic [31:0] dv [16];
    logic [26:0] tv [16];
    for (int i = 0; i < 16; i++) begin
      dv[i] = $urandom; tv[i] = 27'($urandom);
      @(posedge clk);
      idata_i <= '{address: 11'(100 + i), datain: dv[i], enable: 1'b1, write: 1'b1};
      ddata_i <= '{address: 11'(2000 + i), datain: ~dv[i], enable: 1'b1, write: 1'b1};
      itag_i  <= '{address: 8'(i), datain: tv[i], enable: 1'b1, write: 1'b1};
      dtag_i  <= '{address: 8'(200 + i), datain: ~tv[i], enable: 1'b1, write: 1'b1};
      rf_i[0] <= '{rdaddress: 8'd0, rden: 1'b0, wraddress: 8'(i), wren: 1'b1, datain: dv[i]};
      rf_i[1] <= '{rdaddress: 8'd0, rden: 1'b0, wraddress: 8'(135 - i), wren: 1'b1, datain: ~dv[i]};
    end
    for (int i = 0; i < 16; i++) begin
      @(posedge clk);
      idata_i <= '{address: 11'(100 + i), datain: 32'h0, enable: 1'b1, write: 1'b0};
      ddata_i <= '{address: 11'(2000 + i), datain: 32'h0, enable: 1'b1, write: 1'b0};
      itag_i  <= '{address: 8'(i), datain: 27'h0, enable: 1'b1, write: 1'b0};
      dtag_i  <= '{address: 8'(200 + i), datain: 27'h0, enable: 1'b1, write: 1'b0};
      rf_i[0] <= '{rdaddress: 8'(i), rden: 1'b1, wraddress: 8'd0, wren: 1'b0, datain: 32'h0};
      rf_i[1] <= '{rdaddress: 8'(135 - i), rden: 1'b1, wraddress: 8'd0, wren: 1'b0, datain: 32'h0};
      @(posedge clk);
      idata_i.enable <= 1'b0; ddata_i.enable <= 1'b0; itag_i.enable <= 1'b0; dtag_i.enable <= 1'b0;
      rf_i[0].rden <= 1'b0; rf_i[1].rden <= 1'b0;
      #1;
      chk(idata_o == dv[i] && ddata_o == ~dv[i] && itag_o == tv[i] && dtag_o == ~tv[i] &&
          rf_o[0] == dv[i] && rf_o[1] == ~dv[i], "cache/register-file RAM read-back");
      ram_checks++;
    end
  endtask

  initial begin
    logic [127:0] key, pt [NB];
    logic signed [15:0] c [NT], x [NS];
    logic [31:0] r, st_a, st_f;
    int unsigned t_start, t_aes, t_fir;
    localparam logic [31:0] AES_SRC = 32'h4000_1000, AES_DST = 32'h4000_2000;
    localparam logic [31:0] FIR_SRC = 32'h4000_3000, FIR_DST = 32'h4000_4000;
    localparam logic [31:0] DEC_SRC = 32'h4000_5000, DEC_DST = 32'h4000_6000;
    localparam logic [31:0] AES_REG = 32'h8000_0300, FIR_REG = 32'h8000_0200;

    idata_i = '0; ddata_i = '0; itag_i = '0; dtag_i = '0; rf_i[0] = '0; rf_i[1] = '0;
    for (int i = 0; i < NAPB; i++) preg[i] = 32'h0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Job data: the key goes through the bus, the rest is preloaded.
    key = {$urandom, $urandom, $urandom, $urandom};
    for (int w = 0; w < 4; w++) u_cpu.write32(AES_SRC + 4*w, key[127 - 32*w -: 32]);
    for (int w = 0; w < 4; w++) begin
      u_cpu.read32(AES_SRC + 4*w, r);
      chk(r == key[127 - 32*w -: 32], "memory write/read through the AHB");
    end
    for (int b = 0; b < NB; b++) begin
      pt[b] = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 4; w++) u_mem.mem[widx(AES_SRC) + 4 + 4*b + w] = pt[b][127 - 32*w -: 32];
    end
    for (int k = 0; k < NT; k++) begin
      c[k] = 16'($urandom);
      u_mem.mem[widx(FIR_SRC) + k] = {16'h0, c[k]};
    end
    for (int i = 0; i < NS; i++) begin
      x[i] = 16'($urandom);
      u_mem.mem[widx(FIR_SRC) + NT + i] = {16'h0, x[i]};
    end

    // LEON-2 peripheral slot (timers), DSU window, unmapped address
    u_cpu.write32(32'h8000_0040, 32'h1234_5678);
    u_cpu.read32(32'h8000_0044, r);
    chk(r == 32'h1234_5678 && preg[5] == 32'h1234_5678, "timer slot register");
    u_cpu.write32(32'h9000_0010, 32'hcafe_f00d);
    @(negedge clk);
    chk(u_dsu.mem[4] == 32'hcafe_f00d, "DSU slot write");
    u_cpu.read32(32'ha000_0000, r);
    chk(u_cpu.last_resp == HRESP_ERROR, "unmapped address answers ERROR");
    u_cpu.read32(32'h8000_0044, r);
    chk(u_cpu.last_resp == HRESP_OKAY, "bus recovers after ERROR");

    // Program both blocks, FIR first, then AES.
    u_cpu.write32(FIR_REG + 32'h00, FIR_SRC);
    u_cpu.write32(FIR_REG + 32'h04, FIR_DST);
    u_cpu.write32(FIR_REG + 32'h08, NT + NS);
    u_cpu.write32(FIR_REG + 32'h0c, NS);
    u_cpu.write32(FIR_REG + 32'h18, NS);
    u_cpu.write32(AES_REG + 32'h00, AES_SRC);
    u_cpu.write32(AES_REG + 32'h04, AES_DST);
    u_cpu.write32(AES_REG + 32'h08, 4 + 4*NB);
    u_cpu.write32(AES_REG + 32'h0c, 4*NB);
    u_cpu.write32(AES_REG + 32'h18, NB);
    u_cpu.read32(AES_REG + 32'h00, r);
    chk(r == AES_SRC, "AES register readback over APB");
    t_start = $time / 10;
    u_cpu.write32(AES_REG + 32'h10, 7);
    u_cpu.write32(FIR_REG + 32'h10, 7);
    t_aes = 0; t_fir = 0;
    fork
      ram_test();
      do begin
        u_cpu.read32(AES_REG + 32'h14, st_a);
        if (!st_a[0] && t_aes == 0) t_aes = $time / 10 - t_start;
        u_cpu.read32(FIR_REG + 32'h14, st_f);
        if (!st_f[0] && t_fir == 0) t_fir = $time / 10 - t_start;
      end while (st_a[0] || st_f[0]);
    join
    chk(st_a[4:1] == 4'b0111 && st_f[4:1] == 4'b0111, "both blocks report LOAD, GO and STORE done");

    for (int b = 0; b < NB; b++) begin
      logic [127:0] ct;
      for (int w = 0; w < 4; w++) ct[127 - 32*w -: 32] = u_mem.mem[widx(AES_DST) + 4*b + w];
      chk(ct == ref_encrypt(key, pt[b]), $sformatf("AES block %0d", b));
    end
    for (int i = 0; i < NS; i++) begin
      logic signed [35:0] s;
      s = 0;
      for (int k = 0; k < NT; k++) if (i - k >= 0) s += 36'(c[k]) * 36'(x[i-k]);
      chk(u_mem.mem[widx(FIR_DST) + i] == s[31:0], $sformatf("FIR output %0d", i));
    end
    // one ciphertext word read by the processor through the bus
    u_cpu.read32(AES_DST, r);
    chk(r == u_mem.mem[widx(AES_DST)], "processor reads the result");

    // Decrypt job: key through the bus, ciphertext copied behind it.
    for (int w = 0; w < 4; w++) u_cpu.write32(DEC_SRC + 4*w, key[127 - 32*w -: 32]);
    for (int i = 0; i < 4*NB; i++) u_mem.mem[widx(DEC_SRC) + 4 + i] = u_mem.mem[widx(AES_DST) + i];
    u_cpu.write32(AES_REG + 32'h00, DEC_SRC);
    u_cpu.write32(AES_REG + 32'h04, DEC_DST);
    u_cpu.write32(AES_REG + 32'h18, 32'h8000_0000 | NB);
    u_cpu.write32(AES_REG + 32'h10, 7);
    do u_cpu.read32(AES_REG + 32'h14, st_a); while (st_a[0]);
    for (int b = 0; b < NB; b++) begin
      logic [127:0] pb;
      for (int w = 0; w < 4; w++) pb[127 - 32*w -: 32] = u_mem.mem[widx(DEC_DST) + 4*b + w];
      chk(pb == pt[b], $sformatf("AES decrypted block %0d", b));
    end

    $display("AES job %0d cycles, FIR job %0d cycles", t_aes, t_fir);
    $display("fir_over_aes=%0d cpu_wait_cycles=%0d mem_wait_states=%0d aes_apb=%0d fir_apb=%0d periph_apb=%0d",
             fir_over_aes, cpu_waits, waits, aes_apb, fir_apb, periph_apb);
    $display("aes_decrypted_blocks=%0d", aes_dec_n);
    $display("aes_done=%0d fir_done=%0d default_slave_errors=%0d dsu_accesses=%0d ram_readbacks=%0d",
             aes_done_n, fir_done_n, default_errs, dsu_acc, ram_checks);
    chk(fir_over_aes > 0, "FIR won the bus over AES at least once");
    chk(cpu_waits > 0, "processor waited for the bus at least once");
    chk(waits > 0, "memory wait states happened");
    chk(aes_apb > 0 && fir_apb > 0 && periph_apb > 0, "APB accesses to every kind of slave");
    chk(aes_done_n == 2 && fir_done_n == 1, "AES finished twice, FIR once");
    chk(aes_dec_n == NB, "inverse cipher ran once per block");
    chk(default_errs > 0, "default slave answered");
    chk(dsu_acc > 0, "DSU slot reached");
    chk(ram_checks > 0, "RAM wrappers exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
