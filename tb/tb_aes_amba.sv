// Testbench for aes_amba: the block alone on an AHB with a behavioural
// memory (random wait states).  Key and plaintext blocks are placed in
// memory, the block is programmed over APB to LOAD, GO and STORE, and the
// ciphertext written back is compared with the reference model; also runs
// the steps as separate commands, checks the STATUS bits, and runs the
// decrypt direction (PARAM bit 31) on reference-encrypted blocks.  A
// second instance with 256-bit keys (eight key words in the input RAM) is
// switched onto the bus and APB for a run of its own.
module tb_aes_amba;
  import amba_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  apb_slv_in_t apbi = '0;
  logic psel = 0;
  logic [31:0] prdata, prdata128, prdata256;
  ahb_mst_in_t  mi, mi_idle, mi128, mi256;
  ahb_mst_out_t mo, mo128, mo256;
  logic sel256 = 0;   // which instance owns the bus and the APB select
  ahb_slv_in_t  si;
  ahb_slv_out_t so;
  int unsigned waits, errs;
  logic grant;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_amba #(.RAM_WORDS(64)) dut (.clk, .rst_n, .apbi, .psel(psel && !sel256), .prdata(prdata128),
                                  .mi(mi128), .mo(mo128));
  aes_amba #(.RAM_WORDS(64), .KEY_BITS(256)) dut256 (.clk, .rst_n, .apbi, .psel(psel && sel256),
                                  .prdata(prdata256), .mi(mi256), .mo(mo256));

  always_comb begin
    mi_idle = '{hgrant: 1'b0, hready: 1'b1, hresp: HRESP_OKAY, hrdata: '0};
    mo      = sel256 ? mo256 : mo128;
    mi128   = sel256 ? mi_idle : mi;
    mi256   = sel256 ? mi : mi_idle;
    prdata  = sel256 ? prdata256 : prdata128;
  end
  tb_ahb_mem #(.WORDS(4096), .MAXWAIT(2)) u_mem (.clk, .rst_n, .si, .hsel(1'b1), .so, .waits, .errs);

  always @(posedge clk or negedge rst_n)
    if (!rst_n) grant <= 0; else if (mi.hready) grant <= mo.hbusreq;

  always_comb begin
    si = '{haddr: mo.haddr, hwrite: mo.hwrite, htrans: mo.htrans, hsize: mo.hsize, hburst: mo.hburst,
           hwdata: mo.hwdata, hprot: mo.hprot, hready: so.hready, hmaster: 4'd1, hmastlock: 1'b0};
    mi = '{hgrant: grant, hready: so.hready, hresp: so.hresp, hrdata: so.hrdata};
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; apbi.penable = 0; apbi.paddr = a; apbi.pwrite = 1; apbi.pwdata = d;
    @(negedge clk); apbi.penable = 1;
    @(negedge clk); psel = 0; apbi.penable = 0;
  endtask

  task automatic apb_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; apbi.penable = 0; apbi.paddr = a; apbi.pwrite = 0;
    @(negedge clk); apbi.penable = 1; d = prdata;
    @(negedge clk); psel = 0; apbi.penable = 0;
  endtask

  task automatic wait_idle(output logic [31:0] st);
    do apb_read(32'h8000_0314, st); while (st[0]);
  endtask

  task automatic encrypt(int nblk, bit split, bit dec = 0, int nk = 4);
    logic [255:0] key;
    logic [127:0] pt [];
    logic [31:0] st;
    int src, dst;
    pt = new[nblk];
    src = 32'h100 + 16 * $urandom_range(20, 0);
    dst = 32'h2000 + 16 * $urandom_range(20, 0);
    key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    if (nk == 4) key[127:0] = '0;
    if (nblk == 1 && !split && nk == 4) key = {128'h000102030405060708090a0b0c0d0e0f, 128'h0};
    sel256 = (nk == 8);
    for (int w = 0; w < nk; w++) u_mem.mem[src/4 + w] = key[255 - 32*w -: 32];
    for (int b = 0; b < nblk; b++) begin
      pt[b] = {$urandom, $urandom, $urandom, $urandom};
      if (nblk == 1 && !split && nk == 4) pt[b] = dec ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a
                                           : 128'h00112233445566778899aabbccddeeff;
      for (int w = 0; w < 4; w++) u_mem.mem[src/4 + nk + 4*b + w] = pt[b][127 - 32*w -: 32];
    end
    apb_write(32'h8000_0300, src);
    apb_write(32'h8000_0304, dst);
    apb_write(32'h8000_0308, nk + 4 * nblk);
    apb_write(32'h8000_030c, 4 * nblk);
    apb_write(32'h8000_0318, {dec, 31'(nblk)});
    if (split) begin
      apb_write(32'h8000_0310, 1); wait_idle(st);
      checks++; if (st[4:1] != 4'b0001) begin failures++; $display("FAIL status after LOAD %b", st[4:0]); end
      apb_write(32'h8000_0310, 2); wait_idle(st);
      checks++; if (st[4:1] != 4'b0010) begin failures++; $display("FAIL status after GO %b", st[4:0]); end
      apb_write(32'h8000_0310, 4); wait_idle(st);
      checks++; if (st[4:1] != 4'b0100) begin failures++; $display("FAIL status after STORE %b", st[4:0]); end
    end else begin
      apb_write(32'h8000_0310, 7); wait_idle(st);
      checks++; if (st[4:1] != 4'b0111) begin failures++; $display("FAIL status %b", st[4:0]); end
    end
    for (int b = 0; b < nblk; b++) begin
      logic [127:0] ct, e;
      for (int w = 0; w < 4; w++) ct[127 - 32*w -: 32] = u_mem.mem[dst/4 + 4*b + w];
      e = dec ? ref_decrypt_k(key, nk, pt[b]) : ref_encrypt_k(key, nk, pt[b]);
      if (nblk == 1 && !split && nk == 4) e = dec ? 128'h00112233445566778899aabbccddeeff
                                       : 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
      checks++;
      if (ct !== e) begin failures++; $display("FAIL block %0d: %h expected %h", b, ct, e); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt(1, 0);
    encrypt(15, 0);
    for (int t = 0; t < 6; t++) encrypt($urandom_range(15, 1), t[0]);
    encrypt(1, 0, 1);
    encrypt(15, 0, 1);
    for (int t = 0; t < 3; t++) encrypt($urandom_range(15, 1), t[0], 1);
    encrypt(14, 0, 0, 8);
    encrypt(14, 0, 1, 8);
    for (int t = 0; t < 4; t++) encrypt($urandom_range(14, 1), t[0], t[1], 8);
    $display("wait_states=%0d", waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
