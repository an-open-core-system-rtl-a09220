// Testbench for fir_amba: the block alone on an AHB with a behavioural
// memory (random wait states).  Coefficients and samples are placed in
// memory, the block is programmed over APB (LOAD+GO+STORE in one command
// and as separate commands) and the outputs written back are compared with
// a direct convolution.
module tb_fir_amba;
  import amba_pkg::*;
  localparam int NT = 16;
  logic clk = 0, rst_n = 0;
  apb_slv_in_t apbi = '0;
  logic psel = 0;
  logic [31:0] prdata;
  ahb_mst_in_t  mi;
  ahb_mst_out_t mo;
  ahb_slv_in_t  si;
  ahb_slv_out_t so;
  int unsigned waits, errs;
  logic grant;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_amba #(.NTAPS(NT), .RAM_WORDS(256)) dut (.clk, .rst_n, .apbi, .psel, .prdata, .mi, .mo);
  tb_ahb_mem #(.WORDS(4096), .MAXWAIT(2)) u_mem (.clk, .rst_n, .si, .hsel(1'b1), .so, .waits, .errs);

  always @(posedge clk or negedge rst_n)
    if (!rst_n) grant <= 0; else if (mi.hready) grant <= mo.hbusreq;

  always_comb begin
    si = '{haddr: mo.haddr, hwrite: mo.hwrite, htrans: mo.htrans, hsize: mo.hsize, hburst: mo.hburst,
           hwdata: mo.hwdata, hprot: mo.hprot, hready: so.hready, hmaster: 4'd2, hmastlock: 1'b0};
    mi = '{hgrant: grant, hready: so.hready, hresp: so.hresp, hrdata: so.hrdata};
  end

  initial begin
    repeat (400000) @(posedge clk);
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
    do apb_read(32'h8000_0214, st); while (st[0]);
  endtask

  task automatic filter(int n, bit split);
    logic signed [15:0] c [NT];
    logic signed [15:0] x [];
    logic [31:0] st;
    int src, dst;
    x = new[n];
    src = 32'h400; dst = 32'h2000 + 4 * $urandom_range(100, 0);
    for (int k = 0; k < NT; k++) begin
      c[k] = 16'($urandom);
      u_mem.mem[src/4 + k] = {$urandom_range(65535, 0), c[k]};   // upper half ignored
    end
    for (int i = 0; i < n; i++) begin
      x[i] = 16'($urandom);
      u_mem.mem[src/4 + NT + i] = {16'hffff, x[i]};
    end
    apb_write(32'h8000_0200, src);
    apb_write(32'h8000_0204, dst);
    apb_write(32'h8000_0208, NT + n);
    apb_write(32'h8000_020c, n);
    apb_write(32'h8000_0218, n);
    if (split) begin
      apb_write(32'h8000_0210, 1); wait_idle(st);
      apb_write(32'h8000_0210, 2); wait_idle(st);
      apb_write(32'h8000_0210, 4); wait_idle(st);
      checks++; if (st[4:1] != 4'b0100) begin failures++; $display("FAIL status %b", st[4:0]); end
    end else begin
      apb_write(32'h8000_0210, 7); wait_idle(st);
      checks++; if (st[4:1] != 4'b0111) begin failures++; $display("FAIL status %b", st[4:0]); end
    end
    for (int i = 0; i < n; i++) begin
      logic signed [35:0] s;
      s = 0;
      for (int k = 0; k < NT; k++) if (i - k >= 0) s += 36'(c[k]) * 36'(x[i-k]);
      checks++;
      if (u_mem.mem[dst/4 + i] !== s[31:0]) begin
        failures++; $display("FAIL y[%0d] = %h expected %h", i, u_mem.mem[dst/4 + i], s[31:0]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    filter(1, 0);
    filter(240, 0);
    for (int t = 0; t < 6; t++) filter($urandom_range(240, 1), t[0]);
    $display("wait_states=%0d", waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
