// Testbench for ip_amba_ctrl: APB register writes and reads, then commands
// with every combination of LOAD/GO/STORE against stand-ins for the AHB
// engine and the core that finish after random delays.  Checks the order of
// the steps, the address/count/direction given to the engine, the GO pulse,
// the STATUS bits, that a command is ignored while busy, and that a bus
// error skips the remaining steps; then repeats with random register
// values, and checks that reset clears the registers.
module tb_ip_amba_ctrl;
  import amba_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  apb_slv_in_t apbi = '0;
  logic psel = 0;
  logic [31:0] prdata, param;
  logic go, core_done = 0, dma_start, dma_write, dma_done = 0, dma_err = 0;
  logic [31:0] dma_addr;
  logic [AW:0] dma_nwords;
  int checks = 0, failures = 0;
  string log;
  logic inject_err = 0;
  logic [31:0] e_src = 32'h4000_0000, e_dst = 32'h4000_0100;
  logic [AW:0] e_ln = 12, e_sn = 9;

  always #5 clk = ~clk;

  ip_amba_ctrl #(.AW(AW)) dut (.clk, .rst_n, .apbi, .psel, .prdata, .go, .core_done, .param,
    .dma_start, .dma_write, .dma_addr, .dma_nwords, .dma_done, .dma_err);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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

  // Engine stand-in: records each start and finishes after a random delay.
  always @(posedge clk) begin
    if (dma_start) begin
      log = {log, dma_write ? "S" : "L"};
      if (dma_write) begin
        chk(dma_addr == e_dst && dma_nwords == e_sn, "store address/count");
      end else begin
        chk(dma_addr == e_src && dma_nwords == e_ln, "load address/count");
      end
      fork
        begin
          repeat ($urandom_range(6, 1)) @(posedge clk);
          dma_done <= 1; dma_err <= inject_err;
          @(posedge clk); dma_done <= 0; dma_err <= 0;
        end
      join_none
    end
    if (go) begin
      log = {log, "G"};
      fork
        begin
          repeat ($urandom_range(8, 1)) @(posedge clk);
          core_done <= 1;
          @(posedge clk); core_done <= 0;
        end
      join_none
    end
  end

  initial begin
    logic [31:0] r;
    string exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb_write(32'h8000_0300, 32'h4000_0000);
    apb_write(32'h8000_0304, 32'h4000_0100);
    apb_write(32'h8000_0308, 12);
    apb_write(32'h8000_030c, 9);
    apb_write(32'h8000_0318, 32'h0000_0005);
    apb_read(32'h8000_0300, r); chk(r == 32'h4000_0000, "SRC readback");
    apb_read(32'h8000_0304, r); chk(r == 32'h4000_0100, "DST readback");
    apb_read(32'h8000_0308, r); chk(r == 12, "LOADN readback");
    apb_read(32'h8000_030c, r); chk(r == 9, "STOREN readback");
    apb_read(32'h8000_0318, r); chk(r == 5 && param == 5, "PARAM readback");
    for (int c = 1; c < 8; c++) begin
      log = "";
      apb_write(32'h8000_0310, c);
      apb_read(32'h8000_0314, r); chk(r[0], "busy after command");
      apb_write(32'h8000_0310, 7);                 // ignored while busy
      do apb_read(32'h8000_0314, r); while (r[0]);
      exp = {c[0] ? "L" : "", c[1] ? "G" : "", c[2] ? "S" : ""};
      chk(log == exp, $sformatf("step order %s expected %s", log, exp));
      chk(r[3:1] == 3'(c) && !r[4], "status done bits");
      apb_read(32'h8000_0310, r); chk(r == c, "CMD readback");
    end
    // bus error during LOAD skips GO and STORE
    inject_err = 1; log = "";
    apb_write(32'h8000_0310, 7);
    do apb_read(32'h8000_0314, r); while (r[0]);
    chk(log == "L" && r[4] && r[3:1] == 0, "error skips the rest");
    inject_err = 0;
    // random register values and commands
    for (int t = 0; t < 60; t++) begin
      int c;
      logic [31:0] pv;
      e_src = {$urandom} & 32'hffff_fffc; e_dst = {$urandom} & 32'hffff_fffc;
      e_ln = (AW+1)'($urandom_range(64, 1)); e_sn = (AW+1)'($urandom_range(64, 1));
      pv = $urandom;
      apb_write(32'h8000_0300, e_src);
      apb_write(32'h8000_0304, e_dst);
      apb_write(32'h8000_0308, 32'(e_ln));
      apb_write(32'h8000_030c, 32'(e_sn));
      apb_write(32'h8000_0318, pv);
      chk(param == pv, "PARAM output");
      c = $urandom_range(7, 1);
      log = "";
      inject_err = ($urandom_range(5, 0) == 0);
      apb_write(32'h8000_0310, c);
      do apb_read(32'h8000_0314, r); while (r[0]);
      if (inject_err && (c & 5) != 0) begin
        // the first bus step fails and ends the command
        exp = c[0] ? "L" : {c[1] ? "G" : "", "S"};
        chk(log == exp && r[4], $sformatf("error run %s expected %s", log, exp));
      end else begin
        exp = {c[0] ? "L" : "", c[1] ? "G" : "", c[2] ? "S" : ""};
        chk(log == exp && r[3:1] == 3'(c) && !r[4], $sformatf("random run %s expected %s", log, exp));
      end
      inject_err = 0;
    end
    // reset clears the registers
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < 7; a++) begin
      apb_read(32'h8000_0300 + 4*a, r);
      chk(r == 0, $sformatf("register %0d cleared by reset", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
