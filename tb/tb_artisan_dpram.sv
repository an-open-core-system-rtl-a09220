// Testbench for the Artisan dual-port SRAM model: writes on one port are
// read back on the other, Q holds between reads, disabled ports do nothing.
module tb_artisan_dpram;
  localparam int W = 256, B = 32;
  logic clk = 0;
  logic CENA = 1, WENA = 1, CENB = 1, WENB = 1;
  logic [7:0] AA = '0, AB = '0;
  logic [B-1:0] DA = '0, DB = '0, QA, QB;
  logic [B-1:0] shadow [W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  artisan_dpram #(.WORDS(W), .BITS(B)) dut (
    .CLKA(clk), .CENA, .WENA, .AA, .DA, .QA,
    .CLKB(clk), .CENB, .WENB, .AB, .DB, .QB);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [B-1:0] got, logic [B-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [B-1:0] hold;
    // port A writes everything
    for (int i = 0; i < W; i++) begin
      @(negedge clk); CENA = 0; WENA = 0; AA = 8'(i); DA = $urandom; shadow[i] = DA;
    end
    @(negedge clk); CENA = 1; WENA = 1;
    // port B reads everything back
    for (int i = 0; i < W; i++) begin
      @(negedge clk); CENB = 0; WENB = 1; AB = 8'(i);
      @(negedge clk); chk(QB, shadow[i], "read B");
    end
    // random mix: A reads, B writes, disabled cycles hold Q
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      CENA = 0; WENA = 1; AA = 8'($urandom);
      CENB = 0; WENB = 0; AB = 8'($urandom); DB = $urandom;
      if (AB == AA) AB = AA + 8'd1;
      @(negedge clk);
      chk(QA, shadow[AA], "read A");
      shadow[AB] = DB;
      hold = QA;
      CENA = 1; CENB = 1; AA = 8'($urandom);
      @(negedge clk);
      chk(QA, hold, "QA holds while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
