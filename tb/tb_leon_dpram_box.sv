// Testbench for leon_dpram_box: simultaneous writes and reads with inputs
// changed at the rising edge; read data for cycle N is checked during
// cycle N+1 against a shadow array (old data on a same-address collision).
module tb_leon_dpram_box;
  localparam int AB = 8, DB = 32;
  logic clk = 0;
  logic [AB-1:0] rdaddress = '0, wraddress = '0;
  logic [DB-1:0] datain = '0, dataout;
  logic rden = 0, wren = 0;
  logic [DB-1:0] shadow [2**AB];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  leon_dpram_box #(.ABITS(AB), .DBITS(DB)) dut (.clk, .rdaddress, .rden, .dataout, .wraddress, .wren, .datain);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic rd_pending;
    logic [DB-1:0] exp;
    for (int i = 0; i < 2**AB; i++) begin
      @(posedge clk); wraddress <= AB'(i); datain <= $urandom; wren <= 1; rden <= 0;
      #1 shadow[i] = datain;
    end
    rd_pending = 0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      rden      <= ($urandom_range(7, 0) != 0);
      rdaddress <= AB'($urandom);
      wren      <= $urandom_range(1, 0);
      wraddress <= AB'($urandom_range(1, 0) ? $urandom : rdaddress);
      datain    <= $urandom;
      #1;
      rd_pending = rden;
      exp = shadow[rdaddress];
      if (wren) shadow[wraddress] = datain;
      @(posedge clk);
      rden <= 0; wren <= 0;
      #1;
      if (rd_pending) begin
        checks++;
        if (dataout !== exp) begin failures++; $display("FAIL read %0d: %h expected %h", rdaddress, dataout, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
