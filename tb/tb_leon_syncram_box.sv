// Testbench for leon_syncram_box: LEON-2 style accesses with all inputs
// changed right at the rising edge.  Read data for the address presented in
// cycle N must be on DATAOUT during cycle N+1, as with the LEON-2
// behavioural RAM modelled here by a shadow array.
module tb_leon_syncram_box;
  localparam int AB = 11, DB = 32;
  logic clk = 0;
  logic [AB-1:0] address = '0;
  logic [DB-1:0] datain = '0, dataout;
  logic enable = 0, write = 0;
  logic [DB-1:0] shadow [2**AB];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  leon_syncram_box #(.ABITS(AB), .DBITS(DB)) dut (.clk, .address, .datain, .dataout, .enable, .write);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        rd_pending;
    logic [DB-1:0] exp;
    for (int i = 0; i < 2**AB; i++) shadow[i] = '0;
    // clear the RAM through the wrapper
    for (int i = 0; i < 2**AB; i++) begin
      @(posedge clk); address <= AB'(i); datain <= '0; enable <= 1; write <= 1;
    end
    rd_pending = 0;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      #1;
      if (rd_pending) begin
        checks++;
        if (dataout !== exp) begin failures++; $display("FAIL read: %h expected %h", dataout, exp); end
      end
      @(posedge clk);      // inputs change at the edge (nonblocking)
      enable  <= ($urandom_range(7, 0) != 0);
      write   <= $urandom_range(1, 0);
      address <= AB'($urandom_range(31, 0));
      datain  <= $urandom;
      #1;
      rd_pending = enable && !write;
      exp = shadow[address];
      if (enable && write) shadow[address] = datain;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
