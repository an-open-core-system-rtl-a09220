// Testbench for dw_ram: random writes and reads against a shadow array;
// checks that reset clears every word, the one-cycle read latency and
// read-old-data on a same-address read/write; a second reset in the middle
// must clear the array again.
module tb_dw_ram;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] shadow [DEPTH];
  logic [31:0] exp_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dw_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_clear();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 0; raddr = 6'(i);
      @(negedge clk);
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL word %0d not cleared: %h", i, rdata); end
    end
  endtask

  initial begin
    // reset clears the array (its start-up contents are random)
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_clear();
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(1, 0); waddr = 6'($urandom); wdata = $urandom;
      raddr = ($urandom_range(3, 0) == 0) ? waddr : 6'($urandom);
      exp_q = shadow[raddr];            // old data on a collision
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++; $display("FAIL addr %0d: %h expected %h", raddr, rdata, exp_q);
      end
    end
    // reset again after random writes
    @(negedge clk); rst_n = 0; we = 0;
    @(negedge clk); rst_n = 1;
    check_clear();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
