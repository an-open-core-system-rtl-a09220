// Testbench for fir_filter: random coefficients and sample streams with
// random gaps against a direct convolution; checks the one-clock latency
// and that CLR empties the delay line.
module tb_fir_filter;
  localparam int N = 16, DW = 16, YW = 2*DW + 4;
  logic clk = 0, rst_n = 0, clr = 0, coef_we = 0, in_valid = 0, out_valid;
  logic [3:0] coef_idx = '0;
  logic signed [DW-1:0] coef = '0, x = '0;
  logic signed [YW-1:0] y;
  logic signed [DW-1:0] c [N];
  logic signed [DW-1:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_filter #(.NTAPS(N), .DW(DW)) dut (.clk, .rst_n, .clr, .coef_we, .coef_idx, .coef, .in_valid, .x, .out_valid, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [YW-1:0] ref_y();
    logic signed [YW-1:0] s = 0;
    for (int k = 0; k < N; k++)
      if (k < hist.size()) s += YW'(c[k]) * YW'(hist[k]);
    return s;
  endfunction

  initial begin
    logic signed [YW-1:0] e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        coef_we = 1; coef_idx = 4'(k);
        coef = (t == 0) ? ((k == 0) ? 16'sd1 : 16'sd0) : DW'($urandom);
        if (t == 5) coef = (k[0]) ? -16'sd32768 : 16'sd32767;
        c[k] = coef;
      end
      @(negedge clk); coef_we = 0; clr = 1;
      @(negedge clk); clr = 0;
      hist.delete();
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        in_valid = ($urandom_range(3, 0) != 0);
        x = DW'($urandom);
        if (t == 5) x = (i % 3 == 0) ? -16'sd32768 : 16'sd32767;
        if (in_valid) begin
          hist.push_front(x);
          e = ref_y();
        end
        @(negedge clk);
        if (in_valid) begin
          checks++;
          if (!out_valid || y !== e) begin failures++; $display("FAIL y=%0d expected %0d valid=%0b", y, e, out_valid); end
        end else begin
          checks++;
          if (out_valid) begin failures++; $display("FAIL spurious out_valid"); end
        end
        in_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
