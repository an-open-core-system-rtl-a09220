// Testbench for ahb_arbiter: random requests, locks and HREADY against a
// model of the fixed-priority rule (higher index wins, park on master 0,
// hand over only when HREADY is high, keep a locked requester).  Counts
// hand-overs and HREADY stalls that held a grant.
module tb_ahb_arbiter;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] hbusreq = '0, hlock = '0, hgrant;
  logic hready = 1, hmastlock;
  logic [1:0] hmaster, hmaster_d;
  int checks = 0, failures = 0, stalls = 0, preempt = 0;
  int eg, em, emd;
  logic elock;

  always #5 clk = ~clk;

  ahb_arbiter #(.NMST(N)) dut (.clk, .rst_n, .hbusreq, .hlock, .hready, .hgrant, .hmaster, .hmaster_d, .hmastlock);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t: grant %b exp %0d hmaster %0d exp %0d", what, $time, hgrant, eg, hmaster, em); end
  endtask

  initial begin
    int ng;
    eg = 0; em = 0; emd = 0; elock = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(hgrant == 3'b001, "park on master 0 after reset");
    for (int i = 0; i < 3000; i++) begin
      hbusreq = N'($urandom);
      hlock   = ($urandom_range(7, 0) == 0) ? hbusreq : '0;
      hready  = ($urandom_range(3, 0) != 0);
      // model the next edge
      @(posedge clk);
      if (hready) begin
        ng = 0;
        for (int m = 0; m < N; m++) if (hbusreq[m]) ng = m;
        if (elock && hbusreq[eg]) ng = eg;
        if (ng != eg && hbusreq[eg]) preempt++;
        emd = em; em = eg;
        elock = hlock[ng];
        eg = ng;
      end else if (hbusreq != 0) stalls++;
      @(negedge clk);
      chk(hgrant == N'(1 << eg), "grant");
      chk(hmaster == 2'(em), "hmaster");
      chk(hmaster_d == 2'(emd), "hmaster_d");
    end
    checks++;
    if (preempt == 0 || stalls == 0) begin failures++; $display("FAIL coverage preempt=%0d stalls=%0d", preempt, stalls); end
    $display("preemptions=%0d stalled_handovers=%0d", preempt, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
