// Testbench for ahb_mux: random master outputs and owners; checks that the
// address-phase owner's address/control and the data-phase owner's write
// data reach the slaves, that HSEL follows the LEON-2 address map, that the
// data-phase slave's response is returned, and that the default slave gives
// the two-cycle ERROR for an unmapped address.
module tb_ahb_mux;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  ahb_mst_out_t mo [3];
  ahb_mst_in_t  mi;
  ahb_slv_in_t  si;
  logic [2:0]   hsel;
  ahb_slv_out_t so [3];
  logic [1:0]   hmaster = 0, hmaster_d = 0;
  int checks = 0, failures = 0, errors_seen = 0;

  always #5 clk = ~clk;

  ahb_mux #(.NMST(3), .NSLV(3)) dut (.clk, .rst_n, .mo, .hmaster, .hmaster_d, .hmastlock(1'b0), .mi, .si, .hsel, .so);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [2:0] map(logic [31:0] a);
    if (!a[31]) return 3'b001;
    if (a[31:28] == 4'h8) return 3'b010;
    if (a[31:28] == 4'h9) return 3'b100;
    return 3'b000;
  endfunction

  initial begin
    logic [2:0] dsel;
    logic       dact;
    for (int m = 0; m < 3; m++) mo[m] = '0;
    for (int s = 0; s < 3; s++) so[s] = '{hready: 1'b1, hresp: HRESP_OKAY, hrdata: 32'h0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    dsel = 3'b001; dact = 0;   // all-zero master outputs select slave 0 after reset
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int m = 0; m < 3; m++) begin
        mo[m] = ahb_mst_out_t'({$urandom, $urandom, $urandom, $urandom});
        case ($urandom_range(7, 0))
          0, 1, 2: mo[m].haddr = {1'b0, 31'($urandom)};
          3, 4:    mo[m].haddr = {4'h8, 28'($urandom)};
          5:       mo[m].haddr = {4'h9, 28'($urandom)};
          default: mo[m].haddr = {4'hA + 4'($urandom_range(5, 0)), 28'($urandom)};
        endcase
      end
      hmaster   = 2'($urandom_range(2, 0));
      hmaster_d = 2'($urandom_range(2, 0));
      for (int s = 0; s < 3; s++)
        so[s] = '{hready: ($urandom_range(3, 0) != 0), hresp: HRESP_OKAY, hrdata: $urandom};
      #1;
      chk(si.haddr == mo[hmaster].haddr && si.htrans == mo[hmaster].htrans &&
          si.hwrite == mo[hmaster].hwrite && si.hsize == mo[hmaster].hsize, "address/control routing");
      chk(si.hwdata == mo[hmaster_d].hwdata, "write data routing");
      chk(hsel == map(si.haddr), "decode");
      if (dact) begin
        // default slave: first cycle ERROR with HREADY low, second cycle HREADY high
        chk(mi.hresp == HRESP_ERROR && !mi.hready, "default slave first cycle");
        @(negedge clk);
        chk(mi.hresp == HRESP_ERROR && mi.hready, "default slave second cycle");
        errors_seen++;
        dact = 0;
      end else if (dsel == 0) begin
        chk(mi.hready && mi.hresp == HRESP_OKAY, "idle response");
      end else begin
        for (int s = 0; s < 3; s++)
          if (dsel[s]) chk(mi.hready == so[s].hready && mi.hrdata == so[s].hrdata, "response routing");
      end
      if (mi.hready) begin
        dsel = map(si.haddr);
        dact = (dsel == 0) && si.htrans[1];
      end
    end
    chk(errors_seen > 0, "default slave exercised");
    $display("default_slave_errors=%0d", errors_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
