// Behavioural AHB memory for the testbenches: stands in for the LEON-2
// memory controller and its external SRAM.
//
// Word-addressed array of WORDS words at address 0; every transfer gets a
// random number of wait states between 0 and MAXWAIT.  Addresses at or above
// ERR_BASE get the two-cycle ERROR response.  WAITS counts inserted wait
// states, ERRS counts ERROR responses.
module tb_ahb_mem
  import amba_pkg::*;
#(
  parameter int unsigned WORDS    = 4096,
  parameter int unsigned MAXWAIT  = 2,
  parameter logic [31:0] ERR_BASE = 32'h7000_0000
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ahb_slv_in_t   si,
  input  logic          hsel,
  output ahb_slv_out_t  so,
  output int unsigned   waits,
  output int unsigned   errs
);

  logic [31:0] mem [WORDS];
  logic        dp, w, er, er2;
  logic [31:0] a;
  int unsigned cnt;
  logic        start;

  assign start = hsel && si.hready && si.htrans[1];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp <= 1'b0; w <= 1'b0; a <= '0; cnt <= 0; er <= 1'b0; er2 <= 1'b0;
      waits <= 0; errs <= 0;
    end else if (si.hready) begin
      if (dp && w && !er) mem[(a >> 2) % WORDS] <= si.hwdata;
      dp  <= start;
      a   <= si.haddr;
      w   <= si.hwrite;
      er  <= start && (si.haddr >= ERR_BASE);
      er2 <= 1'b0;
      cnt <= start ? $urandom_range(MAXWAIT, 0) : 0;
      if (start && si.haddr >= ERR_BASE) errs <= errs + 1;
    end else if (dp && er) begin
      er2 <= 1'b1;
    end else if (dp && cnt != 0) begin
      cnt   <= cnt - 1;
      waits <= waits + 1;
    end
  end

  always_comb begin
    so.hresp  = er ? HRESP_ERROR : HRESP_OKAY;
    so.hready = er ? er2 : !(dp && cnt != 0);
    so.hrdata = (dp && !w) ? mem[(a >> 2) % WORDS] : 32'h0;
  end

endmodule
