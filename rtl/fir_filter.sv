// Direct-form FIR filter with programmable coefficients.
//
// y[n] = sum_{k=0}^{NTAPS-1} c[k] * x[n-k], with signed DW-bit samples and
// coefficients and a full-precision accumulator of 2*DW + clog2(NTAPS) bits.
// All NTAPS products are formed in parallel, so the filter accepts one
// sample per clock: a sample presented with IN_VALID produces its output
// with OUT_VALID on the next clock.  COEF_WE writes coefficient COEF_IDX;
// CLR empties the delay line (samples before the first one count as zero).
//
// The platform only names its FIR core; the direct form, the widths and the
// number of taps are this design's choices.
module fir_filter #(
  parameter int unsigned NTAPS = 16,
  parameter int unsigned DW    = 16,
  localparam int unsigned YW   = 2*DW + $clog2(NTAPS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr,
  input  logic                      coef_we,
  input  logic [$clog2(NTAPS)-1:0]  coef_idx,
  input  logic signed [DW-1:0]      coef,
  input  logic                      in_valid,
  input  logic signed [DW-1:0]      x,
  output logic                      out_valid,
  output logic signed [YW-1:0]      y
);

  logic signed [DW-1:0] c  [NTAPS];
  logic signed [DW-1:0] dl [NTAPS];   // dl[k] = x[n-k] after the shift
  logic signed [YW-1:0] acc;

  always_comb begin
    acc = YW'(c[0] * x);
    for (int unsigned k = 1; k < NTAPS; k++)
      acc = acc + YW'(c[k] * dl[k-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NTAPS; k++) begin
        c[k]  <= '0;
        dl[k] <= '0;
      end
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= 1'b0;
      if (coef_we) c[coef_idx] <= coef;
      if (clr) begin
        for (int unsigned k = 0; k < NTAPS; k++) dl[k] <= '0;
      end else if (in_valid) begin
        dl[0] <= x;
        for (int unsigned k = 1; k < NTAPS; k++) dl[k] <= dl[k-1];
        y         <= acc;
        out_valid <= 1'b1;
      end
    end
  end

endmodule
