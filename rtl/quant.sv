// quant: decompression of quantised support-vector coefficients (QUANT).
//
// The coefficients are stored as 8-bit signed integers q (uniform
// quantisation); the original weight is approximated by w = q * step, with
// the quantisation step configured by the host in the QUANTIZE register
// (16-bit unsigned, 16 fraction bits). N lanes work in parallel, one
// coefficient per lane per cycle. The result goes into the pipeline
// register bank in front of LIN_COMB (24-bit signed, 16 fraction bits).
//
// Timing: one cycle; out_valid follows in_valid one cycle later. The last
// flag travels with the data.
module quant
  import harva_pkg::*;
#(
  parameter int N = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [N-1:0][COEF_W-1:0] in_q,
  input  logic [N-1:0][NORM_W-1:0] in_x,
  input  logic                     in_last,
  input  logic [QSTEP_W-1:0]       step,
  output logic                     out_valid,
  output logic [N-1:0][SV_W-1:0]   out_w,
  output logic [N-1:0][NORM_W-1:0] out_x,
  output logic                     out_last
);
  typedef logic signed [SV_W:0] sv_t;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_w     <= '0;
      out_x     <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      out_x     <= in_x;
      for (int i = 0; i < N; i++)
        out_w[i] <= SV_W'(sv_t'($signed(in_q[i])) * sv_t'($signed({1'b0, step})));
    end
  end
endmodule
