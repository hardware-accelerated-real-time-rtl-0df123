// lin_comb: linear combination of feature vector and support vector
// (LIN_COMB), the SVM's linear kernel.
//
// Two pipeline steps: the N products w_i * x_i (40-bit signed, 32 fraction
// bits) are registered, then added to the running sum. When the value
// flagged as the image's last (its VSYNC) has been added, the bias (32-bit
// signed, 16 fraction bits) is added too: score = sum(w_i * x_i) + b, and
// the image is labelled as containing the target (label = 1) when score >= 0.
// done pulses for one cycle with label and score (score as 32-bit signed,
// 16 fraction bits, saturated).
//
// Timing: done comes two cycles after the last value enters.
module lin_comb
  import harva_pkg::*;
#(
  parameter int N = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [N-1:0][SV_W-1:0]   in_w,
  input  logic [N-1:0][NORM_W-1:0] in_x,
  input  logic                     in_last,
  input  logic signed [31:0]       bias,
  output logic                     done,
  output logic                     label,
  output logic signed [31:0]       score
);
  typedef logic signed [PROD_W:0] pr_t;
  logic                           p_valid, p_last;
  logic signed [N-1:0][PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]        acc;
  logic signed [ACC_W-1:0]        acc_n, fin;

  always_comb begin
    acc_n = acc;
    for (int i = 0; i < N; i++) acc_n = acc_n + ACC_W'($signed(prod[i]));
    fin = acc_n + (ACC_W'(bias) <<< 16);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      prod    <= '0;
      acc     <= '0;
      done    <= 1'b0;
      label   <= 1'b0;
      score   <= '0;
    end else begin
      p_valid <= in_valid;
      p_last  <= in_valid && in_last;
      for (int i = 0; i < N; i++)
        prod[i] <= PROD_W'(pr_t'($signed(in_w[i])) * pr_t'($signed({1'b0, in_x[i]})));
      done <= 1'b0;
      if (p_valid) begin
        acc <= acc_n;
        if (p_last) begin
          done  <= 1'b1;
          label <= (fin >= 0);
          if ((fin >>> 16) > 64'sh7FFF_FFFF)       score <= 32'sh7FFF_FFFF;
          else if ((fin >>> 16) < -64'sh8000_0000) score <= -32'sh8000_0000;
          else                                     score <= 32'(fin >>> 16);
        end
      end
    end
  end
endmodule
