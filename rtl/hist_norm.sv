// hist_norm: L1 normalisation of a block histogram (HIST_NORM).
//
// out_i = v_i / (sum(v) + eps), eps = the smallest value of the histogram,
// which the document adds against division by zero. The division is done
// once per block: in HIST_SUM the 36 values are summed and their minimum
// found (CORES values per cycle), then a restoring divider forms the
// reciprocal R = floor(2^40 / (sum + eps)) in 41 cycles. In HIST_NORM each
// value is multiplied by R (CORES multipliers) and scaled:
// out_i = min(65535, (v_i * R) >> 24), a 16-bit fraction. A histogram whose
// sum is 0 gives R = 0 and an all-zero output.
// CORES may be 1, 2, 4, 6, 12, 18 or 36, as in the document.
//
// Interface: valid/ready on both sides. Busy 36/CORES + 41 + 36/CORES cycles
// per block.
module hist_norm
  import harva_pkg::*;
#(
  parameter int CORES = 1,
  localparam int STEPS = HIST_LEN / CORES
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  hist_t  in_hist,
  input  logic   in_eol,
  input  logic   in_eoi,
  output logic   out_valid,
  input  logic   out_ready,
  output nhist_t out_hist,
  output logic   out_eol,
  output logic   out_eoi
);
  localparam int SUM_W = HBIN_W + 6;   // 36 values
  localparam int Q_W   = 41;

  typedef enum logic [1:0] {RESET, NOP, HIST_SUM, HIST_NORM} state_t;
  state_t state;

  hist_t             h;
  logic              eol_q, eoi_q;
  logic [5:0]        step;
  logic [SUM_W-1:0]  sum;
  logic [HBIN_W-1:0] vmin;
  logic              dividing;
  logic [5:0]        dcnt;
  logic [Q_W-1:0]    dividend;     // shifts out MSB first
  logic [SUM_W-1:0]  drem;         // remainder < denom
  logic [Q_W-1:0]    recip;
  logic [SUM_W-1:0]  denom;

  // summing step
  logic [SUM_W-1:0]  sum_n;
  logic [HBIN_W-1:0] min_n;
  always_comb begin
    sum_n = sum;
    min_n = vmin;
    for (int j = 0; j < CORES; j++) begin
      sum_n = sum_n + SUM_W'(h[32'(step) * CORES + j]);
      if (h[32'(step) * CORES + j] < min_n) min_n = h[32'(step) * CORES + j];
    end
  end

  // division step
  logic [SUM_W:0] drem_sh;
  always_comb drem_sh = {drem, dividend[Q_W-1]};

  // normalising step
  logic [CORES-1:0][NORM_W-1:0] nval;
  logic [CORES-1:0][23:0]       unused_frac;
  always_comb begin
    for (int j = 0; j < CORES; j++) begin
      logic [HBIN_W+Q_W-1:0] prod;
      prod = (HBIN_W+Q_W)'(h[32'(step) * CORES + j]) * (HBIN_W+Q_W)'(recip);
      nval[j] = (prod[HBIN_W+Q_W-1:24] > 41'(16'hFFFF)) ? 16'hFFFF : prod[24 +: NORM_W];
      unused_frac[j] = prod[23:0];   // bits below the result are dropped
    end
  end

  assign in_ready = (state == NOP) && !out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RESET;
      h         <= '0;
      eol_q     <= 1'b0;
      eoi_q     <= 1'b0;
      step      <= '0;
      sum       <= '0;
      vmin      <= '0;
      dividing  <= 1'b0;
      dcnt      <= '0;
      dividend  <= '0;
      drem      <= '0;
      recip     <= '0;
      denom     <= '0;
      out_valid <= 1'b0;
      out_hist  <= '0;
      out_eol   <= 1'b0;
      out_eoi   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        RESET: state <= NOP;
        NOP: begin
          if (in_valid && in_ready) begin
            h        <= in_hist;
            eol_q    <= in_eol;
            eoi_q    <= in_eoi;
            step     <= '0;
            sum      <= '0;
            vmin     <= '1;
            dividing <= 1'b0;
            state    <= HIST_SUM;
          end
        end
        HIST_SUM: begin
          if (!dividing) begin
            sum  <= sum_n;
            vmin <= min_n;
            if (step == 6'(STEPS - 1)) begin
              step     <= '0;
              dividing <= 1'b1;
              denom    <= sum_n + SUM_W'(min_n);
              dividend <= Q_W'(1) << 40;
              drem     <= '0;
              recip    <= '0;
              dcnt     <= 6'(Q_W);
            end else begin
              step <= step + 1'b1;
            end
          end else begin
            // one quotient bit per cycle; SUM_DONE when the last is known
            dividend <= dividend << 1;
            if (denom != 0 && drem_sh >= {1'b0, denom}) begin
              drem  <= SUM_W'(drem_sh - {1'b0, denom});
              recip <= {recip[Q_W-2:0], 1'b1};
            end else begin
              drem  <= SUM_W'(drem_sh);
              recip <= {recip[Q_W-2:0], 1'b0};
            end
            dcnt <= dcnt - 1'b1;
            if (dcnt == 6'd1) begin
              dividing <= 1'b0;
              state    <= HIST_NORM;
            end
          end
        end
        HIST_NORM: begin
          for (int j = 0; j < CORES; j++) out_hist[32'(step) * CORES + j] <= nval[j];
          if (step == 6'(STEPS - 1)) begin
            out_valid <= 1'b1;
            out_eol   <= eol_q;
            out_eoi   <= eoi_q;
            state     <= NOP;
          end else begin
            step <= step + 1'b1;
          end
        end
        default: state <= NOP;
      endcase
    end
  end
endmodule
