// svm_data_cache: the SVM component's registers and Support Vector Data.
//
// Host word address, bit AW selects the section:
//   0: registers
//       word 0  SVM_CTRL     bit 0 SvmEN (rw), bit 1 QuantStepOK (ro),
//                            bit 2 SvmCacheMiss (set by hardware, host writes
//                            0 to acknowledge a refill), bit 3 SvmDone (ro)
//       word 1  QUANTIZE     quantisation step, 16-bit fraction
//       word 2  BIAS         classification bias, signed, 16 fraction bits
//       word 3  FEATVEC_SIZE number of feature values per image
//       word 4  RESULT       bit 0: label of the last image (ro)
//       word 5  SCORE        decision value of the last image (ro)
//   1: Support Vector Data, SV_WORDS words, four 8-bit coefficients each,
//      coefficient 4i+j in bits [8j+7:8j] of word i
// SVM_CTRL bit positions follow the document; RESULT and SCORE are this
// design's addition, since the document does not say where the label goes.
// QuantStepOK reads 1 when QUANTIZE is non-zero. Writing 1 to SvmEN while it
// is 0 starts an image and clears SvmDone; writing 0 halts and pulses flush,
// which empties the feature FIFO; the engine clears SvmEN when the image is
// classified. The support-vector RAM is read by the
// engine with one cycle of latency.
module svm_data_cache
  import harva_pkg::*;
#(
  parameter int SV_WORDS = 128,
  localparam int AW      = $clog2(SV_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [AW:0]        h_addr,
  input  logic               h_we,
  input  logic [31:0]        h_wdata,
  output logic [31:0]        h_rdata,
  output logic               svm_en,
  output logic [QSTEP_W-1:0] quant_step,
  output logic signed [31:0] bias,
  output logic [31:0]        fv_size,
  output logic               miss,
  output logic               flush,      // pulse: host wrote SvmEN = 0
  input  logic               miss_set,
  input  logic               done_set,
  input  logic               done_label,
  input  logic signed [31:0] done_score,
  input  logic               e_rd_en,
  input  logic [AW-1:0]      e_rd_addr,
  output logic [31:0]        e_rd_data
);
  logic               done, label;
  logic signed [31:0] score;
  logic               reg_we, sv_we;

  assign reg_we = h_we && !h_addr[AW];
  assign sv_we  = h_we &&  h_addr[AW];
  assign flush  = reg_we && (h_addr[2:0] == SVM_CTRL_A) && !h_wdata[SVM_EN_B];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      svm_en     <= 1'b0;
      done       <= 1'b0;
      miss       <= 1'b0;
      quant_step <= '0;
      bias       <= '0;
      fv_size    <= '0;
      label      <= 1'b0;
      score      <= '0;
    end else begin
      if (reg_we) begin
        unique case (h_addr[2:0])
          SVM_CTRL_A: begin
            svm_en <= h_wdata[SVM_EN_B];
            if (h_wdata[SVM_EN_B] && !svm_en) begin
              done <= 1'b0;
              miss <= 1'b0;
            end else if (!h_wdata[SVM_MISS_B]) begin
              miss <= 1'b0;
            end
          end
          QUANTIZE_A: quant_step <= h_wdata[QSTEP_W-1:0];
          BIAS_A:     bias       <= h_wdata;
          FVSIZE_A:   fv_size    <= h_wdata;
          default: ;
        endcase
      end
      if (miss_set) miss <= 1'b1;
      if (done_set) begin
        done   <= 1'b1;
        svm_en <= 1'b0;
        label  <= done_label;
        score  <= done_score;
      end
    end
  end

  always_comb begin
    h_rdata = '0;
    if (!h_addr[AW]) begin
      unique case (h_addr[2:0])
        SVM_CTRL_A: begin
          h_rdata[SVM_EN_B]      = svm_en;
          h_rdata[SVM_QSTEPOK_B] = (quant_step != '0);
          h_rdata[SVM_MISS_B]    = miss;
          h_rdata[SVM_DONE_B]    = done;
        end
        QUANTIZE_A: h_rdata = 32'(quant_step);
        BIAS_A:     h_rdata = bias;
        FVSIZE_A:   h_rdata = fv_size;
        RESULT_A:   h_rdata = {31'd0, label};
        SCORE_A:    h_rdata = score;
        default:    h_rdata = '0;
      endcase
    end
  end

  dp_ram #(.DEPTH(SV_WORDS), .W(32)) u_sv (
    .clk     (clk),
    .a_en    (e_rd_en),
    .a_addr  (e_rd_addr),
    .a_rdata (e_rd_data),
    .b_we    (sv_we),
    .b_addr  (h_addr[AW-1:0]),
    .b_wdata (h_wdata)
  );
endmodule
