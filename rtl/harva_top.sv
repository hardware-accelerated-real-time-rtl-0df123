// harva_top: HOG+SVM pedestrian-detection co-processor.
//
// The HOG component turns a grey-level image, loaded tile by tile by the
// host into its pixel cache, into a feature vector of normalised block
// histograms (36 values per 16x16 block, blocks every 8 pixels). The values
// stream into the SVM component's FIFO, where they are multiplied with
// decompressed support-vector coefficients and summed; at the end of the
// image the bias is added and the sign of the result is the label
// (1 = pedestrian). The host (in the document, the CPU of the SoC) drives
// both components through two plain word-addressed ports, each with a
// register section and a data section, and answers the cache-miss bits by
// loading the next pixel tiles or coefficient chunk.
//
// Host ports: *_addr word address (top bit selects the data section),
// *_we write strobe, *_wdata, *_rdata combinational register read. Event
// outputs pulse for one cycle: hsync/vsync from the HOG fetch unit,
// hog_miss/svm_miss when a refill is requested. All logic is on clk with
// synchronous active-low reset.
module harva_top
  import harva_pkg::*;
#(
  parameter int PIX_WORDS  = 256,
  parameter int SV_WORDS   = 128,
  parameter int FIFO_DEPTH = 144,
  parameter int GRAD_CORES = 1,
  parameter int NORM_CORES = 1,
  parameter int SVM_CORES  = 1,
  localparam int HAW       = $clog2(PIX_WORDS),
  localparam int SAW       = $clog2(SV_WORDS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [HAW:0] hog_addr,
  input  logic         hog_we,
  input  logic [31:0]  hog_wdata,
  output logic [31:0]  hog_rdata,
  input  logic [SAW:0] svm_addr,
  input  logic         svm_we,
  input  logic [31:0]  svm_wdata,
  output logic [31:0]  svm_rdata,
  output logic         hsync,
  output logic         vsync,
  output logic         hog_miss,
  output logic         svm_miss
);
  logic fv_wr, fv_full;
  fv_t  fv_data;

  hog #(.PIX_WORDS(PIX_WORDS), .GRAD_CORES(GRAD_CORES), .NORM_CORES(NORM_CORES)) u_hog (
    .clk(clk), .rst_n(rst_n),
    .h_addr(hog_addr), .h_we(hog_we), .h_wdata(hog_wdata), .h_rdata(hog_rdata),
    .fv_wr(fv_wr), .fv_data(fv_data), .fv_full(fv_full),
    .hsync(hsync), .vsync(vsync), .miss_event(hog_miss)
  );

  svm #(.SV_WORDS(SV_WORDS), .FIFO_DEPTH(FIFO_DEPTH), .CORES(SVM_CORES)) u_svm (
    .clk(clk), .rst_n(rst_n),
    .h_addr(svm_addr), .h_we(svm_we), .h_wdata(svm_wdata), .h_rdata(svm_rdata),
    .fv_wr(fv_wr), .fv_data(fv_data), .fv_full(fv_full),
    .miss_event(svm_miss)
  );
endmodule
