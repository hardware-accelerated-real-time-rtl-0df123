// hog: the Histogram of Oriented Gradients component.
//
// A four-stage pipeline behind a host-loaded data cache:
//   hog_fetch   reads three vertically adjacent pixel words per input from
//               the Pixel Data section, pads image edges, tags HSYNC/VSYNC
//   conv2d      Gx, Gy of four pixels per word                 (stage 1)
//   grad_stage  magnitude and orientation bin, GRAD_CORES wide  (stage 2)
//   hist_creat  36-value histogram of each 16x16 block          (stage 3)
//   hist_norm   L1 normalisation, NORM_CORES wide               (stage 4)
// Every stage hands its result over through an output register with a
// valid/ready handshake, so stages run concurrently on different data and
// a stage stalls only when its input is empty or its output is full.
// The normalised histograms leave one value per cycle towards the SVM's
// FIFO, the last value of the image flagged. When it has been accepted the
// component sets HogDone and clears HogEN.
//
// The pipeline is held in reset while HogEN is 0, so clearing HogEN halts
// the current image. Host interface as in hog_data_cache. hsync/vsync
// pulse when the fetch unit finishes a block row / the image; miss_event
// pulses when a pixel-cache refill is requested.
module hog
  import harva_pkg::*;
#(
  parameter int PIX_WORDS  = 256,
  parameter int GRAD_CORES = 1,
  parameter int NORM_CORES = 1,
  localparam int AW        = $clog2(PIX_WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [AW:0] h_addr,
  input  logic        h_we,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  output logic        fv_wr,
  output fv_t         fv_data,
  input  logic        fv_full,
  output logic        hsync,
  output logic        vsync,
  output logic        miss_event
);
  logic          hog_en, miss, miss_set, done_set;
  logic [15:0]   img_w, img_h;
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  logic [31:0]   rd_data;
  logic          erst_n;

  assign erst_n     = rst_n && hog_en;
  assign miss_event = miss_set;

  hog_data_cache #(.PIX_WORDS(PIX_WORDS)) u_cache (
    .clk(clk), .rst_n(rst_n),
    .h_addr(h_addr), .h_we(h_we), .h_wdata(h_wdata), .h_rdata(h_rdata),
    .hog_en(hog_en), .img_w(img_w), .img_h(img_h),
    .miss(miss), .miss_set(miss_set), .done_set(done_set),
    .e_rd_en(rd_en), .e_rd_addr(rd_addr), .e_rd_data(rd_data)
  );

  logic      c_valid, c_ready;
  conv_in_t  c_data;
  logic      g_valid, g_ready;
  grad_in_t  g_data;
  logic      h_valid, h_ready;
  grad_out_t h_data;
  logic      n_valid, n_ready, n_eol, n_eoi;
  hist_t     n_hist;
  logic      s_valid, s_ready, s_eol, s_eoi;
  nhist_t    s_hist;

  hog_fetch #(.PIX_WORDS(PIX_WORDS)) u_fetch (
    .clk(clk), .rst_n(erst_n),
    .img_w(img_w), .img_h(img_h), .miss(miss), .miss_set(miss_set),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data),
    .hsync(hsync), .vsync(vsync)
  );

  conv2d u_conv (
    .clk(clk), .rst_n(erst_n),
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(g_valid), .out_ready(g_ready), .out_data(g_data)
  );

  grad_stage #(.CORES(GRAD_CORES)) u_grad (
    .clk(clk), .rst_n(erst_n),
    .in_valid(g_valid), .in_ready(g_ready), .in_data(g_data),
    .out_valid(h_valid), .out_ready(h_ready), .out_data(h_data)
  );

  hist_creat u_hist (
    .clk(clk), .rst_n(erst_n),
    .in_valid(h_valid), .in_ready(h_ready), .in_data(h_data),
    .out_valid(n_valid), .out_ready(n_ready), .out_hist(n_hist),
    .out_eol(n_eol), .out_eoi(n_eoi)
  );

  hist_norm #(.CORES(NORM_CORES)) u_norm (
    .clk(clk), .rst_n(erst_n),
    .in_valid(n_valid), .in_ready(n_ready), .in_hist(n_hist),
    .in_eol(n_eol), .in_eoi(n_eoi),
    .out_valid(s_valid), .out_ready(s_ready), .out_hist(s_hist),
    .out_eol(s_eol), .out_eoi(s_eoi)
  );

  // Serialiser: one normalised value per cycle into the feature FIFO.
  logic [5:0] sidx;
  logic       s_last;

  assign s_last  = (sidx == 6'(HIST_LEN - 1));
  assign fv_wr   = s_valid && !fv_full;
  assign fv_data = '{last: s_eoi && s_last, value: s_hist[sidx]};
  assign s_ready = fv_wr && s_last;

  always_ff @(posedge clk) begin
    if (!erst_n) begin
      sidx     <= '0;
      done_set <= 1'b0;
    end else begin
      done_set <= 1'b0;
      if (fv_wr) begin
        sidx <= s_last ? '0 : sidx + 1'b1;
        if (s_last && s_eoi) done_set <= 1'b1;
      end
    end
  end

  // s_eol marks the HSYNC blocks on the output side; it needs no action here.
  logic unused_eol;
  assign unused_eol = s_eol;
endmodule
