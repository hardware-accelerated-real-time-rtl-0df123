// svm: the SVM classification component.
//
// Holds the Feature Vector Data FIFO filled by the HOG, the Support Vector
// Data cache and registers loaded by the host, and a pipeline of QUANT
// (coefficient decompression) and LIN_COMB (multiply-accumulate), CORES
// values wide. The control path is the document's state machine:
//   RESET    after power-on or while SvmEN is 0
//   NOP      waits for feature values, or for support vectors
//   FETCH    SvmCacheMiss is set and the engine waits until the host has
//            loaded the next SV_WORDS words of coefficients and cleared it
//   CLASSIFY feeds CORES feature values and their coefficients per cycle
//            into the pipeline, back to NOP after each block histogram
// Coefficient i belongs to feature value i. The cache holds SV_WORDS*4
// coefficients (a chunk); the host preloads chunk 0 and each later chunk is
// requested by a cache miss when the feature index reaches it, provided the
// index is still below FEATVEC_SIZE. The image ends with the value the HOG
// flagged as last (VSYNC): its score is compared with zero after the bias is
// added, the result is stored in RESULT/SCORE, SvmDone is set and SvmEN
// cleared. Because the engine only waits for the host when it has no data
// of its own left, refills overlap the HOG's work and the FIFO absorbs it.
//
// The FIFO keeps its contents while SvmEN is 0, so the HOG may start first;
// an explicit halt (host writes SvmEN = 0) empties it.
//
// Interface: host register/memory port as in svm_data_cache; a push port
// for the FIFO (fv_full backpressure). Three cycles from a FIFO pop to the
// accumulator.
module svm
  import harva_pkg::*;
#(
  parameter int SV_WORDS   = 128,
  parameter int FIFO_DEPTH = 144,
  parameter int CORES      = 1,
  localparam int AW        = $clog2(SV_WORDS),
  localparam int CHUNK     = SV_WORDS * 4,
  localparam int CHUNK_LG  = $clog2(CHUNK)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [AW:0] h_addr,
  input  logic        h_we,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  input  logic        fv_wr,
  input  fv_t         fv_data,
  output logic        fv_full,
  output logic        miss_event     // pulse when a support-vector refill is requested
);
  typedef enum logic [1:0] {RESET, NOP, FETCH, CLASSIFY} state_t;
  state_t state;

  logic               svm_en, miss, miss_set, done_set;
  logic [QSTEP_W-1:0] quant_step;
  logic signed [31:0] bias;
  logic [31:0]        fv_size;
  logic               sv_rd_en;
  logic [AW-1:0]      sv_rd_addr;
  logic [31:0]        sv_rd_data;
  logic               lc_done, lc_label;
  logic signed [31:0] lc_score;
  logic               erst_n, flush, frst_n;

  assign erst_n = rst_n && svm_en;
  assign frst_n = rst_n && !flush;

  svm_data_cache #(.SV_WORDS(SV_WORDS)) u_cache (
    .clk(clk), .rst_n(rst_n),
    .h_addr(h_addr), .h_we(h_we), .h_wdata(h_wdata), .h_rdata(h_rdata),
    .svm_en(svm_en), .quant_step(quant_step), .bias(bias), .fv_size(fv_size),
    .miss(miss), .flush(flush), .miss_set(miss_set), .done_set(done_set),
    .done_label(lc_label), .done_score(lc_score),
    .e_rd_en(sv_rd_en), .e_rd_addr(sv_rd_addr), .e_rd_data(sv_rd_data)
  );

  // Feature Vector Data FIFO
  logic                  f_valid, f_pop;
  fv_t [CORES-1:0]       f_data;
  logic [$clog2(FIFO_DEPTH+1)-1:0] unused_f_count;   // fill level, not needed here

  fv_fifo #(.DEPTH(FIFO_DEPTH), .RD_N(CORES)) u_fifo (
    .clk(clk), .rst_n(frst_n),
    .wr_en(fv_wr), .wr_data(fv_data), .full(fv_full),
    .rd_valid(f_valid), .rd_pop(f_pop), .rd_data(f_data), .count(unused_f_count)
  );

  // Control path
  logic [31:0] cidx;
  logic [31:0] loaded_chunk;
  logic [5:0]  blk_cnt;
  logic        ended;
  logic        need_fetch;
  logic        group_last;

  assign need_fetch = ((cidx >> CHUNK_LG) != loaded_chunk) && (cidx < fv_size);

  always_comb begin
    group_last = 1'b0;
    for (int i = 0; i < CORES; i++) group_last |= f_data[i].last;
  end

  assign f_pop      = (state == CLASSIFY) && f_valid && !need_fetch && !ended;
  assign sv_rd_en   = f_pop;
  assign sv_rd_addr = AW'(cidx >> 2);
  assign miss_event = miss_set;

  always_ff @(posedge clk) begin
    if (!erst_n) begin
      state        <= RESET;
      cidx         <= '0;
      loaded_chunk <= '0;
      blk_cnt      <= '0;
      ended        <= 1'b0;
      miss_set     <= 1'b0;
    end else begin
      miss_set <= 1'b0;
      unique case (state)
        RESET: state <= NOP;
        NOP: begin
          if (!ended) begin
            if (need_fetch) begin
              miss_set <= 1'b1;
              state    <= FETCH;
            end else if (f_valid) begin
              state <= CLASSIFY;
            end
          end
        end
        FETCH: begin
          if (!miss && !miss_set) begin
            loaded_chunk <= loaded_chunk + 1;
            state        <= CLASSIFY;
          end
        end
        CLASSIFY: begin
          if (f_pop) begin
            cidx <= cidx + CORES;
            if (group_last) begin
              ended   <= 1'b1;
              blk_cnt <= '0;
              state   <= NOP;
            end else if (32'(blk_cnt) + CORES == HIST_LEN) begin
              blk_cnt <= '0;
              state   <= NOP;      // BLOCK_CLASS_DONE
            end else begin
              blk_cnt <= blk_cnt + 6'(CORES);
            end
          end else if (need_fetch || ended) begin
            state <= NOP;
          end
        end
        default: state <= NOP;
      endcase
    end
  end

  // Pipeline: pop/read -> QUANT -> LIN_COMB
  logic                     s1_valid, s1_last;
  logic [1:0]               s1_off;
  logic [CORES-1:0][NORM_W-1:0] s1_x;
  logic [CORES-1:0][COEF_W-1:0] s1_q;

  always_ff @(posedge clk) begin
    if (!erst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_off   <= '0;
      s1_x     <= '0;
    end else begin
      s1_valid <= f_pop;
      s1_last  <= f_pop && group_last;
      s1_off   <= cidx[1:0];
      for (int i = 0; i < CORES; i++) s1_x[i] <= f_data[i].value;
    end
  end

  always_comb begin
    for (int i = 0; i < CORES; i++) s1_q[i] = sv_rd_data[8 * (32'(s1_off) + i) +: 8];
  end

  logic                         q_valid, q_last;
  logic [CORES-1:0][SV_W-1:0]   q_w;
  logic [CORES-1:0][NORM_W-1:0] q_x;

  quant #(.N(CORES)) u_quant (
    .clk(clk), .rst_n(erst_n),
    .in_valid(s1_valid), .in_q(s1_q), .in_x(s1_x), .in_last(s1_last), .step(quant_step),
    .out_valid(q_valid), .out_w(q_w), .out_x(q_x), .out_last(q_last)
  );

  lin_comb #(.N(CORES)) u_lin (
    .clk(clk), .rst_n(erst_n),
    .in_valid(q_valid), .in_w(q_w), .in_x(q_x), .in_last(q_last), .bias(bias),
    .done(lc_done), .label(lc_label), .score(lc_score)
  );

  assign done_set = lc_done;
endmodule
