// tb_harva_full: one INRIA-sized detection window (64x128 pixels, 128
// blocks, 4608 feature values) through the co-processor with every
// parameter at its default: 256-word pixel cache (two tiles), 128-word
// support-vector cache (512 coefficients), 144-entry FIFO, one core per
// stage. Same host model, reference and event counts as tb_harva_top, for
// one image; the cycle count of the whole window is printed.
module tb_harva_full;
  import harva_pkg::*;
  import harva_ref_pkg::*;

  localparam int PIX_WORDS  = 256;
  localparam int SV_WORDS   = 128;
  localparam int IMG_W      = 64;
  localparam int IMG_H      = 128;
  localparam int NIMG       = 1;
  localparam int WATCHDOG   = 3_000_000;

  localparam int HAW   = $clog2(PIX_WORDS);
  localparam int SAW   = $clog2(SV_WORDS);
  localparam int SLOTS = PIX_WORDS / SLOT_WORDS;
  localparam int CHUNK = SV_WORDS * 4;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [HAW:0] hog_addr;
  logic         hog_we;
  logic [31:0]  hog_wdata, hog_rdata;
  logic [SAW:0] svm_addr;
  logic         svm_we;
  logic [31:0]  svm_wdata, svm_rdata;
  logic         hsync, vsync, hog_miss, svm_miss;

  harva_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hsync = 0, n_vsync = 0, n_hog_miss = 0, n_svm_miss = 0;
  int n_full = 0, n_pad = 0, n_restart = 0;
  int fidx = 0;
  longint cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    cycles++;
    if (rst_n) begin
      if (hsync) n_hsync++;
      if (vsync) n_vsync++;
      if (hog_miss) n_hog_miss++;
      if (svm_miss) n_svm_miss++;
      if (dut.u_hog.s_valid && dut.fv_full) n_full++;
      if (dut.u_hog.c_valid && dut.u_hog.c_ready &&
          (dut.u_hog.u_fetch.rep_first || dut.u_hog.u_fetch.rep_last)) n_pad++;
      if (dut.fv_wr) begin
        check(dut.fv_data.value == 16'(feat[fidx]),
              $sformatf("feature %0d: got %0d expected %0d", fidx, dut.fv_data.value, feat[fidx]));
        check(dut.fv_data.last == (fidx == int'(n_feat) - 1), $sformatf("last flag at %0d", fidx));
        fidx++;
      end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Host accesses change the port signals at the falling edge.
  task automatic hog_wr(input int a, input logic [31:0] d);
    @(negedge clk);
    hog_addr = a[HAW:0]; hog_wdata = d; hog_we = 1'b1;
    @(negedge clk);
    hog_we = 1'b0;
  endtask

  task automatic svm_wr(input int a, input logic [31:0] d);
    @(negedge clk);
    svm_addr = a[SAW:0]; svm_wdata = d; svm_we = 1'b1;
    @(negedge clk);
    svm_we = 1'b0;
  endtask

  task automatic hog_rd(input int a, output logic [31:0] d);
    @(negedge clk);
    hog_addr = a[HAW:0];
    #1 d = hog_rdata;
  endtask

  task automatic svm_rd(input int a, output logic [31:0] d);
    @(negedge clk);
    svm_addr = a[SAW:0];
    #1 d = svm_rdata;
  endtask

  task automatic load_tiles(input int first, input int nblk);
    for (int s = 0; s < SLOTS; s++) begin
      int n;
      n = first + s;
      if (n >= nblk) break;
      for (int t = 0; t < TILE_ROWS; t++)
        for (int c = 0; c < TILE_COLS; c++)
          hog_wr((1 << HAW) + s * SLOT_WORDS + t * TILE_COLS + c, tile_word(n, t, c));
    end
  endtask

  task automatic load_chunk(input int k);
    for (int i = 0; i < SV_WORDS; i++) begin
      logic [31:0] w;
      for (int j = 0; j < 4; j++) begin
        int ci;
        ci = k * CHUNK + i * 4 + j;
        w[8*j +: 8] = (ci < MAXF) ? coef[ci] : 8'd0;
      end
      svm_wr((1 << SAW) + i, w);
    end
  endtask

  initial begin
    int nblk;
    int unsigned step;
    int bias;
    longint sc;
    logic [31:0] d;
    hog_addr = '0; hog_we = 1'b0; hog_wdata = '0;
    svm_addr = '0; svm_we = 1'b0; svm_wdata = '0;
    make_image(IMG_W, IMG_H);
    make_coefs(MAXF);
    compute_features();
    nblk = (IMG_W / 8) * (IMG_H / 8);
    step = 700;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int im = 0; im < NIMG; im++) begin
      int hog_next;
      bit hog_done, svm_done;
      sc = ref_score(step, 0);
      // first image: bias 0; second: bias that flips the sign of the score
      bias = (im == 0) ? 0 : ((sc >= 0) ? -int'(sc >>> 16) - 2 : -int'(sc >>> 16) + 2);
      sc = ref_score(step, bias);
      fidx = 0;
      load_tiles(0, nblk);
      load_chunk(0);
      hog_wr(IMG_DIM_A, {16'(IMG_W), 16'(IMG_H)});
      svm_wr(QUANTIZE_A, step);
      svm_wr(BIAS_A, bias);
      svm_wr(FVSIZE_A, n_feat);
      svm_rd(SVM_CTRL_A, d);
      check(d[SVM_QSTEPOK_B] == 1'b1, "QuantStepOK after QUANTIZE written");
      hog_wr(HOG_CTRL_A, 32'h1);
      svm_wr(SVM_CTRL_A, 32'h1);
      if (im > 0) n_restart++;
      hog_next = SLOTS;
      hog_done = 0;
      svm_done = 0;
      fork
        begin
          while (!hog_done) begin
            hog_rd(HOG_CTRL_A, d);
            if (d[HOG_DONE_B]) hog_done = 1;
            else if (d[HOG_MISS_B]) begin
              load_tiles(hog_next, nblk);
              hog_next += SLOTS;
              hog_wr(HOG_CTRL_A, 32'h1);
            end
          end
        end
        begin
          int chunk;
          chunk = 1;
          while (!svm_done) begin
            svm_rd(SVM_CTRL_A, d);
            if (d[SVM_DONE_B]) svm_done = 1;
            else if (d[SVM_MISS_B]) begin
              // hold the refill back until the FIFO is full or the HOG is done
              while (!dut.fv_full && !dut.u_hog.u_cache.done) @(posedge clk);
              load_chunk(chunk);
              chunk++;
              svm_wr(SVM_CTRL_A, 32'h1);
            end
          end
        end
      join
      check(fidx == int'(n_feat), $sformatf("image %0d: %0d feature values, expected %0d", im, fidx, n_feat));
      svm_rd(RESULT_A, d);
      check(d[0] == (sc >= 0), $sformatf("image %0d: label %0d expected %0d", im, d[0], sc >= 0));
      svm_rd(SCORE_A, d);
      check($signed(d) == 32'(sc >>> 16), $sformatf("image %0d: score %0d expected %0d", im, $signed(d), sc >>> 16));
      hog_rd(HOG_CTRL_A, d);
      check(d[HOG_EN_B] == 1'b0 && d[HOG_DONE_B] == 1'b1, "HogEN cleared, HogDone set");
      $display("image %0d: label %0d score %0d, %0d cycles so far", im, sc >= 0, sc >>> 16, cycles);
    end
    $display("events: hsync %0d vsync %0d hog_miss %0d svm_miss %0d fifo_full %0d padded_inputs %0d restarts %0d",
             n_hsync, n_vsync, n_hog_miss, n_svm_miss, n_full, n_pad, n_restart);
    check(n_hsync == NIMG * (IMG_H / 8), "HSYNC count");
    check(n_vsync == NIMG, "VSYNC count");
    check(n_hog_miss == NIMG * ((nblk + SLOTS - 1) / SLOTS - 1), "HOG cache miss count");
    check(n_svm_miss == NIMG * ((int'(n_feat) + CHUNK - 1) / CHUNK - 1), "SVM cache miss count");
    check(n_full > 0, "FIFO full stall happened");
    check(n_pad > 0, "edge padding happened");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
