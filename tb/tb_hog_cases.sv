// tb_hog_cases: the HOG-only test cases of the co-processor, run on the HOG
// component at its default parameters with the SVM side left out:
//   block test  a 16x16 image: its first block is the 16x16 image itself
//               (the other three blocks start at x or y = 8 and are padded)
//   HSYNC test  a 64x16 image: two block rows of eight blocks, each row
//               ending with a right-edge padded block and an HSYNC
// For each case the host writes IMG_DIM, sets HogEN, answers refill
// requests and polls HogDone; every feature value is compared with the
// reference. The feature sink is never full here.
module tb_hog_cases;
  import harva_pkg::*;
  import harva_ref_pkg::*;
  localparam int PIX_WORDS = 256, SLOTS = PIX_WORDS / SLOT_WORDS;
  logic clk = 0, rst_n = 0;
  logic [8:0] h_addr = '0;
  logic h_we = 0, fv_wr, hsync, vsync, miss_event;
  logic [31:0] h_wdata = '0, h_rdata;
  fv_t fv_data;
  int checks = 0, failures = 0, fidx = 0, n_hs = 0, n_vs = 0, n_miss = 0;

  hog dut (.clk, .rst_n, .h_addr, .h_we, .h_wdata, .h_rdata, .fv_wr, .fv_data, .fv_full(1'b0),
           .hsync, .vsync, .miss_event);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (hsync) n_hs++;
    if (vsync) n_vs++;
    if (miss_event) n_miss++;
    if (fv_wr) begin
      check(fv_data.value == 16'(feat[fidx]), $sformatf("feature %0d: %0d expected %0d", fidx, fv_data.value, feat[fidx]));
      check(fv_data.last == (fidx == int'(n_feat) - 1), "last flag");
      fidx++;
    end
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    h_addr = 9'(a); h_wdata = d; h_we = 1;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    h_addr = 9'(a);
    #1 d = h_rdata;
  endtask

  task automatic load(input int first, input int nblk);
    for (int s = 0; s < SLOTS; s++)
      if (first + s < nblk)
        for (int t = 0; t < TILE_ROWS; t++)
          for (int c = 0; c < TILE_COLS; c++)
            wr(PIX_WORDS + s * SLOT_WORDS + t * TILE_COLS + c, tile_word(first + s, t, c));
  endtask

  task automatic run_case(input int w, input int h);
    logic [31:0] d;
    int next, nblk, cyc0;
    bit done;
    int unsigned hb[36], nb[36];
    make_image(w, h);
    compute_features();
    nblk = (w / 8) * (h / 8);
    n_hs = 0; n_vs = 0; n_miss = 0; fidx = 0;
    // the first block equals the histogram of the top-left 16x16 pixels
    block_hist(0, 0, hb);
    norm_hist(hb, nb);
    for (int i = 0; i < 36; i++) check(nb[i] == feat[i], "first block is the 16x16 subset");
    load(0, nblk);
    wr(IMG_DIM_A, {16'(w), 16'(h)});
    wr(HOG_CTRL_A, 1);
    cyc0 = $time;
    next = SLOTS;
    done = 0;
    while (!done) begin
      rd(HOG_CTRL_A, d);
      if (d[HOG_DONE_B]) done = 1;
      else if (d[HOG_MISS_B]) begin
        load(next, nblk);
        next += SLOTS;
        wr(HOG_CTRL_A, 1);
      end
    end
    check(fidx == int'(n_feat), $sformatf("%0dx%0d: %0d values, expected %0d", w, h, fidx, n_feat));
    check(n_hs == h / 8 && n_vs == 1, $sformatf("%0dx%0d: HSYNC %0d VSYNC %0d", w, h, n_hs, n_vs));
    check(n_miss == (nblk + SLOTS - 1) / SLOTS - 1, $sformatf("refill requests %0d", n_miss));
    $display("%0dx%0d image: %0d blocks, %0d values, %0d HSYNC, %0d refills", w, h, nblk, fidx, n_hs, n_miss);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_case(16, 16);
    run_case(64, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
