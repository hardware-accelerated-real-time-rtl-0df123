// tb_hog: the HOG component alone with two gradient cores and two
// normalisation lanes on a 24x16 image (six blocks) through a two-slot pixel
// cache. The testbench plays the host (loads tiles, answers refill requests,
// polls HogDone) and a feature FIFO that is randomly full. Every normalised
// value and the last-value flag are compared with the reference features.
// The first run is halted midway by clearing HogEN; the image is then run
// again from the start and must come out complete and correct. Counts
// HSYNC, VSYNC and refill requests.
module tb_hog;
  import harva_pkg::*;
  import harva_ref_pkg::*;
  localparam int PIX_WORDS = 256, SLOTS = 2, W = 24, H = 16, NBLK = (W / 8) * (H / 8);
  logic clk = 0, rst_n = 0;
  logic [8:0] h_addr = '0;
  logic h_we = 0, fv_wr, fv_full = 0, hsync, vsync, miss_event;
  logic [31:0] h_wdata = '0, h_rdata;
  fv_t fv_data;
  int checks = 0, failures = 0, fidx = 0, n_hs = 0, n_vs = 0, n_miss = 0;
  bit checking = 0;

  hog #(.PIX_WORDS(PIX_WORDS), .GRAD_CORES(2), .NORM_CORES(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(negedge clk) fv_full = ($urandom % 4 == 0);

  always @(posedge clk) if (rst_n) begin
    if (hsync) n_hs++;
    if (vsync) n_vs++;
    if (miss_event) n_miss++;
    if (fv_wr) begin
      check(!fv_full, "no push while full");
      if (checking) begin
        check(fv_data.value == 16'(feat[fidx]), $sformatf("feature %0d: %0d expected %0d", fidx, fv_data.value, feat[fidx]));
        check(fv_data.last == (fidx == int'(n_feat) - 1), "last flag");
      end
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

  task automatic load(input int first);
    for (int s = 0; s < SLOTS; s++)
      if (first + s < NBLK)
        for (int t = 0; t < TILE_ROWS; t++)
          for (int c = 0; c < TILE_COLS; c++)
            wr(256 + s * SLOT_WORDS + t * TILE_COLS + c, tile_word(first + s, t, c));
  endtask

  initial begin
    logic [31:0] d;
    int next;
    bit done;
    make_image(W, H);
    compute_features();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // run 1: halted after some output
    load(0);
    wr(IMG_DIM_A, {16'(W), 16'(H)});
    wr(HOG_CTRL_A, 1);
    wait (fidx >= 40);
    wr(HOG_CTRL_A, 0);
    repeat (20) @(negedge clk);
    check(!fv_wr && !hsync, "quiet after halt");
    rd(HOG_CTRL_A, d);
    check(d == 0, "HogEN cleared by the halt, not done");
    // run 2: the whole image
    n_hs = 0; n_vs = 0; n_miss = 0; fidx = 0;
    checking = 1;
    load(0);
    wr(HOG_CTRL_A, 1);
    next = SLOTS;
    done = 0;
    while (!done) begin
      rd(HOG_CTRL_A, d);
      if (d[HOG_DONE_B]) done = 1;
      else if (d[HOG_MISS_B]) begin
        load(next);
        next += SLOTS;
        wr(HOG_CTRL_A, 1);
      end
    end
    check(d[HOG_EN_B] == 0, "HogEN cleared when done");
    check(fidx == int'(n_feat), $sformatf("%0d values, expected %0d", fidx, n_feat));
    check(n_hs == H / 8 && n_vs == 1, $sformatf("HSYNC %0d VSYNC %0d", n_hs, n_vs));
    check(n_miss == NBLK / SLOTS - 1, $sformatf("refill requests %0d", n_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
