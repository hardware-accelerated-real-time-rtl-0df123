// tb_hog_fetch: walks a 32x16 image (eight blocks) through a two-slot pixel
// cache. The testbench plays the host (loads the next tiles on each refill
// request and clears the miss bit) and the cache memory (one-cycle read
// latency). Every convolution input is compared with the pixel words taken
// straight from the image with coordinates clamped to it, so top, bottom,
// left and right padding are all checked; also the column and tag fields,
// HSYNC/VSYNC pulses and the number of refill requests, under random
// output backpressure.
module tb_hog_fetch;
  import harva_pkg::*;
  import harva_ref_pkg::*;
  localparam int PIX_WORDS = 256, SLOTS = 2, W = 32, H = 16, NBLK = (W / 8) * (H / 8);
  logic clk = 0, rst_n = 0;
  logic [15:0] img_w = W, img_h = H;
  logic miss = 0, miss_set, rd_en, out_valid, out_ready = 0, hsync, vsync;
  logic [7:0] rd_addr;
  logic [31:0] rd_data;
  conv_in_t out_data;
  logic [31:0] mem [PIX_WORDS];
  int checks = 0, failures = 0, n_miss = 0, n_hs = 0, n_vs = 0, n_in = 0;

  hog_fetch #(.PIX_WORDS(PIX_WORDS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] img_word(int x, int y);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) w[8*i +: 8] = 8'(pix(x + i, y));
    return w;
  endfunction

  task automatic load(input int first);
    for (int s = 0; s < SLOTS; s++)
      if (first + s < NBLK)
        for (int t = 0; t < TILE_ROWS; t++)
          for (int c = 0; c < TILE_COLS; c++)
            mem[s * SLOT_WORDS + t * TILE_COLS + c] = tile_word(first + s, t, c);
  endtask

  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];
  always @(negedge clk) out_ready = ($urandom % 3 != 0);

  // expected input sequence
  always @(posedge clk) if (rst_n) begin
    if (hsync) n_hs++;
    if (vsync) n_vs++;
    if (out_valid && out_ready) begin
      int blk, bi, bj, r, c, x, y;
      blk = n_in / 96;
      r = (n_in / 6) % 16;
      c = n_in % 6;
      bi = blk % (W / 8);
      bj = blk / (W / 8);
      x = bi * 8 - 4 + 4 * c;
      y = bj * 8 + r;
      check(out_data.up == img_word(x, y - 1) && out_data.mid == img_word(x, y) &&
            out_data.down == img_word(x, y + 1), $sformatf("pixel words of input %0d", n_in));
      check(out_data.col == 3'(c) && out_data.tag.row == 4'(r), "column and row");
      check(out_data.tag.eol == (bi == W / 8 - 1) && out_data.tag.eoi == (blk == NBLK - 1), "tag flags");
      n_in++;
    end
  end

  initial begin
    int next;
    make_image(W, H);
    load(0);
    next = SLOTS;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (n_in < NBLK * 96) begin
      @(negedge clk);
      if (miss_set) begin
        miss = 1;
        n_miss++;
        check(!out_valid, "no input offered during a refill");
        repeat ($urandom % 50) @(negedge clk);
        load(next);
        next += SLOTS;
        miss = 0;
      end
    end
    repeat (20) @(negedge clk);
    check(n_in == NBLK * 96, "input count");
    check(n_miss == NBLK / SLOTS - 1, $sformatf("refill requests %0d", n_miss));
    check(n_hs == H / 8, "HSYNC pulses");
    check(n_vs == 1, "VSYNC pulse");
    check(!out_valid, "idle after the image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
