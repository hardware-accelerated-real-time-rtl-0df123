// tb_conv2d: random block rows of six word columns (pixel words above, on and
// below the row) under random output backpressure. Each output of eight
// Gx/Gy pairs is compared with the differences of neighbouring pixels taken
// straight from the input words, with its half and block tag.
module tb_conv2d;
  import harva_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  conv_in_t in_data = '0;
  grad_in_t out_data;
  int checks = 0, failures = 0;
  grad_in_t exp_q[$];

  conv2d dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom % 4 != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
      failures++;
      if (failures < 10) $display("FAIL output %0d: got %h expected %h", checks, out_data, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  initial begin
    logic [5:0][31:0] up, mid, dn;
    grad_in_t e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 200; r++) begin
      blk_tag_t tag;
      tag = '{eol: ($urandom % 5 == 0), eoi: (r == 199), row: 4'(r)};
      for (int c = 0; c < 6; c++) begin up[c] = $urandom; mid[c] = $urandom; dn[c] = $urandom; end
      for (int h = 0; h < 2; h++) begin
        e = '0;
        e.half = 1'(h);
        e.tag  = tag;
        for (int p = 0; p < 8; p++) begin
          int x;   // pixel index in the row of 24 pixels
          x = 4 + 8 * h + p;
          e.gx[p] = G_W'(int'(mid[(x + 1) / 4][8 * ((x + 1) % 4) +: 8]) - int'(mid[(x - 1) / 4][8 * ((x - 1) % 4) +: 8]));
          e.gy[p] = G_W'(int'(dn[x / 4][8 * (x % 4) +: 8]) - int'(up[x / 4][8 * (x % 4) +: 8]));
        end
        exp_q.push_back(e);
      end
      for (int c = 0; c < 6; c++) begin
        @(negedge clk);
        in_data = '{up: up[c], mid: mid[c], down: dn[c], col: 3'(c), tag: tag};
        in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
        if ($urandom % 3 == 0) repeat ($urandom % 4) @(posedge clk);
      end
    end
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL extra output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
