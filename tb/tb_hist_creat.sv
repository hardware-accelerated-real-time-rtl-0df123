// tb_hist_creat: twelve blocks of 32 random inputs (16 rows x 2 halves of
// eight magnitude/bin pairs) under output backpressure. Each emitted 36-value
// histogram and its HSYNC/VSYNC flags are compared with sums computed here.
// Inputs of a block use few distinct bins so that bins repeat within an input.
module tb_hist_creat;
  import harva_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_eol, out_eoi;
  grad_out_t in_data = '0;
  hist_t out_hist;
  int checks = 0, failures = 0;
  hist_t exp_h[$];
  logic [1:0] exp_f[$];

  hist_creat dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom % 8 == 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks += 2;
    if (exp_h.size() == 0 || out_hist !== exp_h[0]) begin
      failures++;
      $display("FAIL histogram %0d", checks / 2);
    end
    if (exp_f.size() == 0 || {out_eol, out_eoi} !== exp_f[0]) begin
      failures++;
      $display("FAIL flags");
    end
    if (exp_h.size()) begin void'(exp_h.pop_front()); void'(exp_f.pop_front()); end
  end

  initial begin
    hist_t h;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int b = 0; b < 12; b++) begin
      blk_tag_t tag;
      int nb;
      nb = (b % 3 == 0) ? 9 : 2;
      h = '0;
      tag.eol = (b % 4 == 1);
      tag.eoi = (b == 11);
      for (int r = 0; r < 16; r++)
        for (int hf = 0; hf < 2; hf++) begin
          @(negedge clk);
          tag.row = 4'(r);
          in_data.tag = tag;
          in_data.half = 1'(hf);
          for (int l = 0; l < 8; l++) begin
            int bn, cl;
            bn = int'($urandom % nb) + ((b % 3 == 0) ? 0 : 7 - (b % 3) * 2);
            in_data.bin[l] = BIN_W'(bn);
            in_data.mag[l] = (b % 3 == 2 && l == 0) ? 17'h1FFFF : 17'($urandom % 92000);
            cl = (r >= 8 ? 2 : 0) + hf;
            h[cl * 9 + bn] += HBIN_W'(in_data.mag[l]);
          end
          in_valid = 1;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1 in_valid = 0;
        end
      exp_h.push_back(h);
      exp_f.push_back({tag.eol, tag.eoi});
    end
    wait (exp_h.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
