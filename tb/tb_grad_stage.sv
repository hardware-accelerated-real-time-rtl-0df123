// tb_grad_stage: random Gx/Gy inputs of eight lanes into a one-core and an
// eight-core gradient stage at once; every magnitude and bin is compared
// with the reference, and the eight-core stage must be faster.
module tb_grad_stage;
  import harva_pkg::*;
  import harva_ref_pkg::ref_mag, harva_ref_pkg::ref_bin;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [1:0] in_ready, out_valid, out_ready, acc;
  grad_in_t in_data = '0;
  grad_out_t out_data [2];
  int checks = 0, failures = 0;
  grad_out_t exp_q[2][$];
  int busy_cycles[2] = '{0, 0};

  grad_stage #(.CORES(1)) dut1 (.clk, .rst_n, .in_valid(in_valid && !acc[0]), .in_ready(in_ready[0]),
    .in_data, .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(out_data[0]));
  grad_stage #(.CORES(8)) dut8 (.clk, .rst_n, .in_valid(in_valid && !acc[1]), .in_ready(in_ready[1]),
    .in_data, .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(out_data[1]));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clr_acc = 0;
  always @(posedge clk)
    if (clr_acc) acc <= '0;
    else acc <= acc | (in_ready & {2{in_valid}});

  always @(negedge clk) out_ready = {1'($urandom % 3 != 0), 1'($urandom % 3 != 0)};

  for (genvar d = 0; d < 2; d++) begin : g_sb
    always @(posedge clk) if (rst_n) begin
      if (!in_ready[d] && !out_valid[d]) busy_cycles[d]++;
      if (out_valid[d] && out_ready[d]) begin
        checks++;
        if (exp_q[d].size() == 0 || out_data[d] !== exp_q[d][0]) begin
          failures++;
          if (failures < 10) $display("FAIL dut %0d output mismatch", d);
        end
        if (exp_q[d].size()) void'(exp_q[d].pop_front());
      end
    end
  end

  initial begin
    grad_out_t e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      e = '0;
      for (int l = 0; l < 8; l++) begin
        int x, y;
        x = (n == 0) ? 255 : (n == 1) ? -255 : int'($urandom % 511) - 255;
        y = (n == 0) ? -255 : (n == 1) ? 0 : int'($urandom % 511) - 255;
        in_data.gx[l] = G_W'(x);
        in_data.gy[l] = G_W'(y);
        e.mag[l] = MAG_W'(ref_mag(x, y));
        e.bin[l] = BIN_W'(ref_bin(x, y));
      end
      in_data.half = 1'(n);
      in_data.tag = blk_tag_t'(6'($urandom));
      e.half = in_data.half;
      e.tag = in_data.tag;
      exp_q[0].push_back(e);
      exp_q[1].push_back(e);
      clr_acc = 1;
      @(negedge clk);
      clr_acc = 0;
      in_valid = 1;
      while (acc != 2'b11) @(negedge clk);
      in_valid = 0;
    end
    wait (exp_q[0].size() == 0 && exp_q[1].size() == 0);
    $display("busy cycles: 1 core %0d, 8 cores %0d", busy_cycles[0], busy_cycles[1]);
    checks++;
    if (busy_cycles[1] * 4 > busy_cycles[0]) begin failures++; $display("FAIL 8 cores not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
