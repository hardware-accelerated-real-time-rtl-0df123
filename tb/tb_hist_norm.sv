// tb_hist_norm: random, all-zero, single-bin and extreme histograms into a
// one-lane and a six-lane normalisation unit at once. Every normalised value
// min(65535, v * floor(2^40/(sum+min)) >> 24) and the HSYNC/VSYNC flags are
// compared with the reference; the six-lane unit must be faster.
module tb_hist_norm;
  import harva_pkg::*;
  import harva_ref_pkg::norm_hist;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_eol = 0, in_eoi = 0, clr_acc = 0;
  logic [1:0] in_ready, out_valid, out_ready, acc, out_eol, out_eoi;
  hist_t in_hist = '0;
  nhist_t out_hist [2];
  int checks = 0, failures = 0;
  nhist_t exp_q[2][$];
  logic [1:0] exp_f[2][$];
  int busy_cycles[2] = '{0, 0};

  hist_norm #(.CORES(1)) dut1 (.clk, .rst_n, .in_valid(in_valid && !acc[0]), .in_ready(in_ready[0]),
    .in_hist, .in_eol, .in_eoi, .out_valid(out_valid[0]), .out_ready(out_ready[0]),
    .out_hist(out_hist[0]), .out_eol(out_eol[0]), .out_eoi(out_eoi[0]));
  hist_norm #(.CORES(6)) dut6 (.clk, .rst_n, .in_valid(in_valid && !acc[1]), .in_ready(in_ready[1]),
    .in_hist, .in_eol, .in_eoi, .out_valid(out_valid[1]), .out_ready(out_ready[1]),
    .out_hist(out_hist[1]), .out_eol(out_eol[1]), .out_eoi(out_eoi[1]));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (clr_acc) acc <= '0;
    else acc <= acc | (in_ready & {2{in_valid}});

  always @(negedge clk) out_ready = {1'($urandom % 3 != 0), 1'($urandom % 3 != 0)};

  for (genvar d = 0; d < 2; d++) begin : g_sb
    always @(posedge clk) if (rst_n) begin
      if (!in_ready[d] && !out_valid[d]) busy_cycles[d]++;
      if (out_valid[d] && out_ready[d]) begin
        checks += 2;
        if (exp_q[d].size() == 0 || out_hist[d] !== exp_q[d][0]) begin
          failures++;
          if (failures < 10) $display("FAIL dut %0d histogram mismatch", d);
        end
        if (exp_f[d].size() == 0 || {out_eol[d], out_eoi[d]} !== exp_f[d][0]) begin
          failures++;
          if (failures < 10) $display("FAIL dut %0d flags", d);
        end
        if (exp_q[d].size()) begin void'(exp_q[d].pop_front()); void'(exp_f[d].pop_front()); end
      end
    end
  end

  initial begin
    int unsigned h[36], o[36];
    nhist_t e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      foreach (h[i]) begin
        case (n)
          0: h[i] = 0;                                  // empty block
          1: h[i] = (i == 5) ? 1000 : 0;                // one bin: saturates
          2: h[i] = 24'hFFFFFF;                         // largest values
          3: h[i] = $urandom % 3;                       // tiny values
          default: h[i] = $urandom % (n % 2 ? 6000000 : 200000);
        endcase
        in_hist[i] = HBIN_W'(h[i]);
      end
      norm_hist(h, o);
      foreach (o[i]) e[i] = NORM_W'(o[i]);
      in_eol = 1'($urandom);
      in_eoi = 1'($urandom);
      for (int d = 0; d < 2; d++) begin
        exp_q[d].push_back(e);
        exp_f[d].push_back({in_eol, in_eoi});
      end
      clr_acc = 1;
      @(negedge clk);
      clr_acc = 0;
      in_valid = 1;
      while (acc != 2'b11) @(negedge clk);
      in_valid = 0;
    end
    wait (exp_q[0].size() == 0 && exp_q[1].size() == 0);
    $display("busy cycles: 1 lane %0d, 6 lanes %0d", busy_cycles[0], busy_cycles[1]);
    checks++;
    if (busy_cycles[1] >= busy_cycles[0]) begin failures++; $display("FAIL 6 lanes not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
