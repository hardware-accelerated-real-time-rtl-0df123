// tb_lin_comb: multiply-accumulate of random decompressed weights and feature
// values with one lane and with three lanes, for several vectors of random
// length and bias. Checks label = (sum + bias*2^16 >= 0), the 32-bit score
// (sum + bias*2^16) >> 16 including saturation on a vector of maximal terms,
// the done pulse two cycles after the last value, and gaps in the input.
module tb_lin_comb;
  import harva_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  logic [2:0][SV_W-1:0] in_w = '0;
  logic [2:0][NORM_W-1:0] in_x = '0;
  logic signed [31:0] bias = 0;
  logic done1, done3, label1, label3;
  logic signed [31:0] score1, score3;
  int checks = 0, failures = 0;

  lin_comb dut1 (.clk, .rst_n, .in_valid, .in_w(in_w[0]), .in_x(in_x[0]), .in_last, .bias,
                 .done(done1), .label(label1), .score(score1));
  lin_comb #(.N(3)) dut3 (.clk, .rst_n, .in_valid, .in_w, .in_x, .in_last, .bias,
                 .done(done3), .label(label3), .score(score3));
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

  initial begin
    longint s1, s3, f1, f3, e1, e3;
    repeat (3) @(posedge clk);
    for (int v = 0; v < 12; v++) begin
      int len;
      // each vector starts from a cleared accumulator (the engine's reset)
      @(negedge clk);
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      len = (v == 0) ? 300 : 1 + int'($urandom % 200);
      bias = (v == 1) ? 32'sh7FFF_FFFF : (v == 2) ? -32'sh8000_0000 : int'($urandom % 200000) - 100000;
      s1 = 0; s3 = 0;
      for (int n = 0; n < len; n++) begin
        @(negedge clk);
        for (int i = 0; i < 3; i++) begin
          in_w[i] = (v == 0) ? 24'h7FFFFF : 24'($urandom);
          in_x[i] = (v == 0) ? 16'hFFFF : (v < 4) ? 16'($urandom) : 16'($urandom % 3000);
          s3 += longint'($signed(in_w[i])) * longint'(in_x[i]);
        end
        s1 += longint'($signed(in_w[0])) * longint'(in_x[0]);
        in_valid = 1;
        in_last = (n == len - 1);
        if (n != len - 1 && $urandom % 4 == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
      end
      @(negedge clk);
      in_valid = 0;
      in_last = 0;
      check(!done1 && !done3, "done early");
      @(negedge clk);
      check(done1 && done3, "done pulse two cycles after the last value");
      f1 = s1 + (longint'(bias) <<< 16);
      f3 = s3 + (longint'(bias) <<< 16);
      e1 = f1 >>> 16; e3 = f3 >>> 16;
      if (e1 > 64'sh7FFF_FFFF) e1 = 64'sh7FFF_FFFF;
      if (e1 < -64'sh8000_0000) e1 = -64'sh8000_0000;
      if (e3 > 64'sh7FFF_FFFF) e3 = 64'sh7FFF_FFFF;
      if (e3 < -64'sh8000_0000) e3 = -64'sh8000_0000;
      check(label1 == (f1 >= 0) && label3 == (f3 >= 0), $sformatf("vector %0d label", v));
      check(longint'(score1) == e1, $sformatf("vector %0d score1 %0d expected %0d", v, score1, e1));
      check(longint'(score3) == e3, $sformatf("vector %0d score3 %0d expected %0d", v, score3, e3));
      if (v == 0) check(score3 == 32'sh7FFF_FFFF, "saturation reached");
      @(negedge clk);
      check(!done1 && !done3, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
