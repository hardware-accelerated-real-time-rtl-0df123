// tb_mag_calc: gradient magnitudes floor(sqrt((Gx^2+Gy^2)*2^16)) for random
// and extreme derivatives; checks the 18-cycle latency of a lone input and
// that a second input is taken while the square root is busy.
module tb_mag_calc;
  import harva_pkg::*;
  import harva_ref_pkg::ref_mag;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [G_W-1:0] gx = '0, gy = '0;
  logic [MAG_W-1:0] mag;
  int checks = 0, failures = 0;
  int exp_q[$];

  mag_calc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || 32'(mag) != exp_q[0]) begin
      failures++;
      $display("FAIL mag %0d expected %0d", mag, exp_q.size() ? exp_q[0] : -1);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  task automatic send(input int x, input int y);
    @(negedge clk);
    gx = G_W'(x); gy = G_W'(y); in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    exp_q.push_back(ref_mag(x, y));
    #1 in_valid = 0;
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // lone input: latency
    send(3, 4);
    lat = 0;
    while (!out_valid) begin @(posedge clk); #1 lat++; end
    checks++;
    if (lat != 18) begin failures++; $display("FAIL latency %0d", lat); end
    @(posedge clk);
    send(255, 255);
    send(-255, -255);
    send(0, 0);
    send(-255, 0);
    for (int n = 0; n < 300; n++) send(int'($urandom % 511) - 255, int'($urandom % 511) - 255);
    wait (exp_q.size() == 0);
    repeat (30) @(posedge clk);
    // second input accepted while the first is in the square root
    send(7, -9);
    lat = $time;
    send(-100, 50);
    checks++;
    if ($time - lat > 30) begin failures++; $display("FAIL second input waited %0t", $time - lat); end
    wait (exp_q.size() == 0);
    repeat (40) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
