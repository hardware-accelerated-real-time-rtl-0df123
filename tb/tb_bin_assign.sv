// tb_bin_assign: orientation bins for hand-worked angles (0, 45, 90, 135
// degrees and bin borders) and for random derivatives against the
// inequality reference; checks the 1..5-cycle TRY_BIN time.
module tb_bin_assign;
  import harva_pkg::*;
  import harva_ref_pkg::ref_bin;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [G_W-1:0] gx = '0, gy = '0;
  logic [BIN_W-1:0] bin;
  int checks = 0, failures = 0;

  bin_assign dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int x, input int y, input int expb);
    int lat;
    @(negedge clk);
    gx = G_W'(x); gy = G_W'(y); in_valid = 1;
    @(posedge clk);
    #1 in_valid = 0;
    lat = 0;
    while (!out_valid) begin @(posedge clk); #1 lat++; end
    checks += 2;
    if (32'(bin) != expb) begin failures++; $display("FAIL bin(%0d,%0d) = %0d expected %0d", x, y, bin, expb); end
    if (lat < 1 || lat > 5) begin failures++; $display("FAIL time %0d", lat); end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    one(10, 0, 0);      //   0 deg
    one(10, 10, 2);     //  45 deg: 40..60
    one(0, 10, 4);      //  90 deg
    one(-10, 10, 6);    // 135 deg: 120..140
    one(-10, 0, 0);     // 180 deg = 0
    one(100, 30, 0);    //  16.7 deg
    one(100, 40, 1);    //  21.8 deg
    one(10, 100, 4);    //  84.3 deg
    one(-100, 40, 7);   // 158.2 deg
    one(100, -40, 7);   // -21.8 = 158.2 deg
    one(-100, -40, 1);  // 201.8 = 21.8 deg
    for (int n = 0; n < 500; n++) begin
      int x, y;
      x = int'($urandom % 511) - 255;
      y = int'($urandom % 511) - 255;
      one(x, y, ref_bin(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
