// tb_hog_data_cache: host and engine sides of the HOG memory. Fills the
// pixel section with random words and reads them back through the engine
// port (one-cycle latency); checks the HOG_CTRL bits (start, halt, miss set by
// the engine and acknowledged by the host, done clearing HogEN, read-only
// bits at 0), IMG_DIM, and that control writes do not touch the pixels.
module tb_hog_data_cache;
  import harva_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  logic [AW:0] h_addr = '0;
  logic h_we = 0, miss_set = 0, done_set = 0, e_rd_en = 0;
  logic [31:0] h_wdata = '0, h_rdata, e_rd_data;
  logic hog_en, miss;
  logic [15:0] img_w, img_h;
  logic [AW-1:0] e_rd_addr = '0;
  logic [31:0] mem [256];
  int checks = 0, failures = 0;

  hog_data_cache dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    h_addr = a[AW:0]; h_wdata = d; h_we = 1;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    h_addr = a[AW:0];
    #1 d = h_rdata;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk);
    s = 1;
    @(negedge clk);
    s = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    rd(0, d);
    check(d == 0, "HOG_CTRL is 0 after reset");
    foreach (mem[i]) begin mem[i] = $urandom; wr(256 + i, mem[i]); end
    wr(1, {16'd64, 16'd128});
    rd(1, d);
    check(d == {16'd64, 16'd128} && img_w == 64 && img_h == 128, "IMG_DIM");
    wr(0, 32'h1F);
    rd(0, d);
    check(d == 32'h1 && hog_en, "start: only HogEN set, read-only bits 0");
    pulse(miss_set);
    rd(0, d);
    check(d[HOG_MISS_B] && miss, "miss set by the engine");
    wr(0, 32'h5);
    rd(0, d);
    check(d[HOG_MISS_B], "writing 1 to the miss bit keeps it");
    wr(0, 32'h1);
    rd(0, d);
    check(!d[HOG_MISS_B] && hog_en, "miss acknowledged, HogEN kept");
    pulse(done_set);
    rd(0, d);
    check(d == (32'h1 << HOG_DONE_B) && !hog_en, "done sets HogDone and clears HogEN");
    pulse(miss_set);
    wr(0, 32'h1);
    rd(0, d);
    check(d == 32'h1, "restart clears done and miss");
    wr(0, 32'h0);
    check(!hog_en, "halt clears HogEN");
    rd(2, d);
    check(d == 0, "unused register reads 0");
    for (int n = 0; n < 600; n++) begin
      int a;
      a = (n < 256) ? n : int'($urandom % 256);
      @(negedge clk);
      e_rd_en = 1; e_rd_addr = AW'(a);
      @(negedge clk);
      e_rd_en = 0;
      check(e_rd_data == mem[a], $sformatf("pixel word %0d", a));
      @(negedge clk);
      e_rd_addr = AW'(a + 1);
      check(e_rd_data == mem[a], "read data held while the port is idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
