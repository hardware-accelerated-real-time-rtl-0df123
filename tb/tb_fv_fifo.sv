// tb_fv_fifo: random pushes and pops against a queue model for the default
// 144-entry FIFO read one value at a time and for a 36-entry FIFO read three
// at a time. Checks data order, full, count and that reads never cross the
// stored count; drives the FIFO to full and pushes while full.
module tb_fv_fifo;
  import harva_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, pop1 = 0, pop3 = 0;
  fv_t  wr_data = '0;
  logic full1, full3, valid1, valid3;
  fv_t [0:0] rd1;
  fv_t [2:0] rd3;
  logic [7:0] cnt1;
  logic [5:0] cnt3;
  int checks = 0, failures = 0, n_full = 0;
  fv_t q1[$], q3[$];

  fv_fifo dut1 (.clk, .rst_n, .wr_en, .wr_data, .full(full1), .rd_valid(valid1), .rd_pop(pop1), .rd_data(rd1), .count(cnt1));
  fv_fifo #(.DEPTH(36), .RD_N(3)) dut3 (.clk, .rst_n, .wr_en, .wr_data, .full(full3), .rd_valid(valid3), .rd_pop(pop3), .rd_data(rd3), .count(cnt3));
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

  always @(posedge clk) if (rst_n) begin
    automatic bit f1 = (q1.size() == 144), f3 = (q3.size() == 36);
    check(int'(cnt1) == q1.size() && full1 == (q1.size() == 144) && valid1 == (q1.size() >= 1), "fifo1 status");
    check(int'(cnt3) == q3.size() && full3 == (q3.size() == 36) && valid3 == (q3.size() >= 3), "fifo3 status");
    if (full1 || full3) n_full++;
    if (pop1 && valid1) begin
      check(rd1[0] == q1[0], "fifo1 data");
      void'(q1.pop_front());
    end
    if (pop3 && valid3) begin
      for (int i = 0; i < 3; i++) check(rd3[i] == q3[i], "fifo3 data");
      repeat (3) void'(q3.pop_front());
    end
    if (wr_en && !f1) q1.push_back(wr_data);
    if (wr_en && !f3) q3.push_back(wr_data);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      wr_en = (n % 2000 < 400) ? 1'($urandom % 4 != 0) : 1'($urandom % 3 == 0);
      wr_data = fv_t'(17'($urandom));
      pop1 = (n % 2000 < 400) ? 1'b0 : 1'($urandom % 2);
      pop3 = (n % 2000 < 400) ? 1'($urandom % 8 == 0) : 1'($urandom % 4 == 0);
    end
    @(negedge clk);
    wr_en = 0; pop1 = 0; pop3 = 0;
    check(n_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
