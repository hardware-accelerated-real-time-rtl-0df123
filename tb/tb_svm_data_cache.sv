// tb_svm_data_cache: host and engine sides of the SVM memory. Fills the
// support-vector section with random words and reads them back through the
// engine port; checks QUANTIZE/BIAS/FEATVEC_SIZE, QuantStepOK, SVM_CTRL
// behaviour (start, miss set by the engine and acknowledged, done clearing
// SvmEN and latching RESULT and SCORE, restart, halt flushing the FIFO).
module tb_svm_data_cache;
  import harva_pkg::*;
  localparam int AW = 7;
  logic clk = 0, rst_n = 0;
  logic [AW:0] h_addr = '0;
  logic h_we = 0, miss_set = 0, done_set = 0, done_label = 0, e_rd_en = 0;
  logic signed [31:0] done_score = 0, bias;
  logic [31:0] h_wdata = '0, h_rdata, e_rd_data, fv_size;
  logic svm_en, miss, flush;
  int n_flush = 0;
  logic [15:0] quant_step;
  logic [AW-1:0] e_rd_addr = '0;
  logic [31:0] mem [128];
  int checks = 0, failures = 0;

  svm_data_cache dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && flush) n_flush++;

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
    check(d == 0, "SVM_CTRL is 0 after reset");
    foreach (mem[i]) begin mem[i] = $urandom; wr(128 + i, mem[i]); end
    wr(1, 32'h0001_2345);
    rd(1, d);
    check(d == 32'h2345 && quant_step == 16'h2345, "QUANTIZE keeps 16 bits");
    rd(0, d);
    check(d[SVM_QSTEPOK_B], "QuantStepOK once a step is loaded");
    wr(2, -32'sd777);
    rd(2, d);
    check(d == -32'sd777 && bias == -32'sd777, "BIAS");
    wr(3, 4608);
    rd(3, d);
    check(d == 4608 && fv_size == 4608, "FEATVEC_SIZE");
    wr(0, 32'h1);
    check(svm_en, "start");
    pulse(miss_set);
    rd(0, d);
    check(d[SVM_MISS_B] && miss, "miss set by the engine");
    wr(0, 32'h1);
    rd(0, d);
    check(!d[SVM_MISS_B] && svm_en, "miss acknowledged");
    @(negedge clk);
    done_label = 1; done_score = -32'sd123456; done_set = 1;
    @(negedge clk);
    done_set = 0; done_label = 0; done_score = 0;
    rd(0, d);
    check(d[SVM_DONE_B] && !d[SVM_EN_B] && !svm_en, "done sets SvmDone and clears SvmEN");
    rd(4, d);
    check(d == 1, "RESULT latched");
    rd(5, d);
    check($signed(d) == -32'sd123456, "SCORE latched");
    wr(0, 32'h1);
    rd(0, d);
    check(!d[SVM_DONE_B] && d[SVM_EN_B], "restart clears done");
    check(n_flush == 0, "no flush without a halt");
    wr(0, 32'h0);
    check(n_flush == 1 && !svm_en, "halt pulses flush once");
    wr(1, 0);
    rd(0, d);
    check(!d[SVM_QSTEPOK_B], "QuantStepOK clear for step 0");
    for (int n = 0; n < 400; n++) begin
      int a;
      a = (n < 128) ? n : int'($urandom % 128);
      @(negedge clk);
      e_rd_en = 1; e_rd_addr = AW'(a);
      @(negedge clk);
      e_rd_en = 0;
      check(e_rd_data == mem[a], $sformatf("coefficient word %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
