// tb_svm: the SVM component alone, two lanes, a 16-word coefficient cache
// (64 coefficients per chunk) and a 36-entry FIFO. A producer pushes 252
// random feature values (seven block histograms) with random gaps, the last
// one flagged, while a host model loads coefficient chunks on each refill
// request. Label, score, SvmDone/SvmEN and the number of refill requests are
// checked against the reference for two vectors (the second with the bias
// chosen to flip the label); a third run is halted midway by clearing SvmEN
// and restarted from the beginning.
module tb_svm;
  import harva_pkg::*;
  import harva_ref_pkg::*;
  localparam int SV_WORDS = 16, CHUNK = 64, NVAL = 252;
  logic clk = 0, rst_n = 0;
  logic [4:0] h_addr = '0;
  logic h_we = 0, fv_wr = 0, fv_full, miss_event;
  logic [31:0] h_wdata = '0, h_rdata;
  fv_t fv_data = '0;
  int checks = 0, failures = 0, n_miss = 0;

  svm #(.SV_WORDS(SV_WORDS), .FIFO_DEPTH(36), .CORES(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (miss_event) n_miss++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    h_addr = 5'(a); h_wdata = d; h_we = 1;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    h_addr = 5'(a);
    #1 d = h_rdata;
  endtask

  task automatic load_chunk(input int k);
    for (int i = 0; i < SV_WORDS; i++) begin
      logic [31:0] w;
      for (int j = 0; j < 4; j++) w[8*j +: 8] = coef[k * CHUNK + i * 4 + j];
      wr(16 + i, w);
    end
  endtask

  task automatic produce(input int upto);
    for (int i = 0; i < upto; i++) begin
      @(negedge clk);
      while (fv_full) @(negedge clk);
      fv_data = '{last: (i == NVAL - 1), value: 16'(feat[i])};
      fv_wr = 1;
      @(negedge clk);
      fv_wr = 0;
      if ($urandom % 4 == 0) repeat ($urandom % 6) @(negedge clk);
    end
  endtask

  task automatic run(input int bias, input bit halt);
    logic [31:0] d;
    bit done;
    int chunk, m0;
    longint sc;
    sc = ref_score(900, bias);
    m0 = n_miss;
    load_chunk(0);
    wr(QUANTIZE_A, 900);
    wr(BIAS_A, bias);
    wr(FVSIZE_A, NVAL);
    wr(SVM_CTRL_A, 1);
    if (halt) begin
      produce(100);
      repeat (50) @(negedge clk);
      wr(SVM_CTRL_A, 0);
      rd(SVM_CTRL_A, d);
      check(d[SVM_EN_B] == 0 && !fv_full, "halted");
      return;
    end
    done = 0;
    chunk = 1;
    fork
      produce(NVAL);
      while (!done) begin
        rd(SVM_CTRL_A, d);
        if (d[SVM_DONE_B]) done = 1;
        else if (d[SVM_MISS_B]) begin
          repeat ($urandom % 40) @(negedge clk);
          load_chunk(chunk);
          chunk++;
          wr(SVM_CTRL_A, 1);
        end
      end
    join
    check(d[SVM_EN_B] == 0, "SvmEN cleared when done");
    rd(RESULT_A, d);
    check(d[0] == (sc >= 0), "label");
    rd(SCORE_A, d);
    check($signed(d) == 32'(sc >>> 16), $sformatf("score %0d expected %0d", $signed(d), sc >>> 16));
    check(n_miss - m0 == (NVAL + CHUNK - 1) / CHUNK - 1, $sformatf("refill requests %0d", n_miss - m0));
    $display("score %0d label %0d", sc >>> 16, sc >= 0);
  endtask

  initial begin
    longint sc;
    n_feat = NVAL;
    for (int i = 0; i < NVAL; i++) feat[i] = $urandom % 65536;
    make_coefs(NVAL + CHUNK);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run(0, 0);
    sc = ref_score(900, 0);
    run((sc >= 0) ? -int'(sc >>> 16) - 5 : -int'(sc >>> 16) + 5, 0);
    run(0, 1);
    run(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
