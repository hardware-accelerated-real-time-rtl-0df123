// tb_quant: coefficient decompression w = q * step for four lanes at once,
// with random int8 coefficients and Q0.16 steps including the extremes
// (-128, 127, step 0 and 65535); checks the one-cycle timing and that the
// feature values and the last flag pass through unchanged.
module tb_quant;
  import harva_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic [N-1:0][COEF_W-1:0] in_q = '0;
  logic [N-1:0][NORM_W-1:0] in_x = '0, out_x;
  logic [QSTEP_W-1:0] step = '0;
  logic [N-1:0][SV_W-1:0] out_w;
  int checks = 0, failures = 0;

  quant #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][COEF_W-1:0] q;
    logic [N-1:0][NORM_W-1:0] x;
    logic l;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      step = (n < 4) ? ((n == 0) ? 16'd0 : 16'hFFFF) : 16'($urandom);
      for (int i = 0; i < N; i++)
        in_q[i] = (n == 1) ? 8'h80 : (n == 2) ? 8'h7F : 8'($urandom);
      in_x = {N{16'($urandom)}};
      in_last = 1'($urandom);
      in_valid = 1'(n % 5 != 4);
      q = in_q; x = in_x; l = in_last;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid !== 1'(n % 5 != 4)) begin failures++; $display("FAIL valid timing"); end
      if (n % 5 != 4) begin
        checks++;
        if (out_x !== x || out_last !== l) begin failures++; $display("FAIL pass-through"); end
        for (int i = 0; i < N; i++) begin
          longint e;
          e = longint'($signed(q[i])) * longint'(step);
          checks++;
          if (longint'($signed(out_w[i])) != e) begin
            failures++;
            $display("FAIL w = %0d * %0d: got %0d", $signed(q[i]), step, $signed(out_w[i]));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
