// tb_isqrt: square root of random and corner radicands against a
// reference computed by trial squaring; checks the 17-cycle latency and the
// hold of the result under output backpressure.
module tb_isqrt;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [32:0] in_rad = '0;
  logic [16:0] out_root;
  int checks = 0, failures = 0;

  isqrt #(.IN_W(33)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned ref_sqrt(longint unsigned v);
    longint unsigned r = 0;
    for (int b = 20; b >= 0; b--) if (((r | (64'd1 << b)) * (r | (64'd1 << b))) <= v) r |= (64'd1 << b);
    return r;
  endfunction

  initial begin
    longint unsigned v;
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      case (n)
        0: v = 0;
        1: v = 1;
        2: v = 33'h1_FFFF_FFFF;
        3: v = 64'd130050 << 16;
        default: v = {$urandom, $urandom} & 64'h1_FFFF_FFFF;
      endcase
      @(negedge clk);
      in_rad = 33'(v); in_valid = 1;
      out_ready = (n % 7 != 3);
      @(posedge clk);
      #1 in_valid = 0;
      lat = 0;
      while (!out_valid) begin @(posedge clk); #1 lat++; end
      checks++;
      if (lat != 17) begin failures++; $display("FAIL latency %0d", lat); end
      if (!out_ready) begin
        repeat (3) @(posedge clk);
        #1 if (!out_valid) begin failures++; $display("FAIL result dropped"); end
        out_ready = 1;
      end
      checks++;
      if (64'(out_root) != ref_sqrt(v)) begin
        failures++; $display("FAIL sqrt(%0d) = %0d, expected %0d", v, out_root, ref_sqrt(v));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
