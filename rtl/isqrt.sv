// isqrt: sequential integer square root, root = floor(sqrt(rad)).
//
// Stands in for the vendor CORDIC square-root core the document uses in the
// magnitude calculation. Like that core it takes a 33-bit input and has a
// latency of 17 clock cycles; unlike it, it is not pipelined: it accepts a
// new radicand only when idle. It is the restoring digit-by-digit method: the
// radicand (padded to 34 bits) is consumed two bits per cycle, MSBs first,
// and each cycle decides one root bit by a trial subtraction.
//
// Interface: valid/ready. A radicand accepted at clock edge E gives
// out_valid after edge E+17; the result is held until out_ready.
module isqrt #(
  parameter int IN_W = 33,
  localparam int ITER  = (IN_W + 1) / 2,
  localparam int OUT_W = ITER
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_rad,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_root
);
  logic [2*ITER-1:0]  rad;
  logic [OUT_W:0]     rem;     // remainder <= 2*root
  logic [OUT_W-1:0]   root;
  logic [$clog2(ITER+1)-1:0] cnt;
  logic               busy;

  logic [OUT_W+2:0] rem_sh, trial;
  always_comb begin
    rem_sh = {rem, rad[2*ITER-1 -: 2]};
    trial  = {1'b0, root, 2'b01};
  end

  assign in_ready = !busy && !out_valid;
  assign out_root = root;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      rad       <= '0;
      rem       <= '0;
      root      <= '0;
      cnt       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        rad  <= (2*ITER)'(in_rad);
        rem  <= '0;
        root <= '0;
        cnt  <= ($clog2(ITER+1))'(ITER);
        busy <= 1'b1;
      end else if (busy) begin
        rad <= rad << 2;
        if (rem_sh >= trial) begin
          rem  <= (OUT_W+1)'(rem_sh - trial);
          root <= {root[OUT_W-2:0], 1'b1};
        end else begin
          rem  <= (OUT_W+1)'(rem_sh);
          root <= {root[OUT_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
