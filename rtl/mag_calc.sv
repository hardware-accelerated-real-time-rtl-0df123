// mag_calc: gradient magnitude sqrt(Gx^2 + Gy^2) (MAG_CALC).
//
// Two stages, as in the document: the first squares Gx and Gy and adds them
// into a one-entry buffer; the second takes the square root (isqrt, 17
// cycles). The buffer lets the first stage accept the next pair while the
// square root is busy. The sum of squares (17 bits) is shifted left by 16
// before the root, so the magnitude comes out with 8 fraction bits (17-bit
// Q9.8); the document's core produced 16 fraction bits, 8 are kept here.
// The state machine is NOP (nothing in flight) and MAG_PIPE (work in either
// stage), after RESET.
//
// Interface: valid/ready on both sides. Latency from input handshake edge to
// out_valid: 18 cycles.
module mag_calc
  import harva_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [G_W-1:0]   gx,
  input  logic [G_W-1:0]   gy,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [MAG_W-1:0] mag
);
  typedef enum logic [1:0] {RESET, NOP, MAG_PIPE} state_t;
  state_t state;

  logic        buf_valid;
  logic [16:0] buf_sq;
  logic        sq_ready;
  logic [16:0] sq_next;

  logic unused_sq;

  always_comb begin
    logic signed [17:0] sx, sy, sq;
    sx = 18'($signed(gx));
    sy = 18'($signed(gy));
    sq = sx * sx + sy * sy;
    sq_next = sq[16:0];   // at most 2*255^2 = 130050, 17 bits
    unused_sq = sq[17];
  end

  assign in_ready = (state != RESET) && (!buf_valid || sq_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RESET;
      buf_valid <= 1'b0;
      buf_sq    <= '0;
    end else begin
      if (buf_valid && sq_ready) buf_valid <= 1'b0;
      if (in_valid && in_ready) begin
        buf_valid <= 1'b1;
        buf_sq    <= sq_next;
      end
      unique case (state)
        RESET:    state <= NOP;
        NOP:      if (in_valid) state <= MAG_PIPE;
        MAG_PIPE: if (!in_valid && !buf_valid && sq_ready && !out_valid) state <= NOP;
        default:  state <= NOP;
      endcase
    end
  end

  isqrt #(.IN_W(33)) u_sqrt (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (buf_valid),
    .in_ready  (sq_ready),
    .in_rad    ({buf_sq, 16'd0}),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_root  (mag)
  );
endmodule
