// bin_assign: orientation bin of a gradient without arctan (BIN_ASSIGN).
//
// Orientation is unsigned (0..180 degrees) in nine 20-degree bins. The bin n
// is the one with tan(n) * |Gx| <= |Gy| < tan(n+20) * |Gx|; both sides are
// products with a tan look-up table (8 fraction bits), so no division is
// needed. Because bins 0..3 (0..80 degrees) and their mirrors 8..5
// (100..180) share the same tangent magnitudes, each try tests a bin and its
// mirror at once: the same multipliers and comparators decide the candidate k,
// and the signs of Gx and Gy pick k (same signs) or 8-k (opposite signs).
// If none of k = 0..3 passes, the gradient is near vertical: bin 4.
// State machine after the document: RESET, NOP, TRY_BIN, where TRY_BIN tests
// one k per cycle, so the result takes 1 to 5 cycles.
//
// Interface: valid/ready; one gradient in flight at a time.
module bin_assign
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
  output logic [BIN_W-1:0] bin
);
  typedef enum logic [1:0] {RESET, NOP, TRY_BIN} state_t;
  state_t state;

  logic [7:0]  ax, ay;
  logic        mirror;
  logic [2:0]  k;
  logic [18:0] lo, hi, ay_s;
  logic        pass;

  always_comb begin
    ay_s = {3'd0, ay, 8'd0};
    lo   = 19'(TAN_LUT[k]) * 19'(ax);
    hi   = (k == 3'd4) ? '1 : 19'(TAN_LUT[(k == 3'd4) ? 3'd4 : k + 3'd1]) * 19'(ax);
    pass = (lo <= ay_s) && ((ay_s < hi) || (k == 3'd4));
  end

  function automatic logic [7:0] absv(input logic [G_W-1:0] v);
    return v[G_W-1] ? 8'(-$signed(v)) : v[7:0];
  endfunction

  assign in_ready = (state == NOP) && !out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RESET;
      ax        <= '0;
      ay        <= '0;
      mirror    <= 1'b0;
      k         <= '0;
      out_valid <= 1'b0;
      bin       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        RESET: state <= NOP;
        NOP: begin
          if (in_valid && in_ready) begin
            ax     <= absv(gx);
            ay     <= absv(gy);
            // opposite, non-zero signs: orientation in 90..180 degrees
            mirror <= (gx[G_W-1] != gy[G_W-1]) && (gx != '0) && (gy != '0);
            k      <= '0;
            state  <= TRY_BIN;
          end
        end
        TRY_BIN: begin
          if (pass) begin
            bin       <= mirror ? BIN_W'(4'd8 - {1'b0, k}) : BIN_W'(k);
            out_valid <= 1'b1;
            state     <= NOP;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= NOP;
      endcase
    end
  end
endmodule
