// conv2d: the convolution stage (2D_CONV). Computes the horizontal and
// vertical derivatives Gx = I(x+1) - I(x-1) and Gy = I(y+1) - I(y-1) of four
// pixels at a time with one shared set of four 9-bit subtractors.
//
// Each input is one word column of a block row: the pixel words above, on and
// below the row (already edge-padded by the fetch unit). The state machine
// follows the document: after RESET it waits in NOP; an input that starts a
// row goes to VCONV, which computes the four Gy of that word; any later input
// of the row goes first to HCONV, which computes the four Gx of the previous
// word now that its right neighbour (first pixel of the new word) is known,
// and then to VCONV for the new word. Gx therefore needs a second input.
// A block row arrives as six word columns 0..5; columns 1..4 are the 16 block
// pixels. Two finished words make one output of eight Gx/Gy pairs: half 0
// (block pixels 0..7) after column 3 arrives, half 1 after column 5.
//
// Interface: valid/ready on both sides; an input is accepted only in NOP with
// the output register empty. A row costs 6 inputs, 11 busy cycles.
module conv2d
  import harva_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  conv_in_t in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output grad_in_t out_data
);
  typedef enum logic [1:0] {RESET, NOP, VCONV, HCONV} state_t;
  state_t state;

  conv_in_t                     cur;
  logic [31:0]                  prev_mid;
  logic [2:0]                   prev_col;
  blk_tag_t                     prev_tag;
  logic [PX_W-1:0]              left_px;
  logic [3:0][G_W-1:0]          prev_gy;
  logic [3:0][G_W-1:0]          pair_gx, pair_gy;
  logic                         vconv_done;

  // Shared subtractors
  logic [3:0][PX_W-1:0] op_a, op_b;
  logic [3:0][G_W-1:0]  diff;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (state == HCONV) begin
        op_a[i] = (i == 3) ? px(cur.mid, 0) : px(prev_mid, i + 1);
        op_b[i] = (i == 0) ? left_px        : px(prev_mid, i - 1);
      end else begin
        op_a[i] = px(cur.down, i);
        op_b[i] = px(cur.up, i);
      end
      diff[i] = G_W'({1'b0, op_a[i]}) - G_W'({1'b0, op_b[i]});
    end
  end

  assign in_ready = (state == NOP) && !out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= RESET;
      cur        <= '0;
      prev_mid   <= '0;
      prev_col   <= '0;
      prev_tag   <= '0;
      left_px    <= '0;
      prev_gy    <= '0;
      pair_gx    <= '0;
      pair_gy    <= '0;
      vconv_done <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        RESET: state <= NOP;
        NOP: begin
          if (in_valid && in_ready) begin
            cur   <= in_data;
            state <= (vconv_done && in_data.col != 3'd0) ? HCONV : VCONV;
          end
        end
        HCONV: begin
          // diff holds Gx of the previous word
          left_px <= px(prev_mid, 3);
          if (prev_col == 3'd1 || prev_col == 3'd3) begin
            pair_gx <= diff;
            pair_gy <= prev_gy;
          end else if (prev_col == 3'd2 || prev_col == 3'd4) begin
            out_valid        <= 1'b1;
            out_data.gx      <= {diff, pair_gx};
            out_data.gy      <= {prev_gy, pair_gy};
            out_data.half    <= (prev_col == 3'd4);
            out_data.tag     <= prev_tag;
          end
          state <= VCONV;
        end
        VCONV: begin
          prev_gy    <= diff;
          prev_mid   <= cur.mid;
          prev_col   <= cur.col;
          prev_tag   <= cur.tag;
          vconv_done <= (cur.col != 3'd5);
          state      <= NOP;
        end
        default: state <= NOP;
      endcase
    end
  end
endmodule
