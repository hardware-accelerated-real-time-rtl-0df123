// hist_creat: builds the histogram of one 16x16 block (HIST_CREAT).
//
// A block is four 8x8 cells of nine orientation bins, 36 values. Each input
// carries eight magnitudes and their bins for eight adjacent pixels of one
// block row (the left or the right half); its cell is (row >= 8) * 2 + half.
// In HIST_UPDT the eight values are added one per cycle into the histogram
// memory with a single adder: bin_value + mag -> bin_value. The updates are
// sequential because several pixels may fall into the same bin. After 32
// inputs the finished histogram, value index cell*9 + bin, is copied to the
// output register and the memory is cleared.
//
// Interface: valid/ready on both sides; 8 cycles per input plus one to emit.
module hist_creat
  import harva_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  grad_out_t in_data,
  output logic      out_valid,
  input  logic      out_ready,
  output hist_t     out_hist,
  output logic      out_eol,
  output logic      out_eoi
);
  typedef enum logic [1:0] {RESET, NOP, HIST_UPDT, EMIT} state_t;
  state_t state;

  hist_t       hist;
  grad_out_t   cur;
  logic [2:0]  lane;
  logic [4:0]  n_in;
  logic [5:0]  idx;
  logic [1:0]  cell_i;

  always_comb begin
    cell_i = {cur.tag.row[3], cur.half};
    idx  = 6'(cell_i) * 6'(NBINS) + 6'(cur.bin[lane]);
  end

  assign in_ready = (state == NOP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RESET;
      hist      <= '0;
      cur       <= '0;
      lane      <= '0;
      n_in      <= '0;
      out_valid <= 1'b0;
      out_hist  <= '0;
      out_eol   <= 1'b0;
      out_eoi   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        RESET: state <= NOP;
        NOP: begin
          if (in_valid) begin
            cur   <= in_data;
            lane  <= '0;
            state <= HIST_UPDT;
          end
        end
        HIST_UPDT: begin
          if (idx < 6'(HIST_LEN))
            hist[idx] <= hist[idx] + HBIN_W'(cur.mag[lane]);
          lane <= lane + 1'b1;
          if (lane == 3'd7) begin
            n_in  <= n_in + 1'b1;
            state <= (n_in == 5'd31) ? EMIT : NOP;
          end
        end
        EMIT: begin
          if (!out_valid) begin
            out_valid <= 1'b1;
            out_hist  <= hist;
            out_eol   <= cur.tag.eol;
            out_eoi   <= cur.tag.eoi;
            hist      <= '0;
            state     <= NOP;
          end
        end
        default: state <= NOP;
      endcase
    end
  end
endmodule
