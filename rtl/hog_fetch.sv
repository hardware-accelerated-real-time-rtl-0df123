// hog_fetch: walks the image block by block, reads the pixel words each
// convolution input needs from the HOG data cache, pads the image edges and
// tags every input with the HSYNC/VSYNC position of its block.
//
// Blocks are 16x16 pixels and start every 8 pixels, in raster order, so an
// image of W x H pixels (both multiples of 8) has (W/8)*(H/8) blocks; 64x128
// gives 128 blocks. For each of the 16 rows of a block the unit sends six
// convolution inputs, one per word column (pixels bx-4 .. bx+19), each made
// of the words above, on and below the row. Pixels outside the image are
// replaced by the nearest image pixel: rows are clamped by reading the
// nearest image row, and a word column outside the image is read from the
// nearest image word and filled with its edge pixel.
//
// Cache layout (this design's choice): the pixel section is split into
// PIX_WORDS/128 slots; slot s holds the 18x6-word tile of block n with
// n mod SLOTS = s, word (t, c) at s*128 + t*6 + c, tile row t = image row
// by-1+t and tile column c = image pixel bx-4+4c. The host loads the first
// SLOTS tiles before starting. When all slots have been used and blocks
// remain, the unit pulses miss_set and waits until the host, having loaded
// the next SLOTS tiles, clears the HogCacheMiss bit.
//
// Timing: three cache reads per input (one-cycle read latency), so an input
// is offered every 4 cycles when the convolution keeps up.
module hog_fetch
  import harva_pkg::*;
#(
  parameter int PIX_WORDS = 256,
  localparam int AW       = $clog2(PIX_WORDS),
  localparam int SLOTS    = PIX_WORDS / SLOT_WORDS
) (
  input  logic          clk,
  input  logic          rst_n,      // synchronous; held low while HogEN is 0
  input  logic [15:0]   img_w,
  input  logic [15:0]   img_h,
  input  logic          miss,       // HogCacheMiss register bit
  output logic          miss_set,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [31:0]   rd_data,
  output logic          out_valid,
  input  logic          out_ready,
  output conv_in_t      out_data,
  output logic          hsync,      // pulse: last input of a block row sent
  output logic          vsync       // pulse: last input of the image sent
);
  typedef enum logic [2:0] {S_RESET, S_READ, S_CAP, S_OUT, S_MISS, S_WAIT, S_IDLE} state_t;
  state_t state;

  logic [12:0] bi, bj;          // block column / row index
  logic [12:0] nbx, nby;
  logic [3:0]  r;               // row inside block
  logic [2:0]  c;               // word column 0..5
  logic [1:0]  k;               // 0 up, 1 mid, 2 down
  logic [1:0]  kc;              // word being captured
  logic [15:0] blk_n;           // block number
  logic        rep_first, rep_last;
  logic        last_blk, eol_blk;
  logic [31:0] up_q, mid_q;

  assign nbx      = img_w[15:3];
  assign nby      = img_h[15:3];
  assign last_blk = (bi == nbx - 1) && (bj == nby - 1);
  assign eol_blk  = (bi == nbx - 1);

  // Address of word k of the current input.
  logic signed [17:0] y, yc, xw, xc;
  logic [4:0]  t_row;
  logic [2:0]  t_col;
  int unsigned slot;
  always_comb begin
    y  = $signed({5'd0, bj}) * 18'sd8 + $signed({14'd0, r}) + $signed({16'd0, k}) - 18'sd1;
    yc = (y < 0) ? 18'sd0 : (y >= $signed({2'd0, img_h})) ? $signed({2'd0, img_h}) - 18'sd1 : y;
    xw = $signed({5'd0, bi}) * 18'sd8 - 18'sd4 + $signed({15'd0, c}) * 18'sd4;
    rep_first = (xw < 0);
    rep_last  = (xw >= $signed({2'd0, img_w}));
    xc = rep_first ? 18'sd0 : rep_last ? $signed({2'd0, img_w}) - 18'sd4 : xw;
    t_row = 5'(yc - ($signed({5'd0, bj}) * 18'sd8 - 18'sd1));
    t_col = 3'((xc - ($signed({5'd0, bi}) * 18'sd8 - 18'sd4)) >>> 2);
    slot  = 32'(blk_n) % SLOTS;
    rd_addr = AW'(slot * SLOT_WORDS + 32'(t_row) * TILE_COLS + 32'(t_col));
  end

  function automatic logic [31:0] fmt(input logic [31:0] w, input logic rf, input logic rl);
    if (rf) return {4{w[7:0]}};
    if (rl) return {4{w[31:24]}};
    return w;
  endfunction

  assign rd_en     = (state == S_READ);
  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_RESET;
      bi       <= '0;
      bj       <= '0;
      r        <= '0;
      c        <= '0;
      k        <= '0;
      kc       <= '0;
      blk_n    <= '0;
      miss_set <= 1'b0;
      hsync    <= 1'b0;
      vsync    <= 1'b0;
      out_data <= '0;
      up_q     <= '0;
      mid_q    <= '0;
    end else begin
      miss_set <= 1'b0;
      hsync    <= 1'b0;
      vsync    <= 1'b0;
      unique case (state)
        S_RESET: begin
          if (nbx != 0 && nby != 0) state <= S_READ;
        end
        S_READ: begin
          // issue reads k = 0..2, capture each one cycle later
          kc <= k;
          if (k != 0) begin
            if (kc == 0) up_q <= fmt(rd_data, rep_first, rep_last);
            else         mid_q <= fmt(rd_data, rep_first, rep_last);
          end
          if (k == 2) state <= S_CAP;
          else        k <= k + 1'b1;
        end
        S_CAP: begin
          out_data.up   <= up_q;
          out_data.mid  <= mid_q;
          out_data.down <= fmt(rd_data, rep_first, rep_last);
          out_data.col  <= c;
          out_data.tag  <= '{eol: eol_blk, eoi: last_blk, row: r};
          state         <= S_OUT;
        end
        S_OUT: begin
          if (out_ready) begin
            k <= '0;
            state <= S_READ;
            if (c == 3'd5) begin
              c <= '0;
              if (r == 4'd15) begin
                r <= '0;
                hsync <= eol_blk;
                vsync <= last_blk;
                if (last_blk) begin
                  state <= S_IDLE;
                end else begin
                  blk_n <= blk_n + 1'b1;
                  if (eol_blk) begin
                    bi <= '0;
                    bj <= bj + 1'b1;
                  end else begin
                    bi <= bi + 1'b1;
                  end
                  if ((32'(blk_n) + 1) % SLOTS == 0) state <= S_MISS;
                end
              end else begin
                r <= r + 1'b1;
              end
            end else begin
              c <= c + 1'b1;
            end
          end
        end
        S_MISS: begin
          miss_set <= 1'b1;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          if (!miss && !miss_set) state <= S_READ;
        end
        S_IDLE: ;
        default: state <= S_RESET;
      endcase
    end
  end
endmodule
