// harva_pkg: widths, register map and stream types shared by the HOG+SVM
// pedestrian-detection co-processor.
//
// Number formats (this design's choice; the block-level comments say why):
//   pixel            8-bit unsigned grey level, 4 pixels per 32-bit word,
//                    leftmost pixel in bits [7:0]
//   Gx, Gy           9-bit signed derivatives
//   magnitude        17-bit unsigned, 9 integer + 8 fraction bits
//   orientation bin  0..8, 20 degrees each, unsigned orientation 0..180
//   histogram bin    24-bit unsigned accumulator (same 8 fraction bits)
//   normalised value 16-bit unsigned fraction (value / 65536)
//   SV coefficient   8-bit signed quantised weight, 4 per 32-bit word
//   quant step       16-bit unsigned fraction (step / 65536)
//   decompressed SV  24-bit signed, 16 fraction bits
//   bias             32-bit signed, 16 fraction bits
package harva_pkg;

  localparam int PX_W        = 8;
  localparam int WORD_W      = 32;
  localparam int G_W         = 9;
  localparam int MAG_W       = 17;
  localparam int BIN_W       = 4;
  localparam int NBINS       = 9;
  localparam int NCELLS      = 4;
  localparam int HIST_LEN    = NBINS * NCELLS;   // 36 values per block
  localparam int HBIN_W      = 24;
  localparam int NORM_W      = 16;
  localparam int COEF_W      = 8;
  localparam int QSTEP_W     = 16;
  localparam int SV_W        = COEF_W + QSTEP_W; // 24
  localparam int PROD_W      = SV_W + NORM_W;    // 40
  localparam int ACC_W       = 64;
  localparam int GRAD_LANES  = 8;                // values per gradient-stage input

  // Pixel tile of one block in the HOG data cache: rows by-1 .. by+16 and
  // word columns covering pixels bx-4 .. bx+19.
  localparam int TILE_ROWS   = 18;
  localparam int TILE_COLS   = 6;
  localparam int SLOT_WORDS  = 128;

  // Register word addresses
  localparam logic [2:0] HOG_CTRL_A = 3'd0;
  localparam logic [2:0] IMG_DIM_A  = 3'd1;

  localparam logic [2:0] SVM_CTRL_A = 3'd0;
  localparam logic [2:0] QUANTIZE_A = 3'd1;
  localparam logic [2:0] BIAS_A     = 3'd2;
  localparam logic [2:0] FVSIZE_A   = 3'd3;
  localparam logic [2:0] RESULT_A   = 3'd4;
  localparam logic [2:0] SCORE_A    = 3'd5;

  // HOG_CTRL bit positions
  localparam int HOG_EN_B      = 0;
  localparam int HOG_QSTEPOK_B = 1;
  localparam int HOG_MISS_B    = 2;
  localparam int HOG_GAUSSOK_B = 3;
  localparam int HOG_DONE_B    = 4;

  // SVM_CTRL bit positions
  localparam int SVM_EN_B      = 0;
  localparam int SVM_QSTEPOK_B = 1;
  localparam int SVM_MISS_B    = 2;
  localparam int SVM_DONE_B    = 3;

  // Position of a pipeline item inside the image.
  typedef struct packed {
    logic       eol;   // item belongs to the last block of a block row (HSYNC)
    logic       eoi;   // item belongs to the last block of the image (VSYNC)
    logic [3:0] row;   // pixel row inside the 16x16 block
  } blk_tag_t;

  // One convolution input: three vertically adjacent pixel words.
  typedef struct packed {
    logic [WORD_W-1:0] up;
    logic [WORD_W-1:0] mid;
    logic [WORD_W-1:0] down;
    logic [2:0]        col;  // word column 0..5 of the block tile
    blk_tag_t          tag;
  } conv_in_t;

  // Eight horizontally adjacent derivative pairs.
  typedef struct packed {
    logic [GRAD_LANES-1:0][G_W-1:0] gx;
    logic [GRAD_LANES-1:0][G_W-1:0] gy;
    logic                           half;  // 0: block pixels 0..7, 1: 8..15
    blk_tag_t                       tag;
  } grad_in_t;

  // Eight magnitudes and their orientation bins.
  typedef struct packed {
    logic [GRAD_LANES-1:0][MAG_W-1:0] mag;
    logic [GRAD_LANES-1:0][BIN_W-1:0] bin;
    logic                             half;
    blk_tag_t                         tag;
  } grad_out_t;

  typedef logic [HIST_LEN-1:0][HBIN_W-1:0] hist_t;
  typedef logic [HIST_LEN-1:0][NORM_W-1:0] nhist_t;

  // Feature-vector FIFO entry: one normalised value, flagged on the last
  // value of the image.
  typedef struct packed {
    logic              last;
    logic [NORM_W-1:0] value;
  } fv_t;

  // tan(20k degrees) with 8 fraction bits, k = 0..4 (0, 20, 40, 60, 80).
  localparam logic [10:0] TAN_LUT [5] = '{11'd0, 11'd93, 11'd215, 11'd443, 11'd1452};

  function automatic logic [PX_W-1:0] px(input logic [WORD_W-1:0] w, input int i);
    return w[i*PX_W +: PX_W];
  endfunction

endpackage
