// hog_data_cache: the HOG component's memory, seen by the host as one
// word-addressed space with two sections.
//
//   address bit AW = 0 : control registers
//       word 0  HOG_CTRL  bit 0 HogEN (rw), bit 1 QuantStepOK (ro),
//                         bit 2 HogCacheMiss (set by hardware, host writes 0
//                         to acknowledge a refill), bit 3 GaussOK (ro),
//                         bit 4 HogDone (ro)
//       word 1  IMG_DIM   [31:16] image width, [15:0] image height
//   address bit AW = 1 : Pixel Data section, PIX_WORDS words of 4 pixels
//
// Register layout follows the document's bit tables. Behaviour of the bits is
// partly this design's choice: writing 1 to HogEN while it is 0 starts an
// image and clears HogDone; writing 0 halts the current image; the engine
// clears HogEN itself when the image is done. The HOG has no Gauss weighting
// and no quantisation, so GaussOK and QuantStepOK read 0.
// Writes take effect on the next clock edge; register reads are combinational.
// The pixel section is write-only from the host; the engine reads it through
// port A of a dual-port RAM with one cycle of latency.
module hog_data_cache
  import harva_pkg::*;
#(
  parameter int PIX_WORDS = 256,
  localparam int AW       = $clog2(PIX_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host side
  input  logic [AW:0]   h_addr,
  input  logic          h_we,
  input  logic [31:0]   h_wdata,
  output logic [31:0]   h_rdata,
  // engine side
  output logic          hog_en,
  output logic [15:0]   img_w,
  output logic [15:0]   img_h,
  output logic          miss,
  input  logic          miss_set,
  input  logic          done_set,
  input  logic          e_rd_en,
  input  logic [AW-1:0] e_rd_addr,
  output logic [31:0]   e_rd_data
);
  logic done;
  logic reg_we, pix_we;

  assign reg_we = h_we && !h_addr[AW];
  assign pix_we = h_we &&  h_addr[AW];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hog_en <= 1'b0;
      done   <= 1'b0;
      miss   <= 1'b0;
      img_w  <= 16'd0;
      img_h  <= 16'd0;
    end else begin
      if (reg_we && h_addr[2:0] == HOG_CTRL_A) begin
        hog_en <= h_wdata[HOG_EN_B];
        if (h_wdata[HOG_EN_B] && !hog_en) begin
          done <= 1'b0;
          miss <= 1'b0;
        end else if (!h_wdata[HOG_MISS_B]) begin
          miss <= 1'b0;
        end
      end
      if (reg_we && h_addr[2:0] == IMG_DIM_A) begin
        img_w <= h_wdata[31:16];
        img_h <= h_wdata[15:0];
      end
      if (miss_set) miss <= 1'b1;
      if (done_set) begin
        done   <= 1'b1;
        hog_en <= 1'b0;
      end
    end
  end

  always_comb begin
    h_rdata = '0;
    if (!h_addr[AW]) begin
      unique case (h_addr[2:0])
        HOG_CTRL_A: begin
          h_rdata[HOG_EN_B]      = hog_en;
          h_rdata[HOG_QSTEPOK_B] = 1'b0;
          h_rdata[HOG_MISS_B]    = miss;
          h_rdata[HOG_GAUSSOK_B] = 1'b0;
          h_rdata[HOG_DONE_B]    = done;
        end
        IMG_DIM_A: h_rdata = {img_w, img_h};
        default:   h_rdata = '0;
      endcase
    end
  end

  dp_ram #(.DEPTH(PIX_WORDS), .W(32)) u_pix (
    .clk     (clk),
    .a_en    (e_rd_en),
    .a_addr  (e_rd_addr),
    .a_rdata (e_rd_data),
    .b_we    (pix_we),
    .b_addr  (h_addr[AW-1:0]),
    .b_wdata (h_wdata)
  );
endmodule
