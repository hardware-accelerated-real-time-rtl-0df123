// fv_fifo: the Feature Vector Data buffer between the HOG and the SVM.
//
// A synchronous first-in first-out memory of DEPTH entries (default 144
// values, four block histograms) of fv_t (normalised value plus the
// end-of-image flag). The read side presents the RD_N oldest entries at once
// and pops them together, so an SVM with RD_N lanes can take RD_N values per
// cycle; rd_valid needs at least RD_N entries. Both sides share one clock
// (this design's choice; the document lets the two components run at
// different frequencies).
//
// Interface: wr_en is ignored when full; rd_pop is ignored unless rd_valid.
// A pushed entry can be read in the next cycle.
module fv_fifo
  import harva_pkg::*;
#(
  parameter int DEPTH = 144,
  parameter int RD_N  = 1,
  localparam int AW   = $clog2(DEPTH),
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  fv_t                  wr_data,
  output logic                 full,
  output logic                 rd_valid,
  input  logic                 rd_pop,
  output fv_t [RD_N-1:0]       rd_data,
  output logic [CW-1:0]        count
);
  fv_t          mem [DEPTH];
  logic [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] wrap(input logic [AW-1:0] p, input int unsigned n);
    int unsigned s;
    s = 32'(p) + n;
    return AW'((s >= DEPTH) ? s - DEPTH : s);
  endfunction

  assign full     = (count == CW'(DEPTH));
  assign rd_valid = (count >= CW'(RD_N));

  always_comb begin
    for (int i = 0; i < RD_N; i++) rd_data[i] = mem[wrap(rp, i)];
  end

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_pop && rd_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) begin
        mem[wp] <= wr_data;
        wp      <= wrap(wp, 1);
      end
      if (do_rd) rp <= wrap(rp, RD_N);
      count <= count + (do_wr ? CW'(1) : CW'(0)) - (do_rd ? CW'(RD_N) : CW'(0));
    end
  end

  // A pop never asks for more than is stored; a push into a full FIFO is lost.
  assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
