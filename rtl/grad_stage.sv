// grad_stage: the Gradient Calculation stage. Turns eight Gx/Gy pairs into
// eight magnitudes and eight orientation bins.
//
// The stage holds CORES copies of the magnitude unit (mag_calc) and of the
// bin unit (bin_assign); the document allows 1, 2, 4 or 8. Core j handles
// lanes j, j+CORES, j+2*CORES, ... of the input; for each core, magnitude and
// bin run side by side and each unit is fed its next lane as soon as it can
// take it, so the first stage of mag_calc overlaps the square root of the
// previous lane. When every lane has both results the output register is
// filled and a new input may enter.
//
// Interface: valid/ready on both sides. With one core the magnitude path
// bounds the latency: about 8 x 17 cycles per input.
module grad_stage
  import harva_pkg::*;
#(
  parameter int CORES = 1,
  localparam int ROUNDS = GRAD_LANES / CORES,
  localparam int CW     = $clog2(ROUNDS + 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  grad_in_t  in_data,
  output logic      out_valid,
  input  logic      out_ready,
  output grad_out_t out_data
);
  logic     busy;
  grad_in_t ibuf;

  logic [CORES-1:0][CW-1:0] dm, db, gm, gb;
  logic [CORES-1:0]             m_iv, m_ir, m_ov, b_iv, b_ir, b_ov;
  logic [CORES-1:0][G_W-1:0]    m_gx, m_gy, b_gx, b_gy;
  logic [CORES-1:0][MAG_W-1:0]  m_mag;
  logic [CORES-1:0][BIN_W-1:0]  b_bin;
  logic                         all_done;

  assign in_ready = !busy && !out_valid;

  always_comb begin
    all_done = busy;
    for (int j = 0; j < CORES; j++) begin
      m_iv[j] = busy && (dm[j] < CW'(ROUNDS));
      b_iv[j] = busy && (db[j] < CW'(ROUNDS));
      m_gx[j] = ibuf.gx[32'(dm[j]) * CORES + j];
      m_gy[j] = ibuf.gy[32'(dm[j]) * CORES + j];
      b_gx[j] = ibuf.gx[32'(db[j]) * CORES + j];
      b_gy[j] = ibuf.gy[32'(db[j]) * CORES + j];
      if (gm[j] != CW'(ROUNDS) || gb[j] != CW'(ROUNDS)) all_done = 1'b0;
    end
  end

  for (genvar j = 0; j < CORES; j++) begin : g_core
    mag_calc u_mag (
      .clk(clk), .rst_n(rst_n),
      .in_valid(m_iv[j]), .in_ready(m_ir[j]), .gx(m_gx[j]), .gy(m_gy[j]),
      .out_valid(m_ov[j]), .out_ready(1'b1), .mag(m_mag[j])
    );
    bin_assign u_bin (
      .clk(clk), .rst_n(rst_n),
      .in_valid(b_iv[j]), .in_ready(b_ir[j]), .gx(b_gx[j]), .gy(b_gy[j]),
      .out_valid(b_ov[j]), .out_ready(1'b1), .bin(b_bin[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      ibuf      <= '0;
      dm        <= '0;
      db        <= '0;
      gm        <= '0;
      gb        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        ibuf <= in_data;
        busy <= 1'b1;
        dm   <= '0;
        db   <= '0;
        gm   <= '0;
        gb   <= '0;
      end else if (busy) begin
        for (int j = 0; j < CORES; j++) begin
          if (m_iv[j] && m_ir[j]) dm[j] <= dm[j] + 1'b1;
          if (b_iv[j] && b_ir[j]) db[j] <= db[j] + 1'b1;
          if (m_ov[j]) begin
            out_data.mag[32'(gm[j]) * CORES + j] <= m_mag[j];
            gm[j] <= gm[j] + 1'b1;
          end
          if (b_ov[j]) begin
            out_data.bin[32'(gb[j]) * CORES + j] <= b_bin[j];
            gb[j] <= gb[j] + 1'b1;
          end
        end
        if (all_done) begin
          busy          <= 1'b0;
          out_valid     <= 1'b1;
          out_data.half <= ibuf.half;
          out_data.tag  <= ibuf.tag;
        end
      end
    end
  end
endmodule
