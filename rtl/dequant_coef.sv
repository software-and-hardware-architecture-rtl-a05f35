// Dequant_coef: inverse quantization of one residual coefficient,
//   res_out = res_in * V(QP mod 6, POS) << QE,     QE = floor(QP/6).
// A small control unit sequences three registered steps after 'start':
//   cycle 1  the V table is read at the address {QP mod 6, position class}
//            and the coefficient is captured,
//   cycle 2  coefficient times V  (the "MUX" step, enabled by start1),
//   cycle 3  left shift by QE     (enabled by start2); done pulses here.
// So done is high exactly 3 cycles after start. POS is the raster position
// (4*row + column) of the coefficient in its 4x4 block. The result is kept to
// DQ_W = 23 bits; a conforming bitstream never needs more.
// The ROM / multiply / shift structure, the 3-cycle count and the 23-bit
// width follow the published architecture; the V values are the standard's;
// the qrem input and the one-step-per-cycle split are this design's.
module dequant_coef
  import h264_intra_pkg::*;
#(
  parameter int unsigned POS = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  qe,
  input  logic [2:0]  qrem,
  input  coef_t       res_in,
  output dq_t         res_out,
  output logic        done
);
  localparam logic ROW_ODD = POS[2];
  localparam logic COL_ODD = POS[0];

  // control unit: one-hot step pipeline
  logic start1, start2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {start1, start2, done} <= '0;
    else        {start1, start2, done} <= {start, start1, start2};
  end

  // Vij_ROM (clocked read) and coefficient capture
  logic [4:0]  v_q;
  coef_t       z_q;
  logic [3:0]  qe_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0; z_q <= '0; qe_q <= '0;
    end else if (start) begin
      v_q  <= vij(qrem, ROW_ODD, COL_ODD);
      z_q  <= res_in;
      qe_q <= qe;
    end
  end

  // multiply by V
  logic signed [COEF_W+5:0] prod_q;
  logic [3:0]               qe_q2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0; qe_q2 <= '0;
    end else if (start1) begin
      prod_q <= z_q * $signed({1'b0, v_q});
      qe_q2  <= qe_q;
    end
  end

  // shift by QE inside the 23-bit result
  dq_t shifted;
  assign shifted = dq_t'(prod_q) <<< qe_q2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      res_out <= '0;
    else if (start2) res_out <= shifted;
  end
endmodule
