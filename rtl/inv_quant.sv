// Inverse 4x4 quantization: the sixteen coefficients of a 4x4 block are
// dequantized at once by sixteen Dequant_coef units that share the output of
// ROM dequant (QE = floor(QP/6) and QP mod 6). All units start together, so
// the block result is valid when 'done' pulses, 3 cycles after 'start'.
// res_in[i] / res_out[i] use raster order inside the block (i = 4*row + col).
// qp is sampled in the cycle of start. Sixteen parallel units and a shared
// QE table are the published structure; combining the sixteen done flags into
// one is this design's.
module inv_quant
  import h264_intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] qp,
  input  coef_t      res_in  [16],
  output dq_t        res_out [16],
  output logic       done
);
  logic [3:0] qe;
  logic [2:0] qrem;
  logic [15:0] done_x;

  rom_dequant u_rom (.qp(qp), .qe(qe), .qrem(qrem));

  for (genvar i = 0; i < 16; i++) begin : g_coef
    dequant_coef #(.POS(i)) u_dq (
      .clk(clk), .rst_n(rst_n), .start(start), .qe(qe), .qrem(qrem),
      .res_in(res_in[i]), .res_out(res_out[i]), .done(done_x[i])
    );
  end

  assign done = &done_x;
endmodule
