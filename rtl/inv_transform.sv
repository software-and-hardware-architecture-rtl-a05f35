// Inverse 4x4 transform: two ICT_1D passes under a small control unit.
//   cycle 1  the first pass (rows) is registered,
//   cycle 2  the second pass (columns) is registered; done pulses here.
// The final scaling r = (x + 32) >> 6 and the saturation to RES_W = 9 bits
// act on the second pass's register, so coef_out is valid from done until the
// next start. Saturating to 9 bits loses nothing: after the prediction is
// added and the sum clipped to 0..255, a saturated residual gives the same
// pixel as the exact one. Matrices are flat arrays in raster order.
// Two identical passes, the 2-cycle count and the 23-bit in / 9-bit out
// widths follow the published architecture; the rounding is the standard's
// and the saturation is this design's.
module inv_transform
  import h264_intra_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  dq_t  coef_in  [16],
  output res_t coef_out [16],
  output logic done
);
  localparam int unsigned W1 = DQ_W + 2;
  localparam int unsigned W2 = DQ_W + 4;

  // control unit
  logic step2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {step2, done} <= '0;
    else        {step2, done} <= {start, step2};
  end

  logic signed [W1-1:0] t1 [16];
  logic signed [W2-1:0] t2 [16];

  ict_1d #(.IW(DQ_W), .OW(W1)) u_pass1 (
    .clk(clk), .rst_n(rst_n), .en(start), .x(coef_in), .y(t1));
  ict_1d #(.IW(W1), .OW(W2)) u_pass2 (
    .clk(clk), .rst_n(rst_n), .en(step2), .x(t1), .y(t2));

  localparam logic signed [W2-1:0] RMAX = W2'((1 <<< (RES_W - 1)) - 1);
  localparam logic signed [W2-1:0] RMIN = -W2'(1 <<< (RES_W - 1));

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      logic signed [W2-1:0] r;
      r = (t2[i] + W2'(32)) >>> 6;
      if (r > RMAX)      coef_out[i] = res_t'(RMAX);
      else if (r < RMIN) coef_out[i] = res_t'(RMIN);
      else               coef_out[i] = res_t'(r);
    end
  end
endmodule
