// Addition: reconstructs the 16 pixels of a 4x4 block by adding the
// residual from the inverse transform to the predicted pixels and clipping
// the sum to the 8-bit range 0..255.
//   cycle 1  16 sums are registered,
//   cycle 2  the clipped pixels are registered; done pulses here.
// Inputs are sampled in the cycle of start; pix holds until the next block.
// The 2-cycle count follows the published architecture; clipping is the
// standard's; the split into add and clip stages is this design's.
module recon_add
  import h264_intra_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  pred_t pred [16],
  input  res_t  res  [16],
  output pix_t  pix  [16],
  output logic  done
);
  logic step2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {step2, done} <= '0;
    else        {step2, done} <= {start, step2};
  end

  logic signed [PRED_W+1:0] sum [16];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 16; i++) sum[i] <= '0;
    else if (start)
      for (int i = 0; i < 16; i++)
        sum[i] <= $signed({2'b00, pred[i]}) + (PRED_W+2)'(res[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 16; i++) pix[i] <= '0;
    else if (step2)
      for (int i = 0; i < 16; i++)
        pix[i] <= (sum[i] < 0) ? 8'd0 : (sum[i] > 255) ? 8'd255 : pix_t'(sum[i]);
  end
endmodule
