// Inverse 4x4 intra chain: reconstructs one 4x4 luma block per 'start' from
// its 16 quantized coefficients, its intra 4x4 prediction mode, QP and the
// macroblock position, in 10 clock cycles:
//
//   cycle   0..2  neighbouring pixels      0..3  inverse quantization
//           2..8  inverse 4x4 prediction   3..5  inverse transform
//           8..10 addition (prediction + residual, clip to 0..255)
//
// The residual path (quantization then transform) runs alongside the
// prediction path (neighbours then prediction); the addition starts when
// both have finished. When 'done' pulses the reconstructed block is written
// to the output buffer and back into the neighbour storage, and the next
// block may start in that same cycle, so blocks follow one another every 10
// cycles. Coefficients are written two per 32-bit word into the input buffer
// (cw_*), reconstructed pixels read four per word from the output buffer
// (or_*). blk_idx is the z-scan index of the block in its macroblock; blocks
// must come in z-scan order and macroblocks in raster order. start, blk_idx,
// pred_mode, qp, mbx, mby and the input buffer are sampled in the start cycle.
// The units, their cycle counts and the two-path schedule follow the
// published architecture; the done/start handshake between units, the join
// and the back-to-back issue are this design's.
module intra4x4_chain
  import h264_intra_pkg::*;
#(
  parameter int unsigned FRAME_W = 352
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  blk_idx,
  input  logic [3:0]  pred_mode,
  input  logic [5:0]  qp,
  input  logic [7:0]  mbx,
  input  logic [7:0]  mby,
  input  logic        cw_en,
  input  logic [2:0]  cw_addr,
  input  logic [31:0] cw_data,
  input  logic [1:0]  or_addr,
  output logic [31:0] or_data,
  output logic        busy,
  output logic        done
);
  coef_t coef [16];
  dq_t   dq   [16];
  res_t  res  [16];
  pix_t  nb   [NB_N];
  pred_t pred [16];
  pix_t  rec  [16];
  logic  nb_done, iq_done, it_done, pr_done, add_done;
  logic  av_top, av_left;
  logic  it_seen, pr_seen, add_go, busy_q;
  logic [3:0] mode_q;

  coef_in_buffer u_inbuf (
    .clk(clk), .rst_n(rst_n), .wr_en(cw_en), .wr_addr(cw_addr), .wr_data(cw_data), .coef(coef));

  // residual path
  inv_quant u_iq (
    .clk(clk), .rst_n(rst_n), .start(start), .qp(qp), .res_in(coef), .res_out(dq), .done(iq_done));
  inv_transform u_it (
    .clk(clk), .rst_n(rst_n), .start(iq_done), .coef_in(dq), .coef_out(res), .done(it_done));

  // prediction path
  neighbor_pixels #(.FRAME_W(FRAME_W)) u_nb (
    .clk(clk), .rst_n(rst_n), .start(start), .mbx(mbx), .mby(mby), .blk_idx(blk_idx),
    .pix(nb), .avail_top(av_top), .avail_left(av_left), .done(nb_done),
    .wb_en(add_done), .wb_pix(rec));
  intra4x4_pred u_pred (
    .clk(clk), .rst_n(rst_n), .start(nb_done), .pred_mode(mode_q), .r_pix(nb),
    .avail_top(av_top), .avail_left(av_left), .pred(pred), .done(pr_done));

  // join of the two paths
  assign add_go = (pr_done || pr_seen) && (it_done || it_seen);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      it_seen <= 1'b0; pr_seen <= 1'b0; busy_q <= 1'b0; mode_q <= '0;
    end else begin
      if (start) mode_q <= pred_mode;
      if (add_go) begin
        it_seen <= 1'b0; pr_seen <= 1'b0;
      end else begin
        if (it_done) it_seen <= 1'b1;
        if (pr_done) pr_seen <= 1'b1;
      end
      if (start)         busy_q <= 1'b1;
      else if (add_done) busy_q <= 1'b0;
    end
  end

  recon_add u_add (
    .clk(clk), .rst_n(rst_n), .start(add_go), .pred(pred), .res(res), .pix(rec), .done(add_done));

  recon_out_buffer u_outbuf (
    .clk(clk), .rst_n(rst_n), .ld(add_done), .pix_in(rec), .rd_addr(or_addr), .rd_data(or_data));

  assign busy = busy_q && !add_done;
  assign done = add_done;

  // a new block may only start when the previous one is finishing or idle
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("intra4x4_chain: start while a block is in flight");
endmodule
