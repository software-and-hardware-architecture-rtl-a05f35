// Neighbouring pixels: keeps the already reconstructed pixels that intra 4x4
// prediction reads and delivers, for the 4x4 block about to be predicted,
// its 13 neighbours A..M (A..D above, E..H above-right, I..L left, M above-
// left) together with the availability of the top and left edges.
//
// Storage (this design's own organisation):
//   line   FRAME_W pixels, 4 per word: the bottom pixel row of the macroblock
//          row above. A macroblock overwrites its 16 columns with its own
//          bottom row as its last block row is reconstructed.
//   cur    the 16x16 pixels of the macroblock being reconstructed.
//   left   the right column of the macroblock to the left, copied when
//          that macroblock's last block is written back.
//   corner the pixel above-left of the macroblock, saved from the line
//          buffer before block 15 overwrites it.
// Macroblocks must arrive in raster order and blocks in z-scan order, one
// slice per frame. Availability follows the H.264 rules: an edge outside the
// frame is missing; the above-right block is missing if it lies outside the
// frame or has not been decoded yet, and then E..H repeat D. Missing pixels
// read as 128.
// Timing: start samples mbx, mby, blk_idx (cycle 1: availability),
// cycle 2 reads the neighbours; done pulses and pix is
// valid 2 cycles after start, held until the next start. wb_en writes a
// reconstructed block (raster order) back to the storage of the block last
// started; it may coincide with the start of the next block.
module neighbor_pixels
  import h264_intra_pkg::*;
#(
  parameter int unsigned FRAME_W = 352
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] mbx,
  input  logic [7:0] mby,
  input  logic [3:0] blk_idx,
  output pix_t       pix [NB_N],
  output logic       avail_top,
  output logic       avail_left,
  output logic       done,
  input  logic       wb_en,
  input  pix_t       wb_pix [16]
);
  localparam int unsigned LW    = FRAME_W / 4;     // line words
  localparam int unsigned MB_W  = FRAME_W / 16;    // macroblocks per row
  localparam int unsigned LA    = $clog2(LW + 1);
  localparam pix_t        MISS  = 8'd128;

  logic [31:0] line_q [LW];
  pix_t        cur_q  [256];
  pix_t        left_q [16];
  pix_t        corner_q;

  // ---------------- cycle 1: sample position, availability ----------------
  logic [7:0] mbx_q;
  logic [3:0] blk_q;
  logic       av_t, av_l, av_tl, av_tr, step2;
  logic [1:0] bx, by, bxs, bys;
  logic       tr_c;

  assign {bys, bxs} = zscan_pos(blk_idx);
  always_comb begin
    if (bys == 2'd0)
      tr_c = (mby != 8'd0) && ((bxs != 2'd3) || (32'(mbx) + 1 < MB_W));
    else if (bxs == 2'd3)
      tr_c = 1'b0;
    else
      tr_c = zscan_idx(bxs + 2'd1, bys - 2'd1) < blk_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mbx_q <= '0; blk_q <= '0;
      {av_t, av_l, av_tl, av_tr, step2, done} <= '0;
    end else begin
      step2 <= start;
      done  <= step2;
      if (start) begin
        mbx_q <= mbx; blk_q <= blk_idx;
        av_l  <= (bxs != 2'd0) || (mbx != 8'd0);
        av_t  <= (bys != 2'd0) || (mby != 8'd0);
        av_tl <= ((bxs != 2'd0) || (mbx != 8'd0)) && ((bys != 2'd0) || (mby != 8'd0));
        av_tr <= tr_c;
      end
    end
  end

  assign {by, bx} = zscan_pos(blk_q);

  // ---------------- cycle 2: read the neighbours ----------------
  logic [LA-1:0] w_top, w_tr, w_tl;
  pix_t          nb [NB_N];
  always_comb begin
    int r0, c0;
    r0 = 4 * int'(by);
    c0 = 4 * int'(bx);
    w_top = LA'(4 * int'(mbx_q) + int'(bx));
    w_tr  = (w_top + 1 < LA'(LW)) ? w_top + 1'b1 : w_top;
    w_tl  = (w_top != 0) ? w_top - 1'b1 : w_top;
    for (int i = 0; i < 4; i++) begin
      // above
      if (by == 0) nb[int'(NB_A) + i] = line_q[w_top][8*i +: 8];
      else         nb[int'(NB_A) + i] = cur_q[16*(r0-1) + c0 + i];
      // above right
      if (by == 0)      nb[int'(NB_E) + i] = line_q[w_tr][8*i +: 8];
      else if (bx != 3) nb[int'(NB_E) + i] = cur_q[16*(r0-1) + c0 + 4 + i];
      else              nb[int'(NB_E) + i] = MISS;
      // left
      if (bx == 0) nb[int'(NB_I) + i] = left_q[r0 + i];
      else         nb[int'(NB_I) + i] = cur_q[16*(r0+i) + c0 - 1];
    end
    if (by == 0 && bx == 0) nb[NB_M] = corner_q;
    else if (by == 0)       nb[NB_M] = line_q[w_tl][31:24];
    else if (bx == 0)       nb[NB_M] = left_q[r0 - 1];
    else                    nb[NB_M] = cur_q[16*(r0-1) + c0 - 1];
    // availability
    for (int i = 0; i < 4; i++) begin
      if (!av_t) begin
        nb[int'(NB_A) + i] = MISS;
        nb[int'(NB_E) + i] = MISS;
      end else if (!av_tr) begin
        nb[int'(NB_E) + i] = nb[NB_D];
      end
      if (!av_l) nb[int'(NB_I) + i] = MISS;
    end
    if (!av_tl) nb[NB_M] = MISS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB_N; i++) pix[i] <= '0;
      avail_top <= 1'b0; avail_left <= 1'b0;
    end else if (step2) begin
      pix <= nb;
      avail_top <= av_t; avail_left <= av_l;
    end
  end

  // ---------------- storage updates ----------------
  // left column: the right column of the macroblock, taken when its last
  // block (15, bottom right) is written back; rows 12..15 come from that block
  always_ff @(posedge clk) begin
    if (wb_en && blk_q == 4'd15) begin
      for (int r = 0; r < 12; r++) left_q[r] <= cur_q[16*r + 15];
      for (int r = 0; r < 4; r++)  left_q[12 + r] <= wb_pix[4*r + 3];
    end
  end

  // write-back of a reconstructed block
  always_ff @(posedge clk) begin
    if (wb_en) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          cur_q[16*(4*int'(by) + r) + 4*int'(bx) + c] <= wb_pix[4*r + c];
      if (by == 2'd3)
        line_q[w_top] <= {wb_pix[15], wb_pix[14], wb_pix[13], wb_pix[12]};
    end
  end

  always_ff @(posedge clk) begin
    if (wb_en && blk_q == 4'd15) corner_q <= line_q[w_top][31:24];
  end
endmodule
