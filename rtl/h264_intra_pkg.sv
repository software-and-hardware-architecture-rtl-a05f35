// Shared types and constants of the H.264/AVC intra 4x4 reconstruction
// accelerator: pixel and coefficient widths, the intra 4x4 prediction mode
// encoding, the inverse-quantization scale table V and the z-scan position of
// the sixteen 4x4 blocks of a macroblock.
//
// The V table, the mode numbering and the z-scan order are those of the
// H.264/AVC standard. The widths 16 (quantized coefficient), 23 (dequantized
// coefficient) and 9 (residual, prediction) are the design's datapath widths.
package h264_intra_pkg;

  localparam int unsigned PIX_W   = 8;   // reconstructed pixel
  localparam int unsigned COEF_W  = 16;  // quantized coefficient from the entropy decoder
  localparam int unsigned DQ_W    = 23;  // dequantized coefficient
  localparam int unsigned RES_W   = 9;   // residual after the inverse transform
  localparam int unsigned PRED_W  = 9;   // predicted pixel as carried by the predictor output
  localparam int unsigned NB_N    = 13;  // neighbours A..M of a 4x4 block

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [DQ_W-1:0]   dq_t;
  typedef logic signed [RES_W-1:0]  res_t;
  typedef logic [PRED_W-1:0]        pred_t;

  // Neighbour index: A..H above / above-right, I..L left, M above-left.
  typedef enum logic [3:0] {
    NB_A = 4'd0, NB_B = 4'd1, NB_C = 4'd2, NB_D = 4'd3,
    NB_E = 4'd4, NB_F = 4'd5, NB_G = 4'd6, NB_H = 4'd7,
    NB_I = 4'd8, NB_J = 4'd9, NB_K = 4'd10, NB_L = 4'd11,
    NB_M = 4'd12
  } nb_e;

  // Intra 4x4 prediction modes (H.264 numbering).
  typedef enum logic [3:0] {
    M_VERT = 4'd0, M_HOR = 4'd1, M_DC = 4'd2, M_DDL = 4'd3, M_DDR = 4'd4,
    M_VR   = 4'd5, M_HD  = 4'd6, M_VL = 4'd7, M_HU  = 4'd8
  } mode_e;

  // Rescaling factor V for QP mod 6 (row) and position class (column):
  // class 0 = (even row, even column), 1 = (odd, odd), 2 = the rest.
  function automatic logic [4:0] vij(input logic [2:0] qrem, input logic row_odd,
                                     input logic col_odd);
    logic [1:0] cls;
    logic [4:0] v;
    if (!row_odd && !col_odd)     cls = 2'd0;
    else if (row_odd && col_odd)  cls = 2'd1;
    else                          cls = 2'd2;
    unique case (qrem)
      3'd0:    v = (cls == 0) ? 5'd10 : (cls == 1) ? 5'd16 : 5'd13;
      3'd1:    v = (cls == 0) ? 5'd11 : (cls == 1) ? 5'd18 : 5'd14;
      3'd2:    v = (cls == 0) ? 5'd13 : (cls == 1) ? 5'd20 : 5'd16;
      3'd3:    v = (cls == 0) ? 5'd14 : (cls == 1) ? 5'd23 : 5'd18;
      3'd4:    v = (cls == 0) ? 5'd16 : (cls == 1) ? 5'd25 : 5'd20;
      default: v = (cls == 0) ? 5'd18 : (cls == 1) ? 5'd29 : 5'd23;
    endcase
    return v;
  endfunction

  // z-scan block index -> {row, column} of the 4x4 block in the macroblock.
  function automatic logic [3:0] zscan_pos(input logic [3:0] b);
    return {b[3], b[1], b[2], b[0]};
  endfunction
  // inverse: block column / row -> z-scan index
  function automatic logic [3:0] zscan_idx(input logic [1:0] x, input logic [1:0] y);
    return {y[1], x[1], y[0], x[0]};
  endfunction

endpackage
