// Inverse 4x4 intra prediction: computes the predicted 4x4 block for any of
// the nine H.264 intra 4x4 modes from the 13 neighbouring pixels A..M.
// All modes are built from the same few terms, computed once for all modes:
//   basic equations     9-bit sums of two adjacent neighbours,
//   derivate equations  10-bit three-tap sums (sum of two adjacent basic
//                       sums) and the 11-bit DC sum,
//   shift module        (s2+1)>>1, (s3+2)>>2 and the DC divisions,
//   MUX                 picks, per pixel, the term the mode asks for.
// The neighbours are laid along one edge p[0..14] = L,L,K,J,I,M,A..H,H (the
// end pixels repeated), so that each directional mode reads a 2-tap or 3-tap
// term at an index that depends linearly on the pixel position.
// Timing: six register stages (capture pixels, basic, derivate, shift, mux,
// output) driven by a control unit; done pulses, and pred is valid, 6 cycles
// after start; pred holds until the next block reaches the output stage.
// DC uses avail_top / avail_left as the standard does; the other modes expect
// the neighbour unit to have replaced missing pixels. pred[4*y+x] is row y,
// column x; the 9-bit output carries an 8-bit pixel.
// The basic / derivate / shift / MUX organisation, its 9-, 10- and 11-bit
// widths and the 6-cycle count follow the published architecture; the edge
// array, the term indices and the split into six stages are this design's,
// and the mode equations are the standard's.
module intra4x4_pred
  import h264_intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] pred_mode,
  input  pix_t       r_pix [NB_N],   // A..M, indexed by nb_e
  input  logic       avail_top,
  input  logic       avail_left,
  output pred_t      pred [16],
  output logic       done
);
  // ---------------- control unit ----------------
  logic [5:0] stg;   // stg[k] high: stage k+1 is loaded this cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stg <= '0;
    else        stg <= {stg[4:0], start};
  end
  assign done = stg[5];

  // ---------------- stage 1: capture pixels ----------------
  pix_t       p1 [15];
  logic [3:0] mode1;
  logic [1:0] av1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 15; i++) p1[i] <= '0;
      mode1 <= '0; av1 <= '0;
    end else if (start) begin
      p1[0] <= r_pix[NB_L]; p1[1] <= r_pix[NB_L]; p1[2] <= r_pix[NB_K];
      p1[3] <= r_pix[NB_J]; p1[4] <= r_pix[NB_I]; p1[5] <= r_pix[NB_M];
      for (int i = 0; i < 8; i++) p1[6+i] <= r_pix[int'(NB_A) + i];
      p1[14] <= r_pix[NB_H];
      mode1 <= pred_mode;
      av1   <= {avail_top, avail_left};
    end
  end

  // ---------------- stage 2: basic equations ----------------
  logic [8:0] s2 [14];
  pix_t       p2 [15];
  logic [3:0] mode2;
  logic [1:0] av2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 14; i++) s2[i] <= '0;
      for (int i = 0; i < 15; i++) p2[i] <= '0;
      mode2 <= '0; av2 <= '0;
    end else if (stg[0]) begin
      for (int i = 0; i < 14; i++) s2[i] <= {1'b0, p1[i]} + {1'b0, p1[i+1]};
      p2 <= p1; mode2 <= mode1; av2 <= av1;
    end
  end

  // ---------------- stage 3: derivate equations ----------------
  logic [9:0]  s3 [13];
  logic [9:0]  st3, sl3;     // A+B+C+D, I+J+K+L
  logic [10:0] sdc3;         // all eight
  logic [8:0]  s2_3 [14];
  pix_t        p3 [15];
  logic [3:0]  mode3;
  logic [1:0]  av3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 13; i++) s3[i] <= '0;
      for (int i = 0; i < 14; i++) s2_3[i] <= '0;
      for (int i = 0; i < 15; i++) p3[i] <= '0;
      st3 <= '0; sl3 <= '0; sdc3 <= '0; mode3 <= '0; av3 <= '0;
    end else if (stg[1]) begin
      for (int i = 0; i < 13; i++) s3[i] <= {1'b0, s2[i]} + {1'b0, s2[i+1]};
      st3  <= {1'b0, s2[6]} + {1'b0, s2[8]};
      sl3  <= {1'b0, s2[1]} + {1'b0, s2[3]};
      sdc3 <= {2'b0, s2[1]} + {2'b0, s2[3]} + {2'b0, s2[6]} + {2'b0, s2[8]};
      s2_3 <= s2; p3 <= p2; mode3 <= mode2; av3 <= av2;
    end
  end

  // ---------------- stage 4: shift module ----------------
  pix_t       h2 [14];   // (s2 + 1) >> 1
  pix_t       h3 [13];   // (s3 + 2) >> 2
  pix_t       dc4;
  pix_t       p4 [15];
  logic [3:0] mode4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 14; i++) h2[i] <= '0;
      for (int i = 0; i < 13; i++) h3[i] <= '0;
      for (int i = 0; i < 15; i++) p4[i] <= '0;
      dc4 <= '0; mode4 <= '0;
    end else if (stg[2]) begin
      for (int i = 0; i < 14; i++) h2[i] <= pix_t'(({1'b0, s2_3[i]} + 10'd1) >> 1);
      for (int i = 0; i < 13; i++) h3[i] <= pix_t'(({1'b0, s3[i]} + 11'd2) >> 2);
      unique case (av3)
        2'b11:   dc4 <= pix_t'((12'(sdc3) + 12'd4) >> 3);
        2'b10:   dc4 <= pix_t'((11'(st3) + 11'd2) >> 2);
        2'b01:   dc4 <= pix_t'((11'(sl3) + 11'd2) >> 2);
        default: dc4 <= 8'd128;
      endcase
      p4 <= p3; mode4 <= mode3;
    end
  end

  // ---------------- stage 5: mode multiplexer ----------------
  // Index of the term each pixel (x, y) reads, per mode, on the edge array
  // p[] = L,L,K,J,I,M,A,B,C,D,E,F,G,H,H.
  pix_t mux [16];
  always_comb begin
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        int z;
        pix_t v;
        z = 0;
        v = dc4;
        unique case (mode4)
          M_VERT: v = p4[6 + x];
          M_HOR:  v = p4[4 - y];
          M_DC:   v = dc4;
          M_DDL:  v = h3[6 + x + y];
          M_DDR:  v = h3[4 + x - y];
          M_VR: begin
            z = 2*x - y;
            if (z >= 0 && z % 2 == 0) v = h2[5 + x - (y >> 1)];
            else if (z >= 0)          v = h3[4 + x - (y >> 1)];
            else if (z == -1)         v = h3[4];
            else                      v = h3[5 - y];
          end
          M_HD: begin
            z = 2*y - x;
            if (z >= 0 && z % 2 == 0) v = h2[4 - y + (x >> 1)];
            else if (z >= 0)          v = h3[4 - y + (x >> 1)];
            else if (z == -1)         v = h3[4];
            else                      v = h3[3 + x];
          end
          M_VL: begin
            if (y % 2 == 0) v = h2[6 + x + (y >> 1)];
            else            v = h3[6 + x + (y >> 1)];
          end
          M_HU: begin
            z = x + 2*y;
            if (z > 5)          v = p4[1];
            else if (z % 2 == 0) v = h2[3 - y - (x >> 1)];
            else                 v = h3[2 - y - (x >> 1)];
          end
          default: v = dc4;
        endcase
        mux[4*y + x] = v;
      end
    end
  end

  pix_t mux5 [16];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 16; i++) mux5[i] <= '0;
    else if (stg[3]) mux5 <= mux;
  end

  // ---------------- stage 6: output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 16; i++) pred[i] <= '0;
    else if (stg[4]) for (int i = 0; i < 16; i++) pred[i] <= {1'b0, mux5[i]};
  end
endmodule
