// Reference models for the testbenches, written straight from the H.264/AVC
// equations and independent of the RTL structure: intra 4x4 prediction in
// the standard's p[x,y] notation, inverse quantization c*V<<floor(QP/6) with
// its own V table, the 4x4 inverse transform as the matrix products of the
// standard followed by (x+32)>>6, and the clipped reconstruction.
package h264_ref_pkg;

  typedef int blk_t [16];

  // neighbour order: A..H = 0..7, I..L = 8..11, M = 12
  function automatic int nbp(input int nb [13], input int x, input int y);
    if (y == -1 && x == -1) return nb[12];
    if (y == -1)            return nb[x];
    return nb[8 + y];       // x == -1
  endfunction

  function automatic blk_t ref_pred(input int mode, input int nb [13],
                                    input bit av_t, input bit av_l);
    blk_t o;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int v, z;
        v = 0;
        case (mode)
          0: v = nbp(nb, x, -1);
          1: v = nbp(nb, -1, y);
          2: begin
            int st, sl;
            st = nb[0] + nb[1] + nb[2] + nb[3];
            sl = nb[8] + nb[9] + nb[10] + nb[11];
            if (av_t && av_l) v = (st + sl + 4) >> 3;
            else if (av_l)    v = (sl + 2) >> 2;
            else if (av_t)    v = (st + 2) >> 2;
            else              v = 128;
          end
          3: if (x == 3 && y == 3) v = (nbp(nb, 6, -1) + 3 * nbp(nb, 7, -1) + 2) >> 2;
             else v = (nbp(nb, x+y, -1) + 2 * nbp(nb, x+y+1, -1) + nbp(nb, x+y+2, -1) + 2) >> 2;
          4: if (x > y) v = (nbp(nb, x-y-2, -1) + 2 * nbp(nb, x-y-1, -1) + nbp(nb, x-y, -1) + 2) >> 2;
             else if (x < y) v = (nbp(nb, -1, y-x-2) + 2 * nbp(nb, -1, y-x-1) + nbp(nb, -1, y-x) + 2) >> 2;
             else v = (nbp(nb, 0, -1) + 2 * nbp(nb, -1, -1) + nbp(nb, -1, 0) + 2) >> 2;
          5: begin
            z = 2 * x - y;
            if (z >= 0 && z % 2 == 0) v = (nbp(nb, x-(y>>1)-1, -1) + nbp(nb, x-(y>>1), -1) + 1) >> 1;
            else if (z >= 0) v = (nbp(nb, x-(y>>1)-2, -1) + 2 * nbp(nb, x-(y>>1)-1, -1) + nbp(nb, x-(y>>1), -1) + 2) >> 2;
            else if (z == -1) v = (nbp(nb, -1, 0) + 2 * nbp(nb, -1, -1) + nbp(nb, 0, -1) + 2) >> 2;
            else v = (nbp(nb, -1, y-1) + 2 * nbp(nb, -1, y-2) + nbp(nb, -1, y-3) + 2) >> 2;
          end
          6: begin
            z = 2 * y - x;
            if (z >= 0 && z % 2 == 0) v = (nbp(nb, -1, y-(x>>1)-1) + nbp(nb, -1, y-(x>>1)) + 1) >> 1;
            else if (z >= 0) v = (nbp(nb, -1, y-(x>>1)-2) + 2 * nbp(nb, -1, y-(x>>1)-1) + nbp(nb, -1, y-(x>>1)) + 2) >> 2;
            else if (z == -1) v = (nbp(nb, -1, 0) + 2 * nbp(nb, -1, -1) + nbp(nb, 0, -1) + 2) >> 2;
            else v = (nbp(nb, x-1, -1) + 2 * nbp(nb, x-2, -1) + nbp(nb, x-3, -1) + 2) >> 2;
          end
          7: if (y % 2 == 0) v = (nbp(nb, x+(y>>1), -1) + nbp(nb, x+(y>>1)+1, -1) + 1) >> 1;
             else v = (nbp(nb, x+(y>>1), -1) + 2 * nbp(nb, x+(y>>1)+1, -1) + nbp(nb, x+(y>>1)+2, -1) + 2) >> 2;
          8: begin
            z = x + 2 * y;
            if (z == 0 || z == 2 || z == 4) v = (nbp(nb, -1, y+(x>>1)) + nbp(nb, -1, y+(x>>1)+1) + 1) >> 1;
            else if (z == 1 || z == 3) v = (nbp(nb, -1, y+(x>>1)) + 2 * nbp(nb, -1, y+(x>>1)+1) + nbp(nb, -1, y+(x>>1)+2) + 2) >> 2;
            else if (z == 5) v = (nbp(nb, -1, 2) + 3 * nbp(nb, -1, 3) + 2) >> 2;
            else v = nbp(nb, -1, 3);
          end
          default: v = 0;
        endcase
        o[4*y + x] = v;
      end
    return o;
  endfunction

  // V table of the standard: rows QP%6, columns (even,even) (odd,odd) other
  function automatic int ref_v(input int qp, input int r, input int c);
    int t [6][3];
    t = '{'{10,16,13}, '{11,18,14}, '{13,20,16}, '{14,23,18}, '{16,25,20}, '{18,29,23}};
    if (r % 2 == 0 && c % 2 == 0) return t[qp % 6][0];
    if (r % 2 == 1 && c % 2 == 1) return t[qp % 6][1];
    return t[qp % 6][2];
  endfunction

  function automatic blk_t ref_dequant(input blk_t z, input int qp);
    blk_t w;
    for (int i = 0; i < 16; i++) w[i] = z[i] * ref_v(qp, i / 4, i % 4) * (1 << (qp / 6));
    return w;
  endfunction

  // 4-point inverse transform, column vector form of the standard's matrix
  function automatic void t4(input int d0, d1, d2, d3, output int f0, f1, f2, f3);
    f0 = d0 + d1 + d2 + (d3 >>> 1);
    f1 = d0 + (d1 >>> 1) - d2 - d3;
    f2 = d0 - (d1 >>> 1) - d2 + d3;
    f3 = d0 - d1 + d2 - (d3 >>> 1);
  endfunction

  function automatic blk_t ref_itrans(input blk_t d, input bit sat);
    blk_t f, r;
    for (int i = 0; i < 4; i++)
      t4(d[4*i], d[4*i+1], d[4*i+2], d[4*i+3], f[4*i], f[4*i+1], f[4*i+2], f[4*i+3]);
    for (int j = 0; j < 4; j++)
      t4(f[j], f[4+j], f[8+j], f[12+j], r[j], r[4+j], r[8+j], r[12+j]);
    for (int i = 0; i < 16; i++) begin
      r[i] = (r[i] + 32) >>> 6;
      if (sat && r[i] > 255)  r[i] = 255;
      if (sat && r[i] < -256) r[i] = -256;
    end
    return r;
  endfunction

  function automatic int clip255(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // a mode whose neighbours are all available (modes 3 and 7 may use the
  // replicated D for E..H); DC needs nothing
  function automatic int pick_mode(input bit av_t, input bit av_l, input bit av_tl);
    int cand [$];
    cand.push_back(2);
    if (av_t) begin cand.push_back(0); cand.push_back(3); cand.push_back(7); end
    if (av_l) begin cand.push_back(1); cand.push_back(8); end
    if (av_t && av_l && av_tl) begin cand.push_back(4); cand.push_back(5); cand.push_back(6); end
    return cand[$urandom_range(0, cand.size() - 1)];
  endfunction

  // whole reconstruction of one block: prediction + inverse transform of the
  // dequantized coefficients, clipped
  function automatic blk_t ref_recon(input blk_t z, input int qp, input int mode,
                                     input int nb [13], input bit av_t, input bit av_l);
    blk_t p, r, o;
    p = ref_pred(mode, nb, av_t, av_l);
    r = ref_itrans(ref_dequant(z, qp), 1'b0);
    for (int i = 0; i < 16; i++) o[i] = clip255(p[i] + r[i]);
    return o;
  endfunction

endpackage
