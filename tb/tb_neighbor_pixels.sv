// Walks the neighbour unit through two small frames (3x3 macroblocks of
// 16x16, all 16 blocks of each in z-scan order), writing random
// reconstructed blocks back, sometimes in the same cycle as the next start.
// The expected neighbours come from a picture model in the testbench: a pixel
// is available when it lies in the frame and its 4x4 block has already been
// reconstructed; missing above-right pixels repeat D, other missing pixels
// read 128. Also checks the 2-cycle latency.
module tb_neighbor_pixels;
  import h264_intra_pkg::*;
  localparam int W = 48, H = 48;
  logic clk = 0, rst_n = 0, start = 0, wb_en = 0;
  logic [7:0] mbx, mby;
  logic [3:0] blk_idx;
  pix_t pix [NB_N];
  logic avail_top, avail_left, done;
  pix_t wb_pix [16];
  int checks = 0, failures = 0, n_tr_sub = 0, n_same_cycle = 0;
  int frame [H][W];
  bit decoded [H/4][W/4];
  always #5 clk = ~clk;
  neighbor_pixels #(.FRAME_W(W)) dut (.clk, .rst_n, .start, .mbx, .mby, .blk_idx, .pix,
    .avail_top, .avail_left, .done, .wb_en, .wb_pix);

  function automatic bit av(input int x, input int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 0;
    return decoded[y/4][x/4];
  endfunction

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    mbx = '0; mby = '0; blk_idx = '0;
    for (int i = 0; i < 16; i++) wb_pix[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H/4; y++) for (int x = 0; x < W/4; x++) decoded[y][x] = 0;
      for (int my = 0; my < H/16; my++)
        for (int mx = 0; mx < W/16; mx++)
          for (int b = 0; b < 16; b++) begin
            int x0, y0, e [13], lat;
            bit same;
            x0 = mx*16 + 4*({b[2], b[0]});
            y0 = my*16 + 4*({b[3], b[1]});
            for (int i = 0; i < 4; i++) begin
              e[i]   = av(x0 + i, y0 - 1) ? frame[y0-1][x0+i] : 128;
              e[4+i] = av(x0 + 4 + i, y0 - 1) ? frame[y0-1][x0+4+i]
                     : (av(x0 + 3, y0 - 1) ? frame[y0-1][x0+3] : 128);
              e[8+i] = av(x0 - 1, y0 + i) ? frame[y0+i][x0-1] : 128;
            end
            if (av(x0 + 3, y0 - 1) && !av(x0 + 4, y0 - 1)) n_tr_sub++;
            e[12] = av(x0 - 1, y0 - 1) ? frame[y0-1][x0-1] : 128;
            // start (the previous block's write-back may share this cycle)
            same = (wb_en == 1'b1);
            if (same) n_same_cycle++;
            start = 1; mbx = 8'(mx); mby = 8'(my); blk_idx = 4'(b);
            @(negedge clk);
            start = 0; wb_en = 0; mbx = '0; mby = '0; blk_idx = '0;
            lat = 1;
            while (!done && lat < 10) begin @(negedge clk); lat++; end
            chk(lat, 2, "latency");
            for (int i = 0; i < 13; i++) chk(int'(pix[i]), e[i], $sformatf("f%0d mb(%0d,%0d) b%0d nb%0d", f, mx, my, b, i));
            chk(int'(avail_top), int'(av(x0, y0 - 1)), "avail_top");
            chk(int'(avail_left), int'(av(x0 - 1, y0)), "avail_left");
            // write back a random block
            repeat ($urandom_range(0, 2)) @(negedge clk);
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 4; c++) begin
                int v;
                v = $urandom_range(0, 255);
                wb_pix[4*r + c] = pix_t'(v);
                frame[y0 + r][x0 + c] = v;
              end
            decoded[y0/4][x0/4] = 1;
            wb_en = 1;
            if ($urandom_range(0, 1) == 0) begin
              @(negedge clk);
              wb_en = 0;
            end
          end
      if (wb_en) begin @(negedge clk); wb_en = 0; end
    end
    chk(int'(n_tr_sub > 0), 1, "above-right substitution exercised");
    chk(int'(n_same_cycle > 0), 1, "write-back in start cycle exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
