// End-to-end test of the intra 4x4 chain on a small frame (2x2 macroblocks,
// two frames): every block gets random coefficients, a random QP and a random
// prediction mode that is legal for its neighbours. The expected pixels come
// from the reference model (prediction from a picture model of what has been
// reconstructed, dequantization, inverse transform, clipping). Checks the
// 10-cycle latency of every block and that blocks issued back to back follow
// each other every 10 cycles, with the next block's coefficients written while
// the previous one is in flight.
module tb_intra4x4_chain;
  import h264_ref_pkg::*;
  localparam int W = 32, H = 32;
  logic clk = 0, rst_n = 0, start = 0, cw_en = 0;
  logic [3:0] blk_idx, pred_mode;
  logic [5:0] qp;
  logic [7:0] mbx, mby;
  logic [2:0] cw_addr;
  logic [31:0] cw_data, or_data;
  logic [1:0] or_addr;
  logic busy, done;
  int checks = 0, failures = 0, n_b2b = 0;
  int frame [H][W];
  bit decoded [H/4][W/4];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  intra4x4_chain #(.FRAME_W(W)) dut (.clk, .rst_n, .start, .blk_idx, .pred_mode, .qp, .mbx, .mby,
    .cw_en, .cw_addr, .cw_data, .or_addr, .or_data, .busy, .done);

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

  blk_t exp_q [$];
  int   start_cyc [$];
  int   last_start = -100;

  initial begin
    blk_idx = '0; pred_mode = '0; qp = '0; mbx = '0; mby = '0; cw_addr = '0; cw_data = '0; or_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H/4; y++) for (int x = 0; x < W/4; x++) decoded[y][x] = 0;
      for (int my = 0; my < H/16; my++)
        for (int mx = 0; mx < W/16; mx++)
          for (int b = 0; b < 16; b++) begin
            int x0, y0, nb [13], m, q;
            bit at, al, atl;
            blk_t z, e;
            x0 = mx*16 + 4*({b[2], b[0]});
            y0 = my*16 + 4*({b[3], b[1]});
            for (int i = 0; i < 4; i++) begin
              nb[i]   = av(x0 + i, y0 - 1) ? frame[y0-1][x0+i] : 128;
              nb[4+i] = av(x0 + 4 + i, y0 - 1) ? frame[y0-1][x0+4+i]
                      : (av(x0 + 3, y0 - 1) ? frame[y0-1][x0+3] : 128);
              nb[8+i] = av(x0 - 1, y0 + i) ? frame[y0+i][x0-1] : 128;
            end
            nb[12] = av(x0 - 1, y0 - 1) ? frame[y0-1][x0-1] : 128;
            at = av(x0, y0 - 1); al = av(x0 - 1, y0); atl = av(x0 - 1, y0 - 1);
            m = pick_mode(at, al, atl);
            q = $urandom_range(0, 51);
            for (int i = 0; i < 16; i++)
              z[i] = ($urandom_range(0, 2) == 0) ? 0 : int'($urandom_range(0, 2 * (40 - q/2))) - (40 - q/2);
            e = ref_recon(z, q, m, nb, at, al);
            for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) frame[y0+r][x0+c] = e[4*r+c];
            decoded[y0/4][x0/4] = 1;
            // write the 8 coefficient pairs (the previous block may be running)
            for (int n = 0; n < 8; n++) begin
              cw_en = 1; cw_addr = 3'(n);
              cw_data = {16'(z[2*n+1]), 16'(z[2*n])};
              @(negedge clk);
            end
            cw_en = 0;
            // issue when the chain can take it (possibly in the cycle of done)
            while (busy) @(negedge clk);
            if (done) n_b2b++;
            start = 1; blk_idx = 4'(b); pred_mode = 4'(m); qp = 6'(q); mbx = 8'(mx); mby = 8'(my);
            exp_q.push_back(e);
            start_cyc.push_back(cyc);
            if (done) chk(cyc - last_start, 10, "block-to-block interval");
            last_start = cyc;
            @(negedge clk);
            start = 0; pred_mode = '0; qp = '0; mbx = '0; mby = '0; blk_idx = '0;
          end
    end
    while (exp_q.size() > 0) @(negedge clk);
    chk(int'(n_b2b > 0), 1, "back-to-back issue exercised");
    $display("back-to-back blocks: %0d", n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: on each done, latency and, one cycle later, the output buffer
  initial begin
    forever begin
      @(negedge clk);
      if (done && rst_n) begin
        blk_t e;
        int sc;
        e = exp_q[0];
        sc = start_cyc[0];
        chk(cyc - sc, 10, "latency");
        @(posedge clk);
        #1;
        for (int r = 0; r < 4; r++) begin
          or_addr = 2'(r);
          #1;
          for (int c = 0; c < 4; c++) chk(int'(or_data[8*c +: 8]), e[4*r + c], $sformatf("pixel r%0d c%0d", r, c));
        end
        void'(exp_q.pop_front());
        void'(start_cyc.pop_front());
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
