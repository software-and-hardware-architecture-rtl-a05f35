// Random neighbour sets through the intra 4x4 predictor for all nine modes
// and, for DC, all four top/left availability cases. Each predicted block is
// compared with the standard's equations in the reference model, and done
// must come 6 cycles after start.
module tb_intra4x4_pred;
  import h264_ref_pkg::*;
  import h264_intra_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] pred_mode;
  pix_t r_pix [NB_N];
  logic avail_top, avail_left;
  pred_t pred [16];
  logic done;
  int checks = 0, failures = 0;
  int mode_seen [9];
  always #5 clk = ~clk;
  intra4x4_pred dut (.clk, .rst_n, .start, .pred_mode, .r_pix, .avail_top, .avail_left, .pred, .done);
  initial begin
    pred_mode = '0; avail_top = 0; avail_left = 0;
    for (int i = 0; i < NB_N; i++) r_pix[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 900; t++) begin
      int nb [13], m, lat;
      bit at, al;
      blk_t e;
      m = t % 9;
      at = (m == 2) ? bit'($urandom_range(0, 1)) : 1'b1;
      al = (m == 2) ? bit'($urandom_range(0, 1)) : 1'b1;
      for (int i = 0; i < 13; i++) nb[i] = (t % 50 == 0) ? 255 : $urandom_range(0, 255);
      e = ref_pred(m, nb, at, al);
      @(negedge clk);
      start = 1; pred_mode = 4'(m); avail_top = at; avail_left = al;
      for (int i = 0; i < 13; i++) r_pix[i] = pix_t'(nb[i]);
      @(negedge clk);
      start = 0; pred_mode = '0;
      for (int i = 0; i < 13; i++) r_pix[i] = '0;
      lat = 1;
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 6) begin failures++; $display("FAIL latency %0d", lat); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(pred[i]) != e[i]) begin
          failures++;
          $display("FAIL mode=%0d pix=%0d got=%0d exp=%0d", m, i, int'(pred[i]), e[i]);
        end
      end
      mode_seen[m]++;
    end
    for (int m = 0; m < 9; m++) begin
      checks++;
      if (mode_seen[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
