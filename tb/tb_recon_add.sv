// Random predictions and residuals (including values that clip at 0 and at
// 255) through the addition unit; checks the clipped sums and the 2-cycle
// latency.
module tb_recon_add;
  import h264_ref_pkg::*;
  import h264_intra_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  pred_t pred [16];
  res_t  res [16];
  pix_t  pix [16];
  logic  done;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;
  always #5 clk = ~clk;
  recon_add dut (.clk, .rst_n, .start, .pred, .res, .pix, .done);
  initial begin
    for (int i = 0; i < 16; i++) begin pred[i] = '0; res[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int p [16], r [16], lat;
      for (int i = 0; i < 16; i++) begin
        p[i] = $urandom_range(0, 255);
        r[i] = int'($urandom_range(0, 511)) - 256;
        if (p[i] + r[i] < 0) n_lo++;
        if (p[i] + r[i] > 255) n_hi++;
      end
      @(negedge clk);
      start = 1;
      for (int i = 0; i < 16; i++) begin pred[i] = pred_t'(p[i]); res[i] = res_t'(r[i]); end
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(pix[i]) != clip255(p[i] + r[i])) begin
          failures++;
          $display("FAIL i=%0d p=%0d r=%0d got=%0d", i, p[i], r[i], pix[i]);
        end
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
