// Random dequantized blocks through the 2-D inverse transform; outputs are
// compared with the reference matrix product, (x+32)>>6 and 9-bit
// saturation, and done must come 2 cycles after start. Some blocks are large
// enough to exercise the saturation.
module tb_inv_transform;
  import h264_ref_pkg::*;
  import h264_intra_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  dq_t  coef_in [16];
  res_t coef_out [16];
  logic done;
  int checks = 0, failures = 0, n_sat = 0;
  always #5 clk = ~clk;
  inv_transform dut (.clk, .rst_n, .start, .coef_in, .coef_out, .done);
  initial begin
    for (int i = 0; i < 16; i++) coef_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      blk_t d, r, ru;
      int lat, range_;
      range_ = (t % 4 == 0) ? (1 << 14) : (1 << 10);
      for (int i = 0; i < 16; i++) d[i] = int'($urandom_range(0, 2 * range_)) - range_;
      r  = ref_itrans(d, 1'b1);
      ru = ref_itrans(d, 1'b0);
      for (int i = 0; i < 16; i++) if (r[i] != ru[i]) n_sat++;
      @(negedge clk);
      start = 1;
      for (int i = 0; i < 16; i++) coef_in[i] = dq_t'(d[i]);
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(coef_out[i]) != r[i]) begin
          failures++;
          $display("FAIL t=%0d i=%0d got=%0d exp=%0d", t, i, int'(coef_out[i]), r[i]);
        end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated outputs: %0d", n_sat);
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
