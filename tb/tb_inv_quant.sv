// Random 4x4 blocks and QPs through the 16-way inverse quantizer; all 16
// outputs are compared with the reference c*V(QP%6,pos)<<floor(QP/6) and the
// 3-cycle latency of the unit is checked.
module tb_inv_quant;
  import h264_ref_pkg::*;
  import h264_intra_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] qp;
  coef_t res_in [16];
  dq_t   res_out [16];
  logic  done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  inv_quant dut (.clk, .rst_n, .start, .qp, .res_in, .res_out, .done);

  initial begin
    for (int i = 0; i < 16; i++) res_in[i] = '0;
    qp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      blk_t z, w;
      int q, lat;
      q = $urandom_range(0, 51);
      for (int i = 0; i < 16; i++) z[i] = int'($urandom_range(0, 1000)) - 500;
      w = ref_dequant(z, q);
      @(negedge clk);
      qp = 6'(q); start = 1;
      for (int i = 0; i < 16; i++) res_in[i] = coef_t'(z[i]);
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(res_out[i]) != w[i]) begin
          failures++;
          $display("FAIL qp=%0d i=%0d got=%0d exp=%0d", q, i, int'(res_out[i]), w[i]);
        end
      end
    end
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
