// One ICT_1D pass on random matrices: output column k must be the 1-D
// inverse transform of input row k, registered on en and held otherwise.
module tb_ict_1d;
  import h264_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [22:0] x [16];
  logic signed [24:0] y [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ict_1d #(.IW(23)) dut (.clk, .rst_n, .en, .x, .y);
  initial begin
    for (int i = 0; i < 16; i++) x[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int d [16];
      for (int i = 0; i < 16; i++) begin
        d[i] = int'($urandom_range(0, 1 << 20)) - (1 << 19);
        x[i] = 23'(d[i]);
      end
      @(negedge clk); en = 1;
      @(negedge clk); en = 0;
      for (int i = 0; i < 16; i++) x[i] = '0;   // must not disturb the held result
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        int f [4];
        t4(d[4*k], d[4*k+1], d[4*k+2], d[4*k+3], f[0], f[1], f[2], f[3]);
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (int'(y[4*j + k]) != f[j]) begin
            failures++;
            $display("FAIL k=%0d j=%0d got=%0d exp=%0d", k, j, int'(y[4*j+k]), f[j]);
          end
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
