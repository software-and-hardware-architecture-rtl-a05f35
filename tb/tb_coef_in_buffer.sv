// Writes random coefficient pairs to the input buffer in random order and
// checks that each coefficient lands at its raster position.
module tb_coef_in_buffer;
  import h264_intra_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [2:0] wr_addr;
  logic [31:0] wr_data;
  coef_t coef [16];
  int checks = 0, failures = 0;
  int model [16];
  always #5 clk = ~clk;
  coef_in_buffer dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .coef);
  initial begin
    wr_addr = '0; wr_data = '0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int a;
      logic [31:0] d;
      a = $urandom_range(0, 7);
      d = $urandom;
      @(negedge clk);
      wr_en = ($urandom_range(0, 3) != 0);
      wr_addr = 3'(a); wr_data = d;
      if (wr_en) begin
        model[2*a]   = int'($signed(d[15:0]));
        model[2*a+1] = int'($signed(d[31:16]));
      end
      @(negedge clk);
      wr_en = 0;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(coef[i]) != model[i]) begin
          failures++;
          $display("FAIL i=%0d got=%0d exp=%0d", i, int'(coef[i]), model[i]);
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
